// harris_op: the Harris operator (Har) of the pixel processor.
//
// From the smoothed products A = (gH^2)*w, B = (gV^2)*w and C = (gH*gV)*w it
// forms the Harris response R = det(M) - k*tr(M)^2 = A*B - C^2 - k*(A+B)^2
// with k = 3/64 (0.047, inside the usual 0.04..0.06). The 8-bit output is
// R / 256, with negative responses (edges) clipped to 0 and large ones to 255.
// Inputs: a = A (iPP_a), b = B (iPP_b), c = C (iPP_c). Latency 4 steps
// (products, combination, scaling, output register), the document's figure.
// The formula is the document's; k, the scaling and the input order are this
// design's.
module harris_op
  import p2ip_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic px_en,
  input  pix_t a,
  input  pix_t b,
  input  pix_t c,
  output pix_t dout
);
  logic signed [31:0] ab, cc, tr2, r64, r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ab <= '0; cc <= '0; tr2 <= '0; r64 <= '0; r <= '0; dout <= '0;
    end else if (px_en) begin
      ab   <= 32'(a) * 32'(b);
      cc   <= 32'(c) * 32'(c);
      tr2  <= (32'(a) + 32'(b)) * (32'(a) + 32'(b));
      r64  <= ((ab - cc) <<< 6) - 3 * tr2;   // 64 * R
      r    <= r64 >>> 14;                    // R / 256
      dout <= sat_u8(r);
    end
  end
endmodule
