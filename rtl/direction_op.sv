// direction_op: the Direction operator (Dir) of the pixel processor.
//
// Boolean comparison iPP_a > iPP_b (0xFF for true, 0 for false). Fed with the
// magnitudes of the horizontal and vertical gradients it tells which one
// dominates, a coarse stand-in for the arctangent of the gradient direction.
// Latency LATENCY steps (default 4, equal to ALU plus threshold, so that the
// direction and the ALU result leave the pixel processor in the same step);
// the latency is this design's choice.
module direction_op
  import p2ip_pkg::*;
#(
  parameter int unsigned LATENCY = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic px_en,
  input  pix_t a,
  input  pix_t b,
  output pix_t dout
);
  pix_t pipe [LATENCY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe[i] <= '0;
    end else if (px_en) begin
      pipe[0] <= (a > b) ? PIX_TRUE : '0;
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end
  assign dout = pipe[LATENCY-1];
endmodule
