// input_register: the input boundary of the pipeline.
//
// On every pixel step it registers the 24-bit true-colour input (R in bits
// 23:16, G in 15:8, B in 7:0), splits it into the R, G and B channels and
// adds a fourth, gray channel Gs = (77 R + 150 G + 29 B) / 256 (ITU-R BT.601
// luma weights in 8-bit fixed point). One step of latency.
// The split and the gray channel follow the document; the bit order and the
// luma weights are this design's choice.
module input_register
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic [23:0] s_tdata,
  output pix_t        ch [4]     // R, G, B, Gs
);
  pix_t r, g, b;
  logic [15:0] y;
  assign {r, g, b} = s_tdata;
  assign y = 16'd77 * r + 16'd150 * g + 16'd29 * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) ch[k] <= '0;
    end else if (px_en) begin
      ch[0] <= r;
      ch[1] <= g;
      ch[2] <= b;
      ch[3] <= y[15:8];
    end
  end
endmodule
