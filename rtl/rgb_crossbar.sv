// rgb_crossbar: the RGB crossbar of the Reconfigurable Interconnection, the
// main input and output of a PE.
//
// Four colour channels come in (iR, iG, iB, iGs) and four go out. A PE works
// on one channel: `to_mod` (select bits 13:12, 0 R, 1 G, 2 B, 3 Gs) sends the
// chosen input to the module crossbar and `result` comes back from it. Each
// output (oR bits 2:0, oG 5:3, oB 8:6, oGs 11:9) selects 0..3 = one of the
// four inputs or 4 = the result. All outputs are registers loaded on each
// pixel step. After reset every channel passes straight through.
// The single channel to and from the module crossbar follows the document;
// the select coding is this design's.
module rgb_crossbar
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic [13:0] sel,
  input  pix_t        ch_in  [4],
  input  pix_t        result,
  output pix_t        ch_out [4],
  output pix_t        to_mod
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) ch_out[k] <= '0;
      to_mod <= '0;
    end else if (px_en) begin
      for (int k = 0; k < 4; k++) begin
        automatic logic [2:0] s = sel[3*k +: 3];
        ch_out[k] <= (s == 3'd4) ? result : (s < 3'd4) ? ch_in[s[1:0]] : '0;
      end
      to_mod <= ch_in[sel[13:12]];
    end
  end
endmodule
