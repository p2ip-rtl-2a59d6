// module_crossbar: the module crossbar of the Reconfigurable Interconnection.
//
// A registered 12-to-13 crossbar of 8-bit paths. Sources (4-bit codes):
//   0 zero, 1..5 iAux1..iAux5, 6 oPP_a, 7 oPP_b, 8 oMC, 9 oSP_a, 10 oSP_b,
//   11 the channel coming from the RGB crossbar.
// Destinations (4 select bits each, destination d at bits 4d+3:4d):
//   0 iPP_a, 1 iPP_b, 2 iPP_c, 3 iMC_a, 4 iRec, 5 iMC_b, 6 iSP,
//   7..11 oAux1..oAux5, 12 the result channel to the RGB crossbar.
// Every destination is a register that loads on each pixel step. After reset
// the auxiliary channels pass straight through (oAuxK = iAuxK).
// The sources and destinations are the ones the document's figure names;
// the select coding is this design's.
module module_crossbar
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic [51:0] sel,
  input  pix_t        src [12],
  output pix_t        dst [13]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 13; d++) dst[d] <= '0;
    end else if (px_en) begin
      for (int d = 0; d < 13; d++) begin
        automatic logic [3:0] s = sel[4*d +: 4];
        dst[d] <= (s < 4'd12) ? src[s] : '0;
      end
    end
  end
endmodule
