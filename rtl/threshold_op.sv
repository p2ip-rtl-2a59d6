// threshold_op: the Threshold operator (Thr) of the pixel processor.
//
// Modes (configuration bits 1:0): 1 bypass, 2 normal, 3 hysteresis; 0 is
// treated as bypass. Normal: 0 below T_low, logic 1 at or above it.
// Hysteresis: 0 below T_low, the pixel itself between T_low and T_high
// (edge candidate), logic 1 at or above T_high. Logic 1 is coded 0xFF on the
// 8-bit datapath so that candidates and true edges stay distinct.
// Latency 2 steps, the document's figure. The register layout (T_low, T_high,
// mode) and the mode numbers follow the document; the 0xFF coding is this
// design's.
module threshold_op
  import p2ip_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       px_en,
  input  logic [1:0] mode,
  input  pix_t       t_low,
  input  pix_t       t_high,
  input  pix_t       din,
  output pix_t       dout
);
  pix_t s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s1 <= '0; dout <= '0; end
    else if (px_en) begin
      unique case (thr_mode_e'(mode))
        THR_NORMAL: s1 <= (din >= t_low) ? PIX_TRUE : '0;
        THR_HYST:   s1 <= (din < t_low) ? '0 : (din < t_high) ? din : PIX_TRUE;
        default:    s1 <= din;
      endcase
      dout <= s1;
    end
  end
endmodule
