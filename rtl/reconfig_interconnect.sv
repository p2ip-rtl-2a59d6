// reconfig_interconnect: the Reconfigurable Interconnection (RI) of a PE.
//
// Routes the pixel streams between the neighbouring PEs and the PE's three
// processing modules. data_in/data_out are four colour channels (R, G, B,
// gray) and five auxiliary channels that let PEs share partial results.
// Every input of the RI (from the previous PE and from the modules) passes a
// register, then the RGB crossbar picks the channel the PE works on, the
// module crossbar spreads the streams over module inputs and auxiliary
// outputs, and the result returns through the RGB crossbar; both crossbars
// register their outputs. A pass-through channel costs 2 steps per PE; the
// longest path (colour input -> MC -> SP -> PP -> colour output) spends 8
// steps in the RI, the document's figure.
// Configuration (module ID 4): module crossbar (op 1, 7 bytes, see
// module_crossbar) and RGB crossbar (op 2, 2 bytes, see rgb_crossbar).
module reconfig_interconnect
  import p2ip_pkg::*;
(
  input  logic      clk,
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  logic      px_en,
  input  cfg_word_t pe_cfg,
  input  pix_t      ch_in   [4],
  input  pix_t      aux_in  [5],
  output pix_t      ch_out  [4],
  output pix_t      aux_out [5],
  // module side
  output pix_t      iPP_a, iPP_b, iPP_c, iMC_a, iRec, iMC_b, iSP,
  input  pix_t      oPP_a, oPP_b, oMC, oSP_a, oSP_b
);
  cfg_word_t mod_cfg;
  module_cd #(.MOD_ID(MOD_RI)) u_mcd (.cfg_clk, .rst_n, .pe_cfg, .mod_cfg);

  logic [55:0] mxb_reg;
  logic [15:0] rgb_reg;
  reg_cd #(.OP_ID(OP_MXB),  .NBYTES(7), .RESET_VAL(56'h0000_5432_1000_0000)) r_mxb (.cfg_clk, .rst_n, .mod_cfg, .value(mxb_reg));
  reg_cd #(.OP_ID(OP_RGBX), .NBYTES(2), .RESET_VAL(16'h0688))               u_rgb (.cfg_clk, .rst_n, .mod_cfg, .value(rgb_reg));

  // input registers
  pix_t ch_q [4], aux_q [5], mod_q [5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) ch_q[k]  <= '0;
      for (int k = 0; k < 5; k++) aux_q[k] <= '0;
      for (int k = 0; k < 5; k++) mod_q[k] <= '0;
    end else if (px_en) begin
      ch_q  <= ch_in;
      aux_q <= aux_in;
      mod_q <= '{oPP_a, oPP_b, oMC, oSP_a, oSP_b};
    end
  end

  pix_t to_mod, result;
  pix_t src [12];
  pix_t dst [13];
  always_comb begin
    src[0] = '0;
    for (int k = 0; k < 5; k++) src[1+k] = aux_q[k];
    for (int k = 0; k < 5; k++) src[6+k] = mod_q[k];
    src[11] = to_mod;
  end

  module_crossbar u_mxb (.clk, .rst_n, .px_en, .sel(mxb_reg[51:0]), .src, .dst);
  assign result = dst[12];
  rgb_crossbar u_rgbx (.clk, .rst_n, .px_en, .sel(rgb_reg[13:0]), .ch_in(ch_q), .result, .ch_out, .to_mod);

  assign iPP_a = dst[0];
  assign iPP_b = dst[1];
  assign iPP_c = dst[2];
  assign iMC_a = dst[3];
  assign iRec  = dst[4];
  assign iMC_b = dst[5];
  assign iSP   = dst[6];
  always_comb for (int k = 0; k < 5; k++) aux_out[k] = dst[7+k];
endmodule
