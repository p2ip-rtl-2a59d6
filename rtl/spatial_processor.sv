// spatial_processor: the Spatial Processor (SP) of a PE: the neighborhood
// operators 2DC, NMS and Con working on the window from the memory
// controller.
//
// oSP_a is either 2DC output a or the NMS result; oSP_b is 2DC output b or
// the connector result. iSP is the second input of the NMS (gradient
// direction). All three operators always run; the 2DC configuration register
// (module ID 3, operator 1, two bytes) selects what leaves the module:
//   b0[2:0] kernel a, b0[5:3] kernel b, b0[7:6] 2DC output format,
//   b1[0] oSP_a = NMS, b1[1] oSP_b = Con, b1[2] NMS window mode,
//   b1[3] the downloaded kernel is 5x5 (else its centre 3x3 is used).
// Kernel code 0 selects the downloaded kernel: operators 2..5 of this module
// hold its 25 signed coefficients, row by row (operator 2 bytes 0..7 =
// coefficients 0..7, operator 3 = 8..15, operator 4 = 16..23, operator 5
// byte 0 = coefficient 24 and byte 1 [4:0] = right shift of the sum).
// After reset all coefficients are zero, so kernel 0 then gives 0.
// Latencies: 2DC 10 steps, NMS and Con 2 steps.
// The operator set and the fact that the 2DC register selects the active
// operator and the downloadable coefficients follow the document; the output
// pairing, the split of the coefficients over four registers and the
// encoding are this design's.
module spatial_processor
  import p2ip_pkg::*;
(
  input  logic      clk,
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  logic      px_en,
  input  cfg_word_t pe_cfg,
  input  window_t   oWindow,
  input  pix_t      iSP,
  output pix_t      oSP_a,
  output pix_t      oSP_b
);
  cfg_word_t mod_cfg;
  module_cd #(.MOD_ID(MOD_SP)) u_mcd (.cfg_clk, .rst_n, .pe_cfg, .mod_cfg);

  logic [15:0] c2d_reg;
  reg_cd #(.OP_ID(OP_C2D), .NBYTES(2), .RESET_VAL(16'h0000)) u_c2d (.cfg_clk, .rst_n, .mod_cfg, .value(c2d_reg));

  logic [63:0] uk0, uk1, uk2;
  logic [15:0] uk3;
  reg_cd #(.OP_ID(OP_C2D_K0), .NBYTES(8), .RESET_VAL(64'h0)) u_k0 (.cfg_clk, .rst_n, .mod_cfg, .value(uk0));
  reg_cd #(.OP_ID(OP_C2D_K1), .NBYTES(8), .RESET_VAL(64'h0)) u_k1 (.cfg_clk, .rst_n, .mod_cfg, .value(uk1));
  reg_cd #(.OP_ID(OP_C2D_K2), .NBYTES(8), .RESET_VAL(64'h0)) u_k2 (.cfg_clk, .rst_n, .mod_cfg, .value(uk2));
  reg_cd #(.OP_ID(OP_C2D_K3), .NBYTES(2), .RESET_VAL(16'h0)) u_k3 (.cfg_clk, .rst_n, .mod_cfg, .value(uk3));

  logic [199:0] ucoef;
  kernel_t      user_k;
  assign ucoef = {uk3[7:0], uk2, uk1, uk0};
  always_comb
    for (int i = 0; i < 25; i++) user_k[i / 5][i % 5] = coef_t'(ucoef[8*i +: 8]);

  pix_t c_a, c_b, n_o, k_o;
  conv2d u_2dc (.clk, .rst_n, .px_en, .win(oWindow), .kern_a(c2d_reg[2:0]), .kern_b(c2d_reg[5:3]),
                .fmt(c2d_reg[7:6]), .user_k, .user_5x5(c2d_reg[11]), .user_sh(uk3[12:8]),
                .out_a(c_a), .out_b(c_b));
  nms_op u_nms (.clk, .rst_n, .px_en, .win_mode(c2d_reg[10]), .win(oWindow), .dir(iSP), .dout(n_o));
  connector_op u_con (.clk, .rst_n, .px_en, .win(oWindow), .dout(k_o));

  assign oSP_a = c2d_reg[8] ? n_o : c_a;
  assign oSP_b = c2d_reg[9] ? k_o : c_b;
endmodule
