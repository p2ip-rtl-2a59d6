// pixel_processor: the Pixel Processor (PP) of a PE: pixel-to-pixel operators
// Dir, ALU, Har and Thr.
//
// Dir compares iPP_a with iPP_b and drives oPP_a. The ALU works on iPP_a and
// iPP_b (or a constant). Har takes A, B, C on iPP_a, iPP_b, iPP_c. Thr takes
// the ALU result or the Harris response and drives oPP_b; in bypass it passes
// its input, so the ALU or Har result reaches oPP_b two steps later.
// Configuration (module ID 1):
//   ALU (op 1, 3 bytes): b0[3:0] function, b0[4] constant operand,
//       b0[5] signed b, b0[6] Thr input = Har; b1 constant;
//       b2[3:0] product shift, b2[7:4] add/sub shift of b.
//   Thr (op 2, 3 bytes): T_low, T_high, mode (document's layout).
// Latencies: Dir 4, ALU 2, Har 4, Thr 2 steps. The operators and the
// Dir->oPP_a, Thr->oPP_b wiring follow the document's figure of the module;
// the input assignment of Har and the ALU register are this design's.
module pixel_processor
  import p2ip_pkg::*;
(
  input  logic      clk,
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  logic      px_en,
  input  cfg_word_t pe_cfg,
  input  pix_t      iPP_a,
  input  pix_t      iPP_b,
  input  pix_t      iPP_c,
  output pix_t      oPP_a,
  output pix_t      oPP_b
);
  cfg_word_t mod_cfg;
  module_cd #(.MOD_ID(MOD_PP)) u_mcd (.cfg_clk, .rst_n, .pe_cfg, .mod_cfg);

  logic [23:0] alu_reg, thr_reg;
  reg_cd #(.OP_ID(OP_ALU), .NBYTES(3), .RESET_VAL(24'h0)) u_alu_r (.cfg_clk, .rst_n, .mod_cfg, .value(alu_reg));
  reg_cd #(.OP_ID(OP_THR), .NBYTES(3), .RESET_VAL(24'h01_0000)) u_thr_r (.cfg_clk, .rst_n, .mod_cfg, .value(thr_reg));

  pix_t alu_o, har_o, thr_in;
  direction_op u_dir (.clk, .rst_n, .px_en, .a(iPP_a), .b(iPP_b), .dout(oPP_a));
  alu_op u_alu (
    .clk, .rst_n, .px_en, .op(alu_op_e'(alu_reg[3:0])), .use_const(alu_reg[4]), .b_signed(alu_reg[5]),
    .cst(alu_reg[15:8]), .oshift(alu_reg[19:16]), .kshift(alu_reg[23:20]),
    .a(iPP_a), .b_in(iPP_b), .dout(alu_o)
  );
  harris_op u_har (.clk, .rst_n, .px_en, .a(iPP_a), .b(iPP_b), .c(iPP_c), .dout(har_o));

  // Thr input: ALU result or Harris response.
  assign thr_in = alu_reg[6] ? har_o : alu_o;
  threshold_op u_thr (.clk, .rst_n, .px_en, .mode(thr_reg[17:16]), .t_low(thr_reg[7:0]),
                      .t_high(thr_reg[15:8]), .din(thr_in), .dout(oPP_b));
endmodule
