// memory_controller: the Memory Controller (MC) of a PE. Holds the PE's four
// Memory Blocks and the memory-based operators that use them: the
// Neighborhood Extractor (NE, with its border handler), the Mirror (Mir) and
// the Delay (Z^-n).
//
// MB1 and MB2 always belong to the NE. MB3 and MB4 are lent, through the MB
// crossbar, to exactly one of NE, Mir or Z^-n. iMC_a feeds the NE, iRec its
// recursive input, iMC_b feeds Mir and Z^-n. oWindow carries the bordered
// window to the spatial processor; oMC is the Mir or the Z^-n output.
//
// Configuration registers (module ID 2), byte 0 first:
//   MB crossbar (op 1, 4 bytes): b0[1:0] owner of MB3/MB4 (0 NE, 1 Mir,
//       2 Z^-n), b0[2] oMC source (0 Z^-n, 1 Mir); b1..b3 Mir frame offset.
//   NE (op 2, 4 bytes): b0[2:0] window lines m (3..5), b0[6:3] window
//       pixels n (1..9), b0[7] recursive mode; b1..b3 NE frame offset.
//   Z^-n (op 3, 2 bytes): delay in steps, 2..8193.
// The register contents are this design's encoding; the operators, the MB
// sharing rule and the IDs follow the document.
module memory_controller
  import p2ip_pkg::*;
#(
  parameter int unsigned MB_DEPTH = 4096
) (
  input  logic      clk,
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  logic      px_en,
  input  logic      frame_sync,
  input  coord_t    frame_w,
  input  coord_t    frame_h,
  input  cfg_word_t pe_cfg,
  input  pix_t      iMC_a,
  input  pix_t      iRec,
  input  pix_t      iMC_b,
  output pix_t      oMC,
  output window_t   oWindow
);
  cfg_word_t mod_cfg;
  module_cd #(.MOD_ID(MOD_MC)) u_mcd (.cfg_clk, .rst_n, .pe_cfg, .mod_cfg);

  logic [31:0] mbx_reg, ne_reg;
  logic [15:0] dly_reg;
  reg_cd #(.OP_ID(OP_MBX), .NBYTES(4), .RESET_VAL(32'h0000_0000)) r_mbx (.cfg_clk, .rst_n, .mod_cfg, .value(mbx_reg));
  reg_cd #(.OP_ID(OP_NE),  .NBYTES(4), .RESET_VAL(32'h0000_001B)) r_ne  (.cfg_clk, .rst_n, .mod_cfg, .value(ne_reg));
  reg_cd #(.OP_ID(OP_DLY), .NBYTES(2), .RESET_VAL(16'd2))         r_dly (.cfg_clk, .rst_n, .mod_cfg, .value(dly_reg));

  mb_owner_e owner;
  assign owner = mb_owner_e'(mbx_reg[1:0]);

  mb_req_t ne_req [4];
  mb_req_t mir_req[2], dly_req[2];
  mb_req_t mb_req [4];
  pix_t    mb_rd  [4];
  pix_t    mir_out, dly_out;

  neighborhood_extractor u_ne (
    .clk, .rst_n, .px_en, .frame_sync, .frame_w, .frame_h,
    .rows(ne_reg[2:0]), .cols(ne_reg[6:3]), .rec_en(ne_reg[7]), .offset(ne_reg[31:8]),
    .mb34_ok(owner == MB_TO_NE),
    .din(iMC_a), .rec_in(iRec), .mb_req(ne_req), .mb_rdata(mb_rd), .win(oWindow)
  );

  mirror_op u_mir (
    .clk, .rst_n, .px_en, .frame_sync, .frame_w, .offset(mbx_reg[31:8]),
    .din(iMC_b), .mb_req(mir_req), .mb_rdata(mb_rd[2:3]), .dout(mir_out)
  );

  delay_op u_dly (
    .clk, .rst_n, .px_en, .delay(dly_reg[13:0]),
    .din(iMC_b), .mb_req(dly_req), .mb_rdata(mb_rd[2:3]), .dout(dly_out)
  );

  // MB crossbar: MB3/MB4 go to one operator at a time.
  always_comb begin
    mb_req[0] = ne_req[0];
    mb_req[1] = ne_req[1];
    for (int k = 0; k < 2; k++) begin
      unique case (owner)
        MB_TO_MIR: mb_req[k+2] = mir_req[k];
        MB_TO_DLY: mb_req[k+2] = dly_req[k];
        default:   mb_req[k+2] = ne_req[k+2];
      endcase
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_mb
    memory_block #(.DEPTH(MB_DEPTH)) u_mb (.clk, .en(px_en), .req(mb_req[k]), .rdata(mb_rd[k]));
  end

  assign oMC = mbx_reg[2] ? mir_out : dly_out;
endmodule
