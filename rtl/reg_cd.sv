// reg_cd: Register Configuration Decoder, the leaf of the configuration tree.
//
// Holds the configuration register of one operator. A configuration word whose
// operator ID equals OP_ID writes its data byte into byte `idx` of the
// register on the next configuration clock edge (the fourth and last stage of
// the tree). Bytes whose index is beyond NBYTES are ignored. After reset the
// register holds RESET_VAL, so an unconfigured operator is in a known mode.
// The byte layout of each register is defined by the operator that uses it.
module reg_cd
  import p2ip_pkg::*;
#(
  parameter logic [4:0]  OP_ID     = 5'd1,
  parameter int unsigned NBYTES    = 1,
  parameter logic [NBYTES*8-1:0] RESET_VAL = '0
) (
  input  logic                cfg_clk,
  input  logic                rst_n,
  input  cfg_word_t           mod_cfg,   // words already filtered for this module
  output logic [NBYTES*8-1:0] value
);
  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) value <= RESET_VAL;
    else if (mod_cfg.valid && mod_cfg.op_id == OP_ID && 32'(mod_cfg.idx) < NBYTES)
      value[mod_cfg.idx*8 +: 8] <= mod_cfg.data;
  end
endmodule
