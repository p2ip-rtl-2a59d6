// tb_reg_cd: checks the Reg-CD leaf register: reset value, writes of its own
// operator ID by byte index, and that other operator IDs and out-of-range
// byte indices leave it alone.
`include "tb_common.svh"
module tb_reg_cd;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_word_t w;
  logic [23:0] v;
  reg_cd #(.OP_ID(5'd2), .NBYTES(3), .RESET_VAL(24'h01_0203)) dut (.cfg_clk(clk), .rst_n, .mod_cfg(w), .value(v));
  `WATCHDOG(clk, 1000)
  task automatic put(input logic [4:0] op, input logic [2:0] idx, input logic [7:0] d);
    w <= '{valid: 1'b1, pe_id: 5'd1, mod_id: 3'd1, op_id: op, idx: idx, data: d};
    @(posedge clk); w <= '0; @(posedge clk); #1;
  endtask
  initial begin
    w = '0;
    repeat (2) @(posedge clk); #1;
    `CHECK(v == 24'h01_0203, "reset value")
    rst_n = 1;
    put(5'd2, 3'd0, 8'h32); `CHECK(v == 24'h01_0232, $sformatf("byte0 write %h", v))
    put(5'd2, 3'd1, 8'h64); `CHECK(v == 24'h01_6432, $sformatf("byte1 write %h", v))
    put(5'd2, 3'd2, 8'h03); `CHECK(v == 24'h03_6432, $sformatf("byte2 write %h", v))
    put(5'd3, 3'd0, 8'hAA); `CHECK(v == 24'h03_6432, "other operator ignored")
    put(5'd2, 3'd5, 8'hAA); `CHECK(v == 24'h03_6432, "index beyond size ignored")
    // a word without valid does nothing
    w <= '{valid: 1'b0, pe_id: 5'd1, mod_id: 3'd1, op_id: 5'd2, idx: 3'd0, data: 8'h55};
    @(posedge clk); w <= '0; @(posedge clk); #1;
    `CHECK(v == 24'h03_6432, "invalid word ignored")
    `TB_FINISH
  end
endmodule
