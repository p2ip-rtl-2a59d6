// tb_module_cd: checks that the Module-CD forwards, one clock later, only the
// words of its own module ID, with all fields intact.
`include "tb_common.svh"
module tb_module_cd;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_word_t i, o;
  module_cd #(.MOD_ID(3'd3)) dut (.cfg_clk(clk), .rst_n, .pe_cfg(i), .mod_cfg(o));
  `WATCHDOG(clk, 2000)
  initial begin
    i = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      cfg_word_t x;
      x = cfg_word_t'({$urandom, $urandom});
      x.mod_id = 3'($urandom_range(0, 7));
      @(negedge clk) i = x;
      @(posedge clk); #1;
      `CHECK(o.valid == (x.valid && x.mod_id == 3'd3), "valid filter")
      if (o.valid) `CHECK(o.data == x.data && o.op_id == x.op_id && o.idx == x.idx, "fields kept")
    end
    `TB_FINISH
  end
endmodule
