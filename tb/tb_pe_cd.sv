// tb_pe_cd: checks that the PE-CD forwards, one clock later, only the words
// addressed to its PE ID.
`include "tb_common.svh"
module tb_pe_cd;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_word_t i, o;
  pe_cd #(.PE_ID(5'd7)) dut (.cfg_clk(clk), .rst_n, .p2ip_cfg(i), .pe_cfg(o));
  `WATCHDOG(clk, 2000)
  initial begin
    i = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      cfg_word_t x;
      x = cfg_word_t'({$urandom, $urandom});
      x.pe_id = ($urandom_range(0, 3) == 0) ? 5'd23 : 5'($urandom_range(5, 9));
      @(negedge clk) i = x;
      @(posedge clk); #1;
      `CHECK(o.valid == (x.valid && x.pe_id == 5'd7), "valid filter")
      if (o.valid) `CHECK(o.data == x.data && o.mod_id == x.mod_id && o.op_id == x.op_id, "fields kept")
    end
    `TB_FINISH
  end
endmodule
