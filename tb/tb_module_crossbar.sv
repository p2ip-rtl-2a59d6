// tb_module_crossbar: random selections and random source values; every
// destination must show its selected source one step later (zero for code 0
// and for unused codes).
`include "tb_common.svh"
module tb_module_crossbar;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  logic [51:0] sel; pix_t src [12]; pix_t dst [13];
  module_crossbar dut (.clk, .rst_n, .px_en, .sel, .src, .dst);
  `WATCHDOG(clk, 20000)
  initial begin
    sel = '0; foreach (src[i]) src[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      pix_t e [13];
      @(negedge clk) begin
        for (int d = 0; d < 13; d++) sel[4*d +: 4] = 4'($urandom_range(0, 13));
        for (int s = 1; s < 12; s++) src[s] = pix_t'($urandom);
        src[0] = 0;
        for (int d = 0; d < 13; d++) e[d] = sel[4*d +: 4] < 12 ? src[sel[4*d +: 4]] : 8'd0;
      end
      @(posedge clk); #1;
      for (int d = 0; d < 13; d++) `CHECK(dst[d] == e[d], $sformatf("dest %0d", d))
    end
    `TB_FINISH
  end
endmodule
