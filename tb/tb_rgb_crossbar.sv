// tb_rgb_crossbar: random selections; each colour output must carry the
// selected input channel or the module result, and to_mod the selected
// channel, one step later.
`include "tb_common.svh"
module tb_rgb_crossbar;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  logic [13:0] sel; pix_t ci [4]; pix_t res; pix_t co [4]; pix_t tm;
  rgb_crossbar dut (.clk, .rst_n, .px_en, .sel, .ch_in(ci), .result(res), .ch_out(co), .to_mod(tm));
  `WATCHDOG(clk, 20000)
  initial begin
    sel = '0; foreach (ci[i]) ci[i] = 0; res = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      pix_t e [4]; pix_t et;
      @(negedge clk) begin
        for (int k = 0; k < 4; k++) sel[3*k +: 3] = 3'($urandom_range(0, 4));
        sel[13:12] = 2'($urandom);
        for (int k = 0; k < 4; k++) ci[k] = pix_t'($urandom);
        res = pix_t'($urandom);
        for (int k = 0; k < 4; k++) e[k] = sel[3*k +: 3] == 4 ? res : ci[sel[3*k +: 2]];
        et = ci[sel[13:12]];
      end
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) `CHECK(co[k] == e[k], $sformatf("out %0d", k))
      `CHECK(tm == et, "to_mod")
    end
    `TB_FINISH
  end
endmodule
