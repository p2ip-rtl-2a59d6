// tb_delay_op: for several delays (2, 3, 37, 4095, 4100 and the longest,
// 8193, which spans both memory blocks) streams random pixels with pauses
// and checks that each pixel comes out exactly d steps after it went in.
`include "tb_common.svh"
module tb_delay_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 0;
  always #5 clk = ~clk;
  logic [13:0] delay; pix_t din, dout;
  mb_req_t req [2]; pix_t rd [2];
  delay_op dut (.clk, .rst_n, .px_en, .delay, .din, .mb_req(req), .mb_rdata(rd), .dout);
  for (genvar k = 0; k < 2; k++) begin : g_mb
    memory_block u (.clk, .en(px_en), .req(req[k]), .rdata(rd[k]));
  end
  `WATCHDOG(clk, 200000)
  pix_t hist [$];
  initial begin
    int ds [6] = '{2, 3, 37, 4095, 4100, 8193};
    delay = 2; din = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (ds[j]) begin
      delay = 14'(ds[j]);
      hist.delete();
      for (int n = 0; n < ds[j] + 300; n++) begin
        @(negedge clk);
        if ($urandom_range(0, 7) == 0) begin px_en = 0; @(negedge clk); end
        px_en = 1; din = pix_t'($urandom);
        hist.push_back(din);
        @(posedge clk); #1;
        // after the step with input number n, dout holds input n - d + 1
        if (n >= ds[j] - 1 && n >= ds[j] + 2) begin
          `CHECK(dout == hist[n - ds[j] + 1], $sformatf("delay %0d step %0d", ds[j], n))
        end
        px_en = 0;
      end
    end
    `TB_FINISH
  end
endmodule
