// tb_memory_block: writes random words, reads them back with the one-step
// registered read, checks read-before-write on the same address and that
// nothing changes while en is low.
`include "tb_common.svh"
module tb_memory_block;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  mb_req_t req;
  pix_t rd;
  pix_t model [4096];
  memory_block dut (.clk, .en, .req, .rdata(rd));
  `WATCHDOG(clk, 20000)
  initial begin
    req = '0;
    for (int a = 0; a < 4096; a += 1) begin
      @(negedge clk) begin en = 1; req.we = 1; req.waddr = 12'(a); req.wdata = pix_t'($urandom); model[a] = req.wdata; end
    end
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom_range(0, 4095);
      @(negedge clk) begin req.we = 0; req.raddr = 12'(a); end
      @(posedge clk); #1;
      `CHECK(rd == model[a], $sformatf("read %0d", a))
    end
    // read and write the same address in one step: old data
    @(negedge clk) begin req.we = 1; req.waddr = 12'd7; req.raddr = 12'd7; req.wdata = ~model[7]; end
    @(posedge clk); #1;
    `CHECK(rd == model[7], "read-before-write")
    model[7] = ~model[7];
    @(negedge clk) begin req.we = 0; end
    @(posedge clk); #1;
    `CHECK(rd == model[7], "new data after write")
    // en low: no write, no read
    @(negedge clk) begin en = 0; req.we = 1; req.waddr = 12'd9; req.wdata = ~model[9]; req.raddr = 12'd9; end
    @(negedge clk) begin en = 1; req.we = 0; req.raddr = 12'd9; end
    @(posedge clk); #1;
    `CHECK(rd == model[9], "no write while en low")
    `TB_FINISH
  end
endmodule
