// tb_direction_op: random pairs through the direction comparator; output must
// be 0xFF exactly when a > b, four steps later.
`include "tb_common.svh"
module tb_direction_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  pix_t a, b, dout;
  direction_op dut (.clk, .rst_n, .px_en, .a, .b, .dout);
  `WATCHDOG(clk, 20000)
  pix_t hist [$];
  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk) begin
        a = pix_t'($urandom); b = (n % 5 == 0) ? a : pix_t'($urandom);
        hist.push_back(a > b ? 8'hFF : 8'h00);
      end
      @(posedge clk); #1;
      if (hist.size() > 4) begin void'(hist.pop_front()); `CHECK(dout == hist[0], "direction") end
    end
    `TB_FINISH
  end
endmodule
