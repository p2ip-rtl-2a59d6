// tb_connector_op: random windows of suppressed (0), candidate and true-edge
// (0xFF) pixels; a candidate centre next to a true edge must become 0xFF,
// everything else pass unchanged, two steps later.
`include "tb_common.svh"
module tb_connector_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  window_t w; pix_t dout;
  connector_op dut (.clk, .rst_n, .px_en, .win(w), .dout);
  `WATCHDOG(clk, 20000)
  pix_t hist [$];
  int promoted = 0;
  initial begin
    w = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) begin
        logic t;
        for (int r = 0; r < 5; r++) for (int k = 0; k < 9; k++) begin
          int s; s = $urandom_range(0, 9);
          w[r][k] = s < 7 ? 8'd0 : s < 9 ? pix_t'($urandom_range(1, 254)) : 8'hFF;
        end
        if (n % 2) w[2][4] = pix_t'($urandom_range(1, 254));
        t = 0;
        for (int r = 1; r <= 3; r++) for (int k = 3; k <= 5; k++) if (!(r == 2 && k == 4) && w[r][k] == 8'hFF) t = 1;
        hist.push_back((w[2][4] != 0 && t) ? 8'hFF : w[2][4]);
      end
      @(posedge clk); #1;
      if (hist.size() > 2) begin
        void'(hist.pop_front());
        `CHECK(dout == hist[0], "connector")
      end
    end
    `TB_FINISH
  end
endmodule
