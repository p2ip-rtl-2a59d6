// tb_nms_op: random windows through the non-maximum suppressor in both
// directional and whole-window mode, compared with a reference, two steps
// later.
`include "tb_common.svh"
module tb_nms_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  logic wm; window_t w; pix_t dir, dout;
  nms_op dut (.clk, .rst_n, .px_en, .win_mode(wm), .win(w), .dir, .dout);
  `WATCHDOG(clk, 20000)
  pix_t hist [$];
  int kept = 0;
  function automatic pix_t ref_n(input logic m, input window_t x, input pix_t d);
    pix_t c; c = x[2][4];
    if (m) begin
      for (int r = 0; r < 5; r++) for (int k = 0; k < 9; k++) if (x[r][k] > c) return 0;
      return c;
    end
    if (d != 0) return (c >= x[2][3] && c >= x[2][5]) ? c : 0;
    return (c >= x[1][4] && c >= x[3][4]) ? c : 0;
  endfunction
  initial begin
    wm = 0; w = '0; dir = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) begin
        wm = n >= 1000;
        for (int r = 0; r < 5; r++) for (int k = 0; k < 9; k++) w[r][k] = pix_t'($urandom_range(0, wm ? 160 : 255));
        if (n % 4 == 0) w[2][4] = 8'd200;
        dir = (n % 2) ? 8'hFF : 8'h00;
        hist.push_back(ref_n(wm, w, dir));
      end
      @(posedge clk); #1;
      if (hist.size() > 2) begin
        void'(hist.pop_front());
        `CHECK(dout == hist[0], $sformatf("n %0d got %0d exp %0d", n, dout, hist[0]))
        if (dout != 0) kept++;
      end
    end
    `CHECK(kept > 100, "maxima kept")
    `TB_FINISH
  end
endmodule
