// tb_border_handler: feeds raw windows cut from a random 20 x 12 frame at
// random centres (many on the frame edges) and window sizes, and compares
// the output with the clamped reference window three steps later.
`include "tb_common.svh"
module tb_border_handler;
  import p2ip_pkg::*;
  `include "tb_ref.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  localparam int W = 20, H = 12;
  window_t raw, win;
  logic [2:0] rows; logic [3:0] cols;
  logic signed [13:0] xc, yc;
  border_handler dut (.clk, .rst_n, .px_en, .raw, .rows, .cols, .xc, .yc,
                      .frame_w(12'(W)), .frame_h(12'(H)), .win);
  `WATCHDOG(clk, 50000)
  frame_t img;
  window_t hist [$];
  int edges = 0;
  initial begin
    raw = '0; rows = 3; cols = 3; xc = 0; yc = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk) begin
        int m, nn, cr, cc, q, x, y;
        m = $urandom_range(3, 5); nn = $urandom_range(1, 9);
        cr = (m - 1) / 2; cc = (nn - 1) / 2;
        x = ($urandom_range(0, 1)) ? $urandom_range(0, W - 1) : (($urandom_range(0, 1)) ? $urandom_range(0, 3) : W - 1 - $urandom_range(0, 3));
        y = $urandom_range(0, H - 1);
        rows = 3'(m); cols = 4'(nn); xc = 14'(x); yc = 14'(y);
        if (x < 4 || x > W - 5 || y < 2 || y > H - 3) edges++;
        // stream index of raw[0][0]
        q = y * W + x + cr * W + cc;
        for (int r = 0; r < 5; r++) for (int c = 0; c < 9; c++) begin
          int s; s = q - r * W - c;
          raw[r][c] = (s >= 0 && s < W * H) ? img[s / W][s % W] : pix_t'($urandom);
        end
        hist.push_back(ref_window(img, W, H, m, nn, x, y));
      end
      @(posedge clk); #1;
      if (hist.size() > 3) begin
        void'(hist.pop_front());
        `CHECK(win == hist[0], $sformatf("window %0d", n))
      end
    end
    `CHECK(edges > 500, "edge cases exercised")
    `TB_FINISH
  end
endmodule
