// tb_neighborhood_extractor: streams random frames (24 x 9 pixels) through
// the NE and its four memory blocks for several window sizes (3x3, 5x5, 5x9,
// 3x9, 4x7), with random pauses of px_en, a start offset and two frames
// separated by frame_sync. Every window is compared with the bordered
// reference window; the centre must appear cr*W + cc + 4 steps after it
// entered. Also checks the 3-row limit when MB3/MB4 are lent away and the
// recursive input feeding the rows above the centre.
`include "tb_common.svh"
module tb_neighborhood_extractor;
  import p2ip_pkg::*;
  `include "tb_ref.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 0, fsync = 0;
  always #5 clk = ~clk;
  localparam int W = 24, H = 9;
  logic [2:0] rows; logic [3:0] cols; logic rec_en, mb34; logic [23:0] offset;
  pix_t din, rec_in;
  mb_req_t req [4]; pix_t rd [4];
  window_t win;
  neighborhood_extractor dut (.clk, .rst_n, .px_en, .frame_sync(fsync), .frame_w(12'(W)), .frame_h(12'(H)),
    .rows, .cols, .rec_en, .offset, .mb34_ok(mb34), .din, .rec_in, .mb_req(req), .mb_rdata(rd), .win);
  for (genvar k = 0; k < 4; k++) begin : g_mb
    memory_block u (.clk, .en(px_en), .req(req[k]), .rdata(rd[k]));
  end
  `WATCHDOG(clk, 200000)

  frame_t img;
  int windows_checked = 0;

  // Run one frame with the given configuration; returns after flushing.
  task automatic run_frame(input int m, input int n, input int ofs, input logic rec, input logic lend);
    int lat, total, step;
    int m_eff;
    m_eff = (lend && m > 3) ? 3 : m;
    rows = 3'(m); cols = 4'(n); rec_en = rec; offset = 24'(ofs); mb34 = !lend;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
    @(negedge clk) fsync = 1;
    @(negedge clk) fsync = 0;
    lat = ((m_eff - 1) / 2) * W + (n - 1) / 2 + 3;
    total = ofs + W * H + lat + 1;
    step = 0;
    while (step < total) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin px_en = 0; continue; end
      px_en = 1;
      din = (step >= ofs && step - ofs < W * H) ? img[(step - ofs) / W][(step - ofs) % W] : pix_t'($urandom);
      rec_in = 8'h5A;
      @(posedge clk); #1;
      begin
        int c;
        c = step - ofs - lat;
        if (c >= 0 && c < W * H) begin
          window_t e;
          int xc, yc;
          xc = c % W; yc = c / W;
          e = ref_window(img, W, H, m_eff, n, xc, yc);
          if (!rec) begin
            `CHECK(win == e, $sformatf("m%0d n%0d centre (%0d,%0d)", m, n, xc, yc))
            if (win != e && failures < 2) begin
              for (int r = 0; r < 5; r++) $display("row %0d got %h exp %h", r, win[r], e[r]);
            end
          end else if (yc >= 1) begin
            // the row above the centre comes from the recursive stream
            logic ok; ok = 1;
            for (int dx = (n - 1) / 2 + 1 - n; dx <= (n - 1) / 2; dx++) begin
              if (win[1][4 + dx] != 8'h5A) ok = 0;
              if (win[3][4 + dx] != e[3][4 + dx]) ok = 0;
              if (win[2][4 + dx] != e[2][4 + dx]) ok = 0;
            end
            `CHECK(ok, $sformatf("recursive window centre (%0d,%0d)", xc, yc))
          end
          windows_checked++;
        end
      end
      step++;
    end
    @(negedge clk) px_en = 0;
  endtask

  initial begin
    rows = 3; cols = 3; rec_en = 0; offset = 0; mb34 = 1; din = 0; rec_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run_frame(3, 3, 0, 0, 0);
    run_frame(5, 5, 7, 0, 0);
    run_frame(5, 9, 0, 0, 0);
    run_frame(3, 9, 3, 0, 0);
    run_frame(4, 7, 0, 0, 0);
    run_frame(5, 5, 0, 0, 1);   // MB3/MB4 lent: three rows only
    run_frame(3, 3, 0, 1, 0);   // recursive input
    `CHECK(windows_checked > 6 * W * H, "all windows checked")
    `TB_FINISH
  end
endmodule
