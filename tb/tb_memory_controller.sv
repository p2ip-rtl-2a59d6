// tb_memory_controller: configures the memory controller through its
// configuration words and checks, on random 20 x 7 frames with pauses:
// the NE window (3x3, and a 5x5 request that must shrink to 3 rows while
// MB3/MB4 are lent away), the Z^-n output on oMC, and the mirror output on
// oMC when the MB crossbar lends MB3/MB4 to the mirror.
`include "tb_common.svh"
module tb_memory_controller;
  import p2ip_pkg::*;
  `include "tb_ref.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 0, fsync = 0;
  logic cfg_clk;
  assign cfg_clk = clk;
  always #5 clk = ~clk;
  localparam int W = 20, H = 7;
  cfg_word_t pe_cfg;
  pix_t a, rec, b, omc;
  window_t win;
  memory_controller dut (.clk, .cfg_clk, .rst_n, .px_en, .frame_sync(fsync), .frame_w(12'(W)), .frame_h(12'(H)),
                         .pe_cfg, .iMC_a(a), .iRec(rec), .iMC_b(b), .oMC(omc), .oWindow(win));
  `include "tb_cfg_task.svh"
  `WATCHDOG(clk, 100000)
  frame_t img, img2;
  int n_win = 0, n_dly = 0, n_mir = 0;

  // mode 0: delay d on oMC; mode 1: mirror on oMC
  task automatic run(input int m, input int n, input int mode, input int d);
    int lat, step;
    pix_t bh [$];
    lat = ((m - 1) / 2) * W + (n - 1) / 2 + 3;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin img[y][x] = pix_t'($urandom); img2[y][x] = pix_t'($urandom); end
    @(negedge clk) fsync = 1;
    @(negedge clk) fsync = 0;
    step = 0;
    while (step < W * (H + 1) + lat + 1) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin px_en = 0; continue; end
      px_en = 1;
      a = step < W * H ? img[step / W][step % W] : 8'd0;
      b = step < W * H ? img2[step / W][step % W] : 8'd0;
      rec = 0;
      bh.push_back(b);
      @(posedge clk); #1;
      begin
        int c; c = step - lat;
        if (c >= 0 && c < W * H) begin
          `CHECK(win == ref_window(img, W, H, m, n, c % W, c / W), $sformatf("window %0d", c))
          n_win++;
        end
        if (mode == 0 && step >= d - 1 && step - d + 1 < W * H) begin
          `CHECK(omc == bh[step - d + 1], $sformatf("delay step %0d", step))
          n_dly++;
        end
        if (mode == 1 && step >= W && step < W * H + W) begin
          `CHECK(omc == img2[step / W - 1][W - 1 - step % W], $sformatf("mirror step %0d", step))
          n_mir++;
        end
      end
      step++;
    end
    @(negedge clk) px_en = 0;
  endtask

  initial begin
    pe_cfg = '0; a = 0; b = 0; rec = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // NE 3x3 (reset default), MB3/4 to Z^-n, delay 9
    cfg_write(5'd1, MOD_MC, OP_MBX, '{8'h02, 8'h00, 8'h00, 8'h00});
    cfg_write(5'd1, MOD_MC, OP_DLY, '{8'd9, 8'd0});
    run(3, 3, 0, 9);
    // NE asks for 5x5 but MB3/4 belong to the mirror: 3 rows x 5
    cfg_write(5'd1, MOD_MC, OP_NE,  '{{1'b0, 4'd5, 3'd5}, 8'h00, 8'h00, 8'h00});
    cfg_write(5'd1, MOD_MC, OP_MBX, '{8'h05, 8'h00, 8'h00, 8'h00});
    run(3, 5, 1, 0);
    // NE gets all four MBs: 5x5
    cfg_write(5'd1, MOD_MC, OP_MBX, '{8'h00, 8'h00, 8'h00, 8'h00});
    run(5, 5, 2, 0);
    `CHECK(n_win == 3 * W * H && n_dly > 100 && n_mir > 100, "all paths exercised")
    `TB_FINISH
  end
endmodule
