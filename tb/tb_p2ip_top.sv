// tb_p2ip_top: end-to-end test of the image processor at its default
// parameters (10 PEs, 4096-word memory blocks). Everything is set up through
// the byte-wide configuration port: frame size 32 x 8, pipeline latency and
// the PE registers. Three frames of random RGB pixels are streamed with
// random gaps on the input, random back-pressure on the output and junk
// beats before the first start-of-frame flag:
//   frame 1: edge sharpening of R in PE1, G in PE2 and B in PE3 (each PE
//            takes its channel from the RGB crossbar and returns the result
//            on the same channel), colour output;
//   frame 2: PE4 also sharpens the gray channel, gray output mode;
//   frame 3: PE4's threshold is switched to normal mode (T_low 128).
// Every output pixel is compared with a reference model. The testbench
// counts how often each mechanism occurred (configuration bytes, register
// updates, frame syncs, dropped pre-frame beats, input gaps, back-pressure,
// flush steps, border pixels, gray frames, both threshold outcomes) and
// counts a failure for any mechanism that never happened.
`include "tb_common.svh"
module tb_p2ip_top;
  import p2ip_pkg::*;
  `include "tb_ref.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int W = 32, H = 8;
  localparam int LAT = W + 46;   // input reg 1 + 10 PEs (one sharpening PE per channel) + output reg

  logic [7:0]  config_in;  logic config_valid;
  logic [23:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, s_tuser, m_tvalid, m_tready, m_tlast, m_tuser;
  p2ip_top dut (.clk, .cfg_clk(clk), .rst_n, .config_in, .config_valid,
    .s_tdata, .s_tvalid, .s_tready, .s_tlast, .s_tuser,
    .m_tdata, .m_tvalid, .m_tready, .m_tlast, .m_tuser);
  `WATCHDOG(clk, 400000)

  // ---- mechanism counters ----
  int n_cfg_bytes = 0, n_reg_upd = 0, n_sync = 0, n_drop = 0, n_gap = 0, n_bp = 0, n_flush = 0;
  int n_border = 0, n_gray = 0, n_thr0 = 0, n_thr1 = 0, n_hold = 0;
  logic [23:0] prev_m; logic prev_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (config_valid) n_cfg_bytes++;
    if (dut.p2ip_cfg.valid && dut.p2ip_cfg.idx == 3'd0) n_reg_upd++;
    if (dut.frame_sync) n_sync++;
    if (s_tvalid && s_tready && !s_tuser && dut.u_ctrl.state == dut.u_ctrl.S_SOF) n_drop++;
    if (!s_tvalid && dut.u_ctrl.state == dut.u_ctrl.S_RUN) n_gap++;
    if (m_tvalid && !m_tready) n_bp++;
    if (dut.px_en && dut.u_ctrl.state == dut.u_ctrl.S_FLUSH) n_flush++;
    if (prev_stall) begin
      `CHECK(m_tvalid && m_tdata == prev_m, "output beat held under back-pressure")
      n_hold++;
    end
    prev_stall <= m_tvalid && !m_tready;
    prev_m <= m_tdata;
  end

  // ---- configuration through config_in ----
  task automatic cfg(input logic [4:0] pe, input logic [2:0] md, input logic [4:0] op, input logic [7:0] b[]);
    @(negedge clk) begin config_in = {pe, md}; config_valid = 1; end
    @(negedge clk) config_in = {op, 3'(b.size() - 1)};
    foreach (b[k]) @(negedge clk) config_in = b[k];
    @(negedge clk) config_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic cfg_sharpen(input logic [4:0] pe, input logic [15:0] rgbx);
    logic [55:0] s;
    s = 56'h0000_5432_1000_0000;
    s[4*3 +: 4] = 4'd11; s[4*5 +: 4] = 4'd11; s[4*0 +: 4] = 4'd8; s[4*1 +: 4] = 4'd9; s[4*12 +: 4] = 4'd7;
    cfg(pe, MOD_RI, OP_RGBX, '{rgbx[7:0], rgbx[15:8]});
    cfg(pe, MOD_RI, OP_MXB, '{s[7:0], s[15:8], s[23:16], s[31:24], s[39:32], s[47:40], s[55:48]});
    cfg(pe, MOD_MC, OP_MBX, '{8'h02, 8'h00, 8'h00, 8'h00});
    cfg(pe, MOD_MC, OP_DLY, '{8'(W + 15), 8'h00});
    cfg(pe, MOD_MC, OP_NE,  '{8'h1B, 8'(2 * pe + 2), 8'h00, 8'h00});  // pixel 0 reaches PE p's pixel array 2p+2 steps after frame sync
    cfg(pe, MOD_SP, OP_C2D, '{8'h82, 8'h00});
    cfg(pe, MOD_PP, OP_ALU, '{8'h25, 8'h00, 8'h00});
  endtask

  // ---- stimulus and checking ----
  frame_t img [3];      // R, G, B
  frame_t gimg;         // gray channel as the input register computes it
  int mode;             // 0 colour, 1 gray, 2 gray + threshold

  task automatic new_image();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      for (int c = 0; c < 3; c++) img[c][y][x] = pix_t'($urandom);
      gimg[y][x] = pix_t'((77 * int'(img[0][y][x]) + 150 * int'(img[1][y][x]) + 29 * int'(img[2][y][x])) >> 8);
    end
  endtask

  task automatic source(input int junk);
    for (int j = 0; j < junk; j++) begin
      @(negedge clk) begin s_tvalid = 1; s_tuser = 0; s_tdata = 24'($urandom); end
      do @(posedge clk); while (!s_tready);
    end
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1; s_tuser = (i == 0); s_tlast = (i % W == W - 1);
      s_tdata = {img[0][i / W][i % W], img[1][i / W][i % W], img[2][i / W][i % W]};
      do @(posedge clk); while (!s_tready);
    end
    @(negedge clk) s_tvalid = 0;
  endtask

  task automatic sink();
    int i; i = 0;
    while (i < W * H) begin
      @(negedge clk) m_tready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (m_tvalid && m_tready) begin
        int x, y; logic [23:0] e;
        x = i % W; y = i / W;
        if (mode == 0) e = {ref_sharpen(img[0], W, H, x, y), ref_sharpen(img[1], W, H, x, y), ref_sharpen(img[2], W, H, x, y)};
        else begin
          pix_t g; g = ref_sharpen(gimg, W, H, x, y);
          if (mode == 2) begin g = g >= 8'd128 ? 8'hFF : 8'h00; if (g != 0) n_thr1++; else n_thr0++; end
          e = {g, g, g};
          n_gray++;
        end
        `CHECK(m_tdata == e, $sformatf("mode %0d pixel (%0d,%0d) got %h exp %h", mode, x, y, m_tdata, e))
        `CHECK(m_tuser == (i == 0) && m_tlast == (x == W - 1), "frame flags")
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) n_border++;
        i++;
      end
    end
    @(negedge clk) m_tready = 1;
  endtask

  task automatic run_frame(input int junk);
    new_image();
    fork source(junk); sink(); join
  endtask

  initial begin
    config_in = 0; config_valid = 0; s_tvalid = 0; s_tuser = 0; s_tlast = 0; s_tdata = 0; m_tready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    cfg(5'd0, MOD_GLOBAL, OP_G_WIDTH,  '{8'(W), 8'(W >> 8)});
    cfg(5'd0, MOD_GLOBAL, OP_G_HEIGHT, '{8'(H), 8'(H >> 8)});
    cfg(5'd0, MOD_GLOBAL, OP_G_LAT,    '{8'(LAT), 8'(LAT >> 8), 8'h00});
    cfg_sharpen(5'd1, 16'h068C);   // R
    cfg_sharpen(5'd2, 16'h16A0);   // G
    cfg_sharpen(5'd3, 16'h2708);   // B
    `CHECK(dut.frame_w == W && dut.frame_h == H, "frame size configured")
    mode = 0; run_frame(5);
    cfg_sharpen(5'd4, 16'h3888);   // Gs
    cfg(5'd0, MOD_GLOBAL, OP_G_OMODE, '{8'h01});
    mode = 1; run_frame(0);
    cfg(5'd4, MOD_PP, OP_THR, '{8'd128, 8'd200, 8'h02});
    mode = 2; run_frame(2);

    `CHECK(n_cfg_bytes > 0,  $sformatf("configuration bytes: %0d", n_cfg_bytes))
    `CHECK(n_reg_upd > 0,    $sformatf("register updates: %0d", n_reg_upd))
    `CHECK(n_sync >= 3,      $sformatf("frame syncs: %0d", n_sync))
    `CHECK(n_drop > 0,       $sformatf("dropped pre-frame beats: %0d", n_drop))
    `CHECK(n_gap > 0,        $sformatf("input gaps: %0d", n_gap))
    `CHECK(n_bp > 0,         $sformatf("back-pressure cycles: %0d", n_bp))
    `CHECK(n_hold > 0,       $sformatf("held beats: %0d", n_hold))
    `CHECK(n_flush > 0,      $sformatf("flush steps: %0d", n_flush))
    `CHECK(n_border > 0,     $sformatf("border pixels: %0d", n_border))
    `CHECK(n_gray > 0,       $sformatf("gray pixels: %0d", n_gray))
    `CHECK(n_thr0 > 0 && n_thr1 > 0, $sformatf("threshold outcomes: %0d zero, %0d one", n_thr0, n_thr1))
    $display("mechanisms: cfg_bytes=%0d reg_updates=%0d syncs=%0d dropped=%0d gaps=%0d backpressure=%0d held=%0d flush=%0d border=%0d gray=%0d thr0=%0d thr1=%0d",
             n_cfg_bytes, n_reg_upd, n_sync, n_drop, n_gap, n_bp, n_hold, n_flush, n_border, n_gray, n_thr0, n_thr1);
    `TB_FINISH
  end
endmodule
