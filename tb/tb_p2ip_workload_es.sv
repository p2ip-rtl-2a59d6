// tb_p2ip_workload_es: edge sharpening of true-colour frames at the sizes the
// design is meant for, through the top level at its default parameters.
// R, G and B are sharpened in PEs 1, 2 and 3 (3x3 Laplacian / 16 added to
// the pixel, borders replicated), everything configured through config_in.
// Frame 1 is a complete Full HD frame (1920 x 1080), frame 2 a complete 4K
// frame (3840 x 2160). Every output
// pixel is compared with the reference, and the timing is checked: with no
// stalls the last output beat comes W*H + latency clocks after the first
// input beat.
`include "tb_common.svh"
module tb_p2ip_workload_es;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  config_in;  logic config_valid;
  logic [23:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, s_tuser, m_tvalid, m_tready, m_tlast, m_tuser;
  p2ip_top dut (.clk, .cfg_clk(clk), .rst_n, .config_in, .config_valid,
    .s_tdata, .s_tvalid, .s_tready, .s_tlast, .s_tuser,
    .m_tdata, .m_tvalid, .m_tready, .m_tlast, .m_tuser);
  `WATCHDOG(clk, 12000000)

  task automatic cfg(input logic [4:0] pe, input logic [2:0] md, input logic [4:0] op, input logic [7:0] b[]);
    @(negedge clk) begin config_in = {pe, md}; config_valid = 1; end
    @(negedge clk) config_in = {op, 3'(b.size() - 1)};
    foreach (b[k]) @(negedge clk) config_in = b[k];
    @(negedge clk) config_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic cfg_sharpen(input logic [4:0] pe, input logic [15:0] rgbx, input int w);
    logic [55:0] s;
    s = 56'h0000_5432_1000_0000;
    s[4*3 +: 4] = 4'd11; s[4*5 +: 4] = 4'd11; s[4*0 +: 4] = 4'd8; s[4*1 +: 4] = 4'd9; s[4*12 +: 4] = 4'd7;
    cfg(pe, MOD_RI, OP_RGBX, '{rgbx[7:0], rgbx[15:8]});
    cfg(pe, MOD_RI, OP_MXB, '{s[7:0], s[15:8], s[23:16], s[31:24], s[39:32], s[47:40], s[55:48]});
    cfg(pe, MOD_MC, OP_MBX, '{8'h02, 8'h00, 8'h00, 8'h00});
    cfg(pe, MOD_MC, OP_DLY, '{8'(w + 15), 8'((w + 15) >> 8)});
    cfg(pe, MOD_MC, OP_NE,  '{8'h1B, 8'(2 * pe + 2), 8'h00, 8'h00});
    cfg(pe, MOD_SP, OP_C2D, '{8'h82, 8'h00});
    cfg(pe, MOD_PP, OP_ALU, '{8'h25, 8'h00, 8'h00});
  endtask

  pix_t img [3][];
  int W, H;

  function automatic pix_t px(input int c, input int x, input int y);
    x = x < 0 ? 0 : x >= W ? W - 1 : x;
    y = y < 0 ? 0 : y >= H ? H - 1 : y;
    return img[c][y * W + x];
  endfunction
  function automatic pix_t sharpen(input int c, input int x, input int y);
    int s, e;
    s = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        s += (dx == 0 && dy == 0 ? 8 : -1) * int'(px(c, x + dx, y + dy));
    e = s >>> 4;
    e = e < -128 ? -128 : e > 127 ? 127 : e;
    s = int'(px(c, x, y)) + e;
    return s < 0 ? 8'd0 : s > 255 ? 8'd255 : 8'(s);
  endfunction

  int bad = 0;
  task automatic run_frame(input int w, input int h);
    int lat, t0, t1;
    W = w; H = h; lat = w + 46;
    for (int c = 0; c < 3; c++) begin
      img[c] = new[w * h];
      foreach (img[c][i]) img[c][i] = pix_t'($urandom);
    end
    cfg(5'd0, MOD_GLOBAL, OP_G_WIDTH,  '{8'(w), 8'(w >> 8)});
    cfg(5'd0, MOD_GLOBAL, OP_G_HEIGHT, '{8'(h), 8'(h >> 8)});
    cfg(5'd0, MOD_GLOBAL, OP_G_LAT,    '{8'(lat), 8'(lat >> 8), 8'h00});
    cfg_sharpen(5'd1, 16'h068C, w);
    cfg_sharpen(5'd2, 16'h16A0, w);
    cfg_sharpen(5'd3, 16'h2708, w);
    bad = 0;
    fork
      begin
        for (int i = 0; i < w * h; i++) begin
          @(negedge clk);
          s_tvalid = 1; s_tuser = (i == 0); s_tlast = (i % w == w - 1);
          s_tdata = {img[0][i], img[1][i], img[2][i]};
          do @(posedge clk); while (!s_tready);
          if (i == 0) t0 = $time;
        end
        @(negedge clk) s_tvalid = 0;
      end
      begin
        int i; i = 0;
        m_tready = 1;
        while (i < w * h) begin
          @(posedge clk);
          if (m_tvalid) begin
            int x, y; logic [23:0] e;
            x = i % w; y = i / w;
            e = {sharpen(0, x, y), sharpen(1, x, y), sharpen(2, x, y)};
            if (m_tdata != e || m_tuser != (i == 0) || m_tlast != (x == w - 1)) begin
              bad++;
              if (bad < 5) $display("FAIL: %0dx%0d pixel (%0d,%0d) got %h exp %h", w, h, x, y, m_tdata, e);
            end
            i++;
          end
        end
        t1 = $time;
      end
    join
    `CHECK(bad == 0, $sformatf("%0d x %0d: %0d wrong pixels", w, h, bad))
    // without stalls the last output beat is seen W*H + latency clocks after
    // the first input beat is accepted
    `CHECK((t1 - t0) / 10 == w * h + lat, $sformatf("%0d x %0d: first input to last output %0d clocks", w, h, (t1 - t0) / 10))
    $display("frame %0d x %0d: %0d pixels checked, first input to last output %0d clocks", w, h, w * h, (t1 - t0) / 10);
  endtask

  initial begin
    config_in = 0; config_valid = 0; s_tvalid = 0; s_tuser = 0; s_tlast = 0; s_tdata = 0; m_tready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    run_frame(1920, 1080);
    run_frame(3840, 2160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
