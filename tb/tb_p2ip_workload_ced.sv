// tb_p2ip_workload_ced: Canny edge detection on the gray channel, mapped on
// PEs 1-5 of the top level at its default parameters
// and configured through config_in:
//   PE1: 5x5 window -> 2DC Gaussian;
//   PE2: 3x3 window -> 2DC Sobel H and Sobel V in parallel (absolute value)
//        -> direction (|Gx| > |Gy|) to oAux1 and ALU |Gx| + |Gy| as result;
//   PE3: 3x3 window of the gradient magnitude -> NMS along the direction,
//        which arrives on iAux1 and is aligned by the delay Z^-n -> threshold
//        in hysteresis mode;
//   PE4: 3x3 window -> connector -> mirror (lines reversed);
//   PE5: 3x3 window -> connector -> mirror (lines restored) -> threshold
//        (only pixels that became logic 1 remain), as in the document's
//        mapping of the algorithm.
// Output is in gray mode. Two random frames (24 x 12 and 40 x 9) are streamed
// with input gaps and output back-pressure; every pixel is compared with a
// frame-level reference of the same arithmetic, with borders replicated.
`include "tb_common.svh"
module tb_p2ip_workload_ced;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam logic [7:0] TL = 8'd16, TH = 8'd40;

  logic [7:0]  config_in;  logic config_valid;
  logic [23:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, s_tuser, m_tvalid, m_tready, m_tlast, m_tuser;
  p2ip_top dut (.clk, .cfg_clk(clk), .rst_n, .config_in, .config_valid,
    .s_tdata, .s_tvalid, .s_tready, .s_tlast, .s_tuser,
    .m_tdata, .m_tvalid, .m_tready, .m_tlast, .m_tuser);
  `WATCHDOG(clk, 200000)

  task automatic cfg(input logic [4:0] pe, input logic [2:0] md, input logic [4:0] op, input logic [7:0] b[]);
    @(negedge clk) begin config_in = {pe, md}; config_valid = 1; end
    @(negedge clk) config_in = {op, 3'(b.size() - 1)};
    foreach (b[k]) @(negedge clk) config_in = b[k];
    @(negedge clk) config_valid = 0;
    repeat (4) @(negedge clk);
  endtask
  task automatic cfg_mxb(input logic [4:0] pe, input logic [55:0] s);
    cfg(pe, MOD_RI, OP_MXB, '{s[7:0], s[15:8], s[23:16], s[31:24], s[39:32], s[47:40], s[55:48]});
  endtask

  // ---- reference ----
  int W, H;
  int f [], g [], gx [], gy [], m [], d [], nms [], o [], c1 [], c2 [], fin [];
  function automatic int at(ref int a [], input int x, input int y);
    x = x < 0 ? 0 : x >= W ? W - 1 : x;
    y = y < 0 ? 0 : y >= H ? H - 1 : y;
    return a[y * W + x];
  endfunction
  function automatic int sat(input int v); return v < 0 ? 0 : v > 255 ? 255 : v; endfunction
  function automatic int con(ref int a [], input int x, input int y);
    if (at(a, x, y) == 0) return 0;
    for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++)
      if (!(i == 0 && j == 0) && at(a, x + i, y + j) == 255) return 255;
    return at(a, x, y);
  endfunction
  task automatic reference();
    int G5 [5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7}, '{4,16,26,16,4}, '{1,4,7,4,1}};
    int wt [3] = '{1, 2, 1};
    g = new[W * H]; gx = new[W * H]; gy = new[W * H]; m = new[W * H]; d = new[W * H]; nms = new[W * H]; o = new[W * H];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int s; s = 0;
      for (int j = -2; j <= 2; j++) for (int i = -2; i <= 2; i++) s += G5[j + 2][i + 2] * at(f, x + i, y + j);
      g[y * W + x] = sat((s * 240) >>> 16);
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int sx, sy; sx = 0; sy = 0;
      for (int k = -1; k <= 1; k++) begin
        sx += wt[k + 1] * (at(g, x + 1, y + k) - at(g, x - 1, y + k));
        sy += wt[k + 1] * (at(g, x + k, y + 1) - at(g, x + k, y - 1));
      end
      sx = sx >>> 3; sy = sy >>> 3;
      gx[y * W + x] = sat(sx < 0 ? -sx : sx);
      gy[y * W + x] = sat(sy < 0 ? -sy : sy);
      m[y * W + x] = sat(gx[y * W + x] + gy[y * W + x]);
      d[y * W + x] = gx[y * W + x] > gy[y * W + x] ? 255 : 0;
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int c; bit keep;
      c = m[y * W + x];
      if (d[y * W + x] != 0) keep = c >= at(m, x - 1, y) && c >= at(m, x + 1, y);
      else                   keep = c >= at(m, x, y - 1) && c >= at(m, x, y + 1);
      nms[y * W + x] = keep ? c : 0;
      c = nms[y * W + x];
      o[y * W + x] = c < TL ? 0 : c < TH ? c : 255;
    end
    // connector, then the same on the mirrored image, mirrored back
    c1 = new[W * H]; c2 = new[W * H]; fin = new[W * H];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) c1[y * W + (W - 1 - x)] = con(o, x, y);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) c2[y * W + (W - 1 - x)] = con(c1, x, y);
    foreach (c2[i]) fin[i] = c2[i] == 255 ? 255 : 0;
  endtask

  int n_joined = 0, n_weak = 0, n_strong = 0, n_zero = 0, n_gap = 0, n_bp = 0;
  always @(posedge clk) if (rst_n) begin
    if (!s_tvalid && dut.u_ctrl.state == dut.u_ctrl.S_RUN) n_gap++;
    if (m_tvalid && !m_tready) n_bp++;
  end

  task automatic run_frame(input int w, input int h);
    int l1, l2, l3, l4, l5, lat, o4, o5;
    W = w; H = h;
    l1 = 2 * w + 22; l2 = w + 27; l3 = w + 19;
    l4 = 2 * w + 16; l5 = 2 * w + 22;
    lat = 1 + l1 + l2 + l3 + l4 + l5 + 2 * 5;
    o4 = 1 + l1 + l2 + l3 + 3; o5 = o4 + l4;
    cfg(5'd0, MOD_GLOBAL, OP_G_WIDTH,  '{8'(w), 8'(w >> 8)});
    cfg(5'd0, MOD_GLOBAL, OP_G_HEIGHT, '{8'(h), 8'(h >> 8)});
    cfg(5'd0, MOD_GLOBAL, OP_G_LAT,    '{8'(lat), 8'(lat >> 8), 8'h00});
    // PE1: Gaussian
    cfg(5'd1, MOD_MC, OP_NE, '{8'h2D, 8'd4, 8'h00, 8'h00});
    // PE2: Sobel pair, direction, magnitude
    cfg(5'd2, MOD_MC, OP_NE, '{8'h1B, 8'(1 + l1 + 3), 8'((1 + l1 + 3) >> 8), 8'h00});
    // PE3: NMS + hysteresis; the direction waits W + 5 steps in Z^-n
    cfg(5'd3, MOD_MC, OP_NE,  '{8'h1B, 8'(1 + l1 + l2 + 3), 8'((1 + l1 + l2 + 3) >> 8), 8'h00});
    cfg(5'd3, MOD_MC, OP_DLY, '{8'(w + 5), 8'((w + 5) >> 8)});
    cfg(5'd4, MOD_MC, OP_NE,  '{8'h1B, 8'(o4), 8'(o4 >> 8), 8'h00});
    cfg(5'd4, MOD_MC, OP_MBX, '{8'h05, 8'(o4 + w + 9), 8'((o4 + w + 9) >> 8), 8'h00});
    cfg(5'd5, MOD_MC, OP_NE,  '{8'h1B, 8'(o5), 8'(o5 >> 8), 8'h00});
    cfg(5'd5, MOD_MC, OP_MBX, '{8'h05, 8'(o5 + w + 9), 8'((o5 + w + 9) >> 8), 8'h00});
    f = new[w * h];
    foreach (f[i]) f[i] = $urandom_range(0, 255);
    reference();
    fork
      begin
        for (int i = 0; i < w * h; i++) begin
          @(negedge clk);
          while ($urandom_range(0, 5) == 0) begin s_tvalid = 0; @(negedge clk); end
          s_tvalid = 1; s_tuser = (i == 0); s_tlast = (i % w == w - 1);
          s_tdata = {3{8'(f[i])}};
          do @(posedge clk); while (!s_tready);
        end
        @(negedge clk) s_tvalid = 0;
      end
      begin
        int i; i = 0;
        while (i < w * h) begin
          @(negedge clk) m_tready = ($urandom_range(0, 4) != 0);
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            logic [7:0] e; e = 8'(fin[i]);
            `CHECK(m_tdata == {3{e}}, $sformatf("%0dx%0d pixel (%0d,%0d) got %h exp %h (m %0d d %0d)",
                   w, h, i % w, i / w, m_tdata, e, m[i], d[i]))
            if (o[i] == 0) n_zero++; else if (o[i] == 255) n_strong++; else n_weak++;
            if (c2[i] == 255 && o[i] != 255) n_joined++;
            i++;
          end
        end
        @(negedge clk) m_tready = 1;
      end
    join
  endtask

  initial begin
    config_in = 0; config_valid = 0; s_tvalid = 0; s_tuser = 0; s_tlast = 0; s_tdata = 0; m_tready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    cfg(5'd0, MOD_GLOBAL, OP_G_OMODE, '{8'h01});
    // PE1
    cfg(5'd1, MOD_RI, OP_RGBX, '{8'h88, 8'h38});
    cfg_mxb(5'd1, 56'h0009_5432_1000_b000);   // iMC_a <- channel, result <- oSP_a
    cfg(5'd1, MOD_MC, OP_MBX, '{8'h00, 8'h00, 8'h00, 8'h00});
    cfg(5'd1, MOD_SP, OP_C2D, '{8'h05, 8'h00});
    // PE2
    cfg(5'd2, MOD_RI, OP_RGBX, '{8'h88, 8'h38});
    cfg_mxb(5'd2, 56'h0007_5432_6000_b0a9);   // iPP_a <- oSP_a, iPP_b <- oSP_b, iMC_a <- channel, oAux1 <- oPP_a, result <- oPP_b
    cfg(5'd2, MOD_SP, OP_C2D, '{8'h63, 8'h00});
    cfg(5'd2, MOD_PP, OP_ALU, '{8'h05, 8'h00, 8'h00});
    // PE3
    cfg(5'd3, MOD_RI, OP_RGBX, '{8'h88, 8'h38});
    cfg_mxb(5'd3, 56'h0007_5432_1810_b009);   // iPP_a <- oSP_a, iMC_a <- channel, iMC_b <- iAux1, iSP <- oMC, result <- oPP_b
    cfg(5'd3, MOD_MC, OP_MBX, '{8'h02, 8'h00, 8'h00, 8'h00});
    cfg(5'd3, MOD_SP, OP_C2D, '{8'h00, 8'h01});
    cfg(5'd3, MOD_PP, OP_ALU, '{8'h00, 8'h00, 8'h00});
    cfg(5'd3, MOD_PP, OP_THR, '{TL, TH, 8'h03});
    // PE4, PE5
    for (int p = 4; p <= 5; p++) begin
      cfg(5'(p), MOD_RI, OP_RGBX, '{8'h88, 8'h38});
      cfg(5'(p), MOD_SP, OP_C2D, '{8'h00, 8'h02});            // oSP_b = connector
    end
    cfg_mxb(5'd4, 56'h0008_5432_10a0_b000);   // iMC_a <- channel, iMC_b <- oSP_b, result <- oMC
    cfg_mxb(5'd5, 56'h0007_5432_10a0_b008);   // as PE4, then iPP_a <- oMC, result <- oPP_b
    cfg(5'd5, MOD_PP, OP_ALU, '{8'h00, 8'h00, 8'h00});
    cfg(5'd5, MOD_PP, OP_THR, '{8'hFF, 8'hFF, 8'h02});
    run_frame(24, 12);
    run_frame(40, 9);
    `CHECK(n_zero > 0 && n_weak > 0 && n_strong > 0, $sformatf("outputs: %0d zero, %0d weak, %0d strong", n_zero, n_weak, n_strong))
    `CHECK(n_gap > 0 && n_bp > 0, "input gaps and back-pressure")
    `CHECK(n_joined > 0, $sformatf("weak pixels joined by the connector: %0d", n_joined))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
