// tb_spatial_processor: configures the 2DC register and feeds random windows:
// Sobel H and V in parallel (absolute value) on oSP_a/oSP_b after 10 steps;
// then NMS on oSP_a and Con on oSP_b after 2 steps; then whole-window NMS;
// then a 5x5 kernel downloaded through the four coefficient registers.
`include "tb_common.svh"
module tb_spatial_processor;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  logic cfg_clk;
  assign cfg_clk = clk;
  always #5 clk = ~clk;
  cfg_word_t pe_cfg;
  window_t w; pix_t isp, oa, ob;
  spatial_processor dut (.clk, .cfg_clk, .rst_n, .px_en, .pe_cfg, .oWindow(w), .iSP(isp), .oSP_a(oa), .oSP_b(ob));
  `include "tb_cfg_task.svh"
  `WATCHDOG(clk, 100000)

  function automatic pix_t absat(input int v); if (v < 0) v = -v; return v > 255 ? 8'd255 : 8'(v); endfunction
  function automatic pix_t sob(input window_t x, input logic vert);
    int s;
    if (!vert) s = -x[1][3] + x[1][5] - 2 * x[2][3] + 2 * x[2][5] - x[3][3] + x[3][5];
    else       s = -x[1][3] - 2 * x[1][4] - x[1][5] + x[3][3] + 2 * x[3][4] + x[3][5];
    return absat(s >>> 3);
  endfunction
  function automatic pix_t nms_ref(input window_t x, input pix_t d, input logic wm);
    pix_t c; c = x[2][4];
    if (wm) begin for (int r = 0; r < 5; r++) for (int k = 0; k < 9; k++) if (x[r][k] > c) return 0; return c; end
    if (d != 0) return (c >= x[2][3] && c >= x[2][5]) ? c : 0;
    return (c >= x[1][4] && c >= x[3][4]) ? c : 0;
  endfunction
  function automatic pix_t con_ref(input window_t x);
    pix_t c; c = x[2][4];
    for (int r = 1; r <= 3; r++) for (int k = 3; k <= 5; k++)
      if (!(r == 2 && k == 4) && x[r][k] == 8'hFF && c != 0) return 8'hFF;
    return c;
  endfunction

  // downloaded kernel: coefficient i (row-major) = (i % 7) - 3, sum >>> 2
  function automatic pix_t user_ref(input window_t x);
    int s; s = 0;
    for (int i = 0; i < 25; i++) s += int'(x[i / 5][2 + i % 5]) * ((i % 7) - 3);
    s = s >>> 2;
    return s < 0 ? 8'd0 : s > 255 ? 8'd255 : 8'(s);
  endfunction

  task automatic stream(input int mode, input int lat, input int n);
    pix_t ha [$], hb [$];
    for (int i = 0; i < n; i++) begin
      @(negedge clk) begin
        for (int r = 0; r < 5; r++) for (int k = 0; k < 9; k++) begin
          int s; s = $urandom_range(0, 9);
          w[r][k] = (mode == 1 && s > 7) ? 8'hFF : pix_t'($urandom);
        end
        isp = (i % 2) ? 8'hFF : 8'h00;
        if (mode == 0) begin ha.push_back(sob(w, 0)); hb.push_back(sob(w, 1)); end
        else if (mode == 1) begin ha.push_back(nms_ref(w, isp, 0)); hb.push_back(con_ref(w)); end
        else if (mode == 2) begin ha.push_back(nms_ref(w, isp, 1)); hb.push_back(con_ref(w)); end
        else begin ha.push_back(user_ref(w)); hb.push_back(8'd0); end
      end
      @(posedge clk); #1;
      if (ha.size() > lat) begin
        void'(ha.pop_front()); void'(hb.pop_front());
        `CHECK(oa == ha[0], $sformatf("mode %0d oSP_a %0d exp %0d", mode, oa, ha[0]))
        `CHECK(ob == hb[0], $sformatf("mode %0d oSP_b %0d exp %0d", mode, ob, hb[0]))
      end
    end
  endtask

  initial begin
    pe_cfg = '0; w = '0; isp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    cfg_write(5'd1, MOD_SP, OP_C2D, '{{FMT_ABS, K_SOBV, K_SOBH}, 8'h00});
    stream(0, 10, 400);
    cfg_write(5'd1, MOD_SP, OP_C2D, '{{FMT_ABS, K_SOBV, K_SOBH}, 8'h03});
    stream(1, 2, 400);
    cfg_write(5'd1, MOD_SP, OP_C2D, '{{FMT_ABS, K_SOBV, K_SOBH}, 8'h07});
    stream(2, 2, 400);
    begin
      logic [7:0] c [25];
      for (int i = 0; i < 25; i++) c[i] = 8'((i % 7) - 3);
      cfg_write(5'd1, MOD_SP, OP_C2D_K0, '{c[0], c[1], c[2], c[3], c[4], c[5], c[6], c[7]});
      cfg_write(5'd1, MOD_SP, OP_C2D_K1, '{c[8], c[9], c[10], c[11], c[12], c[13], c[14], c[15]});
      cfg_write(5'd1, MOD_SP, OP_C2D_K2, '{c[16], c[17], c[18], c[19], c[20], c[21], c[22], c[23]});
      cfg_write(5'd1, MOD_SP, OP_C2D_K3, '{c[24], 8'd2});
    end
    cfg_write(5'd1, MOD_SP, OP_C2D, '{{FMT_CLAMP, K_SOBV, K_USER}, 8'h08});
    stream(3, 10, 400);
    `TB_FINISH
  end
endmodule
