// tb_conv2d: random windows through the 2DC with every kernel of the ROM and
// random downloaded kernels (used as 5x5 and as 3x3, with random shifts),
// two 3x3 kernels in parallel and single 5x5 kernels, in the three output
// formats. The reference recomputes eq. (1) from the document's kernel
// matrices typed in here; the result must appear after the 10-step latency.
`include "tb_common.svh"
module tb_conv2d;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  window_t w; logic [2:0] ka, kb; logic [1:0] fmt; pix_t oa, ob;
  kernel_t uk; logic u5; logic [4:0] ush;
  conv2d dut (.clk, .rst_n, .px_en, .win(w), .kern_a(ka), .kern_b(kb), .fmt,
              .user_k(uk), .user_5x5(u5), .user_sh(ush), .out_a(oa), .out_b(ob));
  `WATCHDOG(clk, 100000)

  // reference kernels (row = y, column = x)
  int K [8][5][5];
  int MUL [8], SH [8];
  initial begin
    foreach (K[i, r, c]) K[i][r][c] = 0;
    K[1][2][2] = 1;
    for (int r = 1; r <= 3; r++) for (int c = 1; c <= 3; c++) K[2][r][c] = -1;
    K[2][2][2] = 8;
    K[3][1] = '{0, -1, 0, 1, 0}; K[3][2] = '{0, -2, 0, 2, 0}; K[3][3] = '{0, -1, 0, 1, 0};
    K[4][1] = '{0, -1, -2, -1, 0}; K[4][3] = '{0, 1, 2, 1, 0};
    K[5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7}, '{4,16,26,16,4}, '{1,4,7,4,1}};
    K[6][2][1] = -1; K[6][2][3] = 1;
    K[7][1][2] = -1; K[7][3][2] = 1;
    MUL = '{1, 1, 1, 1, 1, 240, 1, 1};
    SH  = '{0, 0, 4, 3, 3, 16, 0, 0};
  end
  function automatic pix_t fmt_ref(input longint v, input int f);
    if (f == 1) begin if (v < 0) v = -v; return v > 255 ? 8'd255 : 8'(v); end
    if (f == 2) return v < -128 ? 8'h80 : v > 127 ? 8'h7F : 8'(v);
    return v < 0 ? 8'd0 : v > 255 ? 8'd255 : 8'(v);
  endfunction
  // k5: the kernel is used as 5x5; otherwise only its centre 3x3 counts
  function automatic longint conv(input window_t x, input int k, input bit k5);
    longint s = 0;
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++)
      if (k5 || (r >= 1 && r <= 3 && c >= 1 && c <= 3)) s += longint'(x[r][c + 2]) * K[k][r][c];
    return (s * MUL[k]) >>> SH[k];
  endfunction

  pix_t ha [$], hb [$];
  int nzb = 0, nuser = 0;
  initial begin
    w = '0; ka = 0; kb = 0; fmt = 0; uk = '0; u5 = 0; ush = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk) begin
        // the output format is a static setting: change it rarely
        fmt = 2'(n / 1000);
        // a new downloaded kernel every 500 windows (static in between)
        if (n % 500 == 0) begin
          u5 = n % 1000 == 0; ush = 5'($urandom_range(0, 6));
          for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin
            K[0][r][c] = $urandom_range(0, 40) - 20;
            uk[r][c] = coef_t'(K[0][r][c]);
          end
          SH[0] = ush;
        end
        ka = 3'($urandom_range(0, 7)); kb = 3'($urandom_range(0, 7));
        if (kb == 3'd5) kb = 3'd2;
        for (int r = 0; r < 5; r++) for (int k = 0; k < 9; k++) w[r][k] = pix_t'($urandom);
        begin
          bit a5; a5 = (ka == 3'd5) || (ka == 3'd0 && u5);
          ha.push_back(fmt_ref(conv(w, ka, a5), fmt));
          hb.push_back(a5 ? 8'd0 : fmt_ref(conv(w, kb, 0), fmt));
          if (ka == 3'd0 || kb == 3'd0) nuser++;
        end
      end
      @(posedge clk); #1;
      if (ha.size() > 10) begin
        void'(ha.pop_front()); void'(hb.pop_front());
        if (n % 500 >= 10) begin
          `CHECK(oa == ha[0], $sformatf("n %0d out_a %0d exp %0d", n, oa, ha[0]))
          `CHECK(ob == hb[0], $sformatf("n %0d out_b %0d exp %0d", n, ob, hb[0]))
          if (ob != 0) nzb++;
        end
      end
    end
    `CHECK(nzb > 100, "second kernel active")
    `CHECK(nuser > 100, "downloaded kernel used")
    `TB_FINISH
  end
endmodule
