// tb_ref.svh: reference models (included inside a testbench module) shared by the testbenches: a frame store and
// the bordered window the neighborhood extractor must deliver (coordinates
// clamped into the frame, zero outside the configured m x n window).
`ifndef TB_REF_SVH
`define TB_REF_SVH
  localparam int MAXW = 64, MAXH = 64;
  typedef pix_t frame_t [MAXH][MAXW];

  function automatic int clampi(input int v, input int lo, input int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  function automatic window_t ref_window(input frame_t f, input int w, input int h,
                                         input int m, input int n, input int xc, input int yc);
    window_t o;
    int cr, cc;
    cr = (m - 1) / 2; cc = (n - 1) / 2;
    o = '0;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -4; dx <= 4; dx++)
        if (dy >= cr + 1 - m && dy <= cr && dx >= cc + 1 - n && dx <= cc)
          o[2 + dy][4 + dx] = f[clampi(yc + dy, 0, h - 1)][clampi(xc + dx, 0, w - 1)];
    return o;
  endfunction

  // Edge sharpening of one channel: s = f + sat8s((Laplacian * f) / 16),
  // Laplacian = [-1 -1 -1; -1 8 -1; -1 -1 -1], borders replicated.
  function automatic pix_t ref_sharpen(input frame_t f, input int w, input int h, input int x, input int y);
    int s, e;
    s = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        s += (dx == 0 && dy == 0 ? 8 : -1) * int'(f[clampi(y + dy, 0, h - 1)][clampi(x + dx, 0, w - 1)]);
    e = s >>> 4;
    e = e < -128 ? -128 : e > 127 ? 127 : e;
    s = int'(f[y][x]) + e;
    return s < 0 ? 8'd0 : s > 255 ? 8'd255 : 8'(s);
  endfunction
`endif
