// border_handler: fills the parts of a sliding window that lie outside the
// frame by replicating the nearest pixel inside the frame.
//
// Input is the raw window of the neighborhood extractor (raw[r][c] is the
// pixel r lines and c+1 pixels before the newest one, so row 0 is the bottom
// line and column 0 the rightmost pixel) and the frame position (xc, yc) of the
// window centre raw[cr][cc]. For every output row dy and column dx the
// coordinate is clamped to the frame and the matching raw row/column chosen;
// rows and columns are chosen independently. Positions outside the configured
// m x n window are set to zero. The output window is centred at [2][4], row 0
// on top. Three pipeline stages, each advancing on px_en: (1) clamped
// selections and a copy of the raw window, (2) selection, (3) output register.
// The three-step latency is the figure the document gives for this block.
module border_handler
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  window_t     raw,
  input  logic [2:0]  rows,      // m: 3..5
  input  logic [3:0]  cols,      // n: 1..9
  input  logic signed [COORD_W+1:0] xc,
  input  logic signed [COORD_W+1:0] yc,
  input  coord_t      frame_w,
  input  coord_t      frame_h,
  output window_t     win
);
  localparam int SW = COORD_W + 2;
  typedef logic signed [SW-1:0] scoord_t;

  logic [2:0] cr;   // centre row index inside raw
  logic [3:0] cc;   // centre column index inside raw
  assign cr = (rows - 3'd1) >> 1;
  assign cc = (cols - 4'd1) >> 1;

  // Stage 1: selections
  logic [2:0] rsel_d [WIN_ROWS];  // raw row for output row
  logic [3:0] csel_d [WIN_COLS];
  logic       rok_d  [WIN_ROWS];
  logic       cok_d  [WIN_COLS];

  always_comb begin
    for (int dr = 0; dr < WIN_ROWS; dr++) begin
      automatic int dy = dr - 2;
      automatic scoord_t yy = yc + scoord_t'(dy);
      if (yy < 0) yy = '0;
      if (yy > scoord_t'(frame_h) - 1) yy = scoord_t'(frame_h) - 1;
      rok_d[dr]  = (dy >= int'(cr) + 1 - int'(rows)) && (dy <= int'(cr));
      rsel_d[dr] = 3'(int'(cr) - int'(yy - yc));
      if (!rok_d[dr]) rsel_d[dr] = '0;
    end
    for (int dc = 0; dc < WIN_COLS; dc++) begin
      automatic int dx = dc - 4;
      automatic scoord_t xx = xc + scoord_t'(dx);
      if (xx < 0) xx = '0;
      if (xx > scoord_t'(frame_w) - 1) xx = scoord_t'(frame_w) - 1;
      cok_d[dc]  = (dx >= int'(cc) + 1 - int'(cols)) && (dx <= int'(cc));
      csel_d[dc] = 4'(int'(cc) - int'(xx - xc));
      if (!cok_d[dc]) csel_d[dc] = '0;
    end
  end

  logic [2:0] rsel_q [WIN_ROWS];
  logic [3:0] csel_q [WIN_COLS];
  logic       rok_q  [WIN_ROWS];
  logic       cok_q  [WIN_COLS];
  window_t    raw_q, sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_q <= '0; sel_q <= '0; win <= '0;
      for (int i = 0; i < WIN_ROWS; i++) begin rsel_q[i] <= '0; rok_q[i] <= 1'b0; end
      for (int i = 0; i < WIN_COLS; i++) begin csel_q[i] <= '0; cok_q[i] <= 1'b0; end
    end else if (px_en) begin
      raw_q  <= raw;
      rsel_q <= rsel_d; csel_q <= csel_d; rok_q <= rok_d; cok_q <= cok_d;
      for (int r = 0; r < WIN_ROWS; r++)
        for (int c = 0; c < WIN_COLS; c++)
          sel_q[r][c] <= (rok_q[r] && cok_q[c] && rsel_q[r] < 3'(WIN_ROWS) && csel_q[c] < 4'(WIN_COLS))
                         ? raw_q[rsel_q[r]][csel_q[c]] : '0;
      win <= sel_q;
    end
  end
endmodule
