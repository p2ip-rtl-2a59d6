// neighborhood_extractor: the Neighborhood Extractor (NE) of the memory
// controller. Turns the line-scanned pixel stream into a sliding window of up
// to 5 lines x 9 pixels.
//
// Structure: five pixel arrays of nine registers each and up to four line
// buffers held in the PE's Memory Blocks MB1..MB4. Pixel array row 0 takes the
// input; each line buffer k (1..4) takes the last register of row k-1 and
// feeds row k, so row k lags row 0 by k frame lines. The line buffers share
// one circular address counter of length frame_w - 10 (the nine array
// registers plus the registered block-RAM read make up the rest of the line);
// frames must therefore be at least 11 pixels wide. With rec_en the line
// buffer behind the centre row takes the second stream rec_in instead
// (recursive mode). MB3/MB4 belong to the NE only when mb34_ok is set;
// otherwise at most three rows are produced.
//
// Position: the NE counts pixel steps after frame_sync; the step number
// `offset` carries pixel (0,0) of the frame into the pixel array. From that it
// knows the frame position of the window centre and the border handler
// (3 steps) replicates inner pixels over the frame edges. The centre pixel
// leaves on `win` offset + cr*W + cc + 1 + 3 steps after it entered, where
// cr = (m-1)/2 and cc = (n-1)/2.
// Window sizes, line-buffer count, the nine-register arrays, recursion and the
// border handler follow the document; offsets, counters and the minimum width
// are this design's choices.
module neighborhood_extractor
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic        frame_sync,
  input  coord_t      frame_w,
  input  coord_t      frame_h,
  // configuration
  input  logic [2:0]  rows,        // m: 3..5 window lines
  input  logic [3:0]  cols,        // n: 1..9 window pixels per line
  input  logic        rec_en,
  input  logic [23:0] offset,
  input  logic        mb34_ok,
  // streams
  input  pix_t        din,
  input  pix_t        rec_in,
  // memory block ports (MB1..MB4)
  output mb_req_t     mb_req   [4],
  input  pix_t        mb_rdata [4],
  output window_t     win
);
  localparam int SW = COORD_W + 2;

  logic [2:0] m_eff;
  always_comb begin
    m_eff = (rows < 3'd3 || rows > 3'd5) ? 3'd3 : rows;
    if (!mb34_ok && m_eff > 3'd3) m_eff = 3'd3;
  end
  logic [3:0] n_eff;
  assign n_eff = (cols == 4'd0 || cols > 4'd9) ? 4'd3 : cols;
  logic [2:0] cr;
  logic [3:0] cc;
  assign cr = (m_eff - 3'd1) >> 1;
  assign cc = (n_eff - 4'd1) >> 1;

  // ---------------------------------------------------------- line buffers
  window_t     raw;
  logic [MB_AW-1:0] ptr, len_m1;
  assign len_m1 = MB_AW'(frame_w) - MB_AW'(11);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      mb_req[k].we    = 1'b1;
      mb_req[k].waddr = ptr;
      mb_req[k].raddr = ptr;
      mb_req[k].wdata = (rec_en && k == int'(cr)) ? rec_in : raw[k][WIN_COLS-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw <= '0;
      ptr <= '0;
    end else if (px_en) begin
      ptr <= (ptr >= len_m1) ? '0 : ptr + 1'b1;
      for (int r = 0; r < WIN_ROWS; r++) begin
        for (int c = WIN_COLS-1; c > 0; c--) raw[r][c] <= raw[r][c-1];
      end
      raw[0][0] <= din;
      for (int r = 1; r < WIN_ROWS; r++) raw[r][0] <= mb_rdata[r-1];
    end
  end

  // -------------------------------------------------------------- position
  logic [23:0]  steps;
  logic         active;
  coord_t       qx, qy;      // position of raw[0][0]
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      steps <= '0; active <= 1'b0; qx <= '0; qy <= '0;
    end else if (frame_sync) begin
      steps <= '0; active <= 1'b0; qx <= '0; qy <= '0;
    end else if (px_en) begin
      if (steps != '1) steps <= steps + 1'b1;
      if (!active) begin
        if (steps == offset) begin active <= 1'b1; qx <= '0; qy <= '0; end
      end else if (qx == frame_w - 1'b1) begin
        qx <= '0; qy <= qy + 1'b1;
      end else qx <= qx + 1'b1;
    end
  end

  logic signed [SW-1:0] xc, yc;
  always_comb begin
    xc = $signed({2'b00, qx}) - $signed({{(SW-4){1'b0}}, cc});
    yc = $signed({2'b00, qy}) - $signed({{(SW-3){1'b0}}, cr});
    if (xc < 0) begin
      xc = xc + $signed({2'b00, frame_w});
      yc = yc - 1;
    end
  end

  border_handler u_bh (
    .clk, .rst_n, .px_en, .raw, .rows(m_eff), .cols(n_eff), .xc, .yc,
    .frame_w, .frame_h, .win
  );
endmodule
