// nms_op: the Non-Maximum Suppressor (NMS) of the spatial processor.
//
// Passes the window centre only if it is a local maximum, otherwise 0.
// Directional mode (Canny): `dir` is the boolean from the direction operator
// (non-zero: the horizontal gradient dominates), and the centre is compared
// with its left and right neighbours, else with the ones above and below.
// Window mode (Harris): the centre must be >= every pixel of the window from
// the NE (positions outside the configured window are zero and never win).
// Latency 2 steps (comparison, output register); that number is this design's.
module nms_op
  import p2ip_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    px_en,
  input  logic    win_mode,
  input  window_t win,
  input  pix_t    dir,
  output pix_t    dout
);
  pix_t c;
  logic is_max;
  assign c = win[2][4];
  always_comb begin
    if (win_mode) begin
      is_max = 1'b1;
      for (int r = 0; r < WIN_ROWS; r++)
        for (int k = 0; k < WIN_COLS; k++)
          if (win[r][k] > c) is_max = 1'b0;
    end else if (dir != '0) begin
      is_max = (c >= win[2][3]) && (c >= win[2][5]);
    end else begin
      is_max = (c >= win[1][4]) && (c >= win[3][4]);
    end
  end

  pix_t s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s1 <= '0; dout <= '0; end
    else if (px_en) begin
      s1   <= is_max ? c : '0;
      dout <= s1;
    end
  end
endmodule
