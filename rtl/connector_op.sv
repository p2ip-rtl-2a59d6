// connector_op: the Connector (Con) of the spatial processor, used to close
// gaps in edge lines after hysteresis thresholding.
//
// Pixel coding from the threshold operator: 0 = suppressed, 0xFF = true edge,
// anything else = edge candidate. A candidate centre that touches a true edge
// among its eight neighbours becomes a true edge (0xFF); every other centre
// passes unchanged. Chained with mirrors, repeated connectors let true edges
// grow along candidate lines in both scan directions.
// Latency 2 steps. The rule above is this design's reading of "verify if it
// can be connected to another pixel in its neighborhood".
module connector_op
  import p2ip_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    px_en,
  input  window_t win,
  output pix_t    dout
);
  pix_t c;
  logic touch;
  assign c = win[2][4];
  always_comb begin
    touch = 1'b0;
    for (int r = 1; r <= 3; r++)
      for (int k = 3; k <= 5; k++)
        if (!(r == 2 && k == 4) && win[r][k] == PIX_TRUE) touch = 1'b1;
  end

  pix_t s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s1 <= '0; dout <= '0; end
    else if (px_en) begin
      s1   <= (c != '0 && touch) ? PIX_TRUE : c;
      dout <= s1;
    end
  end
endmodule
