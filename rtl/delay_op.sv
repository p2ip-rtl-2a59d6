// delay_op: the Delay operator (Z^-n). Delays a pixel stream by a configurable
// number of steps to bring two streams that took different paths back into
// step.
//
// The two line buffers MB3 and MB4 (lent by the MB crossbar) are used as one
// circular buffer of 2 x 4096 words: each step reads the oldest word at the
// pointer and overwrites it with the input. A configured delay d (2..8193)
// gives a buffer length d-1; the registered read adds the last step, so dout
// shows din of d steps earlier. The longest delay covers two lines, which is
// the document's limit (the delay of a 5 x 5 neighborhood).
module delay_op
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic [13:0] delay,
  input  pix_t        din,
  output mb_req_t     mb_req   [2],
  input  pix_t        mb_rdata [2],
  output pix_t        dout
);
  logic [12:0] ptr, last;
  logic        rd_hi;
  assign last = (delay < 14'd2) ? 13'd0 : (delay > 14'd8193) ? 13'd8191 : 13'(delay - 14'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; rd_hi <= 1'b0;
    end else if (px_en) begin
      ptr   <= (ptr >= last) ? '0 : ptr + 1'b1;
      rd_hi <= ptr[12];
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      mb_req[k].we    = (ptr[12] == k[0]);
      mb_req[k].waddr = ptr[11:0];
      mb_req[k].raddr = ptr[11:0];
      mb_req[k].wdata = din;
    end
  end
  assign dout = rd_hi ? mb_rdata[1] : mb_rdata[0];
endmodule
