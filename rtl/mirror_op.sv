// mirror_op: the Mirror operator (Mir). Reverses the scanning direction of
// every frame line so that a later operator can propagate information from
// right to left.
//
// Two line buffers (MB3 and MB4, lent by the MB crossbar) work as a LIFO
// pair: while line k is written into one buffer at address x, line k-1 is read
// from the other at address W-1-x. The output stream is therefore the input
// reversed line by line and delayed by one line: the pixel in output slot
// (line k+1, x) is input pixel (line k, W-1-x), present on dout one step after
// the input of that slot. The operator learns the line boundaries by counting
// steps after frame_sync; `offset` is the step that brings pixel (0,0).
// The two-buffer LIFO principle is from the document; the position counting is
// this design's choice.
module mirror_op
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic        frame_sync,
  input  coord_t      frame_w,
  input  logic [23:0] offset,
  input  pix_t        din,
  output mb_req_t     mb_req   [2],
  input  pix_t        mb_rdata [2],
  output pix_t        dout
);
  logic [23:0] steps;
  logic        active, par;
  coord_t      x;

  // Position of the pixel at the input in the current step.
  coord_t cur_x;
  logic   cur_par;
  always_comb begin
    if (!active) begin cur_x = '0; cur_par = 1'b0; end
    else if (x == frame_w - 1'b1) begin cur_x = '0; cur_par = ~par; end
    else begin cur_x = x + 1'b1; cur_par = par; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      steps <= '0; active <= 1'b0; x <= '0; par <= 1'b0;
    end else if (frame_sync) begin
      steps <= '0; active <= 1'b0; x <= '0; par <= 1'b0;
    end else if (px_en) begin
      if (steps != '1) steps <= steps + 1'b1;
      if (active || steps == offset) begin
        active <= 1'b1; x <= cur_x; par <= cur_par;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      mb_req[k].we    = (cur_par == k[0]);
      mb_req[k].waddr = MB_AW'(cur_x);
      mb_req[k].raddr = MB_AW'(frame_w - 1'b1 - cur_x);
      mb_req[k].wdata = din;
    end
  end

  logic rd_par;  // buffer read in the last step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_par <= 1'b0;
    else if (px_en) rd_par <= ~cur_par;
  end
  assign dout = rd_par ? mb_rdata[1] : mb_rdata[0];
endmodule
