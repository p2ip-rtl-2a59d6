// tb_mirror_op: streams random frames (16 x 6) through the mirror and its two
// memory blocks, with pauses and a start offset; each output slot
// (line k+1, x) must hold input pixel (line k, W-1-x), one step after the
// input of that slot.
`include "tb_common.svh"
module tb_mirror_op;
  import p2ip_pkg::*;
  `include "tb_ref.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 0, fsync = 0;
  always #5 clk = ~clk;
  localparam int W = 16, H = 6;
  logic [23:0] offset; pix_t din, dout;
  mb_req_t req [2]; pix_t rd [2];
  mirror_op dut (.clk, .rst_n, .px_en, .frame_sync(fsync), .frame_w(12'(W)), .offset, .din,
                 .mb_req(req), .mb_rdata(rd), .dout);
  for (genvar k = 0; k < 2; k++) begin : g_mb
    memory_block u (.clk, .en(px_en), .req(req[k]), .rdata(rd[k]));
  end
  `WATCHDOG(clk, 50000)
  frame_t img;
  task automatic run_frame(input int ofs);
    int step;
    offset = 24'(ofs);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
    @(negedge clk) fsync = 1;
    @(negedge clk) fsync = 0;
    step = 0;
    while (step < ofs + W * (H + 1)) begin
      int i;
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin px_en = 0; continue; end
      px_en = 1;
      i = step - ofs;
      din = (i >= 0 && i < W * H) ? img[i / W][i % W] : pix_t'($urandom);
      @(posedge clk);
      // dout is valid after the step: it belongs to slot i
      @(negedge clk) px_en = 0;
      if (i >= W && i < W * (H + 1))
        `CHECK(dout == img[i / W - 1][W - 1 - i % W], $sformatf("slot %0d", i))
      step++;
    end
  endtask
  initial begin
    offset = 0; din = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run_frame(0);
    run_frame(5);
    `TB_FINISH
  end
endmodule
