// tb_processing_element: configures one PE (PE ID 3) through the broadcast
// configuration bus for edge sharpening of the red channel: NE 3x3 ->
// 2DC Laplacian (signed) -> ALU add with the input delayed by Z^-n, result
// back on the red channel. Streams two random 24 x 8 frames with pauses and
// checks every red output pixel against the reference, the PE latency of
// W + 27 steps, the 2-step pass-through of green, blue, gray and the
// auxiliary channels, and that words for another PE ID change nothing.
`include "tb_common.svh"
module tb_processing_element;
  import p2ip_pkg::*;
  `include "tb_ref.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 0, fsync = 0;
  logic cfg_clk;
  assign cfg_clk = clk;
  always #5 clk = ~clk;
  localparam int W = 24, H = 8;
  localparam int LAT = W + 27;
  cfg_word_t pe_cfg;
  pix_t ci [4], ai [5], co [4], ao [5];
  processing_element #(.PE_ID(5'd3)) dut (.clk, .cfg_clk, .rst_n, .px_en, .frame_sync(fsync),
    .frame_w(12'(W)), .frame_h(12'(H)), .p2ip_cfg(pe_cfg), .ch_in(ci), .aux_in(ai), .ch_out(co), .aux_out(ao));
  `include "tb_cfg_task.svh"
  `WATCHDOG(clk, 100000)
  frame_t img;
  int n_red = 0;

  task automatic run_frame();
    pix_t hist [$][9];
    int step;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
    @(negedge clk) fsync = 1;
    @(negedge clk) fsync = 0;
    step = 0;
    while (step < W * H + LAT) begin
      pix_t v [9];
      @(negedge clk);
      if ($urandom_range(0, 6) == 0) begin px_en = 0; continue; end
      px_en = 1;
      ci[0] = step < W * H ? img[step / W][step % W] : 8'd0;
      for (int k = 1; k < 4; k++) ci[k] = pix_t'($urandom);
      for (int k = 0; k < 5; k++) ai[k] = pix_t'($urandom);
      for (int k = 0; k < 4; k++) v[k] = ci[k];
      for (int k = 0; k < 5; k++) v[4 + k] = ai[k];
      hist.push_back(v);
      @(posedge clk); #1;
      begin
        int c; c = step - LAT + 1;
        if (c >= 0 && c < W * H) begin
          `CHECK(co[0] == ref_sharpen(img, W, H, c % W, c / W), $sformatf("red (%0d,%0d) got %0d exp %0d",
                 c % W, c / W, co[0], ref_sharpen(img, W, H, c % W, c / W)))
          n_red++;
        end
        if (step >= 1) begin
          for (int k = 1; k < 4; k++) `CHECK(co[k] == hist[step - 1][k], "colour pass-through")
          for (int k = 0; k < 5; k++) `CHECK(ao[k] == hist[step - 1][4 + k], "aux pass-through")
        end
      end
      step++;
    end
    @(negedge clk) px_en = 0;
  endtask

  initial begin
    logic [55:0] s;
    pe_cfg = '0; foreach (ci[k]) ci[k] = 0; foreach (ai[k]) ai[k] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // words for PE 2 must not reach this PE
    cfg_write(5'd2, MOD_RI, OP_RGBX, '{8'h00, 8'h00});
    cfg_write(5'd3, MOD_RI, OP_RGBX, '{8'h8C, 8'h06});
    s = 56'h0000_5432_1000_0000;
    s[4*3 +: 4] = 4'd11; s[4*5 +: 4] = 4'd11; s[4*0 +: 4] = 4'd8; s[4*1 +: 4] = 4'd9; s[4*12 +: 4] = 4'd7;
    cfg_write(5'd3, MOD_RI, OP_MXB, '{s[7:0], s[15:8], s[23:16], s[31:24], s[39:32], s[47:40], s[55:48]});
    cfg_write(5'd3, MOD_MC, OP_MBX, '{8'h02, 8'h00, 8'h00, 8'h00});
    cfg_write(5'd3, MOD_MC, OP_DLY, '{8'(W + 15), 8'h00});
    cfg_write(5'd3, MOD_MC, OP_NE,  '{8'h1B, 8'd3, 8'h00, 8'h00});
    cfg_write(5'd3, MOD_SP, OP_C2D, '{8'h82, 8'h00});
    cfg_write(5'd3, MOD_PP, OP_ALU, '{8'h25, 8'h00, 8'h00});
    run_frame();
    run_frame();
    `CHECK(n_red == 2 * W * H, "every red pixel checked")
    `TB_FINISH
  end
endmodule
