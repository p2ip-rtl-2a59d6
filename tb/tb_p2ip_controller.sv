// tb_p2ip_controller: configures frame size 8 x 3 and latency 5 through
// config_in, then runs frames through the controller with a modelled
// datapath (the output word of step k is the input accepted at step
// k - latency). Checks: pixels before the start-of-frame flag are dropped;
// output beats come out in order with m_tuser on the first and m_tlast at
// every line end; the output beat is held under back-pressure; the source is
// refused during the flush; one frame_sync per frame; and, with no stalls,
// a frame takes W*H + latency + 1 cycles.
`include "tb_common.svh"
module tb_p2ip_controller;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int W = 8, H = 3, LAT = 5;
  logic [7:0] cin; logic cv;
  cfg_word_t p2ip_cfg; coord_t fw, fh; logic gray;
  logic s_tvalid, s_tready, s_tlast, s_tuser, m_tvalid, m_tready, m_tlast, m_tuser, px_en, fsync;
  p2ip_controller dut (.clk, .cfg_clk(clk), .rst_n, .config_in(cin), .config_valid(cv), .p2ip_cfg,
    .frame_w(fw), .frame_h(fh), .gray_out(gray), .s_tvalid, .s_tready, .s_tlast, .s_tuser,
    .m_tvalid, .m_tready, .m_tlast, .m_tuser, .px_en, .frame_sync(fsync));
  `WATCHDOG(clk, 50000)

  // modelled datapath
  int src_data;           // value of the current source beat
  int pipe [$];           // value entering at each step
  int m_data;
  always @(posedge clk) if (px_en) begin
    pipe.push_back((s_tvalid && s_tready) ? src_data : -1);
    m_data <= pipe.size() > LAT ? pipe[pipe.size() - 1 - LAT] : -1;
  end

  int n_sync = 0, n_bp = 0, n_flush_refused = 0, n_dropped = 0;
  always @(posedge clk) if (rst_n) begin
    if (fsync) n_sync++;
    if (m_tvalid && !m_tready) n_bp++;
    if (s_tvalid && !s_tready && dut.state == dut.S_FLUSH) n_flush_refused++;
  end

  task automatic send_cfg(input logic [7:0] b[]);
    foreach (b[k]) @(negedge clk) begin cin = b[k]; cv = 1; end
    @(negedge clk) cv = 0;
    repeat (4) @(negedge clk);
  endtask

  // source: `junk` beats without tuser, then frames of W*H beats
  int expect_q [$];
  task automatic source(input int frames, input int junk, input bit gaps);
    int v; v = 0;
    for (int j = 0; j < junk; j++) begin
      @(negedge clk) begin s_tvalid = 1; s_tuser = 0; src_data = 9999; end
      do @(posedge clk); while (!s_tready);
      n_dropped++;
    end
    for (int f = 0; f < frames; f++)
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 3) == 0) begin s_tvalid = 0; @(negedge clk); end
        s_tvalid = 1; s_tuser = (i == 0); s_tlast = (i % W == W - 1);
        src_data = 1000 * f + i; expect_q.push_back(src_data);
        do @(posedge clk); while (!s_tready);
      end
    @(negedge clk) s_tvalid = 0;
  endtask

  int got = 0;
  task automatic sink(input int n, input bit bp);
    int idx; idx = 0;
    while (idx < n) begin
      @(negedge clk) m_tready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      if (m_tvalid && m_tready) begin
        `CHECK(expect_q.size() > 0 && m_data == expect_q[0], $sformatf("beat %0d data %0d", idx, m_data))
        `CHECK(m_tuser == (idx % (W * H) == 0), "tuser")
        `CHECK(m_tlast == (idx % W == W - 1), "tlast")
        if (expect_q.size() > 0) void'(expect_q.pop_front());
        idx++; got++;
      end
    end
  endtask

  // hold rule under back-pressure
  logic [31:0] held; logic was_stalled = 0;
  always @(posedge clk) begin
    if (was_stalled) `CHECK(m_tvalid && m_data == held, "beat held while not ready")
    was_stalled <= m_tvalid && !m_tready;
    held <= m_data;
  end

  initial begin
    int t0, t1;
    cin = 0; cv = 0; s_tvalid = 0; s_tuser = 0; s_tlast = 0; m_tready = 1; src_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    send_cfg('{{5'd0, 3'd0}, {5'd1, 3'd1}, 8'(W), 8'd0});
    send_cfg('{{5'd0, 3'd0}, {5'd2, 3'd1}, 8'(H), 8'd0});
    send_cfg('{{5'd0, 3'd0}, {5'd3, 3'd2}, 8'(LAT), 8'd0, 8'd0});
    `CHECK(fw == W && fh == H, "frame size configured")
    fork
      source(3, 4, 1);
      sink(3 * W * H, 1);
    join
    `CHECK(n_dropped == 4, "junk before start of frame dropped")
    `CHECK(n_bp > 0, "back-pressure seen")
    `CHECK(n_flush_refused > 0, "source refused during flush")
    `CHECK(n_sync >= 3, "frame_sync per frame")
    // timing of one frame without stalls
    @(negedge clk); wait (dut.state == dut.S_SOF);
    fork
      source(2, 0, 0);
      sink(2 * W * H, 0);
      begin
        @(posedge clk iff (s_tvalid && s_tready && s_tuser)); t0 = $time;
        @(posedge clk iff (s_tvalid && s_tready && s_tuser)); t1 = $time;
        `CHECK((t1 - t0) / 10 == W * H + LAT + 1, $sformatf("frame period %0d cycles", (t1 - t0) / 10))
      end
    join
    `CHECK(got == 5 * W * H, "all beats delivered")
    `TB_FINISH
  end
endmodule
