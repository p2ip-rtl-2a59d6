// tb_threshold_op: drives random pixels through the threshold in every mode
// and compares with the normal (eq. 3) and hysteresis (eq. 4) rules, with the
// two-step latency; also checks that the pipeline holds while px_en is low.
`include "tb_common.svh"
module tb_threshold_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 0;
  always #5 clk = ~clk;
  logic [1:0] mode; pix_t tl, th, din, dout;
  threshold_op dut (.clk, .rst_n, .px_en, .mode, .t_low(tl), .t_high(th), .din, .dout);
  `WATCHDOG(clk, 20000)
  function automatic pix_t ref_thr(input logic [1:0] m, input pix_t lo, input pix_t hi, input pix_t x);
    if (m == 2) return x >= lo ? 8'hFF : 8'h00;
    if (m == 3) return x < lo ? 8'h00 : x < hi ? x : 8'hFF;
    return x;
  endfunction
  pix_t hist [$];
  initial begin
    mode = 0; tl = 50; th = 100; din = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      mode = 2'(m);
      hist.delete();
      for (int n = 0; n < 300; n++) begin
        @(negedge clk) begin din = pix_t'($urandom); px_en = 1; hist.push_back(ref_thr(2'(m), tl, th, din)); end
        @(posedge clk); #1;
        if (hist.size() > 2) begin
          void'(hist.pop_front());
          `CHECK(dout == hist[0], $sformatf("mode %0d got %h exp %h", m, dout, hist[0]))
        end
      end
    end
    // boundary values in normal mode
    mode = 2; hist.delete();
    for (int v = 45; v < 56; v++) begin
      @(negedge clk) begin din = pix_t'(v); hist.push_back(ref_thr(2, tl, th, din)); end
      @(posedge clk); #1;
      if (hist.size() > 2) begin void'(hist.pop_front()); `CHECK(dout == hist[0], "normal boundary") end
    end
    // boundary values in hysteresis mode
    mode = 3; hist.delete();
    for (int v = 48; v < 103; v++) begin
      @(negedge clk) begin din = pix_t'(v); hist.push_back(ref_thr(3, tl, th, din)); end
      @(posedge clk); #1;
      if (hist.size() > 2) begin void'(hist.pop_front()); `CHECK(dout == hist[0], "boundary") end
    end
    // hold
    @(negedge clk) px_en = 0;
    begin pix_t keep; keep = dout; repeat (5) @(negedge clk) din = ~din; `CHECK(dout == keep, "hold while px_en low") end
    `TB_FINISH
  end
endmodule
