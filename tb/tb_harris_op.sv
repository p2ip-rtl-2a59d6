// tb_harris_op: random A, B, C through the Harris operator, compared with
// R = A*B - C^2 - (3/64)(A+B)^2 scaled by 1/256 and clipped, checking the
// four-step latency the document gives.
`include "tb_common.svh"
module tb_harris_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  pix_t a, b, c, dout;
  harris_op dut (.clk, .rst_n, .px_en, .a, .b, .c, .dout);
  `WATCHDOG(clk, 20000)
  pix_t hist [$];
  function automatic pix_t ref_h(input int x, input int y, input int z);
    longint r64; longint r;
    r64 = 64 * (longint'(x) * y - longint'(z) * z) - 3 * longint'(x + y) * (x + y);
    r = r64 >>> 14;
    return r < 0 ? 8'd0 : r > 255 ? 8'd255 : 8'(r);
  endfunction
  int nz = 0;
  initial begin
    a = 0; b = 0; c = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk) begin
        a = pix_t'($urandom); b = pix_t'($urandom); c = pix_t'($urandom_range(0, 120));
        hist.push_back(ref_h(a, b, c));
      end
      @(posedge clk); #1;
      if (hist.size() > 4) begin
        void'(hist.pop_front());
        `CHECK(dout == hist[0], $sformatf("got %0d exp %0d", dout, hist[0]))
        if (dout != 0) nz++;
      end
    end
    `CHECK(nz > 50, "corner responses seen")
    `TB_FINISH
  end
endmodule
