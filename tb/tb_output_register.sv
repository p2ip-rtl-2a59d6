// tb_output_register: checks RGB packing and the gray mode of the output
// register, one step after the channels, and the hold when px_en is low.
`include "tb_common.svh"
module tb_output_register;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1, gray = 0;
  always #5 clk = ~clk;
  pix_t ch [4]; logic [23:0] q;
  output_register dut (.clk, .rst_n, .px_en, .gray_out(gray), .ch, .m_tdata(q));
  `WATCHDOG(clk, 20000)
  initial begin
    foreach (ch[i]) ch[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [23:0] e; logic [23:0] old;
      old = q;
      @(negedge clk) begin
        for (int k = 0; k < 4; k++) ch[k] = pix_t'($urandom);
        gray = n % 2; px_en = (n % 9 != 4);
        e = gray ? {ch[3], ch[3], ch[3]} : {ch[0], ch[1], ch[2]};
      end
      @(posedge clk); #1;
      `CHECK(q == (px_en ? e : old), "output word")
    end
    `TB_FINISH
  end
endmodule
