// tb_input_register: random RGB words; checks the channel split and the gray
// channel (77 R + 150 G + 29 B) / 256 one step later, and the hold when
// px_en is low.
`include "tb_common.svh"
module tb_input_register;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  logic [23:0] d; pix_t ch [4];
  input_register dut (.clk, .rst_n, .px_en, .s_tdata(d), .ch);
  `WATCHDOG(clk, 20000)
  initial begin
    d = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int r, g, b;
      @(negedge clk) begin d = 24'($urandom); px_en = (n % 7 != 3); end
      r = d[23:16]; g = d[15:8]; b = d[7:0];
      @(posedge clk); #1;
      if (px_en) begin
        `CHECK(ch[0] == r && ch[1] == g && ch[2] == b, "split")
        `CHECK(ch[3] == pix_t'((77 * r + 150 * g + 29 * b) / 256), "gray")
      end
    end
    // white stays white, black stays black
    @(negedge clk) begin d = 24'hFFFFFF; px_en = 1; end
    @(posedge clk); #1; `CHECK(ch[3] == 8'd255, "white")
    @(negedge clk) d = 24'h000000;
    @(posedge clk); #1; `CHECK(ch[3] == 8'd0, "black")
    @(negedge clk) px_en = 0;
    @(negedge clk) d = 24'h123456;
    @(posedge clk); #1; `CHECK(ch[0] == 0, "hold")
    `TB_FINISH
  end
endmodule
