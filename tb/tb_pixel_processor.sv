// tb_pixel_processor: configures ALU and threshold registers and checks the
// pixel processor outputs: Dir on oPP_a (4 steps), ALU add of a signed b
// through a bypassed threshold (4 steps), ALU magnitude sum through a
// hysteresis threshold, and the Harris response through a normal threshold
// (6 steps).
`include "tb_common.svh"
module tb_pixel_processor;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  logic cfg_clk;
  assign cfg_clk = clk;
  always #5 clk = ~clk;
  cfg_word_t pe_cfg;
  pix_t a, b, c, oa, ob;
  pixel_processor dut (.clk, .cfg_clk, .rst_n, .px_en, .pe_cfg, .iPP_a(a), .iPP_b(b), .iPP_c(c), .oPP_a(oa), .oPP_b(ob));
  `include "tb_cfg_task.svh"
  `WATCHDOG(clk, 100000)
  function automatic pix_t sat(input longint v); return v < 0 ? 8'd0 : v > 255 ? 8'd255 : 8'(v); endfunction
  function automatic pix_t har(input int x, input int y, input int z);
    longint r64; r64 = 64 * (longint'(x) * y - longint'(z) * z) - 3 * longint'(x + y) * (x + y);
    return sat(r64 >>> 14);
  endfunction
  function automatic pix_t hyst(input pix_t x, input pix_t lo, input pix_t hi);
    return x < lo ? 8'd0 : x < hi ? x : 8'hFF;
  endfunction
  task automatic stream(input int mode, input int latb);
    pix_t ha [$], hb [$];
    for (int i = 0; i < 400; i++) begin
      @(negedge clk) begin
        a = pix_t'($urandom); b = pix_t'($urandom); c = pix_t'($urandom_range(0, 100));
        ha.push_back(a > b ? 8'hFF : 8'h00);
        case (mode)
          0: hb.push_back(sat(int'(a) + int'($signed(b))));
          1: hb.push_back(hyst(sat(int'(a) + int'(b)), 8'd60, 8'd200));
          default: hb.push_back(har(a, b, c) >= 8'd10 ? 8'hFF : 8'h00);
        endcase
      end
      @(posedge clk); #1;
      if (ha.size() > 4) begin
        `CHECK(oa == ha[ha.size() - 4], "direction")
      end
      if (hb.size() > latb) begin
        `CHECK(ob == hb[hb.size() - latb], $sformatf("mode %0d oPP_b %0d exp %0d", mode, ob, hb[hb.size() - latb]))
      end
    end
  endtask
  initial begin
    pe_cfg = '0; a = 0; b = 0; c = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // ALU add, b signed, threshold bypass (reset)
    cfg_write(5'd1, MOD_PP, OP_ALU, '{8'h25, 8'h00, 8'h00});
    stream(0, 4);
    // ALU add (unsigned), hysteresis 60/200
    cfg_write(5'd1, MOD_PP, OP_ALU, '{8'h05, 8'h00, 8'h00});
    cfg_write(5'd1, MOD_PP, OP_THR, '{8'd60, 8'd200, 8'd3});
    stream(1, 4);
    // Harris through normal threshold at 10
    cfg_write(5'd1, MOD_PP, OP_ALU, '{8'h40, 8'h00, 8'h00});
    cfg_write(5'd1, MOD_PP, OP_THR, '{8'd10, 8'd0, 8'd2});
    stream(2, 6);
    `TB_FINISH
  end
endmodule
