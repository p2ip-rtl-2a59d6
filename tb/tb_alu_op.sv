// tb_alu_op: random operands through every ALU function (register operand,
// constant operand, signed b with k-shift), compared with a reference model
// after the two-step latency.
`include "tb_common.svh"
module tb_alu_op;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  always #5 clk = ~clk;
  alu_op_e op; logic uc, bsg; pix_t cst, a, b, dout; logic [3:0] osh, ksh;
  alu_op dut (.clk, .rst_n, .px_en, .op, .use_const(uc), .b_signed(bsg), .cst, .oshift(osh), .kshift(ksh),
              .a, .b_in(b), .dout);
  `WATCHDOG(clk, 50000)
  function automatic pix_t sat(input longint v); return v < 0 ? 8'd0 : v > 255 ? 8'd255 : 8'(v); endfunction
  function automatic pix_t ref_alu(input int o, input pix_t x, input pix_t y, input logic sg, input int os, input int ks);
    longint ys; ys = sg ? longint'($signed(y)) : longint'(y);
    case (o)
      1: return sat((longint'(x) * y) >> os);
      2: return sat((longint'(x) * x) >> os);
      3: return sat(longint'(x) << y[3:0]);
      4: return sat(longint'(x) >> y[3:0]);
      5: return sat(longint'(x) + ys * (1 << ks));
      6: return sat(longint'(x) - ys * (1 << ks));
      7: return x & y;
      8: return x > y ? 8'hFF : 8'h00;
      9: return x < y ? 8'hFF : 8'h00;
      default: return x;
    endcase
  endfunction
  pix_t hist [$];
  initial begin
    op = ALU_PASS; uc = 0; bsg = 0; cst = 0; a = 0; b = 0; osh = 0; ksh = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int o = 0; o < 10; o++) begin
      for (int n = 0; n < 200; n++) begin
        pix_t bb;
        @(negedge clk) begin
          op = alu_op_e'(o); a = pix_t'($urandom); b = pix_t'($urandom); cst = pix_t'($urandom);
          uc = (n % 3 == 0); bsg = (n % 2 == 0); osh = 4'($urandom_range(0, 8)); ksh = 4'($urandom_range(0, 2));
          bb = uc ? cst : b;
          hist.push_back(ref_alu(o, a, bb, bsg, osh, ksh));
        end
        @(posedge clk); #1;
        if (hist.size() > 2) begin
          void'(hist.pop_front());
          `CHECK(dout == hist[0], $sformatf("op %0d got %0d exp %0d", o, dout, hist[0]))
        end
      end
    end
    `TB_FINISH
  end
endmodule
