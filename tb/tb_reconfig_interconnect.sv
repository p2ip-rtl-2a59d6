// tb_reconfig_interconnect: the testbench plays the three modules with zero
// latency (oSP_a = iMC_a, oPP_b = iPP_a, oPP_a = iMC_b, oMC = iSP,
// oSP_b = iPP_b). After reset every channel must pass in 2 steps. Configured
// for the longest path (gray input -> MC -> SP -> PP -> gray output) the
// RI alone must take 8 steps, the document's figure; auxiliary routing is
// checked on the side (oAux3 <- oPP_a, oAux1 <- iAux5).
`include "tb_common.svh"
module tb_reconfig_interconnect;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, px_en = 1;
  logic cfg_clk;
  assign cfg_clk = clk;
  always #5 clk = ~clk;
  cfg_word_t pe_cfg;
  pix_t ci [4], ai [5], co [4], ao [5];
  pix_t iPP_a, iPP_b, iPP_c, iMC_a, iRec, iMC_b, iSP;
  pix_t oPP_a, oPP_b, oMC, oSP_a, oSP_b;
  reconfig_interconnect dut (.clk, .cfg_clk, .rst_n, .px_en, .pe_cfg, .ch_in(ci), .aux_in(ai), .ch_out(co), .aux_out(ao),
    .iPP_a, .iPP_b, .iPP_c, .iMC_a, .iRec, .iMC_b, .iSP, .oPP_a, .oPP_b, .oMC, .oSP_a, .oSP_b);
  assign oSP_a = iMC_a;
  assign oPP_b = iPP_a;
  assign oPP_a = iMC_b;
  assign oMC   = iSP;
  assign oSP_b = iPP_b;
  `include "tb_cfg_task.svh"
  `WATCHDOG(clk, 100000)

  pix_t hc [$][4], ha [$][5];
  task automatic stream(input int mode);
    hc.delete(); ha.delete();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk) begin
        pix_t c4 [4]; pix_t a5 [5];
        for (int k = 0; k < 4; k++) begin ci[k] = pix_t'($urandom); c4[k] = ci[k]; end
        for (int k = 0; k < 5; k++) begin ai[k] = pix_t'($urandom); a5[k] = ai[k]; end
        hc.push_back(c4); ha.push_back(a5);
      end
      @(posedge clk); #1;
      if (mode == 0 && i >= 2) begin
        for (int k = 0; k < 4; k++) `CHECK(co[k] == hc[i - 1][k], $sformatf("pass ch %0d", k))
        for (int k = 0; k < 5; k++) `CHECK(ao[k] == ha[i - 1][k], $sformatf("pass aux %0d", k))
      end
      if (mode == 1 && i >= 8) begin
        `CHECK(co[3] == hc[i - 7][3], "gray longest path 8 steps")
        `CHECK(co[0] == hc[i - 1][0] && co[1] == hc[i - 1][1] && co[2] == hc[i - 1][2], "colour pass")
        // oAux3 <- oPP_a = iMC_b <- iAux2 : in-reg, mxb, (module 0), in-reg, mxb = 4 steps
        `CHECK(ao[2] == ha[i - 3][1], "aux through module")
        `CHECK(ao[0] == ha[i - 1][4], "aux to aux")
      end
    end
  endtask

  initial begin
    pe_cfg = '0;
    foreach (ci[k]) ci[k] = 0; foreach (ai[k]) ai[k] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    stream(0);
    // RGB crossbar: to_mod = Gs (3), oGs = result (4), others pass
    cfg_write(5'd1, MOD_RI, OP_RGBX, '{8'h88, 8'h38});
    // module crossbar: iMC_a(3) <- rgb(11); iPP_a(0) <- oSP_a(9); to_rgb(12) <- oPP_b(7);
    // iMC_b(5) <- iAux2(2); oAux3(9) <- oPP_a(6); oAux1(7) <- iAux5(5)
    begin
      logic [55:0] s; s = '0;
      s[4*3 +: 4] = 4'd11; s[4*0 +: 4] = 4'd9; s[4*12 +: 4] = 4'd7;
      s[4*5 +: 4] = 4'd2;  s[4*9 +: 4] = 4'd6; s[4*7 +: 4] = 4'd5;
      cfg_write(5'd1, MOD_RI, OP_MXB, '{s[7:0], s[15:8], s[23:16], s[31:24], s[39:32], s[47:40], s[55:48]});
    end
    stream(1);
    `TB_FINISH
  end
endmodule
