// tb_p2ip_cd: sends configuration transfers byte by byte (as in a threshold
// configuration: two header bytes and three payload bytes) and checks the
// decoded words on p2ip_cfg, one clock after each payload byte, and the
// global frame size / latency / output-mode registers.
`include "tb_common.svh"
module tb_p2ip_cd;
  import p2ip_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] cin; logic cv;
  cfg_word_t o;
  coord_t fw, fh; logic [23:0] lat; logic gray;
  p2ip_cd dut (.cfg_clk(clk), .rst_n, .config_in(cin), .config_valid(cv), .p2ip_cfg(o),
               .frame_w(fw), .frame_h(fh), .latency(lat), .gray_out(gray));
  `WATCHDOG(clk, 3000)

  cfg_word_t seen[$];
  always @(posedge clk) if (o.valid) seen.push_back(o);

  task automatic send(input logic [4:0] pe, input logic [2:0] md, input logic [4:0] op, input logic [7:0] b[]);
    @(negedge clk) begin cin = {pe, md}; cv = 1; end
    @(negedge clk) cin = {op, 3'(b.size() - 1)};
    foreach (b[k]) @(negedge clk) cin = b[k];
    @(negedge clk) cv = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    cin = 0; cv = 0;
    repeat (2) @(posedge clk); #1;
    `CHECK(fw == 12'd1920 && fh == 12'd1080 && lat == 24'd21 && !gray, "reset globals")
    rst_n = 1;
    send(5'd2, MOD_PP, OP_THR, '{8'd50, 8'd100, 8'd3});
    `CHECK(seen.size() == 3, $sformatf("three payload words, got %0d", seen.size()))
    for (int k = 0; k < 3 && k < seen.size(); k++)
      `CHECK(seen[k].pe_id == 5'd2 && seen[k].mod_id == MOD_PP && seen[k].op_id == OP_THR
             && seen[k].idx == 3'(k), "word address")
    if (seen.size() == 3) `CHECK(seen[0].data == 50 && seen[1].data == 100 && seen[2].data == 3, "word data")
    seen.delete();
    // idle cycles between bytes (valid low) are skipped
    @(negedge clk) begin cin = {5'd4, MOD_SP}; cv = 1; end
    @(negedge clk) cv = 0;
    @(negedge clk) begin cin = {OP_C2D, 3'd1}; cv = 1; end
    @(negedge clk) cin = 8'h11;
    @(negedge clk) cv = 0;
    @(negedge clk) begin cin = 8'h22; cv = 1; end
    @(negedge clk) cv = 0;
    repeat (3) @(negedge clk);
    `CHECK(seen.size() == 2, "gapped transfer")
    if (seen.size() == 2) `CHECK(seen[0].data == 8'h11 && seen[1].data == 8'h22 && seen[1].idx == 1, "gapped data")
    seen.delete();
    // global registers
    send(5'd0, MOD_GLOBAL, OP_G_WIDTH,  '{8'd64, 8'd0});
    send(5'd0, MOD_GLOBAL, OP_G_HEIGHT, '{8'd16, 8'd0});
    send(5'd0, MOD_GLOBAL, OP_G_LAT,    '{8'h34, 8'h12, 8'h01});
    send(5'd0, MOD_GLOBAL, OP_G_OMODE,  '{8'd1});
    `CHECK(fw == 12'd64 && fh == 12'd16, "frame size written")
    `CHECK(lat == 24'h011234, "latency written")
    `CHECK(gray, "output mode written")
    // eight-byte transfer (largest register size)
    seen.delete();
    send(5'd3, MOD_RI, OP_MXB, '{8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7, 8'd8});
    `CHECK(seen.size() == 8, "eight-byte transfer")
    if (seen.size() == 8) `CHECK(seen[7].idx == 3'd7 && seen[7].data == 8'd8, "last byte")
    `TB_FINISH
  end
endmodule
