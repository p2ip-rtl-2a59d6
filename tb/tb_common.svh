// tb_common.svh: check counting shared by the self-checking testbenches.
// CHECK counts a check and, when the condition is false, a failure with a
// message. TB_FINISH prints the result line and ends the simulation.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog"); \
    `TB_FINISH end
`endif
