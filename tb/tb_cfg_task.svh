// tb_cfg_task.svh: task that writes an operator register through a pe_cfg
// style bus (signals cfg_clk and pe_cfg of the including testbench). Each
// payload byte is one configuration word.
`ifndef TB_CFG_TASK_SVH
`define TB_CFG_TASK_SVH
task automatic cfg_write(input logic [4:0] pe, input logic [2:0] md, input logic [4:0] op,
                         input logic [7:0] bytes_in[]);
  foreach (bytes_in[k]) begin
    @(negedge cfg_clk) pe_cfg = '{valid: 1'b1, pe_id: pe, mod_id: md, op_id: op, idx: 3'(k), data: bytes_in[k]};
  end
  @(negedge cfg_clk) pe_cfg = '0;
  repeat (3) @(negedge cfg_clk);
endtask
`endif
