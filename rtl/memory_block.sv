// memory_block: one Memory Block (MB) of a PE's local data memory.
//
// A simple dual-port RAM of DEPTH 8-bit words that stores one frame line: one
// write port and one read port with a registered (synchronous) read, as a
// block RAM provides. Both ports act only on steps of the pixel pipeline (en).
// A read and a write of the same address in one step return the old word, so
// the block can serve as a circular line buffer.
module memory_block
  import p2ip_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic    clk,
  input  logic    en,
  input  mb_req_t req,
  output pix_t    rdata
);
  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[req.raddr];
      if (req.we) mem[req.waddr] <= req.wdata;
    end
  end
endmodule
