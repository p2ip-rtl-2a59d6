// output_register: the output boundary of the pipeline.
//
// On every pixel step it registers the colour channels of the last PE into
// the 24-bit output word: {R, G, B} in colour mode, or the gray channel
// copied to all three bytes when gray_out is set. The controller raises
// m_tvalid for the steps that carry a frame pixel. One step of latency.
module output_register
  import p2ip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_en,
  input  logic        gray_out,
  input  pix_t        ch [4],     // R, G, B, Gs
  output logic [23:0] m_tdata
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_tdata <= '0;
    else if (px_en) m_tdata <= gray_out ? {ch[3], ch[3], ch[3]} : {ch[0], ch[1], ch[2]};
  end
endmodule
