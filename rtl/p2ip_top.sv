// p2ip_top: the Programmable Pipeline Image Processor, a linear systolic
// array of identical, runtime-configurable processing elements (PEs) that
// works directly on a line-scanned pixel stream, one pixel per clock.
//
// Pixels (24-bit RGB) enter on an AXI4-Stream slave port, pass the input
// register (which adds a gray channel), N_PE processing elements and the
// output register, and leave on an AXI4-Stream master port. The controller
// steps the whole pipeline (px_en) and frames the stream. Configuration bytes
// on config_in/config_valid (configuration clock cfg_clk) travel down the
// configuration tree (P2IP-CD -> PE-CD -> Module-CD -> Reg-CD) and set the
// operators and the routing of every PE while the design runs. Configuration
// registers are read by the pixel-clock datapath as static values: change
// them between frames.
// Parameters: N_PE processing elements (10 in the evaluated system),
// MB_DEPTH words per memory block (4096: lines up to 4095 pixels).
module p2ip_top
  import p2ip_pkg::*;
#(
  parameter int unsigned N_PE       = 10,
  parameter int unsigned MB_DEPTH   = 4096,
  parameter int unsigned DEF_WIDTH  = 1920,
  parameter int unsigned DEF_HEIGHT = 1080
) (
  input  logic        clk,
  input  logic        cfg_clk,
  input  logic        rst_n,
  // configuration port
  input  logic [7:0]  config_in,
  input  logic        config_valid,
  // AXI4-Stream slave (frame source)
  input  logic [23:0] s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  input  logic        s_tuser,
  // AXI4-Stream master (frame sink)
  output logic [23:0] m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  output logic        m_tuser
);
  cfg_word_t p2ip_cfg;
  coord_t    frame_w, frame_h;
  logic      gray_out, px_en, frame_sync;

  p2ip_controller #(.DEF_WIDTH(DEF_WIDTH), .DEF_HEIGHT(DEF_HEIGHT), .DEF_LAT(2*N_PE+1)) u_ctrl (
    .clk, .cfg_clk, .rst_n, .config_in, .config_valid, .p2ip_cfg, .frame_w, .frame_h, .gray_out,
    .s_tvalid, .s_tready, .s_tlast, .s_tuser, .m_tvalid, .m_tready, .m_tlast, .m_tuser,
    .px_en, .frame_sync
  );

  pix_t ch  [N_PE+1][4];
  pix_t aux [N_PE+1][5];

  input_register u_in (.clk, .rst_n, .px_en, .s_tdata, .ch(ch[0]));
  always_comb for (int k = 0; k < 5; k++) aux[0][k] = '0;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    processing_element #(.PE_ID(5'(p + 1)), .MB_DEPTH(MB_DEPTH)) u_pe (
      .clk, .cfg_clk, .rst_n, .px_en, .frame_sync, .frame_w, .frame_h, .p2ip_cfg,
      .ch_in(ch[p]), .aux_in(aux[p]), .ch_out(ch[p+1]), .aux_out(aux[p+1])
    );
  end

  output_register u_out (.clk, .rst_n, .px_en, .gray_out, .ch(ch[N_PE]), .m_tdata);
endmodule
