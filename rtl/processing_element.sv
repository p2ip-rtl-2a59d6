// processing_element: one Processing Element (PE) of the pipeline. All PEs are
// identical; what each does is set by its configuration registers.
//
// A PE is its PE-CD (configuration decoder for PE number PE_ID), the
// Reconfigurable Interconnection, the Memory Controller with four Memory
// Blocks, the Spatial Processor fed by the memory controller's window, and
// the Pixel Processor. Pixel data enter as four colour channels plus five
// auxiliary channels and leave the same way; everything advances on px_en
// steps. frame_sync (between frames) restarts the position counters of the
// NE and the mirror. Configuration arrives on p2ip_cfg in the configuration
// clock domain. An unconfigured PE passes every channel with 2 steps of
// latency.
module processing_element
  import p2ip_pkg::*;
#(
  parameter logic [4:0]  PE_ID    = 5'd1,
  parameter int unsigned MB_DEPTH = 4096
) (
  input  logic      clk,
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  logic      px_en,
  input  logic      frame_sync,
  input  coord_t    frame_w,
  input  coord_t    frame_h,
  input  cfg_word_t p2ip_cfg,
  input  pix_t      ch_in   [4],
  input  pix_t      aux_in  [5],
  output pix_t      ch_out  [4],
  output pix_t      aux_out [5]
);
  cfg_word_t pe_cfg;
  pe_cd #(.PE_ID(PE_ID)) u_pecd (.cfg_clk, .rst_n, .p2ip_cfg, .pe_cfg);

  pix_t iPP_a, iPP_b, iPP_c, iMC_a, iRec, iMC_b, iSP;
  pix_t oPP_a, oPP_b, oMC, oSP_a, oSP_b;
  window_t oWindow;

  reconfig_interconnect u_ri (
    .clk, .cfg_clk, .rst_n, .px_en, .pe_cfg, .ch_in, .aux_in, .ch_out, .aux_out,
    .iPP_a, .iPP_b, .iPP_c, .iMC_a, .iRec, .iMC_b, .iSP,
    .oPP_a, .oPP_b, .oMC, .oSP_a, .oSP_b
  );

  memory_controller #(.MB_DEPTH(MB_DEPTH)) u_mc (
    .clk, .cfg_clk, .rst_n, .px_en, .frame_sync, .frame_w, .frame_h, .pe_cfg,
    .iMC_a, .iRec, .iMC_b, .oMC, .oWindow
  );

  spatial_processor u_sp (.clk, .cfg_clk, .rst_n, .px_en, .pe_cfg, .oWindow, .iSP, .oSP_a, .oSP_b);

  pixel_processor u_pp (.clk, .cfg_clk, .rst_n, .px_en, .pe_cfg, .iPP_a, .iPP_b, .iPP_c, .oPP_a, .oPP_b);
endmodule
