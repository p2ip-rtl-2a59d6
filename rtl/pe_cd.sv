// pe_cd: PE Configuration Decoder, second stage of the configuration tree.
//
// Every PE receives the broadcast p2ip_cfg bus from the P2IP-CD. The PE-CD
// registers the words whose PE ID equals this PE's number and hands them to
// the four Module-CDs of the PE on pe_cfg one configuration clock later.
module pe_cd
  import p2ip_pkg::*;
#(
  parameter logic [4:0] PE_ID = 5'd1
) (
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  cfg_word_t p2ip_cfg,
  output cfg_word_t pe_cfg
);
  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) pe_cfg <= '0;
    else begin
      pe_cfg       <= p2ip_cfg;
      pe_cfg.valid <= p2ip_cfg.valid && p2ip_cfg.pe_id == PE_ID;
    end
  end
endmodule
