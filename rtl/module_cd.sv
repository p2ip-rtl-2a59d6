// module_cd: Module Configuration Decoder, third stage of the configuration
// tree.
//
// Passes on, one configuration clock later, the configuration words addressed
// to its processing module (mod_id == MOD_ID) and blocks all others, so the
// Reg-CDs of the module only see their own module's traffic.
module module_cd
  import p2ip_pkg::*;
#(
  parameter logic [2:0] MOD_ID = 3'd1
) (
  input  logic      cfg_clk,
  input  logic      rst_n,
  input  cfg_word_t pe_cfg,
  output cfg_word_t mod_cfg
);
  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) mod_cfg <= '0;
    else begin
      mod_cfg       <= pe_cfg;
      mod_cfg.valid <= pe_cfg.valid && pe_cfg.mod_id == MOD_ID;
    end
  end
endmodule
