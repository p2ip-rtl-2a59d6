// p2ip_cd: P2IP Configuration Decoder, the root of the configuration tree.
//
// config_in carries one byte per configuration clock while config_valid is
// high. A transfer is two header bytes followed by the payload:
//   header 0 = {PE ID[7:3], MODULE ID[2:0]}
//   header 1 = {OPERATOR ID[7:3], REGISTER SIZE[2:0]}
// REGISTER SIZE is the number of payload bytes minus one (1 to 8 bytes). Each
// payload byte leaves on p2ip_cfg one clock after it was sampled, tagged with
// the PE, module and operator IDs and its byte index, so a byte reaches its
// operator register four clocks after it was presented (P2IP-CD, PE-CD,
// Module-CD, Reg-CD).
// Words for PE ID 0, module 0 are global parameters kept here: frame width,
// frame height, output latency of the configured pipeline (in pixel steps) and
// the output mode (bit 0: send the gray channel instead of RGB).
// The header layout follows the document; the global register numbers, the
// size-minus-one coding and the reset values are this design's choice.
module p2ip_cd
  import p2ip_pkg::*;
#(
  parameter int unsigned DEF_WIDTH  = 1920,
  parameter int unsigned DEF_HEIGHT = 1080,
  parameter int unsigned DEF_LAT    = 21
) (
  input  logic        cfg_clk,
  input  logic        rst_n,
  input  logic [7:0]  config_in,
  input  logic        config_valid,
  output cfg_word_t   p2ip_cfg,
  output coord_t      frame_w,
  output coord_t      frame_h,
  output logic [23:0] latency,
  output logic        gray_out
);
  typedef enum logic [1:0] {S_HDR0, S_HDR1, S_DATA} state_e;
  state_e     state;
  logic [4:0] pe_id, op_id;
  logic [2:0] mod_id, size, idx;

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HDR0; pe_id <= '0; mod_id <= '0; op_id <= '0; size <= '0; idx <= '0;
      p2ip_cfg <= '0;
    end else begin
      p2ip_cfg.valid <= 1'b0;
      if (config_valid) begin
        unique case (state)
          S_HDR0: begin pe_id <= config_in[7:3]; mod_id <= config_in[2:0]; state <= S_HDR1; end
          S_HDR1: begin op_id <= config_in[7:3]; size <= config_in[2:0]; idx <= '0; state <= S_DATA; end
          S_DATA: begin
            p2ip_cfg <= '{valid: 1'b1, pe_id: pe_id, mod_id: mod_id, op_id: op_id, idx: idx, data: config_in};
            idx <= idx + 3'd1;
            if (idx == size) state <= S_HDR0;
          end
          default: state <= S_HDR0;
        endcase
      end
    end
  end

  // Global registers: the P2IP-CD acts as module CD for PE 0 / module 0.
  cfg_word_t glb_cfg;
  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) glb_cfg <= '0;
    else begin
      glb_cfg       <= p2ip_cfg;
      glb_cfg.valid <= p2ip_cfg.valid && p2ip_cfg.pe_id == '0 && p2ip_cfg.mod_id == MOD_GLOBAL;
    end
  end

  logic [15:0] w_reg, h_reg;
  logic [7:0]  m_reg;
  reg_cd #(.OP_ID(OP_G_WIDTH),  .NBYTES(2), .RESET_VAL(16'(DEF_WIDTH)))  u_w   (.cfg_clk, .rst_n, .mod_cfg(glb_cfg), .value(w_reg));
  reg_cd #(.OP_ID(OP_G_HEIGHT), .NBYTES(2), .RESET_VAL(16'(DEF_HEIGHT))) u_h   (.cfg_clk, .rst_n, .mod_cfg(glb_cfg), .value(h_reg));
  reg_cd #(.OP_ID(OP_G_LAT),    .NBYTES(3), .RESET_VAL(24'(DEF_LAT)))    u_lat (.cfg_clk, .rst_n, .mod_cfg(glb_cfg), .value(latency));
  reg_cd #(.OP_ID(OP_G_OMODE),  .NBYTES(1), .RESET_VAL(8'd0))            u_om  (.cfg_clk, .rst_n, .mod_cfg(glb_cfg), .value(m_reg));

  assign frame_w  = w_reg[COORD_W-1:0];
  assign frame_h  = h_reg[COORD_W-1:0];
  assign gray_out = m_reg[0];
endmodule
