// p2ip_controller: the P2IP Controller. Runs the AXI4-Stream handshakes,
// steps the pixel pipeline and holds the root of the configuration tree.
//
// The whole datapath advances only on px_en ("pixel steps"), so the pipeline
// holds its state when the source pauses or the sink applies back-pressure.
// Framing: after frame_sync the controller waits for a pixel with s_tuser
// (start of frame) and drops anything before it. It then accepts
// frame_w x frame_h pixels, one step each, and afterwards makes `latency`
// more steps without input (flush) so the last pixels reach the output.
// Step k of a frame delivers output pixel k - latency, so m_tvalid is raised
// for steps latency .. latency + W*H - 1; m_tuser marks output pixel 0 and
// m_tlast the last pixel of each line. Then frame_sync restarts the position
// counters of the PEs and the next frame is accepted. s_tlast is not needed
// for framing. A frame thus occupies W*H + latency + 1 cycles when neither
// side stalls.
// `latency` is a global configuration register: the user sets it to the
// step count of the configured datapath (2*PEs + 1 when nothing is
// configured).
// The AXI4-Stream ports, px_en and the configuration input follow the
// document; framing, flush and the latency register are this design's.
module p2ip_controller
  import p2ip_pkg::*;
#(
  parameter int unsigned DEF_WIDTH  = 1920,
  parameter int unsigned DEF_HEIGHT = 1080,
  parameter int unsigned DEF_LAT    = 21
) (
  input  logic        clk,
  input  logic        cfg_clk,
  input  logic        rst_n,
  // configuration input
  input  logic [7:0]  config_in,
  input  logic        config_valid,
  output cfg_word_t   p2ip_cfg,
  output coord_t      frame_w,
  output coord_t      frame_h,
  output logic        gray_out,
  // AXI4-Stream slave side (data goes to the input register)
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  input  logic        s_tuser,
  // AXI4-Stream master side (data comes from the output register)
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  output logic        m_tuser,
  // pipeline control
  output logic        px_en,
  output logic        frame_sync
);
  logic [23:0] latency;
  p2ip_cd #(.DEF_WIDTH(DEF_WIDTH), .DEF_HEIGHT(DEF_HEIGHT), .DEF_LAT(DEF_LAT)) u_cd (
    .cfg_clk, .rst_n, .config_in, .config_valid, .p2ip_cfg, .frame_w, .frame_h, .latency, .gray_out
  );

  typedef enum logic [1:0] {S_SYNC, S_SOF, S_RUN, S_FLUSH} state_e;
  state_e state;

  logic [23:0] total, in_cnt, out_cnt;
  logic [24:0] step_cnt;
  coord_t      ox;
  logic        out_ok, out_now;

  assign total  = 24'(frame_w) * 24'(frame_h);
  assign out_ok = !m_tvalid || m_tready;

  always_comb begin
    s_tready   = 1'b0;
    px_en      = 1'b0;
    frame_sync = (state == S_SYNC);
    unique case (state)
      S_SOF:   begin s_tready = out_ok; px_en = s_tvalid && out_ok && s_tuser; end
      S_RUN:   begin s_tready = out_ok; px_en = s_tvalid && out_ok; end
      S_FLUSH: px_en = out_ok;
      default: ;
    endcase
  end
  assign out_now = px_en && step_cnt >= 25'(latency) && out_cnt < total;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SYNC; in_cnt <= '0; out_cnt <= '0; step_cnt <= '0; ox <= '0;
      m_tvalid <= 1'b0; m_tlast <= 1'b0; m_tuser <= 1'b0;
    end else begin
      if (px_en) begin
        step_cnt <= step_cnt + 1'b1;
        m_tvalid <= out_now;
        m_tuser  <= out_now && out_cnt == '0;
        m_tlast  <= out_now && ox == frame_w - 1'b1;
        if (out_now) begin
          out_cnt <= out_cnt + 1'b1;
          ox      <= (ox == frame_w - 1'b1) ? '0 : ox + 1'b1;
        end
      end else if (m_tready) begin
        m_tvalid <= 1'b0;
      end
      unique case (state)
        S_SYNC: begin
          in_cnt <= '0; out_cnt <= '0; step_cnt <= '0; ox <= '0;
          state  <= S_SOF;
        end
        S_SOF, S_RUN: if (px_en) begin
          in_cnt <= in_cnt + 1'b1;
          state  <= (in_cnt + 1'b1 == total) ? S_FLUSH : S_RUN;
        end
        S_FLUSH: if (px_en && (out_cnt + 24'(out_now)) == total) state <= S_SYNC;
        default: state <= S_SYNC;
      endcase
    end
  end

  // The sink must see a stable beat while it is not ready.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (m_tvalid && !m_tready) |=> m_tvalid;
  endproperty
  assert property (p_hold);
  // The pipeline never steps while the output holds an unaccepted beat.
  assert property (@(posedge clk) disable iff (!rst_n) (m_tvalid && !m_tready) |-> !px_en);
endmodule
