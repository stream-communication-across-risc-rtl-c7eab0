// out_mem_handler: AXI4 write master adapter of the Outgoing Stream Cache.
//
// Channels in memory mode offer a combined packet as a write burst (AW, then four W
// beats). A round-robin arbiter picks one channel; the handler holds that choice through
// the AW handshake and all W beats up to WLAST, so beats of different packets never mix,
// then moves on to the next requesting channel. Write responses are always accepted
// (BREADY = 1) and passed to all channels, valid only for the channel named by the top
// two bits of BID. Round-robin choice and routing by ID follow the published design;
// serialising address and data of one burst is this implementation's simplification.
module out_mem_handler
  import stream_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic         clk,
  input  logic         rst_n,
  // channels
  input  logic [N-1:0] ch_aw_valid,
  input  ax_t          ch_aw [N],
  output logic [N-1:0] ch_aw_ready,
  input  logic [N-1:0] ch_w_valid,
  input  w_t           ch_w [N],
  output logic [N-1:0] ch_w_ready,
  output logic [N-1:0] ch_b_valid,
  output b_t           ch_b,
  // AXI4 write master
  output logic         m_aw_valid,
  output ax_t          m_aw,
  input  logic         m_aw_ready,
  output logic         m_w_valid,
  output w_t           m_w,
  input  logic         m_w_ready,
  input  logic         m_b_valid,
  input  b_t           m_b,
  output logic         m_b_ready
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;
  typedef enum logic [1:0] {P_IDLE, P_AW, P_W} phase_e;

  phase_e        phase;
  logic [CW-1:0] sel, pick;
  logic          any, done;

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req         (ch_aw_valid),
    .advance     (done),
    .advance_idx (sel),
    .valid       (any),
    .pick        (pick)
  );

  assign m_aw_valid = (phase == P_AW) && ch_aw_valid[sel];
  assign m_aw       = ch_aw[sel];
  assign m_w_valid  = (phase == P_W) && ch_w_valid[sel];
  assign m_w        = ch_w[sel];
  assign done       = m_w_valid && m_w_ready && m_w.last;

  always_comb begin
    ch_aw_ready = '0;
    ch_w_ready  = '0;
    ch_aw_ready[sel] = (phase == P_AW) && m_aw_ready;
    ch_w_ready[sel]  = (phase == P_W) && m_w_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      sel   <= '0;
    end else begin
      unique case (phase)
        P_IDLE: if (any) begin
          sel   <= pick;
          phase <= P_AW;
        end
        P_AW:   if (m_aw_valid && m_aw_ready) phase <= P_W;
        P_W:    if (done) phase <= P_IDLE;
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign m_b_ready = 1'b1;
  assign ch_b      = m_b;
  always_comb begin
    ch_b_valid = '0;
    for (int i = 0; i < N; i++)
      ch_b_valid[i] = m_b_valid && (int'(m_b.id[AXI_ID_W-1:IDX_W]) == i);
  end
endmodule
