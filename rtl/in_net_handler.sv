// in_net_handler: AXI4 read master adapter of the Incoming Stream Cache.
//
// Read requests: every channel's prefetcher may request at once; a round-robin arbiter
// picks one and its request goes out on the AR channel. If the slave does not take it at
// once the choice is held, so ARVALID and the payload stay stable until ARREADY, as AXI
// requires. Read data: the handler is always ready (RREADY = 1); each beat is passed to
// all channels with a valid asserted only for the channel whose number is in the top two
// bits of RID, so responses of different channels may arrive in any order.
// Round-robin requests and routing of responses by ID follow the published design;
// holding the choice across a stalled request is this implementation's.
module in_net_handler
  import stream_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic         clk,
  input  logic         rst_n,
  // channels
  input  logic [N-1:0] ch_ar_valid,
  input  ax_t          ch_ar [N],
  output logic [N-1:0] ch_ar_ready,
  output logic [N-1:0] ch_r_valid,
  output r_t           ch_r,
  // AXI4 read master
  output logic         m_ar_valid,
  output ax_t          m_ar,
  input  logic         m_ar_ready,
  input  logic         m_r_valid,
  input  r_t           m_r,
  output logic         m_r_ready
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [CW-1:0] lsel, sel, pick;
  logic          any, fire;

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req         (ch_ar_valid),
    .advance     (fire),
    .advance_idx (sel),
    .valid       (any),
    .pick        (pick)
  );

  assign sel        = locked ? lsel : pick;
  assign m_ar_valid = locked ? 1'b1 : any;
  assign m_ar       = ch_ar[sel];
  assign fire       = m_ar_valid && m_ar_ready;

  always_comb begin
    ch_ar_ready = '0;
    ch_ar_ready[sel] = m_ar_ready && m_ar_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      lsel   <= '0;
    end else if (m_ar_valid && !m_ar_ready) begin
      locked <= 1'b1;
      lsel   <= sel;
    end else if (fire) begin
      locked <= 1'b0;
    end
  end

  assign m_r_ready = 1'b1;
  assign ch_r      = m_r;
  always_comb begin
    ch_r_valid = '0;
    for (int i = 0; i < N; i++)
      ch_r_valid[i] = m_r_valid && (int'(m_r.id[AXI_ID_W-1:IDX_W]) == i);
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   m_ar_valid && !m_ar_ready |=> m_ar_valid && $stable(m_ar))
    else $error("in_net_handler: AR changed before it was accepted");
endmodule
