// out_isc_handler: AXI4 read slave adapter of the Outgoing Stream Cache.
//
// Read requests from a remote Incoming Stream Cache are passed to all channels in
// incoming-cache mode; the channel whose window contains the address claims it
// (ch_ar_hit). ARREADY is given only when some channel claims the request, so a request
// for a stream that is not yet open waits. Read responses: channels with a ready packet
// offer a four-beat burst; a round-robin arbiter picks one and the handler stays with it
// until RLAST is accepted, then moves to the next. Broadcast of requests and round-robin
// choice of responses follow the published design; stalling unclaimed requests is this
// implementation's choice.
module out_isc_handler
  import stream_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic         clk,
  input  logic         rst_n,
  // channels
  output logic         ch_ar_valid,
  output ax_t          ch_ar,
  input  logic [N-1:0] ch_ar_hit,
  output logic         ch_ar_fire,
  input  logic [N-1:0] ch_r_valid,
  input  r_t           ch_r [N],
  output logic [N-1:0] ch_r_ready,
  // AXI4 read slave
  input  logic         s_ar_valid,
  input  ax_t          s_ar,
  output logic         s_ar_ready,
  output logic         s_r_valid,
  output r_t           s_r,
  input  logic         s_r_ready
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  assign ch_ar_valid = s_ar_valid;
  assign ch_ar       = s_ar;
  assign s_ar_ready  = |ch_ar_hit;
  assign ch_ar_fire  = s_ar_valid && s_ar_ready;

  logic          locked, any, done;
  logic [CW-1:0] lsel, sel, pick;

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req         (ch_r_valid),
    .advance     (done),
    .advance_idx (sel),
    .valid       (any),
    .pick        (pick)
  );

  assign sel       = locked ? lsel : pick;
  assign s_r_valid = ch_r_valid[sel] && (locked || any);
  assign s_r       = ch_r[sel];
  assign done      = s_r_valid && s_r_ready && s_r.last;

  always_comb begin
    ch_r_ready = '0;
    ch_r_ready[sel] = s_r_ready && (locked || any);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      lsel   <= '0;
    end else if (done) begin
      locked <= 1'b0;
    end else if (s_r_valid) begin
      locked <= 1'b1;
      lsel   <= sel;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch_ar_hit))
    else $error("out_isc_handler: two channels claim one read request");
endmodule
