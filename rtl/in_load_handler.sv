// in_load_handler: core-side handler of the Incoming Stream Cache.
//
// The load request is broadcast to all channels; exactly one channel can match its tag.
// The handler combines the channels' answers into the single load port of the core:
// ld_gnt is the grant of the matching channel, miss_error flags a stream load that no
// active channel owns. Because every channel may hold one granted load, up to
// NUM_STREAMS loads can be in flight and their data may become ready in any order. The
// handler therefore keeps an order queue of the granted channels' numbers (as deep as
// there are channels): only the channel at the head may answer (resp_allow), and its
// answer (data or word_error) pops the queue. A grant in the same cycle as an answer
// pushes behind it, so back-to-back loads to one channel keep one load per cycle.
// The order queue, its depth and its push/pop rule follow the published design; the
// error outputs are combined here by this implementation's choice.
module in_load_handler
  import stream_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_req,
  output logic              ld_gnt,
  output logic              ld_rvalid,
  output logic [WORD_W-1:0] ld_rdata,
  output logic              miss_error,
  output logic              word_error,
  // per channel
  input  logic [N-1:0]      ch_hit,
  input  logic [N-1:0]      ch_gnt,
  input  logic [N-1:0]      ch_rvalid,
  input  logic [WORD_W-1:0] ch_rdata [N],
  input  logic [N-1:0]      ch_werr,
  output logic [N-1:0]      resp_allow
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;
  typedef logic [CW-1:0] cid_t;

  cid_t           q [N];
  logic [CW-1:0]  q_rd, q_wr;
  logic [CW:0]    q_cnt;
  cid_t           gnt_id, head;
  logic           push, pop;

  always_comb begin
    gnt_id = '0;
    for (int i = 0; i < N; i++) if (ch_gnt[i]) gnt_id = cid_t'(i);
  end

  assign head = q[q_rd];
  assign push = |ch_gnt;
  assign pop  = (q_cnt != '0) && (ch_rvalid[head] || ch_werr[head]);

  always_comb begin
    resp_allow = '0;
    if (q_cnt != '0) resp_allow[head] = 1'b1;
  end

  assign ld_gnt     = |ch_gnt;
  assign ld_rvalid  = pop && ch_rvalid[head];
  assign ld_rdata   = ch_rdata[head];
  assign word_error = pop && ch_werr[head];
  assign miss_error = ld_req && !(|ch_hit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
      q_rd  <= '0;
      q_wr  <= '0;
      q_cnt <= '0;
    end else begin
      if (push) begin
        q[q_wr] <= gnt_id;
        q_wr    <= (int'(q_wr) == N - 1) ? '0 : q_wr + 1'b1;
      end
      if (pop) q_rd <= (int'(q_rd) == N - 1) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + (CW+1)'(push) - (CW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch_gnt))
    else $error("in_load_handler: more than one channel granted a load");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && q_cnt == (CW+1)'(N)))
    else $error("in_load_handler: order queue overflow");
endmodule
