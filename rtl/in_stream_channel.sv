// in_stream_channel: one channel of the Incoming Stream Cache (read-invalidate policy).
//
// The channel holds the sliding window of one incoming stream in a 256-line circular
// buffer. Per line it keeps a Fetched bit and four per-word Not-Read bits; per packet of
// four lines an Outstanding bit and a 2-bit Outstanding Counter. A slot is Free (nothing
// set), Allocated (Outstanding), Fetched (Fetched + Not-Read) or Read (Fetched only).
//
// Three pointers move independently every cycle:
//  * localBase (lbase): the oldest line of the window. When its line is Fetched and every
//    word has been read, the line is recycled (Fetched cleared) and lbase moves one line.
//  * lastRequested+1 (next_req) and remoteBase (remote_next): the prefetcher. While the
//    next packet fits inside the window and is Free, it issues an AXI read burst of four
//    lines with ID {channel, line index} and address remote_next, then both advance.
//  * the core pointer (req_pos): the load being served.
// Read responses whose ID carries this channel number are written to line
// {ID[7:2], counter}; the counter counts the beats of the packet and the Outstanding bit
// is cleared on the last beat. Each arriving line is also held for one cycle so that a
// load waiting on it is answered without waiting for the memory read.
//
// Core side: a two-state controller (IDLE, ACTIVE_REQ). A load whose address tag matches
// the channel is granted in the cycle it is presented (ld_gnt) when the channel is idle
// or is answering its previous load in that same cycle. In ACTIVE_REQ the channel answers
// (ld_rvalid with the word) once the word is Fetched and Not-Read and resp_allow says it
// is this channel's turn; it then clears the Not-Read bit. A grant in cycle t gives data
// in cycle t+1 at the earliest, so loads cost two cycles alone and one back to back.
// A load to a word that was already read, or behind the window, ends with word_error
// instead of data; a load ahead of the window waits until the window reaches it.
//
// Follows the published design: the bit arrays, the states, the pointers, the ID layout
// and the forwarding of the arriving line. Own choices: configuration through cfg_we,
// waiting (not erroring) on loads ahead of the window, and ending erroneous loads so the
// core-side order queue keeps moving.
module in_stream_channel
  import stream_pkg::*;
#(
  parameter chan_t CHAN_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  chan_cfg_t         cfg,
  output logic              enabled,
  // load requests, broadcast to all channels
  input  logic              ld_req,
  input  logic [VA_W-1:0]   ld_addr,
  output logic              ld_hit,      // address tag belongs to this channel
  output logic              ld_gnt,
  input  logic              resp_allow,  // this channel heads the response order queue
  output logic              ld_rvalid,
  output logic [WORD_W-1:0] ld_rdata,
  output logic              word_error,
  // AXI4 read address (prefetch requests)
  output logic              ar_valid,
  output ax_t               ar,
  input  logic              ar_ready,
  // AXI4 read data, broadcast to all channels (always accepted)
  input  logic              r_valid,
  input  r_t                r
);
  typedef enum logic {S_IDLE, S_ACTIVE} core_state_e;

  localparam lpos_t WIN = lpos_t'(LINES);

  // ---- state ----
  logic [VA_W-1:SPACE_BITS] tag;
  lpos_t                    lbase, next_req;
  logic [ADDR_W-1:0]        remote_next;
  logic [LINES-1:0]         fetched;
  logic [WORDS_PER_LINE-1:0] notread [LINES];
  logic [PKTS-1:0]          outstanding;
  logic [BEAT_W-1:0]        ocnt [PKTS];

  core_state_e              cstate;
  lpos_t                    req_pos;
  logic [1:0]               req_word;

  logic                     fwd_v;
  idx_t                     fwd_idx;
  logic [LINE_W-1:0]        fwd_data;

  // ---- core side ----
  lpos_t  ld_pos, req_dist;
  idx_t   req_idx;
  logic   in_win, behind, word_ok, err, done_now, accept;
  logic [LINE_W-1:0] line_q, line_sel;

  assign ld_pos  = ld_addr[SPACE_BITS-1:LOFF_W];
  assign ld_hit  = ld_req && enabled && (ld_addr[VA_W-1:SPACE_BITS] == tag);
  assign req_idx = idx_t'(req_pos);
  assign req_dist    = req_pos - lbase;
  assign in_win  = req_dist < WIN;
  assign behind  = req_dist[LPOS_W-1];
  assign word_ok = in_win && fetched[req_idx] && notread[req_idx][req_word];
  assign err     = behind || (in_win && fetched[req_idx] && !notread[req_idx][req_word]);
  assign done_now   = (cstate == S_ACTIVE) && resp_allow && (word_ok || err);
  assign ld_rvalid  = (cstate == S_ACTIVE) && resp_allow && word_ok;
  assign word_error = (cstate == S_ACTIVE) && resp_allow && err;
  assign accept     = ld_hit && ((cstate == S_IDLE) || done_now);
  assign ld_gnt     = accept;

  assign line_sel = (fwd_v && fwd_idx == req_idx) ? fwd_data : line_q;
  assign ld_rdata = line_sel[req_word*WORD_W +: WORD_W];

  // ---- prefetcher ----
  pkt_t  pf_pkt;
  lpos_t pf_dist;
  logic  pf_free;
  assign pf_pkt   = pkt_t'(next_req >> BEAT_W);
  assign pf_dist  = next_req - lbase;
  assign pf_free  = !outstanding[pf_pkt] && (fetched[pf_pkt*BURST_LINES +: BURST_LINES] == '0);
  assign ar_valid = enabled && (pf_dist <= WIN - lpos_t'(BURST_LINES)) && pf_free;
  assign ar.id    = {CHAN_ID, idx_t'(next_req)};
  assign ar.addr  = remote_next;
  assign ar.len   = 8'(BURST_LINES - 1);

  // ---- network responses ----
  logic  r_hit;
  pkt_t  r_pkt;
  idx_t  r_idx;
  assign r_hit = r_valid && enabled && (r.id[AXI_ID_W-1:IDX_W] == CHAN_ID);
  assign r_pkt = r.id[IDX_W-1:BEAT_W];
  assign r_idx = {r_pkt, ocnt[r_pkt]};

  // ---- recycling ----
  idx_t lb_idx;
  logic recycle;
  assign lb_idx  = idx_t'(lbase);
  assign recycle = enabled && fetched[lb_idx] && (notread[lb_idx] == '0);

  // ---- buffer ----
  stream_line_ram u_buf (
    .clk     (clk),
    .wr_en   ({WORDS_PER_LINE{r_hit}}),
    .wr_addr (r_idx),
    .wr_data (r.data),
    .rd_addr (accept ? idx_t'(ld_pos) : req_idx),
    .rd_data (line_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enabled     <= 1'b0;
      tag         <= '0;
      lbase       <= '0;
      next_req    <= '0;
      remote_next <= '0;
      fetched     <= '0;
      outstanding <= '0;
      for (int i = 0; i < LINES; i++) notread[i] <= '0;
      for (int p = 0; p < PKTS; p++)  ocnt[p] <= '0;
      cstate      <= S_IDLE;
      req_pos     <= '0;
      req_word    <= '0;
      fwd_v       <= 1'b0;
      fwd_idx     <= '0;
      fwd_data    <= '0;
    end else if (cfg_we) begin
      enabled     <= cfg.enable;
      tag         <= cfg.base_va[VA_W-1:SPACE_BITS];
      lbase       <= cfg.base_va[SPACE_BITS-1:LOFF_W];
      next_req    <= cfg.base_va[SPACE_BITS-1:LOFF_W];
      remote_next <= cfg.remote_base;
      fetched     <= '0;
      outstanding <= '0;
      for (int i = 0; i < LINES; i++) notread[i] <= '0;
      for (int p = 0; p < PKTS; p++)  ocnt[p] <= '0;
      cstate      <= S_IDLE;
      fwd_v       <= 1'b0;
    end else begin
      // core requests
      if (ld_rvalid) notread[req_idx][req_word] <= 1'b0;
      if (accept) begin
        cstate   <= S_ACTIVE;
        req_pos  <= ld_pos;
        req_word <= ld_addr[LOFF_W-1:WOFF_W];
      end else if (done_now) begin
        cstate   <= S_IDLE;
      end
      // recycling of the oldest line
      if (recycle) begin
        fetched[lb_idx] <= 1'b0;
        lbase           <= lbase + lpos_t'(1);
      end
      // prefetch requests
      if (ar_valid && ar_ready) begin
        outstanding[pf_pkt] <= 1'b1;
        ocnt[pf_pkt]        <= '0;
        next_req            <= next_req + lpos_t'(BURST_LINES);
        remote_next         <= wrap_add(remote_next, SPACE_BITS'(BURST_LINES * LINE_BYTES));
      end
      // network responses
      fwd_v <= r_hit;
      if (r_hit) begin
        fetched[r_idx] <= 1'b1;
        notread[r_idx] <= '1;
        ocnt[r_pkt]    <= ocnt[r_pkt] + 1'b1;
        if (r.last) outstanding[r_pkt] <= 1'b0;
        fwd_idx  <= r_idx;
        fwd_data <= r.data;
      end
    end
  end

  // A response must belong to a packet that was requested.
  assert property (@(posedge clk) disable iff (!rst_n) r_hit |-> outstanding[r_pkt])
    else $error("in_stream_channel %0d: response for a packet with no request", CHAN_ID);
endmodule
