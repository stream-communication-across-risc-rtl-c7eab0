// out_stream_channel: one channel of the Outgoing Stream Cache (write-through-combine).
//
// The channel holds the sliding window of one outgoing stream in a 256-line circular
// buffer. Per line it keeps four per-word Written bits and a Sent bit; per packet of four
// lines an Outstanding bit. Core stores fill words in any order inside the window; a
// packet whose sixteen words are all written is combined into one AXI burst.
//
// Two modes, chosen when the channel is configured:
//  * MODE_MEM (to a memory, AXI write master): states Allocated -> Written -> Sent
//    (Outstanding) -> Accepted (Sent). The cycle after a store completes a packet, the
//    packet index is pushed into the ready queue. The queue head is issued as a write
//    burst (AW, then four W beats); AWID = {channel, line index}, AWADDR = remoteBase +
//    16 * (line index - localBase index). The write response sets Sent on its four lines
//    and clears Outstanding.
//  * MODE_ISC (to an Incoming Stream Cache, AXI read slave): states Allocated, Requested
//    (Outstanding), Written, Ready (Written + Outstanding), Sent. A read request whose
//    address lies within the window above remoteBase marks the packet named by its ID
//    (ID[7:2]; the two channels are aligned line for line) Outstanding and saves the
//    requester's channel number. A packet enters the ready queue when it is both fully
//    written and requested, whichever happens last. The queue head is sent as a read
//    response burst with RID = {saved requester, line index}; the last beat sets Sent
//    and clears Outstanding.
// The oldest line (localBase) is recycled as soon as it is Sent: its bits are cleared
// and localBase and remoteBase advance by one line together.
//
// Core side: a store whose tag matches is granted in the same cycle (st_gnt) if its word
// is inside the window and not yet written; the word is written and marked. A store to
// an already written word, or behind the window, raises word_error; a store ahead of the
// window is held (no grant) until the window has moved far enough.
//
// Follows the published design: bit arrays, states, queue, ID and address formation,
// recycling. Own choices: holding stores ahead of the window, a queue with two push ports
// (a store and a read request can both complete a packet in one cycle), and issuing the
// whole burst once the first beat is read from the buffer.
module out_stream_channel
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
  // store requests, broadcast to all channels
  input  logic              st_req,
  input  logic [VA_W-1:0]   st_addr,
  input  logic [WORD_W-1:0] st_data,
  output logic              st_hit,
  output logic              st_gnt,
  output logic              word_error,
  // MODE_MEM: AXI4 write master
  output logic              aw_valid,
  output ax_t               aw,
  input  logic              aw_ready,
  output logic              w_valid,
  output w_t                w,
  input  logic              w_ready,
  input  logic              b_valid,     // broadcast, always accepted
  input  b_t                b,
  // MODE_ISC: AXI4 read slave
  input  logic              ar_valid,    // broadcast
  input  ax_t               ar,
  output logic              ar_hit,      // this channel owns the requested address
  input  logic              ar_fire,     // the request is taken this cycle
  output logic              r_valid,
  output r_t                r,
  input  logic              r_ready
);
  typedef enum logic {SND_IDLE, SND_DATA} send_state_e;

  localparam lpos_t WIN = lpos_t'(LINES);

  // ---- state ----
  logic [VA_W-1:SPACE_BITS]  tag;
  out_mode_e                 mode;
  lpos_t                     lbase;
  logic [ADDR_W-1:0]         remote_base;
  logic [WORDS_PER_LINE-1:0] written [LINES];
  logic [LINES-1:0]          sent;
  logic [PKTS-1:0]           outstanding;
  chan_t                     remote_id;

  // ready queue of packet indices
  pkt_t                      q_mem [PKTS];
  logic [PKT_W-1:0]          q_rd, q_wr;
  logic [PKT_W:0]            q_cnt;

  // combining checks, one cycle after the event
  logic                      st_chk_v, ar_chk_v;
  pkt_t                      st_chk_pkt, ar_chk_pkt;

  // sender
  send_state_e               sstate;
  pkt_t                      s_pkt;
  logic [BEAT_W-1:0]         beat;
  logic [LINE_W-1:0]         line_q;

  function automatic logic pkt_full(input pkt_t p);
    logic f;
    f = 1'b1;
    for (int l = 0; l < BURST_LINES; l++)
      f &= &written[int'(p) * BURST_LINES + l];
    return f;
  endfunction

  // ---- core side ----
  lpos_t st_pos, st_dist;
  idx_t  st_idx;
  logic [1:0] st_word;
  logic  st_in_win, st_behind;
  assign st_pos    = st_addr[SPACE_BITS-1:LOFF_W];
  assign st_idx    = idx_t'(st_pos);
  assign st_word   = st_addr[LOFF_W-1:WOFF_W];
  assign st_dist   = st_pos - lbase;
  assign st_in_win = st_dist < WIN;
  assign st_behind = st_dist[LPOS_W-1];
  assign st_hit    = st_req && enabled && (st_addr[VA_W-1:SPACE_BITS] == tag);
  assign st_gnt    = st_hit && st_in_win && !written[st_idx][st_word];
  assign word_error = st_hit && (st_behind || (st_in_win && written[st_idx][st_word]));

  // ---- ready queue pushes ----
  logic push_st, push_ar, pop;
  logic q_empty;
  assign q_empty = (q_cnt == '0);
  assign push_st = st_chk_v && pkt_full(st_chk_pkt) &&
                   ((mode == MODE_MEM) ? (!outstanding[st_chk_pkt] && !sent[int'(st_chk_pkt)*BURST_LINES])
                                       : outstanding[st_chk_pkt]);
  assign push_ar = ar_chk_v && (mode == MODE_ISC) && pkt_full(ar_chk_pkt) &&
                   !(push_st && st_chk_pkt == ar_chk_pkt);

  // ---- read-slave request check (MODE_ISC) ----
  logic [SPACE_BITS-1:0] ar_off;
  pkt_t ar_pkt;
  assign ar_off = ar.addr[SPACE_BITS-1:0] - remote_base[SPACE_BITS-1:0];
  assign ar_pkt = ar.id[IDX_W-1:BEAT_W];
  assign ar_hit = ar_valid && enabled && (mode == MODE_ISC) &&
                  (ar.addr[ADDR_W-1:SPACE_BITS] == remote_base[ADDR_W-1:SPACE_BITS]) &&
                  (ar_off < SPACE_BITS'(BUF_BYTES));

  // ---- sender ----
  pkt_t  head;
  idx_t  lb_idx;
  logic  aw_fire, beat_fire, last_fire, start;
  assign head   = q_mem[q_rd];
  assign lb_idx = idx_t'(lbase);

  assign aw_valid = enabled && (mode == MODE_MEM) && (sstate == SND_IDLE) && !q_empty;
  assign aw.id    = {CHAN_ID, head, BEAT_W'(0)};
  idx_t  aw_rel;   // line distance of the packet from localBase, modulo the buffer
  assign aw_rel   = {head, BEAT_W'(0)} - lb_idx;
  assign aw.addr  = wrap_add(remote_base, SPACE_BITS'(aw_rel) << LOFF_W);
  assign aw.len   = 8'(BURST_LINES - 1);
  assign aw_fire  = aw_valid && aw_ready;
  // in MODE_ISC a burst starts as soon as a packet is ready
  assign start    = (mode == MODE_MEM) ? aw_fire
                                       : (enabled && (sstate == SND_IDLE) && !q_empty);
  assign pop      = start;

  assign w_valid  = (mode == MODE_MEM) && (sstate == SND_DATA);
  assign w.data   = line_q;
  assign w.strb   = '1;
  assign w.last   = (beat == BEAT_W'(BURST_LINES - 1));

  assign r_valid  = (mode == MODE_ISC) && (sstate == SND_DATA);
  assign r.id     = {remote_id, s_pkt, beat};
  assign r.data   = line_q;
  assign r.last   = (beat == BEAT_W'(BURST_LINES - 1));

  assign beat_fire = (sstate == SND_DATA) && ((mode == MODE_MEM) ? w_ready : r_ready);
  assign last_fire = beat_fire && (beat == BEAT_W'(BURST_LINES - 1));

  // ---- write responses (MODE_MEM) ----
  logic b_hit;
  pkt_t b_pkt;
  assign b_hit = b_valid && enabled && (b.id[AXI_ID_W-1:IDX_W] == CHAN_ID);
  assign b_pkt = b.id[IDX_W-1:BEAT_W];

  // ---- recycling ----
  logic recycle;
  assign recycle = enabled && sent[lb_idx];

  // ---- buffer ----
  idx_t rd_idx;
  assign rd_idx = (sstate == SND_DATA) ? {s_pkt, beat + BEAT_W'(beat_fire)} : {head, BEAT_W'(0)};

  stream_line_ram u_buf (
    .clk     (clk),
    .wr_en   (WORDS_PER_LINE'(st_gnt) << st_word),
    .wr_addr (st_idx),
    .wr_data ({WORDS_PER_LINE{st_data}}),
    .rd_addr (rd_idx),
    .rd_data (line_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enabled     <= 1'b0;
      tag         <= '0;
      mode        <= MODE_MEM;
      lbase       <= '0;
      remote_base <= '0;
      for (int i = 0; i < LINES; i++) written[i] <= '0;
      sent        <= '0;
      outstanding <= '0;
      remote_id   <= '0;
      for (int p = 0; p < PKTS; p++) q_mem[p] <= '0;
      q_rd <= '0; q_wr <= '0; q_cnt <= '0;
      st_chk_v <= 1'b0; ar_chk_v <= 1'b0; st_chk_pkt <= '0; ar_chk_pkt <= '0;
      sstate <= SND_IDLE; s_pkt <= '0; beat <= '0;
    end else if (cfg_we) begin
      enabled     <= cfg.enable;
      tag         <= cfg.base_va[VA_W-1:SPACE_BITS];
      mode        <= cfg.mode;
      lbase       <= cfg.base_va[SPACE_BITS-1:LOFF_W];
      remote_base <= cfg.remote_base;
      for (int i = 0; i < LINES; i++) written[i] <= '0;
      sent        <= '0;
      outstanding <= '0;
      q_rd <= '0; q_wr <= '0; q_cnt <= '0;
      st_chk_v <= 1'b0; ar_chk_v <= 1'b0;
      sstate <= SND_IDLE; beat <= '0;
    end else begin
      // core stores
      st_chk_v <= st_gnt;
      if (st_gnt) begin
        written[st_idx][st_word] <= 1'b1;
        st_chk_pkt <= pkt_t'(st_idx >> BEAT_W);
      end
      // read requests from an Incoming Stream Cache
      ar_chk_v <= ar_hit && ar_fire;
      if (ar_hit && ar_fire) begin
        outstanding[ar_pkt] <= 1'b1;
        remote_id           <= ar.id[AXI_ID_W-1:IDX_W];
        ar_chk_pkt          <= ar_pkt;
      end
      // ready queue
      if (push_st && push_ar) begin
        q_mem[q_wr]          <= st_chk_pkt;
        q_mem[q_wr + 1'b1]   <= ar_chk_pkt;
      end else if (push_st) begin
        q_mem[q_wr]          <= st_chk_pkt;
      end else if (push_ar) begin
        q_mem[q_wr]          <= ar_chk_pkt;
      end
      q_wr  <= q_wr + PKT_W'(push_st) + PKT_W'(push_ar);
      q_rd  <= q_rd + PKT_W'(pop);
      q_cnt <= q_cnt + (PKT_W+1)'(push_st) + (PKT_W+1)'(push_ar) - (PKT_W+1)'(pop);
      // sender
      if (start) begin
        sstate <= SND_DATA;
        s_pkt  <= head;
        beat   <= '0;
        if (mode == MODE_MEM) outstanding[head] <= 1'b1;
      end else if (beat_fire) begin
        beat <= beat + 1'b1;
        if (last_fire) begin
          sstate <= SND_IDLE;
          if (mode == MODE_ISC) begin
            outstanding[s_pkt] <= 1'b0;
            sent[int'(s_pkt)*BURST_LINES +: BURST_LINES] <= '1;
          end
        end
      end
      // write responses
      if (b_hit) begin
        outstanding[b_pkt] <= 1'b0;
        sent[int'(b_pkt)*BURST_LINES +: BURST_LINES] <= '1;
      end
      // recycling of the oldest line
      if (recycle) begin
        sent[lb_idx]    <= 1'b0;
        written[lb_idx] <= '0;
        lbase           <= lbase + lpos_t'(1);
        remote_base     <= wrap_add(remote_base, SPACE_BITS'(LINE_BYTES));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) b_hit |-> outstanding[b_pkt])
    else $error("out_stream_channel %0d: write response with no request", CHAN_ID);
  assert property (@(posedge clk) disable iff (!rst_n) !(q_cnt == (PKT_W+1)'(PKTS) && (push_st || push_ar)))
    else $error("out_stream_channel %0d: ready queue overflow", CHAN_ID);
endmodule
