// incoming_stream_cache: the consumer half of the Streaming Cache.
//
// NUM_STREAMS incoming stream channels sit side by side like the ways of a cache. A
// stream load (address already known to lie in the stream region) is presented to all
// channels at once with its untranslated virtual address; the channel whose stream tag
// matches handles it. in_load_handler keeps the answers in request order and merges
// them into one load port; in_net_handler merges the channels' prefetch requests into
// one AXI4 read master port and routes read data back by ID. A channel is opened by a
// configuration write (cfg_we with cfg_chan) that sets its stream base address, the
// remote address to prefetch from and its enable; it starts prefetching at once.
// Load timing: grant in the request cycle, data one cycle later when the word is
// already fetched; a miss waits for the prefetched line.
// Organisation and handlers follow the published design; the configuration port is this
// implementation's.
module incoming_stream_cache
  import stream_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  chan_t             cfg_chan,
  input  chan_cfg_t         cfg,
  output logic [N-1:0]      chan_enabled,
  // load port from the load unit
  input  logic              ld_req,
  input  logic [VA_W-1:0]   ld_addr,
  output logic              ld_gnt,
  output logic              ld_rvalid,
  output logic [WORD_W-1:0] ld_rdata,
  output logic              miss_error,
  output logic              word_error,
  // AXI4 read master
  output logic              m_ar_valid,
  output ax_t               m_ar,
  input  logic              m_ar_ready,
  input  logic              m_r_valid,
  input  r_t                m_r,
  output logic              m_r_ready
);
  logic [N-1:0]      ch_hit, ch_gnt, ch_rvalid, ch_werr, resp_allow;
  logic [WORD_W-1:0] ch_rdata [N];
  logic [N-1:0]      ch_ar_valid, ch_ar_ready, ch_r_valid;
  ax_t               ch_ar [N];
  r_t                ch_r;

  for (genvar i = 0; i < N; i++) begin : g_ch
    in_stream_channel #(.CHAN_ID(chan_t'(i))) u_ch (
      .clk, .rst_n,
      .cfg_we     (cfg_we && (int'(cfg_chan) == i)),
      .cfg        (cfg),
      .enabled    (chan_enabled[i]),
      .ld_req     (ld_req),
      .ld_addr    (ld_addr),
      .ld_hit     (ch_hit[i]),
      .ld_gnt     (ch_gnt[i]),
      .resp_allow (resp_allow[i]),
      .ld_rvalid  (ch_rvalid[i]),
      .ld_rdata   (ch_rdata[i]),
      .word_error (ch_werr[i]),
      .ar_valid   (ch_ar_valid[i]),
      .ar         (ch_ar[i]),
      .ar_ready   (ch_ar_ready[i]),
      .r_valid    (ch_r_valid[i]),
      .r          (ch_r)
    );
  end

  in_load_handler #(.N(N)) u_ld (
    .clk, .rst_n,
    .ld_req, .ld_gnt, .ld_rvalid, .ld_rdata, .miss_error, .word_error,
    .ch_hit, .ch_gnt, .ch_rvalid, .ch_rdata, .ch_werr, .resp_allow
  );

  in_net_handler #(.N(N)) u_net (
    .clk, .rst_n,
    .ch_ar_valid, .ch_ar, .ch_ar_ready, .ch_r_valid, .ch_r,
    .m_ar_valid, .m_ar, .m_ar_ready, .m_r_valid, .m_r, .m_r_ready
  );
endmodule
