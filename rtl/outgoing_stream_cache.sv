// outgoing_stream_cache: the producer half of the Streaming Cache.
//
// NUM_STREAMS outgoing stream channels sit side by side. A committed stream store is
// presented to all channels with its untranslated virtual address and 32-bit word; the
// channel whose tag matches writes the word and grants the store in the same cycle.
// Each channel is configured either to push combined 64-Byte packets to a memory
// (out_mem_handler, AXI4 write master) or to answer the prefetcher of an Incoming
// Stream Cache (out_isc_handler, AXI4 read slave). out_store_handler merges the
// channels' answers into one store port. A channel is opened by a configuration write
// (cfg_we with cfg_chan) giving its stream base address, remote base address and mode.
// Organisation, modes and handlers follow the published design; the configuration port
// is this implementation's.
module outgoing_stream_cache
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
  // store port from the store buffer
  input  logic              st_req,
  input  logic [VA_W-1:0]   st_addr,
  input  logic [WORD_W-1:0] st_data,
  output logic              st_gnt,
  output logic              miss_error,
  output logic              word_error,
  // AXI4 write master (to memory)
  output logic              m_aw_valid,
  output ax_t               m_aw,
  input  logic              m_aw_ready,
  output logic              m_w_valid,
  output w_t                m_w,
  input  logic              m_w_ready,
  input  logic              m_b_valid,
  input  b_t                m_b,
  output logic              m_b_ready,
  // AXI4 read slave (from an Incoming Stream Cache)
  input  logic              s_ar_valid,
  input  ax_t               s_ar,
  output logic              s_ar_ready,
  output logic              s_r_valid,
  output r_t                s_r,
  input  logic              s_r_ready
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] ch_hit, ch_gnt, ch_werr;
  logic [N-1:0] ch_aw_valid, ch_aw_ready, ch_w_valid, ch_w_ready, ch_b_valid;
  ax_t          ch_aw [N];
  w_t           ch_w [N];
  b_t           ch_b;
  logic         ch_ar_valid, ch_ar_fire;
  ax_t          ch_ar;
  logic [N-1:0] ch_ar_hit, ch_r_valid, ch_r_ready;
  r_t           ch_r [N];
  logic [CW-1:0] hit_chan;

  for (genvar i = 0; i < N; i++) begin : g_ch
    out_stream_channel #(.CHAN_ID(chan_t'(i))) u_ch (
      .clk, .rst_n,
      .cfg_we     (cfg_we && (int'(cfg_chan) == i)),
      .cfg        (cfg),
      .enabled    (chan_enabled[i]),
      .st_req     (st_req),
      .st_addr    (st_addr),
      .st_data    (st_data),
      .st_hit     (ch_hit[i]),
      .st_gnt     (ch_gnt[i]),
      .word_error (ch_werr[i]),
      .aw_valid   (ch_aw_valid[i]),
      .aw         (ch_aw[i]),
      .aw_ready   (ch_aw_ready[i]),
      .w_valid    (ch_w_valid[i]),
      .w          (ch_w[i]),
      .w_ready    (ch_w_ready[i]),
      .b_valid    (ch_b_valid[i]),
      .b          (ch_b),
      .ar_valid   (ch_ar_valid),
      .ar         (ch_ar),
      .ar_hit     (ch_ar_hit[i]),
      .ar_fire    (ch_ar_fire),
      .r_valid    (ch_r_valid[i]),
      .r          (ch_r[i]),
      .r_ready    (ch_r_ready[i])
    );
  end

  out_store_handler #(.N(N)) u_st (
    .clk, .rst_n,
    .st_req, .st_gnt, .miss_error, .word_error, .hit_chan,
    .ch_hit, .ch_gnt, .ch_werr
  );

  out_mem_handler #(.N(N)) u_mem (
    .clk, .rst_n,
    .ch_aw_valid, .ch_aw, .ch_aw_ready, .ch_w_valid, .ch_w, .ch_w_ready, .ch_b_valid, .ch_b,
    .m_aw_valid, .m_aw, .m_aw_ready, .m_w_valid, .m_w, .m_w_ready, .m_b_valid, .m_b, .m_b_ready
  );

  out_isc_handler #(.N(N)) u_isc (
    .clk, .rst_n,
    .ch_ar_valid, .ch_ar, .ch_ar_hit, .ch_ar_fire, .ch_r_valid, .ch_r, .ch_r_ready,
    .s_ar_valid, .s_ar, .s_ar_ready, .s_r_valid, .s_r, .s_r_ready
  );
endmodule
