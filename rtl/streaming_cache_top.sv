// streaming_cache_top: the Streaming Caches next to a RISC-V core's load/store unit.
//
// Loads and stores whose virtual address lies in the stream region bypass address
// translation and the main data cache: stream loads go from the load unit to the
// Incoming Stream Cache, stream stores go through the store unit and the store buffer
// (which keeps their virtual address) to the Outgoing Stream Cache. Every other access
// is steered to the main data cache, whose load and store ports, like the translation
// ports, are brought out because that cache and the MMU belong to the core. On the
// network side the Incoming Stream Cache is an AXI4 read master (prefetching from a
// memory or from a remote Outgoing Stream Cache) and the Outgoing Stream Cache is both
// an AXI4 write master (to a memory) and an AXI4 read slave (answering a remote Incoming
// Stream Cache). Connecting this node's read master to its own read slave gives a local
// loopback stream. Channels are opened through the two configuration ports.
// A stream access that no channel owns (miss) or that hits a word already read or
// written, or behind the window (word error), is reported on the four error outputs; the
// load then returns res_error instead of data and the store is dropped with sb_error.
// Timing: stream loads and stores complete in two cycles alone and one cycle each back
// to back when the data are present (loads) or the window has room (stores).
// The partition and the interfaces follow the published design; the configuration
// ports and the reduced core-side signal set are this implementation's.
module streaming_cache_top
  import stream_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // channel configuration
  input  logic              in_cfg_we,
  input  logic              out_cfg_we,
  input  chan_t             cfg_chan,
  input  chan_cfg_t         cfg,
  output logic [NUM_STREAMS-1:0] in_chan_enabled,
  output logic [NUM_STREAMS-1:0] out_chan_enabled,
  // load queue and results
  input  logic              ld_valid,
  input  logic [VA_W-1:0]   ld_vaddr,
  output logic              ld_pop,
  output logic              res_valid,
  output logic [WORD_W-1:0] res_data,
  output logic              res_error,
  // store queue and commit
  input  logic              st_valid,
  input  logic [VA_W-1:0]   st_vaddr,
  input  logic [WORD_W-1:0] st_data,
  input  logic              st_amo,
  output logic              st_pop,
  input  logic              commit,
  output logic              commit_ready,
  input  logic              flush,
  output logic              sb_empty,
  output logic              sb_error,
  // translation (core MMU)
  output logic              ld_mmu_req,
  output logic [VA_W-1:0]   ld_mmu_vaddr,
  input  logic              ld_mmu_hit,
  input  logic [ADDR_W-1:0] ld_mmu_paddr,
  output logic              st_mmu_req,
  output logic [VA_W-1:0]   st_mmu_vaddr,
  input  logic              st_mmu_hit,
  input  logic [ADDR_W-1:0] st_mmu_paddr,
  // main data cache load port
  output logic              dcl_req,
  output logic [VA_W-1:0]   dcl_addr,
  input  logic              dcl_gnt,
  output logic              dcl_tag_valid,
  output logic [ADDR_W-1:0] dcl_tag,
  input  logic              dcl_rvalid,
  input  logic [WORD_W-1:0] dcl_rdata,
  // main data cache store port
  output logic              dcs_req,
  output logic [ADDR_W-1:0] dcs_addr,
  output logic [WORD_W-1:0] dcs_data,
  input  logic              dcs_gnt,
  // errors (also returned as res_error / sb_error so the units never block)
  output logic              in_miss_error,
  output logic              in_word_error,
  output logic              out_miss_error,
  output logic              out_word_error,
  // Incoming Stream Cache: AXI4 read master
  output logic              in_ar_valid,
  output ax_t               in_ar,
  input  logic              in_ar_ready,
  input  logic              in_r_valid,
  input  r_t                in_r,
  output logic              in_r_ready,
  // Outgoing Stream Cache: AXI4 write master
  output logic              out_aw_valid,
  output ax_t               out_aw,
  input  logic              out_aw_ready,
  output logic              out_w_valid,
  output w_t                out_w,
  input  logic              out_w_ready,
  input  logic              out_b_valid,
  input  b_t                out_b,
  output logic              out_b_ready,
  // Outgoing Stream Cache: AXI4 read slave
  input  logic              out_ar_valid,
  input  ax_t               out_ar,
  output logic              out_ar_ready,
  output logic              out_r_valid,
  output r_t                out_r,
  input  logic              out_r_ready
);
  // load unit <-> incoming stream cache
  logic              isc_req, isc_gnt, isc_rvalid, isc_tag_valid, ld_is_stream;
  logic [VA_W-1:0]   isc_addr;
  logic [WORD_W-1:0] isc_rdata;
  // store unit <-> store buffer <-> outgoing stream cache
  logic              sb_ready, sb_valid;
  st_entry_t         sb_entry;
  logic              osc_req, osc_gnt;
  logic [VA_W-1:0]   osc_addr;
  logic [WORD_W-1:0] osc_data;

  stream_load_unit u_load_unit (
    .clk, .rst_n,
    .ld_valid, .ld_vaddr, .ld_pop,
    .mmu_req   (ld_mmu_req),  .mmu_vaddr (ld_mmu_vaddr),
    .mmu_hit   (ld_mmu_hit),  .mmu_paddr (ld_mmu_paddr),
    .dc_req    (dcl_req),     .dc_addr   (dcl_addr),  .dc_gnt (dcl_gnt),
    .dc_tag_valid (dcl_tag_valid), .dc_tag (dcl_tag),
    .dc_rvalid (dcl_rvalid),  .dc_rdata  (dcl_rdata),
    .sc_req    (isc_req),     .sc_addr   (isc_addr),  .sc_gnt (isc_gnt),
    .sc_tag_valid (isc_tag_valid),
    .sc_rvalid (isc_rvalid),  .sc_rdata  (isc_rdata),
    .sc_miss   (in_miss_error), .sc_werr (in_word_error),
    .res_valid, .res_data, .res_error,
    .is_stream (ld_is_stream)
  );

  incoming_stream_cache u_isc (
    .clk, .rst_n,
    .cfg_we       (in_cfg_we),
    .cfg_chan, .cfg,
    .chan_enabled (in_chan_enabled),
    .ld_req       (isc_req),
    .ld_addr      (isc_addr),
    .ld_gnt       (isc_gnt),
    .ld_rvalid    (isc_rvalid),
    .ld_rdata     (isc_rdata),
    .miss_error   (in_miss_error),
    .word_error   (in_word_error),
    .m_ar_valid   (in_ar_valid), .m_ar (in_ar), .m_ar_ready (in_ar_ready),
    .m_r_valid    (in_r_valid),  .m_r  (in_r),  .m_r_ready  (in_r_ready)
  );

  stream_store_unit u_store_unit (
    .clk, .rst_n,
    .st_valid, .st_vaddr, .st_data, .st_amo, .st_pop,
    .mmu_req   (st_mmu_req), .mmu_vaddr (st_mmu_vaddr),
    .mmu_hit   (st_mmu_hit), .mmu_paddr (st_mmu_paddr),
    .sb_ready, .sb_valid, .sb_entry
  );

  stream_store_buffer u_store_buffer (
    .clk, .rst_n, .flush,
    .push_valid (sb_valid), .push_entry (sb_entry), .ready (sb_ready),
    .commit, .commit_ready,
    .dc_req  (dcs_req),  .dc_addr (dcs_addr), .dc_data (dcs_data), .dc_gnt (dcs_gnt),
    .sc_req  (osc_req),  .sc_addr (osc_addr), .sc_data (osc_data), .sc_gnt (osc_gnt),
    .sc_err  (out_miss_error || out_word_error), .st_error (sb_error),
    .empty   (sb_empty)
  );

  outgoing_stream_cache u_osc (
    .clk, .rst_n,
    .cfg_we       (out_cfg_we),
    .cfg_chan, .cfg,
    .chan_enabled (out_chan_enabled),
    .st_req       (osc_req),
    .st_addr      (osc_addr),
    .st_data      (osc_data),
    .st_gnt       (osc_gnt),
    .miss_error   (out_miss_error),
    .word_error   (out_word_error),
    .m_aw_valid   (out_aw_valid), .m_aw (out_aw), .m_aw_ready (out_aw_ready),
    .m_w_valid    (out_w_valid),  .m_w  (out_w),  .m_w_ready  (out_w_ready),
    .m_b_valid    (out_b_valid),  .m_b  (out_b),  .m_b_ready  (out_b_ready),
    .s_ar_valid   (out_ar_valid), .s_ar (out_ar), .s_ar_ready (out_ar_ready),
    .s_r_valid    (out_r_valid),  .s_r  (out_r),  .s_r_ready  (out_r_ready)
  );
endmodule
