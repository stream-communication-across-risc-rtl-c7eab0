// stream_pkg: sizes, address layout and bus types shared by the Streaming Caches.
//
// A stream is addressed through a dedicated virtual-address region. Every stream owns a
// 4 GByte slice of that region: the upper 32 bits of a stream address (the stream tag)
// name the stream, the lower 32 bits are the offset inside it and wrap around. A stream
// channel keeps the live part of its stream (the sliding window) in a 4 KByte circular
// buffer of 256 lines, each line four 32-bit words, i.e. one 128-bit network beat.
// Network packets are AXI4 bursts of four lines (64 Bytes). An AXI ID is the 2-bit
// channel number above the 8-bit line index of the first line of the packet.
//
// The counts (four channels per cache, 32-bit words, four-word lines, 4 KByte buffers,
// 64-Byte packets, 4 GByte per stream, 128-bit AXI data, 2+8-bit IDs) follow the
// published design. The position of the stream region in the address space and the
// AXI subset carried here (no size/burst/cache/prot fields, always INCR bursts of full
// 128-bit beats, OKAY responses only) are choices of this implementation.
package stream_pkg;

  // ---- stream channel geometry ----
  parameter int unsigned NUM_STREAMS    = 4;     // channels per Streaming Cache
  parameter int unsigned CHAN_ID_W      = $clog2(NUM_STREAMS);
  parameter int unsigned WORD_W         = 32;    // word loaded/stored by the core
  parameter int unsigned WORDS_PER_LINE = 4;
  parameter int unsigned LINE_W         = WORD_W * WORDS_PER_LINE;  // 128 = AXI data width
  parameter int unsigned LINE_BYTES     = LINE_W / 8;               // 16
  parameter int unsigned BUF_BYTES      = 4096;  // circular buffer per channel
  parameter int unsigned LINES          = BUF_BYTES / LINE_BYTES;   // 256
  parameter int unsigned IDX_W          = $clog2(LINES);            // 8
  parameter int unsigned BURST_LINES    = 4;     // lines per packet (64 Bytes)
  parameter int unsigned BEAT_W         = $clog2(BURST_LINES);      // 2
  parameter int unsigned PKTS           = LINES / BURST_LINES;      // 64
  parameter int unsigned PKT_W          = IDX_W - BEAT_W;           // 6

  // ---- addresses ----
  parameter int unsigned VA_W           = 64;
  parameter int unsigned ADDR_W         = 64;
  parameter int unsigned SPACE_BITS     = 32;    // 4 GByte of virtual space per stream
  parameter int unsigned LOFF_W         = $clog2(LINE_BYTES);       // 4
  parameter int unsigned WOFF_W         = $clog2(WORD_W / 8);       // 2
  parameter int unsigned LPOS_W         = SPACE_BITS - LOFF_W;      // line position in a stream
  // Stream region: addresses whose bits [63:40] equal those of STREAM_REGION_BASE (1 TByte).
  parameter int unsigned        STREAM_REGION_BITS = 40;
  parameter logic [VA_W-1:0]    STREAM_REGION_BASE = 64'h0000_0100_0000_0000;

  parameter int unsigned AXI_ID_W       = CHAN_ID_W + IDX_W;        // 10
  parameter int unsigned AXI_STRB_W     = LINE_W / 8;

  typedef logic [LPOS_W-1:0] lpos_t;   // absolute line number inside a stream (wraps)
  typedef logic [IDX_W-1:0]  idx_t;    // line slot in a circular buffer
  typedef logic [PKT_W-1:0]  pkt_t;    // packet slot in a circular buffer
  typedef logic [CHAN_ID_W-1:0] chan_t;

  // ---- AXI4 subset ----
  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [ADDR_W-1:0]   addr;
    logic [7:0]          len;   // beats - 1
  } ax_t;                       // AR and AW payload

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [LINE_W-1:0]   data;
    logic                last;
  } r_t;

  typedef struct packed {
    logic [LINE_W-1:0]     data;
    logic [AXI_STRB_W-1:0] strb;
    logic                  last;
  } w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
  } b_t;

  // ---- channel configuration, written by the core when it opens a stream ----
  typedef enum logic {
    MODE_MEM = 1'b0,   // outgoing channel writes to a memory (AXI write master)
    MODE_ISC = 1'b1    // outgoing channel answers an Incoming Stream Cache (AXI read slave)
  } out_mode_e;

  typedef struct packed {
    logic            enable;
    logic [VA_W-1:0] base_va;      // first stream address (tag in bits 63:32), 64-Byte aligned
    logic [ADDR_W-1:0] remote_base; // remote address that matches base_va, 64-Byte aligned
    out_mode_e       mode;         // used by outgoing channels only
  } chan_cfg_t;

  // one store held in the store buffer; stream stores keep their virtual address
  typedef struct packed {
    logic [VA_W-1:0]   vaddr;
    logic [ADDR_W-1:0] paddr;
    logic [WORD_W-1:0] data;
    logic              is_stream;
  } st_entry_t;

  function automatic logic is_stream_addr(input logic [VA_W-1:0] va);
    return va[VA_W-1:STREAM_REGION_BITS] == STREAM_REGION_BASE[VA_W-1:STREAM_REGION_BITS];
  endfunction

  // Add to the low SPACE_BITS of an address only, so a stream wraps inside its slice.
  function automatic logic [ADDR_W-1:0] wrap_add(input logic [ADDR_W-1:0] a,
                                                 input logic [SPACE_BITS-1:0] inc);
    return {a[ADDR_W-1:SPACE_BITS], a[SPACE_BITS-1:0] + inc};
  endfunction

endpackage
