// stream_load_unit: load-unit controller that steers loads to the main data cache or to
// the Incoming Stream Cache.
//
// Three states, as in the original load unit: IDLE, WAIT_GRANT and SEND_TAG. A load
// whose virtual address lies in the stream region goes to the Incoming Stream Cache with
// its untranslated address, and no translation is requested. Any other load first needs
// a translation (mmu_req / mmu_hit); without a hit in the same cycle the request is
// dropped and retried. When the chosen cache grants, the next load is taken from the
// load queue (ld_pop) and the unit moves to SEND_TAG, where it presents the tag (the
// translated address for the data cache) and may already issue the next load; without
// a grant it waits in WAIT_GRANT, repeating the request. Both caches return data in
// order; a load to the other cache than the one with loads still in flight waits until
// those have returned, so results reach the core in program order (res_valid/res_data).
// A stream load that ends with a word error, or that no channel owns (sc_miss, taken
// once no other load is in flight), returns res_error instead of data, in order, so the
// core can raise an exception and the unit never blocks.
// Timing: a stream load presented in cycle t is granted in t and answered in t+1 at the
// earliest, so back-to-back stream loads run at one per cycle.
// The states, transitions and the other-cache rule follow the published design; the
// reduced port list (32-bit words, no transaction IDs, no kill) and the error results
// are this implementation's.
module stream_load_unit
  import stream_pkg::*;
#(
  parameter int unsigned MAX_PENDING = NUM_STREAMS + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // load queue
  input  logic              ld_valid,
  input  logic [VA_W-1:0]   ld_vaddr,
  output logic              ld_pop,
  // translation
  output logic              mmu_req,
  output logic [VA_W-1:0]   mmu_vaddr,
  input  logic              mmu_hit,
  input  logic [ADDR_W-1:0] mmu_paddr,
  // main data cache
  output logic              dc_req,
  output logic [VA_W-1:0]   dc_addr,
  input  logic              dc_gnt,
  output logic              dc_tag_valid,
  output logic [ADDR_W-1:0] dc_tag,
  input  logic              dc_rvalid,
  input  logic [WORD_W-1:0] dc_rdata,
  // incoming stream cache
  output logic              sc_req,
  output logic [VA_W-1:0]   sc_addr,
  input  logic              sc_gnt,
  output logic              sc_tag_valid,
  input  logic              sc_rvalid,
  input  logic [WORD_W-1:0] sc_rdata,
  input  logic              sc_miss,      // no channel owns the presented stream address
  input  logic              sc_werr,      // the stream load in flight ends with an error
  // result
  output logic              res_valid,
  output logic [WORD_W-1:0] res_data,
  output logic              res_error,    // the result is an error instead of data
  output logic              is_stream     // the load now presented targets the stream cache
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_GRANT, S_SEND_TAG} ld_state_e;
  localparam int unsigned PW = $clog2(MAX_PENDING + 1);

  ld_state_e         state;
  logic              lat_stream;       // target of the last granted or waiting load
  logic [VA_W-1:0]   lat_vaddr;
  logic [ADDR_W-1:0] lat_paddr;
  logic [PW-1:0]     pending;          // loads granted and not yet answered
  logic              pend_stream;      // which cache those loads went to
  logic              miss_q;           // error result for a load that no channel owns

  logic can_issue, new_req, granted, resp;

  assign is_stream = is_stream_addr(ld_vaddr);
  assign can_issue = ld_valid && (pending == '0 || pend_stream == is_stream) &&
                     (int'(pending) < MAX_PENDING);
  assign resp      = sc_rvalid || sc_werr || miss_q || dc_rvalid;

  always_comb begin
    mmu_req      = 1'b0;
    mmu_vaddr    = ld_vaddr;
    dc_req       = 1'b0;
    dc_addr      = ld_vaddr;
    sc_req       = 1'b0;
    sc_addr      = ld_vaddr;
    dc_tag_valid = (state == S_SEND_TAG) && !lat_stream;
    dc_tag       = lat_paddr;
    sc_tag_valid = (state == S_SEND_TAG) && lat_stream;
    new_req      = 1'b0;
    granted      = 1'b0;
    if (state == S_WAIT_GRANT) begin
      if (lat_stream) begin
        sc_req  = 1'b1;
        sc_addr = lat_vaddr;
        granted = sc_gnt || (sc_miss && pending == '0);
      end else begin
        dc_req  = 1'b1;
        dc_addr = lat_vaddr;
        granted = dc_gnt;
      end
    end else if (can_issue) begin
      if (is_stream) begin
        sc_req  = 1'b1;
        new_req = 1'b1;
        granted = sc_gnt || (sc_miss && pending == '0);
      end else begin
        mmu_req = 1'b1;
        if (mmu_hit) begin
          dc_req  = 1'b1;
          new_req = 1'b1;
          granted = dc_gnt;
        end
      end
    end
  end

  assign ld_pop    = granted;
  assign res_valid = resp;
  assign res_data  = sc_rvalid ? sc_rdata : dc_rdata;
  assign res_error = sc_werr || miss_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      lat_stream  <= 1'b0;
      lat_vaddr   <= '0;
      lat_paddr   <= '0;
      pending     <= '0;
      pend_stream <= 1'b0;
      miss_q      <= 1'b0;
    end else begin
      miss_q <= sc_req && sc_miss && granted;
      if (new_req) begin
        lat_stream <= is_stream;
        lat_vaddr  <= ld_vaddr;
        lat_paddr  <= mmu_paddr;
      end
      if (granted) begin
        state       <= S_SEND_TAG;
        pend_stream <= (state == S_WAIT_GRANT) ? lat_stream : is_stream;
      end else if (new_req) begin
        state <= S_WAIT_GRANT;
      end else if (state == S_SEND_TAG) begin
        state <= S_IDLE;
      end
      pending <= pending + PW'(granted) - PW'(resp);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) resp |-> (pending != '0))
    else $error("stream_load_unit: load data with no load in flight");
endmodule
