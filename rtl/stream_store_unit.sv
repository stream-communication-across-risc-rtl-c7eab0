// stream_store_unit: store-unit controller that feeds the store buffer with stream and
// ordinary stores.
//
// Three states, as in the original store unit: IDLE, WAIT_STORE_BUFFER_READY and
// VALID_STORE. A store whose virtual address lies in the stream region needs no
// translation; any other store needs a translation hit in the same cycle (otherwise it
// is retried). If the speculative queue of the store buffer has room (sb_ready) the
// store is taken from the store queue (st_pop), latched, and pushed into the buffer in
// the next cycle (VALID_STORE, sb_valid), together with its virtual address; in that
// same cycle the next store may already be taken, unless the last one was atomic. With
// no room the unit waits in WAIT_STORE_BUFFER_READY and returns to IDLE once there is.
// Timing: a lone store takes two cycles, back-to-back stores one each.
// States and transitions follow the published design; the reduced port list (32-bit
// words, no byte enables) is this implementation's.
module stream_store_unit
  import stream_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // store queue
  input  logic              st_valid,
  input  logic [VA_W-1:0]   st_vaddr,
  input  logic [WORD_W-1:0] st_data,
  input  logic              st_amo,
  output logic              st_pop,
  // translation
  output logic              mmu_req,
  output logic [VA_W-1:0]   mmu_vaddr,
  input  logic              mmu_hit,
  input  logic [ADDR_W-1:0] mmu_paddr,
  // store buffer
  input  logic              sb_ready,
  output logic              sb_valid,
  output st_entry_t         sb_entry
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_SB_READY, S_VALID_STORE} st_state_e;

  st_state_e state;
  logic      take, stream, lat_amo;

  assign stream    = is_stream_addr(st_vaddr);
  assign mmu_vaddr = st_vaddr;
  assign mmu_req   = (state != S_WAIT_SB_READY) && st_valid && !stream &&
                     !(state == S_VALID_STORE && lat_amo);
  assign take      = (state != S_WAIT_SB_READY) && st_valid && sb_ready &&
                     (stream || mmu_hit) && !(state == S_VALID_STORE && lat_amo);
  assign st_pop    = take;
  assign sb_valid  = (state == S_VALID_STORE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sb_entry <= '0;
      lat_amo  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_VALID_STORE: begin
          if (take) begin
            state              <= S_VALID_STORE;
            sb_entry.vaddr     <= st_vaddr;
            sb_entry.paddr     <= stream ? st_vaddr : mmu_paddr;
            sb_entry.data      <= st_data;
            sb_entry.is_stream <= stream;
            lat_amo            <= st_amo;
          end else if (st_valid && !sb_ready && !(state == S_VALID_STORE && lat_amo)) begin
            state <= S_WAIT_SB_READY;
          end else begin
            state <= S_IDLE;
          end
        end
        S_WAIT_SB_READY: if (sb_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
