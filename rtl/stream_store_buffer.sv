// stream_store_buffer: store buffer with a speculative and a commit queue, extended to
// carry the virtual address of each store so stream stores can be sent untranslated.
//
// A store pushed by the store unit (push_valid) enters the speculative queue at its write
// pointer. A commit from the core (commit) moves the oldest speculative store into the
// commit queue and frees its slot; a flush drops all speculative stores. The oldest
// committed store is offered to its cache: stream stores (is_stream) to the Outgoing
// Stream Cache with their virtual address, the rest to the main data cache with their
// physical address. The grant of that cache removes it. Both caches grant in the request
// cycle, so committed stores drain at one per cycle. A stream store that the Outgoing
// Stream Cache refuses with an error (sc_err: no channel, or word already written) is
// dropped and reported on st_error, so the queue does not block.
// ready tells the store unit that the speculative queue can take one more store beyond a
// push already under way. The two queues and their pointers follow the published design
// (and the original core's depths of 4 and 8 are kept); the ready rule and dropping
// refused stream stores are this implementation's.
module stream_store_buffer
  import stream_pkg::*;
#(
  parameter int unsigned DEPTH_SPEC   = 4,
  parameter int unsigned DEPTH_COMMIT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // from the store unit
  input  logic              push_valid,
  input  st_entry_t         push_entry,
  output logic              ready,
  // from the commit stage
  input  logic              commit,
  output logic              commit_ready,
  // main data cache store port
  output logic              dc_req,
  output logic [ADDR_W-1:0] dc_addr,
  output logic [WORD_W-1:0] dc_data,
  input  logic              dc_gnt,
  // outgoing stream cache store port
  output logic              sc_req,
  output logic [VA_W-1:0]   sc_addr,
  output logic [WORD_W-1:0] sc_data,
  input  logic              sc_gnt,
  input  logic              sc_err,       // the stream store at the head is refused
  output logic              st_error,     // a committed stream store was dropped
  output logic              empty
);
  localparam int unsigned SW = $clog2(DEPTH_SPEC);
  localparam int unsigned CW = $clog2(DEPTH_COMMIT);

  st_entry_t     spec [DEPTH_SPEC];
  st_entry_t     cmt  [DEPTH_COMMIT];
  logic [SW-1:0] s_wr, s_rd;
  logic [SW:0]   s_cnt;
  logic [CW-1:0] c_wr, c_rd;
  logic [CW:0]   c_cnt;

  logic do_commit, do_issue, do_push;
  st_entry_t head;

  assign head         = cmt[c_rd];
  assign commit_ready = (int'(c_cnt) < DEPTH_COMMIT);
  assign do_push      = push_valid;
  assign do_commit    = commit && (s_cnt != '0) && commit_ready;
  assign ready        = (int'(s_cnt) + (push_valid ? 1 : 0)) < DEPTH_SPEC;

  assign dc_req  = (c_cnt != '0) && !head.is_stream;
  assign dc_addr = head.paddr;
  assign dc_data = head.data;
  assign sc_req  = (c_cnt != '0) && head.is_stream;
  assign sc_addr = head.vaddr;
  assign sc_data = head.data;
  assign do_issue = (dc_req && dc_gnt) || (sc_req && (sc_gnt || sc_err));
  assign st_error = sc_req && sc_err && !sc_gnt;
  assign empty   = (s_cnt == '0) && (c_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_wr <= '0; s_rd <= '0; s_cnt <= '0;
      c_wr <= '0; c_rd <= '0; c_cnt <= '0;
      for (int i = 0; i < DEPTH_SPEC; i++)   spec[i] <= '0;
      for (int i = 0; i < DEPTH_COMMIT; i++) cmt[i]  <= '0;
    end else begin
      if (flush) begin
        s_wr <= '0; s_rd <= '0; s_cnt <= '0;
      end else begin
        if (do_push) begin
          spec[s_wr] <= push_entry;
          s_wr       <= s_wr + 1'b1;
        end
        if (do_commit) s_rd <= s_rd + 1'b1;
        s_cnt <= s_cnt + (SW+1)'(do_push) - (SW+1)'(do_commit);
      end
      if (do_commit && !flush) begin
        cmt[c_wr] <= spec[s_rd];
        c_wr      <= c_wr + 1'b1;
      end
      if (do_issue) c_rd <= c_rd + 1'b1;
      c_cnt <= c_cnt + (CW+1)'(do_commit && !flush) - (CW+1)'(do_issue);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push_valid |-> (int'(s_cnt) < DEPTH_SPEC))
    else $error("stream_store_buffer: push into a full speculative queue");
endmodule
