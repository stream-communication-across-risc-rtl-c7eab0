// out_store_handler: core-side handler of the Outgoing Stream Cache.
//
// A store request is broadcast to all outgoing channels; the channel whose tag matches
// grants it (in the same cycle) or flags a word error. This handler merges those answers
// into the core's single store port and raises miss_error for a stream store that no
// active channel owns. hit_chan reports which channel took the store (for tracing).
// The broadcast-and-select organisation follows the published design.
module out_store_handler
  import stream_pkg::*;
#(
  parameter int unsigned N = NUM_STREAMS,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          st_req,
  output logic          st_gnt,
  output logic          miss_error,
  output logic          word_error,
  output logic [CW-1:0] hit_chan,
  input  logic [N-1:0]  ch_hit,
  input  logic [N-1:0]  ch_gnt,
  input  logic [N-1:0]  ch_werr
);
  always_comb begin
    hit_chan = '0;
    for (int i = 0; i < N; i++) if (ch_hit[i]) hit_chan = CW'(i);
  end
  assign st_gnt     = st_req && ch_gnt[hit_chan];
  assign word_error = st_req && ch_werr[hit_chan];
  assign miss_error = st_req && !(|ch_hit);

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch_hit))
    else $error("out_store_handler: two channels own one stream address");
endmodule
