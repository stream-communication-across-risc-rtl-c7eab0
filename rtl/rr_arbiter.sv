// rr_arbiter: round-robin choice among the requesting stream channels.
//
// pick is the first requester at or after the rotating pointer; valid says that some
// channel requests. The owner of the arbiter reports with advance/advance_idx when the
// channel it served has finished a transfer; the pointer then moves just past that
// channel, so every active channel is served in turn. Holding a choice while a bus
// transfer is stalled is the job of the handler that uses the arbiter. The fair
// round-robin policy follows the published design; the pointer scheme is this
// implementation's own.
module rr_arbiter #(
  parameter int unsigned N = stream_pkg::NUM_STREAMS,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  input  logic [W-1:0] advance_idx,
  output logic         valid,
  output logic [W-1:0] pick
);
  logic [W-1:0] ptr;

  always_comb begin
    valid = 1'b0;
    pick  = '0;
    for (int k = 0; k < N; k++) begin
      int unsigned c;
      c = (int'(ptr) + k) % N;
      if (!valid && req[c]) begin
        valid = 1'b1;
        pick  = W'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ptr <= '0;
    else if (advance) ptr <= (int'(advance_idx) == N - 1) ? '0 : advance_idx + W'(1);
  end
endmodule
