// tb_rr_arbiter: checks the round-robin arbiter against a reference model: the pick is
// always a requester, and it is the first requester after the last served channel.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req;
  logic advance, valid;
  logic [1:0] advance_idx, pick;
  int last;   // reference pointer

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .advance_idx, .valid, .pick);

  function automatic int ref_pick(input logic [N-1:0] rq, input int ptr);
    for (int k = 0; k < N; k++) if (rq[(ptr + k) % N]) return (ptr + k) % N;
    return -1;
  endfunction

  int served [N];
  initial begin
    req = 0; advance = 0; advance_idx = 0; last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = (n < 1000) ? 4'hF : 4'($urandom);
      #1;
      checks++;
      if (valid != (req != 0) || (valid && int'(pick) != ref_pick(req, last))) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d req=%b pick=%0d ref=%0d", n, req, pick, ref_pick(req, last));
      end
      advance = valid && ($urandom_range(3) != 0);
      advance_idx = pick;
      if (advance) begin
        last = (int'(pick) + 1) % N;
        served[pick]++;
      end
    end
    // fairness with all requesting
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] < 150) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
