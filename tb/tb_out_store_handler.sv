// tb_out_store_handler: checks the store-side handler of the Outgoing Stream Cache with
// random channel answers: the grant and word error of the owning channel reach the
// store port, and a stream store no channel owns raises miss_error.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_out_store_handler;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic st_req, st_gnt, miss_error, word_error;
  logic [1:0] hit_chan;
  logic [N-1:0] ch_hit, ch_gnt, ch_werr;

  out_store_handler #(.N(N)) dut (.clk, .rst_n, .st_req, .st_gnt, .miss_error, .word_error,
    .hit_chan, .ch_hit, .ch_gnt, .ch_werr);

  initial begin
    st_req = 0; ch_hit = 0; ch_gnt = 0; ch_werr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int c;
      bit g, e;
      @(negedge clk);
      st_req = 1'($urandom);
      c = $urandom_range(N);          // N means: no channel owns it
      g = 1'($urandom); e = !g && 1'($urandom);
      ch_hit = 0; ch_gnt = 0; ch_werr = 0;
      if (st_req && c < N) begin ch_hit[c] = 1; ch_gnt[c] = g; ch_werr[c] = e; end
      // other channels' outputs are masked by their hit in the real channel
      #1;
      checks++;
      if (st_gnt != (st_req && c < N && g) || word_error != (st_req && c < N && e) ||
          miss_error != (st_req && c == N) || (st_req && c < N && int'(hit_chan) != c)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d", n);
      end
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
