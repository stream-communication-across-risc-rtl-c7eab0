// tb_incoming_stream_cache: all four incoming channels stream from a behavioural memory
// (latency 30, out-of-order bursts) at once. Loads alternate between channels (random
// choice), 1500 words per channel. Checks every returned word and that words come back
// in load order across channels, that the prefetch requests of all channels share the
// read port, and that a load to a stream with no open channel raises miss_error.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_incoming_stream_cache;
  import stream_pkg::*;
  import tb_pkg::*;
  localparam int N = 4, PER = 1500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic cfg_we; chan_t cfg_chan; chan_cfg_t cfg; logic [N-1:0] chan_enabled;
  logic ld_req, ld_gnt, ld_rvalid, miss_error, word_error;
  logic [63:0] ld_addr; logic [31:0] ld_rdata;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready, aw_ready, w_ready, b_valid;
  ax_t m_ar; r_t m_r; b_t b;

  incoming_stream_cache dut (.clk, .rst_n, .cfg_we, .cfg_chan, .cfg, .chan_enabled,
    .ld_req, .ld_addr, .ld_gnt, .ld_rvalid, .ld_rdata, .miss_error, .word_error,
    .m_ar_valid, .m_ar, .m_ar_ready, .m_r_valid, .m_r, .m_r_ready);

  tb_axi_mem #(.LAT(30), .OOO(1'b1)) mem (.clk, .rst_n,
    .ar_valid(m_ar_valid), .ar(m_ar), .ar_ready(m_ar_ready), .r_valid(m_r_valid), .r(m_r),
    .r_ready(m_r_ready), .aw_valid(1'b0), .aw('0), .aw_ready, .w_valid(1'b0), .w('0),
    .w_ready, .b_valid, .b, .b_ready(1'b1));

  function automatic logic [63:0] rbase(input int c);
    return 64'h0000_0000_4000_0000 + 64'(c) * 64'h0100_0000;
  endfunction
  function automatic logic [31:0] tag(input int c);
    return TAG0 + 32'(c);
  endfunction

  logic [31:0] expq [$];
  int n_resp = 0, ar_per [N];
  always @(posedge clk) if (rst_n) begin
    if (ld_rvalid) begin
      check(expq.size() > 0 && ld_rdata == expq[0], $sformatf("word %0d in load order", n_resp));
      if (expq.size() > 0) void'(expq.pop_front());
      n_resp++;
    end
    check(!word_error, "no word errors on a clean stream");
    if (m_ar_valid && m_ar_ready) ar_per[m_ar.id[9:8]]++;
  end

  int k [N];
  int total;
  initial begin
    cfg_we = 0; cfg_chan = 0; cfg = '0; ld_req = 0; ld_addr = '0;
    for (int c = 0; c < N; c++) begin k[c] = 0; ar_per[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      cfg_we = 1; cfg_chan = chan_t'(c);
      cfg = '{enable: 1'b1, base_va: stream_va(tag(c), 0), remote_base: rbase(c), mode: MODE_MEM};
    end
    @(negedge clk); cfg_we = 0;
    check(chan_enabled == 4'hF, "all channels open");
    total = 0;
    while (total < N * PER) begin
      int c;
      @(negedge clk);
      do c = $urandom_range(N - 1); while (k[c] >= PER);
      ld_req = 1; ld_addr = stream_va(tag(c), k[c]);
      #4;
      while (!ld_gnt) begin @(negedge clk); #4; end
      expq.push_back(pat(rbase(c) + 64'(k[c] * 4)));
      k[c]++; total++;
    end
    @(negedge clk); ld_req = 0;
    // load to a stream nobody opened
    @(negedge clk); ld_req = 1; ld_addr = stream_va(TAG0 + 32'd9, 0); #4;
    check(miss_error && !ld_gnt, "miss_error for an unopened stream");
    @(negedge clk); ld_req = 0;
    wait (n_resp == N * PER);
    for (int c = 0; c < N; c++) check(ar_per[c] >= PER / 16, $sformatf("channel %0d prefetched", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
