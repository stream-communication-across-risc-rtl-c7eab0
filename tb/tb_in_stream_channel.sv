// tb_in_stream_channel: self-checking test of one incoming stream channel.
//
// A behavioural memory (latency 20 cycles, responses out of order, beats with gaps)
// feeds the channel's prefetcher. The test reads 3000 consecutive words (almost three
// laps of the 1024-word window), checks every word against the memory pattern, checks
// the AR requests (ID, length, consecutive 64-Byte addresses, never more than the window
// ahead), that a word already in the buffer is answered one cycle after its grant, that
// back-to-back loads of present words run at one per cycle, that re-reading a word and
// loading behind the window give word_error, and that another tag is not taken.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_in_stream_channel;
  import stream_pkg::*;
  import tb_pkg::*;

  localparam int NW = 3000;
  localparam chan_t CH = 2'd1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  logic              cfg_we, enabled;
  chan_cfg_t         cfg;
  logic              ld_req, ld_hit, ld_gnt, resp_allow, ld_rvalid, word_error;
  logic [63:0]       ld_addr;
  logic [31:0]       ld_rdata;
  logic              ar_valid, ar_ready, r_valid, r_ready;
  ax_t               ar;
  r_t                r;
  logic              aw_ready, w_ready, b_valid;
  b_t                b;

  localparam logic [63:0] RBASE = 64'h0000_0000_8000_0000;

  in_stream_channel #(.CHAN_ID(CH)) dut (
    .clk, .rst_n, .cfg_we, .cfg, .enabled,
    .ld_req, .ld_addr, .ld_hit, .ld_gnt, .resp_allow, .ld_rvalid, .ld_rdata, .word_error,
    .ar_valid, .ar, .ar_ready, .r_valid, .r
  );

  tb_axi_mem #(.LAT(20), .OOO(1'b1)) mem (
    .clk, .rst_n, .ar_valid(ar_valid && ar_ready), .ar, .ar_ready,
    .r_valid, .r, .r_ready(1'b1),
    .aw_valid(1'b0), .aw('0), .aw_ready, .w_valid(1'b0), .w('0), .w_ready,
    .b_valid, .b, .b_ready(1'b1)
  );
  assign r_ready = 1'b1;

  // ---- AR monitor ----
  logic [63:0] exp_ar_addr = RBASE;
  int n_ar = 0;
  int rd_done = 0;   // words read so far (by the driver)
  always @(posedge clk) if (rst_n && ar_valid && ar_ready) begin
    check(ar.id[9:8] == CH, "AR id channel");
    check(ar.len == 8'd3, "AR len");
    check(ar.addr == exp_ar_addr, $sformatf("AR addr %h exp %h", ar.addr, exp_ar_addr));
    check(ar.id[7:0] == 8'((ar.addr - RBASE) >> 4), "AR id line index");
    // never prefetch beyond the window: requested lines < read lines + 256
    check(((ar.addr - RBASE) >> 4) + 4 <= 64'((rd_done / 4) + 256 + 1), "AR inside window");
    exp_ar_addr += 64;
    n_ar++;
  end

  // ---- response monitor ----
  logic [31:0] expq [$];
  int n_resp = 0, n_err = 0;
  always @(posedge clk) if (rst_n) begin
    if (ld_rvalid) begin
      if (expq.size() == 0) check(0, "unexpected data");
      else check(ld_rdata == expq.pop_front(), $sformatf("data mismatch at response %0d", n_resp));
      n_resp++;
    end
    if (word_error) n_err++;
  end

  task automatic do_cfg();
    @(negedge clk);
    cfg = '{enable: 1'b1, base_va: stream_va(TAG1, 0), remote_base: RBASE, mode: MODE_MEM};
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Issue one load per cycle where possible for words [k0, k1); returns cycles used.
  task automatic run_loads(input int k0, input int k1, output int cyc_used);
    int k;
    k = k0; cyc_used = 0;
    while (k < k1) begin
      @(negedge clk);
      ld_req  = 1;
      ld_addr = stream_va(TAG1, k);
      #4;
      if (ld_gnt) begin
        expq.push_back(pat(RBASE + 64'(k * 4)));
        k++;
        rd_done = k;
      end
      cyc_used++;
    end
    @(negedge clk);
    ld_req = 0;
  endtask

  int c, base_resp;
  initial begin
    cfg_we = 0; cfg = '0; ld_req = 0; ld_addr = '0; resp_allow = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do_cfg();
    check(enabled, "channel enabled");
    // 1. first load: must wait for the first prefetch
    run_loads(0, 1, c);
    wait (n_resp == 1);
    // 2. wait until the window is prefetched, then a lone load to a present word
    repeat (800) @(negedge clk);
    check(n_ar == 64, $sformatf("prefetcher filled exactly the window: %0d requests", n_ar));
    @(negedge clk);
    ld_req = 1; ld_addr = stream_va(TAG1, 1);
    #4; check(ld_gnt, "lone load granted at once");
    expq.push_back(pat(RBASE + 4));
    @(negedge clk); ld_req = 0;
    #4; check(ld_rvalid, "lone load answered one cycle after grant");
    // 3. back-to-back loads of present words: one per cycle
    base_resp = n_resp;
    run_loads(2, 202, c);
    check(c == 200, $sformatf("200 back-to-back loads took %0d cycles", c));
    repeat (2) @(negedge clk);
    check(n_resp == 202, "all back-to-back loads answered");
    // 4. re-read an already read word -> word error
    @(negedge clk);
    ld_req = 1; ld_addr = stream_va(TAG1, 150);
    #4; check(ld_gnt, "re-read granted");
    @(negedge clk); ld_req = 0;
    #4; check(word_error && !ld_rvalid, "re-read gives word_error");
    // 5. another tag is not this channel's
    @(negedge clk);
    ld_req = 1; ld_addr = stream_va(TAG2, 0);
    #4; check(!ld_hit && !ld_gnt, "foreign tag ignored");
    @(negedge clk); ld_req = 0;
    // 6. stream through the rest, several laps of the window
    run_loads(202, NW, c);
    wait (n_resp == NW);
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all loads answered");
    // 7. load behind the window (word 0 was recycled long ago)
    @(negedge clk);
    ld_req = 1; ld_addr = stream_va(TAG1, 0);
    #4; check(ld_gnt, "load behind window granted");
    @(negedge clk); ld_req = 0;
    #4; check(word_error, "load behind window gives word_error");
    @(negedge clk);
    check(n_err == 2, $sformatf("exactly two word errors, got %0d", n_err));
    check(n_ar >= NW / 16, "prefetcher kept requesting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
