// tb_outgoing_stream_cache: three outgoing channels at once. Channels 0 and 1 write to a
// behavioural memory (MODE_MEM); channel 2 serves an Incoming Stream Cache (MODE_ISC),
// which is the real incoming_stream_cache reading through the read-slave port. Stores
// are spread at random over the three streams, four buffers' worth per stream, so every
// window wraps several times. Checks: memory contents, one write burst per packet, the
// words loaded on the incoming side, that a lone store is granted in its first cycle,
// word_error for a second store to a word and miss_error for an unopened stream.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_outgoing_stream_cache;
  import stream_pkg::*;
  import tb_pkg::*;
  localparam int N = 4, PER = 4096;
  localparam logic [63:0] MBASE [2] = '{64'h0000_0000_9000_0000, 64'h0000_0000_9100_0000};
  localparam logic [63:0] IBASE = 64'h0000_0000_A000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask
  function automatic logic [31:0] sdata(input int c, input int k);
    return 32'hC000_0000 ^ (32'(c) << 24) ^ (32'(k) * 32'd7919);
  endfunction

  // outgoing cache
  logic cfg_we, icfg_we; chan_t cfg_chan; chan_cfg_t cfg; logic [N-1:0] chan_enabled, ichan_enabled;
  logic st_req, st_gnt, miss_error, word_error;
  logic [63:0] st_addr; logic [31:0] st_data;
  logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  ax_t aw; w_t w; b_t b;
  logic s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t s_ar; r_t s_r;
  // incoming cache used as the ISC requester
  logic ld_req, ld_gnt, ld_rvalid, imiss, iwerr;
  logic [63:0] ld_addr; logic [31:0] ld_rdata;
  logic mar_ready, mr_valid;
  r_t mr;

  outgoing_stream_cache dut (.clk, .rst_n, .cfg_we, .cfg_chan, .cfg, .chan_enabled,
    .st_req, .st_addr, .st_data, .st_gnt, .miss_error, .word_error,
    .m_aw_valid(aw_valid), .m_aw(aw), .m_aw_ready(aw_ready), .m_w_valid(w_valid), .m_w(w),
    .m_w_ready(w_ready), .m_b_valid(b_valid), .m_b(b), .m_b_ready(b_ready),
    .s_ar_valid, .s_ar, .s_ar_ready, .s_r_valid, .s_r, .s_r_ready);

  incoming_stream_cache isc (.clk, .rst_n, .cfg_we(icfg_we), .cfg_chan, .cfg,
    .chan_enabled(ichan_enabled), .ld_req, .ld_addr, .ld_gnt, .ld_rvalid, .ld_rdata,
    .miss_error(imiss), .word_error(iwerr),
    .m_ar_valid(s_ar_valid), .m_ar(s_ar), .m_ar_ready(s_ar_ready),
    .m_r_valid(s_r_valid), .m_r(s_r), .m_r_ready(s_r_ready));

  tb_axi_mem #(.LAT(20)) mem (.clk, .rst_n, .ar_valid(1'b0), .ar('0), .ar_ready(mar_ready),
    .r_valid(mr_valid), .r(mr), .r_ready(1'b1), .aw_valid, .aw, .aw_ready, .w_valid, .w,
    .w_ready, .b_valid, .b, .b_ready);

  int n_aw = 0, n_err = 0, n_miss = 0, n_ld = 0, n_isc_beats = 0;
  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) n_aw++;
    if (word_error) n_err++;
    if (miss_error) n_miss++;
    if (s_r_valid && s_r_ready) n_isc_beats++;
    if (ld_rvalid) begin
      check(ld_rdata == sdata(2, n_ld), $sformatf("incoming word %0d", n_ld));
      n_ld++;
    end
    check(!iwerr && !imiss, "incoming side clean");
  end

  task automatic do_cfg(input logic in_side, input int c, input logic [31:0] t,
                        input logic [63:0] rb, input out_mode_e m);
    @(negedge clk);
    cfg_chan = chan_t'(c);
    cfg = '{enable: 1'b1, base_va: stream_va(t, 0), remote_base: rb, mode: m};
    if (in_side) icfg_we = 1; else cfg_we = 1;
    @(negedge clk);
    cfg_we = 0; icfg_we = 0;
  endtask

  int k [3];
  int total, first_cycle, lone;
  initial begin
    cfg_we = 0; icfg_we = 0; cfg_chan = 0; cfg = '0; st_req = 0; st_addr = '0; st_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do_cfg(0, 0, TAG0, MBASE[0], MODE_MEM);
    do_cfg(0, 1, TAG1, MBASE[1], MODE_MEM);
    do_cfg(0, 2, TAG2, IBASE, MODE_ISC);
    do_cfg(1, 0, TAG3, IBASE, MODE_MEM);   // incoming channel 0 reads from outgoing channel 2
    check(chan_enabled == 4'b0111 && ichan_enabled == 4'b0001, "channels open");
    // a lone store is taken in its first cycle
    @(negedge clk); st_req = 1; st_addr = stream_va(TAG0, 0); st_data = sdata(0, 0); #4;
    check(st_gnt, "lone store granted at once");
    k[0] = 1; k[1] = 0; k[2] = 0;
    total = 1; first_cycle = 0;
    while (total < 3 * PER) begin
      int c, cyc;
      @(negedge clk);
      do c = $urandom_range(2); while (k[c] >= PER);
      st_req = 1; st_addr = stream_va(TAG0 + 32'(c), k[c]); st_data = sdata(c, k[c]);
      #4; cyc = 1;
      while (!st_gnt) begin @(negedge clk); #4; cyc++; end
      if (cyc == 1) first_cycle++;
      k[c]++; total++;
    end
    @(negedge clk); st_req = 0;
    check(first_cycle > 3 * PER / 2, $sformatf("most stores granted at once (%0d)", first_cycle));
    // errors
    @(negedge clk); st_req = 1; st_addr = stream_va(TAG0, PER - 2); #4;
    check(word_error && !st_gnt, "second store to a word gives word_error");
    @(negedge clk); st_addr = stream_va(TAG0 + 32'd7, 0); #4;
    check(miss_error && !st_gnt, "store to an unopened stream gives miss_error");
    @(negedge clk); st_req = 0;
    repeat (400) @(negedge clk);
    wait (n_ld == PER);
    repeat (20) @(negedge clk);
    check(n_aw == 2 * PER / 16, $sformatf("one write burst per packet (%0d)", n_aw));
    check(n_isc_beats == PER / 4, $sformatf("one read response beat per line (%0d)", n_isc_beats));
    check(n_err == 1 && n_miss == 1, "one word error and one miss error");
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < PER; i++)
        check(mem.rd_word(wrap_add(MBASE[c], 32'(i * 4))) == sdata(c, i),
              $sformatf("memory word %0d of channel %0d", i, c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // incoming side: load the ISC stream word by word
  initial begin
    ld_req = 0; ld_addr = '0;
    wait (rst_n);
    repeat (12) @(negedge clk);
    for (int i = 0; i < PER; i++) begin
      @(negedge clk);
      ld_req = 1; ld_addr = stream_va(TAG3, i);
      #4;
      while (!ld_gnt) begin @(negedge clk); #4; end
    end
    @(negedge clk); ld_req = 0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired (stores %0d/%0d/%0d, loads %0d)", k[0], k[1], k[2], n_ld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
