// tb_out_stream_channel: self-checking test of one outgoing stream channel in both modes.
//
// Memory mode: 3000 words (about three laps of the 1024-word window) are stored, in a
// shuffled order inside each 64-Byte packet, into a channel that writes to a behavioural
// memory (latency 20). The test checks every AW (ID, length, address), that only whole
// packets are written, the memory contents at the end, one store per cycle while the
// window has room, stalls when it is full, and word_error for a second store to a word
// and for a store behind the window.
// Incoming-cache mode: the testbench plays an Incoming Stream Cache prefetcher. It
// requests packets both before and after they are written and checks each read
// response burst (RID, RLAST, data) and that no packet is sent before it is requested
// and complete.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_out_stream_channel;
  import stream_pkg::*;
  import tb_pkg::*;

  localparam int NW = 3000;
  localparam chan_t CH = 2'd2;
  localparam logic [63:0] RBASE  = 64'h0000_0000_9000_0000;
  localparam logic [63:0] RBASE2 = 64'h0000_0000_A000_0000;

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

  function automatic logic [31:0] sdata(input int k);
    return 32'hC0DE_0000 ^ (k * 32'h0001_0003);
  endfunction

  logic      cfg_we, enabled;
  chan_cfg_t cfg;
  logic      st_req, st_hit, st_gnt, word_error;
  logic [63:0] st_addr;
  logic [31:0] st_data;
  logic      aw_valid, aw_ready, w_valid, w_ready, b_valid;
  ax_t       aw;
  w_t        w;
  b_t        b;
  logic      ar_valid, ar_hit, ar_fire, r_valid, r_ready;
  ax_t       ar;
  r_t        r;
  logic      mar_ready, mr_valid;
  r_t        mr;

  out_stream_channel #(.CHAN_ID(CH)) dut (
    .clk, .rst_n, .cfg_we, .cfg, .enabled,
    .st_req, .st_addr, .st_data, .st_hit, .st_gnt, .word_error,
    .aw_valid, .aw, .aw_ready, .w_valid, .w, .w_ready, .b_valid, .b,
    .ar_valid, .ar, .ar_hit, .ar_fire, .r_valid, .r, .r_ready
  );

  tb_axi_mem #(.LAT(20), .OOO(1'b0)) mem (
    .clk, .rst_n, .ar_valid(1'b0), .ar('0), .ar_ready(mar_ready), .r_valid(mr_valid), .r(mr),
    .r_ready(1'b1), .aw_valid, .aw, .aw_ready, .w_valid, .w, .w_ready, .b_valid, .b,
    .b_ready(1'b1)
  );

  assign ar_fire = ar_valid && ar_hit;

  // ---- AW monitor (memory mode) ----
  int n_aw = 0, n_wbeats = 0;
  always @(posedge clk) if (rst_n) begin
    if (aw_valid && aw_ready) begin
      check(aw.id[9:8] == CH && aw.len == 8'd3, "AW id/len");
      check(aw.id[1:0] == 2'b00, "AW starts a packet");
      check(8'((aw.addr - RBASE) >> 4) == aw.id[7:0], "AW address matches line index");
      // the whole packet must have been stored already
      for (int i = 0; i < 16; i++)
        check(dut.written[aw.id[7:0] + 8'(i / 4)][i % 4], "AW only for complete packets");
      n_aw++;
    end
    if (w_valid && w_ready) n_wbeats++;
  end

  int n_err = 0;
  always @(posedge clk) if (rst_n && word_error) n_err++;

  task automatic do_cfg(input out_mode_e m, input logic [63:0] rb);
    @(negedge clk);
    cfg = '{enable: 1'b1, base_va: stream_va(TAG2, 0), remote_base: rb, mode: m};
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // store word k, waiting for the grant; returns the cycles it took
  task automatic store(input int k, output int cyc);
    cyc = 0;
    forever begin
      @(negedge clk);
      st_req = 1; st_addr = stream_va(TAG2, k); st_data = sdata(k);
      #4;
      cyc++;
      if (st_gnt) break;
    end
  endtask

  int order [16];
  int c, maxc, stalls, fast;
  int nreq;
  initial begin
    cfg_we = 0; cfg = '0; st_req = 0; st_addr = '0; st_data = '0;
    ar_valid = 0; ar = '0; r_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ================= memory mode =================
    do_cfg(MODE_MEM, RBASE);
    check(enabled, "enabled");
    stalls = 0; fast = 0;
    for (int p = 0; p < NW / 16; p++) begin
      for (int i = 0; i < 16; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < 16; i++) begin
        store(p * 16 + order[i], c);
        if (c > 1) stalls++; else fast++;
      end
    end
    @(negedge clk); st_req = 0;
    check(fast > 2000, $sformatf("most stores granted at once (%0d)", fast));
    // second store to a word still in the window
    @(negedge clk);
    st_req = 1; st_addr = stream_va(TAG2, NW - 16 - 3); st_data = 0;
    #4; check(!st_gnt && word_error, "second store to a word gives word_error");
    @(negedge clk);
    st_req = 1; st_addr = stream_va(TAG2, 5);
    #4; check(!st_gnt && word_error, "store behind the window gives word_error");
    @(negedge clk); st_req = 0;
    repeat (300) @(negedge clk);
    check(n_aw == NW / 16, $sformatf("one write burst per packet: %0d", n_aw));
    check(n_wbeats == 4 * (NW / 16), "four beats per burst");
    for (int k = 0; k < (NW / 16) * 16; k++)
      check(mem.rd_word(RBASE + 64'(k * 4)) == sdata(k), $sformatf("memory word %0d", k));
    check(n_err == 2, "two word errors");

    $display("memory mode: %0d stores, %0d needed to wait", fast + stalls, stalls);

    // ================= incoming-cache mode =================
    do_cfg(MODE_ISC, RBASE2);
    // request packets 0..3 before anything is written
    nreq = 0;
    for (int p = 0; p < 4; p++) begin
      @(negedge clk);
      ar_valid = 1; ar.id = {2'd3, 8'(p * 4)}; ar.addr = RBASE2 + 64'(p * 64); ar.len = 3;
      #4; check(ar_hit, "request inside the window claimed");
    end
    @(negedge clk); ar_valid = 0;
    // a request outside this stream is not claimed
    ar_valid = 1; ar.addr = RBASE2 + 64'h10_0000; #4; check(!ar_hit, "foreign request not claimed");
    @(negedge clk); ar_valid = 0;
    repeat (5) @(negedge clk);
    check(!r_valid, "nothing sent before data are written");
    // write packets 0..7 (words 0..127)
    for (int k = 0; k < 128; k++) store(k, c);
    @(negedge clk); st_req = 0;
    // then request packets 4..7 after they are written
    for (int p = 4; p < 8; p++) begin
      @(negedge clk);
      ar_valid = 1; ar.id = {2'd3, 8'(p * 4)}; ar.addr = RBASE2 + 64'(p * 64); ar.len = 3;
      #4; check(ar_hit, "late request claimed");
    end
    @(negedge clk); ar_valid = 0;
    wait (n_rbeats == 32);
    repeat (8) @(negedge clk);
    check(!r_valid, "no extra responses");
    check(dut.lbase == 28'd32, "window moved past the eight sent packets");
    // fill the whole window without requests: the next store must wait
    for (int k = 128; k < 128 + 1024; k++) store(k, c);
    @(negedge clk);
    st_req = 1; st_addr = stream_va(TAG2, 128 + 1024); st_data = sdata(128 + 1024);
    stalls = 0;
    repeat (30) begin
      #4; if (!st_gnt && !word_error) stalls++;
      @(negedge clk);
    end
    check(stalls == 30, "store ahead of a full window waits");
    // the prefetcher asks for packet 8; once it is sent the window moves and the store goes
    ar_valid = 1; ar.id = {2'd3, 8'(32)}; ar.addr = RBASE2 + 64'(8 * 64); ar.len = 3;
    #4; check(ar_hit, "request for packet 8 claimed");
    @(negedge clk); ar_valid = 0;
    c = 0;
    while (!st_gnt && c < 50) begin @(negedge clk); #4; c++; end
    check(st_gnt, "held store granted after the window moved");
    @(negedge clk); st_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- read response monitor (incoming-cache mode) ----
  int n_rbeats = 0;
  always @(posedge clk) if (rst_n && r_valid && r_ready) begin
    int line;
    line = n_rbeats;   // packets come back in the order they became ready: 0..8
    check(r.id[9:8] == 2'd3, "RID carries the requester");
    check(r.id[7:0] == 8'(line), $sformatf("RID line %0d", line));
    check(r.last == ((line % 4) == 3), "RLAST on the fourth beat");
    for (int i = 0; i < 4; i++)
      check(r.data[i*32 +: 32] == sdata(line * 4 + i), "read response data");
    n_rbeats++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
