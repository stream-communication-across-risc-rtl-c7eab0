// tb_streaming_cache_top: end-to-end test of the whole design at its default parameters.
//
// Set-up: a behavioural AXI memory (150-cycle latency, the evaluated memory latency) and
// a loopback that sends the Incoming Stream Cache's read requests for addresses
// 0xA000_0000.. to this node's own Outgoing Stream Cache read slave, so a stream written
// by the core is read back through the network path of two Streaming Caches. The data
// cache and MMU are behavioural (random grants, translation misses one time in four).
// Streams: incoming ch0 (tag 0x100) and ch2 (tag 0x104) read memory; outgoing ch0 (tag
// 0x101) writes memory; outgoing ch1 (tag 0x102, ISC mode) is read by incoming ch1 (tag
// 0x103). The two sides run as separate load and store programs, as a core's load and
// store queues do.
//  Phase A: (loads start 8000 cycles after stores) 6000 mixed loads (three streams and ordinary loads) and 4400 mixed stores
//    (two streams and ordinary stores); results are checked in program order, and the
//    memory contents written by the outgoing stream are checked at the end.
//  Phase B: erroneous accesses: re-reading a word, loading an unopened stream, storing
//    a word twice and storing to an unopened stream; each must end with an error.
//  Phase B2: incoming ch2 is reopened; its loads alternate with ch0 loads.
//  Phase C: incoming ch0 is reopened on a new stream, 16 KByte (4096 words) are loaded
//    back to back; once the prefetcher runs ahead, 1024 loads (words 2048-3071) must take
//    exactly 1024 cycles, and the average load latency over the 16 KByte is reported.
//  Phase D: 4096 back-to-back stores to the memory stream (outgoing ch0), every store
//    committed at once: they must be taken at one per cycle, and memory is checked.
// Every mechanism (prefetch, loopback requests and responses, write bursts, waiting loads,
// back-to-back loads, the response order queue, line forwarding, recycling past the
// buffer end, both ISC ready orders, store stalls, store-buffer full, the other-cache
// rule, translation retries, data-cache paths, both error kinds on both sides, channel
// reopening) is counted, and one that never happened counts as a failure.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_streaming_cache_top;
  import stream_pkg::*;
  import tb_pkg::*;
  localparam int NLD = 6000, NST2 = 2560, NST1 = 1600, NSTO = 240;
  localparam logic [63:0] MEM_IN0 = 64'h0000_0000_4000_0000, MEM_IN2 = 64'h0000_0000_4100_0000;
  localparam logic [63:0] MEM_IN0B = 64'h0000_0000_4800_0000;
  localparam logic [63:0] MEM_OUT = 64'h0000_0000_9000_0000, LOOP = 64'h0000_0000_A000_0000;
  localparam logic [31:0] T_IN0 = TAG0, T_OUT0 = TAG1, T_ISC = TAG2, T_LOOP = TAG3;
  localparam logic [31:0] T_IN2 = 32'h0000_0104, T_IN0B = 32'h0000_0105, T_NONE = 32'h0000_010F;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask
  function automatic logic [31:0] sdata(input int s, input int k);
    return 32'h5000_0000 ^ (32'(s) << 24) ^ (32'(k) * 32'd2654435);
  endfunction
  function automatic logic [63:0] xlate(input logic [63:0] va);
    return va ^ 64'h0000_0000_0100_0000;
  endfunction

  // ---------------- DUT ----------------
  logic in_cfg_we, out_cfg_we; chan_t cfg_chan; chan_cfg_t cfg;
  logic [3:0] in_chan_enabled, out_chan_enabled;
  logic ld_valid, ld_pop, res_valid, res_error;
  logic [63:0] ld_vaddr; logic [31:0] res_data;
  logic st_valid, st_amo, st_pop, commit, commit_ready, flush, sb_empty, sb_error;
  logic [63:0] st_vaddr; logic [31:0] st_data;
  logic ld_mmu_req, ld_mmu_hit, st_mmu_req, st_mmu_hit;
  logic [63:0] ld_mmu_vaddr, ld_mmu_paddr, st_mmu_vaddr, st_mmu_paddr;
  logic dcl_req, dcl_gnt, dcl_tag_valid, dcl_rvalid, dcs_req, dcs_gnt;
  logic [63:0] dcl_addr, dcl_tag, dcs_addr; logic [31:0] dcl_rdata, dcs_data;
  logic in_miss_error, in_word_error, out_miss_error, out_word_error;
  logic in_ar_valid, in_ar_ready, in_r_valid, in_r_ready; ax_t in_ar; r_t in_r;
  logic out_aw_valid, out_aw_ready, out_w_valid, out_w_ready, out_b_valid, out_b_ready;
  ax_t out_aw; w_t out_w; b_t out_b;
  logic out_ar_valid, out_ar_ready, out_r_valid, out_r_ready; ax_t out_ar; r_t out_r;

  streaming_cache_top dut (.*);

  // ---------------- network: memory + loopback ----------------
  logic loop, m_ar_ready, m_r_valid; r_t m_r;
  assign loop         = in_ar.addr[31:28] == LOOP[31:28];
  assign out_ar_valid = in_ar_valid && loop;
  assign out_ar       = in_ar;
  assign in_ar_ready  = loop ? out_ar_ready : m_ar_ready;
  assign out_r_ready  = in_r_ready;
  assign in_r_valid   = out_r_valid || m_r_valid;
  assign in_r         = out_r_valid ? out_r : m_r;

  tb_axi_mem #(.LAT(150)) mem (.clk, .rst_n,
    .ar_valid(in_ar_valid && !loop), .ar(in_ar), .ar_ready(m_ar_ready),
    .r_valid(m_r_valid), .r(m_r), .r_ready(in_r_ready && !out_r_valid),
    .aw_valid(out_aw_valid), .aw(out_aw), .aw_ready(out_aw_ready),
    .w_valid(out_w_valid), .w(out_w), .w_ready(out_w_ready),
    .b_valid(out_b_valid), .b(out_b), .b_ready(out_b_ready));

  // ---------------- behavioural MMU and data cache ----------------
  logic rnd_l, rnd_s, rnd_g, rnd_gs;
  always @(negedge clk) begin
    rnd_l <= $urandom_range(3) != 0; rnd_s <= $urandom_range(3) != 0;
    rnd_g <= $urandom_range(2) != 0; rnd_gs <= $urandom_range(2) != 0;
  end
  assign ld_mmu_hit   = rnd_l;
  assign ld_mmu_paddr = xlate(ld_mmu_vaddr);
  assign st_mmu_hit   = rnd_s;
  assign st_mmu_paddr = xlate(st_mmu_vaddr);
  assign dcl_gnt      = dcl_req && rnd_g;
  assign dcs_gnt      = dcs_req && rnd_gs;
  logic [63:0] dq [$]; int dqt [$];
  int cyc = 0;
  logic [31:0] dstore [longint];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    dcl_rvalid <= 1'b0;
    if (rst_n) begin
      if (dcl_tag_valid) begin dq.push_back(dcl_tag); dqt.push_back(cyc + 3); end
      if (dq.size() > 0 && dqt[0] <= cyc) begin
        dcl_rvalid <= 1'b1; dcl_rdata <= pat(dq[0]); void'(dq.pop_front()); void'(dqt.pop_front());
      end
      if (dcs_req && dcs_gnt) dstore[longint'(dcs_addr)] = dcs_data;
    end
  end

  // ---------------- load program ----------------
  typedef struct { logic [63:0] va; logic err; logic [31:0] d; } ld_t;
  ld_t lprog [$];
  int lhead = 0, lstop = 0;
  assign ld_valid = lhead < lstop;
  assign ld_vaddr = (lhead < lprog.size()) ? lprog[lhead].va : '0;
  int k_in0, k_in2, k_loop;
  always @(posedge clk) if (ld_pop) lhead <= lhead + 1;
  task automatic add_ld(input logic [63:0] va, input logic err, input logic [31:0] d);
    ld_t e; e.va = va; e.err = err; e.d = d; lprog.push_back(e);
  endtask

  // ---------------- store program ----------------
  typedef struct { logic [63:0] va; logic [31:0] d; logic amo; } st_t;
  st_t sprog [$];
  int shead = 0, sstop = 0;
  assign st_valid = shead < sstop;
  assign st_vaddr = (shead < sprog.size()) ? sprog[shead].va : '0;
  assign st_data  = (shead < sprog.size()) ? sprog[shead].d : '0;
  assign st_amo   = (shead < sprog.size()) ? sprog[shead].amo : 1'b0;
  always @(posedge clk) if (st_pop) shead <= shead + 1;
  task automatic add_st(input logic [63:0] va, input logic [31:0] d, input logic amo);
    st_t e; e.va = va; e.d = d; e.amo = amo; sprog.push_back(e);
  endtask
  logic rnd_c, commit_all = 0;
  always @(negedge clk) rnd_c <= $urandom_range(3) != 0;
  assign commit = rnd_c || commit_all;
  assign flush  = 1'b0;   // flushes are covered by the store buffer's own testbench

  // ---------------- result checking and mechanism counters ----------------
  int n_res = 0, n_err_res = 0, n_sb_err = 0;
  int pop_cyc [$];
  longint lat_sum = 0; int lat_n = 0; logic lat_on = 0;
  int n_prefetch = 0, n_loop_ar = 0, n_isc_beats = 0, n_aw = 0, n_ldwait = 0, n_b2b = 0;
  int n_oq2 = 0, n_fwd = 0, n_wrap_in = 0, n_wrap_out = 0, n_req_first = 0, n_data_first = 0;
  int n_st_stall = 0, n_sb_full = 0, n_other = 0, n_tlb = 0, n_dcl = 0, n_dcs = 0;
  int n_in_werr = 0, n_in_miss = 0, n_out_werr = 0, n_out_miss = 0, n_reopen = 0;
  logic res_q = 0, res_stream_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (ld_pop) pop_cyc.push_back(cyc);
    if (res_valid) begin
      ld_t e; e = lprog[n_res];
      check(res_error == e.err && (e.err || res_data == e.d),
            $sformatf("load %0d (va %h): got %h err %0d", n_res, e.va, res_data, res_error));
      if (res_error) n_err_res++;
      if (lat_on) begin lat_sum += cyc - pop_cyc[0]; lat_n++; end
      void'(pop_cyc.pop_front());
      if (res_q && res_stream_q && is_stream_addr(e.va)) n_b2b++;
      n_res++;
    end
    res_q <= res_valid; res_stream_q <= res_valid && n_res < lprog.size() && is_stream_addr(lprog[n_res].va);
    if (sb_error) n_sb_err++;
    if (in_ar_valid && in_ar_ready) begin if (loop) n_loop_ar++; else n_prefetch++; end
    if (out_r_valid && out_r_ready) n_isc_beats++;
    if (out_aw_valid && out_aw_ready) n_aw++;
    if (dut.u_load_unit.pending != 0 && dut.u_load_unit.pend_stream && !res_valid) n_ldwait++;
    if (dut.u_isc.u_ld.q_cnt >= 2) n_oq2++;
    if (dut.u_isc.g_ch[0].u_ch.ld_rvalid && dut.u_isc.g_ch[0].u_ch.fwd_v &&
        dut.u_isc.g_ch[0].u_ch.fwd_idx == dut.u_isc.g_ch[0].u_ch.req_idx) n_fwd++;
    if (dut.u_isc.g_ch[0].u_ch.recycle && dut.u_isc.g_ch[0].u_ch.lb_idx == 8'hFF) n_wrap_in++;
    if (dut.u_osc.g_ch[0].u_ch.lbase[7:0] == 8'hFF && dut.u_osc.g_ch[0].u_ch.enabled) n_wrap_out++;
    if (dut.u_osc.g_ch[1].u_ch.push_st && dut.u_osc.g_ch[1].u_ch.mode == MODE_ISC) n_req_first++;
    if (dut.u_osc.g_ch[1].u_ch.push_ar) n_data_first++;
    if (dut.osc_req && !dut.osc_gnt && !out_miss_error && !out_word_error) n_st_stall++;
    if (st_valid && !dut.sb_ready) n_sb_full++;
    if (ld_valid && dut.u_load_unit.pending != 0 && dut.u_load_unit.state != 2'd1 &&
        dut.u_load_unit.pend_stream != is_stream_addr(ld_vaddr)) n_other++;
    if (ld_mmu_req && !ld_mmu_hit) n_tlb++;
    if (dcl_rvalid) n_dcl++;
    if (dcs_req && dcs_gnt) n_dcs++;
    if (in_word_error) n_in_werr++;
    if (in_miss_error && dut.u_load_unit.granted) n_in_miss++;
    if (out_word_error) n_out_werr++;
    if (out_miss_error) n_out_miss++;
  end

  task automatic cfg_chan_t(input bit in_side, input int c, input logic [31:0] t,
                            input logic [63:0] rb, input out_mode_e m);
    @(negedge clk);
    cfg_chan = chan_t'(c);
    cfg = '{enable: 1'b1, base_va: stream_va(t, 0), remote_base: rb, mode: m};
    in_cfg_we = in_side; out_cfg_we = !in_side;
    @(negedge clk);
    in_cfg_we = 0; out_cfg_we = 0;
  endtask

  task automatic need(input int n, input string what);
    check(n > 0, $sformatf("mechanism happened: %s (%0d)", what, n));
  endtask

  int t_first, t_1000, t_all, ld_start, st_start;
  initial begin
    in_cfg_we = 0; out_cfg_we = 0; cfg_chan = 0; cfg = '0;
    // ---- build phase A programs ----
    k_in0 = 0; k_in2 = 0; k_loop = 0;
    for (int i = 0; i < NLD; i++) begin
      int r; r = $urandom_range(99);
      if (r < 40 && k_loop < NST2 - 160) begin add_ld(stream_va(T_LOOP, k_loop), 0, sdata(2, k_loop)); k_loop++; end
      else if (r < 70) begin add_ld(stream_va(T_IN0, k_in0), 0, pat(MEM_IN0 + 64'(k_in0 * 4))); k_in0++; end
      else if (r < 85) begin add_ld(stream_va(T_IN2, k_in2), 0, pat(MEM_IN2 + 64'(k_in2 * 4))); k_in2++; end
      else begin
        logic [63:0] a; a = 64'h2000_0000 + 64'(i * 4);
        add_ld(a, 0, pat(xlate(a)));
      end
    end
    begin
      int k1, k2, ko; k1 = 0; k2 = 0; ko = 0;
      while (k1 < NST1 || k2 < NST2 || ko < NSTO) begin
        int r; r = $urandom_range(99);
        if (r < 50 && k2 < NST2) begin add_st(stream_va(T_ISC, k2), sdata(2, k2), 0); k2++; end
        else if (r < 90 && k1 < NST1) begin add_st(stream_va(T_OUT0, k1), sdata(1, k1), 0); k1++; end
        else if (ko < NSTO) begin
          add_st(64'h3000_0000 + 64'(ko * 4), sdata(3, ko), ($urandom_range(15) == 0)); ko++;
        end
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_chan_t(0, 1, T_ISC, LOOP, MODE_ISC);
    cfg_chan_t(0, 0, T_OUT0, MEM_OUT, MODE_MEM);
    cfg_chan_t(1, 0, T_IN0, MEM_IN0, MODE_MEM);
    cfg_chan_t(1, 1, T_LOOP, LOOP, MODE_MEM);
    cfg_chan_t(1, 2, T_IN2, MEM_IN2, MODE_MEM);
    check(in_chan_enabled == 4'b0111 && out_chan_enabled == 4'b0011, "channels open");
    // ---- phase A ----
    // stores start first, so the looped-back stream fills its window and its stores stall
    sstop = sprog.size();
    repeat (8000) @(negedge clk);
    lstop = lprog.size();
    wait (n_res == lprog.size() && shead == sprog.size());
    wait (sb_empty);
    repeat (400) @(negedge clk);
    for (int k = 0; k < NST1; k++)
      check(mem.rd_word(MEM_OUT + 64'(k * 4)) == sdata(1, k), $sformatf("memory word %0d of the outgoing stream", k));
    for (int k = 0; k < NSTO; k++)
      check(dstore.exists(longint'(xlate(64'h3000_0000 + 64'(k * 4)))) &&
            dstore[longint'(xlate(64'h3000_0000 + 64'(k * 4)))] == sdata(3, k), $sformatf("data cache store %0d", k));
    check(n_aw == NST1 / 16, $sformatf("one write burst per 64-Byte packet (%0d)", n_aw));
    // ---- phase B: errors ----
    add_ld(stream_va(T_IN0, k_in0 - 1), 1, 0);       // word already read
    add_ld(stream_va(T_NONE, 0), 1, 0);              // no channel
    add_ld(stream_va(T_IN0, k_in0), 0, pat(MEM_IN0 + 64'(k_in0 * 4)));  // stream continues
    lstop = lprog.size();
    add_st(stream_va(T_OUT0, NST1 - 1), 0, 0);       // word already written (now behind)
    add_st(stream_va(T_NONE, 0), 0, 0);              // no channel
    add_st(stream_va(T_OUT0, NST1), sdata(1, NST1), 0);
    sstop = sprog.size();
    wait (n_res == lprog.size() && shead == sprog.size());
    wait (sb_empty);
    repeat (5) @(negedge clk);
    check(n_err_res == 2, $sformatf("two loads ended with an error (%0d)", n_err_res));
    check(n_sb_err == 2, $sformatf("two stores dropped with an error (%0d)", n_sb_err));
    // ---- phase B2: reopen incoming ch2 and load from it and ch0 alternately: the ch2
    // loads wait for memory while ch0 loads are granted behind them (order queue) ----
    cfg_chan_t(1, 2, T_IN2 + 32'd2, MEM_IN2 + 64'h10_0000, MODE_MEM);
    n_reopen++;
    k_in0++;
    for (int k = 0; k < 8; k++) begin
      add_ld(stream_va(T_IN2 + 32'd2, k), 0, pat(MEM_IN2 + 64'h10_0000 + 64'(k * 4)));
      add_ld(stream_va(T_IN0, k_in0), 0, pat(MEM_IN0 + 64'(k_in0 * 4)));
      k_in0++;
    end
    lstop = lprog.size();
    wait (n_res == lprog.size());
    // ---- phase C: reopen incoming ch0, 16 KByte back to back ----
    cfg_chan_t(1, 0, T_IN0B, MEM_IN0B, MODE_MEM);
    n_reopen++;
    ld_start = lprog.size();
    for (int k = 0; k < 4096; k++) add_ld(stream_va(T_IN0B, k), 0, pat(MEM_IN0B + 64'(k * 4)));
    @(negedge clk);
    lat_on = 1;
    t_first = cyc;
    lstop = lprog.size();
    wait (n_res == ld_start + 2048);
    t_1000 = cyc;
    wait (n_res == ld_start + 3072);
    check(cyc - t_1000 == 1024, $sformatf("1024 back-to-back stream loads in 1024 cycles (%0d)", cyc - t_1000));
    wait (n_res == lprog.size());
    t_all = cyc;
    $display("16 KByte stream: %0d cycles, average load latency %0d.%02d cycles (grant to data)",
             t_all - t_first, lat_sum / lat_n, (lat_sum * 100 / lat_n) % 100);
    // ---- phase D: 4096 back-to-back stores to memory through outgoing ch0 ----
    commit_all = 1;
    st_start = sprog.size();
    for (int k = 1; k <= 4096; k++) add_st(stream_va(T_OUT0, NST1 + k), sdata(1, NST1 + k), 0);
    @(negedge clk);
    t_first = cyc;
    sstop = sprog.size();
    wait (shead == sprog.size());
    t_all = cyc;
    $display("4096 back-to-back stream stores: %0d cycles (%0d.%02d cycles per store)",
             t_all - t_first, (t_all - t_first) / 4096, ((t_all - t_first) * 100 / 4096) % 100);
    check(t_all - t_first <= 4096 + 8, "back-to-back stores at one per cycle");
    wait (sb_empty);
    repeat (600) @(negedge clk);
    for (int k = 0; k <= NST1 + 4096 - 16; k++)
      check(mem.rd_word(MEM_OUT + 64'(k * 4)) == sdata(1, k), $sformatf("memory word %0d after phase D", k));
    $display("phase A/B/C: prefetch=%0d loop-req=%0d isc-beats=%0d aw=%0d ldwait=%0d b2b=%0d oq2=%0d fwd=%0d",
             n_prefetch, n_loop_ar, n_isc_beats, n_aw, n_ldwait, n_b2b, n_oq2, n_fwd);
    $display("wrap-in=%0d wrap-out=%0d req-first=%0d data-first=%0d st-stall=%0d sb-full=%0d other=%0d tlb=%0d dcl=%0d dcs=%0d",
             n_wrap_in, n_wrap_out, n_req_first, n_data_first, n_st_stall, n_sb_full, n_other, n_tlb, n_dcl, n_dcs);
    // ---- every mechanism must have happened ----
    need(n_prefetch, "prefetch read bursts to memory");
    need(n_loop_ar, "read requests to the outgoing cache");
    need(n_isc_beats, "read responses from the outgoing cache");
    need(n_aw, "write-combined bursts to memory");
    need(n_ldwait, "loads waiting for data");
    need(n_b2b, "back-to-back stream loads");
    need(n_oq2, "response order queue holding two loads");
    need(n_fwd, "arriving line forwarded to a waiting load");
    need(n_wrap_in, "incoming buffer wrapped");
    need(n_wrap_out, "outgoing buffer wrapped");
    need(n_req_first, "ISC packet requested before written");
    need(n_data_first, "ISC packet written before requested");
    need(n_st_stall, "stream stores stalled by a full window");
    need(n_sb_full, "store buffer full");
    need(n_other, "load held for the other cache");
    need(n_tlb, "translation retries");
    need(n_dcl, "data cache loads");
    need(n_dcs, "data cache stores");
    need(n_in_werr, "incoming word error");
    need(n_in_miss, "incoming miss error");
    need(n_out_werr, "outgoing word error");
    need(n_out_miss, "outgoing miss error");
    need(n_reopen, "channel reopened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: loads %0d/%0d stores %0d/%0d", n_res, lprog.size(), shead, sprog.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
