// tb_stream_load_unit: drives the load unit with a random mix of stream and ordinary
// loads against a behavioural data cache (random grant, 2-6 cycle in-order latency), a
// behavioural stream cache (random grant, data 1-3 cycles after grant, in order) and a
// translation unit that misses one time in four. Checks that every result arrives in
// program order with the right data, that ordinary loads go to the data cache with the
// translated tag and stream loads to the stream cache untranslated, that a lone stream
// load is answered one cycle after its grant, that back-to-back stream loads pop one per
// cycle, that loads no channel owns and loads ending in a word error return res_error in
// order, and counts the WAIT_GRANT, translation-retry and other-cache-wait mechanisms.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_stream_load_unit;
  import stream_pkg::*;
  import tb_pkg::*;
  localparam int NLD = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic ld_valid, ld_pop, mmu_req, mmu_hit, dc_req, dc_gnt, dc_tag_valid, dc_rvalid;
  logic sc_req, sc_gnt, sc_tag_valid, sc_rvalid, res_valid, is_stream, res_error;
  logic sc_miss, sc_werr;
  // stream tags the behavioural stream cache treats as unowned (miss) and as erroneous words
  localparam logic [31:0] T_MISS = 32'h0000_010F, T_WERR = 32'h0000_010E;
  logic [63:0] ld_vaddr, mmu_vaddr, mmu_paddr, dc_addr, dc_tag, sc_addr;
  logic [31:0] dc_rdata, sc_rdata, res_data;

  stream_load_unit dut (.*);

  function automatic logic [63:0] xlate(input logic [63:0] va);
    return va ^ 64'h0000_0000_1000_0000;
  endfunction

  // load queue contents
  logic [63:0] lq [NLD];
  logic [31:0] expq [$];
  logic        errq [$];
  int head = 0, lone_mode = 0, lim = NLD;
  assign ld_valid = head < lim && !(lone_mode && expq.size() > 0);
  assign ld_vaddr = (head < NLD) ? lq[head] : '0;

  // random grant and translation hits, changed at each negedge
  logic dc_gnt_en, sc_gnt_en;
  always @(negedge clk) begin
    dc_gnt_en <= ($urandom_range(3) != 0);
    sc_gnt_en <= lone_mode ? 1'b1 : ($urandom_range(3) != 0);
    mmu_hit   <= ($urandom_range(3) != 0);
  end
  assign mmu_paddr = xlate(mmu_vaddr);
  assign dc_gnt    = dc_req && dc_gnt_en;
  assign sc_miss   = sc_req && sc_addr[63:32] == T_MISS;
  assign sc_gnt    = sc_req && sc_gnt_en && !sc_miss;

  // behavioural caches
  logic [63:0] dcq [$]; int dct [$];
  logic [63:0] scq [$]; int sct [$];
  int now = 0;
  logic dc_tag_due;
  always @(posedge clk) begin
    now <= now + 1;
    dc_rvalid <= 1'b0; sc_rvalid <= 1'b0; sc_werr <= 1'b0;
    if (rst_n) begin
      check(dc_tag_due == dc_tag_valid, "tag presented in the cycle after the grant");
      if (dc_tag_valid) begin dcq.push_back(dc_tag); dct.push_back(now + $urandom_range(1, 5)); end
      dc_tag_due <= dc_gnt;
      if (sc_gnt) begin
        check(is_stream_addr(sc_addr), "stream cache only sees stream addresses");
        scq.push_back(sc_addr); sct.push_back(now + (lone_mode ? 0 : $urandom_range(0, 2)));
      end
      if (dc_gnt) check(!is_stream_addr(dc_addr), "data cache only sees other addresses");
      if (dcq.size() > 0 && dct[0] <= now) begin
        dc_rvalid <= 1'b1; dc_rdata <= pat(dcq[0]); void'(dcq.pop_front()); void'(dct.pop_front());
      end
      if (scq.size() > 0 && sct[0] <= now) begin
        if (scq[0][63:32] == T_WERR) sc_werr <= 1'b1; else sc_rvalid <= 1'b1;
        sc_rdata <= pat(scq[0]); void'(scq.pop_front()); void'(sct.pop_front());
      end
    end
  end

  // bookkeeping and mechanism counters
  int n_experr = 0, n_errres = 0, n_res = 0, n_wait = 0, n_miss = 0, n_other = 0, n_b2b = 0, n_lone = 0;
  logic pop_q = 0, pop_stream_q = 0;
  int pop_t = 0;
  always @(posedge clk) if (rst_n) begin
    if (ld_pop) begin
      expq.push_back(is_stream_addr(ld_vaddr) ? pat(ld_vaddr) : pat(xlate(ld_vaddr)));
      errq.push_back(ld_vaddr[63:32] == T_MISS || ld_vaddr[63:32] == T_WERR);
      if (ld_vaddr[63:32] == T_MISS) check(dut.pending == 0, "unowned stream load taken only with nothing in flight");
      if (pop_q && pop_stream_q && is_stream_addr(ld_vaddr)) n_b2b++;
      head <= head + 1;
      pop_t <= now;
    end
    pop_q <= ld_pop; pop_stream_q <= ld_pop && is_stream_addr(ld_vaddr);
    if (res_valid) begin
      check(expq.size() > 0 && res_error == errq[0] && (errq[0] || res_data == expq[0]),
            $sformatf("result %0d in program order", n_res));
      if (res_error) n_errres++;
      if (expq.size() > 0) begin void'(expq.pop_front()); void'(errq.pop_front()); end
      n_res++;
      if (lone_mode) begin
        check(now == pop_t + 1, "lone stream load answered one cycle after its grant");
        n_lone++;
      end
    end
    check(!(dc_rvalid && sc_rvalid), "one result per cycle");
    if (dut.state == 2'd1) n_wait++;
    if (mmu_req && !mmu_hit) n_miss++;
    if (mmu_req) check(!is_stream_addr(mmu_vaddr), "no translation requested for a stream access");
    if (ld_valid && dut.state != 2'd1 && dut.pending != 0 &&
        dut.pend_stream != is_stream_addr(ld_vaddr)) n_other++;
  end

  initial begin
    for (int i = 0; i < NLD; i++) begin
      int run = $urandom_range(7);
      // runs of stream loads mixed with ordinary loads
      if (i % 97 == 50) lq[i] = stream_va(T_MISS, i);
      else if (i % 89 == 40) lq[i] = stream_va(T_WERR, i);
      else if ((i / 8) % 3 != 0) lq[i] = stream_va(TAG0 + 32'($urandom_range(3)), i);
      else lq[i] = {32'h0000_0000, 32'h2000_0000 + 32'(i * 4)};
      if (lq[i][63:32] == T_MISS || lq[i][63:32] == T_WERR) n_experr++;
    end
    dc_tag_due = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (head == NLD);
    wait (expq.size() == 0);
    repeat (5) @(negedge clk);
    check(n_res == NLD, "every load answered");
    check(n_errres == n_experr && n_experr > 50,
          $sformatf("unowned and erroneous stream loads end with res_error (%0d)", n_errres));
    check(n_wait > 0, $sformatf("WAIT_GRANT used (%0d)", n_wait));
    check(n_miss > 0, $sformatf("translation misses retried (%0d)", n_miss));
    check(n_other > 0, $sformatf("loads held for the other cache (%0d)", n_other));
    check(n_b2b > 0, $sformatf("back-to-back stream loads (%0d)", n_b2b));
    // lone stream loads with an always-granting stream cache: 2 cycles each
    for (int i = 0; i < 20; i++) lq[i] = stream_va(TAG1, i);
    @(negedge clk); lone_mode = 1; lim = 20; head = 0;
    wait (head == 20);
    wait (expq.size() == 0);
    repeat (3) @(negedge clk);
    check(n_lone == 20, $sformatf("lone loads answered (%0d)", n_lone));
    $display("waits=%0d tlb-misses=%0d other-cache=%0d back-to-back=%0d", n_wait, n_miss, n_other, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
