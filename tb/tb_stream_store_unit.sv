// tb_stream_store_unit: feeds a random mix of stream, ordinary and atomic stores through
// the store unit while the store buffer's room (sb_ready) and the translation hits are
// random. Checks that the stores reach the store buffer in program order with the right
// address (stream stores untranslated, others translated), data and stream flag; that a
// store taken in cycle t is pushed in t+1 (two cycles for a lone store, one per cycle
// back to back); that nothing is taken in the cycle after an atomic store; and counts
// the WAIT_SB_READY and translation-retry mechanisms.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_stream_store_unit;
  import stream_pkg::*;
  import tb_pkg::*;
  localparam int NST = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic st_valid, st_amo, st_pop, mmu_req, mmu_hit, sb_ready, sb_valid;
  logic [63:0] st_vaddr, mmu_vaddr, mmu_paddr;
  logic [31:0] st_data;
  st_entry_t sb_entry;

  stream_store_unit dut (.*);

  function automatic logic [63:0] xlate(input logic [63:0] va);
    return va ^ 64'h0000_0000_3000_0000;
  endfunction

  logic [63:0] sq_a [NST]; logic [31:0] sq_d [NST]; logic sq_amo [NST];
  int head = 0, lim = NST, full_ready = 0;
  assign st_valid = head < lim;
  assign st_vaddr = sq_a[head < NST ? head : 0];
  assign st_data  = sq_d[head < NST ? head : 0];
  assign st_amo   = sq_amo[head < NST ? head : 0];
  assign mmu_paddr = xlate(mmu_vaddr);

  always @(negedge clk) begin
    sb_ready <= full_ready ? 1'b1 : ($urandom_range(4) != 0);
    mmu_hit  <= full_ready ? 1'b1 : ($urandom_range(3) != 0);
  end

  int n_push = 0, n_wait = 0, n_miss = 0, n_amo_hold = 0, n_b2b = 0;
  logic pop_q = 0, amo_q = 0;
  always @(posedge clk) if (rst_n) begin
    check(sb_valid == pop_q, "store pushed in the cycle after it was taken");
    if (sb_valid) begin
      logic [63:0] a; a = sq_a[n_push];
      check(sb_entry.vaddr == a && sb_entry.data == sq_d[n_push] &&
            sb_entry.is_stream == is_stream_addr(a) &&
            sb_entry.paddr == (is_stream_addr(a) ? a : xlate(a)),
            $sformatf("store %0d pushed intact and in order", n_push));
      n_push++;
    end
    if (amo_q) begin check(!st_pop, "nothing taken right after an atomic store"); if (st_valid) n_amo_hold++; end
    if (st_pop && pop_q) n_b2b++;
    if (dut.state == 2'd1) n_wait++;
    if (mmu_req && !mmu_hit) n_miss++;
    if (mmu_req) check(!is_stream_addr(mmu_vaddr), "no translation requested for a stream access");
    if (st_pop) head <= head + 1;
    pop_q <= st_pop;
    amo_q <= st_pop && st_amo;
  end

  int t0;
  initial begin
    for (int i = 0; i < NST; i++) begin
      sq_a[i] = ((i / 5) % 2 == 0) ? stream_va(TAG0 + 32'($urandom_range(3)), i)
                                   : {32'h0, 32'h2000_0000 + 32'(i * 4)};
      sq_d[i] = $urandom;
      sq_amo[i] = ($urandom_range(30) == 0) && !is_stream_addr(sq_a[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (head == NST);
    repeat (4) @(negedge clk);
    check(n_push == NST, "every store pushed");
    check(n_wait > 0, $sformatf("WAIT_SB_READY used (%0d)", n_wait));
    check(n_miss > 0, $sformatf("translation misses retried (%0d)", n_miss));
    check(n_amo_hold > 0, $sformatf("held after atomic stores (%0d)", n_amo_hold));
    // back-to-back stream stores with room and hits: one per cycle
    for (int i = 0; i < 100; i++) begin sq_a[i] = stream_va(TAG1, i); sq_amo[i] = 0; end
    @(negedge clk); full_ready = 1; @(negedge clk); @(negedge clk);
    n_push = 0; n_b2b = 0; t0 = $time; head = 0; lim = 100;
    wait (n_push == 100);
    // first store taken at cycle 1, pushed at 2; the 100th pushed at cycle 101, sampled at its end
    check(($time - t0) / 10 == 100, $sformatf("100 stores pushed by cycle 101 (%0d)", ($time - t0) / 10));
    check(n_b2b == 99, "taken back to back");
    $display("waits=%0d misses=%0d amo-holds=%0d", n_wait, n_miss, n_amo_hold);
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
