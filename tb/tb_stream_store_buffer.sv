// tb_stream_store_buffer: pushes random stream and ordinary stores (whenever `ready`
// allows), commits them at random, flushes the speculative queue now and then, and
// grants the data cache and the stream cache at random. A reference model of the two
// queues checks that exactly the committed stores leave, in commit order, each to the
// right cache (stream stores by virtual address, others by physical address), that a
// stream store refused with sc_err is dropped and reported on st_error, that
// `ready` and `commit_ready` follow the queue depths (4 and 8), and that `empty` is right.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_stream_store_buffer;
  import stream_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic flush, push_valid, ready, commit, commit_ready, dc_req, dc_gnt, sc_req, sc_gnt, empty;
  logic sc_err, st_error;
  st_entry_t push_entry;
  logic [63:0] dc_addr, sc_addr;
  logic [31:0] dc_data, sc_data;

  stream_store_buffer dut (.*);

  st_entry_t mspec [$], mcmt [$];
  int n_drop = 0, n_push = 0, n_commit = 0, n_flush = 0, n_dc = 0, n_sc = 0, n_full = 0, n_cfull = 0;
  logic ready_q = 1;

  function automatic st_entry_t rnd_entry();
    st_entry_t e;
    e.is_stream = $urandom_range(1);
    e.vaddr = e.is_stream ? stream_va(TAG0 + 32'($urandom_range(3)), $urandom_range(4000))
                          : {32'h0, $urandom} & ~64'h3;
    e.paddr = e.is_stream ? e.vaddr : e.vaddr ^ 64'h1000_0000;
    e.data  = $urandom;
    return e;
  endfunction

  // drive at negedge, respecting the ready of the previous cycle
  always @(negedge clk) if (rst_n) begin
    push_valid <= ready_q && ($urandom_range(2) != 0);
    push_entry <= rnd_entry();
    commit     <= ($urandom_range(2) != 0);
    flush      <= ($urandom_range(60) == 0);
    dc_gnt     <= ($urandom_range(3) == 0);
    sc_gnt     <= ($urandom_range(1) == 0);
    sc_err     <= ($urandom_range(9) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    // queue-depth flags against the model
    check(ready == (mspec.size() + (push_valid ? 1 : 0) < 4), "ready");
    check(commit_ready == (mcmt.size() < 8), "commit_ready follows the commit queue");
    check(empty == (mspec.size() == 0 && mcmt.size() == 0), "empty");
    check(dc_req == (mcmt.size() > 0 && !mcmt[0].is_stream), "data cache request");
    check(sc_req == (mcmt.size() > 0 && mcmt[0].is_stream), "stream cache request");
    if (dc_req) check(dc_addr == mcmt[0].paddr && dc_data == mcmt[0].data, "data cache store");
    if (sc_req) check(sc_addr == mcmt[0].vaddr && sc_data == mcmt[0].data, "stream cache store");
    if (mspec.size() == 4) n_full++;
    if (mcmt.size() == 8) n_cfull++;
    // update the model as the RTL does
    check(st_error == (sc_req && sc_err && !sc_gnt), "refused stream store reported");
    if (st_error) n_drop++;
    if ((dc_req && dc_gnt) || (sc_req && (sc_gnt || sc_err))) begin
      if (dc_req) n_dc++; else n_sc++;
      void'(mcmt.pop_front());
    end
    if (flush) begin
      if (commit && mspec.size() > 0 && commit_ready) ; // flush wins
      mspec.delete();
      n_flush++;
    end else begin
      if (commit && mspec.size() > 0 && commit_ready) begin
        mcmt.push_back(mspec.pop_front());
        n_commit++;
      end
      if (push_valid) begin mspec.push_back(push_entry); n_push++; end
    end
    check(mspec.size() <= 4, "speculative queue never overfilled");
    ready_q <= ready;
  end

  initial begin
    push_valid = 0; push_entry = '0; commit = 0; sc_err = 0; flush = 0; dc_gnt = 0; sc_gnt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    check(n_full > 0 && n_cfull > 0, $sformatf("both queues filled (%0d, %0d)", n_full, n_cfull));
    check(n_flush > 0 && n_dc > 0 && n_sc > 0 && n_drop > 0, "flushes, data cache, stream cache and dropped stores seen");
    $display("pushes=%0d commits=%0d flushes=%0d to-dcache=%0d to-stream=%0d", n_push, n_commit, n_flush, n_dc, n_sc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
