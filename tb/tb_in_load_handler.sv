// tb_in_load_handler: checks the response ordering of the Incoming Stream Cache's load
// handler. Four behavioural channels take loads (one each at most) and become ready
// after random delays, i.e. out of order; the handler must let them answer strictly in
// grant order, one at a time, and pass data and word errors through. Also checks the
// miss_error for a load no channel owns and back-to-back grants to one channel.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_in_load_handler;
  import stream_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic ld_req, ld_gnt, ld_rvalid, miss_error, word_error;
  logic [31:0] ld_rdata;
  logic [N-1:0] ch_hit, ch_gnt, ch_rvalid, ch_werr, resp_allow;
  logic [31:0] ch_rdata [N];

  in_load_handler #(.N(N)) dut (.clk, .rst_n, .ld_req, .ld_gnt, .ld_rvalid, .ld_rdata,
    .miss_error, .word_error, .ch_hit, .ch_gnt, .ch_rvalid, .ch_rdata, .ch_werr, .resp_allow);

  // behavioural channels
  logic        busy [N];
  int          ready_at [N];
  logic [31:0] val [N];
  logic        iserr [N];
  int          cyc = 0;
  int          target;
  logic [31:0] seq = 0;
  logic [31:0] expq [$];
  logic        experr [$];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ch_hit[i]    = ld_req && (target == i);
      ch_rvalid[i] = busy[i] && resp_allow[i] && cyc >= ready_at[i] && !iserr[i];
      ch_werr[i]   = busy[i] && resp_allow[i] && cyc >= ready_at[i] && iserr[i];
      ch_rdata[i]  = val[i];
      ch_gnt[i]    = ch_hit[i] && (!busy[i] || ch_rvalid[i] || ch_werr[i]);
    end
  end

  int n_resp = 0, n_werr = 0, n_b2b = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    check($onehot0(resp_allow), "at most one channel may answer");
    if (ld_rvalid || word_error) begin
      check(expq.size() > 0, "response with nothing expected");
      if (expq.size() > 0) begin
        logic [31:0] e; logic ee;
        e = expq.pop_front(); ee = experr.pop_front();
        check(word_error == ee, "error flag in order");
        if (!ee) check(ld_rdata == e, "data in grant order");
      end
      if (word_error) n_werr++; else n_resp++;
    end
    for (int i = 0; i < N; i++) begin
      if ((ch_rvalid[i] || ch_werr[i]) && !ch_gnt[i]) busy[i] <= 1'b0;
      if (ch_gnt[i]) begin
        if (busy[i]) n_b2b++;
        busy[i]     <= 1'b1;
        ready_at[i] <= cyc + $urandom_range(8);
        val[i]      <= seq;
        iserr[i]    <= (seq % 16 == 5);
      end
    end
  end

  // remember expected values at grant time (blocking, before the posedge update)
  always @(posedge clk) if (rst_n && ld_gnt) begin
    expq.push_back(seq);
    experr.push_back(seq % 16 == 5);
  end

  initial begin
    ld_req = 0; target = 0;
    for (int i = 0; i < N; i++) begin busy[i] = 0; ready_at[i] = 0; val[i] = 0; iserr[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // keep requesting until granted
      ld_req = 1; target = (n % 7 < 3) ? 1 : $urandom_range(N - 1);
      #1;
      while (!ld_gnt) begin @(negedge clk); #1; end
      seq = seq + 1;
    end
    @(negedge clk); ld_req = 0;
    // a stream load no channel owns
    @(negedge clk); ld_req = 1; target = 9; #1;
    check(miss_error && !ld_gnt, "miss_error for an unowned load");
    @(negedge clk); ld_req = 0;
    repeat (30) @(negedge clk);
    check(n_resp + n_werr == 3000, $sformatf("all loads answered (%0d)", n_resp + n_werr));
    check(n_werr > 0 && n_b2b > 0, "errors and back-to-back grants happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
