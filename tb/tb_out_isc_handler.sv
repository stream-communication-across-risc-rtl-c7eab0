// tb_out_isc_handler: checks the AXI4 read slave adapter. Read requests are passed to
// the channels and accepted only when a channel claims them; four behavioural channels
// each answer 40 four-beat bursts (with random gaps) while RREADY is random. Checks
// that beats of one burst are never interleaved with another channel's, that RVALID and
// the payload hold while stalled, and that all channels are served.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_out_isc_handler;
  import stream_pkg::*;
  localparam int N = 4, PER = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic ch_ar_valid, ch_ar_fire, s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t  ch_ar, s_ar;
  logic [N-1:0] ch_ar_hit, ch_r_valid, ch_r_ready;
  r_t   ch_r [N];
  r_t   s_r;

  out_isc_handler #(.N(N)) dut (.clk, .rst_n, .ch_ar_valid, .ch_ar, .ch_ar_hit, .ch_ar_fire,
    .ch_r_valid, .ch_r, .ch_r_ready, .s_ar_valid, .s_ar, .s_ar_ready, .s_r_valid, .s_r, .s_r_ready);

  int bursts [N], beat [N];
  logic gap [N];
  always_comb
    for (int i = 0; i < N; i++) begin
      ch_ar_hit[i]  = ch_ar_valid && (int'(ch_ar.addr[33:32]) == i) && !ch_ar.addr[40];
      ch_r_valid[i] = rst_n && bursts[i] < PER && !gap[i];
      ch_r[i].id    = {2'(i), 8'(bursts[i])};
      ch_r[i].data  = {120'(0), 8'(beat[i])};
      ch_r[i].last  = (beat[i] == 3);
    end

  int cur = -1, exp_beat = 0, done = 0;
  logic stall_q = 0;
  r_t   r_q;
  always @(posedge clk) if (rst_n) begin
    if (stall_q) check(s_r_valid && s_r == r_q, "R held while stalled");
    stall_q <= s_r_valid && !s_r_ready;
    r_q     <= s_r;
    for (int i = 0; i < N; i++) begin
      // a channel may only pause between bursts, not inside one (like the real channel)
      if (!ch_r_valid[i] || ch_r_ready[i])
        gap[i] <= ((ch_r_valid[i] && ch_r[i].last) || (beat[i] == 0 && !ch_r_valid[i])) &&
                  ($urandom_range(3) == 0);
      if (ch_r_valid[i] && ch_r_ready[i]) begin
        beat[i] <= (beat[i] + 1) % 4;
        if (ch_r[i].last) bursts[i] <= bursts[i] + 1;
      end
    end
    if (s_r_valid && s_r_ready) begin
      if (exp_beat == 0) cur = int'(s_r.id[9:8]);
      check(int'(s_r.id[9:8]) == cur, "no interleaving of bursts");
      check(s_r.data[7:0] == 8'(exp_beat), "beats in order");
      exp_beat = (exp_beat + 1) % 4;
      if (s_r.last) done++;
    end
  end

  initial begin
    s_ar_valid = 0; s_ar = '0; s_r_ready = 0;
    for (int i = 0; i < N; i++) begin bursts[i] = 0; beat[i] = 0; gap[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000 && done < N * PER; n++) begin
      @(negedge clk);
      s_r_ready  = ($urandom_range(3) != 0);
      s_ar_valid = ($urandom_range(1) == 1);
      s_ar.addr  = {23'(0), 1'($urandom_range(3) == 0), 6'(0), 2'($urandom), 32'(0)};
      s_ar.id    = 10'($urandom);
      #1;
      check(ch_ar_valid == s_ar_valid && ch_ar == s_ar, "request broadcast");
      check(s_ar_ready == (|ch_ar_hit), "accepted only when claimed");
      check(ch_ar_fire == (s_ar_valid && |ch_ar_hit), "fire when taken");
    end
    check(done == N * PER, $sformatf("all bursts sent: %0d", done));
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
