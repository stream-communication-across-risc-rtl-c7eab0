// tb_in_net_handler: checks the AXI4 read master adapter. Four channels each issue 50
// read requests; the slave's ARREADY is random. Checks that AR stays stable while
// stalled, that each channel's requests come out complete and in order, that with all
// channels requesting they are served in strict rotation, and that read data reach only
// the channel named in RID.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_in_net_handler;
  import stream_pkg::*;
  localparam int N = 4, PER = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [N-1:0] ch_ar_valid, ch_ar_ready, ch_r_valid;
  ax_t ch_ar [N];
  r_t  ch_r, m_r;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t m_ar;

  in_net_handler #(.N(N)) dut (.clk, .rst_n, .ch_ar_valid, .ch_ar, .ch_ar_ready, .ch_r_valid,
    .ch_r, .m_ar_valid, .m_ar, .m_ar_ready, .m_r_valid, .m_r, .m_r_ready);

  int sent [N];      // requests accepted per channel
  int seen [N];      // requests observed on AR per channel
  int last_ch = -1, rot_ok = 0, rot_bad = 0;
  logic stalled_q = 0;
  ax_t  ar_q;

  always_comb
    for (int i = 0; i < N; i++) begin
      ch_ar_valid[i] = rst_n && (sent[i] < PER);
      ch_ar[i].id    = {2'(i), 8'(sent[i] * 4)};
      ch_ar[i].addr  = 64'(i) << 32 | 64'(sent[i] * 64);
      ch_ar[i].len   = 8'd3;
    end

  always @(posedge clk) if (rst_n) begin
    if (stalled_q) check(m_ar_valid && m_ar == ar_q, "AR stable while stalled");
    stalled_q <= m_ar_valid && !m_ar_ready;
    ar_q      <= m_ar;
    if (m_ar_valid && m_ar_ready) begin
      int c;
      c = int'(m_ar.id[9:8]);
      check(m_ar.addr == (64'(c) << 32 | 64'(seen[c] * 64)), "channel requests in order");
      check(ch_ar_ready[c] && $onehot(ch_ar_ready), "ready returned to the chosen channel");
      seen[c]++;
      sent[c] <= sent[c] + 1;
      if (&ch_ar_valid && last_ch >= 0) begin
        if (c == (last_ch + 1) % N) rot_ok++; else rot_bad++;
      end
      last_ch = c;
    end
  end

  initial begin
    m_ar_ready = 0; m_r_valid = 0; m_r = '0;
    for (int i = 0; i < N; i++) begin sent[i] = 0; seen[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      m_ar_ready = ($urandom_range(2) != 0);
      m_r_valid  = ($urandom_range(1) == 1);
      m_r.id     = 10'($urandom);
      m_r.data   = {4{$urandom}};
      m_r.last   = 1'($urandom);
      #1;
      check(m_r_ready, "read data always accepted");
      for (int i = 0; i < N; i++)
        check(ch_r_valid[i] == (m_r_valid && int'(m_r.id[9:8]) == i), "R routed by ID");
      check(ch_r == m_r, "R payload passed");
    end
    for (int i = 0; i < N; i++) check(seen[i] == PER, $sformatf("channel %0d served %0d", i, seen[i]));
    check(rot_bad == 0 && rot_ok > 100, $sformatf("round robin rotation ok=%0d bad=%0d", rot_ok, rot_bad));
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
