// tb_out_mem_handler: checks the AXI4 write master adapter. Four behavioural channels
// each write 40 four-beat bursts (beats with random gaps) while the slave's AWREADY and
// WREADY are random. Checks that W beats always belong to the last accepted AW, come in
// order and end with WLAST, that no channel is starved, and that write responses reach
// only the channel named in BID.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_out_mem_handler;
  import stream_pkg::*;
  localparam int N = 4, PER = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  logic [N-1:0] ch_aw_valid, ch_aw_ready, ch_w_valid, ch_w_ready, ch_b_valid;
  ax_t ch_aw [N];
  w_t  ch_w [N];
  b_t  ch_b, m_b;
  logic m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  ax_t m_aw;
  w_t  m_w;

  out_mem_handler #(.N(N)) dut (.clk, .rst_n, .ch_aw_valid, .ch_aw, .ch_aw_ready, .ch_w_valid,
    .ch_w, .ch_w_ready, .ch_b_valid, .ch_b, .m_aw_valid, .m_aw, .m_aw_ready, .m_w_valid, .m_w,
    .m_w_ready, .m_b_valid, .m_b, .m_b_ready);

  // behavioural channel state
  int   bursts [N];
  logic in_data [N];
  int   beat [N];
  logic gap [N];

  always_comb
    for (int i = 0; i < N; i++) begin
      ch_aw_valid[i] = rst_n && !in_data[i] && bursts[i] < PER;
      ch_aw[i].id    = {2'(i), 8'(bursts[i] * 4)};
      ch_aw[i].addr  = 64'(i * 1000 + bursts[i]);
      ch_aw[i].len   = 8'd3;
      ch_w_valid[i]  = in_data[i] && !gap[i];
      ch_w[i].data   = {96'(0), 8'(i), 16'(bursts[i]), 8'(beat[i])};
      ch_w[i].strb   = '1;
      ch_w[i].last   = (beat[i] == 3);
    end

  ax_t cur_aw;
  logic have_aw = 0;
  int   exp_beat = 0;
  int   done_bursts = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      gap[i] <= ($urandom_range(3) == 0);
      if (ch_aw_valid[i] && ch_aw_ready[i]) begin in_data[i] <= 1'b1; beat[i] <= 0; end
      if (ch_w_valid[i] && ch_w_ready[i]) begin
        beat[i] <= beat[i] + 1;
        if (ch_w[i].last) begin in_data[i] <= 1'b0; bursts[i] <= bursts[i] + 1; end
      end
    end
    if (m_aw_valid && m_aw_ready) begin
      check(!have_aw, "no new AW before the previous burst's data finished");
      cur_aw = m_aw; have_aw = 1; exp_beat = 0;
    end else if (m_w_valid && m_w_ready) begin
      check(have_aw, "W only after its AW");
      check(m_w.data[31:24] == 8'(cur_aw.id[9:8]) && m_w.data[23:8] == 16'(cur_aw.addr % 1000),
            "W beat belongs to the current burst");
      check(m_w.data[7:0] == 8'(exp_beat), "beats in order");
      check(m_w.last == (exp_beat == 3), "WLAST on the fourth beat");
      exp_beat++;
      if (m_w.last) begin have_aw = 0; done_bursts++; end
    end
  end

  initial begin
    m_aw_ready = 0; m_w_ready = 0; m_b_valid = 0; m_b = '0;
    for (int i = 0; i < N; i++) begin bursts[i] = 0; in_data[i] = 0; beat[i] = 0; gap[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000 && done_bursts < N * PER; n++) begin
      @(negedge clk);
      m_aw_ready = ($urandom_range(1) == 1);
      m_w_ready  = ($urandom_range(3) != 0);
      m_b_valid  = ($urandom_range(1) == 1);
      m_b.id     = 10'($urandom);
      #1;
      check(m_b_ready, "write responses always accepted");
      for (int i = 0; i < N; i++)
        check(ch_b_valid[i] == (m_b_valid && int'(m_b.id[9:8]) == i), "B routed by ID");
    end
    check(done_bursts == N * PER, $sformatf("all bursts written: %0d", done_bursts));
    for (int i = 0; i < N; i++) check(bursts[i] == PER, "every channel served");
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
