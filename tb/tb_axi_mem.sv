// tb_axi_mem: behavioural AXI4 memory for the testbenches (not part of the design).
//
// Read slave: takes every request at once; after LAT cycles it answers with the burst's
// beats (one 128-bit line each, in order). With OOO set, bursts whose latency has passed
// are answered in random order and beats may have random gaps. Unwritten words read as
// tb_pkg::pat(address). Write slave: takes one write burst at a time (AW then W beats),
// stores the words and answers with B after LAT cycles. Counts requests and beats.
// Interface: an AXI4 read slave and write slave of the reduced bundles of stream_pkg;
// timing set by LAT. It stands in for the interconnect and DRAM, which the design
// leaves outside; its behaviour is this testbench suite's own.
module tb_axi_mem
  import stream_pkg::*;
#(
  parameter int LAT = 10,
  parameter bit OOO = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ar_valid,
  input  ax_t  ar,
  output logic ar_ready,
  output logic r_valid,
  output r_t   r,
  input  logic r_ready,
  input  logic aw_valid,
  input  ax_t  aw,
  output logic aw_ready,
  input  logic w_valid,
  input  w_t   w,
  output logic w_ready,
  output logic b_valid,
  output b_t   b,
  input  logic b_ready
);
  typedef struct {
    ax_t    req;
    longint due;
  } pend_t;

  logic [31:0] mem [longint];
  pend_t       rq [$];
  pend_t       bq [$];
  longint      cyc;
  int          n_ar, n_r, n_aw, n_w, n_b;

  // current read burst
  logic        rbusy;
  ax_t         rcur;
  int          rbeat;
  // current write burst
  logic        wbusy;
  ax_t         wcur;
  int          wbeat;

  function automatic logic [31:0] rd_word(input logic [63:0] a);
    if (mem.exists(longint'(a))) return mem[longint'(a)];
    return tb_pkg::pat(a);
  endfunction

  function automatic logic [LINE_W-1:0] rd_line(input logic [63:0] a);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < WORDS_PER_LINE; i++) l[i*32 +: 32] = rd_word(a + 64'(i * 4));
    return l;
  endfunction

  assign ar_ready = 1'b1;
  assign aw_ready = !wbusy;
  assign w_ready  = wbusy;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; rbusy <= 0; wbusy <= 0; r_valid <= 0; b_valid <= 0;
      n_ar <= 0; n_r <= 0; n_aw <= 0; n_w <= 0; n_b <= 0;
      rbeat <= 0; wbeat <= 0; r <= '0; b <= '0;
    end else begin
      cyc <= cyc + 1;
      // ---- reads ----
      if (ar_valid) begin
        pend_t p;
        p.req = ar; p.due = cyc + LAT;
        rq.push_back(p);
        n_ar <= n_ar + 1;
      end
      if (r_valid && r_ready) begin
        n_r <= n_r + 1;
        r_valid <= 1'b0;
        if (r.last) rbusy <= 1'b0;
        else rbeat <= rbeat + 1;
      end
      if (!rbusy && !(r_valid && r_ready && !r.last)) begin
        int pick;
        pick = -1;
        foreach (rq[i]) if (rq[i].due <= cyc && (pick < 0 || (OOO && $urandom_range(1) == 1))) pick = i;
        if (pick >= 0) begin
          rcur  <= rq[pick].req;
          rbeat <= 0;
          rbusy <= 1'b1;
          rq.delete(pick);
        end
      end
      if (rbusy && !(r_valid && !r_ready) && !(r_valid && r_ready && r.last)) begin
        int bt;
        bt = (r_valid && r_ready) ? rbeat + 1 : rbeat;
        if (!OOO || $urandom_range(3) != 0) begin
          r_valid <= 1'b1;
          r.id    <= rcur.id;
          r.data  <= rd_line(rcur.addr + 64'(bt * LINE_BYTES));
          r.last  <= (bt == int'(rcur.len));
        end
      end
      // ---- writes ----
      if (aw_valid && aw_ready) begin
        wcur <= aw; wbeat <= 0; wbusy <= 1'b1; n_aw <= n_aw + 1;
      end
      if (w_valid && w_ready) begin
        for (int i = 0; i < WORDS_PER_LINE; i++)
          mem[longint'(wcur.addr) + longint'(wbeat * LINE_BYTES + i * 4)] = w.data[i*32 +: 32];
        wbeat <= wbeat + 1;
        n_w <= n_w + 1;
        if (w.last) begin
          pend_t p;
          p.req = wcur; p.due = cyc + LAT;
          bq.push_back(p);
          wbusy <= 1'b0;
        end
      end
      if (b_valid && b_ready) begin
        b_valid <= 1'b0;
        n_b <= n_b + 1;
      end else if (!b_valid && bq.size() > 0 && bq[0].due <= cyc) begin
        b_valid <= 1'b1;
        b.id    <= bq[0].req.id;
        void'(bq.pop_front());
      end
    end
  end
endmodule
