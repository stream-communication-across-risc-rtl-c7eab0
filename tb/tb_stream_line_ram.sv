// tb_stream_line_ram: checks the circular-buffer memory against a reference array:
// per-word write enables, one-cycle read latency, and old data on a same-cycle
// read of the line being written.
// The behaviour and cycle counts checked are those of the published design (two cycles
// for a lone access, one back to back, 64-Byte packets, in-order answers); the stimulus,
// the reference models and the test sizes are this testbench's own.
module tb_stream_line_ram;
  localparam int DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]   wr_en;
  logic [7:0]   wr_addr, rd_addr;
  logic [127:0] wr_data, rd_data;
  logic [127:0] ref_mem [DEPTH];

  stream_line_ram dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  logic [127:0] expd;
  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    // fill every line
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 4'hF; wr_addr = 8'(i);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // random partial writes and reads
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en   = 4'($urandom);
      wr_addr = 8'($urandom);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      rd_addr = (n % 5 == 0) ? wr_addr : 8'($urandom);
      expd = ref_mem[rd_addr];   // value before this cycle's write
      for (int w = 0; w < 4; w++)
        if (wr_en[w]) ref_mem[wr_addr][w*32 +: 32] = wr_data[w*32 +: 32];
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (rd_data !== expd) begin
        failures++;
        if (failures < 5) $display("FAIL read %0d", rd_addr);
      end
    end
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
