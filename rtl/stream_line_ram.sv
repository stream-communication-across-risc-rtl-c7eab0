// stream_line_ram: the circular buffer of one stream channel, a simple two-port memory.
//
// Port A writes: any subset of the words of one line in a cycle (a whole 128-bit line
// from the network in an incoming channel, a single 32-bit word from a core store in an
// outgoing channel). Port B reads one whole line, registered: the line addressed in
// cycle t appears on rd_data in cycle t+1. A read of a line being written in the same
// cycle returns the old contents; the channels forward fresh network data themselves.
// The two-port block-RAM organisation with 256 lines of 128 bits (4 KByte) follows the
// published design; the read-before-write behaviour is this implementation's choice.
// The memory is not reset: the channels never hand out a word before writing it.
module stream_line_ram #(
  parameter int unsigned DEPTH  = stream_pkg::LINES,
  parameter int unsigned WORDS  = stream_pkg::WORDS_PER_LINE,
  parameter int unsigned WORD_W = stream_pkg::WORD_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic [WORDS-1:0]        wr_en,    // per-word write enable
  input  logic [AW-1:0]           wr_addr,
  input  logic [WORDS*WORD_W-1:0] wr_data,
  input  logic [AW-1:0]           rd_addr,
  output logic [WORDS*WORD_W-1:0] rd_data
);
  logic [WORDS*WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int w = 0; w < WORDS; w++)
      if (wr_en[w]) mem[wr_addr][w*WORD_W +: WORD_W] <= wr_data[w*WORD_W +: WORD_W];
    rd_data <= mem[rd_addr];
  end
endmodule
