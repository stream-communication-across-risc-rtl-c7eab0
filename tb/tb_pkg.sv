// tb_pkg: helpers shared by the testbenches: the reference data pattern of the model
// memory and the stream addresses used by the tests.
// These helpers are the test suite's own; the address layout they build follows the
// design's stream region and 4 GByte stream slices.
package tb_pkg;
  import stream_pkg::*;

  // Contents of a never-written memory word: a fixed scramble of its byte address.
  function automatic logic [31:0] pat(input logic [63:0] a);
    logic [31:0] x;
    x = a[31:0] ^ {a[63:48], a[47:32]};
    return (x * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  // Virtual address of word k of the stream with tag t (upper 32 bits of the address).
  function automatic logic [63:0] stream_va(input logic [31:0] t, input longint unsigned k);
    return {t, 32'(k * 4)};
  endfunction

  // stream tags inside the stream region (bits 63:40 = 0x000001)
  localparam logic [31:0] TAG0 = 32'h0000_0100;
  localparam logic [31:0] TAG1 = 32'h0000_0101;
  localparam logic [31:0] TAG2 = 32'h0000_0102;
  localparam logic [31:0] TAG3 = 32'h0000_0103;
endpackage
