// flit_source: read-only test-data memory that feeds random flits to the link.
//
// The link is exercised with random data. This block holds 2**ADDR_W words of
// DATA_W bits, filled at start-up with noc_enc_pkg::test_word(a) for word a
// (the low DATA_W bits of a 64-bit mixing function), and returns the word at
// addr one clock after the address is presented (registered read). rst clears
// the output register. The 8-bit address and data widths come from the block
// diagram; the contents, the registered read and the reset are this design's
// own choices.
module flit_source
  import noc_enc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      mem[a] = DATA_W'(test_word(a));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else     data <= mem[addr];
  end

endmodule
