// up_counter: free-running binary up counter with count enable.
//
// It produces the read address of the test-data memory at the head of the
// link. On each rising clock edge with ce high the count increments by one and
// wraps at 2**WIDTH; with ce low it holds. rst clears it to zero on the next
// clock edge (synchronous, active high). The 8-bit width, the enable and the
// reset input come from the design's block diagram; the reset polarity and
// its synchronous timing are this design's choice.
module up_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= q + WIDTH'(1);
  end

endmodule
