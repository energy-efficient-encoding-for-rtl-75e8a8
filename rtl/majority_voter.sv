// majority_voter: decides the half (odd) inversion of a flit.
//
// It counts the set inputs, one per Ty detector, and raises inv when the
// count is greater than half of BUS_W, the data width of the flit. Purely
// combinational. The rule "more than half the bus width" is the design's;
// implementing it as a population count and compare is this design's.
module majority_voter #(
  parameter int unsigned N_IN  = 8,   // number of Ty flags
  parameter int unsigned BUS_W = 8    // data width the threshold refers to
) (
  input  logic [N_IN-1:0] votes,
  output logic            inv
);

  localparam int unsigned CW = $clog2(N_IN + 1);

  logic [CW-1:0] count;

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N_IN; i++) count = count + CW'(votes[i]);
    inv = (32'(count) * 2) > BUS_W;
  end

endmodule
