// ty_detect: Type I transition detector for one pair of adjacent link wires.
//
// Transitions on two neighbouring wires are classed by comparing the pair's
// previous value (y0, y1) with the value about to be sent (x0, x1):
//   Type I   exactly one of the two wires toggles,
//   Type II  both toggle in opposite directions (01 <-> 10),
//   Type III both toggle in the same direction (00 <-> 11),
//   Type IV  neither toggles.
// Odd inversion of the flit turns a Type I pair into Type III or IV, so the
// encoder counts Type I pairs. The output is high for a Type I pair. Purely
// combinational. The classification follows the design's transition table;
// the gate-level form is this design's.
module ty_detect (
  input  logic x0,   // current value, lower wire of the pair
  input  logic x1,   // current value, upper wire of the pair
  input  logic y0,   // previous value, lower wire
  input  logic y1,   // previous value, upper wire
  output logic ty    // high: the pair would see a Type I transition
);

  always_comb ty = (x0 ^ y0) ^ (x1 ^ y1);

endmodule
