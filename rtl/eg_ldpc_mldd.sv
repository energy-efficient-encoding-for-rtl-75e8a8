// eg_ldpc_mldd: one-step majority-logic decoder (MLDD) of the (63,37)
// EG-LDPC code.
//
// For every code bit j the decoder forms the eight parity check sums of the
// lines of EG(2, 2^3) that pass through point j and miss the origin. The
// lines meet only in point j, so a single error elsewhere disturbs at most
// one of them, while an error in bit j disturbs all eight. Bit j is flipped
// when more than four of its check sums fail, which corrects any pattern of
// up to four errors in a code word. The check sums of bit j are those of
// bit 0 rotated by j, as the code is cyclic. All 63 bits are decoded in
// parallel in one clock: in_a is the received word (same bit order as
// eg_ldpc_encoder), out_a the corrected 37-bit message, registered on the
// rising edge of clock, one cycle after in_a. corrected is high in the same
// cycle as out_a when at least one bit was flipped. reset clears the outputs.
// Majority-logic decoding is the design's choice of decoder; the fully
// parallel form (one clock per word, so that the link never stalls) and the
// corrected flag are this design's.
module eg_ldpc_mldd
  import noc_enc_pkg::*;
(
  input  logic              clock,
  input  logic              reset,
  input  logic [0:LDPC_N-1] in_a,
  output logic [0:LDPC_K-1] out_a,
  output logic              corrected
);

  localparam ldpc_checks_t CHECKS = eg_check_masks();

  ldpc_word_t rx, fixed, flip;

  always_comb begin
    for (int unsigned i = 0; i < LDPC_N; i++) rx[i] = in_a[i];
    for (int unsigned j = 0; j < LDPC_N; j++) begin
      int unsigned fails;
      fails = 0;
      for (int unsigned l = 0; l < LDPC_J; l++) begin
        fails += 32'(^(rx & CHECKS[j][l]));
      end
      flip[j] = (fails > LDPC_J / 2);
    end
    fixed = rx ^ flip;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      out_a     <= '0;
      corrected <= 1'b0;
    end else begin
      for (int unsigned i = 0; i < LDPC_K; i++) out_a[i] <= fixed[LDPC_M + i];
      corrected <= |flip;
    end
  end

endmodule
