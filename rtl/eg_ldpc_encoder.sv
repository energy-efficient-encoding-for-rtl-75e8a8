// eg_ldpc_encoder: systematic encoder of the (63,37) EG-LDPC code.
//
// The 37-bit message in_a is taken as the polynomial m(x), in_a[i] being the
// coefficient of x^i. The code word is c(x) = x^26 m(x) + r(x), r(x) the
// remainder of x^26 m(x) divided by the generator polynomial g(x) of
// noc_enc_pkg, so that out_a[0:25] holds the parity bits and out_a[26:62] the
// message bits in order. Every cyclic shift of a code word is again a code
// word, and each of its bits satisfies eight parity checks orthogonal on it.
// The parity is a tree of XOR gates; the code word is registered on the rising
// edge of clock, one cycle after in_a. reset clears the output register.
// The port names and widths (InA 0..36, OutA 0..62, Clock, Reset) and the
// registered output follow the design's encoder symbol and its use of 63
// output flip-flops; the cyclic systematic form and the bit order are this
// design's choices.
module eg_ldpc_encoder
  import noc_enc_pkg::*;
(
  input  logic              clock,
  input  logic              reset,
  input  logic [0:LDPC_K-1] in_a,
  output logic [0:LDPC_N-1] out_a
);

  logic [LDPC_K-1:0] msg;
  logic [LDPC_M-1:0] par;
  ldpc_word_t        cw;

  always_comb begin
    for (int unsigned i = 0; i < LDPC_K; i++) msg[i] = in_a[i];
    par = ldpc_parity(msg);
    cw  = {msg, par};
  end

  always_ff @(posedge clock) begin
    if (reset) out_a <= '0;
    else begin
      for (int unsigned i = 0; i < LDPC_N; i++) out_a[i] <= cw[i];
    end
  end

endmodule
