// noc_enc_pkg: constants and helper functions shared by the transition coder
// and the EG-LDPC link code.
//
// The link code is the type-I two-dimensional Euclidean-geometry LDPC code
// built on EG(2, 2^3): n = 2^6 - 1 = 63 code bits, k = 37 message bits,
// 26 parity bits. The geometry is identified with the nonzero elements of
// GF(2^6): code bit i is the point alpha^i, alpha a root of x^6 + x + 1.
// A line is {p + beta*d : beta in GF(2^3)}, GF(2^3) being {0} and the powers
// alpha^(9k). Eight lines that avoid the origin pass through every point; the
// parity checks of these eight lines are orthogonal on that point, which is
// what the one-step majority decoder uses. The 63-bit code length and the
// 37-bit message width follow the encoder symbol of the design; the choice of
// field polynomial, the bit numbering and everything computed here are this
// design's own.
//
// The generator polynomial g(x) is the product of (x - alpha^h) over the
// exponents 0 < h < 63 whose largest 8-ary digit sum among h, 2h, 4h (mod 63)
// is at most 7. Those 26 roots give
//   g(x) = x^26 + x^24 + x^14 + x^13 + x^12 + x^11 + x^10 + x^8 + x^6 + x^2 + 1.
package noc_enc_pkg;

  localparam int unsigned LDPC_N = 63;   // code length
  localparam int unsigned LDPC_K = 37;   // message length
  localparam int unsigned LDPC_M = 26;   // parity bits, N - K
  localparam int unsigned LDPC_J = 8;    // orthogonal check sums per bit

  // Coefficients of g(x), bit i = coefficient of x^i.
  localparam logic [LDPC_M:0] LDPC_GPOLY = 27'h501_F445;

  typedef logic [LDPC_N-1:0]              ldpc_word_t;
  typedef logic [LDPC_J-1:0][LDPC_N-1:0]  ldpc_lines_t;
  typedef ldpc_lines_t [LDPC_N-1:0]       ldpc_checks_t;

  // alpha^e in GF(2^6), polynomial basis, field polynomial x^6 + x + 1.
  function automatic logic [5:0] gf64_exp(int unsigned e);
    logic [5:0] v;
    v = 6'd1;
    for (int unsigned i = 0; i < (e % 63); i++) begin
      v = {v[4:0], 1'b0} ^ (v[5] ? 6'b00_0011 : 6'b00_0000);
    end
    return v;
  endfunction

  // Discrete logarithm of a nonzero element of GF(2^6).
  function automatic int unsigned gf64_log(logic [5:0] v);
    int unsigned r;
    logic [5:0]  p;
    r = 0;
    p = 6'd1;
    for (int unsigned e = 0; e < 63; e++) begin
      if (p == v) r = e;
      p = {p[4:0], 1'b0} ^ (p[5] ? 6'b00_0011 : 6'b00_0000);
    end
    return r;
  endfunction

  // The eight lines through point alpha^0 that miss the origin, as 63-bit
  // incidence vectors. Line c (c = 1..8) has direction alpha^c; direction
  // alpha^0 would give the line through the origin.
  function automatic ldpc_lines_t eg_lines_through_zero();
    ldpc_lines_t l;
    l = '0;
    for (int unsigned c = 1; c <= LDPC_J; c++) begin
      l[c-1][0] = 1'b1;
      for (int unsigned k = 0; k < 7; k++) begin
        l[c-1][gf64_log(6'd1 ^ gf64_exp(9*k + c))] = 1'b1;
      end
    end
    return l;
  endfunction

  // Cyclic rotation of a code word by s positions towards higher indices.
  function automatic ldpc_word_t ldpc_rotate(ldpc_word_t w, int unsigned s);
    ldpc_word_t r;
    for (int unsigned i = 0; i < LDPC_N; i++) begin
      r[(i + s) % LDPC_N] = w[i];
    end
    return r;
  endfunction

  // Check-sum masks of every code bit: entry [j][l] is line l through point
  // alpha^j, the line through alpha^0 rotated by j.
  function automatic ldpc_checks_t eg_check_masks();
    ldpc_checks_t m;
    ldpc_lines_t  l0;
    l0 = eg_lines_through_zero();
    for (int unsigned j = 0; j < LDPC_N; j++) begin
      for (int unsigned l = 0; l < LDPC_J; l++) m[j][l] = ldpc_rotate(l0[l], j);
    end
    return m;
  endfunction

  // Parity of the systematic encoding: remainder of x^26 * m(x) modulo g(x).
  function automatic logic [LDPC_M-1:0] ldpc_parity(logic [LDPC_K-1:0] msg);
    logic [LDPC_M-1:0] r;
    logic              fb;
    r = '0;
    for (int i = int'(LDPC_K) - 1; i >= 0; i--) begin
      fb = msg[i] ^ r[LDPC_M-1];
      r  = {r[LDPC_M-2:0], 1'b0} ^ (fb ? LDPC_GPOLY[LDPC_M-1:0] : '0);
    end
    return r;
  endfunction

  // Mask of the odd bit positions 1, 3, 5, ... of a flit, the bits that the
  // transition coder inverts.
  function automatic logic [63:0] odd_mask(int unsigned width);
    logic [63:0] m;
    m = '0;
    for (int unsigned i = 1; i < width; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  // Pseudo-random test word number i (a 64-bit integer mixing function):
  //   z = (i+1) * 0x9E3779B97F4A7C15;  z ^= z >> 30;
  //   z *= 0xBF58476D1CE4E5B9;         z ^= z >> 27.
  function automatic logic [63:0] test_word(int unsigned i);
    logic [63:0] z;
    z = 64'(i + 1) * 64'h9E37_79B9_7F4A_7C15;
    z = z ^ (z >> 30);
    z = z * 64'hBF58_476D_1CE4_E5B9;
    z = z ^ (z >> 27);
    return z;
  endfunction

endpackage
