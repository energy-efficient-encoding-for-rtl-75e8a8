// tb_ref_pkg: reference models used by the testbenches, written independently
// of the RTL: GF(2^6) arithmetic by shift-and-add multiplication, the parity
// check matrix of the (63,37) EG-LDPC code built line by line, systematic
// encoding by polynomial long division, the test-data word, and a model of
// the odd-invert transition encoder.
package tb_ref_pkg;

  localparam int N = 63;
  localparam int K = 37;
  localparam int M = 26;
  localparam logic [26:0] GPOLY = 27'b101_0000_0001_1111_0100_0100_0101;

  typedef logic [62:0] word_t;

  function automatic logic [5:0] gf_mul(logic [5:0] a, logic [5:0] b);
    logic [11:0] p;
    p = '0;
    for (int i = 0; i < 6; i++) if (b[i]) p ^= 12'(a) << i;
    for (int i = 11; i >= 6; i--) if (p[i]) p ^= 12'b100_0011 << (i - 6);
    return p[5:0];
  endfunction

  function automatic logic [5:0] gf_pow(int e);
    logic [5:0] v;
    v = 6'd1;
    for (int i = 0; i < e; i++) v = gf_mul(v, 6'd2);
    return v;
  endfunction

  // Row r of H: the line {alpha^s * (1 + beta * alpha^c)} with r = 8*s' ...
  // here all 63*8 lines through each point, missing the origin, for bit j.
  // Returns the incidence vector of line through point alpha^j in direction
  // alpha^(j+c), c = 1..8, i.e. {alpha^j + beta * alpha^(j+c)}.
  function automatic word_t line_vec(int j, int c);
    word_t v;
    logic [5:0] p, d, pt;
    int lg;
    v = '0;
    p = gf_pow(j);
    d = gf_pow((j + c) % 63);
    // beta ranges over GF(8): 0 and alpha^(9k)
    v[j] = 1'b1;
    for (int k = 0; k < 7; k++) begin
      pt = p ^ gf_mul(gf_pow(9 * k), d);
      lg = -1;
      for (int e = 0; e < 63; e++) if (gf_pow(e) == pt) lg = e;
      if (lg >= 0) v[lg] = 1'b1;
    end
    return v;
  endfunction

  function automatic logic [M-1:0] parity_div(logic [K-1:0] msg);
    logic [62:0] rem;
    rem = 63'(msg) << M;
    for (int i = 62; i >= M; i--) if (rem[i]) rem ^= 63'(GPOLY) << (i - M);
    return rem[M-1:0];
  endfunction

  function automatic word_t encode(logic [K-1:0] msg);
    return {msg, parity_div(msg)};
  endfunction

  function automatic logic [63:0] mix64(int unsigned i);
    logic [63:0] z;
    z = 64'(i + 1) * 64'h9E3779B97F4A7C15;
    z = z ^ (z >> 30);
    z = z * 64'hBF58476D1CE4E5B9;
    z = z ^ (z >> 27);
    return z;
  endfunction

  // Number of adjacent wire pairs (i, i+1), i < w-1, of a w-wire bus whose
  // change from prev to cur is Type I (exactly one wire toggles).
  function automatic int count_type1(logic [63:0] prev, logic [63:0] cur, int w);
    int n;
    logic [63:0] t;
    t = prev ^ cur;
    n = 0;
    for (int i = 0; i + 1 < w; i++) if (t[i] != t[i+1]) n++;
    return n;
  endfunction

  // Model of one odd-invert encoder step: new flit d (width dw) against the
  // previous link value prev = {inv, data}. Returns {inv, data} to send.
  function automatic logic [63:0] oi_encode(logic [63:0] prev, logic [63:0] d, int dw);
    logic [63:0] x, msk;
    int n;
    x = d & ((64'd1 << dw) - 1);
    n = count_type1(prev, x, dw + 1);
    msk = '0;
    for (int i = 1; i < dw; i += 2) msk[i] = 1'b1;
    if (2 * n > dw) return (x ^ msk) | (64'd1 << dw);
    return x;
  endfunction

endpackage
