// tb_noc_link_top: end-to-end test of the whole link at its default sizes
// (8-bit flits, 256-word test memory, (63,37) EG-LDPC code).
// A cycle model of every pipeline register (counter, test memory, transition
// encoder, LDPC encoder, majority decoder, transition decoder) built from the
// reference package is compared with the design after every clock edge. The
// enable is dropped at random (stalls), and 0 to 4 random wire errors are
// injected on the channel. Independently of the model, every flit accepted by
// the encoder must come out of data_out three clocks later. The test counts
// odd inversions, plain flits, stalls, corrected words per error count, and
// the Type I wire-pair transitions of the raw and the encoded flit streams;
// each mechanism must occur and encoding must lower the Type I count.
module tb_noc_link_top;
  import tb_ref_pkg::*;
  localparam int DW = 8;
  localparam int CYCLES = 4000;

  logic clk = 0, rst, enb;
  logic [62:0] chan_err;
  logic [DW-1:0] data_out, link_data;
  logic link_inv, corrected;
  logic [62:0] code_word;

  noc_link_top dut (
    .clk, .rst, .enb, .chan_err, .data_out, .link_data, .link_inv,
    .code_word, .corrected);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_inv = 0, n_plain = 0, n_stall = 0, n_t1_raw = 0, n_t1_enc = 0;
  int n_corr [5];

  // model registers
  logic [7:0]    m_addr;
  logic [DW-1:0] m_src, m_out;
  logic [63:0]   m_enc, m_raw_prev;
  word_t         m_cw;
  logic [K-1:0]  m_msg;
  logic          m_corr;
  // flits accepted by the encoder, delayed to data_out
  logic [DW-1:0] acc [3];
  int            acc_valid;

  initial begin
    #((CYCLES + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] oi_decode(logic [K-1:0] msg);
    logic [DW-1:0] d;
    d = msg[DW-1:0];
    if (msg[DW]) for (int b = 1; b < DW; b += 2) d[b] = ~d[b];
    return d;
  endfunction

  initial begin
    logic [7:0]    n_addr;
    logic [DW-1:0] n_src, n_out;
    logic [63:0]   n_enc;
    word_t         n_cw;
    logic [K-1:0]  n_msg;
    logic          n_corr_f;
    int            w;

    for (int i = 0; i < 5; i++) n_corr[i] = 0;
    rst = 1; enb = 0; chan_err = '0;
    repeat (2) @(posedge clk);
    #1;
    m_addr = 0; m_src = 0; m_enc = 0; m_cw = 0; m_msg = 0; m_corr = 0; m_out = 0;
    m_raw_prev = 0; acc_valid = 0;
    rst = 0;
    for (int t = 0; t < CYCLES; t++) begin
      // inputs for this cycle
      enb = (t % 97 < 80) ? ($urandom_range(0, 7) != 0) : 1'b0;
      w = (t % 7 == 0) ? 0 : $urandom_range(0, 4);
      chan_err = '0;
      while ($countones(chan_err) < w) chan_err[$urandom_range(0, 62)] = 1'b1;
      // model of the next register values
      n_addr   = enb ? m_addr + 8'd1 : m_addr;
      n_src    = mix64(32'(m_addr))[DW-1:0];
      n_enc    = enb ? oi_encode(m_enc, 64'(m_src), DW) : m_enc;
      n_cw     = encode(K'(m_enc[DW:0]));
      n_msg    = m_cw[62:26];
      n_corr_f = (w != 0);
      n_out    = oi_decode(m_msg);
      if (enb) begin
        n_t1_raw += count_type1(m_raw_prev, 64'(m_src), DW);
        n_t1_enc += count_type1(m_enc, n_enc, DW + 1);
        m_raw_prev = 64'(m_src);
        if (n_enc[DW]) n_inv++; else n_plain++;
      end else n_stall++;
      if (w > 0) n_corr[w]++; else n_corr[0]++;
      // delayed copy of accepted flits: data_out after edge t equals the
      // encoder content after edge t-3
      @(posedge clk); #1;
      m_addr = n_addr; m_src = n_src; m_enc = n_enc; m_cw = n_cw;
      m_msg = n_msg; m_corr = n_corr_f; m_out = n_out;
      checks++;
      if ({link_inv, link_data} !== m_enc[DW:0]) begin
        failures++; $display("t %0d link %b_%h exp %h", t, link_inv, link_data, m_enc[DW:0]);
      end
      checks++;
      if (code_word !== m_cw) begin failures++; $display("t %0d code word mismatch", t); end
      checks++;
      if (corrected !== m_corr) begin failures++; $display("t %0d corrected %b exp %b", t, corrected, m_corr); end
      checks++;
      if (data_out !== m_out) begin failures++; $display("t %0d data_out %h exp %h", t, data_out, m_out); end
      // end-to-end: flit held by the encoder three clocks ago
      if (acc_valid >= 3) begin
        checks++;
        if (data_out !== acc[2]) begin failures++; $display("t %0d e2e %h exp %h", t, data_out, acc[2]); end
      end
      acc[2] = acc[1]; acc[1] = acc[0];
      acc[0] = oi_decode(K'(m_enc[DW:0]));
      acc_valid++;
    end
    $display("inverted %0d plain %0d stalls %0d", n_inv, n_plain, n_stall);
    $display("words with 0..4 errors: %0d %0d %0d %0d %0d", n_corr[0], n_corr[1], n_corr[2], n_corr[3], n_corr[4]);
    $display("Type I pair transitions raw %0d encoded %0d", n_t1_raw, n_t1_enc);
    checks++; if (n_inv == 0) failures++;
    checks++; if (n_plain == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    for (int i = 0; i < 5; i++) begin checks++; if (n_corr[i] == 0) failures++; end
    checks++; if (!(n_t1_enc < n_t1_raw)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
