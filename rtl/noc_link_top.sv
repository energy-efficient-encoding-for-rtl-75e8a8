// noc_link_top: a network-on-chip link with transition-reducing encoding and
// EG-LDPC error correction, with its own test-data generator.
//
// Data path, one stage per clock:
//   up_counter -> flit_source -> odd_invert_encoder -> eg_ldpc_encoder
//     -> channel (chan_err XORed onto the 63 code wires)
//     -> eg_ldpc_mldd -> odd_invert_decoder -> data_out
// The counter walks the test-data memory while enb is high; the transition
// encoder odd-inverts each flit whose adjacent wire pairs would mostly see
// Type I transitions and adds the inv bit. The encoded flit and its inv bit
// form the low DATA_W+1 bits of the 37-bit LDPC message (the remaining
// message bits are zero); the LDPC encoder adds 26 parity bits. At the far
// end the majority-logic decoder corrects up to four wire errors per word and
// the transition decoder restores the flit. enb is the count and encode
// enable: with enb low the counter and the encoder hold, so the link repeats
// its last word.
// Latency: a flit that leaves flit_source at clock edge t is loaded into the
// encoder at edge t+1 and appears on data_out after edge t+4. link_data and
// link_inv show the encoder output, code_word the 63 bits driven onto the
// channel before the injected errors, corrected the decoder's flag for the
// word now at its output.
// The chain counter, data memory, encoder and decoder with clk, rst and enb,
// and the 8-bit flit, follow the design's block diagram; placing the
// transition coder ahead of the LDPC encoder, the message packing and the
// error-injection port are this design's choices.
module noc_link_top
  import noc_enc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enb,
  input  logic [LDPC_N-1:0] chan_err,   // 1 = flip that code wire
  output logic [DATA_W-1:0] data_out,
  output logic [DATA_W-1:0] link_data,
  output logic              link_inv,
  output logic [LDPC_N-1:0] code_word,
  output logic              corrected
);

  if (DATA_W + 1 > LDPC_K) begin : g_bad_width
    $error("noc_link_top: DATA_W + 1 must not exceed the LDPC message width");
  end

  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] src_data;
  logic [0:LDPC_K-1] msg, rx_msg;
  logic [0:LDPC_N-1] cw_tx, cw_rx;
  logic [DATA_W-1:0] rx_data;
  logic              rx_inv;

  up_counter #(.WIDTH(ADDR_W)) u_count (
    .clk (clk),
    .rst (rst),
    .ce  (enb),
    .q   (addr)
  );

  flit_source #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_src (
    .clk  (clk),
    .rst  (rst),
    .addr (addr),
    .data (src_data)
  );

  odd_invert_encoder #(.DATA_W(DATA_W)) u_enc (
    .clk            (clk),
    .rst            (rst),
    .enb            (enb),
    .data_in        (src_data),
    .data_out       (link_data),
    .encode_out_inv (link_inv)
  );

  always_comb begin
    msg = '0;
    for (int unsigned i = 0; i < DATA_W; i++) msg[i] = link_data[i];
    msg[DATA_W] = link_inv;
  end

  eg_ldpc_encoder u_ldpc_enc (
    .clock (clk),
    .reset (rst),
    .in_a  (msg),
    .out_a (cw_tx)
  );

  always_comb begin
    for (int unsigned i = 0; i < LDPC_N; i++) begin
      code_word[i] = cw_tx[i];
      cw_rx[i]     = cw_tx[i] ^ chan_err[i];
    end
  end

  eg_ldpc_mldd u_mldd (
    .clock     (clk),
    .reset     (rst),
    .in_a      (cw_rx),
    .out_a     (rx_msg),
    .corrected (corrected)
  );

  always_comb begin
    for (int unsigned i = 0; i < DATA_W; i++) rx_data[i] = rx_msg[i];
    rx_inv = rx_msg[DATA_W];
  end

  odd_invert_decoder #(.DATA_W(DATA_W)) u_dec (
    .clk        (clk),
    .rst        (rst),
    .data_in    (rx_data),
    .decode_inv (rx_inv),
    .data_out   (data_out)
  );

endmodule
