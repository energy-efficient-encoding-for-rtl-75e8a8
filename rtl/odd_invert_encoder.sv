// odd_invert_encoder: transmit side of the transition-reducing link code.
//
// The link carries DATA_W data wires plus one extra wire, inv, so it is
// w = DATA_W + 1 wires wide. For every adjacent pair of link wires (i, i+1),
// i = 0 .. DATA_W-1, a ty_detect compares the new flit X with the flit Y now
// on the wires. The new flit is extended with X[w-1] = 0 and the previous flit
// with Y[w-1] = the inv value now on the wire. If more than half of DATA_W
// pairs would see a Type I transition, the majority voter sets inv and the
// odd-numbered data bits (1, 3, 5, ...) are inverted with XOR gates; the even
// bits pass unchanged. The encoded flit Z and inv are registered: with enb
// high the register loads on the rising clock edge, so the encoded flit
// appears one cycle after data_in; with enb low it holds. rst clears the
// register, so the first previous flit is all zeros with inv = 0.
// The pair-wise detection, the majority rule and the odd inversion follow the
// design; the registered output, the enable and the reset value are this
// design's choices taken from the block diagram's clk, enb and rst pins.
module odd_invert_encoder
  import noc_enc_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enb,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,       // encoded flit Z[w-2:0]
  output logic              encode_out_inv  // Z[w-1], the inv wire
);

  localparam logic [DATA_W-1:0] ODD = DATA_W'(odd_mask(DATA_W));

  logic [DATA_W:0]   x, y;
  logic [DATA_W-1:0] ty;
  logic              inv;

  assign x = {1'b0, data_in};
  assign y = {encode_out_inv, data_out};

  for (genvar i = 0; i < DATA_W; i++) begin : g_ty
    ty_detect u_ty (
      .x0 (x[i]),
      .x1 (x[i+1]),
      .y0 (y[i]),
      .y1 (y[i+1]),
      .ty (ty[i])
    );
  end

  majority_voter #(.N_IN(DATA_W), .BUS_W(DATA_W)) u_vote (
    .votes (ty),
    .inv   (inv)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out       <= '0;
      encode_out_inv <= 1'b0;
    end else if (enb) begin
      data_out       <= data_in ^ (inv ? ODD : '0);
      encode_out_inv <= inv;
    end
  end

endmodule
