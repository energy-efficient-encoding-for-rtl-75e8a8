// odd_invert_decoder: receive side of the transition-reducing link code.
//
// When decode_inv is high the odd-numbered bits (1, 3, 5, ...) of the received
// flit are inverted back; otherwise the flit passes unchanged. The result is
// registered on the rising clock edge, one cycle after the inputs; rst clears
// it. Undoing the odd inversion follows the design; the register and the
// synchronous reset are this design's choices taken from the block diagram's
// clk and rst pins.
module odd_invert_decoder
  import noc_enc_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in,
  input  logic              decode_inv,
  output logic [DATA_W-1:0] data_out
);

  localparam logic [DATA_W-1:0] ODD = DATA_W'(odd_mask(DATA_W));

  always_ff @(posedge clk) begin
    if (rst) data_out <= '0;
    else     data_out <= data_in ^ (decode_inv ? ODD : '0);
  end

endmodule
