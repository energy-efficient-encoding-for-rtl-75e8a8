// tb_odd_invert_encoder: drives random flits, runs of equal flits and
// alternating patterns into the 8-bit encoder with random enable gaps, and
// compares the registered output {inv, data} each cycle with the reference
// model. It also checks that the encoder never sends more Type I pairs than
// the unencoded flit would have caused, and that both decisions occur.
module tb_odd_invert_encoder;
  import tb_ref_pkg::*;
  localparam int DW = 8;
  logic clk = 0, rst, enb;
  logic [DW-1:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;
  int n_inv = 0, n_plain = 0, n_hold = 0;
  logic [63:0] prev, expv;

  odd_invert_encoder #(.DATA_W(DW)) dut (
    .clk, .rst, .enb, .data_in(din), .data_out(dout), .encode_out_inv(inv));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; enb = 0; din = '0;
    @(posedge clk); #1;
    checks++; if ({inv, dout} !== '0) failures++;
    rst = 0; prev = '0;
    for (int i = 0; i < 2000; i++) begin
      case (i % 4)
        0, 1: din = DW'($urandom);
        2:    din = (i % 8 == 2) ? 8'h55 : 8'hAA;
        3:    din = DW'(prev);
      endcase
      enb = ($urandom_range(0, 4) != 0);
      if (enb) begin
        expv = oi_encode(prev, 64'(din), DW);
        if (count_type1(prev, expv, DW + 1) > count_type1(prev, 64'(din), DW + 1)) begin
          // the rule only inverts when it lowers the Type I count
          checks++; failures++;
        end
      end else begin
        expv = prev; n_hold++;
      end
      @(posedge clk); #1;
      checks++;
      if ({inv, dout} !== expv[DW:0]) begin
        failures++; $display("cycle %0d din %h got %b_%h exp %h", i, din, inv, dout, expv[DW:0]);
      end
      if (enb && expv[DW]) n_inv++;
      if (enb && !expv[DW]) n_plain++;
      prev = expv;
    end
    checks++; if (n_inv == 0 || n_plain == 0 || n_hold == 0) failures++;
    $display("inverted %0d plain %0d held %0d", n_inv, n_plain, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
