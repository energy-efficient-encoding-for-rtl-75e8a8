// tb_odd_invert_decoder: random flits with random inv, output compared one
// clock later with the flit whose odd bits are re-inverted when inv is set.
module tb_odd_invert_decoder;
  localparam int DW = 8;
  logic clk = 0, rst, dinv;
  logic [DW-1:0] din, dout, expd;
  int checks = 0, failures = 0;

  odd_invert_decoder #(.DATA_W(DW)) dut (
    .clk, .rst, .data_in(din), .decode_inv(dinv), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; din = '1; dinv = 1;
    @(posedge clk); #1;
    checks++; if (dout !== '0) failures++;
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      din = DW'($urandom); dinv = 1'($urandom);
      expd = din;
      if (dinv) for (int b = 1; b < DW; b += 2) expd[b] = ~expd[b];
      @(posedge clk); #1;
      checks++;
      if (dout !== expd) begin failures++; $display("din %h inv %b dout %h exp %h", din, dinv, dout, expd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
