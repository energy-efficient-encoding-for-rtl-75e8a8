// tb_up_counter: checks reset, counting, hold with ce low and wrap-around of
// the 8-bit up counter against a software count.
module tb_up_counter;
  logic clk = 0, rst, ce;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int unsigned model;

  up_counter #(.WIDTH(8)) dut (.clk, .rst, .ce, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ce = 0;
    @(posedge clk); @(posedge clk); #1;
    checks++; if (q !== 0) begin failures++; $display("reset q=%0d", q); end
    rst = 0; model = 0;
    for (int i = 0; i < 600; i++) begin
      ce = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (ce) model = (model + 1) % 256;
      checks++;
      if (q !== 8'(model)) begin failures++; $display("cycle %0d q=%0d exp %0d", i, q, model); end
    end
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++; if (q !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
