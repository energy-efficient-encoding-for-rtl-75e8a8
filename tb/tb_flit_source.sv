// tb_flit_source: reads every word of the test-data memory in random order
// and compares it, one clock after the address, with the mixing function
// computed by the reference package.
module tb_flit_source;
  import tb_ref_pkg::*;
  logic clk = 0, rst;
  logic [7:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  flit_source #(.ADDR_W(8), .DATA_W(8)) dut (.clk, .rst, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; addr = 0;
    @(posedge clk); #1;
    checks++; if (data !== 0) failures++;
    rst = 0;
    for (int i = 0; i < 768; i++) begin
      addr = (i < 256) ? 8'(i) : 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (data !== mix64(32'(addr))[7:0]) begin
        failures++; $display("addr %0d data %h exp %h", addr, data, mix64(32'(addr))[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
