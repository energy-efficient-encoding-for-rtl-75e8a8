// tb_majority_voter: exhaustive check of the 8-input voter (inv when more than
// 4 votes) and of a 5-input, bus-width-5 instance (inv when 3 or more).
module tb_majority_voter;
  logic [7:0] v8; logic inv8;
  logic [4:0] v5; logic inv5;
  int checks = 0, failures = 0;

  majority_voter #(.N_IN(8), .BUS_W(8)) dut8 (.votes(v8), .inv(inv8));
  majority_voter #(.N_IN(5), .BUS_W(5)) dut5 (.votes(v5), .inv(inv5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      v8 = 8'(i); v5 = 5'(i); #1;
      checks++;
      if (inv8 !== ($countones(v8) >= 5)) begin failures++; $display("v8 %b inv %b", v8, inv8); end
      if (i < 32) begin
        checks++;
        if (inv5 !== ($countones(v5) >= 3)) begin failures++; $display("v5 %b inv %b", v5, inv5); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
