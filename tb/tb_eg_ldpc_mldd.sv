// tb_eg_ldpc_mldd: reference-encoded random messages with 0 to 4 random bit
// errors (and bursts of 4 adjacent errors) into the majority-logic decoder.
// The corrected message must appear one clock later, with the corrected flag
// high exactly when errors were injected.
module tb_eg_ldpc_mldd;
  import tb_ref_pkg::*;
  logic clk = 0, rst;
  logic [0:N-1] in_a;
  logic [0:K-1] out_a;
  logic corr;
  logic [K-1:0] msg, got;
  word_t cw, err;
  int nerr;
  int checks = 0, failures = 0;
  int seen [5];

  eg_ldpc_mldd dut (.clock(clk), .reset(rst), .in_a, .out_a, .corrected(corr));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) seen[i] = 0;
    rst = 1; in_a = '1;
    @(posedge clk); #1;
    checks++; if (out_a !== '0 || corr !== 0) failures++;
    rst = 0;
    for (int t = 0; t < 1500; t++) begin
      msg = {5'($urandom), $urandom};
      cw = encode(msg);
      nerr = t % 5;
      err = '0;
      if (t % 50 == 4) begin
        int s;
        s = $urandom_range(0, N - 4);
        err[s +: 4] = 4'hF;
      end else begin
        while ($countones(err) < nerr) err[$urandom_range(0, N - 1)] = 1'b1;
      end
      cw ^= err;
      for (int i = 0; i < N; i++) in_a[i] = cw[i];
      @(posedge clk); #1;
      for (int i = 0; i < K; i++) got[i] = out_a[i];
      checks++;
      if (got !== msg) begin failures++; $display("t %0d nerr %0d msg %h got %h", t, nerr, msg, got); end
      checks++;
      if (corr !== (nerr != 0)) begin failures++; $display("t %0d corrected flag %b", t, corr); end
      seen[nerr]++;
    end
    for (int i = 0; i < 5; i++) begin checks++; if (seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
