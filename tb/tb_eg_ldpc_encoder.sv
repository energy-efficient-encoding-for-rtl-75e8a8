// tb_eg_ldpc_encoder: random and single-bit messages into the (63,37)
// EG-LDPC encoder. Each registered code word, one clock later, must equal the
// reference long-division encoding, carry the message in bits 26..62, and
// satisfy all 504 line checks (8 lines through each of the 63 points).
module tb_eg_ldpc_encoder;
  import tb_ref_pkg::*;
  logic clk = 0, rst;
  logic [0:K-1] in_a;
  logic [0:N-1] out_a;
  logic [K-1:0] msg;
  word_t cw, expw;
  word_t H [N][8];
  int checks = 0, failures = 0;

  eg_ldpc_encoder dut (.clock(clk), .reset(rst), .in_a, .out_a);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) for (int c = 1; c <= 8; c++) H[j][c-1] = line_vec(j, c);
    rst = 1; in_a = '1;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) cw[i] = out_a[i];
    checks++; if (cw !== '0) failures++;
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      msg = (t < K) ? (37'd1 << t) : {5'($urandom), $urandom};
      for (int i = 0; i < K; i++) in_a[i] = msg[i];
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) cw[i] = out_a[i];
      expw = encode(msg);
      checks++;
      if (cw !== expw) begin failures++; $display("msg %h cw %h exp %h", msg, cw, expw); end
      checks++;
      if (cw[62:26] !== msg) failures++;
      for (int j = 0; j < N; j++) for (int c = 0; c < 8; c++) begin
        checks++;
        if (^(cw & H[j][c])) begin failures++; $display("check %0d/%0d fails for msg %h", j, c, msg); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
