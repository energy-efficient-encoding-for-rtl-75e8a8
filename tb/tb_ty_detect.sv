// tb_ty_detect: all 16 previous/current values of a wire pair, classified by
// the transition table (Type I = exactly one wire toggles; 01<->10 Type II;
// 00<->11 Type III; no change Type IV), compared with the detector output.
module tb_ty_detect;
  logic x0, x1, y0, y1, ty;
  int checks = 0, failures = 0;
  int n_type1 = 0;

  ty_detect dut (.x0, .x1, .y0, .y1, .ty);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) begin
      for (int c = 0; c < 4; c++) begin
        logic exp_t1;
        {y1, y0} = 2'(p); {x1, x0} = 2'(c);
        // Type II, III, IV pairs listed explicitly; everything else is Type I.
        exp_t1 = 1'b1;
        if (p == c) exp_t1 = 0;                                 // Type IV
        if ((p == 1 && c == 2) || (p == 2 && c == 1)) exp_t1 = 0; // Type II
        if ((p == 0 && c == 3) || (p == 3 && c == 0)) exp_t1 = 0; // Type III
        #1;
        checks++;
        if (ty !== exp_t1) begin failures++; $display("prev %0d cur %0d ty %b", p, c, ty); end
        if (exp_t1) n_type1++;
      end
    end
    checks++; if (n_type1 != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
