// tb_tmr_vote: exhaustive check of the 2-of-3 majority voter.
// Every combination of three 3-bit inputs is applied and the output is
// compared with a per-bit count of ones (majority = at least two ones).
module tb_tmr_vote;
  logic [2:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_vote #(.WIDTH(3)) dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [2:0] exp;
      {a, b, c} = 9'(i);
      #1;
      for (int k = 0; k < 3; k++) begin
        int ones;
        ones = int'(a[k]) + int'(b[k]) + int'(c[k]);
        exp[k] = (ones >= 2);
      end
      checks++;
      if (y !== exp) begin
        failures++;
        $display("mismatch a=%b b=%b c=%b y=%b exp=%b", a, b, c, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
