// half_adder_tb: exhaustive check of the half adder.
// For each {a, b} the pair {c, s} must equal the integer sum a + b.
module half_adder_tb;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int unsigned exp_sum;
      {a, b} = 2'(i);
      exp_sum = int'(a) + int'(b);
      #1;
      checks++;
      if ({c, s} !== 2'(exp_sum)) begin
        failures++;
        $display("FAIL a=%b b=%b got {c,s}=%b%b expected %0d", a, b, c, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
