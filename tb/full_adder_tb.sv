// full_adder_tb: exhaustive check of the full adder.
// For each {a, b, ci} the pair {co, s} must equal the integer sum a + b + ci.
module full_adder_tb;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int unsigned exp_sum;
      {a, b, ci} = 3'(i);
      exp_sum = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({co, s} !== 2'(exp_sum)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b got {co,s}=%b%b expected %0d", a, b, ci, co, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
