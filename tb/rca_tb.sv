// rca_tb: exhaustive check of the ripple-carry adder with carry-in.
// The default 2-bit instance (the lowest group of the 16-bit adder) and a 6-bit
// instance are each driven with every combination of a, b and ci; {co, s} is
// compared with the integer sum a + b + ci.
module rca_tb;
  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [5:0] a6, b6, s6;
  logic       ci6, co6;
  int checks = 0, failures = 0;

  rca dut2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));
  rca #(.W(6)) dut6 (.a(a6), .b(b6), .ci(ci6), .s(s6), .co(co6));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 5); i++) begin
      int unsigned exp_sum;
      {ci2, a2, b2} = 5'(i);
      exp_sum = int'(a2) + int'(b2) + int'(ci2);
      #1;
      checks++;
      if ({co2, s2} !== 3'(exp_sum)) begin
        failures++;
        $display("FAIL W=2 a=%0d b=%0d ci=%b got %0d expected %0d", a2, b2, ci2, {co2, s2}, exp_sum);
      end
    end
    for (int i = 0; i < (1 << 13); i++) begin
      int unsigned exp_sum;
      {ci6, a6, b6} = 13'(i);
      exp_sum = int'(a6) + int'(b6) + int'(ci6);
      #1;
      checks++;
      if ({co6, s6} !== 7'(exp_sum)) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=6 a=%0d b=%0d ci=%b got %0d expected %0d", a6, b6, ci6, {co6, s6}, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
