// rca_ha_tb: exhaustive check of the ripple-carry adder with carry-in 0.
// The default 3-bit instance and a 6-bit instance (the widest group of the
// 16-bit adder) are driven with every a, b pair; {co, s} is compared with the
// integer sum a + b.
module rca_ha_tb;
  logic [2:0] a3, b3, s3;
  logic       co3;
  logic [5:0] a6, b6, s6;
  logic       co6;
  int checks = 0, failures = 0;

  rca_ha dut3 (.a(a3), .b(b3), .s(s3), .co(co3));
  rca_ha #(.W(6)) dut6 (.a(a6), .b(b6), .s(s6), .co(co6));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 6); i++) begin
      int unsigned exp_sum;
      {a3, b3} = 6'(i);
      exp_sum = int'(a3) + int'(b3);
      #1;
      checks++;
      if ({co3, s3} !== 4'(exp_sum)) begin
        failures++;
        $display("FAIL W=3 a=%0d b=%0d got %0d expected %0d", a3, b3, {co3, s3}, exp_sum);
      end
    end
    for (int i = 0; i < (1 << 12); i++) begin
      int unsigned exp_sum;
      {a6, b6} = 12'(i);
      exp_sum = int'(a6) + int'(b6);
      #1;
      checks++;
      if ({co6, s6} !== 7'(exp_sum)) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=6 a=%0d b=%0d got %0d expected %0d", a6, b6, {co6, s6}, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
