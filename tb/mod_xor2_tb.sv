// mod_xor2_tb: exhaustive check of the two-input XOR cell.
// All four input combinations are applied and y is compared with a truth table
// written out here rather than computed with the ^ operator.
module mod_xor2_tb;
  logic a, b, y;
  int checks = 0, failures = 0;
  // expected y for {a, b} = 00, 01, 10, 11
  localparam bit [3:0] TT = 4'b0110;

  mod_xor2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== TT[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, TT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
