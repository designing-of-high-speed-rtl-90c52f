// bec_tb: exhaustive check of the Binary to Excess-1 converter.
// The default 7-bit converter and a 4-bit one (the smallest in the 16-bit
// adder) are given every input value; y must equal (b + 1) mod 2^W.
module bec_tb;
  logic [6:0] b7, y7;
  logic [3:0] b4, y4;
  int checks = 0, failures = 0;

  bec dut7 (.b(b7), .y(y7));
  bec #(.W(4)) dut4 (.b(b4), .y(y4));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      b7 = 7'(i);
      #1;
      checks++;
      if (y7 !== 7'((i + 1) % 128)) begin
        failures++;
        $display("FAIL W=7 b=%0d y=%0d expected %0d", b7, y7, (i + 1) % 128);
      end
    end
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      #1;
      checks++;
      if (y4 !== 4'((i + 1) % 16)) begin
        failures++;
        $display("FAIL W=4 b=%0d y=%0d expected %0d", b4, y4, (i + 1) % 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
