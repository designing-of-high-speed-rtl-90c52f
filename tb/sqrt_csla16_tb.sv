// sqrt_csla16_tb: check of the 16-bit square-root carry select adder.
// Both variants are tested: dut_c (HAS_CIN = 1, carry-in from the port) and
// dut_z (HAS_CIN = 0, carry-in fixed at 0). Corner cases (all zeros, all ones,
// carry rippling through every group) are followed by random operands.
// The expected result is the integer sum a + b (+ cin) formed here.
// The carry into each selected group (bits 2, 5 and 10) is computed
// independently from the operands; each of those multiplexers must have taken
// both its carry-in-0 and its carry-in-1 input at least once.
module sqrt_csla16_tb;
  logic [15:0] a, b, y_c, y_z;
  logic        cin, cout_c, cout_z;
  int checks = 0, failures = 0;

  localparam int NB = 3;
  localparam int BOUND [NB] = '{2, 5, 10};  // LSB of each selected group
  int n_sel0 [NB];
  int n_sel1 [NB];

  sqrt_csla16 dut_c (.a(a), .b(b), .cin(cin), .y(y_c), .cout(cout_c));
  sqrt_csla16 #(.HAS_CIN(1'b0)) dut_z (.a(a), .b(b), .cin(cin), .y(y_z), .cout(cout_z));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] z, input logic ci);
    int unsigned sum_c, sum_z;
    a = x; b = z; cin = ci;
    sum_c = int'(x) + int'(z) + int'(ci);
    sum_z = int'(x) + int'(z);
    for (int k = 0; k < NB; k++) begin
      int unsigned m, cy;
      m  = (1 << BOUND[k]) - 1;
      cy = ((int'(x) & m) + (int'(z) & m) + int'(ci)) >> BOUND[k];
      if (cy != 0) n_sel1[k]++; else n_sel0[k]++;
    end
    #1;
    checks++;
    if ({cout_c, y_c} !== 17'(sum_c)) begin
      failures++;
      if (failures < 10)
        $display("FAIL cin a=%h b=%h ci=%b got %h expected %h", x, z, ci, {cout_c, y_c}, sum_c);
    end
    checks++;
    if ({cout_z, y_z} !== 17'(sum_z)) begin
      failures++;
      if (failures < 10)
        $display("FAIL zero-cin a=%h b=%h got %h expected %h", x, z, {cout_z, y_z}, sum_z);
    end
  endtask

  initial begin
    for (int k = 0; k < NB; k++) begin
      n_sel0[k] = 0;
      n_sel1[k] = 0;
    end
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h0000, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h03FF, 16'h0001, 1'b0);
    apply(16'h001F, 16'h0001, 1'b0);
    apply(16'h0003, 16'h0001, 1'b0);
    for (int i = 0; i < 200_000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int k = 0; k < NB; k++) begin
      checks++;
      $display("group at bit %0d: carry-in-0 result taken %0d times, carry-in-1 result %0d times",
               BOUND[k], n_sel0[k], n_sel1[k]);
      if (n_sel0[k] == 0 || n_sel1[k] == 0) begin
        failures++;
        $display("FAIL group at bit %0d never used one of its inputs", BOUND[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
