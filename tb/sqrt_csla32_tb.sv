// sqrt_csla32_tb: end-to-end check of the 32-bit square-root carry select
// adder at its only (full) size.
// Directed cases exercise the longest carry paths (a carry born at bit 0 that
// travels to cout, carries across the 16-bit boundary), then random operands
// follow, some of them biased towards long runs of ones so that carries
// travel far. The expected {cout, y} is the 33-bit integer sum a + b formed
// here.
// Mechanism coverage, computed from the operands independently of the adder:
// - each of the six carry select multiplexers (groups starting at bits 2, 5,
//   10, 18, 21, 26) must have taken both its ripple-carry (carry-in 0) and its
//   BEC (carry-in 1) result;
// - the carry from the lower into the upper half (bit 16) must have been 0 and 1;
// - a carry must have rippled from bit 0 all the way out to cout.
module sqrt_csla32_tb;
  logic [31:0] a, b, y;
  logic        cout;
  int checks = 0, failures = 0;

  localparam int NB = 7;
  localparam int BOUND [NB] = '{2, 5, 10, 16, 18, 21, 26};
  int n_sel0 [NB];
  int n_sel1 [NB];
  int n_full_ripple = 0;

  sqrt_csla32 dut (.a(a), .b(b), .y(y), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] z);
    longint unsigned sum;
    a = x; b = z;
    sum = longint'(x) + longint'(z);
    for (int k = 0; k < NB; k++) begin
      longint unsigned m, cy;
      m  = (64'd1 << BOUND[k]) - 1;
      cy = ((longint'(x) & m) + (longint'(z) & m)) >> BOUND[k];
      if (cy != 0) n_sel1[k]++; else n_sel0[k]++;
    end
    // a carry generated at bit 0 and propagated through bits 31:1
    if ((x[0] & z[0]) && ((x[31:1] ^ z[31:1]) == 31'h7FFF_FFFF)) n_full_ripple++;
    #1;
    checks++;
    if ({cout, y} !== 33'(sum)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h got %h expected %h", x, z, {cout, y}, sum);
    end
  endtask

  initial begin
    for (int k = 0; k < NB; k++) begin
      n_sel0[k] = 0;
      n_sel1[k] = 0;
    end
    apply(32'h0000_0000, 32'h0000_0000);
    apply(32'hFFFF_FFFF, 32'h0000_0001);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'h0000_FFFF, 32'h0000_0001);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'h7FFF_FFFF, 32'h0000_0001);
    apply(32'h5555_5555, 32'hAAAA_AAAB);
    apply(32'h1234_5678, 32'h9ABC_DEF0);
    for (int i = 0; i < 16; i++) begin
      longint unsigned big;
      big = (64'd1 << (2 * i + 1)) - 1;
      apply(32'(big), 32'h0000_0001);
    end
    for (int i = 0; i < 500_000; i++) begin
      logic [31:0] x, z;
      x = $urandom;
      z = $urandom;
      // every fourth pair: make z mostly the complement of x, so carries run long
      if ((i % 4) == 0) z = ~x ^ (32'h1 << ($urandom % 32));
      apply(x, z);
    end
    for (int k = 0; k < NB; k++) begin
      checks++;
      $display("carry into bit %0d: 0 on %0d additions, 1 on %0d additions",
               BOUND[k], n_sel0[k], n_sel1[k]);
      if (n_sel0[k] == 0 || n_sel1[k] == 0) begin
        failures++;
        $display("FAIL carry into bit %0d never took one of its values", BOUND[k]);
      end
    end
    checks++;
    $display("carry rippled from bit 0 to cout on %0d additions", n_full_ripple);
    if (n_full_ripple == 0) begin
      failures++;
      $display("FAIL no full-length carry propagation was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
