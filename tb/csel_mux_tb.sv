// csel_mux_tb: check of the carry select multiplexer.
// Random pairs d0, d1 are applied with both values of sel, plus pairs that
// differ in a single bit; y must equal d0 when sel = 0 and d1 when sel = 1.
module csel_mux_tb;
  logic [3:0] d0, d1, y;
  logic       sel;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0;

  csel_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] x0, input logic [3:0] x1, input logic s);
    logic [3:0] expected;
    d0 = x0; d1 = x1; sel = s;
    expected = (s == 1'b0) ? x0 : x1;
    #1;
    checks++;
    if (s) n_sel1++; else n_sel0++;
    if (y !== expected) begin
      failures++;
      $display("FAIL d0=%h d1=%h sel=%b y=%h expected %h", x0, x1, s, y, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      apply(4'h0, 4'(1 << i), 1'b0);
      apply(4'h0, 4'(1 << i), 1'b1);
      apply(4'(1 << i), 4'h0, 1'b0);
      apply(4'(1 << i), 4'h0, 1'b1);
    end
    for (int i = 0; i < 1000; i++)
      apply(4'($urandom), 4'($urandom), 1'($urandom));
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0) begin
      failures++;
      $display("FAIL one select value was never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
