// rca: W-bit ripple-carry adder with an external carry-in.
//
// A chain of W full adders; each one's carry-out is the next one's carry-in.
// In the square-root carry select adder it forms the lowest group (2 bits),
// the only group that sees the real carry-in, so it needs no carry select.
//
// Interface: a, b (W bits), ci in; s (W bits) and co out, with
// {co, s} = a + b + ci. Combinational; the delay grows linearly with W.
module rca #(
  parameter int unsigned W = 2  // width of the lowest group in the 16-bit adder
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;  // c[i] is the carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
