// rca_ha: W-bit ripple-carry adder whose carry-in is fixed at 0.
//
// Because the carry-in is 0, the least significant cell is a half adder; the
// W-1 cells above it are full adders in a ripple chain. In the square-root
// carry select adder every group above the lowest uses one of these for its
// "carry-in = 0" result; the "carry-in = 1" result is then derived from it by a
// BEC rather than by a second adder.
//
// Interface: a, b (W bits) in; s (W bits) and co out, with {co, s} = a + b.
// Combinational.
module rca_ha #(
  parameter int unsigned W = 3  // smallest selected group of the 16-bit adder
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:1] c;  // c[i] is the carry into bit i

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(s[0]), .c(c[1]));

  for (genvar i = 1; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
