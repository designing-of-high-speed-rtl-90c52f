// half_adder: adds two bits, giving a sum and a carry.
//
// It sits at the least significant position of a ripple-carry adder whose
// carry-in is known to be 0, where a full adder would waste devices. The sum is
// formed by the shared XOR cell (mod_xor2), the carry by an AND.
//
// Interface: a, b in; s = a ^ b, c = a & b out. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  mod_xor2 u_xor (.a(a), .b(b), .y(s));
  always_comb c = a & b;
endmodule
