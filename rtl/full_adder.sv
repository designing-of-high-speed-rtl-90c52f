// full_adder: adds two bits and a carry-in.
//
// Built as two cascaded XOR cells (mod_xor2) for the sum, and the usual
// generate/propagate form for the carry: co = a&b | ci&(a^b). The reference
// design draws this cell at transistor level; the gate decomposition used here
// is a choice of this RTL, only the logic function is fixed.
//
// Interface: a, b, ci in; s = a ^ b ^ ci, co = majority(a, b, ci) out.
// Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;  // propagate, a ^ b

  mod_xor2 u_xor_p (.a(a),  .b(b),  .y(p));
  mod_xor2 u_xor_s (.a(p),  .b(ci), .y(s));

  always_comb co = (a & b) | (ci & p);
endmodule
