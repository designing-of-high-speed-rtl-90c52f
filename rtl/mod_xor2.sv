// mod_xor2: two-input exclusive-OR gate.
//
// This is the gate that every adder cell of the design is built around: the
// half adder, the full adder and the Binary to Excess-1 converter (BEC) all use
// it. The adder's area saving comes partly from a transistor-level rework of
// this gate; at the logic level it is an ordinary XOR, and that is all this
// model describes. Which transistors realise it is left to the cell library.
//
// Interface: a, b in; y = a ^ b out. Purely combinational, no clock.
module mod_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = a ^ b;
endmodule
