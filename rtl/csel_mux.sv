// csel_mux: 2N:N carry select multiplexer.
//
// Each selected group of the adder produces two candidate results of N bits
// ({carry, sum}): d0, computed assuming carry-in 0 (from the ripple-carry
// adder) and d1, assuming carry-in 1 (from the BEC). The real carry into the
// group, coming from the group below, picks one: sel = 0 takes d0, sel = 1
// takes d1. The top bit of the output is the group's carry-out, which drives
// the next group's multiplexer, so the carry path across the adder is a chain
// of multiplexers only.
//
// Interface: d0, d1 (N bits), sel in; y (N bits) out. Combinational.
module csel_mux #(
  parameter int unsigned N = 4  // the "MUX 8:4" of the 3-bit group
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
