// bec: W-bit Binary to Excess-1 converter, y = b + 1 (modulo 2^W).
//
// It replaces the second ripple-carry adder (the one with carry-in 1) of a
// classic carry select adder: the carry-in-1 sum is the carry-in-0 sum plus
// one. The structure is a serial AND chain that forms t[i] = b[0] & ... &
// b[i-1], and one XOR cell per bit above the LSB, y[i] = b[i] ^ t[i]; the LSB
// is simply inverted. The AND chain and XOR cells follow the reference 7-bit
// converter; the LSB inverter is this RTL's reading of that bit.
//
// Interface: b (W bits, W >= 2) in, y (W bits) out. Combinational. In the adder the
// input is {carry, sum} of a group, which never is all ones, so the +1 never
// wraps there.
module bec #(
  parameter int unsigned W = 7  // width of the largest converter in the 16-bit adder
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  if (W < 2) begin : g_bad_width
    $error("bec: W must be at least 2");
  end

  logic [W-1:1] t;  // t[i]: all bits below i are 1

  assign y[0] = ~b[0];
  assign t[1] = b[0];

  for (genvar i = 2; i < W; i++) begin : g_and
    assign t[i] = t[i-1] & b[i-1];
  end

  for (genvar i = 1; i < W; i++) begin : g_xor
    mod_xor2 u_xor (.a(b[i]), .b(t[i]), .y(y[i]));
  end
endmodule
