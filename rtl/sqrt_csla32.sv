// sqrt_csla32: 32-bit modified square-root carry select adder (top level).
//
// Two 16-bit square-root carry select adders (sqrt_csla16) are chained: the
// lower one adds bits 15:0 with its carry-in fixed at 0, and its carry-out is
// the carry-in of the upper one, which adds bits 31:16 and gives the adder's
// carry-out. Inside each half the carry crosses groups of 2, 3, 5 and 6 bits,
// each upper group computing both possible results in parallel (ripple-carry
// adder for carry-in 0, Binary to Excess-1 converter for carry-in 1) and
// selecting one with a multiplexer.
//
// The split into two 16-bit halves, the fixed-zero carry-in of the lower half
// and the carry-out of the upper half follow the reference 32-bit structure;
// there is no external carry-in.
//
// Interface: a, b (32 bits) in; y (32 bits) and cout out, with
// {cout, y} = a + b. Purely combinational: no clock, no reset, a result after
// the adder's propagation delay.
module sqrt_csla32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        cout
);
  logic c16;  // carry from the lower half into the upper half

  sqrt_csla16 #(.HAS_CIN(1'b0)) u_lo (
    .a(a[15:0]), .b(b[15:0]), .cin(1'b0), .y(y[15:0]), .cout(c16)
  );

  sqrt_csla16 #(.HAS_CIN(1'b1)) u_hi (
    .a(a[31:16]), .b(b[31:16]), .cin(c16), .y(y[31:16]), .cout(cout)
  );
endmodule
