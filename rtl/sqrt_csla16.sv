// sqrt_csla16: 16-bit modified square-root carry select adder.
//
// The 16 bits are split into four groups of growing width, 2, 3, 5 and 6 bits
// (bits 1:0, 4:2, 9:5 and 15:10). The lowest group is a plain ripple-carry
// adder that sees the real carry-in. Every group above it works in parallel:
//   - an rca_ha adds its operand bits assuming carry-in 0, giving W+1 bits
//     {carry, sum};
//   - a (W+1)-bit BEC adds one to that, which is the result for carry-in 1;
//   - a 2(W+1):(W+1) multiplexer (8:4, 12:6, 14:7) picks one of the two by the
//     carry out of the group below, and passes on the picked carry.
// Only one adder per group is needed (the BEC stands in for the second), and
// once the 2-bit group has rippled, the carry crosses the remaining groups
// through multiplexers only. Widening groups let the longer ripple of the upper
// groups overlap the carry's travel through the lower multiplexers.
//
// HAS_CIN selects the two variants used in the 32-bit adder: with HAS_CIN = 1
// the lowest group is a full-adder ripple chain fed by cin; with HAS_CIN = 0
// the adder's carry-in is fixed at 0, the lowest group uses a half adder at its
// LSB and the cin port is not read (it is kept so that both variants share one
// interface).
//
// Group widths, the BEC in every selected group, and the multiplexer sizes
// follow the reference 16-bit structure. Bit 0 is the least significant bit.
//
// Interface: a, b (16 bits), cin in; y (16 bits), cout out, with
// {cout, y} = a + b + cin (cin taken as 0 when HAS_CIN = 0). Combinational.
module sqrt_csla16 #(
  parameter bit HAS_CIN = 1'b1  // 1: lowest group takes cin; 0: carry-in fixed at 0
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] y,
  output logic        cout
);
  localparam int unsigned NG = 4;
  localparam int unsigned GW [NG] = '{2, 3, 5, 6};   // group widths, LSB group first
  localparam int unsigned GL [NG] = '{0, 2, 5, 10};  // LSB position of each group

  logic [NG:0] c;  // c[g] is the carry into group g; c[NG] is the carry out

  // Lowest group: ripple-carry adder with the real carry-in.
  if (HAS_CIN) begin : g_grp0
    rca #(.W(GW[0])) u_rca (
      .a(a[GL[0] +: GW[0]]), .b(b[GL[0] +: GW[0]]), .ci(cin),
      .s(y[GL[0] +: GW[0]]), .co(c[1])
    );
  end else begin : g_grp0
    rca_ha #(.W(GW[0])) u_rca (
      .a(a[GL[0] +: GW[0]]), .b(b[GL[0] +: GW[0]]),
      .s(y[GL[0] +: GW[0]]), .co(c[1])
    );
  end

  // Selected groups: RCA (carry-in 0), BEC (carry-in 1), multiplexer.
  for (genvar g = 1; g < NG; g++) begin : g_grp
    localparam int unsigned W = GW[g];
    localparam int unsigned L = GL[g];

    logic [W:0] r0;  // {carry, sum} for carry-in 0
    logic [W:0] r1;  // {carry, sum} for carry-in 1
    logic [W:0] r;   // selected {carry, sum}

    rca_ha #(.W(W)) u_rca (
      .a(a[L +: W]), .b(b[L +: W]), .s(r0[W-1:0]), .co(r0[W])
    );

    bec #(.W(W + 1)) u_bec (.b(r0), .y(r1));

    csel_mux #(.N(W + 1)) u_mux (.d0(r0), .d1(r1), .sel(c[g]), .y(r));

    assign y[L +: W] = r[W-1:0];
    assign c[g+1]    = r[W];
  end

  assign c[0] = cin;  // documents the group-0 carry-in; read only when HAS_CIN = 1
  assign cout = c[NG];
endmodule
