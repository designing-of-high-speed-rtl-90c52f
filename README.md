# 32-bit modified square-root carry select adder

A ripple-carry adder is small but slow: the carry has to pass through every
bit. A carry select adder speeds it up by cutting the word into groups, adding
each group twice in parallel (once assuming the carry into it is 0 and once
assuming it is 1), and picking the right result with a multiplexer once the
real carry arrives. The carry then crosses each group through one multiplexer
instead of a chain of full adders. The cost is area, because every group has
two adders.

This adder cuts that cost and shortens the path in two ways:

* **One adder per group, plus a BEC.** The "carry-in = 1" result of a group is
  the "carry-in = 0" result plus one. It is made by a Binary to Excess-1
  converter (BEC), a row of XOR gates fed by an AND chain. That is much
  smaller than a second ripple-carry adder.
* **Square-root grouping.** Groups grow in width from the LSB upwards (2, 3, 5
  and 6 bits in each 16-bit half). A group that starts higher up has more time
  before its carry-in arrives, so it can be wider. Only the lowest, 2-bit group
  ripples on the carry path. The carry then goes through the multiplexers.

The 32-bit adder is made of two such 16-bit halves in series.

## Structure

```
               bits 31:16                                  bits 15:0
   +--------------------------------------+   +--------------------------------------+
   | sqrt_csla16 (HAS_CIN = 1)            |   | sqrt_csla16 (HAS_CIN = 0)            |
   |  6-bit grp  5-bit grp  3-bit grp 2b  |<--|  6-bit grp  5-bit grp  3-bit grp 2b  |
   +--------------------------------------+ c16 +------------------------------------+
     |cout       y[31:16]                        y[15:0]           (carry-in fixed 0)
```

One 16-bit half (`sqrt_csla16`), bit 0 = LSB:

| group | bits  | carry-in-0 adder      | BEC   | multiplexer | selected by          |
|-------|-------|-----------------------|-------|-------------|----------------------|
| 0     | 1:0   | `rca` (takes `cin`) or `rca_ha` | none | none  | (it is the carry-in) |
| 1     | 4:2   | `rca_ha`, 3 bits      | 4-bit | 8:4         | carry out of group 0 |
| 2     | 9:5   | `rca_ha`, 5 bits      | 6-bit | 12:6        | carry out of group 1 |
| 3     | 15:10 | `rca_ha`, 6 bits      | 7-bit | 14:7        | carry out of group 2 |

Within a selected group of width W:

1. `rca_ha` adds the W operand bits with carry-in 0. This gives W+1 bits,
   `r0 = {carry, sum}`.
2. `bec` of width W+1 forms `r1 = r0 + 1`, the result for carry-in 1.
   `r0` is at most 2^(W+1) − 2, so this never wraps.
3. `csel_mux` of width W+1 outputs `r0` when the carry into the group is 0 and
   `r1` when it is 1. Its top bit is the group's carry-out. That bit selects
   the next group's multiplexer, and the last one is the 16-bit carry-out.

The lowest group has no selection. In the upper half it is a full-adder ripple
chain (`rca`) fed by the carry from the lower half. In the lower half the
carry-in is always 0, so its LSB is a half adder (`rca_ha`). `HAS_CIN` picks
between the two. When it is 0 the `cin` port is not read.

### The BEC

For a W-bit input `b`, the BEC gives

```
y[0] = ~b[0]
y[i] = b[i] ^ t[i],   t[1] = b[0],   t[i] = t[i-1] & b[i-1]   (i = 1 .. W-1)
```

A bit flips when every bit below it is 1. The AND chain is serial, like a
ripple carry, but it runs in parallel with the carry coming from the groups
below. `W >= 2` is required.

### Cells

`mod_xor2` is the XOR gate that all the others are built on. `half_adder` is an
XOR cell plus an AND. `full_adder` is two XOR cells for the sum, with
`co = a&b | ci&(a^b)`. The area figures the design aims at come from a
transistor-level reworking of the XOR and half-adder cells. The RTL models only
their logic function and leaves that part to the cell library.

## Timing and interface

The whole adder is combinational: no clock, no reset, no registers.

| module        | ports                                              |
|---------------|----------------------------------------------------|
| `sqrt_csla32` | `a[31:0]`, `b[31:0]` in; `y[31:0]`, `cout` out; `{cout, y} = a + b` |
| `sqrt_csla16` | `a[15:0]`, `b[15:0]`, `cin` in; `y[15:0]`, `cout` out |

The 32-bit adder has no carry-in. If you need one, instantiate the lower half
with `HAS_CIN = 1` and bring its `cin` out.

The critical path runs through the lower half's 2-bit ripple group and then
through six multiplexers on the carry path (three per half). The 2-bit group of
the upper half is a ripple chain that waits for `c16`. Against that path there
is the parallel work of the widest group: a 6-bit ripple followed by a 7-bit
BEC. The reference implementation is a custom 45 nm CMOS design. It reports
about 1772 transistors, 2.4 ns and 23 µW for the 32-bit adder. A conventional
carry select adder with 4-bit groups and two adders per group needed about
1916 transistors and 3.25 ns, at 20 µW. These numbers depend on the
transistor-level cells and are not reproduced by this RTL. A synthesis tool
will also restructure the gates freely unless the cell hierarchy is kept.

## Where this RTL makes its own choices

* Group widths 2/3/5/6, the BEC widths 4/6/7 and the multiplexer sizes
  8:4/12:6/14:7 follow the reference 16-bit structure. They differ from the
  2/2/3/4/5 split often seen for 16-bit square-root carry select adders.
* The BEC's LSB is an inverter. The reference draws that bit only at
  transistor level.
* The multiplexer's input order is fixed by what the two results mean:
  carry 0 takes the RCA, carry 1 takes the BEC.
* The RCAs of the selected groups, whose carry-in is constant 0, use a half
  adder at the LSB.
* The gates inside the full adder are not fixed by the reference. Only its
  function is.
* Supply pins (Vdd, Gnd) of the transistor-level blocks have no counterpart
  here.

The conventional carry select adder, which serves only for comparison, is not
included. Neither are the 64- and 128-bit versions mentioned as future work.
They would follow the same pattern: further 16-bit halves in series, or wider
square-root groups.

## Files

| file | contents |
|------|----------|
| `rtl/mod_xor2.sv`, `rtl/half_adder.sv`, `rtl/full_adder.sv` | cells |
| `rtl/rca.sv`, `rtl/rca_ha.sv` | ripple-carry adders, with carry-in / with carry-in 0 |
| `rtl/bec.sv` | Binary to Excess-1 converter |
| `rtl/csel_mux.sv` | 2N:N carry select multiplexer |
| `rtl/sqrt_csla16.sv` | 16-bit square-root carry select adder |
| `rtl/sqrt_csla32.sv` | 32-bit top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the outputs with sums worked out in the testbench
itself. It prints `TB_RESULT checks=N failures=M` and stops after a fixed
simulated time even if something hangs.

* The cells, `rca` (2 and 6 bits), `rca_ha` (3 and 6 bits) and `bec` (7 and
  4 bits) are tested exhaustively.
* `csel_mux` gets one-hot and random inputs with both select values.
* `sqrt_csla16_tb` tests both `HAS_CIN` variants with corner cases and 200,000
  random operand pairs. It checks that every group's multiplexer took both its
  inputs.
* `sqrt_csla32_tb` runs the full-size adder through directed carry-chain cases
  and 500,000 random pairs. A quarter of the pairs are biased so that carries
  run far. Using reference carries computed from the operands, it checks that
  each of the six multiplexers and the carry between the halves took both
  values. It also checks that a carry rippled from bit 0 all the way to `cout`.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl --top-module sqrt_csla32_tb tb/sqrt_csla32_tb.sv
./obj_dir/Vsqrt_csla32_tb
```

All testbenches pass. Each one also fails when its module is changed in a way
that matters: an XOR turned into an OR, a carry-in ignored, a broken BEC AND
chain, an inverted select, or the carry between the halves cut.
