# Reversible-logic binary square rooter

This is a combinational circuit that takes the square root of an 8-bit binary
number. It is built only from reversible-style gates: a four-input
full-subtractor gate and a three-input multiplexer gate. It computes the root
one bit at a time, the way long division works by hand. Each step tries to
subtract, and the sign of the result decides both the root bit and which value
goes to the next step. No adder ever restores a failed subtraction. The
multiplexer simply passes on the value from before the subtraction. This is the
"modified non-restoring" scheme.

At the default width the radicand `n = N7N6N5N4.N3N2N1N0` gives the root
`u = U3U2.U1U0`. As integers, `u = floor(sqrt(n))`. If the binary point is put
in the middle of both words, the same result is the fixed-point root,
truncated to two fractional bits:

| radicand            | root          |
|---------------------|---------------|
| `1101.0000` (13)    | `11.10` (3.5) |
| `0010.0011` (2.1875)| `01.01` (1.25)|

## The algorithm, one row per root bit

Split the radicand into pairs of bits, most significant pair first. For an
N-bit radicand there are M = N/2 pairs, so the array has M rows and the root
has M bits.

* **Row 1** subtracts `01` from the top pair.
* **Row k > 1** puts the next pair to the right of the remainder left by row
  k−1. This gives A. It also puts `01` to the right of the root bits found so
  far. This gives B. The row then computes A − B.
* If the subtraction does **not** borrow, the row's root bit is 1 and the
  difference becomes the new remainder.
* If it **borrows**, the root bit is 0 and A itself becomes the new remainder.

Subtracting `4q + 1` is the usual trick of digit-by-digit rooting. Here q is
the root so far. When the root gains a 1 bit, (2q + 1)² − (2q)² = 4q + 1.

Worked through for `0010.0011`:

| row | A          | B        | A − B     | root bit | passed on |
|-----|------------|----------|-----------|----------|-----------|
| 1   | `00`       | `01`     | borrow    | U3 = 0   | `00`      |
| 2   | `0010`     | `0001`   | `0001`    | U2 = 1   | `0001`    |
| 3   | `000100`   | `000101` | borrow    | U1 = 0   | `0100`    |
| 4   | `010011`   | `001001` | `001010`  | U0 = 1   | (remainder 10) |

## The two gates

**`srg_gate`: the subtractor cell (Samiur Rahman gate).** It has four inputs
and four outputs:

```
w5 = w1 ^ w3                       garbage
w6 = w1 ^ w2                       garbage
w7 = ~w1&w2 ^ ~w1&w3 ^ w2&w3       borrow out of w1 - w2 - w3
w8 = w1 ^ w2 ^ w3 ^ w4             difference (with w4 = 0)
```

With `w4 = 0` the cell is a full subtractor:

* `w1` is the minuend bit and `w2` the subtrahend bit.
* `w3` is the borrow in and `w7` the borrow out.
* `w8` is the difference.

The two garbage outputs exist only so that the gate stays one-to-one, which a
reversible gate must be. The array never reads them, but it brings them out.

**`rt_mux`: the selector cell (RT gate used as a multiplexer).**
It computes `y = a & ~u | u & di`:

* When the row's root bit `u` is 1, it passes the difference bit `di`.
* When `u` is 0, it passes the row's input bit `a`.

Only this one output is modelled. The gate's other two outputs are garbage,
and their equations are not specified for this design.

## The array and its irregular row widths

`sqrt_stage` is one row of the array. It holds AW subtractor cells in a
ripple-borrow chain:

* The lowest cell's borrow in is 0.
* Every cell's `w4` is 0.
* `u` is the inverted borrow out of the top cell.

Below the cells sit RW multiplexers. They hand the low RW bits of the selected
value to the next row.

`rev_sqrt` stacks M such rows. The 8-bit array has these rows:

| row | subtractor cells | multiplexers | A = {…}                 | B = {…}             |
|-----|------------------|--------------|-------------------------|---------------------|
| 1   | SRT1–SRT2        | 2            | N7 N6                   | 0 1                 |
| 2   | SRT3–SRT6        | 4            | r1[1:0], N5 N4          | 0 U3 0 1            |
| 3   | SRT7–SRT12       | 4            | r2[3:0], N3 N2          | 0 0 U3 U2 0 1       |
| 4   | SRT13–SRT18      | none         | r3[3:0], N1 N0          | 0 U3 U2 U1 0 1      |

The widths do not follow one obvious pattern:

* Row 2 keeps four remainder bits, where three would do.
* Row 3 subtracts over six bits, where five would do.
* Row 4 needs no multiplexers, because nothing comes after it.

The package `sqrt_pkg` states one rule that reproduces these widths and also
holds for any even N:

```
AW(1) = 2,   AW(k) = RW(k-1) + 2
RW(k) = min(2k, N/2)  for k < N/2,   RW(N/2) = 0
```

This rule is always wide enough. After row k the remainder is at most twice the
k-bit partial root, so it fits in k + 1 bits, and RW(k) ≥ k + 1 whenever
k < N/2. The published design is only 8 bits wide; the rule for other widths is
this implementation's own. `tb_rev_sqrt_sizes` checks it exhaustively at
N = 4, 6, 10, 12 and 16.

A consequence of having no multiplexers in row 4: the final remainder `n − u²`
is that row's difference when `U0 = 1`, but that row's input when `U0 = 0`.

## Ports of `rev_sqrt`

| port      | width (N = 8) | meaning |
|-----------|---------------|---------|
| `n`       | 8             | radicand |
| `u`       | 4             | root, `u[3]` = U3 |
| `d`       | `[18:1]`      | difference output of subtractor cell k |
| `b`       | `[18:1]`      | borrow output of cell k |
| `g`       | `[36:1]`      | garbage: `g[2k-1]` = w5, `g[2k]` = w6 of cell k |
| `mux_out` | `[10:1]`      | output of multiplexer j |

The only parameter is `N`, and its default is 8. The per-cell
buses are numbered from 1, row by row from the top pair down, with the least
significant bit first in each row. For radicand `0010.0011` they read:

* `d = 001010111111000111`
* `b = 001000111111000111`
* `mux_out = 0100000100`

These agree with the reference simulation of the original 8-bit circuit. That
agreement is how the multiplexer numbering was fixed.

Other widths are sized by `sqrt_pkg::n_srt(N/2)` cells and
`sqrt_pkg::n_mux(N/2)` multiplexers.

There is no clock, reset or register. The root settles after the borrow has
rippled through all rows: about N/2 rows × up to N cells of gate delay.

## Where this RTL departs from, or fills in for, the original design

* The RT gate's two garbage outputs are not modelled, so the circuit has no
  `gm` bus. Their equations are not specified.
* Which of a cell's two garbage outputs gets the odd number in `g` is a choice:
  w5 is odd, following the gate's output order.
* A Feynman (CNOT) gate is mentioned as part of the 8-bit rooter, but its role
  is not shown. The array's fan-out is plain wiring here.
* The original work also builds a conventional-gate version and compares the
  power of the two on an FPGA. A power comparison is not a property of this
  RTL. Synthesis will turn the gate equations into whatever logic it likes, so
  none of the "reversible" power benefit survives a standard-cell flow. The
  RTL keeps the gate structure, so it can be mapped one-to-one onto a
  reversible-gate library.
* Widths other than 8 (see the sizing rule above).

## Files

| file | content |
|------|---------|
| `rtl/sqrt_pkg.sv`   | row sizing and numbering functions |
| `rtl/srg_gate.sv`   | subtractor cell |
| `rtl/rt_mux.sv`     | selector cell |
| `rtl/sqrt_stage.sv` | one row: cell chain, root bit, multiplexers |
| `rtl/rev_sqrt.sv`   | the whole array (top) |
| `tb/tb_srg_gate.sv` | all 16 input patterns and the gate's truth table |
| `tb/tb_rt_mux.sv`   | all 8 input patterns |
| `tb/tb_sqrt_stage.sv` | rows of shape 6/4, 6/0 and 2/2 over every operand pair |
| `tb/tb_rev_sqrt.sv` | default 8-bit array: all 256 radicands, remainders, both examples, per-cell values |
| `tb/tb_rev_sqrt_sizes.sv` | arrays of width 4, 6, 10, 12 and 16, every radicand |

Each testbench compares against integer arithmetic computed in the testbench
itself. It prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb_rev_sqrt` also counts, for every row, how often the difference and how
often the unchanged input was passed on. Both must occur in every row.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv rtl/sqrt_pkg.sv \
    tb/tb_rev_sqrt.sv --top-module tb_rev_sqrt -Mdir obj -o sim
./obj/sim
```

To run another testbench, substitute its name. Pass the package first, because
the other files import it. Verilator finds the rest in `rtl/` through `-y`.
Each run takes well under a second. The
testbenches pass wide integers to a common check task, which draws width
warnings; `-Wno-fatal` keeps those from stopping the build.

To try another width, instantiate `rev_sqrt #(.N(<even N ≥ 4>))`. Size the
`d`, `b`, `g` and `mux_out` buses from the `sqrt_pkg` functions, or leave them
open.

Lint gives one warning at the top level: the last row's `r_k` is unused. That
row has no multiplexers, and `r_k` is a constant placeholder bit.
