# Reversible-logic binary square rooter

This is a combinational integer square-root unit: for an 8-bit radicand `p` it
returns the 4-bit root `u = floor(sqrt(p))`. It is written in the structure of
a reversible-logic circuit. Every arithmetic cell is a reversible gate: a
4-input, 4-output Saimur Rahman Gate (SRG) used as a full subtractor, a
Feynman gate, and an RT gate used as a multiplexer. The point of such a
structure is that no cell destroys information. That makes it a candidate for
very low-energy and quantum/nano-scale implementations. In CMOS it is
still an ordinary, small combinational circuit: the 8-bit version synthesises
to about 100 simple gates and has no flip-flops.

## The algorithm: one root bit per row

The radicand is split into pairs of bits, starting at the most significant
end. The root is built one bit at a time, from the top bit down. Step `k`
works like this:

1. Append the next bit pair of the radicand to the current partial remainder.
   The result is `A`.
2. Form the trial value `B = {root bits found so far, 0, 1}`. This is
   `4*Q + 1`, where `Q` is the root so far.
3. Compute `A - B`. If the result is non-negative, the new root bit is 1 and
   the difference becomes the remainder. If it is negative, the root bit is 0
   and `A` is passed on unchanged.

Step 3 passes the input on rather than adding `B` back. The circuit does this
with a multiplexer after each subtraction, so the array needs no adders.
Each step is one hardware row. The rows are chained, and the root bits of
earlier rows are fed down into the trial values of later rows.

Worked example, `p = 36 = 00 10 01 00`:

| row | A (bits)  | B (bits)  | A - B | root bit | remainder passed on |
|-----|-----------|-----------|-------|----------|---------------------|
| 0   | `00`      | `01`      | < 0   | u3 = 0   | `00`                |
| 1   | `00 10`   | `00 01`   | 1     | u2 = 1   | `0001`              |
| 2   | `0001 01` | `00 01 01`| 0     | u1 = 1   | `0000`              |
| 3   | `0000 00` | `0 011 01`| < 0   | u0 = 0   | (not needed)        |

Result: `u = 0110 = 6`.

## The row: controlled subtract multiplexer (`rcsm_row`)

Each row is an `rcsm_row` of width `W`:

* `W` `srg_gate` cells form a ripple-borrow subtractor. The least significant
  cell is first, its borrow-in is 0, and every cell's fourth input is tied to
  0. With that input at 0 the SRG computes `w8 = w1^w2^w3`, the difference
  bit, and `w7`, the borrow of `w1 - w2 - w3`. Its other two outputs,
  `w1^w3` and `w1^w2`, are garbage lines. They exist only so that the gate
  stays reversible.
* The borrow out of the top cell is the sign of `A - B`. A `feynman_gate`
  with its second input tied to 1 inverts it into the root bit `u`. The
  gate's pass-through line (`bo`) carries the borrow on as garbage.
* `W` `rt_mux` cells compute `y = a & ~u | u & di`. This passes the
  difference on when `u = 1` and the row input when `u = 0`.

The row brings out the remainder `r`, the raw difference `d`, and the garbage
lines `g5`, `g6` and `bo`. The top level uses only `u` and the low bits of
`r`.

## Sizing the array (`binary_sqrt`, `binary_sqrt_pkg`)

The remainder after row `k` is at most twice the partial root. It therefore
always fits in `k + 2` bits, and never in more than `HALF = SIZE/2` bits for
any row that passes a remainder on. `binary_sqrt_pkg` holds two functions
built on this bound:

* `row_width(k) = min(2k+2, HALF+2)` is the number of subtractor cells in
  row `k`.
* `rem_width(k) = min(2k+2, HALF)` is the number of remainder bits row `k`
  hands to row `k+1`.

For the default `SIZE = 8`:

* The rows have 2, 4, 6 and 6 cells, 18 SRG gates in total.
* The rows hand on 2, 4 and 4 remainder bits.
* There are 4 Feynman gates and 10 multiplexers whose outputs are used.

The trial value of row `k` is `{u[HALF-1 -: k], 2'b01}`, zero-extended to the
row width. It always fits, because `4Q + 1 < 2^(k+2)`.

The last row only has to deliver its root bit. Its multiplexers, and the two
unused upper multiplexers of row 2, remain in the RTL because `rcsm_row` is
uniform. Synthesis removes them.

`SIZE` is a parameter. It must be even and at least 4, and an elaboration-time
assertion enforces that. The array for a 16-bit and a 32-bit radicand is
generated from the same code and is tested.

## Timing and interface

| port | dir | width      | meaning                            |
|------|-----|------------|------------------------------------|
| `p`  | in  | `SIZE`     | unsigned radicand                  |
| `u`  | out | `SIZE/2`   | `floor(sqrt(p))`                   |

There is no clock and no reset. The result is valid once the borrow ripples
of all rows have settled. The critical path runs through every row's
subtractor chain and through the multiplexer between rows. Add registers
around the unit, or between rows, if it has to be pipelined. The RTL does not
do this.

## Fractional radicands

The circuit only sees bits, so the binary point is a matter of how you read
the bits. If `p` is read with `F` fraction bits (`F` even), then `u` has
`F/2` fraction bits. Two examples with `p` read as 4.4 bits:

* `1101.0000` (13.0) gives `11.10` (3.5).
* `0010.0011` (2.1875) gives `01.01` (1.25).

Both are truncated roots. To get more root precision, widen `SIZE` and
append zero fraction bits to the radicand.

## Where this RTL goes beyond its source design

* **Feynman gate placement.** The source design uses Feynman gates in the
  array but does not say where they sit. Here one Feynman gate per row
  inverts the final borrow into the root bit.
* **RT gate outputs.** For the RT gate only the multiplexer output is
  defined. Its two other outputs are not modelled.
* **Parameterised widths.** The generalised width rules above are this
  design's own. At `SIZE = 8` they reproduce the reference 8-bit array.
* **Naming.** The source calls the method "non-restoring". The array it
  describes, and this RTL, select the unchanged input when a trial
  subtraction goes negative, as described above.
* **No conventional version.** An equivalent circuit built from ordinary
  irreversible gates served only as a point of comparison. It is not
  included.
* **Reported figures not reproduced.** Power, gate-count and FPGA timing
  figures quoted for the original (about 65 µW, 35 gates, 1.175 ns on an
  FPGA) depend on the implementation flow. They are not reproduced or
  claimed here. The I/O count does match: 8 inputs and 4 outputs, 12 pins.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_srg_gate`          | All 16 input patterns. Borrow and difference are checked against the gate's truth table and against integer subtraction. The garbage outputs are checked against their XOR definitions. All 16 output patterns must differ (reversibility). |
| `tb_rt_mux`            | All 8 input patterns. |
| `tb_feynman_gate`      | All 4 input patterns. |
| `tb_rcsm_row`          | A 6-cell row (the widest in the 8-bit array) on all 4096 `(a, b)` pairs. Checks the root bit, difference, remainder, garbage lines and final borrow. |
| `tb_binary_sqrt`       | The default 8-bit unit: a reference run of ten radicands (36, 129, 9, 99, 13, 141, 101, 18, 1, 13 give 6, 11, 3, 9, 3, 11, 10, 4, 1, 3), the two fixed-point examples above, and all 256 radicands against an independent integer search. For each row it counts how often the trial subtraction was accepted and how often the input was passed on, and fails if a row never does both. |
| `tb_binary_sqrt_wide`  | `SIZE = 16` on all 65536 radicands, and `SIZE = 32` on 20000 random radicands plus 0 and 2^32-1. |

Running one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/binary_sqrt_pkg.sv tb/tb_binary_sqrt.sv --top-module tb_binary_sqrt
./obj_dir/Vtb_binary_sqrt
```

Replace `tb_binary_sqrt` with any testbench name above. `-y rtl` lets
Verilator find the sub-modules. The package file must be listed first.
Each run finishes in well under a second.

Lint reports signals in `binary_sqrt` as unused. These are the raw
differences and garbage lines of each row, which are deliberately not
brought out.

## Files

* `rtl/binary_sqrt_pkg.sv`: row and remainder width functions.
* `rtl/binary_sqrt.sv`: top level, the array of rows.
* `rtl/rcsm_row.sv`: one controlled subtract multiplexer row.
* `rtl/srg_gate.sv`, `rtl/feynman_gate.sv`, `rtl/rt_mux.sv`: the reversible
  gates.
* `tb/tb_*.sv`: the self-checking testbenches described above.
