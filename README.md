# TG-Mult: a low-power 16 x 16 Wallace-tree multiplier

Much of the energy a parallel multiplier burns goes into glitches, not into
the transitions the arithmetic needs. Partial products and carries reach each
full adder at different times, so adder outputs flip several times before
they settle. Each spurious edge spreads into the adders downstream. In audio
and hearing-aid processors, this matters more than speed. Such chips run at
about 1 MHz from supplies near 0.75 V, so a multiplier has a whole
microsecond to settle.

TG-Mult attacks glitches in two ways:

1. **Architecture.** It uses a Wallace tree instead of a carry-save array.
   All partial products enter the adder network at once. Each column is
   reduced in parallel, so the longest full-adder chain is 6 cells deep
   instead of about 16. Shorter chains produce fewer glitches and pass fewer
   on.
2. **Circuit.** The full adders of the reduction matrix are transmission-gate
   cells built from minimum-size transistors. A chain of conducting
   transmission gates acts as a series resistance into the node
   capacitances. That forms an RC low-pass filter with a time constant of
   several nanoseconds, and most glitches die in it. The partial-product
   gates and the final adder stay level-restoring static CMOS, so the block
   has normal input loading and output drive.

The RTL here reproduces point 1 exactly, as the three-layer structure below.
Point 2 is a transistor-level property. RTL cannot express it, and a
synthesized netlist gets it only from a transmission-gate full-adder cell in
the target library. The Boolean function is the same either way.

## Structure

```
 x[15:0] y[15:0]
     |      |
 +---v------v---------+   256 gates: x[i] AND y[j]
 | tgm_and_array      |   (NAND on the 30 Baugh-Wooley sign terms)
 +---------+----------+
           | pp[j][i], weight 2^(i+j)
 +---------v----------+   Wallace tree: 197 full adders, 80 half adders,
 | tgm_wallace_matrix |   6 stages; two constant ones for signed mode
 +----+----------+----+
      | sum_row  | carry_row   (32 bits each, carry-save form)
 +----v----------v----+
 | tgm_rca            |   32-bit ripple-carry adder of full adders
 +---------+----------+
           v
       z[31:0] = x * y
```

| file | contents |
|---|---|
| `rtl/tgm_pkg.sv` | default width, and the elaboration-time functions that compute the Wallace schedule |
| `rtl/tgm_full_adder.sv` | one-bit full adder (matrix cell and ripple-adder cell) |
| `rtl/tgm_half_adder.sv` | one-bit half adder |
| `rtl/tgm_and_array.sv` | partial-product gates |
| `rtl/tgm_wallace_matrix.sv` | the generated Wallace reduction tree |
| `rtl/tgm_rca.sv` | the final ripple-carry adder |
| `rtl/tg_mult.sv` | top level |

The whole multiplier is combinational. It has no clock, no registers and no
handshake. Apply `x` and `y`, and `z` is valid one propagation delay later.
The reference silicon (0.18 um CMOS, 0.75 V) needs about 72 ns. Registers
around it belong to the system that uses it. Pipelining is deliberately
absent, because at low frequency its flip-flops would cost more energy than
the glitches they remove.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | operand width; the product is `2N` bits. The schedule supports 2..64. |
| `SIGNED` | 1 | 1: two's-complement operands (modified Baugh-Wooley); 0: unsigned operands |

## Signed operands: modified Baugh-Wooley

In unsigned mode the matrix adds the plain AND terms, `Z = sum x_i y_j 2^(i+j)`.
For two's-complement operands, the sign bits carry negative weight. The
modified Baugh-Wooley scheme handles this with two changes to the matrix and
no change to the adders:

* Each term that pairs exactly one sign bit with a non-sign bit, `x_15 y_j`
  or `x_i y_15` with `i, j < 15`, is inverted. Its gate becomes a NAND.
  The term `x_15 y_15` stays an AND.
* A constant one is added in column `N` (weight 2^16) and another in column
  `2N-1` (weight 2^31).

The result is correct modulo 2^32, which covers every product of two 16-bit
signed numbers, including (-2^15)^2 = 2^30. In this RTL, `tgm_and_array` does
the inversions. The two constant ones are extra bits of the initial matrix
inside `tgm_wallace_matrix`, so they go through the same adder tree as
everything else. Any carry out of column 31 is discarded.

## How the Wallace tree is generated

This is the least obvious part of the code. `tgm_wallace_matrix` has no
hand-wired adders. The functions in `tgm_pkg` compute, at elaboration time,
how many bits each column holds before each stage:

* Before stage 0, column `c` holds every partial product with `i + j = c`,
  plus the constant one in columns `N` and `2N-1` in signed mode.
* In one stage, each column sends every complete group of three bits into a
  full adder. If two bits are left over, they go into a half adder. A single
  leftover bit passes through unchanged.
* After the stage, a column holds its own full-adder and half-adder sums,
  its passed bit, and the carries that came from the column to its right.
* Stages repeat until no column holds more than two bits
  (`tgm_pkg::num_stages`). For 16 x 16 the tallest column shrinks
  16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2, which takes 6 stages in either mode.

Inside a column the bits are kept in a fixed order: full-adder sums, then
the half-adder sum, then the passed bit, then incoming carries. Before
stage 0 they are ordered by partial-product row, with the constant one last.
Every stage has its own arrays, `g_stage[s].cur`, `.nxt` and `.cy` (column,
bit), so the tree elaborates as a plain chain of nets. Unused bit positions
are tied to zero. The generate code reads the cell counts and wiring offsets
from the same functions, so changing `N` or the grouping rule in `tgm_pkg`
rebuilds the tree consistently.

The final ripple-carry adder spans all 32 columns. In the low columns, where
only one bit is left, one addend is constant zero. Synthesis removes the
cells those constants make redundant.

## What is taken from the design and what is chosen here

Taken from the design description:

* 16-bit operands and a 32-bit product.
* AND-gate partial products, with all terms entering the matrix at once.
* A Wallace tree of full and half adders.
* A final ripple-carry adder, chosen for energy over speed.
* Combinational operation.
* Signed operation by modified Baugh-Wooley.

Chosen here, since the description leaves it open:

* **Signedness default.** Signed, with unsigned available through
  `SIGNED = 0`. The description gives the unsigned formula and says
  Baugh-Wooley converts it to signed multiplication. It does not say which
  mode the fabricated block used.
* **Exact tree wiring.** The column-wise rule above, including its half
  adders. A different Wallace or Dadda grouping gives the same products
  with a different cell count and glitch profile.
* **Where the ripple adder starts.** Column 0.
* **Full adder logic.** `s = a^b^ci`, `co = (a^b) ? ci : a`, the select
  form a transmission-gate adder implements. Matrix and ripple adder share
  this one cell model.

Not modelled:

* The transistor-level behaviour: transmission-gate RC glitch filtering,
  minimum-size devices, and the lower leakage from fewer supply-to-ground
  paths. The energy, delay and leakage figures of the reference chip
  (about 4.7 uW/MHz measured and 72 ns at 0.75 V) therefore do
  not carry over to a synthesized netlist.
* The test-chip infrastructure: input and output buffers, separate core
  power rings and analog supply pads.
* The comparison architectures: carry-save array, radix-4 Booth array,
  the delay-balancing "Leapfrog" array and the self-timed latch-adder
  array. They are reference points for TG-Mult, not part of it.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|---|---|
| `tb/tb_tg_mult.sv` | top at default parameters. 64 corner pairs and 200,000 random signed pairs, against the simulator's product. It counts and requires: one negative operand, two negative operands, (-2^15)^2, and a final-adder carry rippling through 8 or more bits. It also checks one result per cycle. |
| `tb/tb_tg_mult_modes.sv` | unsigned 16-bit with random operands. Signed and unsigned 8-bit and 6-bit, exhaustively. |
| `tb/tb_tg_mult_activity.sv` | zero-delay functional activity of the 554 adder outputs over 20,000 random operand pairs. It measures alpha_F = 0.39 transitions per output per operation, against 0.40 for Wallace-type multipliers of this size. |
| `tb/tb_tgm_wallace_matrix.sv` | the matrix on its own: the two rows must add to the product. 16-bit signed and unsigned random, 5-bit signed exhaustive, and a depth of 6 stages. |
| `tb/tb_tgm_and_array.sv` | every gate output against its definition. The weighted sum plus the Baugh-Wooley constants must equal the product. |
| `tb/tb_tgm_rca.sv` | 32-bit adder, including a carry through all 32 cells. |
| `tb/tb_tgm_full_adder.sv`, `tb/tb_tgm_half_adder.sv` | exhaustive truth tables |

A zero-delay simulation cannot show the spurious activity TG-Mult is built
to suppress. Measuring it needs a gate-level simulation with cell delays, or
a transistor-level simulation, of a netlist mapped onto transmission-gate
cells.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/tgm_pkg.sv tb/tb_tg_mult.sv \
          --top-module tb_tg_mult -o sim
./obj_dir/sim
```

Substitute any other testbench name. The package must come first on the
command line. Verilator finds the other modules through `-Irtl`. A lint run
on the design is
`verilator --lint-only -Wall -Irtl rtl/tgm_pkg.sv rtl/tg_mult.sv`. It
reports two unused-signal warnings, and `-Wall` makes them fatal unless
`-Wno-fatal` is added: the ripple adder's carry out, which
lies above the 32-bit product, and upper bits of a function argument.
