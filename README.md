# 13-point DCT on a pseudo-correlation systolic array

This is synthesizable SystemVerilog for a 1-D discrete cosine transform of
prime length N = 13. It is built around one short linear systolic array of six
processing elements. The transform is rewritten so that almost all of its work
is two 6-point *pseudo-correlations*. These are cyclic correlations in which
each term carries its own fixed sign. A single array evaluates both of them at
once, and produces two transform values per clock cycle. A small
pre-processing stage feeds the array and a small post-processing stage turns
its results into DCT outputs.

The design computes the unscaled DCT-II

    Y(k) = sum_{i=0..12} x(i) cos((2i+1) k pi/26),   k = 0..12

so the sqrt(2/13) factor of the orthonormal definition is not applied (see
[Departures](#departures-and-own-choices)).

## The algorithm

**Backward running sum.** The first step builds an auxiliary sequence:

    xa(12) = x(12),   xa(i) = x(i) + xa(i+1)   (i = 11..0)

Substituting x(i) = xa(i) - xa(i+1) into the DCT and combining neighbouring
cosines gives:

    Y(0) = xa(0)
    Y(k) = xa(0) cos(k pi/26) - 2 sin(k pi/26) T(k),      k = 1..12
    T(k) = sum_{i=1..12} xa(i) sin(i k pi/13)

**Pairing.** The kernel satisfies sin((13-i) k pi/13) = ±sin(i k pi/13), with
`+` for odd k and `-` for even k. So the twelve xa(1..12) only enter as six
sums or six differences of the pairs

    (2,11) (4,9) (8,5) (3,10) (6,7) (12,1)

The even outputs use the differences xa(p) - xa(q). The odd outputs use the
sums xa(p) + xa(q). The pair order comes from the primitive root 2 modulo 13.

**Pseudo-correlation.** With s(m) = sin(m pi/13), m = 1..6, each group is a
6x6 matrix-vector product whose magnitudes form a cyclic (correlation)
pattern. Row r, column c (both 0-based) uses `s(COEF_SEQ[(r+c) mod 6])`, where
`COEF_SEQ = 4 5 3 6 1 2`. Only the signs break the cyclic pattern:

    T(NU[r]) = sum_c (-1)^EPS[r][c] s(COEF_SEQ[(r+c) mod 6]) (xa(p_c) - xa(q_c))
    T(MU[r]) = sum_c (-1)^GAM[r][c] s(COEF_SEQ[(r+c) mod 6]) (xa(p_c) + xa(q_c))

Here `NU = 2 4 8 10 6 12` and `MU = 11 9 5 3 7 1`. `EPS` and `GAM` are two fixed
6x6 sign matrices. All of these tables are in `rtl/dct13_pkg.sv`.

Because the magnitudes are cyclic, one linear array with stationary operands
and a moving coefficient stream can evaluate all six rows. The signs are
applied per PE and per cycle by a 2-bit *sign tag*. Both groups use the same
coefficient in the same place, so one array with two lanes computes both.

## The array schedule

This is the part that needs the most care. Each PE (`rtl/pe.sv`) holds one
column c:

* `xi1` holds the column's sum.
* `xi2` holds the column's difference.

Every cycle the PE:

* multiplies both operands by the coefficient `s` passing through;
* adds the products to, or subtracts them from, two partial sums, `y1` (the sum
  lane, odd k) and `y2` (the difference lane, even k);
* takes the sign from the tag: bit 1 negates the `y2` product, bit 0 negates
  the `y1` product.

Signals move through the array from PE 1 to PE 6 at two speeds:

| signal | register stages per PE |
|---|---|
| item (sum, difference, coefficient) | 1 |
| partial sums `y1`, `y2`, load tag `tc`, valid `v` | 2 |

A block is six items. They enter at phases 0..5 of a free-running 6-cycle
phase counter:

| phase | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| pair (p,q) | (12,1) | (6,7) | (3,10) | (8,5) | (4,9) | (2,11) |
| coefficient | s(2) | s(1) | s(6) | s(3) | s(5) | s(4) |
| load tag | 1 | 0 | 0 | 0 | 0 | 0 |

The coefficient keeps cycling through its six values even when no block is
present.

**Loading.** The tag rides at half the items' speed, so it overtakes nothing.
It falls back by exactly one item per PE, and so meets item j-1 in PE j. There
the PE captures the item's sum and difference. PE 1 therefore keeps (12,1) and
PE 6 keeps (2,11): PE j holds column 6-j. In the cycle the tag arrives, the
PE's products already use the new operands.

**Computing.** Six partial sums start at PE 1 with value 0, one in each of
phases 0..5. The first one starts together with the tag. A partial sum that
starts at phase t meets, in PE j, the coefficient that entered j-1 cycles after
it. That coefficient is exactly the one row (6-t) mod 6 needs for column 6-j.
The partial sums leave PE 6 twelve cycles after they started, one
(T(NU[r]), T(MU[r])) pair per cycle, in the row order 0,5,4,3,2,1. That is:

    T(2)/T(11), T(12)/T(1), T(6)/T(7), T(10)/T(3), T(8)/T(5), T(4)/T(9)

The next block's tag follows the last partial sum of the current block. So the
array could accept a new block every 6 cycles. The last partial sum meets items
up to phase 10, which is why the coefficient input must keep cycling between
blocks.

**Sign tags.** `rtl/sign_tag_gen.sv` derives every PE's tag from the phase.
PE j at phase p sees the partial sum started at phase (p - 2(j-1)) mod 6. That
gives the row r, and the tag is `{EPS[r][6-j], GAM[r][6-j]}` (0-based column
6-j). Over six cycles, the tag sequence of each PE is a rotation of the
published tag streams of this architecture. `tb_sign_tag_gen` checks this for
every PE whose stream is known.

## Pre- and post-processing

```
x(i) --> pre_accum --xa--> pair_seq --items--> systolic_array --T pairs--> post_proc --> Y(k)
         (RAM, 2 banks)    (RAM, 2 banks,        ^  6 PEs                  (2-bank T buffer,
          backward sum)     sums/differences,    |                          2 mult, 2 add)
                            coefficient, tag,  sign_tag_gen
                            phase counter)
```

* **`pre_accum`** writes the 13 samples of a block, in natural order, into one
  bank of a two-bank RAM. It then reads them back from address 12 down to 0
  through a single accumulator, which gives xa(12), xa(11), ..., xa(0). These
  values are written into the next RAM. Blocks may follow each other without a
  gap.
* **`pair_seq`** holds xa in a second two-bank RAM with two read ports. Each
  cycle it reads one (p,q) pair and forms the sum and difference. It issues
  them together with the phase's coefficient, the tag and a valid flag. A
  block that becomes ready waits for the next phase 0. This takes 3 to 8
  cycles after xa(0) is written (`phase_wait_o`).
* **`post_proc`** writes each T(k) at its index k in a two-bank register
  buffer, which undoes the array's order. It then produces Y(0..12) in natural
  order, one per cycle. It uses two multipliers (xa(0)·cos, T·2sin) and two
  adders (the subtraction and the rounding). xa(0) reaches it through a
  two-entry queue, written when a block enters the array and read when the
  block's first pair leaves. If a finished bank must wait for the reader,
  `out_queued_o` is high.
* **`bank_ram`** is the shared two-bank RAM. It has one write port and two
  synchronous read ports with one cycle of latency, and it reads before it
  writes.

## Interface and timing (`dct13_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid_i`, `in_x_i` | in | 1, 12 | one sample x(i), signed; x(0) first; 13 per block; idle cycles allowed anywhere |
| `y_valid_o`, `y_idx_o`, `y_o` | out | 1, 4, 20 | Y(k) with index k, natural order, consecutive cycles, 4 fractional bits |
| `phase_wait_o` | out | 1 | a ready block is waiting for array phase 0 |
| `out_queued_o` | out | 1 | a finished block is waiting for the output reader |

* **Throughput:** one block per 13 cycles. This is set by the input of one
  sample per cycle, and the design sustains it indefinitely.
* **Latency:** Y(0) of a block is on the outputs 37 to 42 clock edges after
  the edge that takes its last sample. Under continuous input, a block may wait
  up to one more output block for the reader.
* **Input rules:** there is no back-pressure. The only rule is at most one
  sample per cycle. Two assertions (in `pair_seq` and `post_proc`) flag an
  overrun.

## Number formats

All formats are two's complement. The constants are in `dct13_pkg`.

| quantity | format |
|---|---|
| x | 12-bit integer (`XW`) |
| xa | 16 bits; the sum of 13 inputs cannot overflow |
| sums and differences | 17 bits |
| s(m) | 16 bits, 14 fractional bits: `round(sin(m pi/13)·2^14)` |
| T(k) | 36 bits, 14 fractional bits. Arithmetic in the array is exact. |
| cos and 2 sin tables | 18 bits, 14 fractional bits: `round(cos(k pi/26)·2^14)`, `round(2 sin(k pi/26)·2^14)` |
| Y | 20 bits, 4 fractional bits, rounded half up |

The only error sources are coefficient quantisation and the final rounding.
Against the floating-point DCT, the test of 300 random and extreme blocks
showed a worst-case absolute error of 2.9. Full-scale outputs reach about
26,600.

To change the input width, edit `XW`. The internal widths follow from it. The
coefficient tables must be regenerated from the formulas above if `CF`
changes.

## Departures and own choices

These points follow the architecture as published:

* the algorithm (running sum, pairs, coefficient order, sign matrices, output
  equations);
* the six-PE linear array with stationary operands captured on a tag;
* the PE's two multipliers and two adders with the four-way sign table;
* the use of two RAMs for reordering at the input;
* the permutation and the two-multiplier, two-adder output stage.

These points are this design's own:

* **Output equation:** it uses cos(k pi/26) in row k, which is what the
  derivation gives. No scale factor is applied, matching Y(0) = xa(0).
* **Two register speeds:** the published PE shows one register per signal.
  Here the partial sums and the tag get two stages, because a stationary
  operand array needs a speed difference. The resulting sign tag sequences
  agree with the published tag streams up to their start offsets.
* **Sign tags from a table:** they are generated from the phase counter rather
  than supplied as external streams.
* **Fixed block alignment:** blocks always enter at phase 0, and the operand
  order is fixed as in the table above.
* **Everything around the array:** all word widths, the interfaces, the
  ping-pong banking, the x(0) queue and the rounding.

These are not built:

* the claimed reuse of the array for a DST, whose algorithm is not given;
* a hardware-sharing reduction of the array, which is only referenced;
* a tag mechanism for placing data at the array ends, which is only referenced.

The ordinary load tag places every operand here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog. The
reference models in `tb/dct13_ref_pkg.sv` compute xa, T(k) and Y(k) straight
from the definitions, without the array's reordering, tables or schedule.

| testbench | what it checks |
|---|---|
| `tb_pe` | PE against a behavioural model: all four sign codes, loads, one-stage and two-stage delays |
| `tb_sign_tag_gen` | every tag against a row found by coefficient search, and tag sequences against the published streams |
| `tb_systolic_array` | 60 blocks, back to back and with gaps: exact T(k), output order, 12-cycle latency |
| `tb_bank_ram` | random traffic on both ports, including read/write collisions |
| `tb_pre_accum` | exact xa for blocks with and without gaps, bank alternation, timing |
| `tb_pair_seq` | pair order, sums and differences, coefficient stream, phase alignment, wait length |
| `tb_post_proc` | exact Y(k) and floating-point tolerance, natural order, bank queueing |
| `tb_dct13_top` | 300 blocks end to end at the default size (see below) |

`tb_dct13_top` checks every output both exactly and against the floating-point
DCT. It also counts the phase waits, output queueing, loads in every PE and the
use of all four sign codes, and it checks latency and sustained throughput.

To run a testbench with Verilator, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/dct13_pkg.sv tb/dct13_ref_pkg.sv tb/tb_dct13_top.sv --top-module tb_dct13_top
./obj_dir/Vtb_dct13_top
```

For another block, replace `tb_dct13_top` with its testbench. Only
`tb_bank_ram` does not need the two packages.

## Files

* `rtl/dct13_pkg.sv`: sizes, formats, coefficient and index tables, schedule
  functions.
* `rtl/pe.sv`, `rtl/systolic_array.sv`, `rtl/sign_tag_gen.sv`: the array.
* `rtl/pre_accum.sv`, `rtl/pair_seq.sv`, `rtl/bank_ram.sv`: pre-processing.
* `rtl/post_proc.sv`: post-processing.
* `rtl/dct13_top.sv`: the complete transform.
* `tb/`: the reference package and one testbench per module.
