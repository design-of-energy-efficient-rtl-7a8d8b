# 4x4 Wallace-tree multiplier with 3:2 compressors

This is a small combinational multiplier. It multiplies two unsigned 4-bit
numbers into an 8-bit product. Its goal is a short critical path at
moderate power. To get there it uses a Wallace tree, which works on all
columns of the partial-product array at once. Most of the tree is built
from 3:2 compressors, and a 4-bit adder at the end combines the two rows
that remain.

The work is done in three steps:

| step | module | what it does |
|------|--------|--------------|
| 1. partial-product generation | `pp_gen` | 16 AND gates, `pp[i][j] = b[i] & a[j]` |
| 2. partial-product processing | `wallace_ppp` | two reduction stages of half adders and 3:2 compressors turn 4 rows into 2 |
| 3. final addition | `csa_adder` | 4-bit adder over the two remaining rows |

`wallace_mult_4x4` is the top level and wires the three steps together.
The cells are `half_adder` and `compressor_3_2`. Shared constants and the
partial-product matrix type are in `wallace_pkg`.

## Interface

```
module wallace_mult_4x4 (input [3:0] a, input [3:0] b, output [7:0] p);  // p = a * b
```

There is no clock, no reset and no handshake. The product is valid one
propagation delay after the operands settle. The operands are unsigned.

## The reduction tree

This is the least obvious part. Write the partial products as dots, one
column per weight `2^(i+j)`. Before any reduction, the column heights for
weights 0 to 6 are `1 2 3 4 3 2 1`.

Each stage turns the row count `S` into `2*floor(S/3) + S mod 3`. That
gives 4 → 3 → 2, so two stages of cells are enough. In a stage, a group of
three dots in one column goes into a 3:2 compressor, and a group of two goes
into a half adder. Each cell leaves a sum dot in its own column and a carry
dot in the next column up.

```
weight:              6 5 4 3 2 1 0
stage 1 heights:     1 2 3 4 3 2 1    HA @1, 3:2 @2, 3:2 @3 (p30 passes), HA @4 (p31 passes)
stage 2 heights:     1 3 3 3 2 1 1    HA @2, 3:2 @3, 3:2 @4, 3:2 @5
stage 3 heights:     2 2 2 2 1 1 1    weights 0..2 are final product bits
                     \_______/
                     4-bit final adder -> product bits 3..6, its carry -> bit 7
```

The stage-2 cells take these inputs:

- weight 3: the stage-1 compressor sum, the carry from weight 2, and p30
- weight 4: the stage-1 half-adder sum, the carry from weight 3, and p31
- weight 5: the stage-1 weight-4 half-adder carry, p23 and p32

p33 goes on to stage 3 on its own. Internal signals are named
`s<stage>_w<weight>_{s,c}`, so `s2_w4_c` is the carry of the stage-2 cell
at weight 4.

The tree uses 3 half adders and 5 compressors, and the final adder adds 1
half adder and 3 compressors. That makes 12 adder cells in all, the usual
count for a 4x4 Wallace multiplier.

`wallace_ppp` has a property that is easy to test: for any 16-bit pattern
on `pp`, `low + ((row_x + row_y) << 3)` equals the weighted sum of the
pattern. The pattern does not have to come from real operands.

## The final adder

The final adder has no carry input. Bit 0 is a half adder, and bits 1 to 3
are 3:2 compressors in a ripple chain. `cout` becomes product bit 7. The
design calls this adder a carry-save adder but does not give its circuit.
The ripple chain is the simplest circuit that adds two rows, and it keeps
the key property that no carry comes in at the bottom. The width `W` is a
parameter with default 4.

## What follows the design and what is an implementation choice

These parts follow the design:

- the three-step structure
- the 16 AND gates and the `p_ij = b_i a_j` indexing
- the row-count rule and the stage column heights
- which columns get a half adder and which get a 3:2 compressor
- the 4-bit width of the final adder

These are implementation choices:

- **Which dot feeds which cell.** Within a column this is not specified. Any
  assignment gives the same product, but not the same internal signals.
- **The cells are logic equations.** The design calls for low-energy
  transistor-level half adders and compressors taken from earlier circuits.
  Here they are written as `s = a^b, c = a&b` and `s = x^y^z,
  c = majority`. Any energy or delay benefit of those circuits is not
  represented.
- **The final adder's circuit**, as described above.
- **Unsigned operands and no registers.** Signedness is not mentioned. The
  design is evaluated by propagation delay, so it is written without a clock.
- **Fixed at 4x4.** The design is given only for 4x4. `pp_gen` and
  `csa_adder` take a width parameter, but `wallace_ppp` is hand-wired for
  four rows.

The original evaluation measured power, delay and energy at 90 nm and
32 nm, with supply voltages from 0.6 V to 1.2 V. Those are properties of a
transistor-level circuit, and this RTL says nothing about them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_half_adder`, `tb_compressor_3_2` | all input combinations |
| `tb_pp_gen` | all 256 operand pairs at N=4, plus random operands at N=7 |
| `tb_wallace_ppp` | all 65,536 bit patterns on `pp`, against the weighted sum |
| `tb_csa_adder` | all 256 pairs at W=4, plus random pairs and a full ripple at W=9 |
| `tb_wallace_mult_4x4` | every operand pair twice, in order and shuffled, against `a*b` |

`tb_wallace_mult_4x4` samples the product in the same cycle the operands
change. It also counts, through hierarchical references, how often each of
these happens:

- a stage-1 half-adder carry and a stage-1 compressor carry
- a stage-2 half-adder carry and a stage-2 compressor carry
- a carry that ripples through the whole final adder
- a final carry-out

If any of them never happens, the run fails. The top has no parameters, so
this run is at the design's full size.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/wallace_pkg.sv tb/tb_wallace_mult_4x4.sv --top-module tb_wallace_mult_4x4 -o sim
./obj_dir/sim
```

To run another testbench, change its name in both places. Every testbench
finishes in well under a second.
