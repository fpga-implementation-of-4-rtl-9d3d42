# Approximate 4:2 compressor from XOR-free full adders

Multipliers for error-tolerant work, such as watermarking and other bulk
data processing, spend most of their area and delay in the partial-product
reduction tree. That tree is built from full adders and 4:2 compressors. In
an exact full adder the XOR gates on the sum path are the most expensive
part. This design swaps them for a few AND/OR/NOT gates and accepts a small,
bounded error in return.

The RTL has:

- four *simplified approximate full adders*, SAFA1E to SAFA4E, each
  cheaper and less accurate than the one before;
- a 4:2 compressor built from two of these cells;
- a top level that puts one compressor of each cell type side by side, so
  the four variants can be compared on the same inputs.

Everything is combinational. There are no clocks, resets or handshakes.

## The approximate full adders

A full adder maps three bits A, B, C to a 2-bit value `2*carry + sum`, which
should equal A+B+C. The *error distance* (ED) of an input is the value the
cell outputs minus the exact value. Each cell below is correct for most of
its eight inputs. Where it is wrong, it is off by exactly one.

| cell   | carry                   | sum                            | gates | wrong inputs (ED)                     |
|--------|-------------------------|--------------------------------|-------|---------------------------------------|
| SAFA1E | A.B + C.(A+B) (exact)   | NOT(carry) . (A+B+C)           | 7     | 111 (-1)                              |
| SAFA2E | A                       | NOT(A).(B+C) + B.C             | 5     | 011 (-1), 100 (+1)                    |
| SAFA3E | A                       | NOT(A).(B+C)                   | 3     | 011 (-1), 100 (+1), 111 (-1)          |
| SAFA4E | A                       | B + C                          | 1     | 011 (-1), 100, 101, 110 (+1)          |

There are two ideas here:

- **SAFA1E keeps the exact carry.** It builds the sum from that carry
  instead of from XORs. "Carry is 0 and at least one input is 1" is the
  exact sum for every input except 111. So the only error is that 3 comes
  out as 2.
- **SAFA2E to SAFA4E take the carry straight from A, with no gate.** This
  removes all logic from the carry path, which is the path that ripples
  through a chain of cells. A is taken to be the most significant of the
  three inputs. Only the sum is computed, with fewer gates
  each time. The price is errors in both directions.

In each module the gates are written out one by one as `assign` statements,
so the RTL shows the gate structure described above. A synthesis tool will
of course re-map them.

## The 4:2 compressor (`approx_comp42`)

A 4:2 compressor takes four bits of one partial-product column, `x[3:0]`,
plus a carry-in `cin` from the column to its right. It produces:

- `sum`, with weight 1;
- `carry`, with weight 2;
- `cout`, with weight 2, which goes to the column on the left.

Exactly, `x0+x1+x2+x3+cin = sum + 2*(carry+cout)`.

This block uses the usual arrangement of two chained full adders:

```
x0,x1,x2 --> [cell 1] --> s1, cout
s1,x3,cin -> [cell 2] --> sum, carry
```

`cout` does not depend on `cin`, so there is no ripple along a row of
compressors. The parameters `STAGE1` and `STAGE2` (type
`safa_pkg::safa_kind_e`) choose the cell in each position. Both default to
SAFA1E.

How errors combine is the least obvious part of the design:

- With SAFA1E in both positions the compressor never reads high. It loses
  one when x0..x2 are all 1, which happens on 4 of the 32 inputs. It also
  loses one when exactly one of x0..x2 is 1 and x3 = cin = 1, which happens
  on 3 more. When x0..x2 are all 1, the first cell's sum is already 0, so
  the second cell never sees 111 in that case and the error never doubles.
  In total 7 of 32 inputs are off by one.
- In the cells where carry = A, cell 2's A input is the approximate partial
  sum `s1`. Its errors feed straight into the weight-2 output, so the
  errors of the two cells can add or cancel.

The testbench measured these figures over all 32 inputs of the compressor
with the same cell in both positions:

| cell in both positions | exact | too high | too low | mean abs ED |
|------------------------|-------|----------|---------|-------------|
| SAFA1E                 | 25    | 0        | 7       | 0.22        |
| SAFA2E                 | 20    | 6        | 6       | 0.38        |
| SAFA3E                 | 15    | 5        | 12      | 0.59        |
| SAFA4E                 | 10    | 20       | 2       | 0.88        |

## Top level (`approx_comp42_top`)

The top has four compressors, one per cell type. All four take the same
inputs, `x[3:0]` and `cin`. Bit k of each output vector `sum`, `carry` and
`cout` comes from the compressor built of cell type k (0 = SAFA1E, ...,
3 = SAFA4E). This is a side-by-side evaluation of the variants, not a
datapath. In a multiplier you would instantiate `approx_comp42` directly,
with the cell type chosen for each column.

## What this follows and what it chooses

Taken from the design's description:

- the four cells' equations, gate counts and truth tables;
- the use of the cells inside an approximate 4:2 compressor.

Chosen here, because the description does not give it:

- the two-adder structure of the compressor;
- SAFA1E as the default cell;
- which compressor signal drives each cell's A, B and C input;
- the side-by-side top level.

Not included:

- the error-tolerant adders (CEETA) and multipliers (HPETM) that use these
  cells, because their word sizes and structure are not specified;
- the watermarking application;
- the exact reference full adder and the earlier approximate adders
  (AFA-2, IFA, MFA, MBAFA), which the design is only compared against.

## Files

- `rtl/safa_pkg.sv`: the `safa_kind_e` enum naming the four cell types.
- `rtl/safa1e.sv` ... `rtl/safa4e.sv`: the four cells (ports `a b c sum carry`).
- `rtl/safa_cell.sv`: picks one of the four by parameter `KIND`.
- `rtl/approx_comp42.sv`: the compressor.
- `rtl/approx_comp42_top.sv`: the four-variant top.
- `tb/safa_ref_pkg.sv`: the reference truth tables, entered by hand, and a
  reference full-adder function.
- `tb/tb_safa1e.sv` ... `tb/tb_safa4e.sv`: exhaustive cell tests. They check
  carry, sum, error distance and the number of wrong inputs.
- `tb/tb_approx_comp42.sv`: tests five compressor configurations on all 32
  inputs, and checks the arithmetic of the default configuration.
- `tb/tb_approx_comp42_top.sv`: end-to-end test of the top. It prints the
  error table above and fails if any variant is never exact or never
  approximate.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/safa_pkg.sv tb/safa_ref_pkg.sv tb/tb_approx_comp42_top.sv \
  --top-module tb_approx_comp42_top -y rtl +libext+.sv -o sim
./obj_dir/sim
```

To run another test, replace the testbench file and the top module name. All
tests finish in well under a second.
