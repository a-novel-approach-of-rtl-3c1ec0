# 12x12 multiplier built from decoder-style 3x3 multipliers

This design is an unsigned binary multiplier whose smallest building block
is not an array of adders but a small decoder. Two 3-bit numbers have only 64
possible products. So the 3x3 multiplier is built the way a BCD to
seven-segment decoder is built: write the whole truth table, give each output
bit its own column (here the product bits A5..A0 in place of the segments),
and reduce each column to a two-level sum of products with a Karnaugh map.
The result has no carry chain at all.

Wider multipliers are then built from this block by splitting each operand
in two and adding the partial products with shifts. A 6x6 multiplier uses
four 3x3 blocks, and a 12x12 multiplier uses four 6x6 blocks. The top,
`mult12x12`, therefore holds sixteen 3x3 decoders and nine shift-and-add
stages made of half and full adders.

All of it is combinational. There is no clock, reset or register anywhere.
For a pipelined or registered multiplier, put flops around `mult12x12`.

## Module hierarchy

```
mult12x12            x[11:0] * y[11:0] -> p[23:0]
├── mult6x6  x4      x[5:0]  * y[5:0]  -> p[11:0]
│   ├── mult3x3  x4  x[2:0]  * y[2:0]  -> p[5:0]   (decoder, sum of products)
│   └── shift_adder x3   (6+6<<3 -> 9, 6+6<<3 -> 9, 9+9<<3 -> 12 bits)
│       └── half_adder / full_adder
└── shift_adder x3       (12+12<<6 -> 18, 12+12<<6 -> 18, 18+18<<6 -> 24 bits)
    └── half_adder / full_adder
```

| File | Module | Role |
|---|---|---|
| `rtl/mult3x3.sv` | `mult3x3` | 3x3 decoder multiplier: six sum-of-products functions |
| `rtl/half_adder.sv` | `half_adder` | 1-bit half adder cell |
| `rtl/full_adder.sv` | `full_adder` | 1-bit full adder cell |
| `rtl/shift_adder.sv` | `shift_adder` | `a + (b << SHIFT)` as a ripple chain of the two cells |
| `rtl/mult6x6.sv` | `mult6x6` | 6x6 multiplier: four `mult3x3`, three `shift_adder` |
| `rtl/mult12x12.sv` | `mult12x12` | top: four `mult6x6`, three `shift_adder` |

## The 3x3 decoder multiplier

The inputs are X2..X0 and Y2..Y0, and the product is A5..A0. Below, `'` means
complement and juxtaposition means AND. Each product bit is a minimal sum of
products over the 64-row table of `x * y`:

```
A0 = X0 Y0

A1 = X1 X0' Y0 + X1 Y1' Y0 + X0 Y1 Y0' + X1' X0 Y1

A2 = X2 X0 Y2' Y0 + X2 X0' Y1' Y0 + X2 X1' X0' Y0 + X1 X0' Y1 Y0'
   + X2' X1 X0' Y1 + X1 Y2' Y1 Y0' + X2' X0 Y2 Y0 + X0 Y2 Y1' Y0'
   + X1' X0 Y2 Y0'

A3 = X2 X1 X0 Y2 Y0' + X1 X0' Y2 Y1' + X2 X1' X0 Y2 Y1' Y0 + X2 X1' Y2' Y1
   + X2 X1' Y1 Y0' + X2' X1 X0 Y2' Y1 Y0 + X2' X1 X0' Y2 + X2 X0' Y2 Y1 Y0
   + X2' X1 Y2 Y1' + X2 Y2' Y1 Y0'

A4 = X2 Y2 Y1' Y0' + X2' X1 X0 Y2 Y1 + X2 X1 Y2' Y1 Y0 + X2 X0' Y2 Y1'
   + X2 X1' Y2 Y0' + X1 X0 Y2 Y1 Y0 + X2 X1' X0' Y2 + X2 X1' Y2 Y1'

A5 = X2 X1 Y2 Y1 + X2 X1 X0 Y2 Y0 + X2 X0 Y2 Y1 Y0
```

A0 to A2 are the published functions, and the A2 terms form the unique
minimal cover of that bit. A3 to A5 were minimised for this design by the
same method. The published design does not list them. A3 and A4 have more
than one minimal cover, and the ones above are this design's choice. Any
other correct cover can be dropped into `mult3x3.sv` without changing
anything else. `tb_mult3x3` checks all 64 input pairs.

The module keeps the equations in this literal two-level form so that they
can be read against the table. A synthesis tool is free to restructure them.
On an FPGA, each output bit is a 6-input function and maps to one LUT.

## Building wider multipliers: split, multiply, shift and add

Take an operand of width 2k and split it into a low and a high k-bit block:
`x = {xh, xl}` and `y = {yh, yl}`. Then

```
x * y = xl*yl + (xl*yh << k) + (xh*yl << k) + (xh*yh << 2k)
```

The four partial products are added in two levels. The first level takes,
for each block of x, its two products with the blocks of y:

```
s1 = xl*yl + (xl*yh << k)          low block of x times all of y
s2 = xh*yl + (xh*yh << k)          high block of x times all of y
p  = s1 + (s2 << k)
```

| Stage | 6x6 (k = 3) | 12x12 (k = 6) |
|---|---|---|
| partial products | four 6-bit, from `mult3x3` | four 12-bit, from `mult6x6` |
| s1, s2 | 6 + 6<<3, giving 9 bits | 12 + 12<<6, giving 18 bits |
| p | 9 + 9<<3, giving 12 bits | 18 + 18<<6, giving 24 bits |

The grouping (s1 and s2 each hold one block of x) follows the published
description of the 6x6 multiplier. For the 12x12 multiplier the published
text names only "two 18-bit adders, then one 24-bit adder", and the same
grouping is used there.

### `shift_adder`

`shift_adder #(WA, WB, SHIFT)` computes `sum = a + (b << SHIFT)`, with a
`WB+SHIFT`-bit sum and a separate `cout`:

* The low `SHIFT` bits of `a` go straight to the sum, since nothing is added
  to them. Synthesis reports these outputs as wired to inputs, which is
  intended.
* From `a[WA-1:SHIFT]` to `b[WA-SHIFT-1:0]`, the two operands overlap. The
  first overlapping bit uses a half adder, because it has no carry in. The
  rest use full adders.
* Above the overlap only `b` and the carry are left, so the chain ends in
  half adders.

The chain is a plain ripple-carry chain. The published design says only
that the summations are made of half and full adders, and ripple carry is
the simplest arrangement that fits. Swapping in a faster adder is local to
this one module.

### Why the carry out is always zero

Each sum is sized to the largest value it can hold. For example,
`s1 = xl * y < 2^k * 2^2k`, so it fits in 3k bits (9 or 18). The product fits in 4k bits (12 or 24). The top cell of
every stage therefore never produces a carry. The chain still brings that
carry out as `cout`. `mult6x6` and `mult12x12` hold a deferred assertion
(`assert final`) that all three of their `cout` signals are zero. This
assertion catches a wiring error early in simulation, and it has no
hardware cost.

## Interface and timing

| Module | Inputs | Output | Parameters |
|---|---|---|---|
| `mult12x12` | `x[11:0]`, `y[11:0]` | `p[23:0] = x*y` | none |
| `mult6x6` | `x[5:0]`, `y[5:0]` | `p[11:0] = x*y` | none |
| `mult3x3` | `x[2:0]`, `y[2:0]` | `p[5:0] = x*y` | none |
| `shift_adder` | `a[WA-1:0]`, `b[WB-1:0]` | `sum[WB+SHIFT-1:0]`, `cout` | `WA=6`, `WB=6`, `SHIFT=3` |

The operands are unsigned. The output is valid one combinational delay after
the inputs settle. The published implementation reports 1.714 ns for the 6x6
multiplier and 5.268 ns for the 12x12 multiplier on a Stratix III FPGA. It
compares these with 2.524 ns and 9.05 ns for a conventional array multiplier
in the same flow. Those figures belong to that FPGA and tool flow. They have
not been reproduced for this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against the simulator's own `*` and `+` and prints
`TB_RESULT checks=N failures=M`.

| Testbench | Coverage |
|---|---|
| `tb_half_adder`, `tb_full_adder` | all input combinations |
| `tb_mult3x3` | all 64 operand pairs |
| `tb_shift_adder` | the four shapes used in the design: 6+6<<3 exhaustive, 9+9<<3 swept, 12+12<<6 and 18+18<<6 with corners and 20,000 random pairs; sum and `cout` both checked |
| `tb_mult6x6` | all 4096 operand pairs |
| `tb_mult12x12` | all 2^24 operand pairs (about 20 s in Verilator) |

`tb_mult6x6` and `tb_mult12x12` also work out, from the operands alone, how
often a carry crosses from the overlapping bits into the upper half adders
of each of the three stages. They also count zero operands and the
full-scale product. A test fails if any of these never happens.

Running one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_mult12x12 \
    -y rtl -y tb +libext+.sv tb/tb_mult12x12.sv
./obj_dir/Vtb_mult12x12
```

For any other testbench, replace `tb_mult12x12` with its name. For lint, run
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/mult12x12.sv`.

## Departures and choices

* **A3 to A5 of the 3x3 decoder** are minimised here. The published design
  lists only A0 to A2.
* **Adder structure** is ripple carry made of half and full adders. The
  published design gives the widths and cell types but not the arrangement.
* **Pairing of partial products in the 12x12 adders** follows the 6x6
  description, as above.
* **No registers.** The published design is a purely combinational
  multiplier measured by its input-to-output delay. This RTL adds no
  pipeline stages.
* The conventional array multiplier that the published design is compared
  against is not included.
