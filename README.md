# Radix-8 unsigned bit-pair recoding multiplier for FP16 mantissas

The significand of an IEEE 754 half-precision number is 11 bits wide once the
hidden leading 1 is included, and it is always unsigned. A floating-point
multiplier therefore needs an exact 11 x 11 unsigned product (22 bits). Signed
Booth multipliers carry logic that this product never uses: negative
multiples, two's complement correction and sign extension. Generic 16 x 16
cores are oversized, and 8 x 8 cores lose precision.

This RTL builds the product with unsigned **bit-pair recoding (BPR)**. The
operands are zero-extended to a 12-bit core. The multiplier Y is cut into three
non-overlapping 4-bit groups. Each group is split into two bit pairs, and every
bit pair simply selects 0, 1X, 2X or 3X of the multiplicand X. All selected
multiples are positive, so no sign handling appears anywhere. Each 4-bit group
yields exactly one partial product row:

    row_g = sel(Y[4g+1:4g]) + (sel(Y[4g+3:4g+2]) << 2)
    X * Y = row_0 + (row_1 << 4) + (row_2 << 8)

Three rows for 12 bits is the n/4 row count of 4-bit grouping. The scheme
is published under the name "Radix-8 BPR", and this README keeps that name.

The circuit is purely combinational. It has no clock, reset or registers, and
the product is valid one combinational delay after the operands change.

## Datapath

```
 X[10:0] ──zero-extend──► x[11:0] ──► PU (predefined_unit)
                                       x1 = 1X [11:0]   (wires)
                                       x2 = 2X [12:0]   (shift by wiring)
                                       x3 = 3X [13:0]   (X + 2X, carry select adder)
                                          │  (shared by all three groups)
 Y[10:0] ──zero-extend──► y[11:0]         ▼
   y[3:0]  ─► bpr_unit (bpr_logic) ─z1,z2[13:0]─► MR_unit (merged_reduction) ─pp1[15:0]─┐
   y[7:4]  ─► bpr_unit             ─z1,z2──────► MR_unit                    ─pp2[15:0]─┤
   y[11:8] ─► bpr_unit             ─z1,z2──────► MR_unit                    ─pp3[15:0]─┤
                                                                                       ▼
                                             Adder_unit (adder_logic_unit): HA/FA carry-save
                                             stage, then BEC square-root carry select adder
                                                                                       │
                                                                           result[23:0] ◄┘
```

| Module | Role |
|---|---|
| `bpr_multiplier` | Top. Ports `X[10:0]`, `Y[10:0]`, `result[23:0]`. Parameter `IN_W` (11) is the operand width, at most 12. |
| `predefined_unit` | Produces 1X, 2X and 3X once for all groups. Only 3X needs an adder. |
| `bpr_logic` | Two 4:1 multiplexers per group. `y[1:0]` selects `z1` and `y[3:2]` selects `z2`. Codes 00/01/10/11 pick 0/1X/2X/3X (`bpr_pkg::bpr_sel_e`). |
| `merged_reduction` | Forms the group's row `pp = z1 + (z2 << 2)`. The shift is wiring, `z1[1:0]` bypasses the adder, and a 14-bit carry select adder adds the rest. |
| `adder_logic_unit` | Adds the three rows at weights 1, 16 and 256 and produces the 24-bit product. |
| `bec_sqrt_csla` | BEC-based square-root carry select adder. It is used at 13 bits (3X), 14 bits (each row) and 23 bits (final sum). |
| `rca`, `bec`, `full_adder`, `half_adder` | Leaf cells of the adders. |
| `bpr_pkg` | Widths, the select-code enum and the adder partitioning functions. |

### Widths and why nothing overflows

- 3X of a 12-bit X is at most 3 x 4095 = 12,285, so it needs 14 bits. `z1`
  and `z2` are 14 bits wide, and 1X and 2X are zero-extended to that width.
- A row is at most 15 x 4095 = 61,425 < 2^16, so 16 bits hold it. The 14-bit
  adder inside `merged_reduction` can therefore never carry out. Its carry
  output is left open on purpose.
- The product of two 12-bit numbers is below 2^24. The final adder's carry
  out and the carry of the top carry-save column are always 0 and are also
  left open. Verilator reports `cy[23]` as unused for this reason.
- With the 11-bit ports, the largest product is 2047^2 = 4,190,209.

## The adders

This is the least obvious part of the design.

**Square-root carry select adder (`bec_sqrt_csla`).** The adder is cut into
groups of 2, 2, 3, 4, 5, 6, ... bits, and the last group is cut to fit.
`bpr_pkg::csla_lo`, `csla_size` and `csla_groups` compute the boundaries at
elaboration, for example:

- 23 bits: 2+2+3+4+5+6+1
- 14 bits: 2+2+3+4+3
- 13 bits: 2+2+3+4+2

Group 0 is a ripple carry adder fed by `cin`. Every later group works like
this:

- A ripple carry adder computes the group's sum and carry with carry-in 0.
- A binary-to-excess-1 converter (`bec`, the result plus one) derives the
  carry-in-1 result from it. It uses an AND chain and XOR gates and stands in
  for a second ripple adder.
- A 2:1 multiplexer driven by the carry from the group below picks the right
  result, carry-out included.

Each group is one bit longer than the one before. It therefore finishes its
local addition about when the selecting carry arrives. The group-size
sequence is this design's choice: the source names square-root partitioning
without listing sizes.

**Three rows to one (`adder_logic_unit`).** The rows overlap like this:

| Bits of the 24-bit product | Rows present | Cell |
|---|---|---|
| 0-3 | pp1 | wire |
| 4-7 | pp1, pp2 | half adder |
| 8-15 | pp1, pp2, pp3 | full adder |
| 16-19 | pp2, pp3 | half adder |
| 20-23 | pp3 | wire |

This single carry-save stage leaves a sum row `s` and a carry row `cy`. Bit 0
of `s` passes straight to `result[0]`, and the 23-bit square-root CSLA adds
`s[23:1] + cy[22:0]`. The generate loop takes this column layout from the
parameters `PPW`, `SHIFT` and `RES_W`.

## What follows the source and what is chosen here

The following come from the published architecture:

- the block structure (PU, three BPR units, three merged reduction units,
  adder unit) and the instance names;
- all bus widths (`x1[11:0]`, `x2[12:0]`, `x3[13:0]`, `z1/z2[13:0]`,
  `pp[15:0]`, `result[23:0]`) and the 11-bit ports;
- the multiplexer coding, and the row formula `Z1 + (Z2 << 2)`;
- carry select addition for 3X and for the row merge;
- half-adder/full-adder compression followed by a BEC-based square-root CSLA;
- the absence of registers.

Choices made here, where the source is silent or unclear:

- The operands are zero-extended from 11 to 12 bits. The published
  description gives the multiplicand port as both 11 and 12 bits wide; the
  11-bit form is used.
- `pp1` belongs to `Y[3:0]`, `pp2` to `Y[7:4]` and `pp3` to `Y[11:8]`.
- The same BEC square-root CSLA is used for 3X, for the row merge and for the
  final sum. The source only says "carry select" for the first two.
- The group sizes 2, 2, 3, 4, 5, ... are chosen here.
- A single carry-save stage is used, because three rows need only one. The
  source speaks of multi-stage compression.
- The low two bits of `z1` bypass the row adder.

Out of scope:

- FP16 sign, exponent, normalisation and rounding. Only the significand
  product is built.
- The 16 x 16 BPR multiplier the design is compared against.

No FPGA or ASIC area or timing figures have been produced for this RTL.

## Verification

Every module under test has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_bpr_multiplier` | At default parameters: corner cases (zeros, 2047 x 2047, alternating bits, 1.0 x 1.0), a worked example, 50 random pairs, then **all 2^22 operand pairs** against `X * Y`. It also counts each mechanism and fails if one never occurs: every select code on every bit pair, carry-save carries, and the BEC result being selected in the 3X adder, in each row adder and in the final adder. It runs in a few seconds. |
| `tb_predefined_unit` | 1X, 2X and 3X for all 4096 values of X. |
| `tb_bpr_logic` | All 16 group values against many multiplicands. |
| `tb_merged_reduction` | Rows built from legal multiples, including the largest. |
| `tb_adder_logic_unit` | Random legal rows plus extremes, with coverage of carry-save carries and BEC selection. |
| `tb_bec_sqrt_csla` | 24 bits (random values plus carry-chain corner cases), 13 and 14 bits (random), and 5 bits (exhaustive). |

Each testbench was also run against a copy of its module with one deliberate
bug: swapped rows, a dropped carry, swapped select bits and similar. Every
one of those runs failed, as it should.

## Simulating and changing it

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/bpr_pkg.sv \
    tb/tb_bpr_multiplier.sv --top-module tb_bpr_multiplier
./obj_dir/Vtb_bpr_multiplier
```

Replace `bpr_multiplier` with any other module name to run its testbench.
`bpr_pkg.sv` must come first, because the other files import it.

- To change the core width, edit `CORE_W` in `bpr_pkg` (a multiple of 4).
  `Z_W`, `PP_W` and `RES_W` follow from it. `NUM_GRP` follows as well, but
  `adder_logic_unit` is written for exactly three rows. A 16-bit core would
  need a fourth row and a second carry-save stage.
- To change the carry select partitioning, edit `csla_nominal` in `bpr_pkg`.
  Every adder instance follows.
- To pipeline the multiplier, a natural cut is after the merged reduction
  units. There the state is three 16-bit rows.
