# 16-bit hierarchy array multiplier with a carry select final adder

A wide array multiplier is slow because its delay grows with the operand
width. A *hierarchy* multiplier splits each N-bit operand into two halves and
multiplies the halves with four small array multipliers that all work at the
same time. The four half products then overlap and have to be added; that
accumulation is the slow step of the scheme. This design keeps the array
multipliers for the halves, compresses the overlap with one row of carry save
adders and finishes with a **carry select adder** instead of a plain carry
propagate adder.

The RTL describes the logic of a design meant for Gate Diffusion Input (GDI)
circuits. All gates are built from one primitive, the GDI cell. The default
configuration is a 16 x 16 unsigned multiplier with a 32-bit product. It is
purely combinational: one pass through the logic per product, with no
registers.

## How the product is assembled

With H = N/2, x = {xh, xl} and y = {yh, yl}:

    p = xl*yl  +  (xh*yl + xl*yh) << H  +  xh*yh << 2H

Each half product is 2H = N bits wide. Laid out by product bit (N = 16):

```
bit:          31 ........ 24 23 ........ 16 15 ......... 8 7 .......... 0
xl*yl                                       [  ll[15:8]  ][  ll[7:0]   ]
xh*yl                                       [ hl[15:0]               ]
                                       ... shifted by H: bits 23..8
xl*yh                      [        lh[15:0]            ]  bits 23..8
xh*yh         [ hh[15:8]  ][  hh[7:0]    ]                 bits 31..16
```

The design handles three bands:

* **Bits [H-1:0]** (7..0) are `ll[H-1:0]`, which nothing overlaps. They go
  straight to the output.
* **Bits [3H-1:H]** (23..8) hold three rows: `{hh[H-1:0], ll[N-1:H]}`, `hl`
  and `lh`. An N-bit 3:2 carry save adder (`csa`) reduces them to a sum row
  and a carry row. The carry row carries one place more weight.
* **Bits [2N-1:3H]** (31..24) hold only `hh[N-1:H]`.

The final adder is 3H = 24 bits wide and covers bits [2N-1:H]. Its operands
are:

    a = { hh[N-1:H], sum_row }            (24 bits)
    b = { 0...0, carry_row, 1'b0 }        (carry row moved up one place)

The carry in is 0. The 24-bit sum is product bits [31:8]. The adder's carry
out is always 0, because the product fits in 2N bits, so it is not used.

## The base multiplier (`array_mult`)

This is an unsigned W x W array multiplier, with W = 8 in the 16-bit design.
W*W AND gates form the partial product rows `a & b[j]`:

* Row 0 gives product bit 0.
* Its upper W-1 bits, with a 0 on top, form the running row.
* Each further row j goes through a W-bit ripple carry adder with carry in 0.
  The adder adds the AND row to the running row.
* The adder's low sum bit is product bit j.
* The remaining sum bits, with the adder's carry out on top, form the next
  running row.
* The last running row is the upper half of the product.

That is W-1 adders of W full adders, (W-1)*W full adders in all.

## The carry select adders

`hier_mult` has a parameter `ADDER` (type `mult_pkg::adder_kind_e`) that chooses one of three carry select adders. All three compute `{cout, sum} = a + b + cin` for any width `W`:

| `ADDER` | module | structure |
|---|---|---|
| `CSLA_CONV` | `csla_conv` | Each group above the first has two ripple adders, one with carry in 0 and one with carry in 1. Multiplexers pick one when the group carry arrives. |
| `CSLA_BEC` | `csla_bec` | Each group above the first has one ripple adder with carry in 0. A binary to excess-1 converter (`bec`, an incrementer) makes the carry-in-1 result from its `{carry, sum}`. |
| `CSLA_MP` (default) | `csla_mp` | The adder is not split into groups. HSG makes the half sums and half carries `a^b` and `a&b`. Two carry generators, CG0 and CG1, ripple the carries for carry in 0 and for carry in 1. The CS stage picks between them with `cin`. FSG forms `sum = half_sum ^ carry_below`. |

In the dual-RCA and BEC forms the first group is one ripple adder fed by the
real carry in. Groups are split by `mult_pkg::grp_*`:

* 16 bits: 2, 2, 3, 4, 5 bits, least significant group first.
* Wider adders continue with groups of 6, 7, ... bits. The last group is cut
  to fit.
* The 24-bit final adder is therefore 2, 2, 3, 4, 5, 6, 2.

Note on `CSLA_MP` inside the multiplier: the final adder's carry in is
always 0, so the CS stage always picks CG0. The CG1 chain and the CS
multiplexers are present but never selected there. They are exercised by the
adder's own testbench.

## Gates: the GDI cell

A GDI cell is a PMOS and an NMOS transistor with a common gate `g`. Their
outer diffusions are signal inputs `p` and `n` rather than supply rails.
Logically it is a multiplexer: `y = g ? n : p`. The other gates are built on
it:

| module | cell wiring | function |
|---|---|---|
| `gdi_and` | g=a, p=0, n=b | a & b (every partial product) |
| `gdi_mux` | g=s, p=d0, n=d1 | s ? d1 : d0 (carry select multiplexers) |
| `gdi_xor` | g=a, p=b, n=~b | a ^ b |
| `full_adder` | xor stage x=a^b, then two multiplexers selected by x | sum = x ? ~cin : cin, cout = x ? cin : a |

`rca`, `csa`, the array multipliers and the grouped carry select adders are
built from `full_adder`. In `csla_mp`, the half sums, the half carries and
the CS stage use these cells. The CG0/CG1 carry chains are written as
AND/OR expressions.

**What RTL cannot express:**

* The reason to use GDI is electrical. A plain GDI gate passes a degraded
  logic level on some inputs, and the full-swing versions add transistors to
  restore it.
* These cells are also meant to be small: 5 transistors for the AND gate and
  18 for the full adder.

In two-valued logic the restoring transistors drive the same value as the
main path, so they are not modelled. This RTL fixes the logic function and
structure. It says nothing about transistor count, sizing, power, delay or
layout. A synthesis tool will map it to whatever cells its library has.

## Interface and timing

```systemverilog
module hier_mult #(
  parameter int unsigned N     = 16,       // operand width, even, >= 4
  parameter adder_kind_e ADDER = CSLA_MP   // final carry select adder
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p                 // x * y, unsigned
);
```

There is no clock and no reset. `p` is valid one combinational delay after
`x` and `y` change. Register the inputs and/or the output in the surrounding
logic to get a single-cycle multiplier. The operands are unsigned.

## Where this RTL makes its own choices

The architecture follows the published one in these points:

* four parallel half-width array multipliers;
* a carry save stage, then a carry select final adder;
* the low half of xl*yl bypasses the adders;
* the three carry select structures;
* the 16-bit BEC grouping;
* the array multiplier's row structure;
* the GDI cell functions.

These points are choices made for this RTL:

* **Column ranges.** The carry save stage is N = 16 bits wide and spans bits
  [3H-1:H]. The final adder is 3H = 24 bits wide and spans bits [2N-1:H].
  Only the low H bits bypass the adders.
* **Default final adder.** The half-sum / two-carry-generator adder is the
  default because it was the most efficient of the three in the adder study.
  The other two are selectable.
* **Group sizes.** The dual-RCA adder uses the same grouping as the BEC
  adder. The grouping above 16 bits is also this design's own choice.
* **Internal equations.** The equations inside HSG/CG0/CG1/CS/FSG and inside
  the BEC are the standard ones for these adders.
* **Full adder wiring.** In the full adder, which diffusion takes which
  input in the carry stage was fixed by requiring correct addition.
* **Signedness.** All arithmetic is unsigned.

**Not included:**

* the conventional hierarchy multiplier with a plain carry propagate adder;
* the carry look-ahead adder. Both serve only as comparison baselines.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_gdi_cell` | cell truth table plus the six standard GDI functions (F1, F2, OR, AND, MUX, NOT) |
| `tb_gdi_and`, `tb_gdi_xor`, `tb_gdi_mux`, `tb_full_adder` | exhaustive |
| `tb_rca`, `tb_bec` | exhaustive at 4 bits (and 6 bits for `bec`), random at 7 bits |
| `tb_csla_conv`, `tb_csla_bec`, `tb_csla_mp` | exhaustive at 5 bits; corner cases plus 20,000 random vectors at 16 and 24 bits. Checks that every group carry of the 16-bit split is seen both as 0 and as 1 |
| `tb_array_mult` | exhaustive at 8 x 8 and 4 x 4 |
| `tb_csa` | bitwise sum/majority and row identity, random plus directed |
| `tb_hier_mult` | default 16-bit multiplier, no parameter overrides; directed plus 200,000 random products. Rebuilds the internal rows from the operands and requires each mechanism at least once: a full carry save column, a carry out of the top carry save column, a carry from the middle band into the top band, a nonzero top band |
| `tb_hier_mult_variants` | 16-bit multipliers with `CSLA_CONV` and `CSLA_BEC` (60,000 random products; both values of every group carry of the 24-bit adder seen), and an 8-bit multiplier checked exhaustively |

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
          tb/tb_hier_mult.sv --top-module tb_hier_mult -Mdir obj_tb
./obj_tb/Vtb_hier_mult
```

Every testbench finishes in a few seconds.

## Files

* `rtl/mult_pkg.sv`: the adder selection enum and the group size functions.
* `rtl/gdi_cell.sv`, `gdi_and.sv`, `gdi_xor.sv`, `gdi_mux.sv`,
  `full_adder.sv`: gates.
* `rtl/rca.sv`, `bec.sv`, `csa.sv`: adder building blocks.
* `rtl/csla_conv.sv`, `csla_bec.sv`, `csla_mp.sv`: carry select adders.
* `rtl/array_mult.sv`: the base multiplier.
* `rtl/hier_mult.sv`: the top.
