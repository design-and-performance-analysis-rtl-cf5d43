# 8x8 Vedic multiplier (Urdhva Tiryagbhyam), gate-level SystemVerilog

This is an unsigned 8-bit by 8-bit combinational multiplier. It is built the
"vertically and crosswise" way (Urdhva Tiryagbhyam, one of the Vedic
mathematics sutras). Small multipliers form the vertical and crosswise partial
products of the operand halves. Ripple-carry adders then line the products up
and add them. The structure repeats at each level: a 2x2 multiplier made of
AND gates and half adders, a 4x4 made of four 2x2s and three 4-bit adders, and
an 8x8 made of four 4x4s and three 8-bit adders.

The whole design is written down to single gates. Each gate can be elaborated
in one of two circuit styles: static CMOS, or Gate Diffusion Input (GDI)
cells. Both styles compute the same function. The style only decides which
gate structure the netlist contains, and GDI is the default.

There is no clock, no register and no reset. A product is ready as soon as
the carries have rippled through.

## Module hierarchy

```
vedic_mul8x8                 top: s[15:0] = a[7:0] * b[7:0]
├── vedic_mul4x4  (x4)       s[7:0] = a[3:0] * b[3:0]
│   ├── vedic_mul2x2 (x4)    s[3:0] = a[1:0] * b[1:0]
│   │   ├── vm_and2 (x4)     partial products
│   │   └── vm_half_adder (x2)
│   ├── vm_rca #(4) (x3)     4-bit ripple-carry adders
│   └── vm_or2               joins the two adder carries
├── vm_rca #(8) (x3)         8-bit ripple-carry adders
└── vm_or2                   joins the two adder carries

vm_rca        -> vm_full_adder (x WIDTH) -> vm_xor2, vm_and2, vm_or2
vm_half_adder -> vm_xor2, vm_and2
vm_and2 / vm_or2 / vm_xor2 -> gdi_cell   (STYLE_GDI only)
vm_pkg        logic_style_e {STYLE_CMOS, STYLE_GDI}
```

Every module except `gdi_cell` takes the parameter
`vm_pkg::logic_style_e STYLE` (default `STYLE_GDI`) and passes it down.

## The 2x2 core

With `a = a1a0` and `b = b1b0`:

| product bit | formed by |
|---|---|
| s0 | `a0·b0` (vertical) |
| s1, c1 | half adder on `a1·b0` and `a0·b1` (crosswise) |
| s2, s3 | half adder on `a1·b1` (vertical) and `c1` |

So the 2x2 needs four AND gates and two half adders, and its longest path
runs through one AND gate and two half adders.

## Combining four half-size products (the 4x4 and 8x8 levels)

This is the only part of the design that needs care. For an N-bit
multiplier, N = 4 or 8, let H = N/2 and split the operands as `a = {aH, aL}`
and `b = {bH, bL}`. The four half-size multipliers give N-bit products:

```
pLL = aL*bL   weight 2^0
pHL = aH*bL   weight 2^H
pLH = aL*bH   weight 2^H
pHH = aH*bH   weight 2^N
```

Three N-bit ripple-carry adders, each with carry-in 0, add them:

| adder | operand x | operand y | result |
|---|---|---|---|
| 1 | `pHL` | `pLH` | `t1`, carry `ca1` |
| 2 | `t1` | `{H zeros, pLL[N-1:H]}` | `t2`, carry `ca2` |
| 3 | `pHH` | `{H-1 zeros, cc, t2[N-1:H]}` | `s[2N-1:N]`, carry `ca3` (always 0) |

```
s[H-1:0]  = pLL[H-1:0]
s[N-1:H]  = t2[H-1:0]
s[2N-1:N] = sum of adder 3
cc        = ca1 | ca2
```

Both `ca1` and `ca2` have weight 2^(N+H). That is bit H of adder 3's
second operand, which is where `cc` enters.

**Why one OR gate is enough to join `ca1` and `ca2`.** The two carries
cannot both be 1. If the crosswise sum overflows (`ca1 = 1`), then
`t1 = pHL + pLH - 2^N <= 2(2^H-1)^2 - 2^N = 2^N - 2^(H+2) + 2`. Since
`pLL[N-1:H] <= 2^H - 2`, adder 2 sees at most `2^N - 3·2^H < 2^N` and
cannot carry again. The testbenches check this over every operand
pair and count how often each carry occurs:

| multiplier | only `ca1` | only `ca2` | neither | both |
|---|---|---|---|---|
| 4x4 | 1 | 4 | 251 | 0 |
| 8x8 | 2994 | 524 | 62018 | 0 |

The same argument shows that the product always fits in 2N bits, so `ca3`
is always 0. It is left unconnected, and Verilator's lint reports it as an
unused signal.

The block diagram this design follows shows the two carries meeting at that
bit. It does not say what joins them. The OR gate is this implementation's
choice; an XOR or an adder input would behave the same.

## Gates and the GDI cell

A GDI cell looks like a CMOS inverter, except that the pMOS source (input
P) and the nMOS source (input N) are brought out instead of being tied to
the rails. With the common gate G at 0 the output D follows P. With G at 1
it follows N. As logic, the cell is therefore `D = G ? N : P`, and its input
wiring picks the function:

| N | P | G | D | name |
|---|---|---|---|---|
| 0 | B | A | ~A & B | F1 |
| B | 1 | A | ~A \| B | F2 |
| 1 | B | A | A \| B | OR |
| B | 0 | A | A & B | AND |
| C | B | A | ~A&B \| A&C | MUX |
| 0 | 1 | A | ~A | NOT |

`gdi_cell` models this logic function only. The analog side of a real
two-transistor cell is not modelled: its reduced output swing and the bulk
biasing that the inverters in the "modified" gates are there to correct.

The gates in GDI style:

* **AND** (`vm_and2`): an inverter on `a` drives the gate of a cell with
  `P = b` and `N = 0`, so the output is `a & b`. This follows the modified
  AND gate of the reference circuit.
* **OR** (`vm_or2`): an inverter on `a`, then a cell gated by `b` with
  `P = ~a` and `N = 0` (a NOR), then an output inverter. The reference
  circuit has three two-transistor stages like this, but how its inputs are
  wired inside the stages is this design's reading.
* **XOR** (`vm_xor2`): an inverter makes `~b`, a cell in the MUX
  configuration (`G = a`, `P = b`, `N = ~b`) gives `a ^ b`, and two
  inverters restore the output level. That is five cells, ten transistors,
  the same count as the reference GDI XOR. The exact arrangement is this
  design's own.

In CMOS style each gate is simply its Boolean expression, standing for the
static CMOS gate (NAND, NOR or complementary XOR, plus an inverter).

Adders:

* **Half adder**: an XOR for the sum and an AND for the carry.
* **Full adder**: `p = a ^ b`, `sum = p ^ c`, `carry = (a & b) | (p & c)`.
  The sum comes from two cascaded XORs and the carry from two AND gates and
  an OR gate. Reusing `p` in the carry is this design's choice.
* **Ripple-carry adder** (`vm_rca`): `WIDTH` full adders (4 by default, 8
  in the 8x8), each carry out feeding the next carry in.

## Interface and timing

| module | inputs | outputs | relation |
|---|---|---|---|
| `vedic_mul8x8` | `a[7:0]`, `b[7:0]` | `s[15:0]` | `s = a * b` |
| `vedic_mul4x4` | `a[3:0]`, `b[3:0]` | `s[7:0]` | `s = a * b` |
| `vedic_mul2x2` | `a[1:0]`, `b[1:0]` | `s[3:0]` | `s = a * b` |
| `vm_rca #(WIDTH)` | `x`, `y`, `cin` | `sum`, `cout` | `{cout,sum} = x + y + cin` |

The operands are unsigned. Everything is combinational, so to use the
multiplier in a clocked system, put registers around it. The critical path
runs through a 2x2, the three 4-bit adders of a 4x4, and then the three
8-bit adders of the 8x8.

For reference, the transistor-level 45 nm implementation this design
follows reports these figures at a 1.0 V supply:

| style | delay | average power |
|---|---|---|
| GDI | 732.92 ps | 907.12 µW |
| CMOS | 634.544 ps | 764.32 µW |

In that implementation the modified GDI gates used more transistors than
their CMOS counterparts. The RTL cannot reproduce these figures.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`, and a watchdog stops it if it
hangs. The checks cover every input combination:

| testbench | what it checks |
|---|---|
| `tb_gdi_cell` | all six configurations in the table above, with every A, B, C |
| `tb_vm_and2`, `tb_vm_or2`, `tb_vm_xor2` | truth tables, both styles |
| `tb_vm_half_adder`, `tb_vm_full_adder` | arithmetic sums, both styles |
| `tb_vm_rca` | 4-bit in both styles and 8-bit in GDI, every input; a carry rippling through all stages must occur |
| `tb_vedic_mul2x2` | all 16 pairs, both styles, plus the internal crosswise carry |
| `tb_vedic_mul2x2_transient` | the 2x2 driven by free-running square waves (10/20/40/80 ns half periods), sampled every 10 ns |
| `tb_vedic_mul4x4` | all 256 pairs, both styles, plus the internal `t1`, `t2`, `ca1`, `ca2`, `cc` and the carry statistics above |
| `tb_vedic_mul8x8` | all 65,536 pairs at default parameters (GDI), plus the same internal checks; the end-to-end test |
| `tb_vedic_mul8x8_cmos` | the same for the 8x8 in CMOS style |

The expected internal adder values come from the operand halves, computed
in the testbench without using the design.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vm_pkg.sv \
    tb/tb_vedic_mul8x8.sv --top-module tb_vedic_mul8x8 -o sim
./obj_dir/sim
```

The 8x8 exhaustive run takes well under a second. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/vm_pkg.sv rtl/<module>.sv`.

## What is this design's own, and what is not included

These choices are this design's own, not taken from the reference
architecture:

* The OR gate that joins `ca1` and `ca2`.
* Carry-in 0 on every adder, and `ca3` left unconnected.
* Unsigned operands.
* The gate structure of the half adder and the full adder's carry.
* The inner wiring of the GDI OR and XOR gates.
* `D = G ? N : P` as the logic model of a GDI cell.

The following are not in the RTL:

* Transistor sizing, the 45 nm device models, supply and bulk biasing, and
  the delay and power measurements. These are analog properties.
* The general pull-up/pull-down picture of a static CMOS gate. It is a
  template, not a circuit.
* The bit-serial view of the vertically-and-crosswise method for 3-bit and
  4-bit operands, where one column is formed per step. The hardware uses
  the recursive halving described above instead, so no column-by-column
  multiplier is built.
