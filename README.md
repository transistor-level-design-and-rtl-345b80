# 8-bit Vedic multiply-accumulate unit

This is a multiply-accumulate (MAC) datapath for DSP-style work. Each clock cycle it
adds the product of two unsigned 8-bit numbers to a 30-bit running total. The
multiplier uses the *Urdhva Tiryagbhyam* ("vertically and crosswise") method from Vedic
arithmetic. Each column of the product is formed directly from the cross products of
the operand bits that land in it. The method is used on 4x4 blocks, and four of those
blocks make the 8x8 multiplier. Every adder in the datapath takes its sum bits from one
shared two-input XOR cell. The point of the design is to lower transistor count and
power by picking a cheap XOR circuit, and the RTL keeps that choice as a parameter.

```
 a[7:0] ─┐
         ├─► vedic_mul8 ──16b──► rca (30 bit) ──► pipo_reg (30 bit) ──┬──► acc[29:0]
 b[7:0] ─┘                          ▲                ▲  clk, clr        │
                                    └────────────────┴──────────────────┘
```

## Forming a 4x4 product column by column (`vedic_mul4`)

This is the least obvious part of the design. Call the partial products
`p[i][j] = b[i] & a[j]`. Column `k` of the product collects the terms with `i + j = k`.
From the least significant end, the columns hold 1, 2, 3, 4, 3, 2 and 1 terms. The
"vertically and crosswise" pattern walks through these seven columns in order. Each
column is reduced to one result bit with small adders, and the carries go on to the
next columns:

| column | terms in | adder used | result | carries passed on |
|---|---|---|---|---|
| 0 | p00 | none | r0 | none |
| 1 | p01, p10 | half adder | r1 | 1 → col 2 |
| 2 | p02, p11, p20 + col-1 carry | 4-input adder | r2 | c0 → col 3, c1 → col 4 |
| 3 | p03, p12, p21, p30 | 4-input adder, then a half adder with the col-2 c0 | r3 | c0, c1 and the half-adder carry |
| 4 | p13, p22, p31 + merged carries | carry merge (full adder) of the 3 incoming carries, then a 4-input adder | r4 | merge carry, c0, c1 |
| 5 | p23, p32 + merged carries | carry merge, then a full adder | r5 | merge carry, full-adder carry |
| 6 | p33 + merged carries | carry merge, then a half adder | r6 | 2 carries |
| 7 | the 2 leftover carries | XOR | r7 | none (the product is at most 225) |

The **4-input adder** (`add4`) counts the ones among four bits of equal weight. It
returns the count as `s` (weight 1), `c0` (weight 2) and `c1` (weight 4), using XOR-rich
equations:

```
s  = a ^ b ^ c ^ d
c0 = b(a ^ c) | d(a ^ b) | c(a ^ d)      -- two or three inputs are 1
c1 = a & b & c & d                        -- all four are 1
```

A **carry merge** ("carry to add and propagate") is a full adder. It counts the three
carries that reach a column and passes one bit on at that weight and one at the next.

The adder kind in each column follows the source design's block diagram. The exact
wiring of the carries is this implementation's own choice. The diagram does not fix
it, and the routing above counts every carry exactly once. The testbench checks all 256
operand pairs.

## From 4x4 to 8x8 (`vedic_mul8`)

Split the operands into nibbles, `a = {aH, aL}` and `b = {bH, bL}`. Four `vedic_mul4`
instances then form `D = aH·bH`, `C = aL·bH`, `B = aH·bL` and `A = aL·bL`. Three ripple
carry adders combine them:

```
12-bit:  {D, 0000} + {0000, C}
 8-bit:  B + {0000, A[7:4]}
12-bit:  (the two sums)            -> r[15:4]
         A[3:0]                    -> r[3:0]
```

The second sum has the same weight (16) as the first, so the last adder produces
`r[15:4]` directly. None of the three adders can overflow. Their largest results are
3825, 239 and 4064. Their carry-outs therefore never carry information and are left
unused.

## The accumulate loop (`vedic_mac`, `pipo_reg`, `rca`)

The 16-bit product is zero-extended to 30 bits. A 30-bit ripple carry adder adds it to
the register's present value, and a 30-bit parallel-in parallel-out register of D
flip-flops stores the sum. The register output is both the MAC result and the adder's
second operand in the next cycle.

- **Timing.** The multiplier and the adder are combinational. `a` and `b` must be
  stable one setup time before a rising edge of `clk`. Right after that edge, `acc`
  holds `previous + a*b`. The unit takes one product per cycle with one cycle of
  latency. The critical path runs through the 8x8 multiplier and then the full 30-bit
  carry ripple. The clock period must cover both: the product and the register output
  have to reach the adder within the same cycle.
- **Clear.** `clr` is active high and asynchronous. It empties the register at once
  and holds it at zero while high. Use it to start a new accumulation. The first edge
  after `clr` falls adds the first product to zero.
- **Wrap-around.** The register can hold at least 16,512 worst-case products
  (255·255) before the total passes 2³⁰−1. After that the total wraps modulo 2³⁰. There
  is no saturation. `carry_out` is the adder's own carry out. It is 1 during the cycle
  whose addition wraps, so you can build an overflow flag from it.

## The XOR cell and `XOR_STYLE`

The source design compares three XOR circuits:

- a conventional 22-transistor gate network (two inverters, two ANDs, one OR);
- a 12-transistor cell;
- a 6-transistor transmission-gate cell.

At the logic level all three are the same exclusive-OR. They differ in transistor
count and power. Every module takes a `XOR_STYLE` parameter from `mac_pkg::xor_style_e`
and passes it down to each `xor2` instance. `XOR_22T` builds the XOR as the AND/OR/
inverter network. `XOR_12T` (the default, the design's preferred low-power cell) and
`XOR_6T` are written as the plain XOR they compute. Their transistor netlists cannot be
expressed in synthesizable RTL. The style never changes the function, and it changes
no timing in simulation. It only records which cell a transistor-level implementation
would use and shapes the gate network that synthesis starts from.

## What this RTL does not model

- **Transistor-level behaviour.** The 12T and 6T cells are written as XOR functions.
  Nothing models their power, their transistor counts or their analog output levels.
  The source design's power and transistor-count comparisons are results of circuit
  simulation. This RTL cannot reproduce them.
- **Choices the source design leaves open.** This implementation chose the following:
  - the clear polarity and its asynchronous action;
  - positive-edge clocking;
  - the absence of a load enable (the register loads every cycle);
  - zero-extension of the product;
  - wrap-around on overflow;
  - the added `carry_out` port;
  - the carry-in port of `rca`, which is tied to 0 wherever it is used;
  - the carry routing inside `vedic_mul4` (described above).

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `vedic_mac` | `ACC_WIDTH` | 30 | adder and register width |
| all arithmetic modules | `XOR_STYLE` | `XOR_12T` | XOR cell circuit (see above) |
| `rca` | `W` | 8 | adder width (instantiated at 8, 12 and 30) |
| `pipo_reg` | `W` | 30 | register width |
| `mac_pkg` | `OP_W`, `PROD_W`, `ACC_W` | 8, 16, 30 | shared sizes |

The operand width is fixed at 8 because `vedic_mul8` is built from exactly four 4x4
blocks. `ACC_WIDTH` must be at least 16.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | sizes and the `xor_style_e` enum |
| `rtl/xor2.sv` | XOR cell |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit adders built on `xor2` |
| `rtl/add4.sv` | four-input one-bit adder (ones counter) |
| `rtl/vedic_mul4.sv` | 4x4 Urdhva Tiryagbhyam multiplier |
| `rtl/rca.sv` | W-bit ripple carry adder |
| `rtl/vedic_mul8.sv` | 8x8 multiplier from four 4x4 blocks |
| `rtl/pipo_reg.sv` | register with asynchronous clear |
| `rtl/vedic_mac.sv` | top level: the MAC |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the block with values computed independently (integer
arithmetic, truth tables or a reference model). Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_xor2`, `tb_half_adder`, `tb_full_adder`, `tb_add4`: every input pattern, in the
  22T and 12T styles.
- `tb_vedic_mul4`: all 256 operand pairs, in two styles.
- `tb_vedic_mul8`: all 65,536 operand pairs, plus random pairs through a 22T-style
  instance.
- `tb_rca`: every 8-bit case with carry-in, plus corner and random cases at 12 and 30
  bits.
- `tb_pipo_reg`: loads on edges, holds between edges, and clears asynchronously.
- `tb_vedic_mac` runs the top level at its default parameters and compares it with a
  reference model after every edge. The model also checks the one-cycle latency and
  that `acc` holds between edges. The run includes clears at start-up and mid-run,
  random operand streams, and a 16-term dot product checked against its integer value.
  It also drives about 16,500 cycles of 255·255 to force a wrap, and checks that
  `carry_out` is 1 in exactly that cycle. The testbench counts clears, accumulations,
  completed dot products and wraps, and fails if any of them never happened.

Simulate any testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mac_pkg.sv tb/tb_vedic_mac.sv --top-module tb_vedic_mac -Mdir obj -o sim
./obj/sim
```

Every testbench finishes in well under a second.
