# 8-bit Booth / Wallace multiplier in Gate Diffusion Input logic

This is a signed 8 x 8 multiplier built entirely from **Gate Diffusion Input
(GDI)** cells. A GDI cell is one pMOS and one nMOS transistor whose gates are
tied together. Because the source terminals (P and N) are inputs too, one
cell computes several two-input functions that take four or more transistors
in static CMOS. The intended gain is area: fewer devices per gate, and so
fewer devices in the whole multiplier.

The arithmetic is conventional:

- **radix-2 Booth recoding** of the multiplier, so signed operands need no
  correction step;
- one partial-product row per multiplier bit, each row being `+MD`, `-MD` or 0;
- a **Wallace tree** of 3:2 full adders that adds the eight rows, followed by a
  ripple row.

The RTL is purely combinational and has no clock. Each gate is a structural
instance of a logic-level model of the GDI cell. A simulation therefore
checks both the arithmetic and the way every gate is wired from GDI cells.

```
 md[7:0] ──┬────────────────────────────┐
           └─> twos_complement ─ neg_md ┤
                                        ├─> ppg_array ─ pp[8][16] ─> wallace_tree ─ sum[22:0]
 mr[7:0] ───> booth_encoder ── x, z ────┘                                   │
                                                               product = sum[15:0]
```

## The GDI cell and the gate set

`gdi_cell` models the cell as the multiplexer `D = G ? N : P`: the nMOS
conducts N to D when G is high, and the pMOS conducts P to D when G is low.
Every gate ties P and N to a signal or a constant:

| gate | P | N | G | D |
|------|---|---|---|---|
| inverter (`gdi_inv`) | 1 | 0 | A | A' |
| AND (`gdi_and2`) | B | 0 | A' | AB |
| OR (`gdi_or2`) | 1 | B | A' | A+B |
| XOR (`gdi_xor2`) | B | B' | A | A⊕B |
| full-adder carry | a | ci | a⊕b | majority(a, b, ci) |

The AND and OR gates use the cell's A'B and A'+B functions with the first
input inverted. They do not use the direct AB and A+B options, which pass a
degraded logic level through the cell. The inverter that makes A' also
restores the signal swing.

The other gates are built from these:

- `gdi_and3` is two AND gates in cascade.
- `half_adder` is an XOR and an AND.
- `full_adder` is two XORs plus one cell used as a carry multiplexer.

The model is logic-level and full-swing. It does not model the threshold drop
that a real GDI cell shows on some input patterns.

## Booth recoding (`booth_encoder`)

For each multiplier bit `i`, with `mr[-1] = 0`:

- `x[i] = mr[i] AND NOT mr[i-1]`: the row is negative.
- `z[i] = mr[i] XOR mr[i-1]`: the row is non-zero.

Together they encode the Booth digit `mr[i-1] - mr[i]`, which is 0, +1 or −1.
The identity below is why no sign correction is needed:

  Σ (mr[i-1] − mr[i])·2^i = −mr[7]·2^7 + Σ_{i<7} mr[i]·2^i = signed value of mr.

The encoder uses 8 XOR gates, 8 AND gates and 7 inverters. For bit 0 the
inverted "previous bit" is the constant 1.

## Partial products (`twos_complement`, `pp_row`, `sign_extender`, `ppg_array`)

`twos_complement` inverts `md` and adds one through a chain of 8 half adders.

Each `pp_row` forms, bit by bit, `(MD_j · x' · z) + (−MD_j · x · z)`. This
takes two three-input ANDs and one OR per bit, plus one inverter for `x'`.

`sign_extender` then widens the row. It buffers the sign bit through two
inverters and copies it into the upper bits. `ppg_array` holds eight rows.
Row `i` is not shifted; the adder tree gives it weight 2^i.

Two widths differ from the scheme this design is based on. In that scheme the
row is 8 bits wide, extended to 15. Both changes are needed for the product to
be right for all 65,536 operand pairs:

- **−MD is 9 bits wide.** An 8-bit −MD cannot hold −(−128) = +128. The ninth
  bit is `~md[7] XOR carry_out`, and `pp_row` has a ninth selection slice for
  it.
- **Rows are extended to 16 bits (`PP_W = 16`).** With 15-bit rows, row 0 does
  not reach product bit 15. Bit 15 is then wrong whenever row 0 is negative,
  for example 1 × 1 gives 0x8001. `PP_W` is a parameter, so the 15-bit variant
  can still be built.

## Wallace tree (`wallace_tree`)

Column `c` of the sum collects bit `c−i` of every row `i` that reaches it. The
tree works in two stages.

**Reduction layers.** In every layer, each group of three bits in a column
goes into a full adder:

- its sum stays in the column;
- its carry moves to the next column in the next layer;
- the one or two bits left over pass on unchanged.

Layers are added until no column holds more than two bits. At the default
sizes this takes 6 layers.

**Final row.** A ripple row then produces one bit per column. It uses a half
adder where two bits meet and a full adder where three meet. Column 0 only
ever holds one bit, and it passes through a two-inverter buffer.

Column heights are computed once at elaboration by constant functions. The
tree therefore follows `N` and `PP_W` without edits.

At the defaults there are 104 full adders, 8 half adders and 1 buffer. The
sum is 23 bits wide, and only its low 16 bits are the product.

The scheme this design is based on has 77 full adders, 6 half adders and a
buffer, with a 22-bit sum. Its exact adder placement is not known, so this
tree is an independent construction with the same building blocks.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | operand width (package `gdi_mult_pkg::MULT_N`) |
| `PP_W` | 16 | width of a sign-extended partial product (`MULT_PP_W`); 15 in the original scheme, see above |

The Wallace sum width is `PP_W + N − 1`. `PP_W` must be at least `N`, and at
least `2N` for the product to be correct.

## Timing

The multiplier is combinational. The longest path runs through four stages:

1. the 8-stage half-adder ripple of the negation;
2. the selection gates;
3. six full-adder layers;
4. the ripple across the final row.

Register the inputs and the outputs if you use it in a clocked design.

## Files

| file | contents |
|------|----------|
| `rtl/gdi_mult_pkg.sv` | shared width constants |
| `rtl/gdi_cell.sv` | GDI basic cell |
| `rtl/gdi_inv.sv`, `gdi_and2.sv`, `gdi_or2.sv`, `gdi_xor2.sv`, `gdi_and3.sv` | gates |
| `rtl/half_adder.sv`, `full_adder.sv` | adders |
| `rtl/twos_complement.sv` | −MD |
| `rtl/booth_encoder.sv` | x, z controls |
| `rtl/pp_row.sv`, `sign_extender.sv`, `ppg_array.sv` | partial products |
| `rtl/wallace_tree.sv` | adder tree |
| `rtl/gdi_booth_multiplier.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every module has a testbench that prints `TB_RESULT checks=N failures=M`:

- The small gates and `booth_encoder`, `twos_complement`, `sign_extender` and
  `pp_row` are tested exhaustively.
- `ppg_array` and `wallace_tree` get random vectors. `wallace_tree` also gets
  all-ones rows, which give the longest carry chains.

`tb_gdi_booth_multiplier` runs the top at its default parameters:

- It first applies −60 × 32, 74 × 100 and −50 × −96.
- It then applies all 65,536 operand pairs and compares each result with the
  simulator's own signed product.
- It counts how often each mechanism is exercised: Booth digits +1, −1 and 0,
  negation of −128, negative products, and a negative row 0. It fails if any
  of them never occurs.

`tb_multiplier_pp15` builds the top with 15-bit rows (`PP_W = 15`) and
applies all 65,536 operand pairs:

- The low 15 product bits must always be right.
- The full product must be right whenever row 0 is not negative. This
  includes the three operand pairs above.
- The pairs with a wrong bit 15 must be exactly the pairs with a negative
  row 0.

Each testbench was also run against a copy of its module with one deliberate
fault. Every such run failed, as it should.

To run a testbench with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  rtl/gdi_mult_pkg.sv \
  tb/tb_gdi_booth_multiplier.sv --top-module tb_gdi_booth_multiplier -o sim
./obj_dir/sim
```

Lint reports some bits as unused, and they are unused on purpose:

- the top 7 bits of the Wallace sum;
- the carry out of the top column;
- in `gdi_mult_pkg`, the width constant a module does not need.

## Known limits

- The GDI cell is a logic model. Anything that depends on transistors is
  outside this RTL: swing degradation, delay, power, and the device count
  that motivates GDI.
- The adder placement in the Wallace tree is this design's own, so its depth
  and adder counts differ from the original layout.
