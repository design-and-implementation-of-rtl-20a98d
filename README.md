# Three-tier (3D) Kogge-Stone adder and Wallace tree multiplier

In a stacked three-die chip, wires between dies (through-silicon vias) are a few
micrometres long, while a wide adder or multiplier laid out flat needs long
horizontal wires. The two arithmetic units here are partitioned so that each
die holds a self-contained piece and only a small, regular set of signals
crosses between dies:

* a **36-bit Kogge-Stone adder** whose bits are interleaved over three tiers,
  so that each tier holds a complete 12-bit Kogge-Stone prefix tree and only
  one stage (level 1) crosses tiers;
* a **32x32 Wallace tree multiplier** whose two outer tiers each reduce half of
  the partial products to two rows, while the middle tier holds the last level
  of 4:2 counters and the final adder.

Both units can also be reconfigured into narrower independent units (three
12-bit adders; two 32x16 multipliers). The prototype chip puts both units
behind one small serial test interface (8 serial inputs, 8 serial outputs,
4 control pins, 1 clock).

The RTL is written in synthesizable SystemVerilog. It describes logic, not
dies: a tier is a level of module hierarchy, and a through-silicon via is an
ordinary wire. Physical parts of the prototype (TSVs, the 3D clock tree,
power TSVs, pads) have no RTL.

## The 3D adder (`ks3d_adder`)

### Bit-to-tier interleaving

Bit `i` (counting from 0) sits on tier `i mod 3`:

| bit positions | tier |
|---|---|
| 0, 3, 6, ... | Tier 1 (bottom) |
| 1, 4, 7, ... | Tier 3 (top) |
| 2, 5, 8, ... | Tier 2 (middle) |

### Three stages

1. **Level 0, `pg_gen`.** For each bit it computes generate `g = a & b` and
   propagate `p = a ^ b`.
2. **Level 1, `cross_tier_merge`.** This is the only stage whose signals
   cross tiers. Node `i` forms the group term of bits `i+2..i`: its own bit
   and the two bits *above* it, which sit on the other two tiers. Carries in
   this stage therefore run towards higher bits, the opposite of the later
   stages. A single three-input merge gate would need many TSVs and have
   high fanout. Instead, each node is a carry chain of two 2-input merges:
   bit `i+1` is merged onto bit `i`, then bit `i+2` onto the result. This
   adds one logic level. The overall depth is still no worse than that of a
   flat Kogge-Stone adder of the same width.
3. **Levels 2 and up, `ks_prefix` x 3.** Each tier runs its own Kogge-Stone
   tree over its 12 level-1 outputs. The tree uses stride 1, 2, 4, 8 inside
   the tier, which is stride 3, 6, 12, 24 in bit positions. Each level-1 term
   covers three consecutive bits. Tier-local prefixes therefore chain into
   full prefixes, and after the tree node `i` holds the group term of bits
   `i+2..0`.

Why level 1 runs upwards: the carry into bit `k` is the generate of bits
`k-1..0`. That is node `k-3`, which sits on the same tier as bit `k`. Every
sum bit `sum[k] = p[k] ^ G(node k-3)` is therefore formed on its own tier,
and no signal crosses tiers after level 1.

Two details close the gaps at the bottom:

* Tiers 3 and 2 start at bits 1 and 2. Their lowest nodes (1 and 2) extend
  their chains down to bit 0, covering bits `3..0` and `4..0`.
* The carries into bits 1 and 2 are the first links of node 0's chain
  (bits `0..0` and `1..0`). They come out as `carry_low`.

`cout` is the generate of node `WIDTH-3` (bits `WIDTH-1..0`). There is no
carry-in.

### Split mode: three independent sub-adders

With `split = 1`, level 1 replaces its cross-tier inputs by the merge
identity `(g=0, p=1)`, and `carry_low` is 0. Nothing then crosses tiers, and
tier `t` becomes an independent 12-bit adder of the operand bits at
positions `3j+t`. The tier trees compute each sub-adder's own prefixes, and
the same sum equation `p[k] ^ G(node k-3)` holds. Each sub-sum appears at
the same positions of `sum`, and each carry out at `sub_cout[t]`. There are
no carry-ins.

The underlying idea is that a small change to the level-1 merge gives three
independent sub-adders. The particular gating, the lack of carry-ins and the
interleaved operand layout are choices made in this RTL.

## The 3D multiplier (`wallace3d_mult`)

The multiplier is unsigned, with 32 partial-product rows: row `i` is `b[i] ? a << i : 0`,
64 bits wide. There is no Booth recoding. The Wallace tree of 4:2 counters
reduces 32 -> 16 -> 8 -> 4 -> 2 rows in four levels. The last two levels are
split across tiers:

| tier | module | content |
|---|---|---|
| Tier 1 (bottom) | `wallace_subtree` | rows 0-15 (multiplier bits `b[15:0]`), levels 1-3: 16 -> 2 rows |
| Tier 3 (top) | `wallace_subtree` | rows 16-31 (`b[31:16]`), levels 1-3: 16 -> 2 rows |
| Tier 2 (middle) | `mult_root` | level 4 (4 -> 2 rows) and a 64-bit Kogge-Stone adder (`ks_adder`) -> `product` |

Only the four 64-bit sub-tree outputs cross tiers. In a flat layout these are
the longest wires.

`counter42_row` is a row of 4:2 counters. Each counter is two full adders
with a horizontal carry to the next bit. That carry does not depend on the
incoming one, so nothing ripples along the row. All rows are kept 64 bits
wide and constant zeros are left to synthesis.

### Split mode: two half multipliers

Each outer tier also has its own 48-bit Kogge-Stone adder over its two rows:

* `prod_lo = a * b[15:0]` (Tier 1)
* `prod_hi = a_t3 * b[31:16]` (Tier 3), where `a_t3 = split ? a_hi : a`

With `split = 1`, the two tiers are independent 32x16 multipliers, each with
its own multiplicand, and `product` is meaningless. With `split = 0`, the
output `product = a * b`. The per-tier adders follow the design. The extra
multiplicand input `a_hi` is a choice made in this RTL so that the two halves
are truly independent.

## The chip (`chip3d_top`) and its test interface (`test_if`)

Pins: `clk`, `rst_n` (synchronous, active low), `shift_en`, `capture`,
`split`, `sin[7:0]`, `sout[7:0]`.

The operand register holds 104 bits: 8 lanes of 13 bits, where lane `k` is
bits `[13k+12 : 13k]`. Its fields are:

* `X = [35:0]`
* `Y = [71:36]`
* `Z = [103:72]`

The adder computes `X + Y`. The multiplier computes `X[31:0] * Y[31:0]`. In
split mode it computes `X[31:0] * Y[15:0]` and `Z * Y[31:16]`.

The result register holds 136 bits: 8 lanes of 17 bits. Its fields, from
the top, are:

* `[135:100]`: the adder sum.
* `[99:97]`: carries. In full mode these are `{0, 0, cout}`. In split mode
  they are `sub_cout[2:0]`.
* `[96:1]`: the multiplier result. In full mode this is `{32'b0, product}`.
  In split mode it is `{prod_hi, prod_lo}`.
* `[0]`: zero.

One operation takes 31 clocks:

1. Hold `shift_en` high for 13 clocks. Each lane shifts towards its MSB and
   takes `sin[k]` at its LSB, so each lane receives its MSB first.
2. Set `split` as needed and pulse `capture` for one clock.
3. Hold `shift_en` high for 17 clocks and read `sout[k]` each clock, MSB first.

`capture` takes priority over `shift_en` for the result register. Both
arithmetic units are purely combinational between the two registers, which
makes a single-cycle path. The prototype was aimed at 200 MHz.

The pin budget (16 serial pins, 4 control pins, 1 clock) and the sharing of
the shift registers between both units come from the prototype. The 8 + 8
split of the serial pins, the meaning of the four control pins and the
register layout are choices made in this RTL.

## Parameters

| module | parameter | default |
|---|---|---|
| `chip3d_top` | `ADD_WIDTH`, `MUL_N`, `LANES` | 36, 32, 8 |
| `ks3d_adder` | `WIDTH` (multiple of 3) | 36 |
| `wallace3d_mult` | `N` (power of two, >= 8) | 32 |
| `wallace_subtree` | `ROWS` (power of two, >= 4), `WIDTH` | 16, 64 |
| `ks_prefix` | `N` | 12 |
| `ks_adder`, `mult_root`, `counter42_row` | `WIDTH` | 64 |
| `test_if` | `LANES`, `IN_BITS`, `OUT_BITS` | 8, 104, 136 |

## Simulating

Each testbench in `tb/` checks its results against reference values it
computes itself. Each one ends by printing `TB_RESULT checks=N failures=M`.
For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/arith3d_pkg.sv tb/tb_chip3d_top.sv --top-module tb_chip3d_top
    ./obj_dir/Vtb_chip3d_top

`tb_chip3d_top` drives the chip through its pins only, at the default sizes:

* 63 operations, all compared with `+` and `*`.
* The 31-clock operation length is checked.
* Each mechanism is counted and must occur at least once: full add, add with
  carry out, split add, sub-adder carry out, full multiply and split multiply.

The unit testbenches cover the adder at 12, 36 and 72 bits, and the
multiplier at 32x32 and 16x16. Reduction trees are tested with 4, 8 and
16 rows.

## Limits and departures

* The adder's hierarchy follows its stages (level 0, level 1, three tier
  trees). Only the trees are per-tier modules (`g_tier[t]`); a tier's level-0
  units, level-1 chains and sum bits are the entries `i` with `i mod 3 = t`.
* Tiers, TSVs, the 3D clock tree and power TSVs are physical. They appear
  only as module hierarchy and instance names (`u_tier1_tree`,
  `u_tier2_root`, ...). Timing and energy figures of the 3D layout cannot be
  reproduced from RTL.
* The level-1 chain is written as two merges per bit, plus one more for
  nodes 1 and 2. A layout may share the partial chains between neighbouring
  bits; the logic function is the same.
* The following are choices made in this RTL:
  * unsigned multiplication;
  * no carry-in on the adder;
  * how split mode is gated, and the second multiplicand `a_hi`;
  * pin meanings and register layout;
  * synchronous reset.
* The final adder in the multiplier and the half-multiplier adders are
  Kogge-Stone. Any other parallel prefix adder would also do.
* The sub-adders of the 3D adder could in principle use other structures
  (carry-select, Brent-Kung, ripple) or unequal widths. Only the uniform
  Kogge-Stone version is provided.
