# 32-bit Vedic multiply-accumulate unit with a reversible-gate accumulator adder

This is a 32-bit unsigned multiply-accumulate (MAC) unit. On every clock it adds the
product `a * b` to a 64-bit running sum. It combines three ideas, one for each
arithmetic step:

* **Multiplication by the Urdhva Tiryagbhyam ("vertically and crosswise") rule.** This
  is the hand method from Vedic mathematics. Each product digit comes from one column
  of cross products plus the carry from the column before. An 8x8 multiplier is built
  this way. Larger multipliers are assembled from four half-size ones: 16x16 from
  four 8x8, and 32x32 from four 16x16.
* **Kogge-Stone parallel-prefix adders.** They sum the partial products inside the
  32x32 multiplier.
* **A ripple-carry adder made of reversible DKG gates.** It adds the 64-bit product to
  the accumulator. A DKG gate has 4 inputs and 4 outputs, and each input pattern maps
  to a different output pattern. With one input tied to 0, the gate works as a full
  adder.

```
 a[31:0] ─┐
          ├─► vedic_mul32 ──product[63:0]──► dkg_rca (64 bit, cin=0) ──sum──► mac_accumulator ──┬──► y[63:0]
 b[31:0] ─┘                                      ▲                           (clear on rst)     │
                                                 └───────────────────────────────────────────────┘
```

The only state is the 64 accumulator flip-flops. `a` and `b` are not registered.

## Interface and timing (`mac32_vm32_dkg`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | rising-edge clock |
| `rst` | in | 1 | synchronous clear, active high |
| `a`   | in | 32 | multiplicand, unsigned |
| `b`   | in | 32 | multiplier, unsigned |
| `y`   | out | 64 | accumulator |

At each rising edge:

* if `rst` is 1, `y` becomes 0;
* otherwise `y` becomes `(y + a*b) mod 2^64`.

`a` and `b` are the values held just before the edge. The result appears one clock
after the operands are applied. A new operand pair can be given on every clock.
Overflow wraps silently, because the adder's carry-out is dropped. No flag or
saturation is provided.

Example: after reset, hold `a = 3251` and `b = 1235`. `y` then goes
4014985, 8029970, 12044955, … and reaches 36134865 after nine clocks.

Everything between the inputs and the flip-flops is combinational. The critical path
runs through the multiplier and then the 64-bit ripple-carry adder. The ripple adder
is the slow part: its delay grows linearly with its width. It was chosen for its
reversible-gate construction, not for speed.

## The vertically-and-crosswise multiplier (`vedic_mul8`)

For N-bit operands there are 2N−1 columns, k = 0 … 2N−2. Column k adds:

* every cross product `a[i] & b[j]` with `i + j = k` (1, 2, …, N, …, 2, 1 terms);
* the whole carry handed on from column k−1.

Bit 0 of this column sum is product bit k. The rest of the sum is the carry passed on
to column k+1. After the last column, the carry that remains is the top product bit.

The decimal version of this method gives 9284 × 5137 = 47691908, digit by digit. The
binary module does the same in base 2. The carry between columns can be several bits
wide (up to about log2 N + 1 bits), so each column is a small counter, not a full
adder. The default is N = 8, the size the 16x16 multiplier uses. Any N works.

## Building 16x16 and 32x32 from four half-size multipliers

Split each operand into a high half and a low half: `a = {ah, al}` and
`b = {bh, bl}`. Then

```
a*b = hh·2^(2h) + (hl + lh)·2^h + ll      where ll = al*bl, lh = al*bh, hl = ah*bl, hh = ah*bh
```

Here h is the half width.

* The low h bits of `ll` pass straight to the output.
* The middle sum `hl + lh + (ll >> h)` is a three-operand addition. It produces the
  next h output bits.
* The upper half of the middle sum, plus its carries, is added to `hh` to form the top
  2h bits.

**`vedic_mul16`** uses three 16-bit ripple-carry adders, each a 16-bit `dkg_rca`:

1. `t1 = hl + lh`, with carry `ca1`
2. `t2 = t1 + {8'b0, ll[15:8]}`, with carry `c2`; then `s[15:8] = t2[7:0]`
3. `s[31:16] = hh + {7'b0, ca1|c2, t2[15:8]}`, with carry `ca2`

**`vedic_mul32`** has the same structure. Its middle and top additions are 32-bit
Kogge-Stone adders: two in series for the three-operand middle sum, and one for the
top.

**Why `ca1|c2` is exact.** The two carries have the same weight (bit h of the middle
sum). The middle sum is at most 2(2^h−1)² + 2^h − 1, which is below 2^(2h+1). So the
middle sum has only one bit above its 2h-bit field, and at most one of the two carries
can be 1.

**Why it matters.** Dropping either carry gives wrong products for large operands.
This is the fault the testbenches check for.

The final carry `ca2` of `vedic_mul16` is always 0. It is kept only as the third
adder's carry output.

## Kogge-Stone adder (`kogge_stone_adder`)

Each bit forms generate `g = x&y` and propagate `p = x^y`. The carry-in enters as an
extra position below bit 0. It has generate = `cin` and propagate = 0.

Stage s (s = 1 … log2 WIDTH) combines each position with the one 2^(s−1) places
below it, using the prefix operator `(G,P)∘(G',P') = (G | P&G', P&P')`. A position
whose span already reaches the carry-in position only needs G (a "grey" cell). All
other positions need G and P (a "black" cell).

After log2 WIDTH stages:

* the group generate below bit i is the carry into bit i;
* `sum = p ^ carry`;
* one more cell on top of the highest bit gives `cout`.

Stage s has WIDTH − 2^(s−1) cells. For WIDTH = 16 that totals 15 + 14 + 12 + 8 = 49
cells, which is n(log2 n − 1) + 1. No node drives more than two cells in the next stage.

The module's default width is 16. The multiplier uses it at 32.

## DKG reversible gate and adder (`dkg_gate`, `dkg_rca`)

```
P = B        Q = A'C + AD'        R = (A⊕B)(C⊕D) ⊕ CD        S = B⊕C⊕D
```

| A | role | R | S | Q |
|---|------|---|---|---|
| 0 | full adder of B + C + D | carry | sum | C |
| 1 | full subtractor of B − C − D | borrow | difference | ¬D |

`P` and `Q` are "garbage" outputs. They exist only to keep the mapping one-to-one.

`dkg_rca` chains WIDTH gates with A = 0. Bit i uses `B = x[i]`, `C = y[i]`, and
`D = carry in`. Its R output is the carry into bit i+1, and its S output is `sum[i]`.
The garbage outputs are left unused.

In logic synthesis these gates turn into ordinary XOR/AND/OR logic. The power benefit
claimed for reversible logic would only appear in a truly reversible technology.

## Accumulator (`mac_accumulator`)

A plain 64-bit D register. Its input is the adder sum ANDed with `~rst`, which makes
`rst` a synchronous clear. The register has no asynchronous reset and no enable.

## Choices made where the source description is silent or ambiguous

* **Unsigned arithmetic, wrap on overflow.** Signed operands are not described.
* **`rst` is a synchronous clear.** The register is an AND gate with an inverted
  `rst` input feeding a plain D flip-flop. There is no enable: the unit accumulates on
  every clock.
* **The inner 8x8 multiplier is written as the column rule directly.** Its structure
  is only named in the source, so the column rule is used instead of a further split
  into 4x4 and 2x2 blocks.
* **Three-operand middle sums.**
  * In `vedic_mul32`, the middle sum is two Kogge-Stone adders in series.
  * In `vedic_mul16`, the carry-out of the second ripple adder is merged into the third
    adder (`ca1|c2`). The published block diagram does not show this carry. Without it
    the product is wrong.
* **Adders inside `vedic_mul16`.** Its 16-bit ripple-carry adders reuse the DKG adder.
  The source says only "ripple carry adder".
* **The Kogge-Stone adder's sum and carry-out.** These are formed in the usual way
  after the prefix tree; only the tree itself is drawn in the source.
* **Baseline not built.** The earlier 32x32 variant with carry-save adders, and a
  conventional MAC, are comparison baselines only.
* **Output port count.** The reference implementation reports 131 bonded I/Os. This
  design has 130 port bits: clk, rst, 32 + 32 inputs and 64 outputs. The difference is
  unexplained.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module with
arithmetic computed in the testbench, not with a second copy of the logic:

| testbench | what it covers |
|-----------|----------------|
| `tb_dkg_gate` | all 16 input patterns; adder and subtractor modes; all 16 outputs distinct |
| `tb_dkg_rca` | 64-bit adder: corner cases and 2000 random sums; 4-bit chain: exhaustive |
| `tb_kogge_stone_adder` | 16-bit and 32-bit: random sums; 4-bit: exhaustive |
| `tb_vedic_mul8` | 8x8 and 4x4: exhaustive |
| `tb_vedic_mul16`, `tb_vedic_mul32` | corner operands, the 9284 × 5137 example, and 20000 random pairs; `tb_vedic_mul32` adds operands where the middle sum of the partial products is 2^32 − 1, so the second middle adder carries out |
| `tb_mac_accumulator` | load and synchronous clear against a reference register |
| `tb_mac32_vm32_dkg` | whole MAC at its default sizes (details below) |

`tb_mac32_vm32_dkg` runs three phases:

1. the 3251 × 1235 sequence above, checked cycle by cycle;
2. 3000 clocks of random operands with random clears;
3. all-ones operands until the 64-bit sum wraps.

It counts clears, accumulations and wraps, and fails if any of them never happened.
It also checks the one-clock timing on every cycle.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

Each testbench builds with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv tb/tb_mac32_vm32_dkg.sv \
          --top-module tb_mac32_vm32_dkg -o sim && ./obj_dir/sim
```

`-Irtl` lets Verilator find each submodule in `rtl/<module>.sv`. For lint:

```
verilator --lint-only -Wall -Irtl rtl/mac_pkg.sv rtl/mac32_vm32_dkg.sv
```

Lint reports only unused-signal warnings, for carries and garbage outputs that are
dropped on purpose:

* the DKG garbage outputs;
* the accumulate adder's carry-out (the wrap);
* the multipliers' always-zero carries.

## Files

| file | content |
|------|---------|
| `rtl/mac_pkg.sv` | shared widths (`DATA_W = 32`, `ACC_W = 64`) |
| `rtl/mac32_vm32_dkg.sv` | top: multiplier, DKG adder and accumulator |
| `rtl/vedic_mul32.sv` | 32x32 from four 16x16 and Kogge-Stone adders |
| `rtl/vedic_mul16.sv` | 16x16 from four 8x8 and DKG ripple adders |
| `rtl/vedic_mul8.sv` | N x N column-rule multiplier (N = 8) |
| `rtl/kogge_stone_adder.sv` | parallel-prefix adder (WIDTH = 16 default) |
| `rtl/dkg_gate.sv` | reversible DKG gate |
| `rtl/dkg_rca.sv` | ripple-carry adder of DKG gates (WIDTH = 64 default) |
| `rtl/mac_accumulator.sv` | accumulator register with synchronous clear |
