# 8 × 8 Wallace-tree multiplier with a half-adder carry chain

This is a combinational unsigned multiplier. Two 8-bit operands `a` and `b` produce the
16-bit product `s`. There is no clock.

An array multiplier adds the partial-product rows one after another. This design does
something else. It treats the 64 partial-product bits as wires sorted by weight, and adds
all columns at once in layers of full adders (3:2 counters) and half adders. Each layer cuts
the tallest column by about a third, so an 8-bit product needs four layers to come down to
two rows. A carry chain then adds those two rows.

The final chain gets a special cell. A full adder there always waits for the carry coming up
from the weight below. In this design the chain uses a cell made of two half adders and an OR
gate. The late carry then passes only one AND gate and one OR per weight.

## Partial products and weights

`pp_array` has N² two-input AND gates: `pp[j][i] = a[i] & b[j]`. The weight of that bit is
`i + j`, so `a[2]&b[3]` has weight 5. For N = 8, column (weight) `c` holds
`min(c, 14 − c) + 1` bits: 1, 2, …, 8, …, 2, 1.

## Reduction layers

`wallace_tree` repeats one rule for every column in every layer:

* each group of three wires goes into a full adder;
* two leftover wires go into a half adder;
* one leftover wire passes straight to the next layer.

Sums keep their weight. Carries move to the next column up. Layers are added while any
column still has three or more wires. With N = 8 the column heights at each layer's input are
(weight 0 on the left):

| layer input | heights, weights 0 … 15                          | FAs | HAs |
|-------------|--------------------------------------------------|-----|-----|
| 0           | 1 2 3 4 5 6 7 8 7 6 5 4 3 2 1 0                  | 16  | 5   |
| 1           | 1 1 2 3 3 4 5 5 6 4 4 4 2 2 2 0                  | 10  | 6   |
| 2           | 1 1 1 2 2 3 3 4 4 4 3 3 2 2 2 1                  | 7   | 5   |
| 3           | 1 1 1 1 2 2 2 3 3 3 2 2 2 2 2 2                  | 3   | 9   |
| chain       | 1 1 1 1 1 2 2 2 2 2 2 2 2 2 2 2                  |     |     |

The code writes none of these numbers down. The constant functions in `wallace_pkg` replay the
rule while the design elaborates, and return the number of layers, the height of every column
in every layer, and which columns of the chain get a carry. `wallace_tree` places its adders
with those values in `generate` loops, so the same code builds the tree for any N from 2 to
64. Inside a column, a layer's output wires are ordered as follows:

1. the column's full-adder sums;
2. its half-adder sum;
3. the wire that passed through;
4. the carries coming from the column below.

The late carries therefore sit on the last adder input (`cin`).

## The final carry chain and the half-adder pair

After the layers, every column holds one or two wires. The chain then works from weight 0
upwards. Each column adds its wires and the carry from the column below, which leaves one
wire per weight. That wire is the product bit. For N = 8:

* weights 0–4 hold one wire and need no adder;
* weight 5 uses a half adder;
* weights 6–15 each need a three-input cell.

With `REVISED = 1` (the default) that three-input cell is `ha_pair_or`:

```
 a ─┐ HA1 ─ s1 ─┐ HA2 ─ sum
 b ─┘    └ c1   cin ─┘  └ c2        cout = c1 | c2
```

The cell's function is a full adder's. `c1 = a & b` and `c2 = (a ^ b) & cin` can never both
be 1, so an OR gives the right carry without a third adder stage. `a` and `b` come out of the
reduction layers early. `cin` is the carry rippling up the chain, and it reaches `cout` through
one AND and one OR. With `REVISED = 0` the chain uses ordinary full adders. That is the
structure before this change, and it is kept as a parameter so that the two can be compared.

The chain's last carry, out of weight 15, is always 0 because the product fits in 16 bits.
That adder output is left unconnected, and so is the one carry of the reduction layers that
leaves the top column. Verilator reports both as empty pin connections.

## Modules

| module               | ports                                        | role |
|----------------------|----------------------------------------------|------|
| `wallace_multiplier` | `a[N-1:0]`, `b[N-1:0]` → `s[2N-1:0]`         | top: `pp_array` + `wallace_tree` |
| `pp_array`           | `a`, `b` → `pp[N-1:0][N-1:0]`                | N² AND gates |
| `wallace_tree`       | `pp` → `p[2N-1:0]`                           | reduction layers and the final chain |
| `full_adder`         | `a`, `b`, `cin` → `sum`, `cout`              | 3:2 counter |
| `half_adder`         | `a`, `b` → `sum`, `cout`                     | 2:2 counter |
| `ha_pair_or`         | `a`, `b`, `cin` → `sum`, `cout`              | two half adders with an OR on their carries |
| `wallace_pkg`        | functions                                    | tree shape, computed while the design elaborates |

Parameters are `N` (operand width, default 8) and `REVISED` (default 1), on both
`wallace_multiplier` and `wallace_tree`. For N = 8 the design holds 64 AND gates, 36 full
adders, 26 half adders and 10 half-adder pairs. Product bit 0 is `a[0] & b[0]` with no adder.

## Timing

Every path is combinational. The longest path runs through:

* the AND gate;
* four adder levels in the reduction layers;
* the half adder at weight 5;
* the chain cells up to weight 15.

In each `ha_pair_or` on that chain the carry passes one AND and one OR, plus the final half-adder
sum at the top. Gate delays are a matter for the target library. The RTL does not model them.

## Verification

Each testbench checks itself and ends by printing `TB_RESULT checks=… failures=…`.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_half_adder`         | all 4 input pairs |
| `tb_full_adder`         | all 8 input combinations |
| `tb_ha_pair_or`         | all 8 input combinations |
| `tb_pp_array`           | all 65,536 operand pairs, every one of the 64 partial products |
| `tb_wallace_tree`       | 8-bit revised and original chain (exhaustive), 4-bit and 3-bit (exhaustive), 16-bit (20,000 random pairs plus corner cases) |
| `tb_wallace_multiplier` | the top at its default parameters (see below) |

`tb_wallace_multiplier` runs the top at its defaults. It applies three reference pairs:

* 11101100 × 11010110 = 1100010101001000;
* 143 × 103;
* 39 × 13.

It then runs all 65,536 operand pairs. Monitors (`carry_monitor`, `hpo_monitor`, counters in
`tb_cov_pkg`) are bound into every adder cell. They count full-adder carries, half-adder
carries, and both carries of the half-adder pairs. The test fails if any of these never occurs,
or if the two carries of a pair are ever high together.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/wallace_pkg.sv tb/tb_cov_pkg.sv tb/tb_wallace_multiplier.sv \
    --top-module tb_wallace_multiplier
./obj_dir/Vtb_wallace_multiplier
```

Any other testbench runs the same way: change the file and the top-module name. Every test
finishes in well under a second.

## How closely this follows the original design, and where it departs

These parts follow the original design:

* the 8-bit size;
* the AND array;
* the layer rule: full adders for three wires, half adders for two, a single wire passed on;
* the final step that leaves one wire per weight;
* the two-half-adders-and-OR cell.

The original gives the adder-level drawing of its tree only as a figure. These points are this
implementation's own:

* **Adder placement.** It is derived from the rule above, so the number of adders on the
  worst path differs from the published count. The original's revised worst path has five
  full-adder sums, seven half-adder carries, a 3-input OR and a 2-input OR. This design uses no
  3-input OR.
* **Which cells become half-adder pairs.** Only the three-input cells of the final chain are
  converted. These are the cells that wait on the lower weights.
* **The final step.** It is a single ripple chain.
* **Wire order** inside a column, and feeding the late carry to `cin`.
* **Unsigned operands, no registers, and no reset.**

The original measured speed in a transistor-level simulation (worst case from A0 to S15). The
RTL has no delays, so that figure is not reproduced. The array multiplier that the original
uses only as a speed baseline is not part of this RTL.
