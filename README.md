# Hybrid CI_CSKA — a 32-bit concatenation-and-incrementation carry-skip adder

A carry-skip adder splits its operands into stages and lets a carry jump over a
stage whose bits all propagate, instead of rippling through it. This design
pushes that idea further in three ways:

* **Concatenation.** Every stage except the first adds its slice with a carry-in
  of 0. All stages therefore compute at the same time, and none waits for the
  carry from below. Each stage gives an intermediate sum `Z`, a block carry and
  a block propagate.
* **Incrementation.** The real carry into a stage arrives later and is added to
  `Z` by a small incrementer. The stage's carry-out does not come from that
  incrementer. It comes from the skip gate.
* **Compound-gate skip chain.** The only serial path is one gate per stage:
  `cout = cblk | (prop & cin)`. It is built as a single AOI or OAI gate rather
  than a 2:1 multiplexer. Such a gate inverts its output, so AOI and OAI gates
  alternate, and the carry between stages changes polarity at every stage.

The stages are carry lookahead (CLA) blocks. The middle ("nucleus") stage is a
Kogge-Stone parallel prefix adder instead. That is why the design is called
*hybrid*.

Everything is combinational: there are no clocks or registers.

## Stage layout

The default configuration is `WIDTH = 32`, `M = 4`, `MP = 8` and `P = 4`. This
gives `Q = 7` stages. Stage 1 holds the least significant bits.

| stage | bits    | adder block             | skip gate | carry in   | carry out  |
|-------|---------|-------------------------|-----------|------------|------------|
| 1     | [3:0]   | 4-bit CLA, carry-in `ci`| none      | `ci`       | true       |
| 2     | [7:4]   | 4-bit CLA, carry-in 0   | AOI       | true       | inverted   |
| 3     | [11:8]  | 4-bit CLA, carry-in 0   | OAI       | inverted   | true       |
| 4     | [19:12] | 8-bit Kogge-Stone       | AOI       | true       | inverted   |
| 5     | [23:20] | 4-bit CLA, carry-in 0   | OAI       | inverted   | true       |
| 6     | [27:24] | 4-bit CLA, carry-in 0   | AOI       | true       | inverted   |
| 7     | [31:28] | 4-bit CLA, carry-in 0   | OAI       | inverted   | true → `co`|

The general rules are:

* Stage 1 is a plain CLA with no skip gate.
* The carry leaving an even stage is inverted. The carry leaving an odd stage is
  true.
* Stage `j >= 2` uses an AOI gate if `j` is even and an OAI gate if `j` is odd.
* When `Q` is even, the last carry is inverted. The top then inverts it once
  more, so `co` always has true polarity.

The helper functions `carry_out_inverted(j)` and `skip_is_oai(j)` in
`ci_cska_pkg` are the single place that holds these rules. Each block that
receives a carry gets a `CIN_INV` parameter set from them.

## How a CI stage computes (stages 2..Q except the nucleus)

1. `cla_block` adds `a` and `b` with carry-in 0. It outputs `Z`, the block carry
   `cblk` and the block propagate `prop = &(a ^ b)`.
2. `skip_logic` forms the carry to the next stage: `cblk | (prop & cin)`.
   * The AOI form takes the true carry and outputs `~(cblk | prop&cin)`.
   * The OAI form takes the inverted carry and outputs
     `~((~prop | ~c) & ~cblk)`, which is the true carry.
3. `incrementation_block` adds the incoming carry to `Z`:
   `s[i] = z[i] ^ (c & z[i-1] & ... & z[0])`.

Replacing the multiplexer with an OR is exact here. If `prop` is 1, the block
cannot generate a carry by itself, so `cblk` is 0.

## The nucleus stage (`ks_ppa`)

The nucleus has three parts:

* **Preprocessing** forms the bit generate and propagate signals.
* **Prefix network** has `log2(MP)` Kogge-Stone levels. At level `l`, each bit
  combines with the bit `2^l` positions below it. Afterwards, node `i` holds
  the generate and propagate of bits `i..0`, for a carry-in of 0.
* **Postprocessing** forms `sum[i] = p[i] ^ (G[i-1:0] | P[i-1:0] & c)`.

The carry `c` from stage `P-1` enters only in postprocessing. The prefix network
therefore runs in parallel with the other blocks, just like a CLA stage with
carry-in 0. The group generate and group propagate of all `MP` bits go to the
nucleus skip gate.

`MP` must be a power of two.

## Timing

The critical path runs through these steps, in order:

1. The block carry of some stage. All stages form this in parallel.
2. The chain of skip gates, one per stage.
3. The incrementer or nucleus postprocessing of the last stage the carry
   reaches.

The CLA blocks add at most a few gate levels. The nucleus adds `log2(MP)`
prefix levels.

## Parameters (`hybrid_ci_cska`)

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 32 | operand width |
| `M`       | 4  | size of every CLA stage (one fixed stage size) |
| `MP`      | 8  | size of the nucleus prefix adder, a power of two |
| `P`       | 4  | stage number of the nucleus, at least 2 |

`WIDTH - MP - (P-1)*M` must be a non-negative multiple of `M`. If it is not,
elaboration stops with an error.

The stage count is `Q = P + (WIDTH - MP - (P-1)*M) / M`. The defaults place the
nucleus in the exact centre, with three CLA stages on each side.

Ports:

| port | direction | width |
|------|-----------|-------|
| `a`  | input     | `WIDTH` |
| `b`  | input     | `WIDTH` |
| `ci` | input     | 1 |
| `s`  | output    | `WIDTH` |
| `co` | output    | 1 |

## What is a design choice here, and what is left out

* **Source of the architecture.** These parts follow the published hybrid
  CI_CSKA architecture:
  * a 32-bit width;
  * a CLA in every stage, with carry-in 0 outside stage 1;
  * AOI/OAI skip gates with alternating carry polarity (the carry leaving even
    stages is inverted);
  * incrementation blocks;
  * a stage carry taken from the skip gate;
  * a Kogge-Stone nucleus made of preprocessing, prefix network and
    postprocessing, placed in the central stage.
* **Stage sizes.** The source gives no stage sizes. These are choices made here:
  * the fixed 4-bit CLA size;
  * the 8-bit nucleus;
  * the nucleus position (stage 4 of 7).
* **Inside the blocks.** The source does not describe these either, so they are
  also choices made here:
  * the CLA's flat lookahead equations (each carry written as one sum of generate/propagate products);
  * the incrementer's AND chain;
  * where the incoming carry enters the nucleus (postprocessing).
* **Gate form is only a description.** The skip gates are written as the Boolean
  function of an AOI or OAI gate. A synthesis tool or FPGA flow will remap them.
  The gate form and the polarity alternation are kept in the RTL so that it
  matches the transistor-level structure. They do not guarantee that the gates
  are kept after synthesis.
* **Variable latency is not built.** The architecture leaves room for a
  one-cycle/two-cycle latency predictor next to the nucleus. Its rule is not
  specified, so the adder here is purely combinational.
* **Baselines are not built.** Neither the conventional multiplexer-based
  carry-skip adder nor the CI_CSKA with ripple-carry blocks is included. They
  serve only for comparison.
* **No delay or power figures.** These files contain no delay or power numbers,
  so no speed or power claim can be checked against them.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `ci_cska_pkg.sv` | `gp_t` (generate/propagate pair), the prefix operator and the polarity rules |
| `cla_block.sv` | M-bit carry lookahead block |
| `skip_logic.sv` | AOI or OAI skip gate |
| `incrementation_block.sv` | adds the stage carry to `Z` |
| `ks_ppa.sv` | Kogge-Stone nucleus adder |
| `hybrid_ci_cska.sv` | the top level, which builds the stages with a generate loop |

`tb/`: one self-checking testbench per module, plus
`tb_hybrid_ci_cska_configs.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

Simulate the full adder at its defaults:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl rtl/ci_cska_pkg.sv \
          tb/tb_hybrid_ci_cska.sv --top-module tb_hybrid_ci_cska -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in the file of the same name. The
package file must be listed explicitly. To run another testbench, swap in its
file and top module name. To use a different configuration, instantiate
`hybrid_ci_cska` with a parameter list, as `tb_hybrid_ci_cska_configs.sv` does.

## Verification

* **`tb_hybrid_ci_cska`** runs the top at its default parameters. Every result
  is compared with a 33-bit integer sum. It applies:
  * four operand pairs with known results;
  * directed carry-chain cases;
  * 200 000 random vectors, a third of them with long propagate runs.

  From the operands alone, it also counts how often each mechanism happens and
  fails if any of them never happens:
  * a skip over a CLA stage;
  * a skip over the nucleus;
  * a carry generated inside a block;
  * an increment;
  * a carry into the nucleus postprocessing;
  * a carry that runs from `ci` to `co`;
  * a 1 leaving an AOI stage and a 1 leaving an OAI stage.
* **`tb_hybrid_ci_cska_configs`** checks four other configurations:
  * 28 bits (even `Q`, so the output carry is re-inverted);
  * 64 bits with a 16-bit nucleus;
  * 2-bit blocks;
  * a nucleus at stage 2.
* **Block testbenches:**
  * `cla_block` and `ks_ppa` are tested exhaustively at their default sizes;
  * `skip_logic` and `incrementation_block` are tested exhaustively in both
    carry polarities.

All testbenches pass.
