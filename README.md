# Concatenation-incrementation carry skip adders

A conventional carry skip adder (CSKA) cuts an N-bit ripple-carry adder
into stages and lets a carry jump over any stage whose bits all propagate,
through a multiplexer per stage. Its critical path still waits for the
carry into each stage before that stage can finish, and the multiplexer
chain is slow.

The adders here reorganise the stages so that almost everything happens in
parallel:

* **Concatenation.** Every stage except the first adds its bits with a
  ripple-carry block whose carry input is tied to zero. All these blocks
  start at once; none waits for a lower stage.
* **Incrementation.** Each stage then adds the carry of the stage below to
  its intermediate sum with an *incrementation block*: a chain of AND gates
  and one XOR per bit.
* **Compound-gate skip logic.** The carry out of stage j is
  `C0_j | (P_j & C_{j-1})`, where `C0_j` is the carry of the zero-carry-in
  ripple block and `P_j` the AND of the stage's propagate bits. This is one
  AOI21 or OAI21 gate per stage instead of a multiplexer.

This gives the **CI-CSKA** (`ci_cska`). A second design, the **hybrid
variable-latency CSKA** (`hybrid_vl_cska` inside `vl_ctrl`), replaces the
largest stage with a parallel-prefix adder. It adds a predictor that spots
the rare operands able to excite the full-length carry path, and it gives
those operands two clock periods instead of one. The clock period can then
be set by the short paths, which suits voltage scaling: as the supply
drops, a fixed long-path margin would cost the most.

Both adders are combinational datapaths of generic gates, written in
synthesizable SystemVerilog; the hybrid one is wrapped with registers. `cska_top` places them side by side.

## Stage structure of the CI-CSKA

```
 stage Q ...          stage 3               stage 2                stage 1
 ┌────────────┐       ┌────────────┐        ┌────────────┐        ┌──────────┐
 │RCA(cin=0)  │       │RCA(cin=0)  │        │RCA(cin=0)  │        │ RCA      │<- cin
 │ s0,C0,P    │       │ s0,C0,P    │        │ s0,C0,P    │        │          │
 │ INC ◄──────┼─...◄──┤ INC ◄──────┼────────┤ INC ◄──────┼────────┤ carry    │
 │ skip (AOI/ │       │ skip (OAI) │◄───────│ skip (AOI) │◄───────│          │
 │  OAI)      │       └────────────┘  ~C2   └────────────┘   C1   └──────────┘
 └────────────┘
```

* Stage 1 (`rca_block`, `HAS_CIN=1`) is an ordinary ripple-carry adder fed
  by `cin`. Its carry `C1` starts the skip chain.
* Stage j ≥ 2 (`cska_stage`) holds a zero-carry-in ripple block
  (`rca_block`, `HAS_CIN=0`, whose least significant cell is a half adder),
  an incrementation block (`inc_block`) and one skip gate (`skip_logic`).
* The worst path is stage 1's ripple, then Q−2 skip gates, then the last
  stage's incrementation chain (M_Q−1 AND gates and one XOR). Stage 1 and
  the last stage should therefore be small, and the middle ones large.

### Carry polarity along the skip chain

AOI and OAI gates both invert, so the skip chain alternates them and never
needs an inverter on the critical path:

| stage j | gate | carry in | carry out |
|---|---|---|---|
| 2, 4, 6, … | AOI21: `co = ~(g \| (p & ci))` | true | inverted |
| 3, 5, 7, … | OAI21: `co = ~(~g & (~p \| ci))` | inverted | true |

`skip_logic` takes `g` and `p` in true polarity in both forms. Inverting
them for the OAI gate happens off the critical path. An incrementation
block always needs a true carry. Stages that receive an inverted carry put
an inverter in front of their incrementation block only, not on the
chain. `ci_cska` re-inverts the final carry when Q is even. Anyone changing
the stage count only needs to keep the `j % 2` rule in `ci_cska` intact.
The testbenches check all polarities.

### Stage sizes

Stage sizes are given as a `cska_pkg::size_list_t`, an array of 16
entries. The first Q entries are the sizes from the least significant stage
up, and the rest are zero. `stage_offset()` gives each stage's LSB
position, and an elaboration-time assertion checks that the sizes add up to
N.

The default 32-bit CI-CSKA uses **2, 3, 4, 5, 6, 5, 4, 2, 1** (Q = 9).
The sizing rules behind this list are:

* sizes grow by about one bit per stage up to the largest (nucleus) stage,
  as long as each stage's ripple finishes before the skip chain reaches it;
* after the nucleus they shrink, so each incrementation block finishes no
  later than the skip carry arriving at the next stage;
* the last stage has one bit, so its ripple block is a single half adder.

The exact numbers are this design's choice. Other lists can be passed as
parameters. A fixed-stage-size adder is the same module with equal
entries. The optimum fixed size is about sqrt(N·(T_AOI+T_OAI) /
(2·(T_CARRY+T_AND))). If a skip gate costs half a ripple-plus-AND step,
that is sqrt(N/2) = 4 for 32 bits, and `tb_ci_cska` also checks that
8 × 4 configuration.

## Hybrid variable-latency adder

`hybrid_vl_cska` is the same stage chain. Stage `P_IDX` (the nucleus) is
replaced by `ppa_stage`, an M_p-bit parallel-prefix adder:

* a preprocessing level (`P_i = a^b`, `G_i = a&b`);
* a Kogge-Stone tree giving the group generate and propagate of bits i..0
  of the stage for every i, independent of the carry in;
* a last level that folds in the incoming carry for each sum bit and
  forms the stage carry `G[M-1:0] | (P[M-1:0] & ci)`.

The default is 32 bits in stages **3, 4, 5, 8, 5, 4, 2, 1** with the 8-bit
nucleus at stage 4 (bits 19..12). The nucleus takes and gives a true carry.
The AOI/OAI alternation starts again from stage P_IDX+1.

**Why the predictor is enough.** The nucleus splits the carry paths in two:

* SPL1 runs from the first input bit up the skip chain into the nucleus;
* SPL2 runs from the nucleus to the last sum bit of stage Q.

If any nucleus bit kills or generates, the carry leaving the nucleus does
not depend on the carry entering it, and the two paths never join. Only
when all M_p nucleus bits propagate can a carry from stage 1 reach stage Q.
`vl_predictor` computes exactly that condition, `&(a ^ b)` over the nucleus
bits, straight from the operands, and outputs it as `long_path`. The fast
prefix nucleus shortens both halves, which leaves more slack for the short
clock period. For random operands `long_path` is high for 1 in 2^M_p
additions.

### Clock stretching (`vl_ctrl`)

`vl_ctrl` wraps the hybrid datapath between an operand register and a
result register:

```
edge k     : operands accepted (in_valid && in_ready)
edge k+1   : long_path = 0 → sum/cout captured, out_valid = 1, stretched = 0
edge k+1   : long_path = 1 → capture skipped; in_ready was low, nothing accepted
edge k+2   :                  sum/cout captured, out_valid = 1, stretched = 1
```

* `in_ready` is high when the operand register is empty or is being emptied
  in the same cycle. Short additions therefore stream at one per clock.
* A flagged addition costs exactly one bubble.
* `out_valid` is a one-cycle pulse. Reset (`rst_n`) is synchronous and
  active low.
* Two assertions guard the timing: a waiting cycle is only spent on a
  flagged addition, and no addition waits more than one extra cycle.

In silicon the stretched period would come from the clock generator. Here
the clock stays periodic, and the stretch is a clock enable that skips one
capture edge of the result register. The handshake is this design's
choice.

## Modules

| file | role |
|---|---|
| `cska_pkg.sv` | stage-size list type, `stage_offset()`, default size lists |
| `full_adder.sv`, `half_adder.sv` | one-bit cells |
| `rca_block.sv` | M-bit ripple block: sum, carry, group propagate; optional zero carry-in |
| `inc_block.sv` | incrementation block (AND chain + XOR) |
| `skip_logic.sv` | AOI21/OAI21 skip gate, `OAI` selects the form |
| `cska_stage.sv` | one CI-CSKA stage j ≥ 2 (ripple + increment + skip) |
| `ci_cska.sv` | the CI-CSKA, parameters `N`, `Q`, `SIZES` |
| `ppa_stage.sv` | parallel-prefix nucleus stage |
| `vl_predictor.sv` | long-path predictor over a window of W bits |
| `hybrid_vl_cska.sv` | hybrid adder datapath, parameters `N`, `Q`, `P_IDX`, `SIZES` |
| `vl_ctrl.sv` | registered variable-latency adder with clock stretching |
| `cska_top.sv` | both adders side by side (`ci_*` and `vl_*` ports) |

Everything except `vl_ctrl` (and `cska_top` through it) is purely
combinational.

## Verification

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_rca_block`, `tb_inc_block`, `tb_skip_logic`, `tb_ppa_stage`,
  `tb_vl_predictor` are exhaustive over their inputs.
* `tb_ci_cska` and `tb_hybrid_vl_cska` check the 32-bit adders (and,
  for the CI-CSKA, the 8 × 4-bit fixed-size variant) with
  directed carry-chain cases and 20,000 random additions, half of them
  biased towards long propagate runs. They also check 8-bit instances
  exhaustively, including `long_path`.
* `tb_vl_ctrl` streams 2,000 additions with random gaps. A scoreboard
  checks each sum, the `stretched` flag and the latency (1 or 2 clocks).
* `tb_cska_top` runs the top at its default parameters. It counts stage
  skips, incrementation by one, stage-generated carries, one-clock and
  stretched additions and input stalls, and fails if any of them never
  happens.
* `tb_workload_8bit` sets the top to 8 bits (CI-CSKA stages 2,3,2,1;
  hybrid stages 2,4,1,1 with a 4-bit nucleus). It sends all 65,536 operand
  pairs through both adders. Every 16th pair is stretched, so the run takes
  65,536 + 4,096 cycles plus a few.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/cska_pkg.sv tb/tb_cska_top.sv --top-module tb_cska_top -Mdir obj -o sim
./obj/sim
```

All testbenches finish in well under a second.

## Where this RTL departs from, or goes beyond, the source description

* **Stage sizes.** Only the 8-bit nucleus of the hybrid adder and the
  32-bit width come from the source. The other sizes follow the sizing
  rules above but are this design's choice.
* **Alternating AOI/OAI polarity.** The source says the skip logic uses AOI
  and OAI compound gates and estimates its delay as their average.
  Alternating them stage by stage is the natural reading of that, but it is
  an interpretation.
* **Half adder in every zero-carry-in block.** The source puts a half adder
  in the one-bit last stage. Here every zero-carry-in ripple block uses one
  in its LSB, which computes the same function.
* **Prefix tree.** The source only specifies the preprocessing level of the
  nucleus. The Kogge-Stone tree and the sum/carry post-processing are
  choices made here.
* **Predictor placement.** The predictor window is the nucleus, where SPL1
  and SPL2 meet, and the predictor reads the operands directly.
* **Clock stretching** is a clock enable on the result register, and the
  valid/ready handshake is invented here.
* **Not included:** the conventional multiplexer-based CSKA, the
  ripple-carry adder and the other variable-latency adders (RCA, carry
  select) that the source only compares against. Also absent are the
  supply-voltage operating range and the area, power and delay numbers,
  which are properties of a cell library and process, not of RTL.
* The RTL describes the logic function and the gate-level organisation of
  each stage. A synthesis tool is free to restructure it, so the delay
  benefits depend on keeping the hierarchy (or the compound gates) intact
  in a gate-level flow.
