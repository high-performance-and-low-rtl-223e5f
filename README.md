# Concatenation-incrementation carry skip adder

A carry skip adder (CSKA) splits an N-bit addition into stages. Each stage has a short
ripple carry adder (RCA). When every bit of a stage propagates (a_i ^ b_i = 1 throughout), the
stage's carry out equals its carry in, and a skip gate passes the carry on without waiting for
the ripple. In the classic form a stage still needs the carry from below before its own RCA can
start. The skip multiplexers also sit in series on the critical path.

This design restructures each stage so that the slow parts start at once:

* **Concatenation.** Every stage except the first adds its operand slices with carry in 0.
  All stages therefore compute at the same time. Each produces an intermediate sum **Z**, its
  generate **Cj** (the RCA carry out) and its propagate product **Pj** (AND of the bit propagates).
* **Skip chain.** The only carry that crosses stages is `Co,j = Cj | (Pj & Co,j-1)`. It is
  built from one compound gate per stage: an AND-OR-Invert (AOI21) or an OR-AND-Invert (OAI21)
  gate, used alternately. No multiplexer and no inverter sit in the chain.
* **Incrementation.** Each stage adds the incoming carry `Co,j-1` (0 or 1) to its Z with a
  chain of half adders. That happens in parallel with the skip chain moving up to later stages.

Stages of equal size give the fixed stage size (FSS) form. Stages of differing sizes give the
variable stage size (VSS) form, which is faster and uses less energy. This design's VSS lists grow
towards the middle and shrink again. The default adder is
a 32-bit VSS adder.

A second, clocked variant adds variable latency. It is called the hybrid adder. Its middle
("nucleus") stage is a Han-Carlson parallel prefix adder instead of an RCA. A predictor spots the
rare operand pairs whose carry must skip all the way through the upper stages. Those operations
get two clock periods; every other operation gets one. The clock period can then be set by the
common paths rather than the worst one. That slack is what lets the supply voltage be lowered.

All of the RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The testbenches are
self-checking.

## One stage, bit by bit

Stage j covers bits `K+1 .. K+M` (M = `SIZES[j-1]`):

```
 a[K+M:K+1], b[K+M:K+1]
        |
   M-bit RCA, carry in 0 ----> Z (M bits)  ------------------+
        |        |                                           |
        Cj       Pj = AND(a_i ^ b_i)                          v
        |        |                              incrementation block (half adders)
        v        v                                           ^        |
   skip gate:  Co,j = Cj | Pj & Co,j-1  <---- Co,j-1 --------+        v
        |                                                         s[K+M:K+1]
        v
     Co,j  (to stage j+1)
```

The stage-j incrementation block computes `s = Z + Co,j-1` modulo 2^M. Bit i uses
`z_i ^ k_i`, where `k_0 = Co,j-1` and `k_{i+1} = z_i & k_i`. The top bit needs only the XOR. The
carry out of the block would always equal `Cj | Pj & Co,j-1`, so the block does not produce it;
the skip gate provides it instead.

Stage 1 has no skip gate. It is a plain RCA fed by the adder's carry in `ci`, and its ripple
carry out is `Co,1`.

## The skip chain and its alternating polarity

An AOI21 gate takes true-polarity inputs and produces an inverted output:
`y = ~(C | P & Cprev) = ~Co,j`. An OAI21 gate fed with inverted inputs produces a true output:
`y = ~(~C & (~P | ~Cprev)) = Co,j`. Chaining them alternately, AOI after a true carry and OAI
after an inverted one, keeps the carry correct without an inverter in the chain. The stage's own
`Cj` and `Pj` are inverted locally for an OAI stage. Those inverters are off the chain, since
Cj and Pj are ready early.

Each stage therefore carries the incoming carry in two forms:

* `cprev_g`: the polarity the skip gate wants. It is the previous gate's raw output.
* `cprev_t`: true polarity, for the incrementation block. After an AOI stage it comes through an
  inverter hanging off the chain.

`cska_pkg::stage_out_inv(k, nucleus)` works out the polarity for every stage at elaboration time.
Stage 1 and a nucleus stage always produce a true carry. Every other stage flips the polarity it
receives, so it uses OAI when its input is inverted and AOI otherwise.

| stage (default 32-bit VSS)    | 1   | 2   | 3   | 4   | 5   | 6   | 7     |
|-------------------------------|-----|-----|-----|-----|-----|-----|-------|
| size                          | 2   | 3   | 4   | 5   | 6   | 7   | 5     |
| skip gate                     | —   | AOI | OAI | AOI | OAI | AOI | OAI   |
| carry leaving toward stage j+1 | true | inv | true | inv | true | inv | true = `co` |

When the last stage is an AOI stage (an even stage count, for example the 8 x 4 FSS adder), the
adder's `co` is taken from the inverted copy.

**Critical path.** The worst case for the adder starts in stage 1. The carry ripples through
stage 1's RCA, crosses one skip gate per stage, and ends in the last stage's incrementation
block. A VSS list keeps the early stages short, because their carry is needed first. It also
keeps the last stages short, because their incrementation block ends the path.

## Stage sizes

The stage sizes are a parameter list, so any FSS or VSS configuration is one instantiation:

```systemverilog
ci_cska #(.Q(8), .SIZES('{4,4,4,4,4,4,4,4}), .N(32)) fss32 (...);
ci_cska #(.Q(11), .SIZES('{2,3,4,5,6,7,8,9,8,7,5}), .N(64)) vss64 (...);
```

`SIZES[0]` is stage 1, the least significant stage. The sizes must add up to `N`; elaboration
stops with an error otherwise. The defaults, in `cska_pkg`, are:

| configuration        | stage sizes (stage 1 first)        |
|----------------------|------------------------------------|
| 32-bit VSS (default) | 2, 3, 4, 5, 6, 7, 5                |
| 32-bit FSS           | 4 x 8                              |
| 32-bit hybrid        | 2, 3, 4, **8**, 6, 5, 4 (stage 4 is the nucleus) |

These lists are this design's own choice. The published design evaluates 16-, 32- and 64-bit
adders but does not state its stage sizes. Anyone targeting a real cell library should re-tune
them against the actual ratio of skip-gate delay to full-adder carry delay.

## The hybrid variable latency adder

`hybrid_cska` is a `ci_cska` with `NUCLEUS` set. Stage `NUCLEUS` becomes `hc_ppa`, a parallel
prefix adder that takes the carry from the stage below:

* **Preprocessing:** `g_i = a_i & b_i`, `p_i = a_i ^ b_i`. The incoming carry is placed below bit
  0 as an extra generate position, so the prefix results are directly the carries into each bit.
* **Han-Carlson network.** First, one level combines each odd position with its even neighbour.
  Next, Kogge-Stone levels with spans 2, 4, 8, … run on the odd positions only. Last, one level
  gives every even position the prefix of the odd position just below it. Every cell computes
  `(G, P) = (Gh | Ph & Gl, Ph & Pl)`.
* **Sum:** `s_i = p_i ^ carry_i`. The carry out of the stage feeds the next stage's skip gate in
  true polarity, so the AOI/OAI alternation starts again above the nucleus.

**Predictor.** The carry out of the nucleus is fast. The paths that remain long are those where
a carry has to skip from the nucleus through every upper stage into the last stage's
incrementation block. `pred` is the AND of the propagate products of stages `NUCLEUS+1 .. Q-1`.
In the default configuration that means bits 17..27 all propagate. For random operands this
happens with probability 2^-11.

**`vl_adder` timing.** The unit registers the operands and gives the hybrid adder one cycle. If
`pred` is set, it gives the adder a second cycle. The sum is always the exact sum; the predictor
only decides how long the unit waits for it.

```
cycle             t      t+1     t+2          t+3          t+4
accepted          A      B       -            (next op)
adder works on    -      A       B (pred=1)   B (S_EXTRA)
in_ready          1      1       0            1
out_valid         -      -       A            -            B, out_long=1
```

* An operation accepted in cycle t shows `out_valid` in cycle t+2. With the predictor set, it
  shows in cycle t+3 and `out_long` is 1.
* `in_ready` is 0 only in the first cycle of a predicted-long operation. A new operation can be
  accepted in the last cycle of the previous one, so short operations complete one per cycle.
* `out_valid` is a one-cycle pulse. There is no output back-pressure.
* `rst_n` is a synchronous, active-low reset that empties the unit.
* Two assertions check the handshake rules: a predicted-long operation blocks the input, and
  it always gets its extra cycle.

In RTL simulation both latencies give the same, correct sum. The second cycle only matters
once the clock period is shorter than the long paths. That period has to be constrained in
synthesis and static timing analysis as a two-cycle path, conditional on `pred`. Those
constraints are not part of this RTL.

## Module map

```
cska_top
├── ci_cska                 32-bit VSS CI-CSKA (combinational)
│   ├── rca_block           stage 1 (-> full_adder chain)
│   └── ci_cska_stage x6    stages 2..7
│       ├── rca_block       carry in 0: Z, Cj, Pj
│       ├── skip_logic      AOI21 or OAI21
│       └── incrementation_block
└── vl_adder                clocked variable latency unit
    └── hybrid_cska         CI-CSKA with nucleus + predictor
        └── ci_cska (NUCLEUS=4)
            ├── rca_block, ci_cska_stage ...
            └── hc_ppa      Han-Carlson prefix adder (nucleus)
```

`cska_pkg` holds the width, the default stage-size lists and `stage_out_inv`. `cska_top` places
the combinational adder (`a, b, ci -> s, co, stage_p`) and the variable latency unit (`vl_*`,
`clk`, `rst_n`) side by side. They share no signals.

| module | parameters (default) | ports |
|---|---|---|
| `ci_cska` | `Q`=7, `SIZES`='{2,3,4,5,6,7,5}, `N`=32, `NUCLEUS`=0 | `a, b, ci -> s, co, stage_p[Q]` |
| `hybrid_cska` | `Q`=7, `SIZES`='{2,3,4,8,6,5,4}, `N`=32, `NUCLEUS`=4 | `a, b, ci -> s, co, pred` |
| `vl_adder` | as `hybrid_cska` | `clk, rst_n, in_valid/in_ready, a, b, ci -> out_valid, s, co, out_long` |
| `ci_cska_stage` | `M`, `USE_OAI` | `a, b, cprev_t, cprev_g -> s, cout_g, cout_t, p_all` |
| `hc_ppa` | `M`=8 | `a, b, ci -> s, co, p_all` |
| `rca_block` | `M` | `a, b, ci -> s, co, p_all` |
| `incrementation_block` | `M` | `z, c -> s` |
| `skip_logic` | `USE_OAI` | `c_in, p_in, cprev_in -> y` |
| `full_adder` | — | `a, b, ci -> s, co, p` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Each has a
watchdog that counts a failure if the run hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/cska_pkg.sv tb/tb_cska_top.sv --top-module tb_cska_top
./obj_dir/Vtb_cska_top
```

Replace `tb_cska_top` with any testbench below. Each one runs in well under a second.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_rca_block` | 4-bit exhaustive, 7-bit random; sum, carry, propagate product |
| `tb_skip_logic` | AOI and OAI, exhaustive, including output polarity |
| `tb_incrementation_block` | 5-bit and 1-bit, exhaustive |
| `tb_ci_cska_stage` | 4-bit AOI and OAI stages, exhaustive; both carry polarities |
| `tb_hc_ppa` | 4- and 5-bit exhaustive, 8- and 13-bit random |
| `tb_ci_cska` | 32-bit VSS (default), 32-bit FSS, 16-bit VSS, 64-bit VSS against integer addition; counts carries skipped across every stage |
| `tb_hybrid_cska` | 32-, 16- and 24-bit hybrids (nucleus in the middle and at stage 1); sum and predictor |
| `tb_vl_adder` | stream with random gaps; scoreboard checks sum, `out_long` and 2-/3-cycle latency, stalls, back-to-back completions |
| `tb_cska_top` | the whole design at its default parameters. The combinational adder gets a new operand pair each cycle while the variable latency unit processes a stream. Every mechanism must occur: carry skipped across each stage, carry out, short and long operations, stalls, back-to-back completions. |

The stimuli force random groups of bits to propagate (`b = ~a` on a mask). Purely random
operands would almost never exercise long skips or the predictor.

## What is given and what is chosen

These parts follow the published design:

* the concatenation / skip / incrementation stage structure;
* AOI and OAI compound skip gates used alternately;
* the half-adder incrementation chain;
* FSS and VSS forms;
* a nucleus stage built as a parallel prefix adder with a Han-Carlson topology;
* the variable latency idea.

These are this design's own choices:

* all stage sizes, and the nucleus position and size;
* the inverted `Pj` input of the OAI gates;
* feeding the prefix adder's carry in as a prefix position;
* the predictor's exact condition;
* the whole clocked wrapper: handshake, latencies, reset;
* the `stage_p` observability port.

The published design describes its prefix adder as *speculative*. Here the datapath is always
exact, and the predictor only selects one or two cycles. From the outside the behaviour is the
same as speculating and then correcting.

Not included:

* The conventional multiplexer-based CSKA and the other adders it is compared against (ripple
  carry, carry increment, square-root carry select, Kogge-Stone).
* Anything electrical: supply-voltage scaling, transistor-level AOI/OAI sizing, and the delay,
  power and energy figures, which depend on a 45 nm process and circuit simulation.

An RTL simulation checks only the logic function and the cycle behaviour.
