# Concatenation-incrementation carry skip adder (CI-CSKA) with a variable latency nucleus

A carry skip adder cuts the operands into stages. Each stage's carry either
comes from inside the stage or "skips" over it from the previous stage when
every bit of the stage propagates. A conventional skip adder has two slow
spots. The skip element is a 2:1 multiplexer. And a stage's ripple-carry
block cannot settle until the carry from the stage below has arrived. This
design removes both:

* **Concatenation.** The ripple-carry (RCA) block of every stage except the
  first gets a carry input of 0. All RCA blocks therefore settle at the same
  time, independent of each other.
* **Incrementation.** A chain of half adders then adds the real incoming
  carry to each stage's partial sum.
* **Compound-gate skip logic.** The stage carry is
  `CO_j = C_j | (P_j & CO_{j-1})`. `C_j` is the carry out of the zero-carry
  RCA block. `P_j` is the AND of the stage's `a[i]^b[i]`. This rule is one
  AOI21 or OAI21 gate instead of a multiplexer. Both gates invert, so the
  stages alternate between AOI and OAI, and the carry between stages
  alternates polarity. That way the chain needs no inverters.

The **hybrid variable latency** form replaces the largest (middle) stage, the
*nucleus*, with a Brent-Kung parallel prefix adder. Paths through the middle
get shorter. Only additions that propagate across a long run of stages still
need the full adder delay. A small **predictor** detects those operand pairs,
and a controller gives them a second clock cycle. Every other addition
finishes in one short cycle. In silicon, the slack this creates can be used
to lower the supply voltage. That is the purpose of the scheme, but it is
outside the scope of this RTL.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | operand width |
| `Q` | 8 | number of stages |
| `SIZES` | 2,3,4,5,8,5,3,2 | stage sizes, stage 1 (LSB) first: variable stage size (VSS) |
| `NUCLEUS` | 5 in the top, 0 in `ci_cska` | 1-based stage replaced by the Brent-Kung adder; 0 = none |
| `SLP1_LO..SLP1_HI` | stages 2..5 (bits 2..21) | long path 1 watched by the predictor |
| `SLP2_LO..SLP2_HI` | stages 5..7 (bits 14..29) | long path 2 watched by the predictor |

The structure is defined for any width, stage count and size list. All the
numbers above are this implementation's own choices. The sizes grow towards
the middle and shrink again, and the largest stage sits in the middle, where
the nucleus goes. `cska_pkg` also defines `FSS_SIZES` (eight 4-bit stages)
for the fixed stage size form. `SIZES` must add up to `N`; an elaboration
assertion in `ci_cska` checks this.

## Carry polarity along the chain

Stages are numbered from 1 at the least significant end. In the arrays of the
RTL they are numbered from 0.

| stage | contents | carry in | carry out |
|---|---|---|---|
| 1 | plain RCA fed by `cin` | `cin` | true |
| even j | zero-carry RCA + incrementer + **AOI** | true | **inverted** |
| odd j >= 3 | zero-carry RCA + incrementer + **OAI** | inverted | true |
| nucleus p | Brent-Kung adder | converted to true | converted to the polarity stage p would give |

* The AOI form is `~(C | (P & CI))`.
* The OAI form is `~(~C & (~P | ~CI))`. Its inputs are the complements of
  C, P and CI.
* In `cska_stage`, the inverted `C_j` and `P_j` for an OAI stage are made
  with inverters on the RCA outputs. A transistor-level design would take
  them from a block that produces them in complement form.
* The incrementer always receives the carry in true polarity.
* With an even `Q` the last stage is an AOI stage, so `ci_cska` inverts the
  final carry once to drive `cout`.

Stage 1 has no incrementer or skip gate. Its RCA block uses the adder's real
carry input, and its carry leaves in true polarity.

## Critical path

The RCA blocks of all stages settle in parallel. After that the carry crosses
one compound gate per stage. The last stage's incrementer then turns it into
sum bits. The incrementer's own carry out is never used, which keeps it off
the carry path.

## The Brent-Kung nucleus (`cska_bk_ppa`)

The carry input is folded into the prefix tree as an extra position 0, with
generate = `cin` and propagate = 0. Operand bit `i` sits at position `i+1`,
and the tree is padded up to a power of two.

* An **up-sweep** combines spans of 2, 4, 8, ... positions. The carry out
  of the whole block is therefore ready after log2 levels, on forward paths.
* A **down-sweep** fills in the intermediate carries on backward paths.

Each sum bit is `a[i]^b[i]^G[0..i]`. In the default 8-bit nucleus, the
9 positions are padded to 16. How the nucleus is "modified" is not spelled
out beyond its use as a stage. Folding the carry input into the tree is this
design's reading.

## Predictor and clock stretching (`cska_predictor`, `cska_vl_top`)

A carry can only travel through a run of skip gates if every stage in the
run propagates. The predictor ANDs `a^b` over the bits of each long path:

* **SLP1** covers stages 2 to the nucleus.
* **SLP2** covers the nucleus to stage Q-1.

`err = SLP1 | SLP2`. The two paths share the nucleus, whose input bits feed
both. The predictor is conservative: it can ask for a second cycle when the
carry actually stops early, but it never misses a sensitized long path.
The test for a long path and its exact ranges are this design's reading. The
ranges are top-level parameters.

Controller protocol (`cska_vl_top`):

* The pair `a, b, cin` is taken into the operand registers when
  `in_valid & in_ready`.
* **Short operation** (predictor quiet in the next cycle): the result is
  registered at the end of that cycle, so the latency is 1.
* **Long operation** (predictor fires): the operands are held for one more
  cycle and the result is registered at the end of the second cycle, so the
  latency is 2. `in_ready` is low during the first of the two cycles.
* `out_valid` pulses for one cycle with `sum`, `cout` and `out_long`.
  `out_long` is 1 if the operation took two cycles.
* A new pair can be taken in the same cycle a result is registered. With no
  long paths, the throughput is therefore one addition per clock.
* Reset is synchronous and active low (`rst_n`).

The handshake, the registers and the reset are this design's own choices.
The source design describes only the one-or-two-cycle behaviour.

Note that in zero-delay simulation the sum is already correct after one
cycle. The second cycle matters only for timing, at a clock period set
between the delay of the long paths and the delay of everything else.

## Files

| file | contents |
|---|---|
| `rtl/cska_pkg.sv` | widths, stage sizes (VSS and FSS), nucleus and SLP ranges |
| `rtl/cska_fa.sv`, `rtl/cska_ha.sv` | full and half adder cells |
| `rtl/cska_rca.sv` | RCA block with group propagate |
| `rtl/cska_inc.sv` | incrementation block (half-adder chain, no carry out) |
| `rtl/cska_skip.sv` | AOI / OAI skip gate (`OAI` parameter) |
| `rtl/cska_stage.sv` | one CI-CSKA stage |
| `rtl/cska_bk_ppa.sv` | Brent-Kung nucleus adder |
| `rtl/ci_cska.sv` | the N-bit adder; `NUCLEUS` selects the hybrid form |
| `rtl/cska_predictor.sv` | SLP1/SLP2 predictor |
| `rtl/cska_vl_top.sv` | top: hybrid adder + predictor + one/two-cycle controller |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the design against integer arithmetic, or against a
hand-written reference for the gate and the predictor. Each ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_cska_rca`, `tb_cska_inc`, `tb_cska_skip` and `tb_cska_stage` are
  exhaustive. The stage is tested at 5 bits in both its AOI and OAI forms.
* `tb_cska_bk_ppa` is exhaustive at 8 bits, and at 5 and 7 bits to cover
  the padded tree.
* `tb_ci_cska` runs 20,000 vectors each through the VSS, FSS and hybrid
  adders. Many of the vectors are near-all-propagate, to drive long skip
  chains.
* `tb_cska_predictor` writes the path bit ranges out by hand.
* `tb_cska_vl_top` runs 4,000 operations through the full-size top. It
  checks value, order, latency (1 or 2 cycles) and `out_long`. It also
  counts short operations, long operations through SLP1 only, SLP2 only and
  both, input stalls, back-to-back accepts and carry outs, and fails if any
  of these never happened.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/cska_pkg.sv tb/tb_cska_vl_top.sv --top-module tb_cska_vl_top -o sim
./obj_dir/sim
```

## What is not modelled, and how far to trust it

* The design is logically correct at all tested sizes. Its speed, power and
  energy advantages are circuit-level properties: gate choice, transistor
  sizing, supply voltage. An RTL simulation cannot show them, and a
  synthesis tool is free to restructure the AOI/OAI chain unless those
  cells are preserved.
* Supply voltage scaling, the reason for the variable latency, is not part
  of the RTL.
* Widths, stage sizes, nucleus position, the predictor's exact ranges, the
  controller handshake and the reset are choices made here. They are listed
  above and can all be changed through parameters.
* Exactly one stage, the nucleus, can be replaced by the prefix adder.
  Replacing several middle stages would take a change to `ci_cska`.
* The conventional multiplexer-based carry skip adder serves only as a
  point of comparison and is not included.
