# Carry skip adder with a Kogge-Stone nucleus stage

A 32-bit combinational adder that combines three ideas to shorten the
carry path of a classic carry skip adder:

1. **Concatenation and incrementation.** Each stage adds its operand
   bits with a carry input of 0, without waiting for the carry from
   below. When that carry arrives later, an incrementer adds it. Ripple
   time inside a stage then overlaps the carry travelling along the skip
   chain.
2. **Inverting compound gates as skip logic.** Each stage passes the carry
   on with one AND-OR-INVERT (AOI) or OR-AND-INVERT (OAI) gate, not a
   2:1 multiplexer. Every gate inverts, so the carry changes polarity at
   each stage, and AOI and OAI gates take turns along the chain.
3. **A parallel prefix nucleus.** One middle stage uses a Kogge-Stone
   prefix adder in place of a ripple carry block. It works out its group
   generate and propagate in log2(M) cell levels, where M is the stage
   width, and takes the incoming carry straight into its prefix network.

The arithmetic result is `{cout, s} = a + b + cin`, as from any adder.
The design differs only in the path the carries take.

## Stage layout

With the default parameters (`WIDTH = 32`, `STAGE = 4`, `NUCLEUS = 3`),
the adder has eight 4-bit stages. Stage 1 holds the least significant
bits.

| stage | bits   | contents                                      | skip gate | carry out    |
|-------|--------|-----------------------------------------------|-----------|--------------|
| 1     | 3:0    | ripple carry block, carry in = `cin`          | none      | true         |
| 2     | 7:4    | ripple block + skip + incrementer             | AOI       | complemented |
| 3     | 11:8   | **nucleus**: 4-bit Kogge-Stone + skip         | OAI       | true         |
| 4     | 15:12  | ripple block + skip + incrementer             | AOI       | complemented |
| 5     | 19:16  | ripple block + skip + incrementer             | OAI       | true         |
| 6     | 23:20  | ripple block + skip + incrementer             | AOI       | complemented |
| 7     | 27:24  | ripple block + skip + incrementer             | OAI       | true         |
| 8     | 31:28  | ripple block + skip + incrementer             | AOI       | complemented |

The last stage here delivers a complemented carry, so one inverter
produces `cout`. When the number of stages is odd, the chain ends on an
OAI gate and no inverter is needed.

## The skip chain and its polarity

This part takes the most care. Every stage `k ≥ 2` computes the usual
skip equation on true values:

    carry_out(k) = G(k) | (P(k) & carry_in(k))

* `G(k)` is the carry the stage generates by itself. In an ordinary stage
  this is the carry out of its ripple block, whose carry input is 0.
* `P(k)` is 1 when the stage passes an incoming carry through.

The gate (`skip_logic.sv`) comes in two forms:

* **AOI** (`OAI = 0`): the inputs `g`, `p`, `ci` are true, and the output
  is `co = ~(g | p & ci)`, the complemented carry.
* **OAI** (`OAI = 1`): the inputs are complemented, and the output is
  `co = ~(~g & (~p | ~ci))`. By De Morgan this is the true carry.

An AOI stage therefore hands a complemented carry to the next stage, and
that stage must be an OAI stage. The top level works out each stage's
form from its index: a stage whose incoming carry is complemented (an even
stage index below it) is an OAI stage. Each stage inverts its own `G`
and `P` to match its form.

The incrementer needs the *true* incoming carry. An OAI stage inverts its
incoming carry before adding it.

### Why the all-ones test works

In an ordinary stage, `P(k)` is the AND of the intermediate sum `z`,
which the ripple block produces with a carry input of 0. It is not
formed from the per-bit propagate signals. The two give the same carry:

* When `z` is all ones, the block generated no carry, and adding 1 wraps
  the stage around. The incoming carry passes through.
* When the block did generate a carry, `G(k)` is 1 and `P(k)` does not
  matter.

The same signal `z` feeds both the skip gate and the incrementer.

## The nucleus stage

`nucleus_stage.sv` replaces the ripple block with
`kogge_stone_ppa.sv`:

* **Preprocessing:** `g = a & b` and `p = a ^ b` for each bit.
* **Prefix network:** there are WIDTH+1 positions. Position 0 is the
  carry input, as a generate-only entry (`p = 0`). Position `i+1` is
  operand bit `i`. Level `l` merges every position with the position
  `2^l` below it:
  * a **grey cell** (generate only) when the lower group already reaches
    the carry input, so the result is a final carry;
  * a **black cell** (generate and propagate) otherwise.

  Positions below `2^l` pass through unchanged.
* **Postprocessing:** `s[i] = p[i] ^ carry_into[i]`.

After `log2(WIDTH)` levels:

* Positions 0 to WIDTH−1 hold the carries into every bit.
* The top position holds the group generate and group propagate of all
  operand bits, `g_grp` and `p_grp`.

A full Kogge-Stone adder with a carry input would add one more grey cell,
merging that group with the carry input to form the carry out. Here the
stage's AOI/OAI skip gate does that merge. So the nucleus fits into the
skip chain like any other stage, but it produces its sum directly,
without an incrementer.

`WIDTH` of the prefix adder must be a power of two. An elaboration-time
assertion checks this.

## Latency paths and the predictor outputs

The longest carry path starts with a carry generated in stage 1. It
passes through every skip gate, including the nucleus, and ends in the
incrementer of the last stage. This path can only be taken when the
nucleus propagates (`p_grp = 1`). All other paths are shorter:

* from stage 1 into the nucleus's prefix network and postprocessing;
* from the nucleus's own generate to the upper stages.

A variable-latency version would use these facts to decide whether an
addition needs one clock cycle or two. This RTL contains no such predictor
and no registers. It brings out the nucleus group signals as `nucleus_g`
and `nucleus_p`, so that such a predictor can be attached.

## Files

| file | module | role |
|------|--------|------|
| `rtl/cska_pkg.sv` | package | default sizes, carry polarity type |
| `rtl/cska_ks_top.sv` | `cska_ks_top` | the complete adder |
| `rtl/cska_stage.sv` | `cska_stage` | ripple block + skip gate + incrementer |
| `rtl/nucleus_stage.sv` | `nucleus_stage` | Kogge-Stone adder + skip gate |
| `rtl/kogge_stone_ppa.sv` | `kogge_stone_ppa` | prefix adder, outputs sum and group G/P |
| `rtl/skip_logic.sv` | `skip_logic` | AOI or OAI skip gate |
| `rtl/incrementation_block.sv` | `incrementation_block` | `s = z + inc` |
| `rtl/rca.sv` | `rca` | ripple carry block |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | | full adder from two half adders |
| `rtl/black_cell.sv`, `rtl/grey_cell.sv` | | prefix cells |

Top-level ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry in |
| `s` | out | WIDTH | sum |
| `cout` | out | 1 | carry out |
| `nucleus_g`, `nucleus_p` | out | 1 | nucleus group generate / propagate |

Parameters of `cska_ks_top`:

* `WIDTH`: operand width.
* `STAGE`: width of every stage. It must divide `WIDTH`. It must be a
  power of two because of the nucleus.
* `NUCLEUS`: index of the nucleus stage, from 2 to `WIDTH/STAGE`.

All stages have the same width. A variable stage size (smaller stages at
the ends of the chain) is a known refinement of carry skip adders, but it
is not implemented here.

## Where this RTL follows the reference design and where it chooses

The following come from the reference design:

* the overall structure: stage 1 as a plain ripple block, then ordinary
  stages with zero-carry ripple blocks, AOI/OAI skip gates and
  incrementers;
* AOI first, then alternating;
* a Kogge-Stone nucleus whose group generate and propagate drive a skip
  gate, and whose sum comes straight from its postprocessing;
* the prefix cell equations, and the carry input entering the first row of
  the prefix network;
* the 32-bit width, the 4-bit stages and the 4-bit Kogge-Stone block,
  taken from the reference implementation's module names.

The following are this design's own choices:

* **Nucleus position.** The nucleus is stage 3. The prefix network sits
  between the second and third ripple blocks, but its stage number is
  never stated.
* **Fixed stage size.** The reference allows fixed or variable sizes and
  gives no variable sizes.
* **Skip-gate inputs.** The polarity convention at the ports of the skip
  gate, and how an OAI stage gets its complemented generate and propagate
  (by inverting them).
* **Incrementer and full adder.** The incrementer is a half-adder chain.
  The full adder is two half adders and an OR.
* **Final inverter.** An inverter on `cout` is added when the chain ends
  on an AOI gate.
* **No predictor or registers.** The design is purely combinational. The
  one-cycle/two-cycle predictor is not built.

A floating-point adder built around this adder is mentioned as an
application. It is not part of this RTL.

## Verification

Every testbench checks itself against integer arithmetic computed in the
testbench. Each ends with a `TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_rca` | 4-bit and 1-bit blocks exhaustively, 16-bit random |
| `tb_skip_logic` | both gate forms, all 8 input combinations |
| `tb_incrementation_block` | 4-bit exhaustive, 16-bit random with wrap-around |
| `tb_kogge_stone_ppa` | 4-bit and 8-bit exhaustive (sum, group G, group P); the worked 8-bit example `8'hAA + 8'h24 = 8'hCE`; 32-bit random |
| `tb_cska_stage` | AOI and OAI stages, exhaustive, with carry polarity |
| `tb_nucleus_stage` | AOI and OAI nucleus, exhaustive; 8-bit random |
| `tb_cska_ks_top` | default 32-bit adder, 300k vectors (see below) |
| `tb_cska_ks_configs` | 12-bit (odd stage count, nucleus at stage 2), 24-bit (nucleus last), 32-bit with 8-bit stages |

`tb_cska_ks_top` runs directed vectors, including the longest carry path
(`FFFFFFFF + 1`). It then runs random vectors in which a random set of
stages is forced to propagate. It counts how often each mechanism
occurred:

* a stage skipped an incoming carry;
* the nucleus skipped an incoming carry;
* the nucleus generated a carry;
* a ripple block generated a carry;
* an incrementer added 1;
* a carry from stage 1 travelled all the way to `cout`;
* `cin` or `cout` was 1.

The test fails if any of these never happened.

The tests check logic only. This is zero-delay RTL, so it says nothing
about the delay advantage the structure is meant to deliver. That
advantage depends on gate-level timing in a real library.

## Running

With Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/cska_pkg.sv \
        tb/tb_cska_ks_top.sv --top-module tb_cska_ks_top -Mdir obj
    ./obj/Vtb_cska_ks_top

Replace the testbench name to run any other testbench. Every run takes
under a second.
