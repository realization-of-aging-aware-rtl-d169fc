# Aging-aware variable-latency multiplier

Transistor aging slowly lengthens the critical path of a multiplier. A fixed
clock must leave margin for that aging, for the slowest input pattern, or for
both. Most operand pairs never need that margin.

This design does not use a fixed latency. It gives each operation either one
clock cycle or two, depending on the operands, and catches at run time any
result that still arrives late. When late results become frequent, it decides
that the circuit has aged and gives fewer operations the one-cycle slot.

The datapath is a 32 x 32 unsigned Vedic (Urdhva Tiryakbhyam) multiplier with
a 64-bit product. Three things surround it:

- **Input flip-flops** for the multiplicand and the multiplier. They have a
  load enable, which stands in for clock gating.
- **Adaptive hold logic (AHL).** It decides, per operation, whether the input
  flip-flops must hold their operands for an extra cycle.
- **A Razor register.** It is 64 one-bit Razor flip-flops. Each has a shadow
  copy clocked slightly later, which detects and repairs a product bit that
  missed the clock edge.

## Operation timing

Edges are rising `clk` edges. Operands are taken at an edge where `ready` is 1
and `load` is 1.

| case | product captured | `done` visible in the cycle after |
|---|---|---|
| one-cycle pattern, on time | 1 edge after it is taken | that edge |
| two-cycle pattern | 2 edges after | that edge |
| previous result was late (restored) | 2 edges after | that edge |
| this result was late | captured wrong, restored 1 edge later | the restore edge |

The next operation is taken at the edge where the current one is captured.
With a steady stream, the multiplier therefore never idles. `ready` is the
AHL's `!gating` signal. It is 0 in every cycle whose following edge must not
load new operands.

## Adaptive hold logic

The AHL (`ahl.sv`) has these parts:

- **Two judging blocks** (`judging_block.sv`). Each counts the zero bits of
  the multiplicand held in the input flip-flops. Block 1 answers "one cycle"
  when there are more than `THRESH` zeros. Block 2 answers it when there are
  more than `THRESH + 1`, which is stricter. A multiplicand with many zeros
  makes few partial products that matter, so it is expected to settle quickly.
  `THRESH` defaults to 16, half the width.
- **The aging indicator** (`aging_indicator.sv`). It counts checked
  operations and the Razor errors among them. Both counts clear after every
  `WINDOW` operations (default 1024). If errors in one window exceed `ERR_TH`
  (default 32), the output `aged` goes to 1 and stays there until reset, since
  aging does not undo itself.
- **The multiplexer.** It takes block 1 while `aged` is 0 and block 2 once it
  is 1.
- **The OR gate and D flip-flop.** The logic is
  `!gating = (mux & !err) | !Q`, and the D flip-flop stores `!gating` as Q.
  A 0 on `!gating` therefore lasts exactly one cycle: the held cycle forces
  `!Q = 1`, which loads the next operands. A Razor error causes the same
  single-cycle hold.

Aging changes the outcome only for a multiplicand with exactly `THRESH + 1`
zeros. Such an operation takes one cycle while the circuit is fresh and two
once it has aged.

## Razor register and error recovery

This part needs the most care.

**Detection.** Each `razor_ff` has a main flip-flop on `clk` and a shadow
flip-flop on `clk_del`. `clk_del` is a copy of `clk` delayed by less than a
period (3 ns of 10 ns in the testbench). A product bit that arrives after the
`clk` edge but before the `clk_del` edge lands only in the shadow, and the XOR
of main and shadow flags it. `razor_reg.sv` ORs the 64 flags into one error.

**When the error counts.** The main and shadow copies also disagree in two
legal situations:

- after the first edge of a two-cycle operation, when the product is not
  meant to be ready yet;
- in the cycle after a restore.

So the top (`aging_aware_mult.sv`) accepts the error only in a cycle that
follows an edge that completed a valid operation. That is the AHL's Q,
ANDed with a valid bit that travels with the operands. The qualified error is
the `razor_err` output.

**Recovery.** A qualified error does three things:

1. It drives `restore`, so every main flip-flop reloads its shadow value at
   the next edge. The correct product then appears one cycle late, with
   `done`.
2. It holds the input flip-flops for one cycle. The operation taken at the
   failing edge therefore gets two cycles and does not collide with the
   restore.
3. It counts as an error in the aging indicator.

**Hold condition.** Razor only works if the new operands, launched at a `clk`
edge, do not reach the shadow flip-flops before the `clk_del` edge. A real
datapath meets this through its minimum delay. RTL simulation has no delay,
so a plain zero-delay simulation with a delayed `clk_del` would make the
shadows catch the next operation's product. There are two ways to simulate
correctly:

- Model the datapath delay in the testbench. `tb_aging_aware_mult.sv` drives
  the Razor register's input with the multiplier output delayed by 4 ns.
- Tie `clk_del` to `clk`. The shadows then always agree with the main
  flip-flops. The design behaves as a plain one-or-two-cycle multiplier with
  no error detection.

## Vedic multiplier

`vedic_mult.sv` splits both operands into 2-bit digits and multiplies every
digit pair with `vedic_2x2` (AND gates and two half adders). Each further
level doubles the block width. A W-bit product is built from four W/2-bit
products of the level below:

    p = aL*bL + ((aH*bL + aL*bH) << W/2) + (aH*bH << W)

The crosswise sum keeps its carry bit. After log2(N/2) levels the single
remaining block is the product. `N` must be a power of two, at least 2. The
multiplier is purely combinational.

## Top-level interface (`aging_aware_mult`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `clk_del` | in | 1 | delayed clock for the Razor shadows; its rising edge falls between two `clk` rising edges |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `load` | in | 1 | `a`, `b` carry an operation |
| `ready` | out | 1 | the operands are taken at the next edge (AHL `!gating`) |
| `a`, `b` | in | N | multiplicand, multiplier (unsigned) |
| `result` | out | 2N | product |
| `done` | out | 1 | `result` holds the correct product of the next operation in order |
| `razor_err` | out | 1 | a late product was detected this cycle |
| `aged` | out | 1 | aging indicator |

Keep `a`, `b` and `load` stable until an edge with `ready = 1`. Products come
out in the order the operations were taken, one `done` per operation.

| parameter | default | origin |
|---|---|---|
| `N` | 32 | operand width of the described design |
| `THRESH` | 16 | own choice (zero-count threshold, block 2 uses +1) |
| `WINDOW` | 1024 | own choice (operations per aging window) |
| `ERR_TH` | 32 | own choice (errors per window that mean "aged") |

The shared defaults are in `aam_pkg.sv`.

## What follows the described design and what is chosen here

The following come from the described design:

- the Vedic datapath;
- the 2n one-bit Razor flip-flops, each with a main flip-flop, a delayed-clock
  shadow, an XOR and a restore multiplexer;
- the AHL's structure: two judging blocks with thresholds n and n+1, a
  multiplexer steered by the aging indicator, and an OR gate with Q' feeding
  a D flip-flop;
- a windowed error counter as the aging indicator;
- two cycles for an operation after a Razor error.

These are choices made here:

- the thresholds and window length;
- judging the multiplicand rather than the multiplier;
- a sticky `aged` output;
- the shadow element as an edge-triggered flip-flop rather than a latch;
- a load enable in place of a gated clock;
- error qualification;
- the `load`/`ready`/`done` handshake;
- the active-low asynchronous reset.

The zero-count rule comes from multipliers that skip adder work on zero
operand bits. The Vedic multiplier's delay does not depend on zeros in the
same way, so here the rule is a heuristic. Correctness never depends on it,
because the Razor register catches any product that is late. A column- or
row-bypassing array multiplier is not included; this design uses the Vedic
multiplier in its place. Signed multiplication is not supported.

## Files

- `rtl/aam_pkg.sv`: shared defaults.
- `rtl/vedic_2x2.sv`, `rtl/vedic_mult.sv`: the datapath.
- `rtl/razor_ff.sv`, `rtl/razor_reg.sv`: Razor cell and 2N-bit register.
- `rtl/judging_block.sv`, `rtl/aging_indicator.sv`, `rtl/ahl.sv`: adaptive
  hold logic.
- `rtl/aging_aware_mult.sv`: top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/aam_pkg.sv \
        tb/tb_aging_aware_mult.sv --top-module tb_aging_aware_mult
    ./obj_dir/Vtb_aging_aware_mult

Swap in any other `tb_*` file and module name to run that testbench.

## What the tests cover

- **`tb_aging_aware_mult`** runs at the default parameters and takes
  3000 operations. The first is 0x10101010 x 0x10101010, whose product is
  0x0102030403020100. The rest are random operands of mixed density, with
  occasional idle slots. After 400 operations, 10 % of the completing results
  are made late. The aging indicator trips after about 690 operations.
  The testbench checks:
  - every product, in order;
  - every operation's latency against the table above;
  - `razor_err` exactly at the injected late results;
  - no error for a mismatch at the first edge of a two-cycle operation;
  - `aged` against a model of the window.

  Each of these mechanisms must occur at least once: one-cycle, two-cycle,
  hold after an error, late result, ignored mismatch, idle slot, stricter
  judging after aging, and aging.
- **`tb_vedic_mult`** checks 32 x 32 (corner and random operands), 64 x 64
  (random operands) and 4 x 4 (exhaustive).
- **`tb_razor_ff` and `tb_razor_reg`** create late bits around the clock
  edges. They check detection and restore, including a restore while `d`
  already shows other data.
- **`tb_judging_block`, `tb_aging_indicator` and `tb_ahl`** check the
  thresholds, the window, and the hold sequence against models in the
  testbench.

## Not covered

- The timing figures of an FPGA implementation (about 150 MHz for the 32-bit
  and 64-bit versions) cannot be reproduced by RTL simulation and were not
  checked.
- No gate-level or timing-annotated simulation was done. Whether the
  zero-count rule predicts the real Vedic critical path is untested.
