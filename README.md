# Aging-aware variable-latency multiplier with adaptive hold logic

A multiplier that does not run every operation at its worst-case delay. A
bypassing array multiplier is fast when the operand that steers bypassing has
many zero bits, because whole rows or columns of adders are skipped. This
design clocks the multiplier faster than its worst case. It gives each
operation one clock cycle or two, depending on how many zero bits that
operand has. Two safety nets keep the results correct as the silicon slows
down with age (NBTI/PBTI threshold-voltage drift):

* **Razor flip-flops** catch the operations that were judged to need one
  cycle but were too slow. They repair the result from a shadow latch at the
  cost of one extra cycle.
* An **aging indicator** counts those Razor errors. When they become
  frequent it makes the judgement stricter, so that more patterns get two
  cycles and the errors stop.

A Hamming code around the Razor stage also corrects a single flipped bit of
the stored product.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable apart from the
testbenches. The default configuration is a 16 x 16 bit unsigned multiplier
with column bypassing.

## Datapath

```
            md ──►┌────────┐            ┌──────────────┐   ┌─────────┐ 38  ┌────────────┐ 38  ┌─────────┐
            mr ──►│operand │──md,mr────►│ column- (or  │32 │ Hamming │────►│ 38 Razor   │────►│ Hamming │──► product (32)
                  │regs    │            │ row-) bypass │──►│ encoder │     │ flip-flops │     │ decoder │
                  └───▲────┘            │ multiplier   │   └─────────┘     └─────┬──────┘     └─────────┘
                      │ load            └──────────────┘                         │ error (reexecute)
                      │                                                           │
               ┌──────┴───────────────────────────────────────────┐               │
               │ AHL: #0s>n / #0s>n+1 judges ─ mux ─ OR ─ negedge FF├──◄───────────┘
               │       aging indicator (error counter)             │
               └───────────────────────────────────────────────────┘
```

`load = gating & ~error` enables the operand registers and the Razor stage
together. In hardware terms this is the gated clock of those registers,
written here as a clock enable.

The AHL judges the operand in the operand registers. With **column
bypassing** (`BYPASS = BYPASS_COLUMN`, the default) that operand is the
multiplicand `md`. With **row bypassing** (`BYPASS_ROW`) it is the
multiplicator `mr`. Nothing else changes between the two forms.

## The adaptive hold logic: one cycle or two

`rtl/ahl.sv` holds two zero-count judges, `rtl/zero_judge.sv`. One answers
"more than n zeros?", the other "more than n+1 zeros?". While the aging
indicator is 0 the first answer is used; afterwards the second one is. The
selected answer is ORed with the inverted output of a flip-flop that
switches on the **falling** clock edge. Its output is `gating`:

| judged operand             | gating in cycle 1 | gating in cycle 2 | cycles given |
|----------------------------|-------------------|-------------------|--------------|
| more zeros than threshold  | 1                 | –                 | 1            |
| otherwise                  | 0                 | 1 (forced by the OR) | 2         |

Because `gating` changes half a cycle after the rising edge, it is stable at
every rising edge. The OR with the inverted state caps the hold at a single
cycle: a pattern is never held for three. An assertion in `ahl` checks
this.

With n = 7 and 16-bit operands, a multiplicand with 8 or more zeros gets one
cycle. After aging is detected it needs 9 or more.

## The Razor stage and how an error is repaired

This part needs the most care. `rtl/razor_ff.sv` is one bit, and
`rtl/razor_bank.sv` is the 38-bit word with the OR of the bit errors.

* The **main flip-flop** samples `d` on the rising edge of `clk`, if `en`.
* The **shadow latch** is transparent while `clk_del`, the delayed clock, is
  high. It is only opened in the cycle right after a capture.
* `error = captured & (q ^ shadow)`. It is meaningful once `clk_del` has
  fallen.
* On the next rising edge a bit in error reloads from its shadow latch
  instead of `d`. This is the mux in front of the main flip-flop.

For a 20 ns clock and a 2 ns `clk_del` offset, these constraints apply to
the path into the Razor stage. The operation completes at edge E:

| arrival of the new word | result                                              |
|-------------------------|-----------------------------------------------------|
| before E                | captured correctly, no error                        |
| E .. E+12 ns            | main flip-flop wrong, shadow right: `error`, repair at E+20 |
| after E+12 ns           | not detected (the clock period must prevent this)   |
| next word before E+12 ns| false error: the short-path (hold) constraint of Razor |

Cycle by cycle, when an operation X judged one-cycle turns out slow:

| edge | operand regs | Razor stage               | outputs in the following cycle |
|------|--------------|---------------------------|--------------------------------|
| E    | load Y       | capture X (stale bits)    | `reexecute` = 1, `in_ready` = 0, `product_valid` = 0 |
| E+1  | hold Y       | repair X from shadow      | `product_valid` = 1 (X)        |
| E+2  | load Z       | capture Y                 | ...                            |

Y has been in the operand registers for two cycles by the time it is
captured. So a Razor error costs one cycle, and nothing when Y was a
two-cycle pattern anyway. `error` comes from the shadow latches, so it is
only stable after `clk_del` falls. `in_ready` and `product_valid` depend on
it and must be sampled at the rising edge, not earlier in the cycle.

The synthesized design has 38 latch bits. They are the shadow latches, and
are intended. An assertion in `razor_bank` checks that the stage is never
enabled in a cycle with an error, which would overwrite the repair.

## Aging indicator

`rtl/aging_indicator.sv` counts completed operations and Razor errors.
Every `AGING_WINDOW` (128) operations both counters restart. When the error
count within a window exceeds `AGING_THRESHOLD` (8), `aged` goes to 1 and
stays at 1 until reset. Transistor aging does not recover, and an indicator
that fell back would make the multiplier toggle between the two thresholds.

## Hamming code around the Razor stage

`rtl/hamming_encoder.sv` and `rtl/hamming_decoder.sv` implement the classic
single-error-correcting Hamming code. The check bits sit at the code word
positions 1, 2, 4, 8, 16 and 32 (1-based). The data bits fill the other
positions in order. The check bit at 2^i gives even parity over every
position whose index has bit i set. For the 32-bit product this takes 6
check bits, so the Razor stage is 38 bits wide. The decoder's syndrome is
the position of a flipped bit. It inverts that bit and reports
`ecc_corrected`. A syndrome beyond position 38 can only come from several
flips; it is reported as `ecc_uncorrectable` and left uncorrected. There is
no double-error detection bit.

## Bypassing multipliers

`rtl/column_bypass_multiplier.sv` and `rtl/row_bypass_multiplier.sv` are
unsigned W x W carry-save arrays followed by one carry-propagate adder
(`s + c`). Each stage, `rtl/bypass_csa_row.sv`, is a 2W-bit row of full
adders that adds one shifted partial product to the running (sum, carry)
pair. When the steering bit is 0, a mux passes the pair through unchanged:

* column bypassing: stage i belongs to multiplicand bit `md[i]`, adds `mr << i`;
* row bypassing: row j belongs to multiplicator bit `mr[j]`, adds `md << j`.

The classic row-bypassing array has narrower rows. It uses tri-state
buffers to freeze the skipped adders, and extra circuits to correct the
rightmost bypassed bits. Here the rows are full width, so the pass-through
is exact and needs no correction. The cost is more adder cells. The full
adders of a bypassed stage still compute in this RTL; only the mux ignores
them. Freezing their inputs for power is a later refinement.

## Top-level interface (`rtl/aging_aware_multiplier.sv`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `clk_del` | in | 1 | `clk` delayed by less than half a period (Razor shadow latches) |
| `in_valid`, `md`, `mr` | in | 1, M, M | operation offered; taken at a rising edge with `in_ready` = 1 |
| `in_ready` | out | 1 | operand registers load at this edge |
| `product`, `product_valid` | out | 2M, 1 | result of the last completed operation |
| `reexecute` | out | 1 | Razor error this cycle; one-cycle stall and repair |
| `two_cycle` | out | 1 | the operation in the registers is given a second cycle |
| `aged` | out | 1 | aging indicator |
| `ecc_corrected`, `ecc_uncorrectable` | out | 1 | Hamming decoder status |
| `zero_count` | out | clog2(M+1) | zero bits of the judged operand |

An operation is taken at edge t. It completes at t+1 (one-cycle pattern) or
t+2 (two-cycle pattern). Its product is valid during the cycle after that,
or one cycle later after a Razor repair. Results come out in order.
Operands offered with `in_valid` = 0 still pass through the datapath but
never raise `product_valid`.

Parameters (defaults):

| parameter | default | note |
|-----------|---------|------|
| `M` | 16 | operand width; product 2M |
| `BYPASS` | `BYPASS_COLUMN` | or `BYPASS_ROW` (`amm_pkg::bypass_e`) |
| `JUDGE_N` | 7 | n: more than n zeros means one cycle (n+1 once aged) |
| `AGING_WINDOW` | 128 | operations per aging window |
| `AGING_THRESHOLD` | 8 | errors per window that mark the circuit as aged |

## What comes from the original architecture and what is chosen here

Taken from the architecture this RTL implements:

* the block structure;
* m = 16;
* the AHL's two judges, aging-indicator-steered mux, OR gate and
  falling-edge flip-flop;
* gating = 0 meaning "hold for a second cycle";
* the Razor flip-flop's main flip-flop, shadow latch on a delayed clock,
  XOR comparator and restore mux;
* the aging indicator as an error counter over a window of operations with
  a threshold;
* the Hamming code's check-bit placement and parity rule;
* which operand steers the AHL for each bypassing style.

Chosen here, because the original leaves them open or states them only as
a function:

* the values of n, the aging window and the error threshold;
* the aging indicator staying set;
* a clock enable in place of a gated clock;
* repairing a Razor error with a one-cycle stall, described originally as
  re-executing the operation with two cycles;
* the `in_valid`/`in_ready`/`product_valid` handshake;
* the Razor stage being 2m + 6 bits wide, because of the code's check bits;
* the shadow latch opening only after a capture;
* the full-width carry-save organisation of both multipliers;
* the uncorrectable flag of the decoder;
* reset behaviour.

Not modelled: the generator of `clk_del`, which is a delay line and an
input here, and the FPGA device the design targets.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_zero_judge` | zero count and decision against `$countones` |
| `tb_column_bypass_multiplier`, `tb_row_bypass_multiplier` | 3000 products each, sparse and dense operands |
| `tb_aging_indicator` | windows at the threshold never trip; one error more trips; stays set |
| `tb_ahl` | gating every cycle against a model; n+1-zero patterns one-cycle when fresh, two-cycle when aged |
| `tb_razor_ff`, `tb_razor_bank` | early and late data; error, repair from the shadow latch even when the next data has arrived, valid flag |
| `tb_hamming_encoder`, `tb_hamming_decoder` | code-word property; every single-bit flip corrected; uncorrectable syndrome flagged |
| `tb_aging_aware_multiplier` | whole design at default parameters, 1500 operations |
| `tb_amm_row_bypass` | the same run with `BYPASS_ROW` |

RTL has no gate delays, so the two end-to-end testbenches supply them. They
drive the net `razor_d` between the encoder and the Razor stage with
`force`. Each new code word appears only after a modelled path delay of
`13 ns + 0.85 ns x (one bits of the steering operand) x age`, with a 20 ns
clock. For the first 300 operations `age` is 1.0, and every pattern judged
one-cycle meets timing. Then `age` becomes 1.15: patterns with exactly
8 ones, which are still judged one-cycle, miss the edge by about 0.8 ns.
The Razor stage catches and repairs them. After 9 such errors in one window
the indicator trips. Those patterns are then given two cycles and no
further errors occur. The testbench also flips single bits on the net
`dec_code` into the decoder.

It checks the following:

* every product, in order;
* the number of cycles each operation stays in the operand registers;
* `two_cycle`, `reexecute`, `aged` and `zero_count`, each against its own model.

It also requires that each of these happens at least once:

* a one-cycle operation;
* a two-cycle operation;
* a two-cycle operation caused by aging;
* a Razor error;
* the aging switch;
* an ECC correction;
* an idle slot.

The first operation is 0x1000 x 0x1100 = 0x01100000.

The delay model is a stand-in for silicon and only as good as its numbers.
The testbenches show that the control logic reacts correctly to slow
patterns. They do not show that a given process meets the Razor timing
window.

To simulate, for example the full design:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_aging_aware_multiplier -y rtl -y tb +libext+.sv -Irtl \
  rtl/amm_pkg.sv tb/tb_aging_aware_multiplier.sv
./obj_dir/Vtb_aging_aware_multiplier
```

Replace the top module and file name for any other testbench. Each
simulation runs in well under a second.

## Files

* `rtl/amm_pkg.sv`: `bypass_e` and `hamming_parity_bits()`
* `rtl/aging_aware_multiplier.sv`: top
* `rtl/ahl.sv`, `rtl/zero_judge.sv`, `rtl/aging_indicator.sv`: adaptive hold logic
* `rtl/razor_ff.sv`, `rtl/razor_bank.sv`: Razor stage
* `rtl/hamming_encoder.sv`, `rtl/hamming_decoder.sv`: error-correcting code
* `rtl/column_bypass_multiplier.sv`, `rtl/row_bypass_multiplier.sv`, `rtl/bypass_csa_row.sv`: multipliers
* `tb/`: the testbenches listed above
