# Self-timed dual-rail logic for subthreshold supplies

Below about 300 mV, gate delay depends exponentially on the supply voltage
and varies widely from gate to gate. Two approaches cope with this:

- **Delay-line timing.** A clock or a matched delay line must keep a large
  safety margin. For a 3σ margin the delay line has to be
  K ≈ 1 + 3.86·s + 4.83·s² − 0.71·s³ times slower than the mean logic
  delay, where s = σ/μ of that delay. This is still about 30 % extra even
  for deep logic.
- **Completion detection.** The logic itself reports when its result is
  ready. No margin is needed, and the circuit follows the supply on its own:
  slow at 200 mV, faster when the supply recovers.

This repository holds synthesizable SystemVerilog for the completion-detection
side, written as four-phase dual-rail logic:

- **Two self-timed 4-bit ring counters.** They serve as a proof of concept in
  two logic styles:
  - DIMS, fully delay-insensitive;
  - NCL-X with reduced completion detection, cheaper and with one mild
    timing assumption.
- **A dual-rail 8×8 multiplier.** It has minimum logic depth: a
  partial-product matrix, a Wallace tree and a Kogge-Stone adder. Its
  completion detector leaves out the low product bits, which are never the
  last to settle.

The idea behind the multiplier is a hybrid design. Only the slowest part of a
system is made dual-rail. The rest stays cheap single-rail logic, timed by a
delay line or a clock. Dual-rail logic costs about twice the area and several
times the switching energy. It saves energy only when a small dual-rail part
speeds up a much larger system, so that the system leaks for less time per
operation. That surrounding system is not part of this RTL.

## Dual-rail data and the four-phase cycle

Every bit travels on two wires, packed as `dr_pkg::dr_t {t, f}`:

| t | f | meaning |
|---|---|---------|
| 0 | 0 | spacer (no data) |
| 1 | 0 | valid 1 |
| 0 | 1 | valid 0 |
| 1 | 1 | illegal |

A word is complete when every bit has one rail high. Each transfer is a
four-phase cycle:

1. The word becomes valid (set phase).
2. A completion detector sees it and acknowledges.
3. The word returns to the all-spacer state (reset phase).
4. The acknowledge falls.

There is no clock anywhere in the design.

`completion_detector` ORs the two rails of each monitored bit and joins the
results with a C-element. Its output therefore rises when all monitored bits
are valid and falls when all are back at the spacer. A `MASK` parameter
removes bits from the join.

`c_element` is the state-holding primitive. Its output goes high when all
inputs are high and low when all are low; otherwise it holds. Standard static
and symmetric transistor versions differ only in speed, area and leakage. The
symmetric one is faster but leaks more and needs larger devices at 200 mV.
Both have this one logic model. An active-high `rst` is added so that
simulation starts from a known state.

## Two gate styles

**DIMS** (`dims_gate`) gives every input minterm its own C-element, and ORs
the minterms of each output rail. Exactly one minterm fires per valid input.
A minterm clears only when all of its inputs are spacers. The gate therefore
waits for all inputs in both phases and needs no timing assumption, at the
cost of 2^N C-elements. Its truth table is a parameter. The default is the
two-input AND gate, and the DIMS counter uses it as a half adder.

**NCL-X** (`nclx_and` and the rail functions in `dr_pkg`) writes each rail as
an AND/OR function of input rails. AND is `t = a.t & b.t`,
`f = a.f | b.f`; inversion is a rail swap. The gates are small, but an
output can become valid before all inputs have: a single valid 0 decides an
AND. Completion must therefore be judged on outputs only. "Reduced"
completion detection goes further and places detectors only in front of the
state-holding elements, not after every gate. The price is that the end of
the reset phase inside the logic is not observed. The design assumes the
spacer has reached every internal gate once it has reached the register
inputs.

## The ring counters

Both counters hold one count circulating in a ring of dual-rail stages.

**Observer channel.** Each counter exposes its count register through an
observer channel:

- the count appears valid, with a flag (`cnt_cd` or `cnt_full`) high;
- the observer raises `out_ack`;
- the count returns to the spacer and the flag falls;
- the observer lowers `out_ack`.

The acknowledge is part of the ring, so a counter advances one step per
observer handshake and stalls as long as `out_ack` is withheld. Without an
observer, a free-running ring's speed would be set only by gate delays,
which the RTL does not model.

**Preset.** Both counters load a start value through a multiplexer. `rst`
clears every stage to the spacer and sets a preset flag. The flag selects the
single-rail `preset` input, encoded to dual-rail, at the input of the count
stage. Once that stage holds the value the flag clears, and the multiplexer
passes the ring's own data from then on. Counting wraps from 15 to 0.

### DIMS counter (`dims_counter`, three stages)

Each stage is a `dims_latch`: one C-element per rail of `(data rail, en)`
plus a completion detector.

- With `en` high, a valid word is taken.
- With `en` low, a bit clears once its input is the spacer.
- Otherwise the stage holds.

The ring is: stage 0 (count), DIMS incrementer, stage 1, wire, stage 2,
preset multiplexer, back to stage 0. A stage's `en` is the inverse of the
next stage's completion. For stage 0, the next-stage completion is the
C-element join of stage 1's completion and the observer's `out_ack`.

The ring needs three stages because it must hold the data word, its spacer
and a free place at the same time. One cycle from stage 0 holding *n*:

1. Stage 1 takes *n*+1 and the observer acknowledges.
2. Stage 0 clears. Its input from stage 2 is a spacer, because stage 2 was
   blocked while stage 0 was full.
3. Stage 2 copies *n*+1 and stage 1 clears.
4. The observer drops its acknowledge, and stage 0 takes *n*+1.

Every gate is input-complete, so this counter is correct for any gate delays.

### NCL-X counter (`nclx_counter`, two stages)

Registers A (count) and B are `nclx_reg` modules. Each has:

- one RS latch per rail, set by the valid input rail while the input
  completion detector is high;
- a clear input (`clr`);
- AND gates on the outputs controlled by `send`.

Because a register can withdraw its data by dropping `send`, it inserts the
spacer by itself, and two stages are enough. The ring is: A, detector, B,
NCL-X incrementer (bit 0 inverted, XOR sums, carries through `nclx_and`),
preset multiplexer, detector, A.

The control is four product terms:

```
send_a = fullA & !fullB & out_ack      A -> B, after the observer saw A
send_b = fullB & !fullA & !out_ack     B -> A (as count+1), after A emptied
clr_a  = fullA & fullB & !cdB &  out_ack   B loaded; its input is spacer again
clr_b  = fullA & fullB & !cdA & !out_ack   A loaded; its input is spacer again
```

Right after either transfer both registers are full. The level of `out_ack`
tells which transfer has just ended, and so which register to clear. `full`
is read from bit 0 only, because the whole word is loaded by one completion
event.

## The dual-rail multiplier (`dr_multiplier`)

The multiplier is an unsigned `W`×`W` multiplier, `W` = 8 by default; widths
4 to 8 are tested. It is combinational from operands to product:

1. **Partial products.** Bit a[i]·b[j] goes to column i+j. In silicon this
   is a NAND matrix; the inversion disappears in dual-rail form.
2. **Wallace tree.** Each level cuts every column into groups of three (full
   adders) and a leftover pair (half adder). Sums stay in the column;
   carries move one column up. Levels repeat until no column has more than
   two bits: 2 levels at W = 4 and 4 levels at W = 8. The tree is written as
   loops over column arrays in one `always_comb`, so the same code covers
   every width.
3. **Kogge-Stone adder.** It adds the two remaining rows with log2(2W)
   prefix levels. Where a column has only one bit, the missing bit is a
   dual-rail zero. That zero takes its validity from the bit that is
   present, so the spacer still passes through.

All gates are NCL-X rail functions, so:

- valid operands give a valid product;
- spacer operands give a spacer product;
- a zero operand can make product bits valid early, which is correct NCL-X
  behaviour.

`cd` watches product bits `2W-1` down to `CD_OMIT_LSBS` (default 2). The low
bits leave the Wallace tree directly rather than through the adder, so they
are never the last outputs to change. Leaving them out makes the detector
smaller and faster. Omitting bits that can settle last would let `cd` rise
before the product is valid; keep `CD_OMIT_LSBS` small.

The multiplier has no input or output registers and no handshake controller.
A user wraps it in registers like those of the counters. `rst` only
initialises the detector's C-element.

## Top level (`async_subthreshold_top`)

The three circuits stand side by side with their own ports:

| ports | circuit |
|-------|---------|
| `nclx_preset`, `nclx_cnt`, `nclx_cnt_full`, `nclx_ack` | NCL-X counter |
| `dims_preset`, `dims_cnt`, `dims_cnt_cd`, `dims_ack` | DIMS counter |
| `mul_a`, `mul_b`, `mul_p`, `mul_cd` | multiplier |

The shared `rst` is asynchronous and active high. Parameters are `W` = 4
(counter width) and `MW` = 8 (multiplier width).

## Files

| file | content |
|------|---------|
| `rtl/dr_pkg.sv` | `dr_t` type and NCL-X rail functions |
| `rtl/c_element.sv` | N-input C-element |
| `rtl/dims_gate.sv` | DIMS gate (minterm C-elements + OR) |
| `rtl/nclx_and.sv` | NCL-X AND gate |
| `rtl/completion_detector.sv` | masked completion detector |
| `rtl/dims_latch.sv` | C-element latch stage with detector |
| `rtl/nclx_reg.sv` | RS-latch register with AND-gated outputs |
| `rtl/dims_counter.sv`, `rtl/nclx_counter.sv` | the ring counters |
| `rtl/dr_multiplier.sv` | Wallace/Kogge-Stone dual-rail multiplier |
| `rtl/async_subthreshold_top.sv` | top level |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/dr_multiplier_widths_tb.sv` | multiplier at widths 4 to 7 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. The testbenches use delays, so build with `--timing`, for
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/dr_pkg.sv \
  tb/async_subthreshold_top_tb.sv -y rtl --top-module async_subthreshold_top_tb
./obj_dir/Vasync_subthreshold_top_tb
```

The top-level testbench runs at the default sizes. It reads both counters
concurrently with random observer delays through wrap-around, stalls and a
second reset, and runs 400 products. It counts each mechanism it exercised:
preset loads, wrap-arounds, stalls, products and early completions.

### What the simulation does and does not show

- **Function and handshakes only.** The RTL has no gate delays. All events
  caused by one handshake edge settle within the same time step. Verilator
  iterates the ring loops until they settle, and reports them as
  `UNOPTFLAT`.
- **Expected lint warnings.** Those loop warnings, and the latch warnings on
  the C-elements and RS latches, come from the asynchronous structure on
  purpose.
- **Zero-delay is not a timing proof.** It cannot show the NCL-X counter's
  timing assumption on the spacer, or the safety of omitting detector bits.
  Checking either needs a gate-level simulation with per-gate delay
  variation.
- **Assertions.** `dims_latch` and `nclx_reg` assert that no stored bit ever
  has both rails high.

## Design choices beyond the published structure

- **Control equations.** The counter control equations, the placement of
  incrementer and multiplexer in the rings, and the observer channel are
  this design's own.
- **Missing-bit zero.** The rule for the zero that fills a missing
  Kogge-Stone operand bit is this design's own.
- **Omitted detector bits.** `CD_OMIT_LSBS` = 2 is a choice: the number of
  omitted bits depends on the circuit's structure.
- **Unsigned operands.** The multiplier treats its operands as unsigned.
- **Resets.** The C-elements, latches and preset flags have resets, which a
  purely delay-insensitive circuit would get from a reset network not shown
  here.
