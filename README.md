# Counter-based digital PLL with a synchronous power-up clock and reset sequencer

This design aligns a square-wave output clock to an incoming reference clock
using nothing but a fast system clock, a 4-bit down counter and a few
comparators. There is no oscillator, filter or charge pump. The counter is the
oscillator, and a single rule applied at each reference edge is the loop
filter: "if my edge came late, skip a count; if it came early, wait a count".
The PLL is synchronous to that one clock and has a synchronous reset, so it maps
onto any FPGA.

Around that PLL sits a chip-level clock and reset block. At power-up it:

1. captures the PLL configuration pins;
2. starts the PLL and waits for lock;
3. switches the core clock from the reference to the PLL clock without a glitch;
4. releases the core reset only after that.

A bypass pin keeps the core on the reference clock. A three-state
phase/frequency detector (PFD) reports whether the reference or the PLL clock
is leading.

## The digital PLL (`rtl/dpll.sv`)

### Counter as oscillator

A W-bit counter (W = 4) counts down from `limit` to 0 on every `clk` edge and
then reloads `limit`. One output period is therefore `limit + 1` system clocks.
The output clock is decoded from the counter:

    clk_out = (counter > limit >> 1)

It is high for `limit - limit/2` cycles of each period (8 of 16 for limit 15,
4 of 8 for limit 7), which is an approximate square wave. Its rising edge
falls in exactly the cycle in which the counter is reloaded to `limit`. Nothing
else is stored, so the PLL holds 5 flip-flops: the counter, plus one flop that
keeps last cycle's `clk_in`.

### Phase correction at each reference edge

A reference rising edge is "`clk_in` high now, low in the previous cycle". When
the loop is in phase, that edge falls in the same cycle as the output edge, so
the counter reads `limit`. If it reads anything else:

| counter at the reference edge | meaning | action this cycle |
|---|---|---|
| `== limit` | in phase | count down by 1 (normal) |
| `< limit >> 1` | the output edge is still to come: output late | count down by **2** (one cycle removed) |
| otherwise | the output edge already happened: output early | **hold** (one cycle added) |

Each reference edge moves the output phase by exactly one system clock towards
the reference. The error can never exceed about half a period. So with equal
periods the loop locks within roughly `limit/2` reference periods, plus the
three periods the lock detector needs. The testbench checks the bound
`(limit/2 + 4)·(limit+1)` system clocks for every limit from 1 to 15.

A step by two from counter 1 or 0 would pass below zero. Here it wraps modulo
`limit + 1`: from 1 it goes to `limit`, and from 0 to `limit - 1`. That way the
removed cycle is not lost at the reload.

Worked example, limit 7 (half = 3), with the reference edge arriving while the
counter reads 1 (output 2 cycles late):

    edge 1: counter 1 < 3  -> 1-2 wraps to 7  (now 1 cycle late)
    edge 2: counter 0 < 3  -> 0-2 wraps to 6  (now in phase)
    edge 3: counter 7 == limit -> normal; output and reference edges coincide

The output is built from the counter, not from the reference. Its duty cycle
therefore does not depend on the reference's duty cycle: the tests use a
reference that is high for only one system clock per period.

### What the loop does not do

The loop corrects **phase only**, by at most one system clock per reference
period. Its frequency is set by `limit`, so `limit` must equal the reference
period in system clocks minus one. The design has been simulated only with
equal periods. `clk_in` is sampled as a synchronous signal. The top level puts
a two-flop synchroniser in front of it, so there the PLL edge lines up with
the reference delayed by two system clocks.

### Ports

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | fast system clock |
| `reset` | in | 1 | synchronous, active high; clears the counter |
| `limit` | in | W | counter limit (period − 1) |
| `clk_in` | in | 1 | reference clock, synchronous to `clk` |
| `clk_out` | out | 1 | output clock |
| `counter` | out | W | the phase counter, for observation |

## Lock detection (`rtl/lock_detect.sv`)

Both clocks are sampled on `clk` and their rising edges detected. Each time
either clock rises, the detector looks for a rising edge of the other clock in
the same cycle:

- if there is one, `lock_count` goes up, saturating at `LOCK_N` = 3;
- if there is not, the count drops to 0.

`locked` is `lock_count == 3`, meaning the last three edges all coincided. An
unmatched edge clears the lock at once.

## Phase/frequency detector (`rtl/pfd.sv`)

This is the classic three-state machine:

| state | Qa | Qb | rising A | rising B |
|---|---|---|---|---|
| 0 | 0 | 0 | → I | → II |
| I | 1 | 0 | stay | → 0 |
| II | 0 | 1 | → 0 | stay |

When A is faster than B, only Qa pulses. When B is faster, only Qb pulses. At
equal frequencies the pulse width on one output equals the phase lead.

The machine is synchronous: A and B are sampled on `clk`, so the phase is
resolved to one system clock. Edges on A and B in the same cycle count as zero
phase difference: state 0 stays, and I and II return to 0.

In the top level, A is the synchronised reference and B is the PLL clock, and
`pfd_qa`/`pfd_qb` are brought out as a phase monitor. The detector is not part
of the correction loop, because the counter rule above already plays that role.

## Power-up sequence (`rtl/seq_fsm.sv`)

Moore machine on `clk`:

| state | sample_en | pll_reset | div_en | select | core_rst_req | leaves when |
|---|---|---|---|---|---|---|
| RESET | 0 | 1 | 0 | 0 | 1 | chip reset released |
| SAMPLE | 1 | 1 | 0 | 0 | 1 | next cycle |
| PLL_START | 0 | 0 | 0 | 0 | 1 | next cycle → BYPASS if `pll_bypass`, else WAIT_LOCK |
| WAIT_LOCK | 0 | 0 | 0 | 0 | 1 | `pll_lock` |
| DIV_ON | 0 | 0 | 1 | 0 | 1 | after `SETTLE` cycles |
| SWITCH | 0 | 0 | 1 | 1 | 1 | after `SETTLE` cycles |
| RUN | 0 | 0 | 1 | 1 | 0 | only by chip reset |
| BYPASS | 0 | 1 | 0 | 0 | 0 | only by chip reset |

A loss of lock after RUN is ignored. Only a chip reset restarts the sequence.

## Clocks, resets and switching

The design has three clock domains:

- `clk`, the fast system clock: PLL, lock detector, PFD, sequencer, config
  register, reset control;
- `pll_clk`, the PLL output: clock divider;
- `core_clk`, the mux output: the core's reset synchroniser.

| block | file | function |
|---|---|---|
| reset synchroniser | `reset_sync.sv` | asserts at once, releases after two edges of the destination clock; used on the chip reset (`clk`) and on the core reset (`core_clk`) |
| configuration register | `pll_config.sv` | captures `pll_cfg` on `sample_en`, resets to 15; later pin changes do not reach the PLL |
| clock divider | `clk_divider.sv` | divides `pll_clk` by `DIV` (default 2, even, 50% duty); the enable is synchronised into `pll_clk`; output low while disabled |
| glitch-free mux | `glitch_free_mux.sv` | input 0 = reference clock, input 1 = divided PLL clock; each side's enable is synchronised on the falling edges of its own clock and can rise only after the other side's has fallen, so the output never has a short pulse |
| reset control | `reset_ctrl.sv` | core reset held while requested, released `RST_HOLD + 1` system clocks after the request ends |
| two-flop synchroniser | `bit_sync.sv` | reference into `clk`, divider enable into `pll_clk` |

The core clock is a gated combination of two clocks by design. The chip-reset
synchroniser output drives synchronous resets in the `clk` domain and
asynchronous resets in the divider and mux, and lint reports that mix.

## Top level (`rtl/pll_sync_reset_top.sv`)

Parameters: `W` = 4, `DIV` = 2, `SETTLE` = 8, `RST_HOLD` = 8.

| port | dir | |
|---|---|---|
| `clk` | in | fast system clock |
| `ext_rst_n` | in | chip reset, active low, asynchronous |
| `ref_clk` | in | reference clock |
| `pll_cfg[3:0]` | in | PLL limit = reference period in `clk` cycles − 1 |
| `pll_bypass` | in | keep the core on the reference clock |
| `core_clk` | out | core clock |
| `core_rst_n` | out | core reset, synchronised to `core_clk` |
| `pll_clk`, `pll_lock`, `pfd_qa`, `pfd_qb` | out | PLL clock, lock, phase monitor |
| `pll_counter`, `lock_count`, `seq_state` | out | observation |

`seq_state` has type `pll_pkg::seq_state_t`.

## Origin of each part and where it departs

Taken from the source description:

- the PLL's counter oscillator, its ports and its correction rule, including
  the `limit >> 1` threshold and the "subtract two / do not decrement" actions;
- the 4-bit width and the resource count of 5 flip-flops;
- the three-coincident-edges lock criterion;
- the three-state PFD;
- the set of blocks and signal names of the clock/reset system.

Everything else is this design's own choice:

- In that system the PLL is described as analog. Here it is the digital PLL
  above, which needs the extra `clk` input.
- The reference is synchronised before the PLL (two cycles of latency).
- The output clock is decoded from the counter with a "greater than half"
  comparator.
- The modulo-`limit + 1` wrap uses an adder that a bare 4-bit
  subtract-one-or-two datapath would not need.
- Reset is synchronous and clears the counter. The input-sample flop has no
  reset.
- The source also names clock-to-output delay, maximum frequency and duty
  cycle as PLL parameters. None of them is a parameter here: a delay is not
  synthesisable, and the duty cycle is fixed by the half-limit threshold.
- The source's text states the PFD's frequency behaviour with A and B the
  other way round from its own state diagram. This RTL follows the state
  diagram.
- The lock detector is hardware here, where the source uses it only in its
  simulation. It counts 1, 2, 3 rather than 0, 1, 2.
- The sequencer's state order, its waits, the divider ratio, the reset hold
  time and the config reset value are all this design's own.
- The core logic that receives `core_clk`/`core_rst_n` is not part of the
  design.
- Analog parts of a textbook PLL (VCO, loop filter, amplifier) and pad buffers
  are not modelled.

## Verification

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

- `dpll_tb` checks each correction case on single edges, including the two
  wraps. It then locks to generated lopsided references for limits 15, 10, 5,
  7 and 14 down to 1, checking:
  - the lock time bound;
  - coincident edges after lock;
  - the period;
  - the high time.
- `lock_detect_tb` and `pfd_tb` walk every transition. They add random pulse
  patterns (lock) and frequency and phase tests (PFD: Qa-only, Qb-only, and
  exact Qa width at a 3-cycle lead).
- `reset_sync_tb`, `pll_config_tb`, `clk_divider_tb` (DIV 2 and 6),
  `glitch_free_mux_tb` (unrelated 10 ns / 14 ns clocks, random switch times,
  minimum pulse width) and `reset_ctrl_tb` check exact cycle timing.
- `seq_fsm_tb` checks the output vector of every cycle for normal start (three
  lock delays), bypass and restart.
- `pll_sync_reset_top_tb` runs the whole block at its default parameters for
  configurations 15, 10, 5, 7 and 3. It checks:
  - the core clock period before the switch (reference) and after it (2 ×
    PLL period);
  - that the core reset is released only after the switch;
  - that the configuration is held against pin changes;
  - PLL edge alignment;
  - reset while running;
  - bypass;
  - that no core-clock phase is shorter than one system clock.

  It also counts each mechanism (lock, configuration hold, switch, reset
  release, bypass, reset in RUN, PFD up and down pulses) and fails if one never
  occurs.

Not verified: post-layout timing, behaviour with a reference whose period
differs from `limit + 1`, and metastability (the two-state simulation cannot
show it).

## Simulating

With Verilator 5 (any testbench; replace `dpll_tb` by its name):

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/pll_pkg.sv tb/dpll_tb.sv --top-module dpll_tb -o sim
    ./obj_dir/sim

Lint the whole design:

    verilator --lint-only -Wall -Irtl -y rtl rtl/pll_pkg.sv rtl/pll_sync_reset_top.sv

`rtl/pll_pkg.sv` holds the shared enums for the PFD and sequencer states and
must be read first. The division ratio, the sequencer waits and the reset hold
time are parameters of the top. To widen the PLL, set `W`. The lock criterion
is `LOCK_N` of `lock_detect`; the top instantiates it with 3, and its
`lock_count` port is sized for that.
