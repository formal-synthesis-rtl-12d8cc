# Stopclock: a stopwatch that runs on two time scales

This is a three-digit stopwatch. It shows tens of seconds, seconds and tenths,
from 00.0 to 59.9, and then wraps to 00.0. It has a **reset** button and a
**start/stop** button. From the user's point of view it is a tiny state
machine that steps once every tenth of a second. The hardware, though, runs on
a 1 MHz system clock, and it also receives a 10 Hz *tick* that is synchronous
to that clock. The buttons can be pressed at any system cycle, for any length
of time.

The design keeps these two views consistent. Every change that the user can
see happens at a rising edge of the tick. Small pieces of glue logic collect
what the buttons did between two tick edges and turn it into a value that is
valid at the next edge. So the 1 MHz circuit, watched only at tick edges,
behaves exactly like this 10 Hz specification:

```
display(k+1) = reset(k) ? 00.0 : run(k) ? next(display(k)) : display(k)
run(k+1)     = reset(k) ? stopped : stst(k) ? not run(k) : run(k)
display(0)   = 00.0,  run(0) = stopped
```

Here `k` counts 1/10 s intervals and `next` adds one tenth with carries
(59.9 → 00.0). `reset(k)` means that the reset button was high at some cycle
of interval k. `stst(k)` means that the start/stop button was pressed an odd
number of times in interval k. An even number of presses in one interval
cancels out.

The structure and the gate-level equations follow a formal derivation of a
stopclock published under the title *Formal Synthesis*. The choices this RTL
makes where that derivation is silent are listed under
[Choices and departures](#choices-and-departures).

## Block structure

```
            tick ──► rise_detect ──► s (one-cycle strobe at each tick rise)
                                      │
 reset_button ──► reset_glue ──RESET──┼──────────────┐
 stst_button  ──► stst_glue  ──SS─────┤              │
                                      ▼              ▼
                                   control ──RUN──► inc_datapath ──► seg_*, digit_*
```

| module | role |
|---|---|
| `stopclock` | top level: wires the blocks together |
| `rise_detect` | `z = x and not(x one cycle ago)`; makes the strobe `s` and detects button presses |
| `reset_glue` | RESET: was the reset button high anywhere in the current interval? |
| `stst_glue` | SS: parity of the start/stop presses in the current interval |
| `control` | RUN state register, loaded only when `s` is high |
| `inc_datapath` | three cascaded digit counters and their seven-segment decoders |
| `next_n` | one digit counter 0..N with carry out |
| `incr` | 4-bit increment/clear register used by `next_n` |
| `decoder` | 4-bit binary digit to 7-segment pattern |
| `delay_ff`, `latch_en` | the two storage primitives: a unit delay, and a register with load enable |
| `stopclock_pkg` | shared types (`word4_t`, `seg7_t`) and the digit limits 9, 9, 5 |

Each file begins with a comment that gives the block's equations, its ports
and its timing.

## How time is carved into intervals

Call the cycle in which the tick rises (the strobe `s` is high) `T`.
Interval k runs from its strobe cycle `T_k` up to the cycle before `T_(k+1)`.
All state elements are clocked at 1 MHz. Only the enable of the RUN register
and the gating of the counters make the design step at 10 Hz.

**Reset glue.** `RESET <= reset_button | (~s & RESET)`. In the strobe cycle
the register restarts from the button value alone. In any other cycle it ORs
the button into the value it holds. In the strobe cycle `T_(k+1)`, RESET
therefore holds the OR of the button over every cycle of interval k. That is
exactly when the control and the datapath use it. The value cannot be
produced any earlier: a press later in the interval must still count.

**Start/stop glue.** `SS <= press ^ (~s & SS)`, where `press` is the button's
rising edge. It is the same pattern as the reset glue with XOR in place of
OR, so it counts presses modulo 2. A button that is held down counts as one
press, in the interval where it went high. This holds even when it stays
down across a tick edge.

**Control.** In a strobe cycle, `RUN <= ~RESET & (SS ^ RUN)`; at all other
times RUN holds.

**Datapath.** `clr = RESET & s`, `inc = RUN & s`. Clear takes priority.

As a result, a press in interval k changes RUN at the start of interval k+1.
It changes the count from interval k+2 on, because the counter's increment
at `T_(k+1)` still uses the old RUN. A reset press in interval k clears the
display at the start of interval k+1.

One restriction applies. Between the global reset and the first tick rise,
no start/stop press may occur. Otherwise the first strobe would start the
clock from a press that belongs to no interval. The design does not enforce
this.

## Digit counters and the display settling time

This is the least obvious part of the design. Each digit (`next_n`) is a
4-bit register with an equality comparator on **N+1** (10 for tenths and
seconds, 6 for tens). The comparator output is used twice:

* as the digit's carry, which drives the increment input of the next digit;
* ORed with the external clear, as this digit's own clear.

So a digit does not go from 9 straight to 0. It steps 9 → 10, stays at 10
for one cycle with its carry high, and is cleared on the next edge. The next
digit counts up on that same edge. Each carry therefore arrives one cycle
after the increment that caused it, and the ripple through three digits
takes one cycle per digit. The worst case is 59.9 → 00.0:

| cycle after strobe | tens | secs | tenths | carries high |
|---|---|---|---|---|
| 0 (strobe) | 5 | 9 | 9 | – |
| 1 | 5 | 9 | 10 | tenths |
| 2 | 5 | 10 | 0 | secs |
| 3 | 6 | 0 | 0 | tens (`carry_out`) |
| 4 | 0 | 0 | 0 | – |

The display is therefore correct from the 4th cycle after each tick rise
until the next tick rise. At most 3 of every 100 000 cycles show an
intermediate picture, and only when the tenths digit wraps. The
specification only asks that the display be right except for a few cycles
(fewer than 1000) after each tick, which the eye cannot see. During the
transient cycles a digit that holds 10 or 6 is shown blank, because the
decoder blanks any word above 9.

The segment order is bit i = segment i: 0 top, 1 upper right, 2 lower right,
3 bottom, 4 lower left, 5 upper left, 6 middle. A 1 lights a segment. The
digit words are plain binary, 0000 to 1001.

## Interface of `stopclock`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock (1 MHz in the intended use) |
| `rst` | in | 1 | synchronous global reset, active high: display 00.0, stopped |
| `tick` | in | 1 | 10 Hz signal, synchronous to `clk`; only its rising edges matter |
| `reset_button`, `stst_button` | in | 1 | button levels, already synchronised and debounced |
| `seg_tens`, `seg_secs`, `seg_tenths` | out | 7 | segment patterns |
| `digit_tens`, `digit_secs`, `digit_tenths` | out | 4 | binary digits (transiently 6 or 10, see above) |
| `run` | out | 1 | running (1) or stopped (0) |
| `carry_out` | out | 1 | one-cycle pulse 3 cycles after the tick that wraps 59.9 to 00.0 |

Nothing in the RTL depends on the clock ratio. The tick period must be at
least 4 cycles, so that the ripple is complete when the next tick rises. The
testbenches use periods of 8, 20 and 100 000 cycles.

## Choices and departures

Where the original derivation is open or inconsistent, this RTL chooses the
following:

* **Reset.** The derivation assumes an implicit power-up state with every
  storage element low. Here that is a synchronous active-high `rst`.
* **Increment and clear at once.** The derivation leaves this case open.
  Here clear wins, so a reset at a tick clears a running clock, as the
  specification requires.
* **Start/stop glue equation.** The written equation
  `SS(t+1) = s ? press : press xor SS` is implemented. A gate drawing of the
  same circuit puts the inversion elsewhere, which would not give that
  equation.
* **Segment patterns of 3 to 7.** Only 0, 1, 2, 8 and 9 are given. The
  others are the common shapes: 6 with its top bar, 7 without the upper left
  bar.
* **Non-digit words** (10..15) are shown blank. The derivation only
  constrains the display for valid digits.
* **`carry_out`.** The tens carry is an extra output. In the original it
  only clears the tens digit.
* **No extra button circuitry.** Buttons are assumed synchronous and clean,
  as in the original problem statement, so no synchroniser or debouncer is
  included.
* The clock and tick sources, the buttons and the seven-segment display
  itself are outside the design.

## Verification

Every module has a self-checking testbench in `tb/` (named `tb_<module>`).
Each one prints `TB_RESULT checks=N failures=M` and stops at a watchdog if
something hangs. The model in each testbench is written from the behaviour,
not from the RTL:

* `tb_stopclock` is the end-to-end test, with a tick every 20 cycles. It runs
  about 3700 intervals against the 10 Hz specification above, and compares
  every cycle from the 4th after each tick. It forces and counts each
  mechanism: start, stop, even and odd multiple presses in one interval,
  reset while running and while stopped, reset together with start/stop,
  presses held across a tick edge, carries into seconds and tens, the
  59.9 → 00.0 wrap, and the blank transient digits. A mechanism that never
  happened counts as a failure.
* `tb_stopclock_full` uses the real ratio, 100 000 cycles per tick
  (63 million cycles, about 30 s of simulation time). It starts the clock,
  runs it for more than a full minute through the wrap, then stops, resets
  and restarts it.
* `tb_inc_datapath` checks the settling time: the display must be exact
  from the 4th cycle after each strobe, and the worst case must take exactly
  4 cycles.

The shared reference model is in `tb/stopclock_env.svh` and
`tb/stopclock_digits.svh`. Its segment decoding is written as lists of lit
segments, independent of the RTL's table.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_stopclock rtl/stopclock_pkg.sv tb/tb_stopclock.sv
./obj_dir/Vtb_stopclock
```

Replace `tb_stopclock` with any other testbench name. The RTL uses only
`always_ff`/`always_comb`, one package and plain ports. It is synthesizable
as it stands. The decoders map to small ROMs or logic, and the whole design
is 17 flip-flops.
