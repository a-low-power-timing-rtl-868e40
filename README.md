# Timing-error-tolerant flip-flop by clock control

A flip-flop whose data arrives a little after the rising clock edge normally
stores the wrong bit. The usual fixes are to slow the clock or raise the
supply voltage so that no path ever runs late, which costs speed and power,
or to detect the error and replay or stall, which costs cycles.

This design fixes a late bit **inside the same clock cycle** and leaves the
system clock alone. It works like this. A master-slave flip-flop gets a
separate clock for its master latch. A transition detector watches the data
input. If the data changes while the clock is high, after the edge that should
have captured it, the detector fires a short error pulse. That pulse forces
the master clock high again, so the master latch reopens. The slave latch is
still open because the clock is still high, so the late bit goes straight
through to `Q`, and the master closes on it when the pulse ends. The output
arrives late by the same amount as the data, but the bit is correct and no
cycle is lost.

A second stage shows how the idea extends to a pipeline through **time
borrowing**. The second flip-flop's master latch runs on a clock `CLKDD`. That
clock stays open until a delayed copy of the system clock rises, and it also
stays open while the first stage is correcting an error. Data that reaches
the second stage shortly after the edge is therefore still captured.

Everything is 1 bit wide. The design is a circuit-level cell, not a
datapath, so the behaviour that matters is timing: when a latch is open, and
for how long.

## Files

| file | what it is |
|---|---|
| `rtl/master_slave_ff.sv` | master-slave flip-flop with separate master (`cm`) and slave (`clk1`) clocks |
| `rtl/master_clock_gen.sv` | `cm = ~clk \| er`: one inverter and one OR gate |
| `rtl/transition_detector.sv` | **behavioural model**: buffer-chain delay, inverters and AND gates; emits `er` |
| `rtl/tet_ff.sv` | the error-tolerant flip-flop: detector + master clock generator + flip-flop |
| `rtl/time_borrow_clock_gen.sv` | `clkdd = ~ck \| (cm & clk)`: master clock of the second stage |
| `rtl/tet_pipeline.sv` | top: error-tolerant stage 1 and time-borrowing stage 2 |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The error-tolerant flip-flop (`tet_ff`)

### Latch clocks

| signal | high means | normal value | during an error |
|---|---|---|---|
| `cm` (master) | master latch transparent | `~clk` | forced 1 while `er` is 1 |
| `clk1` (slave) | slave latch transparent | `clk` | unchanged |

When there is no error, `cm = ~clk`. The master follows `D` in the low half of
the clock and closes at the rising edge. At that same edge the slave opens.
This is an ordinary rising-edge flip-flop.

### What happens on a late bit

```
clk   ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________
D     ‾‾‾‾‾‾‾‾‾‾\_______________________    (bit 0 arrives L ns after the edge)
er    __________/‾‾‾\___________________    (width T_DLY)
cm    ‾‾‾‾\_____/‾‾‾\_____/‾‾‾‾‾‾‾‾‾‾‾‾
Q     ‾‾‾‾‾‾‾‾‾‾\_______________________    (follows D at once, same cycle)
```

1. The rising edge closes the master on the old value. The slave opens and
   `Q` shows the old value.
2. `D` changes `L` ns later. The detector compares `D` with a copy delayed by
   `T_DLY`. They differ, and `clk` is high, so `er` goes high for `T_DLY`.
3. `cm` goes high and the master reopens. The new bit passes through master
   and slave to `Q`.
4. `er` falls, `cm` falls, and the master holds the corrected bit until the
   clock falls.

Seen from outside, the output is complemented exactly when the late bit
differs from the stored one. This is why the scheme can also be described as
a bit-flipping flip-flop.

### Detector details and limits

- Two AND gates handle the two directions. One sees a rising edge (`d & ~d_dly`),
  the other a falling edge (`~d & d_dly`). Both are gated by `clk`. An OR gate
  merges them into `er`.
- The **detection window is the whole high half** of the clock. A bit that
  arrives later than the falling edge is not corrected.
- **Short-path rule.** During the high half, `D` may change only because the
  current bit arrives late. If a fast path delivers the *next* cycle's bit
  before the falling edge, the cell treats it as a late bit and stores it.
  This is the same hold constraint that all detect-in-window schemes have.
- A transition less than `T_DLY` before the edge still gives a short pulse
  right at the edge. That pulse reopens the master on the value it already
  holds, so it does no harm. It is one of the glitches the circuit is known
  not to filter.
- `T_DLY` (default 1.5 ns) sets both the pulse width and the time the master
  stays reopened. The late data must settle within that pulse.

## The two-stage circuit (`tet_pipeline`, the top)

```
 d ──► tet_ff (stage 1) ──► qa/qb ──► [logic between stages, external] ──► d2
            │ cm                                                          │
 clk ─┬─────┼──────────────┐                                              ▼
 ck ──┼─► time_borrow_clock_gen ── clkdd ──► master of stage-2 FF ──► q2/q2b
      └──────────────────────────────────────► slave  of stage-2 FF
```

The master of stage 2 is open while `clkdd` is high, where
`clkdd = ~ck | (cm & clk)`.

- **Borrow.** `ck` is `clk` delayed by the borrow time. Stage 2's master
  stays open until `ck` rises, so d2 data up to that delay after the edge is
  captured. The time is taken from the next cycle.
- **Extension.** `cm & clk` is high only while stage 1 is correcting an error.
  During that time stage 2's master is held open too. If one disturbance,
  such as a supply droop, makes both stages late in the same cycle, both
  stages are corrected.
- **Missed.** If d2 arrives after `ck` rises and stage 1 has no error, stage 2
  keeps its old value. The borrow window is finite.

The function of the logic between the stages is not specified, so it is left
outside the module. `qa` goes out and `d2` comes back in. The delayed clock
`ck` is an input port as well: it should come from a delay line in the clock
tree, and its delay must be less than half a clock period.

## Ports of the top

| port | dir | meaning |
|---|---|---|
| `clk` | in | system clock |
| `ck` | in | `clk` delayed by the borrow time |
| `d` | in | stage-1 data |
| `d2` | in | stage-2 data (from the logic between the stages) |
| `qa`, `qb` | out | stage-1 output and complement |
| `q2`, `q2b` | out | stage-2 output and complement |
| `er` | out | stage-1 error pulse (one per corrected transition) |
| `cm` | out | stage-1 master clock |
| `clkdd` | out | stage-2 master clock |

The only parameter is `T_DLY` (realtime, ns, default 1.5), the detector's
buffer delay. Nothing has a reset. The first clock cycle loads the latches.

## How far to trust it

What follows the original circuit description:

- the split-clock master-slave flip-flop;
- the detector, built from inverters, buffers and AND gates, which sees both
  directions;
- the master clock generator, built from an inverter and an OR gate, which
  holds the master clock high during the error pulse;
- a second stage whose master clock `CLKDD` is built from the first stage's
  master clock, the clock, and a delayed clock `ck`.

What is this design's own choice:

- the latch polarities;
- where the inverter sits in the master clock generator;
- the OR that merges the detector's two AND gates;
- gating the detector with the high half of the clock;
- the whole equation of `CLKDD`;
- the second stage having no detector of its own;
- `T_DLY = 1.5 ns`;
- the 3 ns borrow time and 20 ns clock used in the tests (the clock period
  matches the circuit's published waveforms).

Modelling limits:

- `transition_detector` is a behavioural model. Its pulse width comes from a
  continuous-assignment delay (`assign #(T_DLY)`). Synthesis ignores that
  delay, which leaves `er` stuck at 0, so a synthesized netlist has no error
  correction. In silicon the delay is a sized buffer chain, and it has to be
  characterised.
- The other modules are synthesizable latches and gates. They contain
  intentional latches (2 per flip-flop) and no flip-flop cells. Their zero-delay
  simulation shows the logical behaviour, not setup and hold margins, slopes,
  or the glitches a transistor-level cell would show.

## Simulating

Every testbench checks itself, has a watchdog, and ends with a
`TB_RESULT checks=N failures=M` line. To run the end-to-end test with
Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_tet_pipeline \
          tb/tb_tet_pipeline.sv rtl/tet_pipeline.sv
./obj_dir/Vtb_tet_pipeline
```

Swap in another `tb_<module>` and `rtl/<module>.sv` to test that module.

- `tb_tet_ff`: 400 cycles at a 20 ns clock, with data on time or 0.5–7 ns
  late. It checks that a late bit is on `Q` within 0.2 ns of arriving, that
  the bit is held to the next edge, and that there is exactly one `er` pulse
  per late transition.
- `tb_tet_pipeline`: 600 cycles with all parameters at their defaults. The
  testbench acts as the logic between the stages (an XOR of the stage-1 bit
  with a random bit). It places each stage's arrival at random: on time, late
  in stage 1, borrowed in stage 2, extended in stage 2 during a stage-1
  error, or past the window. It checks both outputs against its own
  reference, counts how often each of these mechanisms happens, and fails if
  any of them never happens.
- The unit testbenches cover latch transparency and hold
  (`tb_master_slave_ff`), every input combination of the two clock
  generators, and the pulse width, direction and window of the detector.

Each run takes well under a second.
