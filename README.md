# Fast-lock, jitter-filtering all-digital DLL for a burst-mode memory interface

A memory link that is only powered while it moves data needs a clock
aligner that wakes up in nanoseconds. A conventional DLL, with a replica of
the clock distribution in a closed feedback loop, needs 100 ns or more to
settle. That is why low-power DRAM standards drop the DLL and give up timing
margin. This design splits the job in two:

* **Fast lock.** A two-step time-to-digital converter (TDC) measures the
  clock-distribution delay once, as a 6-bit fraction of a clock cycle. The
  code goes straight to an injection-locked oscillator (ILO), which shifts
  the clock by the complement of that delay. The DLL locks three feedback
  cycles after the first edge has crossed the replica buffer.
* **Continuous tracking.** The power-hungry TDC is then switched off. A
  bang-bang phase detector and a small digital loop filter take over from
  the TDC's code. They follow voltage and temperature drift in steps of
  1/64 of a cycle.

The output clock `clk_dqs`, taken at the end of the clock distribution, is
aligned with the reference clock from the controller. The Tx uses it to
launch DQS and DQ. The link works from 400 MHz to 1.6 GHz (800 Mb/s to
3.2 Gb/s DDR).

The RTL is SystemVerilog (IEEE 1800-2017). The digital loop is
synthesizable. The analog parts are behavioural models: the TDC delay line,
the phase blender, the ILO and the clock buffers. With them the whole DLL
can be simulated with Verilator.

## A burst, step by step

```
trigger      ____/~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~\____
bias_en      _____/~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~\___
dll_en       ___________/~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~\___
fb_clk       ________________________|1|2|3|_|_|_|_|_|_|_|_|_|_|_____
fast_lock    ___________/~~~~~~~~~~~~~~~~~~~~~\_______________________
tracking     _____________________________________/~~~~~~~~~~~~~~~\___
              idle  | fast bias | replica delay | TDC | tracking  | idle
```

1. **Idle (0 mW).** Only the reference clock runs. A row or column access
   raises `trigger`.
2. **Fast bias.** `power_manager` powers the bias for `BIAS_CYCLES`
   reference cycles, then raises `dll_en`.
3. **Replica delay.** The ILO starts at phase code 0, which means no shift,
   so its output is the reference clock. That output travels through the
   replica of the clock distribution. The replica output is the feedback
   clock `fb_clk`, and the whole digital core runs on it. The core therefore
   has no clock edge until the first reference edge has crossed the replica.
   This is how the TDC "waits for" the buffer delay without any timer.
4. **TDC, three feedback edges.**
   - Edge 1 samples the delay-line taps, giving the coarse code.
   - Edge 2 samples the blended phases, giving the fine code.
   - Edge 3 registers the 6-bit code. It also loads the code into the
     tracking loop and sets mode select to tracking.
5. **Tracking.** The TDC, delay line and blender are powered down. The
   bang-bang detector (BBPD) and loop filter keep the alignment.
6. **Back to idle.** When `trigger` drops, everything is disabled at the
   next reference edge.

From `dll_en` to the first aligned DQS edge takes about
2·T_buf + 4.5·T_ref. The first edge crosses the replica once. The corrected
edge then crosses the real distribution. With the default
T_buf = 4.2 ns at 1.6 GHz this is 11.25 ns in simulation, which is in the
10–12 ns range this architecture is meant to reach.

## The two-step TDC

The TDC measures φ, the time from a reference rising edge to the next
feedback rising edge. In fast lock the feedback edge is the reference edge
delayed by the buffer, so φ = T_buf mod T.

**Coarse step (`tdc_delay_line`, `tdc_coarse`).** The reference drives eight
differential delay stages of T/16 each. The true outputs give taps 0–7. The
complement outputs give taps 8–15, which are the same clock half a cycle
later. Together the 16 taps cover one period in T/16 steps. At the feedback
edge, tap k holds the reference level k·T/16 earlier. A reference rising
edge between k·T/16 and (k+1)·T/16 before the sample therefore shows as
`tap[k]=1, tap[k+1]=0` (indices mod 16). The coarse code is that k.
`tdc_valid` reports whether the word had exactly one such transition. With
bubbles, the lowest k is used.

**Fine step (`phase_blender`, `tdc_fine`).** Taps k and k+1 bracket the
reference edge. The blender places four phases at 0, ¼, ½ and ¾ of the way
from tap k to tap k+1, which is T/64 apart. On the next feedback edge these
are sampled. Phase 0 is always high. The number of phases 1–3 that sampled
high is the 2-bit fine code f.

The TDC code is 4·k + f = ⌊64·φ/T⌋. It is truncated, so the residual error
after fast lock is below one step (T/64, 15.6 mUI).

## Complementary mapping in the ILO

Buffer delay plus ILO delay must make one whole cycle. With a code n
standing for a buffer delay of n·T/64, the ILO therefore shifts the
reference by ((64 − n) mod 64)·T/64. In silicon this is done by choosing
the injection point in the oscillator ring, so no arithmetic is needed. The
`bin2therm` block turns the code into a 63-bit thermometer for that
selection. A one-step code change flips one thermometer bit.

The ILO also cleans the clock, and the `dpc_ilo` model reproduces this:

- **Jitter filtering.** The oscillator's edge moves only part of the way,
  `INJ_K` = 0.5, towards each injected reference edge. This low-pass
  filters high-frequency reference jitter.
- **Duty-cycle correction.** The falling edge always comes half the
  oscillator's own period after the rising edge. A reference with 40 % duty
  gives a 50 % output.
- **Immediate code changes.** A change of the code moves the edge at once.
  It is not filtered.

## Tracking loop

- **`bbpd`.** Samples the reference at each feedback rising edge. A 1 means
  the reference rose during the last half cycle, so the feedback is late and
  the code must rise. A 0 means the code must fall. A second flop retimes
  the sample, and the decision is registered.
- **`loop_filter`.** Adds +1 or −1 per cycle into a signed accumulator.
  When the sum reaches ±`ACC_THRESH`, the code steps by `KP` (1 LSB, T/64)
  and the accumulator clears. The code wraps modulo 64, so 63 → 0 is an
  ordinary step. Each step is one T/64 move of the clock edge, which keeps
  the output free of glitches.
- **Threshold choice.** The loop delay is about 11 feedback cycles: the ILO,
  6.7 cycles of replica delay, and three flops. `ACC_THRESH` = 16 is larger
  than that, so the loop dithers by about ±1 step instead of overshooting.
- **Hand-off.** The loop starts from the TDC code, and `phase_code`
  switches from the TDC register to the tracking register on the same edge
  that loads it. The hand-off therefore causes no jump.

## Clocking and reset

- **`power_manager`** runs on the reference clock. `trigger` is taken to be
  synchronous to it.
- **`addll_core`** and everything in it run on `fb_clk`.
- **Core reset.** The core's asynchronous reset is `rst_n & dll_en`. It is
  released while `fb_clk` is still silent, because no edge has crossed the
  replica yet, so no reset synchronizer is needed.
- **BBPD sampling.** The BBPD samples the reference as data. Its second flop
  is the only metastability protection.

## Files

| File | Kind | Role |
|---|---|---|
| `rtl/addll_pkg.sv` | package | widths (6-bit code, 16 taps, 4 blend phases, 63-bit thermometer), state enums |
| `rtl/addll.sv` | top (simulation) | power manager + digital core + behavioural analog parts |
| `rtl/power_manager.sv` | RTL | idle → fast bias → DLL enable |
| `rtl/addll_core.sv` | RTL | synthesizable DLL core; mode-select mux and code adder |
| `rtl/lock_counter.sv` | RTL | three-step fast-lock sequencer, mode select |
| `rtl/tdc_coarse.sv` | RTL | tap sampling and coarse encoder |
| `rtl/tdc_fine.sv` | RTL | blended-phase sampling, fine code, 6-bit code register |
| `rtl/bbpd.sv` | RTL | bang-bang phase detector |
| `rtl/loop_filter.sv` | RTL | accumulate-and-step filter, tracking code |
| `rtl/bin2therm.sv` | RTL | 6-bit → 63-bit thermometer |
| `rtl/tdc_delay_line.sv` | model | 8-stage differential delay line, 16 taps |
| `rtl/phase_blender.sv` | model | 4-phase interpolator between two taps |
| `rtl/dpc_ilo.sv` | model | ILO digital-to-phase converter |
| `rtl/clock_buffer.sv` | model | clock distribution and its replica (transport delay) |

Every module has a testbench `tb/tb_<module>.sv`. `tb/tb_addll.sv` is the
end-to-end test at the top's default parameters.

## Parameters

| Parameter | Default | Where | Origin |
|---|---|---|---|
| phase code width | 6 bits (T/64) | package | design description |
| coarse / fine code | 4 / 2 bits | package | design description |
| delay line | 8 stages, T/16 | package, `tdc_delay_line` | design description |
| fast-lock cycles | 3 | `lock_counter` | design description |
| `KP` | 1 LSB | `loop_filter`, `addll_core`, `addll` | design description (step limited to T/64) |
| `T_REF_PS` | 625 ps (1.6 GHz) | models, `addll` | top of the specified range |
| `T_BUF_PS` | 4200 ps | `clock_buffer`, `addll` | assumed: gives about 10–12 ns wake-up at 1.6 GHz |
| `ACC_THRESH` | 16 | `loop_filter`, `addll_core`, `addll` | assumed |
| `BIAS_CYCLES` | 2 | `power_manager`, `addll` | assumed |
| `INJ_K` | 0.5 | `dpc_ilo` | assumed |

The models follow the measured reference period, within 500–3000 ps. For
the delay line and blender this stands in for a delay line biased to track
frequency. For the ILO it stands in for injection pulling. One build
therefore runs anywhere in the 400 MHz – 1.6 GHz range. `T_REF_PS` is only
the starting value.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/addll_pkg.sv \
    tb/tb_addll.sv --top tb_addll -o sim && ./obj_dir/sim
```

Replace `tb_addll` with any other testbench. Each testbench prints
`TB_RESULT checks=N failures=M`. All of them pass with random initial
values (`+verilator+rand+reset+2`). Every file has `` `timescale 1ps/1fs ``.

The end-to-end test runs three bursts:

- **Burst 1:** 1.6 GHz, T_buf = 4.2 ns, with +60 ps and then −100 ps of
  buffer drift, and 40 % and 60 % duty references.
- **Burst 2:** 1.6 GHz, T_buf one picosecond short of seven cycles, so the
  code dithers across 63/0.
- **Burst 3:** 1.6 GHz, waking with a 40 % duty reference.
- **Burst 4:** 400 MHz, T_buf = 3.333 ns.

In each burst it checks the following (burst 3 relaxes the first two code
and residual checks, see below):

- the bias/enable order;
- lock in exactly three feedback cycles;
- the TDC code against ⌊64·(T_buf mod T)/T⌋;
- a residual error below 33 mUI on the first corrected DQS edge;
- wake-up time within 2·T_buf + 5·T_ref;
- DQS within ±2 steps of the reference while tracking;
- a 50 % DQS duty cycle;
- no DQS clock in idle.

It also counts the mechanisms: fast locks, mode switches, up steps, down
steps, code wraps, power-downs, DCD correction and drift tracking. It fails
if any of them never happened.

Measured in simulation, the residual error after fast lock is 0.8–8.8 ps at
1.6 GHz and 12.7 ps at 400 MHz. The wake-up time is 11.25 ns at 1.6 GHz.

## How far to trust it, and where it departs

- **The digital loop is complete.** This covers the power manager,
  sequencer, both TDC encoders, the adder, mode select, BBPD, loop filter
  and thermometer converter. It is checked block by block and end to end.
  Its structure follows the architecture: two-step TDC, mode-select mux,
  BBPD with integrating filter and gain, and binary-to-thermometer
  converter. The details are this design's own reading: the cycle split of
  fast lock, clocking everything by the feedback clock, the TDC encoding,
  the thermometer width, the accumulator threshold and the wrap-around of
  the code.
- **The analog parts are idealised.** The delay line is exact, the blender
  interpolates perfectly, and the ILO is a first-order phase model. Jitter,
  supply sensitivity and power are not modelled, so measured figures cannot
  be reproduced: 31.6 ps output jitter at 3.2 Gb/s, 6 mW tracking, 24 mW
  fast lock, 0.05 mm². The DCD correction and jitter filtering seen in
  simulation come from how the model is built. They do not show that a
  circuit would behave this way.
- **Delay-line polarity.** The 16 taps use the complement outputs of the
  eight stages for the second half cycle. This assumes a 50 % duty
  reference. With a distorted reference, codes in the second half cycle are
  off by up to the duty error. The tracking loop then corrects them. In the
  test, waking with a 40 % duty reference gives a code 6 steps off, a
  58 ps residual instead of < 33 mUI. The phase is then pulled in within a
  few hundred cycles.
- **Two identical buffers.** The clock distribution and its replica are two
  instances of the same delay with equal values. Mismatch between them
  would show up directly as a DQS phase error.
- **Not included:**
  - the command decoder that produces `trigger`;
  - the Tx, Rx and equalisers;
  - the fast-bias circuit itself (only its enable is built);
  - the memory controller and DRAM;
  - stored calibration of duty-cycle distortion from the local clock
    buffers, which the architecture allows but does not detail.
- **The top does not synthesize,** because it contains the models. For
  synthesis use `addll_core` and `power_manager`, with the delay line,
  blender, ILO and buffers as analog macros on the same ports.
