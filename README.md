# Timing-error-tolerant pipeline with clock pulse correction and look-ahead clock gating

When a critical path is slow, because of voltage, temperature, process spread or
ageing, its result reaches the flip-flop after the rising clock edge. The
flip-flop stores a stale value: a timing error. This design fixes such errors
in the same clock cycle, with no replay and no extra cycle. It reopens the
flip-flop's master latch for a short pulse whenever the data input changes
while the clock is still high. The late value then runs through to Q before the
falling edge, overwriting the wrong one.

Two additions complete it:

* **Time borrowing.** When the first stage corrects an error, the second stage
  gets its input late. For that one cycle it is clocked with a delayed clock.
* **Look-ahead clock gating.** A register gets no clock pulse in a cycle where
  none of the flip-flops feeding it changed at the previous edge. That decision
  is made one cycle ahead, so it has a full cycle to reach the clock gate.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. The self-checking
testbenches are in `tb/`.

## 1. Correcting a late value: the error-tolerant flip-flop (`tet_ff`)

```
        d ──┬──────────────────────────► master latch ──m──► slave latch ──► q
            │                             (open when CM)     (open when clk)
            └► transition_detector ─ER─► master_clock_gen ─CM─┘
                                   clk ─►  CM = ~clk | ER
```

* `transition_detector` compares `d` with a copy of itself delayed by
  `PULSE_WIDTH`. A rising edge is found by `d & ~d_dly` and a falling edge by
  `~d & d_dly`. The two are ORed, so every change of `d` makes a pulse `ER`
  that lasts `PULSE_WIDTH`.
* `master_clock_gen` makes the master latch clock `CM = ~clk | ER`. While `clk`
  is low the master is open, as in any master-slave flip-flop. While `clk` is
  high it is normally closed, but an `ER` pulse opens it.
* The slave is open whenever `clk` is high. So a master that reopens in the
  high phase passes the late value straight to `q`.

The three cases on a clock with period T (the rising edge at 0):

| arrival of new `d` | what happens |
|---|---|
| before 0 (minus setup) | ordinary capture at the edge; the `ER` pulse falls in the low phase and does nothing |
| between 0 and T/2 − `PULSE_WIDTH` | `q` first keeps the old value, then takes the new one about one latch delay after `d` changed; `err` pulses |
| after T/2 | not corrected in this cycle; it is taken at the next edge like ordinary data |

The method assumes that only genuine late data can change `d` during the high
phase. It is meant for critical paths whose delay is **longer than half the
clock period**. On such a path, the next cycle's data, launched at the same
edge, cannot arrive before the falling edge. Putting `tet_ff` on short paths
would let a fast new value "correct" the register. This is the hold condition
the method depends on. The RTL does not check it.

`tet_ff` has two extra outputs:

* `err` is `ER & clk`: a correction is under way.
* `chg` is `master ^ slave`, latched while `clk` is low. It is the same flag an
  enhanced auto-gated flip-flop gives (section 3): during the high phase it says
  whether the flip-flop took a new value at the edge. A late correction is **not**
  in `chg`, because the master was still stale at the edge. That is why the
  pipeline adds the correction flag to the next stage's enable (section 4).

## 2. When the next stage is late as well: time borrowing (`time_borrow_ctrl`)

A correction in stage 1 moves that stage's output change from the edge to as
late as T/2. Stage 2's combinational logic then starts late too. If stage 2's
path is also long, its data can miss stage 2's edge and stage 2's correction
window (the high phase). `time_borrow_ctrl` then clocks stage 2 with
`CLKDD` = `CLK` delayed by `BORROW_DELAY` for one cycle. That moves stage 2's
edge and its correction window later by `BORROW_DELAY`.

```
cycle k (high phase) : stage-1 error pulse  ──► CM_SR set (SR latch)
CLK falls            : Q  <= CM_SR
CLKDD falls          : SEL <= Q         (CLK and CLKDD both low: safe switch)
                       CM_SR cleared once CLK and CLKDD are both low
cycle k+1            : CLK_TB = SEL ? CLKDD : CLK   (edge k+1 arrives BORROW_DELAY late)
```

With T = 10 ns and `BORROW_DELAY` = 3 ns, stage 2's window in the borrowed
cycle is 3 to 8 ns after the nominal edge instead of 0 to 5 ns. `SEL` changes
only at a falling edge of `CLKDD`, when both clocks are low. The switch from
`CLK` to `CLKDD` and back therefore never makes a glitch or a shortened pulse.
Errors in consecutive cycles keep `SEL` high.

Constraints:

* `BORROW_DELAY` < T/2.
* In the borrowed cycle, stage 2's ordinary next data must not reach it before
  T/2 + `BORROW_DELAY`. That is the same hold argument as in section 1, moved
  later by the borrowed delay.

## 3. Not clocking what does not change: auto-gated flip-flops and look-ahead gating

* `agff` is a master-slave flip-flop whose slave clock is `clk & (master ^
  slave)`. If the value does not change, the slave gets no pulse. If it does,
  the slave opens, copies the master, the XOR drops and the pulse ends: the
  slave pulse is self-timed. Lint tools report that feedback as a
  combinational loop. It is the intended circuit.
* `eagff` adds a latch on the XOR, transparent while `clk` is low. The raw XOR
  is valid only around the rising edge. The latched `chg` holds "this flip-flop
  took a new value at the last edge" through the whole high phase.
* `lacg_gater` ORs the `chg` flags of the flip-flops a register depends on. If
  none is set, the register's inputs cannot change, so its next clock pulse is
  suppressed. The OR is taken at the falling edge by a pair of latches. The
  first latch is transparent while the reference clock is high, when the flags
  are valid. The second is transparent while the reference clock is low. A
  latch pair is used instead of an edge-triggered flop because the flags'
  own latches reopen at that same falling edge. A standard clock-gate latch
  (transparent while the gated clock is low) and an AND gate then pass or stop
  the next pulse. The gated clock may lag the reference clock by up to half a
  period, which is what lets it gate the time-borrowing clock. During reset
  and for `WARMUP` (2) cycles after it the enable is forced on. This lets the
  registers load what their logic computes from the reset state before gating
  relies on the registers and their logic agreeing.

## 4. The pipeline (`tet_pipeline`, the top)

```
 din ─► R0: WIDTH x eagff (clk) ──q0──► [logic A, outside] ──d1──►
        R1: WIDTH x tet_ff (gclk1) ──q1──► [logic B, outside] ──d2──►
        R2: WIDTH x tet_ff (clk_tb) ──q2

 gclk1  = lacg_gater(clk,           flags: R0.chg)
 clk_tb = lacg_gater(CLK_TB,        flags: R1.chg, CM_SR)
 CLK_TB = time_borrow_ctrl(clk, err = OR of R1.err)
```

The combinational stages are not part of the module. Each register's output
and input are ports, so any logic, with any delay, can sit between them. The
latency from `din` (taken by R0 at edge e) to `q2` is two edges: `q2` holds
B(A(din)) before edge e+3.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | free-running clock; asynchronous active-low reset (hold it for at least one period) |
| `din` / `q0` | in / out | WIDTH | R0 input / R0 output to logic A |
| `d1` / `q1` | in / out | WIDTH | logic A result into R1 / R1 output to logic B |
| `d2` / `q2` | in / out | WIDTH | logic B result into R2 / pipeline output |
| `q2_chg` | out | WIDTH | R2 change flags, for gating a register after R2 |
| `err1`, `err2` | out | 1 | R1 / R2 correcting a late value |
| `tb_sel` | out | 1 | R2 is on the borrowed clock this cycle |
| `gclk1`, `clk_tb` | out | 1 | the gated clocks of R1 and R2 |
| `en1`, `en2` | out | 1 | whether the next edge of `gclk1` / `clk_tb` will pass |

Parameters (all chosen, none fixed by the method): `WIDTH` = 8,
`PULSE_WIDTH` = 1.0 ns, `BORROW_DELAY` = 3.0 ns. The shared defaults live in
`rtl/tet_pkg.sv`. All files use `` `timescale 1ns/1ps ``.

## 5. What is modelled and what a synthesis tool sees

* The method works by shaping clock pulses, so two of its parts are delays.
  `delay_buffer` is a **behavioural model** (`y <= #(DELAY) a`). It sets the
  `ER` pulse width and makes `CLKDD`. In silicon it is a buffer chain. A
  synthesis tool drops the delay, so the transition detector and `CLKDD`
  collapse. Those two paths must be hand-built or replaced by delay cells. Its
  delay is inertial: pulses narrower than `DELAY` may be filtered. Nothing in
  this design feeds it such pulses.
* The flip-flops are built from latches on purpose (`always_latch`), and the
  clocks are gated and multiplexed in logic. Lint reports these latches, the
  `agff` loop and derived clocks. They are the circuit, not mistakes.
* Setup and hold times of the latches are not modelled. The testbenches keep
  data changes at least a few hundred picoseconds away from the clock edges.
* Power is not modelled. The gating mechanisms are checked for function (which
  pulses are passed or suppressed), not for the energy they save.

## 6. Choices made here where the method leaves things open

* Edge detection: two inverter/AND detectors ORed together. The error pulse
  reaching the rest of the design is `ER & clk`.
* Time borrowing: the select is retimed to the falling edge of `CLKDD`, and
  `CM_SR` is cleared when both clocks are low. The method only says that `Q`
  is set after `CLK` falls and selects `CLKDD`.
* The change-flag output on the error-tolerant flip-flop, and adding the
  stage-1 correction (`CM_SR`) to stage 2's clock enable.
* The arrangement of the three registers: an auto-gated input register in
  front, error tolerance in both later stages, and the time-borrowing clock
  gated for R2.
* Reset behaviour, the gaters' warm-up, the data width and both delays.
* The XOR latch in `eagff` is clocked directly by `clk`. Gating that latch's
  own clock as well, a refinement that needs another XOR and OR gate, is not
  done.

## 7. Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_delay_buffer` | output equals the input as it was `DELAY` earlier, at random times |
| `tb_transition_detector` | a pulse of exactly `PULSE_WIDTH` on every rising and falling edge, nothing otherwise |
| `tb_master_clock_gen` | full truth table |
| `tb_tet_ff` | on-time, late (corrected within 0.6 ns of arrival, `err` pulses, `chg` stays 0) and too-late (not corrected until the next edge) data |
| `tb_time_borrow_ctrl` | `CM_SR`, `Q` and `SEL` timing; `CLK_TB` sampled at 8 points per cycle, including consecutive errors |
| `tb_agff` | D flip-flop behaviour; the slave pulses exactly when the value changes |
| `tb_eagff` | D flip-flop behaviour; `chg` correct through the whole high phase |
| `tb_lacg_gater` | pulse passed iff a flag was set in the preceding high phase, warm-up, no glitch or shortened pulse, for an undelayed and a 3 ns delayed clock |
| `tb_tet_pipeline` | 600 cycles at the default parameters, described below |

`tb_tet_pipeline` models logic A as `5x+3` (6 ns) and logic B as nibble swap
XOR `8'h5A` (8.5 ns), on a 10 ns clock. Random launches are made slow: A
takes 13 ns, B takes 13 ns. The input sometimes repeats. Before every edge,
`q2` is compared with the testbench's own B(A(x)). The testbench counts, and
requires at least once each: an R1 correction, an R2 correction, a time-borrowed
cycle in which a slow A is followed by a slow B (this data reaches R2 6 ns after
the edge, so only the borrowed clock catches it), a gated R1 cycle, a gated R2
cycle, and a suppressed slave pulse in R0.

Run any testbench with plain Verilator from the top of the source tree:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl rtl/tet_pkg.sv tb/tb_tet_pipeline.sv --top-module tb_tet_pipeline
./obj_dir/Vtb_tet_pipeline
```

Replace `tb_tet_pipeline` with any other testbench name. `--timing` is
required: the delay lines and the testbenches use delays.

To change the timing, override `PULSE_WIDTH` and `BORROW_DELAY` on
`tet_pipeline`, keeping within the constraints of sections 1 and 2. The
testbench's path delays are written for the defaults and a 10 ns clock.
