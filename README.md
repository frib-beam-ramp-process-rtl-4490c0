# Beam ramp process checker

When the beam on a target restarts after a trip, the beam power must not jump to full
power. Instead it has to climb gradually. The beam is gated into pulses by a chopper.
A cold-start ramp raises the power by first raising the pulse repetition frequency
(PRF) and then the pulse width (PW). This design watches that ramp from the gate
signal alone. If any pulse, or the beam-on time of any machine cycle, leaves its
tolerance envelope, it raises a fault and asks for the beam to be switched off.

It checks at two levels:

* The **micro checker** checks every pulse's width and cycle time against a window
  computed in advance for that pulse. It reacts within one clock of a pulse running
  too long.
* The **macro checker** checks the total beam-on time (BT) of each 10 ms machine
  cycle (MC) against the integral of PRF × PW over that cycle. It catches slow drifts
  that stay inside the per-pulse windows.

Everything runs on one 80.5 MHz clock, and every time is a count of that clock.
For example, 0.6 µs = 49 counts, a 40 µs cycle = 3220 counts, and 10 ms = 805000
counts.

## The ramp being checked

Each 10 ms machine cycle starts with a 50 µs diagnostic notch (4025 counts) in which
no beam is allowed. Ramping happens in the remaining 9.95 ms. The reset configuration
describes this ramp:

| stage | what ramps | from → to | rate | length |
|---|---|---|---|---|
| step 1 | PRF, PW held at 0.6 µs | 2 → 25 kHz | 770 Hz/s | 30 s (3000 MC) |
| step 2 | PW, PRF held at 25 kHz | 0.6 → 5 µs | 0.15 µs/s | 30 s |
| step 3 | PW | 5 → 20 µs | 0.38 µs/s | 40 s |
| step 4 | PW | 20 → 39.4 µs | 0.049 µs/s | 393.6 s |
| transition | 25 kHz / 39.4 µs interleaved with 12.5 kHz / 79 µs | | | `trans_mc` MCs (30) |
| full power | one 9.95 ms pulse per MC | | | until disabled |

Stages change only at MC boundaries. `ramp_control` counts MCs from the moment the
ramp is enabled, and each step lasts its configured `dur_mc`. There is no
stage-detection logic: the checker expects the pulse generator to run the same
schedule.

## Pulse counter (`pulse_counter`)

There are three places to watch the gate:

* the timing-system gate (`gate_gts`);
* the HV switch (`gate_hv`);
* the chopper-plate current (`gate_cp`).

`src_sel` (control register bits 3:2) selects one of them. A two-flop synchroniser
brings it into the clock domain. Three counters run on it:

* **PW**: the clocks the gate is high. `tw_rdy` pulses after the falling edge, with
  the width in `tw_last`.
* **Cycle**: rising edge to rising edge, also ended by the MC tick. `tc_rdy` pulses
  with `tc_last`. Ending the cycle at the tick makes the last pulse of an MC measure
  up to the MC end. That is the quantity the look-ahead logic predicts.
* **BT**: the clocks the gate is high between two MC ticks. `mc_rdy` pulses with
  `bt_last`.

The running counts (`tw_count`, `tc_count`, `bt_count`) are also brought out. The
range checkers can then fault while a count is still running.

## Micro checker: envelope per pulse

### The equations

While one pulse runs, the next pulse's envelope is computed by `micro_dsp`. It is
predicted from the time since the step began (`step_time`) at which the next pulse is
expected to start:

```
base   = init + rate · t / 80.5e6                         (value of the ramping quantity)
F, W   = (base, pw_const)   in step 1      (PRF ramps)
       = (prf_const, base)  in steps 2-4   (PW ramps)
cmin   = 80.5e6 / (F + tol_f)     cmax = 80.5e6 / (F - tol_f)
pwmax1 = W · cmax / cmin          (cycle stretched within tolerance, duty kept)
pwmax2 = W · left / cmin          (cycle extended to the end of the MC)
pwmin  = W · cmin / cmax
```

The PW bounds keep the duty cycle: if the cycle is allowed to be longer, the pulse
may be proportionally wider. `tol_f` is the PRF tolerance in Hz (100 Hz by default).

### Look-ahead: the end of the machine cycle

The hard part is the end of each MC. The PRF rises from pulse to pulse, so the last
pulses seldom divide the remaining time exactly. The generator then stretches or
shortens the last pulse so that it ends at the MC boundary, and scales its PW along
with it.

`look_ahead` takes `left`, the time from the predicted start of the next pulse to
the end of the MC. With `avail = left − notch` it decides:

| condition | decision | cycle window | PW window |
|---|---|---|---|
| `avail ≥ 2·cmax` | maintain | [cmin, cmax] | [pwmin, pwmax1] |
| `cmax ≤ avail < 2·cmax` | extend: this pulse runs to the MC end, because a second one would not fit | up to `left` | up to `pwmax2` |
| `avail < cmax` | shrink: the pulse is cut by the notch | down to what is left | down to `pw_start` |

Every window also keeps the unchanged pulse inside it. A generator that decides to
keep the planned cycle, or that ends the cycle a pulse earlier, therefore does not
fault. The cycle bounds are then widened by `cyc_step`, the pulse-cycle ramp step
(4000 counts ≈ 50 µs). The PW bounds are widened by `tol_w` (10 counts ≈ 0.12 µs).

Worked example, step 4 near its end: 25 kHz, so the cycle is 3220 counts and W ≈ 39 µs.

* With 120 µs left after the notch, a second 40 µs pulse does not fit after the next
  one. The next pulse may therefore extend to 120 µs, with its PW up to three times
  the normal value.
* With less than one cycle left, the pulse may shrink, and its PW may fall to the
  0.6 µs start width.

### Timing

`micro_checker` starts the DSP twice in each MC:

* at the MC start (`calc_mc`), for the first pulse, which is predicted to start
  right after the notch;
* at every rising edge (`pulse_start`), for the following pulse, which is predicted
  to start one `cmax` later.

The DSP takes 52 clocks (0.65 µs). The shortest cycle is 3220 clocks, so the result
is in the "next" registers long before the pulse it belongs to. At that pulse's
rising edge they become the "current" envelope. The current envelope is
`tc_max_exp`/`tc_min_exp` and `tw_max_exp`/`tw_min_exp`, and the decision is on `la`.

In the transition period and at full power there is no ramp equation. The envelopes
come from two configured windows, `env_trans` and `env_full`. In IDLE nothing is
checked.

### Fault rule (`range_checker`)

The same rule serves PW, cycle and BT:

* A fault is raised one clock after the running count exceeds the maximum, without
  waiting for the count to end.
* A fault is raised at the done strobe if the final count is below the minimum.
  "Too short" can only be known at the end.

Faults are sticky until cleared through the control register. `fault_evt` pulses
once for each detection.

## Macro checker: beam-on time per machine cycle

Over an MC of T clocks the expected beam-on time is the integral of F(t)·W(t). One
of the two factors is constant and the other is linear, so the integral is exact
with the midpoint value. No beam flows during the notch, so the integral runs only
over the beam-allowed part of the MC, Tb = T − notch (800975 clocks). `macro_dsp` works it out once per MC, in this order:

```
S1  (first MC of a step)  X = init, Y = held value     X ramps, Y is held
S2  inc = (X + rate·T/80.5e6/2) · Y                    BT per second in this MC
S3  hi  = inc + E        S4  lo = inc − E              E: tolerance, counts per second
S5  bt_max = hi · Tb/80.5e6
S6  bt_min = lo · Tb/80.5e6
S7  X = X + rate·T/80.5e6                              value at the next MC start
S8  compare (range_checker in macro_checker)
```

Units:

* In step 1, X is the PRF in Hz and Y the PW in counts. The product is BT counts per
  second.
* In steps 2–4, X is the PW and Y the PRF.
* E is given per second. The lab tolerances of 400, 550, 1900 and 5550 counts per
  10 ms MC are 40000, 55000, 190000 and 555000 counts/s.

The DSP takes 42 clocks (46 when S1 runs). The BT check is active only in steps 1–4.

## Floating-point operators and the two sequencers

Both DSPs use IEEE-754 single-precision operators, each with one clock of latency
and an `in_valid`/`out_valid` pair:

* `fp_add`: add, or subtract with `sub`;
* `fp_mul`;
* `fp_div`;
* `fp_fix2flt`: an unsigned fixed-point input with a run-time number of fraction
  bits;
* `fp_flt2fix`: round to nearest; negative values give 0 and large values saturate.

Add, multiply and divide truncate their results, and none of them handles
denormals, infinities or NaN. Within the checker's range (1 to 1e10) this costs at
most one unit in the last place, about 6e-8 relative. That is far below any
tolerance.

Each DSP is a small fixed program held in a `case` function. One instruction is
issued every two clocks (issue, then write back into an 8-entry register file). The
sequencing is simple and every operator is shared. The two DSPs use the same
operator modules but separate instances.

## Control, registers and records (`ramp_control`)

A 32-bit word port (`cfg_we`, `cfg_addr`, `cfg_wdata`, `cfg_rdata`) connects to the
embedded processor. Reads are combinational.

| address | contents |
|---|---|
| 0x00 | control: bit 0 enable ramp, bit 1 clear faults (self-clearing), bits 3:2 source select |
| 0x10 + 4·s + k | step s (0..3) field k: 0 init (Hz or counts), 1 rate (Hz/s or counts/s, 8 fraction bits), 2 duration in MCs, 3 BT tolerance per second |
| 0x20–0x28 | held PRF (Hz), held PW, start PW, PRF tolerance (Hz), PW tolerance, cycle ramp step, MC length, notch length, transition length (MCs) |
| 0x30–0x33 | transition envelope: cycle max, cycle min, PW max, PW min |
| 0x34–0x37 | full-power envelope, same order |
| 0x40 | status (read): bits 2:0 stage, 5:3 faults `{bt,tc,tw}`, 15:8 low byte of `dropped` |
| 0x41 | MCs since the ramp started (read) |

The reset values are the ramp in the table above, so the checker works without any
register writes.

Two record streams go to two external memories. Each uses valid/ready and a 128-bit
`rec_t`:

* port 0 gets one record per pulse, at `tc_rdy`;
* port 1 gets one record per MC, at `mc_rdy`.

A record holds the stage, the faults and the look-ahead decision. It also holds two
triples of count, max and min, each 20 bits and saturating:

* pulse record: cycle and PW;
* MC record: BT, and the MC index in `cnt_b`. The BT bounds mean something only
  in steps 1–4. In the transition period and at full power they still hold the
  last step's values.

Each port buffers one record. A record that arrives while the previous one is still
waiting is dropped, and `dropped` counts the loss.

A 500 s ramp gives about 12.0 M pulse records:

* step 1: about 0.41 M;
* 25 kHz for 463.6 s: 11.6 M.

At 16 bytes each that is 192 MB, and the MC records take 0.8 MB. Both fit 256 MB
memories.

## Top level (`ramp_checker_top`)

The top wires the pulse counter, both checkers and the control block together.

| port | direction | meaning |
|---|---|---|
| `gate_gts`, `gate_hv`, `gate_cp` | in | the three asynchronous gate observations |
| `mc_tick` | in | one clock at each MC start, from the timing receiver |
| `cfg_*` | in/out | register port |
| `faults[2:0]` | out | sticky faults `{bt, tc, tw}` |
| `fault_evt[2:0]` | out | one-clock pulse per detection |
| `beam_off` | out | OR of `faults`, registered: one clock after a fault |
| `stage` | out | current ramp stage |
| `rec0*`, `rec1*` | out | the two record streams, with their ready inputs |
| `dropped` | out | records lost |

Latency from the gate pin:

* An over-long pulse or cycle goes through about two clocks of synchroniser and edge
  detection, then one clock in the range checker, then one clock to `beam_off`.
* A short pulse, cycle or MC is faulted at its done strobe.

## Where this design departs from, or adds to, the original description

* **Not in the RTL.** The processor, its Ethernet/UDP and UART links, the DDR3
  memories with their controllers, and the timing-system receiver are outside it.
  Their connections are the top's ports: register port, record streams, gate
  inputs and `mc_tick`.
* **One source at a time.** The three gate observations are selected by register,
  not checked in parallel.
* **Meaning of the tolerances.**
  * The PRF tolerance turns one expected PRF into a cycle window, by dividing by
    F ± tol_f.
  * The cycle ramp step and the PW tolerance are added to the windows afterwards.
  * E is taken per second, so that S3/S4 add it before the scaling by time.
* **BT over the beam-allowed time.** The BT envelope is scaled by the MC length
  minus the notch, not by the whole MC. With the whole 10 ms, the expected BT
  is 0.5 % too high. At the end of step 3 (20 µs PW, 400000 counts) that 0.5 %
  is more than the 1900-count tolerance. A clean ramp would then fault.
* **Start time of the next pulse.** It is predicted as the current start plus
  `cmax`, and the first pulse of an MC right after the notch. Eq. 1 uses the step's
  start value plus rate × time, not a pulse-by-pulse accumulation. The two agree
  and the first one does not drift.
* **Transition period and full power.** These have only fixed windows from
  registers, not a computed envelope. The default transition window (cycle up to
  17000, PW up to 17000 counts) covers the interleaved 12.5 kHz / 79 µs pulses.
* **No BT check outside steps 1–4.**
* **Sticky faults, the clear bit, the register map, the record layout and the
  one-record output buffers** are this design's own.
* **The DSP sequencing** is this design's own. Its latencies (0.65 µs and 0.52 µs)
  match the "about 1 µs" measured on the original.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* **Floating-point operators**: random and edge operands, compared with real
  arithmetic to within one unit in the last place.
* **DSPs**: compared with the equations in real arithmetic, including latency
  (52 and 42/46 clocks).
* **`look_ahead`**: all three decisions and their boundaries.
* **`pulse_counter`, `range_checker`, `ramp_control`, both checkers**: directed
  pulse trains and register sequences.
* **`tb_ramp_checker_top`**: a behavioural generator (`tb_ramp_gen`) plays a
  shortened ramp with a 1 ms MC and fast rates through all seven stages. Checks:
  * the stage sequence;
  * every pulse record against its envelope;
  * every MC's BT against an independent count;
  * `beam_off` against the faults on every clock.

  It injects an over-wide pulse, a short cycle and missing pulses. Each one must
  fault. Then a clear must reset the faults. It also counts the extend and shrink
  decisions, dropped records and register read-back, and fails if any of these
  never happens.
* **`tb_ramp_checker_full`**: the top with every default, including the 10 ms MC and
  the cold-start rates and tolerances. Only the stage durations are written, to
  2 MCs each, so every stage is reached within about 15 MCs (0.15 s of beam time).
  Every pulse and MC record is checked against independent computation. As a
  timing-system generator does, the test generator builds the step 1 cycles from
  whole multiples of 40 µs (PRFs of 25 kHz / n). It mixes neighbouring n from pulse
  to pulse so that the mean PRF follows the ramp. The checker must accept this
  jitter.
* **`tb_ramp_checker_ends`**: the same, but each step's start value is moved close
  to its end value (23.56 kHz, 4.9, 19.9 and 39.25 µs). This covers the pulses at
  the largest widths of each step, including step 4's 39.4 µs pulses at 25 kHz.
  There the last pulses of an MC are extended to the MC end or cut by the notch,
  and both cases must occur.

A full 500 s ramp (50000 MCs, 12 M pulses) was not simulated. The two full-size
testbenches together cover the start and the end of every step at real rates and
sizes, but not the long stretches in between.

To run a testbench with Verilator (5.x, `--timing`):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ramp_pkg.sv tb/tb_fp_util.sv tb/tb_ramp_checker_top.sv \
    --top-module tb_ramp_checker_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

## Limits

* Accuracy is single-precision. The cycle window near 2 kHz (40250 counts) is
  computed to about 0.003 counts.
* Counts are 32 bits and the step timer 40 bits (longest step 3.2e10 clocks). Record
  fields are 20 bits, which is enough for one 10 ms MC.
* The checker trusts `mc_tick` to be one clock wide and regular. A missing tick
  shows up as a long cycle and a high BT.
