# Auto-tuning digital PID controller

A PID controller is only as good as its three gains, and finding them by hand
takes time and experience. This design puts both halves of the job in one
small FPGA: it measures the process with an open-loop step test, derives a
first-order-lag-plus-dead-time (FOPDT) model from the response, turns the model
into PI or PID gains with Dahlin's rules, and then runs the PID loop with those
gains. The tuning rule aims at a closed-loop response that overshoots by at most 5 %.
To spare logic, the PID arithmetic runs as a short sequence on a few shared
adders and multipliers.

The controller sits between a 10-bit ADC (process variable, PV) and a 12-bit
DAC (controller output, Vo). In the reference application, the DAC drives a
4-20 mA signal into the phase-angle power control of an oven heater. The
converters, the current loop and the plant are not part of the RTL.

```
            +--------------+   tick   +-----------------------------+
 period --->| sample_timer |--------->| autotune_ctrl               |
            +--------------+    |     |  step test -> sample_ram    |
                                |     |  newton_extrapolator (dcs)  |-- mv --+
 pv ----------------------------+---->|  crossing search t0,t1,t2   |        |
                                |     |  dahlin_calc (K,tau,gains)  |        |
                                |     +-------------+---------------+        v
                                |          accept -> load gains, preset    [mux]--> vo
                                |     +-------------v---------------+        ^
 sp ----------------------------+---->| pid_processor               |-- vo --+
                                      |  3 processes, shared ops    |
                                      +-----------------------------+
```

## The PID processor (`pid_processor`)

The controller uses the incremental ("velocity") form of the discrete PID law:

    Vo[n] = Vo[n-1] + (Kp+Ki+Kd)*e[n] - (Kp+2Kd)*e[n-1] + Kd*e[n-2],   e[n] = SP - PV

with `Ki = Kp*dT/Ti` and `Kd = Kp*Td/dT` (dT is the sampling period). This form
has no integrator that can wind up. A change of gains also causes no jump, because only
increments are added to the previous output.

The hardware has four operators: one 3-input adder, one 2-input adder and two
multipliers. Each sample runs in three steps, one clock each:

| step | 3-input adder | 2-input adder | multiplier A | multiplier B |
|------|---------------|---------------|--------------|--------------|
| 1 | Kp + Ki + Kd | Kp + (Kd << 1) | - | Kd * e[n-2] |
| 2 | Kd*e[n-2] + Vo[n-1] + 0 | - | (Kp+Ki+Kd) * e[n] | (Kp+2Kd) * e[n-1] |
| 3 | A - B + (step 2 sum) | - | - | - |

A `start` pulse samples SP, PV and the gains. `done` pulses four clocks later,
in the same clock as `vo` changes. The sampling period must therefore be at
least five clocks.

Number formats:

* SP and PV are unsigned 10-bit codes. The error is 11-bit signed, because the
  difference of two 10-bit codes spans -1023..1023.
* Kp, Ki and Kd are unsigned 8-bit with 4 fraction bits, which gives 0 to 15.94
  in steps of 1/16. Gains from the Dahlin rules are often below 1, so integer
  gains would be too coarse.
* Vo[n-1] is held with the same 4 fraction bits (16 bits in total). This lets
  increments smaller than one output code add up instead of being lost. The
  accumulator saturates at 0 and at 4095.9375. `vo` is its integer part.
* The shared 3-input adder is 22 bits wide, not the 20 bits of the original
  sizing. The first product alone can reach 765 x 1023, which needs 21 signed bits.
  The final sum needs 22.

`preset` loads Vo[n-1] and clears the error history. The top level uses it to
take over from the step test without a bump.

## The step test and identification (`autotune_ctrl`)

A tuning run works as follows. All times count sampling periods, with the
step applied at instant 0.

1. **Step.** At the first tick after `tune_start`, the present PV is stored as the
   baseline c0, and the output steps from `mv_base` to `mv_base + dm`.
2. **Record.** At every tick, `dc = PV - c0` (0 if negative) is written to a
   1024-word RAM (`sample_ram`).
3. **Response start.** The response counts as started at the first `dc` of at
   least 31 codes, which is 3 % of the ADC range.
4. **Final value by extrapolation.** From the response start on, every
   `ext_step`-th sample enters a three-sample window. For equally spaced samples
   x0, x1, x2, the quadratic Newton polynomial predicts
   `x3 = x0 - 3x1 + 3x2` and `x4 = 3x0 - 8x1 + 6x2`. While `x4 > x3`, the response
   is still rising, and the window slides on by one sample. Once `x3 >= x4`,
   the predicted curve has levelled off, and `x3` becomes the steady-state
   change `dcs`. This avoids waiting for the process to settle fully.
5. **Crossings.** The record is scanned once. t0, t1 and t2 are the first
   instants with `dc` at or above 3 %, 28.3 % and 63.2 % of `dcs`. In the
   FOPDT model, t1 = t0 + tau/3 and t2 = t0 + tau. The hardware uses the
   fractions 31/1024, 290/1024 and 647/1024.
6. **Gains.** `dahlin_calc` computes the model and the gains (next section).
   Then `tune_ready` rises.
7. **Decision.** `accept` copies the gains into the gain registers and presets
   the PID processor with the test output. `reject` discards them.

Fall-backs:

* If the 1024-word record fills before the extrapolation settles, the last
  sample is used as `dcs`.
* If the response never reaches 31 codes, the run ends with `tune_fail`.
* A crossing that is not in the record is set to the last recorded instant.

**Choosing `ext_step`.** For an exponential, the settle test depends only on
the ratio r = exp(-ext_step/tau) between successive increments. `x3 >= x4`
holds as soon as r <= 2/3, that is `ext_step >= 0.41*tau`.

* A large `ext_step` therefore stops at once. The estimate then falls short of
  the true final value, by up to a quarter of the rise still to come.
* A small `ext_step` (r > 2/3) waits until the ADC steps flatten the curve near
  its end. The estimate is then close to the final value, but the test takes
  longer.

Size the record for the slower case: 1024 sampling periods must cover the
settling time.

## Dahlin tuning (`dahlin_calc`)

The inputs are t0, t1, t2, dcs and dm. The calculation uses these rules:

    tau  = 1.5 * (t2 - t1)          K = dcs / dm
    closed-loop lag tau_c = t0
    Kp   = tau / (K * (tau_c + t0)),   Ti = tau,   Td = t0 / 2
    PID mode if t0 > tau/4, otherwise PI mode (Td = 0)

Time is counted in sampling periods, so dT = 1. Each gain then reduces to one
integer quotient:

    Kp = 3(t2-t1)*dm / (4*t0*dcs)
    Ki = dm / (2*t0*dcs)
    Kd = 3(t2-t1)*dm / (8*dcs)

Each quotient is scaled by 16, rounded down and limited to 255. One 32-bit
serial divider computes the four quotients (K, Kp, Ki, Kd), about 140 clocks
in all. t0 = 0 and t2 <= t1 are treated as 1.
K is reported in Q8.8 format.

The gains are in units of output codes per PV code. A process with a long dead
time relative to its lag gets a large Kd, often saturated at 255 (15.94).

## Top level (`pid_autotune_top`)

* `sample_timer` emits `tick` every `period` clocks. The step test and the PID
  loop use the same sampling period.
* While a tuning run is active (`tuning` or `tune_ready`), `vo` is the step-test
  output. Otherwise `vo` is the PID output.
* The PID processor runs on every tick while `ctrl_en` is high and no tuning
  run is active.
* `gain_we` writes hand-set gains (`kp_in`, `ki_in`, `kd_in`). It is ignored
  during tuning.
* `t0`, `t1`, `t2`, `tau`, `dcs` and `k_gain` show the identified process model.
  `prop_kp`, `prop_ki`, `prop_kd` and `prop_mode` show the proposed gains, so
  the operator can judge them before accepting.
* `kp`, `ki`, `kd` and `mode` are the active gains. `mode` tells whether they
  are PI or PID.

All state resets asynchronously on `rst_n` low. The response RAM is not reset;
only written words are read.

## Departures and choices

The following follow the original method:

* the velocity-form PID equation
* the three-step schedule on shared operators
* the 10/8/12-bit widths of SP, PV, gains and Vo
* the 3 %, 28.3 % and 63.2 % points, and tau = 1.5(t2 - t1)
* extrapolation of the final value with a three-point Newton polynomial
* the Dahlin rules, with tau_c = t0 and the t0 > tau/4 test between PI and PID
* the operator's accept step

The following are this design's own choices:

* the gain and accumulator fraction bits
* the 22-bit adder and 11-bit error
* the response RAM, and the 1024-sample record
* the response-start threshold of 31 codes
* using a run-time input for the sampling period and the extrapolation spacing
* the fall-backs, and the behaviour of reject
* the manual gain write
* the bumpless preset

How well the estimate of the final value works depends on `ext_step`, as
described above. With a large spacing, the identified tau comes out short, and
Kp and Kd come out larger than the model values.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/pid_pkg.sv \
        tb/tb_pid_autotune_top.sv --top-module tb_pid_autotune_top -o sim
    ./obj_dir/sim

| testbench | what it checks |
|-----------|----------------|
| `tb_pid_processor` | 500 random and directed samples against an integer model of the PID law; the 4-clock latency; preset; both saturation limits |
| `tb_newton_extrapolator` | predictions and settle flag against divided differences, on random and exponential data |
| `tb_dahlin_calc` | 300 random cases against the rules in their textbook form; PI and PID cases; saturation; degenerate inputs |
| `tb_autotune_ctrl` | FOPDT responses, a ramp (record fills) and a flat response (failure) against a reference model of the whole identification; accept and reject |
| `tb_sample_timer` | tick spacing for several periods; enable |
| `tb_pid_autotune_top` | end-to-end test at default sizes (see below) |
| `tb_oven_workload` | the oven experiments on a model: tune, then hold 60 C; restart, tune, then go from 50 C to 70 C |

`tb_pid_autotune_top` closes the loop around `tb/fopdt_plant.sv`, a behavioural
FOPDT model. The scenario:

1. Hand-set gains with a set-point step.
2. Tuning on a long-dead-time process. The first run is rejected, the second
   accepted. Then a set-point step.
3. Tuning on a short-dead-time process, accepted, then a set-point step.
4. Tuning on a process that does not respond.

The testbench checks every PID update against a model. It also checks that
each loop settles on its set point with less than 5 % overshoot. Finally, it
counts each mechanism (manual gains, PI mode, PID mode, accept, reject,
failure, bumpless preset, output saturation) and fails if one never occurs.

With the plant model used (gain 0.25 PV codes per output code, tau 30 sampling
periods, dead time 12), tuning selects PID. With tau 40 and dead time 3, it
selects PI. Both loops reach their set point without overshoot.

`tb_oven_workload` uses an oven model whose scaling is assumed: 0.1 C per ADC
code, 25 C ambient, about 100 C rise at full output, a time constant of 60
sampling periods and a dead time of 10. The two tuning runs take 232 and 186
sampling periods. The first run, with a test step of 1000 output codes,
chooses PI. The second run, with a step of 500, lands just past the t0 > tau/4
boundary and chooses PID. All three set points are reached within 1 C,
without overshoot.
