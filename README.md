# Oversampled digital power controller with bumpless rate switching

A digitally controlled buck converter usually has an ADC that could deliver several samples
per switching period, yet its compensator uses only one of them. Running the compensator on
every sample cuts the loop latency, but it also feeds the output-voltage ripple back into the
loop. This controller does both, at different times. In steady state a PID compensator runs
once per switching period. Sampling in step with the switching period hides the ripple. When a
load transient is detected, a PD compensator takes over and runs on every ADC sample. Once the
output has recovered, control returns to the PID. A one-off correction of the PID integrator
keeps the duty cycle from jumping at that handover.

The RTL implements the controller described in the paper "Oversampled Digital Power
Controller with Bumpless Transition Between Sampling Frequencies". It contains the sample
timing, the two-rate compensator and its mode state machine, a sigma-delta modulator and a
dead-time DPWM. The ADC and the power stage are external. The testbenches include
behavioural models of both, so the whole loop can be simulated.

## Signal chain and timing

```
           adc_start (4 per period)                          hs / ls
 switch_timing ───────────► ADC ──adc_data/valid──► compensator ──duty(12b)──► sigma_delta ──(8b)──► dpwm ──► power stage
      │ cnt (0..255)                                  ▲   mode, events                               ▲
      └───────────────────────────────────────────────┼──────────────────────────────────────────────┘
                                                  cfg_t (reference, gains, thresholds, dead-time)
```

* The clock is assumed to be 128 MHz. The 8-bit period counter then gives a 256-clock
  switching period, f_switch = 500 kHz.
* The ADC is started every 64 clocks: f_sample = 2 MHz, an oversampling factor of 4.
  Results may come back after any pipeline latency, but they must come back in request order.
* The result of the conversion started at counter 0 is the **main sample**. The
  switching-rate PID runs only on main samples.
* An ADC result goes into `compensator`. One clock later, `duty` is valid. One clock after that,
  the sigma-delta code `pwm_duty` is valid.
* The DPWM compares its counter against the duty code *live*, not once per period. A duty word
  computed in mid-period by the fast PD therefore still moves the falling edge of the current
  pulse. Without this, oversampling would gain nothing.

## The two compensators share one datapath (`pid_pd_datapath`)

The error is e = vref − adc, in ADC LSBs. The datapath has separate P, I and D paths rather than
a direct-form filter, so each path can run at its own rate:

| mode | runs on | output |
|---|---|---|
| steady state (PID) | main samples only | d = K_P,SS·e_N + K_D,SS·(e_N − e_prev_main) + d_i,N, with d_i,N = d_i,N−1 + K_I,SS·e_N |
| transient (PD) | every sample | d = d_i + K_P,T·e_N + K_D,T·(e_N − e_N−1) |
| transfer T→SS | the main sample where the mode returns | PID as above, with d_i also receiving K_cross·e_N−1 |

Hardware: four multipliers.

* K_P and K_D are each one multiplier, with its gain chosen by a multiplexer.
* K_I and K_cross have one multiplier each.

There are two derivative subtractors:

* e_N − e_N−1, at the sampling rate. It feeds the PD and the transient detector.
* e_N − e_prev_main, at the switching rate. It feeds the PID.

Three state registers hold e_N−1, the error of the previous main sample, and d_i. This matches
the resource count the source paper gives for the scheme: a PID plus one multiplier, one adder,
one subtractor, one register, five multiplexers and a state machine.

Number formats, all set in `ctrl_pkg`:

* ADC code: 10 bits.
* Error: 11-bit signed.
* Gains: 18-bit signed with 8 fractional bits, in duty LSBs per ADC LSB. For example, 23·256
  means 23.
* Internal sums: 32 bits.
* Duty word: 12 bits. 4096 would be 100 %.

The sum is shifted right by 8 (a floor) and clamped to 0..4095. The integrator is clamped to the
same range, which gives anti-windup.

## Why the handover is bumpless

When the PD hands over to the PID on sample N, the duty changes by

    Δd = (K_P,SS − K_P,T)·e_N + (derivative terms) + (d_i,N − d_bias)

Two of these terms are handled by the design:

* **Bias.** The PD uses the *held PID integrator* as its bias d_bias. This removes the
  integral-versus-bias term. It also gives the PD most of the steady-state operating point, so
  its own steady-state error stays small.
* **Derivative terms.** The return is only allowed after `ss_min` consecutive samples whose
  derivative is below the threshold. By then the derivative terms are small.

What is left is the proportional step, (K_P,T − K_P,SS)·e. It is cancelled by adding
K_cross·e_N−1 to the integrator on the transfer sample, with K_cross = K_P,T − K_P,SS. The
previous sample's error stands in for the current one. This follows the paper's
update equation; a neighbouring equation in the paper writes the step with e_N.

The cancellation is only as good as that one-sample approximation.

* In `tb_compensator` the error settles at a constant offset of 4 to 9 LSB before the return.
  The duty then changes by at most 1 code at the transfer. The same compensator without the
  K_cross update jumps by 35 codes or more.
* In the closed-loop test the largest duty change at a transfer was about 130 of 4096 codes.
  That change is mostly noise through the derivative gains. A load step itself swings the
  duty over its whole range.

Entering transient mode is deliberately *not* bumpless, because it has to be fast. The PD
computes the very sample that triggers the mode change.

## Detecting a transient (`mode_fsm`)

The error derivative of every sample, de = e_N − e_N−1, is compared with `e_thres`:
TM = |de| > e_thres. A low threshold reacts early but also catches noise. A filter therefore
rejects isolated spikes. A single bad sample produces two large derivatives of *opposite*
sign, while a real load step produces derivatives of the *same* sign.

```
            TM                      TM and same sign as before
 STEADY ───────────► FILTER ─────────────────────────────────► TRANSIENT
   ▲  ◄───────────────┘  (anything else, next sample)              │
   │                                                               │
   └──── ss_min quiet samples (!TM) counted, AND a main sample ────┘
         (transfer: PID runs + K_cross update)
```

* In STEADY and FILTER the PID keeps running on main samples.
* In TRANSIENT the PD runs on every sample.
* A sample with TM clears the quiet-sample count.
* Once enough quiet samples have been counted, the machine waits for the next main sample
  before leaving TRANSIENT. The PID then restarts exactly on its own sampling grid.

The decision is combinational on the current sample. `mode_now` is the mode that applies to it;
`state` is the registered mode.

## Sigma-delta modulator and DPWM

The 12-bit duty word is trimmed to the 8-bit DPWM by a first-order error-feedback modulator
(`sigma_delta`). The 4 bits dropped at each update are added to the next word. Over 16
updates, the 8-bit codes average exactly to the 12-bit word. In steady state a new word arrives
once per period, so the modulator dithers the duty from one period to the next. In transient
mode it steps with every PD output.

`dpwm` produces a trailing-edge pulse. The pulse starts at counter 0 and ends when the counter
reaches the code. Once ended, it cannot restart in the same period. The high-side and
low-side gates each switch on only after the modulating signal has been stable for
`cfg.deadtime` clocks:

* the high side is on for duty − deadtime clocks;
* the low side is on for 256 − duty − deadtime clocks;
* the two are never on together.

## Configuration (`cfg_t`)

| field | meaning | value used in the system test |
|---|---|---|
| vref | reference as ADC code | 825 (3.3 V at 4.096 V full scale) |
| kp_ss, ki_ss, kd_ss | PID gains (×256) | 6·256, 100, 8000 |
| kp_tr, kd_tr | PD gains (×256) | 23·256, 227·256 |
| k_cross | K_P,T − K_P,SS (×256) | 17·256 |
| e_thres | transient threshold in ADC LSBs | 3 (1023 disables transient mode) |
| ss_min | quiet samples before returning | 8 |
| deadtime | dead-time in clocks | 4 |

The source paper gives crossover frequencies but no gain values. The gains above were
designed for the test's buck stage (L = 950 nH, C = 250 µF, 12 V to 3.3 V): about 20 kHz
crossover for the PID and 55 kHz for the PD. They are a starting point, not a tuned design.

## Files

| file | contents |
|---|---|
| `rtl/ctrl_pkg.sv` | widths, `mode_e`, `cfg_t` |
| `rtl/switch_timing.sv` | period counter, ADC starts, main-sample flag |
| `rtl/mode_fsm.sv` | transient detection, spike filter, return logic |
| `rtl/pid_pd_datapath.sv` | shared PID/PD datapath with the bumpless update |
| `rtl/compensator.sv` | datapath + state machine |
| `rtl/sigma_delta.sv` | duty-resolution modulator |
| `rtl/dpwm.sv` | PWM with dead-time |
| `rtl/bumpless_controller.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_repetitive_load.sv` | closed loop under 30 fast load toggles |
| `tb/comp_model_pkg.sv` | reference model of the compensator (class) |
| `tb/adc_model.sv`, `tb/buck_plant.sv` | behavioural ADC and buck power stage (simulation only) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It also has a
watchdog that ends a hung run. To run the closed-loop system test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_bumpless_controller rtl/ctrl_pkg.sv tb/comp_model_pkg.sv \
    tb/tb_bumpless_controller.sv -o sim && obj_dir/sim
```

The unit tests run the same way with their own `--top-module`. `tb_mode_fsm`,
`tb_switch_timing`, `tb_sigma_delta` and `tb_dpwm` do not need `comp_model_pkg.sv`. All
testbenches run the modules at their default parameters. Each finishes in well under a
second of simulator time.

## How far it has been checked

* **Compensator.** Every compensator output, mode and integrator value is compared with an
  independent reference model (`comp_model_pkg`), written directly from the control equations.
  The comparison covers random gains, random execution patterns, synthetic transients and the
  closed loop.
* **Closed loop.** `tb_bumpless_controller` starts the converter from 0 V. It then applies
  5 A → 20 A → 5 A load steps twice:
  * first with transient mode disabled: undershoot about 229 mV, settling into a ±1 % band
    in about 51 µs;
  * then with it enabled: undershoot about 189 mV, settling in about 66 µs.

  The slow settling comes from the PID's integral action, which is the same in both runs.

  It also injects single-sample ADC glitches, which the filter rejects. The output is checked
  to settle within ±12 mV of 3.3 V after every event. The test counts and requires each of
  these to occur: the PID, the PD, a mid-period duty update, a filtered spike, entry to
  transient mode, a return delayed to a main sample, a transfer, sigma-delta dithering,
  dead-time, and the integrator reaching its limit.
* **Repetitive load steps.** `tb_repetitive_load` toggles the load between 5 A and 20 A 30
  times, 16 to 60 µs apart. Every edge that finds the controller in steady state must put it
  into transient mode within 2 µs. The controller must also return to steady state between
  edges. The output must stay within ±400 mV and must regulate afterwards.
* **Not reproduced.** The paper reports 175 mV, 13 µs settling and about a 50 % improvement
  over a naturally sampled PID. The improvement measured here is smaller, and settling is
  slower. The converter voltages, the ADC and
  the gains are assumptions, so the test shows that the mechanism works, not the published
  figures.

## Design choices not fixed by the source paper

* All word widths, the 128 MHz clock, and the fixed-point scaling and clamping.
* Single-cycle evaluation: one clock of latency, with no resource sharing over time.
* Which sample counts as the main one: the conversion started at counter 0.
* The steady-state criterion used for the return (!TM with the same threshold).
* The PID keeps running while the spike filter is deciding.
* The PD computes the sample that enters transient mode.
* The sigma-delta order and width.
* The trailing-edge DPWM with live compare and counter-based dead-time.
* Synchronous active-low reset into steady state, with all registers cleared.
* Gains, thresholds and the reference are run-time inputs, not constants.
