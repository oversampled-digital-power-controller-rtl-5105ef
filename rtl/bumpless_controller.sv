// bumpless_controller: oversampled digital controller for a buck converter with bumpless
// transition between a switching-rate PID and a sampling-rate PD compensator.
//
// Signal flow: switch_timing starts the external ADC OSR times per switching period; each
// returned sample goes to the compensator, which runs the PID once per period in steady state
// and the PD on every sample during a transient (mode_fsm decides, with spike filtering and a
// bumpless return). Every new duty word passes through the sigma-delta modulator, which
// trims it to the DPWM resolution, and the DPWM turns it into high-side and low-side gate
// signals with dead-time. This chain (ADC, Comp, sigma-delta, DPWM) follows the source paper;
// the ADC and the power stage are outside this module.
//
// Interface:
//   cfg                  run-time configuration (reference, gains, thresholds, dead-time).
//   adc_start            one-clock conversion request, OSR per period.
//   adc_data/adc_valid   conversion results, in the order they were requested; results of
//                        conversions requested before reset must not be delivered.
//   hs, ls               gate signals of the high-side and low-side switch.
//   mode, duty, integ,
//   pwm_duty, ev_*       status and monitoring (mode is the compensator-activity signal).
// Timing: one clock from adc_valid to duty, one more to pwm_duty; the DPWM compares the
// duty code live, so a new code can still move the falling edge of the current period.
module bumpless_controller
  import ctrl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cfg_t   cfg,
  output logic   adc_start,
  input  adc_t   adc_data,
  input  logic   adc_valid,
  output logic   hs,
  output logic   ls,
  output logic   pwm,
  output mode_e  mode,
  output duty_t  duty,
  output logic   duty_valid,
  output acc_t   integ,
  output pwm_t   pwm_duty,
  output logic   pwm_duty_valid,
  output logic   period_start,
  output logic   main_sample,
  output logic   ev_tm,
  output logic   ev_cross
);

  pwm_t cnt;

  switch_timing u_timing (
    .clk, .rst_n, .adc_valid, .cnt, .period_start, .adc_start, .main_sample
  );

  compensator u_comp (
    .clk, .rst_n, .sample_valid(adc_valid), .main_sample, .adc(adc_data), .cfg,
    .duty, .duty_valid, .mode, .integ, .ev_tm, .ev_cross, .e()
  );

  sigma_delta u_sd (
    .clk, .rst_n, .in_valid(duty_valid), .duty_in(duty), .pwm_duty, .out_valid(pwm_duty_valid)
  );

  dpwm u_dpwm (
    .clk, .rst_n, .cnt, .duty(pwm_duty), .deadtime(cfg.deadtime), .pwm, .hs, .ls
  );

endmodule
