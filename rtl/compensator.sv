// compensator: the variable-sampling-rate compensator (two linked compensators).
//
// Combines the shared PID/PD datapath with the operation-mode state machine. Every ADC sample
// updates the sampling-rate derivative; the state machine classifies the sample and selects
// which compensator executes on it:
//   * steady state (and the spike-filter state): the PID runs on main samples only, i.e. at
//     the switching frequency, so the output ripple is not fed back;
//   * transient: the PD runs on every sample, at the full sampling frequency;
//   * transient -> steady transfer (main sample only): the PID runs and the integrator also
//     receives the K_cross * e_N-1 update for a bumpless transfer.
// This split follows the source paper. The interface and the one-clock latency are this design's
// choice.
//
// Interface / timing: present adc together with sample_valid (and main_sample on the
// switching-rate sample). One clock later duty is updated and duty_valid pulses when one of
// the compensators executed. mode is the registered operation mode; the event outputs pulse
// with the sample that caused them.
module compensator
  import ctrl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sample_valid,
  input  logic   main_sample,
  input  adc_t   adc,
  input  cfg_t   cfg,
  output duty_t  duty,
  output logic   duty_valid,
  output mode_e  mode,
  output acc_t   integ,
  output logic   ev_tm,          // transient criterion met on this sample
  output logic   ev_cross,       // bumpless transfer on this sample
  output err_t   e               // error of the current sample, vref - adc
);

  logic signed [E_W:0] de_fast;
  logic                run_pid, run_pd, cross_update, tm;

  pid_pd_datapath u_dp (
    .clk, .rst_n, .sample_valid, .main_sample, .adc, .cfg,
    .run_pid, .run_pd, .cross_update,
    .e, .de_fast, .duty, .duty_valid, .integ
  );

  mode_fsm u_fsm (
    .clk, .rst_n, .sample_valid, .main_sample,
    .de(de_fast), .e_thres(cfg.e_thres), .ss_min(cfg.ss_min),
    .state(mode), .mode_now(), .tm, .run_pid, .run_pd, .cross_update
  );

  assign ev_tm    = sample_valid && tm;
  assign ev_cross = cross_update;

endmodule
