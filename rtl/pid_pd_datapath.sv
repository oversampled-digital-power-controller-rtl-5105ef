// pid_pd_datapath: shared PID / PD compensator datapath with bumpless integral update.
//
// The compensator is split into separate proportional, integral and derivative paths instead
// of a direct-form IIR filter, so that gains can be switched per mode and the integrator can
// be touched during a transfer:
//   error          e_N = vref - adc_N, every sample.
//   derivative     two subtractors: de_fast = e_N - e_N-1 at the sampling rate (also fed to
//                  the mode state machine) and de_slow = e_N - e_N-OSR between main samples.
//   proportional   one multiplier, gain K_P,T or K_P,SS selected by the mode.
//   derivative     one multiplier shared by both derivative paths, gain K_D,T or K_D,SS.
//   integral       d_i,N = d_i,N-1 + K_I,SS e_N, updated only when the PID runs.
//   bumpless path  on the transient-to-steady transfer d_i also gets K_cross * e_N-1 (eq. 6).
// The outputs are
//   PID (run_pid): d = K_P,SS e_N + K_D,SS de_slow + d_i,N            (eqs. 2, 3)
//   PD  (run_pd):  d = d_i    + K_P,T  e_N + K_D,T  de_fast           (eq. 1, d_bias = d_i)
// so the held integrator serves as the PD's bias, which removes its share of the transfer
// step. Which path runs on which sample is decided by mode_fsm.
//
// The structure follows the source paper. Number formats (see ctrl_pkg), the clamping of the
// integrator to the duty range (anti-windup), the clamping and rounding-down of the output
// and the single-cycle evaluation are this design's choices.
//
// Timing: de_fast and e are combinational from adc and the registers. When run_pid or run_pd
// is high at a clock edge, duty is loaded and duty_valid pulses for one clock, so the
// compensator latency is one clock. Reset (synchronous, active-low) clears all registers.
module pid_pd_datapath
  import ctrl_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample_valid,
  input  logic                   main_sample,
  input  adc_t                   adc,
  input  cfg_t                   cfg,
  input  logic                   run_pid,
  input  logic                   run_pd,
  input  logic                   cross_update,
  output err_t                   e,
  output logic signed [E_W:0]    de_fast,
  output duty_t                  duty,
  output logic                   duty_valid,
  output acc_t                   integ        // d_i, scaled by 2^K_FRAC
);

  localparam acc_t DI_MAX  = acc_t'(((2 ** DUTY_W) - 1) * (2 ** K_FRAC));
  localparam acc_t OUT_MAX = acc_t'((2 ** DUTY_W) - 1);

  err_t                 e_prev;      // e_N-1, sampling rate
  err_t                 e_prev_sw;   // error of the previous main sample
  logic signed [E_W:0]  de_slow, de_sel;
  gain_t                kp, kd;
  acc_t                 p_term, d_term, i_inc, x_inc, di_next, di_sum, sum, sum_q;

  always_comb begin
    e       = err_t'($signed({1'b0, cfg.vref}) - $signed({1'b0, adc}));
    de_fast = {e[E_W-1], e} - {e_prev[E_W-1], e_prev};
    de_slow = {e[E_W-1], e} - {e_prev_sw[E_W-1], e_prev_sw};

    // Mode multiplexers: gains and derivative source.
    kp     = run_pd ? cfg.kp_tr : cfg.kp_ss;
    kd     = run_pd ? cfg.kd_tr : cfg.kd_ss;
    de_sel = run_pd ? de_fast : de_slow;

    p_term = acc_t'(kp) * acc_t'(e);
    d_term = acc_t'(kd) * acc_t'(de_sel);
    i_inc  = run_pid      ? acc_t'(cfg.ki_ss)   * acc_t'(e)      : '0;
    x_inc  = cross_update ? acc_t'(cfg.k_cross) * acc_t'(e_prev) : '0;

    di_sum = integ + i_inc + x_inc;
    if (di_sum < 0)            di_next = '0;
    else if (di_sum > DI_MAX)  di_next = DI_MAX;
    else                       di_next = di_sum;

    sum   = p_term + d_term + di_next;
    sum_q = sum >>> K_FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_prev     <= '0;
      e_prev_sw  <= '0;
      integ      <= '0;
      duty       <= '0;
      duty_valid <= 1'b0;
    end else begin
      duty_valid <= 1'b0;
      if (sample_valid) begin
        e_prev <= e;
        if (main_sample) e_prev_sw <= e;
      end
      if (run_pid || cross_update) integ <= di_next;
      if (run_pid || run_pd) begin
        duty_valid <= 1'b1;
        if (sum_q < 0)             duty <= '0;
        else if (sum_q > OUT_MAX)  duty <= duty_t'(OUT_MAX);
        else                       duty <= duty_t'(sum_q);
      end
    end
  end

  // The two compensators never run on the same sample, and only on a sample.
  assert property (@(posedge clk) disable iff (!rst_n) !(run_pid && run_pd));
  assert property (@(posedge clk) disable iff (!rst_n) (run_pid || run_pd) |-> sample_valid);

endmodule
