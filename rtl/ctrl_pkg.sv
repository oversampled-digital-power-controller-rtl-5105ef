// ctrl_pkg: types and constants shared by the oversampled bumpless power controller.
//
// The controller samples the converter output N = OSR times per switching period and runs
// either a PID compensator once per switching period (steady-state mode) or a PD compensator
// on every sample (transient mode). This package fixes the number formats used between the
// blocks and the run-time configuration bundle (reference, gains, thresholds).
//
// Number formats (the oversampling factor of four follows the source paper; every width is this
// design's own choice):
//   * ADC code:   ADC_W-bit unsigned.
//   * Error e:    E_W-bit signed, e = vref - adc, in ADC LSBs.
//   * Gains:      K_W-bit signed fixed point with K_FRAC fractional bits, in duty LSBs per
//                 ADC LSB.
//   * Sums:       ACC_W-bit signed, duty LSBs scaled by 2^K_FRAC.
//   * Duty:       DUTY_W-bit unsigned; 2^DUTY_W corresponds to a duty cycle of 100 %.
//   * DPWM code:  PWM_W-bit unsigned; the sigma-delta modulator removes SD_W = DUTY_W-PWM_W bits.
package ctrl_pkg;

  localparam int unsigned OSR    = 4;             // samples per switching period
  localparam int unsigned PWM_W  = 8;             // DPWM counter width, period = 2^PWM_W clocks
  localparam int unsigned ADC_W  = 10;            // ADC resolution
  localparam int unsigned E_W    = ADC_W + 1;     // signed error
  localparam int unsigned K_W    = 18;            // gain word (one 18x18 FPGA multiplier)
  localparam int unsigned K_FRAC = 8;             // fractional gain bits
  localparam int unsigned DUTY_W = 12;            // compensator output
  localparam int unsigned SD_W   = DUTY_W - PWM_W;
  localparam int unsigned ACC_W  = 32;            // internal sums and integrator
  localparam int unsigned CNT_W  = 6;             // steady-state sample counter

  typedef logic        [ADC_W-1:0]  adc_t;
  typedef logic signed [E_W-1:0]    err_t;
  typedef logic signed [K_W-1:0]    gain_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic        [DUTY_W-1:0] duty_t;
  typedef logic        [PWM_W-1:0]  pwm_t;

  // Operation modes of Fig. 4: steady state, one-sample noise filter, transient.
  typedef enum logic [1:0] {
    MODE_SS     = 2'd0,
    MODE_FILTER = 2'd1,
    MODE_TR     = 2'd2
  } mode_e;

  // Run-time configuration, normally held in a register bank written by the host.
  typedef struct packed {
    adc_t                  vref;      // output-voltage reference as an ADC code
    gain_t                 kp_ss;     // K_P,SS
    gain_t                 ki_ss;     // K_I,SS
    gain_t                 kd_ss;     // K_D,SS
    gain_t                 kp_tr;     // K_P,T
    gain_t                 kd_tr;     // K_D,T
    gain_t                 k_cross;   // K_cross = K_P,T - K_P,SS, eq. (6)
    logic [E_W-2:0]        e_thres;   // transient threshold on |e_N - e_N-1|
    logic [CNT_W-1:0]      ss_min;    // consecutive quiet samples before leaving transient mode
    logic [PWM_W-1:0]      deadtime;  // dead-time in clock cycles
  } cfg_t;

endpackage
