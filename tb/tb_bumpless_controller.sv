// tb_bumpless_controller: closed-loop, end-to-end test of the controller at its default
// parameters, with behavioural models of the ADC (20-clock latency, 1 LSB noise, 4.096 V full
// scale) and the buck power stage (12 V in, 3.3 V out, L = 950 nH, C = 250 uF).
//
// Sequence: start-up from 0 V; 5 A -> 20 A -> 5 A load steps with the transient mode
// disabled (threshold at full scale: a switching-rate PID only); the same steps with the
// transient mode enabled; single-sample glitches injected into the ADC in steady state.
// Checked: every compensator output against the reference model fed with the same ADC
// codes (one-clock latency), every sigma-delta code and the modulating signal against their
// own models, no overlap of the gate signals, regulation to the reference before each step, a smaller undershoot
// after the load step-up with the transient mode than without, and a bounded duty change at each bumpless
// transfer. Each mechanism must occur at least once.
module tb_bumpless_controller;
  import ctrl_pkg::*;
  import comp_model_pkg::*;

  localparam int US = 128;   // clocks per microsecond at 128 MHz
  localparam real VOUT = 3.3;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic adc_start, adc_valid;
  adc_t adc_data;
  logic hs, ls, pwm, duty_valid, pwm_duty_valid, period_start, main_sample, ev_tm, ev_cross;
  mode_e mode;
  duty_t duty;
  acc_t integ;
  pwm_t pwm_duty;

  real i_load = 5.0, v_out, i_l, glitch = 0.0;

  int checks = 0, failures = 0;
  int n_res = 0, n_pid = 0, n_pd = 0, n_spike = 0, n_enter = 0, n_wait = 0, n_transfer = 0;
  int n_dither = 0, n_deadtime = 0, n_mid_update = 0, n_isat = 0;
  int max_jump = 0;
  bit pend = 0, sd_pend = 0, pwm_exp = 0;
  int cyc = 0, step_cyc = 0, last_out = 0;
  int sd_res = 0, sd_exp = 0, last_sd_in = -1;
  longint prev_duty = 0;
  real vmin, vmax;
  comp_model m;

  bumpless_controller dut (
    .clk, .rst_n, .cfg, .adc_start, .adc_data, .adc_valid, .hs, .ls, .pwm, .mode, .duty,
    .duty_valid, .integ, .pwm_duty, .pwm_duty_valid, .period_start, .main_sample, .ev_tm,
    .ev_cross
  );
  adc_model #(.VFS(4.096)) u_adc (.clk, .rst_n, .start(adc_start), .v_in(v_out), .glitch, .data(adc_data),
                   .valid(adc_valid));
  buck_plant #(.VIN(12.0)) u_plant (.clk, .hs, .ls, .i_load, .v_out, .i_l);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Scoreboard. Reads the values from before each clock edge.
  always @(posedge clk) if (rst_n) begin
    if (pend) begin
      check(duty_valid == m.ran, "duty_valid one clock after the ADC result");
      check(longint'(duty) == m.duty, $sformatf("duty %0d expected %0d", duty, m.duty));
      check(int'(mode) == m.st, "mode");
      check(longint'(integ) == m.di, "integrator");
      if (m.transfer) begin
        int j;
        j = int'(m.duty - prev_duty);
        if (j < 0) j = -j;
        if (j > max_jump) max_jump = j;
      end
      if (m.ran) prev_duty = m.duty;
      pend = 0;
    end
    if (sd_pend) begin
      check(pwm_duty_valid && int'(pwm_duty) == sd_exp, "sigma-delta code");
      sd_pend = 0;
    end
    if (duty_valid) begin
      int acc;
      acc = int'(duty) + sd_res;
      if (acc >= 4096) begin sd_exp = 255; sd_res = 0; end
      else begin sd_exp = acc / 16; sd_res = acc % 16; end
      if (int'(duty) == last_sd_in && sd_exp != int'(pwm_duty)) n_dither++;
      last_sd_in = int'(duty);
      sd_pend = 1;
    end
    if (adc_valid) begin
      bit is_main;
      is_main = (n_res % OSR == 0);
      check(main_sample == is_main, "main-sample flag");
      m.step(int'(adc_data), is_main);
      n_pid += (m.ran && !m.pd); n_pd += m.pd; n_spike += m.spike; n_enter += m.enter;
      n_wait += m.waited; n_transfer += m.transfer;
      if (m.pd && !is_main) n_mid_update++;
      if (m.di == 0 || m.di == 4095 * 256) n_isat++;
      pend = 1;
      n_res++;
    end
    // DPWM: pwm follows the live duty code against the period count
    check(pwm == pwm_exp, "modulating signal");
    pwm_exp = (cyc % 256 == 0) ? (pwm_duty != 0) : (pwm_exp && (cyc % 256 < int'(pwm_duty)));
    check(!hs || pwm, "high side only while the modulating signal is high");
    check(!(hs && ls), "gate signals overlap");
    cyc++;
    if (!hs && !ls) n_deadtime++;
    if (v_out < VOUT - 0.033 || v_out > VOUT + 0.033) last_out = cyc;
    if (v_out < vmin) vmin = v_out;
    if (v_out > vmax) vmax = v_out;
  end

  // Average output voltage over one switching period.
  task automatic vavg(output real v);
    v = 0.0;
    repeat (256) begin
      @(posedge clk);
      v += v_out;
    end
    v /= 256.0;
  endtask

  task automatic regulated(input string when);
    real v;
    vavg(v);
    check(v > VOUT - 0.012 && v < VOUT + 0.012, $sformatf("regulated %s: %f V", when, v));
  endtask

  // 5 A -> 20 A -> 5 A, 150 us apart; returns the undershoot after the step up and the
  // overshoot after the step down
  task automatic load_steps(output real under, output real over, output real settle_us);
    vmin = 10.0; vmax = -10.0;
    i_load = 20.0;
    step_cyc = cyc;
    last_out = cyc;
    repeat (150 * US) @(posedge clk);
    settle_us = real'(last_out - step_cyc) / real'(US);
    regulated("after the 15 A step up");
    under = VOUT - vmin;
    vmin = 10.0; vmax = -10.0;
    i_load = 5.0;
    repeat (150 * US) @(posedge clk);
    regulated("after the 15 A step down");
    over = vmax - VOUT;
  endtask

  task automatic set_cfg(input bit transient_on);
    cfg = '0;
    cfg.vref     = 10'd825;               // 3.3 V with a 4.096 V full scale
    // gains in duty LSBs per ADC LSB, 8 fractional bits
    cfg.kp_ss    = 18'(6 * 256);          // PID, crossover near 20 kHz
    cfg.ki_ss    = 18'(100);
    cfg.kd_ss    = 18'(8000);
    cfg.kp_tr    = 18'(23 * 256);         // PD, crossover near 55 kHz
    cfg.kd_tr    = 18'(227 * 256);
    cfg.k_cross  = 18'((23 - 6) * 256);   // K_P,T - K_P,SS
    cfg.e_thres  = transient_on ? 10'd3 : 10'd1023;
    cfg.ss_min   = 6'd8;
    cfg.deadtime = 8'd4;
    m.cfg = cfg;
  endtask

  initial begin
    real und_pid, ovr_pid, und_prop, ovr_prop, st_pid, st_prop;
    m = new('0);
    set_cfg(0);
    repeat (4) @(posedge clk);
    rst_n = 1;
    // start-up
    repeat (600 * US) @(posedge clk);
    regulated("after start-up");
    load_steps(und_pid, ovr_pid, st_pid);
    $display("switching-rate PID only: undershoot %0.1f mV, overshoot %0.1f mV, settling (1 %%) %0.1f us",
             und_pid * 1000.0, ovr_pid * 1000.0, st_pid);
    set_cfg(1);
    repeat (50 * US) @(posedge clk);
    regulated("before the transient-mode steps");
    load_steps(und_prop, ovr_prop, st_prop);
    $display("with transient mode:     undershoot %0.1f mV, overshoot %0.1f mV, settling (1 %%) %0.1f us",
             und_prop * 1000.0, ovr_prop * 1000.0, st_prop);
    check(und_prop < und_pid, "transient mode lowers the undershoot");
    // single-sample glitches at the ADC input
    for (int g = 0; g < 6; g++) begin
      repeat ((20 + g * 3) * US) @(posedge clk);
      @(negedge clk);
      while (!adc_start) @(negedge clk);
      glitch = (g % 2) ? -0.06 : 0.06;
      @(negedge clk);
      glitch = 0.0;
    end
    repeat (40 * US) @(posedge clk);
    regulated("after the glitches");
    $display("results=%0d pid=%0d pd=%0d spikes=%0d enters=%0d waits=%0d transfers=%0d",
             n_res, n_pid, n_pd, n_spike, n_enter, n_wait, n_transfer);
    $display("largest duty change at a transfer: %0d of 4096", max_jump);
    check(max_jump < 200, "bumpless transfer: duty change below 5 %");
    check(n_pid > 0, "mechanism: switching-rate PID");
    check(n_pd > 0, "mechanism: sampling-rate PD");
    check(n_mid_update > 0, "mechanism: duty update between main samples");
    check(n_spike > 0, "mechanism: single-sample spike filtered");
    check(n_enter > 0, "mechanism: transient mode entered");
    check(n_wait > 0, "mechanism: return waits for a main sample");
    check(n_transfer > 0, "mechanism: bumpless transfer");
    check(n_dither > 0, "mechanism: sigma-delta dithering");
    check(n_deadtime > 0, "mechanism: dead-time");
    check(n_isat > 0, "mechanism: integrator at its limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000 * US) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
