// tb_compensator: runs the complete compensator (datapath and mode state machine) on a
// synthetic output-voltage record: quiet steady state with ripple, single-sample spikes,
// load steps (a ramp of the error followed by a slow recovery) in both directions, and
// random noise, with samples arriving every 64 clocks and every fourth one marked main.
// Every output is compared with the reference model; the latency from sample to duty_valid
// must be one clock and the duty may only change then; each mechanism (spike filtered,
// transient entered, wait for a main sample, bumpless transfer) must occur.
// A last phase lets the error settle at a constant offset before the return to steady state,
// where the proportional gain step (K_P,T - K_P,SS) * e would show: the duty change at the
// transfer must stay within a few codes, while a model of the same compensator without the
// K_cross update jumps by the full proportional step.
module tb_compensator;
  import ctrl_pkg::*;
  import comp_model_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0, main_sample = 0;
  adc_t adc = 0;
  cfg_t cfg;
  duty_t duty;
  logic duty_valid;
  mode_e mode;
  acc_t integ;
  logic ev_tm, ev_cross;
  err_t e;

  int checks = 0, failures = 0, idx = 0;
  int n_spike = 0, n_enter = 0, n_wait = 0, n_transfer = 0, n_pid = 0, n_pd = 0;
  comp_model m, m0;
  longint last_d = 0, last_d0 = 0;
  int jump_max = 0, jump0_min = 1 << 30, n_offset = 0;
  bit offset_phase = 0;

  compensator dut (.clk, .rst_n, .sample_valid, .main_sample, .adc, .cfg, .duty, .duty_valid,
                   .mode, .integ, .ev_tm, .ev_cross, .e);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL sample %0d: %s", idx, what);
    end
  endtask

  task automatic sample(input int a);
    bit is_main;
    duty_t d_prev;
    is_main = (idx % 4 == 0);
    @(negedge clk);
    d_prev = duty;
    adc = adc_t'(a < 0 ? 0 : (a > 1023 ? 1023 : a));
    sample_valid = 1;
    main_sample = is_main;
    m.step(int'(adc), is_main);
    m0.step(int'(adc), is_main);
    if (offset_phase && m.transfer) begin
      int j, j0;
      j  = int'(m.duty - last_d);   j  = j < 0 ? -j : j;
      j0 = int'(m0.duty - last_d0); j0 = j0 < 0 ? -j0 : j0;
      if (j > jump_max) jump_max = j;
      if (j0 < jump0_min) jump0_min = j0;
      n_offset++;
    end
    if (m.ran) last_d = m.duty;
    if (m0.ran) last_d0 = m0.duty;
    #1;
    check(ev_tm == m.tm, "transient criterion");
    check(ev_cross == m.transfer, "transfer event");
    @(posedge clk);
    #1;
    sample_valid = 0; main_sample = 0;
    check(duty_valid == m.ran, "duty_valid one clock after the sample");
    check(longint'(duty) == m.duty, $sformatf("duty %0d expected %0d", duty, m.duty));
    check(longint'(integ) == m.di, "integrator");
    check(int'(mode) == m.st, "mode");
    if (!m.ran) check(duty == d_prev, "duty holds without an execution");
    n_spike += m.spike; n_enter += m.enter; n_wait += m.waited; n_transfer += m.transfer;
    n_pd += m.pd; n_pid += (m.ran && !m.pd);
    idx++;
    repeat (63) begin
      @(posedge clk);
      #1;
      check(!duty_valid, "no output between samples");
    end
  endtask

  initial begin
    int v;
    cfg = '0;
    cfg.vref = 10'd614;
    cfg.kp_ss = 18'(3 * 256);  cfg.ki_ss = 18'(26);  cfg.kd_ss = 18'(20 * 256);
    cfg.kp_tr = 18'(12 * 256); cfg.kd_tr = 18'(120 * 256);
    cfg.k_cross = 18'(9 * 256);
    cfg.e_thres = 10'd4; cfg.ss_min = 6'd6; cfg.deadtime = 8'd4;
    m = new(cfg);
    begin
      cfg_t c0;
      c0 = cfg;
      c0.k_cross = '0;
      m0 = new(c0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    v = 614;
    repeat (40) sample(v + $urandom_range(0, 2) - 1);
    for (int ev = 0; ev < 24; ev++) begin
      case (ev % 4)
        0: begin  // spike
          repeat (3) sample(v + $urandom_range(0, 2) - 1);
          sample(v + 15); sample(v);
        end
        1, 3: begin  // load step: voltage drops (ev 1) or rises (ev 3), then recovers
          int dir, dev;
          dir = (ev % 4 == 1) ? -1 : 1;
          dev = 0;
          for (int k = 0; k < 6; k++) begin dev += 9 + $urandom_range(0, 4); sample(v + dir * dev); end
          while (dev > 0) begin dev -= $urandom_range(1, 3); sample(v + dir * (dev > 0 ? dev : 0)); end
        end
        default: repeat (30) sample(v + $urandom_range(0, 10) - 5);
      endcase
      repeat (20 + $urandom_range(0, 5)) sample(v + $urandom_range(0, 2) - 1);
    end
    // transfers with a settled error offset
    offset_phase = 1;
    for (int r = 0; r < 6; r++) begin
      int off, dev;
      off = 4 + r;
      dev = 0;
      for (int k = 0; k < 5; k++) begin dev += 10; sample(v - dev); end
      while (dev > off) begin dev -= 8; if (dev < off) dev = off; sample(v - dev); end
      repeat (30) sample(v - off);
      while (dev > 0) begin dev -= 1; sample(v - dev); end
      repeat (10) sample(v);
    end
    offset_phase = 0;
    $display("offset transfers=%0d: largest duty change %0d with K_cross, smallest %0d without",
             n_offset, jump_max, jump0_min);
    check(n_offset > 0, "transfers with an error offset happened");
    check(jump_max <= 8, "bumpless: duty change at the transfer within 8 codes");
    check(jump0_min > 4 * jump_max, "without K_cross the transfer would jump");
    check(n_spike > 0, "spike filtered");
    check(n_enter > 0, "transient mode entered");
    check(n_wait > 0, "return held back until a main sample");
    check(n_transfer > 0, "bumpless transfer");
    $display("pid=%0d pd=%0d spikes=%0d enters=%0d waits=%0d transfers=%0d",
             n_pid, n_pd, n_spike, n_enter, n_wait, n_transfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
