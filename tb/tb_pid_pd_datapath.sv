// tb_pid_pd_datapath: drives the compensator datapath with random samples, random gains and
// a random but legal sequence of PID, PD and PID-with-transfer executions, and compares duty,
// duty_valid, the integrator and the sample-rate derivative with a reference model written
// with 64-bit integers straight from the compensator equations (PID eqs. 2-3 at the
// switching rate, PD eq. 1 with the integrator as bias, K_cross * e_N-1 update eq. 6).
module tb_pid_pd_datapath;
  import ctrl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0, main_sample = 0, run_pid = 0, run_pd = 0, cross_update = 0;
  adc_t adc = 0;
  cfg_t cfg;
  err_t e;
  logic signed [E_W:0] de_fast;
  duty_t duty;
  logic duty_valid;
  acc_t integ;

  int checks = 0, failures = 0, idx = 0;
  int n_pid = 0, n_pd = 0, n_cross = 0, n_clamp_hi = 0, n_clamp_lo = 0, n_isat = 0;
  longint r_ep = 0, r_eps = 0, r_di = 0, r_duty = 0;

  pid_pd_datapath dut (.clk, .rst_n, .sample_valid, .main_sample, .adc, .cfg, .run_pid, .run_pd,
                       .cross_update, .e, .de_fast, .duty, .duty_valid, .integ);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL sample %0d: %s", idx, what);
    end
  endtask

  function automatic longint sat(longint v, longint lo, longint hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic longint floordiv256(longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  function automatic longint rgain(int lo, int hi);
    return longint'($urandom_range(0, hi - lo)) + lo;
  endfunction

  // kind: 0 none, 1 PID, 2 PD, 3 PID + transfer
  task automatic step(input int a, input int kind);
    longint e_r, dfast, dslow, p, d, di_new, sum, expd;
    bit is_main;
    is_main = (idx % 4 == 0);
    if (kind == 1 || kind == 3) is_main = 1;
    @(negedge clk);
    adc = adc_t'(a);
    sample_valid = 1;
    main_sample = is_main;
    run_pid = (kind == 1 || kind == 3);
    run_pd = (kind == 2);
    cross_update = (kind == 3);
    #1;
    e_r = longint'(cfg.vref) - a;
    dfast = e_r - r_ep;
    dslow = e_r - r_eps;
    check(longint'(e) == e_r, "error");
    check(longint'(de_fast) == dfast, "sample-rate derivative");
    di_new = r_di;
    if (kind == 1 || kind == 3) di_new += longint'(cfg.ki_ss) * e_r;
    if (kind == 3) di_new += longint'(cfg.k_cross) * r_ep;
    if (di_new > 4095 * 256) n_isat++;
    di_new = sat(di_new, 0, 4095 * 256);
    expd = r_duty;
    if (kind == 1 || kind == 3) begin
      sum = longint'(cfg.kp_ss) * e_r + longint'(cfg.kd_ss) * dslow + di_new;
      expd = floordiv256(sum);
    end else if (kind == 2) begin
      sum = r_di + longint'(cfg.kp_tr) * e_r + longint'(cfg.kd_tr) * dfast;
      expd = floordiv256(sum);
    end
    if (kind != 0) begin
      if (expd > 4095) n_clamp_hi++;
      if (expd < 0) n_clamp_lo++;
    end
    expd = sat(expd, 0, 4095);
    @(posedge clk);
    #1;
    sample_valid = 0; main_sample = 0; run_pid = 0; run_pd = 0; cross_update = 0;
    check(duty_valid == (kind != 0), "duty_valid one clock after an execution");
    check(longint'(duty) == expd, $sformatf("duty %0d expected %0d (kind %0d)", duty, expd, kind));
    if (kind == 1 || kind == 3) r_di = di_new;
    check(longint'(integ) == r_di, $sformatf("integrator %0d expected %0d", integ, r_di));
    if (kind == 1) n_pid++;
    if (kind == 2) n_pd++;
    if (kind == 3) n_cross++;
    r_ep = e_r;
    if (is_main) r_eps = e_r;
    r_duty = expd;
    idx++;
    @(posedge clk);
    #1;
    check(!duty_valid, "duty_valid is a single pulse");
  endtask

  initial begin
    cfg = '0;
    cfg.vref = 10'd600;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      cfg.kp_ss   = gain_t'(rgain(0, 2000));
      cfg.ki_ss   = gain_t'(rgain(0, 200));
      cfg.kd_ss   = gain_t'(rgain(-500, 8000));
      cfg.kp_tr   = gain_t'(rgain(0, 8000));
      cfg.kd_tr   = gain_t'(rgain(-1000, 60000));
      cfg.k_cross = gain_t'(rgain(-3000, 8000));
      for (int s = 0; s < 80; s++) begin
        int a, k, r;
        a = 600 + $urandom_range(0, 80) - 40;
        if (blk % 7 == 3) a = $urandom_range(0, 1023);
        r = $urandom_range(0, 99);
        if (idx % 4 == 0) k = (r < 10) ? 3 : (r < 55 ? 1 : 2);
        else              k = (r < 50) ? 0 : 2;
        step(a, k);
      end
    end
    check(n_pid > 0 && n_pd > 0 && n_cross > 0, "all execution kinds exercised");
    check(n_clamp_hi > 0 && n_clamp_lo > 0, "output clamping exercised");
    check(n_isat > 0, "integrator clamp exercised");
    $display("pid=%0d pd=%0d transfer=%0d clamp_hi=%0d clamp_lo=%0d isat=%0d",
             n_pid, n_pd, n_cross, n_clamp_hi, n_clamp_lo, n_isat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
