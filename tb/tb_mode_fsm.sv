// tb_mode_fsm: drives the operation-mode state machine with directed derivative sequences
// (single-sample spike, sustained transient, quiet period that ends between main samples,
// transient interrupted by a new disturbance) and then with random ones, and compares every
// output with an independent reference model of the three-state machine.
module tb_mode_fsm;
  import ctrl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sample_valid = 0, main_sample = 0;
  logic signed [11:0] de = 0;
  logic [9:0] e_thres = 10'd5;
  logic [5:0] ss_min = 6'd6;
  mode_e state, mode_now;
  logic tm, run_pid, run_pd, cross_update;

  int checks = 0, failures = 0;
  int n_spike = 0, n_enter = 0, n_cross = 0, n_wait_main = 0;

  // reference model state: 0 steady, 1 filter, 2 transient
  int r_state = 0, r_sign = 0, r_quiet = 0;
  int sample_idx = 0;

  mode_fsm dut (.clk, .rst_n, .sample_valid, .main_sample, .de, .e_thres, .ss_min,
                .state, .mode_now, .tm, .run_pid, .run_pd, .cross_update);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL sample %0d: %s", sample_idx, what);
    end
  endtask

  // Present one sample with derivative d, compare outputs, advance the model.
  task automatic sample(input int d);
    int mag, ntm, nst, nq, sgn;
    bit is_main;
    is_main = (sample_idx % 4 == 0);
    @(negedge clk);
    de = 12'(d);
    sample_valid = 1;
    main_sample = is_main;
    #1;
    mag = d < 0 ? -d : d;
    ntm = mag > int'(e_thres);
    sgn = d < 0;
    nq  = ntm ? 0 : (r_quiet < 63 ? r_quiet + 1 : 63);
    nst = r_state;
    if (r_state == 0 && ntm) nst = 1;
    else if (r_state == 1) nst = (ntm && sgn == r_sign) ? 2 : 0;
    else if (r_state == 2 && !ntm && nq >= int'(ss_min)) begin
      if (is_main) nst = 0;
      else n_wait_main++;
    end
    check(tm == ntm, "tm");
    check(int'(mode_now) == nst, $sformatf("mode_now %0d expected %0d", mode_now, nst));
    check(run_pd == (nst == 2), "run_pd");
    check(run_pid == (is_main && nst != 2), "run_pid");
    check(cross_update == (r_state == 2 && nst == 0), "cross_update");
    if (r_state == 1 && nst == 0) n_spike++;
    if (r_state == 1 && nst == 2) n_enter++;
    if (r_state == 2 && nst == 0) n_cross++;
    if (r_state == 0) r_sign = sgn;
    r_quiet = (nst == 2) ? nq : 0;
    r_state = nst;
    @(posedge clk);
    #1;
    check(int'(state) == r_state, "registered state");
    sample_idx++;
    // idle clocks between samples: the state must hold
    sample_valid = 0;
    main_sample = 0;
    de = 12'($urandom_range(0, 400) - 200);
    repeat (2) @(posedge clk);
    #1;
    check(int'(state) == r_state, "state holds between samples");
    check(!run_pd && !run_pid && !cross_update, "no execution without a sample");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // quiet steady state
    repeat (8) sample(1);
    // single-sample spike: +20 then -20 -> filtered
    sample(20); sample(-20);
    repeat (6) sample(0);
    // sustained transient: two derivatives of the same sign -> transient mode
    sample(-15); sample(-12);
    repeat (3) sample(-8);
    // quiet samples; return must wait for ss_min and a main sample
    repeat (12) sample(2);
    // new disturbance during the quiet count resets it
    sample(9); sample(10); repeat (3) sample(1); sample(-30); repeat (12) sample(0);
    // random stress
    repeat (4000) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 80) sample($urandom_range(0, 10) - 5);
      else        sample($urandom_range(0, 60) - 30);
    end
    check(n_spike > 0, "spike filtering happened");
    check(n_enter > 0, "transient mode entered");
    check(n_cross > 0, "bumpless return happened");
    check(n_wait_main > 0, "return waited for a main sample");
    $display("spikes=%0d enters=%0d returns=%0d waits=%0d", n_spike, n_enter, n_cross, n_wait_main);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
