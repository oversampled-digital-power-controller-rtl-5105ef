// tb_repetitive_load: closed-loop test of the controller under fast repetitive load steps,
// the case where a mode detector that reacts too slowly or stays stuck in one mode would
// fail. The load of the behavioural buck stage toggles between 5 A and 20 A with a period
// chosen at random between 16 us and 60 us, 30 times. Checked: every compensator output against
// the reference model; transient mode is entered within 2 us of every load edge that finds
// the controller in steady state; the controller returns to steady state between edges at
// least once; the output never leaves a +-400 mV window; and it regulates to 3.3 V +-12 mV
// after the burst.
module tb_repetitive_load;
  import ctrl_pkg::*;
  import comp_model_pkg::*;

  localparam int  US = 128;
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

  int checks = 0, failures = 0, n_res = 0;
  int n_edges_ss = 0, n_caught = 0, n_returns = 0;
  bit pend = 0, armed = 0, track = 0;
  int edge_cyc = 0, cyc = 0;
  comp_model m;

  bumpless_controller dut (
    .clk, .rst_n, .cfg, .adc_start, .adc_data, .adc_valid, .hs, .ls, .pwm, .mode, .duty,
    .duty_valid, .integ, .pwm_duty, .pwm_duty_valid, .period_start, .main_sample, .ev_tm,
    .ev_cross
  );
  adc_model #(.VFS(4.096)) u_adc (.clk, .rst_n, .start(adc_start), .v_in(v_out), .glitch,
                                  .data(adc_data), .valid(adc_valid));
  buck_plant #(.VIN(12.0)) u_plant (.clk, .hs, .ls, .i_load, .v_out, .i_l);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pend) begin
      check(duty_valid == m.ran && longint'(duty) == m.duty && int'(mode) == m.st,
            "compensator output against the model");
      pend = 0;
    end
    if (adc_valid) begin
      m.step(int'(adc_data), n_res % OSR == 0);
      if (m.transfer && track) n_returns++;
      pend = 1;
      n_res++;
    end
    if (armed && mode == MODE_TR) begin
      check(cyc - edge_cyc <= 2 * US, "transient mode entered within 2 us of the load edge");
      n_caught++;
      armed = 0;
    end
    if (armed && cyc - edge_cyc > 2 * US) begin
      check(0, "load edge missed");
      armed = 0;
    end
    if (track) check(v_out > VOUT - 0.4 && v_out < VOUT + 0.4, "output within +-400 mV");
  end

  initial begin
    real v;
    cfg = '0;
    cfg.vref = 10'd825;
    cfg.kp_ss = 18'(6 * 256);  cfg.ki_ss = 18'(100);       cfg.kd_ss = 18'(8000);
    cfg.kp_tr = 18'(23 * 256); cfg.kd_tr = 18'(227 * 256); cfg.k_cross = 18'(17 * 256);
    cfg.e_thres = 10'd3; cfg.ss_min = 6'd8; cfg.deadtime = 8'd4;
    m = new(cfg);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (600 * US) @(posedge clk);
    track = 1;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      i_load = (k % 2 == 0) ? 20.0 : 5.0;
      if (mode != MODE_TR) begin
        armed = 1;
        edge_cyc = cyc;
        n_edges_ss++;
      end
      repeat ($urandom_range(16, 60) * US) @(posedge clk);
    end
    track = 0;
    i_load = 5.0;
    repeat (300 * US) @(posedge clk);
    v = 0.0;
    repeat (256) begin
      @(posedge clk);
      v += v_out;
    end
    v /= 256.0;
    check(v > VOUT - 0.012 && v < VOUT + 0.012, $sformatf("regulated after the burst: %f V", v));
    check(n_edges_ss > 0 && n_caught == n_edges_ss, "every edge from steady state caught");
    check(n_returns > 0, "returned to steady state between edges");
    $display("edges from steady state=%0d caught=%0d returns=%0d", n_edges_ss, n_caught, n_returns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3500 * US) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
