// tb_switch_timing: checks the period counter, the ADC start pattern (OSR evenly spaced
// requests per 256-clock period) and the main-sample flag on results that come back from a
// pipelined ADC model with a latency of LAT clocks.
module tb_switch_timing;
  import ctrl_pkg::*;

  localparam int LAT = 37;
  localparam int PERIOD = 256;

  logic clk = 0, rst_n = 0;
  logic adc_valid;
  logic [7:0] cnt;
  logic period_start, adc_start, main_sample;
  logic [LAT-1:0] pipe;
  int checks = 0, failures = 0;
  int cyc = 0, starts = 0, results = 0, mains = 0, periods = 0;
  int start_log[$];

  switch_timing dut (.clk, .rst_n, .adc_valid, .cnt, .period_start, .adc_start, .main_sample);

  always #5 clk = ~clk;

  // ADC model: a result appears LAT clocks after each request.
  always_ff @(posedge clk) begin
    if (!rst_n) pipe <= '0;
    else        pipe <= {pipe[LAT-2:0], adc_start};
  end
  assign adc_valid = pipe[LAT-1];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(int'(cnt) == cyc % PERIOD, "counter value");
    check(period_start == (cyc % PERIOD == 0), "period_start");
    check(adc_start == (cyc % (PERIOD / OSR) == 0), "adc_start position");
    if (adc_start) starts++;
    if (adc_valid) begin
      // result k (0-based) was requested at cycle 64*k; main when k % OSR == 0
      check(main_sample == (results % OSR == 0), "main_sample flag");
      check((cyc - LAT) % PERIOD == 0 || !main_sample, "main result started at period start");
      results++;
      if (main_sample) mains++;
    end else begin
      check(!main_sample, "main_sample only with adc_valid");
    end
    if (period_start) periods++;
    cyc++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (PERIOD * 10) @(posedge clk);
    #1;
    check(starts == OSR * 10, $sformatf("4 starts per period, got %0d", starts));
    check(periods == 10, "period count");
    check(mains * OSR >= results - OSR + 1 && mains > 0, "main results are one in OSR");
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
