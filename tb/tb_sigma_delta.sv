// tb_sigma_delta: checks the first-order sigma-delta modulator. For constant inputs the sum
// of 16 consecutive 8-bit output codes must equal the 12-bit input word (the average is the
// full-resolution duty); random input sequences are compared code by code with a residue
// model; full scale must saturate without wrapping.
module tb_sigma_delta;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [11:0] duty_in = 0;
  logic [7:0] pwm_duty;
  logic out_valid;
  int checks = 0, failures = 0;
  int r_res = 0, n_sat = 0;

  sigma_delta dut (.clk, .rst_n, .in_valid, .duty_in, .pwm_duty, .out_valid);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one update; returns the output code
  task automatic upd(input int d, output int code);
    int acc, exp_code;
    @(negedge clk);
    duty_in = 12'(d);
    in_valid = 1;
    acc = d + r_res;
    if (acc >= 4096) begin exp_code = 255; r_res = 0; n_sat++; end
    else begin exp_code = acc / 16; r_res = acc % 16; end
    @(posedge clk);
    #1;
    in_valid = 0;
    code = int'(pwm_duty);
    check(out_valid, "out_valid one clock after in_valid");
    check(code == exp_code, $sformatf("code %0d expected %0d for %0d", code, exp_code, d));
    // idle clocks: code holds
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk);
      #1;
      check(int'(pwm_duty) == code && !out_valid, "output holds between updates");
    end
  endtask

  initial begin
    int c, total;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int d;
      d = (t == 0) ? 983 : $urandom_range(0, 4080);
      // settle to the new word, then average over one full residue cycle
      for (int k = 0; k < 16; k++) upd(d, c);
      total = 0;
      for (int k = 0; k < 16; k++) begin
        upd(d, c);
        total += c;
      end
      check(total == d, $sformatf("16-update sum %0d expected %0d", total, d));
    end
    repeat (2000) upd($urandom_range(0, 4095), c);
    repeat (20) upd(4095, c);
    check(n_sat > 0, "saturation exercised");
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
