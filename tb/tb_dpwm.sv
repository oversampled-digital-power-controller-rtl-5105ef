// tb_dpwm: runs the DPWM from a 256-clock period counter and measures, period by period,
// the high times of the modulating signal and of both gate signals for many duty / dead-time
// pairs; checks that high side and low side never overlap, that the dead-time gaps have the
// programmed length, and that a duty code lowered in mid-period moves the current falling
// edge (live compare) while a code raised after the edge does not switch on again.
module tb_dpwm;
  logic clk = 0, rst_n = 0;
  logic [7:0] cnt = 0, duty = 0, deadtime = 0;
  logic pwm, hs, ls;
  int checks = 0, failures = 0;
  int n_pwm, n_hs, n_ls, rises, falls_hs_to_ls_gap;
  int n_live = 0;

  dpwm dut (.clk, .rst_n, .cnt, .duty, .deadtime, .pwm, .hs, .ls);

  always #5 clk = ~clk;

  always_ff @(posedge clk) cnt <= rst_n ? cnt + 1'b1 : 8'd0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) check(!(hs && ls), "no shoot-through");

  // Measure one full period, aligned to cnt == 1 (outputs lag the counter by one clock).
  task automatic measure(output int np, output int nh, output int nl);
    np = 0; nh = 0; nl = 0;
    repeat (256) begin
      @(posedge clk);
      #1;
      np += pwm; nh += hs; nl += ls;
    end
  endtask

  task automatic align();
    do @(posedge clk); while (cnt != 8'd0);
    #1;
  endtask

  initial begin
    int np, nh, nl, d, dt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      d  = (t < 4) ? (t == 0 ? 0 : (t == 1 ? 255 : (t == 2 ? 1 : 128))) : $urandom_range(0, 255);
      dt = (t % 5 == 0) ? 0 : $urandom_range(1, 12);
      align();
      duty = 8'(d); deadtime = 8'(dt);
      align();                       // one period to settle
      measure(np, nh, nl);
      check(np == d, $sformatf("pwm high %0d expected %0d", np, d));
      check(nh == ((d > dt) ? d - dt : 0), $sformatf("hs high %0d for d=%0d dt=%0d", nh, d, dt));
      if (d == 0) check(nl == 256, "low side stays on at zero duty");
      else check(nl == ((256 - d > dt) ? 256 - d - dt : 0),
                 $sformatf("ls high %0d for d=%0d dt=%0d", nl, d, dt));
    end
    // live compare: lower the duty in mid-period
    deadtime = 8'd3;
    for (int t = 0; t < 40; t++) begin
      int d1, d2, tc;
      d1 = $urandom_range(100, 250);
      d2 = $urandom_range(10, 90);
      tc = $urandom_range(1, d2 - 1);
      align();
      duty = 8'(d1);
      align();
      np = 0;
      // cnt == 0 now (already counted by the DUT at this edge)
      repeat (256) begin
        if (int'(cnt) == tc) duty = 8'(d2);
        @(posedge clk);
        #1;
        np += pwm;
      end
      check(np == d2, $sformatf("mid-period lowering: high %0d expected %0d", np, d2));
      n_live++;
      // raise after the edge: stays off for the rest of this period
      align();
      duty = 8'(d2);
      align();
      np = 0;
      repeat (256) begin
        if (int'(cnt) == d2 + 5) duty = 8'(d1);
        @(posedge clk);
        #1;
        np += pwm;
      end
      check(np == d2, "no second pulse after a raise past the edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
