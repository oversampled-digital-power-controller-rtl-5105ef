// dpwm: counter-based trailing-edge digital PWM with dead-time.
//
// The switching period is the period of the counter from switch_timing (2^PWM_W clocks). The
// modulating signal turns on at counter value 0 (if the duty is non-zero) and turns off as soon
// as the counter reaches the duty code. The duty code is compared live, not latched once per
// period, so a duty value computed by the oversampled compensator in the middle of a period
// still moves the current falling edge; once off, the signal stays off until the next period.
// The high-side and low-side gate signals follow the modulating signal, each switched on
// only after it has been stable for `deadtime` clocks, so the two are never on together. The
// document asks for a DPWM that makes the switch signals including dead-time; the counter
// scheme, trailing edge, live compare and the dead-time counter are this design's choices.
//
// Interface / timing: cnt is the period counter; all outputs are registered. pwm is high for
// exactly duty clocks per period when duty stays constant; hs is high for duty - deadtime
// clocks, ls for 2^PWM_W - duty - deadtime clocks (when those are positive).
module dpwm
  import ctrl_pkg::*;
#(
  parameter int unsigned W = ctrl_pkg::PWM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] cnt,
  input  logic [W-1:0] duty,
  input  logic [W-1:0] deadtime,
  output logic         pwm,
  output logic         hs,
  output logic         ls
);

  logic         on_now;
  logic [W-1:0] stable;     // clocks the modulating signal has held its value, saturating
  logic [W-1:0] stable_d;

  always_comb begin
    if (cnt == '0) on_now = (duty != '0);
    else           on_now = pwm && (cnt < duty);
    if (on_now != pwm)  stable_d = W'(1);
    else if (&stable)   stable_d = stable;
    else                stable_d = stable + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pwm    <= 1'b0;
      stable <= '0;
      hs     <= 1'b0;
      ls     <= 1'b0;
    end else begin
      pwm    <= on_now;
      stable <= stable_d;
      hs     <= on_now && (stable_d > deadtime);
      ls     <= !on_now && (stable_d > deadtime);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(hs && ls));

endmodule
