// sigma_delta: first-order sigma-delta (error-feedback) modulator in front of the DPWM.
//
// The compensator delivers a DUTY_W-bit duty word but the DPWM counter resolves only PWM_W
// bits. On every new duty word the modulator adds the residue of the previous update,
// passes the upper PWM_W bits to the DPWM and keeps the lower SD_W bits as the new residue.
// Averaged over 2^SD_W updates the DPWM duty therefore equals the full-resolution word, with
// the quantisation noise pushed to high frequencies. In steady state the compensator updates
// once per switching period, so the modulator then dithers the duty period by period. That
// the modulator exists and why follows the source paper; its order (first), the truncation and
// the saturation at full scale (residue cleared) are this design's choices.
//
// Interface / timing: in_valid qualifies duty_in; one clock later pwm_duty holds the new code
// and out_valid pulses. Reset (synchronous, active-low) clears code and residue.
module sigma_delta
  import ctrl_pkg::*;
#(
  parameter int unsigned IN_W  = ctrl_pkg::DUTY_W,
  parameter int unsigned OUT_W = ctrl_pkg::PWM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  duty_in,
  output logic [OUT_W-1:0] pwm_duty,
  output logic             out_valid
);

  localparam int unsigned R_W = IN_W - OUT_W;

  logic [R_W-1:0] resid;
  logic [IN_W:0]  acc;

  always_comb begin
    acc = {1'b0, duty_in} + {{(OUT_W + 1){1'b0}}, resid};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resid     <= '0;
      pwm_duty  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (acc[IN_W]) begin
          pwm_duty <= '1;
          resid    <= '0;
        end else begin
          pwm_duty <= acc[IN_W-1:R_W];
          resid    <= acc[R_W-1:0];
        end
      end
    end
  end

endmodule
