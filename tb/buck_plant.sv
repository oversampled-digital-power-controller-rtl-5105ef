// buck_plant: behavioural model of a single-phase synchronous buck power stage, for
// simulation only (not synthesizable). Averaged nothing: the switch node follows the gate
// signals clock by clock, with body-diode conduction during dead-time, and the inductor
// current and capacitor voltage are integrated with forward Euler at the clock period.
// Component values follow the prototype described for this controller (L = 950 nH,
// C = 250 uF, ESR 0.5 mOhm, 500 kHz); input voltage, winding resistance and diode drop are
// assumptions of the model. The load is a current sink set by the testbench.
module buck_plant #(
  parameter real VIN  = 5.0,
  parameter real L    = 950e-9,
  parameter real C    = 250e-6,
  parameter real RC   = 0.5e-3,
  parameter real RL   = 2.0e-3,
  parameter real VD   = 0.7,
  parameter real DT   = 1.0 / 128.0e6
) (
  input  logic clk,
  input  logic hs,
  input  logic ls,
  input  real  i_load,
  output real  v_out,
  output real  i_l
);
  real vc = 0.0;
  real il = 0.0;
  real vsw;

  always @(posedge clk) begin
    if (hs)            vsw = VIN;
    else if (ls)       vsw = 0.0;
    else if (il > 0.0) vsw = -VD;          // low-side body diode
    else if (il < 0.0) vsw = VIN + VD;     // high-side body diode
    else               vsw = vc;
    il = il + (vsw - (vc + RC * (il - i_load)) - RL * il) / L * DT;
    vc = vc + (il - i_load) / C * DT;
  end

  assign v_out = vc + RC * (il - i_load);
  assign i_l   = il;
endmodule
