// mode_fsm: operation-mode state machine of the bumpless compensator.
//
// On every ADC sample the derivative of the error, de = e_N - e_N-1 (computed at the sampling
// rate by the datapath), is compared with the threshold e_thres; TM = |de| > e_thres flags a
// possible transient. Three states follow the source paper:
//   MODE_SS      steady state: PID at the switching frequency. TM moves to MODE_FILTER and
//                remembers the sign of de.
//   MODE_FILTER  single-sample spike filter, evaluated on the next sample: TM with the same
//                sign as the remembered derivative enters MODE_TR, anything else returns to
//                MODE_SS (a spike gives two large derivatives of opposite sign).
//   MODE_TR      transient: PD at the sampling frequency. Quiet samples (!TM) are counted and
//                any TM clears the count. After at least ss_min consecutive quiet samples the
//                machine returns to MODE_SS, but only on a main (switching-rate) sample, and
//                requests the one-off K_cross integral update for a bumpless transfer.
//
// Timing: the decision is combinational on the current sample, so the compensator computes
// that very sample in the new mode (mode_now); the state register changes on the clock edge
// where sample_valid is high. The steady-state condition (!TM with the same threshold) and
// the saturating quiet-sample counter are this design's choices; the source paper only asks for
// "a predefined number of consecutive samples". Reset (synchronous, active-low) enters MODE_SS.
module mode_fsm
  import ctrl_pkg::*;
#(
  parameter int unsigned D_W = ctrl_pkg::E_W + 1,   // width of the derivative
  parameter int unsigned TH_W = ctrl_pkg::E_W - 1,
  parameter int unsigned C_W = ctrl_pkg::CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_valid,   // a new sample is being processed
  input  logic                  main_sample,    // it is the switching-rate sample
  input  logic signed [D_W-1:0] de,             // e_N - e_N-1
  input  logic [TH_W-1:0]       e_thres,
  input  logic [C_W-1:0]        ss_min,
  output mode_e                 state,          // registered state
  output mode_e                 mode_now,       // mode that applies to the current sample
  output logic                  tm,             // transient criterion of the current sample
  output logic                  run_pid,        // execute the steady-state PID on this sample
  output logic                  run_pd,         // execute the transient PD on this sample
  output logic                  cross_update    // transient -> steady transition on this sample
);

  logic               sign_q;
  logic [C_W-1:0]     quiet_q, quiet_d;
  logic [D_W-1:0]     mag;
  mode_e              next;

  always_comb begin
    mag = de[D_W-1] ? D_W'(-de) : D_W'(de);
    tm  = mag > D_W'(e_thres);

    quiet_d = tm ? '0 : ((&quiet_q) ? quiet_q : quiet_q + 1'b1);

    next = state;
    unique case (state)
      MODE_SS:     if (tm) next = MODE_FILTER;
      MODE_FILTER: next = (tm && (de[D_W-1] == sign_q)) ? MODE_TR : MODE_SS;
      MODE_TR:     if (!tm && (quiet_d >= ss_min) && main_sample) next = MODE_SS;
      default:     next = MODE_SS;
    endcase
    if (!sample_valid) next = state;

    mode_now     = next;
    run_pd       = sample_valid && (next == MODE_TR);
    run_pid      = sample_valid && main_sample && (next != MODE_TR);
    cross_update = sample_valid && (state == MODE_TR) && (next == MODE_SS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= MODE_SS;
      sign_q  <= 1'b0;
      quiet_q <= '0;
    end else if (sample_valid) begin
      state <= next;
      if (state == MODE_SS) sign_q <= de[D_W-1];
      quiet_q <= (next == MODE_TR) ? quiet_d : '0;
    end
  end

  // A transient-to-steady transfer may only happen on a main sample.
  assert property (@(posedge clk) disable iff (!rst_n) cross_update |-> main_sample);
  // The state register never holds an unused code.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state inside {MODE_SS, MODE_FILTER, MODE_TR});

endmodule
