// switch_timing: switching-period counter and ADC sample scheduling.
//
// A free-running PWM_W-bit counter defines the switching period (2^PWM_W clocks). The ADC is
// started OSR times per period, evenly spaced, at counter values SAMPLE_OFFSET + k*2^PWM_W/OSR,
// so that it samples at f_sample = OSR * f_switch as the source paper describes. The ADC is
// pipelined and returns its results some clocks later on adc_valid; the results are counted
// modulo OSR and the first of every group, the one started in the conversion slot
// k = 0, is flagged as the main sample. The switching-rate (steady-state) compensator runs only
// on main samples. The spacing and the slot-0 convention are this design's choice.
//
// Interface / timing:
//   cnt           period counter, 0 .. 2^PWM_W-1, consumed by the DPWM.
//   period_start  one-clock pulse while cnt == 0.
//   adc_start     one-clock conversion request, OSR times per period.
//   main_sample   combinational, valid together with adc_valid: this result is the main one.
//   Reset (active-low, synchronous) clears the counter and the sample counter; the ADC must
//   not deliver results of conversions started before reset.
module switch_timing
  import ctrl_pkg::*;
#(
  parameter int unsigned OSR_P         = ctrl_pkg::OSR,
  parameter int unsigned CNT_BITS      = ctrl_pkg::PWM_W,
  parameter int unsigned SAMPLE_OFFSET = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adc_valid,
  output logic [CNT_BITS-1:0] cnt,
  output logic                period_start,
  output logic                adc_start,
  output logic                main_sample
);

  localparam int unsigned PERIOD = 2 ** CNT_BITS;
  localparam int unsigned SPACING = PERIOD / OSR_P;
  localparam int unsigned PH_W = (OSR_P > 1) ? $clog2(OSR_P) : 1;

  initial begin
    assert (PERIOD % OSR_P == 0) else $error("OSR_P must divide the switching period");
    assert (SAMPLE_OFFSET < SPACING) else $error("SAMPLE_OFFSET must be below the spacing");
  end

  logic [PH_W-1:0] phase;   // index of the next ADC result within its period

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      phase <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (adc_valid) begin
        phase <= (32'(phase) == OSR_P - 1) ? '0 : phase + 1'b1;
      end
    end
  end

  always_comb begin
    period_start = (cnt == '0);
    adc_start    = (32'(cnt) % SPACING) == SAMPLE_OFFSET;
    main_sample  = adc_valid && (phase == '0);
  end

endmodule
