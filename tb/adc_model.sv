// adc_model: behavioural model of a pipelined ADC, for simulation only. On each start
// request it samples the analog input plus a uniform noise of +-NOISE_LSB/2 LSB and an
// optional one-off glitch, quantises it to BITS bits over 0..VFS and delivers the code
// LATENCY clocks later with a one-clock valid pulse, in request order.
module adc_model #(
  parameter int  BITS      = 10,
  parameter real VFS       = 2.048,
  parameter int  LATENCY   = 20,
  parameter real NOISE_LSB = 1.0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  real             v_in,
  input  real             glitch,     // volts added to the next conversion only
  output logic [BITS-1:0] data,
  output logic            valid
);
  int unsigned codes[$];
  longint      due[$];
  longint      now = 0;

  always @(posedge clk) begin
    real v;
    int  c;
    now++;
    valid <= 1'b0;
    if (!rst_n) begin
      codes.delete();
      due.delete();
    end else begin
      if (start) begin
        v = v_in + glitch + (($urandom_range(0, 1000) / 1000.0) - 0.5) * NOISE_LSB * VFS / (2.0 ** BITS);
        c = int'($floor(v / VFS * (2.0 ** BITS)));
        if (c < 0) c = 0;
        if (c > 2 ** BITS - 1) c = 2 ** BITS - 1;
        codes.push_back(c);
        due.push_back(now + LATENCY);
      end
      if (due.size() > 0 && due[0] == now) begin
        data  <= BITS'(codes.pop_front());
        valid <= 1'b1;
        void'(due.pop_front());
      end
    end
  end

  initial data = '0;
endmodule
