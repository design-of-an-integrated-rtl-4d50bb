// sample_averager: 4x oversampling of the output voltage.
//
// Sampling the output once per 1 MHz switching period aliases the 1 MHz
// inductor ripple into the loop, so the voltage is sampled N_AVG (= 4) times
// per period at the PID clock (4 MHz) and averaged. The sum of the N_AVG
// u7.4 samples is divided by N_AVG and cut back to 2 fraction bits
// (truncation) so the measurement step stays 0.25 V.
// A modulo-N_AVG counter selects the cycle that presents the last sample of a
// group: in that cycle valid is high and v_avg = (accumulator + adc) / N_AVG,
// formed combinationally, so the PID registers can load the new average on
// the same clock edge that would have stored the last sample. valid is the
// once-per-period (1 MHz) enable of the PID logic; v_avg is meaningful only
// while valid is high. This saves one PID clock of loop delay compared with
// registering the average first.
// Timing: adc must be stable before each rising clk edge; valid is high in
// every N_AVG-th cycle, counted from reset. Reset is asynchronous, active high.
// Four samples per period and the 2-bit fraction of the result follow the
// controller specification; truncation instead of rounding and forming the
// average in the same cycle as the last sample are this design's choices.
module sample_averager
  import buck_ctrl_pkg::*;
#(
  parameter int unsigned N_AVG = 4   // power of two
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] adc,      // u7.4
  output volt_t            v_avg,    // s7.2, never negative
  output logic             valid
);

  localparam int unsigned LOG_N = $clog2(N_AVG);
  localparam int unsigned SUM_W = ADC_W + LOG_N;
  localparam int unsigned SHIFT = LOG_N + ADC_FRAC - V_FRAC;

  logic [SUM_W-1:0] acc;
  logic [SUM_W-1:0] sum;
  logic [LOG_N-1:0] cnt;

  assign sum = acc + SUM_W'(adc);

  assign valid = (cnt == LOG_N'(N_AVG - 1));
  assign v_avg = V_W'(sum >> SHIFT);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc <= '0;
      cnt <= '0;
    end else begin
      if (valid) begin
        acc <= '0;
        cnt <= '0;
      end else begin
        acc <= sum;
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
