// setpoint_filter: rate limiter between the target reference and the PID.
//
// The effective reference r_f starts at 0 V after reset and moves towards the
// target by at most RATE LSBs per PID update, in either direction:
//     r_f(k) = r_f(k-1) + clamp(target - r_f(k-1), -rate, +rate)
// This is the discrete form of "error -> saturator -> integrator" with the
// integrator output fed back. It gives a linear start-up ramp, which lets a
// more aggressive PID tuning run without step-response overshoot.
// Interface: en is the PID update strobe (one clk cycle per 1 us); ref_out is
// registered and changes the cycle after en. Reset is asynchronous, active high.
// The rate-limiter structure and the two rate limits follow the controller
// specification; the symmetric limit (same rate up and down) and the 0 V reset
// value are this design's choices. The top bit of the clamped step is always
// equal to the next one and is not used (lint lists it).
module setpoint_filter
  import buck_ctrl_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  volt_t target,
  input  rate_t rate,
  output volt_t ref_out
);

  logic signed [V_W:0] diff;   // one extra bit: target - r_f spans two ranges
  logic signed [V_W:0] step;
  logic signed [V_W:0] rate_s;

  assign rate_s = signed'({{(V_W+1-RATE_W){1'b0}}, rate});
  assign diff   = (V_W+1)'(target) - (V_W+1)'(ref_out);

  always_comb begin
    if (diff > rate_s)       step = rate_s;
    else if (diff < -rate_s) step = -rate_s;
    else                     step = diff;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     ref_out <= '0;
    else if (en) ref_out <= ref_out + V_W'(step);
  end

endmodule
