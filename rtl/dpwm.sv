// dpwm: sawtooth-comparator digital PWM with dead time.
//
// A counter runs from 0 to N_STEPS-1 (444 steps) and wraps, so at a 444 MHz
// clock the switching frequency is 1 MHz. A comparator drives PWM1 high while
// counter <= duty; a multiplexer replaces PWM1 by a constant 0 when the duty
// word is zero, so a zero duty gives no pulse at all. PWM1 runs through two
// registers, PWM2 and PWM3. The high-side drive is PWM2; the low-side drive is
// NOR(PWM1, PWM2, PWM3). The low side therefore switches off one clock before
// the high side switches on and back on one clock after it switches off: one
// clock (2.25 ns) of dead time on both edges, and the two drives never overlap.
// With 444 instead of 512 steps the controller gain and the duty limit are
// scaled by 444/512 upstream, so the duty word keeps its 9-bit weight.
// period_end is high in the last count of each period, for observation.
// Reset is asynchronous, active high, and holds the high side off and the low
// side on. The reset also disables the no-overlap assertion, which lint
// reports as a reset used both asynchronously and synchronously.
// Counter, comparator (counter <= duty), multiplexer, the two registers and
// the NOR follow the controller specification; the multiplexer's select
// condition (duty == 0) and the 10-bit duty port driven from a 9-bit word are
// this design's reading of it.
module dpwm #(
  parameter int unsigned N_STEPS = 444,
  parameter int unsigned DUTY_W  = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DUTY_W-1:0] duty,
  output logic              pwm_pos,
  output logic              pwm_neg,
  output logic              period_end
);

  localparam int unsigned CNT_W = $clog2(N_STEPS);

  logic [CNT_W-1:0] cnt;
  logic             pwm1, pwm2, pwm3;
  logic             cmp;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                              cnt <= '0;
    else if (cnt == CNT_W'(N_STEPS - 1))  cnt <= '0;
    else                                  cnt <= cnt + 1'b1;
  end

  assign cmp        = (DUTY_W'(cnt) <= duty);
  assign pwm1       = (duty == '0) ? 1'b0 : cmp;
  assign period_end = (cnt == CNT_W'(N_STEPS - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pwm2 <= 1'b0;
      pwm3 <= 1'b0;
    end else begin
      pwm2 <= pwm1;
      pwm3 <= pwm2;
    end
  end

  assign pwm_pos = pwm2;
  assign pwm_neg = ~(pwm1 | pwm2 | pwm3);

  // The two drives must never be on together.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) !(pwm_pos && pwm_neg));

endmodule
