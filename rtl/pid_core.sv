// pid_core: recursive fixed-point PID controller with saturated feedback.
//
// Computes, once per PID update,
//     U(k) = Us(k-1) + A0*e(k) + A1*e(k-1) + A2*e(k-2),  e = ref - v
// which is the incremental form of a serial PID: only the last two errors and
// the last (saturated) output are stored, no error history.
// Datapath, with the signal names and widths of the package:
//     E  = ref - v                 s7.2
//     P0 = A0*E(k), P1 = A1*E(k-1), P2 = A2*E(k-2)       (.13)
//     S0 = P0 + P1,  S1 = P2 + Us(k-1),  U = S0 + S1
//     Us = saturate(U, US_MIN, US_MAX)   -> register, feeds back
//     d  = limit(U >> 4, 0, D_MAX)       -> register, duty word u0.9
// Saturating the feedback bounds the integrated error (no wind-up while the
// input voltage is too low to reach the setpoint) and prevents overflow. The
// products are cut to the widths derived from the worst-case signal ranges; the
// duty word drops 4 fraction bits by truncation.
// Timing: all registers load on clk when en is high; d and d_valid appear the
// cycle after en. ref, v and the coefficients must be stable on that edge.
// Reset (asynchronous, active high) clears the error history, the feedback and
// the duty word.
// The recursive form, the saturated feedback, the word widths and the duty
// limit follow the controller specification. Truncation of the products and
// of the duty word, and doing the whole update in one clock, are this design's
// choices. The products are 22 bits; their upper bits are sign copies for all
// errors within the specified voltage ranges and are dropped to reach the
// listed widths, which lint reports as unused bits.
module pid_core
  import buck_ctrl_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  volt_t ref_in,
  input  volt_t v_in,
  input  coef_t a0,
  input  coef_t a1,
  input  coef_t a2,
  output duty_t d,
  output logic  d_valid,
  output logic signed [U_W-1:0] u_out      // unsaturated U(k), for observation
);

  localparam int unsigned PROD_W = COEF_W + V_W;

  volt_t e, e1, e2;
  logic signed [PROD_W-1:0] m0, m1, m2;
  logic signed [P0_W-1:0]   p0;
  logic signed [P1_W-1:0]   p1;
  logic signed [P2_W-1:0]   p2;
  logic signed [S0_W-1:0]   s0;
  logic signed [S1_W-1:0]   s1;
  logic signed [U_W-1:0]    u;
  logic signed [US_W-1:0]   us, us1;
  logic signed [U_W-1:0]    u_duty;   // U with 9 fraction bits
  duty_t                    d_next;

  assign e  = ref_in - v_in;
  assign m0 = a0 * e;
  assign m1 = a1 * e1;
  assign m2 = a2 * e2;
  assign p0 = P0_W'(m0);
  assign p1 = P1_W'(m1);
  assign p2 = P2_W'(m2);
  assign s0 = S0_W'(p0) + S0_W'(p1);
  assign s1 = S1_W'(p2) + S1_W'(us1);
  assign u  = U_W'(s0) + U_W'(s1);

  always_comb begin
    if (u > U_W'(US_MAX))      us = US_MAX;
    else if (u < U_W'(US_MIN)) us = US_MIN;
    else                       us = US_W'(u);
  end

  assign u_duty = u >>> (U_FRAC - D_FRAC);

  always_comb begin
    if (u_duty < 0)                   d_next = '0;
    else if (u_duty > signed'(U_W'(D_MAX))) d_next = D_MAX;
    else                              d_next = D_W'(u_duty);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      e1      <= '0;
      e2      <= '0;
      us1     <= '0;
      d       <= '0;
      d_valid <= 1'b0;
      u_out   <= '0;
    end else begin
      d_valid <= en;
      if (en) begin
        e2    <= e1;
        e1    <= e;
        us1   <= us;
        d     <= d_next;
        u_out <= u;
      end
    end
  end

endmodule
