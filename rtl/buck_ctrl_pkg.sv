// buck_ctrl_pkg: shared fixed-point formats, tuning constants and types of the
// digital buck-converter controller.
//
// Number formats (sign bit + integer bits + fraction bits), as derived for the
// controller from the worst-case signal ranges:
//   reference, measured voltage, error   s7.2   (10 bits, 0.25 V per LSB)
//   PID coefficients A0/A1/A2            s0.11  (12 bits)
//   P0 = A0*e(k)                         s5.13  (19 bits)
//   P1 = A1*e(k-1)                       s6.13  (20 bits)
//   P2 = A2*e(k-2)                       s4.13  (18 bits)
//   S0 = P0+P1                           s6.13  (20 bits)
//   S1 = P2+Us(k-1)                      s5.13  (19 bits)
//   U  = S0+S1                           s7.13  (21 bits)
//   Us = saturated U, fed back           s4.13  (18 bits)
//   d  = limited U, the duty word        u0.9   (9 bits)
// The ADC delivers u7.4 (11 bits); four samples are averaged and cut back to
// 2 fraction bits so that the measurement step (0.25 V) stays above the
// control step (100 V / 444 = 0.225 V), the condition against limit cycles.
//
// Tuning: coefficients are the "with overshoot" PID tunings of the 48 V and
// 24 V converters, already scaled by 444/512 for the 444-step DPWM, rounded
// to 11 fraction bits. The setpoint rate limits (3.75 V/us and 2.5 V/us) are
// expressed per 1 us PID update in reference LSBs. The duty limit is 90 %
// (assumed converter efficiency) of the 444 counts.
// The formats, coefficients, reference voltages, rate limits and the 90 %
// duty limit follow the controller specification; the ADC format, rounding of
// the coefficients to the nearest code, and the Us upper limit one LSB below
// 16 (16 itself does not fit s4.13) are this design's choices.
package buck_ctrl_pkg;

  // ---------------- word widths ----------------
  localparam int unsigned ADC_W  = 11;  // u7.4 ADC sample
  localparam int unsigned V_W    = 10;  // s7.2 reference / voltage / error
  localparam int unsigned COEF_W = 12;  // s0.11
  localparam int unsigned P0_W   = 19;
  localparam int unsigned P1_W   = 20;
  localparam int unsigned P2_W   = 18;
  localparam int unsigned S0_W   = 20;
  localparam int unsigned S1_W   = 19;
  localparam int unsigned U_W    = 21;
  localparam int unsigned US_W   = 18;
  localparam int unsigned D_W    = 9;   // u0.9 duty word
  localparam int unsigned RATE_W = 6;   // setpoint step per update, LSBs of V_W

  localparam int unsigned V_FRAC    = 2;
  localparam int unsigned ADC_FRAC  = 4;
  localparam int unsigned COEF_FRAC = 11;
  localparam int unsigned U_FRAC    = 13;
  localparam int unsigned D_FRAC    = 9;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [V_W-1:0]    volt_t;
  typedef logic        [RATE_W-1:0] rate_t;
  typedef logic        [D_W-1:0]    duty_t;

  // Operating mode: input pin low selects the 24 V converter, high the 48 V one.
  typedef enum logic {
    MODE_24V = 1'b0,
    MODE_48V = 1'b1
  } mode_e;

  // Everything the mode multiplexers select.
  typedef struct packed {
    coef_t a0;
    coef_t a1;
    coef_t a2;
    volt_t vref;   // target output voltage, s7.2
    rate_t rate;   // max reference change per PID update, s7.2 LSBs
  } tuning_t;

  // ---------------- tuning constants ----------------
  // round(A * 2^11)
  localparam coef_t A0_48 = 12'sd379;    //  0.18526
  localparam coef_t A1_48 = -12'sd687;   // -0.33565
  localparam coef_t A2_48 = 12'sd312;    //  0.15219
  localparam coef_t A0_24 = 12'sd269;    //  0.13135
  localparam coef_t A1_24 = -12'sd491;   // -0.23962
  localparam coef_t A2_24 = 12'sd224;    //  0.10938
  localparam volt_t VREF_48 = 10'sd192;  // 48 V * 4
  localparam volt_t VREF_24 = 10'sd96;   // 24 V * 4
  localparam rate_t RATE_48 = 6'd15;     // 3.75 V/us * 1 us * 4
  localparam rate_t RATE_24 = 6'd10;     // 2.5  V/us * 1 us * 4

  // ---------------- saturation limits ----------------
  // Us in [-1.6, 16): -1.6 * 2^13 = -13107.2, +16 is one LSB beyond s4.13.
  localparam logic signed [US_W-1:0] US_MIN = -18'sd13107;
  localparam logic signed [US_W-1:0] US_MAX = 18'sd131071;
  // Duty-cycle counter steps of the DPWM and the duty limit 0.9 * 444.
  localparam int unsigned PWM_STEPS = 444;
  localparam duty_t       D_MAX     = 9'd399;

endpackage
