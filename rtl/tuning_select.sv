// tuning_select: the mode multiplexers of the controller.
//
// One mode pin chooses between the two converters the controller serves: low
// selects the 24 V converter, high the 48 V converter. For the chosen mode the
// block presents the three recursive-PID coefficients A0/A1/A2 (s0.11), the
// target output voltage (s7.2) and the setpoint rate limit (reference LSBs per
// 1 us PID update). The values are parameters whose defaults come from the
// package; a different converter only needs new parameter values.
// Purely combinational; the mode pin is expected to be static in operation.
// The mode encoding and the constant sets follow the controller specification;
// making them parameters rather than hard-wired constants is a local choice.
module tuning_select
  import buck_ctrl_pkg::*;
#(
  parameter coef_t A0_HI   = A0_48,
  parameter coef_t A1_HI   = A1_48,
  parameter coef_t A2_HI   = A2_48,
  parameter volt_t VREF_HI = VREF_48,
  parameter rate_t RATE_HI = RATE_48,
  parameter coef_t A0_LO   = A0_24,
  parameter coef_t A1_LO   = A1_24,
  parameter coef_t A2_LO   = A2_24,
  parameter volt_t VREF_LO = VREF_24,
  parameter rate_t RATE_LO = RATE_24
) (
  input  mode_e   mode,
  output tuning_t tuning
);

  always_comb begin
    if (mode == MODE_48V) begin
      tuning = '{a0: A0_HI, a1: A1_HI, a2: A2_HI, vref: VREF_HI, rate: RATE_HI};
    end else begin
      tuning = '{a0: A0_LO, a1: A1_LO, a2: A2_LO, vref: VREF_LO, rate: RATE_LO};
    end
  end

endmodule
