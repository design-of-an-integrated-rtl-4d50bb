// stabilisation_indicator: flags that the controller has settled.
//
// At every PID update the new duty word is XORed with the previous one and the
// result OR-reduced: 1 means the duty word changed. That bit is shifted into a
// DEPTH-stage (15) shift register. The output is the inverted OR of all
// stages, so `stable` is high once the duty word has stayed the same for DEPTH
// consecutive updates, and drops at the first update that changes it.
// Timing: en is the duty-valid strobe; stable is registered logic of the shift
// register and changes the cycle after en. After reset the shift register is
// filled with ones, i.e. the controller starts as "not stable".
// The XOR/OR change detection, the 15-stage shift register and the NOR output
// follow the controller specification; clocking the shift register with the
// duty-valid strobe and the all-ones reset are this design's choices.
module stabilisation_indicator
  import buck_ctrl_pkg::*;
#(
  parameter int unsigned DEPTH = 15
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  duty_t d,
  output logic  stable
);

  duty_t            d_prev;
  logic [DEPTH-1:0] changed;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      d_prev  <= '0;
      changed <= '1;
    end else if (en) begin
      d_prev  <= d;
      changed <= {changed[DEPTH-2:0], |(d ^ d_prev)};
    end
  end

  assign stable = ~|changed;

endmodule
