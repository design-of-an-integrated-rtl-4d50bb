// tuning_select_tb: checks the mode multiplexers.
//
// The expected constants are recomputed here from the decimal tunings
// (coefficients scaled by 444/512 for the 444-step DPWM, times 2^11,
// rounded), the target voltages (times 4) and the rate limits in V/us
// (times 1 us per update, times 4). Both modes are checked in both orders.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tuning_select_tb;
  import buck_ctrl_pkg::*;

  mode_e   mode;
  tuning_t tuning;
  int checks = 0, failures = 0;

  tuning_select dut (.*);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q11(real x);
    return $rtoi(x * 2048.0 + (x >= 0.0 ? 0.5 : -0.5));
  endfunction

  task automatic check_field(input string what, input int got, input int exp, input mode_e m);
    checks++;
    if (got != exp) begin
      failures++;
      $display("mode %s: %s = %0d, expected %0d", m.name(), what, got, exp);
    end
  endtask

  task automatic expect_mode(input mode_e m, input real a0, input real a1,
                             input real a2, input real vref, input real rate_vus);
    mode = m;
    #1;
    check_field("a0",   tuning.a0,   q11(a0), m);
    check_field("a1",   tuning.a1,   q11(a1), m);
    check_field("a2",   tuning.a2,   q11(a2), m);
    check_field("vref", tuning.vref, $rtoi(vref * 4.0), m);
    check_field("rate", signed'({1'b0, tuning.rate}), $rtoi(rate_vus * 4.0), m);
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      expect_mode(MODE_48V, 0.18525645257256, -0.33564826798183, 0.15218813428684, 48.0, 3.75);
      expect_mode(MODE_24V, 0.13134639261020, -0.2396245331642,  0.1093808927853,  24.0, 2.5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
