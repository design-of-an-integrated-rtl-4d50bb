// setpoint_filter_tb: checks the rate limiter against a reference model.
//
// A start-up ramp from 0 V to 48 V at 15 LSB per update, a ramp down to 24 V
// at 10 LSB per update, and random targets and rates (including changes
// smaller than the rate, which must be followed in one update) are applied.
// The model is r(k) = r(k-1) + min(max(target - r(k-1), -rate), rate).
// ref_out must change only in the cycle after en.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ns/1ps
module setpoint_filter_tb;
  import buck_ctrl_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  logic  en;
  volt_t target;
  rate_t rate;
  volt_t ref_out;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_jump = 0;
  int r_m = 0;

  setpoint_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int t, input int rt);
    int diff;
    target = volt_t'(t);
    rate   = rate_t'(rt);
    @(negedge clk);
    checks++;
    if (ref_out !== volt_t'(r_m)) begin failures++; $display("changed without en"); end
    en = 1'b1;
    diff = t - r_m;
    if (diff > rt)       begin r_m += rt; n_up++;   end
    else if (diff < -rt) begin r_m -= rt; n_down++; end
    else                 begin r_m = t;   n_jump++; end
    @(negedge clk); en = 1'b0;
    checks++;
    if (ref_out !== volt_t'(r_m)) begin
      failures++;
      $display("target=%0d rate=%0d: ref=%0d exp %0d", t, rt, ref_out, r_m);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; target = '0; rate = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 20; k++) step(192, 15);   // 48 V start-up ramp
    for (int k = 0; k < 15; k++) step(96, 10);    // down to 24 V
    for (int k = 0; k < 2000; k++)
      step($urandom_range(400, 0), $urandom_range(40, 1));
    checks++;
    if (n_up == 0 || n_down == 0 || n_jump == 0) begin
      failures++; $display("cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
