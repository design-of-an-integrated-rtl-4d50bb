// stabilisation_indicator_tb: checks the settled flag.
//
// Duty words are applied with en; sometimes a new random word, sometimes the
// previous word again, in runs of random length. A model counts consecutive
// unchanged updates; stable must be high exactly when the last 15 updates
// all repeated the previous word. Also checks that stable does not move
// without en and that it is low after reset.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ns/1ps
module stabilisation_indicator_tb;
  import buck_ctrl_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  logic  en;
  duty_t d;
  logic  stable;

  int checks = 0, failures = 0;
  int same_run = 0, n_rise = 0, n_fall = 0;
  duty_t prev_m = '0;
  logic  stable_m = 1'b0, stable_old;

  stabilisation_indicator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(input duty_t w);
    d = w;
    @(negedge clk);
    checks++;
    if (stable !== stable_m) begin failures++; $display("moved without en"); end
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    if (w == prev_m) same_run++; else same_run = 0;
    prev_m = w;
    stable_old = stable_m;
    stable_m = (same_run >= 15);
    if (stable_m && !stable_old) n_rise++;
    if (!stable_m && stable_old) n_fall++;
    checks++;
    if (stable !== stable_m) begin
      failures++;
      $display("run=%0d: stable=%b exp %b", same_run, stable, stable_m);
    end
  endtask

  initial begin
    duty_t w;
    rst = 1'b1; en = 1'b0; d = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (stable !== 1'b0) begin failures++; $display("stable during reset"); end
    rst = 1'b0;
    w = 9'd213;
    for (int r = 0; r < 300; r++) begin
      automatic int len = $urandom_range(20, 1);
      w = duty_t'($urandom_range(399, 0));
      for (int k = 0; k < len; k++) update(w);
    end
    for (int k = 0; k < 16; k++) update(9'd100);   // exactly 15 repeats
    checks++;
    if (n_rise == 0 || n_fall == 0) begin failures++; $display("flag never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
