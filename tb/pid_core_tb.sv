// pid_core_tb: checks the recursive PID against a reference model.
//
// Random reference/voltage pairs and random coefficients within the ranges
// the fixed-point formats were sized for are applied one update at a time.
// The model computes U(k) = Us(k-1) + A0 e(k) + A1 e(k-1) + A2 e(k-2) with
// plain 64-bit integers, saturates the feedback to [-13107, 131071] and
// limits the duty word floor(U/16) to [0, 399]. Long runs of large positive
// and negative errors drive both limits. d must appear exactly one cycle
// after en.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ns/1ps
module pid_core_tb;
  import buck_ctrl_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  logic  en;
  volt_t ref_in, v_in;
  coef_t a0, a1, a2;
  duty_t d;
  logic  d_valid;
  logic signed [U_W-1:0] u_out;

  int checks = 0, failures = 0;
  int n_us_hi = 0, n_us_lo = 0, n_d_hi = 0, n_d_lo = 0;

  pid_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e0_m, e1_m = 0, e2_m = 0, us1_m = 0, u_m, us_m, d_m;

  task automatic step(input int r, input int v);
    ref_in = volt_t'(r);
    v_in   = volt_t'(v);
    e0_m = longint'(r) - longint'(v);
    u_m  = us1_m + longint'(a0) * e0_m + longint'(a1) * e1_m + longint'(a2) * e2_m;
    us_m = (u_m > 131071) ? 131071 : (u_m < -13107) ? -13107 : u_m;
    d_m  = u_m >>> 4;
    if (d_m < 0) begin d_m = 0; n_d_lo++; end
    if (d_m > 399) begin d_m = 399; n_d_hi++; end
    if (u_m > 131071) n_us_hi++;
    if (u_m < -13107) n_us_lo++;
    @(negedge clk); en = 1'b1;
    @(negedge clk); en = 1'b0;
    checks++;
    if (d_valid !== 1'b1 || d !== duty_t'(d_m) || u_out !== (U_W)'(u_m)) begin
      failures++;
      $display("mismatch r=%0d v=%0d: d=%0d exp %0d, u=%0d exp %0d valid=%b",
               r, v, d, d_m, u_out, u_m, d_valid);
    end
    @(negedge clk);
    checks++;
    if (d_valid !== 1'b0) begin failures++; $display("d_valid longer than one cycle"); end
    e2_m = e1_m; e1_m = e0_m; us1_m = us_m;
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; ref_in = '0; v_in = '0;
    a0 = A0_48; a1 = A1_48; a2 = A2_48;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // 48 V tuning: start-up from 0 V, error +48 V, holds d at its limit.
    for (int k = 0; k < 60; k++) step(192, k * 2);
    // Output far above the reference: negative limits.
    for (int k = 0; k < 60; k++) step(96, 400);
    // Random operation with random coefficients inside the sized ranges.
    for (int k = 0; k < 3000; k++) begin
      if (k % 200 == 0) begin
        a0 = coef_t'($urandom_range(400, 200));
        a1 = -coef_t'($urandom_range(700, 450));
        a2 = coef_t'($urandom_range(312, 200));
      end
      step($urandom_range(360, 0), $urandom_range(420, 0));
    end
    checks++;
    if (n_us_hi == 0 || n_us_lo == 0 || n_d_hi == 0 || n_d_lo == 0) begin
      failures++;
      $display("limits not exercised: us_hi=%0d us_lo=%0d d_hi=%0d d_lo=%0d",
               n_us_hi, n_us_lo, n_d_hi, n_d_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
