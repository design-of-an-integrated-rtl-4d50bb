// dpwm_tb: checks the DPWM pulse widths, period and dead time.
//
// For a set of duty words (0, 1, mid-range, the 399 limit and random values)
// each is held for three periods, changed only in the last count of a period.
// Over a whole period (period_end to period_end) the test counts: the period
// (444 cycles), the high-side on time (duty + 1 cycles, or 0 for duty 0), the
// low-side on time (444 - duty - 3, or 444 for duty 0), and checks that the
// two drives are never on together and that there is at least one clock with
// both off between any change of one drive and the other (dead time).
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ps/1ps
module dpwm_tb;
  localparam int N = 444;

  logic       clk = 1'b0;
  logic       rst;
  logic [9:0] duty;
  logic       pwm_pos, pwm_neg, period_end;

  int checks = 0, failures = 0;

  dpwm dut (.*);

  always #1125 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dead time monitor: a drive may only rise if both were off in the cycle before
  logic pos_q = 1'b0, neg_q = 1'b0;
  int n_dead = 0;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      if (pwm_pos && pwm_neg) begin failures++; $display("overlap at %0t", $time); end
      if (pwm_pos && !pos_q) begin
        checks++;
        if (neg_q) begin failures++; $display("no dead time before high side"); end
        else n_dead++;
      end
      if (pwm_neg && !neg_q) begin
        checks++;
        if (pos_q) begin failures++; $display("no dead time before low side"); end
      end
    end
    pos_q = pwm_pos;
    neg_q = pwm_neg;
  end

  task automatic run_duty(input int dv);
    int len, hi, lo;
    // change the word in the last count of a period
    @(negedge clk);
    while (!period_end) @(negedge clk);
    duty = 10'(dv);
    for (int p = 0; p < 3; p++) begin
      len = 0; hi = 0; lo = 0;
      do begin
        @(negedge clk);
        len++;
        hi += pwm_pos;
        lo += pwm_neg;
      end while (!period_end);
      if (p > 0) begin   // first period contains the pipeline of the old word
        checks++;
        if (len != N) begin failures++; $display("period %0d", len); end
        checks++;
        if (hi != ((dv == 0) ? 0 : dv + 1)) begin
          failures++; $display("duty %0d: high side on %0d", dv, hi);
        end
        checks++;
        if (lo != ((dv == 0) ? N : N - dv - 3)) begin
          failures++; $display("duty %0d: low side on %0d", dv, lo);
        end
      end
    end
  endtask

  initial begin
    rst = 1'b1; duty = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_duty(0);
    run_duty(1);
    run_duty(213);
    run_duty(107);
    run_duty(399);
    for (int k = 0; k < 20; k++) run_duty($urandom_range(399, 0));
    checks++;
    if (n_dead == 0) begin failures++; $display("no switching seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
