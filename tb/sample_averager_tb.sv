// sample_averager_tb: checks 4-sample averaging and the update strobe.
//
// Random u7.4 samples (full range, including the maximum) are fed one per
// clock. While the fourth sample of a group is presented, valid must be high
// and v_avg must equal floor(sum / 16) of the four samples (average of four,
// 4 fraction bits cut to 2). valid must be low in the other three cycles, so
// the strobe rate is clk / 4.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ns/1ps
module sample_averager_tb;
  import buck_ctrl_pkg::*;

  logic             clk = 1'b0;
  logic             rst;
  logic [ADC_W-1:0] adc;
  volt_t            v_avg;
  logic             valid;

  int checks = 0, failures = 0;
  int sum = 0, n = 0, n_valid = 0;

  sample_averager dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; adc = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 8000; k++) begin
      if (k < 8)        adc = '1;               // full scale
      else if (k < 16)  adc = '0;
      else              adc = ADC_W'($urandom_range(2047, 0));
      sum += int'(adc);
      n++;
      #1;
      checks++;
      if (n == 4) begin
        n_valid++;
        if (valid !== 1'b1 || v_avg !== volt_t'(sum / 16)) begin
          failures++;
          $display("k=%0d: valid=%b v_avg=%0d exp %0d", k, valid, v_avg, sum / 16);
        end
        sum = 0; n = 0;
      end else if (valid !== 1'b0) begin
        failures++;
        $display("k=%0d: valid outside the fourth cycle", k);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
