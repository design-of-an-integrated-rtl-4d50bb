// sync_2ff_tb: checks the synchroniser latency and its use as reset
// synchroniser.
//
// A 4-bit instance gets random data changed between clock edges; q must equal
// d as sampled two rising edges earlier. A 1-bit instance with d tied high is
// reset asynchronously: q must fall at once, without a clock edge, and rise
// again on the second rising edge after the reset is released.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ns/1ps
module sync_2ff_tb;
  logic       clk = 1'b0;
  logic       rst;
  logic [3:0] d, q;
  logic       rst2, rq;

  int checks = 0, failures = 0;
  logic [3:0] hist [2];

  sync_2ff #(.WIDTH(4), .STAGES(2)) dut (.clk, .rst, .d, .q);
  sync_2ff #(.WIDTH(1), .STAGES(2)) dut_rst (.clk, .rst(rst2), .d(1'b1), .q(rq));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rst2 = 1'b1; d = '0;
    hist[0] = '0; hist[1] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 500; k++) begin
      d = 4'($urandom);
      @(posedge clk);
      hist[1] = hist[0];
      hist[0] = d;
      @(negedge clk);
      checks++;
      if (q !== hist[1]) begin
        failures++; $display("k=%0d: q=%h exp %h", k, q, hist[1]);
      end
    end
    // reset synchroniser use
    rst2 = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (rq !== 1'b0) begin failures++; $display("released after one edge"); end
    @(posedge clk); #1;
    checks++;
    if (rq !== 1'b1) begin failures++; $display("not released after two edges"); end
    #2 rst2 = 1'b1; #1;
    checks++;
    if (rq !== 1'b0) begin failures++; $display("reset not asynchronous"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
