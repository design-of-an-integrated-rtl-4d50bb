// duty_cdc_tb: checks the duty-word crossing between unrelated clocks.
//
// Source clock 250 ns, destination clock 2.25 ns (not integer related). The
// source behaves like the PID duty register: every 4 source cycles load is
// high and d_in takes a new random word on that same edge. Checks:
//   - d_out changes only to the word currently in d_in;
//   - it changes on the third destination edge after the loading source edge
//     (later than 2, at most 3 destination periods after it), never earlier;
//   - every loaded word has reached d_out before the next one is loaded.
// The expected behaviour is the controller specification; stimulus, reference
// model, tolerances and run lengths are this testbench's own choices.
`timescale 1ps/1ps
module duty_cdc_tb;
  localparam int W = 9;
  localparam int TDST = 2250;

  logic         clk_src = 1'b0, clk_dst = 1'b0;
  logic         rst_src, rst_dst;
  logic         load;
  logic [W-1:0] d_in, d_out;

  int checks = 0, failures = 0;
  logic [W-1:0] nxt;
  time          t_load = 0;
  logic [W-1:0] last_out = '0;
  int           n_delivered = 0;

  duty_cdc #(.W(W)) dut (.*);

  always #125000 clk_src = ~clk_src;
  always #(TDST/2) clk_dst = ~clk_dst;

  initial begin
    #4000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source register: d_in changes only on an edge where load is high
  always @(posedge clk_src) begin
    if (rst_src) d_in <= '0;
    else if (load) begin
      d_in   <= nxt;
      t_load = $time;
    end
  end

  // destination monitor
  always @(posedge clk_dst) begin
    #1;
    if (!rst_dst && d_out !== last_out) begin
      checks++;
      if (d_out !== d_in) begin failures++; $display("d_out %0d is not the loaded word %0d", d_out, d_in); end
      checks++;
      if ($time - 1 - t_load <= 2 * TDST || $time - 1 - t_load > 3 * TDST) begin
        failures++; $display("latency %0t ps outside (2, 3] destination periods", $time - 1 - t_load);
      end
      n_delivered++;
    end
    last_out = d_out;
  end

  initial begin
    rst_src = 1'b1; rst_dst = 1'b1; load = 1'b0; nxt = '0;
    #1000000;
    @(negedge clk_src); rst_src = 1'b0;
    @(negedge clk_dst); rst_dst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      repeat (3) @(negedge clk_src);
      nxt = W'($urandom_range(399, 1));
      while (nxt == d_in) nxt = W'($urandom_range(399, 1));
      load = 1'b1;
      @(negedge clk_src);
      load = 1'b0;
      checks++;
      if (d_out !== d_in) begin failures++; $display("word %0d not delivered", d_in); end
    end
    checks++;
    if (n_delivered < 2000) begin failures++; $display("only %0d words delivered", n_delivered); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
