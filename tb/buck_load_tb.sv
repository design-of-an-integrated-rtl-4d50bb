// buck_load_tb: load sweep of the complete controller, both output modes.
//
// The controller runs at its default sizes against the same kind of
// behavioural power stage as buck_controller_tb (ideal switches with dead-time
// body-diode handling, inductor and capacitor integrated every 2.25 ns, ADC
// quantising to 1/16 V on the falling PID-clock edge). For each of the four
// loads the converter is specified for - 100 W, 10 W, 1 W and 1 nW at the
// nominal output - the controller is reset and started from 0 V at
// Vin = 100 V:
//   48 V converter: 32.8 uH, 0.39 uF, loads 23.04, 230.4, 2304, 2.304e9 ohm
//   24 V converter: 22 uH, 0.47 uF, loads 5.76, 57.6, 576, 5.76e8 ohm
// Each run checks that the reference ramp happened, that the output averaged
// over 150..500 us after release is within 1 V of the target and that the
// output never exceeds the target by more than 12 V. With this ideal power
// stage the loop does not settle: it keeps a limit cycle around the reference
// of about +/-6 V (48 V, all loads), +/-2 V (24 V, 100 W) and up to +/-9 V
// (24 V, 10 W and lighter), because the default tuning has too little
// phase margin once the loop is sampled at 1 us with a modulator and about
// a period of measurement and update delay in it. The test therefore bounds the oscillation and judges the average.
// The converter values, loads and reference voltages follow the converter
// specification; the switch-level model, the scenario and its tolerances are
// this testbench's own choices.
`timescale 1ps/1ps
module buck_load_tb;
  import buck_ctrl_pkg::*;

  logic             clk_pid = 1'b0, clk_pwm = 1'b0;
  logic             rst;
  logic             mode;
  logic [ADC_W-1:0] adc;
  logic             pwm_pos, pwm_neg, stabilised;
  logic [D_W-1:0]   dbg_duty;
  logic [V_W-1:0]   dbg_v;

  buck_controller dut (.*);

  always #124875 clk_pid = ~clk_pid;   // 4.004 MHz
  always #1125   clk_pwm = ~clk_pwm;   // 444.4 MHz

  int checks = 0, failures = 0;

  initial begin
    #6000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power stage and ADC
  real vin = 100.0, l_h = 32.8e-6, c_f = 0.39e-6, r_ohm = 23.04;
  real il = 0.0, vo = 0.0;
  localparam real DT = 2.25e-9;

  always @(posedge clk_pwm) begin
    real vsw;
    vsw = pwm_pos ? vin : 0.0;
    if (!pwm_pos && !pwm_neg && il < 0.0) vsw = vin;
    il = il + (vsw - vo) / l_h * DT;
    if (!pwm_pos && !pwm_neg && il < 0.0 && vsw == 0.0) il = 0.0;
    vo = vo + (il - vo / r_ohm) / c_f * DT;
    if (vo < 0.0) vo = 0.0;
  end

  always @(negedge clk_pid) begin
    real q;
    q = vo * 16.0;
    if (q > 2047.0) q = 2047.0;
    adc = ADC_W'($rtoi(q));
  end

  int overlap = 0;
  always @(posedge clk_pwm) begin
    #1;
    if (pwm_pos && pwm_neg) overlap++;
  end

  int n_rate = 0;
  always @(posedge clk_pid) begin
    if (!rst && dut.u_pid.en && dut.u_spf.step != 0 &&
        (dut.u_spf.step == dut.u_spf.rate_s || dut.u_spf.step == -dut.u_spf.rate_s))
      n_rate++;
  end

  real vmax, vmin, vsum;
  int  vn;
  task automatic run_us(input int us, input bit acc);
    repeat (us) begin
      #1000000;
      if (vo > vmax) vmax = vo;
      if (acc) begin
        if (vo < vmin) vmin = vo;
        vsum += vo;
        vn++;
      end
    end
  endtask

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAILED: %s", what); end
  endtask

  task automatic run_case(input bit m, input real l, input real c, input real r,
                          input real target, input string name);
    int rate0;
    rst = 1'b1;
    mode = m; l_h = l; c_f = c; r_ohm = r; vin = 100.0;
    #20000000;
    il = 0.0; vo = 0.0;
    vmax = 0.0; vmin = 200.0; vsum = 0.0; vn = 0;
    rate0 = n_rate;
    rst = 1'b0;
    run_us(150, 1'b0);
    run_us(350, 1'b1);
    $display("%s: mean %f V, range %f .. %f V, peak %f V", name, vsum / vn, vmin, vmax, vmax);
    check({name, ": reference ramp"}, n_rate - rate0 >= 6);
    check({name, ": mean within 1 V"}, vsum / vn > target - 1.0 && vsum / vn < target + 1.0);
    check({name, ": peak below target + 12 V"}, vmax < target + 12.0);
  endtask

  initial begin
    rst = 1'b1; mode = 1'b1; adc = '0;
    run_case(1'b1, 32.8e-6, 0.39e-6, 23.04,  48.0, "48V 100W");
    run_case(1'b1, 32.8e-6, 0.39e-6, 230.4,  48.0, "48V 10W");
    run_case(1'b1, 32.8e-6, 0.39e-6, 2304.0, 48.0, "48V 1W");
    run_case(1'b1, 32.8e-6, 0.39e-6, 2.304e9, 48.0, "48V 1nW");
    run_case(1'b0, 22.0e-6, 0.47e-6, 5.76,   24.0, "24V 100W");
    run_case(1'b0, 22.0e-6, 0.47e-6, 57.6,   24.0, "24V 10W");
    run_case(1'b0, 22.0e-6, 0.47e-6, 576.0,  24.0, "24V 1W");
    run_case(1'b0, 22.0e-6, 0.47e-6, 5.76e8, 24.0, "24V 1nW");
    check("drives never overlapped", overlap == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
