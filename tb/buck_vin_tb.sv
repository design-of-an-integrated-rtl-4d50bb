// buck_vin_tb: input-voltage range of the complete controller.
//
// Same closed-loop arrangement as buck_load_tb (default sizes, behavioural
// power stage at 100 W load, ADC at 1/16 V). For each output mode the
// controller is started at a set of input voltages inside the operating
// range - from just above the lowest input at which the 399/444 duty limit
// still reaches the target (48 x 444/399 = 53.4 V, 24 x 444/399 = 26.7 V) up
// to 111 V, where one PWM step equals one 0.25 V measurement step - and the
// output averaged over 150..500 us must be within 1 V of the target. Then, at
// 100 V, the input is stepped down by 5 V and back up by 5 V; the average
// after each step must again be within 1 V. Finally the 48 V converter is run
// from 45 V, below the range: the duty word must sit at its limit and the
// output must stay below the target (about 0.9 x 45 V). Two runs use a
// 4.000 MHz PID clock that drifts against the 444.4 MHz PWM clock, so the
// four samples move through the switching period; the average must still be
// within 1 V of the target. At 60 V (48 V mode) and 40 V (24 V mode), where
// the loop gain is lower, the loop must settle completely and raise the
// stabilised flag.
// The operating range and the 5 V steps follow the converter specification;
// the chosen voltages, run lengths and tolerances are this testbench's own.
`timescale 1ps/1ps
module buck_vin_tb;
  import buck_ctrl_pkg::*;

  logic             clk_pid, clk_pwm = 1'b0;
  logic             rst;
  logic             mode;
  logic [ADC_W-1:0] adc;
  logic             pwm_pos, pwm_neg, stabilised;
  logic [D_W-1:0]   dbg_duty;
  logic [V_W-1:0]   dbg_v;

  buck_controller dut (.*);

  // PID clock: 4.004 MHz (exactly 1/111 of the PWM clock) for most runs; the
  // last runs switch to 4.000 MHz, so the sampling instants drift through the
  // switching period by about 1 ns per period.
  logic clk_lock = 1'b0, clk_free = 1'b0, drift = 1'b0;
  always #124875 clk_lock = ~clk_lock;
  always #125000 clk_free = ~clk_free;
  assign clk_pid = drift ? clk_free : clk_lock;   // switched only in reset
  always #1125   clk_pwm = ~clk_pwm;   // 444.4 MHz

  int checks = 0, failures = 0;

  initial begin
    #12000000000;   // 12 ms
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

  int n_lim = 0;
  always @(posedge clk_pid)
    if (!rst && dut.u_pid.en && dut.u_pid.d_next == D_MAX) n_lim++;

  task automatic start(input bit m, input real v);
    rst = 1'b1;
    mode = m; vin = v;
    if (m) begin l_h = 32.8e-6; c_f = 0.39e-6; r_ohm = 23.04; end
    else   begin l_h = 22.0e-6; c_f = 0.47e-6; r_ohm = 5.76;  end
    #20000000;
    il = 0.0; vo = 0.0;
    rst = 1'b0;
  endtask

  task automatic measure(input int us, input real target, input string name);
    vmax = 0.0; vmin = 200.0; vsum = 0.0; vn = 0;
    run_us(us, 1'b1);
    $display("%s: mean %f V, range %f .. %f V, stabilised %0d", name, vsum / vn, vmin, vmax, stabilised);
    check({name, ": mean within 1 V"}, vsum / vn > target - 1.0 && vsum / vn < target + 1.0);
  endtask

  initial begin
    automatic real v48[5] = '{54.0, 60.0, 80.0, 100.0, 111.0};
    automatic real v24[5] = '{27.0, 40.0, 60.0, 100.0, 111.0};
    int lim0;
    rst = 1'b1; mode = 1'b1; adc = '0;
    foreach (v48[i]) begin
      start(1'b1, v48[i]);
      run_us(150, 1'b0);
      measure(350, 48.0, $sformatf("48V at Vin %0.1f V", v48[i]));
      if (v48[i] == 60.0) check("48V at Vin 60 V: settled, stabilised flag high", stabilised);
    end
    foreach (v24[i]) begin
      start(1'b0, v24[i]);
      run_us(150, 1'b0);
      measure(350, 24.0, $sformatf("24V at Vin %0.1f V", v24[i]));
      if (v24[i] == 40.0) check("24V at Vin 40 V: settled, stabilised flag high", stabilised);
    end
    for (int m = 1; m >= 0; m--) begin
      automatic real t = (m == 1) ? 48.0 : 24.0;
      start(m[0], 100.0);
      run_us(300, 1'b0);
      vin = 95.0;
      measure(300, t, $sformatf("%0.0fV after 5 V input drop", t));
      vin = 100.0;
      measure(300, t, $sformatf("%0.0fV after 5 V input rise", t));
    end
    rst = 1'b1;
    #1000000;
    drift = 1'b1;
    start(1'b1, 60.0);
    run_us(150, 1'b0);
    measure(850, 48.0, "48V at Vin 60 V, drifting clocks");
    start(1'b0, 100.0);
    run_us(150, 1'b0);
    measure(850, 24.0, "24V at Vin 100 V, drifting clocks");
    rst = 1'b1;
    #1000000;
    drift = 1'b0;
    start(1'b1, 45.0);
    run_us(150, 1'b0);
    lim0 = n_lim;
    vmax = 0.0; vmin = 200.0; vsum = 0.0; vn = 0;
    run_us(200, 1'b1);
    $display("48V at Vin 45 V: mean %f V, duty at limit in %0d of 200 updates", vsum / vn, n_lim - lim0);
    check("Vin 45 V: duty word held at its limit", n_lim - lim0 >= 190);
    check("Vin 45 V: output below target", vsum / vn < 47.0 && vsum / vn > 38.0);
    check("drives never overlapped", overlap == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
