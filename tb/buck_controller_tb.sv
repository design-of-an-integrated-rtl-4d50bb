// buck_controller_tb: closed-loop test of the controller with a buck converter.
//
// The controller runs at its default sizes (444-step DPWM at 2.25 ns, 4 MHz
// PID clock, 4-sample averaging) against a behavioural model of the power
// stage and the ADC:
//   - switch node = Vin while the high-side drive is on, else 0 V (during the
//     dead time the low-side body diode carries the inductor current);
//   - inductor and capacitor integrated every 2.25 ns:
//       iL += (vsw - vo) / L * dt,  vo += (iL - vo / R) / C * dt;
//   - the ADC samples vo on each falling PID-clock edge and quantises it to
//     u7.4 (1/16 V), saturating at 0 and 127.9375 V.
// The 4 MHz and 444 MHz clocks are not related (444 x 2.25 ns = 999 ns), so
// the duty word really crosses between asynchronous domains.
// Scenario:
//   1. 48 V converter (32.8 uH, 0.39 uF, 23.04 ohm), Vin = 100 V: start-up.
//      The reference must ramp at 15 LSB (3.75 V) per update and the output,
//      averaged over 100..400 us, must be 48 V +/- 1 V and stay below 60 V.
//   2. Vin drops to 95 V: the averaged output stays 48 V +/- 1 V.
//   3. Vin falls to 30 V (below what 48 V needs): the duty word must sit at its
//      limit (399), the PID feedback must saturate, and, with the duty word
//      frozen for more than 15 updates, the stabilised flag must rise. Vin
//      back to 100 V: the saturated feedback must unwind so that the duty word
//      leaves its limit (flag drops) within 400 us, and the averaged output
//      must return to 48 V +/- 1 V.
//   4. Mode switched to 24 V while running (load 5.76 ohm): the reference must
//      ramp down at 10 LSB (2.5 V) per update; averaged output 24 V +/- 1 V.
//   5. Reset, then start-up of the 24 V converter (22 uH, 0.47 uF, 5.76 ohm):
//      averaged output 24 V +/- 1 V.
// With the ideal LC model and the default tuning the loop settles into a
// sustained oscillation of a few volts around the reference (the tuning
// has too little phase margin for the sampled loop), so the output is judged by its
// average and its bounds, not by settling.
// The converter values, loads and reference voltages follow the converter
// specification; the switch-level model, the scenario and its tolerances are
// this testbench's own choices.
`timescale 1ps/1ps
module buck_controller_tb;
  import buck_ctrl_pkg::*;

  logic             clk_pid = 1'b0, clk_pwm = 1'b0;
  logic             rst;
  logic             mode;
  logic [ADC_W-1:0] adc;
  logic             pwm_pos, pwm_neg, stabilised;
  logic [D_W-1:0]   dbg_duty;
  logic [V_W-1:0]   dbg_v;

  buck_controller dut (.*);

  // PID clock = DPWM clock / 111, so four PID cycles span one 444-step period
  // exactly (4.004 MHz and 444.4 MHz); the phase of the PID clock is set by
  // PID_PHASE. The two clocks still have no common reset or edge alignment.
  localparam int PID_PHASE = 0;   // ps
  initial begin
    #(PID_PHASE);
    forever #124875 clk_pid = ~clk_pid;
  end
  always #1125 clk_pwm = ~clk_pwm;

  int checks = 0, failures = 0;

  initial begin
    #6000000000;   // 6 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- power stage and ADC model ----------------
  real vin = 100.0, l_h = 32.8e-6, c_f = 0.39e-6, r_ohm = 23.04;
  real il = 0.0, vo = 0.0;
  localparam real DT = 2.25e-9;

  always @(posedge clk_pwm) begin
    real vsw;
    vsw = pwm_pos ? vin : 0.0;
    if (!pwm_pos && !pwm_neg && il < 0.0) vsw = vin;   // high-side body diode
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

  // ---------------- DPWM monitor ----------------
  int per_len = 0, n_periods = 0, n_pos_rise = 0, skip = 2;
  int overlap = 0, per_bad = 0;
  logic pos_q = 1'b0;
  always @(posedge clk_pwm) begin
    #1;
    if (!rst) begin
      if (pwm_pos && pwm_neg) overlap++;
      if (pwm_pos && !pos_q) n_pos_rise++;
      per_len++;
      if (dut.u_dpwm.period_end) begin
        if (skip > 0) skip--;
        else if (per_len != 444) per_bad++;
        n_periods++;
        per_len = 0;
      end
    end else begin
      per_len = 0;
      skip = 2;
    end
    pos_q = pwm_pos;
  end

  // ---------------- mechanism counters (PID clock domain) ----------------
  int n_rate = 0, n_dlim = 0, n_sat = 0, n_stab_rise = 0, n_stab_fall = 0;
  int n_xfer = 0, n_mode = 0, n_upd = 0;
  logic stab_q = 1'b0, mode_q = 1'b1;
  logic [D_W-1:0] dout_q = '0;
  always @(posedge clk_pid) begin
    if (!rst) begin
      if (dut.u_pid.en) begin
        n_upd++;
        if (dut.u_spf.step == dut.u_spf.rate_s || dut.u_spf.step == -dut.u_spf.rate_s)
          if (dut.u_spf.step != 0) n_rate++;
        if (dut.u_pid.d_next == D_MAX) n_dlim++;
        if (U_W'(dut.u_pid.us) != dut.u_pid.u) n_sat++;
      end
      if (stabilised && !stab_q) n_stab_rise++;
      if (!stabilised && stab_q) n_stab_fall++;
      if (mode != mode_q) n_mode++;
    end
    stab_q = stabilised;
    mode_q = mode;
  end
  always @(posedge clk_pwm) begin
    if (dut.u_cdc.d_out != dout_q) n_xfer++;
    dout_q = dut.u_cdc.d_out;
  end

  // ---------------- helpers ----------------
  real vmax, vmin, vsum;
  int  vn;
  task automatic run_us(input int us);
    repeat (us) begin
      #1000000;
      if (vo > vmax) vmax = vo;
      if (vo < vmin) vmin = vo;
      vsum += vo;
      vn++;
    end
  endtask

  task automatic clear_stats();
    vmax = 0.0; vmin = 200.0; vsum = 0.0; vn = 0;
  endtask

  task automatic expect_band(input string what, input real lo, input real hi, input real v);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("%s: %f V outside [%f, %f]", what, v, lo, hi);
    end else
      $display("%s: %f V", what, v);
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("%s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAILED: %s", what); end
    else $display("ok: %s", what);
  endtask

  initial begin
    int rate_before, dlim_before, sat_before, rise_before, fall_before;
    rst = 1'b1; mode = 1'b1; adc = '0;
    #2000000;
    rst = 1'b0;

    // 1. 48 V start-up
    clear_stats();
    run_us(100);
    expect_true("48V start-up: reference ramped at the 48 V rate", n_rate >= 12);
    expect_band("48V start-up, peak", 0.0, 60.0, vmax);
    clear_stats();
    run_us(300);
    expect_band("48V, mean output 100..400 us", 47.0, 49.0, vsum / vn);
    $display("48V, output range %f .. %f V", vmin, vmax);

    // 2. input drop 100 V -> 95 V
    vin = 95.0;
    clear_stats();
    run_us(300);
    expect_band("95 V input, mean output", 47.0, 49.0, vsum / vn);

    // 3. input far too low, then restored
    dlim_before = n_dlim; sat_before = n_sat; rise_before = n_stab_rise;
    vin = 30.0;
    run_us(500);
    expect_true("30 V input: duty word at its limit", n_dlim - dlim_before >= 400);
    expect_true("30 V input: PID feedback saturated", n_sat > sat_before);
    expect_true("30 V input: stabilised flag rose", n_stab_rise > rise_before && stabilised);
    fall_before = n_stab_fall;
    vin = 100.0;
    begin
      automatic int t = 0;
      while (stabilised && t < 400) begin run_us(1); t++; end
      expect_true("Vin restored: wind-up bounded, duty word left its limit within 400 us",
                  !stabilised && n_stab_fall > fall_before);
      $display("duty word left its limit %0d us after Vin was restored", t);
    end
    run_us(500);
    clear_stats();
    run_us(200);
    expect_band("Vin restored, mean output", 47.0, 49.0, vsum / vn);

    // 4. live mode switch to 24 V
    rate_before = n_rate;
    mode = 1'b0;
    r_ohm = 5.76;
    run_us(30);
    expect_true("mode switch: reference ramped down at the 24 V rate",
                n_rate - rate_before >= 9 && dut.vref_f == VREF_24);
    run_us(200);
    clear_stats();
    run_us(200);
    expect_band("mode switch 48 V -> 24 V, mean output", 23.0, 25.0, vsum / vn);

    // 5. reset and start-up of the 24 V converter
    rst = 1'b1;
    l_h = 22.0e-6; c_f = 0.47e-6; r_ohm = 5.76; vin = 100.0;
    #40000000;
    il = 0.0; vo = 0.0;
    rst = 1'b0;
    run_us(100);
    clear_stats();
    run_us(300);
    expect_band("24V start-up, mean output 100..400 us", 23.0, 25.0, vsum / vn);
    $display("24V, output range %f .. %f V", vmin, vmax);

    expect_true("drives never overlapped", overlap == 0);
    expect_true("every switching period 444 clocks", per_bad == 0);
    expect_count("switching periods", n_periods);
    expect_count("high-side pulses", n_pos_rise);
    expect_count("PID updates", n_upd);
    expect_count("rate-limited reference steps", n_rate);
    expect_count("duty word at its limit", n_dlim);
    expect_count("PID feedback saturated", n_sat);
    expect_count("stabilised flag rises", n_stab_rise);
    expect_count("stabilised flag drops", n_stab_fall);
    expect_count("duty words crossed to the DPWM", n_xfer);
    expect_count("mode switches", n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
