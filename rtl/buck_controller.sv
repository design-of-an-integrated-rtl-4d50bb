// buck_controller: digital voltage-mode controller for a synchronous buck
// converter (100 V input, 48 V or 24 V output, 1 MHz switching).
//
// Two clock domains:
//   clk_pid (4 MHz): sample_averager takes four ADC samples per switching
//     period and averages them; its valid pulse is the 1 MHz PID update.
//     tuning_select picks the 24 V or 48 V constants from `mode`;
//     setpoint_filter ramps the reference from 0 V towards the target at the
//     mode's rate limit; pid_core computes the next duty word;
//     stabilisation_indicator watches the duty word.
//   clk_pwm (444 MHz): dpwm counts 444 steps per period and drives the
//     non-overlapping high-side (pwm_pos) and low-side (pwm_neg) signals.
// duty_cdc carries each duty word across; it reaches the DPWM comparator about
// three clk_pwm cycles after the PID produced it. Each domain has its own reset synchroniser (sync_2ff with its input
// tied high): rst asserts asynchronously and is released on the domain's clock.
// Update order in clk_pid: in the cycle that presents the fourth ADC sample of
// a period the averager forms the mean combinationally and raises its valid
// pulse; on that edge the PID and setpoint-filter registers and the duty word
// are updated and the request bit of the crossing to the DPWM domain toggles.
// The document gives the blocks and clock rates; the reset synchronisers, the
// same-edge averaging and the toggle-based crossing are this design's choices.
// The DPWM's period_end is left unconnected: the new duty word is applied as
// soon as it arrives. rst_pwm also disables the DPWM's no-overlap assertion.
// dbg_duty and dbg_v bring out the duty word and the averaged voltage for
// observation.
module buck_controller
  import buck_ctrl_pkg::*;
#(
  parameter int unsigned N_STEPS    = PWM_STEPS,
  parameter int unsigned N_AVG      = 4,
  parameter int unsigned STAB_DEPTH = 15
) (
  input  logic             clk_pid,
  input  logic             clk_pwm,
  input  logic             rst,         // asynchronous, active high
  input  logic             mode,        // 0: 24 V converter, 1: 48 V converter
  input  logic [ADC_W-1:0] adc,         // output voltage, u7.4 volts
  output logic             pwm_pos,     // high-side switch drive
  output logic             pwm_neg,     // low-side switch drive
  output logic             stabilised,
  output logic [D_W-1:0]   dbg_duty,    // duty word, u0.9 of the 444-step period
  output logic [V_W-1:0]   dbg_v        // averaged voltage, s7.2
);

  localparam int unsigned DPWM_DUTY_W = 10;

  logic rst_pid_n, rst_pwm_n, rst_pid, rst_pwm;

  sync_2ff #(.WIDTH(1), .STAGES(2)) u_rst_pid (
    .clk(clk_pid), .rst(rst), .d(1'b1), .q(rst_pid_n));
  sync_2ff #(.WIDTH(1), .STAGES(2)) u_rst_pwm (
    .clk(clk_pwm), .rst(rst), .d(1'b1), .q(rst_pwm_n));

  assign rst_pid = ~rst_pid_n;
  assign rst_pwm = ~rst_pwm_n;

  // ---------------- PID clock domain ----------------
  tuning_t tuning;
  volt_t   v_avg;
  volt_t   vref_f;
  logic    avg_valid;
  logic    pid_en;
  duty_t   d;
  logic    d_valid;
  logic signed [U_W-1:0] u_unused;

  tuning_select u_tuning (
    .mode   (mode_e'(mode)),
    .tuning (tuning)
  );

  sample_averager #(.N_AVG(N_AVG)) u_avg (
    .clk   (clk_pid),
    .rst   (rst_pid),
    .adc   (adc),
    .v_avg (v_avg),
    .valid (avg_valid)
  );

  // The average is valid only in the cycle of the last sample of a group;
  // the PID and setpoint filter load on that edge (1 MHz update).
  assign pid_en = avg_valid;

  setpoint_filter u_spf (
    .clk     (clk_pid),
    .rst     (rst_pid),
    .en      (pid_en),
    .target  (tuning.vref),
    .rate    (tuning.rate),
    .ref_out (vref_f)
  );

  pid_core u_pid (
    .clk     (clk_pid),
    .rst     (rst_pid),
    .en      (pid_en),
    .ref_in  (vref_f),
    .v_in    (v_avg),
    .a0      (tuning.a0),
    .a1      (tuning.a1),
    .a2      (tuning.a2),
    .d       (d),
    .d_valid (d_valid),
    .u_out   (u_unused)
  );

  stabilisation_indicator #(.DEPTH(STAB_DEPTH)) u_stab (
    .clk    (clk_pid),
    .rst    (rst_pid),
    .en     (d_valid),
    .d      (d),
    .stable (stabilised)
  );

  // v_avg is only formed in the cycle that completes a group of samples;
  // keep the last average for observation.
  always_ff @(posedge clk_pid or posedge rst_pid) begin
    if (rst_pid)        dbg_v <= '0;
    else if (avg_valid) dbg_v <= v_avg;
  end

  assign dbg_duty = d;

  // ---------------- crossing and DPWM clock domain ----------------
  logic [D_W-1:0] d_pwm;

  duty_cdc #(.W(D_W)) u_cdc (
    .clk_src    (clk_pid),
    .rst_src    (rst_pid),
    .load       (pid_en),
    .d_in       (d),
    .clk_dst    (clk_pwm),
    .rst_dst    (rst_pwm),
    .d_out      (d_pwm)
  );

  dpwm #(.N_STEPS(N_STEPS), .DUTY_W(DPWM_DUTY_W)) u_dpwm (
    .clk        (clk_pwm),
    .rst        (rst_pwm),
    .duty       (DPWM_DUTY_W'(d_pwm)),
    .pwm_pos    (pwm_pos),
    .pwm_neg    (pwm_neg),
    .period_end ()
  );

endmodule
