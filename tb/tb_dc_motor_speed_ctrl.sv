// tb_dc_motor_speed_ctrl: end-to-end test of the closed speed loop.
//
// The controller is closed around a first-order motor model. The clock is
// scaled down to CLK_HZ = 100 kHz (the sampling period is still 1/4 s,
// i.e. 25000 cycles), so one simulated second takes 100k cycles; all other
// parameters are the defaults. The test
//  - steps the reference from 0 to REF1 and checks that the measured speed
//    settles to REF1 (+-1 count averaged over the last samples),
//  - steps it down to REF2 and checks the same,
//  - sets an unreachable reference and checks the duty saturates at 255,
//  - sets the reference to 0 and checks the duty goes to 0,
// and counts the mechanisms on the way: PWM terminal counts in both
// directions, speed samples, positive and negative errors, PID output
// saturation high and low, integrator clamp (anti-windup), and duty updates.
module tb_dc_motor_speed_ctrl;
  import speed_ctrl_pkg::*;

  localparam int unsigned CLK_HZ    = 100_000;
  localparam int unsigned TS_CYC    = CLK_HZ >> TS_LOG2_DEFAULT;
  localparam int unsigned TAU_LOG2  = 13;
  localparam int unsigned REF1      = 60;   // 3600 RPM
  localparam int unsigned REF2      = 30;   // 1800 RPM

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SPEED_W-1:0] ref_speed = '0, speed;
  logic [15:0] motor_rpm;
  logic pwm, enc, speed_valid, pwm_tc;
  logic signed [ERR_W-1:0] err;
  logic [PWM_W-1:0] duty, pwm_count;
  logic signed [23:0] integ;

  int checks = 0, failures = 0;
  int n_tc_up = 0, n_tc_down = 0, n_samples = 0, n_err_pos = 0, n_err_neg = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_clamp = 0, n_duty_change = 0, n_enc_edges = 0;

  dc_motor_speed_ctrl #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .ref_speed, .motor_rpm, .pwm, .enc, .speed, .speed_valid,
    .err, .duty, .pwm_tc, .pwm_count, .integ
  );

  dc_motor_model #(.RPM_MAX(6000), .TAU_LOG2(TAU_LOG2)) motor (
    .clk, .rst_n, .pwm, .rpm(motor_rpm)
  );

  always #5 clk = ~clk;

  // Timing: a speed sample every TS_CYC cycles, and the PID result written
  // into the PWM data register 3 cycles after the sample strobe.
  int cyc = 0, last_sv = -1, lat_checked = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (speed_valid) begin
      if (last_sv >= 0) check(cyc - last_sv == int'(TS_CYC), "sample period");
      last_sv = cyc;
    end
    if (dut.u_valid && dut.u != dut.duty) begin
      // u_valid is 2 cycles after speed_valid; the register updates on the next edge
      check(cyc - last_sv == 2, "PID latency");
      lat_checked++;
    end
  end

  // Mechanism counters.
  logic enc_d = 1'b0;
  logic [PWM_W-1:0] duty_d = '0;
  always @(posedge clk) if (rst_n) begin
    enc_d  <= enc;
    duty_d <= duty;
    if (enc && !enc_d) n_enc_edges++;
    if (pwm_tc && !pwm) n_tc_up++;     // terminal count at the top (count-up phase)
    if (pwm_tc && pwm)  n_tc_down++;   // terminal count at zero (count-down phase)
    if (speed_valid) n_samples++;
    if (duty != duty_d) n_duty_change++;
    if (dut.u_pid.u_valid) begin
      if (dut.u_pid.u == '1) n_sat_hi++;
      if (dut.u_pid.u == '0) n_sat_lo++;
    end
    if (dut.err_valid) begin
      if (dut.err > 0) n_err_pos++;
      if (dut.err < 0) n_err_neg++;
      if (longint'(integ) == dut.u_pid.ILIM || longint'(integ) == -dut.u_pid.ILIM) n_clamp++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run n samples, return the average measured speed (x16) over the last m.
  task automatic run_samples(input int n, input int m, output int avg16);
    int sum = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff speed_valid);
      if (i >= n - m) sum += int'(speed);
    end
    avg16 = (sum * 16) / m;
  endtask

  int avg16;

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;

    ref_speed <= SPEED_W'(REF1);
    run_samples(60, 20, avg16);
    $display("REF1=%0d avg=%0d/16 duty=%0d rpm=%0d", REF1, avg16, duty, motor_rpm);
    check(avg16 >= int'(REF1 - 1) * 16 && avg16 <= int'(REF1 + 1) * 16, "settle at REF1");

    ref_speed <= SPEED_W'(REF2);
    run_samples(60, 20, avg16);
    $display("REF2=%0d avg=%0d/16 duty=%0d rpm=%0d", REF2, avg16, duty, motor_rpm);
    check(avg16 >= int'(REF2 - 1) * 16 && avg16 <= int'(REF2 + 1) * 16, "settle at REF2");

    ref_speed <= SPEED_W'(400);           // far above the 100-count maximum
    run_samples(30, 1, avg16);
    check(duty == '1, "duty saturates high");

    ref_speed <= '0;
    run_samples(30, 1, avg16);
    check(duty == '0, "duty saturates low");

    $display("mechanisms: tc_up=%0d tc_down=%0d samples=%0d err+=%0d err-=%0d sat_hi=%0d sat_lo=%0d clamp=%0d duty_changes=%0d enc_edges=%0d",
             n_tc_up, n_tc_down, n_samples, n_err_pos, n_err_neg, n_sat_hi, n_sat_lo,
             n_clamp, n_duty_change, n_enc_edges);
    check(lat_checked > 0,   "latency observed");
    check(n_tc_up > 0,       "PWM terminal count at maximum happened");
    check(n_tc_down > 0,     "PWM terminal count at zero happened");
    check(n_samples > 0,     "speed samples happened");
    check(n_err_pos > 0,     "positive error happened");
    check(n_err_neg > 0,     "negative error happened");
    check(n_sat_hi > 0,      "PID output saturated high");
    check(n_sat_lo > 0,      "PID output saturated low");
    check(n_clamp > 0,       "integrator clamp happened");
    check(n_duty_change > 0, "duty register updated");
    check(n_enc_edges > 0,   "encoder pulses seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * TS_CYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
