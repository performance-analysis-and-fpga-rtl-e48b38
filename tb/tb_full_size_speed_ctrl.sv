// tb_full_size_speed_ctrl: one complete speed-control operation with every
// parameter of the controller at its default (50 MHz clock, sampling period
// 1/4 s = 12.5M cycles, 4-slot encoder, Kp = 100, Ki = 200, Kd = 10).
//
// The loop is closed around a first-order motor model (6000 RPM at 100 %
// duty, time constant 2^22 cycles ~ 84 ms). The reference steps from 0 to
// 60 pulses per sample (3600 RPM); after 24 samples (6 s of motor time,
// 300M cycles) the measured speed averaged over the last 5 samples must be
// within 1 count of the reference and the motor model within 120 RPM of
// 3600. The sample period and the PWM period (257 cycles) are checked too.
module tb_full_size_speed_ctrl;
  import speed_ctrl_pkg::*;

  localparam int unsigned TS_CYC = CLK_HZ_DEFAULT >> TS_LOG2_DEFAULT;
  localparam int unsigned REF    = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [SPEED_W-1:0] ref_speed = '0, speed;
  logic [15:0] motor_rpm;
  logic pwm, enc, speed_valid, pwm_tc;
  logic signed [ERR_W-1:0] err;
  logic [PWM_W-1:0] duty, pwm_count;
  logic signed [23:0] integ;
  int checks = 0, failures = 0;

  dc_motor_speed_ctrl dut (
    .clk, .rst_n, .ref_speed, .motor_rpm, .pwm, .enc, .speed, .speed_valid,
    .err, .duty, .pwm_tc, .pwm_count, .integ
  );

  dc_motor_model #(.RPM_MAX(6000), .TAU_LOG2(22)) motor (.clk, .rst_n, .pwm, .rpm(motor_rpm));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sample period and PWM period.
  longint cyc = 0, last_sv = -1, last_rise = -1;
  int n_pwm_periods = 0;
  logic pwm_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    pwm_d <= pwm;
    if (speed_valid) begin
      if (last_sv >= 0) check(cyc - last_sv == longint'(TS_CYC), "sample period");
      last_sv = cyc;
    end
    if (pwm && !pwm_d) begin
      if (last_rise >= 0 && n_pwm_periods < 1000) begin
        check(cyc - last_rise == 257, "PWM period 257 cycles");
        n_pwm_periods++;
      end
      last_rise = cyc;
    end
  end

  initial begin
    int sum = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    ref_speed <= SPEED_W'(REF);
    for (int i = 0; i < 24; i++) begin
      @(posedge clk iff speed_valid);
      $display("sample %0d: speed=%0d duty=%0d rpm=%0d", i, speed, duty, motor_rpm);
      if (i >= 19) sum += int'(speed);
    end
    check(sum >= int'(REF - 1) * 5 && sum <= int'(REF + 1) * 5, "speed settles at the reference");
    check(int'(motor_rpm) >= 3480 && int'(motor_rpm) <= 3720, "motor near 3600 RPM");
    check(n_pwm_periods > 0, "PWM periods measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (26 * TS_CYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
