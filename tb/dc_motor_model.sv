// dc_motor_model: behavioural model of the PWM-driven DC motor, for simulation only.
//
// A first-order model: the shaft speed approaches RPM_MAX while the PWM
// input is high and 0 while it is low, with time constant 2^TAU_LOG2 clock
// cycles. Averaged over a PWM period this gives a steady-state speed of
// duty * RPM_MAX. The speed is kept with 16 fractional bits; rpm is its
// integer part. RPM_MAX and the time constant are test choices, not values
// of a particular motor.
module dc_motor_model #(
  parameter int unsigned RPM_MAX  = 6000,
  parameter int unsigned TAU_LOG2 = 22
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pwm,
  output logic [15:0] rpm
);
  logic signed [47:0] speed_q;   // rpm with 16 fractional bits
  logic signed [47:0] target;

  assign target = pwm ? (48'sd1 <<< 16) * RPM_MAX : 48'sd0;
  assign rpm    = speed_q[31:16];

  always_ff @(posedge clk) begin
    if (!rst_n) speed_q <= '0;
    else        speed_q <= speed_q + ((target - speed_q) >>> TAU_LOG2);
  end
endmodule
