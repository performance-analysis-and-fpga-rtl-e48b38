// dc_motor_speed_ctrl: closed-loop DC motor speed controller.
//
// The loop: the optical encoder on the motor shaft produces a square wave
// whose frequency is proportional to speed; the encoder interface counts its
// pulses over one sampling period Ts; the comparator subtracts that count
// from the reference; the PID controller turns the error into an 8-bit duty
// value; the PWM generator drives the motor with that duty cycle. The
// encoder interface, comparator, PID controller and PWM generator are the
// FPGA logic; optical_encoder is a behavioural model of the sensor circuit.
// The motor and its driver are outside: pwm goes out to the driver and the
// shaft speed comes back in on motor_rpm (it only feeds the encoder model).
// The chain of blocks and which of them sit in the FPGA follow the source
// design; the units, the sampling period and the update timing below are this
// design's choices.
//
// Units: ref_speed and speed are encoder pulses per sampling period,
// i.e. N_SLOTS * RPM * Ts / 60; with the defaults (4 slots, Ts = 1/4 s)
// one count is 60/(4*Ts) = 60 RPM.
//
// Timing: one control update per sampling period. After speed_valid the
// error is registered (1 cycle), the PID output is registered (1 cycle) and
// written into the PWM data register (1 cycle); the PWM counter takes the
// new value at its next terminal count, i.e. within 2^8+1 cycles.
module dc_motor_speed_ctrl
  import speed_ctrl_pkg::*;
#(
  parameter int unsigned CLK_HZ    = CLK_HZ_DEFAULT,
  parameter int unsigned TS_LOG2   = TS_LOG2_DEFAULT,
  parameter int unsigned N_SLOTS   = 4,
  parameter int unsigned KP        = 100,
  parameter int unsigned KI        = 200,
  parameter int unsigned KD        = 10,
  parameter int unsigned OUT_SHIFT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SPEED_W-1:0] ref_speed,   // reference, pulses per Ts
  input  logic [15:0]      motor_rpm,     // shaft speed from the motor (to the encoder model)
  output logic             pwm,           // to the motor driver
  output logic             enc,           // encoder comparator output
  output logic [SPEED_W-1:0] speed,       // measured speed, pulses per Ts
  output logic             speed_valid,
  output logic signed [ERR_W-1:0] err,
  output logic [PWM_W-1:0] duty,          // PWM data register
  output logic             pwm_tc,        // PWM terminal count
  output logic [PWM_W-1:0] pwm_count,     // PWM up/down counter
  output logic signed [23:0] integ        // PID integrator state
);

  logic             err_valid, u_valid;
  logic [PWM_W-1:0] u;

  optical_encoder #(.N_SLOTS(N_SLOTS), .CLK_HZ(CLK_HZ)) u_encoder (
    .clk, .rst_n, .rpm(motor_rpm), .vout(enc)
  );

  encoder_interface #(.S_W(SPEED_W), .GATE_CYCLES(CLK_HZ >> TS_LOG2)) u_enc_if (
    .clk, .rst_n, .enc_in(enc), .speed, .speed_valid
  );

  speed_comparator #(.S_W(SPEED_W)) u_cmp (
    .clk, .rst_n, .ref_speed, .speed, .speed_valid, .err, .err_valid
  );

  pid_controller #(
    .E_W(ERR_W), .U_W(PWM_W), .KP(KP), .KI(KI), .KD(KD),
    .TS_LOG2(TS_LOG2), .OUT_SHIFT(OUT_SHIFT), .I_W(24)
  ) u_pid (
    .clk, .rst_n, .err_valid, .err, .u_valid, .u, .integ
  );

  pwm_generator #(.W(PWM_W)) u_pwm (
    .clk, .rst_n, .data_in(u), .data_wr(u_valid), .data_q(duty),
    .count(pwm_count), .tc(pwm_tc), .pwm
  );

endmodule
