// pid_controller: discrete PID speed controller producing the PWM duty value.
//
// It evaluates, once per speed sample, the sampled form of
//   u(t) = Kp*e(t) + Ki * integral(e) + Kd * de/dt
// with rectangular integration and a backward difference, sampling period
// Ts = 2^-TS_LOG2 seconds:
//   I[k] = sat(I[k-1] + e[k], +-ILIM)
//   u[k] = ( Kp*e[k] + Ki*Ts*I[k] + (Kd/Ts)*(e[k]-e[k-1]) ) / 2^OUT_SHIFT
// clamped to the PWM data range 0 .. 2^PWM_W-1. Because Ts is a power of two
// the whole sum is formed exactly in units of 2^-TS_LOG2:
//   acc = Kp*e*2^TS_LOG2 + Ki*I + Kd*de*2^(2*TS_LOG2)
//   u   = sat(acc >>> (TS_LOG2 + OUT_SHIFT))
// The gain defaults Kp = 100, Ki = 200, Kd = 10 are the source design's
// chosen gains; the PID law is the source's. The discretisation, the sampling
// period, the output scaling OUT_SHIFT (error in encoder pulses per sample,
// output in PWM counts) and the integrator clamp (anti-windup: the integral
// term alone can just reach full scale) are this design's choices.
//
// Interface: err/err_valid carry one signed error sample (reference minus
// measured speed). One clock after err_valid, u holds the new duty value and
// u_valid pulses for one cycle. u holds its value between samples. Reset is
// synchronous, active low, and clears the integrator, the stored previous
// error and the output.
module pid_controller
  import speed_ctrl_pkg::*;
#(
  parameter int unsigned E_W       = ERR_W,
  parameter int unsigned U_W       = PWM_W,
  parameter int unsigned KP        = 100,
  parameter int unsigned KI        = 200,
  parameter int unsigned KD        = 10,
  parameter int unsigned TS_LOG2   = TS_LOG2_DEFAULT,
  parameter int unsigned OUT_SHIFT = 6,
  parameter int unsigned I_W       = 24    // integrator register width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  err_valid,
  input  logic signed [E_W-1:0] err,
  output logic                  u_valid,
  output logic        [U_W-1:0] u,
  output logic signed [I_W-1:0] integ     // integrator state, for observation
);

  localparam int ACC_W = 64;
  localparam int SH    = TS_LOG2 + OUT_SHIFT;
  // Integrator clamp: Ki*ILIM / 2^SH ~= 2^U_W, limited to what I_W bits hold.
  localparam longint ILIM_FULL = (KI == 0) ? (64'sd1 <<< (I_W - 1)) - 1
                                           : ((64'sd1 <<< U_W) <<< SH) / longint'(KI);
  localparam longint IMAX_REG  = (64'sd1 <<< (I_W - 1)) - 1;
  localparam longint ILIM      = (ILIM_FULL < IMAX_REG) ? ILIM_FULL : IMAX_REG;
  localparam longint UMAX      = (64'sd1 <<< U_W) - 1;

  logic signed [E_W-1:0]   err_prev;
  logic signed [ACC_W-1:0] integ_sum, integ_n, de, acc, u_full;
  logic        [U_W-1:0]   u_n;

  always_comb begin
    // Integrator with symmetric clamp.
    integ_sum = ACC_W'(integ) + ACC_W'(err);
    if (integ_sum > ILIM)       integ_n = ILIM;
    else if (integ_sum < -ILIM) integ_n = -ILIM;
    else                        integ_n = integ_sum;

    de  = ACC_W'(err) - ACC_W'(err_prev);
    acc = ((ACC_W'(err) * $signed(ACC_W'(KP))) <<< TS_LOG2)
        +  (integ_n     * $signed(ACC_W'(KI)))
        + ((de          * $signed(ACC_W'(KD))) <<< (2 * TS_LOG2));
    u_full = acc >>> SH;

    if (u_full < 0)         u_n = '0;
    else if (u_full > UMAX) u_n = '1;
    else                    u_n = u_full[U_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ    <= '0;
      err_prev <= '0;
      u        <= '0;
      u_valid  <= 1'b0;
    end else begin
      u_valid <= err_valid;
      if (err_valid) begin
        integ    <= integ_n[I_W-1:0];
        err_prev <= err;
        u        <= u_n;
      end
    end
  end

endmodule
