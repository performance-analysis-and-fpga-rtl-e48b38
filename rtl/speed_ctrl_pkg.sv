// speed_ctrl_pkg: widths and defaults shared by the DC-motor speed-control blocks.
//
// The control loop measures motor speed as the number of encoder pulses
// counted in one sampling (gate) period, compares it with a reference given
// in the same unit, runs a PID law on the difference and writes the result
// into the data register of an 8-bit PWM generator.
//
// PWM_W = 8 follows the 8-bit data values of the duty-cycle table and the
// 8-bit counter of the PWM simulation waveform. The speed and error widths,
// the 50 MHz clock and the 1/4 s sampling period are this design's choices.
package speed_ctrl_pkg;

  // PWM data register / counter width (8 bits, as in the duty-cycle table).
  localparam int unsigned PWM_W   = 8;
  // Measured and reference speed: encoder pulses per sampling period.
  localparam int unsigned SPEED_W = 16;
  // Signed speed error, one bit wider than the speed so it cannot overflow.
  localparam int unsigned ERR_W   = SPEED_W + 1;

  // Default system clock (Spartan-3E boards commonly carry a 50 MHz oscillator).
  localparam int unsigned CLK_HZ_DEFAULT  = 50_000_000;
  // Sampling period Ts = 2^-TS_LOG2 s; the speed gate lasts CLK_HZ >> TS_LOG2 cycles.
  localparam int unsigned TS_LOG2_DEFAULT = 2;

  typedef logic        [PWM_W-1:0]   pwm_data_t;
  typedef logic        [SPEED_W-1:0] speed_t;
  typedef logic signed [ERR_W-1:0]   speed_err_t;

endpackage
