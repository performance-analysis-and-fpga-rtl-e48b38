// speed_comparator: forms the speed error fed to the PID controller.
//
// It is the summing junction of the control loop: error = reference speed -
// measured speed, both unsigned and in encoder pulses per sampling period.
// The error is one bit wider than the speeds and signed, so it never
// overflows. The subtraction and its sign convention follow the source
// design; registering the result is this design's choice.
//
// Timing: when speed_valid is high, ref_speed and speed are sampled; one
// clock later err holds their difference and err_valid pulses for one cycle.
// err holds its value between samples. Reset is synchronous, active low.
module speed_comparator
  import speed_ctrl_pkg::*;
#(
  parameter int unsigned S_W = SPEED_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [S_W-1:0]      ref_speed,
  input  logic [S_W-1:0]      speed,
  input  logic                speed_valid,
  output logic signed [S_W:0] err,
  output logic                err_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err       <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= speed_valid;
      if (speed_valid)
        err <= $signed({1'b0, ref_speed}) - $signed({1'b0, speed});
    end
  end

endmodule
