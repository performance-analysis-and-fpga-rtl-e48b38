// optical_encoder: behavioural model of the optical speed sensor (not logic
// that runs on the FPGA; it stands for the analog circuit on the motor).
//
// The real sensor is a disc with N_SLOTS radial slots on the motor shaft, an
// LED on one side, an OPT101 photodiode/amplifier on the other and one
// LM324 section as a comparator: the comparator output is high when the
// photodiode voltage exceeds Vref and low otherwise, giving a square wave of
// frequency f = N_SLOTS * RPM / 60.
//
// The model keeps the shaft angle within one slot pitch as a phase
// accumulator: every clock it advances by N_SLOTS*rpm, and one slot pitch is
// 60*CLK_HZ, so the phase wraps N_SLOTS*rpm/60 times per second. The
// photodiode level is modelled as a triangle over the slot pitch (0 at the
// edge of a slot, full scale 255 at its centre) and compared with VREF
// (0..254): vout is high while the level is above VREF, so VREF sets the
// duty cycle of the square wave (50 % at VREF = 127). N_SLOTS = 4 and the
// comparator rule follow the source design; the triangle light profile and
// the clocked phase accumulator are this model's choices.
//
// Interface: rpm is the shaft speed in revolutions per minute, sampled every
// clock; vout is the comparator output. Reset (synchronous, active low) puts
// the disc at the start of a slot pitch.
module optical_encoder #(
  parameter int unsigned N_SLOTS = 4,
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned VREF    = 127
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] rpm,
  output logic        vout
);

  localparam longint PITCH  = 64'd60 * CLK_HZ;          // phase units per slot pitch
  // Triangle level = 510*phase/PITCH on the rising half; level > VREF between:
  localparam longint TH_LO  = (longint'(VREF) * PITCH) / 510;
  localparam longint TH_HI  = PITCH - TH_LO;

  logic [63:0] phase, phase_inc;

  always_comb begin
    phase_inc = phase + 64'(N_SLOTS) * 64'(rpm);
    if (phase_inc >= 64'(PITCH)) phase_inc = phase_inc - 64'(PITCH);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      vout  <= 1'b0;
    end else begin
      phase <= phase_inc;
      vout  <= (phase_inc > 64'(TH_LO)) && (phase_inc < 64'(TH_HI));
    end
  end

endmodule
