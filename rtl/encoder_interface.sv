// encoder_interface: turns the optical-encoder square wave into a speed sample.
//
// The encoder output has frequency f = N*RPM/60 (N slots on the disc). The
// interface synchronises it to the clock with two flip-flops, detects its
// rising edges and counts them over a fixed gate of GATE_CYCLES clocks (the
// sampling period Ts). At the end of every gate the count, f*Ts pulses, is
// written to `speed` and `speed_valid` pulses for one cycle; the next gate
// starts at once, so no edge is lost or counted twice. The pulse counter
// saturates at its maximum.
//
// The source design feeds the encoder signal to the controller through an
// "ADC interface"; the comparator output it receives is already a two-level
// signal, so here it is read as a digital input. Measuring speed by counting
// pulses over a gate, and the gate length (CLK_HZ/4 cycles, Ts = 1/4 s at
// 50 MHz), are this design's choices.
//
// Timing: speed_valid pulses once every GATE_CYCLES clocks; an edge on
// enc_in is counted three clocks later (two synchroniser stages plus the edge
// register). Reset is synchronous, active low.
module encoder_interface
  import speed_ctrl_pkg::*;
#(
  parameter int unsigned S_W         = SPEED_W,
  parameter int unsigned GATE_CYCLES = CLK_HZ_DEFAULT >> TS_LOG2_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enc_in,       // asynchronous encoder comparator output
  output logic [S_W-1:0] speed,        // pulses counted in the last gate
  output logic           speed_valid   // one-cycle strobe per gate
);

  localparam int unsigned G_W = (GATE_CYCLES > 1) ? $clog2(GATE_CYCLES) : 1;
  localparam logic [G_W-1:0] GATE_LAST = G_W'(GATE_CYCLES - 1);

  logic [2:0]     sync;        // [0],[1]: synchroniser, [2]: previous level
  logic           rise;
  logic [G_W-1:0] gate_cnt;
  logic [S_W-1:0] pulse_cnt, pulse_inc;
  logic           gate_end;

  assign rise      = sync[1] & ~sync[2];
  assign gate_end  = (gate_cnt == GATE_LAST);
  assign pulse_inc = (rise && pulse_cnt != '1) ? pulse_cnt + 1'b1 : pulse_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync        <= '0;
      gate_cnt    <= '0;
      pulse_cnt   <= '0;
      speed       <= '0;
      speed_valid <= 1'b0;
    end else begin
      sync        <= {sync[1:0], enc_in};
      speed_valid <= gate_end;
      if (gate_end) begin
        gate_cnt  <= '0;
        speed     <= pulse_inc;
        pulse_cnt <= '0;
      end else begin
        gate_cnt  <= gate_cnt + 1'b1;
        pulse_cnt <= pulse_inc;
      end
    end
  end

endmodule
