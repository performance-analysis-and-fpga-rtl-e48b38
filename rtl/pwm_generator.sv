// pwm_generator: 8-bit PWM generator built from a data register, an up/down
// counter with terminal count and a toggle flip-flop.
//
// How it works: the data register holds the duty value D. A toggle
// flip-flop (dir_up) sets the counter direction. In the count-down phase the
// counter runs from D to 0; reaching 0 raises the terminal count, which
// reloads D and toggles the flip-flop. In the count-up phase the counter runs
// from D to its maximum (2^W - 1); reaching it raises the terminal count
// again, which reloads D and toggles back. The counter is loaded only on a
// terminal count, so a new D written into the data register takes effect at
// the next phase boundary and never cuts a pulse short.
//
// The PWM output is high in the count-down phase and low in the count-up
// phase. The count-down phase lasts D+1 cycles and the count-up phase 2^W-D
// cycles, so the period is 2^W+1 cycles (257 for W = 8) and the duty cycle
// is (D+1)/(2^W+1): 0xE6 -> 89.9 %, 0xC0 -> 75.1 %, 0x80 -> 50.2 %,
// 0x40 -> 25.3 %, 0x19 -> 10.1 %, i.e. a larger D gives a larger duty cycle.
// The structure (data register, up/down counter, terminal count, toggle
// flip-flop, reload on terminal count) and those duty values follow the
// source design; having the output high during the count-down phase is this
// design's choice, made so that the duty cycle rises with D.
//
// Interface: data_wr writes data_in into the data register (the value is
// visible on data_q the next cycle). pwm, tc and count are registered-state
// outputs. Reset (active low, synchronous) clears the data register and
// forces a terminal count in the first cycle after reset, which loads the
// data register and starts a count-down phase.
module pwm_generator
  import speed_ctrl_pkg::*;
#(
  parameter int unsigned W = PWM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] data_in,   // new duty value
  input  logic         data_wr,   // write data_in into the data register
  output logic [W-1:0] data_q,    // data register contents
  output logic [W-1:0] count,     // up/down counter
  output logic         tc,        // terminal count
  output logic         pwm        // PWM output
);

  localparam logic [W-1:0] CNT_MAX = '1;

  logic dir_up;  // toggle flip-flop: 1 = count up, 0 = count down

  // Terminal count: zero while counting down, maximum while counting up.
  assign tc  = dir_up ? (count == CNT_MAX) : (count == '0);
  assign pwm = ~dir_up;

  // Data register.
  always_ff @(posedge clk) begin
    if (!rst_n)       data_q <= '0;
    else if (data_wr) data_q <= data_in;
  end

  // Up/down counter with load on terminal count, and the toggle flip-flop.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dir_up <= 1'b1;
      count  <= CNT_MAX;     // terminal count in the first cycle after reset
    end else if (tc) begin
      dir_up <= ~dir_up;
      count  <= data_q;
    end else if (dir_up) begin
      count  <= count + 1'b1;
    end else begin
      count  <= count - 1'b1;
    end
  end

  // The direction flip-flop only ever changes on a terminal count.
  a_toggle_on_tc : assert property (@(posedge clk) disable iff (!rst_n)
      (dir_up != $past(dir_up)) |-> $past(tc));

endmodule
