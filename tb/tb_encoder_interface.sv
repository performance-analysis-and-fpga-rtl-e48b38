// tb_encoder_interface: drives square waves of known period into the encoder
// interface (gate shortened to 1000 cycles) and checks the pulse count of
// every gate. Periods that divide the gate length give an exact count in every
// gate whatever the phase: 10 -> 100, 40 -> 25, 250 -> 4; no input -> 0.
// A second instance with a 4-bit count checks saturation at 15. The strobe
// period is checked too.
module tb_encoder_interface;
  localparam int GATE = 1000;
  logic clk = 1'b0, rst_n = 1'b0, enc = 1'b0;
  logic [15:0] speed;
  logic [3:0]  speed4;
  logic sv, sv4;
  int checks = 0, failures = 0;
  int half = 0;   // half period in cycles, 0 = no signal

  encoder_interface #(.GATE_CYCLES(GATE)) dut (.clk, .rst_n, .enc_in(enc), .speed, .speed_valid(sv));
  encoder_interface #(.S_W(4), .GATE_CYCLES(GATE)) dut4 (.clk, .rst_n, .enc_in(enc), .speed(speed4), .speed_valid(sv4));

  always #5 clk = ~clk;

  // Encoder waveform generator, changing between clock edges.
  int ph = 0;
  always @(negedge clk) begin
    if (half == 0) enc <= 1'b0;
    else begin
      ph++;
      if (ph >= half) begin ph = 0; enc <= ~enc; end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, last = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sv) begin
      if (last >= 0) check(cyc - last == GATE, "gate period");
      last = cyc;
    end
  end

  task automatic run(input int h, input int expect_cnt);
    half = h;
    repeat (2) @(posedge clk iff sv);      // let a whole gate pass with the new input
    for (int g = 0; g < 4; g++) begin
      @(posedge clk iff sv);
      check(int'(speed) == expect_cnt, $sformatf("half=%0d speed=%0d expected %0d", h, speed, expect_cnt));
      check(int'(speed4) == ((expect_cnt > 15) ? 15 : expect_cnt), "4-bit count saturates");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(5, 100);
    run(20, 25);
    run(125, 4);
    run(0, 0);
    run(20, 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * GATE) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
