// tb_optical_encoder: checks the sensor model's output frequency against
// f = N*RPM/60 and its duty cycle against the comparator threshold. With a
// 12 kHz model clock and 4 slots, 600 RPM gives 40 Hz = 300 cycles per
// period and 1800 RPM gives 100 cycles; at VREF = 127 the output is high for
// about half of each period, at VREF = 191 for about a quarter; 0 RPM gives
// no edges.
module tb_optical_encoder;
  localparam int CLK_HZ = 12_000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] rpm = '0;
  logic vout, vout_q;
  int checks = 0, failures = 0;

  optical_encoder #(.N_SLOTS(4), .CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .rpm, .vout);
  optical_encoder #(.N_SLOTS(4), .CLK_HZ(CLK_HZ), .VREF(191)) dutq (.clk, .rst_n, .rpm, .vout(vout_q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Period and high time of one output, measured between rising edges.
  task automatic measure(input bit which, output int period, output int high);
    logic prev;
    prev = which ? vout_q : vout;
    period = 0; high = 0;
    // wait for a rising edge
    forever begin
      @(posedge clk);
      if ((which ? vout_q : vout) && !prev) break;
      prev = which ? vout_q : vout;
    end
    prev = 1'b1;
    forever begin
      if (which ? vout_q : vout) high++;
      period++;
      @(posedge clk);
      if ((which ? vout_q : vout) && !prev) break;
      prev = which ? vout_q : vout;
    end
  endtask

  task automatic try_rpm(input int r);
    int period, high, exp_p;
    rpm = 16'(r);
    exp_p = (60 * CLK_HZ) / (4 * r);
    repeat (3 * exp_p) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      measure(1'b0, period, high);
      check(period == exp_p, $sformatf("rpm %0d period %0d expected %0d", r, period, exp_p));
      check(high * 100 >= period * 48 && high * 100 <= period * 52, $sformatf("50%% duty, high=%0d", high));
      measure(1'b1, period, high);
      check(period == exp_p, "period at VREF 191");
      check(high * 100 >= period * 23 && high * 100 <= period * 27, $sformatf("25%% duty, high=%0d", high));
    end
  endtask

  initial begin
    int edges = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    try_rpm(600);
    try_rpm(1800);
    rpm = '0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      logic p;
      p = vout;
      @(posedge clk);
      if (vout != p) edges++;
    end
    check(edges == 0, "no edges at standstill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
