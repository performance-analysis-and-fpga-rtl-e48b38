// tb_speed_comparator: checks error = reference - measured speed, its sign,
// the extremes of the 16-bit range, the one-cycle latency and that the error
// holds between samples.
module tb_speed_comparator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] ref_speed = '0, speed = '0;
  logic speed_valid = 1'b0, err_valid;
  logic signed [16:0] err;
  int checks = 0, failures = 0;

  speed_comparator dut (.clk, .rst_n, .ref_speed, .speed, .speed_valid, .err, .err_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input logic [15:0] r, input logic [15:0] s);
    longint exp_v = longint'(r) - longint'(s);
    @(negedge clk); ref_speed = r; speed = s; speed_valid = 1'b1;
    @(negedge clk); speed_valid = 1'b0;
    check(err_valid, "err_valid one cycle after speed_valid");
    check(longint'(err) == exp_v, $sformatf("err %0d - %0d", r, s));
    ref_speed = ~r; speed = r;           // inputs change without a strobe
    @(negedge clk);
    check(!err_valid, "err_valid is a single pulse");
    check(longint'(err) == exp_v, "err holds between samples");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    apply(16'd60, 16'd60);
    apply(16'd60, 16'd45);
    apply(16'd30, 16'd52);
    apply(16'hFFFF, 16'd0);
    apply(16'd0, 16'hFFFF);
    for (int i = 0; i < 200; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
