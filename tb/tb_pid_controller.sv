// tb_pid_controller: checks the discrete PID law at its default gains
// (Kp = 100, Ki = 200, Kd = 10, Ts = 1/4 s, output scaled by 2^-6) against a
// floating-point model of
//   I[k] = clamp(I[k-1] + e[k], +-327)      327 = floor(2^8 * 2^(2+6) / 200)
//   u[k] = clamp(floor((Kp*e + Ki*Ts*I + Kd/Ts*(e[k]-e[k-1])) / 64), 0, 255)
// over directed and random error sequences, with gaps between samples. It
// checks the one-cycle latency of u_valid, that u holds between samples, and
// counts that the integrator clamp and both output limits were reached.
module tb_pid_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic err_valid = 1'b0, u_valid;
  logic signed [16:0] err = '0;
  logic [7:0] u;
  logic signed [23:0] integ;
  int checks = 0, failures = 0;
  int n_clamp = 0, n_hi = 0, n_lo = 0;

  pid_controller dut (.clk, .rst_n, .err_valid, .err, .u_valid, .u, .integ);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real m_i = 0.0, m_eprev = 0.0;
  localparam real ILIM = 327.0;

  task automatic sample(input int e, input int gap);
    real ev, v, exp_u;
    ev = real'(e);
    m_i = m_i + ev;
    if (m_i > ILIM) m_i = ILIM;
    if (m_i < -ILIM) m_i = -ILIM;
    v = (100.0 * ev + 200.0 * 0.25 * m_i + 10.0 / 0.25 * (ev - m_eprev)) / 64.0;
    exp_u = $floor(v);
    if (exp_u < 0.0) exp_u = 0.0;
    if (exp_u > 255.0) exp_u = 255.0;
    m_eprev = ev;
    @(negedge clk); err = 17'(e); err_valid = 1'b1;
    @(negedge clk); err_valid = 1'b0;
    check(u_valid, "u_valid one cycle after err_valid");
    check(int'(u) == int'(exp_u), $sformatf("e=%0d u=%0d expected %0d", e, u, int'(exp_u)));
    check(real'(integ) == m_i, $sformatf("integrator %0d expected %0f", integ, m_i));
    if (m_i == ILIM || m_i == -ILIM) n_clamp++;
    if (u == 8'hFF) n_hi++;
    if (u == 8'h00) n_lo++;
    for (int g = 0; g < gap; g++) begin
      err = 17'($urandom);                 // ignored without err_valid
      @(negedge clk);
      check(!u_valid && int'(u) == int'(exp_u), "u holds between samples");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    sample(0, 0);
    sample(10, 2);
    sample(10, 0);
    sample(-5, 1);
    for (int i = 0; i < 40; i++) sample(30, 0);      // wind up into the clamp
    for (int i = 0; i < 60; i++) sample(-40, 0);     // and out to the other side
    for (int i = 0; i < 500; i++) sample(int'($urandom_range(80)) - 40, int'($urandom_range(3)));
    sample(60000, 0);                                // large error
    sample(-60000, 0);
    $display("clamp=%0d high=%0d low=%0d", n_clamp, n_hi, n_lo);
    check(n_clamp > 0 && n_hi > 0 && n_lo > 0, "clamp and both limits reached");
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
