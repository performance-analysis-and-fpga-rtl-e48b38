// tb_pwm_generator: self-checking test of the 8-bit PWM generator.
//
// A cycle-accurate reference model of the counter (count down from D to 0,
// reload, count up from D to 255, reload, direction toggling on each
// terminal count, output high while counting down) runs next to the DUT and
// every cycle its count, terminal count and PWM output are compared. For each
// duty-cycle table entry (0xE6, 0xC0, 0x80, 0x40, 0x19) the test then
// measures a full PWM period: it must be 257 cycles, the high time D+1
// cycles, and the duty cycle rounded to a whole percent must be 90, 75, 50,
// 25 and 10. A write in the middle of a phase checks that the new value only
// reaches the counter at the next terminal count.
module tb_pwm_generator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] data_in = '0, data_q, count;
  logic data_wr = 1'b0, tc, pwm;

  int checks = 0, failures = 0;

  pwm_generator dut (.clk, .rst_n, .data_in, .data_wr, .data_q, .count, .tc, .pwm);

  always #5 clk = ~clk;

  // Reference model.
  logic [7:0] m_data, m_cnt;
  logic       m_up;
  wire        m_tc  = m_up ? (m_cnt == 8'hFF) : (m_cnt == 8'h00);
  always @(posedge clk) begin
    if (!rst_n) begin
      m_data <= '0; m_cnt <= 8'hFF; m_up <= 1'b1;
    end else begin
      if (data_wr) m_data <= data_in;
      if (m_tc) begin m_cnt <= m_data; m_up <= ~m_up; end
      else m_cnt <= m_up ? m_cnt + 8'd1 : m_cnt - 8'd1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (count !== m_cnt || tc !== m_tc || pwm !== ~m_up) begin
      failures++;
      $display("FAIL t=%0t count=%h/%h tc=%b/%b pwm=%b/%b", $time, count, m_cnt, tc, m_tc, pwm, ~m_up);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rising edge of pwm, seen at a clock edge.
  logic pwm_d = 1'b0;
  always @(posedge clk) pwm_d <= pwm;
  wire pwm_rise = pwm && !pwm_d;

  // Measure one full period, from one rising edge of pwm to the next.
  task automatic measure(output int period, output int high);
    @(posedge clk iff pwm_rise);
    period = 0; high = 0;
    do begin
      if (pwm) high++;
      period++;
      @(posedge clk);
    end while (!pwm_rise);
  endtask

  localparam logic [7:0] TABLE_DATA [5] = '{8'hE6, 8'hC0, 8'h80, 8'h40, 8'h19};
  localparam int         TABLE_DUTY [5] = '{90, 75, 50, 25, 10};

  initial begin
    int period, high, pct;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 5; i++) begin
      @(posedge clk); data_in <= TABLE_DATA[i]; data_wr <= 1'b1;
      @(posedge clk); data_wr <= 1'b0;
      repeat (600) @(posedge clk);          // let the new value take over
      measure(period, high);
      pct = (high * 100 + period / 2) / period;
      $display("data=%b period=%0d high=%0d duty=%0d%%", TABLE_DATA[i], period, high, pct);
      check(period == 257, "period is 257 cycles");
      check(high == int'(TABLE_DATA[i]) + 1, "high time is D+1");
      check(pct == TABLE_DUTY[i], "duty matches table");
    end
    // Write in the middle of a count-down phase: the counter must finish the
    // phase with the old value and reload the new one at the terminal count.
    @(posedge clk iff (pwm && count == 8'h10));
    data_in <= 8'h33; data_wr <= 1'b1;
    @(posedge clk); data_wr <= 1'b0;
    check(count == 8'h0F, "count continues after a write");
    @(posedge clk iff tc);
    @(posedge clk);
    check(count == 8'h33, "new value loaded at terminal count");
    repeat (1000) @(posedge clk);
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
