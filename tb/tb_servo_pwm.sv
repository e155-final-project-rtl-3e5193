// tb_servo_pwm: self-checking test of the servo PWM generator.
//
// Runs one instance at reduced sizes (prescale 4, reset period 50 ticks) and
// measures every period between period_start pulses: its length in clocks
// must be PRESCALE*period and its high time PRESCALE*min(duty, period), with
// the pulse high from the period start. New values are written mid-period
// and must apply only from the next period. Constant-low (duty 0) and
// constant-high (duty >= period) cases are included. A second instance at
// the default sizes checks one 4.5 ms servo period with a 1.5 ms pulse
// (135 degrees at 0.5 ms + angle/270 * 2 ms) on a 40 MHz clock.
module tb_servo_pwm;
  localparam int PS = 4;
  localparam int P0 = 50;

  logic        clk = 1'b0, reset = 1'b0, upd_we = 1'b0;
  logic [15:0] upd_period = '0, upd_duty = '0;
  logic        pwm_out, period_start;
  logic        upd_we_f = 1'b0;
  logic [15:0] upd_duty_f = '0;
  logic        pwm_f, start_f;
  int          checks = 0, failures = 0;

  servo_pwm #(.PRESCALE(PS), .PERIOD_RST(P0), .DUTY_RST(10)) dut (
    .clk, .reset, .upd_we, .upd_period, .upd_duty, .pwm_out, .period_start);

  servo_pwm dut_full (
    .clk, .reset, .upd_we(upd_we_f), .upd_period(16'd22500), .upd_duty(upd_duty_f),
    .pwm_out(pwm_f), .period_start(start_f));

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    repeat (1_600_000) @(posedge clk);   // 40 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // measure one full period of the small instance; returns clocks and high clocks
  task automatic measure(output int len, output int high, output bit first_high);
    len = 0; high = 0;
    @(negedge clk iff period_start);
    first_high = pwm_out;
    do begin
      if (pwm_out) high++;
      len++;
      @(negedge clk);
    end while (!period_start);
  endtask

  task automatic expect_period(input int per, input int duty);
    int len, high; bit fh;
    int exp_high;
    measure(len, high, fh);
    exp_high = PS * ((duty < per) ? duty : per);
    check("period length", len == PS * per);
    check("high time", high == exp_high);
    check("pulse starts the period", fh == (duty != 0));
  endtask

  int len, high; bit fh;

  initial begin
    #1 reset = 1'b1;
    #100 reset = 1'b0;
    expect_period(P0, 10);
    // write new values in the middle of a period: that period is unchanged
    @(posedge clk iff period_start);
    repeat (37) @(posedge clk);
    @(negedge clk) begin upd_we = 1'b1; upd_period = 16'd30; upd_duty = 16'd7; end
    @(negedge clk) upd_we = 1'b0;
    measure(len, high, fh);     // the period the write landed in (partly seen)
    expect_period(30, 7);
    expect_period(30, 7);
    @(negedge clk) begin upd_we = 1'b1; upd_period = 16'd20; upd_duty = 16'd0; end
    @(negedge clk) upd_we = 1'b0;
    measure(len, high, fh);
    expect_period(20, 0);       // constant low
    @(negedge clk) begin upd_we = 1'b1; upd_period = 16'd25; upd_duty = 16'd40; end
    @(negedge clk) upd_we = 1'b0;
    measure(len, high, fh);
    expect_period(25, 40);      // constant high
    for (int i = 0; i < 10; i++) begin
      int p, d;
      p = $urandom_range(2, 60);
      d = $urandom_range(0, p + 3);
      @(negedge clk) begin upd_we = 1'b1; upd_period = 16'(p); upd_duty = 16'(d); end
      @(negedge clk) upd_we = 1'b0;
      measure(len, high, fh);
      expect_period(p, d);
    end
    // default-size instance: 1.5 ms pulse in a 4.5 ms period
    @(negedge clk) begin upd_we_f = 1'b1; upd_duty_f = 16'd7500; end
    @(negedge clk) upd_we_f = 1'b0;
    @(posedge clk iff start_f);
    begin
      realtime t0, t1, t2;
      @(posedge clk iff start_f);
      t0 = $realtime;
      @(negedge pwm_f);
      t1 = $realtime;
      @(posedge clk iff start_f);
      t2 = $realtime;
      check("4.5 ms servo period", (t2 - t0) > 4499.9us && (t2 - t0) < 4500.1us);
      check("1.5 ms servo pulse", (t1 - t0) > 1499.9us && (t1 - t0) < 1500.1us);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
