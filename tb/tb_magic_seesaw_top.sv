// tb_magic_seesaw_top: closed-loop, end-to-end test of the see-saw hardware.
//
// The testbench plays everything around the two hardware blocks:
//   * firmware: per control step it reads the ball position through a model
//     of the 10 kOhm / soft-potentiometer divider and a 10-bit ADC, forms the
//     error against the set point, scales it by 1000 to a 16-bit word, runs
//     the load / SPI / done exchange with the controller, turns the returned
//     word into degrees (divide by 12, add the software integral term, clamp
//     to -12..+10 degrees, add the 151.5 degree neutral offset) and writes the
//     matching duty to the PWM block (0.5 ms + angle/270 * 2 ms at 5 MHz);
//   * servo and ball: the servo follows each measured pulse width, and the
//     ball rolls on the tilted track, (5/7) g sin(theta), integrated every 1 ms.
// Both clocks run at 40 MHz at the top's default parameters: the FPGA clock
// and the microcontroller clock feeding the PWM. The control loop steps every
// 40 ms as in the firmware.
// Checks: every returned control word against an integer PID model, done
// latency (3 FPGA clocks), every PWM period's length (4.5 ms) and pulse width
// against the duty in force at the start of that period, and that the ball
// settles near the set point after a disturbance and after a set point step.
// Mechanisms counted (each must occur): error transfer, read-out with done
// clearing, done cleared by a new load after a skipped read-out, a PWM write
// deferred to the end of the period, a 16-bit wrap of the controller output
// (provoked by a set point step with a too-fine error scaling of x30000),
// and controller reset.
module tb_magic_seesaw_top;
  import seesaw_pkg::*;

  localparam int KP = 2, KI = 0, KD = 16;   // controller defaults
  localparam real HALF_SCK = 125.0;         // 4 MHz SPI clock

  logic        clk = 1'b0, reset = 1'b0, sck = 1'b0, sdi = 1'b0, load = 1'b0;
  logic        sdo, done;
  word_t       angle;
  logic        pwm_clk = 1'b0, pwm_reset = 1'b0, pwm_upd_we = 1'b0;
  logic [15:0] pwm_upd_period = '0, pwm_upd_duty = '0;
  logic        pwm_out, pwm_period_start;

  int checks = 0, failures = 0;
  int n_xfer = 0, n_readout = 0, n_load_clear = 0, n_deferred = 0, n_wrap = 0, n_reset = 0;

  magic_seesaw_top dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #6;
    forever #12.5 pwm_clk = ~pwm_clk;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);   // 5 s
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

  // ---------------- servo, PWM measurement and ball ----------------
  real   x = 0.35, v = 0.0;    // ball position (m, 0.25 = centre) and speed
  real   servo_deg = 151.5;    // servo shaft angle
  int    duty_pending = 0, duty_active = 0, duty_written = 0;
  bit    pwm_started = 0;

  // duty in force: the value written last takes effect at a period start
  always @(posedge pwm_clk) begin
    if (pwm_upd_we) begin
      duty_pending = int'(pwm_upd_duty);
      if (pwm_started) n_deferred++;
    end
  end

  initial begin
    realtime t_start, t_fall, t_prev;
    bit have_prev = 0;
    @(negedge pwm_reset);
    forever begin
      @(posedge pwm_clk iff pwm_period_start);
      t_start = $realtime;
      if (have_prev) check("PWM period 4.5 ms", (t_start - t_prev) > 4499.9us && (t_start - t_prev) < 4500.1us);
      have_prev = 1;
      t_prev = t_start;
      duty_active = duty_pending;
      pwm_started = 1;
      if (duty_active > 0) begin
        @(negedge pwm_out);
        t_fall = $realtime;
        check("PWM pulse width", (t_fall - t_start) > (duty_active * 200.0 - 30.0) * 1ns &&
                                 (t_fall - t_start) < (duty_active * 200.0 + 30.0) * 1ns);
        servo_deg = ((t_fall - t_start) / 1ms - 0.5) / 2.0 * 270.0;
      end
    end
  end

  initial begin
    real theta;
    forever begin
      #1ms;
      theta = (servo_deg - 151.5) * 3.14159265 / 180.0;
      v = v - (5.0 / 7.0) * 9.81 * $sin(theta) * 0.001;
      x = x + v * 0.001;
      if (x < 0.0)  begin x = 0.0;  v = 0.0; end
      if (x > 0.5)  begin x = 0.5;  v = 0.0; end
    end
  end

  // ---------------- firmware ----------------
  int u = 0, e1 = 0, e2 = 0;           // integer PID model

  function automatic int wrap16(input int val);
    return int'(signed'(16'(val)));
  endfunction

  task automatic xfer(input logic [15:0] tx, output logic [15:0] rx);
    for (int i = 15; i >= 0; i--) begin
      sdi = tx[i];
      #(HALF_SCK) sck = 1'b1;
      rx[i] = sdo;
      #(HALF_SCK) sck = 1'b0;
    end
  endtask

  task automatic init_controller();
    reset = 1'b1;
    #20us reset = 1'b0;
    u = 0; e1 = 0; e2 = 0;
    #1us;
    check("controller idle after reset", !done && angle == 0);
    n_reset++;
  endtask

  // one exchange; returns the control word
  task automatic get_new_angle(input int eq, input bit read_back, output int word);
    logic [15:0] rx;
    int cyc, full;
    bit was_done;
    was_done = done;
    load = 1'b1;
    #200;
    if (was_done) begin
      check("load clears an unread done", !done);
      if (!done) n_load_clear++;
    end
    xfer(16'(eq), rx);
    load = 1'b0;
    n_xfer++;
    full = u + (KP+KI+KD)*eq + (-KP-2*KD)*e1 + KD*e2;
    if (full != wrap16(full)) n_wrap++;
    u = wrap16(full); e2 = e1; e1 = eq;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; #1; end
    check("done 3 clocks after load falls", cyc == 3);
    word = u;
    if (read_back) begin
      xfer(16'h4148, rx);
      word = int'(signed'(rx));
      check("control word matches PID model", word == u);
      cyc = 0;
      while (done && cyc < 10) begin @(posedge clk); cyc++; #1; end
      check("done falls after read-out", !done);
      n_readout++;
    end
  endtask

  function automatic int duty_for(input real deg);
    return int'((0.5 + deg / 270.0 * 2.0) * 5000.0);   // 5 MHz ticks
  endfunction

  task automatic servo_set(input real deg);
    @(negedge pwm_clk);
    pwm_upd_we = 1'b1;
    pwm_upd_period = 16'd22500;
    pwm_upd_duty = 16'(duty_for(deg));
    duty_written = duty_for(deg);
    @(negedge pwm_clk);
    pwm_upd_we = 1'b0;
  endtask

  real net_error = 0.0;

  task automatic control_loop(input int steps, input real xd, input real quant);
    real volts, pos, err, deg;
    int adc, word;
    for (int k = 0; k < steps; k++) begin
      volts = 3.3 * x / (x + 0.276);          // divider, R_pot/R_max = x/0.5
      adc   = int'(volts / 3.3 * 1023.0);
      volts = adc * 3.3 / 1023.0;
      pos   = volts * 0.276 / (3.3 - volts);
      err   = pos - xd;
      get_new_angle(int'(err * quant), 1'b1, word);
      deg = word / 12.0 + net_error;
      if (net_error > 2.0) net_error = 2.0;
      else if (net_error < -2.0) net_error = -2.0;
      net_error += err;
      if (deg > 10.0) deg = 10.0;
      else if (deg < -12.0) deg = -12.0;
      servo_set(deg + 151.5);
      #40ms;
    end
  endtask

  initial begin
    int word;
    pwm_reset = 1'b0;
    #3 pwm_reset = 1'b1;
    #1us pwm_reset = 1'b0;
    servo_set(151.5);
    init_controller();
    // a skipped read-out: the next exchange must clear done by itself
    get_new_angle(5, 1'b0, word);
    get_new_angle(-5, 1'b1, word);
    init_controller();
    // ball released 9 cm off the set point
    control_loop(40, 0.261, 1000.0);
    $display("ball at %0.4f m after disturbance (set point 0.261)", x);
    check("ball settles after disturbance", x > 0.236 && x < 0.286);
    // set point step of 10 cm
    control_loop(40, 0.161, 1000.0);
    $display("ball at %0.4f m after set point step (set point 0.161)", x);
    check("ball follows set point step", x > 0.136 && x < 0.186);
    // too-fine scaling (x30000) with a 10 cm set point step: the products
    // overflow 16 bits and the controller output wraps
    control_loop(3, 0.261, 30000.0);
    init_controller();
    check("reset happened", n_reset > 0);
    check("transfers happened", n_xfer > 0);
    check("read-outs happened", n_readout > 0);
    check("done cleared by load happened", n_load_clear > 0);
    check("deferred PWM update happened", n_deferred > 0);
    check("16-bit wrap happened", n_wrap > 0);
    $display("counts: reset=%0d xfer=%0d readout=%0d load_clear=%0d deferred=%0d wrap=%0d",
             n_reset, n_xfer, n_readout, n_load_clear, n_deferred, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
