// servo_pwm: period/duty PWM generator for the platform servo.
//
// A prescaler divides the input clock by PRESCALE (8 in the project: the
// microcontroller's main clock divided by eight). On every prescaled tick a
// counter advances; when it has counted PERIOD ticks it restarts from zero.
// The output goes high each time the counter restarts and low once the
// counter reaches the duty value, so duty = 0 gives a constant low and
// duty >= period a constant high.
// New period and duty values are written to update registers (upd_we) and
// take effect only at the end of the running period, so a pulse is never cut
// short mid-period. period_start pulses for one clock when a period begins.
// With a 40 MHz clock, /8 and PERIOD_RST = 22500 the period is 4.5 ms; a
// servo pulse of 0.5 ms (0 degrees) to 2.5 ms (270 degrees) is a duty of
// 2500 to 12500. The reset duty of zero (no pulse until software writes one)
// and the single shared update strobe are this design's choices.
// reset is asynchronous and active high.
module servo_pwm #(
  parameter int unsigned PRESCALE   = 8,
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned PERIOD_RST = 22500,
  parameter int unsigned DUTY_RST   = 0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             upd_we,
  input  logic [CNT_W-1:0] upd_period,
  input  logic [CNT_W-1:0] upd_duty,
  output logic             pwm_out,
  output logic             period_start
);

  localparam int unsigned PS_W = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PS_W-1:0]  ps_cnt;
  logic             tick;
  logic [CNT_W-1:0] cnt, period, duty, period_upd_q, duty_upd_q;
  logic             wrap;

  assign tick = (ps_cnt == PS_W'(PRESCALE - 1));
  assign wrap = tick && (cnt >= period - CNT_W'(1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ps_cnt       <= '0;
      cnt          <= '0;
      period       <= CNT_W'(PERIOD_RST);
      duty         <= CNT_W'(DUTY_RST);
      period_upd_q <= CNT_W'(PERIOD_RST);
      duty_upd_q   <= CNT_W'(DUTY_RST);
      period_start <= 1'b1;
    end else begin
      period_start <= 1'b0;
      ps_cnt <= tick ? '0 : ps_cnt + PS_W'(1);
      if (upd_we) begin
        period_upd_q <= upd_period;
        duty_upd_q   <= upd_duty;
      end
      if (wrap) begin
        cnt          <= '0;
        period       <= upd_we ? upd_period : period_upd_q;
        duty         <= upd_we ? upd_duty   : duty_upd_q;
        period_start <= 1'b1;
      end else if (tick) begin
        cnt <= cnt + CNT_W'(1);
      end
    end
  end

  assign pwm_out = (cnt < duty);

endmodule
