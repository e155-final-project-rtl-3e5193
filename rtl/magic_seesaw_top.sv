// magic_seesaw_top: digital hardware of the ball-balancing see-saw.
//
// The see-saw keeps a ball at a set point on a tilting track. A
// microcontroller measures the ball position, sends the position error to an
// FPGA that evaluates a discrete PID law, reads back a control word, turns it
// into a servo angle and drives the servo with PWM. This top holds the two
// pieces of that loop that are logic:
//   * u_ctrl: the FPGA controller (pid_controller), on its own clock, with
//     the SPI lines (sck, sdi, sdo) and the load/done side lines that go to
//     the microcontroller;
//   * u_pwm: the servo PWM generator (servo_pwm) on the microcontroller
//     clock, whose period/duty update port is written by the firmware.
// The firmware between the two (ADC read, position and error scaling,
// software integral term, angle limiting, angle-to-duty conversion) is not
// hardware, so both halves' ports are brought out here.
module magic_seesaw_top
  import seesaw_pkg::*;
(
  // FPGA controller
  input  logic        clk,
  input  logic        reset,
  input  logic        sck,
  input  logic        sdi,
  output logic        sdo,
  input  logic        load,
  output logic        done,
  output word_t       angle,
  // servo PWM
  input  logic        pwm_clk,
  input  logic        pwm_reset,
  input  logic        pwm_upd_we,
  input  logic [15:0] pwm_upd_period,
  input  logic [15:0] pwm_upd_duty,
  output logic        pwm_out,
  output logic        pwm_period_start
);

  pid_controller u_ctrl (
    .clk   (clk),
    .reset (reset),
    .sck   (sck),
    .sdi   (sdi),
    .sdo   (sdo),
    .load  (load),
    .done  (done),
    .angle (angle)
  );

  servo_pwm u_pwm (
    .clk          (pwm_clk),
    .reset        (pwm_reset),
    .upd_we       (pwm_upd_we),
    .upd_period   (pwm_upd_period),
    .upd_duty     (pwm_upd_duty),
    .pwm_out      (pwm_out),
    .period_start (pwm_period_start)
  );

endmodule
