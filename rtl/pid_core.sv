// pid_core: discrete-time PID controller, one update per received error.
//
// Implements the backward-difference PID law
//   u[k] = u[k-1] + (Kp+Ki+Kd) e[k] + (-Kp-2Kd) e[k-1] + Kd e[k-2]
// with the gains fixed at elaboration (parameters KP, KI, KD). Everything is
// 16-bit two's complement and wraps on overflow, as on the original board;
// large errors or a non-zero integral gain can therefore wrap the output,
// which is why the defaults keep KI at zero.
//
// Handshake (all inputs already synchronised to clk):
//   * reset (asynchronous, active high) zeroes u[k-1], e[k-1], e[k-2] and done.
//   * The update happens in the single clock cycle after `load` is seen to
//     fall: the sum is formed combinationally, the output register takes it,
//     the error history shifts (e[k] -> e[k-1] -> e[k-2]) and done goes high
//     in the same edge.
//   * done stays high, and u_out constant, until the angle has been read out
//     (`tx_done` pulse) or a new error transfer starts (`load` rises).
// u_out is the registered u[k-1], i.e. the most recent output.
// The gain values themselves are this design's choice: the project only
// states that Ki is zero on the FPGA and that the derivative gain is larger
// than the proportional gain.
module pid_core
  import seesaw_pkg::*;
#(
  parameter int KP = 2,
  parameter int KI = 0,
  parameter int KD = 16
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  load,
  input  logic  tx_done,
  input  word_t e_in,
  output word_t u_out,
  output logic  done
);

  localparam word_t K1 = word_t'(coef_k1(KP, KI, KD));
  localparam word_t K2 = word_t'(coef_k2(KP, KD));
  localparam word_t K3 = word_t'(coef_k3(KD));

  word_t u_prev, e_prev1, e_prev2, u_next;
  logic  load_q;
  logic  update;

  assign update = load_q && !load;

  always_comb begin
    u_next = u_prev + word_t'(K1 * e_in) + word_t'(K2 * e_prev1)
                    + word_t'(K3 * e_prev2);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      u_prev  <= '0;
      e_prev1 <= '0;
      e_prev2 <= '0;
      done    <= 1'b0;
      load_q  <= 1'b0;
    end else begin
      load_q <= load;
      if (update) begin
        u_prev  <= u_next;
        e_prev1 <= e_in;
        e_prev2 <= e_prev1;
        done    <= 1'b1;
      end else if ((load && !load_q) || tx_done) begin
        done <= 1'b0;
      end
    end
  end

  assign u_out = u_prev;

  // done may only rise in the cycle after an update
  a_done_rise: assert property (@(posedge clk) disable iff (reset)
                                !$past(done) && done |-> $past(update));

endmodule
