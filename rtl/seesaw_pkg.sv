// seesaw_pkg: shared word width, word type and gain arithmetic for the
// ball-balancing see-saw controller.
//
// All controller arithmetic is 16-bit two's complement, matching the 16-bit
// signed error and angle words exchanged with the microcontroller over SPI.
// The helper functions turn the three classic gains (Kp, Ki, Kd) into the
// coefficients of the discrete-time difference equation
//   u[k] = u[k-1] + K1*e[k] + K2*e[k-1] + K3*e[k-2]
// with K1 = Kp+Ki+Kd, K2 = -Kp-2Kd and K3 = Kd (backward-difference form of
// the continuous PID law).
package seesaw_pkg;

  localparam int unsigned WORD_W = 16;

  typedef logic signed [WORD_W-1:0] word_t;

  function automatic int coef_k1(input int kp, input int ki, input int kd);
    return kp + ki + kd;
  endfunction

  function automatic int coef_k2(input int kp, input int kd);
    return -kp - 2 * kd;
  endfunction

  function automatic int coef_k3(input int kd);
    return kd;
  endfunction

endpackage
