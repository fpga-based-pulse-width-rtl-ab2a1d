// pwm_pkg: constants shared by the PWM generator and its board top.
//
// PWM_WIDTH is the width N of the duty-cycle register, the counter and the
// comparator. The design uses an 8-bit up-counter, so one PWM period is
// 2**8 = 256 clock cycles. Every module takes N as a parameter whose default
// is this constant.
package pwm_pkg;
  localparam int unsigned PWM_WIDTH = 8;
endpackage
