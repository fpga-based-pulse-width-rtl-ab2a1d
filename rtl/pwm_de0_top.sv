// pwm_de0_top: PWM generator wired to a DE0-class FPGA board, an LED and an
// L293D motor driver.
//
// The duty-cycle word is set on the slide switches SW[N-1:0] (1 = switch up).
// Pushbutton BUTTON[0] (active low) resets the generator; it is passed
// through two flip-flops so that the reset is synchronous to CLOCK_50. The
// PWM output drives green LED LEDG[0], whose brightness then follows the
// duty cycle, and the Enable 1,2 pin of an L293D driver: while enable is
// high the driver's left H-bridge half powers the motor, so the motor speed
// follows the duty cycle. SW[9] picks the direction on Input 1 / Input 2.
// LEDG[1] and LEDG[2] show the overflow and compare pulses.
//
// Interface: CLOCK_50 (50 MHz), BUTTON[2:0], SW[9:0] in; LEDG[9:0],
// motor_en12, motor_in1, motor_in2 out. With N = 8 the PWM period is
// 256 clocks, 5.12 us at 50 MHz (195.3 kHz). The reset takes effect two
// clocks after BUTTON[0] goes low and is held while it is low.
//
// The LED and motor-driver use and the L293D pin meaning follow the design.
// Which switch, button, LED and direction pins are used, and the reset
// synchroniser, are this implementation's choices. BUTTON[2:1] and the
// switches between SW[N-1] and SW[9] are unused (lint reports them).
module pwm_de0_top
  import pwm_pkg::*;
#(
  parameter int unsigned N = PWM_WIDTH
) (
  input  logic       CLOCK_50,
  input  logic [2:0] BUTTON,
  input  logic [9:0] SW,
  output logic [9:0] LEDG,
  output logic       motor_en12,
  output logic       motor_in1,
  output logic       motor_in2
);

  // SW[9] is the direction switch, so the duty word may use at most SW[8:0]
  if (N > 9) begin : g_width_check
    $error("pwm_de0_top: N must be 9 or less");
  end

  // two-stage synchroniser for the active-low reset button
  logic [1:0] rst_sync;
  always_ff @(posedge CLOCK_50) rst_sync <= {rst_sync[0], BUTTON[0]};

  logic pwm_q, pwm_cout, pwm_aeb;

  pwm #(.N(N)) u_pwm (
    .clk    (CLOCK_50),
    .rst_n  (rst_sync[1]),
    .data_in(SW[N-1:0]),
    .q      (pwm_q),
    .cout   (pwm_cout),
    .aeb    (pwm_aeb)
  );

  assign LEDG       = {7'b0, pwm_aeb, pwm_cout, pwm_q};
  assign motor_en12 = pwm_q;
  assign motor_in1  = SW[9];
  assign motor_in2  = ~SW[9];

endmodule
