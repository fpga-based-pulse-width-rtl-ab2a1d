// pwm_comparator: N-bit equality comparator.
//
// aeb is 1 when input A (the stored duty-cycle word) equals input B (the
// counter value). In the PWM generator this marks the last clock of the
// pulse and resets the R/S latch. Purely combinational, no clock.
//
// Interface: a[N-1:0], b[N-1:0] in; aeb out.
//
// The equality compare (A=B) is the design's own; nothing here is an added
// choice.
module pwm_comparator
  import pwm_pkg::*;
#(
  parameter int unsigned N = PWM_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         aeb
);

  assign aeb = (a == b);

endmodule
