// pwm_register: N-bit duty-cycle register.
//
// Holds the duty-cycle word that the comparator checks the counter against.
// On a rising clock edge with load = 1 the register takes the data input;
// otherwise it keeps its value. In the PWM generator load is the counter's
// overflow, so a new word is taken once per period, at the period boundary,
// and the word never changes in the middle of a pulse.
//
// Interface: clk, rst_n (synchronous, active low, clears to 0), load, d[N-1:0]
// in; q[N-1:0] out. Timing: q shows d one cycle after the edge that sampled
// load = 1.
//
// Loading under a load input follows the block diagram of the design; the
// clear-to-zero reset is this implementation's choice.
module pwm_register
  import pwm_pkg::*;
#(
  parameter int unsigned N = PWM_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
