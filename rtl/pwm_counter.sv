// pwm_counter: N-bit free-running up-counter with overflow flag.
//
// The count is the digital sawtooth of the PWM generator: it runs
// 0, 1, ..., 2**N-1 and wraps to 0, so one PWM period is 2**N clock cycles.
// cout is the overflow (terminal count) flag: it is 1 during the last cycle
// of every period, while q = 2**N-1, so anything clocked on cout acts on the
// same edge on which the count wraps to 0.
//
// Interface: clk, rst_n (synchronous, active low, count to 0) in; q[N-1:0]
// and cout out. cout is combinational from q.
//
// The up-counter and its overflow come from the design; counting on every
// clock (no enable), the terminal-count form of the overflow and the reset
// are this implementation's choices.
module pwm_counter
  import pwm_pkg::*;
#(
  parameter int unsigned N = PWM_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] q,
  output logic         cout
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= q + 1'b1;
  end

  assign cout = &q;

endmodule
