// rs_latch: clocked set/reset storage element that forms the PWM output.
//
// On a rising clock edge, s = 1 sets q to 1, r = 1 (with s = 0) resets q to 0,
// and with both 0 q holds. It is built as a flip-flop rather than a
// level-sensitive latch so that the whole generator is synchronous to one
// clock and q is glitch-free.
//
// Interface: clk, rst_n (synchronous, active low, q to 0), s, r in; q out.
// Timing: q changes one clock edge after s or r is seen.
//
// Set and reset as such follow the design. When s and r are both 1, set wins:
// that case arises only for the largest duty-cycle word, and set priority
// turns it into a 100 % duty cycle, so a larger word never gives a shorter
// pulse. The priority and the reset value are this implementation's choices.
module rs_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else if (s) q <= 1'b1;
    else if (r) q <= 1'b0;
  end

endmodule
