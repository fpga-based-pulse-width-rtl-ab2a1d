// pwm: N-bit pulse width modulation generator.
//
// Four blocks as in the design's block diagram. A free-running N-bit counter
// is the time base; its overflow ends each period of 2**N clocks, sets the
// R/S latch (output high) and loads the N-bit data input into the register.
// An equality comparator checks the register against the counter; when they
// are equal it resets the latch (output low). With data word D the output is
// high while the count is 0..D and low for the rest of the period:
//
//   on time = D + 1 clocks, period = 2**N clocks, duty = (D + 1) / 2**N
//
// so D = 2**N - 1 gives a constant 1 (100 %), and the smallest duty is
// 1 / 2**N. A new data word is sampled at the end of a period and takes
// effect for the whole next period. After reset the counter, register and
// output are 0, and the output stays low until the first overflow.
//
// Interface: clk, rst_n (synchronous, active low), data_in[N-1:0] in;
// q (PWM output), cout (overflow, 1 in the last clock of a period) and aeb
// (comparator A=B) out. The names q, cout and aeb follow the design's
// schematic. q, like the register, is registered; cout and aeb are
// combinational from registers.
//
// Two assertions state the output rules: q is 1 after every overflow and 0
// after every compare that is not also an overflow.
//
// The wiring is the design's. The terminal-count overflow, the set priority
// in the latch and the reset are choices of this implementation.
module pwm
  import pwm_pkg::*;
#(
  parameter int unsigned N = PWM_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] data_in,
  output logic         q,
  output logic         cout,
  output logic         aeb
);

  logic [N-1:0] duty;   // register output, comparator input A
  logic [N-1:0] count;  // counter output, comparator input B

  pwm_register #(.N(N)) u_register (
    .clk  (clk),
    .rst_n(rst_n),
    .load (cout),
    .d    (data_in),
    .q    (duty)
  );

  pwm_counter #(.N(N)) u_counter (
    .clk  (clk),
    .rst_n(rst_n),
    .q    (count),
    .cout (cout)
  );

  pwm_comparator #(.N(N)) u_comparator (
    .a  (duty),
    .b  (count),
    .aeb(aeb)
  );

  rs_latch u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .s    (cout),
    .r    (aeb),
    .q    (q)
  );

  // Output rules: the pulse starts on every overflow, and a compare that is
  // not also an overflow ends it.
  a_set_on_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    cout |=> q);
  a_reset_on_compare: assert property (@(posedge clk) disable iff (!rst_n)
    (aeb && !cout) |=> !q);

endmodule
