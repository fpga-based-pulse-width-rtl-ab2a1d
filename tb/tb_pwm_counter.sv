// tb_pwm_counter: self-checking test of the N-bit up-counter.
//
// Runs the 8-bit counter for three full periods after reset and checks every
// cycle that the count equals the number of clocks since reset modulo 256
// and that cout is 1 exactly in the last cycle of each period. It also
// checks that the overflows are 256 clocks apart (the PWM period).
module tb_pwm_counter;
  localparam int N = pwm_pkg::PWM_WIDTH;
  localparam int P = 1 << N;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] q;
  logic         cout;

  int checks = 0;
  int failures = 0;

  pwm_counter dut (.clk(clk), .rst_n(rst_n), .q(q), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_ovf, overflows;
    last_ovf = -1; overflows = 0;
    rst_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3 * P + 10; t++) begin
      // t-th cycle after release: the count is t mod 2**N
      checks++;
      if (q !== N'(t % P) || cout !== ((t % P) == P - 1)) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d cout=%0b", t, q, cout);
      end
      if (cout) begin
        if (last_ovf >= 0) begin
          checks++;
          if (t - last_ovf != P) begin
            failures++;
            $display("FAIL overflow spacing %0d, expected %0d", t - last_ovf, P);
          end
        end
        last_ovf = t;
        overflows++;
      end
      @(negedge clk);
    end
    checks++;
    if (overflows != 3) begin
      failures++;
      $display("FAIL: %0d overflows, expected 3", overflows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
