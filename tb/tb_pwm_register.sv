// tb_pwm_register: self-checking test of the N-bit duty-cycle register.
//
// Drives random data and a random load input for 2000 cycles and checks that
// the output takes d exactly on the edges where load was 1 and holds it
// otherwise, and that reset clears it. Inputs change on the falling edge;
// outputs are checked on the falling edge, half a cycle after the update.
module tb_pwm_register;
  localparam int N = pwm_pkg::PWM_WIDTH;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load;
  logic [N-1:0] d;
  logic [N-1:0] q;

  int checks = 0;
  int failures = 0;
  int loads = 0, holds = 0;

  pwm_register dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] expect_q;

  task automatic check(input string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s: q=%0h expected %0h at %0t", what, q, expect_q, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b1; d = 8'hA5;
    @(negedge clk);
    expect_q = '0;
    check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      load = ($urandom_range(0, 3) == 0);
      d    = N'($urandom);
      if (load) begin expect_q = d; loads++; end
      else holds++;
      @(negedge clk);
      check(load ? "load" : "hold");
    end
    rst_n = 1'b0; load = 1'b0;
    @(negedge clk);
    expect_q = '0;
    check("reset again");
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL: loads=%0d holds=%0d", loads, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
