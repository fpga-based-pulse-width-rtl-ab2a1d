// tb_rs_latch: self-checking test of the clocked set/reset element.
//
// Walks through every set/reset combination from both output states, then
// applies 1000 random combinations. Expected output: s = 1 gives 1, r = 1
// alone gives 0, neither keeps the previous value.
module tb_rs_latch;
  logic clk = 1'b0;
  logic rst_n, s, r, q;

  int checks = 0;
  int failures = 0;
  int n_set = 0, n_reset = 0, n_hold = 0, n_both = 0;

  rs_latch dut (.clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic expect_q;

  task automatic step(input logic set_in, input logic reset_in);
    s = set_in;
    r = reset_in;
    if (set_in && reset_in) n_both++;
    if (set_in)        begin expect_q = 1'b1; n_set++;   end
    else if (reset_in) begin expect_q = 1'b0; n_reset++; end
    else               n_hold++;
    @(negedge clk);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL s=%0b r=%0b q=%0b expected %0b at %0t", set_in, reset_in, q, expect_q, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; s = 1'b1; r = 1'b0;
    @(negedge clk);
    expect_q = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    // directed: hold 0, set, hold 1, reset, both from 0, both from 1
    step(0, 0); step(1, 0); step(0, 0); step(0, 1); step(0, 0);
    step(1, 1); step(1, 1); step(0, 1); step(0, 1); step(1, 0); step(1, 0);
    for (int i = 0; i < 1000; i++) step(1'($urandom), 1'($urandom));
    $display("set=%0d reset=%0d hold=%0d both=%0d", n_set, n_reset, n_hold, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
