// tb_pwm: end-to-end test of the PWM generator at N = 3 (period 8 clocks).
//
// The testbench keeps its own cycle count from the release of reset, so it
// knows the position pos (0..7) in each period without looking at the
// design's counter. For every cycle it checks
//   cout == (pos == 7)
//   aeb  == (pos == D)
//   q    == (pos <= D)       (q == 0 throughout the first period)
// where D is the data word present in the last cycle of the previous period.
// First every word 0..7 is held for two periods (duty (D+1)/8, 7 giving a
// constant 1); then the data input is changed at random cycles, also in
// the middle of periods, which must only take effect at the next period.
// Per period it also checks that the pulse is one block of D+1 high cycles.
module tb_pwm;
  localparam int N = 3;
  localparam int P = 1 << N;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] data_in;
  logic         q, cout, aeb;

  int checks = 0;
  int failures = 0;
  // how often each mechanism was seen
  int n_set = 0, n_reset = 0, n_load_change = 0, n_full = 0, n_midchange = 0;

  pwm #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .data_in(data_in),
                    .q(q), .cout(cout), .aeb(aeb));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic got, input logic want, input int t);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s cycle %0d: got %0b want %0b", what, t, got, want);
    end
  endtask

  initial begin
    int d_cur, d_prev, high_cnt, pos, period;
    logic q_last;
    rst_n = 1'b0;
    data_in = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    d_cur = 0; d_prev = -1; high_cnt = 0; q_last = 1'b0;
    for (int t = 0; t < 40 * P; t++) begin
      pos = t % P;
      period = t / P;
      // outputs for this cycle
      expect_eq("cout", cout, pos == P - 1, t);
      expect_eq("aeb", aeb, pos == d_cur, t);
      expect_eq("q", q, (period > 0) && (pos <= d_cur), t);
      if (q && !q_last) n_set++;
      if (!q && q_last) n_reset++;
      q_last = q;
      if (q) high_cnt++;
      // choose the data input for the next edge
      if (t < 2 * P * P) begin
        if (pos == P - 1) data_in = N'((period + 1) / 2);
      end else if ($urandom_range(0, 4) == 0) begin
        data_in = N'($urandom);
        if (pos != P - 1) n_midchange++;
      end
      if (pos == P - 1) begin
        // end of period: check the pulse length, then take the new word
        if (period > 0) begin
          checks++;
          if (high_cnt != d_cur + 1) begin
            failures++;
            $display("FAIL period %0d: %0d high cycles, want %0d", period, high_cnt, d_cur + 1);
          end
          if (d_cur == P - 1) n_full++;
        end
        high_cnt = 0;
        if (int'(data_in) != d_cur) n_load_change++;
        d_prev = d_cur;
        d_cur = int'(data_in);
      end
      @(negedge clk);
    end
    $display("sets=%0d resets=%0d new_words=%0d full_duty_periods=%0d mid_period_changes=%0d",
             n_set, n_reset, n_load_change, n_full, n_midchange);
    checks++; if (n_set == 0)         begin failures++; $display("FAIL: latch never set"); end
    checks++; if (n_reset == 0)       begin failures++; $display("FAIL: latch never reset"); end
    checks++; if (n_load_change == 0) begin failures++; $display("FAIL: no new word loaded"); end
    checks++; if (n_full == 0)        begin failures++; $display("FAIL: no 100%% duty period"); end
    checks++; if (n_midchange == 0)   begin failures++; $display("FAIL: no mid-period change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
