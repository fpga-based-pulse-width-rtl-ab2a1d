// tb_pwm_de0_top: end-to-end test of the board top at its default size
// (8-bit PWM, 256-clock period), driving it like the board's user.
//
// After pressing and releasing the reset button the testbench counts clocks
// itself; the two-flip-flop button synchroniser delays the start by two
// clocks. From that count it knows the position pos in each 256-clock period
// and checks every cycle
//   LEDG[0] == motor_en12 == (pos <= D)   (0 throughout the first period)
//   LEDG[1] == (pos == 255)               (overflow)
//   LEDG[2] == (pos == D)                 (compare)
//   motor_in1 == SW[9], motor_in2 == !SW[9]
// where D is the switch setting in the last cycle of the previous period.
// Phase 1 sets every duty word 0..255 for one period each (duty (D+1)/256,
// 255 giving a constant 1) and flips the direction switch now and then.
// Phase 2 moves the switches at random times, also mid-period, and presses
// the reset button in the middle of a period, which must restart the
// generator. Each period's pulse length is also checked against D + 1, and
// each mechanism (latch set, latch reset, new word loaded, 100 % duty,
// ignored mid-period change, button reset, direction change) must occur.
module tb_pwm_de0_top;
  localparam int N = 8;
  localparam int P = 1 << N;

  logic       clk = 1'b0;
  logic [2:0] BUTTON;
  logic [9:0] SW;
  logic [9:0] LEDG;
  logic       motor_en12, motor_in1, motor_in2;

  int checks = 0;
  int failures = 0;
  int n_set = 0, n_reset = 0, n_load_change = 0, n_full = 0;
  int n_midchange = 0, n_button = 0, n_dir = 0;

  pwm_de0_top dut (
    .CLOCK_50  (clk),
    .BUTTON    (BUTTON),
    .SW        (SW),
    .LEDG      (LEDG),
    .motor_en12(motor_en12),
    .motor_in1 (motor_in1),
    .motor_in2 (motor_in2)
  );

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    #5000000;
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

  // press the reset button for a few clocks, release it, and wait for the
  // synchroniser so that the next cycle is cycle 0 of the first period
  task automatic press_reset();
    BUTTON[0] = 1'b0;
    repeat (4) @(negedge clk);
    BUTTON[0] = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  // run from cycle 0 of a fresh start. random = 0: sweep the duty words;
  // random = 1: move the switches at random and stop at cycle stop_at.
  task automatic run(input int cycles, input bit random, input int stop_at);
    int d_cur, high_cnt, pos, period;
    logic q_last;
    d_cur = 0; high_cnt = 0; q_last = 1'b0;
    for (int t = 0; t < cycles; t++) begin
      pos = t % P;
      period = t / P;
      if (random && t == stop_at) begin
        // button pressed mid-period: the output must drop and stay low
        BUTTON[0] = 1'b0;
        repeat (3) @(negedge clk);
        for (int k = 0; k < 10; k++) begin
          expect_eq("q held low in reset", LEDG[0], 1'b0, t);
          @(negedge clk);
        end
        n_button++;
        return;
      end
      expect_eq("LEDG[0]", LEDG[0], (period > 0) && (pos <= d_cur), t);
      expect_eq("motor_en12", motor_en12, LEDG[0], t);
      expect_eq("overflow", LEDG[1], pos == P - 1, t);
      expect_eq("compare", LEDG[2], pos == d_cur, t);
      expect_eq("motor_in1", motor_in1, SW[9], t);
      expect_eq("motor_in2", motor_in2, !SW[9], t);
      if (LEDG[0] && !q_last) n_set++;
      if (!LEDG[0] && q_last) n_reset++;
      q_last = LEDG[0];
      if (LEDG[0]) high_cnt++;
      if (!random) begin
        if (pos == P - 1) begin
          SW[N-1:0] = N'(period);
          if (period % 37 == 5) begin SW[9] = !SW[9]; n_dir++; end
        end
      end else if ($urandom_range(0, 99) == 0) begin
        SW[N-1:0] = N'($urandom);
        if (pos != P - 1) n_midchange++;
      end
      if (pos == P - 1) begin
        if (period > 0) begin
          checks++;
          if (high_cnt != d_cur + 1) begin
            failures++;
            $display("FAIL period %0d: %0d high cycles, want %0d", period, high_cnt, d_cur + 1);
          end
          if (d_cur == P - 1) n_full++;
        end
        high_cnt = 0;
        if (int'(SW[N-1:0]) != d_cur) n_load_change++;
        d_cur = int'(SW[N-1:0]);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    BUTTON = 3'b111;
    SW = '0;
    @(negedge clk);
    press_reset();
    run(P * (P + 2), 1'b0, 0);
    SW[N-1:0] = 8'd77;
    press_reset();
    run(20 * P, 1'b1, 6 * P + 100);
    BUTTON[0] = 1'b1;
    repeat (2) @(negedge clk);
    run(8 * P, 1'b1, -1);
    $display("sets=%0d resets=%0d new_words=%0d full_duty=%0d mid_changes=%0d button_resets=%0d dir_changes=%0d",
             n_set, n_reset, n_load_change, n_full, n_midchange, n_button, n_dir);
    checks++; if (n_set == 0)         begin failures++; $display("FAIL: latch never set"); end
    checks++; if (n_reset == 0)       begin failures++; $display("FAIL: latch never reset"); end
    checks++; if (n_load_change == 0) begin failures++; $display("FAIL: no new word loaded"); end
    checks++; if (n_full == 0)        begin failures++; $display("FAIL: no 100%% duty period"); end
    checks++; if (n_midchange == 0)   begin failures++; $display("FAIL: no mid-period change"); end
    checks++; if (n_button == 0)      begin failures++; $display("FAIL: no button reset"); end
    checks++; if (n_dir == 0)         begin failures++; $display("FAIL: no direction change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
