// tb_pwm_comparator: exhaustive test of the 8-bit equality comparator.
//
// Applies all 65536 pairs (a, b) and checks aeb against a == b.
module tb_pwm_comparator;
  localparam int N = pwm_pkg::PWM_WIDTH;

  logic [N-1:0] a, b;
  logic         aeb;

  int checks = 0;
  int failures = 0;

  pwm_comparator dut (.a(a), .b(b), .aeb(aeb));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (aeb !== (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d aeb=%0b", i, j, aeb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
