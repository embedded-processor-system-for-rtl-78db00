// tb_pwm_gen: self-checking test of the PWM stage.
//
// Drives random one-clock gen0/gen1 pulses and compares the output every clock with a
// reference: set by gen0, cleared by gen1, set winning a tie, low while disabled, one clock late.
module tb_pwm_gen;
  logic clk = 1'b0, rst_n, enable, gen0, gen1, pwm;
  int   checks = 0, failures = 0;
  logic ref_pwm;
  int   rises = 0, falls = 0;

  always #5 clk = ~clk;

  pwm_gen dut (.*);

  initial begin
    rst_n = 1'b0; enable = 1'b0; gen0 = 1'b0; gen1 = 1'b0; ref_pwm = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // reference output after the previous clock edge
      checks++;
      if (pwm !== ref_pwm) begin
        failures++;
        $display("FAIL: cycle %0d pwm=%b expected %b", i, pwm, ref_pwm);
      end
      enable = (i % 500) < 450;
      gen0   = ($urandom_range(0, 9) == 0);
      gen1   = ($urandom_range(0, 9) == 0);
      // what the next edge should give
      if (!enable)   ref_pwm = 1'b0;
      else if (gen0) begin if (!ref_pwm) rises++; ref_pwm = 1'b1; end
      else if (gen1) begin if (ref_pwm) falls++;  ref_pwm = 1'b0; end
    end
    checks++;
    if (rises < 10 || falls < 10) begin
      failures++;
      $display("FAIL: too few edges exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
