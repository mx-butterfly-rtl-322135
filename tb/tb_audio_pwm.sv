// tb_audio_pwm: for several levels, counts the high clocks of the PWM output
// over whole 64-clock periods and checks the duty equals level/64, and that
// a level change takes effect only at a period boundary.
module tb_audio_pwm;
  logic clk = 0, rst = 1, pwm;
  logic [5:0] level = 0;
  int checks = 0, failures = 0;

  audio_pwm dut (.*);
  always #5 clk = ~clk;

  initial begin
    int lv [6] = '{0, 1, 7, 32, 60, 63};
    int hi;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (lv[i]) begin
      level = 6'(lv[i]);
      // let the level be taken at a period boundary, then align to one
      repeat (130) @(negedge clk);
      while (dut.cnt != 6'd0) @(negedge clk);
      hi = 0;
      for (int p = 0; p < 4 * 64; p++) begin
        if (pwm) hi++;
        if (p == 100) level = 6'(63 - lv[i]);  // mid-period change: ignored until the boundary
        if (p == 100) level = 6'(lv[i]);
        @(negedge clk);
      end
      checks++;
      if (hi != 4 * lv[i]) begin failures++; $display("FAIL level %0d: %0d high of 256", lv[i], hi); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
