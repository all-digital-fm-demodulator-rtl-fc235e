// tb_pwm_gen: self-checking test of the PWM generator.
//
// tick is driven either every clock or on random clocks. For a sequence of
// words (all 16 values, then random ones) the test follows the 16-tick
// periods of the reference counter: each period must have exactly
// word-of-that-period ticks with pwm_out high, all of them at the start of
// the period (high while the counter is below the word), and the word
// presented on the tick that ends a period must set the next period.
module tb_pwm_gen;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [3:0] word = '0;
  logic pwm_out, period_start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm_gen dut (.*);

  // model: tick index inside a period and the word latched for it
  int pos = 0;
  int cur_word = 0;
  int highs = 0;
  int periods = 0;

  always @(posedge clk) begin
    if (rst_n && tick) begin
      checks++;
      if (pwm_out != (pos < cur_word) || period_start != (pos == 0)) begin
        failures++;
        $display("FAIL: tick %0d of period, word %0d, pwm %0b", pos, cur_word, pwm_out);
      end
      if (pwm_out) highs++;
      if (pos == 15) begin
        checks++;
        if (highs != cur_word) begin
          failures++;
          $display("FAIL: %0d of 16 ticks high for word %0d", highs, cur_word);
        end
        periods++;
        highs = 0;
        cur_word <= int'(word);
        pos <= 0;
      end else begin
        pos <= pos + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 80; p++) begin
      word = (p < 16) ? 4'(p) : 4'($urandom);
      for (int t = 0; t < 16; t++) begin
        do begin
          @(negedge clk);
          tick = (p < 40) ? 1'b1 : ($urandom_range(2) != 0);
        end while (!tick);
        // change the word in mid period: must have no effect until it ends
        if (t == 7) word = 4'($urandom);
        if (t == 14) word = (p + 1 < 16) ? 4'(p + 1) : 4'($urandom);
      end
    end
    @(negedge clk) tick = 1'b0;
    checks++;
    if (periods < 79) begin
      failures++;
      $display("FAIL: only %0d periods", periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
