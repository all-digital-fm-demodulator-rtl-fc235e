// tb_sincos_gen: self-checking test of the DDS sine/cosine generator.
//
// Runs the accumulator with the increments 1263 (the 98.7 MHz channel at
// 320 MHz), 311, 150 and 450, with en high on random cycles. For every
// enabled step it checks, against a model of the 12-bit accumulator:
//   - the exact quarter-wave table rule (entry k = round(2^14 sin(pi/2 k/1023)),
//     mirrored in quadrants 2 and 4, negated in quadrants 3 and 4);
//   - closeness to the ideal sin/cos of 2*pi*phase/4096 (within 30 LSB);
//   - that nothing changes while en is low.
// It also counts sine periods (rising zero crossings) over 40960 steps for
// M = 1263 and checks the count against 40960*1263/4096.
module tb_sincos_gen;
  localparam int ACC_W = 12;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [ACC_W-1:0] m_incr = '0;
  logic [ACC_W-1:0] phase_acc;
  logic signed [15:0] sin_out, cos_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sincos_gen dut (.*);

  function automatic int table_val(input int p);
    int q, a;
    real v;
    q = (p >> 10) & 3;
    a = p & 1023;
    if (q == 1 || q == 3) a = 1023 - a;
    v = $floor(16384.0 * $sin(PI / 2.0 * real'(a) / 1023.0) + 0.5);
    return (q >= 2) ? -$rtoi(v) : $rtoi(v);
  endfunction

  int acc_m = 0;
  int steps = 0;
  int crossings = 0;
  logic signed [15:0] last_sin = '0;
  logic               was_en = 1'b0;
  int                 ph_used = 0;
  logic signed [15:0] held_sin, held_cos;

  always @(posedge clk) begin
    if (rst_n) begin
      if (was_en) begin
        int es, ec;
        real is_, ic_;
        es  = table_val(ph_used);
        ec  = table_val((ph_used + 1024) & 4095);
        is_ = 16384.0 * $sin(2.0 * PI * real'(ph_used) / 4096.0);
        ic_ = 16384.0 * $cos(2.0 * PI * real'(ph_used) / 4096.0);
        checks++;
        if (int'(sin_out) != es || int'(cos_out) != ec) begin
          failures++;
          $display("FAIL: phase %0d sin %0d/%0d cos %0d/%0d", ph_used, sin_out, es, cos_out, ec);
        end
        checks++;
        if ((real'(sin_out) - is_) ** 2 > 900.0 || (real'(cos_out) - ic_) ** 2 > 900.0) begin
          failures++;
          $display("FAIL: phase %0d far from ideal sine", ph_used);
        end
        if (last_sin < 0 && sin_out >= 0) crossings++;
        last_sin <= sin_out;
      end else if (steps > 0) begin
        checks++;
        if (sin_out != held_sin || cos_out != held_cos) begin
          failures++;
          $display("FAIL: outputs changed without en");
        end
      end
      checks++;
      if (int'(phase_acc) != acc_m) begin
        failures++;
        $display("FAIL: accumulator %0d expected %0d", phase_acc, acc_m);
      end
      held_sin <= sin_out;
      held_cos <= cos_out;
      was_en <= en;
      if (en) begin
        ph_used <= acc_m;
        acc_m   <= (acc_m + int'(m_incr)) & 4095;
        steps++;
      end
    end
  end

  task automatic run(input int m, input int n, input bit gaps);
    int done;
    done = 0;
    m_incr = ACC_W'(m);
    while (done < n) begin
      @(negedge clk);
      en = gaps ? ($urandom_range(3) != 0) : 1'b1;
      if (en) done++;
    end
    @(negedge clk) en = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(1263, 40960, 1'b0);
    checks++;
    // 40960 * 1263 / 4096 = 12630 periods of the output
    if (crossings < 12629 || crossings > 12631) begin
      failures++;
      $display("FAIL: %0d periods, expected 12630", crossings);
    end
    run(311, 2000, 1'b1);
    run(150, 2000, 1'b1);
    run(450, 2000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
