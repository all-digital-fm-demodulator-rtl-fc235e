// tb_phase_freq_conv: self-checking test of the phase-to-frequency
// converter.
//
// Feeds phase sequences in degrees <20,8>: a slow ramp that crosses the
// +-180 degree cut (so the wrap correction must act), small random steps,
// and random phases anywhere in +-180 degrees (large steps that overflow
// the 16-bit word). The expected word is the difference to the previous
// phase brought into (-180, 180] degrees and clipped to +-2^15; wrapped and
// clipped must flag those cases. The first phase after reset gives no
// output; every later one gives out_valid exactly one clock after it.
module tb_phase_freq_conv;
  localparam int D180 = 180 * 256, D360 = 360 * 256;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [19:0] phase_in = '0;
  logic               out_valid, wrapped, clipped;
  logic signed [15:0] freq;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_clip = 0;

  always #5 clk = ~clk;

  phase_freq_conv dut (.*);

  int  prev_ph = 0;
  bit  have_prev = 0;
  bit  pend = 0;
  int  e_f = 0;
  bit  e_w = 0, e_c = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != pend) begin
        failures++;
        $display("FAIL: out_valid %0b expected %0b", out_valid, pend);
      end else if (pend && (int'(freq) != e_f || wrapped != e_w || clipped != e_c)) begin
        failures++;
        $display("FAIL: freq %0d/%0d wrapped %0b/%0b clipped %0b/%0b",
                 freq, e_f, wrapped, e_w, clipped, e_c);
      end
      pend <= in_valid && have_prev;
      if (in_valid) begin
        int d;
        bit w, c;
        d = int'(phase_in) - prev_ph;
        w = 1'b1;
        if (d > D180) d -= D360;
        else if (d <= -D180) d += D360;
        else w = 1'b0;
        c = (d > 32767 || d < -32768);
        if (d > 32767) d = 32767;
        if (d < -32768) d = -32768;
        e_f <= d;
        e_w <= w;
        e_c <= c;
        if (have_prev && w) n_wrap++;
        if (have_prev && c) n_clip++;
        prev_ph   <= int'(phase_in);
        have_prev <= 1'b1;
      end
    end
  end

  function automatic int wrap180(input int p);
    while (p > D180) p -= D360;
    while (p <= -D180) p += D360;
    return p;
  endfunction

  task automatic put(input int p);
    @(negedge clk);
    in_valid = 1'b1;
    phase_in = 20'(p);
    @(negedge clk);
    in_valid = 1'b0;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    int p;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    p = 170 * 256;
    for (int k = 0; k < 400; k++) begin      // +1.25 deg/sample ramp
      put(p);
      p = wrap180(p + 320);
    end
    for (int k = 0; k < 400; k++) begin      // -1.25 deg/sample ramp
      put(p);
      p = wrap180(p - 320);
    end
    for (int k = 0; k < 1000; k++) begin     // small random steps
      put(p);
      p = wrap180(p + $signed($urandom_range(2000)) - 1000);
    end
    for (int k = 0; k < 1000; k++)           // anywhere
      put($signed($urandom_range(D360 - 1)) - D180 + 1);
    repeat (3) @(negedge clk);
    checks++;
    if (n_wrap == 0 || n_clip == 0) begin
      failures++;
      $display("FAIL: wrap seen %0d times, clip %0d times", n_wrap, n_clip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
