// tb_fm_demod_top: end-to-end test of the FM demodulator at its default
// parameters (98.7 MHz channel, 2.56 GS/s input, one sample per clock).
//
// The stimulus is an FM carrier at 98.7 MHz, half of full scale, computed
// sample by sample with real arithmetic and rounded to <16,14>, with:
//   seg 0  no deviation                 seg 3  carrier 7.3 MHz off channel
//   seg 1  +75 kHz deviation            seg 4  +300 kHz deviation
//   seg 2  -75 kHz deviation            seg 5  10 kHz tone, +-75 kHz deviation
//                                       seg 6  1 kHz tone, +-75 kHz deviation (1 ms)
// The test tracks the true phase of the input against the 98.671875 MHz
// local oscillator (1263 * 320 MHz / 4096). The demodulator's frequency
// word should be minus the phase advance per 20 MHz output sample, in
// degrees <16,8>; the sign comes from Q = x * sin. Checks:
//   - the mean of 32 consecutive frequency words against the true mean,
//     with the filters' delay of D = 5 output samples (tolerance 24 LSB,
//     about 1.3 kHz), in all segments but 3, away from their edges.
//     Averaging is needed because single words carry the CORDIC's angle
//     error of up to 0.45 degree (115 LSB);
//   - every PWM word against floor(freq/64) + 8 clipped to 0..15, and its
//     clip flag;
//   - the mean PWM word in segments 0, 1, 2 and 4 against the word expected
//     from the true frequency (within 1), and the PWM duty cycle measured
//     on the pin against the words given to it (within 0.3/16);
//   - the audio on the pin: the 10 kHz and 1 kHz components of pwm_out in
//     the tone segments must have the amplitude the +-75 kHz deviation
//     gives (0.337 of full duty, within 15 %) and no quadrature part;
//   - the rates: one stage I output per 8 samples, one baseband output per
//     128 samples, the phase 9 clocks after it (one clock for the CORDIC to
//     take it, eight iterations), the frequency 1 clock later.
// It also counts how often each mechanism acted (stage I and II decimation,
// CORDIC pre-rotation, phase wrap at +-180 degrees, 16-bit clip of the
// frequency word, PWM clip) and counts a failure for any that never did.
module tb_fm_demod_top;
  localparam real PI    = 3.141592653589793;
  localparam real FS    = 2.56e9;
  localparam real FC    = 98.7e6;
  localparam real F_LO  = 1263.0 * 320.0e6 / 4096.0;
  localparam real AMP   = 8192.0;
  localparam int  D     = 5;      // filter delay in output samples
  localparam int  W     = 32;     // averaging window in output samples
  localparam int  NSEG  = 7;
  localparam int  SEG_OUT [NSEG] = '{300, 300, 300, 60, 200, 6000, 20000};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] din = '0;
  logic               din_valid = 1'b0;
  logic signed [26:0] i_bb, q_bb;
  logic               bb_valid, phase_valid, freq_valid;
  logic signed [19:0] phase;
  logic signed [15:0] freq;
  logic [3:0]         pwm_word;
  logic               pwm_clip, pwm_out;
  logic               prerotated, phase_wrapped, freq_clipped;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  fm_demod_top dut (.*);

  // stimulus state
  real phi_in  = 0.0;    // input phase mod 2*pi
  real theta   = 0.0;    // input phase minus LO phase, unwrapped (rad)
  int  seg     = 0;
  real t_seg   = 0.0;    // time inside the segment (s)

  function automatic real dev_hz(input int s, input real t);
    case (s)
      0: return 0.0;
      1: return 75.0e3;
      2: return -75.0e3;
      3: return 7.3e6;
      4: return 300.0e3;
      5: return 75.0e3 * $sin(2.0 * PI * 10.0e3 * t);
      default: return 75.0e3 * $sin(2.0 * PI * 1.0e3 * t);
    endcase
  endfunction

  // records per baseband output / frequency output
  real th_at_bb[$];
  int  seg_at_bb[$];
  int  fwords[$];
  int  pwords[$];
  longint cyc = 0;
  longint last_bb_cyc = -1, last_ph_cyc = -1;
  int n_s1 = 0, n_bb = 0, n_pre = 0, n_wrap = 0, n_fclip = 0, n_pclip = 0;
  int n_in = 0;
  // PWM duty per segment: ticks, ticks high, sum of words
  int pwm_ticks [NSEG];
  int pwm_high  [NSEG];
  // tone amplitude on the pin: sums of pin * sin / cos of the tone phase
  real tone_s [NSEG];
  real tone_c [NSEG];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (din_valid) n_in++;
      if (dut.s1_valid) begin
        n_s1++;
        pwm_ticks[seg]++;
        if (pwm_out) pwm_high[seg]++;
        if (seg >= 5) begin
          real wt;
          wt = 2.0 * PI * (seg == 5 ? 10.0e3 : 1.0e3) * t_seg;
          tone_s[seg] += (pwm_out ? 1.0 : 0.0) * $sin(wt);
          tone_c[seg] += (pwm_out ? 1.0 : 0.0) * $cos(wt);
        end
      end
      if (bb_valid) begin
        n_bb++;
        th_at_bb.push_back(theta);
        seg_at_bb.push_back(seg);
        last_bb_cyc = cyc;
      end
      if (phase_valid) begin
        checks++;
        if (cyc != last_bb_cyc + 9) begin
          failures++;
          $display("FAIL: phase %0d clocks after baseband sample", cyc - last_bb_cyc);
        end
        if (prerotated) n_pre++;
        last_ph_cyc = cyc;
      end
      if (freq_valid) begin
        checks++;
        if (cyc != last_ph_cyc + 1) begin
          failures++;
          $display("FAIL: frequency %0d clocks after phase", cyc - last_ph_cyc);
        end
        if (phase_wrapped) n_wrap++;
        if (freq_clipped) n_fclip++;
        fwords.push_back(int'(freq));
      end
      if (freq_valid) pwords.push_back(-1);   // placeholder, filled below
    end
  end

  // the PWM word register loads one clock after freq_valid
  always @(posedge clk) begin
    if (rst_n && pwords.size() > 0 && pwords[pwords.size() - 1] < 0 && !freq_valid) begin
      int fw, ew;
      pwords[pwords.size() - 1] = int'(pwm_word);
      if (pwm_clip) n_pclip++;
      // PWM word from this frequency word: floor(freq / 64) + 8, clipped
      fw = fwords[fwords.size() - 1];
      ew = ((fw >= 0) ? fw / 64 : -((-fw + 63) / 64)) + 8;
      checks++;
      if (int'(pwm_word) != (ew > 15 ? 15 : ew < 0 ? 0 : ew) || pwm_clip != (ew > 15 || ew < 0)) begin
        failures++;
        $display("FAIL: frequency word %0d gave PWM word %0d clip %0b", fw, pwm_word, pwm_clip);
      end
    end
  end

  // true frequency word of output j (phases j and j-1), degrees * 256
  function automatic real true_word(input int j);
    return -(th_at_bb[j - D] - th_at_bb[j - 1 - D]) * 180.0 / PI * 256.0;
  endfunction

  function automatic int floor_div64(input real v);
    return $rtoi($floor(v / 64.0));
  endfunction

  initial begin
    int  nout;
    real sum_f, sum_t, mean_w, exp_w;
    int  nwin, ok_win, cnt;
    for (int s = 0; s < NSEG; s++) begin
      pwm_ticks[s] = 0;
      pwm_high[s]  = 0;
      tone_s[s]    = 0.0;
      tone_c[s]    = 0.0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (seg = 0; seg < NSEG; seg++) begin
      t_seg = 0.0;
      for (int n = 0; n < SEG_OUT[seg] * 128; n++) begin
        real f;
        @(negedge clk);
        f = FC + dev_hz(seg, t_seg);
        din = 16'($rtoi($floor(AMP * $cos(phi_in) + 0.5)));
        din_valid = 1'b1;
        phi_in = phi_in + 2.0 * PI * f / FS;
        if (phi_in > 2.0 * PI) phi_in = phi_in - 2.0 * PI;
        theta = theta + 2.0 * PI * (f - F_LO) / FS;
        t_seg = t_seg + 1.0 / FS;
      end
    end
    @(negedge clk) din_valid = 1'b0;
    repeat (20) @(negedge clk);

    // rates
    checks++;
    if (n_s1 != n_in / 8 || n_bb != n_in / 128) begin
      failures++;
      $display("FAIL: %0d inputs gave %0d stage I and %0d baseband outputs", n_in, n_s1, n_bb);
    end

    // averaged frequency words
    nout = fwords.size();   // fwords[j-1] is frequency output j
    nwin = 0;
    ok_win = 0;
    for (int j = W + D + 12; j < nout; j++) begin
      bit same;
      same = 1'b1;
      for (int k = j - W - D - 10; k <= j; k++)
        if (seg_at_bb[k] != seg_at_bb[j]) same = 1'b0;
      if (!same || seg_at_bb[j] == 3) continue;
      sum_f = 0.0;
      sum_t = 0.0;
      for (int k = j - W + 1; k <= j; k++) begin
        sum_f += real'(fwords[k - 1]);
        sum_t += true_word(k);
      end
      nwin++;
      checks++;
      if ((sum_f - sum_t) ** 2 > (24.0 * W) ** 2) begin
        failures++;
        if (failures < 10)
          $display("FAIL: seg %0d output %0d mean word %f, true %f", seg_at_bb[j], j, sum_f / W, sum_t / W);
      end else ok_win++;
    end
    $display("averaged-frequency windows checked: %0d, passed %0d", nwin, ok_win);

    // PWM word and duty in the constant segments
    for (int s = 0; s < NSEG; s++) begin
      if (s == 3 || s >= 5) continue;
      mean_w = 0.0;
      exp_w = 0.0;
      cnt = 0;
      for (int j = D + 20; j < nout; j++) begin
        if (seg_at_bb[j] != s || seg_at_bb[j - D - 20] != s) continue;
        mean_w += real'(pwords[j - 1]);
        exp_w  += real'(floor_div64(true_word(j)) + 8 > 15 ? 15 :
                        floor_div64(true_word(j)) + 8 < 0 ? 0 : floor_div64(true_word(j)) + 8);
        cnt++;
      end
      mean_w /= real'(cnt);
      exp_w  /= real'(cnt);
      checks++;
      if ((mean_w - exp_w) ** 2 > 1.0) begin
        failures++;
        $display("FAIL: seg %0d mean PWM word %f, expected %f", s, mean_w, exp_w);
      end
      checks++;
      if ((real'(pwm_high[s]) / real'(pwm_ticks[s]) * 16.0 - mean_w) ** 2 > 0.09) begin
        failures++;
        $display("FAIL: seg %0d PWM duty %f/16, mean word %f", s,
                 real'(pwm_high[s]) / real'(pwm_ticks[s]) * 16.0, mean_w);
      end
      $display("seg %0d: mean PWM word %f (expected %f), duty on pin %f/16", s, mean_w, exp_w,
               real'(pwm_high[s]) / real'(pwm_ticks[s]) * 16.0);
    end

    // audio on the pin: the tone segments hold whole periods of the tone;
    // the duty swing should be -(75 kHz / (20 MHz/(360*256)) / 64) / 16 =
    // -0.337 in phase with the deviation (negative: Q = x*sin), a little
    // less where the negative peaks reach word 0
    for (int s = 5; s < NSEG; s++) begin
      real a_s, a_c, expect_a;
      a_s = 2.0 * tone_s[s] / real'(pwm_ticks[s]);
      a_c = 2.0 * tone_c[s] / real'(pwm_ticks[s]);
      expect_a = -(75.0e3 / (20.0e6 / (360.0 * 256.0)) / 64.0) / 16.0;
      checks++;
      if ((a_s - expect_a) ** 2 > (0.15 * expect_a) ** 2 || a_c ** 2 > 0.03 ** 2) begin
        failures++;
        $display("FAIL: seg %0d tone on the pin %f (sin) %f (cos), expected %f", s, a_s, a_c, expect_a);
      end
      $display("seg %0d: tone amplitude on the pin %f of full duty (expected %f), quadrature %f",
               s, a_s, expect_a, a_c);
    end

    $display("mechanisms: stage I outputs %0d, baseband outputs %0d, pre-rotations %0d, phase wraps %0d, word clips %0d, PWM clips %0d",
             n_s1, n_bb, n_pre, n_wrap, n_fclip, n_pclip);
    checks++;
    if (n_s1 == 0 || n_bb == 0 || n_pre == 0 || n_wrap == 0 || n_fclip == 0 || n_pclip == 0) begin
      failures++;
      $display("FAIL: a mechanism never acted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
