// fm_demod_top: all-digital quadrature FM demodulator for one broadcast
// channel (98.7 MHz by default) sampled directly at RF.
//
// Signal chain (one clock domain, rates set by valid strobes):
//   din (<16,14>, 2.56 GS/s)
//    -> stage I CIC, R=8 M=1            -> 19-bit real signal, 320 MS/s
//    -> I/Q mixer with the DDS cos/sin  -> 19-bit I and Q, 320 MS/s
//    -> two stage II CICs, R=16 M=10    -> 27-bit baseband I, Q, 20 MS/s
//    -> CORDIC arctan (8 iterations)    -> phase, degrees <20,8>
//    -> phase difference                -> frequency word, degrees/sample <16,8>
//    -> 4-bit PWM (16 ticks of 320 MHz) -> pwm_out, one period per sample
// The DDS tuning word TUNE_M = 1263 with a 12-bit accumulator at 320 MHz
// puts the oscillator at 98.672 MHz, 28 kHz below 98.7 MHz: a carrier
// exactly at 98.7 MHz appears as a constant frequency word of about
// -0.51 degrees per sample (the sign follows from Q = x*sin). The FM
// deviation of +-75 kHz is +-1.35 degrees per sample (+-345 LSB).
//
// The block order, the decimation factors, the 98.7 MHz oscillator with
// M = 1263 and the 4-bit PWM follow the design. This implementation's own
// choices: one clock with enables instead of separate 2.56 GHz / 320 MHz
// clocks (the PWM reference tick and the DDS step are the stage I output
// strobe, 320 MHz at a full-rate input), full-precision CIC widths, and the
// choice of PWM bits. The PWM takes 4 bits of the frequency word: the word
// is shifted right by PWM_LSB (6 by default, so one PWM step is 0.25
// degree/sample, about 13.9 kHz), clipped to -8..7 (pwm_clip) and turned into
// offset binary, so a zero frequency gives a duty of 8/16. The 4 most
// significant bits of the 16-bit word would leave the +-1.35 degree
// deviation invisible.
//
// Interface: din is taken when din_valid is high, at most one sample per
// clock. Every 128th input sample gives a bb_valid pulse; phase_valid
// follows 9 clocks later (one to start the CORDIC, eight iterations)
// and freq_valid one clock after that. pwm_out
// changes on the stage I strobe.
module fm_demod_top
  import fm_demod_pkg::ADC_W, fm_demod_pkg::ANG_W, fm_demod_pkg::FREQ_W, fm_demod_pkg::angle_t;
#(
  parameter int DIN_W   = ADC_W,
  parameter int TUNE_M  = 1263,
  parameter int PWM_LSB = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DIN_W-1:0] din,
  input  logic                    din_valid,
  output logic signed [26:0]      i_bb,
  output logic signed [26:0]      q_bb,
  output logic                    bb_valid,
  output angle_t                  phase,
  output logic                    phase_valid,
  output logic signed [FREQ_W-1:0] freq,
  output logic                    freq_valid,
  output logic [3:0]              pwm_word,
  output logic                    pwm_clip,
  output logic                    pwm_out,
  output logic                    prerotated,     // last vector had I < 0
  output logic                    phase_wrapped,  // last difference crossed +-180 deg
  output logic                    freq_clipped    // last difference beyond the 16-bit word
);

  localparam int S1_R = 8,  S1_M = 1;
  localparam int S2_R = 16, S2_M = 10;
  localparam int S1_W = DIN_W + $clog2(S1_R * S1_M);   // 19
  localparam int S2_W = S1_W + $clog2(S2_R * S2_M);    // 27
  localparam int ACC_W = 12;

  // stage I CIC
  logic                   s1_valid;
  logic signed [S1_W-1:0] s1;

  cic_decimator #(.R(S1_R), .M(S1_M), .IN_W(DIN_W)) u_cic1 (
    .clk, .rst_n, .in_valid(din_valid), .din(din),
    .out_valid(s1_valid), .dout(s1)
  );

  // local oscillator, stepped at the stage I output rate
  logic signed [ADC_W-1:0] lo_sin, lo_cos;

  sincos_gen #(.ACC_W(ACC_W), .LUT_AW(10), .OUT_W(ADC_W)) u_dds (
    .clk, .rst_n, .en(s1_valid), .m_incr(ACC_W'(TUNE_M)),
    .phase_acc(), .sin_out(lo_sin), .cos_out(lo_cos)
  );

  // quadrature mixer
  logic                   mix_valid;
  logic signed [S1_W-1:0] mix_i, mix_q;

  iq_mixer #(.X_W(S1_W), .LO_W(ADC_W)) u_mix (
    .clk, .rst_n, .in_valid(s1_valid), .x(s1),
    .sin_in(lo_sin), .cos_in(lo_cos),
    .out_valid(mix_valid), .i_out(mix_i), .q_out(mix_q)
  );

  // stage II CICs: channel select
  logic q_valid;
  logic signed [S2_W-1:0] i_s2, q_s2;

  cic_decimator #(.R(S2_R), .M(S2_M), .IN_W(S1_W)) u_cic2_i (
    .clk, .rst_n, .in_valid(mix_valid), .din(mix_i),
    .out_valid(bb_valid), .dout(i_s2)
  );

  cic_decimator #(.R(S2_R), .M(S2_M), .IN_W(S1_W)) u_cic2_q (
    .clk, .rst_n, .in_valid(mix_valid), .din(mix_q),
    .out_valid(q_valid), .dout(q_s2)
  );

  assign i_bb = 27'(i_s2);
  assign q_bb = 27'(q_s2);

  // arctan

  cordic_arctan #(.IN_W(S2_W), .ITER(8)) u_cordic (
    .clk, .rst_n, .start(bb_valid), .i_in(i_s2), .q_in(q_s2),
    .busy(), .out_valid(phase_valid), .phase(phase),
    .prerotated(prerotated)
  );

  // phase to frequency

  phase_freq_conv #(.PH_W(ANG_W), .OUT_W(FREQ_W)) u_pfc (
    .clk, .rst_n, .in_valid(phase_valid), .phase_in(phase),
    .out_valid(freq_valid), .freq(freq),
    .wrapped(phase_wrapped), .clipped(freq_clipped)
  );

  // PWM word: 4 bits of the frequency word, clipped, offset binary
  logic signed [FREQ_W-1:0] f_shift;
  logic [3:0]               word_c;
  logic                     clip_c;

  always_comb begin
    f_shift = freq >>> PWM_LSB;
    clip_c  = 1'b1;
    if (f_shift > 7)       word_c = 4'hF;          // +7 -> 15
    else if (f_shift < -8) word_c = 4'h0;          // -8 -> 0
    else begin
      word_c = {~f_shift[3], f_shift[2:0]};
      clip_c = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pwm_word <= 4'h8;
      pwm_clip <= 1'b0;
    end else if (freq_valid) begin
      pwm_word <= word_c;
      pwm_clip <= clip_c;
    end
  end

  pwm_gen #(.CNT_W(4)) u_pwm (
    .clk, .rst_n, .tick(s1_valid), .word(pwm_word),
    .pwm_out(pwm_out), .period_start()
  );

  a_iq_aligned: assert property (@(posedge clk) disable iff (!rst_n) bb_valid == q_valid)
    else $error("fm_demod_top: I and Q decimators out of step");

endmodule
