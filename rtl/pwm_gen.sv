// pwm_gen: pulse width modulator, a reference counter and a 4-bit
// comparator, that lets a single output pin stand in for a DAC.
//
// A 4-bit reference counter advances on every tick of the reference clock
// enable and wraps after 16 ticks, which is one PWM period. The output is
// high while the counter is below the input word, so a word w gives a duty
// cycle of w/16 (0 gives a pin that stays low, 15 gives 15/16). The word is
// taken in when the counter wraps, so a period is never cut by a change of
// word in the middle.
// The counter-and-comparator structure, the 4-bit word, the 16-tick period
// and the "high while counter < word" rule follow the design; loading the
// word once per period is this implementation's choice.
//
// Interface and timing: tick is the reference clock enable (320 MHz in the
// demodulator, i.e. the stage I output strobe). A word present on the tick
// that ends a period (counter 15) sets the duty of the next period, which
// starts with the counter at 0. pwm_out is a compare of two registers.
module pwm_gen #(
  parameter int CNT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic [CNT_W-1:0] word,
  output logic             pwm_out,
  output logic             period_start   // counter is at 0
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] word_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      word_q <= '0;
    end else if (tick) begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) word_q <= word;
    end
  end

  assign pwm_out      = (cnt < word_q);
  assign period_start = (cnt == '0);

endmodule
