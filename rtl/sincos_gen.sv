// sincos_gen: direct digital synthesis (DDS) local oscillator giving a sine
// and a cosine.
//
// A phase accumulator of ACC_W = 12 bits adds the tuning increment m_incr
// each time en is high; its two top bits select the quadrant and the next
// LUT_AW = 10 bits address a quarter-wave sine table of 1024 signed <16,14>
// words. The full wave is rebuilt from the quarter by quarter-wave symmetry:
// the address is mirrored (1023 - a) in the 2nd and 4th quadrant and the
// sign is flipped in the 3rd and 4th. The cosine reads the same table with
// the quadrant advanced by one (cos t = sin(t + 90 degrees)). The output
// frequency is f_out = m_incr * f_en / 2^12; the demodulator uses
// m_incr = 1263 at 320 MHz for the 98.7 MHz channel (98.67 MHz exactly).
//
// Table: entry k = round(2^14 * sin((pi/2) * k / 1023)), so entry 0 is 0 and
// entry 1023 is +1.0, as drawn for the stored quarter. It is computed at
// elaboration; no data file is read.
// The accumulator, the 1024-entry quarter table, the 12-bit phase and the
// <16,14> output follow the design; the table spacing (both ends stored),
// the two read ports and the reset to phase 0 are this implementation's
// choices.
//
// Interface and timing: on a clock edge with en high, sin_out/cos_out are
// loaded with the sine/cosine of the accumulator value before the edge and
// the accumulator advances by m_incr. Outputs hold while en is low.
module sincos_gen #(
  parameter int ACC_W  = 12,
  parameter int LUT_AW = 10,
  parameter int OUT_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [ACC_W-1:0]        m_incr,
  output logic [ACC_W-1:0]        phase_acc,
  output logic signed [OUT_W-1:0] sin_out,
  output logic signed [OUT_W-1:0] cos_out
);

  localparam int DEPTH = 1 << LUT_AW;
  localparam int FRAC  = OUT_W - 2;    // <16,14>: amplitude 1.0 = 2^14

  typedef logic signed [OUT_W-1:0] quarter_t [DEPTH];

  function automatic quarter_t make_quarter();
    quarter_t t;
    real half_pi = 1.5707963267948966;
    for (int k = 0; k < DEPTH; k++)
      t[k] = OUT_W'($rtoi($floor(real'(1 << FRAC) *
                    $sin(half_pi * real'(k) / real'(DEPTH - 1)) + 0.5)));
    return t;
  endfunction

  localparam quarter_t QUARTER = make_quarter();

  // Sine of a full-circle phase from the quarter table
  function automatic logic signed [OUT_W-1:0] wave(input logic [ACC_W-1:0] ph);
    logic [1:0]        quad;
    logic [LUT_AW-1:0] addr;
    logic signed [OUT_W-1:0] mag;
    quad = ph[ACC_W-1 -: 2];
    addr = ph[ACC_W-3 -: LUT_AW];
    if (quad[0]) addr = ~addr;         // mirror: 1023 - a
    mag  = QUARTER[addr];
    return quad[1] ? -mag : mag;
  endfunction

  logic [ACC_W-1:0] cos_phase;
  assign cos_phase = phase_acc + ACC_W'(1 << (ACC_W - 2));   // + 90 degrees

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_acc <= '0;
      sin_out   <= '0;
      cos_out   <= '0;
    end else if (en) begin
      phase_acc <= phase_acc + m_incr;
      sin_out   <= wave(phase_acc);
      cos_out   <= wave(cos_phase);
    end
  end

endmodule
