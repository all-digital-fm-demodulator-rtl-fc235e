// fm_demod_pkg: constants shared by the FM demodulator blocks.
//
// Sample formats. The ADC word is signed <16,14> (16 bits, 14 fractional
// bits), as is the sine/cosine amplitude of the local oscillator. Angles
// are signed fixed point in degrees with 8 fractional bits (<20,8>), the
// format the CORDIC angle ROM uses; 1 degree is therefore 256 LSB.
//
// The CORDIC arctangent constants atan(2^-i), i = 0..7, are given here as
// round(256 * atan(2^-i) in degrees): 45, 26.565, 14.036, 7.125, 3.576,
// 1.790, 0.895 and 0.448 degrees.
package fm_demod_pkg;

  localparam int ADC_W      = 16;   // ADC sample width, <16,14>
  localparam int ANG_W      = 20;   // angle word width, <20,8> degrees
  localparam int ANG_FRAC   = 8;    // fractional bits of an angle
  localparam int FREQ_W     = 16;   // frequency word width, <16,8> degrees/sample

  // Angles of 90, 180 and 360 degrees in <.,8> units
  localparam int DEG90  = 90  << ANG_FRAC;
  localparam int DEG180 = 180 << ANG_FRAC;
  localparam int DEG360 = 360 << ANG_FRAC;

  typedef logic signed [ANG_W-1:0] angle_t;

  // Angle ROM of the CORDIC: atan(2^-i) in degrees, <20,8>
  function automatic angle_t atan_rom(input int unsigned i);
    case (i)
      0:       return angle_t'(11520);  // 45.000
      1:       return angle_t'(6801);   // 26.565
      2:       return angle_t'(3593);   // 14.036
      3:       return angle_t'(1824);   //  7.125
      4:       return angle_t'(916);    //  3.576
      5:       return angle_t'(458);    //  1.790
      6:       return angle_t'(229);    //  0.895
      7:       return angle_t'(115);    //  0.448
      default: return angle_t'(0);
    endcase
  endfunction

endpackage
