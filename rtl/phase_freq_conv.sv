// phase_freq_conv: turns the phase of the baseband vector into a frequency
// word by a first difference, freq = phi[n] - phi[n-1], the discrete form
// of w = dphi/dt with the sample interval taken as 1.
//
// The phase is in degrees, signed <20,8>, within +-180. A step that crosses
// the +-180 degree cut would show up as a jump of about 360 degrees, so the
// difference is brought back into (-180, +180] by adding or subtracting 360
// degrees (flag wrapped). The result is then clipped to the OUT_W = 16 bit
// frequency word, <16,8> degrees per sample (+-128 degrees; flag clipped).
// The difference equation and the 16-bit frequency word follow the design;
// the wrap correction, the clip and the suppression of the first output
// after reset (no previous phase yet) are this implementation's choices.
//
// Interface and timing: a phase presented with in_valid gives freq with
// out_valid on the next clock edge; the first phase after reset only primes
// the previous-phase register and gives no output.
module phase_freq_conv
  import fm_demod_pkg::ANG_W, fm_demod_pkg::FREQ_W, fm_demod_pkg::DEG180, fm_demod_pkg::DEG360;
#(
  parameter int PH_W   = ANG_W,
  parameter int OUT_W  = FREQ_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [PH_W-1:0]   phase_in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0] freq,
  output logic                     wrapped,
  output logic                     clipped
);

  localparam int D_W = PH_W + 2;
  localparam logic signed [D_W-1:0] HALF  = D_W'(DEG180);
  localparam logic signed [D_W-1:0] FULL  = D_W'(DEG360);
  localparam logic signed [D_W-1:0] F_MAX = D_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [D_W-1:0] F_MIN = -D_W'(1 << (OUT_W - 1));

  logic signed [PH_W-1:0] prev;
  logic                   primed;
  logic signed [D_W-1:0]  diff, diff_w;
  logic                   wrap_c, clip_c;
  logic signed [OUT_W-1:0] freq_c;

  always_comb begin
    diff   = D_W'(phase_in) - D_W'(prev);
    wrap_c = 1'b1;
    if (diff > HALF)        diff_w = diff - FULL;
    else if (diff <= -HALF) diff_w = diff + FULL;
    else begin
      diff_w = diff;
      wrap_c = 1'b0;
    end
    clip_c = 1'b1;
    if (diff_w > F_MAX)      freq_c = F_MAX[OUT_W-1:0];
    else if (diff_w < F_MIN) freq_c = F_MIN[OUT_W-1:0];
    else begin
      freq_c = diff_w[OUT_W-1:0];
      clip_c = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev      <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      freq      <= '0;
      wrapped   <= 1'b0;
      clipped   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        prev   <= phase_in;
        primed <= 1'b1;
        if (primed) begin
          out_valid <= 1'b1;
          freq      <= freq_c;
          wrapped   <= wrap_c;
          clipped   <= clip_c;
        end
      end
    end
  end

endmodule
