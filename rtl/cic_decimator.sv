// cic_decimator: single-stage (N = 1) cascaded integrator-comb decimator.
//
// The integrator accumulates every input sample at the input rate; every
// R-th input the accumulated value is taken (down-sampling by R) and the
// comb subtracts the value taken M decimated samples earlier. The result
// is the sum of the last R*M input samples, read once per R inputs, so the
// DC gain is R*M and the output is IN_W + ceil(log2(R*M)) bits wide, enough
// that the wrap-around of the integrator cancels in the comb.
// The demodulator uses it twice: stage I with R = 8, M = 1 (2.56 GS/s to
// 320 MS/s) and stage II with R = 16, M = 10 (320 MS/s to 20 MS/s, the
// channel-select filter for I and Q). Structure and R, M, N follow the
// integrator / down-sampler / comb arrangement of the design; the valid
// strobes, the full-precision output and the synchronous reset are this
// implementation's choices.
//
// Interface: din is sampled when in_valid is high. out_valid pulses for
// one cycle on the clock edge that takes in the R-th sample of a block, and
// dout holds the comb result from then until the next pulse.
// Timing: dout after the k-th pulse is the sum of input samples
// (k*R - R*M + 1) .. (k*R), counting inputs from 1 after reset (samples
// before reset count as zero).
module cic_decimator #(
  parameter int R    = 8,
  parameter int M    = 1,
  parameter int IN_W = 16,
  localparam int OUT_W = IN_W + $clog2(R * M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dout
);

  localparam int CNT_W = (R > 1) ? $clog2(R) : 1;

  logic signed [OUT_W-1:0] integ;          // integrator, input rate
  logic signed [OUT_W-1:0] integ_next;
  logic        [CNT_W-1:0] phase_cnt;      // position inside a block of R
  logic signed [OUT_W-1:0] comb_dly [M];   // z^-M of the comb, output rate

  assign integ_next = integ + OUT_W'(din);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ     <= '0;
      phase_cnt <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
      for (int k = 0; k < M; k++) comb_dly[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ <= integ_next;
        if (phase_cnt == CNT_W'(R - 1)) begin
          phase_cnt <= '0;
          // down-sample and comb: y = v[n] - v[n-M]
          dout      <= integ_next - comb_dly[M-1];
          out_valid <= 1'b1;
          comb_dly[0] <= integ_next;
          for (int k = 1; k < M; k++) comb_dly[k] <= comb_dly[k-1];
        end else begin
          phase_cnt <= phase_cnt + 1'b1;
        end
      end
    end
  end

endmodule
