// iq_mixer: quadrature down-converter.
//
// The real input x (the stage I decimator output) is multiplied by the
// local oscillator's cosine to give I and by its sine to give Q, as in the
// two mixers of the demodulator's block diagram. The oscillator words are
// signed <16,14>, so each product is shifted right by 14 (rounding toward
// minus infinity) to keep x's scale, and clipped to the input width; only
// x = -2^(W-1) times -1.0 can reach the clip. The multiplication itself is
// what the design asks for; the scaling, the clip and the output register
// are this implementation's choices.
//
// Interface and timing: when in_valid is high the products of x, sin_in and
// cos_in are registered; out_valid follows one cycle later with i_out and
// q_out, which hold until the next valid sample.
module iq_mixer #(
  parameter int X_W  = 19,
  parameter int LO_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [X_W-1:0]  x,
  input  logic signed [LO_W-1:0] sin_in,
  input  logic signed [LO_W-1:0] cos_in,
  output logic                   out_valid,
  output logic signed [X_W-1:0]  i_out,
  output logic signed [X_W-1:0]  q_out
);

  localparam int P_W  = X_W + LO_W;
  localparam int FRAC = LO_W - 2;

  localparam logic signed [P_W-1:0] MAXV = P_W'((1 << (X_W - 1)) - 1);
  localparam logic signed [P_W-1:0] MINV = -P_W'(1 << (X_W - 1));

  function automatic logic signed [X_W-1:0] scale(input logic signed [P_W-1:0] p);
    logic signed [P_W-1:0] s;
    s = p >>> FRAC;
    if (s > MAXV)      return MAXV[X_W-1:0];
    else if (s < MINV) return MINV[X_W-1:0];
    else               return s[X_W-1:0];
  endfunction

  logic signed [P_W-1:0] prod_i, prod_q;
  assign prod_i = P_W'(x) * P_W'(cos_in);
  assign prod_q = P_W'(x) * P_W'(sin_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= scale(prod_i);
        q_out <= scale(prod_q);
      end
    end
  end

endmodule
