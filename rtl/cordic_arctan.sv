// cordic_arctan: phase of an (I, Q) vector by a CORDIC in vectoring mode,
// run by a small state machine with shifts and adds only.
//
// On start the vector is pre-rotated into the right half plane: if I < 0 it
// is turned by -90 degrees (Q >= 0) or +90 degrees (Q < 0) and the angle
// register z starts at +90 or -90; otherwise z starts at 0. Then ITER = 8
// iterations, one per clock, rotate the vector toward the x axis:
//   d = +1 if y < 0, else -1
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)
// with atan(2^-i) read from a <20,8> degree ROM (45, 26.565, ... 0.448).
// z then holds atan2(Q, I) in degrees, signed <20,8>, within +-180 degrees
// (+-90 degrees, i.e. arctan(Q/I), whenever I > 0). Eight iterations leave
// a residual error of at most about 0.45 degrees.
// The vectoring equations, the rotation sign rule, the pre-rotation, the
// eight iterations and the <20,8> angle ROM follow the design. The
// internal width IN_W + 2 (room for the CORDIC gain of 1.65), the treatment
// of y = 0 as positive and the start/busy/out_valid handshake are this
// implementation's choices.
//
// Interface and timing: start is taken only when busy is low. out_valid
// pulses ITER clock cycles after the edge that took start, with phase held
// until the next result. start while busy is a protocol error (asserted).
module cordic_arctan
  import fm_demod_pkg::angle_t, fm_demod_pkg::atan_rom, fm_demod_pkg::DEG90;
#(
  parameter int IN_W = 27,
  parameter int ITER = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic                   busy,
  output logic                   out_valid,
  output angle_t                 phase,
  output logic                   prerotated   // last vector had I < 0
);

  localparam int XY_W  = IN_W + 2;
  localparam int CNT_W = $clog2(ITER);

  typedef enum logic {S_IDLE, S_ROTATE} state_t;

  state_t                 state;
  logic [CNT_W-1:0]       iter;
  logic signed [XY_W-1:0] x, y;
  angle_t                 z;

  // one CORDIC micro-rotation
  logic signed [XY_W-1:0] x_sh, y_sh, x_nx, y_nx;
  angle_t                 z_nx, alpha;
  assign x_sh  = x >>> iter;
  assign y_sh  = y >>> iter;
  assign alpha = atan_rom(32'(iter));

  always_comb begin
    if (y < 0) begin            // d = +1
      x_nx = x - y_sh;
      y_nx = y + x_sh;
      z_nx = z - alpha;
    end else begin              // d = -1
      x_nx = x + y_sh;
      y_nx = y - x_sh;
      z_nx = z + alpha;
    end
  end

  assign busy = (state == S_ROTATE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      iter       <= '0;
      x          <= '0;
      y          <= '0;
      z          <= '0;
      out_valid  <= 1'b0;
      phase      <= '0;
      prerotated <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          iter  <= '0;
          state <= S_ROTATE;
          prerotated <= i_in[IN_W-1];
          if (!i_in[IN_W-1]) begin
            x <= XY_W'(i_in);
            y <= XY_W'(q_in);
            z <= '0;
          end else if (!q_in[IN_W-1]) begin   // turn by -90 degrees
            x <= XY_W'(q_in);
            y <= -XY_W'(i_in);
            z <= angle_t'(DEG90);
          end else begin                      // turn by +90 degrees
            x <= -XY_W'(q_in);
            y <= XY_W'(i_in);
            z <= -angle_t'(DEG90);
          end
        end
        S_ROTATE: begin
          x    <= x_nx;
          y    <= y_nx;
          z    <= z_nx;
          iter <= iter + 1'b1;
          if (iter == CNT_W'(ITER - 1)) begin
            phase     <= z_nx;
            out_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("cordic_arctan: start while busy");

endmodule
