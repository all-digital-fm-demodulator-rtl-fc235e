// tb_iq_mixer: self-checking test of the quadrature mixer.
//
// Random 19-bit samples and random <16,14> oscillator words (including the
// extremes +-1.0 and the most negative sample) are applied with random
// in_valid. One clock after each valid input the outputs must equal
// floor(x*cos/2^14) for I and floor(x*sin/2^14) for Q, clipped to 19 bits;
// out_valid must follow in_valid by exactly one clock.
module tb_iq_mixer;
  localparam int X_W = 19, LO_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [X_W-1:0]  x = '0;
  logic signed [LO_W-1:0] sin_in = '0, cos_in = '0;
  logic                   out_valid;
  logic signed [X_W-1:0]  i_out, q_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iq_mixer dut (.*);

  function automatic longint ref_mix(input longint a, input longint b);
    longint p, lim;
    p = a * b;
    // floor division by 2^14
    p = (p >= 0) ? p / 16384 : -((-p + 16383) / 16384);
    lim = 1 << (X_W - 1);
    if (p > lim - 1) p = lim - 1;
    if (p < -lim) p = -lim;
    return p;
  endfunction

  logic   pend = 1'b0;
  longint ei = 0, eq = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != pend) begin
        failures++;
        $display("FAIL: out_valid %0b expected %0b", out_valid, pend);
      end else if (pend && (longint'(i_out) != ei || longint'(q_out) != eq)) begin
        failures++;
        $display("FAIL: I %0d exp %0d, Q %0d exp %0d", i_out, ei, q_out, eq);
      end
      pend <= in_valid;
      if (in_valid) begin
        ei <= ref_mix(longint'(x), longint'(cos_in));
        eq <= ref_mix(longint'(x), longint'(sin_in));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      x = X_W'($urandom);
      case ($urandom_range(5))
        0: begin sin_in = 16'sd16384;  cos_in = -16'sd16384; end
        1: begin sin_in = -16'sd16384; cos_in = 16'sd0; x = -(1 <<< (X_W - 1)); end
        default: begin
          sin_in = LO_W'($signed($urandom_range(32768)) - 16384);
          cos_in = LO_W'($signed($urandom_range(32768)) - 16384);
        end
      endcase
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
