// tb_cic_stage2: self-checking test of cic_decimator as the stage II
// channel-select decimator (R = 16, M = 10, 19-bit input).
//
// A step of ones (the step-response experiment: the output settles at the
// DC gain R*M) is followed by random full-scale samples with random gaps in
// in_valid. A reference model keeps every accepted sample and, for each
// block of R, predicts the sum of the last R*M samples. Each out_valid must
// come exactly one clock after the edge that took the R-th sample and carry
// that sum; the number of outputs must be the number of full blocks.
module tb_cic_stage2;
  localparam int R = 16, M = 10, IN_W = 19;
  localparam int OUT_W = IN_W + $clog2(R * M);
  localparam int NSAMP = 4000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  din = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cic_decimator #(.R(R), .M(M), .IN_W(IN_W)) dut (.*);

  // reference model
  longint hist[$];
  longint exp_val[$];
  longint exp_cyc[$];
  longint cyc = 0;
  int     nacc = 0, nout = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (out_valid) begin
        nout++;
        checks++;
        if (exp_val.size() == 0) begin
          failures++;
          $display("FAIL: unexpected output %0d at cycle %0d", dout, cyc);
        end else begin
          longint e, c;
          e = exp_val.pop_front();
          c = exp_cyc.pop_front();
          if (longint'(dout) != e || cyc != c + 1) begin
            failures++;
            $display("FAIL: out %0d exp %0d, cycle %0d exp %0d", dout, e, cyc, c + 1);
          end
        end
      end
      if (in_valid) begin
        hist.push_back(longint'(din));
        nacc++;
        if (nacc % R == 0) begin
          longint s;
          s = 0;
          for (int k = 0; k < R * M; k++)
            if (hist.size() > k) s += hist[hist.size() - 1 - k];
          exp_val.push_back(s);
          exp_cyc.push_back(cyc);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // step response
    for (int n = 0; n < 4 * R * M; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      din = 1;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (dout != OUT_W'(R * M)) begin
      failures++;
      $display("FAIL: step response settles at %0d, expected %0d", dout, R * M);
    end
    // random samples, random gaps
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      din = IN_W'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != nacc / R || exp_val.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs for %0d samples", nout, nacc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20 * NSAMP) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
