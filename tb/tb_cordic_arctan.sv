// tb_cordic_arctan: self-checking test of the CORDIC arctangent.
//
// Applies the ratios Q/I = +-1, 2, 4, 8, 16 (I > 0), the axes, and random
// vectors in all four quadrants, half of them with components up to 2^26
// and half up to 2^16 (vectors of a few hundred LSB lose accuracy to the
// truncated shifts and are not used). Each result must lie within
// 0.5 degree (128 LSB of <20,8>) of atan2(Q, I) computed with real
// arithmetic; eight iterations leave at most about 0.45 degree. out_valid
// must come exactly ITER = 8 clocks after the edge that took start, busy
// must be high in between, and prerotated must report I < 0.
module tb_cordic_arctan;
  localparam int IN_W = 27;
  localparam int ITER = 8;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [IN_W-1:0] i_in = '0, q_in = '0;
  logic busy, out_valid, prerotated;
  logic signed [19:0] phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_arctan dut (.*);

  task automatic one(input longint vi, input longint vq);
    real exp_deg, got_deg;
    int  lat;
    @(negedge clk);
    i_in  = IN_W'(vi);
    q_in  = IN_W'(vq);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!out_valid && lat < 50) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL: busy low during the iterations");
      end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != ITER) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", lat, ITER);
    end
    exp_deg = $atan2(real'(vq), real'(vi)) * 180.0 / PI;
    got_deg = real'(phase) / 256.0;
    checks++;
    if ((got_deg - exp_deg) ** 2 > 0.25) begin
      failures++;
      $display("FAIL: I=%0d Q=%0d phase %f expected %f", vi, vq, got_deg, exp_deg);
    end
    checks++;
    if (prerotated != (vi < 0)) begin
      failures++;
      $display("FAIL: prerotated flag %0b for I=%0d", prerotated, vi);
    end
  endtask

  initial begin
    longint a, vi, vq;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    a = 1 << 21;
    for (int k = 0; k <= 4; k++) begin
      one(a, a << k);
      one(a, -(a << k));
    end
    // axes
    one(a, 0);
    one(0, a);
    one(0, -a);
    one(-a, 1);
    one(-a, -1);
    repeat (3000) begin
      vi = longint'($signed($urandom_range(32'h7FF_FFFF))) - 64'sh400_0000;
      vq = longint'($signed($urandom_range(32'h7FF_FFFF))) - 64'sh400_0000;
      if ($urandom_range(1)) begin   // small vectors too
        vi = vi >>> 10;
        vq = vq >>> 10;
      end
      if (vi == 0 && vq == 0) vi = 1;
      one(vi, vq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
