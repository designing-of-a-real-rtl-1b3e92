// tb_softmax: checks probabilities (within 0.002 of exp(s_i)/sum exp(s_j))
// and the predicted class for hand-picked scores (all equal, one dominant,
// ties for the maximum, the extremes of the 10.4 format) and random scores,
// and that done comes 66 cycles after start is sampled (counted from the
// cycle that drives start: 67).
module tb_softmax;
  import gesture_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [D2_N-1:0][D2_W-1:0] in = '0;
  logic [D2_N-1:0][PROB_W-1:0] prob;
  gesture_e cls;

  softmax dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(int s0, int s1, int s2, int s3);
    int s [4];
    real e [4], sum, mx;
    int ecls, lat;
    s = '{s0, s1, s2, s3};
    ecls = 0;
    for (int i = 1; i < 4; i++) if (s[i] > s[ecls]) ecls = i;
    mx = real'(s[ecls]);
    sum = 0.0;
    for (int i = 0; i < 4; i++) begin e[i] = $exp((real'(s[i]) - mx) / 16.0); sum += e[i]; end
    for (int i = 0; i < 4; i++) in[i] <= D2_W'(s[i]);
    @(posedge clk);
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); lat++; end
    checks++;
    if (lat != 67) begin failures++; $display("FAIL: done after %0d cycles", lat); end
    checks++;
    if (int'(cls) != ecls) begin failures++; $display("FAIL: class %0d expected %0d", cls, ecls); end
    for (int i = 0; i < 4; i++) begin
      real p;
      p = real'(prob[i]) / 32768.0;
      checks++;
      if (p - e[i] / sum > 0.002 || e[i] / sum - p > 0.002) begin
        failures++;
        $display("FAIL: scores %0d %0d %0d %0d prob[%0d] = %f expected %f", s0, s1, s2, s3, i, p, e[i] / sum);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_case(0, 0, 0, 0);
    run_case(100, 100, 100, 100);
    run_case(800, 0, -800, 10);
    run_case(-8192, 8191, -8192, -8192);
    run_case(5, 40, 40, -3);
    run_case(-20, -30, -10, -10);
    run_case(16, 0, 0, 0);
    run_case(0, 0, 0, 11);
    for (int n = 0; n < 200; n++) begin
      int r;
      r = (n < 100) ? 64 : 8191;
      run_case($urandom_range(2*r) - r, $urandom_range(2*r) - r,
               $urandom_range(2*r) - r, $urandom_range(2*r) - r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
