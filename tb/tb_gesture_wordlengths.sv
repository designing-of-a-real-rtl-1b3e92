// tb_gesture_wordlengths: runs the word-length study of the accelerator.
// The top level is built six more times, once for each of the word-length
// configurations T1 .. T6 that were compared before settling on T7 (T7 is
// the default build and has its own test). Each configuration is given as
// (total width, fraction bits) per value group:
//
//        params  input   conv1   conv2   dense1  dense2
//   T1   3.15    17.19   17.19   17.19   17.19   17.19
//   T2   3.15    12.0    13.1    17.19   17.19   17.19
//   T3   3.15    12.0    13.1    14.2    17.19   17.19
//   T4   3.15    12.0    13.1    14.2    14.5    17.19
//   T5   3.15    12.0    13.1    14.2    14.5    10.2
//   T6   3.9     12.0    13.0    14.0    14.1    10.4
//
// (integer.fraction bits; the pools share the format of their convolution).
// All six instances run at the same time, each from its own process: it
// loads a random network scaled to its formats (same integer input range
// and parameter range for every configuration), runs two inferences and
// compares the dense1 outputs and scores bit for bit, the class exactly and
// the probabilities within 0.002 against the reference model set to the same
// formats. It also checks that every configuration has the same latency.
// A watchdog ends the run if an instance hangs.
module tb_gesture_wordlengths;
  import gesture_pkg::*;
  import gesture_ref_pkg::*;

  localparam int NCFG = 6;
  localparam int RUNS = 2;
  // per configuration: W/F of params, input, conv1, conv2, dense1, dense2
  function automatic int cfg(int g, int i);
    int t [12];
    case (g)
      0:       t = '{18, 15, 36, 19, 36, 19, 36, 19, 36, 19, 36, 19};  // T1
      1:       t = '{18, 15, 12,  0, 14,  1, 36, 19, 36, 19, 36, 19};  // T2
      2:       t = '{18, 15, 12,  0, 14,  1, 16,  2, 36, 19, 36, 19};  // T3
      3:       t = '{18, 15, 12,  0, 14,  1, 16,  2, 19,  5, 36, 19};  // T4
      4:       t = '{18, 15, 12,  0, 14,  1, 16,  2, 19,  5, 12,  2};  // T5
      default: t = '{12,  9, 12,  0, 13,  0, 14,  0, 15,  1, 14,  4};  // T6
    endcase
    return t[i];
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;
  int lat [NCFG];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int WP = cfg(g, 0),  FP = cfg(g, 1);
    localparam int WI = cfg(g, 2),  FI = cfg(g, 3);
    localparam int W1 = cfg(g, 4),  F1 = cfg(g, 5);
    localparam int W2 = cfg(g, 6),  F2 = cfg(g, 7);
    localparam int WD = cfg(g, 8),  FD = cfg(g, 9);
    localparam int WS = cfg(g, 10), FS = cfg(g, 11);

    logic in_we = 1'b0, prm_we = 1'b0, start = 1'b0;
    logic [$clog2(N_IN)-1:0] in_addr = '0;
    logic [WI-1:0]           in_data = '0;
    logic [PA_W-1:0]         prm_addr = '0;
    logic [WP-1:0]           prm_data = '0;
    logic busy, done;
    gesture_e cls;
    logic [D2_N-1:0][PROB_W-1:0] prob;
    logic [D2_N-1:0][WS-1:0]     score;

    gesture_cnn_top #(
      .W_IN(WI), .F_IN(FI), .W_PRM(WP), .F_PRM(FP), .W_C1(W1), .F_C1(F1),
      .W_C2(W2), .F_C2(F2), .W_D1(WD), .F_D1(FD), .W_D2(WS), .F_D2(FS)
    ) u_dut (
      .clk, .rst_n, .in_we, .in_addr, .in_data, .prm_we, .prm_addr, .prm_data,
      .start, .busy, .done, .cls, .prob, .score);

    initial begin
      gesture_model m;
      m = new();
      m.prm_w = WP; m.prm_f = FP; m.in_w = WI; m.in_f = FI;
      m.c1_w = W1;  m.c1_f = F1;  m.c2_w = W2; m.c2_f = F2;
      m.d1_w = WD;  m.d1_f = FD;  m.d2_w = WS; m.d2_f = FS;
      @(posedge rst_n);
      @(posedge clk);
      for (int run = 0; run < RUNS; run++) begin
        int cyc;
        real psum;
        // inputs are integer samples in [-300, 300]; parameters within +-0.5
        m.randomise(300, 64 << (FP - 7));
        for (int i = 0; i < N_IN; i++) m.x[i] = m.x[i] <<< FI;
        m.run();
        for (int i = 0; i < N_PARAMS; i++) begin
          prm_we <= 1'b1; prm_addr <= PA_W'(i); prm_data <= WP'(m.prm[i]);
          @(posedge clk);
        end
        prm_we <= 1'b0;
        for (int i = 0; i < N_IN; i++) begin
          in_we <= 1'b1; in_addr <= 9'(i); in_data <= WI'(m.x[i]);
          @(posedge clk);
        end
        in_we <= 1'b0;
        start <= 1'b1;
        @(posedge clk);
        start <= 1'b0;
        cyc = 1;
        while (!done) begin @(posedge clk); cyc++; end
        lat[g] = cyc;
        $display("T%0d run %0d: latency %0d cycles, class %0d (ref %0d)", g + 1, run, cyc, cls, m.cls);
        for (int o = 0; o < D2_N; o++)
          check(longint'($signed(score[o])) == m.d2[o],
                $sformatf("T%0d run %0d score %0d: %0d, expected %0d", g + 1, run, o,
                          longint'($signed(score[o])), m.d2[o]));
        for (int j = 0; j < D1_N; j++)
          check(longint'($signed(u_dut.d1_out[j])) == m.d1[j],
                $sformatf("T%0d run %0d dense1 %0d: %0d, expected %0d", g + 1, run, j,
                          longint'($signed(u_dut.d1_out[j])), m.d1[j]));
        check(int'(cls) == m.cls, $sformatf("T%0d run %0d class %0d, expected %0d", g + 1, run, cls, m.cls));
        psum = 0.0;
        for (int o = 0; o < D2_N; o++) begin
          real p;
          p = real'(prob[o]) / 32768.0;
          psum += p;
          check((p - m.pr[o] < 0.002) && (m.pr[o] - p < 0.002),
                $sformatf("T%0d run %0d prob %0d: %f, expected %f", g + 1, run, o, p, m.pr[o]));
        end
        check(psum > 0.995 && psum < 1.001, $sformatf("T%0d run %0d probabilities sum to %f", g + 1, run, psum));
        repeat (5) @(posedge clk);
      end
      finished++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == NCFG);
    // the word lengths change only the datapath widths, not the schedule
    for (int g = 1; g < NCFG; g++)
      check(lat[g] == lat[0], $sformatf("T%0d latency %0d differs from T1 (%0d)", g + 1, lat[g], lat[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
