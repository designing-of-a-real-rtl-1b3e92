// tb_gesture_cnn_top: end-to-end test of the gesture CNN accelerator at its
// full size. For several random networks and input windows it writes all
// 4300 parameters and 384 samples through the host ports, runs an inference
// and compares the 4 scores bit for bit, the predicted class exactly and the
// probabilities within 0.002 against the reference model. It also checks
// that the probabilities sum to about 1, measures the inference latency and
// the conv1 throughput (one output per cycle), and counts the mechanisms of
// the design: kernel reloads of both convolutions, pool1 writes, ReLU clamps
// in the merged pools, pool2 values absorbed by dense1 while conv2 is still
// running (layer merging) and softmax divisions.
module tb_gesture_cnn_top;
  import gesture_pkg::*;
  import gesture_ref_pkg::*;

  localparam int RUNS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_we = 1'b0, prm_we = 1'b0, start = 1'b0;
  logic [$clog2(N_IN)-1:0] in_addr = '0;
  logic [IN_W-1:0]         in_data = '0;
  logic [PA_W-1:0]         prm_addr = '0;
  logic [PRM_W-1:0]        prm_data = '0;
  logic busy, done;
  gesture_e cls;
  logic [D2_N-1:0][PROB_W-1:0] prob;
  logic [D2_N-1:0][D2_W-1:0]   score;

  gesture_cnn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_c1_reload = 0, n_c2_reload = 0, n_p1_write = 0, n_p1_relu = 0;
  int n_merge = 0, n_div = 0, n_busy_c1 = 0;
  int n_pad_t = 0, n_pad_a = 0, n_pad_c2 = 0, n_tie = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, observed on the internal handshakes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_conv1.w_rd_en) n_c1_reload++;
    if (dut.u_conv2.w_rd_en) n_c2_reload++;
    if (dut.p1_we) begin
      n_p1_write++;
      if (dut.p1_wr_data == '0) n_p1_relu++;
    end
    if (dut.p2_valid && dut.u_conv2.busy) n_merge++;
    // S_DIV is the last softmax state; one division ends when bit 0 is produced
    if (dut.u_softmax.state == dut.u_softmax.state.last() && dut.u_softmax.bitn == 4'd0) n_div++;
    if (dut.u_conv1.busy) n_busy_c1++;
    // padding: conv1 windows that reach above the first time step or past an axis
    if (dut.u_conv1.pos_v && dut.u_conv1.nt == 0) n_pad_t++;
    if (dut.u_conv1.pos_v && dut.u_conv1.na != 2'd1) n_pad_a++;
    // conv2 windows that use a padding row (first output time, last two)
    if (dut.u_conv2.pos_v && ((dut.u_conv2.tp == 0 && dut.u_conv2.tm == 0) || (dut.u_conv2.tp == 4'd13 && dut.u_conv2.tm != 0))) n_pad_c2++;
    // convergent rounding: conv1 sums exactly half-way between two integers
    if (dut.u_conv1.pos_v && dut.u_conv1.acc[6:0] == 7'd64) n_tie++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gesture_model m;
    m = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int run = 0; run < RUNS; run++) begin
      int cyc, c1_before;
      real psum;
      // ranges keep the values inside the formats, as trained data would
      m.randomise(run == 3 ? 2047 : 300, run == 0 ? 40 : 64);
      m.run();
      for (int i = 0; i < N_PARAMS; i++) begin
        prm_we <= 1'b1; prm_addr <= PA_W'(i); prm_data <= PRM_W'(m.prm[i]);
        @(posedge clk);
      end
      prm_we <= 1'b0;
      for (int i = 0; i < N_IN; i++) begin
        in_we <= 1'b1; in_addr <= 9'(i); in_data <= IN_W'(m.x[i]);
        @(posedge clk);
      end
      in_we <= 1'b0;
      c1_before = n_busy_c1;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      $write("run %0d: latency %0d cycles, conv1 %0d cycles, class %0d (ref %0d), scores",
             run, cyc, n_busy_c1 - c1_before, cls, m.cls);
      for (int o = 0; o < D2_N; o++) begin
        d2_t v;
        v = score[o];
        $write(" %0d", v);
      end
      $write("\n");
      for (int o = 0; o < D2_N; o++)
        check(longint'($signed(score[o])) == m.d2[o],
              $sformatf("run %0d score %0d: %0d, expected %0d", run, o, $signed(score[o]), m.d2[o]));
      for (int j = 0; j < D1_N; j++)
        check(longint'($signed(dut.d1_out[j])) == m.d1[j],
              $sformatf("run %0d dense1 %0d: %0d, expected %0d", run, j, $signed(dut.d1_out[j]), m.d1[j]));
      check(int'(cls) == m.cls, $sformatf("run %0d class %0d, expected %0d", run, cls, m.cls));
      psum = 0.0;
      for (int o = 0; o < D2_N; o++) begin
        real p;
        p = real'(prob[o]) / 32768.0;
        psum += p;
        check((p - m.pr[o] < 0.002) && (m.pr[o] - p < 0.002),
              $sformatf("run %0d prob %0d: %f, expected %f", run, o, p, m.pr[o]));
      end
      check(psum > 0.995 && psum < 1.001, $sformatf("run %0d probabilities sum to %f", run, psum));
      // latency: about 4100 cycles (42.5 us at 10.37 ns in the reference design)
      check(cyc > 3900 && cyc < 4300, $sformatf("run %0d latency %0d cycles", run, cyc));
      // conv1: one output per cycle, 8 kernels x (378 outputs + fill)
      check((n_busy_c1 - c1_before) < 8 * 400, $sformatf("run %0d conv1 took %0d cycles", run, n_busy_c1 - c1_before));
      repeat (5) @(posedge clk);
    end
    $display("mechanisms: conv1 reloads %0d, conv2 reloads %0d, pool1 writes %0d, pool1 ReLU clamps %0d, merged pool2->dense1 %0d, softmax divisions %0d",
             n_c1_reload, n_c2_reload, n_p1_write, n_p1_relu, n_merge, n_div);
    check(n_c1_reload == RUNS * C1_K, "conv1 kernel reloads");
    check(n_c2_reload == RUNS * C2_K, "conv2 kernel reloads");
    check(n_p1_write == RUNS * P1_T * C1_K, "pool1 writes");
    check(n_p1_relu > 0, "ReLU clamp in merged pool never happened");
    check(n_merge == RUNS * FLAT, "pool2 values absorbed while conv2 runs");
    check(n_div == RUNS * D2_N, "softmax divisions");
    $display("padding: conv1 time %0d, conv1 axis %0d, conv2 %0d; conv1 rounding ties %0d", n_pad_t, n_pad_a, n_pad_c2, n_tie);
    check(n_pad_t > 0 && n_pad_a > 0 && n_pad_c2 > 0, "padding never used");
    check(n_tie > 0, "no rounding tie in conv1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
