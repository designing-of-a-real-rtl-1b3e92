// tb_conv2_pool: loads a pool1 result from the reference model into the
// pool1 buffer, runs the merged conv2 + pool2 unit and checks the 224
// streamed values and their flatten indices (channel-major order, each index
// once), that at most one value leaves per 3 cycles, and the layer time
// (under 16 x 55 cycles).
module tb_conv2_pool;
  import gesture_pkg::*;
  import gesture_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic p_we = 1'b0; logic [5:0] p_wr = '0; logic [2:0] p_wl = '0; logic [C1_W-1:0] p_wd = '0;
  logic w_we = 1'b0; logic [3:0] w_wr = '0; logic [5:0] w_wl = '0; logic [PRM_W-1:0] w_wd = '0;
  logic p1_rd_en; logic [5:0] p1_rd_row; logic [C1_K-1:0][C1_W-1:0] p1_rd_data;
  logic w_rd_en; logic [3:0] w_rd_row; logic [C2_LANES-1:0][PRM_W-1:0] w_rd_data;
  logic out_valid; logic [7:0] out_idx; logic [C2_W-1:0] out_data;

  lane_ram #(.ROWS(P1_T), .LANES(C1_K), .W(C1_W)) u_p1 (.clk, .we(p_we), .wr_row(p_wr),
    .wr_lane(p_wl), .wr_data(p_wd), .rd_en(p1_rd_en), .rd_row(p1_rd_row), .rd_data(p1_rd_data));
  lane_ram #(.ROWS(C2_K), .LANES(C2_LANES), .W(PRM_W)) u_w (.clk, .we(w_we), .wr_row(w_wr),
    .wr_lane(w_wl), .wr_data(w_wd), .rd_en(w_rd_en), .rd_row(w_rd_row), .rd_data(w_rd_data));

  conv2_pool dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int order_err = 0, gap_err = 0, nout = 0, last_cyc = -10, cyc_now = 0;
  longint got [FLAT];
  int     nw  [FLAT];

  always @(posedge clk) begin
    cyc_now++;
    if (out_valid && rst_n) begin
      if (32'(out_idx) != nout) begin order_err++; $display("order: idx %0d expected %0d at %0d", out_idx, nout, cyc_now); end
      if (cyc_now - last_cyc < 3) gap_err++;
      last_cyc = cyc_now;
      got[out_idx] = longint'(c2_t'(out_data));
      nw[out_idx]++;
      nout++;
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
    gesture_model m;
    m = new();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      int cyc;
      m.randomise(300, 64);
      m.run();
      foreach (nw[i]) nw[i] = 0;
      nout = 0;
      for (int p = 0; p < P1_T; p++)
        for (int c = 0; c < C1_K; c++) begin
          p_we <= 1'b1; p_wr <= 6'(p); p_wl <= 3'(c); p_wd <= C1_W'(m.p1[p][c]); @(posedge clk);
        end
      p_we <= 1'b0;
      for (int i = 0; i < C2_K * C2_LANES; i++) begin
        w_we <= 1'b1; w_wr <= 4'(i / C2_LANES); w_wl <= 6'(i % C2_LANES);
        w_wd <= PRM_W'(m.prm[PA_C2 + i]); @(posedge clk);
      end
      w_we <= 1'b0;
      start <= 1'b1; @(posedge clk); start <= 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      @(posedge clk);
      for (int i = 0; i < FLAT; i++) begin
        checks++;
        if (nw[i] != 1 || got[i] != m.p2[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: run %0d flat[%0d] = %0d (%0d writes), expected %0d", run, i, got[i], nw[i], m.p2[i]);
        end
      end
      $display("run %0d: %0d cycles", run, cyc);
      checks += 3;
      if (cyc >= C2_K * 55) begin failures++; $display("FAIL: conv2 took %0d cycles", cyc); end
      if (order_err != 0) begin failures++; $display("FAIL: %0d values out of order", order_err); end
      if (gap_err != 0) begin failures++; $display("FAIL: %0d values closer than 3 cycles", gap_err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
