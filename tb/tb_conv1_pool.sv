// tb_conv1_pool: runs the merged conv1 + pool1 unit on random windows with
// its memories around it and checks all 336 pooled values against the
// reference model, that every (time, kernel) cell is written exactly once,
// and the rate: one convolution output per cycle, so the layer finishes in
// fewer than 8 x 400 cycles.
module tb_conv1_pool;
  import gesture_pkg::*;
  import gesture_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic in_we = 1'b0; logic [8:0] in_wa = '0; logic [IN_W-1:0] in_wd = '0;
  logic w_we = 1'b0;  logic [2:0] w_wr = '0; logic [3:0] w_wl = '0; logic [PRM_W-1:0] w_wd = '0;
  logic in_rd_en; logic [8:0] in_rd_addr; logic [0:0][IN_W-1:0] in_rd_data;
  logic w_rd_en; logic [2:0] w_rd_row; logic [C1_LANES-1:0][PRM_W-1:0] w_rd_data;
  logic p1_we; logic [5:0] p1_row; logic [2:0] p1_lane; logic [C1_W-1:0] p1_data;

  lane_ram #(.ROWS(N_IN), .LANES(1), .W(IN_W)) u_in (.clk, .we(in_we), .wr_row(in_wa),
    .wr_lane(1'b0), .wr_data(in_wd), .rd_en(in_rd_en), .rd_row(in_rd_addr), .rd_data(in_rd_data));
  lane_ram #(.ROWS(C1_K), .LANES(C1_LANES), .W(PRM_W)) u_w (.clk, .we(w_we), .wr_row(w_wr),
    .wr_lane(w_wl), .wr_data(w_wd), .rd_en(w_rd_en), .rd_row(w_rd_row), .rd_data(w_rd_data));

  conv1_pool dut (.clk, .rst_n, .start, .busy, .done, .in_rd_en, .in_rd_addr,
    .in_rd_data(in_rd_data[0]), .w_rd_en, .w_rd_row, .w_rd_data,
    .p1_we, .p1_row, .p1_lane, .p1_data);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint got [P1_T][C1_K];
  int     nw  [P1_T][C1_K];

  always @(posedge clk) if (p1_we && rst_n) begin
    got[p1_row][p1_lane] = longint'(c1_t'(p1_data));
    nw[p1_row][p1_lane]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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
      m.randomise(run == 2 ? 2047 : 400, 64);
      m.run();
      foreach (nw[p, k]) nw[p][k] = 0;
      for (int i = 0; i < N_IN; i++) begin
        in_we <= 1'b1; in_wa <= 9'(i); in_wd <= IN_W'(m.x[i]); @(posedge clk);
      end
      in_we <= 1'b0;
      for (int i = 0; i < C1_K * C1_LANES; i++) begin
        w_we <= 1'b1; w_wr <= 3'(i / C1_LANES); w_wl <= 4'(i % C1_LANES);
        w_wd <= PRM_W'(m.prm[PA_C1 + i]); @(posedge clk);
      end
      w_we <= 1'b0;
      start <= 1'b1; @(posedge clk); start <= 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      @(posedge clk);
      for (int p = 0; p < P1_T; p++)
        for (int k = 0; k < C1_K; k++) begin
          checks++;
          if (nw[p][k] != 1 || got[p][k] != m.p1[p][k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: run %0d pool1[%0d][%0d] = %0d (%0d writes), expected %0d",
                       run, p, k, got[p][k], nw[p][k], m.p1[p][k]);
          end
        end
      checks++;
      $display("run %0d: %0d cycles", run, cyc);
      if (cyc >= 8 * 400) begin failures++; $display("FAIL: conv1 took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
