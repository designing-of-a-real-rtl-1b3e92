// tb_dense1: feeds the 224 flattened values of reference networks to the
// dense1 unit in a shuffled order with random gaps (including back-to-back
// inputs), finishes it and checks the 16 outputs bit for bit (bias, 14.1
// rounding, ReLU), that clear empties the accumulators between windows, and
// that out is ready two cycles after fin is sampled (the loop below counts
// from the cycle that drives fin, so it expects 3).
module tb_dense1;
  import gesture_pkg::*;
  import gesture_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, in_valid = 1'b0, fin = 1'b0;
  logic [7:0] in_idx = '0;
  logic [C2_W-1:0] in_data = '0;
  logic w_we = 1'b0; logic [7:0] w_wr = '0; logic [3:0] w_wl = '0; logic [PRM_W-1:0] w_wd = '0;
  logic w_rd_en; logic [7:0] w_rd_row; logic [D1_N-1:0][PRM_W-1:0] w_rd_data;
  logic [D1_N-1:0][D1_W-1:0] out;
  logic done;

  lane_ram #(.ROWS(FLAT + 1), .LANES(D1_N), .W(PRM_W)) u_w (.clk, .we(w_we), .wr_row(w_wr),
    .wr_lane(w_wl), .wr_data(w_wd), .rd_en(w_rd_en), .rd_row(w_rd_row), .rd_data(w_rd_data));

  dense1 dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nzero = 0, nb2b = 0;

  always @(posedge clk) if (rst_n && in_valid && dut.s1_v) nb2b++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gesture_model m;
    int perm [FLAT];
    m = new();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      int lat, gap;
      m.randomise(300, 64);
      m.run();
      for (int i = 0; i < (FLAT + 1) * D1_N; i++) begin
        w_we <= 1'b1; w_wr <= 8'(i / D1_N); w_wl <= 4'(i % D1_N);
        w_wd <= PRM_W'(m.prm[PA_D1 + i]); @(posedge clk);
      end
      w_we <= 1'b0;
      clear <= 1'b1; @(posedge clk); clear <= 1'b0;
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < FLAT; i++) begin
        in_valid <= 1'b1; in_idx <= 8'(perm[i]); in_data <= C2_W'(m.p2[perm[i]]);
        @(posedge clk);
        gap = $urandom_range(2);
        if (gap > 0) begin
          in_valid <= 1'b0;
          repeat (gap) @(posedge clk);
        end
      end
      in_valid <= 1'b0;
      fin <= 1'b1; @(posedge clk); fin <= 1'b0;
      lat = 1;
      while (!done) begin @(posedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL: out after %0d cycles", lat); end
      for (int j = 0; j < D1_N; j++) begin
        checks++;
        if (longint'(d1_t'(out[j])) != m.d1[j]) begin
          failures++;
          $display("FAIL: run %0d out[%0d] = %0d expected %0d", run, j, d1_t'(out[j]), m.d1[j]);
        end
        if (m.d1[j] == 0) nzero++;
      end
    end
    checks++;
    if (nb2b == 0) begin failures++; $display("FAIL: no back-to-back inputs"); end
    checks++;
    if (nzero == 0) begin failures++; $display("FAIL: ReLU never clamped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
