// tb_dense2: loads dense2 parameters of reference networks, presents the
// dense1 outputs and checks the 4 scores bit for bit (bias alignment, 10.4
// rounding), and that done comes 19 cycles after start is sampled (counted
// from the cycle that drives start: 20).
module tb_dense2;
  import gesture_pkg::*;
  import gesture_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [D1_N-1:0][D1_W-1:0] in = '0;
  logic w_we = 1'b0; logic [4:0] w_wr = '0; logic [1:0] w_wl = '0; logic [PRM_W-1:0] w_wd = '0;
  logic w_rd_en; logic [4:0] w_rd_row; logic [D2_N-1:0][PRM_W-1:0] w_rd_data;
  logic [D2_N-1:0][D2_W-1:0] out;

  lane_ram #(.ROWS(D1_N + 1), .LANES(D2_N), .W(PRM_W)) u_w (.clk, .we(w_we), .wr_row(w_wr),
    .wr_lane(w_wl), .wr_data(w_wd), .rd_en(w_rd_en), .rd_row(w_rd_row), .rd_data(w_rd_data));

  dense2 dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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
    for (int run = 0; run < 20; run++) begin
      int lat;
      m.randomise(300, run < 10 ? 64 : 511);
      m.run();
      for (int i = 0; i < (D1_N + 1) * D2_N; i++) begin
        w_we <= 1'b1; w_wr <= 5'(i / D2_N); w_wl <= 2'(i % D2_N);
        w_wd <= PRM_W'(m.prm[PA_D2 + i]); @(posedge clk);
      end
      w_we <= 1'b0;
      for (int j = 0; j < D1_N; j++) in[j] <= D1_W'(m.d1[j]);
      start <= 1'b1; @(posedge clk); start <= 1'b0;
      lat = 1;
      while (!done) begin @(posedge clk); lat++; end
      checks++;
      if (lat != 20) begin failures++; $display("FAIL: done after %0d cycles", lat); end
      for (int o = 0; o < D2_N; o++) begin
        checks++;
        if (longint'(d2_t'(out[o])) != m.d2[o]) begin
          failures++;
          $display("FAIL: run %0d out[%0d] = %0d expected %0d", run, o, d2_t'(out[o]), m.d2[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
