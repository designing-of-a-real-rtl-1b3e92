// tb_lane_ram: writes single lanes of a 42 x 8 x 13 memory in random order,
// reads whole rows back and checks every lane against a shadow copy, the
// one-cycle read latency, that the output holds while rd_en is low and that
// writes outside the memory are ignored.
module tb_lane_ram;
  localparam int ROWS = 42, LANES = 8, W = 13;

  logic clk = 1'b0;
  logic we = 1'b0, rd_en = 1'b0;
  logic [5:0] wr_row = '0, rd_row = '0;
  logic [2:0] wr_lane = '0;
  logic [W-1:0] wr_data = '0;
  logic [LANES-1:0][W-1:0] rd_data;
  logic [W-1:0] shadow [ROWS][LANES];

  lane_ram #(.ROWS(ROWS), .LANES(LANES), .W(W)) dut (.*);

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
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int l = 0; l < LANES; l++) begin
        we <= 1'b1; wr_row <= 6'(r); wr_lane <= 3'(l);
        wr_data <= W'($urandom);
        @(posedge clk);
        shadow[r][l] = wr_data;
      end
    for (int i = 0; i < 500; i++) begin
      int r, l;
      r = $urandom_range(ROWS - 1); l = $urandom_range(LANES - 1);
      we <= 1'b1; wr_row <= 6'(r); wr_lane <= 3'(l); wr_data <= W'($urandom);
      @(posedge clk);
      shadow[r][l] = wr_data;
    end
    // out-of-range row must not alias anything
    we <= 1'b1; wr_row <= 6'd50; wr_lane <= 3'd0; wr_data <= '1;
    @(posedge clk);
    we <= 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      rd_en <= 1'b1; rd_row <= 6'(r);
      @(posedge clk);
      rd_en <= 1'b0; rd_row <= 6'((r + 7) % ROWS);
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (rd_data[l] != shadow[r][l]) begin
          failures++;
          $display("FAIL: row %0d lane %0d got %h expected %h", r, l, rd_data[l], shadow[r][l]);
        end
      end
      @(posedge clk);   // rd_en low: output must hold
      #1;
      checks++;
      if (rd_data[0] != shadow[r][0]) begin failures++; $display("FAIL: hold row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
