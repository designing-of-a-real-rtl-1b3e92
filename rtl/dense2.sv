// dense2: second fully connected layer (16 inputs, 4 outputs).
//
// The layer needs all 16 dense1 outputs, so it starts after dense1 has
// finished. It reads one row of its parameter memory per cycle: row i holds
// the 4 weights that multiply input i, so the 4 outputs are accumulated in
// parallel over 16 cycles; row 16 holds the 4 biases. The sums (8 fraction
// bits in T7) are rounded to the output format (10.4 in T7). No activation
// is applied here: the softmax follows.
//
// Interface: pulse start while idle; in must stay stable until done. The
// parameter read has one cycle of latency; done pulses 19 cycles after
// start, with out valid from then on.
//
// The layer size and output format are published; the 4-MAC organisation,
// the accumulator width and the handshake are this design's own.
module dense2
  import gesture_pkg::*;
#(
  // fixed-point formats: total width and fraction bits (defaults = T7)
  parameter int unsigned XW = D1_W,   // dense1 values
  parameter int unsigned XF = D1_F,
  parameter int unsigned PW = PRM_W,  // weights and biases
  parameter int unsigned PF = PRM_F,
  parameter int unsigned YW = D2_W,   // dense2 results (scores)
  parameter int unsigned YF = D2_F
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  input  logic [D1_N-1:0][XW-1:0]           in,
  output logic                              w_rd_en,
  output logic [$clog2(D1_N+1)-1:0]         w_rd_row,
  input  logic [D2_N-1:0][PW-1:0]           w_rd_data,
  output logic [D2_N-1:0][YW-1:0]           out
);
  localparam int unsigned ACCW = XW + PW + 5;        // 30 for T7: 16 products + bias
  localparam int unsigned SF   = PF + XF;            // sum fraction bits (8 for T7)
  localparam int unsigned RWW  = $clog2(D1_N+1);

  typedef logic signed [XW-1:0] x_t;
  typedef logic signed [PW-1:0] p_t;
  typedef logic signed [YW-1:0] y_t;

  logic             run;
  logic [RWW-1:0]   row;        // row being requested
  logic             s1_v;
  logic [RWW-1:0]   s1_row;     // row whose data is on w_rd_data
  logic signed [ACCW-1:0] acc  [D2_N];
  logic signed [ACCW-1:0] sumb [D2_N];
  y_t                    q    [D2_N];
  x_t                    x;

  assign busy     = run || s1_v;
  assign w_rd_en  = run;
  assign w_rd_row = row;
  assign x        = x_t'(in[s1_row[$clog2(D1_N)-1:0]]);

  for (genvar o = 0; o < D2_N; o++) begin : g_out
    // align the bias (PF fraction bits) to the SF fraction bits of the products
    assign sumb[o] = acc[o] + (ACCW'(p_t'(w_rd_data[o])) <<< XF);
    fxp_round #(.IN_W(ACCW), .IN_F(SF), .OUT_W(YW), .OUT_F(YF)) u_q (
      .din(sumb[o]), .dout(q[o]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; row <= '0; s1_v <= 1'b0; s1_row <= '0; done <= 1'b0;
      for (int o = 0; o < D2_N; o++) begin acc[o] <= '0; out[o] <= '0; end
    end else begin
      done   <= 1'b0;
      s1_v   <= run;
      s1_row <= row;
      if (!busy && start) begin
        run <= 1'b1;
        row <= '0;
        for (int o = 0; o < D2_N; o++) acc[o] <= '0;
      end else if (run) begin
        if (row == RWW'(D1_N)) run <= 1'b0;
        else row <= row + 1'b1;
      end
      if (s1_v) begin
        if (s1_row == RWW'(D1_N)) begin
          for (int o = 0; o < D2_N; o++) out[o] <= q[o];
          done <= 1'b1;
        end else begin
          for (int o = 0; o < D2_N; o++)
            acc[o] <= acc[o] + ACCW'(x) * ACCW'(p_t'(w_rd_data[o]));
        end
      end
    end
  end
endmodule
