// dense1: first fully connected layer (224 inputs, 16 outputs), merged with
// the second max-pool.
//
// Instead of waiting for the whole flattened vector, the layer keeps 16
// intermediate accumulators. Each arriving input value x with flatten index
// i reads row i of the dense1 parameter memory (the 16 weights that multiply
// x, one per output) and updates all 16 accumulators in the same cycle (the
// inner loop fully unrolled). A fin pulse, given after the last input, reads
// the bias row (row 224); the 16 sums plus biases are then rounded to the
// dense1 format (14.1 in T7), passed through a ReLU and presented together
// on out, with done pulsing once.
//
// Interface: clear zeroes the accumulators (before a new window). in_valid
// may be asserted at most once per cycle, never together with fin. The
// parameter read has one cycle of latency, so each input is absorbed two
// cycles after it arrives and out is valid two cycles after fin.
//
// From the published architecture: the intermediate accumulators that let the
// layer run while pool2 is still producing, and the unrolled inner loop. This
// design's own: the ReLU (not stated, taken from the reference network), the
// accumulator width and the handshake. Because of the ReLU the sign bit of
// every output is constant 0.
module dense1
  import gesture_pkg::*;
#(
  // fixed-point formats: total width and fraction bits (defaults = T7)
  parameter int unsigned XW = C2_W,   // pool2 values
  parameter int unsigned XF = C2_F,
  parameter int unsigned PW = PRM_W,  // weights and biases
  parameter int unsigned PF = PRM_F,
  parameter int unsigned YW = D1_W,   // dense1 results
  parameter int unsigned YF = D1_F
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              in_valid,
  input  logic [$clog2(FLAT)-1:0]           in_idx,
  input  logic [XW-1:0]                     in_data,
  input  logic                              fin,
  output logic                              w_rd_en,
  output logic [$clog2(FLAT+1)-1:0]         w_rd_row,
  input  logic [D1_N-1:0][PW-1:0]           w_rd_data,
  output logic [D1_N-1:0][YW-1:0]           out,
  output logic                              done
);
  localparam int unsigned ACCW = XW + PW + 9;        // 33 for T7: 224 products + bias
  localparam int unsigned RWW  = $clog2(FLAT+1);

  typedef logic signed [XW-1:0] x_t;
  typedef logic signed [PW-1:0] p_t;
  typedef logic signed [YW-1:0] y_t;

  logic                     s1_v, s1_b;
  x_t                      s1_x;
  logic signed [ACCW-1:0]   acc  [D1_N];
  logic signed [ACCW-1:0]   sumb [D1_N];
  y_t                      q    [D1_N];

  assign w_rd_en  = in_valid || fin;
  assign w_rd_row = fin ? RWW'(FLAT) : RWW'(in_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_b <= 1'b0; s1_x <= '0;
    end else begin
      s1_v <= in_valid;
      s1_b <= fin;
      s1_x <= x_t'(in_data);
    end
  end

  for (genvar j = 0; j < D1_N; j++) begin : g_out
    assign sumb[j] = acc[j] + (ACCW'(p_t'(w_rd_data[j])) <<< XF);  // bias aligned
    fxp_round #(.IN_W(ACCW), .IN_F(XF + PF), .OUT_W(YW), .OUT_F(YF)) u_q (
      .din(sumb[j]), .dout(q[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < D1_N; j++) begin acc[j] <= '0; out[j] <= '0; end
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        for (int j = 0; j < D1_N; j++) acc[j] <= '0;
      end else if (s1_v) begin
        for (int j = 0; j < D1_N; j++)
          acc[j] <= acc[j] + ACCW'(s1_x) * ACCW'(p_t'(w_rd_data[j]));
      end
      if (s1_b) begin
        for (int j = 0; j < D1_N; j++) out[j] <= q[j][YW-1] ? '0 : q[j];
        done <= 1'b1;
      end
    end
  end

// handshake rule: an input and the finish request never share a cycle
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && fin));
endmodule
