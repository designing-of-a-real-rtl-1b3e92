// conv2_pool: second convolution merged with the second max-pool; its output
// is the flattened 224-value vector, streamed to the first dense layer.
//
// For each of the 16 kernels the unit loads the 32 taps and bias (one wide
// parameter-row read), clears a 4-row window register and then reads the
// pool1 buffer one time row (all 8 channels, from 8 parallel lanes) per
// cycle. After row r has been shifted in, the window holds rows r-3 .. r,
// which is the 4x8 neighbourhood of output time t = r-2 ("same" padding: one
// zero row above, two below). All 32 multiplications are done in parallel,
// so one output is produced per cycle.
//
// Each result is rounded to the conv2 format (14.0 in T7) and compared with a running maximum that
// starts at 0 (this also applies the ReLU); every third time step the maximum
// leaves the unit on out_valid with its flatten index kernel*14 + t/3
// (channel-major order, 14 values of one channel after the other) and is
// reset to 0.
//
// Interface: pulse start while idle; busy until done pulses. Memory reads
// have one cycle of latency. Timing: 2 + 44 + 4 cycles per kernel, about 800
// cycles for the layer; out_valid pulses every third cycle while streaming.
//
// From the published architecture: the layer shape, eight loads (one time row)
// per output, the merge with the pool and the channel-major flatten order.
// This design's own: the banked pool1 row read, the pipeline and handshake.
module conv2_pool
  import gesture_pkg::*;
#(
  // fixed-point formats: total width and fraction bits (defaults = T7)
  parameter int unsigned XW = C1_W,   // pool1 values
  parameter int unsigned XF = C1_F,
  parameter int unsigned PW = PRM_W,  // weights and biases
  parameter int unsigned PF = PRM_F,
  parameter int unsigned YW = C2_W,   // conv2 / pool2 results
  parameter int unsigned YF = C2_F
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  // pool1 buffer (row = time, lane = channel)
  output logic                              p1_rd_en,
  output logic [$clog2(P1_T)-1:0]           p1_rd_row,
  input  logic [C1_K-1:0][XW-1:0]           p1_rd_data,
  // conv2 parameter memory (row = kernel; 32 taps then bias)
  output logic                              w_rd_en,
  output logic [$clog2(C2_K)-1:0]           w_rd_row,
  input  logic [C2_LANES-1:0][PW-1:0]       w_rd_data,
  // flattened pool2 stream
  output logic                              out_valid,
  output logic [$clog2(FLAT)-1:0]           out_idx,
  output logic [YW-1:0]                     out_data
);
  localparam int unsigned RW   = $clog2(P1_T);        // 6
  localparam int unsigned KW   = $clog2(C2_K);        // 4
  localparam int unsigned LAST = P1_T + 1;            // rows 0..43 (42, 43 padding)
  localparam int unsigned ACCW = XW + PW + 6;         // 29 for T7: 32 products + bias

  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_WCAP, S_STREAM, S_DRAIN} state_e;
  state_e state;

  typedef logic signed [XW-1:0] x_t;
  typedef logic signed [PW-1:0] p_t;
  typedef logic signed [YW-1:0] y_t;

  logic [KW-1:0]   k;
  logic [RW:0]     r;
  p_t            wt [C2_TAPS];
  p_t            bias;

  logic            iss_v;
  logic [RW:0]     iss_r;
  x_t             win [C2_KT][C1_K];   // win[0] oldest row
  logic            pos_v;
  logic [1:0]      tm;                  // t mod 3
  logic [3:0]      tp;                  // t / 3
  logic            cv_v;
  y_t             cv;
  logic            cv_last;
  logic [3:0]      cv_p;
  y_t             mx;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) begin k <= '0; state <= S_WREQ; end
        S_WREQ:   state <= S_WCAP;
        S_WCAP:   begin r <= '0; state <= S_STREAM; end
        S_STREAM: begin
          r <= r + 1'b1;
          if (r == (RW+1)'(LAST)) state <= S_DRAIN;
        end
        S_DRAIN:  if (!iss_v && !pos_v && !cv_v) begin
          if (k == KW'(C2_K - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            k     <= k + 1'b1;
            state <= S_WREQ;
          end
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign w_rd_en   = (state == S_WREQ);
  assign w_rd_row  = k;
  assign p1_rd_en  = (state == S_STREAM) && (r < (RW+1)'(P1_T));
  assign p1_rd_row = r[RW-1:0];

  always_ff @(posedge clk) begin
    if (state == S_WCAP) begin
      for (int j = 0; j < C2_TAPS; j++) wt[j] <= p_t'(w_rd_data[j]);
      bias <= p_t'(w_rd_data[C2_TAPS]);
    end
  end

  // window register: cleared per kernel so that row -1 reads as zero
  always_ff @(posedge clk) begin
    if (state == S_WCAP) begin
      for (int i = 0; i < C2_KT; i++)
        for (int c = 0; c < C1_K; c++) win[i][c] <= '0;
    end else if (iss_v) begin
      for (int i = 0; i < C2_KT - 1; i++) win[i] <= win[i+1];
      for (int c = 0; c < C1_K; c++)
        win[C2_KT-1][c] <= (iss_r < (RW+1)'(P1_T)) ? x_t'(p1_rd_data[c]) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_v <= 1'b0; iss_r <= '0; pos_v <= 1'b0; tm <= '0; tp <= '0;
    end else begin
      iss_v <= (state == S_STREAM);
      iss_r <= r;
      pos_v <= iss_v && (iss_r >= (RW+1)'(2));
      if (iss_v && (iss_r >= (RW+1)'(2))) begin
        if (iss_r == (RW+1)'(2)) begin
          tm <= '0; tp <= '0;
        end else if (tm == 2'd2) begin
          tm <= '0; tp <= tp + 1'b1;
        end else begin
          tm <= tm + 1'b1;
        end
      end
    end
  end

  // 32 parallel multiply-accumulates
  logic signed [ACCW-1:0] acc;
  y_t                    acc_q;

  always_comb begin
    acc = ACCW'(bias) <<< XF;     // align the bias with the products
    for (int i = 0; i < C2_KT; i++)
      for (int c = 0; c < C1_K; c++)
        acc = acc + ACCW'(win[i][c]) * ACCW'(wt[i*C1_K + c]);
  end

  fxp_round #(.IN_W(ACCW), .IN_F(XF + PF), .OUT_W(YW), .OUT_F(YF)) u_q (
    .din(acc), .dout(acc_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv_v <= 1'b0; cv <= '0; cv_last <= 1'b0; cv_p <= '0;
    end else begin
      cv_v    <= pos_v;
      cv      <= acc_q;
      cv_last <= (tm == 2'd2);
      cv_p    <= tp;
    end
  end

  // merged max-pool, flatten index = kernel * 14 + pooled time
  y_t mx_new;
  assign mx_new = (cv > mx) ? cv : mx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0; out_valid <= 1'b0; out_idx <= '0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (state == S_WCAP) mx <= '0;
      if (cv_v) begin
        if (cv_last) begin
          out_valid <= 1'b1;
          out_idx   <= $clog2(FLAT)'(k * P2_T + cv_p);
          out_data  <= mx_new;
          mx        <= '0;
        end else begin
          mx <= mx_new;
        end
      end
    end
  end
endmodule
