// conv1_pool: first convolution merged with the first max-pool.
//
// For each of the 8 kernels in turn, the unit loads the kernel's 12 taps and
// bias into registers (one wide parameter-row read), then streams the whole
// 128 x 3 input window through a 12-entry shift register, one input sample
// per cycle. Stored time-major (address = t*3 + axis), the 4x3 neighbourhood
// of output position n = t*3 + a is exactly addresses n-4 .. n+7, so each new
// sample completes the window of the next position: one memory load per
// output, with all 12 multiplications done in parallel (loop unrolled).
// Taps outside the 128 x 3 window are masked to zero ("same" padding: one row
// above, two below, one axis either side).
//
// Each convolution result is rounded to the conv1 format (13.0 in T7) and compared at once with a
// running maximum that starts at 0; after the 9 results of a 3x3 pooling
// window (three time steps, all three axes) the maximum is written to the
// pool1 buffer and reset to 0. Starting the maximum at 0 also applies the
// ReLU. Time steps 126 and 127 belong to no pooling window and are not
// computed. Output rows are written as (row = pooled time 0..41, lane =
// kernel), so a later unit can read all 8 channels of one time step at once.
//
// Interface: pulse start while idle; busy stays high until done pulses.
// Both memory read ports have one cycle of latency. Timing per kernel: 2
// cycles of parameter load, 385 streaming cycles, 4 drain cycles; about
// 3130 cycles for the layer.
//
// From the published architecture: the layer shape, the merged max-pool whose
// maximum restarts at 0, the one-load-per-iteration window, the kernel-outer
// loop order and the word lengths. This design's own: the exact pipeline, the
// memory latency and the handshake.
module conv1_pool
  import gesture_pkg::*;
#(
  // fixed-point formats: total width and fraction bits (defaults = T7)
  parameter int unsigned XW = IN_W,   // input samples
  parameter int unsigned XF = IN_F,
  parameter int unsigned PW = PRM_W,  // weights and biases
  parameter int unsigned PF = PRM_F,
  parameter int unsigned YW = C1_W,   // conv1 / pool1 results
  parameter int unsigned YF = C1_F
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  // input window memory (one sample per row)
  output logic                              in_rd_en,
  output logic [$clog2(N_IN)-1:0]           in_rd_addr,
  input  logic [XW-1:0]                     in_rd_data,
  // conv1 parameter memory (row = kernel; 12 taps then bias)
  output logic                              w_rd_en,
  output logic [$clog2(C1_K)-1:0]           w_rd_row,
  input  logic [C1_LANES-1:0][PW-1:0]       w_rd_data,
  // pool1 buffer write port
  output logic                              p1_we,
  output logic [$clog2(P1_T)-1:0]           p1_row,
  output logic [$clog2(C1_K)-1:0]           p1_lane,
  output logic [YW-1:0]                     p1_data
);
  localparam int unsigned AW   = $clog2(N_IN);      // 9
  localparam int unsigned ACCW = XW + PW + 4;        // 26 for T7: 12 products + bias
  localparam int unsigned LAST = N_IN;              // last streamed address (384 = padding)

  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_WCAP, S_STREAM, S_DRAIN} state_e;
  state_e state;

  typedef logic signed [XW-1:0] x_t;
  typedef logic signed [PW-1:0] p_t;
  typedef logic signed [YW-1:0] y_t;

  logic [$clog2(C1_K)-1:0] k;       // current kernel
  logic [AW:0]             r;       // next address to stream (0..384)
  p_t                    wt [C1_TAPS];
  p_t                    bias;

  // stage B: sample returned by the memory
  logic                    iss_v;
  logic [AW:0]             iss_r;
  x_t                     sr [C1_TAPS];   // sr[j] holds address n-4+j
  // position of the window now in sr
  logic                    pos_v;
  logic [6:0]              nt;             // time 0..125
  logic [1:0]              na;             // axis 0..2
  logic [1:0]              ntm;            // nt mod 3
  logic [5:0]              np;             // nt / 3
  // stage C: convolution result
  logic                    cv_v;
  y_t                     cv;
  logic                    cv_last;        // last value of a pooling window
  logic [5:0]              cv_p;
  // stage D: running maximum
  y_t                     mx;

  assign busy = (state != S_IDLE);

  // ---------------- sequencing ----------------
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
          if (r == (AW+1)'(LAST)) state <= S_DRAIN;
        end
        S_DRAIN:  if (!iss_v && !pos_v && !cv_v) begin
          if (k == $clog2(C1_K)'(C1_K - 1)) begin
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

  assign w_rd_en    = (state == S_WREQ);
  assign w_rd_row   = k;
  assign in_rd_en   = (state == S_STREAM) && (r < (AW+1)'(N_IN));
  assign in_rd_addr = r[AW-1:0];

  always_ff @(posedge clk) begin
    if (state == S_WCAP) begin
      for (int j = 0; j < C1_TAPS; j++) wt[j] <= p_t'(w_rd_data[j]);
      bias <= p_t'(w_rd_data[C1_TAPS]);
    end
  end

  // ---------------- stage B: shift register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_v <= 1'b0;
      iss_r <= '0;
      pos_v <= 1'b0;
      nt <= '0; na <= '0; ntm <= '0; np <= '0;
    end else begin
      iss_v <= (state == S_STREAM);
      iss_r <= r;
      pos_v <= iss_v && (iss_r >= (AW+1)'(7));
      if (iss_v && (iss_r >= (AW+1)'(7))) begin
        if (iss_r == (AW+1)'(7)) begin
          nt <= '0; na <= '0; ntm <= '0; np <= '0;
        end else if (na == 2'd2) begin
          na <= '0;
          nt <= nt + 1'b1;
          if (ntm == 2'd2) begin ntm <= '0; np <= np + 1'b1; end
          else ntm <= ntm + 1'b1;
        end else begin
          na <= na + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (iss_v) begin
      for (int j = 0; j < C1_TAPS - 1; j++) sr[j] <= sr[j+1];
      sr[C1_TAPS-1] <= (iss_r < (AW+1)'(N_IN)) ? x_t'(in_rd_data) : '0;
    end
  end

  // ---------------- stage C: 12 parallel multiply-accumulates ----------------
  logic signed [ACCW-1:0] acc;
  y_t                    acc_q;

  always_comb begin
    acc = ACCW'(bias) <<< XF;     // align the bias with the products
    for (int j = 0; j < C1_TAPS; j++) begin
      // tap j <-> time offset j/3 - 1, axis offset j%3 - 1
      int tt, aa;
      tt = int'(nt) + j / 3 - 1;
      aa = int'(na) + j % 3 - 1;
      if (tt >= 0 && tt < int'(T_IN) && aa >= 0 && aa < int'(AXES))
        acc = acc + ACCW'(sr[j]) * ACCW'(wt[j]);
    end
  end

  fxp_round #(.IN_W(ACCW), .IN_F(XF + PF), .OUT_W(YW), .OUT_F(YF)) u_q (
    .din(acc), .dout(acc_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv_v <= 1'b0; cv <= '0; cv_last <= 1'b0; cv_p <= '0;
    end else begin
      cv_v    <= pos_v;
      cv      <= acc_q;
      cv_last <= (ntm == 2'd2) && (na == 2'd2);
      cv_p    <= np;
    end
  end

  // ---------------- stage D: merged max-pool ----------------
  y_t mx_new;
  assign mx_new = (cv > mx) ? cv : mx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0;
      p1_we <= 1'b0; p1_row <= '0; p1_lane <= '0; p1_data <= '0;
    end else begin
      p1_we <= 1'b0;
      if (state == S_WCAP) mx <= '0;
      if (cv_v) begin
        if (cv_last) begin
          p1_we   <= 1'b1;
          p1_row  <= cv_p;
          p1_lane <= k;
          p1_data <= mx_new;
          mx      <= '0;
        end else begin
          mx <= mx_new;
        end
      end
    end
  end
endmodule
