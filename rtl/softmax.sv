// softmax: turns the 4 dense2 scores into class probabilities and reports
// the predicted gesture.
//
// The predicted class is the index of the largest score (the lowest index
// wins a tie). For the probabilities each score is first reduced by the
// maximum, so every exponent is <= 0 and every term lies in (0, 1]:
//   e_i = exp(s_i - max) = 2^-u_i,  u_i = (max - s_i) * log2(e)
// u_i is split into an integer part n and a fraction f; 2^-f is evaluated
// with a cubic polynomial (Horner form, Q0.16 coefficients, error about
// 1e-4) and shifted right by n. All 4 terms are computed in one cycle.
// Each probability e_i / sum(e) is then produced by a restoring divider, one
// quotient bit per cycle, 16 cycles per class, as an unsigned Q1.15 value
// (1.0 = 32768), truncated.
//
// Interface: pulse start while idle with scores stable on in (signed, 10.4
// in T7);
// done pulses after 1 + 4*16 + 1 cycles, when prob and cls are valid. They
// hold until the next start.
//
// Only the function (probabilities of the 3 gestures and "unknown", summing to
// 1) is published; the algorithm, formats and timing here are this design's
// own.
module softmax
  import gesture_pkg::*;
#(
  // score format: total width and fraction bits (defaults = T7, 10.4)
  parameter int unsigned XW = D2_W,
  parameter int unsigned XF = D2_F
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  input  logic [D2_N-1:0][XW-1:0]           in,
  output logic [D2_N-1:0][PROB_W-1:0]       prob,
  output gesture_e                          cls
);
  localparam int unsigned EW = 17;                 // e_i, Q1.16
  localparam int unsigned SW = EW + 2;             // sum of 4 terms
  localparam int unsigned UW = XW + 1;             // max - s_i, XF fraction bits
  localparam int unsigned YF = XF + 14;            // fraction bits of u * log2(e)
  localparam int unsigned NW = UW + 15 - YF;       // width of its integer part
  localparam logic [14:0] LOG2E = 15'd23637;       // log2(e) in Q1.14
  // 2^-z ~= C0 + C1 z + C2 z^2 + C3 z^3 on [0,1), Q0.16
  localparam logic signed [19:0] C0 = 20'sd65529;
  localparam logic signed [19:0] C1 = -20'sd45290;
  localparam logic signed [19:0] C2 = 20'sd15112;
  localparam logic signed [19:0] C3 = -20'sd2589;

  typedef enum logic [1:0] {S_IDLE, S_EXP, S_DIV} state_e;
  state_e state;

  typedef logic signed [XW-1:0] x_t;

  // ---- maximum and arg-max of the scores ----
  x_t        mxs;
  logic [1:0] amx;
  always_comb begin
    mxs = x_t'(in[0]);
    amx = 2'd0;
    for (int i = 1; i < D2_N; i++)
      if (x_t'(in[i]) > mxs) begin
        mxs = x_t'(in[i]);
        amx = 2'(i);
      end
  end

  // ---- exponential of each score relative to the maximum ----
  logic [EW-1:0] e_c [D2_N];
  for (genvar i = 0; i < D2_N; i++) begin : g_exp
    logic [UW-1:0]        u;       // max - s_i >= 0
    logic [UW+14:0]       y;       // u * log2(e), YF fraction bits
    logic [NW-1:0]        n;       // integer part
    logic signed [19:0]   z;       // fraction, Q0.16
    logic signed [39:0]   h1, h2, h3;
    logic signed [19:0]   p;       // 2^-z, Q0.16
    assign u  = UW'(signed'({mxs[XW-1], mxs}) - signed'({in[i][XW-1], in[i]}));
    assign y  = (UW+15)'(u) * (UW+15)'(LOG2E);
    assign n  = y[UW+14:YF];
    if (YF >= 16) begin : g_zt
      assign z = {4'b0, y[YF-1 -: 16]};
    end else begin : g_zp
      assign z = {4'b0, y[YF-1:0], (16-YF)'(0)};
    end
    assign h1 = 40'(C3) * 40'(z);
    assign h2 = 40'(20'(h1 >>> 16) + C2) * 40'(z);
    assign h3 = 40'(20'(h2 >>> 16) + C1) * 40'(z);
    assign p  = 20'(h3 >>> 16) + C0;
    assign e_c[i] = (n > NW'(16)) ? '0 : EW'(p[EW-1:0] >> n);
  end

  // ---- sequential division ----
  logic [EW-1:0]      e   [D2_N];
  logic [SW-1:0]      sum;
  logic [1:0]         lane;
  logic [3:0]         bitn;     // quotient bit being produced (15 .. 0)
  logic [SW:0]        rem;
  logic [PROB_W-1:0]  q;
  logic [SW:0]        trial;

  logic [SW-1:0]      sum_c;
  logic [PROB_W-1:0]  qn;

  // remainder for this step: first step uses e itself, later steps shift left
  assign trial = (bitn == 4'd15) ? (SW+1)'(e[lane]) : (rem << 1);
  assign qn    = (trial >= (SW+1)'(sum)) ? (q | (PROB_W'(1) << bitn)) : q;

  always_comb begin
    sum_c = '0;
    for (int i = 0; i < D2_N; i++) sum_c = sum_c + SW'(e_c[i]);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      sum   <= '0;
      lane  <= '0;
      bitn  <= '0;
      rem   <= '0;
      q     <= '0;
      cls   <= GEST_NONE;
      for (int i = 0; i < D2_N; i++) begin e[i] <= '0; prob[i] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_EXP;
        S_EXP: begin
          for (int i = 0; i < D2_N; i++) e[i] <= e_c[i];
          sum   <= sum_c;
          cls   <= gesture_e'(amx);
          lane  <= '0;
          bitn  <= 4'd15;
          state <= S_DIV;
        end
        S_DIV: begin
          if (trial >= (SW+1)'(sum)) rem <= trial - (SW+1)'(sum);
          else                       rem <= trial;
          if (bitn == 4'd0) begin
            prob[lane] <= qn;
            q <= '0;
            bitn <= 4'd15;
            if (lane == 2'(D2_N - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
            lane <= lane + 1'b1;
          end else begin
            q    <= qn;
            bitn <= bitn - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
