// gesture_cnn_top: accelerometer gesture classifier, a small CNN in fixed
// point (128 x 3 samples in, 4 class probabilities out: wing "W", ring "O",
// slope "L", unknown).
//
// Layers run one after the other, but neighbouring layers that need only part
// of their input are merged so that they work at the same time:
//   conv1_pool  conv1 + pool1, results into the pool1 buffer (42 x 8)
//   conv2_pool  conv2 + pool2, results streamed straight into
//   dense1      16 accumulators updated with every pool2 value
//   dense2      16 -> 4 scores, once dense1 is complete
//   softmax     probabilities and the predicted class
// Every layer reads its own parameter memory, organised so that one row holds
// what one pipelined step needs. Intermediate values use, by default, the
// reduced word lengths of the package (13 and 14 integer bits for the
// convolutions); module parameters select other word lengths.
//
// Host side (a processor in the same chip coordinates the accelerator):
//   in_we/in_addr/in_data    write one input sample, address = t*3 + axis
//   prm_we/prm_addr/prm_data write one parameter (memory map in gesture_pkg)
//   start/busy/done          start an inference; done pulses at the end
//   cls/prob/score           result, valid from done until the next start
// Memories may be written only while busy is low. One inference takes about
// 4000 cycles (conv1_pool ~3130, conv2_pool ~800, dense2 19, softmax 66).
//
// From the published architecture: the network, which layers are merged,
// the word lengths and the processor-coordinated operation. This design's
// own: the plain write ports, the parameter address map, the memory
// organisation, the sequencer and making every word length a parameter.
module gesture_cnn_top
  import gesture_pkg::*;
#(
  // Word lengths (total width W, fraction bits F) of each value group. The
  // defaults are configuration T7 of the package; the other configurations
  // studied for this network (T1 .. T6) are reached by overriding them.
  parameter int unsigned W_IN  = IN_W,  F_IN  = IN_F,   // input samples
  parameter int unsigned W_PRM = PRM_W, F_PRM = PRM_F,  // weights, biases
  parameter int unsigned W_C1  = C1_W,  F_C1  = C1_F,   // conv1 / pool1
  parameter int unsigned W_C2  = C2_W,  F_C2  = C2_F,   // conv2 / pool2
  parameter int unsigned W_D1  = D1_W,  F_D1  = D1_F,   // dense1
  parameter int unsigned W_D2  = D2_W,  F_D2  = D2_F    // dense2 (scores)
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_we,
  input  logic [$clog2(N_IN)-1:0]           in_addr,
  input  logic [W_IN-1:0]                   in_data,
  input  logic                              prm_we,
  input  logic [PA_W-1:0]                   prm_addr,
  input  logic [W_PRM-1:0]                  prm_data,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  output gesture_e                          cls,
  output logic [D2_N-1:0][PROB_W-1:0]       prob,
  output logic [D2_N-1:0][W_D2-1:0]         score
);
  // ---------------- parameter address decode ----------------
  logic            c1w_we, c2w_we, d1w_we, d2w_we;
  logic [PA_W-1:0] off;
  logic [7:0]      p_row;
  logic [5:0]      p_lane;

  always_comb begin
    c1w_we = 1'b0; c2w_we = 1'b0; d1w_we = 1'b0; d2w_we = 1'b0;
    off = '0; p_row = '0; p_lane = '0;
    if (prm_addr < PA_W'(PA_C2)) begin
      off = prm_addr - PA_W'(PA_C1);
      p_row = 8'(off / PA_W'(C1_LANES)); p_lane = 6'(off % PA_W'(C1_LANES));
      c1w_we = prm_we;
    end else if (prm_addr < PA_W'(PA_D1)) begin
      off = prm_addr - PA_W'(PA_C2);
      p_row = 8'(off / PA_W'(C2_LANES)); p_lane = 6'(off % PA_W'(C2_LANES));
      c2w_we = prm_we;
    end else if (prm_addr < PA_W'(PA_D2)) begin
      off = prm_addr - PA_W'(PA_D1);
      p_row = 8'(off / PA_W'(D1_N)); p_lane = 6'(off % PA_W'(D1_N));
      d1w_we = prm_we;
    end else if (prm_addr < PA_W'(N_PARAMS)) begin
      off = prm_addr - PA_W'(PA_D2);
      p_row = 8'(off / PA_W'(D2_N)); p_lane = 6'(off % PA_W'(D2_N));
      d2w_we = prm_we;
    end
  end

  // ---------------- memories ----------------
  logic                            in_rd_en;
  logic [$clog2(N_IN)-1:0]         in_rd_addr;
  logic [0:0][W_IN-1:0]            in_rd_data;

  lane_ram #(.ROWS(N_IN), .LANES(1), .W(W_IN)) u_in_mem (
    .clk, .we(in_we), .wr_row(in_addr), .wr_lane(1'b0), .wr_data(in_data),
    .rd_en(in_rd_en), .rd_row(in_rd_addr), .rd_data(in_rd_data));

  logic                            c1w_rd_en;
  logic [$clog2(C1_K)-1:0]         c1w_rd_row;
  logic [C1_LANES-1:0][W_PRM-1:0]  c1w_rd_data;

  lane_ram #(.ROWS(C1_K), .LANES(C1_LANES), .W(W_PRM)) u_c1_prm (
    .clk, .we(c1w_we), .wr_row(p_row[$clog2(C1_K)-1:0]), .wr_lane(p_lane[3:0]),
    .wr_data(prm_data), .rd_en(c1w_rd_en), .rd_row(c1w_rd_row), .rd_data(c1w_rd_data));

  logic                            p1_we;
  logic [$clog2(P1_T)-1:0]         p1_wr_row;
  logic [$clog2(C1_K)-1:0]         p1_wr_lane;
  logic [W_C1-1:0]                 p1_wr_data;
  logic                            p1_rd_en;
  logic [$clog2(P1_T)-1:0]         p1_rd_row;
  logic [C1_K-1:0][W_C1-1:0]       p1_rd_data;

  lane_ram #(.ROWS(P1_T), .LANES(C1_K), .W(W_C1)) u_p1_buf (
    .clk, .we(p1_we), .wr_row(p1_wr_row), .wr_lane(p1_wr_lane), .wr_data(p1_wr_data),
    .rd_en(p1_rd_en), .rd_row(p1_rd_row), .rd_data(p1_rd_data));

  logic                            c2w_rd_en;
  logic [$clog2(C2_K)-1:0]         c2w_rd_row;
  logic [C2_LANES-1:0][W_PRM-1:0]  c2w_rd_data;

  lane_ram #(.ROWS(C2_K), .LANES(C2_LANES), .W(W_PRM)) u_c2_prm (
    .clk, .we(c2w_we), .wr_row(p_row[$clog2(C2_K)-1:0]), .wr_lane(p_lane),
    .wr_data(prm_data), .rd_en(c2w_rd_en), .rd_row(c2w_rd_row), .rd_data(c2w_rd_data));

  logic                            d1w_rd_en;
  logic [$clog2(FLAT+1)-1:0]       d1w_rd_row;
  logic [D1_N-1:0][W_PRM-1:0]      d1w_rd_data;

  lane_ram #(.ROWS(FLAT + 1), .LANES(D1_N), .W(W_PRM)) u_d1_prm (
    .clk, .we(d1w_we), .wr_row(p_row), .wr_lane(p_lane[3:0]),
    .wr_data(prm_data), .rd_en(d1w_rd_en), .rd_row(d1w_rd_row), .rd_data(d1w_rd_data));

  logic                            d2w_rd_en;
  logic [$clog2(D1_N+1)-1:0]       d2w_rd_row;
  logic [D2_N-1:0][W_PRM-1:0]      d2w_rd_data;

  lane_ram #(.ROWS(D1_N + 1), .LANES(D2_N), .W(W_PRM)) u_d2_prm (
    .clk, .we(d2w_we), .wr_row(p_row[$clog2(D1_N+1)-1:0]), .wr_lane(p_lane[1:0]),
    .wr_data(prm_data), .rd_en(d2w_rd_en), .rd_row(d2w_rd_row), .rd_data(d2w_rd_data));

  // ---------------- layer units ----------------
  logic c1_start, c1_done;
  logic c2_start, c2_done;
  logic d1_clear, d1_fin, d1_done;
  logic d2_start, d2_done;
  logic sm_start, sm_done;

  logic                          p2_valid;
  logic [$clog2(FLAT)-1:0]       p2_idx;
  logic [W_C2-1:0]               p2_data;
  logic [D1_N-1:0][W_D1-1:0]     d1_out;

  conv1_pool #(.XW(W_IN), .XF(F_IN), .PW(W_PRM), .PF(F_PRM), .YW(W_C1), .YF(F_C1))
  u_conv1 (
    .clk, .rst_n, .start(c1_start), .busy(), .done(c1_done),
    .in_rd_en, .in_rd_addr, .in_rd_data(in_rd_data[0]),
    .w_rd_en(c1w_rd_en), .w_rd_row(c1w_rd_row), .w_rd_data(c1w_rd_data),
    .p1_we, .p1_row(p1_wr_row), .p1_lane(p1_wr_lane), .p1_data(p1_wr_data));

  conv2_pool #(.XW(W_C1), .XF(F_C1), .PW(W_PRM), .PF(F_PRM), .YW(W_C2), .YF(F_C2))
  u_conv2 (
    .clk, .rst_n, .start(c2_start), .busy(), .done(c2_done),
    .p1_rd_en, .p1_rd_row, .p1_rd_data,
    .w_rd_en(c2w_rd_en), .w_rd_row(c2w_rd_row), .w_rd_data(c2w_rd_data),
    .out_valid(p2_valid), .out_idx(p2_idx), .out_data(p2_data));

  dense1 #(.XW(W_C2), .XF(F_C2), .PW(W_PRM), .PF(F_PRM), .YW(W_D1), .YF(F_D1))
  u_dense1 (
    .clk, .rst_n, .clear(d1_clear), .in_valid(p2_valid), .in_idx(p2_idx),
    .in_data(p2_data), .fin(d1_fin),
    .w_rd_en(d1w_rd_en), .w_rd_row(d1w_rd_row), .w_rd_data(d1w_rd_data),
    .out(d1_out), .done(d1_done));

  dense2 #(.XW(W_D1), .XF(F_D1), .PW(W_PRM), .PF(F_PRM), .YW(W_D2), .YF(F_D2))
  u_dense2 (
    .clk, .rst_n, .start(d2_start), .busy(), .done(d2_done), .in(d1_out),
    .w_rd_en(d2w_rd_en), .w_rd_row(d2w_rd_row), .w_rd_data(d2w_rd_data), .out(score));

  softmax #(.XW(W_D2), .XF(F_D2))
  u_softmax (
    .clk, .rst_n, .start(sm_start), .busy(), .done(sm_done),
    .in(score), .prob, .cls);

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {Q_IDLE, Q_C1, Q_C2, Q_D1, Q_D2, Q_SM} seq_e;
  seq_e seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq  <= Q_IDLE;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (seq)
        Q_IDLE: if (start) seq <= Q_C1;
        Q_C1:   if (c1_done) seq <= Q_C2;
        Q_C2:   if (c2_done) seq <= Q_D1;
        Q_D1:   if (d1_done) seq <= Q_D2;
        Q_D2:   if (d2_done) seq <= Q_SM;
        Q_SM:   if (sm_done) begin seq <= Q_IDLE; done <= 1'b1; end
        default: seq <= Q_IDLE;
      endcase
    end
  end

  assign busy     = (seq != Q_IDLE);
  assign c1_start = (seq == Q_IDLE) && start;
  assign d1_clear = c1_start;
  assign c2_start = (seq == Q_C1) && c1_done;
  assign d1_fin   = (seq == Q_C2) && c2_done;
  assign d2_start = (seq == Q_D1) && d1_done;
  assign sm_start = (seq == Q_D2) && d2_done;

  // host rule: the memories are written only while the accelerator is idle
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    busy |-> !(in_we || prm_we));
endmodule
