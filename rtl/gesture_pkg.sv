// gesture_pkg: shared sizes, fixed-point formats and types of the gesture CNN
// accelerator.
//
// Network shape (accelerometer window 128 x 3 axes):
//   conv1 8 kernels 4x3 ("same" padding) -> max-pool 3x3 -> 42 x 8
//   conv2 16 kernels 4x8 ("same" padding) -> max-pool 3x1 -> 14 x 16
//   flatten 224 -> dense 16 -> dense 4 -> softmax.
// Word lengths follow the final (T7) fixed-point configuration: parameters
// Q3.7, input 12.0, conv1/pool1 13.0, conv2/pool2 14.0, dense1 14.1 and
// dense2 10.4, all two's complement. The probability format (unsigned Q1.15)
// and the layout of the parameter address space are this design's choices.
package gesture_pkg;

  // ---- network dimensions --------------------------------------------------
  localparam int unsigned T_IN   = 128;  // time steps per window
  localparam int unsigned AXES   = 3;    // accelerometer axes x, y, z
  localparam int unsigned N_IN   = T_IN * AXES;   // 384 input samples
  localparam int unsigned C1_K   = 8;    // conv1 kernels
  localparam int unsigned C1_KT  = 4;    // conv1 kernel height (time)
  localparam int unsigned C1_TAPS = C1_KT * AXES; // 12 taps per kernel
  localparam int unsigned POOL   = 3;    // pooling factor along time
  localparam int unsigned P1_T   = 42;   // pool1 output length
  localparam int unsigned C2_K   = 16;   // conv2 kernels
  localparam int unsigned C2_KT  = 4;    // conv2 kernel height (time)
  localparam int unsigned C2_TAPS = C2_KT * C1_K;  // 32 taps per kernel
  localparam int unsigned P2_T   = 14;   // pool2 output length
  localparam int unsigned FLAT   = P2_T * C2_K;   // 224
  localparam int unsigned D1_N   = 16;   // dense1 outputs
  localparam int unsigned D2_N   = 4;    // dense2 outputs / classes

  // ---- fixed-point formats (total width W, fraction bits F) ----------------
  localparam int unsigned PRM_W = 10, PRM_F = 7;  // parameters  Q3.7
  localparam int unsigned IN_W  = 12, IN_F = 0;    // input       12.0
  localparam int unsigned C1_W  = 13, C1_F = 0;    // conv1/pool1 13.0
  localparam int unsigned C2_W  = 14, C2_F = 0;    // conv2/pool2 14.0
  localparam int unsigned D1_W  = 15, D1_F = 1;    // dense1      14.1
  localparam int unsigned D2_W  = 14, D2_F = 4;    // dense2      10.4
  localparam int unsigned PROB_W = 16, PROB_F = 15; // probability Q1.15 unsigned

  // ---- parameter memory map (host writes one parameter per address) -------
  // conv1 : 8 rows x 13 lanes (12 taps [kt*3+axis], then bias)
  // conv2 : 16 rows x 33 lanes (32 taps [kt*8+channel], then bias)
  // dense1: 225 rows x 16 lanes (row = flatten index, row 224 = biases)
  // dense2: 17 rows x 4 lanes  (row = dense1 output, row 16 = biases)
  localparam int unsigned C1_LANES = C1_TAPS + 1;  // 13
  localparam int unsigned C2_LANES = C2_TAPS + 1;  // 33
  localparam int unsigned PA_C1 = 0;
  localparam int unsigned PA_C2 = PA_C1 + C1_K * C1_LANES;        // 104
  localparam int unsigned PA_D1 = PA_C2 + C2_K * C2_LANES;        // 632
  localparam int unsigned PA_D2 = PA_D1 + (FLAT + 1) * D1_N;      // 4232
  localparam int unsigned N_PARAMS = PA_D2 + (D1_N + 1) * D2_N;   // 4300
  localparam int unsigned PA_W = $clog2(N_PARAMS);                // 13

  typedef enum logic [1:0] {
    GEST_WING  = 2'd0,  // "W"
    GEST_RING  = 2'd1,  // "O"
    GEST_SLOPE = 2'd2,  // "L"
    GEST_NONE  = 2'd3   // unknown / negative
  } gesture_e;

  typedef logic signed [PRM_W-1:0]  prm_t;
  typedef logic signed [IN_W-1:0]   in_t;
  typedef logic signed [C1_W-1:0]   c1_t;
  typedef logic signed [C2_W-1:0]   c2_t;
  typedef logic signed [D1_W-1:0]   d1_t;
  typedef logic signed [D2_W-1:0]   d2_t;
  typedef logic        [PROB_W-1:0] prob_t;

endpackage
