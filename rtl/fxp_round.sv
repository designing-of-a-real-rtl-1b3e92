// fxp_round: requantises a signed fixed-point value to a narrower format.
//
// Fraction bits are removed with convergent rounding (round to nearest, ties
// to even), the mode chosen for all fixed-point variables of the network.
// Integer bits that do not fit are discarded (two's complement wrap-around,
// the default overflow behaviour of the fixed-point types the network was
// modelled with); the formats are sized so that this does not occur on the
// intended data. If the output has more fraction bits than the input the
// value is shifted left instead. Purely combinational.
//
//   din  : IN_W bits, IN_F fraction bits
//   dout : OUT_W bits, OUT_F fraction bits
//
// The rounding mode and the wrap-around default are published; the
// implementation is this design's own.
module fxp_round #(
  parameter int unsigned IN_W  = 26,
  parameter int unsigned IN_F  = 7,
  parameter int unsigned OUT_W = 13,
  parameter int unsigned OUT_F = 0
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam int unsigned XW = (IN_W > OUT_W ? IN_W : OUT_W) + OUT_F + 2;

  logic signed [XW-1:0] ext;
  logic signed [XW-1:0] res;

  assign ext = XW'(din);

  if (IN_F > OUT_F) begin : g_round
    localparam int unsigned D = IN_F - OUT_F;
    logic signed [XW-1:0] fl;     // floor(din / 2^D)
    logic        [D-1:0]  rem;    // discarded bits
    logic                 up;
    assign fl  = ext >>> D;
    assign rem = din[D-1:0];
    // above one half, or exactly one half with an odd kept part
    assign up  = rem[D-1] && ((rem[D-1:0] != {1'b1, {(D-1){1'b0}}}) || fl[0]);
    assign res = fl + XW'(up);
  end else begin : g_shift
    assign res = ext <<< (OUT_F - IN_F);
  end

  assign dout = res[OUT_W-1:0];
endmodule
