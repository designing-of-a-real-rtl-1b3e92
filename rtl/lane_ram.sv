// lane_ram: on-chip memory with narrow writes and wide reads.
//
// The memory holds ROWS rows of LANES words of W bits. The write port stores
// one word (row wr_row, lane wr_lane) per cycle; the read port returns a whole
// row one cycle after rd_row is presented (registered output, block-RAM
// style), and keeps it until rd_en is asserted again. The accelerator uses it
// for the input window (384 x 1 lanes), the first max-pool result (42 rows x
// 8 channels, so a whole time row is read at once) and the parameters of each
// layer, whose rows hold what one pipelined iteration of that layer needs.
// Contents are not reset. A read and a write of the same row in one cycle
// return the old data.
//
// The set of memories follows the published dataflow after layer merging;
// the row organisation and the one-cycle read latency are this design's own.
module lane_ram #(
  parameter int unsigned ROWS  = 384,
  parameter int unsigned LANES = 1,
  parameter int unsigned W     = 12,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [RW-1:0]             wr_row,
  input  logic [LW-1:0]             wr_lane,
  input  logic [W-1:0]              wr_data,
  input  logic                      rd_en,
  input  logic [RW-1:0]             rd_row,
  output logic [LANES-1:0][W-1:0]   rd_data
);
  logic [LANES-1:0][W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we && (32'(wr_row) < ROWS) && (32'(wr_lane) < LANES))
      mem[wr_row][wr_lane] <= wr_data;
    if (rd_en)
      rd_data <= mem[rd_row];
  end
endmodule
