// mv_row_fifo: row-stripe motion vector store of the MV generator.
//
// Spatial MV prediction needs, for the current macroblock, the motion vectors of
// the bottom row of 4x4 blocks of the macroblock row above (MVLU, MVU0-3, MVRU).
// This store keeps one row stripe of 4x4-block MV pairs for the whole picture
// width plus four left-neighbour entries, for list 0 and list 1:
//   DEPTH = (FRAME_W_MB*4 + 4) * 2, i.e. 968 entries of 20 bits for 1920 pixels.
// An entry is overwritten once the macroblock below has used it, which gives the
// first-in first-out behaviour the design describes; it is addressed here by
// (list, 4x4 column) so the same single-port-style array serves reads and writes.
// It is written as a synchronous RAM (one write and one read port), the form of
// the on-chip SRAM the design chooses.
//
// Timing: the read data appears one cycle after rd_en.
module mv_row_fifo
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W_MB = 120,
  localparam int unsigned STRIPE = FRAME_W_MB*4 + 4,
  localparam int unsigned DEPTH  = STRIPE*2,
  localparam int unsigned AW     = $clog2(STRIPE)
)(
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_list,
  input  logic [AW-1:0] wr_col,
  input  mv_t           wr_mv,
  input  logic          rd_en,
  input  logic          rd_list,
  input  logic [AW-1:0] rd_col,
  output mv_t           rd_mv
);

  mv_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[(wr_list ? STRIPE : 0) + int'(wr_col)] <= wr_mv;
    if (rd_en) rd_mv <= mem[(rd_list ? STRIPE : 0) + int'(rd_col)];
  end

endmodule
