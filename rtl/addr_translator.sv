// addr_translator: dynamic logical-to-physical address translator.
//
// Turns a logical address from the channel address generator into an SDRAM
// physical address (bank, row, column), following the frame layout of the
// design:
//   * each 8x8 quadrant of a macroblock (MB) lives in one bank: quadrant
//     (qy, qx) -> bank 2*qy + qx.  In that bank a luma MB takes 16 consecutive
//     columns (its four 4x4 blocks, Y0 Y1 Y4 Y5 for bank 0, each stored as four
//     32-bit column words of 4 vertically adjacent pixels); a chroma MB takes
//     8 columns (its 4x4 Cb quadrant, then its 4x4 Cr quadrant);
//   * the co-located motion vector of 8x8 block k of an MB takes one column of
//     bank k (20 bits of the 32-bit word);
//   * a frame is laid out as: motion-vector partition first, then all luma
//     MBs, then all chroma MBs, MBs in raster order, filling each SDRAM row
//     (page) before the next;
//   * a frame start table (the field list index controller) holds the first
//     row of each stored frame, so frames can be placed anywhere and moved
//     (dynamic allocation); it is written through tbl_we.
// With 256 columns per row a row holds 16 luma MBs, 32 chroma MBs or the motion
// vectors of 256 MBs.  Per frame this makes MV_ROWS + LUMA_ROWS + CHROMA_ROWS
// rows (32 + 510 + 255 for 120 x 68 MBs).
//
// Logical address: dtype; frame (index into the start table); for pixels x, y in
// pixels of that plane (luma 0..16*W-1, chroma 0..8*W-1, y is the row of the
// word's top pixel, a multiple of 4) and comp (0 = Cb, 1 = Cr); for motion
// vectors x, y = MB column/row and mvk = 8x8 block index.
// Translation is combinational; the table write takes effect next cycle.
// Reset fills the table with back-to-back frames (frame i at i*FRAME_ROWS,
// modulo the rows of the part), which is this module's choice.
module addr_translator
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W_MB = 120,
  parameter int unsigned FRAME_H_MB = 68,
  parameter int unsigned NFRAMES    = 17,
  parameter int unsigned ROW_W      = 11,
  parameter int unsigned COL_W      = 8,
  localparam int unsigned NMB         = FRAME_W_MB * FRAME_H_MB,
  localparam int unsigned COLS        = 1 << COL_W,
  localparam int unsigned MV_ROWS     = (NMB + COLS - 1) / COLS,
  localparam int unsigned LUMA_ROWS   = (NMB * 16 + COLS - 1) / COLS,
  localparam int unsigned CHROMA_ROWS = (NMB * 8 + COLS - 1) / COLS,
  localparam int unsigned FRAME_ROWS  = MV_ROWS + LUMA_ROWS + CHROMA_ROWS,
  localparam int unsigned FI_W        = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
)(
  input  logic             clk,
  input  logic             rst_n,
  // frame start table
  input  logic             tbl_we,
  input  logic [FI_W-1:0]  tbl_idx,
  input  logic [ROW_W-1:0] tbl_row,
  // logical address
  input  dtype_t           dtype,
  input  logic [FI_W-1:0]  frame,
  input  logic [11:0]      x,
  input  logic [11:0]      y,
  input  logic             comp,
  input  logic [1:0]       mvk,
  // physical address
  output logic [1:0]       bank,
  output logic [ROW_W-1:0] row,
  output logic [COL_W-1:0] col
);

  logic [ROW_W-1:0] base [NFRAMES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NFRAMES); i++) base[i] <= ROW_W'(i * FRAME_ROWS);
    end else if (tbl_we && int'(tbl_idx) < int'(NFRAMES)) begin
      base[tbl_idx] <= tbl_row;
    end
  end

  always_comb begin
    logic [31:0] n, lin, region;
    logic [ROW_W-1:0] fbase;
    fbase = (int'(frame) < int'(NFRAMES)) ? base[frame] : '0;
    unique case (dtype)
      DT_MV: begin
        n      = 32'(y) * FRAME_W_MB + 32'(x);
        bank   = mvk;
        lin    = n;
        region = 32'd0;
      end
      DT_CHROMA: begin
        n      = 32'(y[11:3]) * FRAME_W_MB + 32'(x[11:3]);
        bank   = {y[2], x[2]};
        lin    = n * 8 + 32'(comp) * 4 + 32'(x[1:0]);
        region = MV_ROWS + LUMA_ROWS;
      end
      default: begin // DT_LUMA
        n      = 32'(y[11:4]) * FRAME_W_MB + 32'(x[11:4]);
        bank   = {y[3], x[3]};
        lin    = n * 16 + 32'({y[2], x[2]}) * 4 + 32'(x[1:0]);
        region = MV_ROWS;
      end
    endcase
    col = lin[COL_W-1:0];
    row = fbase + ROW_W'(region) + ROW_W'(lin >> COL_W);
  end

endmodule
