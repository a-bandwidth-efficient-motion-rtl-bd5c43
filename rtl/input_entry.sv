// input_entry: input entry unit of the interpolator, with the Reuse-Register-File.
//
// Reference pixels arrive from the frame memory as 32-bit words, each holding
// four vertically adjacent pixels of one column, aligned to a 4-row boundary
// (top pixel in bits 7:0).  This unit packs the words of one window column into
// a column of interpolation-window pixels and hands it to the CLCI units:
//   luma   : 9 pixels (rows row_off .. row_off+8 of three aligned words);
//   chroma : 3 pixels (one word, or two when row_off > 1).
// Vertical data reuse (luma): the two lower words of every column are written
// into the Reuse-Register-File, one entry per column of the macroblock-wide
// window (21 entries = 16 + 5 columns).  When the block directly below is
// interpolated with the same motion vector, its window starts four rows lower
// and those two words are exactly its upper eight rows, so only one new word
// per column is fetched (one cycle per column instead of three).
// Horizontal data reuse: the first columns are already held in the CLCI units'
// content buffers, so only the new columns are requested (luma columns 5-8,
// chroma columns 1-2).
//
// Interface: `start` with the block configuration; words are accepted while
// word_ready; each completed column is presented for one cycle on col_valid the
// cycle after its last word; `busy` is high from start until the last column.
module input_entry
  import mc_pkg::*;
#(
  parameter int unsigned RRF_DEPTH = 21
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             chroma,
  input  logic             hreuse,
  input  logic             vreuse,
  input  logic [1:0]       row_off,
  input  logic [4:0]       rrf_base,
  input  logic             word_valid,
  input  logic [WORD_W-1:0] word,
  output logic             word_ready,
  output logic             col_valid,
  output logic [3:0]       col_idx,
  output logic [PIX_W-1:0] col_pix [9],
  output logic             busy
);

  logic [63:0]  rrf [RRF_DEPTH];

  logic         c_chroma, c_vreuse;
  logic [1:0]   c_off;
  logic [4:0]   c_base;
  logic [3:0]   col, last_col;
  logic [1:0]   wcnt, wneed;
  logic [WORD_W-1:0] w0, w1;
  logic [4:0]   ridx;

  assign ridx = c_base + 5'(col);
  assign word_ready = busy;

  always_comb begin
    if (c_chroma)      wneed = (c_off <= 2'd1) ? 2'd1 : 2'd2;
    else if (c_vreuse) wneed = 2'd1;
    else               wneed = 2'd3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      c_chroma <= 1'b0; c_vreuse <= 1'b0; c_off <= '0; c_base <= '0;
      col <= '0; last_col <= '0; wcnt <= '0; w0 <= '0; w1 <= '0;
      col_valid <= 1'b0; col_idx <= '0;
      for (int k = 0; k < 9; k++) col_pix[k] <= '0;
      for (int k = 0; k < int'(RRF_DEPTH); k++) rrf[k] <= '0;
    end else begin
      col_valid <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        c_chroma <= chroma;
        c_vreuse <= vreuse && !chroma;
        c_off    <= row_off;
        c_base   <= rrf_base;
        col      <= chroma ? (hreuse ? 4'd1 : 4'd0) : (hreuse ? 4'd5 : 4'd0);
        last_col <= chroma ? 4'd2 : 4'd8;
        wcnt     <= '0;
      end else if (busy && word_valid) begin
        if (wcnt + 2'd1 < wneed) begin
          if (wcnt == 2'd0) w0 <= word; else w1 <= word;
          wcnt <= wcnt + 2'd1;
        end else begin
          // last word of this column: assemble it
          automatic logic [95:0] cat;
          if (c_chroma)      cat = (wneed == 2'd1) ? {64'd0, word} : {32'd0, word, w0};
          else if (c_vreuse) cat = {word, rrf[ridx]};
          else               cat = {word, w1, w0};
          for (int k = 0; k < 9; k++) col_pix[k] <= cat[(int'(c_off) + k)*8 +: 8];
          if (!c_chroma) rrf[ridx] <= cat[95:32];
          col_valid <= 1'b1;
          col_idx   <= col;
          wcnt      <= '0;
          col       <= col + 4'd1;
          if (col == last_col) busy <= 1'b0;
        end
      end
    end
  end

endmodule
