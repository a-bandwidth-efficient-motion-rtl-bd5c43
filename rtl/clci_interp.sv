// clci_interp: combined luma/chroma interpolator (CLCI) for one reference list.
//
// A separate-1-D, 4-parallel interpolator: the input entry unit packs 32-bit
// memory words into window columns, four CLCI units (one per output row) filter
// vertically at their input and horizontally along their shift chains, and four
// bilinear stages form the quarter samples.  One 4x4 luma block (9x9 window) or
// one 2x2 chroma block (3x3 window, eighth-pel) is processed per `start`.
// Units 0-1 carry C-FIRs and also serve chroma; units 2-3 carry plain FIRs.
//
// Data reuse (extended-2D column-major approach):
//   vreuse : the window's upper rows come from the Reuse-Register-File, one word
//            per column is fetched (9 cycles instead of 27 for luma);
//   hreuse : the first window columns are already in the chains (luma 5, chroma 1),
//            only the remaining columns are fetched (luma 4 columns = 12 cycles,
//            or 4 cycles together with vreuse; chroma 2 columns);
//   swap   : before the block starts, exchange every chain with its content buffer
//            (content switch), so the tail of an earlier block can be resumed.
// The caller decides the flags; e2cma_ctrl does so for a macroblock.
//
// Interface and timing: `start` with the block parameters when !busy; words are
// taken one per cycle while word_ready.  Output columns of the block (4 luma
// pixels or 2 chroma pixels, top row in out_pix[0]) appear on out_valid two
// cycles after the column that completes them; `done` marks the last column.
module clci_interp
  import mc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              chroma,
  input  logic [2:0]        fx,        // luma: quarter (0..3), chroma: eighth (0..7)
  input  logic [2:0]        fy,
  input  logic              hreuse,
  input  logic              vreuse,
  input  logic              swap,
  input  logic [1:0]        row_off,   // window top row modulo 4
  input  logic [4:0]        rrf_base,  // first window column within the MB-wide window
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  output logic              word_ready,
  output logic              busy,
  output logic              out_valid,
  output logic [1:0]        out_col,
  output logic [PIX_W-1:0]  out_pix [4],
  output logic              done
);

  logic             c_chroma;
  logic [2:0]       c_fx, c_fy;
  logic             col_valid, ie_busy;
  logic [3:0]       col_idx;
  logic [PIX_W-1:0] col_pix [9];
  logic [3:0]       cnt;
  logic             shifted_d, active;

  input_entry u_ie (
    .clk, .rst_n, .start(start && !busy), .chroma, .hreuse, .vreuse, .row_off, .rrf_base,
    .word_valid, .word, .word_ready, .col_valid, .col_idx, .col_pix, .busy(ie_busy));

  logic [PIX_W-1:0] ent [4][6];
  logic [PIX_W-1:0] g_int [4], h_int [4], b_half [4], v_half [4], v_half_r [4], j_half [4], c_pix [4];
  logic [PIX_W-1:0] pix [4];

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 6; k++)
        ent[r][k] = c_chroma ? ((r < 2 && k == 2) ? col_pix[r] :
                                (r < 2 && k == 3) ? col_pix[r+1] : '0)
                             : col_pix[r+k];
  end

  for (genvar r = 0; r < 4; r++) begin : g_unit
    clci_unit #(.CHROMA(r < 2)) u_unit (
      .clk, .rst_n, .shift_en(col_valid), .swap(start && !busy && swap),
      .chroma(c_chroma), .frac_x(c_fx), .frac_y(c_fy), .entry(ent[r]),
      .g_int(g_int[r]), .h_int(h_int[r]), .b_half(b_half[r]), .v_half(v_half[r]),
      .v_half_r(v_half_r[r]), .j_half(j_half[r]), .c_pix(c_pix[r]));
    bilinear u_bil (
      .chroma(c_chroma), .fx(c_fx[1:0]), .fy(c_fy[1:0]),
      .g_int(g_int[r]), .h_int(h_int[r]), .b_half(b_half[r]), .v_half(v_half[r]),
      .v_half_r(v_half_r[r]), .j_half(j_half[r]), .c_pix(c_pix[r]), .pix(pix[r]));
  end

  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_chroma <= 1'b0; c_fx <= '0; c_fy <= '0;
      cnt <= '0; shifted_d <= 1'b0; active <= 1'b0;
      out_valid <= 1'b0; out_col <= '0; done <= 1'b0;
      for (int r = 0; r < 4; r++) out_pix[r] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      shifted_d <= col_valid;
      if (start && !active) begin
        active   <= 1'b1;
        c_chroma <= chroma;
        c_fx     <= chroma ? fx : {1'b0, fx[1:0]};
        c_fy     <= chroma ? fy : {1'b0, fy[1:0]};
        cnt      <= hreuse ? (chroma ? 4'd1 : 4'd5) : 4'd0;
      end
      if (col_valid) cnt <= cnt + 4'd1;
      if (shifted_d && active && cnt >= (c_chroma ? 4'd2 : 4'd6)) begin
        automatic logic [3:0] oc = cnt - (c_chroma ? 4'd2 : 4'd6);
        out_valid <= 1'b1;
        out_col   <= oc[1:0];
        for (int r = 0; r < 4; r++) out_pix[r] <= (c_chroma && r >= 2) ? '0 : pix[r];
        if (oc == (c_chroma ? 4'd1 : 4'd3)) begin
          done   <= 1'b1;
          active <= 1'b0;
        end
      end
    end
  end

  // the input entry must have finished a block before the next one is started
  a_entry_idle: assert property (@(posedge clk) disable iff (!rst_n) (start && !active) |-> !ie_busy);

endmodule
