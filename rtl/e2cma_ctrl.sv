// e2cma_ctrl: extended-2D column-major approach (E2CMA) controller.
//
// Walks the 4x4 blocks of one macroblock in the E2CMA order and, for every
// block and reference list it needs, starts that list's interpolator and asks
// the interpolation channel of the memory controller for exactly the window
// words the interpolator still lacks.
//
// Order: the 8x8 quadrants in raster order; inside a quadrant top-left,
// bottom-left, top-right, bottom-right (blocks 0, 2, 1, 3).  The same order is
// used for the 2x2 chroma blocks of Cb and then Cr.
// Every block start swaps the interpolator's shift chains with its content
// buffers, so after each block the chains hold the state of the block before
// the previous one.  In this order that is the block to the left whenever the
// block has a left neighbour in the macroblock that is not a row-start, which
// gives:
//   horizontal reuse  when the block processed two starts ago (by this list's
//                     interpolator) is the left neighbour with the same MV:
//                     luma fetches only window columns 5-8, chroma column 1-2;
//   vertical reuse    (luma) when the block processed last is the one above with
//                     the same MV, and the Reuse-Register-File holds every
//                     column this block reads from it (the block above fetched
//                     all its columns, or this block reuses horizontally too):
//                     one word per column instead of three.
// With all 16 MVs equal this gives, per quadrant, 27 + 9 + 12 + 4 word cycles
// for luma instead of 4 x 27.
//
// Window arithmetic (H.264): luma block at (4c, 4r) of MB (mbx, mby) with MV
// (mvx, mvy) in quarter pels needs pixels from x0 = 16*mbx + 4c + (mvx>>2) - 2,
// y0 = 16*mby + 4r + (mvy>>2) - 2, 9 x 9; chroma 2x2 block at (2c, 2r) needs
// 3 x 3 from 8*mbx + 2c + (mvx>>3), 8*mby + 2r + (mvy>>3) with eighth-pel
// fractions mv & 7.  Words are 4-row aligned: row_off = y0 mod 4, three words
// per luma column (rows y0 & ~3 .. +11), one or two per chroma column.
// Windows are not clamped at the picture edge: vectors must keep them inside
// the stored picture.
//
// Interface: `start` with the MB's vectors, per-block list use and reference
// frame indices; `done` when the last block has been started.  Each started
// block is also reported on blk_valid (plane 0 = Y, 1 = Cb, 2 = Cr, block index,
// list) so the output side can pair list-0 and list-1 results.  A list-1 block
// is started only after the list-0 interpolator has all its words, so the
// single read stream can be handed to the interpolators in order.
// The order, the reuse conditions and the cycle counts follow the design; the
// handshakes and the chroma Cb-then-Cr order are this design's choices.
module e2cma_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned FI_W = 5
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [7:0]        mbx,
  input  logic [7:0]        mby,
  input  mv_t               mv   [2][16],
  input  logic [15:0]       use_l [2],
  input  logic [FI_W-1:0]   ref_frame [2],
  output logic              busy,
  output logic              done,
  // interpolation channel (window requests)
  output logic              c1_valid,
  input  logic              c1_ready,
  output logic [FI_W-1:0]   c1_frame,
  output logic              c1_chroma,
  output logic              c1_comp,
  output logic [11:0]       c1_x,
  output logic [11:0]       c1_y,
  output logic [4:0]        c1_ncols,
  output logic [1:0]        c1_nwords,
  // interpolators (index = list)
  output logic [1:0]        i_start,
  input  logic [1:0]        i_busy,
  input  logic [1:0]        i_word_ready,
  output logic              i_chroma,
  output logic [2:0]        i_fx,
  output logic [2:0]        i_fy,
  output logic              i_hreuse,
  output logic              i_vreuse,
  output logic              i_swap,
  output logic [1:0]        i_row_off,
  output logic [4:0]        i_rrf_base,
  // block report
  output logic              blk_valid,
  output logic [1:0]        blk_plane,
  output logic [3:0]        blk_idx,
  output logic              blk_list,
  output logic              blk_last_list   // no further list for this block
);

  typedef struct packed {
    logic       v;
    logic [1:0] plane;
    logic [1:0] c, r;
    mv_t        mv;
    logic       h;
  } hist_t;

  logic       run;
  logic [1:0] plane;
  logic [3:0] k;
  logic       lsel;
  logic [7:0] c_mbx, c_mby;
  hist_t      h1 [2], h2 [2];   // last and second-last block of each list's interpolator

  // current block position from the sequence index
  logic [1:0] bc, br;
  logic [3:0] blk;
  always_comb begin
    bc  = {k[2], k[1]};   // quadrant column k[2], right half k[1]
    br  = {k[3], k[0]};   // quadrant row k[3], lower half k[0]
    blk = {br, bc};
  end

  wire  need0 = use_l[0][blk];
  wire  need1 = use_l[1][blk];
  wire  l     = lsel;
  wire  need  = l ? need1 : need0;
  mv_t  cmv;
  assign cmv = mv[l][blk];

  // reuse decision for (plane, blk, list l)
  logic hr, vr;
  always_comb begin
    hr = h2[l].v && h2[l].plane == plane && h2[l].r == br && bc != 2'd0 &&
         h2[l].c == bc - 2'd1 && h2[l].mv == cmv;
    vr = (plane == 2'd0) && h1[l].v && h1[l].plane == plane && h1[l].c == bc && br != 2'd0 &&
         h1[l].r == br - 2'd1 && h1[l].mv == cmv && (!h1[l].h || hr);
  end

  // window geometry
  logic signed [13:0] wx, wy;
  logic [2:0]         fx, fy;
  logic [1:0]         roff;
  always_comb begin
    if (plane == 2'd0) begin
      wx = 14'(signed'({1'b0, c_mbx, 4'd0})) + 14'(signed'({1'b0, bc, 2'd0})) + 14'(cmv.x >>> 2) - 14'sd2;
      wy = 14'(signed'({1'b0, c_mby, 4'd0})) + 14'(signed'({1'b0, br, 2'd0})) + 14'(cmv.y >>> 2) - 14'sd2;
      fx = {1'b0, cmv.x[1:0]};
      fy = {1'b0, cmv.y[1:0]};
    end else begin
      wx = 14'(signed'({1'b0, c_mbx, 3'd0})) + 14'(signed'({1'b0, bc, 1'b0})) + 14'(cmv.x >>> 3);
      wy = 14'(signed'({1'b0, c_mby, 3'd0})) + 14'(signed'({1'b0, br, 1'b0})) + 14'(cmv.y >>> 3);
      fx = cmv.x[2:0];
      fy = cmv.y[2:0];
    end
    roff = wy[1:0];
  end

  // issue condition: interpolator of this list free, channel free, and the
  // other list's interpolator no longer taking words
  wire other_feeding = i_word_ready[~l];
  wire can_go = run && need && c1_ready && !i_busy[l] && !i_word_ready[l] && !other_feeding;

  always_comb begin
    c1_valid   = can_go;
    c1_frame   = ref_frame[l];
    c1_chroma  = (plane != 2'd0);
    c1_comp    = (plane == 2'd2);
    c1_x       = 12'(wx) + ((hr) ? ((plane == 2'd0) ? 12'd5 : 12'd1) : 12'd0);
    c1_y       = {wy[11:2], 2'b00} + ((vr) ? 12'd8 : 12'd0);
    c1_ncols   = (plane == 2'd0) ? (hr ? 5'd4 : 5'd9) : (hr ? 5'd2 : 5'd3);
    c1_nwords  = (plane == 2'd0) ? (vr ? 2'd1 : 2'd3) : ((roff > 2'd1) ? 2'd2 : 2'd1);
    i_start    = can_go ? (l ? 2'b10 : 2'b01) : 2'b00;
    i_chroma   = (plane != 2'd0);
    i_fx       = fx;
    i_fy       = fy;
    i_hreuse   = hr;
    i_vreuse   = vr;
    i_swap     = 1'b1;
    i_row_off  = roff;
    i_rrf_base = {1'b0, bc, 2'b00};
    blk_valid  = can_go;
    blk_plane  = plane;
    blk_idx    = blk;
    blk_list   = l;
    blk_last_list = l || !need1;
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; plane <= '0; k <= '0; lsel <= 1'b0; done <= 1'b0;
      c_mbx <= '0; c_mby <= '0;
      for (int i = 0; i < 2; i++) begin h1[i] <= '0; h2[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run   <= 1'b1;
          plane <= '0;
          k     <= '0;
          lsel  <= 1'b0;
          c_mbx <= mbx;
          c_mby <= mby;
          for (int i = 0; i < 2; i++) begin h1[i] <= '0; h2[i] <= '0; end
        end
      end else if (!need || can_go) begin
        if (can_go) begin
          h2[l] <= h1[l];
          h1[l] <= '{v: 1'b1, plane: plane, c: bc, r: br, mv: cmv, h: hr};
        end
        if (!l && need1) lsel <= 1'b1;
        else begin
          lsel <= 1'b0;
          k    <= k + 4'd1;
          if (k == 4'd15) begin
            if (plane == 2'd2) begin
              run  <= 1'b0;
              done <= 1'b1;
            end else plane <= plane + 2'd1;
          end
        end
      end
    end
  end

endmodule
