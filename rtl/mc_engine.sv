// mc_engine: motion-compensation engine (MV generator, E2CMA-controlled
// interpolators, weighted prediction).
//
// Per macroblock (MB):
//  1. mb_start: the MV generator loads the neighbouring vectors; when need_col
//     is set the four co-located vectors of the MB are read from the frame
//     memory first (channel 0), for temporal direct commands.
//  2. partition commands: the MV generator produces the vectors, one 4x4 block
//     at a time; they are collected per list with the blocks each list covers.
//  3. mb_end: the collected vectors are latched for motion compensation, the
//     four co-located vectors of this MB (corner 4x4 block of each 8x8, list 0
//     if used, else list 1) are written to the frame memory (channel 0), and the
//     E2CMA controller walks the luma and chroma blocks.  The MV generator is
//     free for the next MB meanwhile.
//  4. two CLCI interpolators, one per list, take the window words from the read
//     data (channel 1) and produce 4-pixel (chroma 2-pixel) columns; list-0
//     columns of a bi-predicted block are held until the list-1 columns come,
//     then the weighted-prediction unit forms the prediction and adds the
//     residual.
// Implicit weights come from the POC distances (a ScaleFactor unit run at
// mb_start), explicit weights and offsets from the ports.
//
// Interface: memory-side channel 0 (co-located MV read/write) and channel 1
// (window requests) towards the memory controller, and its read data stream
// (tag 0/1, rd_first on the first word of a burst; further burst words are
// discarded).  Output: pred_valid with plane (0 Y, 1 Cb, 2 Cr), raster block
// index, column, prediction and reconstruction; the residual for that column is
// read from `residual` in the same cycle (res_plane/res_blk/res_col say which).
// mc_busy is high while an MB is in motion compensation.
// The split into MV generator, interpolators and weighted prediction and the
// per-list interpolators follow the design; the co-located corner choice (as in
// H.264 direct 8x8 inference), the data hand-over and the handshakes are this
// design's own.
module mc_engine
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W_MB = 120,
  parameter int unsigned FI_W       = 5
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // picture setup
  input  logic signed [POC_W-1:0] curr_poc,
  input  logic signed [POC_W-1:0] list0_poc,
  input  logic signed [POC_W-1:0] list1_poc,
  input  logic [FI_W-1:0]         ref_frame [2],
  input  logic [FI_W-1:0]         col_frame,
  input  logic [FI_W-1:0]         cur_frame,
  input  wpmode_t                 wp_mode,
  input  logic signed [9:0]       exp_w [2],
  input  logic signed [7:0]       exp_o [2],
  input  logic [2:0]              log_wd,
  // macroblock
  input  logic                    mb_start,
  input  logic                    need_col,
  input  logic [7:0]              mb_x,
  input  logic [7:0]              mb_y,
  input  logic                    mb_end,
  output logic                    mb_ready,     // mb_start accepted
  output logic                    end_ready,    // mb_end accepted
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  logic                    cmd_list,
  input  part_t                   cmd_part,
  input  logic [3:0]              cmd_idx,
  input  mvmode_t                 cmd_mode,
  input  mv_t                     cmd_mvd,
  output logic                    mc_busy,
  // channel 0
  output logic                    c0_valid,
  input  logic                    c0_ready,
  output logic                    c0_we,
  output logic [FI_W-1:0]         c0_frame,
  output logic [11:0]             c0_mbx,
  output logic [11:0]             c0_mby,
  output logic [1:0]              c0_mvk,
  output logic [WORD_W-1:0]       c0_wdata,
  // channel 1
  output logic                    c1_valid,
  input  logic                    c1_ready,
  output logic [FI_W-1:0]         c1_frame,
  output logic                    c1_chroma,
  output logic                    c1_comp,
  output logic [11:0]             c1_x,
  output logic [11:0]             c1_y,
  output logic [4:0]              c1_ncols,
  output logic [1:0]              c1_nwords,
  // read data
  input  logic                    r_valid,
  input  logic [WORD_W-1:0]       r_data,
  input  logic [1:0]              r_tag,
  input  logic                    r_first,
  output logic                    r_pop,
  // prediction / reconstruction
  output logic                    pred_valid,
  output logic [1:0]              pred_plane,
  output logic [3:0]              pred_blk,
  output logic [1:0]              pred_col,
  output logic [PIX_W-1:0]        pred [4],
  output logic [PIX_W-1:0]        recon [4],
  output logic [1:0]              res_plane,
  output logic [3:0]              res_blk,
  output logic [1:0]              res_col,
  input  logic signed [8:0]       residual [4],
  // statistics
  output logic                    ev_hreuse,
  output logic                    ev_vreuse,
  output logic                    ev_block,
  output logic                    ev_bi
);

  // ---------------- MV generator ----------------
  logic g_idle, g_cmd_ready, g_out_valid, g_out_list;
  logic [3:0] g_out_blk;
  mv_t  g_out_mv;
  mv_t  colmv [4];
  logic [2:0] col_cnt;      // co-located words received
  logic       col_wait;

  mv_generator #(.FRAME_W_MB(FRAME_W_MB)) u_mvg (
    .clk, .rst_n, .mb_start(mb_start && mb_ready), .mb_x, .mb_y, .mb_end(mb_end && end_ready), .idle(g_idle),
    .cmd_valid(cmd_valid && !col_wait), .cmd_ready(g_cmd_ready), .cmd_list, .cmd_part, .cmd_idx, .cmd_mode,
    .cmd_mvd, .cmd_mv_col((cmd_part == MB_8X8) ? colmv[cmd_idx[1:0]] : colmv[0]),
    .curr_poc, .list0_poc, .list1_poc,
    .out_valid(g_out_valid), .out_list(g_out_list), .out_blk(g_out_blk), .out_mv(g_out_mv));

  assign cmd_ready = g_cmd_ready && !col_wait;

  // collected vectors (raster block order) and list use
  mv_t         gmv [2][16];
  logic [15:0] guse [2];
  mv_t         mmv [2][16];
  logic [15:0] muse [2];
  logic [7:0]  m_mbx, m_mby, g_mbx, g_mby;

  function automatic logic [3:0] scan2raster(input logic [3:0] s);
    return {s[3], s[1], s[2], s[0]};
  endfunction

  // ---------------- E2CMA controller and interpolators ----------------
  logic        e_start, e_busy, e_done;
  logic [1:0]  i_start, i_busy, i_word_ready, i_out_valid, i_done;
  logic        i_chroma, i_hreuse, i_vreuse, i_swap;
  logic [2:0]  i_fx, i_fy;
  logic [1:0]  i_row_off;
  logic [4:0]  i_rrf_base;
  logic        b_valid, b_list, b_last;
  logic [1:0]  b_plane;
  logic [3:0]  b_idx;
  logic [1:0]  i_out_col [2];
  logic [PIX_W-1:0] i_out_pix [2][4];
  logic [1:0]  w_valid;

  e2cma_ctrl #(.FI_W(FI_W)) u_e2 (
    .clk, .rst_n, .start(e_start), .mbx(g_mbx), .mby(g_mby), .mv(mmv), .use_l(muse),
    .ref_frame, .busy(e_busy), .done(e_done),
    .c1_valid, .c1_ready, .c1_frame, .c1_chroma, .c1_comp, .c1_x, .c1_y, .c1_ncols, .c1_nwords,
    .i_start, .i_busy, .i_word_ready, .i_chroma, .i_fx, .i_fy, .i_hreuse, .i_vreuse, .i_swap,
    .i_row_off, .i_rrf_base,
    .blk_valid(b_valid), .blk_plane(b_plane), .blk_idx(b_idx), .blk_list(b_list), .blk_last_list(b_last));

  for (genvar l = 0; l < 2; l++) begin : g_interp
    clci_interp u_ci (
      .clk, .rst_n, .start(i_start[l]), .chroma(i_chroma), .fx(i_fx), .fy(i_fy),
      .hreuse(i_hreuse), .vreuse(i_vreuse), .swap(i_swap), .row_off(i_row_off), .rrf_base(i_rrf_base),
      .word_valid(w_valid[l]), .word(r_data), .word_ready(i_word_ready[l]),
      .busy(i_busy[l]), .out_valid(i_out_valid[l]), .out_col(i_out_col[l]), .out_pix(i_out_pix[l]),
      .done(i_done[l]));
  end

  // read data routing
  wire rd_mv   = r_valid && (r_tag == 2'd0);
  wire rd_pix  = r_valid && (r_tag == 2'd1);
  always_comb begin
    w_valid = 2'b00;
    r_pop   = 1'b0;
    if (rd_mv) r_pop = 1'b1;
    else if (rd_pix) begin
      if (!r_first) r_pop = 1'b1;
      else if (i_word_ready[0]) begin w_valid = 2'b01; r_pop = 1'b1; end
      else if (i_word_ready[1]) begin w_valid = 2'b10; r_pop = 1'b1; end
    end
    else if (r_valid) r_pop = 1'b1;
  end

  // ---------------- block bookkeeping per interpolator ----------------
  typedef struct packed { logic [1:0] plane; logic [3:0] blk; logic bi; } meta_t;
  meta_t      mq [2][4];
  logic [1:0] mq_rp [2], mq_wp [2];
  logic [PIX_W-1:0] l0buf [4][4];

  // ---------------- weighted prediction ----------------
  logic             wp_in, wp_bi, wp_l1, wp_out;
  logic [PIX_W-1:0] wp_p0 [4], wp_p1 [4];
  logic signed [9:0] iw0, iw1, ww0, ww1;
  logic signed [7:0] wo0, wo1;
  logic [1:0]       wp_plane, q_plane;
  logic [3:0]       wp_blk, q_blk;
  logic [1:0]       wp_col, q_col;
  meta_t            h0, h1;

  assign h0 = mq[0][mq_rp[0]];
  assign h1 = mq[1][mq_rp[1]];

  always_comb begin
    wp_in = 1'b0; wp_bi = 1'b0; wp_l1 = 1'b0;
    wp_plane = '0; wp_blk = '0; wp_col = '0;
    for (int k = 0; k < 4; k++) begin wp_p0[k] = i_out_pix[0][k]; wp_p1[k] = i_out_pix[1][k]; end
    if (i_out_valid[0] && !h0.bi) begin
      wp_in = 1'b1; wp_plane = h0.plane; wp_blk = h0.blk; wp_col = i_out_col[0];
    end else if (i_out_valid[1]) begin
      wp_in = 1'b1; wp_l1 = !h1.bi; wp_bi = h1.bi;
      wp_plane = h1.plane; wp_blk = h1.blk; wp_col = i_out_col[1];
      for (int k = 0; k < 4; k++) wp_p0[k] = l0buf[i_out_col[1]][k];
    end
  end

  assign ww0 = (wp_mode == WP_IMPLICIT) ? iw0 : exp_w[0];
  assign ww1 = (wp_mode == WP_IMPLICIT) ? iw1 : exp_w[1];
  assign wo0 = exp_o[0];
  assign wo1 = exp_o[1];
  assign res_plane = wp_plane;
  assign res_blk   = wp_blk;
  assign res_col   = wp_col;

  weighted_pred u_wp (
    .clk, .rst_n, .in_valid(wp_in), .mode(wp_mode), .bi(wp_bi), .use_l1(wp_l1),
    .p0(wp_p0), .p1(wp_p1), .w0(ww0), .w1(ww1), .o0(wo0), .o1(wo1), .log_wd, .residual,
    .out_valid(wp_out), .pred, .recon);

  logic sf_valid, sf_tdz;
  logic signed [10:0] sf_sf;
  logic signed [9:0]  sf_w0, sf_w1;
  scalefactor_gen u_isf (
    .clk, .rst_n, .start(mb_start && mb_ready), .curr_poc, .list0_poc, .list1_poc,
    .scale_factor(sf_sf), .w0(sf_w0), .w1(sf_w1), .td_zero(sf_tdz), .valid(sf_valid));

  assign pred_valid = wp_out;
  assign pred_plane = q_plane;
  assign pred_blk   = q_blk;
  assign pred_col   = q_col;

  // ---------------- control ----------------
  logic       wr_pend;       // co-located write of the MB in MC
  logic [1:0] wr_k, rd_k;
  logic       rd_req;
  logic [FI_W-1:0] m_cur;

  // the MB in the MV generator can be handed to MC once the generator is idle
  // after mb_end and no earlier MB is still in MC
  logic gen_done;
  assign e_start   = gen_done && g_idle && !e_busy && !wr_pend;
  assign mb_ready  = !gen_done && g_idle && !col_wait && !rd_req;
  assign end_ready = g_cmd_ready && !col_wait && !gen_done;
  assign mc_busy  = e_busy || (i_busy != 2'b00) || wr_pend;

  // channel 0: co-located reads at mb_start, writes after mb_end
  always_comb begin
    c0_valid = 1'b0; c0_we = 1'b0; c0_frame = col_frame; c0_mbx = {4'd0, g_mbx}; c0_mby = {4'd0, g_mby};
    c0_mvk = rd_k; c0_wdata = '0;
    if (rd_req) begin
      c0_valid = 1'b1;
    end else if (wr_pend) begin
      automatic logic [3:0] cb;
      automatic logic       lsel;
      cb = (wr_k == 2'd0) ? 4'd0 : (wr_k == 2'd1) ? 4'd3 : (wr_k == 2'd2) ? 4'd12 : 4'd15;
      lsel = !muse[0][cb];
      c0_valid = 1'b1; c0_we = 1'b1; c0_frame = m_cur;
      c0_mbx = {4'd0, m_mbx}; c0_mby = {4'd0, m_mby}; c0_mvk = wr_k;
      c0_wdata = {12'd0, mmv[lsel][cb]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_done <= 1'b0; wr_pend <= 1'b0; wr_k <= '0; rd_k <= '0; rd_req <= 1'b0;
      col_wait <= 1'b0; col_cnt <= '0; m_cur <= '0;
      m_mbx <= '0; m_mby <= '0; g_mbx <= '0; g_mby <= '0;
      iw0 <= 10'sd32; iw1 <= 10'sd32;
      q_plane <= '0; q_blk <= '0; q_col <= '0;
      for (int l = 0; l < 2; l++) begin
        guse[l] <= '0; muse[l] <= '0; mq_rp[l] <= '0; mq_wp[l] <= '0;
        for (int b = 0; b < 16; b++) begin gmv[l][b] <= '0; mmv[l][b] <= '0; end
        for (int i = 0; i < 4; i++) mq[l][i] <= '0;
      end
      for (int i = 0; i < 4; i++) begin
        colmv[i] <= '0;
        for (int k = 0; k < 4; k++) l0buf[i][k] <= '0;
      end
    end else begin
      // MB start
      if (mb_start && mb_ready) begin
        g_mbx <= mb_x; g_mby <= mb_y;
        guse[0] <= '0; guse[1] <= '0;
        if (need_col) begin
          col_wait <= 1'b1; rd_req <= 1'b1; rd_k <= '0; col_cnt <= '0;
        end
      end
      if (sf_valid) begin
        iw0 <= sf_w0; iw1 <= sf_w1;
      end
      if (rd_req && c0_ready) begin
        rd_k <= rd_k + 2'd1;
        if (rd_k == 2'd3) rd_req <= 1'b0;
      end
      if (rd_mv && r_first) begin
        colmv[col_cnt[1:0]] <= mv_t'(r_data[2*MV_W-1:0]);
        col_cnt <= col_cnt + 3'd1;
        if (col_cnt == 3'd3) col_wait <= 1'b0;
      end
      // vectors from the generator
      if (g_out_valid) begin
        gmv[g_out_list][scan2raster(g_out_blk)]  <= g_out_mv;
        guse[g_out_list][scan2raster(g_out_blk)] <= 1'b1;
      end
      if (mb_end && end_ready) gen_done <= 1'b1;
      // hand over to MC
      if (e_start) begin
        gen_done <= 1'b0;
        mmv      <= gmv;
        muse     <= guse;
        m_mbx    <= g_mbx;
        m_mby    <= g_mby;
        m_cur    <= cur_frame;
        wr_pend  <= 1'b1;
        wr_k     <= '0;
      end
      if (wr_pend && !rd_req && c0_ready) begin
        wr_k <= wr_k + 2'd1;
        if (wr_k == 2'd3) wr_pend <= 1'b0;
      end
      // block bookkeeping
      for (int l = 0; l < 2; l++) begin
        if (b_valid && b_list == 1'(l)) begin
          mq[l][mq_wp[l]] <= '{plane: b_plane, blk: b_idx, bi: (l == 0) ? !b_last : muse[0][b_idx]};
          mq_wp[l] <= mq_wp[l] + 2'd1;
        end
        if (i_done[l]) mq_rp[l] <= mq_rp[l] + 2'd1;
      end
      if (i_out_valid[0] && h0.bi)
        for (int k = 0; k < 4; k++) l0buf[i_out_col[0]][k] <= i_out_pix[0][k];
      if (wp_in) begin
        q_plane <= wp_plane; q_blk <= wp_blk; q_col <= wp_col;
      end
    end
  end

  assign ev_hreuse = b_valid && i_hreuse;
  assign ev_vreuse = b_valid && i_vreuse;
  assign ev_block  = b_valid;
  assign ev_bi     = wp_in && wp_bi;

  // both interpolators never deliver in the same cycle a column that needs
  // the weighting unit
  a_one_wp_source: assert property (@(posedge clk) disable iff (!rst_n)
    !(i_out_valid[0] && !h0.bi && i_out_valid[1]));

endmodule
