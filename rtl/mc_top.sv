// mc_top: bandwidth-efficient motion compensation for an H.264 main-profile
// decoder, with its SDRAM memory controller.
//
// The motion-compensation engine (MV generation, E2CMA-ordered interpolation
// with data reuse, weighted prediction) reads reference pixels and co-located
// motion vectors through the multi-channel memory controller, which also takes
// the de-blocking filter's writes.  Channels: 0 = direct coding (co-located MVs,
// from the engine), 1 = interpolation (from the engine), 2 = de-blocking (its
// ports are brought out here: the de-blocking filter is outside this design).
// The SDRAM itself is outside: its command, address and data pins are ports
// (sd_cmd is the decoded command; a pad ring maps it to CS#/RAS#/CAS#/WE#).
//
// Interface groups:
//   setup      memory latencies (cfg_*), scheduling on/off, frame start table,
//              picture POCs, reference/co-located/current frame indices and
//              weighted-prediction mode and parameters;
//   MB         mb_start (+need_col, position) / partition commands / mb_end from
//              the syntax decoder; mb_ready, end_ready, cmd_ready;
//   output     pred_valid with plane/block/column and 4 (chroma 2) predicted and
//              reconstructed pixels; residual is read in that cycle;
//   de-block   channel-2 write requests;
//   SDRAM      sd_cmd, sd_ba, sd_addr, sd_dq_out/sd_dq_oe/sd_dqm, sd_dq_in;
//   statistics one-cycle event pulses for counting.
// Defaults: 1920x1088 frame (120 x 68 MBs), 17 frame slots, SDRAM of 4 banks x
// 2048 rows x 256 columns x 32 bits, 7-entry command queue.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W_MB = 120,
  parameter int unsigned FRAME_H_MB = 68,
  parameter int unsigned NFRAMES    = 17,
  parameter int unsigned ROW_W      = 11,
  parameter int unsigned COL_W      = 8,
  parameter int unsigned ADDR_W     = 13,
  parameter int unsigned QDEPTH     = 7,
  localparam int unsigned FI_W      = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // memory setup
  input  logic                    sched_en,
  input  logic                    cfg_we,
  input  logic [3:0]              cfg_trp,
  input  logic [3:0]              cfg_trcd,
  input  logic [3:0]              cfg_cl,
  input  logic [3:0]              cfg_bl,
  input  logic [3:0]              cfg_twr,
  input  logic                    tbl_we,
  input  logic [FI_W-1:0]         tbl_idx,
  input  logic [ROW_W-1:0]        tbl_row,
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
  output logic                    mb_ready,
  output logic                    end_ready,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  logic                    cmd_list,
  input  part_t                   cmd_part,
  input  logic [3:0]              cmd_idx,
  input  mvmode_t                 cmd_mode,
  input  mv_t                     cmd_mvd,
  output logic                    mc_busy,
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
  // de-blocking channel
  input  logic                    db_valid,
  output logic                    db_ready,
  input  logic [FI_W-1:0]         db_frame,
  input  logic                    db_chroma,
  input  logic                    db_comp,
  input  logic [11:0]             db_x,
  input  logic [11:0]             db_y,
  input  logic [WORD_W-1:0]       db_wdata,
  // SDRAM
  output sdcmd_t                  sd_cmd,
  output logic [1:0]              sd_ba,
  output logic [ADDR_W-1:0]       sd_addr,
  output logic [WORD_W-1:0]       sd_dq_out,
  output logic                    sd_dq_oe,
  output logic                    sd_dqm,
  input  logic [WORD_W-1:0]       sd_dq_in,
  // statistics
  output logic                    ev_hreuse,
  output logic                    ev_vreuse,
  output logic                    ev_block,
  output logic                    ev_bi,
  output logic                    ev_push,
  output acc_status_t             ev_status,
  output logic                    ev_queue_full,
  output logic                    ev_overlap,
  output logic                    ev_dispatch_busy,
  output logic                    ev_pre,
  output logic                    ev_act
);

  logic              c0_valid, c0_ready, c0_we;
  logic [FI_W-1:0]   c0_frame, c1_frame;
  logic [11:0]       c0_mbx, c0_mby, c1_x, c1_y;
  logic [1:0]        c0_mvk, c1_nwords, r_tag;
  logic [WORD_W-1:0] c0_wdata, r_data;
  logic              c1_valid, c1_ready, c1_chroma, c1_comp, c1_busy;
  logic [4:0]        c1_ncols;
  logic              r_valid, r_first, r_pop;

  mc_engine #(.FRAME_W_MB(FRAME_W_MB), .FI_W(FI_W)) u_eng (
    .clk, .rst_n, .curr_poc, .list0_poc, .list1_poc, .ref_frame, .col_frame, .cur_frame,
    .wp_mode, .exp_w, .exp_o, .log_wd,
    .mb_start, .need_col, .mb_x, .mb_y, .mb_end, .mb_ready, .end_ready,
    .cmd_valid, .cmd_ready, .cmd_list, .cmd_part, .cmd_idx, .cmd_mode, .cmd_mvd, .mc_busy,
    .c0_valid, .c0_ready, .c0_we, .c0_frame, .c0_mbx, .c0_mby, .c0_mvk, .c0_wdata,
    .c1_valid, .c1_ready, .c1_frame, .c1_chroma, .c1_comp, .c1_x, .c1_y, .c1_ncols, .c1_nwords,
    .r_valid, .r_data, .r_tag, .r_first, .r_pop,
    .pred_valid, .pred_plane, .pred_blk, .pred_col, .pred, .recon, .res_plane, .res_blk, .res_col,
    .residual, .ev_hreuse, .ev_vreuse, .ev_block, .ev_bi);

  mem_ctrl #(.FRAME_W_MB(FRAME_W_MB), .FRAME_H_MB(FRAME_H_MB), .NFRAMES(NFRAMES), .ROW_W(ROW_W),
             .COL_W(COL_W), .ADDR_W(ADDR_W), .QDEPTH(QDEPTH)) u_mem (
    .clk, .rst_n, .sched_en, .cfg_we, .cfg_trp, .cfg_trcd, .cfg_cl, .cfg_bl, .cfg_twr,
    .tbl_we, .tbl_idx, .tbl_row,
    .c0_valid, .c0_ready, .c0_we, .c0_frame, .c0_mbx, .c0_mby, .c0_mvk, .c0_wdata,
    .c1_valid, .c1_ready, .c1_frame, .c1_chroma, .c1_comp, .c1_x, .c1_y, .c1_ncols, .c1_nwords, .c1_busy,
    .c2_valid(db_valid), .c2_ready(db_ready), .c2_frame(db_frame), .c2_chroma(db_chroma),
    .c2_comp(db_comp), .c2_x(db_x), .c2_y(db_y), .c2_wdata(db_wdata),
    .r_valid, .r_data, .r_tag, .r_first, .r_pop,
    .sd_cmd, .sd_ba, .sd_addr, .sd_dq_out, .sd_dq_oe, .sd_dqm, .sd_dq_in,
    .ev_push, .ev_status, .ev_queue_full, .ev_overlap, .ev_dispatch_busy, .ev_pre, .ev_act);

endmodule
