// mem_ctrl: bandwidth-efficient SDRAM memory controller.
//
// Chain of the controller: channel address generator and scheduler (mcags) ->
// dynamic logical-to-physical address translator -> command/address queue with
// access status detection -> master bank controller and memory interface
// scheduler (mem_sched) with one bank controller per SDRAM bank -> SDRAM pins.
// Write data waits in the write data buffer for its WRITE command; read data
// goes, tagged with its channel, into the read data buffer, from which the
// channels take it in order.  The timing unit holds the SDRAM latencies set at
// initial setup.
//
// Flow control: a read is let into the queue only while the read data buffer
// has room for its whole burst next to the bursts still on their way, so read
// data never has to be dropped; a write only while the write data buffer has
// room for its word.  Either queue full stalls the channels (mcags holds them).
//
// Timing: an access takes one cycle from the channel into the queue, one more to
// reach a bank controller, then PRECHARGE/ACTIVE/READ/WRITE as the bank's state
// and the timing unit's latencies allow; read data reaches the read buffer
// output one cycle after it is sampled from the SDRAM.
// The block structure follows the design; buffer depths, the flow control and
// the statistics outputs (one-cycle event pulses) are this design's choices.
module mem_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W_MB = 120,
  parameter int unsigned FRAME_H_MB = 68,
  parameter int unsigned NFRAMES    = 17,
  parameter int unsigned ROW_W      = 11,
  parameter int unsigned COL_W      = 8,
  parameter int unsigned ADDR_W     = 13,
  parameter int unsigned QDEPTH     = 7,
  parameter int unsigned RD_DEPTH   = 16,
  parameter int unsigned WR_DEPTH   = 8,
  localparam int unsigned FI_W      = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
)(
  input  logic              clk,
  input  logic              rst_n,
  // setup
  input  logic              sched_en,
  input  logic              cfg_we,
  input  logic [3:0]        cfg_trp,
  input  logic [3:0]        cfg_trcd,
  input  logic [3:0]        cfg_cl,
  input  logic [3:0]        cfg_bl,
  input  logic [3:0]        cfg_twr,
  input  logic              tbl_we,
  input  logic [FI_W-1:0]   tbl_idx,
  input  logic [ROW_W-1:0]  tbl_row,
  // channel 0: direct coding
  input  logic              c0_valid,
  output logic              c0_ready,
  input  logic              c0_we,
  input  logic [FI_W-1:0]   c0_frame,
  input  logic [11:0]       c0_mbx,
  input  logic [11:0]       c0_mby,
  input  logic [1:0]        c0_mvk,
  input  logic [WORD_W-1:0] c0_wdata,
  // channel 1: interpolation
  input  logic              c1_valid,
  output logic              c1_ready,
  input  logic [FI_W-1:0]   c1_frame,
  input  logic              c1_chroma,
  input  logic              c1_comp,
  input  logic [11:0]       c1_x,
  input  logic [11:0]       c1_y,
  input  logic [4:0]        c1_ncols,
  input  logic [1:0]        c1_nwords,
  output logic              c1_busy,
  // channel 2: de-blocking
  input  logic              c2_valid,
  output logic              c2_ready,
  input  logic [FI_W-1:0]   c2_frame,
  input  logic              c2_chroma,
  input  logic              c2_comp,
  input  logic [11:0]       c2_x,
  input  logic [11:0]       c2_y,
  input  logic [WORD_W-1:0] c2_wdata,
  // read data (in request order, tagged with the channel)
  output logic              r_valid,
  output logic [WORD_W-1:0] r_data,
  output logic [1:0]        r_tag,
  output logic              r_first,
  input  logic              r_pop,
  // SDRAM pins
  output sdcmd_t            sd_cmd,
  output logic [1:0]        sd_ba,
  output logic [ADDR_W-1:0] sd_addr,
  output logic [WORD_W-1:0] sd_dq_out,
  output logic              sd_dq_oe,
  output logic              sd_dqm,
  input  logic [WORD_W-1:0] sd_dq_in,
  // statistics
  output logic              ev_push,
  output acc_status_t       ev_status,
  output logic              ev_queue_full,
  output logic              ev_overlap,
  output logic              ev_dispatch_busy,
  output logic              ev_pre,
  output logic              ev_act
);

  // ---------------- timing unit ----------------
  logic [3:0] t_rp, t_rcd, t_cl, t_bl, t_wr;
  logic [4:0] t_rd_to_pre, t_wr_to_pre;

  timing_unit u_tim (
    .clk, .rst_n, .cfg_we, .cfg_trp, .cfg_trcd, .cfg_cl, .cfg_bl, .cfg_twr,
    .t_rp, .t_rcd, .t_cl, .t_bl, .t_wr, .t_rd_to_pre, .t_wr_to_pre);

  // ---------------- channels ----------------
  logic              a_valid, a_ready, a_we, a_comp;
  logic [1:0]        a_tag, a_mvk;
  dtype_t            a_dtype;
  logic [FI_W-1:0]   a_frame;
  logic [11:0]       a_x, a_y;
  logic [WORD_W-1:0] a_wdata;

  mcags #(.FI_W(FI_W)) u_mcags (
    .clk, .rst_n,
    .c0_valid, .c0_ready, .c0_we, .c0_frame, .c0_mbx, .c0_mby, .c0_mvk, .c0_wdata,
    .c1_valid, .c1_ready, .c1_frame, .c1_chroma, .c1_comp, .c1_x, .c1_y, .c1_ncols, .c1_nwords, .c1_busy,
    .c2_valid, .c2_ready, .c2_frame, .c2_chroma, .c2_comp, .c2_x, .c2_y, .c2_wdata,
    .out_valid(a_valid), .out_ready(a_ready), .out_we(a_we), .out_tag(a_tag), .out_dtype(a_dtype),
    .out_frame(a_frame), .out_x(a_x), .out_y(a_y), .out_comp(a_comp), .out_mvk(a_mvk),
    .out_wdata(a_wdata));

  // ---------------- address translator ----------------
  logic [1:0]       p_bank;
  logic [ROW_W-1:0] p_row;
  logic [COL_W-1:0] p_col;

  addr_translator #(.FRAME_W_MB(FRAME_W_MB), .FRAME_H_MB(FRAME_H_MB), .NFRAMES(NFRAMES),
                    .ROW_W(ROW_W), .COL_W(COL_W)) u_xlat (
    .clk, .rst_n, .tbl_we, .tbl_idx, .tbl_row,
    .dtype(a_dtype), .frame(a_frame), .x(a_x), .y(a_y), .comp(a_comp), .mvk(a_mvk),
    .bank(p_bank), .row(p_row), .col(p_col));

  // ---------------- buffers and flow control ----------------
  localparam int unsigned RW = WORD_W + 3;
  logic          q_full, q_empty, q_pop, push;
  logic          wb_full, wb_empty, wb_pop, rb_full, rb_empty;
  logic [$clog2(WR_DEPTH):0] wb_count;
  logic [$clog2(RD_DEPTH):0] rb_count;
  logic [WORD_W-1:0] wb_data;
  logic [RW-1:0]     rb_out;
  logic [6:0]        rd_inflight;   // read words accepted but not yet in the read buffer
  logic              s_rd_valid, s_rd_first;
  logic [1:0]        s_rd_tag;
  logic [WORD_W-1:0] s_rd_data;

  wire rd_room = (32'(rb_count) + 32'(rd_inflight) + 32'(t_bl)) <= RD_DEPTH;
  assign a_ready = !q_full && (a_we ? !wb_full : rd_room);
  assign push    = a_valid && a_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_inflight <= '0;
    else rd_inflight <= rd_inflight + ((push && !a_we) ? 7'(t_bl) : 7'd0) - 7'(s_rd_valid);
  end

  data_buffer #(.W(WORD_W), .DEPTH(WR_DEPTH)) u_wbuf (
    .clk, .rst_n, .push(push && a_we), .wr_data(a_wdata), .pop(wb_pop), .rd_data(wb_data),
    .full(wb_full), .empty(wb_empty), .count(wb_count));

  data_buffer #(.W(RW), .DEPTH(RD_DEPTH)) u_rbuf (
    .clk, .rst_n, .push(s_rd_valid), .wr_data({s_rd_first, s_rd_tag, s_rd_data}), .pop(r_pop),
    .rd_data(rb_out), .full(rb_full), .empty(rb_empty), .count(rb_count));

  assign r_valid = !rb_empty;
  assign {r_first, r_tag, r_data} = rb_out;

  // ---------------- command queue ----------------
  logic             h_we;
  logic [1:0]       h_bank, h_tag;
  logic [ROW_W-1:0] h_row;
  logic [COL_W-1:0] h_col;
  acc_status_t      h_status;

  cmd_queue #(.DEPTH(QDEPTH), .ROW_W(ROW_W), .COL_W(COL_W), .TAG_W(2)) u_q (
    .clk, .rst_n, .push, .in_we(a_we), .in_bank(p_bank), .in_row(p_row), .in_col(p_col),
    .in_tag(a_tag), .full(q_full), .empty(q_empty), .pop(q_pop),
    .hd_we(h_we), .hd_bank(h_bank), .hd_row(h_row), .hd_col(h_col), .hd_tag(h_tag),
    .hd_status(h_status), .in_status(ev_status));

  // ---------------- bank controllers ----------------
  logic [3:0]       acc_valid, acc_ready, bank_idle, req_valid, req_grant;
  logic             acc_we;
  logic [ROW_W-1:0] acc_row;
  logic [COL_W-1:0] acc_col;
  logic [1:0]       acc_tag;
  sdcmd_t           req_cmd [4];
  logic [ROW_W-1:0] req_row [4];
  logic [COL_W-1:0] req_col [4];
  logic [1:0]       req_tag [4];
  logic [3:0]       row_open;
  logic [ROW_W-1:0] open_row [4];

  for (genvar b = 0; b < 4; b++) begin : g_bank
    bank_ctrl #(.ROW_W(ROW_W), .COL_W(COL_W), .TAG_W(2)) u_bank (
      .clk, .rst_n, .t_rp, .t_rcd, .t_rd_to_pre, .t_wr_to_pre,
      .acc_valid(acc_valid[b]), .acc_ready(acc_ready[b]), .acc_we, .acc_row, .acc_col, .acc_tag,
      .req_valid(req_valid[b]), .req_cmd(req_cmd[b]), .req_row(req_row[b]), .req_col(req_col[b]),
      .req_tag(req_tag[b]), .req_grant(req_grant[b]),
      .row_open(row_open[b]), .open_row(open_row[b]), .idle(bank_idle[b]));
  end

  // ---------------- scheduler ----------------
  mem_sched #(.ROW_W(ROW_W), .COL_W(COL_W), .TAG_W(2), .ADDR_W(ADDR_W)) u_sched (
    .clk, .rst_n, .sched_en, .t_cl, .t_bl,
    .q_valid(!q_empty), .q_we(h_we), .q_bank(h_bank), .q_row(h_row), .q_col(h_col), .q_tag(h_tag),
    .q_pop, .acc_valid, .acc_ready, .acc_we, .acc_row, .acc_col, .acc_tag, .bank_idle,
    .req_valid, .req_cmd, .req_row, .req_col, .req_tag, .req_grant,
    .wd_data(wb_data), .wd_count(5'(wb_count)), .wd_pop(wb_pop),
    .rd_valid(s_rd_valid), .rd_data(s_rd_data), .rd_tag(s_rd_tag), .rd_first(s_rd_first),
    .sd_cmd, .sd_ba, .sd_addr, .sd_dq_out, .sd_dq_oe, .sd_dqm, .sd_dq_in,
    .ev_overlap, .ev_dispatch_busy);

  assign ev_push       = push;
  assign ev_queue_full = a_valid && q_full;
  assign ev_pre        = (sd_cmd == SD_PRE);
  assign ev_act        = (sd_cmd == SD_ACT);

  a_no_read_overflow: assert property (@(posedge clk) disable iff (!rst_n) s_rd_valid |-> !rb_full || r_pop);

endmodule
