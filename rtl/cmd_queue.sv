// cmd_queue: command and address queue with access status detection.
//
// A first-in-first-out queue of 7 READ/WRITE commands with their physical
// address (bank, row, column) and the tag of the channel that issued them.  A
// unit hands over a command in one cycle and goes on with its own work; the
// memory controller drains the queue in order.  `full` tells the issuing side
// to hold its request.
// On entry every command is compared with the previous command entered, and the
// access status is stored with it:
//   bank-hit  row-hit  : same bank, same row
//   bank-hit  row-miss : same bank, other row
//   bank-miss row-hit  : other bank, same row number
//   bank-miss row-miss : other bank, other row
// The status travels with the command; the scheduler and the statistics use it
// (row hits inside a bank are also detected by the bank controllers' row
// registers).
//
// Timing: a push is visible at the head the next cycle; pop removes the head.
// Depth 7 and the four statuses follow the design; the queue storage (a circular
// buffer with a count) and the first command after reset being compared with an
// all-zero address are this module's choices.
module cmd_queue
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 7,
  parameter int unsigned ROW_W = 11,
  parameter int unsigned COL_W = 8,
  parameter int unsigned TAG_W = 2
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             in_we,
  input  logic [1:0]       in_bank,
  input  logic [ROW_W-1:0] in_row,
  input  logic [COL_W-1:0] in_col,
  input  logic [TAG_W-1:0] in_tag,
  output logic             full,
  output logic             empty,
  input  logic             pop,
  output logic             hd_we,
  output logic [1:0]       hd_bank,
  output logic [ROW_W-1:0] hd_row,
  output logic [COL_W-1:0] hd_col,
  output logic [TAG_W-1:0] hd_tag,
  output acc_status_t      hd_status,
  output acc_status_t      in_status
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic             we;
    logic [1:0]       bank;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    logic [TAG_W-1:0] tag;
    acc_status_t      status;
  } entry_t;

  entry_t           q [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;
  logic [1:0]       prev_bank;
  logic [ROW_W-1:0] prev_row;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);

  always_comb begin
    unique case ({in_bank == prev_bank, in_row == prev_row})
      2'b11:   in_status = ST_BANKHIT_ROWHIT;
      2'b10:   in_status = ST_BANKHIT_ROWMISS;
      2'b01:   in_status = ST_BANKMISS_ROWHIT;
      default: in_status = ST_BANKMISS_ROWMISS;
    endcase
  end

  assign hd_we     = q[rp].we;
  assign hd_bank   = q[rp].bank;
  assign hd_row    = q[rp].row;
  assign hd_col    = q[rp].col;
  assign hd_tag    = q[rp].tag;
  assign hd_status = q[rp].status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
      prev_bank <= '0; prev_row <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      if (do_push) begin
        q[wp]     <= '{we: in_we, bank: in_bank, row: in_row, col: in_col, tag: in_tag, status: in_status};
        wp        <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
        prev_bank <= in_bank;
        prev_row  <= in_row;
      end
      if (do_pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_push_not_full: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
