// bank_ctrl: per-bank controller of the SDRAM memory controller.
//
// One instance per SDRAM bank.  It takes one access at a time (row, column,
// read/write, tag) from the master bank controller, remembers which row of its
// bank is open (the row register, rows are left open: manual precharge), and
// asks the scheduler for the commands the access needs:
//   row hit           : READ/WRITE
//   row miss          : PRECHARGE, tRP later ACTIVE, tRCD later READ/WRITE
//   bank idle (closed): ACTIVE, tRCD later READ/WRITE
// All waits go through one shared NOP state: on a granted command the FSM loads
// the wait (NOP_count) and the command to request when it expires (NOP_code),
// instead of one wait state per command.  After the column command the bank
// waits until a precharge would be legal (BL cycles after a read, BL + tWR
// after a write) before it accepts an access that needs one.  An access to the
// open row is accepted during that wait and goes straight to its column
// command, so successive accesses to one bank do not return through IDLE (the
// design resolves same-bank conflicts with a second access FSM per bank; this
// bank controller does it with this early accept, which covers the row-hit
// case, the only one a second FSM could speed up).
//
// Interface: acc_valid/acc_ready accept an access (ready in IDLE, and for an
// open-row access during the wait after a column command).
// req_valid/req_cmd/req_row/req_col present the wanted command; req_grant from
// the scheduler means it is on the SDRAM pins this cycle, and the FSM moves on
// at the clock edge.  The row register, the shared NOP state and manual
// precharge follow the design; the busy time after a column command is this
// module's own rule for keeping PRECHARGE legal.
module bank_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned ROW_W = 11,
  parameter int unsigned COL_W = 8,
  parameter int unsigned TAG_W = 2
)(
  input  logic             clk,
  input  logic             rst_n,
  // timing (from timing_unit)
  input  logic [3:0]       t_rp,
  input  logic [3:0]       t_rcd,
  input  logic [4:0]       t_rd_to_pre,
  input  logic [4:0]       t_wr_to_pre,
  // access from the master bank controller
  input  logic             acc_valid,
  output logic             acc_ready,
  input  logic             acc_we,
  input  logic [ROW_W-1:0] acc_row,
  input  logic [COL_W-1:0] acc_col,
  input  logic [TAG_W-1:0] acc_tag,
  // command request to the scheduler
  output logic             req_valid,
  output sdcmd_t           req_cmd,
  output logic [ROW_W-1:0] req_row,
  output logic [COL_W-1:0] req_col,
  output logic [TAG_W-1:0] req_tag,
  input  logic             req_grant,
  // status
  output logic             row_open,
  output logic [ROW_W-1:0] open_row,
  output logic             idle
);

  typedef enum logic [2:0] {B_IDLE, B_PRE, B_ACT, B_CAS, B_NOP} bstate_t;

  bstate_t          st, nop_code, w_next;
  logic [4:0]       w_cy;
  logic             w_go;
  logic [4:0]       nop_count;
  logic             c_we;
  logic [ROW_W-1:0] c_row;
  logic [COL_W-1:0] c_col;
  logic [TAG_W-1:0] c_tag;

  wire early_hit = (st == B_NOP) && (nop_code == B_IDLE) && row_open && (open_row == acc_row);

  assign acc_ready = (st == B_IDLE) || early_hit;
  assign idle      = (st == B_IDLE);
  assign req_valid = (st == B_PRE) || (st == B_ACT) || (st == B_CAS);
  assign req_row   = c_row;
  assign req_col   = c_col;
  assign req_tag   = c_tag;

  always_comb begin
    w_go   = req_grant && req_valid;
    w_cy   = 5'd1;
    w_next = B_IDLE;
    unique case (st)
      B_PRE:   begin w_cy = {1'b0, t_rp};  w_next = B_ACT; end
      B_ACT:   begin w_cy = {1'b0, t_rcd}; w_next = B_CAS; end
      B_CAS:   begin w_cy = c_we ? t_wr_to_pre : t_rd_to_pre; w_next = B_IDLE; end
      default: w_go = 1'b0;
    endcase
  end

  always_comb begin
    unique case (st)
      B_PRE:   req_cmd = SD_PRE;
      B_ACT:   req_cmd = SD_ACT;
      B_CAS:   req_cmd = c_we ? SD_WRIT : SD_READ;
      default: req_cmd = SD_NOP;
    endcase
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; nop_code <= B_IDLE; nop_count <= '0;
      c_we <= 1'b0; c_row <= '0; c_col <= '0; c_tag <= '0;
      row_open <= 1'b0; open_row <= '0;
    end else begin
      unique case (st)
        B_IDLE:
          if (acc_valid) begin
            c_we  <= acc_we;
            c_row <= acc_row;
            c_col <= acc_col;
            c_tag <= acc_tag;
            if (!row_open)                st <= B_ACT;
            else if (open_row == acc_row) st <= B_CAS;
            else                          st <= B_PRE;
          end
        B_PRE:
          if (req_grant) begin
            row_open <= 1'b0;
          end
        B_ACT:
          if (req_grant) begin
            row_open <= 1'b1;
            open_row <= c_row;
          end
        B_CAS: ;
        B_NOP:
          if (acc_valid && early_hit) begin
            c_we  <= acc_we;
            c_row <= acc_row;
            c_col <= acc_col;
            c_tag <= acc_tag;
            st    <= B_CAS;
          end else if (nop_count <= 5'd1) st <= nop_code;
          else                   nop_count <= nop_count - 5'd1;
        default: st <= B_IDLE;
      endcase
      // a granted command: go to the next step after its latency, through the
      // shared NOP state when the latency is longer than one cycle
      if (w_go) begin
        if (w_cy <= 5'd1) st <= w_next;
        else begin
          st        <= B_NOP;
          nop_code  <= w_next;
          nop_count <= w_cy - 5'd1;
        end
      end
    end
  end

  a_grant_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) req_grant |-> req_valid);

endmodule
