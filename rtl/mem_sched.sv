// mem_sched: master bank controller, memory interface scheduler (MIS) and
// SDRAM command/data arbiter.
//
// Master bank controller: takes the command at the head of the command queue
// and assigns it to the bank controller of its bank as soon as that controller
// can accept it.  Commands are assigned in queue order, so while one bank waits
// for its PRECHARGE/ACTIVE latencies the next command, if it is for another
// bank, is already assigned and starts its own row commands.
// Scheduler: every cycle at most one command goes on the SDRAM command bus,
// chosen from the bank controllers' requests:
//   * column commands (READ/WRITE) are issued strictly in the order their
//     accesses were assigned, so read data comes back in queue order;
//     a READ is issued as soon as its burst, CL cycles later, follows the data
//     already on the bus without a gap; a WRITE when the data bus is free (one
//     idle cycle after read data) and its word is in the write data buffer;
//   * otherwise the oldest bank that wants PRECHARGE or ACTIVE gets the bus.
//     These row commands overlap the data bursts of other banks, which is where
//     the scheduling gains cycles.
// With sched_en = 0 the controller runs unscheduled: an access is assigned only
// when every bank is idle and the previous burst has left the data bus, so the
// row commands of one access never overlap another access.  (For CL = 2, BL = 4,
// tRP = tRCD = 2, two reads that miss their rows in different banks take 20
// cycles unscheduled and 14 scheduled, first command to last data word.)
// Arbiter: read data is sampled CL cycles after READ for BL cycles and handed
// out with the tag of its command (rd_first marks the first word of a burst);
// a WRITE stores one word: it is taken from the write data buffer and driven
// with the WRITE command, and the data mask (sd_dqm) masks the BL-1 following
// beats, so single words can be written whatever burst length the reads use.
//
// SDRAM pins: sd_cmd (decoded command), sd_ba, sd_addr (row for ACTIVE, column
// for READ/WRITE with A10 = 0: no auto precharge, A10 = 0 on PRECHARGE: this
// bank only), sd_dq_out/sd_dq_oe and sd_dq_in.  Commands are combinational from
// registered state and valid in the cycle they are shown.  The split into bank
// controllers and master bank controller, the overlapping of row commands with
// bursts of other banks and the tagged read buffer follow the design; the
// in-order column rule, the oldest-first choice of row commands, the
// read-to-write gap and the single-word masked write are this module's choices.
// Several outputs are plain wires from inputs on purpose: the head-of-queue
// fields go unchanged to the bank controllers (acc_*), the write word from the
// write data buffer to sd_dq_out and the SDRAM data pins to rd_data.
module mem_sched
  import mc_pkg::*;
#(
  parameter int unsigned ROW_W = 11,
  parameter int unsigned COL_W = 8,
  parameter int unsigned TAG_W = 2,
  parameter int unsigned ADDR_W = 13
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sched_en,
  input  logic [3:0]        t_cl,
  input  logic [3:0]        t_bl,
  // command queue head
  input  logic              q_valid,
  input  logic              q_we,
  input  logic [1:0]        q_bank,
  input  logic [ROW_W-1:0]  q_row,
  input  logic [COL_W-1:0]  q_col,
  input  logic [TAG_W-1:0]  q_tag,
  output logic              q_pop,
  // bank controllers
  output logic [3:0]        acc_valid,
  input  logic [3:0]        acc_ready,
  output logic              acc_we,
  output logic [ROW_W-1:0]  acc_row,
  output logic [COL_W-1:0]  acc_col,
  output logic [TAG_W-1:0]  acc_tag,
  input  logic [3:0]        bank_idle,
  input  logic [3:0]        req_valid,
  input  sdcmd_t            req_cmd [4],
  input  logic [ROW_W-1:0]  req_row [4],
  input  logic [COL_W-1:0]  req_col [4],
  input  logic [TAG_W-1:0]  req_tag [4],
  output logic [3:0]        req_grant,
  // write data buffer
  input  logic [WORD_W-1:0] wd_data,
  input  logic [4:0]        wd_count,
  output logic              wd_pop,
  // read data out
  output logic              rd_valid,
  output logic [WORD_W-1:0] rd_data,
  output logic [TAG_W-1:0]  rd_tag,
  output logic              rd_first,
  // SDRAM pins
  output sdcmd_t            sd_cmd,
  output logic [1:0]        sd_ba,
  output logic [ADDR_W-1:0] sd_addr,
  output logic [WORD_W-1:0] sd_dq_out,
  output logic              sd_dq_oe,
  output logic              sd_dqm,
  input  logic [WORD_W-1:0] sd_dq_in,
  // events (one-cycle pulses, for statistics)
  output logic              ev_overlap,   // row command issued while the data bus is busy
  output logic              ev_dispatch_busy  // access assigned while another bank is active
);

  localparam int unsigned PD = 8;   // read pipeline depth, >= CL + BL - 1

  // ---------------- tickets: banks in assignment order ----------------
  logic [1:0] tk [4];
  logic [2:0] tk_n;

  // ---------------- data bus state ----------------
  logic [4:0] bus_left;     // cycles until the data bus is free
  logic       rd_beat_d;    // read data on the bus last cycle
  logic [3:0] w_left;       // write beats still to drive after the WRITE cycle
  typedef struct packed { logic v; logic first; logic [TAG_W-1:0] tag; } beat_t;
  beat_t      rpipe [PD];

  wire all_quiet = (bank_idle == 4'hF) && (bus_left <= 5'd1) && (rpipe[1].v == 1'b0);

  // ---------------- master bank controller: assignment ----------------
  always_comb begin
    logic ok;
    ok        = q_valid && acc_ready[q_bank] && (tk_n < 3'd4) && (sched_en || all_quiet);
    acc_valid = ok ? (4'b0001 << q_bank) : 4'b0000;
    q_pop     = ok;
    acc_we    = q_we;
    acc_row   = q_row;
    acc_col   = q_col;
    acc_tag   = q_tag;
  end

  // ---------------- command choice ----------------
  logic       cas_ok, any_pick, pick_cas;
  logic [1:0] pick;

  always_comb begin
    logic [1:0] hb;
    hb       = tk[0];
    cas_ok   = 1'b0;
    any_pick = 1'b0;
    pick_cas = 1'b0;
    pick     = '0;
    if (tk_n != 3'd0 && req_valid[hb] && (req_cmd[hb] == SD_READ || req_cmd[hb] == SD_WRIT)) begin
      if (req_cmd[hb] == SD_READ)
        cas_ok = ({1'b0, t_cl} >= bus_left) && (w_left == 4'd0);
      else
        cas_ok = (bus_left == 5'd0) && !rd_beat_d && (wd_count != 5'd0);
    end
    if (cas_ok) begin
      any_pick = 1'b1; pick_cas = 1'b1; pick = hb;
    end else begin
      for (int i = 3; i >= 0; i--) begin
        if (i < int'(tk_n) && req_valid[tk[i]] &&
            (req_cmd[tk[i]] == SD_PRE || req_cmd[tk[i]] == SD_ACT)) begin
          any_pick = 1'b1; pick = tk[i];
        end
      end
    end
  end

  always_comb begin
    req_grant = any_pick ? (4'b0001 << pick) : 4'b0000;
    sd_cmd    = any_pick ? req_cmd[pick] : SD_NOP;
    sd_ba     = pick;
    sd_addr   = '0;
    if (any_pick) begin
      if (req_cmd[pick] == SD_ACT) sd_addr = ADDR_W'(req_row[pick]);
      else if (pick_cas)           sd_addr = ADDR_W'(req_col[pick]);
    end
  end

  // ---------------- write data ----------------
  wire wr_now = any_pick && pick_cas && (req_cmd[pick] == SD_WRIT);
  assign wd_pop    = wr_now;
  assign sd_dq_oe  = wr_now || (w_left != 4'd0);
  assign sd_dqm    = (w_left != 4'd0);
  assign sd_dq_out = wd_data;

  // ---------------- read data ----------------
  assign rd_valid = rpipe[0].v;
  assign rd_first = rpipe[0].first;
  assign rd_tag   = rpipe[0].tag;
  assign rd_data  = sd_dq_in;

  assign ev_overlap       = any_pick && !pick_cas && (bus_left != 5'd0);
  assign ev_dispatch_busy = q_pop && (bank_idle != 4'hF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) tk[i] <= '0;
      tk_n      <= '0;
      bus_left  <= '0;
      rd_beat_d <= 1'b0;
      w_left    <= '0;
      for (int i = 0; i < int'(PD); i++) rpipe[i] <= '0;
    end else begin
      // tickets: pop on column command, push on assignment
      begin
        logic [1:0] t [4];
        logic [2:0] n;
        for (int i = 0; i < 4; i++) t[i] = tk[i];
        n = tk_n;
        if (any_pick && pick_cas) begin
          for (int i = 0; i < 3; i++) t[i] = t[i+1];
          n = n - 3'd1;
        end
        if (q_pop) begin
          t[n[1:0]] = q_bank;
          n = n + 3'd1;
        end
        for (int i = 0; i < 4; i++) tk[i] <= t[i];
        tk_n <= n;
      end
      // data bus
      rd_beat_d <= rpipe[0].v;
      if (any_pick && pick_cas && req_cmd[pick] == SD_READ)
        bus_left <= 5'(t_cl) + 5'(t_bl) - 5'd1;
      else if (wr_now)
        bus_left <= 5'(t_bl) - 5'd1;
      else if (bus_left != 5'd0)
        bus_left <= bus_left - 5'd1;
      if (wr_now) w_left <= t_bl - 4'd1;
      else if (w_left != 4'd0) w_left <= w_left - 4'd1;
      // read return pipeline
      begin
        beat_t p [PD];
        for (int i = 0; i < int'(PD) - 1; i++) p[i] = rpipe[i+1];
        p[PD-1] = '0;
        if (any_pick && pick_cas && req_cmd[pick] == SD_READ)
          for (int i = 0; i < 4; i++)
            if (i < int'(t_bl)) begin
              p[int'(t_cl) - 1 + i] = '{v: 1'b1, first: (i == 0), tag: req_tag[pick]};
            end
        for (int i = 0; i < int'(PD); i++) rpipe[i] <= p[i];
      end
    end
  end

  a_one_cas_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    (any_pick && pick_cas) |-> (tk_n != 3'd0) && (pick == tk[0]));
  a_tickets_bounded: assert property (@(posedge clk) disable iff (!rst_n) tk_n <= 3'd4);

endmodule
