`timescale 1ns/1ps
// sdram_model: behavioural model of a 4-bank, 32-bit SDR SDRAM for simulation
// (the MT48LC2M32B2 class of part: 4 banks x 2048 rows x 256 columns).
//
// Samples the decoded command (sd_cmd), bank and address at every rising clock
// edge and models the part's visible behaviour:
//   ACTIVE opens a row, PRECHARGE closes it, READ returns a burst of BL words
//   starting CL cycles after the command (sequential burst, wrapping inside the
//   BL-aligned column group), WRITE stores the word on the data bus in the
//   command cycle and the following beats unless sd_dqm masks them.
// The CAS latency and burst length are inputs (the mode register).  It checks
// the timing it depends on and counts every violation: ACTIVE to an open bank,
// READ/WRITE to a closed bank, ACTIVE earlier than tRP after PRECHARGE, column
// command earlier than tRCD after ACTIVE, and the controller driving the data
// bus while read data is due.
// Storage is sparse (an associative array); words never written read as a
// fixed function of their address, so a testbench can predict them.
// The tasks poke/peek give testbenches backdoor access.
module sdram_model
  import mc_pkg::*;
#(
  parameter int unsigned TRP  = 2,
  parameter int unsigned TRCD = 2
)(
  input  logic              clk,
  input  logic [3:0]        cl,
  input  logic [3:0]        bl,
  input  sdcmd_t            cmd,
  input  logic [1:0]        ba,
  input  logic [12:0]       addr,
  input  logic [WORD_W-1:0] dq_in,
  input  logic              dq_oe,
  input  logic              dqm,
  output logic [WORD_W-1:0] dq_out
);

  logic [WORD_W-1:0] mem [int];
  logic        open_v [4];
  logic [10:0] open_r [4];
  longint      t_pre [4], t_act [4];
  longint      now;
  int          violations, n_read, n_write, n_act, n_pre;

  // read pipeline: entry k drives the bus k+1 cycles after the current edge
  logic        rp_v   [16];
  int          rp_key [16];
  // write burst in progress
  int          w_left, w_key, w_beat;

  function automatic int key(input logic [1:0] b, input logic [10:0] r, input logic [7:0] c);
    return int'({b, r, c});
  endfunction

  function automatic logic [WORD_W-1:0] default_word(input int k);
    return WORD_W'(k) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [WORD_W-1:0] rd_word(input int k);
    return mem.exists(k) ? mem[k] : default_word(k);
  endfunction

  task automatic poke(input logic [1:0] b, input logic [10:0] r, input logic [7:0] c, input logic [WORD_W-1:0] d);
    mem[key(b, r, c)] = d;
  endtask

  function automatic logic [WORD_W-1:0] peek(input logic [1:0] b, input logic [10:0] r, input logic [7:0] c);
    return rd_word(key(b, r, c));
  endfunction

  function automatic logic [7:0] burst_col(input logic [7:0] c, input int i, input int n);
    logic [7:0] m;
    m = 8'(n - 1);
    return (c & ~m) | ((c + 8'(i)) & m);
  endfunction

  initial begin
    now = 0; violations = 0; n_read = 0; n_write = 0; n_act = 0; n_pre = 0;
    w_left = 0; w_key = 0; w_beat = 0;
    dq_out = '0;
    for (int i = 0; i < 4; i++) begin
      open_v[i] = 1'b0; open_r[i] = '0; t_pre[i] = -100; t_act[i] = -100;
    end
    for (int i = 0; i < 16; i++) begin rp_v[i] = 1'b0; rp_key[i] = 0; end
  end

  always @(posedge clk) begin
    logic [7:0] c;
    now++;
    // write beats after the WRITE command
    if (w_left > 0) begin
      if (!dqm && dq_oe) mem[w_key + w_beat] = dq_in;
      w_beat++;
      w_left--;
    end
    // bus contention: read data due now and the controller drives the bus
    if (rp_v[0] && dq_oe) violations++;
    // advance the read pipeline
    for (int i = 0; i < 15; i++) begin rp_v[i] = rp_v[i+1]; rp_key[i] = rp_key[i+1]; end
    rp_v[15] = 1'b0;
    c = addr[7:0];
    unique case (cmd)
      SD_PRE: begin
        n_pre++;
        open_v[ba] = 1'b0;
        t_pre[ba] = now;
      end
      SD_ACT: begin
        n_act++;
        if (open_v[ba]) violations++;
        if (now - t_pre[ba] < longint'(TRP)) violations++;
        open_v[ba] = 1'b1;
        open_r[ba] = addr[10:0];
        t_act[ba] = now;
      end
      SD_READ: begin
        n_read++;
        if (!open_v[ba]) violations++;
        if (now - t_act[ba] < longint'(TRCD)) violations++;
        for (int i = 0; i < int'(bl); i++) begin
          rp_v[int'(cl) - 1 + i]   = 1'b1;
          rp_key[int'(cl) - 1 + i] = key(ba, open_r[ba], burst_col(c, i, int'(bl)));
        end
      end
      SD_WRIT: begin
        n_write++;
        if (!open_v[ba]) violations++;
        if (now - t_act[ba] < longint'(TRCD)) violations++;
        if (!dq_oe) violations++;
        if (!dqm) mem[key(ba, open_r[ba], c)] = dq_in;
        // later beats of a masked burst are not stored; sequential columns otherwise
        w_key  = key(ba, open_r[ba], c & ~8'(int'(bl) - 1));
        w_beat = int'(c & 8'(int'(bl) - 1)) + 1;
        w_left = int'(bl) - 1;
      end
      default: ;
    endcase
    dq_out <= rp_v[0] ? rd_word(rp_key[0]) : '0;
  end

endmodule
