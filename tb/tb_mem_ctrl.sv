`timescale 1ns/1ps
// tb_mem_ctrl: self-checking test of the SDRAM memory controller against the
// behavioural SDRAM model.
//
// 1. Scheduling gain: with CL = 2, BL = 4, tRP = tRCD = 2, two reads that miss
//    their open rows in two different banks are timed from the first SDRAM
//    command to the last data word on the bus: 14 cycles scheduled (row
//    commands of the second bank overlap the first access) and 20 unscheduled.
// 2. Access status detection of the command queue: bank-hit/row-hit,
//    bank-hit/row-miss, bank-miss/row-hit and bank-miss/row-miss are each
//    produced by a chosen pair of consecutive accesses.
// 3. Data: channel-2 (de-blocking) writes of luma and chroma words and channel-0
//    writes of motion vectors land at the physical addresses of the frame
//    layout (checked in the model); channel-0 and channel-1 reads return the
//    stored words in request order with their channel tags; a channel-1 window
//    request of n columns x m words yields n*m words in column-major order.
// 4. The model reports no timing violation.
module tb_mem_ctrl;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              sched_en, cfg_we, tbl_we;
  logic [3:0]        cfg_trp, cfg_trcd, cfg_cl, cfg_bl, cfg_twr;
  logic [4:0]        tbl_idx;
  logic [10:0]       tbl_row;
  logic              c0_valid, c0_ready, c0_we;
  logic [4:0]        c0_frame, c1_frame, c2_frame;
  logic [11:0]       c0_mbx, c0_mby, c1_x, c1_y, c2_x, c2_y;
  logic [1:0]        c0_mvk, c1_nwords, r_tag;
  logic [WORD_W-1:0] c0_wdata, c2_wdata, r_data;
  logic              c1_valid, c1_ready, c1_chroma, c1_comp, c1_busy;
  logic [4:0]        c1_ncols;
  logic              c2_valid, c2_ready, c2_chroma, c2_comp;
  logic              r_valid, r_first, r_pop;
  sdcmd_t            sd_cmd;
  logic [1:0]        sd_ba;
  logic [12:0]       sd_addr;
  logic [WORD_W-1:0] sd_dq_out, sd_dq_in;
  logic              sd_dq_oe, sd_dqm;
  logic              ev_push, ev_queue_full, ev_overlap, ev_dispatch_busy, ev_pre, ev_act;
  acc_status_t       ev_status;

  mem_ctrl dut (.*);

  sdram_model u_sd (
    .clk, .cl(dut.t_cl), .bl(dut.t_bl), .cmd(sd_cmd), .ba(sd_ba), .addr(sd_addr),
    .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dqm(sd_dqm), .dq_out(sd_dq_in));

  initial begin
    #2ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int WMB = 120;
  int fbase [4] = '{0, 100, 600, 1200};

  function automatic void map_mv(int f, int mx, int my, int k, output logic [1:0] b, output logic [10:0] r, output logic [7:0] c);
    int n;
    n = my * WMB + mx;
    b = 2'(k); c = 8'(n & 255); r = 11'(fbase[f] + (n >> 8));
  endfunction
  function automatic void map_luma(int f, int x, int y, output logic [1:0] b, output logic [10:0] r, output logic [7:0] c);
    int n, lin;
    n = (y >> 4) * WMB + (x >> 4);
    b = 2'(((y >> 3) & 1) * 2 + ((x >> 3) & 1));
    lin = n * 16 + (((y >> 2) & 1) * 2 + ((x >> 2) & 1)) * 4 + (x & 3);
    c = 8'(lin & 255); r = 11'(fbase[f] + 32 + (lin >> 8));
  endfunction
  function automatic void map_chroma(int f, int comp, int x, int y, output logic [1:0] b, output logic [10:0] r, output logic [7:0] c);
    int n, lin;
    n = (y >> 3) * WMB + (x >> 3);
    b = 2'(((y >> 2) & 1) * 2 + ((x >> 2) & 1));
    lin = n * 8 + comp * 4 + (x & 3);
    c = 8'(lin & 255); r = 11'(fbase[f] + 32 + 510 + (lin >> 8));
  endfunction

  task automatic neg(); @(negedge clk); endtask

  // expected read words, in order
  logic [WORD_W-1:0] exp_d [$];
  logic [1:0]        exp_t [$];
  int n_rd;

  // read data sink: pops every word, checks first words of each burst
  always @(posedge clk) if (rst_n && r_valid && r_pop && r_first) begin
    checks++;
    n_rd++;
    if (exp_d.size() == 0) begin
      failures++; $display("unexpected read word %h", r_data);
    end else begin
      logic [WORD_W-1:0] d; logic [1:0] t;
      d = exp_d.pop_front(); t = exp_t.pop_front();
      if (r_data !== d || r_tag !== t) begin
        failures++; $display("read: got %h tag %0d, expected %h tag %0d", r_data, r_tag, d, t);
      end
    end
  end
  assign r_pop = r_valid;

  int st_cnt [4];
  acc_status_t st_log [$];
  always @(posedge clk) if (rst_n && ev_push) begin
    st_cnt[ev_status]++;
    st_log.push_back(ev_status);
  end

  // timing of the last reads
  int cyc, t_first_cmd, t_last_beat, beats;
  bit timing;
  always @(posedge clk) begin
    cyc++;
    if (timing) begin
      if (sd_cmd != SD_NOP && t_first_cmd < 0) t_first_cmd = cyc;
      // s_rd_valid is high while the word is on the bus (sampled at this edge)
      if (dut.s_rd_valid) begin beats++; t_last_beat = cyc; end
    end
  end

  task automatic c0_read(int f, int mx, int my, int k);
    logic [1:0] b; logic [10:0] r; logic [7:0] c;
    map_mv(f, mx, my, k, b, r, c);
    exp_d.push_back(u_sd.peek(b, r, c)); exp_t.push_back(2'd0);
    c0_valid = 1; c0_we = 0; c0_frame = 5'(f); c0_mbx = 12'(mx); c0_mby = 12'(my); c0_mvk = 2'(k);
    do neg(); while (!c0_ready);
    c0_valid = 0;
  endtask

  task automatic wait_idle();
    while (exp_d.size() != 0 || !(&dut.bank_idle) || !dut.q_empty) neg();
    repeat (12) neg();
  endtask

  task automatic cfg(int cl, int bl);
    cfg_cl = 4'(cl); cfg_bl = 4'(bl); cfg_trp = 2; cfg_trcd = 2; cfg_twr = 2;
    cfg_we = 1; neg(); cfg_we = 0; neg();
  endtask

  // two row-miss reads in banks 0 and 1; returns first command to last data word
  task automatic timed_pair(bit sch, output int cycles);
    sched_en = sch;
    c0_read(1, 0, 0, 0);      // open rows of frame 1 in banks 0 and 1
    c0_read(1, 0, 0, 1);
    wait_idle();
    t_first_cmd = -1; beats = 0; timing = 1;
    c0_read(2, 0, 0, 0);      // same banks, rows of frame 2
    c0_read(2, 0, 0, 1);
    wait_idle();
    timing = 0;
    cycles = t_last_beat - t_first_cmd + 1;
    checks++;
    if (beats != 8) begin failures++; $display("expected 8 beats, got %0d", beats); end
  endtask

  initial begin
    logic [1:0] b; logic [10:0] r; logic [7:0] c;
    int t_s, t_u;
    sched_en = 1; cfg_we = 0; cfg_trp = 2; cfg_trcd = 2; cfg_cl = 3; cfg_bl = 4; cfg_twr = 2;
    tbl_we = 0; tbl_idx = 0; tbl_row = 0;
    c0_valid = 0; c0_we = 0; c0_frame = 0; c0_mbx = 0; c0_mby = 0; c0_mvk = 0; c0_wdata = 0;
    c1_valid = 0; c1_frame = 0; c1_chroma = 0; c1_comp = 0; c1_x = 0; c1_y = 0; c1_ncols = 0; c1_nwords = 0;
    c2_valid = 0; c2_frame = 0; c2_chroma = 0; c2_comp = 0; c2_x = 0; c2_y = 0; c2_wdata = 0;
    cyc = 0; timing = 0; t_first_cmd = -1; t_last_beat = 0; beats = 0; n_rd = 0;
    for (int i = 0; i < 4; i++) st_cnt[i] = 0;
    repeat (3) neg();
    rst_n = 1;
    neg();
    for (int f = 1; f < 4; f++) begin
      tbl_we = 1; tbl_idx = 5'(f); tbl_row = 11'(fbase[f]); neg();
    end
    tbl_we = 0;

    // ---- 1. scheduled vs unscheduled ----
    cfg(2, 4);
    timed_pair(1'b1, t_s);
    timed_pair(1'b0, t_u);
    $display("two row-miss reads, different banks: scheduled %0d cycles, unscheduled %0d cycles", t_s, t_u);
    checks += 2;
    if (t_s != 14) begin failures++; $display("scheduled: expected 14 cycles"); end
    if (t_u != 20) begin failures++; $display("unscheduled: expected 20 cycles"); end

    // ---- 2. access status ----
    sched_en = 1;
    st_log.delete();
    c0_read(1, 0, 0, 2);     // bank 2 row A
    c0_read(1, 1, 0, 2);     // bank 2 row A            : bank hit, row hit
    c0_read(2, 1, 0, 2);     // bank 2 row B            : bank hit, row miss
    c0_read(2, 1, 0, 3);     // bank 3 row B            : bank miss, row hit
    c0_read(1, 1, 0, 0);     // bank 0 row A            : bank miss, row miss
    wait_idle();
    checks++;
    if (st_log.size() != 5 || st_log[1] != ST_BANKHIT_ROWHIT || st_log[2] != ST_BANKHIT_ROWMISS ||
        st_log[3] != ST_BANKMISS_ROWHIT || st_log[4] != ST_BANKMISS_ROWMISS) begin
      failures++;
      $display("access status sequence wrong (%0d entries)", st_log.size());
    end

    // ---- 3. writes and reads through all channels ----
    cfg(3, 2);
    // de-blocking writes: 6 luma words, 2 Cb, 2 Cr (frame 3)
    for (int i = 0; i < 10; i++) begin
      c2_valid = 1; c2_frame = 5'd3; c2_chroma = (i >= 6); c2_comp = (i >= 8);
      c2_x = (i < 6) ? 12'(16 + 3 * i) : 12'(40 + i); c2_y = (i < 6) ? 12'(4 * i) : 12'd8;
      c2_wdata = 32'hC2C2_0000 + 32'(i);
      do neg(); while (!c2_ready);
      c2_valid = 0;
    end
    // motion-vector writes (channel 0), frame 3, MB (5, 2)
    for (int k = 0; k < 4; k++) begin
      c0_valid = 1; c0_we = 1; c0_frame = 5'd3; c0_mbx = 12'd5; c0_mby = 12'd2; c0_mvk = 2'(k);
      c0_wdata = 32'h000A_0000 + 32'(k);
      do neg(); while (!c0_ready);
      c0_valid = 0; c0_we = 0;
    end
    wait_idle();
    for (int i = 0; i < 10; i++) begin
      if (i < 6) map_luma(3, 16 + 3 * i, 4 * i, b, r, c);
      else map_chroma(3, (i >= 8) ? 1 : 0, 40 + i, 8, b, r, c);
      checks++;
      if (u_sd.peek(b, r, c) !== 32'hC2C2_0000 + 32'(i)) begin
        failures++; $display("de-blocking word %0d not at its address", i);
      end
    end
    for (int k = 0; k < 4; k++) begin
      map_mv(3, 5, 2, k, b, r, c);
      checks++;
      if (u_sd.peek(b, r, c) !== 32'h000A_0000 + 32'(k)) begin
        failures++; $display("MV word %0d not at its address", k);
      end
    end
    // read back the MV words through channel 0
    for (int k = 0; k < 4; k++) c0_read(3, 5, 2, k);
    wait_idle();
    // window request: 5 columns x 3 words of frame 1 luma at (21, 8), then chroma 3 x 2
    for (int x = 21; x < 26; x++)
      for (int w = 0; w < 3; w++) begin
        map_luma(1, x, 8 + 4 * w, b, r, c);
        exp_d.push_back(u_sd.peek(b, r, c)); exp_t.push_back(2'd1);
      end
    c1_valid = 1; c1_frame = 5'd1; c1_chroma = 0; c1_comp = 0; c1_x = 12'd21; c1_y = 12'd8;
    c1_ncols = 5'd5; c1_nwords = 2'd3;
    do neg(); while (!c1_ready);
    c1_valid = 0;
    while (c1_busy) neg();
    for (int x = 9; x < 12; x++)
      for (int w = 0; w < 2; w++) begin
        map_chroma(2, 1, x, 4 + 4 * w, b, r, c);
        exp_d.push_back(u_sd.peek(b, r, c)); exp_t.push_back(2'd1);
      end
    c1_valid = 1; c1_frame = 5'd2; c1_chroma = 1; c1_comp = 1; c1_x = 12'd9; c1_y = 12'd4;
    c1_ncols = 5'd3; c1_nwords = 2'd2;
    do neg(); while (!c1_ready);
    c1_valid = 0;
    wait_idle();
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("%0d reads never returned", exp_d.size()); end
    checks++;
    if (u_sd.violations != 0) begin failures++; $display("SDRAM timing violations: %0d", u_sd.violations); end
    $display("reads checked %0d, status counts %0d %0d %0d %0d", n_rd, st_cnt[0], st_cnt[1], st_cnt[2], st_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
