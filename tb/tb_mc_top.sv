`timescale 1ns/1ps
// tb_mc_top: end-to-end test of the motion-compensation engine with its SDRAM
// memory controller, at the default (1920x1088, 17 frames, 4 x 2048 x 256 x 32)
// parameters, against the behavioural SDRAM model.
//
// Reference frames 1 (list 0) and 2 (list 1) are loaded into the model through
// its backdoor, using the frame layout of the address translator, from a hash
// of (frame, plane, x, y).  The frame start table is reprogrammed first.  Nine
// macroblocks are decoded in three phases:
//   A  CAS latency 3, burst 4, scheduling on, default weighted prediction:
//      MB row 0, columns 0-4 (16x16 list 0, 16x16 bi, 16x8 list 0, four
//      8x8 list 1, 8x16 list 0), all MVP + MVD; the cycles this phase takes are
//      printed;
//   B  CAS latency 2, burst 1, scheduling on, explicit weighted prediction,
//      de-blocking writes running at the same time: MB (0,1) 16x16 bi,
//      MB (1,1) 16x8 list 1;
//   C  CAS latency 3, burst 2, scheduling off, implicit weighted prediction:
//      MB (2,1) temporal direct, four 8x8 partitions, from co-located vectors
//      stored in frame 2; MB (3,1) spatial direct, both lists.
// For every output column the testbench computes the expected vector (median /
// directional prediction, temporal scaling), the H.264 luma and chroma
// interpolation, the weighted prediction and the reconstruction with a known
// residual, and compares prediction and reconstruction.  Every macroblock must
// produce its 128 columns exactly once.  At the end the co-located vectors
// written for the current frame and the de-blocking words are read back.
// Mechanism counters (reuse kinds, bi/single prediction, weighted-prediction
// modes, MV modes, access statuses, queue full, command overlap, dispatch while
// busy, unscheduled mode, chroma, co-located read and write, de-blocking write)
// must all be non-zero, and the SDRAM model must report no timing violation.
module tb_mc_top;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  logic        sched_en, cfg_we, tbl_we;
  logic [3:0]  cfg_trp, cfg_trcd, cfg_cl, cfg_bl, cfg_twr;
  logic [4:0]  tbl_idx, col_frame, cur_frame, db_frame;
  logic [10:0] tbl_row;
  logic signed [POC_W-1:0] curr_poc, list0_poc, list1_poc;
  logic [4:0]  ref_frame [2];
  wpmode_t     wp_mode;
  logic signed [9:0] exp_w [2];
  logic signed [7:0] exp_o [2];
  logic [2:0]  log_wd;
  logic        mb_start, need_col, mb_end, mb_ready, end_ready;
  logic [7:0]  mb_x, mb_y;
  logic        cmd_valid, cmd_ready, cmd_list, mc_busy;
  part_t       cmd_part;
  logic [3:0]  cmd_idx;
  mvmode_t     cmd_mode;
  mv_t         cmd_mvd;
  logic        pred_valid;
  logic [1:0]  pred_plane, pred_col, res_plane, res_col;
  logic [3:0]  pred_blk, res_blk;
  logic [PIX_W-1:0] pred [4], recon [4];
  logic signed [8:0] residual [4];
  logic        db_valid, db_ready, db_chroma, db_comp;
  logic [11:0] db_x, db_y;
  logic [WORD_W-1:0] db_wdata;
  sdcmd_t      sd_cmd;
  logic [1:0]  sd_ba;
  logic [12:0] sd_addr;
  logic [WORD_W-1:0] sd_dq_out, sd_dq_in;
  logic        sd_dq_oe, sd_dqm;
  logic        ev_hreuse, ev_vreuse, ev_block, ev_bi, ev_push, ev_queue_full, ev_overlap;
  logic        ev_dispatch_busy, ev_pre, ev_act;
  acc_status_t ev_status;

  mc_top dut (.*);

  // the model follows the controller's mode register
  sdram_model #(.TRP(2), .TRCD(2)) u_sd (
    .clk, .cl(dut.u_mem.t_cl), .bl(dut.u_mem.t_bl), .cmd(sd_cmd), .ba(sd_ba), .addr(sd_addr),
    .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dqm(sd_dqm), .dq_out(sd_dq_in));

  // ---------------- watchdog ----------------
  initial begin
    #20ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference pictures and frame layout ----------------
  localparam int WMB = 120;
  int fbase [4] = '{0, 100, 900, 1700};

  function automatic int pix(int f, int pl, int x, int y);
    int unsigned h;
    h = x * 32'h9E37 + y * 32'h85EB + f * 32'hC2B2 + pl * 32'h27D4 + 7;
    h = h ^ (h >> 7);
    h = h * 32'h2545;
    return int'((h >> 9) & 255);
  endfunction

  task automatic map_luma(int f, int x, int y, output logic [1:0] b, output logic [10:0] r, output logic [7:0] c);
    int n, lin;
    n = (y >> 4) * WMB + (x >> 4);
    b = 2'(((y >> 3) & 1) * 2 + ((x >> 3) & 1));
    lin = n * 16 + ((((y >> 2) & 1) << 1) | ((x >> 2) & 1)) * 4 + (x & 3);
    c = 8'(lin & 255);
    r = 11'(fbase[f] + 32 + (lin >> 8));
  endtask

  task automatic map_chroma(int f, int comp, int x, int y, output logic [1:0] b, output logic [10:0] r, output logic [7:0] c);
    int n, lin;
    n = (y >> 3) * WMB + (x >> 3);
    b = 2'(((y >> 2) & 1) * 2 + ((x >> 2) & 1));
    lin = n * 8 + comp * 4 + (x & 3);
    c = 8'(lin & 255);
    r = 11'(fbase[f] + 32 + 510 + (lin >> 8));
  endtask

  task automatic map_mv(int f, int mx, int my, int k, output logic [1:0] b, output logic [10:0] r, output logic [7:0] c);
    int n;
    n = my * WMB + mx;
    b = 2'(k);
    c = 8'(n & 255);
    r = 11'(fbase[f] + (n >> 8));
  endtask

  function automatic logic [31:0] pword(int f, int pl, int x, int yal);
    return {pix(f,pl,x,yal+3)[7:0], pix(f,pl,x,yal+2)[7:0], pix(f,pl,x,yal+1)[7:0], pix(f,pl,x,yal)[7:0]};
  endfunction

  task automatic load_frame(int f);
    logic [1:0] b; logic [10:0] r; logic [7:0] c;
    for (int y = 0; y < 48; y += 4)
      for (int x = 0; x < 96; x++) begin
        map_luma(f, x, y, b, r, c);
        u_sd.poke(b, r, c, pword(f, 0, x, y));
      end
    for (int comp = 0; comp < 2; comp++)
      for (int y = 0; y < 24; y += 4)
        for (int x = 0; x < 48; x++) begin
          map_chroma(f, comp, x, y, b, r, c);
          u_sd.poke(b, r, c, pword(f, 1 + comp, x, y));
        end
  endtask

  // ---------------- golden interpolation ----------------
  int gf, gpl;   // frame and plane the pixel function reads
  function automatic int P(int x, int y); return pix(gf, gpl, x, y); endfunction
  function automatic int clp(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int tap6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic int b1(int x, int y); return tap6(P(x-2,y),P(x-1,y),P(x,y),P(x+1,y),P(x+2,y),P(x+3,y)); endfunction
  function automatic int h1(int x, int y); return tap6(P(x,y-2),P(x,y-1),P(x,y),P(x,y+1),P(x,y+2),P(x,y+3)); endfunction
  function automatic int bb(int x, int y); return clp((b1(x,y)+16)>>>5); endfunction
  function automatic int hh(int x, int y); return clp((h1(x,y)+16)>>>5); endfunction
  function automatic int jj(int x, int y);
    return clp((tap6(h1(x-2,y),h1(x-1,y),h1(x,y),h1(x+1,y),h1(x+2,y),h1(x+3,y))+512)>>>10);
  endfunction
  function automatic int av(int a, int b); return (a+b+1)>>1; endfunction
  function automatic int ref_luma(int x, int y, int qx, int qy);
    int G, Hr, M, b, s, h, m, j;
    G = P(x,y); Hr = P(x+1,y); M = P(x,y+1);
    b = bb(x,y); s = bb(x,y+1); h = hh(x,y); m = hh(x+1,y); j = jj(x,y);
    case ({qx[1:0], qy[1:0]})
      4'b0000: return G;        4'b0100: return av(G,b);  4'b1000: return b;  4'b1100: return av(Hr,b);
      4'b0001: return av(G,h);  4'b0010: return h;        4'b0011: return av(M,h);
      4'b0101: return av(b,h);  4'b1101: return av(b,m);  4'b0111: return av(h,s); 4'b1111: return av(m,s);
      4'b1001: return av(b,j);  4'b1010: return j;        4'b1011: return av(j,s);
      4'b0110: return av(h,j);  default: return av(j,m);
    endcase
  endfunction
  function automatic int ref_chroma(int x, int y, int dx, int dy);
    return ((8-dx)*(8-dy)*P(x,y) + dx*(8-dy)*P(x+1,y) + (8-dx)*dy*P(x,y+1) + dx*dy*P(x+1,y+1) + 32) >>> 6;
  endfunction

  // residual supplied to the DUT (depends only on the column being reconstructed)
  function automatic int res_of(int pl, int b, int c, int k);
    return ((pl * 37 + b * 11 + c * 5 + k * 3) % 41) - 20;
  endfunction
  always_comb
    for (int k = 0; k < 4; k++) residual[k] = 9'(res_of(int'(res_plane), int'(res_blk), int'(res_col), k));

  // ---------------- expected macroblocks ----------------
  typedef struct {
    int mbx, mby;
    int mvx [2][16];
    int mvy [2][16];
    bit use_l [2][16];
    wpmode_t wpm;
    int w0, w1, o0, o1, lwd;
  } emb_t;

  emb_t exp_q [$];
  emb_t done_mb [$];
  // decoded vectors per MB position (raster 4x4 order), zero where a list is unused
  int tmvx [2][2][5][16];
  int tmvy [2][2][5][16];
  bit tuse [2][5][2][16];

  int colx [4], coly [4];   // co-located vectors of MB (2,1)

  // ---------------- mechanism counters ----------------
  int n_hreuse, n_vreuse, n_both, n_noreuse, n_bi, n_single0, n_single1, n_chroma;
  int n_wp_def, n_wp_exp, n_wp_imp, n_mvp, n_spatial, n_temporal;
  int n_st [4];
  int n_qfull, n_overlap, n_dbusy, n_unsched, n_colrd, n_colwr, n_db, n_pre, n_act;
  int n_out;

  always @(posedge clk) if (rst_n) begin
    if (ev_block) begin
      if (ev_hreuse && ev_vreuse) n_both++;
      else if (ev_hreuse) n_hreuse++;
      else if (ev_vreuse) n_vreuse++;
      else n_noreuse++;
    end
    if (ev_push) n_st[ev_status]++;
    if (ev_queue_full) n_qfull++;
    if (ev_overlap) n_overlap++;
    if (ev_dispatch_busy) n_dbusy++;
    if (ev_pre) n_pre++;
    if (ev_act) n_act++;
    if (!sched_en && ev_push) n_unsched++;
    if (dut.u_eng.c0_valid && dut.u_eng.c0_ready) begin
      if (dut.u_eng.c0_we) n_colwr++; else n_colrd++;
    end
    if (db_valid && db_ready) n_db++;
  end

  // ---------------- output checker ----------------
  bit seen [3][16][4];
  int cnt_cur;

  function automatic int wp_single(emb_t e, int l, int p);
    int w, o, v;
    if (e.wpm != WP_EXPLICIT) return p;
    w = l ? e.w1 : e.w0; o = l ? e.o1 : e.o0;
    if (e.lwd >= 1) v = ((p * w + (1 << (e.lwd - 1))) >>> e.lwd) + o;
    else v = p * w + o;
    return clp(v);
  endfunction

  function automatic int wp_bi(emb_t e, int p0, int p1);
    if (e.wpm == WP_DEFAULT) return (p0 + p1 + 1) >> 1;
    if (e.wpm == WP_IMPLICIT) return clp((p0 * e.w0 + p1 * e.w1 + 32) >>> 6);
    return clp(((p0 * e.w0 + p1 * e.w1 + (1 << e.lwd)) >>> (e.lwd + 1)) + ((e.o0 + e.o1 + 1) >>> 1));
  endfunction

  function automatic int interp(emb_t e, int l, int pl, int b, int c, int r);
    int bc, br, mx, my, px, py;
    bc = b & 3; br = b >> 2;
    mx = e.mvx[l][b]; my = e.mvy[l][b];
    gf = (l == 0) ? 1 : 2;
    gpl = pl;
    if (pl == 0) begin
      px = 16 * e.mbx + 4 * bc + c; py = 16 * e.mby + 4 * br + r;
      return ref_luma(px + (mx >>> 2), py + (my >>> 2), mx & 3, my & 3);
    end
    px = 8 * e.mbx + 2 * bc + c; py = 8 * e.mby + 2 * br + r;
    return ref_chroma(px + (mx >>> 3), py + (my >>> 3), mx & 7, my & 7);
  endfunction

  always @(posedge clk) if (rst_n && pred_valid) begin
    emb_t e;
    int pl, b, c, np, p0, p1, ep, er;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output plane %0d blk %0d col %0d", pred_plane, pred_blk, pred_col);
    end else begin
      e = exp_q[0];
      pl = int'(pred_plane); b = int'(pred_blk); c = int'(pred_col);
      np = (pl == 0) ? 4 : 2;
      checks++;
      if (seen[pl][b][c] || (pl != 0 && c > 1) || pl > 2) begin
        failures++;
        $display("duplicate/illegal output MB(%0d,%0d) plane %0d blk %0d col %0d", e.mbx, e.mby, pl, b, c);
      end
      seen[pl][b][c] = 1'b1;
      if (pl != 0) n_chroma++;
      if (e.use_l[0][b] && e.use_l[1][b]) n_bi++;
      else if (e.use_l[1][b]) n_single1++;
      else n_single0++;
      case (e.wpm) WP_EXPLICIT: n_wp_exp++; WP_IMPLICIT: n_wp_imp++; default: n_wp_def++; endcase
      for (int r = 0; r < np; r++) begin
        if (e.use_l[0][b] && e.use_l[1][b]) begin
          p0 = interp(e, 0, pl, b, c, r);
          p1 = interp(e, 1, pl, b, c, r);
          ep = wp_bi(e, p0, p1);
        end else if (e.use_l[1][b]) ep = wp_single(e, 1, interp(e, 1, pl, b, c, r));
        else ep = wp_single(e, 0, interp(e, 0, pl, b, c, r));
        er = clp(ep + res_of(pl, b, c, r));
        checks += 2;
        if (int'(pred[r]) != ep || int'(recon[r]) != er) begin
          failures++;
          if (failures < 20)
            $display("MB(%0d,%0d) plane %0d blk %0d col %0d row %0d: pred %0d exp %0d, recon %0d exp %0d",
                     e.mbx, e.mby, pl, b, c, r, pred[r], ep, recon[r], er);
        end
      end
      n_out++;
      cnt_cur++;
      if (cnt_cur == 128) begin
        cnt_cur = 0;
        for (int i = 0; i < 3; i++) for (int j = 0; j < 16; j++) for (int k = 0; k < 4; k++) seen[i][j][k] = 1'b0;
        done_mb.push_back(exp_q.pop_front());
      end
    end
  end

  // ---------------- golden MV prediction ----------------
  function automatic int med(int a, int b, int c);
    int mx, mn;
    mx = a > b ? a : b; mx = mx > c ? mx : c;
    mn = a < b ? a : b; mn = mn < c ? mn : c;
    return a + b + c - mx - mn;
  endfunction

  // neighbour vector of list l at raster block (row, col) of MB (mx, my); zero if outside
  function automatic int nbx(int l, int mx, int my, int blk, bit comp_y);
    if (mx < 0 || my < 0 || mx > 4 || my > 1) return 0;
    return comp_y ? tmvy[l][my][mx][blk] : tmvx[l][my][mx][blk];
  endfunction

  // prediction for 16x16 (kind 0), 16x8 top (1), 16x8 bottom (2), 8x16 left (3), 8x16 right (4)
  task automatic predict(int l, int mx, int my, int kind, output int px, output int py);
    int ax, ay, bx, by, cx, cy;
    ax = nbx(l, mx - 1, my, 3, 0);  ay = nbx(l, mx - 1, my, 3, 1);     // MVL0
    bx = nbx(l, mx, my - 1, 12, 0); by = nbx(l, mx, my - 1, 12, 1);    // MVU0
    if (my > 0 && mx < WMB - 1) begin                                   // MVRU
      cx = nbx(l, mx + 1, my - 1, 12, 0); cy = nbx(l, mx + 1, my - 1, 12, 1);
    end else begin                                                      // MVLU
      cx = nbx(l, mx - 1, my - 1, 15, 0); cy = nbx(l, mx - 1, my - 1, 15, 1);
    end
    case (kind)
      1: begin px = bx; py = by; end
      2: begin px = nbx(l, mx - 1, my, 11, 0); py = nbx(l, mx - 1, my, 11, 1); end   // MVL2
      3: begin px = ax; py = ay; end                                                    // MVL0
      4: if (my > 0 && mx < WMB - 1) begin px = cx; py = cy; end                        // MVRU
         else begin px = nbx(l, mx, my - 1, 13, 0); py = nbx(l, mx, my - 1, 13, 1); end // MVU1
      default: begin px = med(ax, bx, cx); py = med(ay, by, cy); end
    endcase
  endtask

  // prediction for 8x8 partition i: median of A, B, C (C replaced by D when
  // unavailable); blocks of the current MB already decoded are taken from it
  function automatic int nb8(int l, int mx, int my, int r, int c, bit comp_y);
    if (r < 0 && c < 0) return nbx(l, mx - 1, my - 1, 15, comp_y);
    if (r < 0)          return nbx(l, mx, my - 1, 12 + c, comp_y);
    if (c < 0)          return nbx(l, mx - 1, my, r * 4 + 3, comp_y);
    return nbx(l, mx, my, r * 4 + c, comp_y);
  endfunction

  task automatic predict8(int l, int mx, int my, int i, output int px, output int py);
    int r0, c0, ax, ay, bx, by, cx, cy;
    bit c_av;
    r0 = 2 * (i >> 1); c0 = 2 * (i & 1);
    ax = nb8(l, mx, my, r0, c0 - 1, 0);     ay = nb8(l, mx, my, r0, c0 - 1, 1);
    bx = nb8(l, mx, my, r0 - 1, c0, 0);     by = nb8(l, mx, my, r0 - 1, c0, 1);
    if (r0 == 0) c_av = (my > 0) && (c0 == 0 || mx < WMB - 1);
    else         c_av = (c0 == 0);
    if (c_av && r0 == 0 && c0 == 2) begin
      cx = nbx(l, mx + 1, my - 1, 12, 0);   cy = nbx(l, mx + 1, my - 1, 12, 1);
    end else if (c_av) begin
      cx = nb8(l, mx, my, r0 - 1, c0 + 2, 0); cy = nb8(l, mx, my, r0 - 1, c0 + 2, 1);
    end else begin
      cx = nb8(l, mx, my, r0 - 1, c0 - 1, 0); cy = nb8(l, mx, my, r0 - 1, c0 - 1, 1);
    end
    px = med(ax, bx, cx); py = med(ay, by, cy);
  endtask

  // ---------------- drivers ----------------
  task automatic wait_neg(); @(negedge clk); endtask

  task automatic start_mb(int mx, int my, bit col);
    while (!mb_ready) wait_neg();
    mb_start = 1; need_col = col; mb_x = 8'(mx); mb_y = 8'(my);
    wait_neg();
    mb_start = 0; need_col = 0;
  endtask

  task automatic send_cmd(bit l, part_t p, int idx, mvmode_t m, int dx, int dy);
    while (!cmd_ready) wait_neg();
    cmd_valid = 1; cmd_list = l; cmd_part = p; cmd_idx = 4'(idx); cmd_mode = m;
    cmd_mvd = '{x: 10'(dx), y: 10'(dy)};
    wait_neg();
    cmd_valid = 0;
    case (m) MVM_MVP: n_mvp++; MVM_SPATIAL: n_spatial++; default: n_temporal++; endcase
  endtask

  task automatic end_mb();
    while (!end_ready) wait_neg();
    mb_end = 1;
    wait_neg();
    mb_end = 0;
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // set the vectors of raster blocks in mask for list l
  emb_t e;   // macroblock being driven
  task automatic set_mv(int l, int mask, int vx, int vy);
    for (int b = 0; b < 16; b++) if (mask[b]) begin
      e.mvx[l][b] = vx; e.mvy[l][b] = vy; e.use_l[l][b] = 1'b1;
      tmvx[l][e.mby][e.mbx][b] = vx; tmvy[l][e.mby][e.mbx][b] = vy;
    end
  endtask

  // MB kinds
  localparam int K_L0 = 0, K_BI = 1, K_16X8 = 2, K_L1 = 3, K_TEMP = 4, K_SPAT = 5, K_8X16 = 6, K_8X8 = 7;

  task automatic run_mb(int mx, int my, int kind, bit l16x8);
    int px, py, tx, ty, lo;
    e.mbx = mx; e.mby = my;
    for (int l = 0; l < 2; l++) for (int b = 0; b < 16; b++) begin
      e.mvx[l][b] = 0; e.mvy[l][b] = 0; e.use_l[l][b] = 0;
      tmvx[l][my][mx][b] = 0; tmvy[l][my][mx][b] = 0;
    end
    e.wpm = wp_mode; e.w0 = exp_w[0]; e.w1 = exp_w[1]; e.o0 = exp_o[0]; e.o1 = exp_o[1]; e.lwd = log_wd;
    if (wp_mode == WP_IMPLICIT) begin e.w0 = 48; e.w1 = 16; end   // POC 2 between 0 and 8
    lo = (my == 0 || mx == 0) ? 8 : -40;
    start_mb(mx, my, kind == K_TEMP);
    case (kind)
      K_L0, K_L1, K_BI: begin
        for (int l = 0; l < 2; l++) begin
          if ((l == 0 && kind == K_L1) || (l == 1 && kind == K_L0)) continue;
          predict(l, mx, my, 0, px, py);
          tx = rnd(lo, 40); ty = rnd(my == 0 ? 8 : -40, 40);
          send_cmd(1'(l), MB_16X16, 0, MVM_MVP, tx - px, ty - py);
          set_mv(l, 16'hFFFF, tx, ty);
        end
      end
      K_16X8: begin
        for (int i = 0; i < 2; i++) begin
          predict(int'(l16x8), mx, my, 1 + i, px, py);
          tx = rnd(lo, 40); ty = rnd(my == 0 ? 8 : -40, 40);
          send_cmd(l16x8, MB_16X8, i, MVM_MVP, tx - px, ty - py);
          set_mv(int'(l16x8), i ? 16'hFF00 : 16'h00FF, tx, ty);
        end
      end
      K_8X16: begin
        for (int i = 0; i < 2; i++) begin
          predict(0, mx, my, 3 + i, px, py);
          tx = rnd(lo, 40); ty = rnd(my == 0 ? 8 : -40, 40);
          send_cmd(1'b0, MB_8X16, i, MVM_MVP, tx - px, ty - py);
          set_mv(0, i ? 16'hCCCC : 16'h3333, tx, ty);
        end
      end
      K_8X8: begin
        for (int i = 0; i < 4; i++) begin
          predict8(int'(l16x8), mx, my, i, px, py);
          tx = rnd(lo, 40); ty = rnd(my == 0 ? 8 : -40, 40);
          send_cmd(l16x8, MB_8X8, i, MVM_MVP, tx - px, ty - py);
          set_mv(int'(l16x8), 16'h0033 << (2 * (i & 1) + 8 * (i >> 1)), tx, ty);
        end
      end
      K_TEMP: begin
        for (int i = 0; i < 4; i++) begin
          int m0x, m0y;
          m0x = (64 * colx[i] + 128) >>> 8; m0y = (64 * coly[i] + 128) >>> 8;
          send_cmd(1'b0, MB_8X8, i, MVM_TEMPORAL, 0, 0);
          // 8x8 partition i covers raster blocks of quadrant i
          set_mv(0, 16'h0033 << (2 * (i & 1) + 8 * (i >> 1)), m0x, m0y);
          set_mv(1, 16'h0033 << (2 * (i & 1) + 8 * (i >> 1)), m0x - colx[i], m0y - coly[i]);
        end
      end
      default: begin   // spatial direct, both lists
        for (int l = 0; l < 2; l++) begin
          predict(l, mx, my, 0, px, py);
          send_cmd(1'(l), MB_16X16, 0, MVM_SPATIAL, 0, 0);
          set_mv(l, 16'hFFFF, px, py);
        end
      end
    endcase
    for (int l = 0; l < 2; l++) for (int b = 0; b < 16; b++) tuse[my][mx][l][b] = e.use_l[l][b];
    exp_q.push_back(e);
    end_mb();
  endtask

  task automatic wait_quiet();
    while (exp_q.size() != 0 || mc_busy) wait_neg();
    repeat (40) wait_neg();
  endtask

  task automatic set_mem(int cl, int bl, bit sch);
    cfg_cl = 4'(cl); cfg_bl = 4'(bl); cfg_trp = 2; cfg_trcd = 2; cfg_twr = 2;
    cfg_we = 1; wait_neg(); cfg_we = 0;
    sched_en = sch;
    wait_neg();
  endtask

  // de-blocking writes: frame 3, luma words at x 200.., y 96, chroma at x 100.., y 48
  int n_dbw;
  longint t_a;
  task automatic db_writes();
    for (int i = 0; i < 12; i++) begin
      db_valid = 1; db_frame = 5'd3; db_chroma = (i >= 8); db_comp = (i >= 10);
      db_x = (i < 8) ? 12'(200 + i) : 12'(100 + i); db_y = (i < 8) ? 12'd96 : 12'd48;
      db_wdata = 32'hDB00_0000 + 32'(i);
      wait_neg();
      while (!db_ready) wait_neg();   // db_ready sampled with the request still up
      db_valid = 0;
      n_dbw++;
      repeat (3) wait_neg();
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic [1:0] b; logic [10:0] r; logic [7:0] c;
    sched_en = 1; cfg_we = 0; cfg_trp = 2; cfg_trcd = 2; cfg_cl = 3; cfg_bl = 4; cfg_twr = 2;
    tbl_we = 0; tbl_idx = 0; tbl_row = 0;
    curr_poc = 16'sd2; list0_poc = 16'sd0; list1_poc = 16'sd8;
    ref_frame[0] = 5'd1; ref_frame[1] = 5'd2; col_frame = 5'd2; cur_frame = 5'd3;
    wp_mode = WP_DEFAULT; exp_w[0] = 10'sd40; exp_w[1] = 10'sd24; exp_o[0] = 8'sd3; exp_o[1] = -8'sd5;
    log_wd = 3'd5;
    mb_start = 0; need_col = 0; mb_end = 0; mb_x = 0; mb_y = 0;
    cmd_valid = 0; cmd_list = 0; cmd_part = MB_16X16; cmd_idx = 0; cmd_mode = MVM_MVP; cmd_mvd = '0;
    db_valid = 0; db_frame = 0; db_chroma = 0; db_comp = 0; db_x = 0; db_y = 0; db_wdata = 0;
    cnt_cur = 0; n_out = 0; n_dbw = 0;
    n_hreuse = 0; n_vreuse = 0; n_both = 0; n_noreuse = 0; n_bi = 0; n_single0 = 0; n_single1 = 0;
    n_chroma = 0; n_wp_def = 0; n_wp_exp = 0; n_wp_imp = 0; n_mvp = 0; n_spatial = 0; n_temporal = 0;
    for (int i = 0; i < 4; i++) n_st[i] = 0;
    n_qfull = 0; n_overlap = 0; n_dbusy = 0; n_unsched = 0; n_colrd = 0; n_colwr = 0; n_db = 0;
    n_pre = 0; n_act = 0;
    for (int l = 0; l < 2; l++) for (int y = 0; y < 2; y++) for (int x = 0; x < 5; x++)
      for (int k = 0; k < 16; k++) begin tmvx[l][y][x][k] = 0; tmvy[l][y][x][k] = 0; end

    load_frame(1);
    load_frame(2);
    for (int i = 0; i < 4; i++) begin
      colx[i] = rnd(-40, 40); coly[i] = rnd(-40, 40);
      map_mv(2, 2, 1, i, b, r, c);
      u_sd.poke(b, r, c, {12'd0, 10'(colx[i]), 10'(coly[i])});
    end

    repeat (3) wait_neg();
    rst_n = 1;
    wait_neg();
    // frame start table
    for (int f = 1; f < 4; f++) begin
      tbl_we = 1; tbl_idx = 5'(f); tbl_row = 11'(fbase[f]);
      wait_neg();
    end
    tbl_we = 0;
    wait_neg();

    // phase A (its length is reported as cycles per macroblock)
    t_a = $time;
    run_mb(0, 0, K_L0, 0);
    run_mb(1, 0, K_BI, 0);
    run_mb(2, 0, K_16X8, 0);
    run_mb(3, 0, K_8X8, 1);
    run_mb(4, 0, K_8X16, 0);
    while (exp_q.size() != 0 || mc_busy) wait_neg();
    $display("phase A: 5 macroblocks in %0d cycles (CL 3, burst 4, scheduled)", ($time - t_a) / 10);
    wait_quiet();

    // phase B
    set_mem(2, 1, 1);
    wp_mode = WP_EXPLICIT;
    fork
      db_writes();
      begin
        run_mb(0, 1, K_BI, 0);
        run_mb(1, 1, K_16X8, 1);
      end
    join
    wait_quiet();

    // phase C
    set_mem(3, 2, 0);
    wp_mode = WP_IMPLICIT;
    run_mb(2, 1, K_TEMP, 0);
    run_mb(3, 1, K_SPAT, 0);
    wait_quiet();

    // co-located vectors written for the current frame
    foreach (done_mb[i]) begin
      emb_t e;
      int cb, l;
      logic [31:0] got, expw;
      e = done_mb[i];
      for (int k = 0; k < 4; k++) begin
        cb = (k == 0) ? 0 : (k == 1) ? 3 : (k == 2) ? 12 : 15;
        l = e.use_l[0][cb] ? 0 : 1;
        map_mv(3, e.mbx, e.mby, k, b, r, c);
        got = u_sd.peek(b, r, c);
        expw = {12'd0, 10'(e.mvx[l][cb]), 10'(e.mvy[l][cb])};
        checks++;
        if (got !== expw) begin
          failures++;
          $display("co-located MV MB(%0d,%0d) k %0d: got %h exp %h", e.mbx, e.mby, k, got, expw);
        end
      end
    end
    // de-blocking words
    for (int i = 0; i < 12; i++) begin
      if (i < 8) map_luma(3, 200 + i, 96, b, r, c);
      else map_chroma(3, (i >= 10) ? 1 : 0, 100 + i, 48, b, r, c);
      checks++;
      if (u_sd.peek(b, r, c) !== 32'hDB00_0000 + 32'(i)) begin
        failures++;
        $display("de-blocking word %0d: got %h", i, u_sd.peek(b, r, c));
      end
    end

    checks++;
    if (done_mb.size() != 9 || n_out != 9 * 128) begin
      failures++;
      $display("macroblocks completed %0d, outputs %0d", done_mb.size(), n_out);
    end
    checks++;
    if (u_sd.violations != 0) begin
      failures++;
      $display("SDRAM timing violations: %0d", u_sd.violations);
    end

    $display("mechanisms: hreuse %0d vreuse %0d both %0d none %0d | bi %0d L0 %0d L1 %0d chroma %0d",
             n_hreuse, n_vreuse, n_both, n_noreuse, n_bi, n_single0, n_single1, n_chroma);
    $display("  wp default %0d explicit %0d implicit %0d | mvp %0d spatial %0d temporal %0d",
             n_wp_def, n_wp_exp, n_wp_imp, n_mvp, n_spatial, n_temporal);
    $display("  status hit/hit %0d hit/miss %0d miss/hit %0d miss/miss %0d | qfull %0d overlap %0d dispatch-busy %0d",
             n_st[0], n_st[1], n_st[2], n_st[3], n_qfull, n_overlap, n_dbusy);
    $display("  unscheduled %0d col-read %0d col-write %0d de-block %0d PRE %0d ACT %0d | SDRAM rd %0d wr %0d",
             n_unsched, n_colrd, n_colwr, n_db, n_pre, n_act, u_sd.n_read, u_sd.n_write);
    begin
      int m [26];
      m = '{n_hreuse, n_vreuse, n_both, n_noreuse, n_bi, n_single0, n_single1, n_chroma,
            n_wp_def, n_wp_exp, n_wp_imp, n_mvp, n_spatial, n_temporal,
            n_st[0], n_st[1], n_st[2], n_st[3], n_qfull, n_overlap, n_dbusy,
            n_unsched, n_colrd, n_colwr, n_db, n_pre};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("mechanism %0d never exercised", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
