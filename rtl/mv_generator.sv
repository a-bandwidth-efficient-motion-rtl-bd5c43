// mv_generator: motion vector generator (MVG) of the motion-compensation engine.
//
// It produces the motion vectors of the current macroblock, one partition
// command at a time, by one of three methods:
//   MVP      : MV = MVP + MVD (median or directional prediction, mvp_gen);
//   spatial  : spatial direct mode, the same predictor without MVD (shared
//              hardware, as the design states);
//   temporal : temporal direct mode, MV_L0/MV_L1 scaled from the co-located MV
//              with the POC-derived ScaleFactor (scalefactor_gen + direct_mv).
// Results go into two 4x4 current-MV buffers (list 0 and list 1) and are also
// streamed out, one 4x4 block per cycle, for the interpolators.
//
// Neighbour handling: the bottom row of each macroblock and its right column are
// kept in the row FIFO (mv_row_fifo, an SRAM): at `mb_start` the up, up-right
// and left neighbours of both lists are read back (18 reads); at `mb_end` the
// bottom row and right column of both lists are written (16 writes).  The
// up-left vector is the previous macroblock's MVU3, saved in a register before
// that FIFO entry is overwritten.  Availability follows the picture edges.
//
// Handshake: a command is taken when cmd_valid && cmd_ready; cmd_ready is high
// only in the ready state.  mb_start and mb_end are accepted when `idle`/ready.
// Latencies (command accepted to ready again): MVP and spatial commands take
// 3 + 16 cycles, temporal commands 3 + 32 cycles; the write-back walks all 16
// blocks of a list and stores those the partition covers.
module mv_generator
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W_MB = 120,
  localparam int unsigned AW = $clog2(FRAME_W_MB*4 + 4)
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // macroblock framing
  input  logic                    mb_start,
  input  logic [7:0]              mb_x,
  input  logic [7:0]              mb_y,
  input  logic                    mb_end,
  output logic                    idle,
  // partition commands
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  logic                    cmd_list,
  input  part_t                   cmd_part,
  input  logic [3:0]              cmd_idx,
  input  mvmode_t                 cmd_mode,
  input  mv_t                     cmd_mvd,
  input  mv_t                     cmd_mv_col,
  input  logic signed [POC_W-1:0] curr_poc,
  input  logic signed [POC_W-1:0] list0_poc,
  input  logic signed [POC_W-1:0] list1_poc,
  // MV stream
  output logic                    out_valid,
  output logic                    out_list,
  output logic [3:0]              out_blk,
  output mv_t                     out_mv
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_READY, S_MVP, S_TSF, S_TMV, S_WRITE, S_STORE} state_t;
  state_t state;

  mv_t  cur  [2][16];
  mv_t  left [2][4];
  mv_t  up   [2][4];
  mv_t  ru   [2];
  mv_t  lu   [2];
  mv_t  lu_save [2];
  logic [7:0] mbx, mby;
  logic left_av, up_av, ru_av;

  // ---------------- row FIFO ----------------
  logic          f_wr, f_wl, f_rd, f_rl;
  logic [AW-1:0] f_wc, f_rc;
  mv_t           f_wmv, f_rmv;

  mv_row_fifo #(.FRAME_W_MB(FRAME_W_MB)) u_fifo (
    .clk, .wr_en(f_wr), .wr_list(f_wl), .wr_col(f_wc), .wr_mv(f_wmv),
    .rd_en(f_rd), .rd_list(f_rl), .rd_col(f_rc), .rd_mv(f_rmv));

  localparam logic [AW-1:0] LEFT_BASE = AW'(FRAME_W_MB*4);

  logic [4:0] step;        // load / store counter
  logic       rd_pend;
  logic [4:0] rd_step;

  // ---------------- predictor ----------------
  logic  p_start, p_valid;
  mv_t   p_mv, p_mvp;
  logic  c_list;
  part_t c_part;
  logic [3:0] c_idx;
  mvmode_t c_mode;
  mv_t   c_mvd, c_col;

  mvp_gen u_mvp (
    .clk, .rst_n, .start(p_start), .part(c_part), .idx(c_idx),
    .add_mvd(c_mode == MVM_MVP), .mvd(c_mvd),
    .cur(cur[c_list]), .left(left[c_list]), .up(up[c_list]),
    .lu(lu[c_list]), .ru(ru[c_list]),
    .left_avail(left_av), .up_avail(up_av), .ru_avail(ru_av),
    .mv(p_mv), .mvp(p_mvp), .valid(p_valid));

  logic               s_start, s_valid, s_tdz;
  logic signed [10:0] s_sf;
  logic signed [9:0]  s_w0, s_w1;
  scalefactor_gen u_sf (
    .clk, .rst_n, .start(s_start), .curr_poc, .list0_poc, .list1_poc,
    .scale_factor(s_sf), .w0(s_w0), .w1(s_w1), .td_zero(s_tdz), .valid(s_valid));

  logic d_start, d_valid;
  mv_t  d_l0, d_l1;
  direct_mv u_dmv (
    .clk, .rst_n, .start(d_start), .scale_factor(s_sf), .td_zero(s_tdz),
    .mv_col(c_col), .mv_l0(d_l0), .mv_l1(d_l1), .valid(d_valid));

  // ---------------- partition coverage ----------------
  function automatic logic [15:0] part_cover(input part_t p, input logic [3:0] i);
    case (p)
      MB_16X16: return 16'hFFFF;
      MB_16X8:  return i[0] ? 16'hFF00 : 16'h00FF;
      MB_8X16:  return i[0] ? 16'hF0F0 : 16'h0F0F;
      MB_8X8:   return 16'h000F << (4*i[1:0]);
      default:  return 16'h0001 << i;
    endcase
  endfunction

  logic [15:0] wmask;
  logic [3:0]  wblk;
  logic        wlist, wboth;
  mv_t         wmv [2];

  assign cmd_ready = (state == S_READY);
  assign idle      = (state == S_IDLE);

  // the predictor starts the cycle after the command is latched, so it sees the
  // command's partition, index and MVD
  logic p_go;
  always_comb begin
    p_start = p_go;
    s_start = (state == S_READY) && cmd_valid && (cmd_mode == MVM_TEMPORAL);
    d_start = s_valid;
  end

  // bottom row blocks 10,11,14,15 and right column blocks 5,7,13,15
  function automatic logic [3:0] bottom_blk(input logic [1:0] k);
    case (k) 2'd0: return 4'd10; 2'd1: return 4'd11; 2'd2: return 4'd14; default: return 4'd15; endcase
  endfunction
  function automatic logic [3:0] right_blk(input logic [1:0] k);
    case (k) 2'd0: return 4'd5; 2'd1: return 4'd7; 2'd2: return 4'd13; default: return 4'd15; endcase
  endfunction

  // FIFO port control
  always_comb begin
    f_rd = 1'b0; f_rl = 1'b0; f_rc = '0;
    f_wr = 1'b0; f_wl = 1'b0; f_wc = '0; f_wmv = '0;
    if (state == S_LOAD && step < 5'd18) begin
      f_rd = 1'b1;
      f_rl = (step >= 5'd9);
      unique case (step >= 5'd9 ? step - 5'd9 : step)
        5'd0, 5'd1, 5'd2, 5'd3: f_rc = AW'({mbx, 2'b00}) + AW'((step >= 5'd9 ? step - 5'd9 : step));
        5'd4:                   f_rc = AW'({mbx, 2'b00}) + AW'(4);
        default:                f_rc = LEFT_BASE + AW'((step >= 5'd9 ? step - 5'd9 : step) - 5'd5);
      endcase
    end
    if (state == S_STORE) begin
      f_wr = 1'b1;
      f_wl = step[3];
      if (!step[2]) begin
        f_wc  = AW'({mbx, 2'b00}) + AW'(step[1:0]);
        f_wmv = cur[step[3]][bottom_blk(step[1:0])];
      end else begin
        f_wc  = LEFT_BASE + AW'(step[1:0]);
        f_wmv = cur[step[3]][right_blk(step[1:0])];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p_go <= 1'b0;
      step <= '0; rd_pend <= 1'b0; rd_step <= '0;
      mbx <= '0; mby <= '0;
      left_av <= 1'b0; up_av <= 1'b0; ru_av <= 1'b0;
      c_list <= 1'b0; c_part <= MB_16X16; c_idx <= '0; c_mode <= MVM_MVP;
      c_mvd <= '0; c_col <= '0;
      wmask <= '0; wblk <= '0; wlist <= 1'b0; wboth <= 1'b0;
      out_valid <= 1'b0; out_list <= 1'b0; out_blk <= '0; out_mv <= '0;
      for (int l = 0; l < 2; l++) begin
        for (int b = 0; b < 16; b++) cur[l][b] <= '0;
        for (int k = 0; k < 4; k++) begin left[l][k] <= '0; up[l][k] <= '0; end
        ru[l] <= '0; lu[l] <= '0; lu_save[l] <= '0; wmv[l] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      p_go      <= (state == S_READY) && cmd_valid && (cmd_mode != MVM_TEMPORAL);
      // capture FIFO read data one cycle after the read
      rd_pend <= (state == S_LOAD && step < 5'd18);
      rd_step <= step;
      if (rd_pend) begin
        automatic logic l = (rd_step >= 5'd9);
        automatic logic [4:0] k = l ? rd_step - 5'd9 : rd_step;
        if (k < 5'd4)       up[l][k[1:0]] <= f_rmv;
        else if (k == 5'd4) ru[l] <= f_rmv;
        else                left[l][2'(k - 5'd5)] <= f_rmv;
      end

      unique case (state)
        S_IDLE: if (mb_start) begin
          mbx <= mb_x; mby <= mb_y;
          left_av <= (mb_x != 0);
          up_av   <= (mb_y != 0);
          ru_av   <= (mb_y != 0) && (32'(mb_x) < FRAME_W_MB-1);
          for (int l = 0; l < 2; l++) begin
            for (int b = 0; b < 16; b++) cur[l][b] <= '0;
            lu[l] <= lu_save[l];
          end
          step  <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (step < 5'd18) step <= step + 5'd1;
          else if (!rd_pend) begin
            // unavailable neighbours read as zero inside mvp_gen
            state <= S_READY;
          end
        end
        S_READY: begin
          if (cmd_valid) begin
            c_list <= cmd_list; c_part <= cmd_part; c_idx <= cmd_idx;
            c_mode <= cmd_mode; c_mvd <= cmd_mvd; c_col <= cmd_mv_col;
            wmask  <= part_cover(cmd_part, cmd_idx);
            wblk   <= '0;
            wlist  <= (cmd_mode == MVM_TEMPORAL) ? 1'b0 : cmd_list;
            wboth  <= (cmd_mode == MVM_TEMPORAL);
            state  <= (cmd_mode == MVM_TEMPORAL) ? S_TSF : S_MVP;
          end else if (mb_end) begin
            step  <= '0;
            state <= S_STORE;
          end
        end
        S_MVP: if (p_valid) begin
          wmv[c_list] <= p_mv;
          state <= S_WRITE;
        end
        S_TSF: if (s_valid) state <= S_TMV;
        S_TMV: if (d_valid) begin
          wmv[0] <= d_l0;
          wmv[1] <= d_l1;
          state  <= S_WRITE;
        end
        S_WRITE: begin
          if (wmask[wblk]) begin
            cur[wlist][wblk] <= wmv[wlist];
            out_valid <= 1'b1;
            out_list  <= wlist;
            out_blk   <= wblk;
            out_mv    <= wmv[wlist];
          end
          wblk <= wblk + 4'd1;
          if (wblk == 4'd15) begin
            if (wboth && !wlist) wlist <= 1'b1;
            else state <= S_READY;
          end
        end
        S_STORE: begin
          step <= step + 5'd1;
          if (step == 5'd15) begin
            lu_save[0] <= up[0][3];
            lu_save[1] <= up[1][3];
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
