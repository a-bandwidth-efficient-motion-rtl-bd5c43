// mvp_gen: motion vector predictor (MVP) generator.
//
// For one partition of the current macroblock it picks the neighbouring motion
// vectors A (left), B (up), C (up-right) and D (up-left) from a look-up table
// indexed by partition type and position, then forms the prediction:
//   16x8 and 8x16 partitions  -> directional prediction (one neighbour),
//   16x16, 8x8 and 4x4 blocks  -> median(A, B, C).
// The neighbour set is the one drawn as the macroblock's surroundings: MVL0-3 on
// the left, MVU0-3 above, MVLU and MVRU at the corners, and the 16 already
// decoded vectors MV0-MV15 of the current macroblock (4x4-block index order,
// i.e. 0 1 4 5 / 2 3 6 7 / 8 9 12 13 / 10 11 14 15 from top-left).
// The tables follow the ones given for this design entry for entry.  Where C is
// not available it is replaced by D, as the design specifies; unavailable
// neighbours read as zero.  Other boundary exceptions of the standard (single
// available neighbour, reference-index matching) and 8x4/4x8 partitions are not
// handled: the design leaves them out and so does this module.
//
// The output mv = MVP + MVD (or MVP alone for spatial direct, add_mvd = 0) is
// registered: result one cycle after `start`, flagged by `valid`.
module mvp_gen
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  part_t      part,        // partition type
  input  logic [3:0] idx,         // partition index within the macroblock
  input  logic       add_mvd,     // 1: MVP + MVD, 0: spatial direct (MVP only)
  input  mv_t        mvd,
  input  mv_t        cur [16],    // MV0..MV15 of the current macroblock
  input  mv_t        left[4],     // MVL0..MVL3
  input  mv_t        up  [4],     // MVU0..MVU3
  input  mv_t        lu,          // MVLU
  input  mv_t        ru,          // MVRU
  input  logic       left_avail,
  input  logic       up_avail,
  input  logic       ru_avail,
  output mv_t        mv,
  output mv_t        mvp,
  output logic       valid
);

  // neighbour codes: 0..15 = MVn, 16..19 = MVLn, 20..23 = MVUn, 24 = MVLU, 25 = MVRU
  localparam logic [4:0] L0 = 5'd16, L1 = 5'd17, L2 = 5'd18, L3 = 5'd19;
  localparam logic [4:0] U0 = 5'd20, U1 = 5'd21, U2 = 5'd22, U3 = 5'd23;
  localparam logic [4:0] LU = 5'd24, RU = 5'd25;

  typedef struct packed {
    logic [4:0] a, b, c, d;
  } nsel_t;

  function automatic nsel_t lut4x4(input logic [3:0] i);
    case (i)
      4'd0:  return '{L0, U0, U1, LU};
      4'd1:  return '{5'd0, U1, U2, U0};
      4'd2:  return '{L1, 5'd0, 5'd1, L0};
      4'd3:  return '{5'd2, 5'd1, 5'd0, 5'd0};
      4'd4:  return '{5'd1, U2, U3, U1};
      4'd5:  return '{5'd4, U3, RU, U2};
      4'd6:  return '{5'd3, 5'd4, 5'd5, 5'd1};
      4'd7:  return '{5'd6, 5'd5, 5'd4, 5'd4};
      4'd8:  return '{L2, 5'd2, 5'd3, L1};
      4'd9:  return '{5'd8, 5'd3, 5'd6, 5'd2};
      4'd10: return '{L3, 5'd8, 5'd9, L2};
      4'd11: return '{5'd10, 5'd9, 5'd8, 5'd8};
      4'd12: return '{5'd9, 5'd6, 5'd7, 5'd3};
      4'd13: return '{5'd12, 5'd7, 5'd6, 5'd6};
      4'd14: return '{5'd11, 5'd12, 5'd13, 5'd9};
      default: return '{5'd14, 5'd13, 5'd12, 5'd12};
    endcase
  endfunction

  function automatic nsel_t lut8x8(input logic [1:0] i);
    case (i)
      2'd0: return '{L0, U0, U2, LU};
      2'd1: return '{5'd1, U2, RU, U1};
      2'd2: return '{L2, 5'd2, 5'd6, L1};
      default: return '{5'd9, 5'd6, 5'd3, 5'd3};
    endcase
  endfunction

  function automatic logic is_outside(input logic [4:0] s);
    return s >= 5'd16;
  endfunction

  nsel_t sel;
  mv_t   na, nb, nc, nd, pred;
  logic  c_ok;

  function automatic mv_t pick(input logic [4:0] s, input mv_t cur_i [16],
                               input mv_t l_i [4], input mv_t u_i [4],
                               input mv_t lu_i, input mv_t ru_i,
                               input logic la, input logic ua, input logic ra);
    if (s < 5'd16)        return cur_i[s[3:0]];
    else if (s < 5'd20)   return la ? l_i[s[1:0]] : '0;
    else if (s < 5'd24)   return ua ? u_i[s[1:0]] : '0;
    else if (s == LU)     return (la && ua) ? lu_i : '0;
    else                  return ra ? ru_i : '0;
  endfunction

  always_comb begin
    unique case (part)
      MB_16X16: sel = '{L0, U0, RU, LU};
      MB_8X8:   sel = lut8x8(idx[1:0]);
      MB_4X4:   sel = lut4x4(idx);
      // directional partitions reuse the 16x16 set; the single neighbour is chosen below
      default:  sel = '{L0, U0, RU, LU};
    endcase
    // C = up-right; when that neighbour lies outside and is unavailable, D replaces it
    c_ok = 1'b1;
    if (sel.c == RU && !ru_avail) c_ok = 1'b0;
    if (is_outside(sel.c) && sel.c >= U0 && sel.c <= U3 && !up_avail) c_ok = 1'b0;
    na = pick(sel.a, cur, left, up, lu, ru, left_avail, up_avail, ru_avail);
    nb = pick(sel.b, cur, left, up, lu, ru, left_avail, up_avail, ru_avail);
    nd = pick(sel.d, cur, left, up, lu, ru, left_avail, up_avail, ru_avail);
    nc = c_ok ? pick(sel.c, cur, left, up, lu, ru, left_avail, up_avail, ru_avail) : nd;

    unique case (part)
      MB_16X8:  pred = idx[0] ? pick(L2, cur, left, up, lu, ru, left_avail, up_avail, ru_avail)
                              : pick(U0, cur, left, up, lu, ru, left_avail, up_avail, ru_avail);
      MB_8X16:  pred = idx[0] ? (ru_avail ? ru : pick(U1, cur, left, up, lu, ru, left_avail, up_avail, ru_avail))
                              : pick(L0, cur, left, up, lu, ru, left_avail, up_avail, ru_avail);
      default:  pred = '{x: med3(na.x, nb.x, nc.x), y: med3(na.y, nb.y, nc.y)};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv    <= '0;
      mvp   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        mvp  <= pred;
        mv.x <= add_mvd ? mvc_t'(pred.x + mvd.x) : pred.x;
        mv.y <= add_mvd ? mvc_t'(pred.y + mvd.y) : pred.y;
      end
    end
  end

endmodule
