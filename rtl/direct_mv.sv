// direct_mv: temporal direct mode motion vectors.
//
// From the co-located motion vector MVc of the first list-1 picture and the
// pre-computed ScaleFactor it forms
//   MV_L0 = (ScaleFactor * MVc + 128) >> 8
//   MV_L1 = MV_L0 - MVc
// for both components.  With td_zero (list-0 and list-1 at the same POC) it
// passes MVc as MV_L0 and gives a zero MV_L1, as the standard does.
//
// Timing: one register stage; `valid` follows `start` by one cycle.
module direct_mv
  import mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [10:0] scale_factor,
  input  logic               td_zero,
  input  mv_t                mv_col,
  output mv_t                mv_l0,
  output mv_t                mv_l1,
  output logic               valid
);

  function automatic mvc_t scale(input logic signed [10:0] sf, input mvc_t c);
    logic signed [MV_W+11:0] p;
    p = (MV_W+12)'(sf) * (MV_W+12)'(c) + (MV_W+12)'(128);
    return mvc_t'(p >>> 8);
  endfunction

  mv_t l0_c;

  always_comb begin
    if (td_zero) l0_c = mv_col;
    else begin
      l0_c.x = scale(scale_factor, mv_col.x);
      l0_c.y = scale(scale_factor, mv_col.y);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_l0 <= '0;
      mv_l1 <= '0;
      valid <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        mv_l0 <= l0_c;
        mv_l1 <= td_zero ? '0 : '{x: mvc_t'(l0_c.x - mv_col.x), y: mvc_t'(l0_c.y - mv_col.y)};
      end
    end
  end

endmodule
