// scalefactor_gen: pre-scalefactor generator for temporal direct mode and for
// implicit weighted prediction.
//
//   TD_B = CLIP(-128, 127, CurrPoc  - List0Poc)
//   TD_D = CLIP(-128, 127, List1Poc - List0Poc)
//   X    = (16384 + |TD_D / 2|) / TD_D
//   ScaleFactor = CLIP(-1024, 1023, (TD_B * X + 32) >> 6)
//   implicit weights: W1 = ScaleFactor >> 2, W0 = 64 - W1
//
// The datapath follows the pre-scalefactor diagram of this design: two POC
// subtractors with clippers, a divider, a multiplier, "+20H" and ">>6" and a final
// clipper.  As the design asks, the divider is replaced by a table lookup
// (multiplexer) indexed by TD_D, whose 256 entries are computed at elaboration
// from the formula above, and the multiplier by a shift-and-add network over the
// bits of |TD_B|.  The exact replacement circuits are this module's own choice.
// The final clip uses [-1024, 1023] (the standard's range); the design's text
// also mentions [-128, 127] for every clipper, which is kept for TD_B and TD_D.
// When TD_D is zero, `td_zero` is raised and the outputs take the standard's
// neutral values (ScaleFactor 256, weights 32/32).
//
// Timing: inputs sampled when `start` is high, results one cycle later with `valid`.
module scalefactor_gen
  import mc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [POC_W-1:0] curr_poc,
  input  logic signed [POC_W-1:0] list0_poc,
  input  logic signed [POC_W-1:0] list1_poc,
  output logic signed [10:0]      scale_factor,
  output logic signed [9:0]       w0,
  output logic signed [9:0]       w1,
  output logic                    td_zero,
  output logic                    valid
);

  localparam int XW = 16;

  // X table: index is TD_D as an unsigned byte
  function automatic logic [256*XW-1:0] gen_xtab();
    logic [256*XW-1:0] t;
    int td, x, half;
    t = '0;
    for (int i = 0; i < 256; i++) begin
      td = (i < 128) ? i : i - 256;
      if (td == 0) x = 0;
      else begin
        half = (td < 0) ? -td / 2 : td / 2;
        x = (16384 + half) / td;
      end
      t[i*XW +: XW] = XW'(x);
    end
    return t;
  endfunction

  localparam logic [256*XW-1:0] XTAB = gen_xtab();

  function automatic logic signed [7:0] clip8(input logic signed [POC_W:0] v);
    if (v < -128)     return -8'sd128;
    else if (v > 127) return 8'sd127;
    else              return v[7:0];
  endfunction

  logic signed [7:0]    tdb, tdd;
  logic signed [XW-1:0] x;
  logic [7:0]           tdb_mag;
  logic signed [24:0]   prod_mag, x1, x2;
  logic signed [24:0]   x2_sh;
  logic signed [10:0]   sf_c;

  always_comb begin
    tdb = clip8((POC_W+1)'(curr_poc)  - (POC_W+1)'(list0_poc));
    tdd = clip8((POC_W+1)'(list1_poc) - (POC_W+1)'(list0_poc));
    x   = XTAB[tdd[7:0]*XW +: XW];
    // multiplication-free: shift-and-add over the bits of |TD_B|
    tdb_mag  = tdb[7] ? 8'(-tdb) : 8'(tdb);
    prod_mag = '0;
    for (int i = 0; i < 8; i++)
      if (tdb_mag[i]) prod_mag = prod_mag + (25'(x) <<< i);
    x1    = tdb[7] ? -prod_mag : prod_mag;
    x2    = x1 + 25'sd32;                // + 20H
    x2_sh = x2 >>> 6;
    if (x2_sh < -1024)     sf_c = -11'sd1024;
    else if (x2_sh > 1023) sf_c = 11'sd1023;
    else                   sf_c = x2_sh[10:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale_factor <= '0;
      w0 <= '0;
      w1 <= '0;
      td_zero <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        td_zero <= (tdd == 0);
        if (tdd == 0) begin
          scale_factor <= 11'sd256;
          w0 <= 10'sd32;
          w1 <= 10'sd32;
        end else begin
          scale_factor <= sf_c;
          w1 <= 10'(sf_c >>> 2);
          w0 <= 10'sd64 - 10'(sf_c >>> 2);
        end
      end
    end
  end

endmodule
