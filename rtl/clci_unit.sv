// clci_unit: one combined luma/chroma interpolator unit (one output row).
//
// Each cycle with shift_en, one column of six integer pixels (the unit's input
// entry) enters two 6-stage shift chains:
//   integer chain : the integer pixel of the output row, chosen by a multiplexer
//                   between entry 2 and entry 3 from the vertical quarter fraction
//                   (entry 3 when frac_y = 3, so that the same datapath also gives
//                   the samples one row lower);
//   half chain    : the vertical filter of the six entries (C-FIR in units that
//                   carry chroma, plain FIR otherwise), kept unrounded.
// A FIR across the integer chain gives the horizontal half sample (b, or s one
// row lower) and a filter across the half chain gives the centre sample j; in
// chroma mode the two filters are the eighth-pel bilinear of the vertical and
// then the horizontal direction.  Rounding and clipping to 8 bits follow H.264.
//
// Every chain stage is a content-switch unit: a shift register plus a content
// buffer.  `swap` exchanges all shift registers with their content buffers in
// one cycle (the content switch of the horizontal data-reuse scheme), so the
// last five columns of a block can be parked and resumed later.
//
// Outputs are combinational from the chain registers.  With the newest column
// in stage 0, a luma result for window column c is valid once columns c..c+5
// have entered (stage 5 holds column c); the unit's integer taps are stages 3
// and 2 (G and its right neighbour H).  Chroma uses stages 1 and 0.
module clci_unit
  import mc_pkg::*;
#(
  parameter bit CHROMA = 1'b1   // 1: C-FIRs (units 0-1), 0: plain FIRs (units 2-3)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             swap,
  input  logic             chroma,
  input  logic [2:0]       frac_x,
  input  logic [2:0]       frac_y,
  input  logic [PIX_W-1:0] entry [6],
  // luma taps (rounded, 8 bits)
  output logic [PIX_W-1:0] g_int,    // integer sample G (or M when frac_y = 3)
  output logic [PIX_W-1:0] h_int,    // integer sample right of it
  output logic [PIX_W-1:0] b_half,   // horizontal half (b, or s)
  output logic [PIX_W-1:0] v_half,   // vertical half at G's column (h)
  output logic [PIX_W-1:0] v_half_r, // vertical half one column right (m)
  output logic [PIX_W-1:0] j_half,   // centre half sample j
  // chroma result
  output logic [PIX_W-1:0] c_pix
);

  localparam int HW = 15;   // unrounded vertical result width
  localparam int JW = HW + 6;

  logic [PIX_W-1:0]    int_sr [6], int_cb [6];
  logic signed [HW-1:0] hlf_sr [6], hlf_cb [6];

  // ---------------- vertical filter at the input ----------------
  logic signed [8:0]    ent_s [6];
  logic signed [HW-1:0] vert;
  logic [PIX_W-1:0]     int_in;

  always_comb
    for (int k = 0; k < 6; k++) ent_s[k] = {1'b0, entry[k]};

  if (CHROMA) begin : g_cv
    logic signed [14:0] lo, co;
    cfir #(.IW(9)) u_vc (.x(ent_s), .chroma(chroma), .d(frac_y), .luma_out(lo), .chroma_out(co));
    assign vert = chroma ? co : lo;
  end else begin : g_fv
    fir6 #(.IW(9)) u_vf (.x(ent_s), .y(vert));
  end

  assign int_in = (!chroma && frac_y[1:0] == 2'd3) ? entry[3] : entry[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) begin
        int_sr[k] <= '0; int_cb[k] <= '0;
        hlf_sr[k] <= '0; hlf_cb[k] <= '0;
      end
    end else if (swap) begin
      int_sr <= int_cb; int_cb <= int_sr;
      hlf_sr <= hlf_cb; hlf_cb <= hlf_sr;
    end else if (shift_en) begin
      int_sr[0] <= int_in;
      hlf_sr[0] <= vert;
      for (int k = 1; k < 6; k++) begin
        int_sr[k] <= int_sr[k-1];
        hlf_sr[k] <= hlf_sr[k-1];
      end
    end
  end

  // ---------------- horizontal filters ----------------
  logic signed [HW-1:0] int_taps [6], hlf_taps [6];
  logic signed [JW-1:0] b_raw, j_raw, c_raw;

  always_comb begin
    for (int k = 0; k < 6; k++) begin
      int_taps[k] = HW'({1'b0, int_sr[5-k]});   // x0 = oldest column
      hlf_taps[k] = hlf_sr[5-k];
    end
    if (chroma) begin
      hlf_taps[2] = hlf_sr[1];
      hlf_taps[3] = hlf_sr[0];
    end
  end

  fir6 #(.IW(HW)) u_hb (.x(int_taps), .y(b_raw));

  if (CHROMA) begin : g_ch
    logic signed [JW-1:0] lo;
    cfir #(.IW(HW)) u_hc (.x(hlf_taps), .chroma(chroma), .d(frac_x), .luma_out(lo), .chroma_out(c_raw));
    assign j_raw = lo;
  end else begin : g_fh
    fir6 #(.IW(HW)) u_hf (.x(hlf_taps), .y(j_raw));
    assign c_raw = '0;
  end

  function automatic logic [PIX_W-1:0] rnd(input logic signed [JW-1:0] v, input int sh);
    logic signed [JW-1:0] r;
    r = (v + (JW'(1) <<< (sh - 1))) >>> sh;
    return clip1(32'(r));
  endfunction

  always_comb begin
    g_int    = int_sr[3];
    h_int    = int_sr[2];
    b_half   = rnd(b_raw, 5);
    v_half   = rnd(JW'(hlf_sr[3]), 5);
    v_half_r = rnd(JW'(hlf_sr[2]), 5);
    j_half   = rnd(j_raw, 10);
    c_pix    = rnd(c_raw, 6);
  end

endmodule
