// bilinear: quarter-sample stage of the luma interpolator.
//
// From the samples one CLCI unit delivers for an output pixel (integer G, its
// right neighbour, the horizontal half b/s, the vertical halves h and m, and the
// centre j) it selects the full-, half- or quarter-sample value for the motion
// vector's quarter fractions (fx, fy).  Quarter samples are the rounded average
// of the two nearest integer/half samples, (p + q + 1) >> 1, as H.264 defines.
// Because the CLCI unit already switches to the lower row when fy = 3, the same
// six inputs cover all sixteen positions.  In chroma mode the unit's eighth-pel
// result passes through unchanged.  Purely combinational.
module bilinear
  import mc_pkg::*;
(
  input  logic             chroma,
  input  logic [1:0]       fx,
  input  logic [1:0]       fy,
  input  logic [PIX_W-1:0] g_int,
  input  logic [PIX_W-1:0] h_int,
  input  logic [PIX_W-1:0] b_half,
  input  logic [PIX_W-1:0] v_half,
  input  logic [PIX_W-1:0] v_half_r,
  input  logic [PIX_W-1:0] j_half,
  input  logic [PIX_W-1:0] c_pix,
  output logic [PIX_W-1:0] pix
);

  function automatic logic [PIX_W-1:0] avg(input logic [PIX_W-1:0] p, input logic [PIX_W-1:0] q);
    logic [PIX_W:0] s;
    s = {1'b0, p} + {1'b0, q} + 9'd1;
    return s[PIX_W:1];
  endfunction

  always_comb begin
    if (chroma) pix = c_pix;
    else begin
      unique case ({fx, fy})
        4'b00_00: pix = g_int;
        4'b01_00: pix = avg(g_int, b_half);
        4'b10_00: pix = b_half;
        4'b11_00: pix = avg(h_int, b_half);
        4'b00_01: pix = avg(g_int, v_half);
        4'b00_10: pix = v_half;
        4'b00_11: pix = avg(g_int, v_half);
        4'b01_01: pix = avg(b_half, v_half);
        4'b11_01: pix = avg(b_half, v_half_r);
        4'b01_11: pix = avg(v_half, b_half);
        4'b11_11: pix = avg(v_half_r, b_half);
        4'b10_01: pix = avg(b_half, j_half);
        4'b10_10: pix = j_half;
        4'b10_11: pix = avg(j_half, b_half);
        4'b01_10: pix = avg(v_half, j_half);
        default:  pix = avg(j_half, v_half_r);   // fx = 3, fy = 2
      endcase
    end
  end

endmodule
