// cfir: combined luma/chroma FIR filter (C-FIR).
//
// One adder network serves both interpolation filters of H.264:
//   luma   : 6-tap  x0 - 5*x1 + 20*x2 + 20*x3 - 5*x4 + x5   (unrounded)
//   chroma : 2-tap  (8 - d)*A + d*B, d = 0..7 (eighth-pel),  A = x2, B = x3
// Structure, after the combined filter diagram of this design: three pair
// adders whose six operands pass through bitwise-AND gates, a "<<1" multiplexer
// on the second pair, "<<2" on the third, a combining adder T, an adder U = P1 + T,
// the luma output U + (T << 2), and a chroma output multiplexer that selects
// A << 3 when d = 0.
//   luma  : pairs (x0,x5), (x1,x4), (x2,x3); AND masks all ones;
//           T = 4*P3 - P2, so U + 4T = P1 + 5T = P1 - 5*P2 + 20*P3.
//   chroma: every pair gets (A, B); the AND masks are the bits of e = 8 - d on the
//           A side and of d on the B side, so P1 + 2*P2 + 4*P3 = e*A + d*B
//           (e = 8 only when d = 0, which the A << 3 path covers).
// The sign of the P2 term in luma mode and the routing of A/B to all pairs in
// chroma mode (the "MUX x 2" the design counts) are this module's reading of
// the diagram.  Purely combinational.
module cfir #(
  parameter int unsigned IW = 16   // input width, signed
)(
  input  logic signed [IW-1:0]   x [6],
  input  logic                   chroma,
  input  logic [2:0]             d,
  output logic signed [IW+5:0]   luma_out,
  output logic signed [IW+5:0]   chroma_out
);

  localparam int OW = IW + 6;

  logic signed [OW-1:0] a [3], b [3];
  logic signed [OW-1:0] p1, p2, p3, t, u;
  logic [3:0] e;

  always_comb begin
    e = 4'd8 - {1'b0, d};
    if (chroma) begin
      for (int k = 0; k < 3; k++) begin
        a[k] = e[k] ? OW'(x[2]) : '0;
        b[k] = d[k] ? OW'(x[3]) : '0;
      end
    end else begin
      a[0] = OW'(x[0]); b[0] = OW'(x[5]);
      a[1] = OW'(x[1]); b[1] = OW'(x[4]);
      a[2] = OW'(x[2]); b[2] = OW'(x[3]);
    end
    p1 = a[0] + b[0];
    p2 = a[1] + b[1];
    p3 = a[2] + b[2];
    t  = chroma ? (p3 <<< 2) + (p2 <<< 1) : (p3 <<< 2) - p2;
    u  = p1 + t;
    luma_out   = u + (t <<< 2);
    chroma_out = (d == 3'd0) ? (OW'(x[2]) <<< 3) : u;
  end

endmodule
