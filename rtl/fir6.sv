// fir6: plain luma 6-tap FIR, taps (1, -5, 20, 20, -5, 1), unrounded output.
//
// Used in every CLCI unit on the integer-pixel row (horizontal half sample) and,
// in CLCI units 2 and 3 which never carry chroma, in place of the combined
// C-FIR.  Multiplications are written as shifts and adds
// (20 = 16 + 4, 5 = 4 + 1).  Purely combinational.
module fir6 #(
  parameter int unsigned IW = 16   // input width, signed
)(
  input  logic signed [IW-1:0] x [6],
  output logic signed [IW+5:0] y
);

  localparam int OW = IW + 6;
  logic signed [OW-1:0] s0, s1, s2;

  always_comb begin
    s0 = OW'(x[0]) + OW'(x[5]);
    s1 = OW'(x[1]) + OW'(x[4]);
    s2 = OW'(x[2]) + OW'(x[3]);
    y  = s0 - ((s1 <<< 2) + s1) + ((s2 <<< 4) + (s2 <<< 2));
  end

endmodule
