// weighted_pred: weighted prediction and reconstruction, four pixels per cycle.
//
// Combines the list-0 and list-1 interpolator outputs into the prediction and
// adds the residual:
//   default    single: P = p,  bi: P = (p0 + p1 + 1) >> 1
//   explicit   single: P = Clip1(((p*w + 2^(logWD-1)) >> logWD) + o)   (logWD >= 1)
//                             Clip1(p*w + o)                            (logWD = 0)
//              bi    : P = Clip1(((p0*w0 + p1*w1 + 2^logWD) >> (logWD+1)) + ((o0+o1+1) >> 1))
//   implicit   bi    : as explicit bi with logWD = 5, o0 = o1 = 0 and the POC-derived
//                      weights (W0, W1 from scalefactor_gen); single: default.
//   recon = Clip1(P + residual)
// Explicit weights/offsets come from the slice header, selected by reference
// index outside this module.  The arithmetic is the H.264 formula; the design
// gives the block diagram (explicit and implicit paths, then residual add) and a
// one-cycle latency, which this module keeps: inputs with in_valid, results one
// cycle later with out_valid.  Weights are 10-bit signed to hold implicit values.
module weighted_pred
  import mc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  wpmode_t           mode,
  input  logic              bi,          // bi-prediction
  input  logic              use_l1,      // single prediction from list 1
  input  logic [PIX_W-1:0]  p0 [4],
  input  logic [PIX_W-1:0]  p1 [4],
  input  logic signed [9:0] w0,
  input  logic signed [9:0] w1,
  input  logic signed [7:0] o0,
  input  logic signed [7:0] o1,
  input  logic [2:0]        log_wd,
  input  logic signed [8:0] residual [4],
  output logic              out_valid,
  output logic [PIX_W-1:0]  pred [4],
  output logic [PIX_W-1:0]  recon [4]
);

  function automatic logic [PIX_W-1:0] wp1(input logic [PIX_W-1:0] p, input logic signed [9:0] w,
                                           input logic signed [7:0] o, input logic [2:0] lwd);
    logic signed [31:0] v;
    v = 32'(signed'({1'b0, p})) * 32'(w);
    if (lwd >= 3'd1) v = ((v + (32'sd1 <<< (lwd - 3'd1))) >>> lwd) + 32'(o);
    else             v = v + 32'(o);
    return clip1(v);
  endfunction

  function automatic logic [PIX_W-1:0] wp2(input logic [PIX_W-1:0] a, input logic [PIX_W-1:0] b,
                                           input logic signed [9:0] wa, input logic signed [9:0] wb,
                                           input logic signed [7:0] oa, input logic signed [7:0] ob,
                                           input logic [3:0] lwd);
    logic signed [31:0] v;
    v = 32'(signed'({1'b0, a})) * 32'(wa) + 32'(signed'({1'b0, b})) * 32'(wb);
    v = ((v + (32'sd1 <<< lwd)) >>> (lwd + 4'd1)) + ((32'(oa) + 32'(ob) + 32'sd1) >>> 1);
    return clip1(v);
  endfunction

  logic [PIX_W-1:0] pc [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic [PIX_W-1:0] ps;
      ps = use_l1 ? p1[k] : p0[k];
      unique case (mode)
        WP_EXPLICIT: pc[k] = bi ? wp2(p0[k], p1[k], w0, w1, o0, o1, {1'b0, log_wd})
                                : (use_l1 ? wp1(p1[k], w1, o1, log_wd) : wp1(p0[k], w0, o0, log_wd));
        WP_IMPLICIT: pc[k] = bi ? wp2(p0[k], p1[k], w0, w1, 8'sd0, 8'sd0, 4'd5) : ps;
        default:     pc[k] = bi ? PIX_W'((({1'b0, p0[k]} + {1'b0, p1[k]} + 9'd1)) >> 1) : ps;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 4; k++) begin pred[k] <= '0; recon[k] <= '0; end
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < 4; k++) begin
          pred[k]  <= pc[k];
          recon[k] <= clip1(32'(signed'({1'b0, pc[k]})) + 32'(residual[k]));
        end
    end
  end

endmodule
