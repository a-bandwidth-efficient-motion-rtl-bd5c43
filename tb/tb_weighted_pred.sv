`timescale 1ns/1ps
// tb_weighted_pred: self-checking test of weighted prediction and
// reconstruction.  Random pixels, weights, offsets, logWD and residuals are
// applied in every mode (default, explicit, implicit; single list 0, single
// list 1, bi-prediction); prediction and Clip1(prediction + residual) are
// compared with the H.264 weighted-sample formulas, and the result must appear
// exactly one cycle after in_valid (the design's one-cycle latency).
module tb_weighted_pred;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, bi, use_l1, out_valid;
  wpmode_t mode;
  logic [PIX_W-1:0] p0 [4], p1 [4], pred [4], recon [4];
  logic signed [9:0] w0, w1;
  logic signed [7:0] o0, o1;
  logic [2:0] log_wd;
  logic signed [8:0] residual [4];

  weighted_pred dut (.*);

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clp(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction

  int ep [4], er [4];
  initial begin
    in_valid = 0; bi = 0; use_l1 = 0; mode = WP_DEFAULT; w0 = 0; w1 = 0; o0 = 0; o1 = 0; log_wd = 0;
    for (int k = 0; k < 4; k++) begin p0[k] = 0; p1[k] = 0; residual[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      mode = wpmode_t'(i % 3); bi = (i / 3) % 3 == 2; use_l1 = (i / 3) % 3 == 1;
      log_wd = 3'($urandom_range(7));
      w0 = 10'(int'($urandom_range(256)) - 128); w1 = 10'(int'($urandom_range(256)) - 128);
      if (mode == WP_IMPLICIT) begin w1 = 10'(int'($urandom_range(192)) - 64); w0 = 10'(64 - int'(w1)); end
      o0 = 8'($urandom); o1 = 8'($urandom);
      for (int k = 0; k < 4; k++) begin
        int a, b, v;
        p0[k] = 8'($urandom); p1[k] = 8'($urandom); residual[k] = 9'(int'($urandom_range(510)) - 255);
        a = p0[k]; b = p1[k];
        if (mode == WP_EXPLICIT) begin
          if (bi) v = clp(((a * w0 + b * w1 + (1 << log_wd)) >>> (log_wd + 1)) + ((o0 + o1 + 1) >>> 1));
          else if (log_wd >= 1) v = clp((((use_l1 ? b : a) * (use_l1 ? w1 : w0) + (1 << (log_wd - 1))) >>> log_wd) + (use_l1 ? o1 : o0));
          else v = clp((use_l1 ? b : a) * (use_l1 ? w1 : w0) + (use_l1 ? o1 : o0));
        end else if (mode == WP_IMPLICIT && bi) v = clp((a * w0 + b * w1 + 32) >>> 6);
        else if (bi) v = (a + b + 1) >> 1;
        else v = use_l1 ? b : a;
        ep[k] = v; er[k] = clp(v + residual[k]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid not one cycle after in_valid"); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (pred[k] != ep[k] || recon[k] != er[k]) begin
          failures++;
          if (failures < 10) $display("mode %0d bi %0d l1 %0d: pred %0d exp %0d recon %0d exp %0d",
                                      mode, bi, use_l1, pred[k], ep[k], recon[k], er[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("out_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
