`timescale 1ns/1ps
// tb_scalefactor_gen: self-checking test of the pre-scalefactor generator and of
// the temporal direct MV scaling that uses it.
//
// For random picture order counts (including distances beyond the [-128, 127]
// clip and list-0/list-1 at the same POC) the ScaleFactor, the implicit weights
// and their one-cycle latency are compared with the H.264 formulas
//   TD_B = clip(-128,127, CurrPoc-List0Poc), TD_D = clip(-128,127, List1Poc-List0Poc),
//   X = (16384 + |TD_D/2|) / TD_D, SF = clip(-1024,1023, (TD_B*X + 32) >> 6),
//   W1 = SF >> 2, W0 = 64 - W1;
// then direct_mv is fed the result with a random co-located MV and checked
// against MV_L0 = (SF*MVc + 128) >> 8, MV_L1 = MV_L0 - MVc, also one cycle later.
module tb_scalefactor_gen;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, valid, td_zero, d_start, d_valid;
  logic signed [POC_W-1:0] curr_poc, list0_poc, list1_poc;
  logic signed [10:0] sf;
  logic signed [9:0] w0, w1;
  mv_t mv_col, mv_l0, mv_l1;

  scalefactor_gen dut (.clk, .rst_n, .start, .curr_poc, .list0_poc, .list1_poc,
                       .scale_factor(sf), .w0, .w1, .td_zero, .valid);
  direct_mv u_dmv (.clk, .rst_n, .start(d_start), .scale_factor(sf), .td_zero, .mv_col,
                   .mv_l0, .mv_l1, .valid(d_valid));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clipi(int lo, int hi, int v); return v < lo ? lo : (v > hi ? hi : v); endfunction

  initial begin
    int cp, p0, p1, tb, td, x, esf, em0x, em0y, cx, cy;
    start = 0; d_start = 0; curr_poc = 0; list0_poc = 0; list1_poc = 0; mv_col = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      cp = $urandom_range(300); p0 = $urandom_range(300); p1 = (i % 17 == 0) ? p0 : $urandom_range(300);
      if (i < 100) begin p0 = cp - int'($urandom_range(20)); p1 = cp + int'($urandom_range(20)); end
      @(negedge clk);
      curr_poc = 16'(cp); list0_poc = 16'(p0); list1_poc = 16'(p1); start = 1;
      @(negedge clk);
      start = 0;
      tb = clipi(-128, 127, cp - p0); td = clipi(-128, 127, p1 - p0);
      checks++;
      if (!valid) begin failures++; $display("valid not one cycle after start"); end
      if (td == 0) begin
        checks++;
        if (!td_zero || w0 != 32 || w1 != 32) begin failures++; $display("td = 0: weights %0d %0d", w0, w1); end
        esf = 256;
      end else begin
        x = (16384 + ((td < 0 ? -td : td) / 2)) / td;
        esf = clipi(-1024, 1023, (tb * x + 32) >>> 6);
        checks += 3;
        if (td_zero) begin failures++; $display("td_zero set for td %0d", td); end
        if (sf != esf) begin failures++; $display("poc %0d %0d %0d: SF %0d expected %0d", cp, p0, p1, sf, esf); end
        if (w1 != (esf >>> 2) || w0 != 64 - (esf >>> 2)) begin failures++; $display("weights %0d %0d for SF %0d", w0, w1, esf); end
      end
      // temporal direct scaling with this ScaleFactor
      cx = int'($urandom_range(400)) - 200; cy = int'($urandom_range(400)) - 200;
      mv_col = '{x: 10'(cx), y: 10'(cy)}; d_start = 1;
      @(negedge clk);
      d_start = 0;
      if (td == 0) begin em0x = cx; em0y = cy; end
      else begin em0x = (esf * cx + 128) >>> 8; em0y = (esf * cy + 128) >>> 8; end
      checks++;
      if (!d_valid || mv_l0.x != 10'(em0x) || mv_l0.y != 10'(em0y) ||
          mv_l1.x != 10'(td == 0 ? 0 : em0x - cx) || mv_l1.y != 10'(td == 0 ? 0 : em0y - cy)) begin
        failures++;
        $display("direct: SF %0d MVc (%0d,%0d) -> L0 (%0d,%0d) L1 (%0d,%0d)", esf, cx, cy,
                 mv_l0.x, mv_l0.y, mv_l1.x, mv_l1.y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
