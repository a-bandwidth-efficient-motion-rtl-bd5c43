`timescale 1ns/1ps
// tb_clci_interp: self-checking test of the combined luma/chroma interpolator.
//
// A random reference picture is kept in the testbench; 32-bit words (four
// vertically adjacent pixels, 4-row aligned) are fed as the frame memory would.
// Four luma blocks are run in the order upper-left, lower-left, upper-right,
// lower-right of an 8x8 area with one motion vector, using no reuse, vertical
// reuse, horizontal reuse (after a content switch) and both; every fractional
// position is checked against the H.264 interpolation formulas, and the number
// of word cycles per block is checked against 27 / 9 / 12 / 4.  Chroma 2x2
// blocks are checked against the eighth-pel bilinear formula, with and without
// horizontal reuse (3 and 2 word cycles when the window lies in one word row).
module tb_clci_interp;
  import mc_pkg::*;

  localparam int W = 40, H = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pic [H][W];

  logic start, chroma, hreuse, vreuse, swap;
  logic [2:0] fx, fy;
  logic [1:0] row_off;
  logic [4:0] rrf_base;
  logic word_valid, word_ready, busy, out_valid, done;
  logic [WORD_W-1:0] word;
  logic [1:0] out_col;
  logic [PIX_W-1:0] out_pix [4];

  clci_interp dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int P(int x, int y);
    if (x < 0) x = 0; if (x >= W) x = W-1;
    if (y < 0) y = 0; if (y >= H) y = H-1;
    return pic[y][x];
  endfunction
  function automatic int clp(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int tap6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic int b1(int x, int y); return tap6(P(x-2,y),P(x-1,y),P(x,y),P(x+1,y),P(x+2,y),P(x+3,y)); endfunction
  function automatic int h1(int x, int y); return tap6(P(x,y-2),P(x,y-1),P(x,y),P(x,y+1),P(x,y+2),P(x,y+3)); endfunction
  function automatic int bb(int x, int y); return clp((b1(x,y)+16)>>>5); endfunction
  function automatic int hh(int x, int y); return clp((h1(x,y)+16)>>>5); endfunction
  function automatic int jj(int x, int y);
    return clp((tap6(h1(x-2,y),h1(x-1,y),h1(x,y),h1(x+1,y),h1(x+2,y),h1(x+3,y))+512)>>>10);
  endfunction
  function automatic int av(int a, int b); return (a+b+1)>>1; endfunction
  function automatic int ref_luma(int x, int y, int qx, int qy);
    int G, Hr, M, b, s, h, m, j;
    G = P(x,y); Hr = P(x+1,y); M = P(x,y+1);
    b = bb(x,y); s = bb(x,y+1); h = hh(x,y); m = hh(x+1,y); j = jj(x,y);
    case ({qx[1:0], qy[1:0]})
      4'b0000: return G;        4'b0100: return av(G,b);  4'b1000: return b;  4'b1100: return av(Hr,b);
      4'b0001: return av(G,h);  4'b0010: return h;        4'b0011: return av(M,h);
      4'b0101: return av(b,h);  4'b1101: return av(b,m);  4'b0111: return av(h,s); 4'b1111: return av(m,s);
      4'b1001: return av(b,j);  4'b1010: return j;        4'b1011: return av(j,s);
      4'b0110: return av(h,j);  default: return av(j,m);
    endcase
  endfunction
  function automatic int ref_chroma(int x, int y, int dx, int dy);
    return ((8-dx)*(8-dy)*P(x,y) + dx*(8-dy)*P(x+1,y) + (8-dx)*dy*P(x,y+1) + dx*dy*P(x+1,y+1) + 32) >>> 6;
  endfunction

  function automatic logic [31:0] mword(int x, int yal);
    return {P(x,yal+3)[7:0], P(x,yal+2)[7:0], P(x,yal+1)[7:0], P(x,yal)[7:0]};
  endfunction

  int got [4][4];
  int wcycles;

  // run one block: luma (4x4 at x0,y0) or chroma (2x2 at x0,y0)
  task automatic run_block(input bit c, input int x0, input int y0, input int qx, input int qy,
                           input bit hr, input bit vr, input bit sw, input int base, input int exp_cycles);
    int wx0, wy0, yal, c0, ncol, nw, w0;
    wx0 = c ? x0 : x0 - 2;
    wy0 = c ? y0 : y0 - 2;
    yal = wy0 - (((wy0 % 4) + 4) % 4);
    @(negedge clk);
    start = 1; chroma = c; fx = 3'(qx); fy = 3'(qy); hreuse = hr; vreuse = vr; swap = sw;
    row_off = 2'(wy0 - yal); rrf_base = 5'(base);
    @(negedge clk);
    start = 0;
    c0   = c ? (hr ? 1 : 0) : (hr ? 5 : 0);
    ncol = c ? 3 : 9;
    if (c) nw = ((wy0 - yal) <= 1) ? 1 : 2;
    else   nw = vr ? 1 : 3;
    w0 = (!c && vr) ? 2 : 0;
    wcycles = 0;
    fork
      begin
        for (int col = c0; col < ncol; col++)
          for (int w = w0; w < w0 + nw; w++) begin
            word_valid = 1; word = mword(wx0 + col, yal + 4*w);
            while (!word_ready) begin @(posedge clk); #1; end
            @(posedge clk); #1;
            wcycles++;
          end
        word_valid = 0;
      end
      begin
        int n = 0;
        while (n < (c ? 2 : 4)) begin
          @(posedge clk); #1;
          if (out_valid) begin
            for (int r = 0; r < (c ? 2 : 4); r++) got[r][out_col] = out_pix[r];
            n++;
          end
        end
      end
    join
    checks++;
    if (wcycles != exp_cycles) begin
      failures++; $display("cycle count %0d expected %0d (c=%0d hr=%0d vr=%0d)", wcycles, exp_cycles, c, hr, vr);
    end
    for (int r = 0; r < (c ? 2 : 4); r++)
      for (int k = 0; k < (c ? 2 : 4); k++) begin
        int e = c ? ref_chroma(x0+k, y0+r, qx, qy) : ref_luma(x0+k, y0+r, qx, qy);
        checks++;
        if (got[r][k] != e) begin
          failures++;
          $display("mismatch c=%0d blk(%0d,%0d) q=(%0d,%0d) r=%0d k=%0d got %0d exp %0d", c, x0, y0, qx, qy, r, k, got[r][k], e);
        end
      end
  endtask

  initial begin
    start = 0; chroma = 0; fx = 0; fy = 0; hreuse = 0; vreuse = 0; swap = 0;
    row_off = 0; rrf_base = 0; word_valid = 0; word = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) pic[y][x] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int qy = 0; qy < 4; qy++)
      for (int qx = 0; qx < 4; qx++) begin
        int bx = 8 + 2*qx, by = 8 + 3*qy;
        run_block(0, bx,     by,     qx, qy, 0, 0, 0, 0, 27);  // block 0
        run_block(0, bx,     by + 4, qx, qy, 0, 1, 1, 0, 9);   // block 2: vertical reuse
        run_block(0, bx + 4, by,     qx, qy, 1, 0, 1, 4, 12);  // block 1: horizontal reuse
        run_block(0, bx + 4, by + 4, qx, qy, 1, 1, 1, 4, 4);   // block 3: both
      end
    for (int d = 0; d < 8; d++) begin
      run_block(1, 4 + d, 4, d, 7 - d, 0, 0, 0, 0, 3);
      run_block(1, 6 + d, 4, d, 7 - d, 1, 0, 0, 0, 2);
      run_block(1, 4 + d, 6, (d + 3) % 8, d, 0, 0, 0, 0, 6);   // window crosses a word row
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
