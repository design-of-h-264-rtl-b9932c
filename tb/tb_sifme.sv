// Self-checking test of the single-iteration fractional search. For random
// windows, partitions and MVs the testbench computes, with its own
// quarter-pel sample equations and Hadamard SATD, the cost of the six
// candidates ((0,0), the predicted fraction and its four diamond neighbours)
// plus lambda*|mvd|, and compares the chosen MV and cost (first minimum
// wins). Half of the current blocks are copied from the window at one of the
// candidate positions so exact matches occur. It also checks the done
// latency (w4*h4+1 cycles) and the out-of-window case, where the integer
// MV must be returned unrefined; both outcomes are counted.
module tb_sifme;
  import h264_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pixel_t win [37][37], cur_mb [16][16];
  mv_t mv, mvp, best_mv;
  logic [1:0] x4, y4;
  logic [2:0] w4, h4;
  logic [7:0] lambda;
  logic busy, done, out_of_win;
  logic [19:0] best_cost;
  int checks = 0, failures = 0, n_oow = 0, n_in = 0, n_frac = 0;
  int hd [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  sifme dut (.*);
  always #5 clk = !clk;
  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int clip1(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int px(int y, int x);
    y = y < 0 ? 0 : (y > 36 ? 36 : y); x = x < 0 ? 0 : (x > 36 ? 36 : x);
    return int'(win[y][x]);
  endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  function automatic int b1(int y, int x);
    return t6(px(y,x-2), px(y,x-1), px(y,x), px(y,x+1), px(y,x+2), px(y,x+3));
  endfunction
  function automatic int hb(int y, int x); return clip1((b1(y,x) + 16) >>> 5); endfunction
  function automatic int hh(int y, int x);
    return clip1((t6(px(y-2,x), px(y-1,x), px(y,x), px(y+1,x), px(y+2,x), px(y+3,x)) + 16) >>> 5);
  endfunction
  function automatic int hj(int y, int x);
    return clip1((t6(b1(y-2,x), b1(y-1,x), b1(y,x), b1(y+1,x), b1(y+2,x), b1(y+3,x)) + 512) >>> 10);
  endfunction
  // quarter-pel sample at integer (y,x) plus fraction (fx,fy) in -3..3
  function automatic int sample(int y, int x, int fx, int fy);
    automatic int g, b, h, j, s, m;
    y += fy >>> 2; x += fx >>> 2; fx &= 3; fy &= 3;
    g = px(y,x); b = hb(y,x); h = hh(y,x); j = hj(y,x); s = hb(y+1,x); m = hh(y,x+1);
    case ({fx[1:0], fy[1:0]})
      4'b0000: return g;
      4'b0001: return (g + h + 1) >>> 1;
      4'b0010: return h;
      4'b0011: return (px(y+1,x) + h + 1) >>> 1;
      4'b0100: return (g + b + 1) >>> 1;
      4'b0101: return (b + h + 1) >>> 1;
      4'b0110: return (h + j + 1) >>> 1;
      4'b0111: return (h + s + 1) >>> 1;
      4'b1000: return b;
      4'b1001: return (b + j + 1) >>> 1;
      4'b1010: return j;
      4'b1011: return (j + s + 1) >>> 1;
      4'b1100: return (px(y,x+1) + b + 1) >>> 1;
      4'b1101: return (b + m + 1) >>> 1;
      4'b1110: return (j + m + 1) >>> 1;
      default: return (m + s + 1) >>> 1;
    endcase
  endfunction
  function automatic int satd_ref(int d [4][4]);
    automatic int t [4][4], s = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        t[r][c] = 0;
        for (int k = 0; k < 4; k++) t[r][c] += hd[r][k] * d[k][c];
      end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        automatic int v = 0;
        for (int k = 0; k < 4; k++) v += t[r][k] * hd[c][k];
        s += v < 0 ? -v : v;
      end
    return (s + 1) / 2;
  endfunction
  function automatic int ab(int v); return v < 0 ? -v : v; endfunction

  initial begin
    int sizes [4][2] = '{'{4,4}, '{4,2}, '{2,2}, '{1,1}};
    mv = '0; mvp = '0; x4 = '0; y4 = '0; w4 = 3'd1; h4 = 3'd1; lambda = '0;
    for (int r = 0; r < 37; r++) for (int c = 0; c < 37; c++) win[r][c] = '0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur_mb[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic int sz = $urandom_range(0, 3), ix, iy, px0, py0, cxs [6], cys [6];
      automatic int fx, fy, best = -1, bk = 0, oow, t0, lat;
      automatic int ox = (n % 10 == 9) ? $urandom_range(8, 20) : $urandom_range(0, 6) - 3;
      automatic int oy = $urandom_range(0, 6) - 3;
      @(negedge clk);
      for (int r = 0; r < 37; r++) for (int c = 0; c < 37; c++) win[r][c] = pixel_t'($urandom_range(0, 255));
      w4 = 3'(sizes[sz][0]); h4 = 3'(sizes[sz][1]);
      ix = $urandom_range(0, 4 - sizes[sz][0]); iy = $urandom_range(0, 4 - sizes[sz][1]);
      ix -= ix % sizes[sz][0]; iy -= iy % sizes[sz][1];
      x4 = 2'(ix); y4 = 2'(iy);
      mvp.x = mvc_t'($urandom_range(0, 40) - 20); mvp.y = mvc_t'($urandom_range(0, 40) - 20);
      mv.x = mvp.x + mvc_t'(4 * ox); mv.y = mvp.y + mvc_t'(4 * oy);
      mv.x = mv.x - mvc_t'(int'(mv.x) & 3); mv.y = mv.y - mvc_t'(int'(mv.y) & 3);
      lambda = 8'($urandom_range(0, 6));
      fx = (int'(mvp.x) - int'(mv.x)) % 4; fy = (int'(mvp.y) - int'(mv.y)) % 4;
      cxs = '{0, fx, fx + 1, fx - 1, fx, fx}; cys = '{0, fy, fy, fy, fy + 1, fy - 1};
      px0 = 10 + ((int'(mv.x) - int'(mvp.x)) >>> 2); py0 = 10 + ((int'(mv.y) - int'(mvp.y)) >>> 2);
      // half of the cases: current block copied from a candidate position
      begin
        automatic int k = $urandom_range(0, 11);
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++)
            cur_mb[r][c] = k < 6 ? pixel_t'(sample(py0 + r, px0 + c, cxs[k], cys[k]))
                                 : pixel_t'($urandom_range(0, 255));
      end
      oow = (px0 + 4*ix - 3 < 0) || (px0 + 4*(ix + sizes[sz][0]) + 4 > 36) ||
            (py0 + 4*iy - 3 < 0) || (py0 + 4*(iy + sizes[sz][1]) + 4 > 36);
      for (int k = 0; k < 6; k++) begin
        automatic int cost = 0;
        for (int by = 0; by < sizes[sz][1]; by++)
          for (int bx = 0; bx < sizes[sz][0]; bx++) begin
            automatic int d [4][4];
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++) begin
                automatic int yy = 4*(iy+by) + r, xx = 4*(ix+bx) + c;
                d[r][c] = int'(cur_mb[yy][xx]) - sample(py0 + yy, px0 + xx, cxs[k], cys[k]);
              end
            cost += satd_ref(d);
          end
        cost += int'(lambda) * (ab(int'(mv.x) + cxs[k] - int'(mvp.x)) + ab(int'(mv.y) + cys[k] - int'(mvp.y)));
        if ((!oow || k == 0) && (best < 0 || cost < best)) begin best = cost; bk = k; end
      end
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      lat = 1;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      checks += 4;
      if (lat != sizes[sz][0] * sizes[sz][1] + 1) begin failures++; $display("latency %0d", lat); end
      if (out_of_win != oow[0]) begin failures++; $display("oow flag %0d expected %0d", out_of_win, oow); end
      if (int'(best_cost) != best) begin failures++; $display("cost %0d expected %0d", best_cost, best); end
      if (int'(best_mv.x) != int'(mv.x) + cxs[bk] || int'(best_mv.y) != int'(mv.y) + cys[bk]) begin
        failures++; $display("mv (%0d,%0d) expected candidate %0d", best_mv.x, best_mv.y, bk);
      end
      if (oow) n_oow++; else n_in++;
      if (bk != 0) n_frac++;
    end
    checks += 3;
    if (n_oow == 0) failures++;
    if (n_in == 0) failures++;
    if (n_frac == 0) failures++;
    $display("out-of-window %0d, refined %0d, fractional winners %0d", n_oow, n_in, n_frac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
