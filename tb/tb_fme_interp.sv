// Self-checking test of the fractional-pel interpolator. The testbench builds
// the half-pel samples of the whole patch (six-tap filter, centre sample
// from unrounded horizontal intermediates) and picks each quarter-pel
// sample from the standard's position table (average of the named
// integer/half samples), for all 81 quarter-pel offsets in -1..+1 pel.
module tb_fme_interp;
  import h264_pkg::*;
  pixel_t patch [12][12], pred [4][4];
  logic signed [3:0] qx, qy;
  int checks = 0, failures = 0;
  fme_interp dut (.patch, .qx, .qy, .pred);
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int clip1(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int px(int y, int x); return int'(patch[y][x]); endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction
  // horizontal half sample right of (y,x), unrounded and final
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
  function automatic int sample(int y, int x, int fx, int fy);
    automatic int g = px(y,x), b = hb(y,x), h = hh(y,x), j = hj(y,x);
    automatic int s = hb(y+1,x), m = hh(y,x+1);
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
  initial begin
    for (int n = 0; n < 40; n++) begin
      for (int r = 0; r < 12; r++)
        for (int c = 0; c < 12; c++)
          patch[r][c] = n == 0 ? pixel_t'(((r + c) % 2) * 255) : pixel_t'($urandom);
      for (int oy = -4; oy <= 4; oy++)
        for (int ox = -4; ox <= 4; ox++) begin
          qx = 4'(ox); qy = 4'(oy);
          #1;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              automatic int e = sample(3 + r + (oy >>> 2), 3 + c + (ox >>> 2), ox & 3, oy & 3);
              checks++;
              if (int'(pred[r][c]) != e) begin
                failures++;
                if (failures < 5) $display("q(%0d,%0d) [%0d][%0d]: %0d expected %0d", ox, oy, r, c, pred[r][c], e);
              end
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
