// Fractional-pel interpolation of one 4x4 luma block. The block origin is
// pixel (3,3) of a 12x12 integer-pixel patch, so a displacement of -1..+1
// pel (quarter-pel values -4..+4 per component) and the six-tap filter
// support stay inside the patch. Half-pel samples use the H.264 six-tap
// filter (1,-5,20,20,-5,1) with rounding and clipping; the centre half-pel
// sample is filtered from unclipped intermediate values; quarter-pel samples
// are the rounded average of the two nearest integer/half-pel samples, as the
// standard defines them. Combinational. The original design builds this from
// horizontal and vertical FIR arrays with a shift buffer; this is a direct
// per-sample evaluation of the same function.
module fme_interp
  import h264_pkg::*;
(
  input  pixel_t            patch [12][12],
  input  logic signed [3:0] qx,            // -4..+4 quarter pel
  input  logic signed [3:0] qy,
  output pixel_t            pred [4][4]
);
  function automatic int tap6(input int e, input int f, input int g,
                              input int h, input int i, input int j);
    return e - 5*f + 20*g + 20*h - 5*i + j;
  endfunction
  function automatic int clip8(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction
  function automatic int px(input pixel_t p [12][12], input int x, input int y);
    return int'(p[y][x]);
  endfunction
  // horizontal half sample between (x,y) and (x+1,y): unclipped, unrounded
  function automatic int hh1(input pixel_t p [12][12], input int x, input int y);
    return tap6(px(p,x-2,y), px(p,x-1,y), px(p,x,y), px(p,x+1,y), px(p,x+2,y), px(p,x+3,y));
  endfunction
  function automatic int hv1(input pixel_t p [12][12], input int x, input int y);
    return tap6(px(p,x,y-2), px(p,x,y-1), px(p,x,y), px(p,x,y+1), px(p,x,y+2), px(p,x,y+3));
  endfunction
  function automatic int hh(input pixel_t p [12][12], input int x, input int y);
    return clip8((hh1(p,x,y) + 16) >>> 5);
  endfunction
  function automatic int hv(input pixel_t p [12][12], input int x, input int y);
    return clip8((hv1(p,x,y) + 16) >>> 5);
  endfunction
  function automatic int hc(input pixel_t p [12][12], input int x, input int y);
    return clip8((tap6(hh1(p,x,y-2), hh1(p,x,y-1), hh1(p,x,y), hh1(p,x,y+1),
                       hh1(p,x,y+2), hh1(p,x,y+3)) + 512) >>> 10);
  endfunction
  function automatic int avg(input int a, input int b);
    return (a + b + 1) >>> 1;
  endfunction
  function automatic int sample(input pixel_t p [12][12], input int x, input int y,
                                input int fx, input int fy);
    case ({2'(fx), 2'(fy)})
      4'b00_00: return px(p,x,y);
      4'b01_00: return avg(px(p,x,y), hh(p,x,y));
      4'b10_00: return hh(p,x,y);
      4'b11_00: return avg(px(p,x+1,y), hh(p,x,y));
      4'b00_01: return avg(px(p,x,y), hv(p,x,y));
      4'b00_10: return hv(p,x,y);
      4'b00_11: return avg(px(p,x,y+1), hv(p,x,y));
      4'b10_10: return hc(p,x,y);
      4'b10_01: return avg(hh(p,x,y), hc(p,x,y));
      4'b10_11: return avg(hc(p,x,y), hh(p,x,y+1));
      4'b01_10: return avg(hv(p,x,y), hc(p,x,y));
      4'b11_10: return avg(hc(p,x,y), hv(p,x+1,y));
      4'b01_01: return avg(hh(p,x,y), hv(p,x,y));
      4'b11_01: return avg(hh(p,x,y), hv(p,x+1,y));
      4'b01_11: return avg(hv(p,x,y), hh(p,x,y+1));
      default:  return avg(hv(p,x+1,y), hh(p,x,y+1));
    endcase
  endfunction

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        automatic int X = 4*(c+3) + int'(qx);
        automatic int Y = 4*(r+3) + int'(qy);
        pred[r][c] = pixel_t'(sample(patch, X >>> 2, Y >>> 2, X & 3, Y & 3));
      end
  end
endmodule
