// Intra prediction generator, eight predicted pixels per cycle.
// One generator covers every luma and chroma intra mode of the encoder:
//   I4  (intra 4x4, modes 0-8):  step s = 0..1 gives rows 2s and 2s+1;
//   I8  (intra 8x8, modes 0-8):  step s = 0..7 gives row s, using the
//        [1 2 1]-filtered reference samples of the high profile;
//   I16 (intra 16x16, modes 0 V, 1 H, 2 DC): step s = 0..31 gives the
//        left (s even) or right (s odd) half of row s/2;
//   C8  (chroma 8x8, modes 0 DC, 1 H, 2 V): step s = 0..7 gives row s.
// Plane prediction (intra 16x16 mode 3, chroma mode 3) is removed, as in the
// original algorithm. top[] holds the row above (for I4 entries 4-7 are the
// top-right samples, for I8 entries 8-15), left[] the column to the left,
// corner the above-left sample. Unavailable top-right samples are replaced
// by the last top sample as the standard requires; for I8 reference
// filtering the top, left and corner samples are assumed available whenever
// a directional mode is selected. The DC sums are formed combinationally
// from the neighbours (this design's choice; the original design accumulates them
// in a register over several cycles). Combinational.
module intra_pred_gen
  import h264_pkg::*;
#(
  parameter int PAR = 8
) (
  input  logic [1:0]  blk,        // 0: I4, 1: I8, 2: I16, 3: C8
  input  logic [3:0]  mode,
  input  logic [4:0]  step,
  input  pixel_t      top  [16],
  input  pixel_t      left [16],
  input  pixel_t      corner,
  input  logic        avail_top,
  input  logic        avail_left,
  input  logic        avail_tr,
  output pixel_t      pred [PAR]
);
  localparam logic [1:0] B_I4 = 2'd0, B_I8 = 2'd1, B_I16 = 2'd2, B_C8 = 2'd3;

  // reference samples after top-right substitution and 8x8 filtering
  int T [16];
  int L [16];
  int Q;
  always_comb begin
    automatic int n = (blk == B_I4) ? 4 : 8;
    for (int i = 0; i < 16; i++) begin
      T[i] = int'(top[i]);
      L[i] = int'(left[i]);
    end
    Q = int'(corner);
    if ((blk == B_I4 || blk == B_I8) && !avail_tr)
      for (int i = 0; i < 16; i++)
        if (i >= n) T[i] = int'(top[n-1]);
    if (blk == B_I8) begin
      automatic int tt [16] = T;
      automatic int ll [16] = L;
      T[0] = (Q + 2*tt[0] + tt[1] + 2) >>> 2;
      for (int i = 1; i < 15; i++) T[i] = (tt[i-1] + 2*tt[i] + tt[i+1] + 2) >>> 2;
      T[15] = (tt[14] + 3*tt[15] + 2) >>> 2;
      Q = (tt[0] + 2*int'(corner) + ll[0] + 2) >>> 2;
      L[0] = (int'(corner) + 2*ll[0] + ll[1] + 2) >>> 2;
      for (int i = 1; i < 7; i++) L[i] = (ll[i-1] + 2*ll[i] + ll[i+1] + 2) >>> 2;
      L[7] = (ll[6] + 3*ll[7] + 2) >>> 2;
    end
  end

  // E(k): k > 0 top sample k-1, k = 0 corner, k < 0 left sample -k-1
  function automatic int E(input int t [16], input int l [16], input int q, input int k);
    if (k > 0) return t[k-1];
    if (k == 0) return q;
    return l[-k-1];
  endfunction
  function automatic int f3(input int t [16], input int l [16], input int q, input int k);
    return (E(t,l,q,k-1) + 2*E(t,l,q,k) + E(t,l,q,k+1) + 2) >>> 2;
  endfunction
  function automatic int f2(input int t [16], input int l [16], input int q, input int k);
    return (E(t,l,q,k) + E(t,l,q,k+1) + 1) >>> 1;
  endfunction

  function automatic int sum_t(input int t [16], input int a, input int n);
    int s = 0;
    for (int i = 0; i < 16; i++) if (i >= a && i < a + n) s += t[i];
    return s;
  endfunction

  // DC of an n x n block whose neighbours start at top offset a, left offset b
  function automatic int dc(input int t [16], input int l [16], input int a, input int b,
                            input int n, input int sh, input logic at, input logic al);
    if (at && al) return (sum_t(t,a,n) + sum_t(l,b,n) + n) >>> (sh + 1);
    if (at)       return (sum_t(t,a,n) + n/2) >>> sh;
    if (al)       return (sum_t(l,b,n) + n/2) >>> sh;
    return 128;
  endfunction

  // directional 4x4/8x8 modes (n = 4 or 8)
  function automatic int dir(input int t [16], input int l [16], input int q, input int n,
                             input int m, input int x, input int y,
                             input logic at, input logic al);
    int z;
    case (m)
      0: return t[x];
      1: return l[y];
      2: return dc(t, l, 0, 0, n, n == 4 ? 2 : 3, at, al);
      3: if (x == n-1 && y == n-1) return (t[2*n-2] + 3*t[2*n-1] + 2) >>> 2;
         else return f3(t,l,q,x+y+2);
      4: return f3(t,l,q,x-y);
      5: begin
           z = 2*x - y;
           if (z >= 0 && z % 2 == 0) return f2(t,l,q,x-(y>>>1));
           if (z > 0)  return f3(t,l,q,x-(y>>>1));
           if (z == -1) return f3(t,l,q,0);
           return f3(t,l,q,z+1);
         end
      6: begin
           z = 2*y - x;
           if (z >= 0 && z % 2 == 0) return f2(t,l,q,(x>>>1)-y-1);
           if (z > 0)  return f3(t,l,q,(x>>>1)-y);
           if (z == -1) return f3(t,l,q,0);
           return f3(t,l,q,-z-1);
         end
      7: if (y % 2 == 0) return (t[x+(y>>>1)] + t[x+(y>>>1)+1] + 1) >>> 1;
         else return (t[x+(y>>>1)] + 2*t[x+(y>>>1)+1] + t[x+(y>>>1)+2] + 2) >>> 2;
      default: begin
           z = x + 2*y;
           if (z > 2*n-3) return l[n-1];
           if (z == 2*n-3) return (l[n-2] + 3*l[n-1] + 2) >>> 2;
           if (z % 2 == 0) return (l[y+(x>>>1)] + l[y+(x>>>1)+1] + 1) >>> 1;
           return (l[y+(x>>>1)] + 2*l[y+(x>>>1)+1] + l[y+(x>>>1)+2] + 2) >>> 2;
         end
    endcase
  endfunction

  // chroma DC of the 4x4 quadrant (xo, yo)
  function automatic int cdc(input int t [16], input int l [16], input int xo, input int yo,
                             input logic at, input logic al);
    if (xo == yo) return dc(t, l, xo, yo, 4, 2, at, al);
    if (xo > 0) begin   // top-right quadrant prefers the top samples
      if (at) return (sum_t(t,xo,4) + 2) >>> 2;
      if (al) return (sum_t(l,yo,4) + 2) >>> 2;
      return 128;
    end
    if (al) return (sum_t(l,yo,4) + 2) >>> 2;   // bottom-left prefers left
    if (at) return (sum_t(t,xo,4) + 2) >>> 2;
    return 128;
  endfunction

  always_comb begin
    for (int k = 0; k < PAR; k++) begin
      automatic int x, y, v;
      case (blk)
        B_I4:  begin x = k % 4; y = 2*int'(step[0]) + k / 4;
                     v = dir(T, L, Q, 4, int'(mode), x, y, avail_top, avail_left); end
        B_I8:  begin x = k; y = int'(step[2:0]);
                     v = dir(T, L, Q, 8, int'(mode), x, y, avail_top, avail_left); end
        B_I16: begin x = 8*int'(step[0]) + k; y = int'(step[4:1]);
                     case (mode)
                       4'd0: v = T[x];
                       4'd1: v = L[y];
                       default: v = dc(T, L, 0, 0, 16, 4, avail_top, avail_left);
                     endcase
               end
        default: begin x = k; y = int'(step[2:0]);
                     case (mode)
                       4'd1: v = L[y];
                       4'd2: v = T[x];
                       default: v = cdc(T, L, x < 4 ? 0 : 4, y < 4 ? 0 : 4, avail_top, avail_left);
                     endcase
               end
      endcase
      pred[k] = pixel_t'(v);
    end
  end
endmodule
