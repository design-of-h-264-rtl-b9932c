// Deblocking filter for one line of samples across a block edge: p[0..3] on
// one side (p[0] next to the edge), q[0..3] on the other. Implements the
// H.264 edge decision (bS > 0, |p0-q0| < alpha, |p1-p0| < beta,
// |q1-q0| < beta), the normal filter for bS 1..3 (tc clipping, luma p1/q1
// update when |p2-p0| or |q2-q0| < beta) and the strong_f filter for bS 4.
// Chroma lines modify only p0 and q0. Combinational; `filtered` reports
// whether the line was changed by the decision.
module deblock_edge
  import h264_pkg::*;
  import deblock_pkg::*;
(
  input  pixel_t      p [4],
  input  pixel_t      q [4],
  input  logic [2:0]  bs,
  input  logic [5:0]  index_a,
  input  logic [5:0]  index_b,
  input  logic        chroma,
  output pixel_t      po [4],
  output pixel_t      qo [4],
  output logic        filtered
);
  function automatic int iabs(input int v); return v < 0 ? -v : v; endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  always_comb begin
    automatic int p0 = int'(p[0]), p1 = int'(p[1]), p2 = int'(p[2]), p3 = int'(p[3]);
    automatic int q0 = int'(q[0]), q1 = int'(q[1]), q2 = int'(q[2]), q3 = int'(q[3]);
    automatic int al = alpha_tab(int'(index_a));
    automatic int be = beta_tab(int'(index_b));
    automatic int ap = iabs(p2 - p0), aq = iabs(q2 - q0);
    po = p; qo = q;
    filtered = bs != 0 && iabs(p0 - q0) < al && iabs(p1 - p0) < be && iabs(q1 - q0) < be;
    if (filtered) begin
      if (bs < 3'd4) begin
        automatic int tc0 = tc0_tab(int'(index_a), int'(bs));
        automatic int tc = chroma ? tc0 + 1 : tc0 + (ap < be ? 1 : 0) + (aq < be ? 1 : 0);
        automatic int dl = clip3(-tc, tc, ((((q0 - p0) <<< 2) + (p1 - q1) + 4) >>> 3));
        po[0] = pixel_t'(clip3(0, 255, p0 + dl));
        qo[0] = pixel_t'(clip3(0, 255, q0 - dl));
        if (!chroma && ap < be)
          po[1] = pixel_t'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - (p1 <<< 1)) >>> 1));
        if (!chroma && aq < be)
          qo[1] = pixel_t'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - (q1 <<< 1)) >>> 1));
      end else begin
        automatic logic strong_f = iabs(p0 - q0) < ((al >>> 2) + 2);
        if (!chroma && ap < be && strong_f) begin
          po[0] = pixel_t'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3);
          po[1] = pixel_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          po[2] = pixel_t'((2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3);
        end else
          po[0] = pixel_t'((2*p1 + p0 + q1 + 2) >>> 2);
        if (!chroma && aq < be && strong_f) begin
          qo[0] = pixel_t'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3);
          qo[1] = pixel_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          qo[2] = pixel_t'((2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3);
        end else
          qo[0] = pixel_t'((2*q1 + q0 + p1 + 2) >>> 2);
      end
    end
  end
endmodule
