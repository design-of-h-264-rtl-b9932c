// Self-checking test of the edge filter for one line of samples. The
// testbench evaluates the H.264 filter equations itself: edge decision with
// its own alpha / beta tables, normal filtering with tc = tc0 + ap + aq
// (luma) or tc0 + 1 (chroma), and strong filtering for bS 4 with the
// (alpha>>2)+2 condition. Sample lines are drawn around a step so that every
// branch is taken; the branches taken are counted and must all occur.
module tb_deblock_edge;
  import h264_pkg::*;
  import deblock_pkg::*;
  pixel_t p [4], q [4], po [4], qo [4];
  logic [2:0] bs;
  logic [5:0] index_a, index_b;
  logic chroma, filtered;
  int checks = 0, failures = 0, n_skip = 0, n_normal = 0, n_strong = 0, n_weak4 = 0;
  int alpha [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                     32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int beta [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                    9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  deblock_edge dut (.p, .q, .bs, .index_a, .index_b, .chroma, .po, .qo, .filtered);
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int c3(int lo, int hi, int v); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic int ab(int v); return v < 0 ? -v : v; endfunction
  initial begin
    for (int n = 0; n < 20000; n++) begin
      automatic int ep [4], eq [4], P [4], Q [4], al, be, flag, ap, aq;
      automatic int base = $urandom_range(20, 235), step = $urandom_range(0, 40) - 20;
      for (int k = 0; k < 4; k++) begin
        P[k] = c3(0, 255, base + $urandom_range(0, 6) - 3);
        Q[k] = c3(0, 255, base + step + $urandom_range(0, 6) - 3);
        p[k] = pixel_t'(P[k]); q[k] = pixel_t'(Q[k]);
        ep[k] = P[k]; eq[k] = Q[k];
      end
      bs = 3'($urandom_range(0, 4)); chroma = $urandom_range(0, 3) == 0;
      index_a = 6'($urandom_range(16, 51)); index_b = 6'(c3(0, 51, int'(index_a) + $urandom_range(0, 6) - 3));
      al = alpha[index_a]; be = beta[index_b];
      flag = bs != 0 && ab(P[0]-Q[0]) < al && ab(P[1]-P[0]) < be && ab(Q[1]-Q[0]) < be;
      ap = ab(P[2]-P[0]) < be; aq = ab(Q[2]-Q[0]) < be;
      if (!flag) n_skip++;
      else if (bs < 4) begin
        automatic int tc0 = tc0_tab(int'(index_a), int'(bs));
        automatic int tc = chroma ? tc0 + 1 : tc0 + ap + aq;
        automatic int d = c3(-tc, tc, (((Q[0]-P[0]) * 4) + (P[1]-Q[1]) + 4) >>> 3);
        n_normal++;
        ep[0] = c3(0, 255, P[0] + d); eq[0] = c3(0, 255, Q[0] - d);
        if (!chroma && ap) ep[1] = P[1] + c3(-tc0, tc0, (P[2] + ((P[0]+Q[0]+1) >>> 1) - 2*P[1]) >>> 1);
        if (!chroma && aq) eq[1] = Q[1] + c3(-tc0, tc0, (Q[2] + ((P[0]+Q[0]+1) >>> 1) - 2*Q[1]) >>> 1);
      end else begin
        automatic int sm = ab(P[0]-Q[0]) < ((al >>> 2) + 2);
        if (!chroma && ap && sm) begin
          ep[0] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) >>> 3;
          ep[1] = (P[2] + P[1] + P[0] + Q[0] + 2) >>> 2;
          ep[2] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) >>> 3;
          n_strong++;
        end else begin
          ep[0] = (2*P[1] + P[0] + Q[1] + 2) >>> 2;
          n_weak4++;
        end
        if (!chroma && aq && sm) begin
          eq[0] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) >>> 3;
          eq[1] = (P[0] + Q[0] + Q[1] + Q[2] + 2) >>> 2;
          eq[2] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) >>> 3;
        end else eq[0] = (2*Q[1] + Q[0] + P[1] + 2) >>> 2;
      end
      #1;
      checks++;
      if (filtered != flag[0]) failures++;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (int'(po[k]) != ep[k]) failures++;
        if (int'(qo[k]) != eq[k]) failures++;
      end
    end
    // spot values of the clipping table
    checks += 2;
    if (tc0_tab(51, 3) != 25 || tc0_tab(51, 1) != 13) failures++;
    if (tc0_tab(17, 1) != 0) failures++;
    checks += 4;
    if (n_skip == 0) failures++;
    if (n_normal == 0) failures++;
    if (n_strong == 0) failures++;
    if (n_weak4 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
