// Self-checking test of macroblock deblocking. The testbench filters the
// 20x20 working area in the standard's order, all vertical edges left to
// right and then all horizontal edges top to bottom, with its own luma edge
// equations (alpha/beta tables, normal and bS-4 filters), and compares the
// result and the count of filtered segments with the block, which uses the
// interleaved block-by-block order. It also checks the 33-cycle latency and
// that the absent-neighbour flags skip the macroblock edges; cases with
// filtered segments must occur.
module tb_deblock_mb;
  import h264_pkg::*;
  import deblock_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pixel_t mb_in [16][16], left_in [16][4], top_in [4][16], buf_out [20][20];
  logic [2:0] bs_v [4][4], bs_h [4][4];
  logic [5:0] qp, edges_filtered;
  logic filter_left, filter_top, busy, done;
  int checks = 0, failures = 0, n_some = 0, n_none = 0;
  int alpha [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                     32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int beta [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                    9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int A [20][20];
  deblock_mb dut (.*);
  always #5 clk = !clk;
  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int c3(int lo, int hi, int v); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic int ab(int v); return v < 0 ? -v : v; endfunction
  // filter one line; P/Q index 0 is next to the edge; returns 1 if filtered
  function automatic int line(ref int P [4], ref int Q [4], input int bs, input int q);
    automatic int ep [4] = P, eq [4] = Q, al = alpha[q], be = beta[q], ap, aq;
    if (!(bs != 0 && ab(P[0]-Q[0]) < al && ab(P[1]-P[0]) < be && ab(Q[1]-Q[0]) < be)) return 0;
    ap = ab(P[2]-P[0]) < be; aq = ab(Q[2]-Q[0]) < be;
    if (bs < 4) begin
      automatic int tc0 = tc0_tab(q, bs), tc = tc0 + ap + aq;
      automatic int d = c3(-tc, tc, (((Q[0]-P[0]) * 4) + (P[1]-Q[1]) + 4) >>> 3);
      ep[0] = c3(0, 255, P[0] + d); eq[0] = c3(0, 255, Q[0] - d);
      if (ap) ep[1] = P[1] + c3(-tc0, tc0, (P[2] + ((P[0]+Q[0]+1) >>> 1) - 2*P[1]) >>> 1);
      if (aq) eq[1] = Q[1] + c3(-tc0, tc0, (Q[2] + ((P[0]+Q[0]+1) >>> 1) - 2*Q[1]) >>> 1);
    end else begin
      automatic int sm = ab(P[0]-Q[0]) < ((al >>> 2) + 2);
      if (ap && sm) begin
        ep[0] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) >>> 3;
        ep[1] = (P[2] + P[1] + P[0] + Q[0] + 2) >>> 2;
        ep[2] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) >>> 3;
      end else ep[0] = (2*P[1] + P[0] + Q[1] + 2) >>> 2;
      if (aq && sm) begin
        eq[0] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) >>> 3;
        eq[1] = (P[0] + Q[0] + Q[1] + Q[2] + 2) >>> 2;
        eq[2] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) >>> 3;
      end else eq[0] = (2*Q[1] + Q[0] + P[1] + 2) >>> 2;
    end
    P = ep; Q = eq;
    return 1;
  endfunction

  initial begin
    mb_in = '{default: '{default: '0}}; left_in = '{default: '{default: '0}};
    top_in = '{default: '{default: '0}};
    bs_v = '{default: '{default: '0}}; bs_h = '{default: '{default: '0}};
    qp = '0; filter_left = 1'b0; filter_top = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic int nseg = 0, lat = 0, base = $urandom_range(40, 200);
      @(negedge clk);
      qp = 6'($urandom_range(20, 51));
      filter_left = $urandom_range(0, 3) != 0; filter_top = $urandom_range(0, 3) != 0;
      // smooth area with block steps so that many edges pass the thresholds
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++) A[r][c] = c3(0, 255, base + ((r / 4) * 3 + (c / 4) * 5) % 13 + $urandom_range(0, 3));
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++)
          if (r >= 4 && c >= 4) mb_in[r-4][c-4] = pixel_t'(A[r][c]);
          else if (r >= 4) left_in[r-4][c] = pixel_t'(A[r][c]);
          else if (c >= 4) top_in[r][c-4] = pixel_t'(A[r][c]);
          else A[r][c] = 0;              // corner is not part of the buffer
      for (int e = 0; e < 4; e++)
        for (int b = 0; b < 4; b++) begin
          bs_v[e][b] = 3'(e == 0 ? $urandom_range(0, 4) : $urandom_range(0, 3));
          bs_h[e][b] = 3'(e == 0 ? $urandom_range(0, 4) : $urandom_range(0, 3));
        end
      // reference: vertical edges, then horizontal edges
      for (int e = 0; e < 4; e++)
        for (int b = 0; b < 4; b++)
          if (!(e == 0 && !filter_left)) begin
            automatic int any = 0;
            for (int l = 0; l < 4; l++) begin
              automatic int y = 4 + 4*b + l, x = 4 + 4*e, P [4], Q [4];
              for (int k = 0; k < 4; k++) begin P[k] = A[y][x-1-k]; Q[k] = A[y][x+k]; end
              any |= line(P, Q, int'(bs_v[e][b]), int'(qp));
              for (int k = 0; k < 4; k++) begin A[y][x-1-k] = P[k]; A[y][x+k] = Q[k]; end
            end
            nseg += any;
          end
      for (int e = 0; e < 4; e++)
        for (int b = 0; b < 4; b++)
          if (!(e == 0 && !filter_top)) begin
            automatic int any = 0;
            for (int l = 0; l < 4; l++) begin
              automatic int x = 4 + 4*b + l, y = 4 + 4*e, P [4], Q [4];
              for (int k = 0; k < 4; k++) begin P[k] = A[y-1-k][x]; Q[k] = A[y+k][x]; end
              any |= line(P, Q, int'(bs_h[e][b]), int'(qp));
              for (int k = 0; k < 4; k++) begin A[y-1-k][x] = P[k]; A[y+k][x] = Q[k]; end
            end
            nseg += any;
          end
      start = 1'b1;
      @(negedge clk); start = 1'b0; lat = 1;
      while (!done && lat < 60) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 33) begin failures++; $display("latency %0d", lat); end
      if (int'(edges_filtered) != nseg) begin failures++; $display("segments %0d expected %0d", edges_filtered, nseg); end
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++)
          if (r >= 4 || c >= 4) begin
            checks++;
            if (int'(buf_out[r][c]) != A[r][c]) begin
              failures++;
              if (failures < 6) $display("case %0d pixel (%0d,%0d) = %0d expected %0d", n, r, c, buf_out[r][c], A[r][c]);
            end
          end
      if (nseg > 0) n_some++; else n_none++;
    end
    checks += 1;
    if (n_some == 0) failures++;
    $display("cases with filtered segments %0d, without %0d", n_some, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
