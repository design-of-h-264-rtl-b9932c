// Self-checking test of the intra 4x4 mode decision. For each random block
// the testbench predicts the candidate modes with the standard equations,
// computes the enhanced SATD of each by matrix products, follows the
// three-step search (0,1,2 then 3,4 then 5,7 when vertical is not worse than
// horizontal, else 6,8; ties keep the earlier mode) and compares the chosen
// mode and cost. It checks the 15-cycle decision time and that both step-3
// branches are taken. Blocks are made by predicting with a random mode and
// adding noise, so that every mode has a chance to win.
module tb_intra4_decision;
  import h264_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  pixel_t cur [4][4], top [8], left [4], corner;
  logic [3:0] best_mode;
  logic [15:0] best_cost;
  int checks = 0, failures = 0, br_v = 0, br_h = 0;
  int wins [9];
  int cf [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
  `include "tb/intra_ref_pred.svh"
  intra4_decision dut (.clk, .rst_n, .start, .cur, .top, .left, .corner, .busy, .done, .best_mode, .best_cost);
  always #5 clk = !clk;
  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int cost_of(int m, int rt [17], int rl [9]);
    int d [4][4], t [4][4], s = 0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) d[y][x] = int'(cur[y][x]) - ref_dir(4, m, x, y, rt, rl);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        t[r][c] = 0;
        for (int k = 0; k < 4; k++) t[r][c] += cf[r][k] * d[k][c];
      end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        automatic int v = 0;
        for (int k = 0; k < 4; k++) v += t[r][k] * cf[c][k];
        s += (v < 0 ? -v : v) * ((r % 2 == 0 && c % 2 == 0) ? 32 : ((r % 2 == 1 && c % 2 == 1) ? 20 : 25));
      end
    return s >> 5;
  endfunction
  initial begin
    for (int i = 0; i < 9; i++) wins[i] = 0;
    for (int i = 0; i < 8; i++) top[i] = '0;
    for (int i = 0; i < 4; i++) left[i] = '0;
    corner = '0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) cur[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      automatic int rt [17], rl [9], order [7], bm, bc, c0, c1, cyc, gm = $urandom_range(0, 8);
      for (int i = 0; i < 8; i++) top[i] = pixel_t'($urandom);
      for (int i = 0; i < 4; i++) left[i] = pixel_t'($urandom);
      corner = pixel_t'($urandom);
      rt[0] = corner; rl[0] = corner;
      for (int i = 0; i < 16; i++) rt[i+1] = i < 8 ? top[i] : 0;
      for (int i = 0; i < 8; i++) rl[i+1] = i < 4 ? left[i] : 0;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          automatic int v = ref_dir(4, gm, x, y, rt, rl) + $urandom_range(0, 6) - 3;
          cur[y][x] = pixel_t'(v < 0 ? 0 : (v > 255 ? 255 : v));
        end
      c0 = cost_of(0, rt, rl); c1 = cost_of(1, rt, rl);
      order = '{0, 1, 2, 3, 4, c0 <= c1 ? 5 : 6, c0 <= c1 ? 7 : 8};
      if (c0 <= c1) br_v++; else br_h++;
      bm = 0; bc = c0;
      for (int i = 1; i < 7; i++) begin
        automatic int c = cost_of(order[i], rt, rl);
        if (c < bc) begin bc = c; bm = order[i]; end
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0; cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks += 3;
      if (cyc != 15) begin failures++; if (failures < 5) $display("done after %0d", cyc); end
      if (int'(best_mode) != bm) begin failures++; if (failures < 5) $display("mode %0d expected %0d", best_mode, bm); end
      if (int'(best_cost) != bc) failures++;
      wins[bm]++;
    end
    checks += 2;
    if (br_v == 0) failures++;
    if (br_h == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
