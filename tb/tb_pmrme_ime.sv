// Self-checking test of the three-level integer motion estimator. A random
// reference area is generated; the current macroblock is copied from it at a
// displacement that only one level can reach exactly (inside the level-0
// range, an even offset inside the level-1 range, a multiple of four inside
// the level-2 range), plus small noise in some runs. The testbench loads the
// level-0 window and the subsampled, bit-truncated level-1/2 windows, runs
// its own full search of every level (first minimum in raster scan order),
// merges the levels with the same scaling rule and compares all 41 results
// (SAD, MV, level). It checks the 256-cycle search time (plus one cycle to
// sample start and one to merge the levels) and counts how often
// each level wins; every level must win at least once.
module tb_pmrme_ime;
  import h264_pkg::*;
  localparam int PIXD = 6, FR = 320, OX = 150, OY = 150;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, wr_en = 1'b0;
  logic [1:0] wr_level = '0;
  logic [6:0] wr_row = '0, wr_col = '0;
  pixel_t wr_data [16], l0_win [37][37], cur_mb [16][16];
  mv_t mvp;
  sad_t best_sad [NPART];
  mv_t best_mv [NPART];
  logic [1:0] best_lvl [NPART];
  pixel_t frame [FR][FR];
  int checks = 0, failures = 0, wins [3];
  int px [NPART], py [NPART], pw [NPART], ph [NPART];

  pmrme_ime #(.PIXD(PIXD)) dut (.clk, .rst_n, .l0_win, .wr_en, .wr_level, .wr_row, .wr_col, .wr_data,
    .cur_mb, .mvp, .start, .busy, .done, .best_sad, .best_mv, .best_lvl);
  always #5 clk = !clk;
  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tr(int v); return v >> (8 - PIXD); endfunction
  // partition SAD at level 0 for displacement (dx,dy) in full pels
  function automatic int sad_l0(int p, int dx, int dy);
    int s = 0;
    for (int y = 4*py[p]; y < 4*(py[p]+ph[p]); y++)
      for (int x = 4*px[p]; x < 4*(px[p]+pw[p]); x++) begin
        automatic int d = int'(cur_mb[y][x]) - int'(frame[OY+dy+y][OX+dx+x]);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction
  // subsampled SAD with factor f (2 or 4), truncated pixels
  function automatic int sad_sub(int p, int f, int dx, int dy);
    int s = 0;
    for (int y = 4*py[p]; y < 4*(py[p]+ph[p]); y += f)
      for (int x = 4*px[p]; x < 4*(px[p]+pw[p]); x += f) begin
        automatic int d = tr(int'(cur_mb[y][x])) - tr(int'(frame[OY+dy+y][OX+dx+x]));
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  task automatic load_windows(int mx, int my);
    // level 0: 37x37 from (-10,-10) around the integer MVP
    for (int r = 0; r < 37; r++)
      for (int c = 0; c < 37; c++) l0_win[r][c] = frame[OY+my-10+r][OX+mx-10+c];
    for (int lv = 1; lv <= 2; lv++) begin
      automatic int w = lv == 1 ? 39 : 67, f = lv == 1 ? 2 : 4, o = lv == 1 ? 32 : 128;
      for (int r = 0; r < w; r++)
        for (int c0 = 0; c0 < w; c0 += 16) begin
          @(negedge clk);
          wr_en = 1'b1; wr_level = 2'(lv); wr_row = 7'(r); wr_col = 7'(c0);
          for (int k = 0; k < 16; k++)
            wr_data[k] = (c0 + k < w) ? frame[OY + f*r - o][OX + f*(c0+k) - o] : 8'd0;
        end
    end
    @(negedge clk); wr_en = 1'b0;
  endtask

  task automatic run_case(int dx, int dy, int mx, int my, int noise);
    int cyc = 0;
    int eb [NPART], ex [NPART], ey [NPART], el [NPART];
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        automatic int v = int'(frame[OY+dy+y][OX+dx+x]) + (noise ? $urandom_range(0, 2) - 1 : 0);
        cur_mb[y][x] = pixel_t'(v < 0 ? 0 : (v > 255 ? 255 : v));
      end
    mvp.x = mvc_t'(4*mx); mvp.y = mvc_t'(4*my);
    load_windows(mx, my);
    // reference search
    for (int p = 0; p < NPART; p++) begin
      automatic int b0 = -1, b0x = 0, b0y = 0, b1 = -1, b1x = 0, b1y = 0, b2 = -1, b2x = 0, b2y = 0;
      for (int oy = -8; oy < 8; oy++)
        for (int ox = -8; ox < 8; ox++) begin
          automatic int s = sad_l0(p, mx+ox, my+oy);
          if (b0 < 0 || s < b0) begin b0 = s; b0x = mx+ox; b0y = my+oy; end
        end
      eb[p] = b0; ex[p] = b0x; ey[p] = b0y; el[p] = 0;
      if (p < 9) begin
        for (int gy = 0; gy < 32; gy++)
          for (int gx = 0; gx < 32; gx++) begin
            automatic int s = sad_sub(p, 2, 2*gx-32, 2*gy-32);
            if (b1 < 0 || s < b1) begin b1 = s; b1x = 2*gx-32; b1y = 2*gy-32; end
          end
        if ((b1 << (2 + 8 - PIXD)) < eb[p]) begin
          eb[p] = b1 << (2 + 8 - PIXD); ex[p] = b1x; ey[p] = b1y; el[p] = 1;
        end
      end
      if (p == 0) begin
        for (int gy = 0; gy < 64; gy++)
          for (int gx = 0; gx < 64; gx++) begin
            automatic int s = sad_sub(p, 4, 4*gx-128, 4*gy-128);
            if (b2 < 0 || s < b2) begin b2 = s; b2x = 4*gx-128; b2y = 4*gy-128; end
          end
        if ((b2 << (4 + 8 - PIXD)) < eb[p]) begin
          eb[p] = b2 << (4 + 8 - PIXD); ex[p] = b2x; ey[p] = b2y; el[p] = 2;
        end
      end
    end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    // one edge samples start, 256 search cycles, one cycle merges the levels
    if (cyc != 258) begin failures++; $display("done after %0d cycles", cyc); end
    wins[el[0]]++;
    for (int p = 0; p < NPART; p++) begin
      checks++;
      if (int'(best_sad[p]) != eb[p] || int'(best_mv[p].x) != 4*ex[p] || int'(best_mv[p].y) != 4*ey[p] ||
          int'(best_lvl[p]) != el[p]) begin
        failures++;
        if (failures < 6) $display("part %0d: sad %0d mv (%0d,%0d) lvl %0d; expected %0d (%0d,%0d) %0d",
          p, best_sad[p], best_mv[p].x, best_mv[p].y, best_lvl[p], eb[p], 4*ex[p], 4*ey[p], el[p]);
      end
    end
  endtask

  initial begin
    px[0] = 0; py[0] = 0; pw[0] = 4; ph[0] = 4;
    for (int j = 0; j < 2; j++) begin
      px[1+j] = 0; py[1+j] = 2*j; pw[1+j] = 4; ph[1+j] = 2;
      px[3+j] = 2*j; py[3+j] = 0; pw[3+j] = 2; ph[3+j] = 4;
    end
    for (int q = 0; q < 4; q++) begin
      automatic int x0 = 2*(q%2), y0 = 2*(q/2);
      px[5+q] = x0; py[5+q] = y0; pw[5+q] = 2; ph[5+q] = 2;
      for (int s = 0; s < 2; s++) begin
        px[9+2*q+s] = x0; py[9+2*q+s] = y0+s; pw[9+2*q+s] = 2; ph[9+2*q+s] = 1;
        px[17+2*q+s] = x0+s; py[17+2*q+s] = y0; pw[17+2*q+s] = 1; ph[17+2*q+s] = 2;
      end
      for (int s = 0; s < 4; s++) begin
        px[25+4*q+s] = x0+s%2; py[25+4*q+s] = y0+s/2; pw[25+4*q+s] = 1; ph[25+4*q+s] = 1;
      end
    end
    for (int i = 0; i < 3; i++) wins[i] = 0;
    for (int k = 0; k < 16; k++) wr_data[k] = '0;
    for (int r = 0; r < 37; r++) for (int c = 0; c < 37; c++) l0_win[r][c] = '0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur_mb[r][c] = '0;
    mvp = '0;
    for (int r = 0; r < FR; r++) for (int c = 0; c < FR; c++) frame[r][c] = pixel_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_case(3, -2, 1, 2, 0);        // level 0
    run_case(20, -24, 2, 1, 0);      // level 1
    run_case(100, -64, -3, 4, 0);    // level 2
    run_case(-5, 6, -2, 3, 1);       // level 0 with noise
    run_case(-28, 30, 0, 0, 1);      // level 1 with noise
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (wins[i] == 0) begin failures++; $display("level %0d never won", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
