// Parallel multi-resolution integer motion estimation (PMRME).
// Three independent full searches run side by side for one 16x16 macroblock:
//   level 0: no subsampling, range [-8,+7] around the integer MVP,
//            1 search point per cycle, all 41 VBS partitions;
//   level 1: 2:1 subsampling in each direction (4:1 pixels), range [-32,+31]
//            around (0,0) in steps of 2, 4 points per cycle, modes 1-4;
//   level 2: 4:1 subsampling in each direction (16:1), range [-128,+127]
//            around (0,0) in steps of 4, 16 points per cycle, 16x16 only.
// Each level therefore needs 256 cycles. Level-1/2 pixels are stored
// truncated to PIXD bits. After the search a selection step compares, for
// each of partitions 0-8, the level-0 result with the level-1/2 results whose
// SADs are scaled back to full resolution (x4 or x16 for subsampling and
// x2^(8-PIXD) for truncation) and keeps the smallest.
// The level-0 window (37x37 pixels starting at offset (-10,-10) from the MVP
// position: two extra columns before and three after for the FME
// interpolation) is read from the shared level-0 buffers (l0_pingpong) so
// that FME can reuse it. Level-1/2 windows are local and written through a
// 128-bit port (16 pixels of one row per write, wr_level 1 or 2): level 1 is a
// 39x39 grid of subsampled pixels whose grid
// point g is full-pel offset 2g-32, level 2 a 67x67 grid with 4g-128.
// Timing: `start` for one cycle (cur_mb and windows stable), `done` pulses
// SEARCH_CYCLES+1 cycles later with best_sad/best_mv (quarter-pel units).
// The window geometry and the level-merge scaling are this design's choices.
module pmrme_ime
  import h264_pkg::*;
#(
  parameter int PIXD = 6           // stored bits of level-1/2 pixels
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pixel_t l0_win [37][37],
  // window load port
  input  logic        wr_en,
  input  logic [1:0]  wr_level,
  input  logic [6:0]  wr_row,
  input  logic [6:0]  wr_col,
  input  pixel_t      wr_data [16],
  // search
  input  pixel_t      cur_mb [16][16],
  input  mv_t         mvp,          // integer MVP, quarter-pel units
  input  logic        start,
  output logic        busy,
  output logic        done,
  output sad_t        best_sad [NPART],
  output mv_t         best_mv  [NPART],
  output logic [1:0]  best_lvl [NPART]
);
  localparam int L1W = 39, L2W = 67;
  localparam int SEARCH_CYCLES = 256;

  logic [PIXD-1:0]   win1 [L1W][L1W];
  logic [PIXD-1:0]   win2 [L2W][L2W];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int k = 0; k < 16; k++) begin
        case (wr_level)
          2'd0: ;
          2'd1: if (int'(wr_col)+k < L1W && wr_row < L1W) win1[wr_row][int'(wr_col)+k] <= wr_data[k][7 -: PIXD];
          default: if (int'(wr_col)+k < L2W && wr_row < L2W) win2[wr_row][int'(wr_col)+k] <= wr_data[k][7 -: PIXD];
        endcase
      end
    end
  end

  // ---------------- search counter ----------------
  logic [7:0] cnt;
  logic       run, run_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; cnt <= '0; run_d <= 1'b0;
    end else begin
      run_d <= run && cnt == 8'(SEARCH_CYCLES-1);
      if (start && !run) begin
        run <= 1'b1; cnt <= '0;
      end else if (run) begin
        cnt <= cnt + 8'd1;
        if (cnt == 8'(SEARCH_CYCLES-1)) run <= 1'b0;
      end
    end
  end
  assign busy = run | run_d;

  // ---------------- level 0 ----------------
  pixel_t ref0 [16][16];
  logic [3:0] l0x, l0y;
  assign l0x = cnt[3:0];
  assign l0y = cnt[7:4];
  always_comb
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        ref0[r][c] = l0_win[int'(l0y) + 2 + r][int'(l0x) + 2 + c];
  logic [13:0] s4_0 [16];
  sad_t        sad0 [NPART];
  ime_search_point #(.W(16)) u_sp0 (.cur(cur_mb), .ref_px(ref0), .sub_sad(s4_0));
  vbs_sad_tree u_tree0 (.s4(s4_0), .sad(sad0));

  // ---------------- level 1: four modules ----------------
  pixel_t cur1 [8][8];
  pixel_t cur2 [4][4];
  always_comb begin
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        cur1[r][c] = pixel_t'(cur_mb[2*r][2*c][7 -: PIXD]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        cur2[r][c] = pixel_t'(cur_mb[4*r][4*c][7 -: PIXD]);
  end
  logic [13:0] s4_1 [4][4];
  logic [9:0]  p1   [4];
  for (genvar k = 0; k < 4; k++) begin : g_l1
    pixel_t ref1 [8][8];
    assign p1[k] = {cnt, 2'(k)};                  // point index 0..1023
    always_comb
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          ref1[r][c] = pixel_t'(win1[int'(p1[k][9:5]) + r][int'(p1[k][4:0]) + c]);
    ime_search_point #(.W(8)) u_sp1 (.cur(cur1), .ref_px(ref1), .sub_sad(s4_1[k]));
  end

  // ---------------- level 2: sixteen modules ----------------
  logic [13:0] s4_2 [16][1];
  logic [11:0] p2   [16];
  for (genvar k = 0; k < 16; k++) begin : g_l2
    pixel_t ref2 [4][4];
    assign p2[k] = {cnt, 4'(k)};                  // point index 0..4095
    always_comb
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          ref2[r][c] = pixel_t'(win2[int'(p2[k][11:6]) + r][int'(p2[k][5:0]) + c]);
    ime_search_point #(.W(4)) u_sp2 (.cur(cur2), .ref_px(ref2), .sub_sad(s4_2[k]));
  end

  // ---------------- best trackers ----------------
  sad_t l0_best [NPART];  mv_t l0_mv [NPART];
  sad_t l1_best [9];      mv_t l1_mv [9];
  sad_t l2_best;          mv_t l2_mv;

  // level-1 partition SADs (in subsampled units) of point k, partition j
  function automatic sad_t l1_part(input logic [13:0] s [4], input int j);
    case (j)
      0: return sad_t'(s[0]) + sad_t'(s[1]) + sad_t'(s[2]) + sad_t'(s[3]);
      1: return sad_t'(s[0]) + sad_t'(s[1]);
      2: return sad_t'(s[2]) + sad_t'(s[3]);
      3: return sad_t'(s[0]) + sad_t'(s[2]);
      4: return sad_t'(s[1]) + sad_t'(s[3]);
      default: return sad_t'(s[j-5]);
    endcase
  endfunction

  // cycle-local minimum over the parallel points of levels 1 and 2
  sad_t l1_cmin [9];  mv_t l1_cmv [9];
  sad_t l2_cmin;      mv_t l2_cmv;
  always_comb begin
    for (int j = 0; j < 9; j++) begin
      l1_cmin[j] = '1; l1_cmv[j] = '0;
      for (int k = 0; k < 4; k++) begin
        automatic sad_t s = l1_part(s4_1[k], j);
        if (s < l1_cmin[j]) begin
          l1_cmin[j] = s;
          l1_cmv[j].x = mvc_t'((int'(p1[k][4:0]) * 2 - 32) * 4);
          l1_cmv[j].y = mvc_t'((int'(p1[k][9:5]) * 2 - 32) * 4);
        end
      end
    end
    l2_cmin = '1; l2_cmv = '0;
    for (int k = 0; k < 16; k++) begin
      if (sad_t'(s4_2[k][0]) < l2_cmin) begin
        l2_cmin = sad_t'(s4_2[k][0]);
        l2_cmv.x = mvc_t'((int'(p2[k][5:0]) * 4 - 128) * 4);
        l2_cmv.y = mvc_t'((int'(p2[k][11:6]) * 4 - 128) * 4);
      end
    end
  end

  mv_t l0_cur_mv;
  assign l0_cur_mv.x = mvp.x + mvc_t'((int'(l0x) - 8) * 4);
  assign l0_cur_mv.y = mvp.y + mvc_t'((int'(l0y) - 8) * 4);

  always_ff @(posedge clk) begin
    if (run) begin
      for (int j = 0; j < NPART; j++)
        if (cnt == 0 || sad0[j] < l0_best[j]) begin
          l0_best[j] <= sad0[j]; l0_mv[j] <= l0_cur_mv;
        end
      for (int j = 0; j < 9; j++)
        if (cnt == 0 || l1_cmin[j] < l1_best[j]) begin
          l1_best[j] <= l1_cmin[j]; l1_mv[j] <= l1_cmv[j];
        end
      if (cnt == 0 || l2_cmin < l2_best) begin
        l2_best <= l2_cmin; l2_mv <= l2_cmv;
      end
    end
  end

  // ---------------- selection across levels ----------------
  localparam int TSH = 8 - PIXD;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int j = 0; j < NPART; j++) begin
        best_sad[j] <= '0; best_mv[j] <= '0; best_lvl[j] <= '0;
      end
    end else begin
      done <= run_d;
      if (run_d) begin
        for (int j = 0; j < NPART; j++) begin
          automatic logic [SAD_W+5:0] c1, c2, cb;
          cb = (SAD_W+6)'(l0_best[j]);
          best_sad[j] <= l0_best[j]; best_mv[j] <= l0_mv[j]; best_lvl[j] <= 2'd0;
          if (j < 9) begin
            c1 = (SAD_W+6)'(l1_best[j]) << (2 + TSH);
            if (c1 < cb) begin
              cb = c1;
              best_sad[j] <= c1 > (SAD_W+6)'({SAD_W{1'b1}}) ? '1 : sad_t'(c1);
              best_mv[j] <= l1_mv[j]; best_lvl[j] <= 2'd1;
            end
          end
          if (j == 0) begin
            c2 = (SAD_W+6)'(l2_best) << (4 + TSH);
            if (c2 < cb) begin
              best_sad[j] <= c2 > (SAD_W+6)'({SAD_W{1'b1}}) ? '1 : sad_t'(c2);
              best_mv[j] <= l2_mv; best_lvl[j] <= 2'd2;
            end
          end
        end
      end
    end
  end
endmodule
