// End-to-end test of the macroblock encoder core at its default
// configuration. A random reference area is generated and six macroblocks
// are built from it, each aimed at one mechanism:
//   0: whole-macroblock motion (+3,-2) inside the level-0 range (inter, exact)
//   1: four 8x8 quadrants moving differently (8x8 split must be chosen)
//   2: a flat block unrelated to the reference (intra must win)
//   3: motion (+40,+36), reachable only by the level-2 search; its refined
//      MV lies outside the shared level-0 window, so intra is forced
//   4: motion (-5,+4) with noise (inter)
//   5: a smooth gradient (intra)
// For every macroblock the testbench loads the level-0 window into the load
// bank and the subsampled level-1/2 windows, then issues mb_start; one more
// mb_start without a macroblock drains the pipeline. It checks the decisions
// and motion vectors stated above, the reconstruction against the source
// (exact for macroblock 0, small mean error otherwise), that the byte stream
// ends byte-aligned after the slice, and counts each mechanism: level-0
// bank rotation, a level-1/2 win in IME, the 8x8 split, an out-of-window
// FME result, CABAC same-context stalls, output FIFO back-pressure, intra
// and inter decisions and filtered deblocking edges. A mechanism that never
// happens counts as a failure. It prints the cycles each macroblock spent
// in the second pipeline stage.
module tb_h264_hp_encoder;
  import h264_pkg::*;
  localparam int FR = 420, OX = 150, OY = 150, NMB = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic l0_wr_en = 1'b0, lx_wr_en = 1'b0;
  logic [5:0] l0_wr_row = '0, l0_wr_col = '0;
  logic [1:0] lx_wr_level = '0;
  logic [6:0] lx_wr_row = '0, lx_wr_col = '0;
  pixel_t l0_wr_data [16], lx_wr_data [16];
  logic ready, mb_start = 1'b0, cur_valid = 1'b0;
  pixel_t cur_mb [16][16];
  mv_t mvp;
  pixel_t nb_top [20], nb_left [16], nb_corner, dbk_top [4][16], dbk_left [16][4];
  logic nb_avail_top = 1'b1, nb_avail_left = 1'b1, slice_last = 1'b0;
  logic [5:0] qp = 6'd28;
  logic [7:0] lambda = 8'd4;
  logic ctx_init_en = 1'b0;
  logic [9:0] ctx_init_idx = '0;
  logic signed [7:0] ctx_init_m = '0, ctx_init_n = '0;
  logic bs_valid, bs_ready = 1'b1;
  logic [7:0] bs_byte;
  logic mb_done, mb_is_inter;
  blk_mode_e mb_inter_mode, mb_sub_mode [4];
  mv_t mb_mv [16];
  logic [3:0] mb_intra_mode [16];
  pixel_t mb_rec [16][16], dbk_mb [20][20];
  logic ev_l0_rotate, ev_ime_upper_level, ev_split_mode, ev_fme_oow, ev_ctx_stall, ev_dbk_edge;

  h264_hp_encoder dut (.*);
  always #5 clk = !clk;

  pixel_t frame [FR][FR];
  pixel_t src [NMB][16][16];
  int dxs [NMB] = '{3, 0, 0, 40, -5, 0};
  int dys [NMB] = '{-2, 0, 0, 36, 4, 0};
  int checks = 0, failures = 0, done_cnt = 0, nbytes = 0, bytes_at_end = 0;
  int c_rot = 0, c_upper = 0, c_split = 0, c_oow = 0, c_stall = 0, c_dbk = 0, c_full = 0;
  int c_inter = 0, c_intra = 0, cyc = 0, t_start [NMB + 1];
  logic throttle = 1'b1;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: the byte stream is read with pauses so the FIFO fills
  always @(negedge clk) begin
    cyc++;
    bs_ready <= !throttle || (cyc / 700) % 2 == 0;
  end
  always @(posedge clk)
    if (rst_n) begin
      if (bs_valid && bs_ready) nbytes++;
      if (ev_l0_rotate) c_rot++;
      if (ev_ime_upper_level) c_upper++;
      if (ev_split_mode) c_split++;
      if (ev_fme_oow) c_oow++;
      if (ev_ctx_stall) c_stall++;
      if (ev_dbk_edge) c_dbk++;
      if (!dut.u_cabac.room8) c_full++;
    end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // results of the macroblock leaving stage B
  always @(posedge clk)
    if (rst_n && mb_done) begin
      automatic int n = done_cnt, err = 0, maxe = 0;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          automatic int d = int'(mb_rec[y][x]) - int'(src[n][y][x]);
          d = d < 0 ? -d : d;
          err += d; if (d > maxe) maxe = d;
        end
      $display("MB %0d: %s mode %0d, mv0 (%0d,%0d), mean |err| %0d/256, stage-2 cycles %0d", n,
               mb_is_inter ? "inter" : "intra", mb_inter_mode, int'(mb_mv[0].x), int'(mb_mv[0].y), err,
               cyc - t_start[n + 1]);
      if (mb_is_inter) c_inter++; else c_intra++;
      case (n)
        0: begin
             check(mb_is_inter, "MB0 inter");
             for (int b = 0; b < 16; b++)
               check(int'(mb_mv[b].x) == 12 && int'(mb_mv[b].y) == -8, "MB0 motion vector");
             check(maxe == 0, "MB0 exact reconstruction");
           end
        1: begin
             check(mb_is_inter && mb_inter_mode == M8x8, "MB1 8x8 split");
             check(int'(mb_mv[0].x) == 4 && int'(mb_mv[0].y) == 4, "MB1 quadrant 0 vector");
             check(int'(mb_mv[15].x) == 0 && int'(mb_mv[15].y) == 8, "MB1 quadrant 3 vector");
           end
        2: check(!mb_is_inter, "MB2 intra");
        3: check(!mb_is_inter, "MB3 intra after out-of-window vector");
        4: check(mb_is_inter, "MB4 inter");
        default: check(!mb_is_inter, "MB5 intra");
      endcase
      check(err <= 10 * 256, "reconstruction error");
      done_cnt++;
    end

  task automatic load_mb(int n);
    automatic int ox = OX + 16 * n, oy = OY;
    // level-0 window: 37x37 from (-10,-10), MVP is zero
    for (int r = 0; r < 37; r++)
      for (int c0 = 0; c0 < 37; c0 += 16) begin
        @(negedge clk);
        l0_wr_en = 1'b1; l0_wr_row = 6'(r); l0_wr_col = 6'(c0);
        for (int k = 0; k < 16; k++) l0_wr_data[k] = (c0 + k < 37) ? frame[oy - 10 + r][ox - 10 + c0 + k] : 8'd0;
      end
    @(negedge clk); l0_wr_en = 1'b0;
    while (!ready) @(negedge clk);
    for (int lv = 1; lv <= 2; lv++) begin
      automatic int w = lv == 1 ? 39 : 67, f = lv == 1 ? 2 : 4, o = lv == 1 ? 32 : 128;
      for (int r = 0; r < w; r++)
        for (int c0 = 0; c0 < w; c0 += 16) begin
          @(negedge clk);
          lx_wr_en = 1'b1; lx_wr_level = 2'(lv); lx_wr_row = 7'(r); lx_wr_col = 7'(c0);
          for (int k = 0; k < 16; k++)
            lx_wr_data[k] = (c0 + k < w) ? frame[oy + f*r - o][ox + f*(c0+k) - o] : 8'd0;
        end
    end
    @(negedge clk); lx_wr_en = 1'b0;
  endtask

  // neighbours of the macroblock that enters stage B (a mid-grey surround)
  task automatic set_neighbours(int n);
    for (int i = 0; i < 20; i++) nb_top[i] = 8'(120 + i);
    for (int i = 0; i < 16; i++) nb_left[i] = 8'(124 + i / 2);
    nb_corner = 8'd122;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 16; c++) dbk_top[r][c] = 8'(118 + c);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 4; c++) dbk_left[r][c] = 8'(126 + r / 4);
    slice_last = n == NMB - 1;
  endtask

  task automatic issue(int n, logic valid);
    while (!ready) @(negedge clk);
    if (valid) cur_mb = src[n];
    cur_valid = valid;
    set_neighbours(n - 1);
    mb_start = 1'b1;
    t_start[n] = cyc;
    @(negedge clk); mb_start = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin l0_wr_data[k] = '0; lx_wr_data[k] = '0; end
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur_mb[r][c] = '0;
    mvp = '0;
    set_neighbours(0);
    slice_last = 1'b0;
    for (int r = 0; r < FR; r++) for (int c = 0; c < FR; c++) frame[r][c] = pixel_t'($urandom_range(30, 225));
    for (int n = 0; n < NMB; n++)
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          automatic int ox = OX + 16 * n, oy = OY, v;
          case (n)
            1: begin
                 automatic int q = (y / 8) * 2 + x / 8;
                 automatic int qx [4] = '{1, -2, 3, 0}, qy [4] = '{1, 0, -3, 2};
                 v = frame[oy + qy[q] + y][ox + qx[q] + x];
               end
            2: v = 100 + (x + y) / 8;
            5: v = 60 + 4 * x + 2 * y;
            4: v = int'(frame[oy + dys[n] + y][ox + dxs[n] + x]) + $urandom_range(0, 4) - 2;
            default: v = frame[oy + dys[n] + y][ox + dxs[n] + x];
          endcase
          src[n][y][x] = pixel_t'(v < 0 ? 0 : (v > 255 ? 255 : v));
        end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // context initialisation: a fixed (m, n) pair per context
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      ctx_init_en = 1'b1; ctx_init_idx = 10'(i);
      ctx_init_m = 8'((i % 7) * 3 - 9); ctx_init_n = 8'(40 + (i * 5) % 50);
    end
    @(negedge clk); ctx_init_en = 1'b0;
    for (int n = 0; n < NMB; n++) begin
      load_mb(n);
      issue(n, 1'b1);
    end
    issue(NMB, 1'b0);            // drain the pipeline
    while (!ready) @(negedge clk);
    throttle = 1'b0;
    repeat (500) @(negedge clk);
    bytes_at_end = nbytes;
    check(done_cnt == NMB, "all macroblocks finished");
    check(nbytes > 0, "byte stream produced");
    check(dut.u_cabac.u_fifo.count == 0, "stream drained");
    check(dut.u_cabac.u_ac.acc_len_q == 0, "stream byte-aligned after the slice");
    check(c_rot >= NMB, "level-0 bank rotation");
    check(c_upper > 0, "level-1/2 win in IME");
    check(c_split > 0, "8x8 split kept by mode filtering");
    check(c_oow > 0, "refined vector outside the level-0 window");
    check(c_stall > 0, "CABAC same-context stall");
    check(c_full > 0, "output FIFO back-pressure");
    check(c_dbk > 0, "deblocking edge filtered");
    check(c_inter > 0 && c_intra > 0, "both intra and inter macroblocks");
    $display("bytes %0d, rotations %0d, upper-level wins %0d, splits %0d, out-of-window %0d, ctx stalls %0d, fifo-full cycles %0d, filtered edges %0d",
             nbytes, c_rot, c_upper, c_split, c_oow, c_stall, c_full, c_dbk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
