// H.264 high-profile macroblock encoder core: a macroblock pipeline in which
// integer motion estimation (IME) of macroblock n+1 overlaps all later work
// on macroblock n.
//   Stage A: PMRME integer motion estimation (256 cycles) on the IME bank of
//            the shared level-0 reference buffers plus the local level-1/2
//            windows.
//   Stage B: mode filtering picks two block modes; single-iteration FME
//            refines their partitions on the FME bank (the same level-0
//            data, rotated, not copied) while, in parallel, intra 4x4 mode
//            decision (modified three-step search, enhanced SATD) and intra
//            reconstruction run 4x4 block by 4x4 block through the shared
//            transform / quantization / inverse / reconstruction chain. Then
//            inter and intra costs are compared; an inter macroblock is
//            reconstructed afterwards through the same chain (reconstruction
//            sharing) with motion-compensated prediction. The chosen
//            symbols and quantized levels are CABAC-coded into the byte
//            stream and the reconstructed macroblock is deblocked with the
//            interleaved edge order.
// A new macroblock is accepted with `mb_start` while `ready` is high; the
// level-0 window of that macroblock must have been written to the load bank
// and its level-1/2 windows to the IME before. `cur_valid` low on a
// mb_start drains the pipeline without a new macroblock. `mb_done` pulses
// when stage B has finished a macroblock; the filtered 20x20 deblocking
// buffer (`dbk_mb`), decision outputs and the byte stream are then final.
// Simplifications of this design (see the documentation): intra is 4x4
// only, 4x4 blocks are handled in raster order, one forward direction, the
// entropy syntax is a simplified macroblock layer (not a decodable H.264
// slice), and inter is only chosen when every refined MV lies inside the
// shared level-0 window.
// Timing: IME takes 258 cycles; stage B takes roughly 740-2200 cycles per
// macroblock (sequential FME/intra, one bin per cycle in CABAC), so this
// integration runs below the original 1080p30 rate at 145 MHz.
// Lint notes: rst_n is reported as used both asynchronously and
// synchronously because the byte FIFO's overflow assertion uses
// `disable iff (!rst_n)`; the status outputs of some sub-blocks (busy flags,
// context-model ready) are left unconnected because the sequencers track
// completion with their own done pulses.
module h264_hp_encoder
  import h264_pkg::*;
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // external 128-bit reference bus
  input  logic        l0_wr_en,
  input  logic [5:0]  l0_wr_row,
  input  logic [5:0]  l0_wr_col,
  input  pixel_t      l0_wr_data [16],
  input  logic        lx_wr_en,
  input  logic [1:0]  lx_wr_level,
  input  logic [6:0]  lx_wr_row,
  input  logic [6:0]  lx_wr_col,
  input  pixel_t      lx_wr_data [16],
  // macroblock input
  output logic        ready,
  input  logic        mb_start,
  input  logic        cur_valid,
  input  pixel_t      cur_mb [16][16],
  input  mv_t         mvp,
  input  pixel_t      nb_top [20],        // row above: 16 + 4 top-right
  input  pixel_t      nb_left [16],
  input  pixel_t      nb_corner,
  input  pixel_t      dbk_top [4][16],    // filtered rows above (deblocking)
  input  pixel_t      dbk_left [16][4],   // filtered columns to the left
  input  logic        nb_avail_top,
  input  logic        nb_avail_left,
  input  logic        slice_last,
  input  logic [5:0]  qp,
  input  logic [7:0]  lambda,
  // CABAC context initialisation
  input  logic              ctx_init_en,
  input  logic [9:0]        ctx_init_idx,
  input  logic signed [7:0] ctx_init_m,
  input  logic signed [7:0] ctx_init_n,
  // byte stream
  output logic        bs_valid,
  input  logic        bs_ready,
  output logic [7:0]  bs_byte,
  // results of the macroblock leaving stage B
  output logic        mb_done,
  output logic        mb_is_inter,
  output blk_mode_e   mb_inter_mode,
  output blk_mode_e   mb_sub_mode [4],
  output mv_t         mb_mv [16],         // per 4x4 block, raster order
  output logic [3:0]  mb_intra_mode [16],
  output pixel_t      mb_rec [16][16],    // unfiltered reconstruction
  output pixel_t      dbk_mb [20][20],
  // mechanism event pulses
  output logic        ev_l0_rotate,
  output logic        ev_ime_upper_level,  // level 1/2 won a partition
  output logic        ev_split_mode,       // mode filter kept the 8x8 split
  output logic        ev_fme_oow,          // refined MV outside the window
  output logic        ev_ctx_stall,        // same-context stall in CABAC
  output logic        ev_dbk_edge          // an edge segment was filtered
);
  // ================= stage A: IME =================
  logic   adv;                 // macroblock boundary
  logic   mb_start_q, ime_done_q;
  logic   mb_is_inter_n, use_b_n; // decision of stage B (combinational)
  logic   ime_start_q, ime_busy, ime_done;
  pixel_t cur_a [16][16];
  mv_t    mvp_a;
  logic   valid_a;
  pixel_t ime_win [37][37], fme_win [37][37];
  sad_t   ime_sad [NPART];
  mv_t    ime_mv  [NPART];
  logic [1:0] ime_lvl [NPART];

  l0_pingpong u_l0 (
    .clk, .rst_n, .advance(adv), .wr_en(l0_wr_en), .wr_row(l0_wr_row), .wr_col(l0_wr_col),
    .wr_data(l0_wr_data), .ime_win, .fme_win, .load_bank(), .ime_bank(), .fme_bank());

  pmrme_ime u_ime (
    .clk, .rst_n, .l0_win(ime_win), .wr_en(lx_wr_en), .wr_level(lx_wr_level),
    .wr_row(lx_wr_row), .wr_col(lx_wr_col), .wr_data(lx_wr_data), .cur_mb(cur_a),
    .mvp(mvp_a), .start(ime_start_q), .busy(ime_busy), .done(ime_done),
    .best_sad(ime_sad), .best_mv(ime_mv), .best_lvl(ime_lvl));

  // ================= stage B state =================
  typedef enum logic [3:0] {
    B_IDLE, B_MF, B_WORK, B_DECIDE, B_INTER, B_ENT, B_DONE
  } bstate_e;
  bstate_e bst;
  logic    valid_b;
  pixel_t  cur_b [16][16];
  mv_t     mvp_b;
  sad_t    sad_b [NPART];
  mv_t     mv_b  [NPART];
  pixel_t  nbt_b [20], nbl_b [16], nbc_b;
  pixel_t  dbt_b [4][16], dbl_b [16][4];
  logic    avt_b, avl_b, last_b;
  logic    ime_pending;        // IME of stage A finished for a valid MB

  assign ready = !ime_busy && !ime_start_q && (bst == B_IDLE) && !mb_start_q;
  assign adv = mb_start && ready;
  assign ev_l0_rotate = adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ime_start_q <= 1'b0; valid_a <= 1'b0; mvp_a <= '0; mb_start_q <= 1'b0;
      valid_b <= 1'b0; mvp_b <= '0;
      ime_pending <= 1'b0;
    end else begin
      ime_start_q <= adv && cur_valid;
      mb_start_q  <= adv;
      if (ime_done) ime_pending <= 1'b1;
      if (adv) begin
        // stage A result and operands move to stage B
        valid_b <= valid_a && (ime_pending || ime_done);
        ime_pending <= 1'b0;
        mvp_b <= mvp_a;
        valid_a <= cur_valid;
        if (cur_valid) mvp_a <= mvp;
      end
    end
  end
  // neighbour data belongs to the macroblock entering stage B: it is
  // presented with the mb_start that moves that macroblock into stage B
  always_ff @(posedge clk) begin
    if (adv) begin
      cur_b <= cur_a; sad_b <= ime_sad; mv_b <= ime_mv;
      if (cur_valid) cur_a <= cur_mb;
      nbt_b <= nb_top; nbl_b <= nb_left; nbc_b <= nb_corner;
      dbt_b <= dbk_top; dbl_b <= dbk_left;
      avt_b <= nb_avail_top; avl_b <= nb_avail_left; last_b <= slice_last;
    end
  end

  logic ime_upper;
  always_comb begin
    ime_upper = 1'b0;
    for (int j = 0; j < 9; j++) if (ime_lvl[j] != 2'd0) ime_upper = 1'b1;
  end
  assign ev_ime_upper_level = ime_done_q && ime_upper;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ime_done_q <= 1'b0; else ime_done_q <= ime_done;

  // ================= mode filter =================
  logic      mf_valid;
  blk_mode_e mf_a, mf_b, mf_sub [4];
  logic [19:0] mf_ca, mf_cb;
  mode_filter u_mf (
    .clk, .rst_n, .in_valid(bst == B_MF), .sad(sad_b), .out_valid(mf_valid),
    .mode_a(mf_a), .cost_a(mf_ca), .mode_b(mf_b), .sub_mode(mf_sub), .cost_b(mf_cb));
  assign ev_split_mode = mf_valid && mf_b == M8x8;

  // ================= FME sequencer =================
  // partition list: phase 0 = mode A partitions, phase 1 = mode B sub-partitions
  logic        fme_run, fme_fin;
  logic        fph;              // phase
  logic [3:0]  fidx;             // partition number within the phase
  logic        f_start, f_busy, f_done, f_oow;
  mv_t         f_best;
  logic [19:0] f_cost;
  logic [19:0] fcost_a, fcost_b;
  mv_t         fmv_a [2], fmv_b [16];
  logic        oow_a, oow_b;
  logic [1:0]  px4, py4;
  logic [2:0]  pw4, ph4;
  logic [5:0]  pidx;             // index into the 41 IME partitions
  logic [3:0]  fcount;           // partitions in this phase

  function automatic int cnt_of(input blk_mode_e m);
    return part_count(int'(m));
  endfunction

  always_comb begin
    automatic blk_mode_e m;
    automatic int j = int'(fidx);
    automatic int q, s;
    px4 = '0; py4 = '0; pw4 = 3'd4; ph4 = 3'd4; pidx = '0;
    if (!fph) begin
      m = mf_a;
      fcount = 4'(cnt_of(mf_a));
      case (m)
        M16x8:   begin py4 = 2'(2*j); ph4 = 3'd2; pidx = 6'(1 + j); end
        M8x16:   begin px4 = 2'(2*j); pw4 = 3'd2; pidx = 6'(3 + j); end
        default: begin pidx = 6'd0; end
      endcase
    end else begin
      // four 8x8 quadrants, each with its own sub-mode, four slots each
      q = j / 4; s = j % 4;
      m = mf_sub[q];
      fcount = 4'd15;
      px4 = 2'(2*(q % 2)); py4 = 2'(2*(q / 2));
      case (m)
        M8x8: begin pw4 = 3'd2; ph4 = 3'd2; pidx = 6'(5 + q); end
        M8x4: begin pw4 = 3'd2; ph4 = 3'd1; py4 = py4 + 2'(s % 2); pidx = 6'(9 + 2*q + s % 2); end
        M4x8: begin pw4 = 3'd1; ph4 = 3'd2; px4 = px4 + 2'(s % 2); pidx = 6'(17 + 2*q + s % 2); end
        default: begin pw4 = 3'd1; ph4 = 3'd1; px4 = px4 + 2'(s % 2); py4 = py4 + 2'(s / 2);
                       pidx = 6'(25 + 4*q + s); end
      endcase
    end
  end
  // slot s of quadrant q is used by its sub-mode?
  logic slot_used;
  always_comb begin
    automatic int s = int'(fidx) % 4;
    automatic blk_mode_e m = mf_sub[int'(fidx) / 4];
    slot_used = !fph || s < cnt_of(m);
  end

  sifme u_fme (
    .clk, .rst_n, .win(fme_win), .cur_mb(cur_b), .start(f_start), .mv(mv_b[pidx]),
    .mvp(mvp_b), .x4(px4), .y4(py4), .w4(pw4), .h4(ph4), .lambda(lambda),
    .busy(f_busy), .done(f_done), .best_mv(f_best), .best_cost(f_cost), .out_of_win(f_oow));
  assign ev_fme_oow = f_done && f_oow;

  logic f_wait;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fme_run <= 1'b0; fme_fin <= 1'b0; fph <= 1'b0; fidx <= '0; f_start <= 1'b0; f_wait <= 1'b0;
      fcost_a <= '0; fcost_b <= '0; oow_a <= 1'b0; oow_b <= 1'b0;
      for (int i = 0; i < 2; i++) fmv_a[i] <= '0;
      for (int i = 0; i < 16; i++) fmv_b[i] <= '0;
    end else begin
      f_start <= 1'b0;
      if (mf_valid) begin
        fme_run <= 1'b1; fme_fin <= 1'b0; fph <= 1'b0; fidx <= '0; f_wait <= 1'b0;
        fcost_a <= '0; fcost_b <= '0; oow_a <= 1'b0; oow_b <= 1'b0;
      end else if (fme_run) begin
        if (!f_wait) begin
          if (slot_used) begin f_start <= 1'b1; f_wait <= 1'b1; end
          else if (fidx == fcount) begin
            fme_run <= 1'b0; fme_fin <= 1'b1;
          end else fidx <= fidx + 4'd1;
        end else if (f_done) begin
          f_wait <= 1'b0;
          if (!fph) begin
            fcost_a <= fcost_a + f_cost; fmv_a[fidx[0]] <= f_best; oow_a <= oow_a | f_oow;
          end else begin
            fcost_b <= fcost_b + f_cost; fmv_b[fidx] <= f_best; oow_b <= oow_b | f_oow;
          end
          if (fidx == fcount - 4'd1 || fph && fidx == fcount) begin
            if (!fph && mf_b == M8x8) begin fph <= 1'b1; fidx <= '0; end
            else begin fme_run <= 1'b0; fme_fin <= 1'b1; end
          end else fidx <= fidx + 4'd1;
        end
      end else if (bst == B_IDLE) fme_fin <= 1'b0;
    end
  end

  // ================= shared residual / reconstruction chain =================
  logic               ch_start, ch_inter, ch_done;
  pixel_t             ch_cur [4][4], ch_pred [4][4];
  logic signed [15:0] ch_lev [4][4];
  pixel_t             ch_rec [4][4];
  logic               ch_nz;
  recon_chain u_chain (
    .clk, .rst_n, .start(ch_start), .sel_inter(ch_inter), .qp, .cur(ch_cur), .pred(ch_pred),
    .done(ch_done), .levels(ch_lev), .rec(ch_rec), .nonzero(ch_nz));

  // ================= intra 4x4 path =================
  pixel_t     rec_b [16][16];
  logic       in_run, in_fin;
  logic [3:0] iblk;
  typedef enum logic [2:0] { I_DEC, I_WAIT, I_PRED0, I_PRED1, I_CHAIN, I_NEXT } istate_e;
  istate_e    ist;
  logic       d_start, d_busy, d_done;
  logic [3:0] d_mode;
  logic [15:0] d_cost;
  logic [19:0] intra_cost;
  pixel_t     i_top [8], i_left [4], i_corner;
  pixel_t     i_cur [4][4];
  logic [3:0] intra_modes [16];
  logic signed [15:0] lev_intra [16][4][4];
  logic       nz_intra [16];

  always_comb begin
    automatic int bx = int'(iblk[1:0]), by = int'(iblk[3:2]);
    for (int k = 0; k < 8; k++) begin
      automatic int x = 4*bx + k;
      if (by == 0) i_top[k] = avt_b ? nbt_b[x] : 8'd128;
      else if (x < 16 && (k < 4 || bx < 3)) i_top[k] = rec_b[4*by-1][x];
      else i_top[k] = rec_b[4*by-1][4*bx+3];        // top-right not available
    end
    for (int k = 0; k < 4; k++)
      i_left[k] = bx == 0 ? (avl_b ? nbl_b[4*by+k] : 8'd128) : rec_b[4*by+k][4*bx-1];
    if (bx == 0 && by == 0) i_corner = nbc_b;
    else if (by == 0) i_corner = avt_b ? nbt_b[4*bx-1] : 8'd128;
    else if (bx == 0) i_corner = avl_b ? nbl_b[4*by-1] : 8'd128;
    else i_corner = rec_b[4*by-1][4*bx-1];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) i_cur[r][c] = cur_b[4*by+r][4*bx+c];
  end

  intra4_decision u_dec (
    .clk, .rst_n, .start(d_start), .cur(i_cur), .top(i_top), .left(i_left), .corner(i_corner),
    .busy(d_busy), .done(d_done), .best_mode(d_mode), .best_cost(d_cost));

  // prediction of the chosen mode, re-generated two rows per cycle
  pixel_t g_top [16], g_left [16], g_pred [8];
  logic   g_step;
  always_comb
    for (int i = 0; i < 16; i++) begin
      g_top[i]  = i < 8 ? i_top[i] : i_top[7];
      g_left[i] = i < 4 ? i_left[i] : i_left[3];
    end
  intra_pred_gen #(.PAR(8)) u_gen (
    .blk(2'd0), .mode(intra_modes[iblk]), .step({4'd0, g_step}), .top(g_top), .left(g_left),
    .corner(i_corner), .avail_top(1'b1), .avail_left(1'b1), .avail_tr(1'b1), .pred(g_pred));
  pixel_t ipred [4][4];

  // ================= inter reconstruction path =================
  logic        x_run, x_fin;
  logic [3:0]  xblk;
  logic        x_wait;
  logic        use_b;           // mode B (split) chosen
  mv_t         blk_mv [16];
  pixel_t      x_patch [12][12];
  pixel_t      x_pred  [4][4];
  logic signed [15:0] lev_inter [16][4][4];
  logic        nz_inter [16];
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      automatic int bx = b % 4, by = b / 4;
      automatic int q = (by / 2) * 2 + bx / 2;
      if (!use_b) begin
        case (mf_a)
          M16x8:   blk_mv[b] = fmv_a[by / 2];
          M8x16:   blk_mv[b] = fmv_a[bx / 2];
          default: blk_mv[b] = fmv_a[0];
        endcase
      end else begin
        case (mf_sub[q])
          M8x8:    blk_mv[b] = fmv_b[4*q];
          M8x4:    blk_mv[b] = fmv_b[4*q + by % 2];
          M4x8:    blk_mv[b] = fmv_b[4*q + bx % 2];
          default: blk_mv[b] = fmv_b[4*q + (by % 2)*2 + bx % 2];
        endcase
      end
    end
  end
  always_comb begin
    automatic int bx = int'(xblk[1:0]), by = int'(xblk[3:2]);
    automatic int dx = int'(blk_mv[xblk].x) - int'(mvp_b.x);
    automatic int dy = int'(blk_mv[xblk].y) - int'(mvp_b.y);
    automatic int ox = 10 + (dx >>> 2) + 4*bx - 3, oy = 10 + (dy >>> 2) + 4*by - 3;
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 12; c++) begin
        automatic int wy = oy + r, wx = ox + c;
        wy = wy < 0 ? 0 : (wy > 36 ? 36 : wy);
        wx = wx < 0 ? 0 : (wx > 36 ? 36 : wx);
        x_patch[r][c] = fme_win[wy][wx];
      end
  end
  fme_interp u_mc (
    .patch(x_patch), .qx(4'(blk_mv[xblk].x & 11'sd3)), .qy(4'(blk_mv[xblk].y & 11'sd3)),
    .pred(x_pred));

  // chain operand multiplexing: intra slots during B_WORK, inter in B_INTER
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        ch_cur[r][c]  = (bst == B_INTER) ? cur_b[4*int'(xblk[3:2])+r][4*int'(xblk[1:0])+c] : i_cur[r][c];
        ch_pred[r][c] = (bst == B_INTER) ? x_pred[r][c] : ipred[r][c];
      end
    ch_inter = (bst == B_INTER);
  end

  // intra sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_run <= 1'b0; in_fin <= 1'b0; iblk <= '0; ist <= I_DEC; d_start <= 1'b0; g_step <= 1'b0;
      intra_cost <= '0; ch_start <= 1'b0; x_run <= 1'b0; x_fin <= 1'b0; xblk <= '0; x_wait <= 1'b0;
      for (int b = 0; b < 16; b++) begin intra_modes[b] <= '0; nz_intra[b] <= 1'b0; nz_inter[b] <= 1'b0; end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) ipred[r][c] <= '0;
    end else begin
      d_start <= 1'b0; ch_start <= 1'b0;
      if (mf_valid) begin
        in_run <= 1'b1; in_fin <= 1'b0; iblk <= '0; ist <= I_DEC; intra_cost <= '0;
      end else if (in_run) begin
        case (ist)
          I_DEC:   begin d_start <= 1'b1; ist <= I_WAIT; end
          I_WAIT:  if (d_done) begin
                     intra_modes[iblk] <= d_mode; intra_cost <= intra_cost + 20'(d_cost);
                     ist <= I_PRED0; g_step <= 1'b0;
                   end
          I_PRED0: begin
                     for (int k = 0; k < 8; k++) ipred[k/4][k%4] <= g_pred[k];
                     g_step <= 1'b1; ist <= I_PRED1;
                   end
          I_PRED1: begin
                     for (int k = 0; k < 8; k++) ipred[2 + k/4][k%4] <= g_pred[k];
                     ch_start <= 1'b1; ist <= I_CHAIN;
                   end
          I_CHAIN: if (ch_done) begin
                     nz_intra[iblk] <= ch_nz;
                     ist <= I_NEXT;
                   end
          default: begin
                     if (iblk == 4'd15) begin in_run <= 1'b0; in_fin <= 1'b1; end
                     iblk <= iblk + 4'd1; ist <= I_DEC;
                   end
        endcase
      end else if (bst == B_IDLE) in_fin <= 1'b0;

      // inter reconstruction after the decision, same chain
      if (bst == B_DECIDE && mb_is_inter_n) begin
        x_run <= 1'b1; x_fin <= 1'b0; xblk <= '0; x_wait <= 1'b0;
      end else if (x_run) begin
        if (!x_wait) begin ch_start <= 1'b1; x_wait <= 1'b1; end
        else if (ch_done) begin
          nz_inter[xblk] <= ch_nz;
          x_wait <= 1'b0;
          if (xblk == 4'd15) begin x_run <= 1'b0; x_fin <= 1'b1; end
          xblk <= xblk + 4'd1;
        end
      end else if (bst == B_IDLE) x_fin <= 1'b0;
    end
  end

  // reconstructed pixels and levels of the chain (data only, no reset)
  always_ff @(posedge clk) begin
    if (ch_done && in_run && ist == I_CHAIN)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          rec_b[4*int'(iblk[3:2])+r][4*int'(iblk[1:0])+c] <= ch_rec[r][c];
          lev_intra[iblk][r][c] <= ch_lev[r][c];
        end
    if (ch_done && x_run && x_wait)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          rec_b[4*int'(xblk[3:2])+r][4*int'(xblk[1:0])+c] <= ch_rec[r][c];
          lev_inter[xblk][r][c] <= ch_lev[r][c];
        end
  end

  // ================= final decision =================
  always_comb begin
    automatic logic [19:0] ci = use_b_n ? fcost_b : fcost_a;
    mb_is_inter_n = !(use_b_n ? oow_b : oow_a) && ci < intra_cost;
  end
  assign use_b_n = (mf_b == M8x8) && fcost_b < fcost_a;

  // ================= entropy coding =================
  logic        se_valid, se_ready, se_signed, se_last;
  logic [2:0]  se_type;
  logic signed [15:0] se_val;
  logic [4:0]  se_param;
  logic [1:0]  se_k;
  logic [9:0]  se_ctx;
  logic [3:0]  se_incmax;
  logic        ent_run, ent_fin;
  logic [3:0]  eph;            // syntax phase
  logic [4:0]  ei;             // item within phase
  logic [3:0]  eblk;
  logic signed [15:0] cur_lev [4][4];
  logic        cur_nz;
  logic        cabac_bin_fire;

  cabac_encoder u_cabac (
    .clk, .rst_n, .init_en(ctx_init_en), .init_idx(ctx_init_idx), .init_m(ctx_init_m),
    .init_n(ctx_init_n), .slice_qp(qp), .se_valid, .se_ready, .se_type, .se_val, .se_param,
    .se_k, .se_signed, .ctx_base(se_ctx), .ctx_inc_max(se_incmax), .se_last,
    .out_valid(bs_valid), .out_ready(bs_ready), .out_byte(bs_byte),
    .stall_same_ctx(ev_ctx_stall), .bin_fire(cabac_bin_fire));

  // zig-zag scan position -> (row, col) of a 4x4 block
  function automatic int zz_r(input int i);
    int t [16] = '{0,0,1,2,1,0,0,1,2,3,3,2,1,2,3,3};
    return t[i];
  endfunction
  function automatic int zz_c(input int i);
    int t [16] = '{0,1,0,0,1,2,3,2,1,0,1,2,3,3,2,3};
    return t[i];
  endfunction

  // number of partitions whose MVD is sent
  logic [4:0] n_mvd;
  mv_t        mvd_mv [16];
  always_comb begin
    for (int i = 0; i < 16; i++) mvd_mv[i] = '0;
    if (!mb_is_inter) n_mvd = '0;
    else if (!use_b) begin
      n_mvd = 5'(cnt_of(mf_a));
      mvd_mv[0] = fmv_a[0]; mvd_mv[1] = fmv_a[1];
    end else begin
      n_mvd = 5'd16;           // four slots per quadrant, unused ones skipped
      for (int i = 0; i < 16; i++) mvd_mv[i] = fmv_b[i];
    end
  end
  logic mvd_slot_used;
  always_comb begin
    automatic int s = int'(ei[4:1]) % 4;
    mvd_slot_used = !use_b || s < cnt_of(mf_sub[int'(ei[4:1]) / 4]);
  end

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        cur_lev[r][c] = mb_is_inter ? lev_inter[eblk][r][c] : lev_intra[eblk][r][c];
    cur_nz = mb_is_inter ? nz_inter[eblk] : nz_intra[eblk];
  end

  // syntax element generator
  //   phase 0: mb kind (FL 1)        phase 1: intra modes (FL 4) x16
  //   phase 2: inter mode (FL 3)     phase 3: sub-modes (FL 3) x4
  //   phase 4: MVD x,y (UEG3, uCoff 9, signed)
  //   phase 5: per block coded flag (FL 1), phase 6: 16 levels (UEG0, uCoff 14)
  //   phase 7: end_of_slice_flag (terminate)
  always_comb begin
    se_valid = ent_run; se_type = 3'd0; se_val = '0; se_param = 5'd1; se_k = '0;
    se_signed = 1'b0; se_ctx = '0; se_incmax = '0; se_last = 1'b0;
    case (eph)
      4'd0: begin se_val = 16'(mb_is_inter); se_ctx = 10'd0; end
      4'd1: begin se_val = 16'(intra_modes[ei[3:0]]); se_param = 5'd4; se_ctx = 10'd1; se_incmax = 4'd3; end
      4'd2: begin se_val = 16'(use_b ? 3'(M8x8) : 3'(mf_a)); se_param = 5'd3; se_ctx = 10'd5; se_incmax = 4'd2; end
      4'd3: begin se_val = 16'(mf_sub[ei[1:0]]); se_param = 5'd3; se_ctx = 10'd8; se_incmax = 4'd2; end
      4'd4: begin
              automatic mv_t m = mvd_mv[ei[4:1]];
              se_type = 3'd3; se_param = 5'd9; se_k = 2'd3; se_signed = 1'b1; se_incmax = 4'd6;
              se_val = ei[0] ? 16'(m.y - mvp_b.y) : 16'(m.x - mvp_b.x);
              se_ctx = ei[0] ? 10'd18 : 10'd11;
              se_valid = ent_run && mvd_slot_used;
            end
      4'd5: begin se_val = 16'(cur_nz); se_ctx = 10'd30; end
      4'd6: begin
              se_type = 3'd3; se_param = 5'd14; se_k = 2'd0; se_signed = 1'b1; se_incmax = 4'd4;
              se_val = cur_lev[zz_r(int'(ei[3:0]))][zz_c(int'(ei[3:0]))]; se_ctx = 10'd40;
            end
      default: begin se_type = 3'd4; se_val = 16'(last_b); se_last = last_b; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_run <= 1'b0; ent_fin <= 1'b0; eph <= '0; ei <= '0; eblk <= '0;
    end else begin
      if (bst == B_ENT && !ent_run && !ent_fin) begin
        ent_run <= 1'b1; eph <= '0; ei <= '0; eblk <= '0;
      end else if (ent_run && (se_ready || (eph == 4'd4 && !mvd_slot_used))) begin
        // advance to the next syntax element
        case (eph)
          4'd0: begin eph <= mb_is_inter ? 4'd2 : 4'd1; ei <= '0; end
          4'd1: if (ei == 5'd15) begin eph <= 4'd5; ei <= '0; end else ei <= ei + 5'd1;
          4'd2: begin eph <= use_b ? 4'd3 : 4'd4; ei <= '0; end
          4'd3: if (ei == 5'd3) begin eph <= 4'd4; ei <= '0; end else ei <= ei + 5'd1;
          4'd4: if (ei == 5'(2*n_mvd - 1)) begin eph <= 4'd5; ei <= '0; end else ei <= ei + 5'd1;
          4'd5: if (cur_nz) begin eph <= 4'd6; ei <= '0; end
                else if (eblk == 4'd15) eph <= 4'd7;
                else eblk <= eblk + 4'd1;
          4'd6: if (ei == 5'd15) begin
                  ei <= '0;
                  if (eblk == 4'd15) eph <= 4'd7; else begin eph <= 4'd5; eblk <= eblk + 4'd1; end
                end else ei <= ei + 5'd1;
          default: begin ent_run <= 1'b0; ent_fin <= 1'b1; end
        endcase
      end else if (bst == B_IDLE) ent_fin <= 1'b0;
    end
  end

  // ================= deblocking =================
  logic       db_start, db_busy, db_done, db_fin;
  logic [2:0] bs_v [4][4], bs_h [4][4];
  logic [5:0] db_cnt, db_cnt_q;
  always_comb begin
    for (int e = 0; e < 4; e++)
      for (int k = 0; k < 4; k++) begin
        if (!mb_is_inter) begin
          bs_v[e][k] = e == 0 ? 3'd4 : 3'd3;
          bs_h[e][k] = e == 0 ? 3'd4 : 3'd3;
        end else begin
          // vertical edge e at block row k: blocks (e-1,k) | (e,k)
          automatic int bq = 4*k + e, bp = 4*k + (e == 0 ? 0 : e - 1);
          automatic int hq = 4*e + k, hp = 4*(e == 0 ? 0 : e - 1) + k;
          automatic int mdx = int'(blk_mv[bq].x) - int'(blk_mv[bp].x);
          automatic int mdy = int'(blk_mv[bq].y) - int'(blk_mv[bp].y);
          automatic int ndx = int'(blk_mv[hq].x) - int'(blk_mv[hp].x);
          automatic int ndy = int'(blk_mv[hq].y) - int'(blk_mv[hp].y);
          bs_v[e][k] = (nz_inter[bq] || nz_inter[bp]) ? 3'd2 :
                       (mdx >= 4 || mdx <= -4 || mdy >= 4 || mdy <= -4) ? 3'd1 : 3'd0;
          bs_h[e][k] = (nz_inter[hq] || nz_inter[hp]) ? 3'd2 :
                       (ndx >= 4 || ndx <= -4 || ndy >= 4 || ndy <= -4) ? 3'd1 : 3'd0;
          // macroblock edges towards neighbours: intra status unknown here
          if (e == 0) begin bs_v[e][k] = 3'd2; bs_h[e][k] = 3'd2; end
        end
      end
  end
  deblock_mb u_dbk (
    .clk, .rst_n, .start(db_start), .mb_in(rec_b), .left_in(dbl_b), .top_in(dbt_b),
    .bs_v, .bs_h, .qp, .filter_left(avl_b), .filter_top(avt_b), .busy(db_busy),
    .done(db_done), .buf_out(dbk_mb), .edges_filtered(db_cnt));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) db_cnt_q <= '0; else db_cnt_q <= db_cnt;
  assign ev_dbk_edge = db_busy && db_cnt != db_cnt_q;

  // ================= stage B control =================
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; mb_done <= 1'b0; mb_is_inter <= 1'b0; use_b <= 1'b0; db_start <= 1'b0;
      db_fin <= 1'b0; mb_inter_mode <= M16x16;
      for (int q = 0; q < 4; q++) mb_sub_mode[q] <= M8x8;
    end else begin
      mb_done <= 1'b0; db_start <= 1'b0;
      if (db_done) db_fin <= 1'b1;
      case (bst)
        B_IDLE:   if (mb_start_q && valid_b) bst <= B_MF;
        B_MF:     bst <= B_WORK;
        B_WORK:   if (fme_fin && in_fin) bst <= B_DECIDE;
        B_DECIDE: begin
                    mb_is_inter <= mb_is_inter_n; use_b <= use_b_n;
                    mb_inter_mode <= use_b_n ? M8x8 : mf_a;
                    mb_sub_mode <= mf_sub;
                    bst <= mb_is_inter_n ? B_INTER : B_ENT;
                  end
        B_INTER:  if (x_fin) bst <= B_ENT;
        B_ENT:    begin
                    if (!db_busy && !db_fin && !db_start) db_start <= 1'b1;
                    if (ent_fin && db_fin) begin bst <= B_DONE; end
                  end
        default:  begin bst <= B_IDLE; mb_done <= 1'b1; db_fin <= 1'b0; end
      endcase
    end
  end

  assign mb_rec = rec_b;
  always_comb
    for (int b = 0; b < 16; b++) begin
      mb_mv[b] = mb_is_inter ? blk_mv[b] : '0;
      mb_intra_mode[b] = intra_modes[b];
    end
endmodule
