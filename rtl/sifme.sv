// Single-iteration fractional motion estimation for one partition.
// Six quarter-pel candidates are tested in one pass around the integer MV:
// (0,0), the predicted fraction f = (mvp - mv) % 4 (per component, remainder
// truncated toward zero) and the four diamond neighbours of f at one
// quarter-pel distance. One 4x4 block of the partition is processed per
// cycle: six interpolators and six SATD processing units work in parallel and
// accumulate the costs of the six candidates; after the last block a compare
// unit adds the motion-vector cost lambda*(|mvd_x|+|mvd_y|) (quarter-pel
// units, mvd against the MVP) and keeps the cheapest candidate.
// Reference pixels come from the FME bank of the level-0 buffers (37x37
// window whose pixel (10,10) is the MVP-displaced macroblock origin). An
// integer MV whose blocks and filter taps would leave that window (it came
// from level 1 or 2) is not refined: the integer MV is returned and
// `out_of_win` is set, standing for the external fetch such MVs need.
// Timing: `start` with the partition description; `done` pulses
// (w4*h4)+1 cycles later. The MV-cost form is this design's choice.
module sifme
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pixel_t      win [37][37],
  input  pixel_t      cur_mb [16][16],
  input  logic        start,
  input  mv_t         mv,            // integer MV, quarter-pel units
  input  mv_t         mvp,           // quarter-pel MVP
  input  logic [1:0]  x4, y4,        // partition origin in 4x4 blocks
  input  logic [2:0]  w4, h4,        // partition size in 4x4 blocks (1,2,4)
  input  logic [7:0]  lambda,
  output logic        busy,
  output logic        done,
  output mv_t         best_mv,
  output logic [19:0] best_cost,
  output logic        out_of_win
);
  localparam int NC = 6;
  logic signed [3:0] cx [NC], cy [NC];
  logic [1:0]  bx, by;              // current block inside the partition
  logic        run;
  logic [19:0] acc [NC];
  mv_t         mv_q, mvp_q;
  logic [1:0]  x4_q, y4_q;
  logic [2:0]  w4_q, h4_q;
  logic [7:0]  lam_q;
  logic        oow_q;

  // fractional prediction and candidate set
  function automatic logic signed [3:0] frac(input mvc_t p, input mvc_t m);
    int d;
    d = int'(p) - int'(m);
    return 4'(d % 4);
  endfunction
  always_comb begin
    automatic logic signed [3:0] fx = frac(mvp_q.x, mv_q.x);
    automatic logic signed [3:0] fy = frac(mvp_q.y, mv_q.y);
    cx[0] = 4'sd0;    cy[0] = 4'sd0;
    cx[1] = fx;       cy[1] = fy;
    cx[2] = fx + 4'sd1; cy[2] = fy;
    cx[3] = fx - 4'sd1; cy[3] = fy;
    cx[4] = fx;       cy[4] = fy + 4'sd1;
    cx[5] = fx;       cy[5] = fy - 4'sd1;
  end

  // integer offset of the MV inside the window
  int ox, oy;
  always_comb begin
    ox = (int'(mv_q.x) - int'(mvp_q.x)) >>> 2;
    oy = (int'(mv_q.y) - int'(mvp_q.y)) >>> 2;
  end

  // patch of the current 4x4 block: window pixel of block origin minus 3
  pixel_t patch [12][12];
  pixel_t cur4 [4][4];
  always_comb begin
    automatic int bx0 = 10 + ox + 4*(int'(x4_q) + int'(bx)) - 3;
    automatic int by0 = 10 + oy + 4*(int'(y4_q) + int'(by)) - 3;
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 12; c++) begin
        automatic int wy = by0 + r, wx = bx0 + c;
        wy = wy < 0 ? 0 : (wy > 36 ? 36 : wy);
        wx = wx < 0 ? 0 : (wx > 36 ? 36 : wx);
        patch[r][c] = win[wy][wx];
      end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        cur4[r][c] = cur_mb[4*(int'(y4_q)+int'(by))+r][4*(int'(x4_q)+int'(bx))+c];
  end

  logic [11:0] satd [NC];
  for (genvar k = 0; k < NC; k++) begin : g_pu
    pixel_t pred [4][4];
    fme_interp u_int (.patch(patch), .qx(cx[k]), .qy(cy[k]), .pred(pred));
    satd4x4_pu u_pu  (.cur(cur4), .pred(pred), .satd(satd[k]));
  end

  logic last_blk;
  assign last_blk = (3'(bx) == w4_q - 3'd1) && (3'(by) == h4_q - 3'd1);

  // window check: the block area -1..+1 pel around and six-tap support
  function automatic logic outside(input int o, input logic [1:0] p4, input logic [2:0] s4);
    int lo, hi;
    lo = 10 + o + 4*int'(p4) - 3;
    hi = 10 + o + 4*(int'(p4) + int'(s4)) + 4;
    return lo < 0 || hi > 36;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; bx <= '0; by <= '0;
      best_mv <= '0; best_cost <= '0; out_of_win <= 1'b0;
      mv_q <= '0; mvp_q <= '0; x4_q <= '0; y4_q <= '0; w4_q <= 3'd1; h4_q <= 3'd1;
      lam_q <= '0; oow_q <= 1'b0;
      for (int k = 0; k < NC; k++) acc[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; bx <= '0; by <= '0;
        mv_q <= mv; mvp_q <= mvp; x4_q <= x4; y4_q <= y4; w4_q <= w4; h4_q <= h4;
        lam_q <= lambda;
        for (int k = 0; k < NC; k++) acc[k] <= '0;
      end else if (run) begin
        for (int k = 0; k < NC; k++) acc[k] <= acc[k] + 20'(satd[k]);
        if (last_blk) begin
          automatic logic [19:0] bc = '1;
          automatic mv_t bm = mv_q;
          automatic logic oow = outside(ox, x4_q, w4_q) || outside(oy, y4_q, h4_q);
          for (int k = 0; k < NC; k++) begin
            automatic mv_t cm;
            automatic int dx, dy;
            automatic logic [19:0] cst;
            cm.x = mv_q.x + mvc_t'(cx[k]);
            cm.y = mv_q.y + mvc_t'(cy[k]);
            dx = int'(cm.x) - int'(mvp_q.x); dy = int'(cm.y) - int'(mvp_q.y);
            dx = dx < 0 ? -dx : dx; dy = dy < 0 ? -dy : dy;
            cst = acc[k] + 20'(satd[k]) + 20'(int'(lam_q) * (dx + dy));
            if (cst < bc && (!oow || k == 0)) begin bc = cst; bm = cm; end
          end
          best_cost <= bc; best_mv <= bm; out_of_win <= oow;
          run <= 1'b0; done <= 1'b1;
        end else if (3'(bx) == w4_q - 3'd1) begin
          bx <= '0; by <= by + 2'd1;
        end else begin
          bx <= bx + 2'd1;
        end
      end
    end
  end
  assign busy = run;
endmodule
