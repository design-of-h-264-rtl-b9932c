// Intra 4x4 mode decision with the modified three-step search.
// For one 4x4 block seven of the nine modes are evaluated, in a fixed order
// that never waits for a comparison: step 1 tests vertical (0), horizontal
// (1) and DC (2); step 2 tests diagonal-down-left (3) and diagonal-down-right
// (4) unconditionally; step 3 tests the two modes next to the step-1 winner
// in angle, vertical-right (5) and vertical-left (7) if vertical beat
// horizontal, otherwise horizontal-down (6) and horizontal-up (8). The mode
// with the smallest enhanced SATD cost wins (ties keep the earlier mode).
// Each mode takes two cycles of the eight-pixel prediction generator (two
// rows per cycle); the cost of a mode is formed when its second half is
// ready, so the decision takes 14 cycles plus one to report: `done` pulses
// 15 cycles after `start`. The branch of step 3 is taken as soon as the
// costs of modes 0 and 1 are known, i.e. while step 2 is being predicted.
// Neighbour availability is not checked here; callers must pass
// neighbours for all modes.
module intra4_decision
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pixel_t      cur  [4][4],
  input  pixel_t      top  [8],
  input  pixel_t      left [4],
  input  pixel_t      corner,
  output logic        busy,
  output logic        done,
  output logic [3:0]  best_mode,
  output logic [15:0] best_cost
);
  logic [3:0]  slot;          // 0..13: mode slot * 2 + half
  logic        run;
  logic [3:0]  mode;
  logic        v_wins;
  logic [15:0] c0;            // cost of vertical, compared with horizontal
  pixel_t      pred8 [8];
  pixel_t      top16 [16], left16 [16];

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      top16[i]  = i < 8 ? top[i] : top[7];
      left16[i] = i < 4 ? left[i] : left[3];
    end
  end

  always_comb begin
    case (slot[3:1])
      3'd0: mode = 4'd0;
      3'd1: mode = 4'd1;
      3'd2: mode = 4'd2;
      3'd3: mode = 4'd3;
      3'd4: mode = 4'd4;
      3'd5: mode = v_wins ? 4'd5 : 4'd6;
      default: mode = v_wins ? 4'd7 : 4'd8;
    endcase
  end

  intra_pred_gen #(.PAR(8)) u_gen (
    .blk(2'd0), .mode(mode), .step({4'd0, slot[0]}), .top(top16), .left(left16),
    .corner(corner), .avail_top(1'b1), .avail_left(1'b1), .avail_tr(1'b1), .pred(pred8));

  // residual block of the current mode once both halves are known
  pixel_t             rows01 [8];
  logic signed [8:0]  res [4][4];
  logic [15:0]        cost;
  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        automatic pixel_t p = r < 2 ? rows01[r*4+c] : pred8[(r-2)*4+c];
        res[r][c] = 9'(signed'({1'b0, cur[r][c]})) - 9'(signed'({1'b0, p}));
      end
  enh_satd u_cost (.res(res), .cost(cost));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; slot <= '0; done <= 1'b0; v_wins <= 1'b1;
      best_mode <= '0; best_cost <= '0; c0 <= '0;
      for (int i = 0; i < 8; i++) rows01[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; slot <= '0;
      end else if (run) begin
        if (!slot[0]) begin
          rows01 <= pred8;
        end else begin
          if (slot == 4'd1) c0 <= cost;
          if (slot == 4'd3) begin
            v_wins <= c0 <= cost;
          end
          if (slot == 4'd1 || cost < best_cost) begin
            best_cost <= cost; best_mode <= mode;
          end
        end
        if (slot == 4'd13) begin
          run <= 1'b0; done <= 1'b1;
        end
        slot <= slot + 4'd1;
      end
    end
  end
  assign busy = run;
endmodule
