// Self-checking test of the intra prediction generator. For random
// neighbours the testbench predicts every pixel with the standard
// equations: all nine 4x4 and 8x8 modes (8x8 after [1 2 1] reference
// filtering), 16x16 vertical / horizontal / DC and chroma DC (per 4x4
// quadrant) / horizontal / vertical, and the DC rules when the top or the
// left neighbours are missing. Pixels are collected step by step in the
// generator's output order (two 4x4 rows, one 8-pixel row or one half row
// per step).
module tb_intra_pred_gen;
  import h264_pkg::*;
  logic [1:0] blk;
  logic [3:0] mode;
  logic [4:0] step;
  pixel_t top [16], left [16], corner, pred [8];
  logic avail_top, avail_left, avail_tr;
  int checks = 0, failures = 0;
  `include "tb/intra_ref_pred.svh"
  intra_pred_gen #(.PAR(8)) dut (.blk, .mode, .step, .top, .left, .corner, .avail_top, .avail_left,
                                 .avail_tr, .pred);
  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 8) $display("%s: %0d expected %0d", what, got, exp_v);
    end
  endtask
  initial begin
    blk = '0; mode = '0; step = '0; corner = '0; avail_top = 1'b1; avail_left = 1'b1; avail_tr = 1'b1;
    for (int i = 0; i < 16; i++) begin top[i] = '0; left[i] = '0; end
    for (int n = 0; n < 300; n++) begin
      automatic int rt [17], rl [9], ft [17], fl [9];
      for (int i = 0; i < 16; i++) begin top[i] = pixel_t'($urandom); left[i] = pixel_t'($urandom); end
      corner = pixel_t'($urandom);
      avail_top = 1'b1; avail_left = 1'b1; avail_tr = 1'b1;
      // 4x4
      rt[0] = corner; rl[0] = corner;
      for (int i = 0; i < 16; i++) rt[i+1] = i < 8 ? top[i] : 0;
      for (int i = 0; i < 8; i++) rl[i+1] = i < 4 ? left[i] : 0;
      blk = 2'd0;
      for (int m = 0; m < 9; m++)
        for (int s = 0; s < 2; s++) begin
          mode = 4'(m); step = 5'(s); #1;
          for (int k = 0; k < 8; k++)
            check(pred[k], ref_dir(4, m, k % 4, 2*s + k / 4, rt, rl), $sformatf("I4 mode %0d", m));
        end
      // 8x8 with filtered references
      for (int i = 0; i < 16; i++) rt[i+1] = top[i];
      for (int i = 0; i < 8; i++) rl[i+1] = left[i];
      ft[0] = (rt[1] + 2*rt[0] + rl[1] + 2) >> 2; fl[0] = ft[0];
      ft[1] = (rt[0] + 2*rt[1] + rt[2] + 2) >> 2;
      for (int x = 1; x < 15; x++) ft[x+1] = (rt[x] + 2*rt[x+1] + rt[x+2] + 2) >> 2;
      ft[16] = (rt[15] + 3*rt[16] + 2) >> 2;
      fl[1] = (rl[0] + 2*rl[1] + rl[2] + 2) >> 2;
      for (int y = 1; y < 7; y++) fl[y+1] = (rl[y] + 2*rl[y+1] + rl[y+2] + 2) >> 2;
      fl[8] = (rl[7] + 3*rl[8] + 2) >> 2;
      blk = 2'd1;
      for (int m = 0; m < 9; m++)
        for (int s = 0; s < 8; s++) begin
          mode = 4'(m); step = 5'(s); #1;
          for (int k = 0; k < 8; k++)
            check(pred[k], ref_dir(8, m, k, s, ft, fl), $sformatf("I8 mode %0d", m));
        end
      // 16x16
      blk = 2'd2;
      for (int m = 0; m < 3; m++)
        for (int s = 0; s < 32; s++) begin
          automatic int st = 0, sl = 0;
          for (int i = 0; i < 16; i++) begin st += top[i]; sl += left[i]; end
          mode = 4'(m); step = 5'(s); #1;
          for (int k = 0; k < 8; k++) begin
            automatic int x = 8 * (s % 2) + k, y = s / 2;
            check(pred[k], m == 0 ? int'(top[x]) : m == 1 ? int'(left[y]) : (st + sl + 16) >> 5, "I16");
          end
        end
      // chroma 8x8: DC per quadrant, H, V
      blk = 2'd3;
      for (int m = 0; m < 3; m++)
        for (int s = 0; s < 8; s++) begin
          mode = 4'(m); step = 5'(s); #1;
          for (int k = 0; k < 8; k++) begin
            automatic int e, st = 0, sl = 0, qx = k / 4, qy = s / 4;
            for (int i = 0; i < 4; i++) begin st += top[4*qx+i]; sl += left[4*qy+i]; end
            if (m == 1) e = left[s];
            else if (m == 2) e = top[k];
            else if (qx == qy) e = (st + sl + 4) >> 3;
            else if (qx == 1) e = (st + 2) >> 2;
            else e = (sl + 2) >> 2;
            check(pred[k], e, $sformatf("C8 mode %0d", m));
          end
        end
      // DC with missing neighbours (4x4 and 16x16)
      for (int a = 0; a < 3; a++) begin
        automatic int st4 = 0, sl4 = 0, st16 = 0, sl16 = 0;
        avail_top = a != 0; avail_left = a != 1;
        if (a == 2) begin avail_top = 1'b0; avail_left = 1'b0; end
        for (int i = 0; i < 4; i++) begin st4 += top[i]; sl4 += left[i]; end
        for (int i = 0; i < 16; i++) begin st16 += top[i]; sl16 += left[i]; end
        blk = 2'd0; mode = 4'd2; step = 5'd0; #1;
        check(pred[0], a == 0 ? (sl4 + 2) >> 2 : a == 1 ? (st4 + 2) >> 2 : 128, "I4 DC missing");
        blk = 2'd2; #1;
        check(pred[0], a == 0 ? (sl16 + 8) >> 4 : a == 1 ? (st16 + 8) >> 4 : 128, "I16 DC missing");
      end
      // missing top-right: samples 4-7 replaced by sample 3
      avail_top = 1'b1; avail_left = 1'b1; avail_tr = 1'b0;
      for (int i = 4; i < 8; i++) rt[i+1] = top[3];
      for (int i = 0; i < 4; i++) rt[i+1] = top[i];
      blk = 2'd0; mode = 4'd3; step = 5'd1; #1;
      for (int k = 0; k < 8; k++) check(pred[k], ref_dir(4, 3, k % 4, 2 + k / 4, rt, rl), "I4 DDL no top-right");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
