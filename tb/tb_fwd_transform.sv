// Self-checking test of the forward transform unit. The testbench computes
// every mode by explicit matrix products: 4x4 integer transform Cf*X*Cf',
// 8x8 transform T*X*T' / 64 rounded (T = the 8x8 integer matrix scaled by 8),
// 4x4 Hadamard H*X*H halved toward zero, and the 2x2 Hadamard. It also checks
// the one-cycle latency of out_valid.
module tb_fwd_transform;
  import h264_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  tr_mode_e mode = TR_DCT4;
  logic signed [15:0] blk [8][8], coef [8][8];
  int checks = 0, failures = 0;
  int cf [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
  int hd [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  int t8 [8][8] = '{'{8,8,8,8,8,8,8,8}, '{12,10,6,3,-3,-6,-10,-12},
                    '{8,4,-4,-8,-8,-4,4,8}, '{10,-3,-12,-6,6,12,3,-10},
                    '{8,-8,-8,8,8,-8,-8,8}, '{6,-12,3,10,-10,-3,12,-6},
                    '{4,-8,8,-4,-4,8,-8,4}, '{3,-6,10,-12,12,-10,6,-3}};
  int expv [8][8];
  fwd_transform dut (.clk, .rst_n, .in_valid, .mode, .blk, .out_valid, .coef);
  always #5 clk = !clk;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic reference();
    int n = (mode == TR_DCT8) ? 8 : (mode == TR_HAD2 ? 2 : 4);
    int a [8][8];
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin a[i][j] = 0; expv[i][j] = 0; end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        for (int k = 0; k < n; k++) begin
          automatic int m = mode == TR_DCT8 ? t8[i][k] : mode == TR_DCT4 ? cf[i][k] :
                            mode == TR_HAD4 ? hd[i][k] : (i == 1 && k == 1 ? -1 : 1);
          a[i][j] += m * int'(blk[k][j]);
        end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        automatic longint s = 0;
        for (int k = 0; k < n; k++) begin
          automatic int m = mode == TR_DCT8 ? t8[j][k] : mode == TR_DCT4 ? cf[j][k] :
                            mode == TR_HAD4 ? hd[j][k] : (j == 1 && k == 1 ? -1 : 1);
          s += longint'(a[i][k]) * m;
        end
        case (mode)
          TR_DCT8: expv[i][j] = int'((s + 32) >>> 6);
          TR_HAD4: expv[i][j] = int'(s / 2);
          default: expv[i][j] = int'(s);
        endcase
      end
  endtask
  initial begin
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) blk[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      mode = tr_mode_e'(n % 4);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          blk[i][j] = mode == TR_HAD4 ? 16'($urandom_range(0, 4000) - 2000) :
                      mode == TR_HAD2 ? 16'($urandom_range(0, 8000) - 4000) :
                      (n < 8 ? 16'sd255 : 16'($urandom_range(0, 510) - 255));
      reference();
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (int'(coef[i][j]) != expv[i][j]) begin
            failures++;
            if (failures < 5) $display("mode %0d (%0d,%0d): %0d expected %0d", mode, i, j, coef[i][j], expv[i][j]);
          end
        end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
