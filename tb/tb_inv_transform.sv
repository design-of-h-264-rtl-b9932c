// Self-checking test of the inverse transform unit. The H.264 inverse
// transforms contain >>1 and >>2 taps; for coefficient sets that are
// multiples of 4 (4x4) or 64 (8x8) those taps are exact and the transform
// equals a matrix product with the transposed basis, which the testbench
// evaluates: 4x4 res = (B'*D*B + 128) >> 8 with the doubled basis B,
// 8x8 res = (T'*D*T + 2048) >> 12 with the 8x8 integer matrix T. The inverse
// Hadamards are checked as plain matrix products. A round trip through a
// DC-only block (value 64*v gives residual v) is checked as well.
module tb_inv_transform;
  import h264_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  tr_mode_e mode = TR_DCT4;
  logic signed [15:0] coef [8][8], res [8][8];
  int checks = 0, failures = 0;
  int b2 [4][4] = '{'{2,2,2,2}, '{2,1,-1,-2}, '{2,-2,-2,2}, '{1,-2,2,-1}};
  int hd [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  int t8 [8][8] = '{'{8,8,8,8,8,8,8,8}, '{12,10,6,3,-3,-6,-10,-12},
                    '{8,4,-4,-8,-8,-4,4,8}, '{10,-3,-12,-6,6,12,3,-10},
                    '{8,-8,-8,8,8,-8,-8,8}, '{6,-12,3,10,-10,-3,12,-6},
                    '{4,-8,8,-4,-4,8,-8,4}, '{3,-6,10,-12,12,-10,6,-3}};
  int expv [8][8];
  inv_transform dut (.clk, .rst_n, .in_valid, .mode, .coef, .out_valid, .res);
  always #5 clk = !clk;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int basis(tr_mode_e m, int k, int x);
    case (m)
      TR_DCT8: return t8[k][x];
      TR_DCT4: return b2[k][x];
      TR_HAD4: return hd[k][x];
      default: return (k == 1 && x == 1) ? -1 : 1;
    endcase
  endfunction
  task automatic reference();
    int n = (mode == TR_DCT8) ? 8 : (mode == TR_HAD2 ? 2 : 4);
    longint a [8][8];
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin a[i][j] = 0; expv[i][j] = 0; end
    // a = D * B (rows), then s = B' * a (columns)
    for (int i = 0; i < n; i++)
      for (int x = 0; x < n; x++)
        for (int k = 0; k < n; k++) a[i][x] += longint'(coef[i][k]) * basis(mode, k, x);
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        automatic longint s = 0;
        for (int k = 0; k < n; k++) s += longint'(basis(mode, k, y)) * a[k][x];
        case (mode)
          TR_DCT8: expv[y][x] = int'((s + 2048) >>> 12);
          TR_DCT4: expv[y][x] = int'((s + 128) >>> 8);
          default: expv[y][x] = int'(s);
        endcase
      end
  endtask
  initial begin
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) coef[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      mode = tr_mode_e'(n % 4);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          case (mode)
            TR_DCT8: coef[i][j] = 16'(64 * ($urandom_range(0, 10) - 5));
            TR_DCT4: coef[i][j] = 16'(4 * ($urandom_range(0, 200) - 100));
            default: coef[i][j] = 16'($urandom_range(0, 2000) - 1000);
          endcase
      if (n >= 790) begin
        // DC-only block of value 64*v reconstructs to v everywhere
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) coef[i][j] = '0;
        coef[0][0] = 16'(64 * (n - 795));
        mode = n % 2 ? TR_DCT4 : TR_DCT8;
      end
      reference();
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (int'(res[i][j]) != expv[i][j]) begin
            failures++;
            if (failures < 5) $display("mode %0d (%0d,%0d): %0d expected %0d", mode, i, j, res[i][j], expv[i][j]);
          end
        end
      if (n >= 790) begin
        checks++;
        if (int'(res[0][0]) != n - 795) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
