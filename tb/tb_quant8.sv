// Self-checking test of the eight-coefficient quantizer. The testbench holds
// its own copy of the H.264 quantization factor tables, indexed through full
// 4x4 and 8x8 position maps, and evaluates
// level = sign(c) * ((|c| * MF + f) >> qbits) for 4x4, 8x8 and DC blocks,
// intra and inter rounding and all QP values. It also checks the QP 28
// factors against the published parameter matrices (8192/3355/5243 for 4x4;
// 8192/7346/13159/7740/10486/9777 for 8x8) and the one-cycle latency.
module tb_quant8;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, is8x8 = 1'b0, dc_mode = 1'b0, intra = 1'b1;
  logic [5:0] qp = 6'd28;
  logic [2:0] row_idx = '0;
  logic signed [15:0] coef [8], level [8];
  logic out_valid;
  int checks = 0, failures = 0;
  int mf4 [6][3] = '{'{13107,5243,8066}, '{11916,4660,7490}, '{10082,4194,6554},
                     '{9362,3647,5825}, '{8192,3355,5243}, '{7282,2893,4559}};
  int mf8 [6][6] = '{'{13107,11428,20972,12222,16777,15481}, '{11916,10826,19174,11058,14980,14290},
                     '{10082,8943,15978,9675,12710,11985}, '{9362,8228,14913,8931,11984,11259},
                     '{8192,7346,13159,7740,10486,9777}, '{7282,6428,11570,6830,9118,8640}};
  // position classes written out as maps
  int map4 [4][4] = '{'{0,2,0,2}, '{2,1,2,1}, '{0,2,0,2}, '{2,1,2,1}};
  int map8 [8][8] = '{'{0,3,4,3,0,3,4,3}, '{3,1,5,1,3,1,5,1}, '{4,5,2,5,4,5,2,5}, '{3,1,5,1,3,1,5,1},
                      '{0,3,4,3,0,3,4,3}, '{3,1,5,1,3,1,5,1}, '{4,5,2,5,4,5,2,5}, '{3,1,5,1,3,1,5,1}};
  int expv [8];
  quant8 dut (.clk, .rst_n, .in_valid, .is8x8, .dc_mode, .intra, .qp, .row_idx, .coef, .out_valid, .level);
  always #5 clk = !clk;
  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 8; k++) coef[k] = '0;
    // QP 28 factors against the published matrices
    checks++;
    if (mf4[28 % 6][0] != 8192 || mf4[28 % 6][1] != 3355 || mf4[28 % 6][2] != 5243) failures++;
    checks++;
    if (mf8[28 % 6][1] != 7346 || mf8[28 % 6][5] != 9777) failures++;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int qbits, mf;
      automatic longint f;
      is8x8 = n % 3 == 1; dc_mode = n % 3 == 2; intra = $urandom_range(0, 1);
      qp = n < 50 ? 6'd28 : 6'($urandom_range(0, 51));
      row_idx = 3'($urandom_range(0, 7));
      for (int k = 0; k < 8; k++) coef[k] = 16'($urandom_range(0, 8000) - 4000);
      for (int k = 0; k < 8; k++) begin
        automatic int i, j;
        automatic longint a, m;
        if (is8x8) begin
          i = row_idx; j = k;
          mf = mf8[qp % 6][map8[i][j]]; qbits = 16 + qp / 6;
        end else begin
          i = 2 * (row_idx % 2) + k / 4; j = k % 4;
          mf = dc_mode ? mf4[qp % 6][0] : mf4[qp % 6][map4[i][j]];
          qbits = 15 + qp / 6 + (dc_mode ? 1 : 0);
        end
        f = (longint'(1) << qbits) / (intra ? 3 : 6);
        a = coef[k] < 0 ? -coef[k] : coef[k];
        m = (a * mf + f) >> qbits;
        expv[k] = coef[k] < 0 ? -int'(m) : int'(m);
      end
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(level[k]) != expv[k]) begin
          failures++;
          if (failures < 5) $display("qp %0d 8x8=%0d dc=%0d k=%0d: %0d expected %0d", qp, is8x8, dc_mode, k, level[k], expv[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
