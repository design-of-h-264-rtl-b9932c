// Self-checking test of the eight-coefficient dequantizer against the H.264
// scaling rules with flat scaling matrices, evaluated in the testbench from
// its own copy of the normalisation tables and position maps: 4x4, 8x8,
// intra 16x16 luma DC and chroma DC, all QP values, one-cycle latency.
module tb_dequant8;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, is8x8 = 1'b0, dc_mode = 1'b0, chroma = 1'b0;
  logic [5:0] qp = 6'd28;
  logic [2:0] row_idx = '0;
  logic signed [15:0] level [8], coef [8];
  logic out_valid;
  int checks = 0, failures = 0;
  int v4 [6][3] = '{'{10,16,13}, '{11,18,14}, '{13,20,16}, '{14,23,18}, '{16,25,20}, '{18,29,23}};
  int v8 [6][6] = '{'{20,18,32,19,25,24}, '{22,19,35,21,28,26}, '{26,23,42,24,33,31},
                    '{28,25,45,26,35,33}, '{32,28,51,30,40,38}, '{36,32,58,34,46,43}};
  int map4 [4][4] = '{'{0,2,0,2}, '{2,1,2,1}, '{0,2,0,2}, '{2,1,2,1}};
  int map8 [8][8] = '{'{0,3,4,3,0,3,4,3}, '{3,1,5,1,3,1,5,1}, '{4,5,2,5,4,5,2,5}, '{3,1,5,1,3,1,5,1},
                      '{0,3,4,3,0,3,4,3}, '{3,1,5,1,3,1,5,1}, '{4,5,2,5,4,5,2,5}, '{3,1,5,1,3,1,5,1}};
  int expv [8];
  dequant8 dut (.clk, .rst_n, .in_valid, .is8x8, .dc_mode, .chroma, .qp, .row_idx, .level, .out_valid, .coef);
  always #5 clk = !clk;
  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 8; k++) level[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int q6, qd;
      is8x8 = n % 4 == 1; dc_mode = n % 4 >= 2; chroma = n % 4 == 3;
      qp = 6'($urandom_range(0, 51)); q6 = qp % 6; qd = qp / 6;
      row_idx = 3'($urandom_range(0, 7));
      for (int k = 0; k < 8; k++) level[k] = 16'($urandom_range(0, 40) - 20);
      for (int k = 0; k < 8; k++) begin
        automatic longint c = level[k], ls, v;
        if (is8x8) begin
          ls = 16 * v8[q6][map8[row_idx][k]];
          v = qd >= 6 ? (c * ls) * (longint'(1) << (qd - 6))
                      : (c * ls + (longint'(1) << (5 - qd))) >>> (6 - qd);
        end else if (dc_mode && chroma) begin
          v = ((c * 16 * v4[q6][0]) * (longint'(1) << qd)) >>> 5;
        end else if (dc_mode) begin
          ls = 16 * v4[q6][0];
          v = qd >= 6 ? (c * ls) * (longint'(1) << (qd - 6))
                      : (c * ls + (longint'(1) << (5 - qd))) >>> (6 - qd);
        end else
          v = c * v4[q6][map4[2 * (row_idx % 2) + k / 4][k % 4]] * (longint'(1) << qd);
        if (v > 32767) v = 32767;
        if (v < -32768) v = -32768;
        expv[k] = int'(v);
      end
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(coef[k]) != expv[k]) begin
          failures++;
          if (failures < 5) $display("qp %0d mode %0d k=%0d: %0d expected %0d", qp, n % 4, k, coef[k], expv[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
