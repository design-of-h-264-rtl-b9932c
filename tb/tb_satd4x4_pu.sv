// Self-checking test of the FME processing unit: SATD = (sum |H*D*H| + 1)/2
// with the 4x4 Hadamard matrix H (rows ++++, ++--, +--+, +-+- in the order
// of the butterfly output: natural order 0, 1=s3+s2 ...) recomputed in the
// testbench by explicit matrix products. Because the absolute sum is
// independent of the row order of H, the natural Hadamard matrix is used.
module tb_satd4x4_pu;
  import h264_pkg::*;
  pixel_t cur [4][4], pred [4][4];
  logic [11:0] satd;
  int checks = 0, failures = 0;
  int h [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  satd4x4_pu dut (.cur(cur), .pred(pred), .satd(satd));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int d [4][4], t [4][4], s = 0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          cur[r][c]  = n == 0 ? 8'd255 : (n == 1 ? pixel_t'(((r + c) % 2) * 255) : pixel_t'($urandom));
          pred[r][c] = n < 2 ? 8'd0 : pixel_t'($urandom);
          d[r][c] = int'(cur[r][c]) - int'(pred[r][c]);
        end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          t[r][c] = 0;
          for (int k = 0; k < 4; k++) t[r][c] += h[r][k] * d[k][c];
        end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          automatic int v = 0;
          for (int k = 0; k < 4; k++) v += t[r][k] * h[c][k];
          s += v < 0 ? -v : v;
        end
      #1;
      checks++;
      if (int'(satd) != (s + 1) / 2) begin
        failures++;
        if (failures < 5) $display("satd=%0d expected %0d", satd, (s + 1) / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
