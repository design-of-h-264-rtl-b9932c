// Self-checking test of the enhanced SATD: the testbench forms Y = Cf*X*Cf'
// by explicit matrix products with Cf = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1;
// 1 -2 2 -1], weights |Y| with 32 / 25 / 20 by coefficient position parity
// and divides the sum by 32 (floor).
module tb_enh_satd;
  logic signed [8:0] res [4][4];
  logic [15:0] cost;
  int checks = 0, failures = 0;
  int cf [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
  enh_satd dut (.res(res), .cost(cost));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int t [4][4], s = 0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          res[r][c] = n == 0 ? 9'sd255 : (n == 1 ? -9'sd255 : 9'($urandom_range(0, 510) - 255));
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          t[r][c] = 0;
          for (int k = 0; k < 4; k++) t[r][c] += cf[r][k] * int'(res[k][c]);
        end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          automatic int v = 0, w;
          for (int k = 0; k < 4; k++) v += t[r][k] * cf[c][k];
          w = (r % 2 == 0 && c % 2 == 0) ? 32 : ((r % 2 == 1 && c % 2 == 1) ? 20 : 25);
          s += (v < 0 ? -v : v) * w;
        end
      #1;
      checks++;
      if (int'(cost) != s / 32) begin
        failures++;
        if (failures < 5) $display("cost=%0d expected %0d", cost, s / 32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
