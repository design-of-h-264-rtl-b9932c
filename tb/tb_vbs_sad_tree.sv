// Self-checking test of the variable-block-size SAD tree: for random 4x4
// SADs, every one of the 41 partition SADs is recomputed in the testbench by
// summing the 4x4 blocks that fall inside the partition rectangle (x, y,
// width, height in 4x4 units, listed in the partition order of h264_pkg).
module tb_vbs_sad_tree;
  import h264_pkg::*;
  logic [13:0] s4 [16];
  sad_t sad [NPART];
  int checks = 0, failures = 0;
  int px [NPART], py [NPART], pw [NPART], ph [NPART];
  vbs_sad_tree dut (.s4(s4), .sad(sad));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic int k = 0;
    px[0] = 0; py[0] = 0; pw[0] = 4; ph[0] = 4;
    for (int j = 0; j < 2; j++) begin
      px[1+j] = 0; py[1+j] = 2*j; pw[1+j] = 4; ph[1+j] = 2;
      px[3+j] = 2*j; py[3+j] = 0; pw[3+j] = 2; ph[3+j] = 4;
    end
    for (int q = 0; q < 4; q++) begin
      automatic int x0 = 2*(q%2), y0 = 2*(q/2);
      px[5+q] = x0; py[5+q] = y0; pw[5+q] = 2; ph[5+q] = 2;
      for (int s = 0; s < 2; s++) begin
        px[9+2*q+s] = x0; py[9+2*q+s] = y0+s; pw[9+2*q+s] = 2; ph[9+2*q+s] = 1;
        px[17+2*q+s] = x0+s; py[17+2*q+s] = y0; pw[17+2*q+s] = 1; ph[17+2*q+s] = 2;
      end
      for (int s = 0; s < 4; s++) begin
        px[25+4*q+s] = x0+s%2; py[25+4*q+s] = y0+s/2; pw[25+4*q+s] = 1; ph[25+4*q+s] = 1;
      end
    end
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 16; i++) s4[i] = n == 0 ? 14'd4080 : 14'($urandom_range(0, 4080));
      #1;
      for (int p = 0; p < NPART; p++) begin
        automatic int e = 0;
        for (int y = py[p]; y < py[p] + ph[p]; y++)
          for (int x = px[p]; x < px[p] + pw[p]; x++) e += int'(s4[y*4+x]);
        checks++;
        if (int'(sad[p]) != e) begin
          failures++;
          if (failures < 5) $display("partition %0d: %0d expected %0d", p, sad[p], e);
        end
      end
      k++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
