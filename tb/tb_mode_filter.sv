// Self-checking test of mode filtering. Random, independent partition SADs
// (small ranges so that ties and every mode occur) are fed in; the
// testbench recomputes the best of 16x16 / 16x8 / 8x16 (candidate A) and the
// best of those and the 8x8 split with the cheapest sub-mode per 8x8
// (candidate B), ties keeping the larger block, and checks the one-cycle
// latency. It counts how often each mode and the split win.
module tb_mode_filter;
  import h264_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  sad_t sad [NPART];
  blk_mode_e mode_a, mode_b, sub_mode [4];
  logic [19:0] cost_a, cost_b;
  int checks = 0, failures = 0;
  int wins [8];
  mode_filter dut (.clk, .rst_n, .in_valid, .sad, .out_valid, .mode_a, .cost_a, .mode_b,
                   .sub_mode, .cost_b);
  always #5 clk = !clk;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < NPART; i++) sad[i] = '0;
    for (int i = 0; i < 8; i++) wins[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int c [8], ea, ca, eb, cb, es [4], split = 0;
      for (int i = 0; i < NPART; i++) begin
        automatic int scale = i == 0 ? 16 : (i < 5 ? 8 : (i < 9 ? 4 : (i < 25 ? 2 : 1)));
        sad[i] = sad_t'(scale * $urandom_range(8, 12) + $urandom_range(0, 3));
      end
      c[1] = sad[0]; c[2] = sad[1] + sad[2]; c[3] = sad[3] + sad[4];
      for (int q = 0; q < 4; q++) begin
        automatic int s [4];
        s[0] = sad[5+q]; s[1] = sad[9+2*q] + sad[10+2*q]; s[2] = sad[17+2*q] + sad[18+2*q];
        s[3] = sad[25+4*q] + sad[26+4*q] + sad[27+4*q] + sad[28+4*q];
        es[q] = 0;
        for (int k = 1; k < 4; k++) if (s[k] < s[es[q]]) es[q] = k;
        split += s[es[q]];
      end
      ea = 1;
      for (int m = 2; m <= 3; m++) if (c[m] < c[ea]) ea = m;
      ca = c[ea]; eb = ea; cb = ca;
      if (split < cb) begin eb = 4; cb = split; end
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      checks += 5;
      if (!out_valid) failures++;
      if (int'(mode_a) != ea || int'(cost_a) != ca) failures++;
      if (int'(mode_b) != eb || int'(cost_b) != cb) failures++;
      wins[ea]++;
      if (eb == 4) begin
        wins[4]++;
        for (int q = 0; q < 4; q++) begin
          checks++;
          if (int'(sub_mode[q]) != 4 + es[q]) failures++;
          wins[4 + es[q]]++;
        end
      end
      @(negedge clk);
      if (out_valid) failures++;
    end
    for (int m = 1; m <= 7; m++) begin
      checks++;
      if (wins[m] == 0) begin failures++; $display("mode %0d never chosen", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
