// Self-checking test of the shared reconstruction adder: random intra and
// inter slots with residuals that overflow both ends; checks clipping to
// 0..255, the prediction source selection, the to_intra / to_deblock flags
// and the one-cycle latency.
module tb_recon8;
  import h264_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, sel_inter = 1'b0, to_intra, to_deblock;
  pixel_t pi [8], pe [8], rec [8];
  logic signed [15:0] res [8];
  int checks = 0, failures = 0, n_intra = 0, n_inter = 0;
  recon8 dut (.clk, .rst_n, .in_valid, .sel_inter, .pred_intra(pi), .pred_inter(pe), .res,
              .to_intra, .to_deblock, .rec);
  always #5 clk = !clk;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 8; k++) begin pi[k] = '0; pe[k] = '0; res[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic int e [8];
      automatic logic v = n % 5 != 4;
      @(negedge clk);
      in_valid = v; sel_inter = $urandom_range(0, 1);
      for (int k = 0; k < 8; k++) begin
        pi[k] = pixel_t'($urandom); pe[k] = pixel_t'($urandom);
        res[k] = 16'($urandom_range(0, 700) - 350);
        e[k] = int'(sel_inter ? pe[k] : pi[k]) + int'(res[k]);
        e[k] = e[k] < 0 ? 0 : (e[k] > 255 ? 255 : e[k]);
      end
      @(negedge clk);
      checks += 2;
      if (to_deblock != v) failures++;
      if (to_intra != (v && !sel_inter)) failures++;
      if (v) begin
        if (sel_inter) n_inter++; else n_intra++;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(rec[k]) != e[k]) failures++;
        end
      end
      in_valid = 1'b0;
    end
    checks++;
    if (n_intra == 0 || n_inter == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
