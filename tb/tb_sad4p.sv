// Self-checking test of the four-pixel SAD unit: random and extreme pixel
// quadruples compared with a sum of absolute differences computed in the
// testbench with integer arithmetic.
module tb_sad4p;
  import h264_pkg::*;
  pixel_t cur [4], rf [4];
  logic [9:0] sad;
  int checks = 0, failures = 0;
  sad4p dut (.cur(cur), .ref_px(rf), .sad(sad));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int e = 0;
      for (int i = 0; i < 4; i++) begin
        cur[i] = (n < 2) ? pixel_t'(n * 255) : pixel_t'($urandom);
        rf[i]  = (n < 2) ? pixel_t'((1 - n) * 255) : pixel_t'($urandom);
        e += (int'(cur[i]) > int'(rf[i])) ? int'(cur[i]) - int'(rf[i]) : int'(rf[i]) - int'(cur[i]);
      end
      #1;
      checks++;
      if (int'(sad) != e) begin
        failures++;
        if (failures < 5) $display("mismatch: sad=%0d expected %0d", sad, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
