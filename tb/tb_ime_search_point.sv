// Self-checking test of the level-0 search point module (16x16 block): the
// sixteen 4x4 sub-block SADs are compared with SADs summed pixel by pixel in
// the testbench, for random blocks and for the all-0 / all-255 extreme.
module tb_ime_search_point;
  import h264_pkg::*;
  pixel_t cur [16][16], rf [16][16];
  logic [13:0] sub [16];
  int checks = 0, failures = 0;
  ime_search_point #(.W(16)) dut (.cur(cur), .ref_px(rf), .sub_sad(sub));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          cur[r][c] = n == 0 ? 8'd255 : pixel_t'($urandom);
          rf[r][c]  = n == 0 ? 8'd0   : pixel_t'($urandom);
        end
      #1;
      for (int b = 0; b < 16; b++) begin
        automatic int e = 0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            automatic int d = int'(cur[(b/4)*4+r][(b%4)*4+c]) - int'(rf[(b/4)*4+r][(b%4)*4+c]);
            e += d < 0 ? -d : d;
          end
        checks++;
        if (int'(sub[b]) != e) begin
          failures++;
          if (failures < 5) $display("block %0d: %0d expected %0d", b, sub[b], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
