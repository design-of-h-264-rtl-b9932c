// Self-checking test of the level-0 reference buffer rotation: a new random
// window is written through the 16-pixel bus into the load bank before every
// macroblock boundary; after one `advance` it must appear as the IME window
// and after the next as the FME window, unchanged by the loads in between.
// The role indices must rotate through all three banks.
module tb_l0_pingpong;
  import h264_pkg::*;
  localparam int WIN = 37;
  logic clk = 1'b0, rst_n = 1'b0, advance = 1'b0, wr_en = 1'b0;
  logic [5:0] wr_row = '0, wr_col = '0;
  pixel_t wr_data [16];
  pixel_t ime_win [WIN][WIN], fme_win [WIN][WIN];
  logic [1:0] load_bank, ime_bank, fme_bank;
  pixel_t img [6][WIN][WIN];
  int checks = 0, failures = 0, rotations = 0;
  logic [2:0] seen_ime = '0;
  l0_pingpong dut (.clk, .rst_n, .advance, .wr_en, .wr_row, .wr_col, .wr_data, .ime_win, .fme_win,
                   .load_bank, .ime_bank, .fme_bank);
  always #5 clk = !clk;
  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < 16; k++) wr_data[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 6; m++) begin
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) img[m][r][c] = pixel_t'($urandom);
      for (int r = 0; r < WIN; r++)
        for (int c0 = 0; c0 < WIN; c0 += 16) begin
          @(negedge clk);
          wr_en = 1'b1; wr_row = 6'(r); wr_col = 6'(c0);
          for (int k = 0; k < 16; k++) wr_data[k] = (c0 + k < WIN) ? img[m][r][c0 + k] : 8'hAA;
        end
      @(negedge clk); wr_en = 1'b0; advance = 1'b1;
      @(negedge clk); advance = 1'b0; rotations++;
      seen_ime[ime_bank] = 1'b1;
      checks++;
      if (load_bank == ime_bank || ime_bank == fme_bank || load_bank == fme_bank) failures++;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          checks++;
          if (ime_win[r][c] != img[m][r][c]) failures++;
          if (m > 0) begin
            checks++;
            if (fme_win[r][c] != img[m-1][r][c]) failures++;
          end
        end
    end
    checks++;
    if (seen_ime != 3'b111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
