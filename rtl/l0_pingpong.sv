// Level-0 reference buffer set shared by IME and FME (non-subsampling
// reference memory sharing). Three 37x37-pixel banks rotate roles at every
// macroblock boundary (`advance`): the bank being loaded from external memory
// becomes the IME window, the IME window becomes the FME window, and the FME
// window is freed for loading the next macroblock's data. IME and FME thus
// share the level-0 data without copying it. Loads use the 128-bit bus, 16
// pixels of one row per write. Read ports are the whole IME and FME banks.
// Reset puts bank 0 in the load role, 1 in IME and 2 in FME.
module l0_pingpong
  import h264_pkg::*;
#(
  parameter int WIN = 37
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       advance,
  input  logic       wr_en,
  input  logic [5:0] wr_row,
  input  logic [5:0] wr_col,
  input  pixel_t     wr_data [16],
  output pixel_t     ime_win [WIN][WIN],
  output pixel_t     fme_win [WIN][WIN],
  output logic [1:0] load_bank,
  output logic [1:0] ime_bank,
  output logic [1:0] fme_bank
);
  pixel_t bank [3][WIN][WIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_bank <= 2'd0; ime_bank <= 2'd1; fme_bank <= 2'd2;
    end else if (advance) begin
      ime_bank  <= load_bank;
      fme_bank  <= ime_bank;
      load_bank <= fme_bank;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < WIN)
      for (int k = 0; k < 16; k++)
        if (int'(wr_col) + k < WIN) bank[load_bank][wr_row][int'(wr_col)+k] <= wr_data[k];
  end

  assign ime_win = bank[ime_bank];
  assign fme_win = bank[fme_bank];

  // the three roles always name three different banks
  a_roles_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    load_bank != ime_bank && ime_bank != fme_bank && load_bank != fme_bank);
endmodule
