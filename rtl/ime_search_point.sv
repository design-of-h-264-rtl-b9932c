// IME search point module: evaluates one candidate position per cycle.
// The block is W x W (sub)sampled pixels; it is cut into 4x4 sub-blocks,
// each summed by four 4p-SAD units, and the sub-block SADs are output in
// raster order for the summation tree. W=16 is the level-0 module
// (64 4p-SAD units), W=8 the level-1 module (16 units) and W=4 the level-2
// module (4 units). Combinational; the caller registers the result.
module ime_search_point
  import h264_pkg::*;
#(
  parameter int W = 16
) (
  input  pixel_t     cur    [W][W],
  input  pixel_t     ref_px [W][W],
  output logic [13:0] sub_sad [(W/4)*(W/4)]
);
  localparam int NB = W / 4;
  logic [9:0] row_sad [NB*NB][4];
  for (genvar b = 0; b < NB*NB; b++) begin : g_blk
    for (genvar r = 0; r < 4; r++) begin : g_row
      pixel_t c4 [4], r4 [4];
      for (genvar k = 0; k < 4; k++) begin : g_px
        assign c4[k] = cur[(b/NB)*4+r][(b%NB)*4+k];
        assign r4[k] = ref_px[(b/NB)*4+r][(b%NB)*4+k];
      end
      sad4p u_sad (.cur(c4), .ref_px(r4), .sad(row_sad[b][r]));
    end
    assign sub_sad[b] = 14'(row_sad[b][0]) + 14'(row_sad[b][1]) +
                        14'(row_sad[b][2]) + 14'(row_sad[b][3]);
  end
endmodule
