// Variable-block-size SAD summation tree (level 0). Takes the sixteen 4x4
// SADs of one search point (raster order over the macroblock) and forms the
// SADs of all 41 partitions of the seven H.264 block modes, ordered as in
// h264_pkg: 16x16, 16x8 x2, 8x16 x2, 8x8 x4, 8x4 x8, 4x8 x8, 4x4 x16.
// Sub-partitions of 8x8 blocks are listed 8x8 block by 8x8 block (Z order),
// each in raster order inside its 8x8. Combinational adder tree.
module vbs_sad_tree
  import h264_pkg::*;
(
  input  logic [13:0] s4 [16],
  output sad_t        sad [NPART]
);
  // 4x4 block at column c, row r (0..3) of the macroblock
  function automatic sad_t b4(input logic [13:0] s [16], input int c, input int r);
    return sad_t'(s[r*4+c]);
  endfunction
  sad_t s8 [4];
  always_comb begin
    for (int q = 0; q < 4; q++) begin
      automatic int c0 = (q % 2) * 2, r0 = (q / 2) * 2;
      s8[q] = b4(s4,c0,r0) + b4(s4,c0+1,r0) + b4(s4,c0,r0+1) + b4(s4,c0+1,r0+1);
      sad[5+q] = s8[q];
      // 8x4: top and bottom halves
      sad[9+2*q]   = b4(s4,c0,r0)   + b4(s4,c0+1,r0);
      sad[9+2*q+1] = b4(s4,c0,r0+1) + b4(s4,c0+1,r0+1);
      // 4x8: left and right halves
      sad[17+2*q]   = b4(s4,c0,r0)   + b4(s4,c0,r0+1);
      sad[17+2*q+1] = b4(s4,c0+1,r0) + b4(s4,c0+1,r0+1);
      // 4x4
      sad[25+4*q]   = b4(s4,c0,r0);
      sad[25+4*q+1] = b4(s4,c0+1,r0);
      sad[25+4*q+2] = b4(s4,c0,r0+1);
      sad[25+4*q+3] = b4(s4,c0+1,r0+1);
    end
    sad[1] = s8[0] + s8[1];   // 16x8 top
    sad[2] = s8[2] + s8[3];   // 16x8 bottom
    sad[3] = s8[0] + s8[2];   // 8x16 left
    sad[4] = s8[1] + s8[3];   // 8x16 right
    sad[0] = sad[1] + sad[2];
  end
endmodule
