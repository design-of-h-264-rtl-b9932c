// Shared types and constants of the H.264 high-profile encoder.
// Pixels are 8-bit unsigned; motion vectors are signed quarter-pel values
// (integer vectors are kept as quarter-pel with the two fraction bits zero).
// The 41 variable-block-size partitions of a 16x16 macroblock are indexed in
// the fixed order: 16x16 (0), 16x8 (1-2), 8x16 (3-4), 8x8 (5-8),
// 8x4 (9-16), 4x8 (17-24), 4x4 (25-40).
package h264_pkg;
  typedef logic [7:0] pixel_t;
  typedef logic signed [10:0] mvc_t;       // one quarter-pel MV component
  typedef struct packed { mvc_t x; mvc_t y; } mv_t;
  localparam int SAD_W = 16;               // 16x16 SAD fits in 16 bits
  typedef logic [SAD_W-1:0] sad_t;
  localparam int NPART = 41;

  // block mode numbering of the seven VBS modes (1: 16x16 ... 7: 4x4)
  typedef enum logic [2:0] {
    M16x16 = 3'd1, M16x8 = 3'd2, M8x16 = 3'd3, M8x8 = 3'd4,
    M8x4 = 3'd5, M4x8 = 3'd6, M4x4 = 3'd7
  } blk_mode_e;

  // transform selections shared by forward and inverse transform units
  typedef enum logic [1:0] {
    TR_DCT4 = 2'd0, TR_DCT8 = 2'd1, TR_HAD4 = 2'd2, TR_HAD2 = 2'd3
  } tr_mode_e;

  // first partition index and count of each mode (mode 1..7)
  function automatic int part_base(input int mode);
    case (mode)
      1: return 0;  2: return 1;  3: return 3;  4: return 5;
      5: return 9;  6: return 17; default: return 25;
    endcase
  endfunction
  function automatic int part_count(input int mode);
    case (mode)
      1: return 1; 2: return 2; 3: return 2; 4: return 4;
      default: return mode == 7 ? 16 : 8;
    endcase
  endfunction
endpackage
