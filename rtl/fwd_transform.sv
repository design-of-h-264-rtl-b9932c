// Forward transform unit shared by all block transforms of the encoder:
//   TR_DCT4: 4x4 integer transform Cf*X*Cf' of blk[0..3][0..3];
//   TR_DCT8: 8x8 integer transform of the high profile, computed with the
//            integer matrix (entries 8,12,10,6,4,3 over 8) and divided by 64
//            with rounding, so it matches the usual shift-based butterfly;
//   TR_HAD4: 4x4 Hadamard of the intra 16x16 DC coefficients, halved
//            (rounding toward zero), as the reference encoder does;
//   TR_HAD2: 2x2 Hadamard of the chroma DC coefficients.
// The 2-D transform is two passes of 1-D butterflies (rows, then columns);
// the 4x4 integer transform and the Hadamard share the same butterfly with
// different coefficients. Inputs are signed 16-bit, outputs signed 16-bit.
// Registered: `out_valid` and `coef` follow `in_valid` by one cycle. The
// original design streams eight samples per cycle through transpose registers;
// this unit takes a whole block per call (this design's choice of port).
module fwd_transform
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  tr_mode_e           mode,
  input  logic signed [15:0] blk  [8][8],
  output logic               out_valid,
  output logic signed [15:0] coef [8][8]
);
  // 1-D four-point butterfly: integer transform (had=0) or Hadamard (had=1)
  function automatic void bfly4(input int x0, input int x1, input int x2, input int x3,
                                input logic had, output int y0, output int y1,
                                output int y2, output int y3);
    int s0, s1, d0, d1;
    s0 = x0 + x3; s1 = x1 + x2; d0 = x0 - x3; d1 = x1 - x2;
    y0 = s0 + s1; y2 = s0 - s1;
    y1 = had ? d0 + d1 : 2*d0 + d1;
    y3 = had ? d0 - d1 : d0 - 2*d1;
  endfunction
  // 1-D eight-point integer transform scaled by 8 (exact integers)
  function automatic void bfly8(input int x [8], output int y [8]);
    int a [8];
    for (int i = 0; i < 4; i++) begin
      a[i]   = x[i] + x[7-i];
      a[4+i] = x[i] - x[7-i];
    end
    y[0] = 8*(a[0] + a[1] + a[2] + a[3]);
    y[4] = 8*(a[0] - a[1] - a[2] + a[3]);
    y[2] = 8*(a[0] - a[3]) + 4*(a[1] - a[2]);
    y[6] = 4*(a[0] - a[3]) - 8*(a[1] - a[2]);
    y[1] = 12*a[4] + 10*a[5] + 6*a[6] + 3*a[7];
    y[3] = 10*a[4] - 3*a[5] - 12*a[6] - 6*a[7];
    y[5] = 6*a[4] - 12*a[5] + 3*a[6] + 10*a[7];
    y[7] = 3*a[4] - 6*a[5] + 10*a[6] - 12*a[7];
  endfunction

  int r1 [8][8];
  int r2 [8][8];
  always_comb begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin r1[i][j] = 0; r2[i][j] = 0; end
    case (mode)
      TR_DCT8: begin
        for (int i = 0; i < 8; i++) begin
          automatic int x [8], y [8];
          for (int j = 0; j < 8; j++) x[j] = int'(blk[i][j]);
          bfly8(x, y);
          for (int j = 0; j < 8; j++) r1[i][j] = y[j];
        end
        for (int j = 0; j < 8; j++) begin
          automatic int x [8], y [8];
          for (int i = 0; i < 8; i++) x[i] = r1[i][j];
          bfly8(x, y);
          for (int i = 0; i < 8; i++) r2[i][j] = (y[i] + 32) >>> 6;
        end
      end
      TR_HAD2: begin
        automatic int a = int'(blk[0][0]), b = int'(blk[0][1]);
        automatic int c = int'(blk[1][0]), d = int'(blk[1][1]);
        r2[0][0] = a + b + c + d; r2[0][1] = a - b + c - d;
        r2[1][0] = a + b - c - d; r2[1][1] = a - b - c + d;
      end
      default: begin
        automatic logic had = (mode == TR_HAD4);
        for (int i = 0; i < 4; i++)
          bfly4(int'(blk[i][0]), int'(blk[i][1]), int'(blk[i][2]), int'(blk[i][3]), had,
                r1[i][0], r1[i][1], r1[i][2], r1[i][3]);
        for (int j = 0; j < 4; j++)
          bfly4(r1[0][j], r1[1][j], r1[2][j], r1[3][j], had,
                r2[0][j], r2[1][j], r2[2][j], r2[3][j]);
        if (had)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) r2[i][j] = r2[i][j] / 2;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) coef[i][j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) coef[i][j] <= 16'(r2[i][j]);
    end
  end
endmodule
