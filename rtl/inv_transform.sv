// Shared inverse transform unit of the reconstruction loop:
//   TR_DCT4: H.264 inverse 4x4 integer transform, (x+32)>>6 at the end;
//   TR_DCT8: H.264 inverse 8x8 integer transform, (x+32)>>6 at the end;
//   TR_HAD4: inverse 4x4 Hadamard of luma DC values (no scaling, the DC
//            scaling is in the dequantizer);
//   TR_HAD2: inverse 2x2 Hadamard of chroma DC values.
// Four-point and eight-point 1-D butterflies are evaluated per block; the
// inverse Hadamard shares the four-point butterfly with the >>1 taps of the
// integer transform removed. Rows first,
// then columns, as the standard specifies. Registered, one cycle latency;
// whole block per call (this design's choice of port).
module inv_transform
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  tr_mode_e           mode,
  input  logic signed [15:0] coef [8][8],
  output logic               out_valid,
  output logic signed [15:0] res  [8][8]
);
  // four-point inverse butterfly; had=1 removes the half-weight taps
  function automatic void ibf4(input int d0, input int d1, input int d2, input int d3,
                               input logic had, output int f0, output int f1,
                               output int f2, output int f3);
    int e0, e1, e2, e3;
    e0 = d0 + d2; e1 = d0 - d2;
    e2 = had ? d1 - d3 : (d1 >>> 1) - d3;
    e3 = had ? d1 + d3 : d1 + (d3 >>> 1);
    f0 = e0 + e3; f1 = e1 + e2; f2 = e1 - e2; f3 = e0 - e3;
  endfunction
  function automatic void ibf8(input int d [8], output int f [8]);
    int a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = d[0] + d[4];            a4 = d[0] - d[4];
    a2 = (d[2] >>> 1) - d[6];    a6 = d[2] + (d[6] >>> 1);
    b0 = a0 + a6; b2 = a4 + a2; b4 = a4 - a2; b6 = a0 - a6;
    a1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    a3 =  d[1] + d[7] - d[3] - (d[3] >>> 1);
    a5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    a7 =  d[3] + d[5] + d[1] + (d[1] >>> 1);
    b1 = a1 + (a7 >>> 2); b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2); b5 = (a3 >>> 2) - a5;
    f[0] = b0 + b7; f[1] = b2 + b5; f[2] = b4 + b3; f[3] = b6 + b1;
    f[4] = b6 - b1; f[5] = b4 - b3; f[6] = b2 - b5; f[7] = b0 - b7;
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
          for (int j = 0; j < 8; j++) x[j] = int'(coef[i][j]);
          ibf8(x, y);
          for (int j = 0; j < 8; j++) r1[i][j] = y[j];
        end
        for (int j = 0; j < 8; j++) begin
          automatic int x [8], y [8];
          for (int i = 0; i < 8; i++) x[i] = r1[i][j];
          ibf8(x, y);
          for (int i = 0; i < 8; i++) r2[i][j] = (y[i] + 32) >>> 6;
        end
      end
      TR_HAD2: begin
        automatic int a = int'(coef[0][0]), b = int'(coef[0][1]);
        automatic int c = int'(coef[1][0]), d = int'(coef[1][1]);
        r2[0][0] = a + b + c + d; r2[0][1] = a - b + c - d;
        r2[1][0] = a + b - c - d; r2[1][1] = a - b - c + d;
      end
      default: begin
        automatic logic had = (mode == TR_HAD4);
        for (int i = 0; i < 4; i++)
          ibf4(int'(coef[i][0]), int'(coef[i][1]), int'(coef[i][2]), int'(coef[i][3]), had,
               r1[i][0], r1[i][1], r1[i][2], r1[i][3]);
        for (int j = 0; j < 4; j++)
          ibf4(r1[0][j], r1[1][j], r1[2][j], r1[3][j], had,
               r2[0][j], r2[1][j], r2[2][j], r2[3][j]);
        if (!had)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) r2[i][j] = (r2[i][j] + 32) >>> 6;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) res[i][j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) res[i][j] <= 16'(r2[i][j]);
    end
  end
endmodule
