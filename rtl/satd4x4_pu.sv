// FME processing unit: residual of a 4x4 block against one prediction, 2-D
// 4x4 Hadamard transform (rows then columns, butterflies), and the sum of
// absolute transformed values halved with rounding, as the reference
// encoder defines SATD. All block sizes use this 4x4 cost. Combinational.
module satd4x4_pu
  import h264_pkg::*;
(
  input  pixel_t      cur  [4][4],
  input  pixel_t      pred [4][4],
  output logic [11:0] satd
);
  logic signed [9:0]  d [4][4];
  logic signed [11:0] t [4][4];
  logic signed [13:0] u [4][4];
  logic [15:0]        acc;
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = 10'(signed'({2'b0, cur[r][c]})) - 10'(signed'({2'b0, pred[r][c]}));
    for (int r = 0; r < 4; r++) begin
      automatic logic signed [11:0] s0 = 12'(d[r][0]) + 12'(d[r][3]);
      automatic logic signed [11:0] s1 = 12'(d[r][1]) + 12'(d[r][2]);
      automatic logic signed [11:0] s2 = 12'(d[r][1]) - 12'(d[r][2]);
      automatic logic signed [11:0] s3 = 12'(d[r][0]) - 12'(d[r][3]);
      t[r][0] = s0 + s1; t[r][1] = s3 + s2; t[r][2] = s0 - s1; t[r][3] = s3 - s2;
    end
    acc = '0;
    for (int c = 0; c < 4; c++) begin
      automatic logic signed [13:0] s0 = 14'(t[0][c]) + 14'(t[3][c]);
      automatic logic signed [13:0] s1 = 14'(t[1][c]) + 14'(t[2][c]);
      automatic logic signed [13:0] s2 = 14'(t[1][c]) - 14'(t[2][c]);
      automatic logic signed [13:0] s3 = 14'(t[0][c]) - 14'(t[3][c]);
      u[0][c] = s0 + s1; u[1][c] = s3 + s2; u[2][c] = s0 - s1; u[3][c] = s3 - s2;
      for (int r = 0; r < 4; r++)
        acc += 16'(u[r][c] < 0 ? -u[r][c] : u[r][c]);
    end
    satd = 12'((acc + 16'd1) >> 1);
  end
endmodule
