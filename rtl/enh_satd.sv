// Enhanced SATD intra cost. The 4x4 residual is transformed with the H.264
// forward integer transform Cf*X*Cf' (not the Hadamard transform), each
// coefficient magnitude is weighted with the simplified quantization scale
// factors 32 (even row, even column), 20 (odd, odd) or 25 (mixed), and the
// weighted sum is divided by 32 with a shift. This approximates the energy
// left after transform and quantization more closely than a Hadamard SATD.
// Residuals are signed 9-bit. Combinational.
module enh_satd (
  input  logic signed [8:0] res [4][4],
  output logic [15:0]       cost
);
  logic signed [12:0] t [4][4];
  logic signed [14:0] y [4][4];
  logic [21:0]        acc;
  always_comb begin
    // rows: t = X * Cf'
    for (int r = 0; r < 4; r++) begin
      automatic logic signed [12:0] s0 = 13'(res[r][0]) + 13'(res[r][3]);
      automatic logic signed [12:0] s1 = 13'(res[r][1]) + 13'(res[r][2]);
      automatic logic signed [12:0] d1 = 13'(res[r][1]) - 13'(res[r][2]);
      automatic logic signed [12:0] d0 = 13'(res[r][0]) - 13'(res[r][3]);
      t[r][0] = s0 + s1;      t[r][2] = s0 - s1;
      t[r][1] = 2*d0 + d1;    t[r][3] = d0 - 2*d1;
    end
    // columns: y = Cf * t
    for (int c = 0; c < 4; c++) begin
      automatic logic signed [14:0] s0 = 15'(t[0][c]) + 15'(t[3][c]);
      automatic logic signed [14:0] s1 = 15'(t[1][c]) + 15'(t[2][c]);
      automatic logic signed [14:0] d1 = 15'(t[1][c]) - 15'(t[2][c]);
      automatic logic signed [14:0] d0 = 15'(t[0][c]) - 15'(t[3][c]);
      y[0][c] = s0 + s1;      y[2][c] = s0 - s1;
      y[1][c] = 2*d0 + d1;    y[3][c] = d0 - 2*d1;
    end
    acc = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        automatic logic [14:0] a = 15'(y[r][c] < 0 ? -y[r][c] : y[r][c]);
        automatic logic [5:0]  w = (r % 2 == 0 && c % 2 == 0) ? 6'd32 :
                                   (r % 2 == 1 && c % 2 == 1) ? 6'd20 : 6'd25;
        acc += 22'(a) * 22'(w);
      end
    cost = 16'(acc >> 5);
  end
endmodule
