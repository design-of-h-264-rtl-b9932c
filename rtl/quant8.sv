// Eight-coefficient quantizer: two four-coefficient quantization circuits
// that share one QP-dependent parameter table. For a 4x4 block the eight
// inputs are two rows (row 2*row_idx and 2*row_idx+1): one circuit takes the
// even row and the other the odd row. For an 8x8 block the inputs are row
// `row_idx` and one circuit takes the left four, the other the right four
// coefficients. Each coefficient is multiplied by quant_coef, the rounding
// constant qp_const is added and the sum is shifted by qp_shift:
//   level = sign(c) * ((|c| * Q + f) >> qbits),
//   qbits = 15 + QP/6 (4x4) or 16 + QP/6 (8x8), f = 2^qbits/3 (intra) or
//   2^qbits/6 (inter).
// In DC mode (intra 16x16 luma DC after the Hadamard, chroma DC) the (0,0)
// factor is used for every input, qbits grows by one and f doubles.
// Registered, one cycle latency.
module quant8
  import quant_tables_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               is8x8,
  input  logic               dc_mode,
  input  logic               intra,
  input  logic [5:0]         qp,
  input  logic [2:0]         row_idx,
  input  logic signed [15:0] coef  [8],
  output logic               out_valid,
  output logic signed [15:0] level [8]
);
  int qm, qe;
  always_comb begin
    qm = int'(qp) % 6;
    qe = int'(qp) / 6;
  end

  logic signed [15:0] lv [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      automatic int i, j, q, qbits;
      automatic longint f, a, m;
      if (is8x8) begin
        i = int'(row_idx); j = k;
        q = q8(qm, cls8(i, j)); qbits = 16 + qe;
      end else begin
        i = 2*int'(row_idx[0]) + k/4; j = k % 4;
        q = dc_mode ? q4(qm, 0) : q4(qm, cls4(i, j));
        qbits = 15 + qe + (dc_mode ? 1 : 0);
      end
      f = intra ? (longint'(1) << qbits) / 3 : (longint'(1) << qbits) / 6;
      a = coef[k] < 0 ? -longint'(coef[k]) : longint'(coef[k]);
      m = (a * q + f) >>> qbits;
      lv[k] = 16'(coef[k] < 0 ? -m : m);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) level[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) level <= lv;
    end
  end
endmodule
