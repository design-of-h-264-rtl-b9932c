// Eight-coefficient dequantizer, organised like the quantizer: two
// four-coefficient circuits sharing one QP-dependent table, with the same
// row/half split of 4x4 and 8x8 blocks. Rules (flat scaling matrices):
//   4x4:        c * V4 << (QP/6)
//   8x8:        (c * 16*V8) << (QP/6-6) if QP >= 36,
//               else (c * 16*V8 + 2^(5-QP/6)) >> (6-QP/6)
//   luma DC:    as 8x8 but with 16*V4(0,0)
//   chroma DC:  ((c * 16*V4(0,0)) << (QP/6)) >> 5
// dc_mode selects the luma DC rule, dc_mode together with chroma the chroma
// DC rule. Registered, one cycle latency.
module dequant8
  import quant_tables_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               is8x8,
  input  logic               dc_mode,
  input  logic               chroma,
  input  logic [5:0]         qp,
  input  logic [2:0]         row_idx,
  input  logic signed [15:0] level [8],
  output logic               out_valid,
  output logic signed [15:0] coef  [8]
);
  int qm, qe;
  always_comb begin
    qm = int'(qp) % 6;
    qe = int'(qp) / 6;
  end

  logic signed [15:0] cv [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      automatic int i, j;
      automatic longint c = longint'(level[k]);
      automatic longint ls, v;
      if (is8x8) begin
        i = int'(row_idx); j = k;
        ls = 16 * dq8(qm, cls8(i, j));
        v = qe >= 6 ? (c * ls) <<< (qe - 6) : (c * ls + (longint'(1) << (5 - qe))) >>> (6 - qe);
      end else begin
        i = 2*int'(row_idx[0]) + k/4; j = k % 4;
        if (dc_mode && chroma) begin
          ls = 16 * dq4(qm, 0);
          v = ((c * ls) <<< qe) >>> 5;
        end else if (dc_mode) begin
          ls = 16 * dq4(qm, 0);
          v = qe >= 6 ? (c * ls) <<< (qe - 6) : (c * ls + (longint'(1) << (5 - qe))) >>> (6 - qe);
        end else begin
          v = (c * dq4(qm, cls4(i, j))) <<< qe;
        end
      end
      v = v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
      cv[k] = 16'(v);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) coef[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) coef <= cv;
    end
  end
endmodule
