// Shared 4x4 residual and reconstruction chain. One 4x4 block per call:
// residual = cur - pred -> forward 4x4 integer transform -> quantization
// (two rows per cycle through the eight-coefficient quantizer) ->
// dequantization (two rows per cycle) -> inverse transform ->
// reconstruction (two rows per cycle through the shared adder).
// The same chain serves intra blocks (during mode decision, because their
// reconstruction is needed as neighbours of the next block) and inter
// blocks (after the final decision); `sel_inter` only selects the
// quantizer rounding constant and the adder's prediction source.
// Timing: `start` for one cycle with cur/pred/sel_inter/qp held stable until
// `done`, which pulses 9 cycles later together with the quantized levels,
// the reconstructed block and a nonzero-coefficient flag.
module recon_chain
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               sel_inter,
  input  logic [5:0]         qp,
  input  pixel_t             cur   [4][4],
  input  pixel_t             pred  [4][4],
  output logic               done,
  output logic signed [15:0] levels [4][4],
  output pixel_t             rec   [4][4],
  output logic               nonzero
);
  logic [3:0] t;          // cycle in the sequence, 0 = idle
  logic signed [15:0] res_blk [8][8], ft_coef [8][8], it_coef [8][8], it_res [8][8];
  logic ft_valid, it_valid;
  logic signed [15:0] q_in [8], q_out [8], dq_out [8], r_res [8];
  logic q_valid, dq_valid, q_iv, dq_iv, r_iv, r_out_valid;
  logic [2:0] q_row, dq_row;
  pixel_t r_pred [8], r_rec [8];
  logic signed [15:0] dq_blk [4][4];

  always_comb
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        res_blk[i][j] = (i < 4 && j < 4) ? 16'(int'(cur[i][j]) - int'(pred[i][j])) : 16'sd0;

  fwd_transform u_ft (.clk, .rst_n, .in_valid(start), .mode(TR_DCT4), .blk(res_blk),
                      .out_valid(ft_valid), .coef(ft_coef));

  // t=1: rows 0,1 to the quantizer, t=2: rows 2,3
  logic signed [15:0] ft_hold [4][4];
  always_comb begin
    q_iv = (t == 4'd1) || (t == 4'd2);
    q_row = (t == 4'd2) ? 3'd1 : 3'd0;
    for (int k = 0; k < 8; k++)
      q_in[k] = (t == 4'd1) ? ft_coef[k/4][k%4] : ft_hold[2 + k/4][k%4];
  end
  quant8 u_q (.clk, .rst_n, .in_valid(q_iv), .is8x8(1'b0), .dc_mode(1'b0), .intra(!sel_inter),
              .qp, .row_idx(q_row), .coef(q_in), .out_valid(q_valid), .level(q_out));

  // the dequantizer takes the quantizer output directly (t=2 and t=3)
  assign dq_iv = q_valid;
  assign dq_row = (t == 4'd3) ? 3'd1 : 3'd0;
  dequant8 u_dq (.clk, .rst_n, .in_valid(dq_iv), .is8x8(1'b0), .dc_mode(1'b0), .chroma(1'b0),
                 .qp, .row_idx(dq_row), .level(q_out), .out_valid(dq_valid), .coef(dq_out));

  always_comb
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        it_coef[i][j] = (i < 4 && j < 4) ? dq_blk[i][j] : 16'sd0;
  inv_transform u_it (.clk, .rst_n, .in_valid(t == 4'd5), .mode(TR_DCT4), .coef(it_coef),
                      .out_valid(it_valid), .res(it_res));

  logic signed [15:0] it_hold [4][4];
  always_comb begin
    r_iv = (t == 4'd6) || (t == 4'd7);
    for (int k = 0; k < 8; k++) begin
      automatic int rr = (t == 4'd7 ? 2 : 0) + k/4;
      r_pred[k] = pred[rr][k%4];
      r_res[k]  = (t == 4'd6) ? it_res[rr][k%4] : it_hold[rr][k%4];
    end
  end
  recon8 u_rec (.clk, .rst_n, .in_valid(r_iv), .sel_inter, .pred_intra(r_pred),
                .pred_inter(r_pred), .res(r_res), .to_intra(), .to_deblock(r_out_valid),
                .rec(r_rec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; done <= 1'b0; nonzero <= 1'b0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          levels[i][j] <= '0; rec[i][j] <= '0; dq_blk[i][j] <= '0;
          ft_hold[i][j] <= '0; it_hold[i][j] <= '0;
        end
    end else begin
      done <= 1'b0;
      if (start) begin t <= 4'd1; nonzero <= 1'b0; end
      else if (t != 4'd0) t <= (t == 4'd8) ? 4'd0 : t + 4'd1;
      if (ft_valid)
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) ft_hold[i][j] <= ft_coef[i][j];
      if (q_valid)
        for (int k = 0; k < 8; k++) begin
          levels[(t == 4'd3 ? 2 : 0) + k/4][k%4] <= q_out[k];
          if (q_out[k] != 0) nonzero <= 1'b1;
        end
      if (dq_valid)
        for (int k = 0; k < 8; k++) dq_blk[(t == 4'd4 ? 2 : 0) + k/4][k%4] <= dq_out[k];
      if (it_valid)
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) it_hold[i][j] <= it_res[i][j];
      if (r_out_valid)
        for (int k = 0; k < 8; k++) rec[(t == 4'd8 ? 2 : 0) + k/4][k%4] <= r_rec[k];
      if (t == 4'd8) done <= 1'b1;
    end
  end
endmodule
