// Shared reconstruction adder, eight pixels per cycle. The same unit
// reconstructs intra-predicted blocks during the prediction stage (their
// unfiltered result is fed back to the intra predictor as neighbour pixels)
// and inter-predicted blocks in the following stage (their result goes to the
// deblocking filter); `sel_inter` picks which prediction source the time
// slot belongs to. Each output is clip(pred + residual) to 0..255. Every
// reconstructed row goes to the deblocking filter (`to_deblock`); rows of
// intra slots are also flagged for the intra neighbour feedback (`to_intra`).
// Registered, one cycle latency.
module recon8
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               sel_inter,
  input  pixel_t             pred_intra [8],
  input  pixel_t             pred_inter [8],
  input  logic signed [15:0] res [8],
  output logic               to_intra,
  output logic               to_deblock,
  output pixel_t             rec [8]
);
  pixel_t r [8];
  always_comb
    for (int k = 0; k < 8; k++) begin
      automatic int v = int'(sel_inter ? pred_inter[k] : pred_intra[k]) + int'(res[k]);
      r[k] = pixel_t'(v < 0 ? 0 : (v > 255 ? 255 : v));
    end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      to_intra <= 1'b0; to_deblock <= 1'b0;
      for (int k = 0; k < 8; k++) rec[k] <= '0;
    end else begin
      to_intra   <= in_valid && !sel_inter;
      to_deblock <= in_valid;
      if (in_valid) rec <= r;
    end
  end
endmodule
