// CABAC context modelling stage. The context memory (NCTX entries of
// pStateIdx and valMPS) is dual-ported: port A reads the state of the
// incoming bin's ctxIdx while port B writes back the updated state of the
// bin handed to the arithmetic coder in the same cycle. The probability
// update (MPS: state+1 up to 62; LPS: transIdxLPS, MPS flips at state 0) is
// done here rather than in the arithmetic coder because it needs only
// pStateIdx and valMPS. When a decision bin uses the same ctxIdx as the bin
// currently in the second stage, the read would see the stale state, so the
// input is stalled for one cycle (`stall_same_ctx`).
// Contexts are initialised through the init port from the (m, n) pair of
// each context and the slice QP: preCtxState = clip3(1,126,((m*QP)>>4)+n).
// The (m, n) tables of the standard are supplied by the caller.
// Timing: a bin accepted in cycle t reaches the coder (out_valid) in t+1.
module cabac_ctx_model
  import cabac_pkg::*;
#(
  parameter int NCTX = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // initialisation
  input  logic              init_en,
  input  logic [9:0]        init_idx,
  input  logic signed [7:0] init_m,
  input  logic signed [7:0] init_n,
  input  logic [5:0]        slice_qp,
  // bins in
  input  logic              in_valid,
  output logic              in_ready,
  input  bin_t              in_bin,
  // bins out to the arithmetic coder
  output logic              out_valid,
  input  logic              out_ready,
  output bin_t              out_bin,
  output logic [5:0]        out_state,
  output logic              out_mps,
  output logic              stall_same_ctx
);
  logic [6:0] mem [NCTX];          // {valMPS, pStateIdx}
  logic [6:0] rd_q;
  logic       s2_valid;
  bin_t       s2_bin;

  // stage-2 hazard: same context still to be written back
  assign stall_same_ctx = in_valid && s2_valid && in_bin.kind == BIN_DECISION &&
                          s2_bin.kind == BIN_DECISION && in_bin.ctx_idx == s2_bin.ctx_idx;
  logic s2_free;
  assign s2_free  = !s2_valid || out_ready;
  assign in_ready = s2_free && !stall_same_ctx && !init_en;

  assign out_valid = s2_valid;
  assign out_bin   = s2_bin;
  assign out_state = rd_q[5:0];
  assign out_mps   = rd_q[6];

  // initial state from (m, n)
  logic [6:0] init_val;
  always_comb begin
    automatic int qp = int'(slice_qp) > 51 ? 51 : int'(slice_qp);
    automatic int pre = ((int'(init_m) * qp) >>> 4) + int'(init_n);
    pre = pre < 1 ? 1 : (pre > 126 ? 126 : pre);
    init_val = pre <= 63 ? {1'b0, 6'(63 - pre)} : {1'b1, 6'(pre - 64)};
  end

  // updated state of the stage-2 bin
  logic [6:0] upd;
  always_comb begin
    if (s2_bin.val == rd_q[6]) upd = {rd_q[6], trans_mps(rd_q[5:0])};
    else if (rd_q[5:0] == 6'd0) upd = {!rd_q[6], trans_lps(rd_q[5:0])};
    else upd = {rd_q[6], trans_lps(rd_q[5:0])};
  end

  // port B: initialisation or state write-back
  always_ff @(posedge clk) begin
    if (init_en) mem[init_idx] <= init_val;
    else if (s2_valid && out_ready && s2_bin.kind == BIN_DECISION) mem[s2_bin.ctx_idx] <= upd;
  end

  // port A: read for the accepted bin
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0; s2_bin <= '0; rd_q <= '0;
    end else if (s2_free) begin
      s2_valid <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        s2_bin <= in_bin;
        rd_q   <= mem[in_bin.ctx_idx];
      end
    end
  end
endmodule
