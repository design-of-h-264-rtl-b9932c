// Self-checking test of the context modelling stage. Contexts are
// initialised from random (m, n) pairs at a random slice QP; random decision
// and bypass bins drawn from only a few contexts (so that back-to-back use of
// one context is frequent) pass through with random back-pressure. Every
// bin leaving the stage must carry the state and MPS a sequential reference
// model holds for its context at that point, bins must keep their order, and
// the same-context stall must have occurred.
module tb_cabac_ctx_model;
  import cabac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, init_en = 1'b0;
  logic [9:0] init_idx = '0;
  logic signed [7:0] init_m = '0, init_n = '0;
  logic [5:0] slice_qp = 6'd26;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_mps, stall_same_ctx;
  bin_t in_bin, out_bin;
  logic [5:0] out_state;
  int checks = 0, failures = 0, stalls = 0, sent = 0, recv = 0;
  bin_t expq [$];
  `include "tb/cabac_ref.svh"
  cabac_ctx_model dut (.clk, .rst_n, .init_en, .init_idx, .init_m, .init_n, .slice_qp, .in_valid, .in_ready,
                       .in_bin, .out_valid, .out_ready, .out_bin, .out_state, .out_mps, .stall_same_ctx);
  always #5 clk = !clk;
  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // checker on the output side
  always @(posedge clk)
    if (rst_n && out_valid && out_ready) begin
      automatic bin_t e = expq.pop_front();
      checks++;
      if (out_bin != e) failures++;
      if (out_bin.kind == BIN_DECISION) begin
        automatic logic [5:0] st = r_state[out_bin.ctx_idx];
        automatic logic mps = r_mps[out_bin.ctx_idx];
        checks++;
        if (out_state != st || out_mps != mps) begin
          failures++;
          if (failures < 5) $display("ctx %0d: state %0d/%0d expected %0d/%0d", out_bin.ctx_idx, out_state, out_mps, st, mps);
        end
        r_decision_ctx(int'(out_bin.val), int'(out_bin.ctx_idx));
      end
      recv++;
    end
  always @(posedge clk) if (rst_n && stall_same_ctx) stalls++;
  initial begin
    in_bin = '0;
    r_reset();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    slice_qp = 6'($urandom_range(0, 51));
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      init_en = 1'b1; init_idx = 10'(100 + i);
      init_m = 8'($urandom_range(0, 80) - 40); init_n = 8'($urandom_range(0, 127));
      r_ctx_init(100 + i, int'(init_m), int'(init_n), int'(slice_qp));
    end
    @(negedge clk); init_en = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      out_ready = $urandom_range(0, 4) != 0;
      in_valid = 1'b1;
      in_bin.val = $urandom_range(0, 1);
      in_bin.kind = $urandom_range(0, 4) == 0 ? BIN_BYPASS : BIN_DECISION;
      in_bin.ctx_idx = 10'(100 + $urandom_range(0, 3) * ($urandom_range(0, 1) ? 1 : 5));
      in_bin.last = 1'b0;
      @(posedge clk);
      while (!in_ready) begin @(negedge clk); out_ready = $urandom_range(0, 1); @(posedge clk); end
      expq.push_back(in_bin);
      sent++;
    end
    @(negedge clk); in_valid = 1'b0; out_ready = 1'b1;
    repeat (5) @(posedge clk);
    checks += 2;
    if (recv != sent) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
