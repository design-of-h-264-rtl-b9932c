// End-to-end test of the three-stage CABAC encoder: contexts are initialised
// from random (m, n) pairs, then random syntax elements of all binarization
// types are coded into several slices (each closed by end_of_slice_flag = 1
// marked last) while the byte output is read with random back-pressure. The
// bytes must equal those of the reference model (binarization, context
// update and bit-serial arithmetic coder). The test counts same-context
// stalls, bypass bins, termination bins and FIFO back-pressure on the coder;
// each must occur.
module tb_cabac_encoder;
  import cabac_pkg::*;
  `include "tb/cabac_ref.svh"
  logic clk = 1'b0, rst_n = 1'b0, init_en = 1'b0;
  logic [9:0] init_idx = '0;
  logic signed [7:0] init_m = '0, init_n = '0;
  logic [5:0] slice_qp = 6'd28;
  logic se_valid = 1'b0, se_ready, se_signed = 1'b0, se_last = 1'b0;
  logic [2:0] se_type = '0;
  logic signed [15:0] se_val = '0;
  logic [4:0] se_param = '0;
  logic [1:0] se_k = '0;
  logic [9:0] ctx_base = '0;
  logic [3:0] ctx_inc_max = '0;
  logic out_valid, out_ready = 1'b1, stall_same_ctx, bin_fire;
  logic [7:0] out_byte;
  int checks = 0, failures = 0, stalls = 0, n_bypass = 0, n_term = 0, n_full = 0;
  byte got [$];
  rbin_t allq [$];
  cabac_encoder #(.NCTX(1024), .FIFO_DEPTH(64)) dut (.clk, .rst_n, .init_en, .init_idx, .init_m, .init_n,
    .slice_qp, .se_valid, .se_ready, .se_type, .se_val, .se_param, .se_k, .se_signed, .ctx_base,
    .ctx_inc_max, .se_last, .out_valid, .out_ready, .out_byte, .stall_same_ctx, .bin_fire);
  always #5 clk = !clk;
  initial begin : watchdog
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic drain_fast = 1'b0;
  int cyc = 0;
  // the reader stalls completely for 1500 of every 3000 cycles so the FIFO fills
  always @(negedge clk) begin
    cyc++;
    out_ready <= drain_fast || ((cyc / 1500) % 2 == 0 && $urandom_range(0, 3) == 0);
  end
  always @(posedge clk)
    if (rst_n) begin
      if (out_valid && out_ready) got.push_back(byte'(out_byte));
      if (stall_same_ctx) stalls++;
      if (!dut.room8) n_full++;
    end
  initial begin
    r_reset();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      init_en = 1'b1; init_idx = 10'(i);
      init_m = 8'($urandom_range(0, 80) - 40); init_n = 8'($urandom_range(0, 127));
      r_ctx_init(i, int'(init_m), int'(init_n), int'(slice_qp));
    end
    @(negedge clk); init_en = 1'b0;
    for (int n = 0; n < 2500; n++) begin
      automatic int t = $urandom_range(0, 3), v, prm, k = 0, sg = 0;
      case (t)
        0: begin prm = $urandom_range(1, 4); v = $urandom_range(0, (1 << prm) - 1); end
        1: begin prm = 0; v = $urandom_range(0, 6); end
        2: begin prm = $urandom_range(1, 8); v = $urandom_range(0, prm); end
        default: begin
             prm = 14; k = $urandom_range(0, 1) ? 3 : 0; sg = 1;
             v = $urandom_range(0, 5) == 0 ? $urandom_range(0, 500) : $urandom_range(0, 4);
             if ($urandom_range(0, 1)) v = -v;
           end
      endcase
      if (n % 500 == 499) begin t = 4; v = 1; end
      else if (n % 37 == 36) begin t = 4; v = 0; end
      @(negedge clk);
      se_valid = 1'b1; se_type = 3'(t); se_val = 16'(v); se_param = 5'(prm); se_k = 2'(k);
      se_signed = sg[0]; ctx_base = 10'($urandom_range(0, 6) * 8); ctx_inc_max = 4'($urandom_range(0, 2));
      se_last = t == 4 && v == 1;
      r_binarize(t, v, prm, k, sg, int'(ctx_base), int'(ctx_inc_max), int'(se_last), allq);
      @(posedge clk);
      while (!se_ready) @(posedge clk);
    end
    @(negedge clk); se_valid = 1'b0; drain_fast = 1'b1;
    repeat (5000) @(posedge clk);
    foreach (allq[i]) begin
      if (allq[i].kind == 1) n_bypass++;
      if (allq[i].kind == 2) n_term++;
      r_code(allq[i]);
    end
    checks++;
    if (got.size() * 8 != r_bits.size()) begin
      failures++; $display("%0d bytes, expected %0d", got.size(), r_bits.size() / 8);
    end
    for (int i = 0; i < got.size() && i < r_bits.size() / 8; i++) begin
      automatic byte e = 0;
      for (int b = 0; b < 8; b++) e = byte'({e[6:0], r_bits[8*i + b]});
      checks++;
      if (got[i] != e) begin failures++; if (failures < 5) $display("byte %0d: %h expected %h", i, got[i], e); end
    end
    checks += 4;
    if (stalls == 0) begin failures++; $display("no same-context stall"); end
    if (n_bypass == 0) failures++;
    if (n_term == 0) failures++;
    if (n_full == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
