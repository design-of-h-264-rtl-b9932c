// Self-checking test of the binarizer: random FL, U, TU, UEGk (orders 0 and 3,
// uCoff 9 and 14, signed and unsigned, values up to several thousand) and
// termination elements are issued with random back-pressure on the bin
// side; the bin sequence (value, kind, ctxIdx, last) must equal the
// reference binarization.
module tb_cabac_binarizer;
  import cabac_pkg::*;
  `include "tb/cabac_ref.svh"
  logic clk = 1'b0, rst_n = 1'b0, se_valid = 1'b0, se_ready, se_signed = 1'b0, se_last = 1'b0;
  logic [2:0] se_type = '0;
  logic signed [15:0] se_val = '0;
  logic [4:0] se_param = '0;
  logic [1:0] se_k = '0;
  logic [9:0] ctx_base = '0;
  logic [3:0] ctx_inc_max = '0;
  logic bin_valid, bin_ready = 1'b1;
  bin_t bin;
  int checks = 0, failures = 0, nb = 0, n_suffix = 0;
  rbin_t expq [$];
  cabac_binarizer dut (.clk, .rst_n, .se_valid, .se_ready, .se_type, .se_val, .se_param, .se_k, .se_signed,
                       .ctx_base, .ctx_inc_max, .se_last, .bin_valid, .bin_ready, .bin);
  always #5 clk = !clk;
  initial begin : watchdog
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) bin_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk)
    if (rst_n && bin_valid && bin_ready) begin
      automatic rbin_t e;
      checks++;
      if (expq.size() == 0) begin failures++; end
      else begin
        e = expq.pop_front();
        if (int'(bin.val) != e.val || int'(bin.kind) != e.kind || int'(bin.last) != e.last ||
            (e.kind == 0 && int'(bin.ctx_idx) != e.ctx)) begin
          failures++;
          if (failures < 6) $display("bin %0d: val %0d kind %0d ctx %0d last %0d; expected %0d %0d %0d %0d",
            nb, bin.val, bin.kind, bin.ctx_idx, bin.last, e.val, e.kind, e.ctx, e.last);
        end
        if (e.kind == 1) n_suffix++;
      end
      nb++;
    end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int t = $urandom_range(0, 4), v, prm, k = 0, sg = 0;
      case (t)
        0: begin prm = $urandom_range(1, 8); v = $urandom_range(0, (1 << prm) - 1); end
        1: begin prm = 0; v = $urandom_range(0, 20); end
        2: begin prm = $urandom_range(1, 15); v = $urandom_range(0, prm); end
        3: begin
             prm = $urandom_range(0, 1) ? 9 : 14; k = $urandom_range(0, 1) ? 3 : 0; sg = $urandom_range(0, 1);
             v = $urandom_range(0, 3) == 0 ? $urandom_range(0, 3000) : $urandom_range(0, 20);
             if (sg && $urandom_range(0, 1)) v = -v;
           end
        default: begin prm = 0; v = $urandom_range(0, 1); end
      endcase
      @(negedge clk);
      se_valid = 1'b1; se_type = 3'(t); se_val = 16'(v); se_param = 5'(prm); se_k = 2'(k);
      se_signed = sg[0]; ctx_base = 10'($urandom_range(0, 900)); ctx_inc_max = 4'($urandom_range(0, 6));
      se_last = $urandom_range(0, 30) == 0;
      r_binarize(t, v, prm, k, sg, int'(ctx_base), int'(ctx_inc_max), int'(se_last), expq);
      @(posedge clk);
      while (!se_ready) @(posedge clk);
    end
    @(negedge clk); se_valid = 1'b0;
    repeat (200) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("%0d bins missing", expq.size()); end
    if (n_suffix == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
