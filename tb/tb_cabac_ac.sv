// Self-checking test of the CABAC arithmetic coder: random decision, bypass
// and termination bins (probability states and MPS values drawn at random,
// runs of likely bins with a mid-range state) are
// coded into several slices, each closed by a terminating 1 marked `last`.
// The byte stream is compared with the bit-serial reference coder. The
// output room signal is toggled at random, so the coder is also held.
module tb_cabac_ac;
  import cabac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bin_valid = 1'b0, bin_ready, bin_val = 1'b0, val_mps = 1'b0, last = 1'b0, fifo_room = 1'b1;
  bin_kind_e bin_kind = BIN_DECISION;
  logic [5:0] p_state = '0;
  logic [63:0] bytes;
  logic [3:0] nbytes;
  int checks = 0, failures = 0, holds = 0, n_bins = 0;
  byte got [$];
  `include "tb/cabac_ref.svh"
  cabac_ac dut (.clk, .rst_n, .bin_valid, .bin_ready, .bin_val, .bin_kind, .p_state, .val_mps, .last,
                .fifo_room, .bytes, .nbytes);
  always #5 clk = !clk;
  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < int'(nbytes); i++) got.push_back(byte'(bytes[63 - 8*i -: 8]));
  initial begin
    r_reset();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 6; s++) begin
      automatic int nb = $urandom_range(200, 2000);
      for (int i = 0; i <= nb; i++) begin
        automatic logic [5:0] st = 6'($urandom_range(0, 62));
        automatic logic mps = $urandom_range(0, 1);
        automatic int kind = $urandom_range(0, 9) < 7 ? 0 : ($urandom_range(0, 9) < 8 ? 1 : 2);
        automatic int v;
        // runs of one value with a high state give long outstanding chains
        if ((i / 8) % 5 == 1) begin st = 6'd40; v = mps; kind = 0; end
        else v = $urandom_range(0, 1);
        if (i == nb) begin kind = 2; v = 1; end
        else if (kind == 2) v = 0;
        @(negedge clk);
        fifo_room = $urandom_range(0, 9) != 0;
        bin_valid = 1'b1; bin_val = v[0]; bin_kind = bin_kind_e'(kind); p_state = st; val_mps = mps;
        last = i == nb;
        @(posedge clk);
        while (!bin_ready) begin
          holds++;
          @(negedge clk); fifo_room = 1'b1; @(posedge clk);
        end
        n_bins++;
        begin
          automatic logic [5:0] st2 = st;
          automatic logic mps2 = mps;
          case (kind)
            0: r_decision_st(v, st2, mps2);
            1: r_bypass(v);
            default: r_terminate(v);
          endcase
          if (i == nb) r_pad();
        end
      end
    end
    @(negedge clk); bin_valid = 1'b0;
    repeat (4) @(posedge clk);
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
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
