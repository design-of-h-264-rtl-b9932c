// CABAC binarizer. A syntax element value is turned into its bin string and
// the bins are issued one per cycle with their coding kind and ctxIdx.
// Table-type schemes (FL, U, TU) are plain logic; UEGk, whose table would be
// large, is computed arithmetically: the prefix is TU with cMax = uCoff, and
// for |v| >= uCoff the Exp-Golomb suffix is found by comparing
// s = |v| - uCoff against the partition bases (2^m - 1) * 2^k in parallel;
// the largest base not above s gives the number m of leading ones, and
// s - base is sent in k + m bits (MSB first). A sign bin follows for signed
// UEGk values other than zero. FL sends its bits LSB first.
// Context assignment (simplified, this design's choice): bins of FL/U/TU and
// of the UEGk prefix are decision bins with ctxIdx = ctx_base +
// min(binIdx, ctx_inc_max); UEGk suffix and sign bins are bypass bins; TERM
// sends one termination bin (end_of_slice_flag, value = se_val[0]).
// Interface: se_valid/se_ready per syntax element, bin_valid/bin_ready per bin;
// a new element is accepted in the cycle after the last bin of the previous.
module cabac_binarizer
  import cabac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               se_valid,
  output logic               se_ready,
  input  logic [2:0]         se_type,      // 0 FL, 1 U, 2 TU, 3 UEGk, 4 TERM
  input  logic signed [15:0] se_val,
  input  logic [4:0]         se_param,     // FL: bits, TU: cMax, UEGk: uCoff
  input  logic [1:0]         se_k,         // UEGk order
  input  logic               se_signed,
  input  logic [9:0]         ctx_base,
  input  logic [3:0]         ctx_inc_max,
  input  logic               se_last,      // last element of the slice
  output logic               bin_valid,
  input  logic               bin_ready,
  output bin_t               bin
);
  localparam int MAXB = 64;
  logic [MAXB-1:0] bits_q;     // bin values, binIdx 0 in bit 0
  logic [6:0]      len_q;      // number of bins
  logic [6:0]      nctx_q;     // bins 0..nctx-1 are decision bins
  logic [6:0]      idx_q;
  logic            busy_q, term_q, last_q;
  logic [9:0]      base_q;
  logic [3:0]      incmax_q;

  // build the bin string of the offered element
  logic [MAXB-1:0] bits_n;
  logic [6:0]      len_n, nctx_n;
  always_comb begin
    automatic int v = int'(se_val);
    automatic int a = v < 0 ? -v : v;
    automatic int n = 0;
    bits_n = '0; nctx_n = '0;
    case (se_type)
      3'd0: begin
        for (int i = 0; i < 16; i++) if (i < int'(se_param)) bits_n[i] = se_val[i];
        n = int'(se_param); nctx_n = 7'(n);
      end
      3'd1, 3'd2: begin
        for (int i = 0; i < 32; i++) if (i < a) bits_n[i] = 1'b1;
        n = a;
        if (se_type == 3'd1 || a < int'(se_param)) n = a + 1;
        nctx_n = 7'(n);
      end
      3'd3: begin
        automatic int uc = int'(se_param);
        automatic int pre = a < uc ? a : uc;
        for (int i = 0; i < 32; i++) if (i < pre) bits_n[i] = 1'b1;
        n = pre;
        if (a < uc) n = n + 1;              // terminating zero of the prefix
        nctx_n = 7'(n);
        if (a >= uc) begin
          automatic int s = a - uc;
          automatic int m = 0;
          automatic int k = int'(se_k);
          for (int j = 1; j < 16; j++)
            if (s >= (((1 << j) - 1) << k)) m = j;
          s = s - (((1 << m) - 1) << k);
          for (int j = 0; j < 16; j++) if (j < m) begin bits_n[n] = 1'b1; n++; end
          bits_n[n] = 1'b0; n++;
          for (int j = 17; j >= 0; j--)
            if (j < k + m) begin bits_n[n] = 1'(s >> j); n++; end
        end
        if (se_signed && a != 0) begin bits_n[n] = v < 0; n++; end
      end
      default: begin
        bits_n[0] = se_val[0]; n = 1; nctx_n = '0;
      end
    endcase
    len_n = 7'(n);
  end

  assign se_ready  = !busy_q;
  assign bin_valid = busy_q;
  always_comb begin
    automatic int inc = int'(idx_q) < int'(incmax_q) ? int'(idx_q) : int'(incmax_q);
    bin.val     = bits_q[idx_q[5:0]];
    bin.kind    = term_q ? BIN_TERMINATE : (idx_q < nctx_q ? BIN_DECISION : BIN_BYPASS);
    bin.ctx_idx = base_q + 10'(inc);
    bin.last    = last_q && (idx_q == len_q - 7'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; bits_q <= '0; len_q <= '0; nctx_q <= '0; idx_q <= '0;
      term_q <= 1'b0; last_q <= 1'b0; base_q <= '0; incmax_q <= '0;
    end else if (!busy_q) begin
      if (se_valid && len_n != 0) begin
        busy_q <= 1'b1; bits_q <= bits_n; len_q <= len_n; nctx_q <= nctx_n; idx_q <= '0;
        term_q <= se_type == 3'd4; last_q <= se_last; base_q <= ctx_base; incmax_q <= ctx_inc_max;
      end
    end else if (bin_ready) begin
      idx_q <= idx_q + 7'd1;
      if (idx_q == len_q - 7'd1) busy_q <= 1'b0;
    end
  end
endmodule
