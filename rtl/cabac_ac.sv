// CABAC arithmetic coder with renormalization and bit packing, one bin per
// cycle. The interval maintainer updates codIRange/codILow for decision,
// bypass and termination bins from one shared three-input addition
// (codILow + codIRange - x). Renormalization finds the number of doubling
// steps of codIRange with a leading-zero detector and shifts it with a barrel
// shifter in one step; the matching codILow steps (drop a carry bit or count an
// outstanding bit) are unrolled so the whole renormalization of a bin, and the
// emission of pending outstanding bits with it, takes one cycle. A
// termination bin with value 1 also performs the end-of-slice flush and the
// last bin pads the stream with zeros to a byte boundary.
// Bit packing collects the emitted bits and hands completed bytes, MSB first,
// up to eight per cycle, to the output FIFO (bytes/nbytes).
// Interface: bin_valid/bin_ready with the bin value, kind, context state
// (pStateIdx, valMPS) and `last`. bin_ready drops only while the FIFO lacks
// room for eight bytes (fifo_room). Outstanding bits are limited to
// MAX_OUTS; the assertion flags a stream that would exceed it.
module cabac_ac
  import cabac_pkg::*;
#(
  parameter int MAX_OUTS = 31
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bin_valid,
  output logic        bin_ready,
  input  logic        bin_val,
  input  bin_kind_e   bin_kind,
  input  logic [5:0]  p_state,
  input  logic        val_mps,
  input  logic        last,
  input  logic        fifo_room,     // FIFO can take eight more bytes
  output logic [63:0] bytes,         // byte 0 in bits 63:56
  output logic [3:0]  nbytes
);
  logic [8:0]  range_q;
  logic [9:0]  low_q;
  logic [5:0]  outs_q;
  logic        first_q;
  logic [6:0]  acc_len_q;            // pending bits in acc_q (< 8 between bins)
  logic [7:0]  acc_q;

  assign bin_ready = fifo_room;

  // combinational encoding of one bin
  logic [8:0]  range_n;
  logic [9:0]  low_n;
  logic [5:0]  outs_n;
  logic        first_n;
  logic [63:0] bv;                   // emitted bits, left aligned after acc_q
  int          blen;

  function automatic int lzd9(input logic [8:0] r);
    for (int i = 8; i >= 0; i--) if (r[i]) return 8 - i;
    return 9;
  endfunction

  always_comb begin
    automatic logic [8:0]  rng = range_q;
    automatic logic [10:0] low = 11'(low_q);
    automatic logic [7:0]  rlps = range_lps(p_state, range_q[7:6]);
    automatic int          nsh;
    automatic logic [5:0]  outs = outs_q;
    automatic logic        first = first_q;
    bv = '0;
    blen = 0;
    // put_bit: first bit suppressed, then pending outstanding bits inverted
    case (bin_kind)
      BIN_DECISION: begin
        rng = range_q - 9'(rlps);
        if (bin_val != val_mps) begin
          low = low + 11'(rng);
          rng = 9'(rlps);
        end
      end
      BIN_BYPASS: begin
        low = low << 1;
        if (bin_val) low = low + 11'(range_q);
      end
      default: begin
        rng = range_q - 9'd2;
        if (bin_val) begin
          low = low + 11'(rng);
          rng = 9'd2;
        end
      end
    endcase
    if (bin_kind == BIN_BYPASS) begin
      automatic logic b;
      automatic logic emit = 1'b1;
      if (low >= 11'd1024) begin b = 1'b1; low = low - 11'd1024; end
      else if (low < 11'd512) b = 1'b0;
      else begin emit = 1'b0; b = 1'b0; low = low - 11'd512; outs = outs + 6'd1; end
      if (emit) begin
        if (first) first = 1'b0; else begin bv[63-blen] = b; blen++; end
        for (int o = 0; o < MAX_OUTS; o++)
          if (o < int'(outs)) begin bv[63-blen] = !b; blen++; end
        outs = '0;
      end
      nsh = 0;
    end else begin
      nsh = lzd9(rng);
      for (int i = 0; i < 8; i++) begin
        if (i < nsh) begin
          automatic logic b;
          automatic logic emit = 1'b1;
          if (low < 11'd256) b = 1'b0;
          else if (low >= 11'd512) begin b = 1'b1; low = low - 11'd512; end
          else begin emit = 1'b0; b = 1'b0; low = low - 11'd256; outs = outs + 6'd1; end
          if (emit) begin
            if (first) first = 1'b0; else begin bv[63-blen] = b; blen++; end
            for (int o = 0; o < MAX_OUTS; o++)
              if (o < int'(outs)) begin bv[63-blen] = !b; blen++; end
            outs = '0;
          end
          low = low << 1;
        end
      end
      rng = rng << nsh;
      // end-of-slice flush after a terminating 1
      if (bin_kind == BIN_TERMINATE && bin_val) begin
        automatic logic b = low[9];
        if (first) first = 1'b0; else begin bv[63-blen] = b; blen++; end
        for (int o = 0; o < MAX_OUTS; o++)
          if (o < int'(outs)) begin bv[63-blen] = !b; blen++; end
        outs = '0;
        bv[63-blen] = low[8]; blen++;
        bv[63-blen] = 1'b1;   blen++;          // stop bit
      end
    end
    range_n = rng;
    low_n   = low[9:0];
    outs_n  = outs;
    first_n = first;
  end

  // bit packing
  logic [71:0] cat;
  int          tot;
  always_comb begin
    // place pending bits first: acc_q holds acc_len_q bits, MSB aligned
    cat = {acc_q, 64'd0} | ({bv, 8'd0} >> acc_len_q);
    tot = int'(acc_len_q) + blen;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q <= 9'd510; low_q <= '0; outs_q <= '0; first_q <= 1'b1;
      acc_q <= '0; acc_len_q <= '0; bytes <= '0; nbytes <= '0;
    end else begin
      nbytes <= '0;
      if (bin_valid && bin_ready) begin
        automatic int nb = tot / 8;
        automatic int rem = tot % 8;
        automatic logic [71:0] sh;
        if (last && rem != 0) begin nb = nb + 1; rem = 0; end   // zero padding
        bytes  <= cat[71:8];
        nbytes <= 4'(nb);
        sh = cat << (8 * nb);
        acc_q     <= last ? 8'd0 : sh[71:64];
        acc_len_q <= 7'(rem);
        if (last) begin
          range_q <= 9'd510; low_q <= '0; outs_q <= '0; first_q <= 1'b1;
        end else begin
          range_q <= range_n; low_q <= low_n; outs_q <= outs_n; first_q <= first_n;
        end
      end
    end
  end

  a_outs_bound: assert property (@(posedge clk) disable iff (!rst_n)
    bin_valid && bin_ready |-> outs_n < 6'(MAX_OUTS));
endmodule
