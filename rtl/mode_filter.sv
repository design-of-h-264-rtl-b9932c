// Mode filtering: of the seven VBS modes only two go on to fractional ME.
// Candidate A is the cheapest of modes 1-3 (16x16, 16x8, 8x16); candidate B
// is the cheapest of modes 1-4, where the cost of mode 4 is the sum over the
// four 8x8 blocks of the cheapest sub-mode (8x8, 8x4, 4x8, 4x4) of each.
// Mode cost is the sum of the partition SADs; ties keep the larger block.
// Registered: result valid one cycle after `in_valid`. Cost is SAD only; no
// motion-vector rate term is added at this point (this design's choice).
module mode_filter
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sad_t        sad [NPART],
  output logic        out_valid,
  output blk_mode_e   mode_a,
  output logic [19:0] cost_a,
  output blk_mode_e   mode_b,            // M8x8 means "split"; see sub_mode
  output blk_mode_e   sub_mode [4],      // per 8x8 block when mode_b == M8x8
  output logic [19:0] cost_b
);
  logic [19:0] mcost [1:4];
  logic [19:0] sc [4];
  blk_mode_e   sm [4];
  blk_mode_e   ma, mb;
  logic [19:0] ca, cb;

  always_comb begin
    mcost[1] = 20'(sad[0]);
    mcost[2] = 20'(sad[1]) + 20'(sad[2]);
    mcost[3] = 20'(sad[3]) + 20'(sad[4]);
    mcost[4] = '0;
    for (int q = 0; q < 4; q++) begin
      automatic logic [19:0] c8  = 20'(sad[5+q]);
      automatic logic [19:0] c84 = 20'(sad[9+2*q]) + 20'(sad[10+2*q]);
      automatic logic [19:0] c48 = 20'(sad[17+2*q]) + 20'(sad[18+2*q]);
      automatic logic [19:0] c44 = 20'(sad[25+4*q]) + 20'(sad[26+4*q]) +
                                   20'(sad[27+4*q]) + 20'(sad[28+4*q]);
      sc[q] = c8; sm[q] = M8x8;
      if (c84 < sc[q]) begin sc[q] = c84; sm[q] = M8x4; end
      if (c48 < sc[q]) begin sc[q] = c48; sm[q] = M4x8; end
      if (c44 < sc[q]) begin sc[q] = c44; sm[q] = M4x4; end
      mcost[4] += sc[q];
    end
    ma = M16x16; ca = mcost[1];
    if (mcost[2] < ca) begin ma = M16x8; ca = mcost[2]; end
    if (mcost[3] < ca) begin ma = M8x16; ca = mcost[3]; end
    mb = ma; cb = ca;
    if (mcost[4] < cb) begin mb = M8x8; cb = mcost[4]; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; mode_a <= M16x16; mode_b <= M16x16;
      cost_a <= '0; cost_b <= '0;
      for (int q = 0; q < 4; q++) sub_mode[q] <= M8x8;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mode_a <= ma; cost_a <= ca; mode_b <= mb; cost_b <= cb;
        for (int q = 0; q < 4; q++) sub_mode[q] <= sm[q];
      end
    end
  end
endmodule
