// Luma deblocking of one macroblock with the interleaved edge order.
// The 16x16 reconstructed macroblock is held with the four filtered columns
// of its left neighbour and the four filtered rows of its upper neighbour in
// a 20x20 working buffer (row/column 0..3 are the neighbours). Edges are
// filtered one 4-line segment per cycle by four edge filters in parallel,
// 4x4 block by 4x4 block in raster order: for each block its vertical edges
// that are not yet done (the left macroblock edge and the first internal edge
// for the first block of a row, then the next internal edge), then its top
// horizontal edge, whose pixels have by then passed all vertical filtering.
// This gives the same result as filtering all vertical edges first, needs
// only a block row of context and reuses the data while it is at hand.
// Edges with bS = 0, and macroblock edges when the neighbour is absent
// (filter_left / filter_top low), are skipped. Every segment takes one
// cycle: 8 per block row, 32 per macroblock. One QP for the macroblock and
// zero alpha/beta offsets (this design's choice).
// Timing: `start` with the arrays stable; `done` pulses 33 cycles later.
module deblock_mb
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pixel_t      mb_in  [16][16],
  input  pixel_t      left_in [16][4],
  input  pixel_t      top_in  [4][16],
  input  logic [2:0]  bs_v [4][4],     // [edge x/4][block row]
  input  logic [2:0]  bs_h [4][4],     // [edge y/4][block column]
  input  logic [5:0]  qp,
  input  logic        filter_left,
  input  logic        filter_top,
  output logic        busy,
  output logic        done,
  output pixel_t      buf_out [20][20],
  output logic [5:0]  edges_filtered   // segments with at least one line filtered
);
  pixel_t     wb [20][20];
  logic [4:0] seg;           // 0..31
  logic       run;

  // segment decode: block row = seg/8, within the row slots 0..7
  // slot: 0 V x0, 1 V x4, 2 H b0, 3 V x8, 4 H b1, 5 V x12, 6 H b2, 7 H b3
  logic [1:0] brow;
  logic [2:0] slot;
  logic       is_v;
  logic [1:0] eidx;          // vertical: edge x/4; horizontal: block column
  always_comb begin
    brow = seg[4:3];
    slot = seg[2:0];
    case (slot)
      3'd0: begin is_v = 1'b1; eidx = 2'd0; end
      3'd1: begin is_v = 1'b1; eidx = 2'd1; end
      3'd2: begin is_v = 1'b0; eidx = 2'd0; end
      3'd3: begin is_v = 1'b1; eidx = 2'd2; end
      3'd4: begin is_v = 1'b0; eidx = 2'd1; end
      3'd5: begin is_v = 1'b1; eidx = 2'd3; end
      3'd6: begin is_v = 1'b0; eidx = 2'd2; end
      default: begin is_v = 1'b0; eidx = 2'd3; end
    endcase
  end

  logic [2:0] bs_seg;
  always_comb begin
    bs_seg = is_v ? bs_v[eidx][brow] : bs_h[brow][eidx];
    if (is_v && eidx == 0 && !filter_left) bs_seg = '0;
    if (!is_v && brow == 0 && !filter_top) bs_seg = '0;
  end

  pixel_t p [4][4], q [4][4], po [4][4], qo [4][4];
  logic   filt [4];
  always_comb begin
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 4; k++) begin
        if (is_v) begin
          automatic int r = 4 + 4*int'(brow) + l, c = 4 + 4*int'(eidx);
          p[l][k] = wb[r][c-1-k]; q[l][k] = wb[r][c+k];
        end else begin
          automatic int r = 4 + 4*int'(brow), c = 4 + 4*int'(eidx) + l;
          p[l][k] = wb[r-1-k][c]; q[l][k] = wb[r+k][c];
        end
      end
  end
  for (genvar l = 0; l < 4; l++) begin : g_line
    deblock_edge u_edge (.p(p[l]), .q(q[l]), .bs(bs_seg), .index_a(qp), .index_b(qp),
                         .chroma(1'b0), .po(po[l]), .qo(qo[l]), .filtered(filt[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; seg <= '0; done <= 1'b0; edges_filtered <= '0;
      for (int r = 0; r < 20; r++) for (int c = 0; c < 20; c++) wb[r][c] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; seg <= '0; edges_filtered <= '0;
        for (int r = 0; r < 20; r++)
          for (int c = 0; c < 20; c++)
            if (r >= 4 && c >= 4) wb[r][c] <= mb_in[r-4][c-4];
            else if (c < 4 && r >= 4) wb[r][c] <= left_in[r-4][c];
            else if (r < 4 && c >= 4) wb[r][c] <= top_in[r][c-4];
            else wb[r][c] <= '0;
      end else if (run) begin
        for (int l = 0; l < 4; l++)
          for (int k = 0; k < 4; k++) begin
            if (is_v) begin
              wb[4 + 4*int'(brow) + l][4 + 4*int'(eidx) - 1 - k] <= po[l][k];
              wb[4 + 4*int'(brow) + l][4 + 4*int'(eidx) + k]     <= qo[l][k];
            end else begin
              wb[4 + 4*int'(brow) - 1 - k][4 + 4*int'(eidx) + l] <= po[l][k];
              wb[4 + 4*int'(brow) + k][4 + 4*int'(eidx) + l]     <= qo[l][k];
            end
          end
        if (filt[0] || filt[1] || filt[2] || filt[3]) edges_filtered <= edges_filtered + 6'd1;
        seg <= seg + 5'd1;
        if (seg == 5'd31) begin run <= 1'b0; done <= 1'b1; end
      end
    end
  end
  assign busy = run;
  assign buf_out = wb;
endmodule
