// Bit-stream output FIFO. The arithmetic coder delivers zero to eight bytes
// per cycle (wr_bytes, MSB byte first, wr_n of them); the FIFO returns one byte
// per cycle on a valid/ready port. `room8` tells the writer that eight more
// bytes fit. DEPTH is a power of two; its value (64) is this design's choice.
// An assertion checks that a write never overflows; its `disable iff (!rst_n)`
// makes lint report rst_n as both an asynchronous and a synchronous net,
// which is harmless.
module byte_fifo #(
  parameter int DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] wr_bytes,
  input  logic [3:0]  wr_n,
  output logic        room8,
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [7:0]  rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0]  mem [DEPTH];
  logic [AW:0] wp, rp;
  assign count    = wp - rp;
  assign room8    = int'(count) <= DEPTH - 8;
  assign rd_valid = wp != rp;
  assign rd_data  = mem[rp[AW-1:0]];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      wp <= wp + (AW+1)'(wr_n);
      if (rd_valid && rd_ready) rp <= rp + 1'b1;
    end
  end
  always_ff @(posedge clk)
    for (int i = 0; i < 8; i++)
      if (i < int'(wr_n)) mem[AW'(wp + (AW+1)'(i))] <= wr_bytes[63 - 8*i -: 8];
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) + int'(wr_n) <= DEPTH);
endmodule
