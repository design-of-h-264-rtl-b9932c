// Three-stage pipelined CABAC encoder: binarization and context modelling
// (stage 1, the ctxIdx of a bin does not depend on the bin itself, so both
// proceed together), arithmetic coding with renormalization and bit packing
// (stage 2), and the output FIFO (stage 3). One bin per cycle when no
// same-context stall occurs. Syntax elements enter on the se_* port,
// bytes leave on the out_* valid/ready port; contexts are initialised
// through the init port before a slice.
module cabac_encoder
  import cabac_pkg::*;
#(
  parameter int NCTX = 1024,
  parameter int FIFO_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init_en,
  input  logic [9:0]         init_idx,
  input  logic signed [7:0]  init_m,
  input  logic signed [7:0]  init_n,
  input  logic [5:0]         slice_qp,
  input  logic               se_valid,
  output logic               se_ready,
  input  logic [2:0]         se_type,
  input  logic signed [15:0] se_val,
  input  logic [4:0]         se_param,
  input  logic [1:0]         se_k,
  input  logic               se_signed,
  input  logic [9:0]         ctx_base,
  input  logic [3:0]         ctx_inc_max,
  input  logic               se_last,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [7:0]         out_byte,
  output logic               stall_same_ctx,
  output logic               bin_fire
);
  logic b_valid, b_ready;  bin_t b_bin;
  logic m_valid, m_ready;  bin_t m_bin;
  logic [5:0] m_state;     logic m_mps;
  logic room8;
  logic [63:0] wb;         logic [3:0] wn;

  cabac_binarizer u_bin (
    .clk, .rst_n, .se_valid, .se_ready, .se_type, .se_val, .se_param, .se_k, .se_signed,
    .ctx_base, .ctx_inc_max, .se_last, .bin_valid(b_valid), .bin_ready(b_ready), .bin(b_bin));

  cabac_ctx_model #(.NCTX(NCTX)) u_ctx (
    .clk, .rst_n, .init_en, .init_idx, .init_m, .init_n, .slice_qp,
    .in_valid(b_valid), .in_ready(b_ready), .in_bin(b_bin),
    .out_valid(m_valid), .out_ready(m_ready), .out_bin(m_bin),
    .out_state(m_state), .out_mps(m_mps), .stall_same_ctx);

  cabac_ac u_ac (
    .clk, .rst_n, .bin_valid(m_valid), .bin_ready(m_ready), .bin_val(m_bin.val),
    .bin_kind(m_bin.kind), .p_state(m_state), .val_mps(m_mps), .last(m_bin.last),
    .fifo_room(room8), .bytes(wb), .nbytes(wn));

  byte_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_bytes(wb), .wr_n(wn), .room8, .rd_valid(out_valid),
    .rd_ready(out_ready), .rd_data(out_byte), .count());

  assign bin_fire = m_valid && m_ready;
endmodule
