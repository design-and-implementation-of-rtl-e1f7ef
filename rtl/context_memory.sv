// context_memory: storage for the context models of transform coefficient
// decoding.
//
// DEPTH entries of ctx_t (6-bit state, MPS).  One asynchronous read port
// feeds the bin decoding of the current bin in the same cycle; one
// synchronous write port takes either the adapted model of the bin just
// decoded or, while the decoder is idle, a model written by the host
// (the host computes the slice-start initialisation, the accelerator only
// keeps the models up to date).  The host write wins if both are requested.
// A small distributed memory like this suits the LUT RAM of an FPGA.  The
// size is set by the residual-coding contexts of the HEVC standard; the
// ports and the host load path are this design's own choice.
module context_memory
  import cabac_pkg::*;
#(
  parameter int unsigned DEPTH = cabac_pkg::NUM_CTX
) (
  input  logic     clk,
  input  ctx_idx_t rd_idx,
  output ctx_t     rd_data,
  input  logic     upd_we,
  input  ctx_idx_t upd_idx,
  input  ctx_t     upd_data,
  input  logic     host_we,
  input  ctx_idx_t host_idx,
  input  ctx_t     host_data
);
  ctx_t mem [DEPTH];

  assign rd_data = (32'(rd_idx) < DEPTH) ? mem[rd_idx] : '0;

  always_ff @(posedge clk) begin
    if (host_we && 32'(host_idx) < DEPTH)
      mem[host_idx] <= host_data;
    else if (upd_we && 32'(upd_idx) < DEPTH)
      mem[upd_idx] <= upd_data;
  end
endmodule
