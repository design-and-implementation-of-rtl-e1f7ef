// cabac_coeff_top: CABAC transform coefficient decoder for HEVC.
//
// The accelerator decodes the residual coding syntax of one transform block
// per command and returns its non-zero coefficients.  It joins the four
// steps of decoding a bin: context model selection (ctx_select inside
// residual_decoder), bin decoding with range and offset update
// (arith_decoder), context model adaptation (ctx_adapt inside
// arith_decoder, written back into context_memory) and selection of the
// next syntax element (residual_decoder).  All four happen in one clock
// cycle, so a bin is decoded per cycle when the bitstream keeps up.
//
// Three designs are selectable:
//  * baseline (default, both parameters 0): the four steps in one cycle.
//  * PIPELINED = 1: residual_decoder_pipelined does the next syntax element
//    selection, context selection and context memory read one cycle ahead
//    for both possible values of the bin in flight, so a clock period only
//    has to hold bin decoding and the choice between the two candidates.
//    The context memory is kept twice (same writes) to give the two read
//    ports.  Still one bin per cycle, at a shorter clock period.
//  * PARALLEL_BYPASS = 1: the parallel design, which decodes pairs of
//    bypass bins in one cycle by quaternary arithmetic decoding.
// PIPELINED takes precedence if both are set.
//
// Host side (a processor decodes the rest of the slice):
//  * ctx_ld_*  write a context model while no block is being decoded; the
//              host writes the slice-start initial models once per slice,
//              later blocks reuse the adapted models kept here.
//  * eng_ld_*  load the arithmetic decoder range and offset and empty the
//              bit buffer; eng_range, eng_offset and eng_buf_bits return
//              the state so that the host can continue after a block.
//  * s_*       32-bit bitstream words, first bit in bit 31.
//  * start     with the block's parameters starts a block; busy stays high
//              until done pulses.  Coefficients leave on coef_*, one per
//              cycle and not in scan order (placed by coef_pos).
//  * bin_count counts decoded bins (two for a bypass pair).
// The split of work between host and accelerator and this interface are
// this design's own choices.
module cabac_coeff_top
  import cabac_pkg::*;
#(
  parameter bit PIPELINED       = 1'b0,
  parameter bit PARALLEL_BYPASS = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // Context model loading.
  input  logic               ctx_ld_valid,
  input  ctx_idx_t           ctx_ld_idx,
  input  ctx_t               ctx_ld_data,
  // Arithmetic decoder state hand-over.
  input  logic               eng_ld_valid,
  input  logic [8:0]         eng_ld_range,
  input  logic [8:0]         eng_ld_offset,
  output logic [8:0]         eng_range,
  output logic [8:0]         eng_offset,
  output logic [6:0]         eng_buf_bits,
  // Bitstream.
  input  logic               s_valid,
  input  logic [31:0]        s_data,
  output logic               s_ready,
  // Transform block command.
  input  logic               start,
  input  logic [2:0]         log2_size,
  input  logic               chroma,
  input  logic [1:0]         scan_idx,
  input  logic               sign_hiding,
  input  logic               tq_bypass,
  input  logic               ts_enabled,
  output logic               busy,
  output logic               done,
  output logic               transform_skip,
  // Coefficients.
  output logic               coef_valid,
  output pos_t               coef_pos,
  output logic signed [15:0] coef_val,
  output logic [31:0]        bin_count
);
  logic       req_valid, req_ready;
  bin_mode_e  req_mode;
  ctx_idx_t   req_ctx;
  logic [1:0] dec_bins;
  ctx_idx_t   ctx_rd_idx, ctx_wr_idx;
  ctx_t       ctx_wr_data;
  logic       ctx_we;

  ctx_t       eng_model;

  if (PIPELINED) begin : g_pipe
    ctx_idx_t rd0_idx, rd1_idx;
    ctx_t     rd0_data, rd1_data;

    residual_decoder_pipelined u_syntax (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (start),
      .log2_size      (log2_size),
      .chroma         (chroma),
      .scan_idx       (scan_idx),
      .sign_hiding    (sign_hiding),
      .tq_bypass      (tq_bypass),
      .ts_enabled     (ts_enabled),
      .busy           (busy),
      .done           (done),
      .transform_skip (transform_skip),
      .req_valid      (req_valid),
      .req_mode       (req_mode),
      .req_ctx        (req_ctx),
      .req_model      (eng_model),
      .req_ready      (req_ready),
      .dec_bins       (dec_bins),
      .upd_we         (ctx_we),
      .upd_idx        (ctx_wr_idx),
      .upd_data       (ctx_wr_data),
      .ctx_rd0_idx    (rd0_idx),
      .ctx_rd0_data   (rd0_data),
      .ctx_rd1_idx    (rd1_idx),
      .ctx_rd1_data   (rd1_data),
      .coef_valid     (coef_valid),
      .coef_pos       (coef_pos),
      .coef_val       (coef_val)
    );

    // Two copies of the context memory, written together.
    context_memory u_ctx_mem0 (
      .clk       (clk),
      .rd_idx    (rd0_idx),
      .rd_data   (rd0_data),
      .upd_we    (ctx_we),
      .upd_idx   (ctx_wr_idx),
      .upd_data  (ctx_wr_data),
      .host_we   (ctx_ld_valid),
      .host_idx  (ctx_ld_idx),
      .host_data (ctx_ld_data)
    );

    context_memory u_ctx_mem1 (
      .clk       (clk),
      .rd_idx    (rd1_idx),
      .rd_data   (rd1_data),
      .upd_we    (ctx_we),
      .upd_idx   (ctx_wr_idx),
      .upd_data  (ctx_wr_data),
      .host_we   (ctx_ld_valid),
      .host_idx  (ctx_ld_idx),
      .host_data (ctx_ld_data)
    );
  end else begin : g_single
    residual_decoder #(.PARALLEL_BYPASS(PARALLEL_BYPASS)) u_syntax (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (start),
      .log2_size      (log2_size),
      .chroma         (chroma),
      .scan_idx       (scan_idx),
      .sign_hiding    (sign_hiding),
      .tq_bypass      (tq_bypass),
      .ts_enabled     (ts_enabled),
      .busy           (busy),
      .done           (done),
      .transform_skip (transform_skip),
      .req_valid      (req_valid),
      .req_mode       (req_mode),
      .req_ctx        (req_ctx),
      .req_ready      (req_ready),
      .dec_bins       (dec_bins),
      .coef_valid     (coef_valid),
      .coef_pos       (coef_pos),
      .coef_val       (coef_val)
    );

    // The engine reads the model of the current bin in the same cycle.
    context_memory u_ctx_mem (
      .clk       (clk),
      .rd_idx    (ctx_rd_idx),
      .rd_data   (eng_model),
      .upd_we    (ctx_we),
      .upd_idx   (ctx_wr_idx),
      .upd_data  (ctx_wr_data),
      .host_we   (ctx_ld_valid),
      .host_idx  (ctx_ld_idx),
      .host_data (ctx_ld_data)
    );
  end

  arith_decoder u_engine (
    .clk         (clk),
    .rst_n       (rst_n),
    .ld_valid    (eng_ld_valid),
    .ld_range    (eng_ld_range),
    .ld_offset   (eng_ld_offset),
    .range       (eng_range),
    .offset      (eng_offset),
    .buf_bits    (eng_buf_bits),
    .s_valid     (s_valid),
    .s_data      (s_data),
    .s_ready     (s_ready),
    .req_valid   (req_valid),
    .req_mode    (req_mode),
    .req_ctx     (req_ctx),
    .req_ready   (req_ready),
    .dec_bins    (dec_bins),
    .ctx_rd_idx  (ctx_rd_idx),
    .ctx_rd_data (eng_model),
    .ctx_we      (ctx_we),
    .ctx_wr_idx  (ctx_wr_idx),
    .ctx_wr_data (ctx_wr_data)
  );


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      bin_count <= '0;
    else if (req_valid && req_ready)
      bin_count <= bin_count + ((req_mode == MODE_BYPASS2) ? 32'd2 : 32'd1);
  end

  // The host loads models and engine state only between blocks, and not in
  // the cycle that starts a block.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ctx_ld_valid || eng_ld_valid) |-> !busy && !start);
endmodule
