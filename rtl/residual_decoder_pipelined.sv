// residual_decoder_pipelined: residual syntax controller of the pipelined
// design.
//
// Same syntax walk, ports and coefficient output as residual_decoder (the
// step itself is residual_step), but context model selection and the
// context memory read for a bin are done one cycle before the bin is
// decoded.  The design has two stages:
//   stage 1  next syntax element selection, context selection and context
//            memory read for the following bin;
//   stage 2  bin decoding, range/offset update and context adaptation in
//            the arithmetic decoder, using the request register below.
// Which bin follows depends on the value of the bin being decoded, so
// stage 1 evaluates the controller step for both possible values (nx0 for
// a 0, nx1 for a 1), forms both following requests and reads both context
// models, through two read ports (ctx_rd0_*, ctx_rd1_*).  When the bin
// arrives the matching state and request are kept.  If the kept request
// uses the context that is adapted in this very cycle, the adapted model
// (upd_*, from the arithmetic decoder) is forwarded instead of the stale
// memory value.
//
// The request register drives req_valid, req_mode, req_ctx and req_model;
// the arithmetic decoder must take the model from req_model rather than
// reading the memory itself.  When req_ready is low the request and the
// state are held.  One bin per cycle, bypass bins one at a time.  The
// two-stage split with speculation on both bin values and forwarding
// follows the pipelined design; the register layout, the duplicated read
// port and the exact cut are this design's own.  Context loads by the host
// must not coincide with start (the first request of a block reads the
// memory in that cycle).  An assertion checks that the request register
// always equals the request the current state makes.
module residual_decoder_pipelined
  import cabac_pkg::*;
  import residual_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // Transform block to decode.
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
  // Registered bin request to the arithmetic decoder.
  output logic               req_valid,
  output bin_mode_e          req_mode,
  output ctx_idx_t           req_ctx,
  output ctx_t               req_model,
  input  logic               req_ready,
  input  logic [1:0]         dec_bins,
  // Adapted model written back by the arithmetic decoder this cycle.
  input  logic               upd_we,
  input  ctx_idx_t           upd_idx,
  input  ctx_t               upd_data,
  // Two context memory read ports (candidate for bin 0 and for bin 1).
  output ctx_idx_t           ctx_rd0_idx,
  input  ctx_t               ctx_rd0_data,
  output ctx_idx_t           ctx_rd1_idx,
  input  ctx_t               ctx_rd1_data,
  // Decoded non-zero coefficients.
  output logic               coef_valid,
  output pos_t               coef_pos,
  output logic signed [15:0] coef_val
);
  typedef struct packed {
    logic      valid;
    bin_mode_e mode;
    ctx_idx_t  idx;
    ctx_t      model;
  } req_reg_t;

  rd_state_t st, nx0, nx1, st_nx;
  rd_cfg_t   cfg;
  req_reg_t  rq, rq0, rq1, rq_nx;
  logic      fire;
  rd_state_t unused0, unused1;
  logic      cur_valid;
  bin_mode_e cur_mode;
  ctx_idx_t  cur_ctx;

  assign cfg = '{log2_size: log2_size, chroma: chroma, scan_idx: scan_idx,
                 sign_hiding: sign_hiding, tq_bypass: tq_bypass, ts_enabled: ts_enabled};
  assign fire = rq.valid && req_ready;

  // Next state if the bin in flight is 0 (also the only next state when
  // nothing is in flight, and the held state during a stall).
  residual_step #(.PARALLEL_BYPASS(1'b0)) u_step0 (
    .c (st), .start (start), .cfg (cfg),
    .req_ready (fire), .dec_bins (2'b00),
    .req_valid (cur_valid), .req_mode (cur_mode), .req_ctx (cur_ctx),
    .nx (nx0)
  );

  // Next state if the bin in flight is 1.
  residual_step #(.PARALLEL_BYPASS(1'b0)) u_step1 (
    .c (st), .start (start), .cfg (cfg),
    .req_ready (1'b1), .dec_bins (2'b01),
    .req_valid (), .req_mode (), .req_ctx (),
    .nx (nx1)
  );

  // The requests those two states make.
  residual_step #(.PARALLEL_BYPASS(1'b0)) u_req0 (
    .c (nx0), .start (1'b0), .cfg (cfg),
    .req_ready (1'b0), .dec_bins (2'b00),
    .req_valid (rq0.valid), .req_mode (rq0.mode), .req_ctx (rq0.idx),
    .nx (unused0)
  );

  residual_step #(.PARALLEL_BYPASS(1'b0)) u_req1 (
    .c (nx1), .start (1'b0), .cfg (cfg),
    .req_ready (1'b0), .dec_bins (2'b00),
    .req_valid (rq1.valid), .req_mode (rq1.mode), .req_ctx (rq1.idx),
    .nx (unused1)
  );

  assign ctx_rd0_idx = rq0.idx;
  assign ctx_rd1_idx = rq1.idx;
  assign rq0.model = (upd_we && upd_idx == rq0.idx) ? upd_data : ctx_rd0_data;
  assign rq1.model = (upd_we && upd_idx == rq1.idx) ? upd_data : ctx_rd1_data;

  // Keep the candidate that matches the decoded bin.
  always_comb begin
    if (fire && dec_bins[0]) begin
      st_nx = nx1;
      rq_nx = rq1;
    end else if (rq.valid && !req_ready) begin
      st_nx = nx0;   // equals st apart from the one-cycle output pulses
      rq_nx = rq;
    end else begin
      st_nx = nx0;
      rq_nx = rq0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= RD_RESET;
      rq <= '0;
    end else begin
      st <= st_nx;
      rq <= rq_nx;
    end
  end

  assign req_valid = rq.valid;
  assign req_mode  = rq.mode;
  assign req_ctx   = rq.idx;
  assign req_model = rq.model;

  // The registered request is always the one the current state makes.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rq.valid == cur_valid && (!cur_valid || (rq.mode == cur_mode && rq.idx == cur_ctx)));

  assign busy           = (st.phase != S_IDLE);
  assign done           = st.done;
  assign transform_skip = st.transform_skip;
  assign coef_valid     = st.coef_valid;
  assign coef_pos       = st.coef_pos;
  assign coef_val       = st.coef_val;
endmodule
