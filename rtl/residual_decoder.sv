// residual_decoder: residual syntax controller of the baseline and the
// parallel design, the "next syntax element selection" of the transform
// coefficient decoder.
//
// The controller state (residual_pkg::rd_state_t) is one register; the step
// that computes the bin request of the current state and the next state is
// residual_step.  After start it walks the HEVC residual coding syntax of
// one transform block, asks the arithmetic decoder for every bin through
// req_valid / req_mode / req_ctx, and rebuilds the coefficient levels.  A
// request completes in the cycle req_ready is high, with the bin(s) in
// dec_bins; the next request follows in the next cycle, so selection,
// decoding and the update all happen within one clock period, as in the
// baseline decoding loop.  Each non-zero coefficient leaves on
// coef_valid / coef_pos / coef_val one cycle after its last bin;
// coefficients not sent are zero, and done pulses after the last one.
// PARALLEL_BYPASS = 1 gives the parallel design (bypass bins in pairs);
// with the default 0, MODE_BYPASS2 is never requested.
module residual_decoder
  import cabac_pkg::*;
  import residual_pkg::*;
#(
  parameter bit PARALLEL_BYPASS = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // Transform block to decode.
  input  logic               start,
  input  logic [2:0]         log2_size,    // 2..5 (4x4..32x32)
  input  logic               chroma,       // cIdx > 0
  input  logic [1:0]         scan_idx,     // 0 diagonal, 1 horizontal, 2 vertical
  input  logic               sign_hiding,  // sign_data_hiding_enabled_flag
  input  logic               tq_bypass,    // cu_transquant_bypass_flag
  input  logic               ts_enabled,   // transform_skip_enabled_flag
  output logic               busy,
  output logic               done,
  output logic               transform_skip,
  // Bin requests to the arithmetic decoder.
  output logic               req_valid,
  output bin_mode_e          req_mode,
  output ctx_idx_t           req_ctx,
  input  logic               req_ready,
  input  logic [1:0]         dec_bins,
  // Decoded non-zero coefficients.
  output logic               coef_valid,
  output pos_t               coef_pos,
  output logic signed [15:0] coef_val
);
  rd_state_t st, st_nx;
  rd_cfg_t   cfg;

  assign cfg = '{log2_size: log2_size, chroma: chroma, scan_idx: scan_idx,
                 sign_hiding: sign_hiding, tq_bypass: tq_bypass, ts_enabled: ts_enabled};

  residual_step #(.PARALLEL_BYPASS(PARALLEL_BYPASS)) u_step (
    .c         (st),
    .start     (start),
    .cfg       (cfg),
    .req_ready (req_ready),
    .dec_bins  (dec_bins),
    .req_valid (req_valid),
    .req_mode  (req_mode),
    .req_ctx   (req_ctx),
    .nx        (st_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= RD_RESET;
    else        st <= st_nx;
  end

  assign busy           = (st.phase != S_IDLE);
  assign done           = st.done;
  assign transform_skip = st.transform_skip;
  assign coef_valid     = st.coef_valid;
  assign coef_pos       = st.coef_pos;
  assign coef_val       = st.coef_val;
endmodule
