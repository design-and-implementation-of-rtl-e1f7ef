// ctx_adapt: the "context model adaptation" step of the CABAC decoder.
//
// Purely combinational.  After a context-coded bin the probability state of
// its context model moves towards the observed value: an MPS raises the
// state by one (saturating at 62), an LPS takes the state from the
// transition table and, in state 0, swaps the MPS.  This is the HEVC state
// machine; the module only packages it for the write-back into the context
// memory.
module ctx_adapt
  import cabac_pkg::*;
(
  input  ctx_t ctx,
  input  logic bin,
  output ctx_t ctx_next
);
  always_comb begin
    if (bin == ctx.mps) begin
      ctx_next.mps   = ctx.mps;
      ctx_next.state = (ctx.state < 6'd62) ? ctx.state + 6'd1 : ctx.state;
    end else begin
      ctx_next.mps   = (ctx.state == 6'd0) ? ~ctx.mps : ctx.mps;
      ctx_next.state = trans_idx_lps(ctx.state);
    end
  end
endmodule
