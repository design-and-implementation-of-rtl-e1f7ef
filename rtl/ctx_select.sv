// ctx_select: the "context model selection" step for transform coefficient
// decoding.
//
// Purely combinational.  Given the syntax element the controller is about to
// decode and the little state it depends on, it returns the context memory
// address (region base from cabac_pkg plus ctxInc):
//   transform_skip_flag       luma 0, chroma 1
//   last_sig_coeff_x/y_prefix (bin_idx >> shift) + offset, where luma uses
//                             offset 3*(log2-2)+((log2-1)>>2) and shift
//                             (log2+1)>>2, chroma offset 15 and shift log2-2
//   coded_sub_block_flag      min(right + below coded, 1), +2 for chroma
//   sig_coeff_flag            4x4: fixed position map; DC: 0; otherwise a
//                             pattern chosen by the coded flags of the right
//                             and lower sub-blocks, plus offsets for
//                             sub-block, size, scan and colour component
//   coeff_abs_level_greater1  4*ctx_set + greater1 counter, +16 for chroma
//   coeff_abs_level_greater2  ctx_set, +4 for chroma
// These rules are those of the HEVC standard (9.3.4.2); the packing into one
// memory is this design's.
module ctx_select
  import cabac_pkg::*;
(
  input  se_e        se,
  input  logic [2:0] log2_size,  // 2..5
  input  logic       chroma,     // cIdx > 0
  input  logic [1:0] scan_idx,   // 0 diagonal, 1 horizontal, 2 vertical
  input  logic [3:0] bin_idx,    // bin of the last position prefix
  input  logic [4:0] xc,         // coefficient column in the block
  input  logic [4:0] yc,         // coefficient row in the block
  input  logic       csbf_right, // sub-block to the right is coded
  input  logic       csbf_below, // sub-block below is coded
  input  logic [1:0] ctx_set,
  input  logic [1:0] g1ctx,      // greater1 counter, 0..3
  output ctx_idx_t   ctx_idx
);
  logic [3:0] last_off;
  logic [2:0] last_shift;
  logic [4:0] sig_ctx;
  logic [1:0] xp, yp;
  logic [3:0] map4;
  logic [6:0] inc;

  always_comb begin
    // Last position prefix.
    if (chroma) begin
      last_off   = 4'd15;
      last_shift = log2_size - 3'd2;
    end else begin
      last_off   = 4'(3 * (32'(log2_size) - 2) + ((32'(log2_size) - 1) >> 2));
      last_shift = 3'((32'(log2_size) + 1) >> 2);
    end

    // Significance.
    xp = xc[1:0];
    yp = yc[1:0];
    unique case ({yc[1:0], xc[1:0]})
      4'd0:  map4 = 4'd0;  4'd1:  map4 = 4'd1;  4'd2:  map4 = 4'd4;  4'd3:  map4 = 4'd5;
      4'd4:  map4 = 4'd2;  4'd5:  map4 = 4'd3;  4'd6:  map4 = 4'd4;  4'd7:  map4 = 4'd5;
      4'd8:  map4 = 4'd6;  4'd9:  map4 = 4'd6;  4'd10: map4 = 4'd8;  4'd11: map4 = 4'd8;
      4'd12: map4 = 4'd7;  4'd13: map4 = 4'd7;  4'd14: map4 = 4'd8;  default: map4 = 4'd8;
    endcase
    if (log2_size == 3'd2) begin
      sig_ctx = {1'b0, map4};
    end else if (xc == 5'd0 && yc == 5'd0) begin
      sig_ctx = 5'd0;
    end else begin
      unique case ({csbf_below, csbf_right})
        2'b00:   sig_ctx = (xp == 2'd0 && yp == 2'd0) ? 5'd2 : (3'(xp) + 3'(yp) < 3'd3) ? 5'd1 : 5'd0;
        2'b01:   sig_ctx = (yp == 2'd0) ? 5'd2 : (yp == 2'd1) ? 5'd1 : 5'd0;
        2'b10:   sig_ctx = (xp == 2'd0) ? 5'd2 : (xp == 2'd1) ? 5'd1 : 5'd0;
        default: sig_ctx = 5'd2;
      endcase
      if (!chroma) begin
        if (xc[4:2] != 3'd0 || yc[4:2] != 3'd0) sig_ctx = sig_ctx + 5'd3;
        if (log2_size == 3'd3) sig_ctx = sig_ctx + ((scan_idx == 2'd0) ? 5'd9 : 5'd15);
        else                   sig_ctx = sig_ctx + 5'd21;
      end else begin
        if (log2_size == 3'd3) sig_ctx = sig_ctx + 5'd9;
        else                   sig_ctx = sig_ctx + 5'd12;
      end
    end

    unique case (se)
      SE_TSKIP: inc = 7'(CTX_TSKIP) + 7'(chroma);
      SE_LASTX: inc = 7'(CTX_LAST_X) + 7'(last_off) + 7'(bin_idx >> last_shift);
      SE_LASTY: inc = 7'(CTX_LAST_Y) + 7'(last_off) + 7'(bin_idx >> last_shift);
      SE_CSBF:  inc = 7'(CTX_CSBF) + 7'(csbf_right | csbf_below) + (chroma ? 7'd2 : 7'd0);
      SE_SIG:   inc = 7'(CTX_SIG) + 7'(sig_ctx) + (chroma ? 7'd27 : 7'd0);
      SE_GT1:   inc = 7'(CTX_GT1) + 7'({ctx_set, g1ctx}) + (chroma ? 7'd16 : 7'd0);
      default:  inc = 7'(CTX_GT2) + 7'(ctx_set) + (chroma ? 7'd4 : 7'd0);
    endcase
    ctx_idx = inc;
  end
endmodule
