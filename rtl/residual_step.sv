// residual_step: one step of the residual syntax controller, the "next
// syntax element selection" of the transform coefficient decoder.
//
// Purely combinational.  From the controller state c (see residual_pkg),
// the block command and the answer of the arithmetic decoder it computes
// the bin request of the current state (req_valid, req_mode and, through
// ctx_select, req_ctx) and the next state nx.  The walk it implements is the
// HEVC residual coding syntax of one transform block: transform_skip_flag
// when allowed, the last significant position (context-coded x and y
// prefixes, then bypass suffixes), then the 4x4 sub-blocks from the one
// holding the last coefficient down to sub-block 0.  Per sub-block:
// coded_sub_block_flag (except for the first and the last sub-block),
// sig_coeff_flag per position (the last position and, when inferable, the
// DC position are not coded), up to eight coeff_abs_level_greater1_flags,
// one coeff_abs_level_greater2_flag, the sign bits (the first one hidden by
// parity when sign data hiding applies), and coeff_abs_level_remaining
// (Rice/Exp-Golomb with the Rice parameter 0..4 adapted within the
// sub-block) for each coefficient whose level is not yet complete.  A
// completed non-zero coefficient is placed in nx.coef_*, nx.done marks the
// end of the block.  A coefficient whose level is already complete after
// the greater1/greater2 flags is sent in the cycle that reads its sign, so
// the remaining-level pass only visits the others (and the coefficient
// whose sign is hidden, which always comes last because its sign needs the
// parity of all levels).  The mask `sent` records what has left; the
// greater1 limit of eight per sub-block is applied by the rank of the
// position among the significant ones.
//
// With PARALLEL_BYPASS set, sign bits and fixed-length suffixes are asked
// for two at a time (MODE_BYPASS2), as in the parallel design; the unary
// prefix of the remaining level stays one bin per request because its end
// is not known in advance.  The syntax and inference rules follow the HEVC
// standard (version 1, no range extensions).  Cycle costs beyond one per
// bin are this design's: one cycle after start, one for the last-position
// lookup, one to enter a sub-block (its level pass is set up in the cycle
// that reads its last significance flag), and one for a hidden-sign
// coefficient that needs no remaining-level bins (in the parallel design
// also for the second of a sign pair when both are complete, since one
// coefficient leaves per cycle).  The prefix of coeff_abs_level_remaining
// is capped at 20 ones, which no conforming stream with 16-bit
// coefficients exceeds.
module residual_step
  import cabac_pkg::*;
  import residual_pkg::*;
#(
  parameter bit PARALLEL_BYPASS = 1'b0
) (
  input  rd_state_t  c,
  input  logic       start,
  input  rd_cfg_t    cfg,
  input  logic       req_ready,
  input  logic [1:0] dec_bins,
  output logic       req_valid,
  output bin_mode_e  req_mode,
  output ctx_idx_t   req_ctx,
  output rd_state_t  nx
);
  localparam logic [4:0] MAX_PREFIX = 5'd20;

  logic [2:0] log2_size;
  logic       chroma, sign_hiding, tq_bypass, ts_enabled;
  logic [1:0] scan_idx;
  assign log2_size   = cfg.log2_size;
  assign chroma      = cfg.chroma;
  assign scan_idx    = cfg.scan_idx;
  assign sign_hiding = cfg.sign_hiding;
  assign tq_bypass   = cfg.tq_bypass;
  assign ts_enabled  = cfg.ts_enabled;

  // ------------------------------------------------------------------
  // Helpers.
  function automatic logic [4:0] highest_below(input logic [15:0] v,
                                               input logic [4:0]  lim);
    // {found, pos}: highest set bit of v below position lim.
    logic [4:0] r;
    r = 5'd0;
    for (int k = 0; k < 16; k++)
      if (v[k] && 5'(k) < lim) r = {1'b1, 4'(k)};
    return r;
  endfunction

  function automatic logic [4:0] count_above(input logic [15:0] v,
                                             input logic [3:0]  pos);
    // Number of set bits of v above position pos.
    logic [4:0] r;
    r = 5'd0;
    for (int k = 0; k < 16; k++)
      if (v[k] && 4'(k) > pos) r = r + 5'd1;
    return r;
  endfunction

  function automatic logic [3:0] lowest(input logic [15:0] v);
    logic [3:0] r;
    r = 4'd0;
    for (int k = 15; k >= 0; k--)
      if (v[k]) r = 4'(k);
    return r;
  endfunction

  function automatic logic [4:0] last_coord(input logic [3:0] pre,
                                            input logic [2:0] suf);
    if (pre <= 4'd3) return 5'(pre);
    return 5'(((32'd1 << ((32'(pre) >> 1) - 1)) * (2 + 32'(pre[0]))) + 32'(suf));
  endfunction

  // Start the level pass of a sub-block whose significance map s.sig is
  // complete, or end the block if it has no coefficient (only sub-block 0
  // can, when its DC flag was read as 0).
  function automatic rd_state_t level_setup(input rd_state_t s);
    rd_state_t r;
    r = s;
    if (s.sig == 16'd0) begin
      r.phase = S_IDLE;
      r.done = 1'b1;
    end else begin
      r.p = highest_below(s.sig, 5'd16)[3:0];
      r.first_sig = lowest(s.sig);
      r.hidden = s.sdh && (highest_below(s.sig, 5'd16)[3:0] - lowest(s.sig) > 4'd3);
      r.ctx_set = ((s.sb_i != 6'd0 && !s.chr) ? 2'd2 : 2'd0) + ((s.c1 == 2'd0) ? 2'd1 : 2'd0);
      r.c1 = 2'd1;
      r.num_g1 = '0;
      r.has_g1 = 1'b0;
      r.g2 = 1'b0;
      r.sent = '0;
      r.parity = 1'b0;
      r.phase = S_GT1;
    end
    return r;
  endfunction

  // ------------------------------------------------------------------
  // Positions of the current sub-block and coefficient.
  logic [1:0]  log2w_sb;
  logic [5:0]  sb_xy, c_xy, c_xy2;
  logic [2:0]  xs, ys;
  logic [3:0]  cur_n;
  logic [4:0]  xc, yc;
  logic [5:0]  wsb;
  logic        csbf_r, csbf_b;

  always_comb begin
    log2w_sb = 2'(c.log2 - 3'd2);
    sb_xy    = scan_xy(log2w_sb, c.scan, c.sb_i);
    xs       = sb_xy[5:3];
    ys       = sb_xy[2:0];
    cur_n    = (c.phase == S_SIG) ? c.n : c.p;
    c_xy     = scan_xy(2'd2, c.scan, {2'b00, cur_n});
    xc       = {xs, c_xy[4:3]};
    yc       = {ys, c_xy[1:0]};
    wsb      = 6'd1 << log2w_sb;
    csbf_r   = (6'(xs) + 6'd1 < wsb) ? c.csbf[{ys, 3'(xs + 3'd1)}] : 1'b0;
    csbf_b   = (6'(ys) + 6'd1 < wsb) ? c.csbf[{3'(ys + 3'd1), xs}] : 1'b0;
  end

  // ------------------------------------------------------------------
  // Bin request.
  se_e        se;
  logic [4:0] nx_sig;       // next significant position below c.p
  logic [4:0] nn_sig;       // the one after it
  logic [4:0] nx_pend;      // next position below c.p not yet output
  logic [4:0] rank;         // significant positions above c.p
  logic       sign_two;
  logic       suf_two;
  logic       sig_needed;
  logic       base_ok;      // coefficient at c.p needs no remaining level
  logic [1:0] base_lvl;
  logic       base_ok2;     // the same for the second sign of a pair
  logic [1:0] base_lvl2;

  always_comb begin
    nx_sig     = highest_below(c.sig, {1'b0, c.p});
    nn_sig     = highest_below(c.sig, {1'b0, nx_sig[3:0]});
    c_xy2      = scan_xy(2'd2, c.scan, {2'b00, nx_sig[3:0]});
    nx_pend    = highest_below(c.sig & ~c.sent, {1'b0, c.p});
    rank       = count_above(c.sig, c.p);
    sign_two   = PARALLEL_BYPASS && nx_sig[4] && !(c.hidden && nx_sig[3:0] == c.first_sig);
    suf_two    = PARALLEL_BYPASS && ((c.phase == S_REM_SUF) ? (c.sufrem >= 5'd2) : (c.suf_left >= 3'd2));
    sig_needed = !(c.n == 4'd0 && c.infer_dc);
    base_lvl   = 2'd1 + 2'(c.g1[c.p]) + 2'(c.has_g1 && c.p == c.g1pos && c.g2);
    base_ok    = base_lvl != ((rank < 5'd8) ? ((c.has_g1 && c.p == c.g1pos) ? 2'd3 : 2'd2) : 2'd1);
    base_lvl2  = 2'd1 + 2'(c.g1[nx_sig[3:0]]) + 2'(c.has_g1 && nx_sig[3:0] == c.g1pos && c.g2);
    base_ok2   = base_lvl2 != ((rank + 5'd1 < 5'd8) ?
                               ((c.has_g1 && nx_sig[3:0] == c.g1pos) ? 2'd3 : 2'd2) : 2'd1);

    req_valid = 1'b0;
    req_mode  = MODE_DECISION;
    se        = SE_SIG;
    unique case (c.phase)
      S_TSKIP:     begin req_valid = 1'b1; se = SE_TSKIP; end
      S_LASTX:     begin req_valid = 1'b1; se = SE_LASTX; end
      S_LASTY:     begin req_valid = 1'b1; se = SE_LASTY; end
      S_LASTX_SUF, S_LASTY_SUF, S_REM_SUF: begin
        req_valid = 1'b1;
        req_mode  = suf_two ? MODE_BYPASS2 : MODE_BYPASS;
      end
      S_CSBF:      begin req_valid = 1'b1; se = SE_CSBF; end
      S_SIG:       begin req_valid = sig_needed; se = SE_SIG; end
      S_GT1:       begin req_valid = 1'b1; se = SE_GT1; end
      S_GT2:       begin req_valid = 1'b1; se = SE_GT2; end
      S_SIGN: begin
        req_valid = 1'b1;
        req_mode  = sign_two ? MODE_BYPASS2 : MODE_BYPASS;
      end
      S_REM: begin
        req_valid = !base_ok;
        req_mode  = MODE_BYPASS;
      end
      default: ;
    endcase
  end

  ctx_select u_ctx (
    .se         (se),
    .log2_size  (c.log2),
    .chroma     (c.chr),
    .scan_idx   (c.scan),
    .bin_idx    (c.bin_idx),
    .xc         (xc),
    .yc         (yc),
    .csbf_right (csbf_r),
    .csbf_below (csbf_b),
    .ctx_set    (c.ctx_set),
    .g1ctx      (c.c1),
    .ctx_idx    (req_ctx)
  );

  // ------------------------------------------------------------------
  // Level completion in S_REM / S_REM_SUF.
  logic        fire;
  logic        b0, b1;
  logic [20:0] suf_nx;
  logic [4:0]  sufrem_nx;
  logic [4:0]  suf_len;      // suffix length once the c.prefix has ended
  logic [23:0] rem_val, level;
  logic        emit, neg, parity_nx;
  logic [2:0]  rice_nx;
  logic [4:0]  lastx, lasty;

  always_comb begin
    fire = req_valid && req_ready;
    b0   = dec_bins[0];
    b1   = dec_bins[1];

    suf_nx    = (req_mode == MODE_BYPASS2) ? {c.sufacc[18:0], b0, b1} : {c.sufacc[19:0], b0};
    sufrem_nx = c.sufrem - ((req_mode == MODE_BYPASS2) ? 5'd2 : 5'd1);
    suf_len   = (c.prefix <= 5'd3) ? 5'(c.rice) : c.prefix - 5'd3 + 5'(c.rice);

    // Completed remaining-level value.
    if (c.phase == S_REM_SUF) begin
      if (c.prefix <= 5'd3) rem_val = (24'(c.prefix) << c.rice) + 24'(suf_nx);
      else rem_val = (((24'd1 << (c.prefix - 5'd3)) + 24'd2) << c.rice) + 24'(suf_nx);
    end else begin
      // Prefix just ended with no suffix bits (c.rice 0, c.prefix <= 3).
      rem_val = 24'(c.prefix);
    end

    emit = 1'b0;
    if (c.phase == S_REM) begin
      if (base_ok) emit = 1'b1;
      else if (fire && (!b0 || c.prefix == MAX_PREFIX) && suf_len == 5'd0) emit = 1'b1;
    end else if (c.phase == S_REM_SUF && fire && sufrem_nx == 5'd0) begin
      emit = 1'b1;
    end
    level     = 24'(base_lvl) + ((c.phase == S_REM && base_ok) ? 24'd0 : rem_val);
    parity_nx = c.parity ^ level[0];
    neg       = (c.hidden && c.p == c.first_sig) ? parity_nx : c.sgn[c.p];
    rice_nx   = c.rice;
    if (!(c.phase == S_REM && base_ok) && level > (24'd3 << c.rice) && c.rice < 3'd4)
      rice_nx = c.rice + 3'd1;

    lastx = last_coord(c.lx_pre, c.lx_suf);
    lasty = last_coord(c.ly_pre, c.ly_suf);
    if (c.scan == 2'd2) begin
      lastx = last_coord(c.ly_pre, c.ly_suf);
      lasty = last_coord(c.lx_pre, c.lx_suf);
    end
  end

  // ------------------------------------------------------------------
  // Sequencer.
  logic [3:0] cmax;
  logic [3:0] pre_nx;
  logic       pre_end;
  assign cmax    = 4'({c.log2, 1'b0} - 4'd1);
  assign pre_end = fire && (!b0 || c.bin_idx + 4'd1 == cmax);
  assign pre_nx  = b0 ? c.bin_idx + 4'd1 : c.bin_idx;

  // Sign pass: is another sign to be read, and which coefficients are
  // still to be output once it ends.
  logic        sign_more;
  logic [15:0] pend_after;
  always_comb begin
    if (req_mode == MODE_BYPASS2)
      sign_more = nn_sig[4] && !(c.hidden && nn_sig[3:0] == c.first_sig);
    else
      sign_more = nx_sig[4] && !(c.hidden && nx_sig[3:0] == c.first_sig);
    pend_after = c.sig & ~c.sent;
    if (base_ok) pend_after[c.p] = 1'b0;
    else if (req_mode == MODE_BYPASS2 && base_ok2) pend_after[nx_sig[3:0]] = 1'b0;
  end

  always_comb begin
    nx            = c;
    nx.done       = 1'b0;
    nx.coef_valid = 1'b0;
    unique case (c.phase)
      S_IDLE: if (start) begin
        nx.log2 = log2_size;
        nx.chr = chroma;
        nx.scan = scan_idx;
        nx.sdh = sign_hiding && !tq_bypass;
        nx.transform_skip = 1'b0;
        nx.csbf = '0;
        nx.c1 = 2'd1;
        nx.bin_idx = '0;
        nx.lx_suf = '0;
        nx.ly_suf = '0;
        nx.phase = (ts_enabled && !tq_bypass && log2_size == 3'd2) ? S_TSKIP : S_LASTX;
      end

      S_TSKIP: if (fire) begin
        nx.transform_skip = b0;
        nx.phase = S_LASTX;
      end

      S_LASTX: if (fire) begin
        nx.bin_idx = c.bin_idx + 4'd1;
        if (pre_end) begin
          nx.lx_pre = pre_nx;
          nx.bin_idx = '0;
          nx.phase = S_LASTY;
        end
      end

      S_LASTY: if (fire) begin
        nx.bin_idx = c.bin_idx + 4'd1;
        if (pre_end) begin
          nx.ly_pre = pre_nx;
          nx.bin_idx = '0;
          if (c.lx_pre > 4'd3) begin
            nx.suf_left = 3'((c.lx_pre >> 1) - 4'd1);
            nx.phase = S_LASTX_SUF;
          end else if (pre_nx > 4'd3) begin
            nx.suf_left = 3'((pre_nx >> 1) - 4'd1);
            nx.phase = S_LASTY_SUF;
          end else begin
            nx.phase = S_LOCATE;
          end
        end
      end

      S_LASTX_SUF: if (fire) begin
        nx.lx_suf = (req_mode == MODE_BYPASS2) ? {c.lx_suf[0], b0, b1} : {c.lx_suf[1:0], b0};
        nx.suf_left = c.suf_left - ((req_mode == MODE_BYPASS2) ? 3'd2 : 3'd1);
        if (c.suf_left == ((req_mode == MODE_BYPASS2) ? 3'd2 : 3'd1)) begin
          if (c.ly_pre > 4'd3) begin
            nx.suf_left = 3'((c.ly_pre >> 1) - 4'd1);
            nx.phase = S_LASTY_SUF;
          end else begin
            nx.phase = S_LOCATE;
          end
        end
      end

      S_LASTY_SUF: if (fire) begin
        nx.ly_suf = (req_mode == MODE_BYPASS2) ? {c.ly_suf[0], b0, b1} : {c.ly_suf[1:0], b0};
        nx.suf_left = c.suf_left - ((req_mode == MODE_BYPASS2) ? 3'd2 : 3'd1);
        if (c.suf_left == ((req_mode == MODE_BYPASS2) ? 3'd2 : 3'd1))
          nx.phase = S_LOCATE;
      end

      S_LOCATE: begin
        nx.last_sb = scan_index(log2w_sb, c.scan, lastx[4:2], lasty[4:2]);
        nx.sb_i = scan_index(log2w_sb, c.scan, lastx[4:2], lasty[4:2]);
        nx.last_n = 4'(scan_index(2'd2, c.scan, {1'b0, lastx[1:0]}, {1'b0, lasty[1:0]}));
        nx.phase = S_SB_START;
      end

      S_SB_START: begin
        nx.sig = '0;
        nx.g1 = '0;
        nx.sgn = '0;
        nx.infer_dc = 1'b0;
        if (c.sb_i == c.last_sb) begin
          nx.sig[c.last_n] = 1'b1;
          nx.csbf[{ys, xs}] = 1'b1;
          nx.n = c.last_n - 4'd1;
          nx.phase = S_SIG;
          if (c.last_n == 4'd0) nx = level_setup(nx);
        end else if (c.sb_i == 6'd0) begin
          nx.csbf[{ys, xs}] = 1'b1;
          nx.n = 4'd15;
          nx.phase = S_SIG;
        end else begin
          nx.phase = S_CSBF;
        end
      end

      S_CSBF: if (fire) begin
        nx.csbf[{ys, xs}] = b0;
        if (b0) begin
          nx.infer_dc = 1'b1;
          nx.n = 4'd15;
          nx.phase = S_SIG;
        end else begin
          nx.sb_i = c.sb_i - 6'd1;
          nx.phase = S_SB_START;
        end
      end

      S_SIG: begin
        // The level pass is set up in the cycle that ends the map.
        if (!sig_needed) begin
          nx.sig[0] = 1'b1;
          nx = level_setup(nx);
        end else if (fire) begin
          nx.sig[c.n] = b0;
          if (b0) nx.infer_dc = 1'b0;
          if (c.n == 4'd0) nx = level_setup(nx);
          else nx.n = c.n - 4'd1;
        end
      end

      S_GT1: if (fire) begin
        nx.g1[c.p] = b0;
        nx.num_g1 = c.num_g1 + 4'd1;
        if (b0 && !c.has_g1) begin
          nx.has_g1 = 1'b1;
          nx.g1pos = c.p;
        end
        nx.c1 = b0 ? 2'd0 : ((c.c1 != 2'd0 && c.c1 != 2'd3) ? c.c1 + 2'd1 : c.c1);
        if (nx_sig[4] && c.num_g1 != 4'd7) begin
          nx.p = nx_sig[3:0];
        end else begin
          nx.p = highest_below(c.sig, 5'd16)[3:0];
          nx.phase = (c.has_g1 || b0) ? S_GT2 : S_SIGN;
        end
      end

      S_GT2: if (fire) begin
        nx.g2 = b0;
        nx.phase = S_SIGN;
      end

      S_SIGN: if (fire) begin
        nx.sgn[c.p] = b0;
        if (req_mode == MODE_BYPASS2) nx.sgn[nx_sig[3:0]] = b1;
        // A coefficient whose level is already complete leaves now (of a
        // pair, the first one if it can, else the second).
        if (base_ok) begin
          nx.coef_valid = 1'b1;
          nx.coef_pos = {xc, yc};
          nx.coef_val = b0 ? -16'(base_lvl) : 16'(base_lvl);
          nx.parity = c.parity ^ base_lvl[0];
          nx.sent[c.p] = 1'b1;
        end else if (req_mode == MODE_BYPASS2 && base_ok2) begin
          nx.coef_valid = 1'b1;
          nx.coef_pos = {xs, c_xy2[4:3], ys, c_xy2[1:0]};
          nx.coef_val = b1 ? -16'(base_lvl2) : 16'(base_lvl2);
          nx.parity = c.parity ^ base_lvl2[0];
          nx.sent[nx_sig[3:0]] = 1'b1;
        end
        if (sign_more) begin
          nx.p = (req_mode == MODE_BYPASS2) ? nn_sig[3:0] : nx_sig[3:0];
        end else if (pend_after == 16'd0) begin
          if (c.sb_i == 6'd0) begin
            nx.phase = S_IDLE;
            nx.done = 1'b1;
          end else begin
            nx.sb_i = c.sb_i - 6'd1;
            nx.phase = S_SB_START;
          end
        end else begin
          nx.p = highest_below(pend_after, 5'd16)[3:0];
          nx.rice = '0;
          nx.prefix = '0;
          nx.phase = S_REM;
        end
      end

      S_REM: if (!base_ok && fire && !emit) begin
        if (b0 && c.prefix != MAX_PREFIX) begin
          nx.prefix = c.prefix + 5'd1;
        end else begin
          nx.sufrem = suf_len;
          nx.sufacc = '0;
          nx.phase = S_REM_SUF;
        end
      end

      S_REM_SUF: if (fire && !emit) begin
        nx.sufacc = suf_nx;
        nx.sufrem = sufrem_nx;
      end

      default: nx.phase = S_IDLE;
    endcase

    // A coefficient is complete: send it and move to the next one.
    if (emit) begin
      nx.coef_valid = 1'b1;
      nx.coef_pos = {xc, yc};
      nx.coef_val = neg ? -16'(level) : 16'(level);
      nx.parity = parity_nx;
      nx.rice = rice_nx;
      nx.sent[c.p] = 1'b1;
      nx.prefix = '0;
      if (nx_pend[4]) begin
        nx.p = nx_pend[3:0];
        nx.phase = S_REM;
      end else if (c.sb_i == 6'd0) begin
        nx.phase = S_IDLE;
        nx.done = 1'b1;
      end else begin
        nx.sb_i = c.sb_i - 6'd1;
        nx.phase = S_SB_START;
      end
    end
  end
endmodule
