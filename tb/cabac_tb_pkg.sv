// cabac_tb_pkg: reference models for the CABAC coefficient decoder tests.
//
// CabacEncoder is an arithmetic encoder in the classic low/range form with
// outstanding-bit handling (the encoder counterpart of the HEVC decoding
// engine).  It writes a bit queue that the decoder under test must read
// back into the same bins.  ResidualModel draws a random transform block,
// applies sign data hiding the way an encoder would (it fixes the sign of
// the hidden coefficient to the parity of the sub-block level sum), and
// lists the bins of its residual coding syntax, each with its context index
// or as a bypass bin.  The syntax walk, the context selection and the level
// binarisation are written here from the HEVC standard in an encoder's
// style, separately from the RTL, so that both sides must agree.
package cabac_tb_pkg;
  import cabac_pkg::*;

  typedef struct {
    bit bypass;
    int ctx;
    bit val;
  } bin_rec_t;

  // ----------------------------------------------------------------------
  class CabacEncoder;
    int st[128];
    bit mps[128];
    int low, rng, outstanding;
    bit first;
    bit bits[$];

    function new();
      low = 0;
      rng = 510;
      outstanding = 0;
      first = 1;
    endfunction

    function void put_bit(bit b);
      if (first) first = 0;
      else bits.push_back(b);
      while (outstanding > 0) begin
        bits.push_back(!b);
        outstanding--;
      end
    endfunction

    function void renorm();
      while (rng < 256) begin
        if (low < 256) put_bit(0);
        else if (low >= 512) begin
          low -= 512;
          put_bit(1);
        end else begin
          low -= 256;
          outstanding++;
        end
        rng = rng << 1;
        low = low << 1;
      end
    endfunction

    function void enc_decision(int c, bit b);
      int rl;
      rl = int'(range_lps(6'(st[c]), 2'((rng >> 6) & 3)));
      rng -= rl;
      if (b != mps[c]) begin
        low += rng;
        rng = rl;
        if (st[c] == 0) mps[c] = !mps[c];
        st[c] = int'(trans_idx_lps(6'(st[c])));
      end else if (st[c] < 62) begin
        st[c]++;
      end
      renorm();
    endfunction

    function void enc_bypass(bit b);
      low = low << 1;
      if (b) low += rng;
      if (low >= 1024) begin
        put_bit(1);
        low -= 1024;
      end else if (low < 512) begin
        put_bit(0);
      end else begin
        low -= 512;
        outstanding++;
      end
    endfunction

    // Terminate as for end_of_slice_segment_flag = 1, then pad with zeros.
    function void finish();
      rng -= 2;
      low += rng;
      rng = 2;
      renorm();
      put_bit(bit'((low >> 9) & 1));
      bits.push_back(bit'((low >> 8) & 1));
      bits.push_back(1'b1);
      repeat (128) bits.push_back(1'b0);
    endfunction

    function void encode(const ref bin_rec_t b[$]);
      foreach (b[k]) begin
        if (b[k].bypass) enc_bypass(b[k].val);
        else enc_decision(b[k].ctx, b[k].val);
      end
    endfunction
  endclass

  // ----------------------------------------------------------------------
  // Scan position, following the scan generation loops of the standard.
  function automatic void ref_scan(int log2w, int scan, int idx, output int x, output int y);
    int w, i, xx, yy;
    w = 1 << log2w;
    if (scan == 1) begin
      x = idx % w;
      y = idx / w;
      return;
    end
    if (scan == 2) begin
      x = idx / w;
      y = idx % w;
      return;
    end
    i = 0;
    xx = 0;
    yy = 0;
    x = 0;
    y = 0;
    while (i < w * w) begin
      while (yy >= 0) begin
        if (xx < w && yy < w) begin
          if (i == idx) begin
            x = xx;
            y = yy;
          end
          i++;
        end
        yy--;
        xx++;
      end
      yy = xx;
      xx = 0;
    end
  endfunction

  // ----------------------------------------------------------------------
  class ResidualModel;
    int log2, scan;
    bit chroma, sdh, tqb, tsen, tsflag;
    int coeff[32][32];
    bin_rec_t binq[$];
    // How often each mechanism occurred in this block.
    int n_hidden, n_csbf0, n_infer_dc, n_gt2, n_escape, n_rice4, n_g1cap, n_ctxset_inc;
    int n_subblocks;

    function void add_ctx(int c, bit v);
      binq.push_back('{bypass: 0, ctx: c, val: v});
    endfunction

    function void add_byp(bit v);
      binq.push_back('{bypass: 1, ctx: 0, val: v});
    endfunction

    function int rand_level();
      int r;
      r = $urandom_range(0, 99);
      if (r < 55) return 1;
      if (r < 75) return 2;
      if (r < 85) return 3;
      if (r < 93) return $urandom_range(4, 12);
      if (r < 98) return $urandom_range(13, 200);
      return $urandom_range(201, 32000);
    endfunction

    // Random block; density in percent.
    function void randomize_block(int l2, int density);
      int w;
      log2 = l2;
      w = 1 << l2;
      scan = (l2 <= 3) ? $urandom_range(0, 2) : 0;
      chroma = $urandom_range(0, 3) == 0;
      tqb = $urandom_range(0, 7) == 0;
      sdh = $urandom_range(0, 3) != 0;
      tsen = $urandom_range(0, 1);
      tsflag = $urandom_range(0, 1);
      foreach (coeff[x, y]) coeff[x][y] = 0;
      for (int x = 0; x < w; x++)
        for (int y = 0; y < w; y++)
          if ($urandom_range(0, 99) < density)
            coeff[x][y] = ($urandom_range(0, 1) ? -1 : 1) * rand_level();
      if ($urandom_range(0, 3) == 0) begin
        // Keep energy in the low frequencies, like real residuals.
        for (int x = 0; x < w; x++)
          for (int y = 0; y < w; y++)
            if (x + y > w / 2) coeff[x][y] = 0;
      end
      if (coeff[0][0] == 0) coeff[0][0] = 1;
    endfunction

    function void last_prefix(int v, output int pre, output int suf);
      int grp[32] = '{0, 1, 2, 3, 4, 4, 5, 5, 6, 6, 6, 6, 7, 7, 7, 7,
                      8, 8, 8, 8, 8, 8, 8, 8, 9, 9, 9, 9, 9, 9, 9, 9};
      int mn[10] = '{0, 1, 2, 3, 4, 6, 8, 12, 16, 24};
      pre = grp[v];
      suf = v - mn[pre];
    endfunction

    function int sig_ctx(int xc, int yc, int r, int b);
      int map4[16] = '{0, 1, 4, 5, 2, 3, 4, 5, 6, 6, 8, 8, 7, 7, 8, 8};
      int s, xp, yp, pc;
      if (log2 == 2) s = map4[(yc << 2) + xc];
      else if (xc + yc == 0) s = 0;
      else begin
        xp = xc % 4;
        yp = yc % 4;
        pc = r + 2 * b;
        case (pc)
          0: s = (xp + yp == 0) ? 2 : (xp + yp < 3) ? 1 : 0;
          1: s = (yp == 0) ? 2 : (yp == 1) ? 1 : 0;
          2: s = (xp == 0) ? 2 : (xp == 1) ? 1 : 0;
          default: s = 2;
        endcase
        if (!chroma) begin
          if ((xc / 4) + (yc / 4) > 0) s += 3;
          s += (log2 == 3) ? ((scan == 0) ? 9 : 15) : 21;
        end else begin
          s += (log2 == 3) ? 9 : 12;
        end
      end
      return CTX_SIG + (chroma ? 27 + s : s);
    endfunction

    function void encode_remaining(int v, int k);
      int len, cn;
      if (v < (3 << k)) begin
        len = v >> k;
        repeat (len) add_byp(1);
        add_byp(0);
        for (int j = k - 1; j >= 0; j--) add_byp(bit'((v >> j) & 1));
      end else begin
        len = k;
        cn = v - (3 << k);
        while (cn >= (1 << len)) begin
          cn -= (1 << len);
          len++;
        end
        repeat (3 + len - k) add_byp(1);
        add_byp(0);
        for (int j = len - 1; j >= 0; j--) add_byp(bit'((cn >> j) & 1));
        n_escape++;
      end
    endfunction

    // Fix the hidden signs, then list the bins of the syntax.
    function void encode();
      int w, wsb, nsb, last_sb, last_n, lx, ly, cx, cy, pre, suf, off, sh;
      int csbf[8][8];
      int c1;
      binq.delete();
      n_hidden = 0; n_csbf0 = 0; n_infer_dc = 0; n_gt2 = 0; n_escape = 0;
      n_rice4 = 0; n_g1cap = 0; n_ctxset_inc = 0; n_subblocks = 0;
      w = 1 << log2;
      wsb = w / 4;
      nsb = wsb * wsb;

      // Sign hiding: the encoder chooses the hidden sign by level parity.
      for (int i = 0; i < nsb; i++) begin
        int xs, ys, hi, lo, sum, xn, yn;
        ref_scan(log2 - 2, scan, i, xs, ys);
        hi = -1;
        lo = 16;
        sum = 0;
        for (int n = 0; n < 16; n++) begin
          ref_scan(2, scan, n, xn, yn);
          if (coeff[xs * 4 + xn][ys * 4 + yn] != 0) begin
            if (hi < 0 || n > hi) hi = n;
            if (n < lo) lo = n;
            sum += (coeff[xs * 4 + xn][ys * 4 + yn] < 0) ? -coeff[xs * 4 + xn][ys * 4 + yn]
                                                          : coeff[xs * 4 + xn][ys * 4 + yn];
          end
        end
        if (sdh && !tqb && hi >= 0 && hi - lo > 3) begin
          ref_scan(2, scan, lo, xn, yn);
          cx = coeff[xs * 4 + xn][ys * 4 + yn];
          if (cx < 0) cx = -cx;
          coeff[xs * 4 + xn][ys * 4 + yn] = (sum % 2 == 1) ? -cx : cx;
        end
      end

      if (tsen && !tqb && log2 == 2) add_ctx(CTX_TSKIP + (chroma ? 1 : 0), tsflag);

      // Last significant coefficient in scan order.
      last_sb = -1;
      last_n = -1;
      lx = 0;
      ly = 0;
      for (int i = nsb - 1; i >= 0 && last_sb < 0; i--) begin
        int xs, ys, xn, yn;
        ref_scan(log2 - 2, scan, i, xs, ys);
        for (int n = 15; n >= 0 && last_sb < 0; n--) begin
          ref_scan(2, scan, n, xn, yn);
          if (coeff[xs * 4 + xn][ys * 4 + yn] != 0) begin
            last_sb = i;
            last_n = n;
            lx = xs * 4 + xn;
            ly = ys * 4 + yn;
          end
        end
      end
      cx = (scan == 2) ? ly : lx;
      cy = (scan == 2) ? lx : ly;
      if (chroma) begin
        off = 15;
        sh = log2 - 2;
      end else begin
        off = 3 * (log2 - 2) + ((log2 - 1) >> 2);
        sh = (log2 + 1) >> 2;
      end
      for (int axis = 0; axis < 2; axis++) begin
        int base;
        base = (axis == 0) ? CTX_LAST_X : CTX_LAST_Y;
        last_prefix((axis == 0) ? cx : cy, pre, suf);
        for (int k = 0; k < pre; k++) add_ctx(base + off + (k >> sh), 1);
        if (pre < 2 * log2 - 1) add_ctx(base + off + (pre >> sh), 0);
      end
      for (int axis = 0; axis < 2; axis++) begin
        last_prefix((axis == 0) ? cx : cy, pre, suf);
        if (pre > 3)
          for (int j = (pre >> 1) - 2; j >= 0; j--) add_byp(bit'((suf >> j) & 1));
      end

      foreach (csbf[a, b]) csbf[a][b] = 0;
      c1 = 1;
      for (int i = last_sb; i >= 0; i--) begin
        int xs, ys, xn, yn, r, b, any, infer, sig[16], lst[$], first_g1, ctx_set, num_sig, rice;
        int hi, lo;
        bit hidden;
        ref_scan(log2 - 2, scan, i, xs, ys);
        any = 0;
        for (int n = 0; n < 16; n++) begin
          ref_scan(2, scan, n, xn, yn);
          if (coeff[xs * 4 + xn][ys * 4 + yn] != 0) any = 1;
        end
        r = (xs + 1 < wsb) ? csbf[xs + 1][ys] : 0;
        b = (ys + 1 < wsb) ? csbf[xs][ys + 1] : 0;
        infer = 0;
        if (i < last_sb && i > 0) begin
          add_ctx(CTX_CSBF + ((r | b) ? 1 : 0) + (chroma ? 2 : 0), bit'(any));
          csbf[xs][ys] = any;
          infer = 1;
          if (!any) n_csbf0++;
        end else begin
          csbf[xs][ys] = 1;
        end
        if (!csbf[xs][ys]) continue;
        n_subblocks++;
        foreach (sig[k]) sig[k] = 0;
        if (i == last_sb) sig[last_n] = 1;
        for (int n = (i == last_sb) ? last_n - 1 : 15; n >= 0; n--) begin
          int s;
          ref_scan(2, scan, n, xn, yn);
          s = coeff[xs * 4 + xn][ys * 4 + yn] != 0;
          if (n > 0 || !infer) begin
            add_ctx(sig_ctx(xs * 4 + xn, ys * 4 + yn, r, b), bit'(s));
            if (s) infer = 0;
          end else begin
            n_infer_dc++;
          end
          sig[n] = s;
        end
        for (int n = 15; n >= 0; n--) if (sig[n]) lst.push_back(n);
        if (lst.size() == 0) continue;
        hi = lst[0];
        lo = lst[lst.size() - 1];

        ctx_set = (i > 0 && !chroma) ? 2 : 0;
        if (c1 == 0) begin
          ctx_set++;
          n_ctxset_inc++;
        end
        c1 = 1;
        first_g1 = -1;
        if (lst.size() > 8) n_g1cap++;
        for (int k = 0; k < lst.size() && k < 8; k++) begin
          int a;
          ref_scan(2, scan, lst[k], xn, yn);
          a = coeff[xs * 4 + xn][ys * 4 + yn];
          a = (a < 0) ? -a : a;
          add_ctx(CTX_GT1 + 4 * ctx_set + c1 + (chroma ? 16 : 0), bit'(a > 1));
          if (a > 1) begin
            c1 = 0;
            if (first_g1 < 0) first_g1 = lst[k];
          end else if (c1 > 0 && c1 < 3) begin
            c1++;
          end
        end
        if (first_g1 >= 0) begin
          int a;
          ref_scan(2, scan, first_g1, xn, yn);
          a = coeff[xs * 4 + xn][ys * 4 + yn];
          a = (a < 0) ? -a : a;
          add_ctx(CTX_GT2 + ctx_set + (chroma ? 4 : 0), bit'(a > 2));
          n_gt2++;
        end
        hidden = sdh && !tqb && (hi - lo > 3);
        if (hidden) n_hidden++;
        foreach (lst[k]) begin
          if (hidden && lst[k] == lo) continue;
          ref_scan(2, scan, lst[k], xn, yn);
          add_byp(coeff[xs * 4 + xn][ys * 4 + yn] < 0);
        end
        num_sig = 0;
        rice = 0;
        foreach (lst[k]) begin
          int a, base, thr;
          ref_scan(2, scan, lst[k], xn, yn);
          a = coeff[xs * 4 + xn][ys * 4 + yn];
          a = (a < 0) ? -a : a;
          base = 1 + ((num_sig < 8 && a > 1) ? 1 : 0) + ((lst[k] == first_g1 && a > 2) ? 1 : 0);
          thr = (num_sig < 8) ? ((lst[k] == first_g1) ? 3 : 2) : 1;
          if (base == thr) begin
            encode_remaining(a - base, rice);
            if (a > 3 * (1 << rice)) rice = (rice + 1 > 4) ? 4 : rice + 1;
            if (rice == 4) n_rice4++;
          end
          num_sig++;
        end
      end
    endfunction

    function int nonzero();
      int c;
      c = 0;
      foreach (coeff[x, y]) if (coeff[x][y] != 0) c++;
      return c;
    endfunction
  endclass

endpackage
