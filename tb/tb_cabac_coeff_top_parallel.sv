// tb_cabac_coeff_top_parallel: end-to-end test of the parallel design,
// the coefficient decoder with PARALLEL_BYPASS = 1, which decodes pairs of
// bypass bins (signs and fixed-length suffixes) in one cycle.
//
// Same slice test as tb_cabac_coeff_top: random blocks of all sizes, scans
// and flag settings are coded into one arithmetic-coded bitstream by the
// reference model and decoded by the design; coefficients, flags, bin
// counts and cycle counts are checked, every mechanism must occur, and in
// addition bypass pairs must occur.  Its throughput line can be set against
// the baseline's.
module tb_cabac_coeff_top_parallel;
  import cabac_pkg::*;
  import cabac_tb_pkg::*;

  localparam int NUM_BLOCKS = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  logic               ctx_ld_valid = 1'b0;
  ctx_idx_t           ctx_ld_idx = '0;
  ctx_t               ctx_ld_data = '0;
  logic               eng_ld_valid = 1'b0;
  logic [8:0]         eng_ld_range = '0, eng_ld_offset = '0;
  logic [8:0]         eng_range, eng_offset;
  logic [6:0]         eng_buf_bits;
  logic               s_valid = 1'b0, s_ready;
  logic [31:0]        s_data = '0;
  logic               start = 1'b0;
  logic [2:0]         log2_size = 3'd2;
  logic               chroma = 1'b0, sign_hiding = 1'b0, tq_bypass = 1'b0, ts_enabled = 1'b0;
  logic [1:0]         scan_idx = '0;
  logic               busy, done, transform_skip, coef_valid;
  pos_t               coef_pos;
  logic signed [15:0] coef_val;
  logic [31:0]        bin_count;

  cabac_coeff_top #(.PARALLEL_BYPASS(1'b1)) dut (.*);

  CabacEncoder  enc;
  ResidualModel blocks[$];
  int           word_idx = 0, nwords = 0;
  bit           feed_en = 1'b0, gaps = 1'b1;
  int           got[32][32];
  int           ncoef;
  int           stalls = 0;
  int           pairs = 0;

  function automatic logic [31:0] word_at(int k);
    logic [31:0] w;
    for (int j = 0; j < 32; j++) begin
      int b;
      b = 9 + 32 * k + j;
      w[31 - j] = (b < enc.bits.size()) ? enc.bits[b] : 1'b0;
    end
    return w;
  endfunction

  always @(negedge clk) begin
    s_valid = feed_en && (word_idx < nwords) && !(gaps && $urandom_range(0, 7) != 0);
    s_data  = word_at(word_idx);
  end
  always @(posedge clk) begin
    if (s_valid && s_ready) word_idx++;
    if (dut.req_valid && !dut.req_ready) stalls++;
    if (dut.req_valid && dut.req_ready && dut.req_mode == MODE_BYPASS2) pairs++;
    if (coef_valid) begin
      got[coef_pos.x][coef_pos.y] = int'(coef_val);
      ncoef++;
    end
  end

  initial begin
    int init_st[128];
    bit init_mps[128];
    int n_hidden, n_csbf0, n_infer, n_gt2, n_escape, n_rice4, n_g1cap, n_ts;
    int n_scan[3], n_size[6], n_chroma;
    int total_bins, total_cycles, t0, cyc, limit, b0, nz;
    ResidualModel m;

    enc = new();
    for (int c = 0; c < 128; c++) begin
      init_st[c]  = $urandom_range(0, 62);
      init_mps[c] = $urandom_range(0, 1);
      enc.st[c]   = init_st[c];
      enc.mps[c]  = init_mps[c];
    end
    n_hidden = 0; n_csbf0 = 0; n_infer = 0; n_gt2 = 0; n_escape = 0; n_rice4 = 0;
    n_g1cap = 0; n_ts = 0; n_chroma = 0;
    foreach (n_scan[k]) n_scan[k] = 0;
    foreach (n_size[k]) n_size[k] = 0;
    for (int t = 0; t < NUM_BLOCKS; t++) begin
      m = new();
      m.randomize_block($urandom_range(2, 5), (t % 5 == 0) ? 70 : $urandom_range(2, 35));
      m.encode();
      enc.encode(m.binq);
      blocks.push_back(m);
      n_hidden += m.n_hidden;
      n_csbf0  += m.n_csbf0;
      n_infer  += m.n_infer_dc;
      n_gt2    += m.n_gt2;
      n_escape += m.n_escape;
      n_rice4  += m.n_rice4;
      n_g1cap  += m.n_g1cap;
      n_ts     += (m.tsen && !m.tqb && m.log2 == 2) ? 1 : 0;
      n_scan[m.scan]++;
      n_size[m.log2]++;
      n_chroma += m.chroma;
    end
    enc.finish();
    nwords = (enc.bits.size() - 9) / 32 + 1;

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NUM_CTX; c++) begin
      @(negedge clk);
      ctx_ld_valid = 1'b1;
      ctx_ld_idx   = 7'(c);
      ctx_ld_data  = '{state: 6'(init_st[c]), mps: init_mps[c]};
    end
    @(negedge clk);
    ctx_ld_valid  = 1'b0;
    eng_ld_valid  = 1'b1;
    eng_ld_range  = 9'd510;
    for (int j = 0; j < 9; j++) eng_ld_offset[8 - j] = enc.bits[j];
    @(negedge clk);
    eng_ld_valid = 1'b0;
    feed_en = 1'b1;

    total_bins = 0;
    total_cycles = 0;
    foreach (blocks[t]) begin
      m = blocks[t];
      gaps = (t % 2 == 0);
      foreach (got[x, y]) got[x][y] = 0;
      ncoef = 0;
      repeat (3) @(negedge clk);
      log2_size   = 3'(m.log2);
      chroma      = m.chroma;
      scan_idx    = 2'(m.scan);
      sign_hiding = m.sdh;
      tq_bypass   = m.tqb;
      ts_enabled  = m.tsen;
      b0          = int'(bin_count);
      start       = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t0 = cycle;
      while (!done && cycle - t0 < 50000) @(posedge clk);
      cyc = cycle - t0;
      @(negedge clk);
      nz = m.nonzero();
      checks++;
      if (cyc >= 50000) begin
        failures++;
        $display("block %0d: no done", t);
      end
      checks++;
      if (int'(bin_count) - b0 != m.binq.size()) begin
        failures++;
        $display("block %0d: %0d bins decoded, %0d coded", t, int'(bin_count) - b0, m.binq.size());
      end
      checks++;
      if (ncoef != nz) begin
        failures++;
        $display("block %0d: %0d coefficients, %0d expected", t, ncoef, nz);
      end
      for (int x = 0; x < (1 << m.log2); x++)
        for (int y = 0; y < (1 << m.log2); y++) begin
          checks++;
          if (got[x][y] != m.coeff[x][y]) begin
            failures++;
            if (failures < 20)
              $display("block %0d: coeff(%0d,%0d) = %0d, expected %0d", t, x, y, got[x][y], m.coeff[x][y]);
          end
        end
      if (m.tsen && !m.tqb && m.log2 == 2) begin
        checks++;
        if (transform_skip != m.tsflag) begin
          failures++;
          $display("block %0d: transform_skip_flag wrong", t);
        end
      end
      if (!gaps) begin
        // The baseline's bound (one cycle per bin plus start, lookup, one per
        // sub-block and one per hidden sign) also holds here: a bypass pair
        // counts two bins but takes one cycle, which pays for the extra
        // cycle when both coefficients of the pair are complete.
        limit = m.binq.size() + (1 << (2 * (m.log2 - 2))) + m.n_hidden + 4;
        checks++;
        if (cyc > limit) begin
          failures++;
          $display("block %0d: %0d cycles for %0d bins, limit %0d", t, cyc, m.binq.size(), limit);
        end
        total_bins += m.binq.size();
        total_cycles += cyc;
      end
    end

    begin
      static string names[] = '{"input stall", "sign hiding", "uncoded sub-block", "inferred DC",
                         "greater2 flag", "greater1 cap", "escape remaining", "Rice 4",
                         "diagonal scan", "horizontal scan", "vertical scan", "4x4", "8x8",
                         "16x16", "32x32", "chroma", "transform skip", "bypass pair"};
      int counts[18];
      counts = '{stalls, n_hidden, n_csbf0, n_infer, n_gt2, n_g1cap, n_escape, n_rice4,
                       n_scan[0], n_scan[1], n_scan[2], n_size[2], n_size[3], n_size[4],
                       n_size[5], n_chroma, n_ts, pairs};
      foreach (names[k]) begin
        checks++;
        $display("  %-18s %0d", names[k], counts[k]);
        if (counts[k] == 0) begin
          failures++;
          $display("mechanism never exercised: %s", names[k]);
        end
      end
    end
    $display("throughput without input gaps: %0d bins in %0d cycles (%0d.%02d bins/cycle)",
             total_bins, total_cycles, total_bins / total_cycles,
             (100 * total_bins / total_cycles) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
