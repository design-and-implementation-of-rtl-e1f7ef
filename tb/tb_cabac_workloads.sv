// tb_cabac_workloads: throughput of the three designs on low, medium and
// high bitrate coefficient data.
//
// The reference evaluation of this architecture measured a small (low
// bitrate), an average and a big (high bitrate) video.  Those streams are
// not available here, so this test synthesises transform blocks with the
// statistics that tell such streams apart: a low bitrate has mostly small
// blocks with few coefficients near DC and levels of 1 or 2; a high bitrate
// has larger blocks, coefficients spread further into the high frequencies
// and larger levels.  BLOCKS_PER_PROFILE blocks of each profile are coded
// into one bitstream (random initial context models, as a slice would load
// them).  Three instances of cabac_coeff_top (baseline, PIPELINED = 1 and
// PARALLEL_BYPASS = 1) decode the same stream side by side, each fed
// without gaps by its own host process.
//
// Every coefficient, the bin count of every block and a per-block cycle
// bound are checked for each design.  Per profile and design the test then
// prints bins, cycles, bins per cycle and the resulting Mbins/s at the
// reference clock frequencies (66 MHz for the baseline and the parallel
// design, 75 MHz for the pipelined one).  It fails unless the pipelined
// design takes exactly the baseline's cycles (its gain is the clock) and
// the parallel design takes fewer cycles than the baseline in every
// profile, and unless each profile actually produced bypass pairs.
module tb_cabac_workloads;
  import cabac_pkg::*;
  import cabac_tb_pkg::*;

  localparam int BLOCKS_PER_PROFILE = 400;
  localparam int NPROF = 3;
  localparam int NDES  = 3;   // 0 baseline, 1 pipelined, 2 parallel

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  CabacEncoder  enc;
  ResidualModel blocks[$];
  int           prof_of[$];
  int           nwords = 0;
  int           init_st[128];
  bit           init_mps[128];
  bit           go = 1'b0;
  bit           ended[NDES];
  longint       n_bins[NDES][NPROF], n_cyc[NDES][NPROF];
  int           n_pairs[NPROF];

  function automatic logic [31:0] word_at(int k);
    logic [31:0] w;
    for (int j = 0; j < 32; j++) begin
      int b;
      b = 9 + 32 * k + j;
      w[31 - j] = (b < enc.bits.size()) ? enc.bits[b] : 1'b0;
    end
    return w;
  endfunction

  // Block of profile prof: 0 low, 1 medium, 2 high bitrate.
  function automatic void video_block(ResidualModel m, int prof);
    int r, w, d, p, lvl;
    int size_cut[3][3] = '{'{50, 80, 95}, '{30, 65, 90}, '{20, 55, 85}};
    int p0[3] = '{45, 75, 95};
    int slope[3] = '{14, 9, 5};
    int cont[3] = '{20, 40, 60};
    r = $urandom_range(0, 99);
    m.log2 = (r < size_cut[prof][0]) ? 2 : (r < size_cut[prof][1]) ? 3 :
             (r < size_cut[prof][2]) ? 4 : 5;
    w = 1 << m.log2;
    r = $urandom_range(0, 9);
    m.scan   = (m.log2 <= 3 && r >= 6) ? ((r >= 8) ? 2 : 1) : 0;
    m.chroma = $urandom_range(0, 2) == 0;
    m.tqb    = 1'b0;
    m.sdh    = 1'b1;
    m.tsen   = 1'b1;
    m.tsflag = $urandom_range(0, 4) == 0;
    foreach (m.coeff[x, y]) m.coeff[x][y] = 0;
    for (int x = 0; x < w; x++)
      for (int y = 0; y < w; y++) begin
        d = ((x + y) << 3) >> m.log2;        // distance from DC, 0..15
        p = p0[prof] - slope[prof] * d;
        if (int'($urandom_range(0, 99)) < p) begin
          lvl = 1;
          while (lvl < 30 && int'($urandom_range(0, 99)) < cont[prof]) lvl++;
          if ($urandom_range(0, 199) == 0) lvl += $urandom_range(30, 3000);
          m.coeff[x][y] = ($urandom_range(0, 1) ? -1 : 1) * lvl;
        end
      end
    if (m.coeff[0][0] == 0) m.coeff[0][0] = 1;
  endfunction

  for (genvar g = 0; g < NDES; g++) begin : g_des
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
    int                 word_idx = 0;
    bit                 feed_en = 1'b0;
    int                 got[32][32];
    int                 ncoef = 0;
    int                 cur_prof = 0;

    cabac_coeff_top #(.PIPELINED(g == 1), .PARALLEL_BYPASS(g == 2)) dut (.*);

    always @(negedge clk) begin
      s_valid = feed_en && (word_idx < nwords);
      s_data  = word_at(word_idx);
    end
    always @(posedge clk) begin
      if (s_valid && s_ready) word_idx++;
      if (coef_valid) begin
        got[coef_pos.x][coef_pos.y] = int'(coef_val);
        ncoef++;
      end
      if (g == 2 && dut.req_valid && dut.req_ready && dut.req_mode == MODE_BYPASS2)
        n_pairs[cur_prof]++;
    end

    initial begin
      int t0, cyc, b0, nz, limit;
      ResidualModel m;
      wait (go);
      for (int c = 0; c < NUM_CTX; c++) begin
        @(negedge clk);
        ctx_ld_valid = 1'b1;
        ctx_ld_idx   = 7'(c);
        ctx_ld_data  = '{state: 6'(init_st[c]), mps: init_mps[c]};
      end
      @(negedge clk);
      ctx_ld_valid = 1'b0;
      eng_ld_valid = 1'b1;
      eng_ld_range = 9'd510;
      for (int j = 0; j < 9; j++) eng_ld_offset[8 - j] = enc.bits[j];
      @(negedge clk);
      eng_ld_valid = 1'b0;
      feed_en = 1'b1;
      repeat (4) @(negedge clk);

      foreach (blocks[t]) begin
        m = blocks[t];
        cur_prof = prof_of[t];
        foreach (got[x, y]) got[x][y] = 0;
        ncoef = 0;
        @(negedge clk);
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
        n_bins[g][cur_prof] += longint'(m.binq.size());
        n_cyc[g][cur_prof]  += longint'(cyc);
        checks++;
        if (int'(bin_count) - b0 != m.binq.size() || ncoef != nz) begin
          failures++;
          $display("design %0d block %0d: %0d bins / %0d coefficients, expected %0d / %0d",
                   g, t, int'(bin_count) - b0, ncoef, m.binq.size(), nz);
        end
        for (int x = 0; x < (1 << m.log2); x++)
          for (int y = 0; y < (1 << m.log2); y++) begin
            checks++;
            if (got[x][y] != m.coeff[x][y]) begin
              failures++;
              if (failures < 20)
                $display("design %0d block %0d: coeff(%0d,%0d) = %0d, expected %0d",
                         g, t, x, y, got[x][y], m.coeff[x][y]);
            end
          end
        // Baseline and pipelined: one bin per cycle plus start, lookup, one
        // per sub-block and one per hidden-sign coefficient; the parallel
        // design must do at least as well as that.
        limit = m.binq.size() + (1 << (2 * (m.log2 - 2))) + m.n_hidden + 4;
        checks++;
        if (cyc > limit) begin
          failures++;
          $display("design %0d block %0d: %0d cycles, limit %0d", g, t, cyc, limit);
        end
      end
      ended[g] = 1'b1;
    end
  end

  initial begin
    ResidualModel m;
    string pname[3] = '{"low bitrate", "medium bitrate", "high bitrate"};
    string dname[3] = '{"baseline", "pipelined", "parallel"};
    int    mhz[3] = '{66, 75, 66};
    longint x100;
    string  frac;

    enc = new();
    for (int c = 0; c < 128; c++) begin
      init_st[c]  = $urandom_range(0, 62);
      init_mps[c] = $urandom_range(0, 1);
      enc.st[c]   = init_st[c];
      enc.mps[c]  = init_mps[c];
    end
    foreach (n_bins[d, p]) begin
      n_bins[d][p] = 0;
      n_cyc[d][p]  = 0;
    end
    foreach (n_pairs[p]) n_pairs[p] = 0;
    for (int p = 0; p < NPROF; p++)
      for (int t = 0; t < BLOCKS_PER_PROFILE; t++) begin
        m = new();
        video_block(m, p);
        m.encode();
        enc.encode(m.binq);
        blocks.push_back(m);
        prof_of.push_back(p);
      end
    enc.finish();
    nwords = (enc.bits.size() - 9) / 32 + 1;

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    go = 1'b1;
    wait (ended[0] && ended[1] && ended[2]);

    for (int p = 0; p < NPROF; p++) begin
      $display("%s:", pname[p]);
      for (int d = 0; d < NDES; d++) begin
        x100 = (n_cyc[d][p] > 0) ? 100 * n_bins[d][p] / n_cyc[d][p] : 0;
        frac = $sformatf("%0d", int'(x100 % 100));
        if (x100 % 100 < 10) frac = {"0", frac};
        $display("  %-9s %7d bins %7d cycles  %0d.%s bins/cycle  %0d Mbins/s at %0d MHz",
                 dname[d], n_bins[d][p], n_cyc[d][p], int'(x100 / 100), frac,
                 int'(x100 * mhz[d] / 100), mhz[d]);
      end
      x100 = (n_cyc[2][p] > 0) ? 1000 * n_cyc[0][p] / n_cyc[2][p] - 1000 : 0;
      $display("  parallel over baseline: +%0d.%0d %%", int'(x100 / 10), int'(x100 % 10));
      checks++;
      if (n_cyc[1][p] != n_cyc[0][p]) begin
        failures++;
        $display("  pipelined cycles differ from the baseline's");
      end
      checks++;
      if (!(n_cyc[2][p] < n_cyc[0][p])) begin
        failures++;
        $display("  parallel design not faster than the baseline");
      end
      checks++;
      if (n_pairs[p] == 0) begin
        failures++;
        $display("  no bypass pairs decoded");
      end
    end
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
