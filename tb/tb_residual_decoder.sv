// tb_residual_decoder: self-checking test of the residual syntax controller.
//
// Two controllers run side by side, the baseline one (one bin per request)
// and the parallel one (pairs of bypass bins).  For each random transform
// block the reference model lists the bins of its syntax; a bin server in
// front of each controller hands them out and checks that every request
// asks for the right kind of bin and, for context-coded bins, the right
// context index.  The coefficients each controller sends are compared with
// the block, the bins it used with the reference count, and, on blocks
// served without stalls, its cycle count with the bin count plus the
// controller's per-sub-block overhead.
module tb_residual_decoder;
  import cabac_pkg::*;
  import cabac_tb_pkg::*;

  localparam int NUM_BLOCKS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // Shared block command.
  logic       start = 1'b0;
  logic [2:0] cfg_log2 = 3'd2;
  logic       cfg_chroma = 1'b0, cfg_sdh = 1'b0, cfg_tqb = 1'b0, cfg_tsen = 1'b0;
  logic [1:0] cfg_scan = 2'd0;
  bit         allow_stall = 1'b0;

  bin_rec_t q [2][$];
  int       got [2][32][32];
  int       ncoef [2];
  int       nbins [2];
  int       pairs = 0, stalls = 0;
  logic     done_seen [2];
  logic     tskip_out [2];

  for (genvar P = 0; P < 2; P++) begin : g_dut
    logic              req_valid, req_ready, busy, done, tskip, coef_valid;
    bin_mode_e         req_mode;
    ctx_idx_t          req_ctx;
    logic [1:0]        dec_bins;
    pos_t              coef_pos;
    logic signed [15:0] coef_val;

    residual_decoder #(.PARALLEL_BYPASS(P == 1)) dut (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (start),
      .log2_size      (cfg_log2),
      .chroma         (cfg_chroma),
      .scan_idx       (cfg_scan),
      .sign_hiding    (cfg_sdh),
      .tq_bypass      (cfg_tqb),
      .ts_enabled     (cfg_tsen),
      .busy           (busy),
      .done           (done),
      .transform_skip (tskip),
      .req_valid      (req_valid),
      .req_mode       (req_mode),
      .req_ctx        (req_ctx),
      .req_ready      (req_ready),
      .dec_bins       (dec_bins),
      .coef_valid     (coef_valid),
      .coef_pos       (coef_pos),
      .coef_val       (coef_val)
    );

    initial begin
      req_ready = 1'b0;
      dec_bins  = 2'b00;
    end

    // Offer the next bin half a cycle ahead of the clock edge.
    always @(negedge clk) begin
      req_ready = !(allow_stall && $urandom_range(0, 4) == 0);
      if (req_valid && !req_ready) stalls++;
      dec_bins = 2'b00;
      if (q[P].size() > 0) dec_bins[0] = q[P][0].val;
      if (q[P].size() > 1) dec_bins[1] = q[P][1].val;
    end

    always @(posedge clk) begin
      if (rst_n && req_valid && req_ready) begin
        checks++;
        if (q[P].size() == 0) begin
          failures++;
          $display("P%0d: bin requested beyond the end of the block", P);
        end else if (req_mode == MODE_DECISION) begin
          if (q[P][0].bypass || q[P][0].ctx != int'(req_ctx)) begin
            failures++;
            $display("P%0d: expected %s ctx %0d, got decision ctx %0d", P,
                     q[P][0].bypass ? "bypass" : "decision", q[P][0].ctx, req_ctx);
          end
          void'(q[P].pop_front());
          nbins[P]++;
        end else if (req_mode == MODE_BYPASS) begin
          if (!q[P][0].bypass) begin
            failures++;
            $display("P%0d: expected decision ctx %0d, got bypass", P, q[P][0].ctx);
          end
          void'(q[P].pop_front());
          nbins[P]++;
        end else begin
          pairs++;
          if (q[P].size() < 2 || !q[P][0].bypass || !q[P][1].bypass) begin
            failures++;
            $display("P%0d: bypass pair requested where none is", P);
          end
          void'(q[P].pop_front());
          if (q[P].size() > 0) void'(q[P].pop_front());
          nbins[P] += 2;
        end
      end
      if (rst_n && coef_valid) begin
        got[P][coef_pos.x][coef_pos.y] = int'(coef_val);
        ncoef[P]++;
      end
      if (rst_n && done) begin
        done_seen[P] = 1'b1;
        tskip_out[P] = tskip;
      end
    end
  end

  initial begin
    ResidualModel m;
    int t0, cyc, limit, nz;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NUM_BLOCKS; t++) begin
      m = new();
      m.randomize_block($urandom_range(2, 5), (t % 4 == 0) ? 60 : $urandom_range(3, 30));
      m.encode();
      for (int P = 0; P < 2; P++) begin
        q[P] = m.binq;
        foreach (got[P][x, y]) got[P][x][y] = 0;
        ncoef[P] = 0;
        nbins[P] = 0;
        done_seen[P] = 1'b0;
      end
      allow_stall = (t % 2 == 1);
      @(negedge clk);
      cfg_log2   = 3'(m.log2);
      cfg_chroma = m.chroma;
      cfg_scan   = 2'(m.scan);
      cfg_sdh    = m.sdh;
      cfg_tqb    = m.tqb;
      cfg_tsen   = m.tsen;
      start      = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t0 = cycle;
      while (!(done_seen[0] && done_seen[1]) && cycle - t0 < 20000) @(posedge clk);
      cyc = cycle - t0;
      nz = m.nonzero();
      for (int P = 0; P < 2; P++) begin
        checks++;
        if (!done_seen[P]) begin
          failures++;
          $display("P%0d block %0d: no done", P, t);
        end
        checks++;
        if (q[P].size() != 0 || nbins[P] != m.binq.size()) begin
          failures++;
          $display("P%0d block %0d: %0d bins left, %0d used of %0d", P, t, q[P].size(),
                   nbins[P], m.binq.size());
        end
        checks++;
        if (ncoef[P] != nz) begin
          failures++;
          $display("P%0d block %0d: %0d coefficients sent, %0d non-zero", P, t, ncoef[P], nz);
        end
        for (int x = 0; x < (1 << m.log2); x++)
          for (int y = 0; y < (1 << m.log2); y++) begin
            checks++;
            if (got[P][x][y] != m.coeff[x][y]) begin
              failures++;
              $display("P%0d block %0d (log2 %0d scan %0d chroma %0d): coeff(%0d,%0d) = %0d, expected %0d",
                       P, t, m.log2, m.scan, m.chroma, x, y, got[P][x][y], m.coeff[x][y]);
            end
          end
        if (m.tsen && !m.tqb && m.log2 == 2) begin
          checks++;
          if (tskip_out[P] != m.tsflag) begin
            failures++;
            $display("P%0d block %0d: transform_skip_flag wrong", P, t);
          end
        end
      end
      // Without stalls: one bin (or bypass pair) per cycle plus start,
      // last-position lookup, one per sub-block and one per hidden-sign
      // coefficient that needs no remaining-level bins.
      if (!allow_stall) begin
        limit = m.binq.size() + (1 << (2 * (m.log2 - 2))) + m.n_hidden + 4;
        checks++;
        if (cyc > limit) begin
          failures++;
          $display("block %0d: %0d cycles for %0d bins, limit %0d", t, cyc, m.binq.size(), limit);
        end
      end
      repeat (2) @(posedge clk);
    end
    checks++;
    if (pairs == 0) begin
      failures++;
      $display("no bypass pair was decoded");
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("no stall happened");
    end
    $display("bypass pairs %0d, stalled requests %0d", pairs, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
