// tb_arith_decoder: self-checking test of the arithmetic decoding engine.
//
// A reference encoder codes a long random mix of context-coded bins (with
// skewed probabilities so that the states travel over their whole range),
// single bypass bins and bypass pairs.  The engine, attached to a context
// memory loaded with the same initial models, decodes the stream and every
// bin is compared.  The bitstream words arrive with random gaps, which must
// only delay the engine; in stretches where the stream keeps the buffer
// full the engine must serve one request per cycle.  At the end the range
// is checked against the encoder's.
module tb_arith_decoder;
  import cabac_pkg::*;
  import cabac_tb_pkg::*;

  localparam int NUM_BINS = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        ld_valid = 1'b0;
  logic [8:0]  ld_range = '0, ld_offset = '0;
  logic [8:0]  range, offset;
  logic [6:0]  buf_bits;
  logic        s_valid = 1'b0, s_ready;
  logic [31:0] s_data = '0;
  logic        req_valid = 1'b0, req_ready;
  bin_mode_e   req_mode = MODE_DECISION;
  ctx_idx_t    req_ctx = '0;
  logic [1:0]  dec_bins;
  ctx_idx_t    ctx_rd_idx, ctx_wr_idx;
  ctx_t        ctx_rd_data, ctx_wr_data;
  logic        ctx_we;
  logic        host_we = 1'b0;
  ctx_idx_t    host_idx = '0;
  ctx_t        host_data = '0;

  arith_decoder dut (
    .clk, .rst_n, .ld_valid, .ld_range, .ld_offset, .range, .offset, .buf_bits,
    .s_valid, .s_data, .s_ready, .req_valid, .req_mode, .req_ctx, .req_ready,
    .dec_bins, .ctx_rd_idx, .ctx_rd_data, .ctx_we, .ctx_wr_idx, .ctx_wr_data
  );

  context_memory u_mem (
    .clk, .rd_idx(ctx_rd_idx), .rd_data(ctx_rd_data), .upd_we(ctx_we),
    .upd_idx(ctx_wr_idx), .upd_data(ctx_wr_data), .host_we, .host_idx, .host_data
  );

  typedef struct {
    bin_mode_e mode;
    int        ctx;
    bit [1:0]  val;
  } req_t;

  CabacEncoder enc;
  req_t        reqs[$];
  int          init_st[128];
  bit          init_mps[128];
  int          prob[128];
  int          word_idx = 0;
  bit          gaps = 1'b1;
  bit          feed_en = 1'b0;
  int          nwords;
  int          rng_end;

  function automatic logic [31:0] word_at(int k);
    logic [31:0] w;
    for (int j = 0; j < 32; j++) begin
      int b;
      b = 9 + 32 * k + j;
      w[31 - j] = (b < enc.bits.size()) ? enc.bits[b] : 1'b0;
    end
    return w;
  endfunction

  // Bitstream feeder.
  always @(negedge clk) begin
    s_valid = feed_en && (word_idx < nwords) && !(gaps && $urandom_range(0, 2) == 0);
    s_data  = word_at(word_idx);
  end
  always @(posedge clk) if (s_valid && s_ready) word_idx++;

  initial begin
    int k, served, t0, cyc, full_run;
    enc = new();
    for (int c = 0; c < 128; c++) begin
      init_st[c]  = $urandom_range(0, 62);
      init_mps[c] = $urandom_range(0, 1);
      enc.st[c]   = init_st[c];
      enc.mps[c]  = init_mps[c];
      prob[c]     = $urandom_range(0, 100);
    end
    for (int i = 0; i < NUM_BINS; i++) begin
      req_t r;
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 6) begin
        r.mode = MODE_DECISION;
        r.ctx  = $urandom_range(0, NUM_CTX - 1);
        r.val  = {1'b0, bit'($urandom_range(0, 99) < prob[r.ctx])};
        enc.enc_decision(r.ctx, r.val[0]);
      end else if (kind < 8) begin
        r.mode = MODE_BYPASS;
        r.ctx  = 0;
        r.val  = {1'b0, bit'($urandom_range(0, 1))};
        enc.enc_bypass(r.val[0]);
      end else begin
        r.mode = MODE_BYPASS2;
        r.ctx  = 0;
        r.val  = 2'($urandom_range(0, 3));
        enc.enc_bypass(r.val[0]);
        enc.enc_bypass(r.val[1]);
      end
      reqs.push_back(r);
    end
    rng_end = enc.rng;
    enc.finish();
    nwords = (enc.bits.size() - 9) / 32 + 1;

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Load the initial models.
    for (int c = 0; c < NUM_CTX; c++) begin
      @(negedge clk);
      host_we   = 1'b1;
      host_idx  = 7'(c);
      host_data = '{state: 6'(init_st[c]), mps: init_mps[c]};
    end
    @(negedge clk);
    host_we = 1'b0;
    // Hand over the engine state: range 510, the first nine bits.
    ld_valid  = 1'b1;
    ld_range  = 9'd510;
    for (int j = 0; j < 9; j++) ld_offset[8 - j] = enc.bits[j];
    @(negedge clk);
    ld_valid = 1'b0;
    feed_en  = 1'b1;

    served = 0;
    k = 0;
    full_run = 0;
    t0 = 0;
    while (k < reqs.size()) begin
      // After the first half, stop the gaps and measure the rate.
      if (k == reqs.size() / 2 && gaps) begin
        req_valid = 1'b0;
        gaps = 1'b0;
        repeat (8) @(negedge clk);
        t0 = served;
        cyc = 0;
      end
      req_valid = 1'b1;
      req_mode  = reqs[k].mode;
      req_ctx   = 7'(reqs[k].ctx);
      #1;
      if (req_ready) begin
        checks++;
        if (reqs[k].mode == MODE_BYPASS2 ? (dec_bins != {reqs[k].val[1], reqs[k].val[0]})
                                         : (dec_bins[0] != reqs[k].val[0])) begin
          failures++;
          if (failures < 10)
            $display("bin %0d (mode %0d ctx %0d): got %b expected %b", k, reqs[k].mode,
                     reqs[k].ctx, dec_bins, reqs[k].val);
        end
        k++;
        served++;
      end
      @(negedge clk);
      if (!gaps) cyc++;
    end
    req_valid = 1'b0;
    // One request per cycle once the stream keeps up.
    checks++;
    if (served - t0 != cyc) begin
      failures++;
      $display("%0d requests took %0d cycles", served - t0, cyc);
    end
    checks++;
    if (range != 9'(rng_end)) begin
      failures++;
      $display("final range %0d, encoder range %0d", range, rng_end);
    end
    $display("decoded %0d requests, %0d words read", served, word_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
