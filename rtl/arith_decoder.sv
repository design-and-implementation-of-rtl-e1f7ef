// arith_decoder: the binary arithmetic decoding engine of the CABAC decoder.
//
// It holds the engine state (9-bit range and offset) and a 64-bit bitstream
// buffer, and joins the steps of one bin: bin decoding (bin_decoder), range
// update (range_update), offset update (offset_update) and context model
// adaptation (ctx_adapt).  A bin request (req_valid, req_mode, req_ctx) is
// served in the cycle it is made whenever the buffer holds at least seven
// bits: req_ready is then high, dec_bins carries the bin(s) combinationally
// and range, offset, buffer and context model are updated at the next clock
// edge.  One bin, or two bypass bins in MODE_BYPASS2, per clock.
//
// The context model is read from the context memory in the same cycle
// (ctx_rd_idx/ctx_rd_data) and the adapted model is written back
// (ctx_we/ctx_wr_*) for context-coded bins; both memory addresses are
// req_ctx passed on.  The bitstream arrives as 32-bit
// words, first bit in bit 31, through a valid/ready stream; a word is taken
// whenever the buffer has room for it.
//
// The engine state is handed over by the host: ld_valid loads range and
// offset (for the first bin of a slice: 510 and the first nine bits of the
// slice data) and empties the buffer; the host then streams the bitstream
// from the bit after the last one it consumed.  range, offset and buf_bits
// let the host take the state back.  The decoding arithmetic is that of the
// HEVC standard; the buffer, the hand-over and the handshake are this
// design's own choices.
module arith_decoder
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Engine state hand-over.
  input  logic        ld_valid,
  input  logic [8:0]  ld_range,
  input  logic [8:0]  ld_offset,
  output logic [8:0]  range,
  output logic [8:0]  offset,
  output logic [6:0]  buf_bits,
  // Bitstream words.
  input  logic        s_valid,
  input  logic [31:0] s_data,
  output logic        s_ready,
  // Bin requests.
  input  logic        req_valid,
  input  bin_mode_e   req_mode,
  input  ctx_idx_t    req_ctx,
  output logic        req_ready,
  output logic [1:0]  dec_bins,
  // Context memory.
  output ctx_idx_t    ctx_rd_idx,
  input  ctx_t        ctx_rd_data,
  output logic        ctx_we,
  output ctx_idx_t    ctx_wr_idx,
  output ctx_t        ctx_wr_data
);
  logic [63:0] bitbuf;
  logic [6:0]  cnt;
  logic        lps;
  logic [7:0]  rlps;
  logic [8:0]  rmps, range_nx, offset_nx;
  logic [2:0]  shift;
  logic        fire;
  logic [6:0]  cnt_used;
  logic [63:0] buf_used;

  assign ctx_rd_idx = req_ctx;
  assign req_ready  = (cnt >= 7'd7) && !ld_valid;
  assign fire       = req_valid && req_ready;
  assign s_ready    = (cnt <= 7'd32) && !ld_valid;
  assign buf_bits   = cnt;

  bin_decoder u_bin (
    .mode      (req_mode),
    .range     (range),
    .offset    (offset),
    .ctx       (ctx_rd_data),
    .next_bits (bitbuf[63:62]),
    .dec_bins  (dec_bins),
    .lps       (lps),
    .rlps      (rlps),
    .rmps      (rmps)
  );

  range_update u_range (
    .mode       (req_mode),
    .range      (range),
    .lps        (lps),
    .rlps       (rlps),
    .rmps       (rmps),
    .range_next (range_nx),
    .shift      (shift)
  );

  offset_update u_offset (
    .mode        (req_mode),
    .offset      (offset),
    .range       (range),
    .lps         (lps),
    .rmps        (rmps),
    .dec_bins    (dec_bins),
    .shift       (shift),
    .window      (bitbuf[63:57]),
    .offset_next (offset_nx)
  );

  ctx_adapt u_adapt (
    .ctx      (ctx_rd_data),
    .bin      (dec_bins[0]),
    .ctx_next (ctx_wr_data)
  );

  assign ctx_we     = fire && (req_mode == MODE_DECISION);
  assign ctx_wr_idx = req_ctx;

  // Buffer after this cycle's consumption, before this cycle's refill.
  always_comb begin
    cnt_used = cnt;
    buf_used = bitbuf;
    if (fire) begin
      cnt_used = cnt - 7'(shift);
      buf_used = bitbuf << shift;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range  <= 9'd510;
      offset <= '0;
      bitbuf <= '0;
      cnt    <= '0;
    end else if (ld_valid) begin
      range  <= ld_range;
      offset <= ld_offset;
      bitbuf <= '0;
      cnt    <= '0;
    end else begin
      if (fire) begin
        range  <= range_nx;
        offset <= offset_nx;
      end
      if (s_valid && s_ready) begin
        bitbuf <= buf_used | ({s_data, 32'd0} >> cnt_used);
        cnt    <= cnt_used + 7'd32;
      end else begin
        bitbuf <= buf_used;
        cnt    <= cnt_used;
      end
    end
  end

  // The engine never shifts more bits than it holds.
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> cnt >= 7'(shift));
endmodule
