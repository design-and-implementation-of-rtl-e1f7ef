// bin_decoder: the "bin decoding" step of the CABAC arithmetic decoder.
//
// Purely combinational.  For a context-coded bin (MODE_DECISION) it looks up
// the LPS sub-range rLPS from the context's probability state and bits 7:6
// of the current range, forms the MPS sub-range rMPS = range - rLPS and
// decides the bin by comparing the offset with rMPS: offset >= rMPS selects
// the LPS.  For one bypass bin (MODE_BYPASS) the offset is extended by the
// next bitstream bit and compared with the range.  For two bypass bins
// (MODE_BYPASS2, the parallel design) the offset is extended by two bits and
// compared with range, 2*range and 3*range at once, which is quaternary
// arithmetic decoding of the pair.  dec_bins[0] is the first bin in bitstream
// order, dec_bins[1] the second (MODE_BYPASS2 only).
//
// The decision rule and the LPS table follow the HEVC standard; splitting
// the engine into this module, range_update and offset_update follows the
// steps of the bin decoding flow (bin decoding, range update, offset update).
module bin_decoder
  import cabac_pkg::*;
(
  input  bin_mode_e  mode,
  input  logic [8:0] range,     // ivlCurrRange, 256..510
  input  logic [8:0] offset,    // ivlOffset, below range
  input  ctx_t       ctx,       // context model (MODE_DECISION)
  input  logic [1:0] next_bits, // next two bitstream bits, [1] first
  output logic [1:0] dec_bins,
  output logic       lps,       // MODE_DECISION: LPS path taken
  output logic [7:0] rlps,
  output logic [8:0] rmps
);
  logic [10:0] off2;
  logic [10:0] r1, r2, r3;

  always_comb begin
    rlps = range_lps(ctx.state, range[7:6]);
    rmps = range - 9'(rlps);
    lps  = 1'b0;
    dec_bins = 2'b00;
    off2 = {offset, next_bits};
    r1   = {2'b00, range};
    r2   = {1'b0, range, 1'b0};
    r3   = r1 + r2;
    unique case (mode)
      MODE_DECISION: begin
        lps     = (offset >= rmps);
        dec_bins[0] = lps ? ~ctx.mps : ctx.mps;
      end
      MODE_BYPASS: begin
        dec_bins[0] = ({offset, next_bits[1]} >= {1'b0, range});
      end
      default: begin
        // Quaternary symbol: off2 / range, two bits, first bin is its MSB.
        if (off2 >= r3)      dec_bins = 2'b11;
        else if (off2 >= r2) dec_bins = 2'b01;
        else if (off2 >= r1) dec_bins = 2'b10;
        else                 dec_bins = 2'b00;
      end
    endcase
  end
endmodule
