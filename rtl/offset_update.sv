// offset_update: the "offset update" step of the CABAC arithmetic decoder.
//
// Purely combinational.  For a context-coded bin the offset loses rMPS when
// the LPS was decoded, is shifted left by the renormalisation count and is
// filled from the top of the bitstream window.  For one bypass bin the
// offset takes in one bit and loses the range if the bin is 1; for two
// bypass bins it takes in two bits and loses the quaternary symbol times the
// range.  The window holds the next seven bitstream bits, window[6] first.
// Arithmetic as in the HEVC standard.
module offset_update
  import cabac_pkg::*;
(
  input  bin_mode_e  mode,
  input  logic [8:0] offset,
  input  logic [8:0] range,
  input  logic       lps,
  input  logic [8:0] rmps,
  input  logic [1:0] dec_bins,
  input  logic [2:0] shift,
  input  logic [6:0] window,
  output logic [8:0] offset_next
);
  logic [8:0]  t;
  logic [15:0] wide;
  logic [10:0] off2, sub2;

  always_comb begin
    t    = lps ? offset - rmps : offset;
    wide = ({7'd0, t} << shift) | (16'(window) >> (3'd7 - shift));
    off2 = {offset, window[6:5]};
    sub2 = 11'({dec_bins[0], dec_bins[1]}) * 11'(range);
    unique case (mode)
      MODE_DECISION: offset_next = wide[8:0];
      MODE_BYPASS:   offset_next = 9'({offset, window[6]} - (dec_bins[0] ? {1'b0, range} : 10'd0));
      default:       offset_next = 9'(off2 - sub2);
    endcase
  end
endmodule
