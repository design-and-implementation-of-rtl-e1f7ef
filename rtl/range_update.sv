// range_update: the "range update" step of the CABAC arithmetic decoder.
//
// Purely combinational.  After a context-coded bin the new range is rMPS on
// the MPS path and rLPS on the LPS path; it is then renormalised by shifting
// left until it is at least 256 again.  The module returns the renormalised
// range and the shift count, which is also the number of bitstream bits the
// offset must take in (0..7; 7 is reached only by state 63, which residual
// coding never uses).  Bypass bins leave the range as it is and consume one
// (MODE_BYPASS) or two (MODE_BYPASS2) bits.  Behaviour as in the HEVC
// standard; the shift-count output is this design's way of telling the bit
// buffer how far to advance.
module range_update
  import cabac_pkg::*;
(
  input  bin_mode_e  mode,
  input  logic [8:0] range,
  input  logic       lps,
  input  logic [7:0] rlps,
  input  logic [8:0] rmps,
  output logic [8:0] range_next,
  output logic [2:0] shift
);
  logic [8:0] r;

  always_comb begin
    r = lps ? {1'b0, rlps} : rmps;
    shift = 3'd0;
    unique case (mode)
      MODE_DECISION: begin
        // Leading zeros of r (r >= 2).
        if (r[8])      shift = 3'd0;
        else if (r[7]) shift = 3'd1;
        else if (r[6]) shift = 3'd2;
        else if (r[5]) shift = 3'd3;
        else if (r[4]) shift = 3'd4;
        else if (r[3]) shift = 3'd5;
        else if (r[2]) shift = 3'd6;
        else           shift = 3'd7;
        range_next = r << shift;
      end
      MODE_BYPASS: begin
        range_next = range;
        shift      = 3'd1;
      end
      default: begin
        range_next = range;
        shift      = 3'd2;
      end
    endcase
  end
endmodule
