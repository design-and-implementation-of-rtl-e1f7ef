// cabac_pkg: types and constants shared by the HEVC transform-coefficient
// CABAC decoder.
//
// It holds the context model type (6-bit probability state plus the most
// probable symbol), the bin request modes of the arithmetic decoder, the
// layout of the context memory (one region per residual syntax element) and
// the two fixed tables of the HEVC arithmetic decoding engine: the LPS
// sub-range table indexed by state and quantised range, and the state
// transition taken after a least probable symbol.  Both tables are those of
// the HEVC standard (ITU-T H.265, 9.3.4.3); the memory layout is this
// design's own choice.
package cabac_pkg;

  // Probability model of one context: state 0..62 and MPS value.
  typedef struct packed {
    logic [5:0] state;
    logic       mps;
  } ctx_t;

  // What the syntax controller asks of the arithmetic decoder.
  typedef enum logic [1:0] {
    MODE_DECISION = 2'd0,  // one context-coded bin
    MODE_BYPASS   = 2'd1,  // one bypass bin
    MODE_BYPASS2  = 2'd2   // two bypass bins at once (parallel design)
  } bin_mode_e;

  // Context memory layout (context index = region base + ctxInc).
  localparam int unsigned CTX_LAST_X = 0;    // last_sig_coeff_x_prefix, 18
  localparam int unsigned CTX_LAST_Y = 18;   // last_sig_coeff_y_prefix, 18
  localparam int unsigned CTX_CSBF   = 36;   // coded_sub_block_flag,     4
  localparam int unsigned CTX_SIG    = 40;   // sig_coeff_flag,          42
  localparam int unsigned CTX_GT1    = 82;   // coeff_abs_level_greater1, 24
  localparam int unsigned CTX_GT2    = 106;  // coeff_abs_level_greater2,  6
  localparam int unsigned CTX_TSKIP  = 112;  // transform_skip_flag,       2
  localparam int unsigned NUM_CTX    = 114;
  localparam int unsigned CTX_AW     = 7;

  typedef logic [CTX_AW-1:0] ctx_idx_t;

  // Coordinates of a coefficient inside a transform block of up to 32x32.
  typedef struct packed {
    logic [4:0] x;
    logic [4:0] y;
  } pos_t;

  // LPS sub-range, rangeTabLps[state][qRangeIdx].
  function automatic logic [7:0] range_lps(input logic [5:0] state,
                                           input logic [1:0] q);
    logic [31:0] row;
    unique case (state)
      6'd0:  row = {8'd128, 8'd176, 8'd208, 8'd240};
      6'd1:  row = {8'd128, 8'd167, 8'd197, 8'd227};
      6'd2:  row = {8'd128, 8'd158, 8'd187, 8'd216};
      6'd3:  row = {8'd123, 8'd150, 8'd178, 8'd205};
      6'd4:  row = {8'd116, 8'd142, 8'd169, 8'd195};
      6'd5:  row = {8'd111, 8'd135, 8'd160, 8'd185};
      6'd6:  row = {8'd105, 8'd128, 8'd152, 8'd175};
      6'd7:  row = {8'd100, 8'd122, 8'd144, 8'd166};
      6'd8:  row = {8'd95,  8'd116, 8'd137, 8'd158};
      6'd9:  row = {8'd90,  8'd110, 8'd130, 8'd150};
      6'd10: row = {8'd85,  8'd104, 8'd123, 8'd142};
      6'd11: row = {8'd81,  8'd99,  8'd117, 8'd135};
      6'd12: row = {8'd77,  8'd94,  8'd111, 8'd128};
      6'd13: row = {8'd73,  8'd89,  8'd105, 8'd122};
      6'd14: row = {8'd69,  8'd85,  8'd100, 8'd116};
      6'd15: row = {8'd66,  8'd80,  8'd95,  8'd110};
      6'd16: row = {8'd62,  8'd76,  8'd90,  8'd104};
      6'd17: row = {8'd59,  8'd72,  8'd86,  8'd99};
      6'd18: row = {8'd56,  8'd69,  8'd81,  8'd94};
      6'd19: row = {8'd53,  8'd65,  8'd77,  8'd89};
      6'd20: row = {8'd51,  8'd62,  8'd73,  8'd85};
      6'd21: row = {8'd48,  8'd59,  8'd69,  8'd80};
      6'd22: row = {8'd46,  8'd56,  8'd66,  8'd76};
      6'd23: row = {8'd43,  8'd53,  8'd63,  8'd72};
      6'd24: row = {8'd41,  8'd50,  8'd59,  8'd69};
      6'd25: row = {8'd39,  8'd48,  8'd56,  8'd65};
      6'd26: row = {8'd37,  8'd45,  8'd54,  8'd62};
      6'd27: row = {8'd35,  8'd43,  8'd51,  8'd59};
      6'd28: row = {8'd33,  8'd41,  8'd48,  8'd56};
      6'd29: row = {8'd32,  8'd39,  8'd46,  8'd53};
      6'd30: row = {8'd30,  8'd37,  8'd43,  8'd50};
      6'd31: row = {8'd29,  8'd35,  8'd41,  8'd48};
      6'd32: row = {8'd27,  8'd33,  8'd39,  8'd45};
      6'd33: row = {8'd26,  8'd31,  8'd37,  8'd43};
      6'd34: row = {8'd24,  8'd30,  8'd35,  8'd41};
      6'd35: row = {8'd23,  8'd28,  8'd33,  8'd39};
      6'd36: row = {8'd22,  8'd27,  8'd32,  8'd37};
      6'd37: row = {8'd21,  8'd26,  8'd30,  8'd35};
      6'd38: row = {8'd20,  8'd24,  8'd29,  8'd33};
      6'd39: row = {8'd19,  8'd23,  8'd27,  8'd31};
      6'd40: row = {8'd18,  8'd22,  8'd26,  8'd30};
      6'd41: row = {8'd17,  8'd21,  8'd25,  8'd28};
      6'd42: row = {8'd16,  8'd20,  8'd23,  8'd27};
      6'd43: row = {8'd15,  8'd19,  8'd22,  8'd25};
      6'd44: row = {8'd14,  8'd18,  8'd21,  8'd24};
      6'd45: row = {8'd14,  8'd17,  8'd20,  8'd23};
      6'd46: row = {8'd13,  8'd16,  8'd19,  8'd22};
      6'd47: row = {8'd12,  8'd15,  8'd18,  8'd21};
      6'd48: row = {8'd12,  8'd14,  8'd17,  8'd20};
      6'd49: row = {8'd11,  8'd14,  8'd16,  8'd19};
      6'd50: row = {8'd11,  8'd13,  8'd15,  8'd18};
      6'd51: row = {8'd10,  8'd12,  8'd15,  8'd17};
      6'd52: row = {8'd10,  8'd12,  8'd14,  8'd16};
      6'd53: row = {8'd9,   8'd11,  8'd13,  8'd15};
      6'd54: row = {8'd9,   8'd11,  8'd12,  8'd14};
      6'd55: row = {8'd8,   8'd10,  8'd12,  8'd14};
      6'd56: row = {8'd8,   8'd9,   8'd11,  8'd13};
      6'd57: row = {8'd7,   8'd9,   8'd11,  8'd12};
      6'd58: row = {8'd7,   8'd9,   8'd10,  8'd12};
      6'd59: row = {8'd7,   8'd8,   8'd10,  8'd11};
      6'd60: row = {8'd6,   8'd8,   8'd9,   8'd11};
      6'd61: row = {8'd6,   8'd7,   8'd9,   8'd10};
      6'd62: row = {8'd6,   8'd7,   8'd8,   8'd9};
      default: row = {8'd2, 8'd2,   8'd2,   8'd2};
    endcase
    return row[8*(3-int'(q)) +: 8];
  endfunction

  // Next state after a least probable symbol, transIdxLps[state].
  function automatic logic [5:0] trans_idx_lps(input logic [5:0] state);
    logic [5:0] t;
    unique case (state)
      6'd0, 6'd1:                t = 6'd0;
      6'd2:                      t = 6'd1;
      6'd3, 6'd4:                t = 6'd2;
      6'd5, 6'd6:                t = 6'd4;
      6'd7:                      t = 6'd5;
      6'd8:                      t = 6'd6;
      6'd9:                      t = 6'd7;
      6'd10:                     t = 6'd8;
      6'd11, 6'd12:              t = 6'd9;
      6'd13, 6'd14:              t = 6'd11;
      6'd15:                     t = 6'd12;
      6'd16, 6'd17:              t = 6'd13;
      6'd18, 6'd19:              t = 6'd15;
      6'd20, 6'd21:              t = 6'd16;
      6'd22, 6'd23:              t = 6'd18;
      6'd24, 6'd25:              t = 6'd19;
      6'd26, 6'd27:              t = 6'd21;
      6'd28, 6'd29:              t = 6'd22;
      6'd30:                     t = 6'd23;
      6'd31, 6'd32:              t = 6'd24;
      6'd33:                     t = 6'd25;
      6'd34, 6'd35:              t = 6'd26;
      6'd36, 6'd37:              t = 6'd27;
      6'd38:                     t = 6'd28;
      6'd39, 6'd40:              t = 6'd29;
      6'd41, 6'd42, 6'd43:       t = 6'd30;
      6'd44:                     t = 6'd31;
      6'd45, 6'd46:              t = 6'd32;
      6'd47, 6'd48, 6'd49:       t = 6'd33;
      6'd50, 6'd51:              t = 6'd34;
      6'd52, 6'd53, 6'd54:       t = 6'd35;
      6'd55, 6'd56, 6'd57:       t = 6'd36;
      6'd58, 6'd59, 6'd60:       t = 6'd37;
      6'd61, 6'd62:              t = 6'd38;
      default:                   t = 6'd63;
    endcase
    return t;
  endfunction

  // Residual syntax elements that carry context-coded bins.
  typedef enum logic [2:0] {
    SE_TSKIP = 3'd0,
    SE_LASTX = 3'd1,
    SE_LASTY = 3'd2,
    SE_CSBF  = 3'd3,
    SE_SIG   = 3'd4,
    SE_GT1   = 3'd5,
    SE_GT2   = 3'd6
  } se_e;

  // Position (x, y) of scan index idx in a (1 << log2w)-square block.
  // scan: 0 up-right diagonal, 1 horizontal, 2 vertical (HEVC 6.5.3 - 6.5.5).
  function automatic logic [5:0] scan_xy(input logic [1:0] log2w,
                                         input logic [1:0] scan,
                                         input logic [5:0] idx);
    logic [2:0] x, y;
    int unsigned w, start, xmin, xmax, k;
    w = 1 << log2w;
    k = 32'(idx);
    x = '0;
    y = '0;
    if (scan == 2'd1) begin
      x = 3'(idx & 6'(w - 1));
      y = 3'(idx >> log2w);
    end else if (scan == 2'd2) begin
      y = 3'(idx & 6'(w - 1));
      x = 3'(idx >> log2w);
    end else begin
      start = 0;
      for (int unsigned d = 0; d < 15; d++) begin
        if (d + 1 < 2 * w) begin
          xmin = (d < w) ? 0 : d - w + 1;
          xmax = (d < w) ? d : w - 1;
          if (k >= start && k < start + xmax - xmin + 1) begin
            x = 3'(xmin + k - start);
            y = 3'(d - (xmin + k - start));
          end
          start = start + xmax - xmin + 1;
        end
      end
    end
    return {x, y};
  endfunction

  // Inverse of scan_xy: scan index of position (x, y).
  function automatic logic [5:0] scan_index(input logic [1:0] log2w,
                                            input logic [1:0] scan,
                                            input logic [2:0] x,
                                            input logic [2:0] y);
    int unsigned w, d, start, xmin;
    w = 1 << log2w;
    if (scan == 2'd1) return 6'((32'(y) << log2w) + 32'(x));
    if (scan == 2'd2) return 6'((32'(x) << log2w) + 32'(y));
    d = 32'(x) + 32'(y);
    start = 0;
    for (int unsigned e = 0; e < 14; e++)
      if (e < d) start = start + ((e < w) ? e + 1 : 2 * w - 1 - e);
    xmin = (d < w) ? 0 : d - w + 1;
    return 6'(start + 32'(x) - xmin);
  endfunction

endpackage
