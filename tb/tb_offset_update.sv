// tb_offset_update: self-checking test of the offset update step.
//
// Context-coded bins: the offset, reduced by rMPS on the LPS path, must be
// shifted left by the renormalisation count with the next window bits
// entering at the bottom.  Bypass: one bit in, range out when the bin is 1.
// Bypass pair: two single bypass steps in sequence.  The references are
// bit-by-bit loops written here.
module tb_offset_update;
  import cabac_pkg::*;

  int checks = 0, failures = 0;

  bin_mode_e  mode;
  logic [8:0] offset, range, rmps;
  logic       lps;
  logic [1:0] dec_bins;
  logic [2:0] shift;
  logic [6:0] window;
  logic [8:0] offset_next;

  offset_update dut (.*);

  initial begin
    int o, b1, b2;
    for (int i = 0; i < 20000; i++) begin
      range  = 9'($urandom_range(256, 510));
      window = 7'($urandom_range(0, 127));
      // Context-coded: pick an offset consistent with the path.
      rmps   = 9'($urandom_range(128, int'(range) - 2));
      lps    = 1'($urandom_range(0, 1));
      offset = lps ? 9'($urandom_range(int'(rmps), int'(range) - 1)) : 9'($urandom_range(0, int'(rmps) - 1));
      shift  = 3'($urandom_range(0, 6));
      dec_bins = 2'b00;
      mode   = MODE_DECISION;
      #1;
      o = lps ? int'(offset) - int'(rmps) : int'(offset);
      for (int k = 0; k < int'(shift); k++) o = 2 * o + int'(window[6 - k]);
      checks++;
      if (int'(offset_next) != (o & 511)) begin
        failures++;
        if (failures < 10) $display("decision: got %0d expected %0d", offset_next, o & 511);
      end
      // Bypass.
      offset = 9'($urandom_range(0, int'(range) - 1));
      o = 2 * int'(offset) + int'(window[6]);
      b1 = (o >= int'(range));
      dec_bins = {1'b0, 1'(b1)};
      mode = MODE_BYPASS;
      #1;
      checks++;
      if (int'(offset_next) != o - (b1 ? int'(range) : 0)) failures++;
      // Bypass pair.
      o = o - (b1 ? int'(range) : 0);
      o = 2 * o + int'(window[5]);
      b2 = (o >= int'(range));
      o = o - (b2 ? int'(range) : 0);
      dec_bins = {1'(b2), 1'(b1)};
      mode = MODE_BYPASS2;
      #1;
      checks++;
      if (int'(offset_next) != o) begin
        failures++;
        if (failures < 10) $display("pair: got %0d expected %0d", offset_next, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
