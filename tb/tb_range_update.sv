// tb_range_update: self-checking test of the range update step.
//
// For random rLPS and rMPS on both paths the renormalised range must be the
// selected sub-range doubled until it reaches 256, and the shift count the
// number of doublings (worked out here by a loop).  Bypass modes must keep
// the range and report one or two consumed bits.
module tb_range_update;
  import cabac_pkg::*;

  int checks = 0, failures = 0;

  bin_mode_e  mode;
  logic [8:0] range;
  logic       lps;
  logic [7:0] rlps;
  logic [8:0] rmps;
  logic [8:0] range_next;
  logic [2:0] shift;

  range_update dut (.*);

  initial begin
    int r, s;
    for (int i = 0; i < 20000; i++) begin
      range = 9'($urandom_range(256, 510));
      rlps  = 8'($urandom_range(2, 240));
      rmps  = 9'($urandom_range(2, 510));
      lps   = 1'($urandom_range(0, 1));
      mode  = MODE_DECISION;
      #1;
      r = lps ? int'(rlps) : int'(rmps);
      s = 0;
      while (r < 256) begin
        r = 2 * r;
        s++;
      end
      checks++;
      if (int'(range_next) != r || int'(shift) != s) begin
        failures++;
        if (failures < 10) $display("decision: got %0d/%0d expected %0d/%0d", range_next, shift, r, s);
      end
      mode = MODE_BYPASS;
      #1;
      checks++;
      if (range_next != range || shift != 3'd1) failures++;
      mode = MODE_BYPASS2;
      #1;
      checks++;
      if (range_next != range || shift != 3'd2) failures++;
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
