// tb_bin_decoder: self-checking test of the bin decoding step.
//
// Context-coded bins: for random range, offset below range, state and MPS,
// the bin, the LPS flag and rMPS are compared with a reference computed
// here; a few LPS table entries are checked against constants.  Bypass
// bins are checked against the rule "take in one bit, compare with the
// range", and bypass pairs against two such steps in sequence.
module tb_bin_decoder;
  import cabac_pkg::*;

  int checks = 0, failures = 0;

  bin_mode_e  mode;
  logic [8:0] range, offset;
  ctx_t       ctx;
  logic [1:0] next_bits;
  logic [1:0] dec_bins;
  logic       lps;
  logic [7:0] rlps;
  logic [8:0] rmps;

  bin_decoder dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("mismatch: %s (range %0d offset %0d state %0d mps %0d bits %b)",
                                  what, range, offset, ctx.state, ctx.mps, next_bits);
    end
  endtask

  initial begin
    int r_lps, r_mps, o1, b1, o2, b2;
    // Spot values of the LPS table.
    int spot[5][4] = '{'{0, 0, 128, 0}, '{0, 3, 240, 0}, '{62, 0, 6, 0}, '{30, 2, 43, 0}, '{12, 3, 128, 0}};
    foreach (spot[k]) begin
      mode  = MODE_DECISION;
      ctx   = '{state: 6'(spot[k][0]), mps: 1'b0};
      range = 9'(256 + 64 * spot[k][1]);
      offset = 9'd0;
      next_bits = 2'b00;
      #1;
      check(int'(rlps) == spot[k][2], "LPS table entry");
    end
    for (int i = 0; i < 20000; i++) begin
      range     = 9'($urandom_range(256, 510));
      offset    = 9'($urandom_range(0, int'(range) - 1));
      ctx       = '{state: 6'($urandom_range(0, 62)), mps: 1'($urandom_range(0, 1))};
      next_bits = 2'($urandom_range(0, 3));
      mode      = MODE_DECISION;
      #1;
      r_lps = int'(range_lps(ctx.state, range[7:6]));
      r_mps = int'(range) - r_lps;
      check(int'(rmps) == r_mps, "rMPS");
      check(lps == (int'(offset) >= r_mps), "LPS decision");
      check(dec_bins[0] == ((int'(offset) >= r_mps) ? !ctx.mps : ctx.mps), "decision bin");
      mode = MODE_BYPASS;
      #1;
      o1 = 2 * int'(offset) + int'(next_bits[1]);
      check(dec_bins[0] == (o1 >= int'(range)), "bypass bin");
      mode = MODE_BYPASS2;
      #1;
      b1 = (o1 >= int'(range));
      o1 = o1 - (b1 ? int'(range) : 0);
      o2 = 2 * o1 + int'(next_bits[0]);
      b2 = (o2 >= int'(range));
      check(dec_bins == {1'(b2), 1'(b1)}, "bypass pair");
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
