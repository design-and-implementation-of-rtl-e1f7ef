// tb_ctx_adapt: self-checking test of context model adaptation.
//
// Every state and MPS is tried with both bin values.  An MPS must raise the
// state by one up to 62; an LPS must follow the LPS transition table
// (written out here as a list) and flip the MPS only from state 0.
module tb_ctx_adapt;
  import cabac_pkg::*;

  int checks = 0, failures = 0;

  ctx_t ctx, ctx_next;
  logic bin;

  ctx_adapt dut (.*);

  int lps_next[63] = '{0, 0, 1, 2, 2, 4, 4, 5, 6, 7, 8, 9, 9, 11, 11, 12, 13, 13, 15, 15,
                       16, 16, 18, 18, 19, 19, 21, 21, 22, 22, 23, 24, 24, 25, 26, 26, 27,
                       27, 28, 29, 29, 30, 30, 30, 31, 32, 32, 33, 33, 33, 34, 34, 35, 35,
                       35, 36, 36, 36, 37, 37, 37, 38, 38};

  initial begin
    for (int s = 0; s < 63; s++)
      for (int m = 0; m < 2; m++)
        for (int b = 0; b < 2; b++) begin
          int es;
          bit em;
          ctx = '{state: 6'(s), mps: 1'(m)};
          bin = 1'(b);
          #1;
          if (b == m) begin
            es = (s < 62) ? s + 1 : 62;
            em = 1'(m);
          end else begin
            es = lps_next[s];
            em = (s == 0) ? !1'(m) : 1'(m);
          end
          checks++;
          if (int'(ctx_next.state) != es || ctx_next.mps != em) begin
            failures++;
            $display("state %0d mps %0d bin %0d: got %0d/%0d expected %0d/%0d", s, m, b,
                     ctx_next.state, ctx_next.mps, es, em);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
