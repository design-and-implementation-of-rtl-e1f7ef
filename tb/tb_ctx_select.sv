// tb_ctx_select: self-checking test of context model selection.
//
// Random requests for every syntax element, block size, colour component
// and scan are compared with context indices worked out by the reference
// model (the same rules an encoder uses).  All positions of the 4x4 map
// and all neighbour patterns of larger blocks are covered.
module tb_ctx_select;
  import cabac_pkg::*;
  import cabac_tb_pkg::*;

  int checks = 0, failures = 0;

  se_e        se;
  logic [2:0] log2_size;
  logic       chroma;
  logic [1:0] scan_idx;
  logic [3:0] bin_idx;
  logic [4:0] xc, yc;
  logic       csbf_right, csbf_below;
  logic [1:0] ctx_set, g1ctx;
  ctx_idx_t   ctx_idx;

  ctx_select dut (.*);

  initial begin
    ResidualModel m;
    int exp_idx, off, sh, w;
    m = new();
    for (int i = 0; i < 50000; i++) begin
      m.log2   = $urandom_range(2, 5);
      m.chroma = $urandom_range(0, 1);
      m.scan   = (m.log2 <= 3) ? $urandom_range(0, 2) : 0;
      w = 1 << m.log2;
      log2_size  = 3'(m.log2);
      chroma     = m.chroma;
      scan_idx   = 2'(m.scan);
      bin_idx    = 4'($urandom_range(0, 2 * m.log2 - 2));
      xc         = 5'($urandom_range(0, w - 1));
      yc         = 5'($urandom_range(0, w - 1));
      csbf_right = 1'($urandom_range(0, 1));
      csbf_below = 1'($urandom_range(0, 1));
      ctx_set    = 2'($urandom_range(0, 3));
      g1ctx      = 2'($urandom_range(0, 3));
      se         = se_e'($urandom_range(0, 6));
      if (m.chroma) begin
        off = 15;
        sh = m.log2 - 2;
      end else begin
        off = 3 * (m.log2 - 2) + ((m.log2 - 1) >> 2);
        sh = (m.log2 + 1) >> 2;
      end
      case (se)
        SE_TSKIP: exp_idx = CTX_TSKIP + m.chroma;
        SE_LASTX: exp_idx = CTX_LAST_X + off + (int'(bin_idx) >> sh);
        SE_LASTY: exp_idx = CTX_LAST_Y + off + (int'(bin_idx) >> sh);
        SE_CSBF:  exp_idx = CTX_CSBF + ((csbf_right || csbf_below) ? 1 : 0) + (m.chroma ? 2 : 0);
        SE_SIG:   exp_idx = m.sig_ctx(int'(xc), int'(yc), int'(csbf_right), int'(csbf_below));
        SE_GT1:   exp_idx = CTX_GT1 + 4 * int'(ctx_set) + int'(g1ctx) + (m.chroma ? 16 : 0);
        default:  exp_idx = CTX_GT2 + int'(ctx_set) + (m.chroma ? 4 : 0);
      endcase
      #1;
      checks++;
      if (int'(ctx_idx) != exp_idx) begin
        failures++;
        if (failures < 10)
          $display("se %0d log2 %0d chroma %0d scan %0d pos (%0d,%0d) nb %b%b: got %0d expected %0d",
                   se, m.log2, m.chroma, m.scan, xc, yc, csbf_below, csbf_right, ctx_idx, exp_idx);
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
