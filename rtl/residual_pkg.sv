// residual_pkg: state of the residual syntax controller.
//
// The controller is written as a register (rd_state_t) and a combinational
// step (residual_step) that maps the state, the block command and the
// answer of the arithmetic decoder to the next state.  Keeping the whole
// state in one struct lets the pipelined controller evaluate the step for
// both values of a bin and keep the right result.  Field meanings follow
// the HEVC residual coding syntax; the encoding is this design's own.
package residual_pkg;

  typedef enum logic [4:0] {
    S_IDLE, S_TSKIP, S_LASTX, S_LASTY, S_LASTX_SUF, S_LASTY_SUF, S_LOCATE,
    S_SB_START, S_CSBF, S_SIG, S_GT1, S_GT2, S_SIGN, S_REM,
    S_REM_SUF
  } rd_phase_e;

  // Parameters of one transform block.
  typedef struct packed {
    logic [2:0] log2_size;    // 2..5
    logic       chroma;       // cIdx > 0
    logic [1:0] scan_idx;     // 0 diagonal, 1 horizontal, 2 vertical
    logic       sign_hiding;  // sign_data_hiding_enabled_flag
    logic       tq_bypass;    // cu_transquant_bypass_flag
    logic       ts_enabled;   // transform_skip_enabled_flag
  } rd_cfg_t;

  typedef struct packed {
    rd_phase_e   phase;
    logic [2:0]  log2;
    logic        chr;
    logic [1:0]  scan;
    logic        sdh;        // sign hiding applies to this block
    logic [3:0]  bin_idx;    // bin of a last position prefix
    logic [3:0]  lx_pre, ly_pre;
    logic [2:0]  lx_suf, ly_suf, suf_left;
    logic [5:0]  sb_i, last_sb;
    logic [3:0]  last_n, n, p;
    logic [63:0] csbf;       // coded_sub_block_flag map, index {yS, xS}
    logic        infer_dc;
    logic [15:0] sig, g1, sgn;
    logic        g2, has_g1;
    logic [3:0]  g1pos, num_g1;
    logic [1:0]  c1, ctx_set;
    logic [3:0]  first_sig;
    logic        hidden;
    logic [15:0] sent;       // coefficients already output
    logic        parity;
    logic [2:0]  rice;
    logic [4:0]  prefix, sufrem;
    logic [20:0] sufacc;
    // Registered outputs.
    logic        done;
    logic        transform_skip;
    logic        coef_valid;
    logic [9:0]  coef_pos;   // {x, y}
    logic [15:0] coef_val;
  } rd_state_t;

  localparam rd_state_t RD_RESET = '{phase: S_IDLE, log2: 3'd2, c1: 2'd1, default: '0};

endpackage
