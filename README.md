# CABAC transform-coefficient decoder for HEVC

In an HEVC decoder, CABAC entropy decoding is the hardest stage to speed up.
Each bin depends on the one before it in two ways. First, the arithmetic
decoder state (range and offset) left by one bin is the input of the next.
Second, which context model the next bin uses often depends on the value
just decoded. Most of the bins of a typical stream are transform
coefficients, which the `residual_coding` syntax describes. This RTL moves
that part into hardware. A host processor parses everything else in the
slice. For each transform block it hands the accelerator the block
parameters, and the accelerator returns the block's non-zero coefficients.

The design is built around the loop that every bin goes through:

```
   +--> context model selection --> bin decoding --+--> range / offset update
   |                                               +--> context model adaptation
   +------ next syntax element selection <---------+
```

Bypass bins skip context selection, adaptation and the range update. In the
**baseline** design the whole loop is one clock cycle, so the design decodes
one bin per cycle. Two more designs attack the loop from two sides:

* **Pipelined** (`PIPELINED = 1`): the loop is cut into two stages, which
  gives a shorter clock period at the same bins per cycle.
* **Parallel** (`PARALLEL_BYPASS = 1`): pairs of bypass bins are decoded in
  one cycle, which gives more bins per cycle at the baseline's clock period.

All three designs use the same top-level module, `cabac_coeff_top`, and are
chosen with its parameters. The baseline is the default. If both parameters
are set, the pipelined design is built.

## Module map

| module | role |
|---|---|
| `cabac_coeff_top` | top: controller, arithmetic decoder, context memory, bin counter, design choice |
| `residual_decoder` | controller of the baseline and parallel designs: state register plus `residual_step` |
| `residual_decoder_pipelined` | controller of the pipelined design (two speculative steps, request register) |
| `residual_step` | one step of the `residual_coding` syntax walk (combinational) |
| `ctx_select` | context index of a context-coded bin (combinational) |
| `arith_decoder` | range/offset registers, 64-bit bit buffer, one bin or bypass pair per cycle |
| `bin_decoder` | bin value(s) from range, offset and model; decision, bypass and bypass pair |
| `range_update` | new range and renormalisation shift |
| `offset_update` | new offset from the shift and the next bitstream bits |
| `ctx_adapt` | probability state transition after a bin |
| `context_memory` | 114 context models, one asynchronous read port, write-back and host write |
| `cabac_pkg`, `residual_pkg` | shared types, memory layout, the HEVC range and transition tables, scan-order functions, controller state |

## The per-bin loop in the baseline

The controller state sits in one register (`residual_pkg::rd_state_t`).
In each cycle the following happens, all combinationally:

1. `residual_step` looks at the state and forms a request: `req_valid`,
   `req_mode` (decision, bypass or bypass pair) and, through `ctx_select`,
   `req_ctx`.
2. `arith_decoder` reads the model at `req_ctx` from `context_memory`.
   `bin_decoder` decodes the bin. `range_update` and `offset_update` compute
   the new engine state, and `ctx_adapt` computes the adapted model.
3. The decoded bin goes back into `residual_step`, which computes the next
   controller state.

At the clock edge, range, offset, the bit buffer, the adapted model and
the controller state are all updated. The longest path therefore runs from
the state register through context selection, the memory read, bin
decoding and the next-state logic, back to the state register.

The arithmetic follows the HEVC standard:

* Range and offset are 9 bits wide.
* `rLPS = rangeTabLps[state][(range >> 6) & 3]`.
* An LPS is decoded when `offset >= range - rLPS`.
* After each bin, renormalisation shifts range and offset left until the
  range is at least 256. The shift count tells the bit buffer how many
  bits to consume.
* A bypass bin compares `(offset << 1) | next_bit` with the range.

## The pipelined design

`residual_decoder_pipelined` splits the loop into two stages:

* **Stage 1:** next syntax element selection, context selection and the
  context memory read for the *following* bin.
* **Stage 2:** bin decoding, the range/offset update and context adaptation
  in the arithmetic decoder. Stage 2 works from a request register that
  holds valid, mode, context index and the context model itself.

The difficulty is that stage 1 needs the value of the bin that stage 2 is
still decoding. The controller solves this by speculating on both values:

```
              st (state of the bin in flight)        rq (request of the bin in flight)
               |                                       |
     +---------+---------+                             v
     v                   v                       arith_decoder --> bin
 step(st, bin=0)    step(st, bin=1)                                   |
     |  nx0              |  nx1                                       |
 request(nx0)       request(nx1)                                      |
 read mem copy 0    read mem copy 1                                   |
 forward if same    forward if same                                   |
 context as the     context as the                                    |
 one adapted now    one adapted now                                   |
     |                   |                                            |
     +------ mux <-------+--------------------------------------------+
              |
        st <= nx0 / nx1,  rq <= candidate 0 / candidate 1
```

The mechanisms in detail:

* **Two candidates.** Two copies of `residual_step` compute the next state
  for bin 0 and for bin 1. Two more copies compute the request that each
  of those states will make. Each candidate reads its context model from
  its own copy of the context memory. Both copies receive the same writes,
  which gives two read ports.
* **Forwarding.** If a candidate's context index equals the context being
  adapted in this cycle, the model that has just been adapted is used
  instead of the old value still in memory.
* **Selection.** The decoded bin picks the candidate. After that, the
  critical path is only the request register, bin decoding and one 2:1
  choice.
* **Stalls.** When the arithmetic decoder is short of bits (`req_ready`
  low), the request register and the state are held.
* **No request.** Some cycles have no request in flight, such as entering
  a sub-block. In those cycles the bin-0 path gives the next state.

The pipelined design needs the same number of cycles as the baseline. Its
gain comes only from the shorter clock period. The published FPGA results
this architecture follows report 66 MHz for the baseline and 75 MHz for
the pipelined design, about 13.5 % more bins per second. This RTL's clock
period has not been measured.

The pipelined controller costs four copies of the step logic and a second
copy of the context memory. The pipelined design decodes bypass bins one
at a time.

## The parallel design: two bypass bins per cycle

With `PARALLEL_BYPASS = 1`, the controller asks for `MODE_BYPASS2` when it
knows that the next two bins are both bypass bins of the same element:

* two sign bits, or
* two bits of a fixed-length suffix (last-position suffix, or suffix of the
  remaining level).

The bin decoder then does one quaternary decision:

* It forms `off2 = (offset << 2) | next_two_bits` and compares it with
  `range`, `2*range` and `3*range`.
* This gives a symbol `s` from 0 to 3. Its two bits are the two bins, first
  bin in the high bit.
* The new offset is `off2 - s*range`. The range does not change.

The unary prefix of `coeff_abs_level_remaining` stays one bin per cycle,
because where it ends is not known in advance. The sign that sign hiding
leaves out is never requested.

## Host interface and hand-over

The accelerator is a slave of the processor that parses the slice.

1. **Context models.** At the start of a slice, the host computes the
   initial context models (from the init values and the slice QP) and
   writes all 114 models with `ctx_ld_valid/idx/data`. Each model is
   `{state[5:0], mps}`. The accelerator keeps them adapted from block to
   block. The host must not write models while `busy` is high or in the
   cycle that raises `start`. An assertion checks this.
2. **Engine state.** `eng_ld_valid` loads the range and offset and empties
   the bit buffer. At the first bin of a slice these are 510 and the first
   nine bits of the slice data. The host then streams the bitstream from
   the next bit onward.
3. **Bitstream.** It arrives as 32-bit words through `s_valid/s_data/s_ready`,
   first bit in bit 31. A word is taken whenever the 64-bit buffer has room
   for it. A bin is served when at least 7 bits are buffered.
4. **A block.** `start`, together with `log2_size` (2..5), `chroma`,
   `scan_idx` (0 diagonal, 1 horizontal, 2 vertical), `sign_hiding`,
   `tq_bypass` and `ts_enabled`, starts a block. Then:
   * `busy` stays high until `done` pulses.
   * Each non-zero coefficient appears for one cycle on `coef_valid`, with
     `coef_pos = {x[4:0], y[4:0]}` and a signed 16-bit `coef_val`.
   * Coefficients that are not reported are zero.
   * The order of the coefficients is not the scan order. Within a
     sub-block, those complete after their flags come first and those with
     a remaining level follow. The host must place each coefficient by
     its `coef_pos`.
   * `transform_skip` holds the decoded `transform_skip_flag`.
   * The coefficient output has no back-pressure.
5. **Giving the engine back.** `eng_range`, `eng_offset` and `eng_buf_bits`
   let the host continue decoding after a block. `eng_buf_bits` is the
   number of bits the accelerator has buffered but not used.

`bin_count` counts the bins decoded since reset; a bypass pair counts as two.

## The residual syntax walk

`residual_step` follows HEVC version 1 `residual_coding` (no range
extensions):

1. `transform_skip_flag`, for 4x4 blocks when allowed.
2. The last significant position:
   * The x and y prefixes are context coded and truncated unary.
   * Their suffixes are fixed-length bypass bins.
   * For the vertical scan, x and y are swapped.
3. One lookup cycle finds the sub-block and the scan position of the last
   coefficient.
4. The 4x4 sub-blocks are then visited in reverse scan order, from the one
   that holds the last coefficient down to sub-block 0. For each sub-block:
   * `coded_sub_block_flag`, except for the first and the last sub-block.
     Its context comes from the right and lower neighbours.
   * `sig_coeff_flag` for each position, in reverse scan order. The last
     position is not coded. The DC flag of a coded sub-block whose other
     flags are all 0 is inferred as 1.
   * One set-up cycle. Then up to eight `coeff_abs_level_greater1_flag`s
     use the context set and the greater1 counter of the standard. One
     `coeff_abs_level_greater2_flag` follows for the first coefficient
     above 1.
   * The sign bits. With sign hiding, the sign of the coefficient at the
     lowest scan position is left out when the first and the last non-zero
     coefficient of the sub-block are at least 4 scan positions apart. It
     is then taken from the parity of the sum of levels.
   * `coeff_abs_level_remaining` for each coefficient whose level is not
     yet complete. This is a Rice prefix with an Exp-Golomb escape. The
     Rice parameter starts at 0 in each sub-block and rises up to 4.
   * A coefficient whose level is already complete after its greater1
     and greater2 flags leaves in the same cycle that reads its sign. The
     remaining-level pass then visits only the other coefficients. The one
     exception is the coefficient whose sign is hidden: its sign depends
     on the parity of every level in the sub-block, so it is always sent
     last.
   * One coefficient leaves per cycle. In a sign pair of the parallel
     design, the first of the two leaves if it is complete, otherwise the
     second.

The syntax walk has these fixed cycle costs on top of one cycle per bin
(or per bypass pair):

* one cycle after `start`;
* one cycle for the last-position lookup;
* one cycle to enter each sub-block (its level pass is set up in the same
  cycle that reads its last significance flag);
* one cycle when the hidden-sign coefficient needs no remaining-level bins;
* in the parallel design, one cycle when both coefficients of a sign pair
  are complete (only one can leave in the pair's cycle).

### Context memory layout

The memory index is the region base plus the context increment of the
standard.

| region | base | count |
|---|---|---|
| last_sig_coeff_x_prefix | 0 | 18 |
| last_sig_coeff_y_prefix | 18 | 18 |
| coded_sub_block_flag | 36 | 4 |
| sig_coeff_flag | 40 | 42 |
| coeff_abs_level_greater1_flag | 82 | 24 |
| coeff_abs_level_greater2_flag | 106 | 6 |
| transform_skip_flag | 112 | 2 |

Luma contexts come first within each region, then chroma. The layout is
this design's own. The host needs it to load the initial models.

## Throughput

`tb_cabac_workloads` measures throughput on three synthetic profiles, which
stand in for low, medium and high bitrate video:

* **Low bitrate:** mostly 4x4 and 8x8 blocks, a few small levels near DC.
* **High bitrate:** larger blocks, coefficients further from DC and larger
  levels.

The three designs decode the same stream side by side, and the bitstream
never runs dry:

| profile | design | bins per cycle | at the reference clock |
|---|---|---|---|
| low | baseline | 0.88 | 58 Mbins/s at 66 MHz |
| low | pipelined | 0.88 | 66 Mbins/s at 75 MHz |
| low | parallel | 0.89 (+1.0 %) | 58 Mbins/s at 66 MHz |
| medium | baseline | 0.94 | 62 Mbins/s at 66 MHz |
| medium | pipelined | 0.94 | 70 Mbins/s at 75 MHz |
| medium | parallel | 0.97 (+3.4 %) | 64 Mbins/s at 66 MHz |
| high | baseline | 0.97 | 64 Mbins/s at 66 MHz |
| high | pipelined | 0.97 | 72 Mbins/s at 75 MHz |
| high | parallel | 1.06 (+9.0 %) | 69 Mbins/s at 66 MHz |

How these numbers compare with the published results:

* On real video of three bitrates, the published implementation of this
  architecture reports these rates:
  * baseline: 60.8, 61.7 and 63.1 Mbins/s;
  * pipelined: 69.0, 70.0 and 71.6 Mbins/s;
  * parallel: 65.5, 67.4 and 69.4 Mbins/s, a gain of 8 to 10 %.
* The trend is the same here: throughput rises with bitrate. At medium
  and high bitrate the baseline and pipelined rates are within about 2 %
  of the published ones; the synthetic low-bitrate profile is about 5 %
  below.
* The parallel design gains most where bypass-coded signs and suffixes
  are most frequent. The synthetic low-bitrate profile has few of them,
  so the gain there is much smaller than the published 8 %. At high
  bitrate the gain (+9.0 %) is in the published range.
* Below 1 bin per cycle, the controller spends extra cycles outside the
  bins: one per `start`, one for the last-position lookup and one per
  sub-block. These weigh most in small, sparse blocks.
* The pipelined design has exactly the baseline's cycle counts. Its figures
  assume the 75 MHz the published pipelined design reached; this RTL's
  clock period has not been measured.

## Verification

Each module has its own self-checking testbench in `tb/`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `cabac_tb_pkg` holds the reference models:
  * a CABAC *encoder*, so that test bitstreams are produced independently of
    the decoder;
  * a model of `residual_coding` that draws random blocks, applies sign
    hiding and lists every bin with its context index;
  * its own scan-order code.
* `tb_residual_decoder` runs the baseline and the parallel controller
  against a bin server. The server checks the kind and context of every
  request against the model's list.
* `tb_arith_decoder` decodes 40000 mixed bins from the encoder's stream.
  The bitstream arrives with gaps.
* The arithmetic building blocks have their own testbenches:
  `tb_bin_decoder`, `tb_range_update`, `tb_offset_update`, `tb_ctx_adapt`,
  `tb_context_memory` and `tb_ctx_select`. They exercise each module in
  isolation with random stimulus checked against results computed in the
  testbench.
* `tb_cabac_workloads` decodes 1200 blocks of the three bitrate profiles
  with all three designs side by side. It checks every coefficient and
  prints the throughput table above.
* `tb_cabac_coeff_top` (default parameters), `tb_cabac_coeff_top_pipelined`
  and `tb_cabac_coeff_top_parallel` play a whole slice. They load random
  context models, hand over the engine state, stream the bitstream with
  random gaps and decode 400 blocks. Each block's coefficients,
  `transform_skip`, bin count and cycle count are checked.
* Each end-to-end test also counts every mechanism and fails if one never
  happened:
  * input stalls, sign hiding, uncoded sub-blocks, the inferred DC flag,
    greater2 flags, the cap of eight greater1 flags, the escape form of the
    remaining level and Rice parameter 4;
  * every scan order, every block size, chroma blocks and transform skip;
  * in the pipelined test, both speculative candidates, a request held
    through a stall, and a forwarded model;
  * in the parallel test, bypass pairs.

To simulate one testbench with Verilator 5, from the folder above `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cabac_coeff_top \
  -y rtl -y tb +libext+.sv -Irtl \
  rtl/cabac_pkg.sv rtl/residual_pkg.sv tb/cabac_tb_pkg.sv tb/tb_cabac_coeff_top.sv
./obj_dir/Vtb_cabac_coeff_top
```

The packages must come first on the command line. Each of the three
end-to-end tests runs in a few seconds.

## Departures and limits

* **Scope.** Only transform-coefficient syntax is decoded, for HEVC version
  1 (no range extensions: no extended precision, no persistent Rice
  adaptation, no cross-component prediction). Other slice syntax, terminate
  bins and context initialisation stay with the host.
* **Tables.** The range and state-transition tables, the context selection
  rules and the syntax are written from the HEVC standard. The published
  architecture names the decoding steps but does not spell out their
  arithmetic.
* **Host interface.** The host interface (plain ports, model loading,
  engine hand-over) is this design's own. The reference system used a
  simple software register interface on a Zynq-7020 whose register map was
  not published.
* **Remaining-level prefix.** The prefix of `coeff_abs_level_remaining` is
  capped at 20 ones. That is ample for 16-bit coefficients.
* **Coefficient range.** Coefficients are 16-bit signed. No clipping is
  done.
* **No back-pressure.** The coefficient output cannot be stalled.
* **Pipelined clock.** The pipelined design's shorter clock period is the
  intent of its structure, not a measured result. It has not been
  synthesised for a target FPGA.
