// psb_pair: the synchronisation logic shared by a pair of input channels.
//
// Both channels of the pair go through one phase_sync (four samples per BX,
// phase choice and transition counting), which also adds the four phase
// samples of one bit to each channel word. The resulting pair of 32-bit words
// is delayed by either of the two delay circuits, selected by the pair's
// mode_pipe register:
//   * fifo_delay (mode_pipe=0): written from WSTART to WSTOP after BCRes and
//     read from RSTART, delay RSTART-WSTART;
//   * pipeline_delay (mode_pipe=1): DELAY register stages (1 = shortest),
//     always valid.
// Each channel has its own parity check on the sampled input and its own sync
// check on the delayed output, each with a per-cycle error counter. The pair
// grouping, the two delay options and the per-channel counters follow the
// original design; building both delay options side by side with a run-time
// select is this design's choice.
//
// Timing: dout is combinational from the delay circuit; with mode_pipe=1 and
// DELAY=1 it is one BX clock after the input was sampled.
module psb_pair
  import psb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned MAX_DELAY  = 64
) (
  input  logic                  clk4x,
  input  logic                  clk,
  input  logic                  rst_n,
  input  ch_in_t [1:0]          din,
  input  logic                  cycle_end,
  input  bx_t                   bx_loc,
  input  bx_t                   out_bx,
  input  pair_cfg_t             pcfg,
  input  glob_cfg_t             gcfg,
  output dpm_word_t [1:0]       dout,
  output logic                  valid,
  output pair_stat_t            pstat,
  output logic [1:0][CNT_W-1:0] par_err_saved,
  output logic [1:0][CNT_W-1:0] sync_err_saved,
  output logic [1:0]            par_err,      // per-BX error strobes
  output logic [1:0]            sync_checked,
  output logic [1:0]            sync_err
);

  ch_in_t [1:0]          smp;
  logic   [1:0][3:0]     pbits;
  dpm_word_t [1:0]       w, w_fifo, w_pipe;
  logic                  fifo_valid;

  phase_sync #(.CH_W(IN_W), .N(2)) u_phase (
    .clk4x, .clk, .rst_n,
    .din        (din),
    .cycle_end,
    .auto_sel   (pcfg.auto_sel),
    .man_phase  (pcfg.man_phase),
    .dout       (smp),
    .phase_bits (pbits),
    .trans_saved(pstat.trans),
    .sel_phase  (pstat.sel_phase)
  );

  always_comb
    for (int c = 0; c < 2; c++) w[c] = {pbits[c], smp[c]};

  fifo_delay #(.W(2 * WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .din    (w),
    .bx_loc,
    .out_bx,
    .wstart (pcfg.wstart),
    .wstop  (pcfg.wstop),
    .dout   (w_fifo),
    .valid  (fifo_valid),
    .ovf    (pstat.ovf),
    .unf    (pstat.unf)
  );

  pipeline_delay #(.W(2 * WORD_W), .MAX_DELAY(MAX_DELAY), .DLY_W(DLY_W)) u_pipe (
    .clk, .rst_n,
    .din   (w),
    .delay (pcfg.delay),
    .dout  (w_pipe)
  );

  assign dout  = pcfg.mode_pipe ? w_pipe : w_fifo;
  assign valid = pcfg.mode_pipe ? 1'b1 : fifo_valid;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    parity_check u_par (
      .clk, .rst_n,
      .word      (smp[c]),
      .odd       (gcfg.par_odd),
      .cycle_end,
      .err       (par_err[c]),
      .err_saved (par_err_saved[c])
    );

    sync_check u_sync (
      .clk, .rst_n,
      .word       (dout[c]),
      .valid,
      .bx_loc,
      .out_bx,
      .start_sy   (gcfg.start_sy),
      .stop_sy    (gcfg.stop_sy),
      .use_flag   (gcfg.use_flag),
      .cmp_bx     (gcfg.cmp_bx),
      .sync_const (gcfg.sync_const),
      .cycle_end,
      .checked    (sync_checked[c]),
      .err        (sync_err[c]),
      .err_saved  (sync_err_saved[c])
    );
  end

endmodule
