// psb_top: Pipelined Synchronising Buffer (PSB) of the level-1 global
// trigger.
//
// The PSB takes N_CH trigger channels that arrive with different latencies
// and phases, aligns them all to the same bunch crossing and passes them on to
// the trigger logic after a programmable delay. Per channel pair: sampling at
// four phases and phase choice, a FIFO or pipeline delay, parity and sync
// checks (psb_pair). Per channel: a ring buffer (dpm) written at the
// bunch-crossing number of the outgoing data. Common: the local bunch counter
// with its BCRes check (bx_counter), the readout processor that sends event
// and monitoring records (rop) and the register file (vme_regs).
//
// Interface: clk is the 40 MHz BX clock, clk4x the 160 MHz sampling clock
// with rising edges aligned to clk; bcres is the local bunch-counter reset.
// ch_in are the channel buses from the link receivers, gtl_out/gtl_valid the
// delayed words towards the link transmitters of the trigger-logic boards.
// req_* is the readout request (first BX, event number with monitor flag in
// bit 23), gtfe_* the outgoing readout words (one every second clock).
// vme_* is the register port (see vme_regs).
//
// Timing: with the reset settings (pipeline mode, DELAY=1) a word sampled in
// one BX appears on gtl_out one clock later. The structure follows the
// original design; the run-time choice between the two delay circuits for
// each pair and the register port are this design's choices.
module psb_top
  import psb_pkg::*;
#(
  parameter int unsigned N_CH       = 12,
  parameter int unsigned N_PAIR     = N_CH / 2,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned MAX_DELAY  = 64
) (
  input  logic                       clk,
  input  logic                       clk4x,
  input  logic                       rst_n,
  input  logic                       bcres,
  input  ch_in_t [N_CH-1:0]          ch_in,
  output ch_in_t [N_CH-1:0]          gtl_out,
  output logic   [N_CH-1:0]          gtl_valid,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  bx_t                        req_bx,
  input  logic [23:0]                req_evnum,
  output logic [31:0]                gtfe_data,
  output logic                       gtfe_valid,
  output logic                       gtfe_eoe,
  input  logic                       vme_we,
  input  logic [9:0]                 vme_addr,
  input  logic [31:0]                vme_wdata,
  output logic [31:0]                vme_rdata
);

  localparam int unsigned CH_W = (N_CH > 1) ? $clog2(N_CH) : 1;

  bx_t bx_loc, out_bx, bx_saved;
  logic cycle_end, bx_err_last;
  logic [CNT_W-1:0] bx_err_total;

  glob_cfg_t                  gcfg;
  pair_cfg_t  [N_PAIR-1:0]    pcfg;
  pair_stat_t [N_PAIR-1:0]    pstat;
  dpm_word_t  [N_CH-1:0]      word;
  logic [N_CH-1:0][CNT_W-1:0] par_err_saved, sync_err_saved;
  logic [N_CH-1:0][WORD_W-1:0] dpm_rdata;
  bx_t                        dpm_raddr;
  logic [CH_W-1:0]            dpm_ch;

  bx_counter u_bx (
    .clk, .rst_n, .bcres,
    .rstart    (gcfg.rstart),
    .bx_loc, .out_bx, .cycle_end,
    .saved_cnt (bx_saved),
    .err_last  (bx_err_last),
    .err_total (bx_err_total)
  );

  vme_regs #(.N_PAIR(N_PAIR), .N_CH(N_CH)) u_regs (
    .clk, .rst_n, .vme_we, .vme_addr, .vme_wdata, .vme_rdata,
    .gcfg, .pcfg, .pstat,
    .par_err  (par_err_saved),
    .sync_err (sync_err_saved),
    .bx_saved, .bx_err_last, .bx_err_total
  );

  for (genvar p = 0; p < N_PAIR; p++) begin : g_pair
    logic pvalid;

    psb_pair #(.FIFO_DEPTH(FIFO_DEPTH), .MAX_DELAY(MAX_DELAY)) u_pair (
      .clk4x, .clk, .rst_n,
      .din            (ch_in[2*p +: 2]),
      .cycle_end, .bx_loc, .out_bx,
      .pcfg           (pcfg[p]),
      .gcfg,
      .dout           (word[2*p +: 2]),
      .valid          (pvalid),
      .pstat          (pstat[p]),
      .par_err_saved  (par_err_saved[2*p +: 2]),
      .sync_err_saved (sync_err_saved[2*p +: 2]),
      .par_err        (),
      .sync_checked   (),
      .sync_err       ()
    );

    assign gtl_valid[2*p +: 2] = {2{pvalid}};
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    assign gtl_out[c] = word[c][IN_W-1:0];

    dpm #(.W(WORD_W), .DEPTH(4096)) u_dpm (
      .clk,
      .we    (1'b1),
      .waddr (out_bx),
      .wdata (word[c]),
      .raddr (dpm_raddr),
      .rdata (dpm_rdata[c])
    );
  end

  rop #(.N_CH(N_CH), .CH_W(CH_W)) u_rop (
    .clk, .rst_n, .req_valid, .req_ready, .req_bx, .req_evnum,
    .nbx       (gcfg.nbx),
    .dpm_raddr, .dpm_ch,
    .dpm_rdata (dpm_rdata[dpm_ch]),
    .gtfe_data, .gtfe_valid, .gtfe_eoe,
    .busy      ()
  );

endmodule
