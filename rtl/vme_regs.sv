// vme_regs: register file seen by the VME monitoring and control software.
//
// A simple synchronous port: a write (vme_we) takes vme_wdata into the
// register at vme_addr at the clock edge; a read returns the register at
// vme_addr on vme_rdata one clock later. The map (32-bit word addresses):
//   0x000 RSTART      0x001 START_SY   0x002 STOP_SY   0x003 SYNC_CONST
//   0x004 CTRL  {.., par_odd[2], cmp_bx[1], use_flag[0]}
//   0x005 NBX   (BXs read out per event)
//   0x008 BXSTAT (RO) {err_last[31], err_total[27:12], saved_cnt[11:0]}
//   pair p, base 0x040 + 16*p:
//     +0 WSTART  +1 WSTOP  +2 DELAY
//     +3 PCTRL {man_phase[3:2], auto_sel[1], mode_pipe[0]}
//     +4..+7 transition count of phase boundary 0..3, previous cycle (RO)
//     +8 PSTAT {sel_phase[3:2], unf[1], ovf[0]} (RO)
//   channel c, base 0x100 + 4*c:
//     +0 parity errors, previous cycle (RO)   +1 sync errors, previous cycle (RO)
// The register names follow the original design; the bus, the map and the
// reset values are this design's choices. Reset values give the shortest
// latency: pipeline mode, DELAY=1, RSTART=1, automatic phase, WSTART=0,
// WSTOP=3563, a sync window over the bunch-free gap 3437..3562 and NBX=5.
module vme_regs
  import psb_pkg::*;
#(
  parameter int unsigned N_PAIR = 6,
  parameter int unsigned N_CH   = 2 * N_PAIR
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        vme_we,
  input  logic [9:0]                  vme_addr,
  input  logic [31:0]                 vme_wdata,
  output logic [31:0]                 vme_rdata,
  output glob_cfg_t                   gcfg,
  output pair_cfg_t [N_PAIR-1:0]      pcfg,
  input  pair_stat_t [N_PAIR-1:0]     pstat,
  input  logic [N_CH-1:0][CNT_W-1:0]  par_err,
  input  logic [N_CH-1:0][CNT_W-1:0]  sync_err,
  input  bx_t                         bx_saved,
  input  logic                        bx_err_last,
  input  logic [CNT_W-1:0]            bx_err_total
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcfg.rstart     <= bx_t'(1);
      gcfg.start_sy   <= bx_t'(3437);
      gcfg.stop_sy    <= bx_t'(LHC_LAST);
      gcfg.sync_const <= '0;
      gcfg.use_flag   <= 1'b0;
      gcfg.cmp_bx     <= 1'b0;
      gcfg.par_odd    <= 1'b0;
      gcfg.nbx        <= 4'd5;
      for (int p = 0; p < N_PAIR; p++) begin
        pcfg[p].wstart    <= '0;
        pcfg[p].wstop     <= bx_t'(LHC_LAST);
        pcfg[p].delay     <= DLY_W'(1);
        pcfg[p].mode_pipe <= 1'b1;
        pcfg[p].auto_sel  <= 1'b1;
        pcfg[p].man_phase <= 2'd0;
      end
    end else if (vme_we) begin
      case (vme_addr)
        10'h000: gcfg.rstart     <= vme_wdata[BX_W-1:0];
        10'h001: gcfg.start_sy   <= vme_wdata[BX_W-1:0];
        10'h002: gcfg.stop_sy    <= vme_wdata[BX_W-1:0];
        10'h003: gcfg.sync_const <= vme_wdata[DATA_W-1:0];
        10'h004: {gcfg.par_odd, gcfg.cmp_bx, gcfg.use_flag} <= vme_wdata[2:0];
        10'h005: gcfg.nbx        <= vme_wdata[3:0];
        default: ;
      endcase
      for (int p = 0; p < N_PAIR; p++) begin
        if (vme_addr[9:4] == 6'(4 + p)) begin
          case (vme_addr[3:0])
            4'h0: pcfg[p].wstart <= vme_wdata[BX_W-1:0];
            4'h1: pcfg[p].wstop  <= vme_wdata[BX_W-1:0];
            4'h2: pcfg[p].delay  <= vme_wdata[DLY_W-1:0];
            4'h3: {pcfg[p].man_phase, pcfg[p].auto_sel, pcfg[p].mode_pipe} <= vme_wdata[3:0];
            default: ;
          endcase
        end
      end
    end
  end

  logic [31:0] rd;
  always_comb begin
    rd = '0;
    case (vme_addr)
      10'h000: rd = 32'(gcfg.rstart);
      10'h001: rd = 32'(gcfg.start_sy);
      10'h002: rd = 32'(gcfg.stop_sy);
      10'h003: rd = 32'(gcfg.sync_const);
      10'h004: rd = {29'd0, gcfg.par_odd, gcfg.cmp_bx, gcfg.use_flag};
      10'h005: rd = 32'(gcfg.nbx);
      10'h008: rd = {bx_err_last, 3'd0, bx_err_total, bx_saved};
      default: ;
    endcase
    for (int p = 0; p < N_PAIR; p++) begin
      if (vme_addr[9:4] == 6'(4 + p)) begin
        case (vme_addr[3:0])
          4'h0: rd = 32'(pcfg[p].wstart);
          4'h1: rd = 32'(pcfg[p].wstop);
          4'h2: rd = 32'(pcfg[p].delay);
          4'h3: rd = {28'd0, pcfg[p].man_phase, pcfg[p].auto_sel, pcfg[p].mode_pipe};
          4'h4: rd = 32'(pstat[p].trans[0]);
          4'h5: rd = 32'(pstat[p].trans[1]);
          4'h6: rd = 32'(pstat[p].trans[2]);
          4'h7: rd = 32'(pstat[p].trans[3]);
          4'h8: rd = {28'd0, pstat[p].sel_phase, pstat[p].unf, pstat[p].ovf};
          default: ;
        endcase
      end
    end
    for (int c = 0; c < N_CH; c++) begin
      if (vme_addr == 10'(256 + 4 * c))     rd = 32'(par_err[c]);
      if (vme_addr == 10'(256 + 4 * c + 1)) rd = 32'(sync_err[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vme_rdata <= '0;
    else        vme_rdata <= rd;
  end

endmodule
