// tb_vme_regs: checks the reset values, writes every control register through
// the register port and reads it back, checks that the outputs to the design
// follow, and reads the status inputs (transition counts, pair status,
// per-channel error counts, bunch-counter status) at their addresses.
module tb_vme_regs;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NP = 6, NC = 12;
  logic clk = 0, rst_n = 1, vme_we = 0;
  logic [9:0] vme_addr = 0;
  logic [31:0] vme_wdata = 0, vme_rdata;
  glob_cfg_t gcfg;
  pair_cfg_t [NP-1:0] pcfg;
  pair_stat_t [NP-1:0] pstat;
  logic [NC-1:0][CNT_W-1:0] par_err, sync_err;
  bx_t bx_saved;
  logic bx_err_last;
  logic [CNT_W-1:0] bx_err_total;
  int checks = 0, failures = 0;

  vme_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic wr(int a, int d);
    vme_addr = 10'(a); vme_wdata = 32'(d); vme_we = 1;
    @(posedge clk); #1; vme_we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    vme_addr = 10'(a);
    @(posedge clk); #1; d = vme_rdata;
  endtask

  initial begin
    logic [31:0] d;
    for (int p = 0; p < NP; p++) begin
      for (int k = 0; k < 4; k++) pstat[p].trans[k] = CNT_W'(1000 * p + k);
      pstat[p].sel_phase = 2'(p); pstat[p].ovf = p[0]; pstat[p].unf = p[1];
    end
    for (int c = 0; c < NC; c++) begin par_err[c] = CNT_W'(c + 7); sync_err[c] = CNT_W'(3 * c + 1); end
    bx_saved = 12'd3563; bx_err_last = 1; bx_err_total = 16'd42;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // reset values
    rd(0, d); chk(d == 1, "RSTART reset");
    rd(5, d); chk(d == 5, "NBX reset");
    chk(pcfg[3].mode_pipe && pcfg[3].auto_sel && pcfg[3].delay == 1 && pcfg[3].wstop == 3563, "pair reset");
    // global registers
    wr(0, 123);   wr(1, 3400); wr(2, 3500); wr(3, 32'hFFABCDEF); wr(4, 5); wr(5, 3);
    rd(0, d); chk(d == 123, "RSTART");
    rd(1, d); chk(d == 3400, "START_SY");
    rd(2, d); chk(d == 3500, "STOP_SY");
    rd(3, d); chk(d == 32'hABCDEF, "SYNC_CONST");
    rd(4, d); chk(d == 5, "CTRL");
    rd(5, d); chk(d == 3, "NBX");
    chk(gcfg.rstart == 123 && gcfg.par_odd && !gcfg.cmp_bx && gcfg.use_flag && gcfg.nbx == 3, "gcfg outputs");
    // pair registers
    for (int p = 0; p < NP; p++) begin
      wr(64 + 16 * p + 0, 10 + p);
      wr(64 + 16 * p + 1, 3000 + p);
      wr(64 + 16 * p + 2, 20 + p);
      wr(64 + 16 * p + 3, p % 16);
    end
    for (int p = 0; p < NP; p++) begin
      rd(64 + 16 * p + 0, d); chk(d == 10 + p, "WSTART");
      rd(64 + 16 * p + 1, d); chk(d == 3000 + p, "WSTOP");
      rd(64 + 16 * p + 2, d); chk(d == 20 + p, "DELAY");
      rd(64 + 16 * p + 3, d); chk(d == p % 16, "PCTRL");
      chk(pcfg[p].wstart == 10 + p && pcfg[p].delay == 20 + p && pcfg[p].mode_pipe == p[0]
          && pcfg[p].auto_sel == p[1] && pcfg[p].man_phase == 2'(p >> 2), "pcfg outputs");
      for (int k = 0; k < 4; k++) begin
        rd(64 + 16 * p + 4 + k, d); chk(d == 1000 * p + k, "transition count");
      end
      rd(64 + 16 * p + 8, d); chk(d == {28'd0, 2'(p), p[1], p[0]}, "pair status");
    end
    for (int c = 0; c < NC; c++) begin
      rd(256 + 4 * c, d);     chk(d == c + 7, "parity errors");
      rd(256 + 4 * c + 1, d); chk(d == 3 * c + 1, "sync errors");
    end
    rd(8, d); chk(d == {1'b1, 3'd0, 16'd42, 12'd3563}, "bx status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
