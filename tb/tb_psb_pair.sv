// tb_psb_pair: one channel pair with its real sampling clocks. Words change
// 8 ns into each 24 ns bunch crossing (second quarter), carry correct parity
// and, now and then, a sync flag with the sync constant; a few parity errors
// and wrong sync words are injected. The local count runs over full LHC
// cycles. The pair is run in pipeline mode with DELAY=1 and 37 and then in
// FIFO mode with WSTART=10, RSTART=30, WSTOP=3500, and every output word
// (data, parity, sync flag and the four phase samples of bit 0) is compared
// with the input word it must be. Numbering the clock edges from 0 at 3 ns
// (word n changes at 3+24n+8 ns), after edge j the output holds word
// j-1-DELAY in pipeline mode and word j-2-(RSTART-WSTART) inside the read
// window in FIFO mode.
// Parity and sync error counts saved at the cycle ends must add up to the
// injected errors.
module tb_psb_pair;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk4x = 0, clk = 0, rst_n = 1, cycle_end = 0, valid;
  ch_in_t [1:0] din;
  bx_t bx_loc = 0, out_bx = 0;
  pair_cfg_t pcfg;
  glob_cfg_t gcfg;
  dpm_word_t [1:0] dout;
  pair_stat_t pstat;
  logic [1:0][CNT_W-1:0] par_err_saved, sync_err_saved;
  logic [1:0] par_err, sync_checked, sync_err;
  int checks = 0, failures = 0;

  psb_pair dut (.*);

  initial forever #3 clk4x = ~clk4x;
  initial begin #3; forever begin clk = 1; #12; clk = 0; #12; end end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %t", msg, $realtime); end
  endtask

  localparam int NCYC = 7, NW = NCYC * 3564 + 10;
  localparam logic [23:0] SCONST = 24'h5C5C5C;
  ch_in_t words [NW][2];

  function automatic ch_in_t mk(int n, int c);
    ch_in_t w;
    w.data   = 24'($urandom);
    w.sync   = 1'b0;
    if (n % 97 == 50) begin
      w.sync = 1'b1;
      w.data = SCONST;
      if (n % 5 == 0 && c == 0) w.data = 24'h000BAD;
    end
    w.parity = calc_parity(w.data, 1'b0);
    if (n % 331 == 100 && c == 1) w.parity[1] ^= 1'b1;
    return w;
  endfunction

  initial begin
    for (int n = 0; n < NW; n++)
      for (int c = 0; c < 2; c++) words[n][c] = mk(n, c);
    din = '0;
    for (int n = 0; n < NW; n++) begin
      while ($realtime < 3 + 24 * n + 8) #1;
      din = {words[n][1], words[n][0]};
    end
  end

  int mode_pipe, dly, ws, rs, wstop;
  int exp_par = 0, exp_sync = 0;

  initial begin
    int j, b, k, src;
    dpm_word_t e;
    gcfg = '0;
    gcfg.rstart = 30; gcfg.start_sy = 3437; gcfg.stop_sy = 3563;
    gcfg.sync_const = SCONST; gcfg.use_flag = 1; gcfg.nbx = 5;
    pcfg = '0; pcfg.auto_sel = 1; pcfg.wstart = 10; pcfg.wstop = 3500;
    #1 rst_n = 0;
    #1 rst_n = 1;
    j = 0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      mode_pipe = (cyc < 4); dly = (cyc < 2) ? 1 : 37;
      ws = 10; rs = 30; wstop = 3500;
      pcfg.mode_pipe = 1'(mode_pipe); pcfg.delay = DLY_W'(dly);
      for (b = 0; b < 3564; b++) begin
        @(posedge clk); j++;
        #1;
        bx_loc = bx_t'(b);
        out_bx = bx_t'((b - rs + 3564) % 3564);
        cycle_end = (b == 3563);
        #1;
        if (b == 0 && (cyc == 2 || cyc == 4 || cyc == 6)) check_counts();
        if (b == 0) begin exp_par = 0; exp_sync = 0; end
        // the parity check sees the sampled word, word j-3
        for (int c = 0; c < 2; c++)
          if (words[j-3][c].parity != calc_parity(words[j-3][c].data, 0)) exp_par++;
        if (cyc == 0 || cyc == 2 || cyc == 4) continue;   // settle after a change
        if (mode_pipe) begin
          src = j - 2 - dly;
          chk(valid, "pipeline valid");
        end else begin
          src = j - 3 - (rs - ws);
          chk(valid == (int'(out_bx) < wstop - ws), $sformatf("fifo valid b=%0d", b));
          if (!valid) continue;
        end
        for (int c = 0; c < 2; c++) begin
          e.data = words[src][c].data; e.parity = words[src][c].parity; e.sync = words[src][c].sync;
          e.phase = {words[src+1][c].data[0], words[src+1][c].data[0],
                     words[src][c].data[0], words[src][c].data[0]};
          chk(dout[c] == e, $sformatf("ch%0d b=%0d mode=%0d got %h exp %h", c, b, mode_pipe, dout[c], e));
          if (words[src][c].sync && words[src][c].data != SCONST) exp_sync++;
        end
      end
    end
    @(posedge clk); #2;
    check_counts();
    chk(n_checked_par > 0 && n_checked_sync > 0, "errors were injected and seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_checked_par = 0, n_checked_sync = 0;
  // errors of the cycle just ended, saved by the pair at its end
  task automatic check_counts();
    chk(int'(par_err_saved[0]) + int'(par_err_saved[1]) == exp_par,
        $sformatf("parity errors %0d+%0d exp %0d", par_err_saved[0], par_err_saved[1], exp_par));
    chk(int'(sync_err_saved[0]) + int'(sync_err_saved[1]) == exp_sync,
        $sformatf("sync errors %0d+%0d exp %0d", sync_err_saved[0], sync_err_saved[1], exp_sync));
    n_checked_par += exp_par; n_checked_sync += exp_sync;
  endtask
endmodule
