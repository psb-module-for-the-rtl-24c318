// tb_phase_sync: drives a channel pair whose words change at a chosen point
// inside the bunch crossing (the time of every change is recorded) and checks,
// BX by BX, the selected-phase output and the four phase bits against the
// value present on the input at each sampling instant (BX clock edge + k
// quarter periods). Per-boundary transition counts are modelled from the same
// instants and compared with the saved counters at every cycle end. The data
// edge is moved from the second to the third and to the fourth quarter so that
// the automatic choice must follow (phase 0, then 1, then 2); a manual phase
// is checked as well.
module tb_phase_sync;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int CW = IN_W, N = 2, CYC = 100;
  logic clk4x = 0, clk = 0, rst_n = 1, cycle_end = 0, auto_sel = 1;
  logic [1:0] man_phase = 0, sel_phase;
  logic [N-1:0][CW-1:0] din, dout;
  logic [N-1:0][3:0] phase_bits;
  logic [3:0][CNT_W-1:0] trans_saved;
  int checks = 0, failures = 0;

  phase_sync dut (.*);

  // clk4x rising at 3, 9, 15, ...; clk rising at 3, 27, 51, ...
  initial forever #3 clk4x = ~clk4x;
  initial begin #3; forever begin clk = 1; #12; clk = 0; #12; end end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NW = 1400;
  logic [N-1:0][CW-1:0] words [NW];
  realtime times [NW];
  int off = 8;

  // input driver: word n changes at 3 + 24n + off
  initial begin
    din = '0;
    for (int n = 0; n < NW; n++) begin
      words[n] = {$urandom, $urandom};
      times[n] = 1.0e9;
    end
    for (int n = 0; n < NW; n++) begin
      while ($realtime < 3 + 24 * n + off) #1;
      din = words[n];
      times[n] = $realtime;
    end
  end

  function automatic logic [N-1:0][CW-1:0] value_at(realtime t);
    logic [N-1:0][CW-1:0] v = '0;
    for (int n = 0; n < NW; n++) if (times[n] <= t) v = words[n];
    return v;
  endfunction

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %t", msg, $realtime); end
  endtask

  int cnt [4] = '{0, 0, 0, 0};
  int nbx = 0;

  initial begin
    realtime te;
    logic [1:0] sel;
    logic [N-1:0][CW-1:0] s [-1:3];
    bit ce;
    #1 rst_n = 0;
    #1 rst_n = 1;
    forever begin
      @(posedge clk);
      te  = $realtime;
      ce  = cycle_end;
      #1;
      if (nbx >= 2) begin
        for (int k = -1; k < 4; k++) s[k] = value_at(te - 24 + 6 * k);
        chk(dout == s[sel], $sformatf("dout sel=%0d", sel));
        for (int c = 0; c < N; c++)
          for (int k = 0; k < 4; k++)
            chk(phase_bits[c][k] == s[k][c][0], "phase bit");
        for (int k = 0; k < 4; k++) if (s[k] != s[k-1]) cnt[k]++;
        if (ce && nbx > CYC) begin
          for (int k = 0; k < 4; k++)
            chk(trans_saved[k] == CNT_W'(cnt[k]), $sformatf("trans[%0d]=%0d exp %0d", k, trans_saved[k], cnt[k]));
        end
        if (ce) cnt = '{0, 0, 0, 0};
      end else if (ce) cnt = '{0, 0, 0, 0};
      nbx++;
      cycle_end = (nbx % CYC) == 0;
      #20; sel = sel_phase;   // phase used at the next edge
    end
  end

  initial begin
    wait (nbx == 3 * CYC + 5);
    chk(sel_phase == 2'd0, $sformatf("auto phase %0d exp 0 (edge in quarter 2)", sel_phase));
    off = 14;
    wait (nbx == 6 * CYC + 5);
    chk(sel_phase == 2'd1, $sformatf("auto phase %0d exp 1 (edge in quarter 3)", sel_phase));
    off = 20;
    wait (nbx == 9 * CYC + 5);
    chk(sel_phase == 2'd2, $sformatf("auto phase %0d exp 2 (edge in quarter 4)", sel_phase));
    auto_sel = 0; man_phase = 3;
    wait (nbx == 10 * CYC + 5);
    chk(sel_phase == 2'd3, "manual phase");
    wait (nbx == 12 * CYC + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
