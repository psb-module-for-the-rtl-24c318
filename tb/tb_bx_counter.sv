// tb_bx_counter: runs the local bunch counter over several LHC cycles with
// BCRes on time, early, late (counter wrapped by itself) and missing, and
// checks bx_loc, out_bx for several RSTART values, the stored count and the
// error flags against a reference count kept in the testbench.
module tb_bx_counter;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 1, bcres = 0;
  bx_t rstart, bx_loc, out_bx, saved_cnt;
  logic cycle_end, err_last;
  logic [CNT_W-1:0] err_total;
  int checks = 0, failures = 0;

  bx_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  int m_cnt, m_saved, m_err;
  bit m_last;

  // run n clocks, BCRes in the last one if br
  task automatic run(int n, bit br);
    for (int i = 0; i < n; i++) begin
      bcres <= br && (i == n - 1);
      @(posedge clk);
      if (bcres) begin
        m_saved = m_cnt; m_last = (m_cnt != 3563);
        if (m_last) m_err++;
        m_cnt = 0;
      end else m_cnt = (m_cnt == 3563) ? 0 : m_cnt + 1;
      #1;
      chk(bx_loc == bx_t'(m_cnt), $sformatf("bx_loc %0d exp %0d", bx_loc, m_cnt));
      chk(out_bx == bx_t'((m_cnt - int'(rstart) + 3564) % 3564), $sformatf("out_bx %0d", out_bx));
      chk(cycle_end == bcres, "cycle_end");
    end
    bcres <= 0;
  endtask

  initial begin
    rstart = 1;
    m_cnt = 0; m_saved = 3563; m_err = 0; m_last = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(100, 1);                       // early BCRes: error
    chk(saved_cnt == bx_t'(m_saved) && err_last && err_total == 1, "early bcres");
    run(3564, 1);                      // on time
    chk(saved_cnt == 3563 && !err_last && err_total == 1, "on-time bcres");
    rstart = 17;
    run(3564, 1);
    chk(!err_last && err_total == 1, "on-time bcres 2");
    rstart = 3000;
    run(3564 + 5, 1);                  // late: wrapped by itself, error
    chk(saved_cnt == 4 && err_last && err_total == 2, "late bcres");
    run(3564 * 2, 0);                  // missing BCRes: free running
    run(3564, 1);
    chk(err_total == bx_t'(m_err), "error total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
