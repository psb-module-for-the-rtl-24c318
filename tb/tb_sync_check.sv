// tb_sync_check: drives delayed words through the four modes (window or sync
// flag, constant or BX number) with correct and wrong sync words and words
// outside the window, and checks `checked`, `err` and the saved count.
module tb_sync_check;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 1, valid, use_flag, cmp_bx, cycle_end = 0;
  logic checked, err;
  dpm_word_t word;
  bx_t bx_loc, out_bx, start_sy, stop_sy;
  logic [DATA_W-1:0] sync_const;
  logic [CNT_W-1:0] err_saved;
  int checks = 0, failures = 0;

  sync_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err;
    bit e_chk, e_err;
    start_sy = 100; stop_sy = 120; sync_const = 24'hA5C3F0;
    word = '0; valid = 1; bx_loc = 0; out_bx = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int mode = 0; mode < 4; mode++) begin
      use_flag = mode[1]; cmp_bx = mode[0];
      n_err = 0;
      for (int b = 0; b < 200; b++) begin
        bx_loc = bx_t'(b);
        out_bx = bx_t'((b + 3564 - 7) % 3564);
        valid  = ($urandom % 8) != 0;
        word   = $urandom;
        word.sync = (b % 13) == 0;
        // mostly correct sync words where a check happens
        if (($urandom % 4) != 0) begin
          if (cmp_bx) word.data[11:0] = out_bx;
          else        word.data = sync_const;
        end
        cycle_end = (b == 199);
        #1;
        e_chk = valid && (use_flag ? word.sync : (b >= 100 && b < 120));
        e_err = e_chk && (cmp_bx ? (word.data[11:0] != out_bx) : (word.data != sync_const));
        if (e_err) n_err++;
        checks += 2;
        if (checked !== e_chk) begin failures++; $display("FAIL checked mode %0d b %0d", mode, b); end
        if (err !== e_err)     begin failures++; $display("FAIL err mode %0d b %0d", mode, b); end
        @(posedge clk); #1;
      end
      cycle_end = 0;
      checks++;
      if (err_saved != CNT_W'(n_err)) begin
        failures++; $display("FAIL saved %0d exp %0d mode %0d", err_saved, n_err, mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
