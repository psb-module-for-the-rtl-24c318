// tb_parity_check: random words with correct parity and with single or
// multiple flipped parity/data bits, in even and odd mode; checks the per-BX
// error and the saved per-cycle count against a reference computed bit by bit.
module tb_parity_check;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 1, odd = 0, cycle_end = 0, err;
  ch_in_t word;
  logic [CNT_W-1:0] err_saved;
  int checks = 0, failures = 0;

  parity_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: count ones of byte i plus its parity bit
  function automatic bit ref_err(ch_in_t w, bit o);
    for (int i = 0; i < 3; i++) begin
      int ones = 0;
      for (int b = 0; b < 8; b++) ones += w.data[8*i+b];
      ones += w.parity[i];
      if ((ones % 2) != (o ? 1 : 0)) return 1;
    end
    return 0;
  endfunction

  initial begin
    int n_err;
    word = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 10; cyc++) begin
      n_err = 0;
      odd = cyc[0];
      for (int i = 0; i < 50; i++) begin
        word.data   = $urandom;
        word.sync   = $urandom;
        word.parity = calc_parity(word.data, odd);
        if (($urandom % 4) == 0) word.parity[$urandom % 3] ^= 1'b1;
        if (($urandom % 6) == 0) word.data[$urandom % 24] ^= 1'b1;
        cycle_end = (i == 49);
        #1;
        checks++;
        if (err !== ref_err(word, odd)) begin
          failures++; $display("FAIL err=%b word=%h odd=%b", err, word, odd);
        end
        if (ref_err(word, odd)) n_err++;
        @(posedge clk); #1;
      end
      cycle_end = 0;
      checks++;
      if (err_saved != CNT_W'(n_err)) begin
        failures++; $display("FAIL saved=%0d exp=%0d", err_saved, n_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
