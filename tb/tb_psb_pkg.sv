// tb_psb_pkg: checks the shared definitions: the word widths (28-bit channel
// word, 32-bit stored word), the field positions of the stored word, and the
// parity function against a bit-by-bit count for random data in even and odd
// mode.
module tb_psb_pkg;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    dpm_word_t w;
    chk($bits(ch_in_t) == 28, "channel word width");
    chk($bits(dpm_word_t) == 32, "stored word width");
    chk(LHC_LAST == 3563, "last BX");
    w = '0; w.phase = 4'hA; w.sync = 1'b1; w.parity = 3'b101; w.data = 24'h123456;
    chk(w == 32'hA_D_123456, "field positions");
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] d;
      logic [2:0] p;
      bit o;
      d = 24'($urandom); o = 1'($urandom);
      p = calc_parity(d, o);
      for (int b = 0; b < 3; b++) begin
        int ones;
        ones = 0;
        for (int k = 0; k < 8; k++) ones += d[8*b+k];
        chk(((ones + p[b]) % 2) == (o ? 1 : 0), $sformatf("parity byte %0d of %h odd=%0d", b, d, o));
      end
    end
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
