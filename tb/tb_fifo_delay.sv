// tb_fifo_delay: drives the synchronisation FIFO with a local bunch count
// running over full LHC cycles (3564 BX) and a word that carries its own BX of
// writing. For several (WSTART, WSTOP, RSTART) settings it checks that the
// output is valid exactly in the read window 0 <= out_bx < WSTOP-WSTART, that
// each word leaves RSTART-WSTART clocks after it was written (the first one
// being the word written at WSTART), and that no error flag rises. It then
// sets a delay longer than the FIFO (overflow) and RSTART = WSTART (underflow)
// and checks the flags.
module tb_fifo_delay;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 64;
  logic clk = 0, rst_n = 1;
  logic [W-1:0] din, dout;
  bx_t bx_loc, out_bx, wstart, wstop;
  logic valid, ovf, unf;
  int rstart;
  int checks = 0, failures = 0;

  fifo_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stamp = 0;   // running clock number written into the data
  task automatic run_cycles(int ncyc, int ws, int we_, int rs, bit check);
    int dly, len, ob;
    wstart = bx_t'(ws); wstop = bx_t'(we_); rstart = rs;
    dly = rs - ws; len = we_ - ws;
    for (int c = 0; c < ncyc; c++)
      for (int b = 0; b < 3564; b++) begin
        bx_loc = bx_t'(b);
        ob     = (b - rs + 3564) % 3564;
        out_bx = bx_t'(ob);
        din    = {32'(stamp), 20'd0, bx_t'(b)};
        #1;
        if (check && c > 0) begin
          checks++;
          if (valid !== (ob < len)) begin
            failures++; if (failures < 10) $display("FAIL valid=%b b=%0d", valid, b);
          end
          if (ob < len) begin
            checks++;
            // written dly clocks ago at local count ws+ob
            if (dout !== {32'(stamp - dly), 20'd0, bx_t'(ws + ob)}) begin
              failures++; if (failures < 10) $display("FAIL data %h b=%0d", dout, b);
            end
          end else begin
            checks++;
            if (dout !== '0) begin failures++; $display("FAIL nonzero when idle"); end
          end
        end
        @(posedge clk); #1;
        stamp++;
      end
  endtask

  initial begin
    din = '0; bx_loc = 0; out_bx = 0; wstart = 0; wstop = 3563;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_cycles(2, 20, 3563, 21, 1);      // delay 1
    run_cycles(2, 20, 3563, 84, 1);      // delay 64 = FIFO length
    run_cycles(2, 5, 3437, 40, 1);       // stop early (gap)
    checks++;
    if (ovf || unf) begin failures++; $display("FAIL flag raised ovf=%b unf=%b", ovf, unf); end
    run_cycles(1, 5, 3437, 75, 0);       // delay 70 > 64
    checks++;
    if (!ovf) begin failures++; $display("FAIL no overflow"); end
    run_cycles(1, 5, 3437, 5, 0);        // delay 0
    checks++;
    if (!unf) begin failures++; $display("FAIL no underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
