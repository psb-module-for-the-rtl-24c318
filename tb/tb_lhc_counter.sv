// tb_lhc_counter: checks the per-cycle event counter against a software count:
// random events, cycle ends at irregular intervals, an event in the cycle-end
// clock, and saturation (W=4 so that it is reached quickly).
module tb_lhc_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 4;
  logic clk = 0, rst_n = 1, inc = 0, cycle_end = 0;
  logic [W-1:0] saved;
  int checks = 0, failures = 0;

  lhc_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, len;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 40; cyc++) begin
      model = 0;
      len = 3 + ($urandom % 30);
      for (int i = 0; i < len; i++) begin
        inc <= ($urandom % 3) == 0;
        cycle_end <= (i == len - 1);
        @(posedge clk);
        if (inc && model < (1 << W) - 1) model++;
      end
      inc <= 0; cycle_end <= 0;
      #1;
      checks++;
      if (saved !== W'(model)) begin
        failures++;
        $display("FAIL cycle %0d: saved=%0d expected=%0d", cyc, saved, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
