// tb_pipeline_delay: streams random words through the pipeline and checks
// for every DELAY value 1..64 (plus 0 and 100, which clamp to 1 and 64) that
// the output equals the input of DELAY-1 clocks earlier, i.e. that the
// pipeline including its registered input has DELAY stages.
module tb_pipeline_delay;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 64, MAXD = 64;
  logic clk = 0, rst_n = 1;
  logic [W-1:0] din, dout;
  logic [6:0] delay;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  pipeline_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d_eff;
    din = '0; delay = 1;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int d = 0; d <= MAXD + 1; d++) begin
      delay = (d == MAXD + 1) ? 7'd100 : 7'(d);
      d_eff = (d == 0) ? 1 : (d > MAXD ? MAXD : d);
      for (int i = 0; i < 2 * MAXD + 10; i++) begin
        din = {$urandom, $urandom};
        hist.push_front(din);
        if (hist.size() > MAXD + 1) void'(hist.pop_back());
        #1;
        if (i >= MAXD) begin
          checks++;
          if (dout !== hist[d_eff - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL delay %0d: %h exp %h", d, dout, hist[d_eff-1]);
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
