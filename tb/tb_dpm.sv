// tb_dpm: writes random words at random addresses while reading others,
// checks the one-clock read latency and read-before-write on an address
// collision against a copy of the memory held in the testbench.
module tb_dpm;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, we;
  logic [11:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [4096];
  int checks = 0, failures = 0;

  dpm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill the whole memory as the ring buffer would over one cycle
    for (int a = 0; a < 4096; a++) begin
      we = 1; waddr = 12'(a); wdata = $urandom;
      ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 5000; i++) begin
      we    = $urandom % 2;
      waddr = $urandom;
      raddr = (i % 7 == 0) ? waddr : 12'($urandom);
      wdata = $urandom;
      exp   = ref_mem[raddr];
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++; $display("FAIL addr %h got %h exp %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
