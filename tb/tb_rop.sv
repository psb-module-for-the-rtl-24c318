// tb_rop: the readout processor reads from a model of the 12 ring buffers
// whose word for (BX a, channel c) is {c, 8'h5A, 4'h0, a} with one clock of
// read latency. For L1-accept and monitoring requests, different BX counts
// and a BX range that wraps past 3563, the record is compared word by word
// with the expected header, data and end-of-event words, and the time from
// accepting the request to the end-of-event word is checked: two clocks per
// word (20 MHz link), 124 clocks for the 62-word record of 5 BX.
module tb_rop;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 1, req_valid = 0, req_ready;
  bx_t req_bx, dpm_raddr, addr_q;
  logic [23:0] req_evnum;
  logic [3:0] nbx;
  logic [3:0] dpm_ch;
  logic [31:0] dpm_rdata, gtfe_data;
  logic gtfe_valid, gtfe_eoe, busy;
  int checks = 0, failures = 0;

  rop dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) addr_q <= dpm_raddr;
  assign dpm_rdata = {dpm_ch, 8'h5A, 8'h00, addr_q};

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic readout(int bx0, int ev, int n);
    logic [31:0] exp [$];
    int t0, t, idx;
    exp.push_back({ev[23] ? 8'hD1 : 8'hE1, 24'(ev)});
    for (int b = 0; b < n; b++)
      for (int c = 0; c < 12; c++)
        exp.push_back({4'(c), 8'h5A, 8'h00, bx_t'((bx0 + b) % 3564)});
    exp.push_back({8'hEE, 24'(ev)});
    nbx = 4'(n);
    req_bx = bx_t'(bx0); req_evnum = 24'(ev); req_valid = 1;
    t = 0;
    do begin @(posedge clk); t++; end while (!req_ready);  // taken at this edge
    #1; req_valid = 0;
    t0 = t; idx = 0;
    while (idx < exp.size()) begin
      @(posedge clk); #1; t++;
      if (gtfe_valid) begin
        chk(gtfe_data == exp[idx], $sformatf("word %0d: %h exp %h", idx, gtfe_data, exp[idx]));
        chk(gtfe_eoe == (idx == exp.size() - 1), "eoe flag");
        idx++;
      end
      if (t - t0 > 1000) break;
    end
    chk(t - t0 == 2 * exp.size(), $sformatf("record took %0d clocks, exp %0d", t - t0, 2 * exp.size()));
    @(posedge clk); #1;
    chk(req_ready && !busy, "idle after record");
  endtask

  initial begin
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    readout(100, 24'h000123, 5);        // L1 accept, 62 words
    readout(3561, 24'h800456, 5);       // monitoring, wraps past 3563
    readout(7, 24'h000789, 1);
    readout(2000, 24'h000abc, 0);       // header and end only
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
