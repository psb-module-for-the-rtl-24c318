// tb_psb_readout_rate: readout load at the design's target rate. The whole
// module runs at its default size; every 400 BX clocks (10 us, an L1 accept
// rate of 100 kHz) an L1-accept request is raised, and monitoring requests
// are issued back to back in between. Every record must have 62 words
// (5 BX x 12 channels, header, end of event) whose data words carry the
// right channel and BX number, take 124 clocks, and each L1 accept must be
// taken at once. At least two monitoring records must fit between two
// L1 accepts, i.e. about 70% of the link time is left for monitoring.
module tb_psb_readout_rate;
  import psb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, clk4x = 0, rst_n = 1, bcres = 0;
  ch_in_t [11:0] ch_in, gtl_out;
  logic [11:0] gtl_valid;
  logic req_valid = 0, req_ready;
  bx_t req_bx = 0;
  logic [23:0] req_evnum = 0;
  logic [31:0] gtfe_data, vme_wdata = 0, vme_rdata;
  logic gtfe_valid, gtfe_eoe, vme_we = 0;
  logic [9:0] vme_addr = 0;
  int checks = 0, failures = 0;

  psb_top dut (.*);

  initial forever #3 clk4x = ~clk4x;
  initial begin #3; forever begin clk = 1; #12; clk = 0; #12; end end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %t", msg, $realtime); end
  endtask

  localparam int E0 = 10, L = 3564, R = 2;

  // upstream: word of slot s carries BX (s - E0) mod L, no latency
  initial begin
    ch_in = '0;
    for (int s = 0; s < 5 * L; s++) begin
      while ($realtime < 3 + 24 * s + 8) #1;
      for (int c = 0; c < 12; c++) begin
        int t;
        t = (s - E0 + L) % L;
        ch_in[c].data   = {4'(c), 8'h00, 12'(t)};
        ch_in[c].sync   = 1'b0;
        ch_in[c].parity = calc_parity(ch_in[c].data, 1'b0);
      end
    end
  end

  int e = -1;
  always @(posedge clk) begin
    e++;
    #1 bcres = ((e + 1 - E0) % L == 0);
  end

  // record monitor: checks every record on the link
  int words = 0, rec_start = 0, n_l1a = 0, n_mon = 0, cur_bx0 = 0;
  bit cur_mon;
  int bx0_q [$];
  always @(posedge clk) begin
    #2;
    if (gtfe_valid) begin
      if (words == 0) begin
        cur_mon = gtfe_data[23];
        cur_bx0 = bx0_q.pop_front();
        chk(gtfe_data[31:24] == (cur_mon ? 8'hD1 : 8'hE1), "header identifier");
      end else if (words <= 60) begin
        int b, c;
        b = (words - 1) / 12; c = (words - 1) % 12;
        chk(gtfe_data[23:20] == 4'(c) && gtfe_data[11:0] == 12'((cur_bx0 + b) % L),
            $sformatf("data word %0d: %h exp bx %0d", words, gtfe_data, (cur_bx0 + b) % L));
      end
      words++;
      if (gtfe_eoe) begin
        chk(words == 62, $sformatf("record of %0d words", words));
        chk(e - rec_start == 124, $sformatf("record took %0d clocks", e - rec_start));
        if (cur_mon) n_mon++; else n_l1a++;
        words = 0;
      end
    end
  end

  initial begin
    int next_l1a, ev, mon_in_window, min_mon;
    #1 rst_n = 0;
    #1 rst_n = 1;
    // RSTART = 2: data of BX t leave when the local count is t + 2
    vme_addr = 10'h000; vme_wdata = R; vme_we = 1;
    @(posedge clk); #1 vme_we = 0;
    while (e < E0 + L + 10) @(posedge clk);   // one full cycle in the buffers
    #1;
    next_l1a = e + 5; ev = 0; min_mon = 99;
    for (int k = 0; k < 20; k++) begin
      int n0;
      n0 = n_mon;
      // L1 accept: must be taken in the clock it is raised
      while (e < next_l1a) begin @(posedge clk); #1; end
      chk(req_ready, "readout idle when the L1 accept comes");
      req_bx = bx_t'((e - E0 - 100 + L) % L); req_evnum = 24'(ev++); req_valid = 1;
      bx0_q.push_back(req_bx);
      @(posedge clk); rec_start = e + 1; #1 req_valid = 0;
      next_l1a += 400;
      // monitoring requests while they fit before the next L1 accept
      forever begin
        while (!req_ready) begin @(posedge clk); #1; end
        if (e + 125 > next_l1a) break;
        req_bx = bx_t'((e - E0 - 300 + L) % L); req_evnum = {1'b1, 23'(ev++)}; req_valid = 1;
        bx0_q.push_back(req_bx);
        @(posedge clk); rec_start = e + 1; #1 req_valid = 0;
      end
      while (!req_ready) begin @(posedge clk); #1; end
      repeat (2) @(posedge clk);
      #1;
      mon_in_window = n_mon - n0;
      if (mon_in_window < min_mon) min_mon = mon_in_window;
    end
    chk(n_l1a == 20, $sformatf("%0d L1-accept records", n_l1a));
    chk(min_mon >= 2, $sformatf("only %0d monitoring records between L1 accepts", min_mon));
    $display("records: l1a=%0d monitoring=%0d (at least %0d per 10 us)", n_l1a, n_mon, min_mon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
