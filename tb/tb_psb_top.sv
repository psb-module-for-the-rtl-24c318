// tb_psb_top: end-to-end run of the whole PSB at its default size (12
// channels, FIFO length 64, ring buffers of 4096 words).
//
// Upstream model: channel c sends the word of trigger bunch crossing G with a
// latency of lat[c] BX: data = {c, orbit, bx}, even parity, no sync flag. The
// words change 8, 14 or 20 ns into the 24 ns BX, depending on the pair, so
// the automatic phase choice must settle on phase 0, 1 or 2. As in a real
// setup the calorimeter-like pairs 0-2 arrive early (latency 5, 12, 20) and
// use the FIFO delay with WSTART = their relative latency; the muon-like
// pairs 3-5 arrive late (28, 29, 30) and use the pipeline delay. RSTART = 32
// with DELAY = 3, 2, 1 (the latest channel at the minimum delay).
//
// Checked every BX from the second LHC cycle on: all 12 channels leave with
// the same bunch crossing, the one equal to (local count - RSTART), with
// valid exactly in the FIFO read windows. The ring buffers are modelled by a
// shadow copy of the expected words; an L1-accept and a monitoring readout
// (the latter wrapping past BX 3563) must return the expected 62-word records
// in 124 clocks. Through the register port the test configures the design and
// reads back the phases chosen, the transition counts, an injected parity and
// sync error, and finally provokes a FIFO overflow, an underflow and a
// bunch-counting error (early BCRes). Each of these mechanisms is counted and
// must have happened at least once.
module tb_psb_top;
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

  localparam int E0 = 10, R = 32, L = 3564;
  localparam int lat [12]   = '{5, 5, 12, 12, 20, 20, 28, 28, 29, 29, 30, 30};
  localparam int offp [6]   = '{8, 14, 20, 8, 14, 20};
  localparam int wstartp[6] = '{7, 14, 22, 0, 0, 0};
  localparam int dlyp [6]   = '{1, 1, 1, 3, 2, 1};
  localparam int WSTOP = 3563;

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // upstream word of channel c for trigger bunch crossing g (counted from
  // the first BCRes), with one parity error and one wrong sync word
  function automatic ch_in_t trig_word(int c, int g);
    ch_in_t w;
    int t = g - fdiv(g, L) * L, orb = fdiv(g, L);
    w.data   = {4'(c), 8'(orb), 12'(t)};
    w.sync   = 1'b0;
    if (c == 5 && orb == 2 && t == 3450) w.data[0] ^= 1'b1;     // sync error
    w.parity = calc_parity(w.data, 1'b0);
    if (c == 3 && orb == 2 && t == 500)  w.parity[0] ^= 1'b1;  // parity error
    return w;
  endfunction

  // upstream word of channel c in time slot s
  function automatic ch_in_t up_word(int c, int s);
    return trig_word(c, s - E0 - lat[c]);
  endfunction

  for (genvar p = 0; p < 6; p++) begin : g_drv
    initial begin
      ch_in[2*p] = '0; ch_in[2*p+1] = '0;
      for (int s = 0; s < 7 * L; s++) begin
        while ($realtime < 3 + 24 * s + offp[p]) #1;
        ch_in[2*p]   = up_word(2*p, s);
        ch_in[2*p+1] = up_word(2*p+1, s);
      end
    end
  end

  // expected outgoing word of channel c after edge e
  function automatic dpm_word_t model(int c, int e);
    dpm_word_t w;
    int p = c / 2, g = e - E0 - R;
    int t = g - fdiv(g, L) * L;
    if (p < 3 && t >= WSTOP - wstartp[p]) return '0;       // FIFO not reading
    {w.sync, w.parity, w.data} = trig_word(c, g);
    for (int k = 0; k < 4; k++)
      w.phase[k] = (6 * k > offp[p]) ? trig_word(c, g + 1).data[0] : trig_word(c, g).data[0];
    return w;
  endfunction

  dpm_word_t shadow [12][L];
  int e = -1;            // number of the last clock edge (edge e at 3+24e ns)
  bit check_on = 0;
  int n_pipe = 0, n_fifo = 0, n_bcres = 0;

  // one BX clock: the output check and the shadow ring buffers
  task automatic tick();
    @(posedge clk); e++;
    if (bcres) n_bcres++;
    #1;
    bcres = ((e + 1 - E0) % L == 0);
    if (check_on) begin
      for (int c = 0; c < 12; c++) begin
        dpm_word_t m = model(c, e);
        bit v = (c >= 6) || (m != '0);
        chk(gtl_valid[c] == v, $sformatf("valid ch%0d", c));
        chk(gtl_out[c] == m[IN_W-1:0], $sformatf("ch%0d out %h exp %h", c, gtl_out[c], m[IN_W-1:0]));
        if (v && c >= 6) n_pipe++;
        if (v && c < 6)  n_fifo++;
      end
    end
    if (e >= E0 + R) begin
      int g = e - E0 - R;
      for (int c = 0; c < 12; c++) shadow[c][g % L] = model(c, e);
    end
  endtask

  function automatic int bx_now();
    return (e - E0) % L;
  endfunction

  function automatic int orbit_now();
    return (e - E0) / L;
  endfunction

  task automatic wait_until(int orb, int b);
    while (!(orbit_now() == orb && bx_now() >= b)) tick();
  endtask

  task automatic vme_write(int a, int d);
    vme_addr = 10'(a); vme_wdata = 32'(d); vme_we = 1;
    tick();
    vme_we = 0;
  endtask

  task automatic vme_read(int a, output logic [31:0] d);
    vme_addr = 10'(a);
    tick();
    d = vme_rdata;
  endtask

  int n_l1a = 0, n_mon = 0;
  task automatic readout(int bx0, int ev);
    dpm_word_t exp [$];
    int t0, idx;
    bit rdy;
    exp.push_back({ev[23] ? 8'hD1 : 8'hE1, 24'(ev)});
    for (int b = 0; b < 5; b++)
      for (int c = 0; c < 12; c++) exp.push_back(shadow[c][(bx0 + b) % L]);
    exp.push_back({8'hEE, 24'(ev)});
    req_bx = bx_t'(bx0); req_evnum = 24'(ev); req_valid = 1;
    forever begin
      rdy = req_ready;                    // taken at the next edge if ready
      tick();
      if (rdy) break;
    end
    req_valid = 0;
    t0 = e; idx = 0;
    while (idx < exp.size() && e - t0 < 400) begin
      tick();
      if (gtfe_valid) begin
        chk(gtfe_data == exp[idx], $sformatf("readout word %0d: %h exp %h", idx, gtfe_data, exp[idx]));
        idx++;
        if (idx == exp.size()) chk(gtfe_eoe, "end of event flag");
      end
    end
    chk(idx == 62 && e - t0 == 124, $sformatf("record of %0d words in %0d clocks", idx, e - t0));
    if (idx == 62) begin if (ev[23]) n_mon++; else n_l1a++; end
  endtask

  initial begin
    logic [31:0] d;
    int phases_seen [4] = '{0, 0, 0, 0};
    int n_par = 0, n_sync = 0, n_ovf = 0, n_unf = 0, n_bcerr = 0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    // configuration
    vme_write(12'h000, R);
    vme_write(12'h004, 32'b010);            // window mode, compare with BX number
    for (int p = 0; p < 6; p++) begin
      vme_write(64 + 16 * p + 0, wstartp[p]);
      vme_write(64 + 16 * p + 1, WSTOP);
      vme_write(64 + 16 * p + 2, dlyp[p]);
      vme_write(64 + 16 * p + 3, {2'b00, 1'b1, 1'(p >= 3)});
    end
    wait_until(1, 0);
    check_on = 1;
    wait_until(2, 10);
    // counts of cycle 1: no errors anywhere
    for (int c = 0; c < 12; c++) begin
      vme_read(256 + 4 * c, d);     chk(d == 0, $sformatf("parity errors ch%0d cycle 1", c));
      vme_read(256 + 4 * c + 1, d); chk(d == 0, $sformatf("sync errors ch%0d cycle 1", c));
    end
    wait_until(3, 10);
    for (int p = 0; p < 6; p++) begin
      int bnd;
      bnd = (offp[p] / 6 + 1) % 4;        // boundary where the data change
      vme_read(64 + 16 * p + 8, d);
      chk(d[3:2] == 2'((bnd + 2) % 4), $sformatf("pair %0d phase %0d", p, d[3:2]));
      phases_seen[d[3:2]]++;
      for (int k = 0; k < 4; k++) begin
        vme_read(64 + 16 * p + 4 + k, d);
        chk(d == ((k == bnd) ? L : 0), $sformatf("pair %0d transitions[%0d]=%0d", p, k, d));
      end
    end
    for (int c = 0; c < 12; c++) begin
      vme_read(256 + 4 * c, d);
      chk(d == (c == 3), $sformatf("parity errors ch%0d = %0d", c, d));
      if (c == 3) n_par += d;
      vme_read(256 + 4 * c + 1, d);
      chk(d == (c == 5), $sformatf("sync errors ch%0d = %0d", c, d));
      if (c == 5) n_sync += d;
    end
    vme_read(8, d);
    chk(d[11:0] == 3563 && !d[31], "bunch counter consistent");
    chk(d[27:12] == 1, "one counting error (first BCRes after reset)");
    n_bcerr += d[27:12];
    // readout: L1 accept and a monitoring request wrapping past 3563
    wait_until(3, 2000);
    readout(100, 24'h000010);
    wait_until(3, 2500);
    readout(3561, 24'h800011);
    // provoke FIFO errors: RSTART 100 makes the FIFO delays too long, pair 0
    // is started after RSTART
    wait_until(4, 5);
    check_on = 0;
    vme_write(12'h000, 100);
    vme_write(64 + 0, 3000);
    wait_until(5, 200);
    for (int p = 0; p < 3; p++) begin
      vme_read(64 + 16 * p + 8, d);
      if (d[0]) n_ovf++;
      if (d[1]) n_unf++;
      chk(p == 0 ? d[1] : d[0], $sformatf("pair %0d fifo flags %b", p, d[1:0]));
    end
    // early BCRes
    wait_until(5, 1000);
    bcres = 1;
    tick();
    bcres = 0;
    tick();
    vme_read(8, d);
    chk(d[31] && d[11:0] == 1000 && d[27:12] == 2, $sformatf("early BCRes status %h", d));
    if (d[31]) n_bcerr++;
    // every mechanism must have happened
    chk(n_pipe > 0,  "pipeline delay used");
    chk(n_fifo > 0,  "FIFO delay used");
    chk(n_bcres > 4, "BCRes resynchronisations");
    chk(phases_seen[0] > 0 && phases_seen[1] > 0 && phases_seen[2] > 0, "three phases chosen");
    chk(n_par > 0 && n_sync > 0, "parity and sync errors counted");
    chk(n_ovf > 0 && n_unf > 0, "FIFO overflow and underflow flagged");
    chk(n_bcerr > 1, "bunch-counting errors");
    chk(n_l1a > 0 && n_mon > 0, "event and monitoring readout");
    $display("mechanisms: pipe_words=%0d fifo_words=%0d bcres=%0d phases=%0d/%0d/%0d parity=%0d sync=%0d ovf=%0d unf=%0d bcerr=%0d l1a=%0d mon=%0d",
             n_pipe, n_fifo, n_bcres, phases_seen[0], phases_seen[1], phases_seen[2],
             n_par, n_sync, n_ovf, n_unf, n_bcerr, n_l1a, n_mon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
