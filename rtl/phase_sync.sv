// phase_sync: fine time adjustment of one channel pair.
//
// The asynchronous input bus is sampled on every rising edge of clk4x, four
// times per bunch crossing. The rising edges of clk4x line up with those of
// the BX clock clk; the phase-k sample of a BX is taken k quarter-periods after
// the BX clock edge. At each clk edge the four samples of the BX just ended are
// available:
//   * dout takes the sample of the selected phase (the first register stage
//     of the PSB's delay, so dout is one BX clock after the sampled data);
//   * for each phase boundary k (between the sample of phase k-1, the one of
//     phase 3 of the previous BX for k=0, and the sample of phase k) a
//     transition counter counts the BXs in which any bit changed there. The
//     counts are saved every LHC cycle (trans_saved); their distribution over
//     the four boundaries shows where the data change and how stable the link
//     is;
//   * phase_bits gives the four samples of bit PHASE_BIT of each channel, which
//     are stored with the data in the ring buffer.
// The selected phase is either man_phase or, with auto_sel, chosen at each
// cycle end as the phase two quarters after the boundary that had the most
// transitions in the cycle just ended (the middle of the data eye); if no
// transitions were seen the choice is kept. Sampling four times and counting
// transitions per boundary follows the original design; the rule for choosing
// the phase and the fixed PHASE_BIT are this design's choices. One instance
// serves a pair of channels, which therefore share one phase choice.
//
// The input is sampled without a metastability synchroniser, as a model of the
// sampling registers.
module phase_sync
  import psb_pkg::*;
#(
  parameter int unsigned CH_W      = IN_W,   // width of one channel
  parameter int unsigned N         = 2,      // channels served
  parameter int unsigned PHASE_BIT = 0
) (
  input  logic                    clk4x,
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0][CH_W-1:0]  din,
  input  logic                    cycle_end,
  input  logic                    auto_sel,
  input  logic [1:0]              man_phase,
  output logic [N-1:0][CH_W-1:0]  dout,
  output logic [N-1:0][3:0]       phase_bits,
  output logic [3:0][CNT_W-1:0]   trans_saved,
  output logic [1:0]              sel_phase
);

  // Sample shift register in the clk4x domain: smp[0] is the newest.
  logic [3:0][N-1:0][CH_W-1:0] smp;

  always_ff @(posedge clk4x or negedge rst_n) begin
    if (!rst_n) smp <= '0;
    else        smp <= {smp[2:0], din};
  end

  // At a clk edge, phase k of the ended BX is smp[3-k].
  logic [3:0][N-1:0][CH_W-1:0] ph;
  always_comb for (int k = 0; k < 4; k++) ph[k] = smp[3-k];

  logic [N-1:0][CH_W-1:0] prev3;   // phase-3 sample of the BX before
  logic [3:0]             trans;
  logic [1:0]             auto_phase;
  logic                   auto_valid;

  always_comb begin
    trans[0] = (ph[0] != prev3);
    for (int k = 1; k < 4; k++) trans[k] = (ph[k] != ph[k-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev3      <= '0;
      dout       <= '0;
      phase_bits <= '0;
    end else begin
      prev3 <= ph[3];
      dout  <= ph[sel_phase];
      for (int c = 0; c < N; c++)
        for (int k = 0; k < 4; k++) phase_bits[c][k] <= ph[k][c][PHASE_BIT];
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_cnt
    lhc_counter #(.W(CNT_W)) u_cnt (
      .clk, .rst_n, .inc(trans[k]), .cycle_end, .saved(trans_saved[k])
    );
  end

  // Boundary with most transitions, judged on the saved counts one clock
  // after they were saved at the cycle end.
  always_comb begin
    logic [1:0]       best;
    logic [CNT_W-1:0] m;
    best = 2'd0;
    m    = trans_saved[0];
    for (int k = 1; k < 4; k++)
      if (trans_saved[k] > m) begin
        m    = trans_saved[k];
        best = 2'(k);
      end
    auto_phase = best + 2'd2;
    auto_valid = (m != '0);
  end

  logic [1:0] auto_reg;
  logic       upd;   // cycle end seen: evaluate the freshly saved counts
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      auto_reg <= 2'd0;
      upd      <= 1'b0;
    end else begin
      upd <= cycle_end;
      if (upd && auto_valid) auto_reg <= auto_phase;
    end
  end

  assign sel_phase = auto_sel ? auto_reg : man_phase;

endmodule
