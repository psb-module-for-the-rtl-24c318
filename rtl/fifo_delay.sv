// fifo_delay: synchronisation FIFO of one channel pair (synchronisation
// option 1, meant for the calorimeter channels that arrive long before the
// latest channel).
//
// Writing: starting from the local BCRes the block waits WSTART BX; words are
// written while wstart <= bx_loc < wstop. WSTART is the relative latency of
// the channel, so the first word written in a cycle is the data of BX 0.
// Stopping at WSTOP, close to the end of the LHC cycle, lets the next BCRes
// realign the FIFO with the cycle.
//
// Reading: out_bx is the bunch number of the data at the PSB output, which is
// 0 when bx_loc equals the common RSTART register. The same number of words is
// read as was written, in the window 0 <= out_bx < wstop-wstart. A word
// therefore leaves RSTART-WSTART clocks after it was written: this is the
// channel's delay, and it must lie between 1 and DEPTH.
//
// Resynchronisation: the FIFO is a circular buffer. The address of the first
// word written in a cycle (at WSTART) is remembered, and at out_bx = 0 the read
// pointer is set to it. Every LHC cycle thus realigns the read side with the
// write side, whatever happened before (reset, changed registers, a missing
// BCRes), and the words of the previous cycle still in flight are read out
// undisturbed.
//
// The output shows the addressed word without a register (show-ahead), so
// with RSTART = WSTART+1 the word is visible one clock after it was written;
// dout is zero and valid low outside the read window and before the first
// realignment. At out_bx = 0 two errors are detected and kept in sticky flags:
// `unf`, nothing written yet in this cycle (RSTART not after WSTART), and
// `ovf`, more than DEPTH words written, so the oldest were overwritten (delay
// longer than the FIFO). The windows and registers follow the original design;
// the realignment mechanism, the show-ahead output and the error flags are
// this design's choices. DEPTH must be a power of two.
module fifo_delay
  import psb_pkg::*;
#(
  parameter int unsigned W     = 2 * WORD_W,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  bx_t          bx_loc,
  input  bx_t          out_bx,
  input  bx_t          wstart,
  input  bx_t          wstop,
  output logic [W-1:0] dout,
  output logic         valid,
  output logic         ovf,
  output logic         unf
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr, a0, raddr;
  logic [AW:0]   n_wr;       // words written this cycle, saturating at DEPTH+1
  logic          started;    // first word of this cycle written, not yet read
  logic          aligned;    // read pointer realigned at least once
  logic          wr_win, rd_win, first_rd;

  assign wr_win   = (bx_loc >= wstart) && (bx_loc < wstop);
  assign rd_win   = (wstop > wstart) && (out_bx < (wstop - wstart));
  assign first_rd = rd_win && (out_bx == '0);
  assign raddr    = first_rd ? a0 : rptr;

  assign valid = rd_win && (aligned || first_rd);
  assign dout  = valid ? mem[raddr] : '0;

  always_ff @(posedge clk) begin
    if (wr_win) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      a0      <= '0;
      n_wr    <= '0;
      started <= 1'b0;
      aligned <= 1'b0;
      ovf     <= 1'b0;
      unf     <= 1'b0;
    end else begin
      if (wr_win) begin
        wptr <= wptr + 1'b1;
        if (bx_loc == wstart) begin
          a0      <= wptr;
          started <= 1'b1;
          n_wr    <= (AW+1)'(1);
        end else if (n_wr <= (AW+1)'(DEPTH)) begin
          n_wr <= n_wr + 1'b1;
        end
      end
      if (valid) rptr <= raddr + 1'b1;
      if (first_rd) begin
        aligned <= 1'b1;
        started <= 1'b0;
        if (!started || bx_loc == wstart) unf <= 1'b1;
        if (n_wr > (AW+1)'(DEPTH))        ovf <= 1'b1;
      end
    end
  end

endmodule
