// bx_counter: the local bunch counter of the PSB and its check against BCRes.
//
// `bx_loc` counts bunch crossings 0..LHC_LAST. The BCRes signal (sent by the
// timing module once per LHC cycle) forces the count back to 0 in the next BX;
// without BCRes the count wraps from LHC_LAST to 0 by itself. When BCRes comes,
// the count reached so far is stored in `saved_cnt`; if it is not LHC_LAST the
// previous cycle had a bunch-counting error and `err_saved`/`err_total` count
// it. `cycle_end` is BCRes itself: the one clock at which all per-cycle
// counters of the PSB save and restart.
//
// `out_bx` is the bunch-crossing number of the data leaving the PSB, which is
// also the write address of the ring buffers: it is 0 in the BX in which the
// local count equals RSTART, i.e. (bx_loc - RSTART) mod (LHC_LAST+1). That
// numbering, and the use of RSTART for it, follows the synchronisation
// procedure of the original design; the error-count width is this design's.
//
// Timing: all outputs are registered or derived combinationally from the
// registered count; bcres is sampled on the rising clock edge.
module bx_counter
  import psb_pkg::*;
#(
  parameter int unsigned LAST = LHC_LAST
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bcres,
  input  bx_t              rstart,
  output bx_t              bx_loc,
  output bx_t              out_bx,
  output logic             cycle_end,
  output bx_t              saved_cnt,
  output logic             err_last,    // last BCRes came at the wrong count
  output logic [CNT_W-1:0] err_total    // cycles with a counting error
);

  localparam bx_t LAST_BX = bx_t'(LAST);

  assign cycle_end = bcres;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx_loc    <= '0;
      saved_cnt <= LAST_BX;
      err_last  <= 1'b0;
      err_total <= '0;
    end else if (bcres) begin
      bx_loc    <= '0;
      saved_cnt <= bx_loc;
      err_last  <= (bx_loc != LAST_BX);
      if (bx_loc != LAST_BX && err_total != '1) err_total <= err_total + 1'b1;
    end else begin
      bx_loc <= (bx_loc >= LAST_BX) ? '0 : bx_loc + 1'b1;
    end
  end

  always_comb begin
    if (bx_loc >= rstart) out_bx = bx_loc - rstart;
    else                  out_bx = bx_loc + (LAST_BX + 1'b1) - rstart;
  end

endmodule
