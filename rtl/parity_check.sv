// parity_check: parity check of one incoming channel word.
//
// Each of the 3 parity bits covers one byte of the 24 data bits (parity[i]
// over data[8i+7:8i]); `odd` selects odd instead of even parity, so that the
// PSB can follow the parity mode of the upstream trigger. A BX whose word has
// at least one wrong parity bit counts as one error (`err` for that BX). The
// errors of an LHC cycle are held in `err_saved` during the next cycle for the
// monitoring software. Parity checking and per-cycle error counting follow the
// original design; the byte assignment of the parity bits is this design's
// choice. The check is combinational on `word`; the counter is registered.
module parity_check
  import psb_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ch_in_t           word,
  input  logic             odd,
  input  logic             cycle_end,
  output logic             err,
  output logic [CNT_W-1:0] err_saved
);

  assign err = (word.parity != calc_parity(word.data, odd));

  lhc_counter #(.W(CNT_W)) u_cnt (.clk, .rst_n, .inc(err), .cycle_end, .saved(err_saved));

endmodule
