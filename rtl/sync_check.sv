// sync_check: bunch-crossing synchronisation check of one delayed channel.
//
// The upstream trigger sends known synchronisation words, and this block
// compares them with what they should be. Two ways of finding them:
//   * use_flag=0: every valid word whose local count bx_loc lies in the window
//     start_sy <= bx_loc < stop_sy (one window per LHC cycle, normally in the
//     bunch-free gap) is a sync word;
//   * use_flag=1: every valid word with its sync flag set is a sync word.
// A sync word is compared either with the constant sync_const (all 24 data
// bits, cmp_bx=0) or with its own bunch-crossing number out_bx (data[11:0],
// cmp_bx=1). Each mismatch is counted; the count of an LHC cycle is held in
// err_saved during the next one. Both modes and the two reference values
// follow the original design; which data bits are compared is this design's
// choice. The comparison is combinational; `err` is for that BX.
module sync_check
  import psb_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  dpm_word_t        word,
  input  logic             valid,
  input  bx_t              bx_loc,
  input  bx_t              out_bx,
  input  bx_t              start_sy,
  input  bx_t              stop_sy,
  input  logic             use_flag,
  input  logic             cmp_bx,
  input  logic [DATA_W-1:0] sync_const,
  input  logic             cycle_end,
  output logic             checked,
  output logic             err,
  output logic [CNT_W-1:0] err_saved
);

  logic in_win, match;

  assign in_win  = (bx_loc >= start_sy) && (bx_loc < stop_sy);
  assign checked = valid && (use_flag ? word.sync : in_win);
  assign match   = cmp_bx ? (word.data[BX_W-1:0] == out_bx) : (word.data == sync_const);
  assign err     = checked && !match;

  lhc_counter #(.W(CNT_W)) u_cnt (.clk, .rst_n, .inc(err), .cycle_end, .saved(err_saved));

endmodule
