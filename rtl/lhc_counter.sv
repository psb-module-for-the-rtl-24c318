// lhc_counter: counts events during one LHC cycle and holds the result for
// the whole of the following cycle.
//
// Every error and transition counter of the PSB works this way: while a cycle
// runs, `inc` pulses are counted (saturating at all ones); on the `cycle_end`
// strobe (the BCRes of the next cycle) the count, including an event in that
// same clock, is copied to `saved` and the running count restarts at zero.
// `saved` is what the monitoring software reads during the next cycle, so the
// check runs continuously without disturbing data taking. Width and saturation
// are this design's choice.
module lhc_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         cycle_end,
  output logic [W-1:0] saved
);

  logic [W-1:0] cnt, cnt_next;

  always_comb begin
    cnt_next = cnt;
    if (inc && cnt != '1) cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      saved <= '0;
    end else if (cycle_end) begin
      saved <= cnt_next;
      cnt   <= '0;
    end else begin
      cnt   <= cnt_next;
    end
  end

endmodule
