// dpm: dual-port ring buffer of one channel.
//
// Every BX the word leaving the PSB on this channel (data, parity, sync flag
// and phase samples) is written at the address equal to its bunch-crossing
// number, so the memory always holds the last LHC cycle and is overwritten in
// the next one. The readout reads any BX by its number: the bunch number of an
// L1 accept points directly at the right address. The read port has a
// registered output (one clock latency). DEPTH = 4096 covers BX numbers
// 0..3563; the ring-buffer use follows the original design, the single clock
// for both ports is this design's choice.
module dpm #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
