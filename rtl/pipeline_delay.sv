// pipeline_delay: programmable-length pipeline delay of one channel pair
// (synchronisation option 2, meant for the shortest latency).
//
// The input is already registered (the phase-selection register), which is
// the first stage of the pipeline. A further chain of MAX_DELAY-1 registers
// follows, and the output is tapped so that the total number of stages equals
// `delay`: delay=1 passes the registered input straight on (the minimum of
// 1 BX in the synchronising chip), delay=d shows the input of d-1 clocks
// earlier. Values of delay outside 1..MAX_DELAY are clamped. The pipeline and
// the minimum of 1 BX follow the original design; the maximum length is this
// design's choice, equal to the FIFO length of option 1.
module pipeline_delay #(
  parameter int unsigned W         = 64,
  parameter int unsigned MAX_DELAY = 64,
  parameter int unsigned DLY_W     = $clog2(MAX_DELAY + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     din,
  input  logic [DLY_W-1:0] delay,
  output logic [W-1:0]     dout
);

  logic [W-1:0] sr [MAX_DELAY];   // sr[0]=din, sr[i]=din i clocks ago

  assign sr[0] = din;

  for (genvar i = 1; i < MAX_DELAY; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sr[i] <= '0;
      else        sr[i] <= sr[i-1];
    end
  end

  localparam int unsigned IW = (MAX_DELAY > 1) ? $clog2(MAX_DELAY) : 1;

  logic [IW-1:0] d;   // tap index = delay-1, clamped
  always_comb begin
    if (delay == '0)                    d = '0;
    else if (delay > DLY_W'(MAX_DELAY)) d = IW'(MAX_DELAY - 1);
    else                                d = IW'(delay - 1'b1);
  end

  assign dout = sr[d];

endmodule
