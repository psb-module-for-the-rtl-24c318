// rop: readout processor of the PSB.
//
// An extraction request carries the first bunch-crossing number of the event
// and a 24-bit event number whose bit 23 flags a monitoring request (0: L1
// accept). The processor then sends one record to the link towards the
// readout board:
//   1. a header {EVENT_ID or MONITOR_ID, event number};
//   2. for each of `nbx` bunch crossings, starting at req_bx and wrapping
//      after LHC_LAST, one 32-bit word from every channel's ring buffer,
//      channel 0 first;
//   3. an end-of-event word {EOE_ID, event number}, flagged by gtfe_eoe.
// The link runs at half the BX clock (20 MHz): one word every second clock, so
// a record of nbx=5 BX and 12 channels (62 words) takes 124 clocks. During the
// first clock of each word slot the ring-buffer address (dpm_raddr, dpm_ch) is
// driven; the buffers answer one clock later, when the word is registered onto
// gtfe_data with gtfe_valid. A request is taken when req_valid and req_ready
// are both high; req_ready is high only while idle. Record structure, flag and
// rate follow the original design; the identifier codes and the bit position
// of the monitor flag are this design's choices.
module rop
  import psb_pkg::*;
#(
  parameter int unsigned N_CH = 12,
  parameter int unsigned CH_W = (N_CH > 1) ? $clog2(N_CH) : 1,
  parameter logic [7:0]  EVENT_ID   = 8'hE1,
  parameter logic [7:0]  MONITOR_ID = 8'hD1,
  parameter logic [7:0]  EOE_ID     = 8'hEE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  bx_t              req_bx,
  input  logic [23:0]      req_evnum,
  input  logic [3:0]       nbx,
  output bx_t              dpm_raddr,
  output logic [CH_W-1:0]  dpm_ch,
  input  logic [WORD_W-1:0] dpm_rdata,
  output logic [31:0]      gtfe_data,
  output logic             gtfe_valid,
  output logic             gtfe_eoe,
  output logic             busy
);

  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_DATA, S_EOE} state_t;

  state_t      state;
  logic        slot;       // 0: address clock, 1: output clock
  logic [23:0] evnum;
  logic [3:0]  nbx_q, bx_i;
  logic [CH_W-1:0] ch;
  bx_t         bx_cur;

  assign req_ready = (state == S_IDLE);
  assign busy      = !req_ready;
  assign dpm_raddr = bx_cur;
  assign dpm_ch    = ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      slot       <= 1'b0;
      evnum      <= '0;
      nbx_q      <= '0;
      bx_i       <= '0;
      ch         <= '0;
      bx_cur     <= '0;
      gtfe_data  <= '0;
      gtfe_valid <= 1'b0;
      gtfe_eoe   <= 1'b0;
    end else begin
      gtfe_valid <= 1'b0;
      gtfe_eoe   <= 1'b0;
      if (state != S_IDLE) slot <= ~slot;
      case (state)
        S_IDLE: if (req_valid) begin
          state  <= S_HEAD;
          slot   <= 1'b0;
          evnum  <= req_evnum;
          nbx_q  <= nbx;
          bx_i   <= '0;
          ch     <= '0;
          bx_cur <= (req_bx > bx_t'(LHC_LAST)) ? '0 : req_bx;
        end
        S_HEAD: if (slot) begin
          gtfe_data  <= {(evnum[23] ? MONITOR_ID : EVENT_ID), evnum};
          gtfe_valid <= 1'b1;
          state      <= (nbx_q == '0) ? S_EOE : S_DATA;
        end
        S_DATA: if (slot) begin
          gtfe_data  <= dpm_rdata;
          gtfe_valid <= 1'b1;
          if (ch == CH_W'(N_CH-1)) begin
            ch     <= '0;
            bx_cur <= (bx_cur == bx_t'(LHC_LAST)) ? '0 : bx_cur + 1'b1;
            bx_i   <= bx_i + 1'b1;
            if (bx_i + 1'b1 == nbx_q) state <= S_EOE;
          end else begin
            ch <= ch + 1'b1;
          end
        end
        S_EOE: if (slot) begin
          gtfe_data  <= {EOE_ID, evnum};
          gtfe_valid <= 1'b1;
          gtfe_eoe   <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request once raised is held until it is taken.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid);

endmodule
