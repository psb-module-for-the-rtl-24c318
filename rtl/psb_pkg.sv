// psb_pkg: constants and word types shared by the PSB (Pipelined Synchronising
// Buffer) blocks.
//
// An LHC orbit ("LHC cycle") has 3564 bunch crossings (BX), numbered 0 to
// LHC_LAST = 3563. A channel word arriving at the PSB carries 24 trigger data
// bits, 3 parity bits and a sync flag. Inside the PSB each word is extended by
// the 4 phase samples of one of its bits, giving the 32-bit word that is stored
// in the per-channel dual-port memory and read out.
//
// The 32-bit layout (MSB to LSB: phase[3:0], sync, parity[2:0], data[23:0]) is
// this design's choice; the field widths follow the preliminary format of the
// original design.
package psb_pkg;

  localparam int unsigned LHC_LAST = 3563;      // last BX number of the cycle
  localparam int unsigned BX_W     = 12;        // width of a BX number
  localparam int unsigned DATA_W   = 24;
  localparam int unsigned PAR_W    = 3;         // one parity bit per data byte
  localparam int unsigned IN_W     = DATA_W + PAR_W + 1;      // 28
  localparam int unsigned WORD_W   = IN_W + 4;                // 32
  localparam int unsigned CNT_W    = 16;        // width of the cycle counters

  typedef logic [BX_W-1:0] bx_t;

  // Word as delivered by the upstream link receiver.
  typedef struct packed {
    logic              sync;
    logic [PAR_W-1:0]  parity;
    logic [DATA_W-1:0] data;
  } ch_in_t;

  // Word as stored in the ring buffer and sent to the readout.
  typedef struct packed {
    logic [3:0]        phase;
    logic              sync;
    logic [PAR_W-1:0]  parity;
    logic [DATA_W-1:0] data;
  } dpm_word_t;

  localparam int unsigned DLY_W    = 7;         // DELAY register, 1..64

  // Control registers of one channel pair.
  typedef struct packed {
    bx_t              wstart;     // FIFO write start after BCRes
    bx_t              wstop;      // FIFO write stop
    logic [DLY_W-1:0] delay;      // pipeline length in BX
    logic             mode_pipe;  // 1: pipeline delay, 0: FIFO delay
    logic             auto_sel;   // automatic phase choice
    logic [1:0]       man_phase;  // phase when not automatic
  } pair_cfg_t;

  // Control registers common to the module.
  typedef struct packed {
    bx_t               rstart;     // common read/transfer start
    bx_t               start_sy;   // sync-check window
    bx_t               stop_sy;
    logic [DATA_W-1:0] sync_const;
    logic              use_flag;   // sync words marked by the sync flag
    logic              cmp_bx;     // compare with BX number, not constant
    logic              par_odd;    // odd parity
    logic [3:0]        nbx;        // BXs read out per event
  } glob_cfg_t;

  // Status of one channel pair.
  typedef struct packed {
    logic [3:0][CNT_W-1:0] trans;  // transitions per phase boundary, last cycle
    logic [1:0]            sel_phase;
    logic                  ovf;
    logic                  unf;
  } pair_stat_t;

  // Parity bits for a data word; odd=1 gives odd parity per byte.
  function automatic logic [PAR_W-1:0] calc_parity(logic [DATA_W-1:0] d, logic odd);
    logic [PAR_W-1:0] p;
    for (int i = 0; i < PAR_W; i++) p[i] = (^d[8*i +: 8]) ^ odd;
    return p;
  endfunction

endpackage
