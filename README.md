# PSB – Pipelined Synchronising Buffer for a level-1 global trigger

A level-1 trigger decides every 25 ns bunch crossing (BX) of the LHC. Its
global stage combines inputs from several upstream systems: calorimeter trigger
data, muon trigger data and technical trigger signals. Each of these arrives
with its own latency and with its own clock phase. The PSB takes up to 12 such
input channels and does three things:

1. It finds a clean sampling phase for every input.
2. It delays every channel so that all channels leave in step, carrying data
   of the same bunch crossing, towards the trigger-logic boards (GTL).
3. It keeps a copy of the last LHC orbit of outgoing data for readout, and it
   counts errors continuously. This lets the alignment be checked while data
   taking goes on.

This repository holds synthesizable SystemVerilog for the complete
synchronising part of such a module. The parts are the phase sampling, the two
delay circuits (FIFO and pipeline), the parity, synchronisation and
bunch-counter checks, the per-channel ring buffers, the readout processor and
a register file. It also holds self-checking testbenches for every block and
for the whole module.

## Time on the module: BX, LHC cycle, local count and output BX number

* An LHC orbit, called the *LHC cycle* here, has 3564 bunch crossings,
  numbered 0 to 3563. BX 3437 to 3563 form the gap with no collisions.
* `clk` is the 40 MHz BX clock. `clk4x` is a 160 MHz clock whose rising edges
  line up with those of `clk`.
* `bcres` (bunch-counter reset) is sent once per LHC cycle by the timing
  board. After it, the local count `bx_loc` restarts at 0. If BCRes is
  missing, `bx_loc` wraps from 3563 to 0 by itself.
* The clock in which BCRes is high is the *cycle end*. In that clock every
  error and monitoring counter of the module copies its value into a holding
  register, which software reads during the next cycle, and restarts at 0.
* `RSTART` is one register common to the whole module. The BX number of the
  data leaving the module is

      out_bx = (bx_loc - RSTART) mod 3564

  So the word that leaves when `bx_loc == RSTART` belongs to BX 0. `out_bx` is
  also the address at which the outgoing word is stored in the ring buffers.
  The number of an accepted bunch crossing therefore points directly at its
  data.

## Aligning the channels

Alignment has two stages: the phase within a BX, then the whole number of
BXs. Both are set per channel pair, because the two channels of a pair share
one set of synchronisation logic. Error counters and ring buffers are per
channel.

### Phase (`phase_sync`)

The pair's input bus is sampled on every `clk4x` edge, four times per BX. The
phase-k sample is taken k quarter-periods after the BX clock edge. At each
`clk` edge, the four samples of the BX that just ended are used as follows:

* The sample of the selected phase is registered as the pair's data. This
  register is the first stage of the delay.
* Each of the 4 phase boundaries has a transition counter. Boundary k lies
  between sample k-1 and sample k; for k = 0 the earlier sample is phase 3 of
  the previous BX. The counter for boundary k counts the BXs in which any bit
  changed across that boundary. The four counts of the last cycle show where
  the data edge sits and how much it moves.
* The four samples of bit 0 of each channel are kept as the word's 4 *phase
  bits* and stored in the ring buffer along with the data.

The phase is either set by hand (`man_phase`) or chosen automatically
(`auto_sel`). In automatic mode, at every cycle end the block takes the
boundary with the most transitions and selects the phase two quarters after
it, which is the middle of the data eye. An example: if the data change 8 ns
into a 24 ns BX, between samples 1 and 2, boundary 2 collects all the
transitions and phase 0 is chosen. If no transitions were seen, the phase
stays as it was.

### Whole BXs, option 1: synchronisation FIFO (`fifo_delay`)

This option suits channels that arrive long before the latest one, such as
calorimeter data.

* **Write window.** A word is written when `WSTART <= bx_loc < WSTOP`.
  `WSTART` is set to the relative latency of the channel, so the first word
  written in a cycle is the data of BX 0. `WSTOP` ends writing near the end
  of the cycle, inside the bunch-free gap.
* **Read window.** The same number of words is read when
  `0 <= out_bx < WSTOP - WSTART`. Reading therefore starts at `RSTART`, and
  the channel's delay is `RSTART - WSTART` BX. It must be between 1 and 64,
  the FIFO length.
* **Realignment.** The FIFO is a circular buffer. The address of the first
  word written in a cycle is kept, and the read pointer is set to it when
  `out_bx` is 0. Every cycle thus realigns reading with writing, whatever
  happened before: a reset, changed registers or a missing BCRes. Words of the
  previous cycle that are still in flight are read out undisturbed.
* **Errors.** Both are checked when `out_bx` is 0 and kept in sticky status
  bits. `unf` means nothing was written yet in this cycle, i.e. `RSTART` is
  not after `WSTART`. `ovf` means more than 64 words were written, i.e. the
  delay is longer than the FIFO.
* Outside the read window the output is zero and `valid` is low.

### Whole BXs, option 2: pipeline (`pipeline_delay`)

This option is meant for the shortest latency, for the latest channels such
as muon data. It is a shift register with a programmable tap. `DELAY = d`
gives d register stages, counting the phase-selection register as the first,
so `DELAY = 1` adds nothing to it. Counting the link receiver's output
register and the link transmitter's input register outside the chip, the
minimum latency through the module is 3 BX. The output is always valid. Here
`RSTART` only sets the BX numbering (`out_bx`).

Each pair has a `mode_pipe` bit that selects one of the two circuits. Both are
built for every pair, so calorimeter-like and muon-like channels can share
one module.

### Setting up a run

For a channel whose phase-selected data of trigger BX `t` appear when the
local count is `t + Lc`:

* FIFO mode: set `WSTART = Lc`, then choose one `RSTART` for the whole module,
  at or after the latest channel. Each FIFO delay is then `RSTART - Lc`.
* Pipeline mode: set `DELAY = RSTART - Lc + 1`.
* For the latest channel, the shortest setting is `DELAY = 1`.

In the end-to-end testbench the calorimeter-like pairs arrive with latency
5, 12 and 20 BX and use the FIFO. The muon-like pairs arrive at 28, 29 and 30
BX and use pipeline delays of 3, 2 and 1. With `RSTART = 32`, all 12 channels
leave carrying the same BX, equal to `out_bx`. The sampling adds two clocks
to the link latency.

## Checks that run all the time

| check | block | what counts as an error |
|---|---|---|
| parity | `parity_check` | one of the 3 parity bits (one per data byte, even or odd mode) is wrong; counted per channel on the sampled input |
| synchronisation | `sync_check` | a sync word differs from its reference; counted per channel on the delayed output |
| bunch counter | `bx_counter` | BCRes arrives when the local count is not 3563 |
| link stability | `phase_sync` | not an error: transitions per phase boundary |

There are two ways to find the sync words. With `use_flag = 0`, every valid
word whose local count lies in `START_SY <= bx_loc < STOP_SY` is a sync word;
this is one window per cycle, normally in the gap. With `use_flag = 1`, every
word with the sync flag set is one. The reference is selected by `cmp_bx`:
either the 24-bit constant `SYNC_CONST`, or the word's own BX number, compared
against `data[11:0]`. When the alignment is right, the second choice gives
zero errors on data that carry their BX number.

## Ring buffers and readout

Each channel has a 4096 x 32-bit dual-port memory (`dpm`). Every BX it is
written at address `out_bx` with the outgoing word, laid out as
`{phase[3:0], sync, parity[2:0], data[23:0]}`. It thus always holds the last
LHC cycle.

The readout processor (`rop`) takes one request at a time (`req_valid` /
`req_ready`). A request carries the first BX and a 24-bit event number. Bit 23
of the event number is 1 for a monitoring request and 0 for an L1 accept. The
processor then sends this record:

| word | content |
|---|---|
| header | `{8'hE1, event}` for an L1 accept, `{8'hD1, event}` for monitoring |
| data | for each of `NBX` BXs (from `req_bx`, wrapping after 3563): channel 0..11 words from the ring buffers |
| end | `{8'hEE, event}`, with `gtfe_eoe` |

The record goes out at one word every two clocks (20 MHz). With `NBX = 5` and
12 channels it is 62 words, 124 clocks or 3.1 µs. That is well below the
10 µs between L1 accepts at 100 kHz, so about two thirds of the link time
remains for monitoring records.

## Register map (`vme_regs`)

The register port is synchronous: a write takes effect at the clock edge, and
read data appear one clock after the address. All addresses are 32-bit word
addresses.

| address | register | reset |
|---|---|---|
| 0x000 | RSTART | 1 |
| 0x001 / 0x002 | START_SY / STOP_SY | 3437 / 3563 |
| 0x003 | SYNC_CONST (24 bit) | 0 |
| 0x004 | CTRL: bit0 use_flag, bit1 cmp_bx, bit2 odd parity | 0 |
| 0x005 | NBX, BXs per readout record | 5 |
| 0x008 | BXSTAT (RO): bit31 last BCRes wrong, [27:12] error total, [11:0] count at last BCRes | |
| 0x040+16p +0/+1/+2 | pair p: WSTART / WSTOP / DELAY | 0 / 3563 / 1 |
| 0x040+16p +3 | pair p: bit0 mode_pipe, bit1 auto_sel, [3:2] man_phase | pipeline, auto |
| 0x040+16p +4..+7 | pair p: transitions at boundary 0..3, last cycle (RO) | |
| 0x040+16p +8 | pair p: bit0 ovf, bit1 unf, [3:2] phase in use (RO) | |
| 0x100+4c +0/+1 | channel c: parity / sync errors, last cycle (RO) | |

The reset values give the shortest latency: pipeline mode, `DELAY = 1` and
`RSTART = 1`.

## Files

| file | content |
|---|---|
| `rtl/psb_pkg.sv` | constants, word and register structs, parity function |
| `rtl/psb_top.sv` | the module: 6 pairs, 12 ring buffers, counter, readout, registers |
| `rtl/psb_pair.sv` | one channel pair: phase, both delays, mode select, checks |
| `rtl/phase_sync.sv` | four-phase sampling, phase choice, transition counters |
| `rtl/fifo_delay.sv` | synchronisation FIFO with WSTART/WSTOP/RSTART windows |
| `rtl/pipeline_delay.sv` | programmable pipeline, 1..64 BX |
| `rtl/parity_check.sv`, `rtl/sync_check.sv` | per-channel checks |
| `rtl/lhc_counter.sv` | per-cycle counter with holding register |
| `rtl/bx_counter.sv` | local bunch counter, BCRes check, `out_bx` |
| `rtl/dpm.sv` | ring buffer |
| `rtl/rop.sv` | readout processor |
| `rtl/vme_regs.sv` | register file |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

`psb_top` parameters: `N_CH = 12`, `FIFO_DEPTH = 64` (must be a power of two)
and `MAX_DELAY = 64`. At the default size, synthesis gives about 28,400
flip-flops, most of them in the six 64-stage pipelines, and 1.6 Mbit of
memory, almost all of it in the ring buffers.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
simulator used is Verilator 5 (two-state). For example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/psb_pkg.sv tb/tb_psb_top.sv --top-module tb_psb_top -o sim
    ./obj_dir/sim

Use the same command with any `tb/tb_<module>.sv`.

* `tb_psb_top` runs the whole module at its default size over six LHC
  cycles, in under a minute including the build. It checks every output word
  of all 12 channels from the second cycle on, and both readout records. It
  configures everything through the register port and reads back the chosen
  phases, the transition counts and the injected errors. It then provokes a
  FIFO overflow, a FIFO underflow and a bunch-counting error. Each of these
  mechanisms must occur at least once, or the test fails.
* `tb_psb_readout_rate` raises an L1 accept every 400 clocks (100 kHz) and
  fills the time between them with monitoring requests. It checks every
  record and that two monitoring records fit between two L1 accepts.
* The block testbenches compare against models written independently in the
  testbench. Examples: the input value at each sampling instant for
  `phase_sync`, and word-by-word stamps for `fifo_delay` and
  `pipeline_delay`. They also check the timing given above: the delay equals
  `RSTART - WSTART` or `DELAY`, and a record takes 124 clocks.

## Design decisions beyond the original description

The original description gives the structure, the registers and the
procedures. The following details are this design's own:

* **Channel word.** The input is 28 bits: 24 data, 3 parity and a sync flag,
  taken from the stored 32-bit word. The physical link chips carry 21 bits
  each, and the mapping of channel bits onto them is not part of this RTL.
* **Parity.** One parity bit per data byte.
* **Phase.** The automatic phase rule (two quarters after the busiest
  boundary) and the choice of bit 0 for the phase bits. There is no
  metastability synchroniser on the sampled inputs: the sampling registers
  are modelled as ideal.
* **Delay circuits.** Both circuits are present in every pair, with a
  run-time select. The pipeline length is at most 64 BX. The FIFO realignment
  mechanism and its overflow and underflow flags are this design's.
* **Sync check.** The window applies to the local count. The bit field
  compared with the BX number is `data[11:0]`.
* **Ring buffers.** The depth is 4096. Both ports run on one clock, with one
  clock of read latency.
* **Readout.** The identifier codes `E1`, `D1` and `EE`, and the monitor flag
  in bit 23 of the event number.
* **Register port.** A generic synchronous port stands in for the VME
  interface. The address map and the reset values are this design's.
* **Counters.** All per-cycle counters are 16 bits wide and saturate.

## Not included

These parts stay outside the RTL. Their signals are ports of `psb_top`.

* The serialising link chips: the receivers in front of `ch_in` and the
  transmitters behind `gtl_out`.
* The timing board that supplies the clocks and BCRes.
* The readout board that receives the `gtfe_*` words.
* The monitoring software.
