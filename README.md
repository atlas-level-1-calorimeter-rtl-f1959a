# Jet/Energy Module (JEM) for a Level-1 calorimeter trigger

The JEM is one board of a hardware trigger that decides in fixed time, at every
LHC bunch crossing (40.08 MHz), whether the calorimeter saw jets or large
energy sums. Each module covers a 4 (eta) x 8 (phi) patch of 0.2 x 0.2 "jet
elements", plus overlap rows from the neighbouring quadrants. It does two jobs
in a pipeline with no stalls:

* **Energy sums.** It adds up the scalar transverse energy Et and the two
  components Ex and Ey of the missing-energy vector over its core area. It sends
  them, compressed to 8 bits each, to an energy merger.
* **Jet counting.** It runs a sliding-window jet finder over a 7 x 11 window of
  jet elements (its own 4 columns plus 1 column from the left-hand and 2 from
  the right-hand neighbour). It counts the jets that pass each of 8
  programmable definitions and sends the counts to a jet merger.

When a Level-1 accept arrives, the module also reads out its buffered input and
output data (DAQ) and its jet positions (regions of interest, RoI). Everything
is configured and monitored over a reduced VME bus.

This repository holds synthesizable SystemVerilog for the module's FPGA logic
(`rtl/`), one self-checking testbench per block, and an end-to-end testbench
(`tb/`).

## Data flow

```
 88 deserialiser words (10 bit: 9-bit energy + odd parity) + /LOCK
        |
   4 x input_processor  (R, S, T: 3 phi rows = 24 channels each; U: 2 rows = 16 channels)
        |  per channel: ip_channel_sync -> playback mux -> spy_mem -> ip_channel_check
        |  per jet element (em + had): je_former -> je_mux (5-bit halves at 80 MHz)
        |  energy_presum: Et / Ex / Ey over the enabled elements
        |                                  \
        |  44 local lines + 33 neighbour lines   \  3 pre-sums (R, S, T)
        v                                          v
   jet_processor                              sum_processor
     77 x je_demux -> 7x11 environment          3-input add, cut 2 LSBs, clip,
     jet_input_cond (noise thr, FCAL)           quad-linear code, parity
     jet_algorithm  -> 24-bit hits + parity     -> 25-bit energy word
     RoI readout controller + sequencers        DAQ readout controller + sum slice
        |                                          |
   roi_link (5 bit + dav)                     daq_link (16 bit + dav)

   vme_interface -> jem_registers -> every setting, counter, playback and spy memory
```

Channel numbering: channel `8*row + 2*eta` is electromagnetic and the next one
is hadronic. Jet element `j = 4*row + eta`. Row 0 is overlap from one side,
rows 1-8 are the core, and rows 9-10 are overlap from the other side.
Processors R, S and T hold rows 0-8; U holds rows 9-10. Only R, S and T feed
the energy sums, and by default only the core rows 1-8 are enabled.

## The jet algorithm (`jet_algorithm.sv`)

This is the least obvious part of the design.

1. **Cluster sums.** Every tick, from the 7 x 11 elements, it forms:
   - 60 2x2 sums (6 x 10 corner positions);
   - 45 3x3 sums (5 x 9);
   - 32 4x4 sums (4 x 8).

   Each sum carries a flag if it contains a saturated element (0x3FF).
2. **Local maxima.** Each of the 32 core 2x2 clusters (corner at eta 1-4,
   phi 1-8 of the window) is compared with its 8 neighbours in the 6 x 10 array.
   Equal neighbours need a tie rule, or one flat energy deposit would give two
   jets, either inside a module or across the boundary between two modules. The
   rule used here:
   - A cluster must be **strictly greater** than neighbours that come earlier
     in (eta, phi) order.
   - It must be **greater or equal** to neighbours that come later.

   So a peak belongs to the earliest 2x2 cluster that contains it. That cluster
   may be the neighbouring module's. A lone tower at window eta 1 or phi 1 is
   therefore counted by the neighbour, not here. The same rule guarantees at
   most one maximum in each of the 8 2x2 subregions of the core.
3. **Selection and thresholds.** For each subregion with a maximum, the design
   takes:
   - the 2x2 cluster itself;
   - the 4x4 cluster centred on it;
   - the four 3x3 clusters that contain it.

   Each of the 8 jet definitions (cluster size + 10-bit threshold) passes if the
   cluster is saturated or exceeds the threshold. For 3x3, one of the four
   clusters is enough. A threshold of 0x3FF disables a definition.
4. **Multiplicities.** In central mode, the output is eight 3-bit counts that
   saturate at 7. In FCAL mode (forward calorimeter modules), a subregion whose
   2x2 cluster touches an FCAL column is tested against the 4 FCAL definitions
   instead. The output is then eight 2-bit central and four 2-bit FCAL counts,
   saturating at 3: `hits = {f3..f0, c7..c0}`.
5. **RoI records.** Each subregion gives one 11-bit record
   `{saturation, 8 threshold bits, 2-bit position}`. Position is
   `{phi offset, eta offset}` of the maximum inside the subregion. Saturation
   means the 4x4 cluster holds a saturated element. Records of subregions
   without a maximum are zero.

Before the algorithm, `jet_input_cond` applies two steps:
- It zeroes elements below a noise threshold.
- It handles the double-width phi bins of the forward calorimeter. In the eta
  columns marked as FCAL, values are halved (saturation kept). On flagged rows,
  the halved value of the row below is copied in, so both phi cells receive
  half.

## Energy path

- **`energy_presum`** (one per input processor):
  - Et: elements below `thr_et` are dropped.
  - Ex/Ey: elements below `thr_xy` are dropped. Each remaining element is
    multiplied by its own signed 12-bit coefficient (value/1024, i.e. cos/sin
    of its phi), and the product is rounded to 0.25 GeV (`(e*c + 128) >>> 8`).
  - Et saturates at 12 bits (4095 GeV), and a saturated element forces full
    scale. Ex/Ey saturate at 14-bit two's complement.
- **`sum_processor`**: adds the three pre-sums, strips the two LSBs of Ex/Ey
  (now 1 GeV) and clips them to 12-bit signed. It then encodes each of the
  three quantities with a quad-linear code (`quadlin_encoder`):

  | Et range  | divided by | scale bits |
  |-----------|-----------:|-----------:|
  | 0-63      | 1          | 00         |
  | 64-255    | 4          | 01         |
  | 256-1023  | 16         | 10         |
  | 1024-4095 | 64         | 11         |

  Ex and Ey use the same scheme on the signed value, with the range limits
  halved (32/128/512) so that the sign fits in the 6-bit field. The output word
  is `{odd parity, Ey code, Ex code, Et code}`.

## Two clocks

`clk` is the bunch clock and `clk2x` is twice that, phase aligned.
`clk_xtal` is the unrelated crystal clock of the readout links (see Readout).
Jet elements travel from input processors to the jet processor as two 5-bit
halves, low half first. Neighbour modules use the same format.

- A flip-flop `bc_toggle` flips every `clk` tick. Inside the `clk2x` domain,
  comparing it with a delayed copy tells which `clk2x` edge coincides with a
  `clk` edge.
- `je_mux` captures the element on that edge and sends the low half, then the
  high half.
- `je_demux` stores the low half and assembles the word on the middle edge, so
  it is stable across the next `clk` edge.

## Readout

- **Latency buffer.** `readout_sequencer` delays its slice by `LATENCY` (48)
  ticks. On each ReadRequest it copies the slice into a 256-deep FIFO.
- **Serialisation.** It serialises one slice per stream, MSB first, with one
  odd parity bit per stream. The last slice of an event is followed by `GAP`
  (20) invalid ticks.
- **Bunch number.** A `TAG_W`-bit field (the bunch number) is latched from the
  first slice, so every slice of a multi-slice event carries the triggered
  bunch number.
- **`readout_controller`** has a 64-tick L1A shift register. It raises
  ReadRequest `offset + 2` ticks after the accept, once per slice (1-5). It
  also keeps the 12-bit bunch counter (reset by BcntRes) and forms the link
  word, with `dav = 0` meaning fill frames.
- **DAQ link.** 16 bits: 15 input-processor streams plus the sum-processor
  stream. Each slice is 66 bits + parity.
  - Input processors: 6 channels x `{lock, 10-bit word}` per stream.
  - Sum processor: `{jet hits 25, energy word 25, 4'b0, bunch number 12}`.
- **RoI link.** 5 bits: `{fcal1, fcal0, bcn, central1, central0}`, one 45-bit
  slice per event. The FCAL lines are forced to 0 unless FCAL mode is on.
- **TTC not ready.** When `ttc_ready` is low, both merger outputs are zero and
  both links are idle.
- **Crystal clock.** The link chips run on a local 40.000 MHz crystal clock
  (`clk_xtal`), not on the 40.08 MHz bunch clock. `link_resync` carries each
  link word across in a 16-deep dual-clock FIFO with gray-coded pointers. The
  rates differ slightly, so the FIFO must sometimes drop or repeat a word. It
  only ever adds or drops idle (`dav = 0`) words:
  - the write side drops an idle word when the FIFO is more than 3/4 full;
  - the read side sends an extra fill frame when it is less than 1/4 full and
    the next word is idle.

  A packet therefore always reaches the link contiguously; a fill frame inside
  it would look like the end of the packet. A FIFO overflow sets STATUS bit 2.

## Control (VME)

- **Addressing.** `vme_interface` is an A24/D16 slave. The module owns the
  window `A[23:18] == GEOADD`, and every access inside it gets DTACK* (4 ticks
  after DS0* falls), so no access can hang the bus. Registers are 16-bit words
  at `A[11:1]` with `A[17:12] == 0`.
- **Register map.** `jem_registers` holds the map; `jem_pkg.sv` lists the
  addresses:
  - per-channel phase/delay/mask;
  - Ex/Ey coefficients;
  - three thresholds;
  - energy-sum enables;
  - 12 jet definitions;
  - FCAL settings;
  - readout offset and slice count;
  - diagnostic mode bits (playback, spy, pointer reset, counter clear);
  - status and error counters;
  - playback write ports and spy read ports.
- **Reset state.** All definitions are disabled, coefficients and thresholds
  are 0, one slice is read out, and the energy sums are enabled for the 32 core
  elements.
- **Diagnostic memories.** Each channel has a 256 x 9 playback memory, which
  replaces the input in playback mode, and a 256 x 10 spy. The energy and hit
  words have 256 x 25 spies. A TTC short broadcast (`sync_bcast`) aligns the
  real-time pointers of all memories.

## Departures from the original hardware, and choices made here

- **Latency is longer.** Input to merger output takes about 12 ticks (energy)
  and 13 ticks (jets). The original FPGAs quote 182 ns and 257 ns (7.3 and
  10.3 ticks). The extra stages come from registering every block boundary and
  could be merged.
- **Readout clock.** Readout logic runs on the bunch clock. Only the
  finished link words cross to the crystal clock, through the elastic buffer
  described above.
- **Own choices.** These are not given by the original and were chosen here:
  - the tie rule above;
  - the RoI position code and saturation bit;
  - the signed quad-linear variant;
  - the coefficient scale and rounding;
  - the VME register map and reset values;
  - not counting errors on masked channels;
  - the DAQ slice layout;
  - the FCAL row-copy control;
  - the elastic scheme for the crystal-clock crossing.
- **Outside this RTL.** The following are external chips or board-level parts
  and are not included:
  - the LVDS deserialisers;
  - the TTC decoder;
  - the link serialisers and optics;
  - FPGA configuration (System ACE, CPLD);
  - the CAN monitoring node;
  - JTAG and power.

## Verification

Each block has a testbench `tb/tb_<block>.sv` that compares against an
independent model and prints `TB_RESULT checks=N failures=M`. Among them:

- a reference model of the jet algorithm that evaluates every cluster directly;
- a quad-linear table check over all 4096 codes;
- readout packets decoded bit by bit.

Each testbench was also run against a copy of its block with one deliberate
bug, and each failed.

`tb/tb_jem_top.sv` runs the complete module at its default parameters. It
configures everything over VME and drives static input patterns. It compares
the energy word and the hit word with models of the whole chain, and decodes
DAQ and RoI packets (including multi-slice events and the RoI records). It
also exercises:

- parity errors, lock loss and masked channels, with the counters read back
  over VME;
- playback of all 88 memories;
- spy read-back;
- saturated channels and Ex/Ey overflow;
- multiplicity saturation;
- FCAL mode;
- TTC-not-ready forcing;
- accesses outside the module's window.

It samples the links on a crystal clock 1 % slower than the bunch clock,
five times the real mismatch. It fails if any of these mechanisms never
occurred. It takes about one minute with Verilator.

`tb/tb_link_resync.sv` sends long packets through the link buffer, with the
crystal clock first 1 % faster and then 1 % slower than the bunch clock. It
checks that every packet arrives whole and in order.

Not covered by a testbench: non-zero neighbour-module inputs at the top level
(covered at jet-processor level), FIFO overflow at full size (covered in the
sequencer testbench), and timing against a real deserialiser phase.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/jem_pkg.sv tb/tb_jem_top.sv --top-module tb_jem_top
./obj_dir/Vtb_jem_top
```

Any other `tb/tb_<block>.sv` builds the same way. Block testbenches override
parameters (shorter latency, smaller FIFOs) to run fast. Top-level parameters
are `LATENCY` (48), `FIFO_DEPTH` (256) and `GAP` (20). Array sizes follow from
the constants in `rtl/jem_pkg.sv`.
