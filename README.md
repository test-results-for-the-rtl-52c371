# Jet/Energy Module (JEM) of the ATLAS Level-1 Calorimeter Trigger

The JEM is one of 32 boards of the Jet/Energy Processor. Every 25 ns bunch
crossing (BC) it takes the electromagnetic and hadronic transverse energies
of a patch of the calorimeter. From them it finds jet candidates with a
sliding-window algorithm and computes the total energy Et and the components
Ex and Ey of the missing energy. It sends the results to the merger modules
within a fixed latency of 8 BC. The board keeps its inputs and results in
pipelines. When the central trigger accepts an event, the readout controller
sends them to the data-acquisition and Level-2 systems.

This SystemVerilog models the board's logic at the FPGA level:

- 11 InputFPGAs;
- the MainProcessor;
- the Readout Controller (ROC);
- the Control-FPGA, which handles VME and TTC.

Chips that carry no logic of this design are outside the top module and
appear as its ports. These are the LVDS deserialisers, the TTCrx, the G-Link
transmitters and the backplane.

## Geometry: the 11 x 7 jet-element array

A *jet element* is the em + had energy of one 0.2 x 0.2 (phi x eta) tower,
10 bits wide. One JEM sees an array of 11 phi rows x 7 eta columns:

```
            eta col:  0    1  2  3  4    5  6
  phi row 0          [n]  [d  d  d  d]  [n  n]     d = duplicated by the
  phi rows 1..8      [n]  [ core 8x4 ]  [n  n]         PreProcessor
  phi rows 9,10      [n]  [d  d  d  d]  [n  n]     n = from a neighbour JEM
```

- **Core.** Rows 1..8 x columns 1..4 are the core. The module is responsible
  for results here only.
- **Phi rows.** InputFPGA *f* receives phi row *f*, columns 1..4, on eight
  LVDS channels: channels 0..3 are em and 4..7 are had. The PreProcessor
  duplicates the extra phi rows (0, 9, 10), so they arrive as ordinary
  inputs.
- **Eta columns.** The extra eta columns come over the backplane:
  - each JEM sends its columns 1..2 to the lower-eta neighbour (`bp_out_lo`);
  - it sends column 4 to the higher-eta neighbour (`bp_out_hi`);
  - it receives column 0 on `bp_in_lo` and columns 5..6 on `bp_in_hi`.
- **Loopback plug.** The backplane test uses a plug that connects
  `bp_in_lo = bp_out_hi` and `bp_in_hi = bp_out_lo`.

## Clocking

Everything runs on one 80 MHz clock `clk`. A strobe `bc_ph` is high during
the second 80 MHz cycle of each bunch crossing. All logic that works at
40 MHz updates on the clock edge where `bc_ph` is 1. The only logic that
really runs at 80 MHz is the 5-bit jet-element link: `je_mux` sends the low
half in the first cycle and the high half in the second.

## InputFPGA (`input_fpga`)

Each of the eight channels passes through these stages:

1. **`lvds_sync`.** The deserialised word is presented on four DLL clock
   phases (`lvds_ph[f][ch][phase]`). While calibration mode is on, the
   PreProcessor sends a pattern that alternates between 0x155 and 0x2AA.
   - A phase is *good* once it has shown 16 consecutive correct, alternating
     words. It stays good until the next calibration starts.
   - When calibration ends, the stage chooses a good phase whose two
     neighbours are also good, which is the centre of the data eye. If there
     is none, it takes the first good phase.
   - It then sets `locked`.
2. **`playback_memory`.** This holds 8 x 256 words that are loaded over VME.
   A playback/spy command makes it replace the live words for exactly 256
   crossings.
3. **Parity check and mask.** The word is a 9-bit energy plus an even-parity
   bit (bit 9). A channel with a parity error, or with its mask bit set,
   contributes 0.
4. **Sum and multiplex.** em + had gives four 10-bit jet elements. `je_mux`
   sends them as 5-bit halves at 80 MHz.
5. **Readout slice.** The checked energies and the parity flags (80 bits)
   go into a `readout_pipeline`.

## MainProcessor (`main_processor`)

`je_demux` rebuilds the 11 x 7 array from the local and backplane half-words.
The jet algorithm and the energy sum then work on the array in parallel.

### Jet algorithm (`jet_algorithm`)

This is the hardest part to follow. It has two pipeline stages.

**Stage 1 (window sums).**

- Every 2x2 sum is formed: 10 x 6 origins.
- Each of the 32 core 2x2 positions (origin rows 1..8, columns 1..4) gets
  two larger windows:
  - its **3x3** window is the largest of the four 3x3 windows that contain
    the 2x2;
  - its **4x4** window has the 2x2 at its centre, covering offsets -1..+2
    in both directions.

**Stage 2 (local maxima and thresholds).**

- **Local maximum.** A core 2x2 is an RoI candidate when it is a local
  maximum among the eight neighbouring 2x2 sums. Two equal neighbours must
  not both win, so the test is asymmetric:
  - the candidate must be strictly greater than the neighbours with lower
    phi, or with the same phi and lower eta;
  - it must be greater than or equal to the other neighbours.

  For example, a single isolated tower is covered by four equal 2x2 windows.
  Only the one with the tower in its upper-right corner (highest phi and
  eta) wins.
- **Thresholds.** There are eight programmable thresholds. Each one has its
  own window size (2x2, 3x3 or 4x4; register `A_WIN`). For every candidate,
  the window of the chosen size is compared with the threshold. It passes
  when sum > threshold.
- **Outputs.**
  - Per threshold, the number of passing candidates gives a 3-bit
    multiplicity that saturates at 7. The eight multiplicities form
    `cmm_jet` (24 bits).
  - The per-position hit bits (32 positions x 8 thresholds) are the RoI
    data.

The board's firmware works on the 5-bit half-words at 80 MHz. Here the
algorithm runs once per crossing on the rebuilt 10-bit elements. The results
are the same, and the latency budget still gives 8 BC overall.

### Energy summation (`energy_sum`) and encoding (`quadlinear_encoder`)

**Summation.**

- Stage 1 sums each core phi row.
- Stage 2 forms the three totals:
  - Et is the sum of the eight row sums;
  - Ex = (sum of row_sum x cos phi) >> 10;
  - Ey = (sum of row_sum x sin phi) >> 10.
- The row angle is the row centre, (row + 0.5) x 11.25 degrees, rotated by
  90 degrees per quadrant. The quadrant is register `A_QUADRANT`.
- The coefficients are round(1024 cos) = {1019, 980, 903, 792, 650, 483,
  297, 100}. The sine table is the same list in reverse.
- In loopback mode the sums use the duplicated eta columns 0, 5 and 6 of the
  core rows instead of the core. This makes the data that came back through
  the plug visible in the energy output.

**Encoding.** Each sum becomes an 8-bit quad-linear field
{range[1:0], mantissa[5:0]} with value = mantissa x 4^range.

- The encoder uses the smallest range that holds the value, truncates the
  mantissa, and saturates above range 3.
- Et is unsigned. Ex and Ey have signed mantissas.
- `cmm_energy` = {odd parity, Et, Ey, Ex}, 25 bits.

### Real-time latency

For a word on `lvds_ph` during crossing n:

| crossing | stage |
|---|---|
| n+1 | phase-selected word |
| n+2 | parity-checked energy (also written to the input pipeline) |
| n+3 | 5-bit half-words on the wire |
| n+4 | rebuilt 11 x 7 array |
| n+5 | 2x2/3x3/4x4 sums, row sums |
| n+6 | multiplicities, Et/Ex/Ey |
| n+7 | encoded energy word |
| n+8 | registered `cmm_energy`/`cmm_jet` on the backplane |

The total of 8 BC matches the latency measured on the prototype.

## Readout (`readout_pipeline`, `readout_controller`)

**Pipelines.** Every pipeline is 128 slices deep and written once per
crossing at a shared write index. The index names a crossing on the whole
board, which keeps alignment simple. The MainProcessor's pipelines are
written 4 crossings later than the InputFPGAs'. They read with
`LAT_OFFSET = 4`, so one read index returns the inputs and the results of
the same crossing.

**Accepts.** On a Level-1 accept, the ROC stores the BCN and
`index - l1a_latency` in an 8-deep event FIFO. The latency is register
`A_LATENCY` (default 32), in crossings. A copy engine then reads:

- `n_slices` (1..5) slices centred on the accepted crossing, two clocks per
  slice, into a slice FIFO;
- the RoI word of the accepted crossing, into an RoI FIFO.

Copying right away means a long queue of packets never outlives the
pipeline. If an accept finds the event FIFO full, it is dropped and counted
in the status register.

**Output streams.** Two serialisers send 16-bit words, one per 80 MHz clock.

| stream | words |
|---|---|
| DAQ | `{A, BCN}`, `n`, then 60 words per slice |
| Level-2 | `{B, BCN}`, `{0, pos[4:0], hits[7:0]}` for each core position with a hit, `{E, 0, count}` |

- In a DAQ slice, the first 55 words are 11 InputFPGAs x 80 bits, low bits
  first. The last 5 words carry `{0, mult[23:0], Ey, Ex, Et[14:0]}`.
- In the Level-2 stream, pos = 4 x phi_row + eta_column of the core 2x2.
- `*_first` and `*_last` mark the first and last word of a packet.

**ROC spy memory.** It captures the first 256 words of the DAQ stream after
a playback/spy command.

## Control-FPGA (`control_fpga`) and diagnostics

VME is reduced to A16/D16 single-cycle strobes. Read data arrives two clocks
after `vme_re` (`vme_rvalid`).

| address | content |
|---|---|
| 0x0000 | control: bit 0 calibration, bit 1 loopback, bit 2 start playback/spy, bit 3 clear parity-error flag (bits 2 and 3 act once, read back 0) |
| 0x0001 | status: [15:8] dropped accepts, bit 3 spy capture running, bit 2 parity error seen (sticky), bit 1 playback active, bit 0 all 88 channels locked |
| 0x0002 | L1A latency (BC) |
| 0x0003 | number of readout slices (1..5) |
| 0x0004 | JEP quadrant |
| 0x0010-0x0017 | jet thresholds 0..7 |
| 0x0018 | window size per threshold, 2 bits each (0: 2x2, 1: 3x3, 2: 4x4) |
| 0x0020-0x002A | channel masks of InputFPGA 0..10 |
| 0x4000 \| part<<8 \| word | MainProcessor spy word, 16-bit part 0..3 |
| 0x5000 \| part<<8 \| word | ROC spy word: part 0 data, part 1 {first, last} |
| 0x8000 \| f<<11 \| ch<<8 \| word | playback memory write |

**TTC.**

- The bunch counter wraps at 3564 and is cleared by BCR.
- Broadcast command 1 starts a playback/spy cycle, as does control bit 2.

**Playback/spy cycle.** In the same crossing:

- all playback memories start;
- the MainProcessor spy memory (`{cmm_jet, cmm_energy}`) starts capturing
  256 crossings;
- the ROC spy memory starts capturing.

## Where this departs from the original board, and what is assumed

- **Outside the design.** The LVDS deserialisers, the TTCrx, the G-Link
  transmitters and the backplane are outside, as ports. FPGA configuration
  is not modelled. Neither are the Et,miss lookup tables, which belong to
  the merger modules.
- **Invented formats.** The following are this design's own choices:
  - the sync pattern;
  - parity sense and bit layout of the link word;
  - channel order;
  - the quad-linear field layout;
  - the register map and broadcast code;
  - the DAQ/RoI packet formats;
  - pipeline and FIFO depths.
- **Jet algorithm.** The tie rule, the placement of the 3x3 and 4x4
  windows, and `>` against the threshold are all assumptions. So is running
  the algorithm on demultiplexed elements.
- **Phase selection.** The DLL clock-phase adjustment is analog clocking. It
  is modelled as four pre-sampled copies of each word.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/jem_ref_pkg.sv` holds the reference
models (jet finder, energy sums, encoder) that the testbenches compare
against. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/jem_pkg.sv tb/jem_ref_pkg.sv tb/tb_jem_top.sv --top-module tb_jem_top
./obj_dir/Vtb_jem_top
```

Replace `tb_jem_top` with `tb_<block>` for a single block.

`tb_jem_top` runs the whole module at its default parameters. It covers:

- calibration of all 88 channels;
- random data with parity errors and masked channels, checked crossing by
  crossing against the reference;
- a pattern that saturates the multiplicities;
- measurement of the 8 BC latency;
- the backplane loopback with a 0..511 counter on one channel;
- a VME-loaded, TTC-started playback/spy cycle with spy read-back;
- Level-1 accepts with 1 and 5 slices, checked word by word on both output
  streams;
- a bunch-counter reset.

It counts each of these mechanisms and fails if any never happened. It
builds in about two minutes and runs in under a second.
