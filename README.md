# TileCal Read-Out Driver in SystemVerilog

The Read-Out Driver (ROD) sits between the front-end electronics of the ATLAS
hadronic Tile Calorimeter and the central data acquisition. For every event
accepted by the Level 1 trigger (up to 100 kHz), each of the 8 superdrawers
it serves sends 48 channels × 7 ADC samples over an optical link. The ROD
checks the frames and matches them with the trigger system's event
number and bunch crossing. It turns the samples into energy, phase and a
quality factor per channel, adds Level 2 muon tagging and transverse
energy sums, and packs everything into one ROD fragment per Processing Unit.
The fragment goes to an S-Link card or, for test stands, to an SDRAM that is
read over VME. All of this must happen within 10 µs per event.

This repository holds synthesizable RTL for the whole ROD motherboard in its
TileCal configuration, plus the FIFO on the Transition Module behind it. The
top module is `rod_top`. The per-event work that the original board does in
software on TI C6414 DSPs is built here as a fixed-function pipeline
(`dsp_core`) with the same inputs, outputs and processing steps.

## Board structure

```
 8 G-Links ──► 4 Staging FPGAs ──► 2 Processing Units ──► 2 Output Controllers ──► serializer
   (16 bit, own clocks)  │  routing, de-skew        │  each: 2 × (InFPGA → DSP core → FIFO)      │   └► SDRAM
                         └── neighbour links ────────┘  + OutFPGA                                  ▼
                                                                 Transition Module FIFO ──► S-Link card
 TTCrx ──► TTC FPGA ── serial TTC word ──► every PU            (XOFF back to the Output Controller)
 VME ──► VME/Busy FPGA ── 5-line local bus ──► Staging, PU, OC, TTC FPGA;  busy OR ──► crate
```

* **G-Link inputs.** Each input gives a 16-bit word, a data-valid flag and a
  control flag in its own recovered clock. The deserialiser chips are
  outside the design, and their parallel outputs are `rod_top` ports.
* **Staging FPGAs** (`staging_fpga`).
  * Each takes two G-Links and crosses them into the ROD clock through
    dual-clock FIFOs (`async_fifo`).
  * It has four 16-bit outputs towards its PU. Each output is set through a
    3-bit route code: 0 off, 1 own link 0, 2 own link 1, 3 neighbour link 0,
    4 neighbour link 1, 5 test RAM.
  * In the TileCal configuration only PU slots 1 and 3 are used. Staging
    FPGA 0 forwards its own links plus those of Staging FPGA 1 to PU 0, and
    Staging 2 and 3 do the same for PU 1. The route value for those two
    Staging FPGAs is `1 | 2<<3 | 3<<6 | 4<<9`.
  * After reset every route is off and the G-Links are held in reset until
    the controller configures them.
  * The Staging FPGA also reads the G-Link temperature ADC (`temp_monitor`:
    current, maximum and minimum per G-Link). It can replay a test frame
    from a VME-writable RAM.
* **Processing Unit** (`processing_unit`). It has two identical halves. Half
  h reads links 2h and 2h+1 through an Input FPGA, processes them in a
  `dsp_core` and writes the result into a dual-clock output FIFO. The
  OutFPGA (`out_fpga`) distributes TTC words and configuration and gives
  the controller host access to both cores. Half 0 is the *header* core,
  which writes the ROD header; half 1 is the *trailer* core.
* **Output Controller** (`output_controller`). It reads the header core's
  FIFO block and then the trailer core's block. It joins 16-bit FIFO words
  into 32-bit words and adds the S-Link begin/end control words, a status
  word and the ROD trailer. The trailer holds the status word count, the
  data word count and the status position. XOFF from the Transition Module
  FIFO (`tm_buffer`) stalls it. In SDRAM mode it writes the fragment
  without control words to consecutive SDRAM addresses.
* **TTC FPGA** (`ttc_fpga`).
  * It keeps the 12-bit BCID, cleared by BCR, and the 32-bit EVID: 24 bits
    count L1A and are cleared by ECR, and 8 bits count ECRs.
  * For each L1A it sends {trigger type, BCID, EVID} as a 52-bit serial
    word to both PUs.
  * It switches the board clock to the local oscillator when the TTC clock
    disappears and back when it returns.
* **VME and Busy FPGA** (`vme_fpga`). It contains:
  * an A32/D32 VME64x slave with block transfers and an A24 CR/CSR space;
  * the busy logic, which ORs the four PU busy flags through a mask and
    counts busy time;
  * interrupt collection;
  * a JTAG shifter;
  * the master of the local bus.

## The processing core (`dsp_core`, `of_engine`)

This is the part that needs the most explanation.

### Input and synchronisation

The Input FPGA (`input_fpga`, `frame_rx`) receives one front-end frame per
link and event:

| word | content |
|---|---|
| 0 (control flag set) | `{4'hA, BCID[11:0]}` |
| 1 | `EVID[15:0]` |
| 2 … | 48 channels × NGAIN × 7 samples, each `{5'b0, gain, adc[9:0]}` |
| last | CRC-16-CCITT (init 0xFFFF) over all preceding words |

* **Checks.** The Input FPGA checks the CRC, the frame length and ADC
  saturation (1023). With two gains it keeps the high gain unless that
  block is saturated.
* **Storage.** Each channel is stored as two 64-bit words:
  `{s3,s2,s1,s0}` and `{16'h0,s6,s5,s4}`. A header word carries the
  5-bit data-quality flags, EVID, BCID and the channel count.
* **Ready and busy.** An event is "ready" when both links have delivered
  it. `busy` rises when a link buffer has `N_SLOT-1` of its 4 slots in use.
  A frame that arrives with no free slot is dropped and counted.
* **Matching with TTC.** The core waits for a ready event and for the
  matching TTC words from the OutFPGA's two serial ports. McBSP0 carries
  BCID+EVID (44 bits) and McBSP1 the trigger type. The core compares the
  front-end BCID and the low 16 bits of the EVID with the TTC values. A
  mismatch sets a flag in the data-quality word and is counted in
  register 33.

### Optimal Filtering

For each channel, `of_engine` computes:

```
A   = Σ a_i S_i                  amplitude
B   = Σ b_i S_i  (= A·τ)         τ = B / A
P   = Σ c_i S_i                  pedestal
QF  = Σ (S_i − (A g_i + B g'_i + P))²
```

* **Weight table.** It has one row per gain and phase, 151 phases
  (−75 … +75 ns in 1 ns steps). A row holds 5 × 7 signed 16-bit weights
  (a, b, c, g, g') with 10 fractional bits. The host writes it one weight at
  a time at `{gain, phase_index, kind, sample}`.
* **Fixed mode** (LHC running). It uses the 0 ns row once and takes
  4 clocks per channel.
* **Iterative mode** (asynchronous cosmics). It starts at
  τ₀ = 25·(3 − i_max) ns, where i_max is the index of the largest sample,
  and then runs three iterations. Iteration k uses the row for τ_{k−1}
  rounded to 1 ns. This takes 10 clocks per channel.
* **Number formats.**
  * τ is reported in 1/16 ns.
  * A, B and P are rounded down to whole ADC counts.
  * QF saturates at 16 bits.
  * Energy = A·cal/256, where cal is a Q8.8 constant per channel
    (96 per core), saturated to 16 bits.

### Fragment written by one core

All sub-fragments start with `{0xFF1234FF, size, {type, module id}}`.

1. Header core only: a 9-word header. Its words are, in order: marker
   0xEE1234EE, header size 9, format version, source id, run number,
   EVID, BCID, trigger type and detector event type.
2. For each of its two superdrawers:
   * **Reconstruction** (type 0x20): one word per channel, in channel
     order: `{energy[15:0], phase[7:0], qf[5:0], bad, gain}`. The phase is
     in 1/2 ns, saturated to ±63.5 ns. The QF field is QF/16, saturated
     at 63. The full-precision values feed only the histograms.
   * **Raw data** (type 0x10, optional): the stored 64-bit words.
   * **Data quality** (type 0x30): `{11'b0, dq[4:0], 4'b0, 4'b0, fe_bcid}`.
     The dq bits are `{evid_mismatch, bcid_mismatch, saturated, length_error, crc_error}`.
3. **Level 2** (type 0x40, optional). For each of the two modules it gives
   the muon tag bits and tag count (`muon_tag`) and Et, Ex, Ey (`et_sum`).

* **Muon tagging.** The tagger looks at the long-barrel D cells D0–D3.
  For a D cell inside its energy window, it checks the BC and A cells
  behind it. D0 covers BC1/A1, and Dn covers BC(2n)+BC(2n+1) and
  A(2n)+A(2n+1). A cell is tagged in either of two cases:
  * the BC and A sums are both inside their windows;
  * one of them is above its upper threshold and the other is at least
    at its lower threshold.
* **Channel-to-cell map.** Channels 2c and 2c+1 read cell c: A1–A10 are
  cells 0–9, BC1–BC8 are 10–17, B9 is 18 and D0–D3 are 19–22.
* **Et sum.** Tower t holds A(t+1), BC(t+1) (B9 for t = 8) and the D cell
  above it. A D cell that covers two towers is split in halves.
* **Histograms.** If enabled, the core fills a first-sample histogram and
  a QF histogram (64 bins per channel) in `dsp_histogram`.
* **Bad channels.** A channel marked bad is flagged in its word and left
  out of both Level 2 algorithms.

Each core writes 16-bit halves into its output FIFO, high half first. A 17th
bit marks the last word of the event's block.

### Host access

The controller reaches a core through VME, then the local bus (PU device),
then the OutFPGA. Local bus address bits [23:22] select the target: 0 the
OutFPGA's own registers, 1 core 0 and 2 core 1. In a core, HPI address bits
[19:16] select the region:

* 0: OF weights.
* 1: calibration constants.
* 2: registers.
  * ctrl `{hist_en, raw_en, l2_en, header, iterative}`;
  * source id, run number and event type;
  * muon thresholds and module id;
  * bad-channel bits;
  * events done (32) and synchronisation errors (33).
* 3: Et look-up tables (sin θ per tower and cos/sin φ of the module,
  Q1.15).
* 4: histograms.

## Control path

* **VME.** First write the A32 base byte at CR/CSR offset 0x7FF60. The
  slot is selected by its geographic address, AM 0x2F. After that, A32
  offsets inside the board's window are:
  * 0x000–0x0FF: busy logic. Register number = offset/4.
    * 0 busy mask
    * 1 irq enable
    * 2 pending irqs
    * 3 busy state
    * 8–12 busy clock counters
  * 0x100: local bus address `{autoinc, device[4:0], address[25:0]}`.
  * 0x104: local bus data. An access here runs one transfer. DTACK comes
    after it finishes.
  * 0x200–0x20C: JTAG (start/length, TMS, TDI, TDO).
* **Local bus.** It has five lines. `ctl` is driven by the master, and
  four bidirectional lines each carry one byte of a 32-bit word, MSB first.
  * A command takes 8 clocks with `ctl` high:
    `{read, device[4:0], address[25:0]}`.
  * Then comes 8 clocks of write data, or 2 turnaround clocks and 8 clocks
    of read data.
  * A write takes 17 clocks and a read 19.
  * Device numbers: Staging FPGAs 0–3, PUs 4–5, Output Controllers 6–7,
    TTC FPGA 8.
* **Start-up sequence** (as done by `tb_rod_top`):
  1. Set the VME base.
  2. Write the Staging routes and release the G-Link resets (register 0x01).
  3. Load the core weights, calibration constants, thresholds and ctrl
     through the PUs.
  4. Set the OC mode.
  5. Clear the busy mask.

## Clocks, rates and flow control

* **Clock.** `clk` is the single ROD clock, intended at 80 MHz: the rate
  at which the Output Controller reads the PU FIFOs. The 40 MHz quantities
  are handled as one word every two clocks. These are the bunch-crossing
  strobe `bc_en` and the 32-bit output words. G-Link clocks and the OC read
  side of the PU FIFOs are real separate clock domains with Gray-coded
  FIFOs.
* **Per-event budget.** A core takes about 420 clocks for an event in
  fixed mode. That is 5.3 µs of the 10 µs available at 100 kHz. The
  end-to-end test measures it.
* **Back-pressure.** It works in stages:
  1. The Transition Module FIFO raises XOFF at 960 of 1024 words and
     drops it at 512.
  2. XOFF stalls the OC.
  3. The stalled OC fills the PU FIFOs, which stall the cores.
  4. The Input FPGA buffers then fill and raise busy.
  5. Busy, through the mask, stops the trigger.

## Where this design departs from the original board

* **DSP software built as logic.** The processing steps and fragment
  order are the original ones. Their word layouts, fixed-point formats and
  register maps are this design's own.
* **Output bandwidth.** With one word per channel, a PU fragment with
  Level 2 data is 257 words of 32 bits. That takes 6.4 µs on the
  32-bit × 40 MHz output, inside the 10 µs of 100 kHz. Raw data doubles
  the fragment size and is meant for low-rate calibration runs. The
  packing costs phase resolution (1/2 ns instead of 1/16 ns) and QF range.
* **Weights per gain, not per channel.** OF weights are kept per gain and
  phase (one table per core), not per channel and run type. Per-channel
  weights would multiply the table by 96.
* **Host commands through registers.** The DSP's third serial port (run
  number, commands, status) is replaced by host-port registers. InFPGA and
  DSP code booting is not modelled.
* **Shared local bus.** The local bus reaches all devices on shared
  lines. The original daisy-chains it through the Staging FPGAs.
* **Minimal CR/CSR.** It holds only the "CR" signature and the A32 base
  register.
* **Long barrel only.** The muon tagging and Et cell maps cover the
  long-barrel module only. Extended-barrel cells are not handled.
* **Parts outside the design.** These are not logic or are not designed
  here, so their signals are `rod_top` ports:
  * optical receivers and G-Link chips;
  * the TTCrx;
  * SDRAM;
  * the serializer and deserializer between motherboard and Transition
    Module, which the top-level testbench loops back;
  * the S-Link card;
  * the temperature ADC and clock buffers.
* **Transition Module overflow counter.** It is not connected to any
  register.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build one with
Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/rod_pkg.sv tb/tb_fe_pkg.sv \
    tb/tb_rod_top.sv --top-module tb_rod_top -y rtl -y tb -Mdir obj_rod
./obj_rod/Vtb_rod_top
```

Other testbenches work the same way; replace the testbench file and top
name. `tb_fe_pkg.sv` is needed only for `tb_rod_top` and
`tb_processing_unit`.

* **Helper files.** `tb/fe_model.sv` generates front-end frames (with a
  CRC-error option) from a pulse-shape formula: sample =
  40 + A·shape_i/256 with shape = {0,20,140,256,180,90,30}.
  `tb/adc_model.sv` models the serial temperature ADC.
* **`tb_rod_top`.** It runs the whole board at its default parameters. It
  loads weights and calibration constants directly into the core memories
  and configures everything else over VME. Its phases are:
  * fixed-mode events with a CRC error;
  * iterative mode with raw data, Level 2 and histograms;
  * SDRAM read-out;
  * 100 kHz triggers against a Transition Module held full, so that XOFF,
    core stalls and busy throttling all happen;
  * interrupts, temperatures, TTC counters, a JTAG loop and clock
    fall-back.

  It counts each of these mechanisms and fails if one never occurs. It
  also checks fragment contents against values computed in the testbench.
  It runs in a few seconds.

## Files

`rtl/`:

* `rod_pkg`: shared constants and types.
* `rod_top`.
* `staging_fpga`, `temp_monitor`.
* `async_fifo`, `sync_fifo`.
* `input_fpga`, `frame_rx`.
* `dsp_core`, `of_engine`, `muon_tag`, `et_sum`, `dsp_histogram`.
* `out_fpga`, `serial_tx`, `serial_rx`.
* `processing_unit`.
* `output_controller`, `tm_buffer`.
* `ttc_fpga`.
* `vme_fpga`, `vme_slave`, `busy_logic`, `jtag_master`, `lbus_master`,
  `lbus_slave`.

`tb/`: one `tb_<block>.sv` per block. `tb_local_bus` covers both bus ends,
and `tb_serial_link` covers both serial ends.
