# TileCal digitizer readout: the Tile-DMU and a drawer of digitizer boards

The ATLAS Tile calorimeter reads each photomultiplier through two shaped
signals, high gain and low gain with a gain ratio of 64. Each signal is
sampled by a 10-bit ADC every 25 ns. The samples must wait in a pipeline
until the level-1 trigger decides, up to 2.5 us later. For a triggered
event, a short time frame of consecutive samples (up to 16) is kept. It is
sent off the detector over a narrow serial link, using only the gain that
did not saturate. The design has to tolerate faults: one broken board may
only spoil its own data.

This RTL covers the digital part of that system:

* **`tdmu`**: the Tile-DMU, a custom gate array that handles three
  channels (six ADCs). It contains the pipeline, the derandomizing readout
  buffers, gain selection, readout control, and a 2-bit serial output with
  a CRC.
* **`digitizer_board`**: two Tile-DMUs sharing a board's TTC receiver.
* **`tile_drawer`**: the top module. It holds eight boards (16 Tile-DMUs,
  48 channels) and the interface board's majority vote over the link
  control lines.

The analog parts and the chips that were bought in are not included. The
ADCs, the TTCrx timing receiver, the pedestal DACs and the S-link card are
outside the RTL, and their signals are ports of the top.

## Data path of one Tile-DMU

```
ADC codes 6x10 ─┐
                ├─ mux ─ +4 parity ─ pipeline (len) ─┬─ gain select ─ flag FIFO ─┐
pattern gen ────┘   60        64        64           │                           │
                                                    └─ buffer memory ─ addr FIFO ┤
                                                       (derandomizer)            │
             readout controller <── address, flags, buffer words ────────────────┘
               header / words (30 + 2 parity) ─ serializer "11" words CRC "00"
                                                 ─ deskew chain ─ data_out[1:0]
```

1. **Input.** The 60 ADC bits (three channels, high and low gain) are
   registered every clock. In test mode the walking-pattern generator
   replaces them.
2. **Parity.** Four parity bits are added, so 64 bits enter the pipeline.
   Each parity bit covers a 20-bit region, and the regions overlap:
   bits `[0+:20]`, `[13+:20]`, `[27+:20]` and `[40+:20]`.
3. **Pipeline.** `tdmu_pipeline` is a 128-word ring. It delays every word
   by the programmed length `pipe_len` (2..128 clocks).
   * A code captured at clock edge *k* leaves the pipeline after edge
     *k + pipe_len*.
   * The default, 100, is the 2.5 us level-1 latency.
4. **Gain selection.** The high-gain codes leaving the pipeline are compared
   with two programmable limits. A code below `thr_lo` or above `thr_hi`
   flags the channel. The flag is ORed over the whole time frame, and a set
   flag means that channel's low-gain codes are read out instead.
5. **Derandomizer.** A level-1 accept copies the frame into the buffer
   memory (next section).
6. **Readout.** The readout controller turns each stored event into a
   header word and data words.
7. **Serialization.** The serializer sends the words two bits per clock.
8. **Deskew.** A register chain sets the output timing. Its last stage is
   clocked by the deskewed TTCrx clock.

## The derandomizer: a ring of samples and a FIFO of pointers

This is the least obvious part of the design (`tdmu_derand`).

**Memory-pointer scheme.** The buffer memory is not divided into fixed
event slots. Instead:

* The 256 × 64-bit memory is written as a ring, and a write pointer moves
  only while a frame is being copied.
* A level-1 accept in clock *m* starts a copy of the frame: the sample that
  leaves the pipeline in clock *m*, and the `frame_len_m1` samples after it.
* A counter `remaining` keeps the copy going.
* When the last sample of a frame has been written, two FIFOs are pushed in
  the same clock:
  * the address FIFO gets the frame's start address (write pointer − frame
    length + 1);
  * the flag FIFO gets the frame's three gain flags.
* The readout controller later pops both FIFOs together.

**Overlapping frames.** An accept that arrives while a frame is still being
copied only reloads `remaining`. The copy then runs on, and the two frames
share the samples they have in common. Each frame still gets its own entry
in both FIFOs, and the readout sends every frame in full.

A delay line of accepts (`acc_hist`) detects when each frame is complete.
The gain flags are a sliding OR over the last *N* samples, computed in
`tdmu_gain_select`, so each overlapping frame gets its own flags.

**Capacity.** An accept is only taken if `occupied` < min(32, ⌊256 / N⌋),
where `occupied` counts events accepted but not yet read out.

* This gives 16 events of 16 samples, and 32 events of 8 or fewer samples.
* Because shared samples are counted twice, the ring can never overwrite a
  frame that has not been read.
* An accept that arrives when the buffers are full is refused. The
  `evt_lost` output pulses and the next header sets its `lost_event` bit.
* The readout controller's `release_evt` pulse frees an event once it has
  been read.

**Restriction.** Do not change the frame length while events are waiting.

## Output stream

Every event is sent on the 2-bit line as follows:

```
11 | header (16 clocks) | data words (16 clocks each) | CRC-16 (8 clocks) | 00
```

* The line rests at `00` between events.
* Words go most significant pair first.
* The CRC is CRC-16-CCITT (polynomial 0x1021, preset 0xFFFF, not inverted).
  It covers the header and the data words, fed in two bits per clock.
* An event of *W* words lasts 16·*W* + 10 clocks including the two
  framing pairs. A normal-mode event with 7 samples is 138 clocks, or
  3.45 us.

**Header word** (`tdmu_pkg::header_t`):

| bits | field |
|---|---|
| 31 | parity error found in a stored sample since the last header |
| 30 | TTCrx single-bit error seen |
| 29 | TTCrx double-bit error seen |
| 28 | an accept was refused since the last header (buffers full) |
| 27 | XOR of all programmable registers |
| 26 | XOR of pointers and state ("dynamic parity"; should be equal in all Tile-DMUs) |
| 25:24 | mode: 0 normal, 1 calibration, 2 test |
| 23:21 | per channel, 1 = low gain read out (normal mode only) |
| 20:13 | buffer start address of the frame |
| 12:0 | event number (events read out since reset) |

Error bits are sticky and are cleared by the header that reports them.

**Data words.**

* Each data word is `{p1, p0, ch2, ch1, ch0}`: three 10-bit codes, plus
  `p0` (XOR of bits 14:0) and `p1` (XOR of bits 29:15).
* In normal mode each sample gives one word, with each channel's gain taken
  from the header flags.
* In calibration and test modes each sample gives a high-gain word followed
  by a low-gain word.

**S-link control lines.** Each Tile-DMU also drives the link's control
lines. They are active high here, where the real S-link lines are active
low.

* `link_wen` pulses once per header or data word.
* `link_ctrl` is high with `link_wen` for the header.
* `link_test` is high in test mode.
* `link_reset` is high during reset and for one clock after it.

## Modes, readout rate and flow control

* **Normal:** one word per sample, gain chosen per channel.
* **Calibration:** both gains of every sample.
* **Test:** the ADC data are replaced before the pipeline by a walking
  pattern. It is seeded from a register and rotated one bit per clock.
  Lane *c* is the pattern rotated *c* bits further, and the low-gain lanes
  are the inverse of the high-gain lanes. A known pattern like this is what
  the output clock phase is timed in with.

A new mode is taken over only when the Tile-DMU holds no event
(`tdmu_mode_ctrl`), so an event is never split between two modes. In test
mode, the first `pipe_len` clocks after the switch still carry ADC data.

The readout rate can be limited in two ways:

* **Readout delay:** the controller waits `ro_delay` clocks after the
  previous event has left the serializer.
* **Flow control:** when `fc_en` is set, no new event starts while
  `link_full` is high. An event that has already started runs to its end.

## Registers

Registers are written through the TTCrx's parallel command bus:
`ttc_sub_addr[7:0]`, `ttc_data[7:0]` and `ttc_strobe`. Sub-address bit 7
writes both Tile-DMUs of a board, bit 6 selects one of them, and bits 5:0
give the register index.

| index | register | reset |
|---|---|---|
| 0 | pipeline length (2..128) | 100 |
| 1 | frame length − 1 (0..15) | 15 |
| 2 | mode | normal |
| 3 | readout delay (clocks) | 0 |
| 4 | external flow control enable | 0 |
| 5, 6 | low gain limit, bits 7:0 and 9:8 | 8 |
| 7, 8 | high gain limit, bits 7:0 and 9:8 | 1015 |
| 9, 10 | test pattern seed, bits 7:0 and 9:8 | 1 |
| 11 | output delay in the register chain (0..7) | 0 |
| 12 | pedestal DAC setting (brought out on `ped_dac`) | 0 |

The fine phase of the ADC and readout clocks is set inside the TTCrx, not
here.

## The drawer and the vote

* Eight boards sit in two chains of four, one chain on each side of the
  interface board. The chains are a physical arrangement only.
* Each Tile-DMU's 2-bit stream goes point-to-point to the interface, so
  `data_out` carries 16 independent streams. Stream *k* belongs to board
  *k*/2, Tile-DMU *k* mod 2.
* Each Tile-DMU also drives its own copy of the four link control lines.
  `ctrl_vote` combines the 16 copies:
  * a voted line changes only when more than half of the copies show the
    new value;
  * a tie (8 against 8) keeps the old value;
  * the vote is registered on the system clock.

## What follows the source design and what is this design's choice

**Taken from the source design:**

* 10-bit samples, three channels with two gains per Tile-DMU, two
  Tile-DMUs per board, up to eight boards per drawer.
* Four parity bits over overlapping 20-bit regions.
* A programmable pipeline for a latency of up to 2.5 us, and frames of up
  to 16 samples.
* Derandomizer buffers using start addresses in an address FIFO, 16 to 32
  buffers depending on frame length, and overlapping frames.
* Gain flags from programmable limits, cumulative over the frame, stored in
  a flag FIFO.
* The header carrying the gains, error bits and start address.
* 30-bit data words plus parity.
* A 2-bit serial output at 40 MHz with CRC-16 and `11` … `00` framing.
* A register chain ending on the deskewed clock.
* The three modes, the readout delay, external flow control and the S-link
  control lines.
* Majority voting of the control lines.
* The list of programmable items.

**This design's own choices**, all documented at the top of each file:

* the parity region positions and the word parity split;
* the CRC polynomial and preset;
* the header bit layout;
* the register map and reset values;
* the pipeline and buffer memory sizes (128 and 256 words);
* the pattern generator details;
* what happens to refused accepts;
* when mode changes take effect;
* the tie rule of the vote;
* the reset style (active-low asynchronous) and the active-high link lines.

**Not built:**

* The bunch-crossing number in the header (proposed only as a later
  change); the header carries the event number instead.
* How the interface card buffers and merges the streams.

**Clocking.** The last output register samples the system-clock domain
with the deskewed clock of the same frequency. Its phase must be set to a
valid window, which is what timing-in with a test pattern does.

## Simulation

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line.

* `tile_drawer_tb` runs the whole drawer at the default sizes. It uses 16
  Tile-DMUs, each stream decoded and checked word by word against the ADC
  inputs. It makes each mechanism happen and counts it: overlapping
  frames, gain switching, refused accepts, calibration and test modes, mode
  switches, readout delay, flow-control stall, and vote disagreement.
  It also checks two test points: TTCrx error strobes reach the headers of
  the right board only, and the dynamic parity of every Tile-DMU programmed
  alike agrees in every clock.
* `tdmu_tb` does the same for one Tile-DMU.
* `tdmu_l1rate_tb` runs one Tile-DMU at a 100 kHz level-1 rate with random
  spacing, using 7-sample frames (138 clocks per event on the line). No
  accept is refused, and at most a handful of events wait in the buffers.
  * At that rate, 16-sample frames in normal mode still fit (282 clocks per
    event).
  * Calibration mode with 16 samples does not fit: it needs 538 clocks per
    event, against 400 between accepts.

Shared testbench pieces:

* `tdmu_tb_pkg`: ADC codes as a function of board, channel and clock.
* `tdmu_stream_rx`: decodes the serial stream and recomputes the CRC bit by
  bit.
* `tdmu_checker`: the per-stream scoreboard.

Example with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tile_drawer_tb rtl/tdmu_pkg.sv tb/tdmu_tb_pkg.sv tb/tile_drawer_tb.sv
./obj_dir/Vtile_drawer_tb
```

The drawer test simulates about 17,000 clocks in well under a minute. To
simulate a single block, replace the top module and testbench file with the
block's own, for example `tdmu_derand_tb`.

**Size after synthesis:**

| unit | memory | flip-flops |
|---|---|---|
| one Tile-DMU | about 25 kbit (pipeline 8 kbit, buffers 16 kbit, FIFOs) | about 450 |
| full drawer | about 400 kbit | — |
