# Digital readout of a 64-channel SiPM ASIC for Cherenkov light detection

This is synthesizable SystemVerilog for the digital part of a low-power 64-channel
readout ASIC. The ASIC reads out a camera of silicon photomultipliers (SiPMs) that
looks for the Cherenkov flashes of extensive air showers from a balloon or a
satellite. Each SiPM pixel has its own channel. A channel records its amplified
signal continuously at the clock rate (200 MHz in the intended use) into a ring of
256 analog memory cells. On a trigger it freezes part of that ring, converts the
frozen samples with a Wilkinson ADC built into the cells, and sends them to an FPGA.

The main idea is that the capacitors are sampled fast but converted slowly,
and the buffer is cut into **segments**. While one segment is converted and read
out, the next one is already recording. This hides most of the dead time of the
slow conversion. In the intended use the average event rate is about 100 kHz and
the events arrive at random.

Five things are configurable. The segment size is 32, 64 or 256 cells. The ADC
resolution is 8 to 12 bits. The trigger comes from inside the chip or from outside.
In sparse mode each channel triggers on its own; in imaging mode all channels
trigger together. The post-trigger length is also set.

The analog circuits are not part of this RTL. That covers the SiPM, the current
amplifier with pole-zero cancellation, the threshold comparators, the ramp
generators, the cell capacitors and comparators, and the DDR output pads. Their
digital signals are ports of the top module.

## Structure

```
asic_top
├── 64 x channel
│   ├── channel_controller      segment rotation, trigger, ADC and read arbitration,
│   │                           pointer memory
│   ├── 4 x section_controller  pairs of sections, segment decoding, warm-up timer
│   │   └── 2 x section         32 cells + the five-state machine
│   │       └── 32 x memory_cell   digital slice of a Wilkinson cell
│   ├── gray_counter            ADC time base, 8..12 bit, Gray coded
│   └── gray_decoder            Gray -> binary on the read path
├── hitmap_unit                 64-bit low and high hitmaps -> FPGA (own DDR lane)
│   └── serializer
└── 8 x readout_controller      one per group of 8 channels (own DDR lane)
    └── serializer
```

`cherenkov_pkg` holds the shared sizes, the section state enum, the segmentation
and mode enums, the configuration struct `cfg_t` and the Gray conversion
functions.

## How a channel works

### Cells and sections

A channel has 256 cells in 8 sections of 32. Each section has its own state
register. It moves through five states, always in this order:

```
IDLE -> SAMPLING -> WARMUP -> DIGITIZING -> READING -> IDLE
```

| state      | analog side                                         | digital side |
|------------|-----------------------------------------------------|--------------|
| SAMPLING   | the sampling switch of the addressed cell is closed | the write pointer moves one cell per clock and wraps around the segment |
| WARMUP     | the cell comparators are powered (`cmp_en`)         | waits for the warm-up time and for the ADC to be free |
| DIGITIZING | the capacitors are switched onto the ramp (`ramp_sw`) | each cell follows the Gray count until its comparator flips |
| READING    | idle                                                | the cells are read one by one through the Gray decoder |

A section changes state only on a one-clock command from its section controller.
Assertions in `section` flag a command that arrives in the wrong state.

### Segments and the rotation (derandomisation)

A *segment* is the unit that samples, stops and is converted as a whole. Its size
is set by `cfg.seg`:

| `cfg.seg` | cells per segment | segments | segment k is made of |
|-----------|-------------------|----------|----------------------|
| `SEG_32`  | 32                | 8        | section k            |
| `SEG_64`  | 64                | 4        | sections 2k and 2k+1 (the pair of section controller k) |
| `SEG_256` | 256               | 1        | all eight sections   |

The channel controller broadcasts every command as a strobe plus a segment
number. Each section controller works out which of its two sections belong to that
segment. All sections of a segment therefore change state in the same clock.

The segments are used in a fixed rotation 0, 1, 2, and so on. Three pointers walk
it, and each one moves only forward:

* **sampling segment.** The write offset moves one cell per clock. A rising edge of
  the channel trigger starts a count of `cfg.post_trig` clocks. When the count ends,
  the segment is stopped and goes to WARMUP. The offset of its last written cell is
  stored in the pointer memory, which has one entry per segment. Sampling then moves
  to the next segment once that segment is IDLE, normally one clock later. If the
  next segment is still busy, the channel records nothing. A trigger edge that
  arrives then is reported on `trig_lost`, and accepted ones on `trig_acc`.
* **conversion segment.** There is one Gray counter and one ramp per channel, so only
  one segment is converted at a time. The oldest stopped segment gets the ADC once
  its warm-up time (`WARMUP_CYCLES`) has passed. When the counter saturates, the
  segment moves to READING and the ADC passes to the next one. A stopped segment
  can wait in WARMUP much longer than the warm-up time.
* **read segment.** Cells are offered oldest first. Reading starts at the cell
  after the stored pointer and wraps around the segment, so the last cell read is
  the one sampled `post_trig` clocks after the trigger. When the last cell has been
  accepted, the segment returns to IDLE and can record again.

Because the three pointers follow one rotation, frames leave a channel in trigger
order. With 32-cell segments, up to 7 events can wait for conversion or readout
while the eighth segment records.

### Event loss

Triggers arrive at random times, so a single buffer loses every event that
arrives while it is busy. Segmentation turns the channel into a queue with a single
server: the one ADC converts segments one at a time, and the other segments wait.
For a segment, *busy time* means the time from the trigger until the segment is IDLE
again:

    post_trig + 1 + WARMUP_CYCLES + 2^res + (cells per segment) + 2   clocks

This assumes the reader is always ready.

`tb_derandomization` sends Poisson-distributed triggers to one channel and measures
the fraction that is lost:

| segments | resolution | busy time   | mean trigger gap     | lost fraction |
|----------|------------|-------------|----------------------|---------------|
| 1        | 10 bits    | 1307 clocks | busy / 0.8           | 0.45 (dead-time law mu/(1+mu) = 0.44) |
| 4        | 10 bits    | 1115 clocks | busy / 0.8           | 0.053 |
| 4        | 8 bits     | 347 clocks  | 2000 clocks (100 kHz at 200 MHz) | 0.0007 |

In the first two rows, mu = 0.8 is the mean number of triggers within one busy
time. At that load, four segments cut the loss by about a factor of 8. It does not
fall to the ~0.5 % that a model with four independent segments predicts, because
conversions cannot overlap. At 100 kHz with 8-bit conversion, four segments lose
well under 0.5 %.

### Wilkinson conversion

All cells of a channel share one ramp, so they all have the same gain. They also
share the channel's Gray count. When a segment is granted the ADC:

1. The counter and the segment's cells are cleared in the same clock.
2. The counter then runs from 0 and holds at 2^res − 1. It runs for 2^res clocks,
   which is 256 clocks (1.28 µs at 200 MHz) for 8 bits and 4096 clocks for 12 bits.
   `ramp_en` is high for exactly those clocks.
3. Each cell register copies the count every clock while its comparator is low. It
   freezes on the first clock the comparator is high, and `fired` is set.
4. A cell whose stored level lies above the last ramp value keeps the full-scale
   count.

The count is kept in Gray code so that only one wire of the bus that runs past the
256 cells toggles per clock. The single per-channel decoder converts only the cell
being read.

### Read port

`channel` offers one cell per transfer on a valid/ready port. The data is 12-bit
binary; at lower resolution the upper bits are zero. The port also carries
`rd_first`, `rd_last`, the segment number `rd_seg` and the stored pointer `rd_ptr`.
The port stalls for as long as the consumer holds `rd_ready` low, and the segment
stays in READING meanwhile.

## Triggering, hitmaps and readout

### Trigger selection (`asic_top`)

| `cfg.ext_trig_en` | `cfg.mode`     | trigger of channel c |
|-------------------|----------------|----------------------|
| 1                 | either         | `ext_trigger` |
| 0                 | `MODE_SPARSE`  | `cmp_low[c]` (its own low-threshold comparator) |
| 0                 | `MODE_IMAGING` | OR of all 64 `cmp_low` |

In sparse mode each channel keeps its own rotation, so at a given moment different
channels record in different segments. In imaging mode all channels stop together
and deliver a frame each for the same event.

### Hitmaps (`hitmap_unit`)

Each channel has a low-threshold and a high-threshold comparator. While the unit is
armed, it copies both 64-bit patterns every clock. An ASIC-level event is a rising
edge of the OR of the low comparators, or of `ext_trigger` in external mode. On an
event the two registers take the OR of the event clock and the clock before, and
then freeze. The result is the *low hitmap* and the *high hitmap*.

The unit then raises `hm_req` until the FPGA answers `hm_ack`. It sends the low map
and then the high map, channel 63 first, on its DDR lane. That takes 64 clocks.
Then it re-arms. An event that comes while a hitmap is pending is reported on
`hm_lost`.

Deciding from the hitmaps whether an event is a real shower is left to the FPGA.
The FPGA sees all ASICs of the camera. It can therefore accept a single pixel over
the high threshold, two neighbours over the low threshold (also across two ASICs),
and reject a scattered pattern of light pollution.

### Data readout (`readout_controller`)

There is one controller per group of eight channels: channels 8g to 8g+7 form lane
g. When a channel of the group starts offering a segment, the controller picks a
channel. Arbitration is round robin, starting after the last channel served. The
controller raises `data_req`, waits for `data_ack` and sends one frame of 16-bit
words:

```
header : 1 0 | ch[2:0] | seg[2:0] | ptr[7:0]
data   : 0 0 0 | last | value[11:0]          one per cell, oldest first
```

Each word occupies 8 clocks on the lane. A 32-cell frame is therefore 33 words, or
264 clocks, and the channel's segment stays in READING for that long.

### Serial lanes (`serializer`)

Each lane outputs a bit pair per clock: `ddr[1]` is the bit for the rising edge and
`ddr[0]` the bit for the falling edge. The pair is meant for a DDR output cell.
Words are sent most significant bit first. Consecutive words leave without a gap,
and `*_ddr_valid` marks the clocks that carry bits.

## Configuration and ports

`cfg_t` (16 bits) is:

| field         | meaning |
|---------------|---------|
| `mode`        | sparse or imaging |
| `seg`         | 32, 64 or 256 cells per segment |
| `res_bits`    | resolution; values outside 8..12 are clamped |
| `ext_trig_en` | external trigger |
| `post_trig`   | 0..255 cells sampled after the trigger |

Change `cfg` only while `rst_n` is low. Reset is asynchronous and active low. All
logic runs on one clock, `clk`.

The analog-facing ports of `asic_top`, per channel c:

* `cell_cmp[c][255:0]` (input): the cell comparators.
* `sample_sw[c][255:0]` (output): the sampling switches.
* `cmp_en[c][7:0]` (output): comparator enable, one bit per section.
* `ramp_sw[c][7:0]` (output): 1 puts the section's capacitors on the ramp, 0 on
  the bottom reference.
* `ramp_en[c]` (output): ramp generator enable.
* `cmp_low`, `cmp_high` (inputs): the threshold comparators.

Parameters: `NCH` (channels, default 64) and `WARMUP_CYCLES` (default 8). The
other sizes are package constants: 256 cells, 32 per section, 12-bit data and 8
channels per readout group.

## What follows the original design and what does not

The following are taken from the original design:

* 64 channels with 256 cells each, sections of 32 cells, one section controller per
  pair of sections.
* One Gray counter, one ramp generator and one Gray decoder per channel.
* The five cell states and the 32/64/256 segmentation.
* An 8-bit conversion of 256 clocks, with conversions back to back while other
  sections sample and wait.
* A pointer memory per channel.
* Two comparators per channel that form a low and a high hitmap.
* The hitmap request, acknowledge and transfer sequence, followed by the data
  request, acknowledge and transfer sequence.
* One readout controller and one serializer per 8 channels, and DDR links.
* The sparse and imaging modes, internal or external triggering, and 8 to 12 bits
  of resolution.

The following are choices of this implementation:

* **Segment use.** Segments rotate in a fixed order. Conversion and readout are in
  trigger order.
* **Post-trigger.** A post-trigger count of `post_trig` cells is used. Trigger edges
  that arrive during that count are ignored.
* **Warm-up length.** 8 clocks; the original gives no value.
* **Pointer memory width.** Entries are 8 bits wide, so they also hold positions
  inside 64- and 256-cell segments. The original shows 5-bit entries, which are
  enough for 32-cell segments.
* **Internal trigger.** The low-threshold comparator is used as the internal
  trigger.
* **Hitmap capture.** The capture window is two clocks, and the maps are 64-bit
  words on one lane, which takes 64 clocks. At 400 MHz that is 160 ns. The original
  quotes 130 ns for the hitmap transfer at 400 MHz DDR, but its frame format is
  unknown.
* **Data frame.** The frame format and the round-robin arbitration are this
  implementation's.
* **Clocking.** There is one clock domain. The original samples at 200 MHz and
  runs the links at 400 MHz DDR. Here the lanes send two bits per clock of the
  single clock, so the link rate is twice the clock. A separate link clock would
  need a clock-domain crossing at the serializers.
* **Slow control.** The configuration is a static port.
* **Not modelled.** Clock gating, which the original uses for low power.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_gray_counter`       | every resolution 8..12 and clamping; Gray sequence, one bit per step, saturation after exactly 2^res − 1 steps, hold |
| `tb_gray_decoder`       | all 4096 codes |
| `tb_memory_cell`        | conversions with random levels, saturation, comparator glitches after firing, hold, clear |
| `tb_section`            | all five states, analog controls, conversion and read-back of 32 cells |
| `tb_section_controller` | segment decoding in all three segmentations, write-switch mapping, warm-up time, read mapping |
| `tb_serializer`         | word integrity, bit order, 8 clocks per word with no gaps in a burst |
| `tb_hitmap_unit`        | captured maps, request/acknowledge order, 64-clock transfer, lost events |
| `tb_readout_controller` | frame format, value order, round-robin order, 8·(N+1) clocks per frame |
| `tb_channel`            | a full channel against a model of the cells and ramp (see below) |
| `tb_asic_top`           | the full ASIC at its default size (see below) |
| `tb_derandomization`    | event loss of one channel under Poisson triggers (see "Event loss") |

`tb_channel` and `tb_asic_top` use `tb/cell_array_model.sv`, a behavioural model of
the analog cells. A cell stores the input level when its sampling switch is closed.
The ramp is an integer that rises one count per clock while `ramp_en` is high. A
cell comparator is high when its section is enabled and on the ramp, and the ramp
is above the stored level.

Both testbenches keep their own reference:

* which cell is sampled in each clock;
* whether each trigger is accepted or lost;
* the stop cell of each event;
* the expected content and order of every frame.

`tb_channel` runs four configurations:

| segment size | resolution | post-trigger |
|--------------|------------|--------------|
| 32           | 8 bits     | 10           |
| 64           | 9 bits     | 20           |
| 256          | 8 bits     | 100          |
| 32           | 12 bits    | 0            |

The consumer stalls the read port at random. The test checks the conversion time
and requires that lost triggers, read stalls, saturated cells and sampling during
conversion all happened.

`tb_asic_top` runs all 64 channels, the FPGA side and all nine lanes in three runs:

1. Sparse mode with 32-cell segments at 8 bits. One channel is fired in quick
   succession until it runs out of segments.
2. Imaging mode with 64-cell segments at 9 bits.
3. External trigger with 256-cell segments at 12 bits.

It fails if one of these never happened: sparse, imaging or external frames, each
segmentation, lost triggers, hitmaps sent and lost, readout arbitration waits, and
sampling during conversion. It runs in about 15 s after a build of about 4 minutes.

To run one with Verilator, for example the channel test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cherenkov_pkg.sv rtl/memory_cell.sv rtl/section.sv rtl/section_controller.sv \
    rtl/gray_counter.sv rtl/gray_decoder.sv rtl/channel_controller.sv rtl/channel.sv \
    tb/cell_array_model.sv tb/tb_channel.sv --top-module tb_channel -o sim
./obj_dir/sim
```

For the whole ASIC, pass `rtl/cherenkov_pkg.sv`, then the other `rtl/*.sv` files,
then `tb/cell_array_model.sv tb/tb_asic_top.sv`, with `--top-module tb_asic_top`.
The package must come first.

The lint warnings that remain are left on purpose:

* Some package constants are unused in some modules.
* The `fired` flags of the cells are not used above the cell.
* The per-channel state outputs are not used at the top.
* `rst_n` is used both as an asynchronous reset and in the assertions'
  `disable iff`.

None of them describes a latch, a loop or a multiply driven net.
