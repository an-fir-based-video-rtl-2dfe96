# FIR-based video format converter

This is a format converter for digital television. It takes one video stream
at any resolution up to 1920×1080 and resizes it to another. It can pan and
zoom within the picture, place it as a window over a second stream
(picture-in-picture), and deliver the result as an SMPTE-style stream with
embedded timing.

All resizing is done by one kind of unit: a one-dimensional, multi-phase FIR
interpolator. The horizontal filter works on lines. Its output is written to
an external frame memory in rows and read back in columns, so a second copy of
the same filter scales vertically. A second memory turns the picture back into
rows. The frame memories also decouple the input frame rate from the output
frame rate: whole pictures are repeated or dropped. Film material carried in
fields (2:2 and 3:2 pull-down) is woven back into frames before scaling. All
parameters, including the filter coefficients, can be changed at run time over
I2C.

```
master: input_channel -> denoise -> field_scheduler -> line FIFO
        -> fir_scaler (H) -> frame_buffer 0 (rows in, columns out)
        -> fir_scaler (V) -> frame_buffer 1 (columns in, rows out) --+
slave:  input_channel -> field_scheduler -> frame_buffer 2 ----------+
                                                                     v
        out_sync -> format_output <- pip_mixer <---------------------+
control: scl/sda -> i2c_slave -> param_regfile -> every unit, coefficients
```

The top is `vfc_top` (`rtl/vfc_top.sv`). Shared types are in `rtl/vfc_pkg.sv`:
- the pixel, which is 4:4:4 inside the core (10-bit Y, Cb and Cr);
- the picture tag;
- the parameter-group layouts.

The reset coefficient table is computed in `rtl/fir_pkg.sv`.

## Pixels, clocks and memory ports

- **Video buses.** Each input is a pair of 10-bit buses: Y, and Cb/Cr
  multiplexed. Timing is embedded as TRS words (3FF 000 000 XYZ). The output
  uses the same format. For 8-bit video, use the upper eight bits.
- **Clocks.** Inputs and output run on `core_clk`, one word per cycle, so the
  core clock is also the pixel clock. It is meant to be about 75 MHz. The
  memory side runs on `sdram_clk`, about 100 MHz. The clock domains meet only
  inside the frame buffers, through Gray-code FIFOs (`async_fifo`). There is a
  single asynchronous reset, `rst_n`.
- **Memory ports.** Each of the three frame buffers drives two memory chips.
  The ports are `mem_en/mem_we/mem_addr/mem_wdata/mem_rdata[buffer][chip]`.
  Each is a single-word synchronous port: read data arrives one `sdram_clk`
  cycle after the request. Real SDRAM needs a command sequencer behind this
  port (activation, refresh, bursts), and one is **not** included.
  `tb/mem_model.sv` is the behavioural chip used by the testbenches.
- **Status outputs.**
  - `st_swap`, `st_repeat` and `st_drop` are one-cycle pulses in the
    `sdram_clk` domain.
  - `st_overflow` is sticky: a live-video FIFO lost a pixel.
  - The other `st_*` outputs are `core_clk` pulses.

## The multi-phase filter (`fir_tap`, `fir_bank`)

**Output phase.** An output sample falls somewhere between two input samples.
Its fractional position, the *phase*, selects one set of coefficients. Storing
a set for every possible position is impossible, so the bank stores `PHASES`
sets, 64 by default. The scaler rounds each output position to the nearest
stored phase. The error this causes is at most half of 1/64 of a sample
spacing.

**Tap cell.** `fir_tap` is one cell of the systolic chain. It holds:
- the data register, which shifts when the window advances;
- a coefficient store of `PHASES` entries, indexed by the phase select;
- a multiplier with a product register;
- an adder that adds the product to the partial sum from the cell before.

`fir_bank` chains `TAPS` cells (4 by default). It rounds the sum (coefficients
have 8 fraction bits) and clips it to 10 bits. Three lanes (Y, Cb, Cr) share
the control signals.

**Shift and compute are separate.** A shift and an output request can happen
in the same cycle. The product registers take the window as it was before the
shift. This is what lets one bank both enlarge (several outputs per input) and
reduce (several inputs per output) at one sample per cycle.

**Latency.** Two enabled cycles from request to output.

**Coefficients.**
- At reset each phase holds a 4-tap raised-cosine-windowed sinc with β = 0.5.
  The table is computed during elaboration by `fir_pkg::coef`.
- Each phase is normalised so that its taps sum to exactly 256 (unit DC gain).
  The rounding residue goes to the centre tap.
- Phase 0 is a single unit tap, so a 1:1 conversion passes pixels unchanged.
- Any coefficient can be rewritten over I2C through the CoefParam group.

**Differences from the systolic figure this design follows:**
- The sum path between cells is combinational; only the products are
  registered.
- The area-saving parallel/folded form of the filter ("PRF") is not
  implemented.

## The scaler control (`fir_scaler`)

`fir_scaler` turns a line of `line_len` input samples into `out_len` output
samples. It reads from a `crop_start`/`crop_len` segment of the line, which
implements pan and zoom. Its parts:

- **Position accumulator.** It holds the position of the next output in input
  samples, with 16 fraction bits. `step` = `crop_len / out_len` is added after
  each output. The accumulator starts half a phase step in, so that truncating
  it to the phase select rounds to the nearest stored phase.
- **Counters.** `rc` counts samples taken from the line, `n` counts samples
  shifted into the bank, and `out_cnt` counts outputs. An output is computed
  when the bank holds the sample that it needs. The window shifts when the
  next output needs a newer sample.
- **States.** `S_SKIP` discards samples before the crop start. `S_FILL`
  preloads the taps behind the first sample. `S_RUN` shifts and computes.
  `S_DRAIN` discards the rest of the line.
- **Picture edges.** These are extended by repeating the edge sample.
- **Handshake.** Input and output are valid/ready. The whole unit stalls
  while the output is not taken.
- **Throughput.** About max(samples consumed, samples produced) cycles per
  line, plus a few cycles.
- **Tag.** The first input sample's tag (start of picture, weave, parity,
  commit) leaves with the line's first output.

The same module is the horizontal filter (lines of the picture) and the
vertical filter (columns read from frame buffer 0).

## Frame buffers (`frame_buffer`, `addr_gen`)

Each buffer has two external chips. The writer always uses one chip and the
reader the other (ping-pong), so reads and writes never compete for a chip.
Both chips are at least picture-sized.

Pictures move through the buffer like this:

1. A picture begins with the pixel whose tag has `sof`.
2. When a picture whose tag says `commit` has been written completely, it
   becomes *pending*.
3. Between pictures, a reader that finds a pending picture swaps the chips
   and reads it (`st_swap`).
4. With nothing pending and `repeat_en` set, the reader reads its current
   picture again (`st_repeat`). This is frame-rate up-conversion.
5. If a new picture starts while one is still pending, the pending picture is
   overwritten (`st_drop`). This is down-conversion.
6. A field tagged `weave` is written to every second row, starting at row
   `parity`. Two fields therefore build one frame. Only the second field
   carries `commit`.

**Address generator.** `addr_gen` walks the picture row by row or column by
column. Writing in one order and reading in the other transposes the picture.
It lays the picture out in 8×8 tiles:

`addr = {y[hi], x[hi], y[2:0], x[2:0]}`

A row walk and a column walk then both visit a new tile every 8 words, rather
than one of them jumping a whole row every word. This is what keeps the
memory access pattern balanced for either order.

**FIFOs.** The write FIFO and read FIFO (64 words each) carry the pixels
across the clock domains. The read side issues requests only while the read
FIFO has room. The input side has no back-pressure (live video), so
`overflow` reports a lost pixel.

**Buffer roles.**
- Buffer 0: rows in, columns out, no repeat.
- Buffer 1: columns in, rows out, repeats pictures. This is where the master
  frame rate is converted to the output rate.
- Buffer 2: holds the slave picture, rows in and rows out, with repeat.

## Film and field handling (`field_scheduler`)

`film_mode` tells the scheduler what the master input carries:

- **Progressive:** every picture is a frame.
- **Field:** every field is a picture of its own.
- **2:2 film:** consecutive fields are woven into one frame.
- **3:2 film:** 24 frames/s film carried as fields. A position counter over
  the five-field cadence, offset by `cadence_phase`, discards the repeated
  field at position 2 (`st_field_dropped`). It weaves the pairs at positions
  0–1 and 3–4 into frames (`st_frame_woven`).

There is no automatic film detection: mode and cadence phase are set over
I2C. The scheduler's decisions travel as the tag on the first pixel of each
field.

## Input side (`input_channel`, `trs_decoder`, `denoise`)

**TRS decoding.** `trs_decoder` is a four-state machine: idle, 3FF seen, first
000 seen, second 000 seen. In the last state the next word is XYZ, which gives
F, V and H. Its protection bits are checked and errors are reported as
`st_trs_error`.

**Active pixels.** `input_channel` counts as active every word between an SAV
with V = 0 and the next EAV.

**4:2:2 to 4:4:4.** Each Cb/Cr pair is repeated for its two pixels. The
channel flags the start and end of each line and the start of each field.

**De-noise.** `denoise` works on the master input only:
- It measures the luma edge strength |2c − p − n| from the current pixel c
  and its left and right neighbours p and n.
- Where this is at most `dn_thr`, it replaces Y, Cb and Cr with the
  (1, 2, 1)/4 low-pass value.
- Edges pass untouched, so the stage removes noise without blurring detail.
- It is switched by `dn_en`.

## Output side (`pip_mixer`, `format_output`)

**Output raster.** `format_output` runs a free raster of `h_total × v_total`
words. It inserts EAV and SAV and requests a pixel for every active position.
It converts back to 4:2:2 by taking the chroma of the even pixel. `out_sync`
restarts the raster, so the output can be locked to an external reference.

**Composition.** `pip_mixer` answers each pixel request from one of two
sources:
- the slave picture, over the whole raster;
- the scaled master picture, inside the window at (`win_x`, `win_y`) of size
  `h_out_len × v_out_len`.

With `pip_en` low the master picture sits at (0, 0) and there is no
background.

**Picture lock.** This is the part that keeps the picture steady:
- A source's first pixel (`sof`) is only taken at the origin of its area.
- If a source presents a non-first pixel at the origin, it is out of step.
  That pixel is discarded and black is shown.
- During blanking the mixer then flushes the source's FIFO up to the next
  `sof` (`st_resync`).
- An empty source inside its area gives black and `st_underflow`.

After a raster restart or a geometry change, the picture therefore
re-establishes itself within about one frame.

## Parameters (`i2c_slave`, `param_regfile`)

**I2C slave.** `i2c_slave` is a standard slave at 7-bit address `0x2C` (the
`I2C_ADDR` parameter). It samples SCL and SDA in the core clock, so the core
clock must be at least about 20× the SCL rate. `sda_oe` pulls SDA low.

**Shift-register groups.** Parameters live in shift registers, one per group,
so no address decoder is needed:

| group | select byte | bytes | contents |
|---|---|---|---|
| StaticParam | 0 | 13 | input line length and picture height, output raster (h/v total and active), film mode and cadence phase, slave mode, de-noise enable and threshold |
| PanningParam | 1 | 3 | horizontal / vertical crop start |
| ZoomingParam | 2 | 11 | crop lengths, output sizes, h/v step (4.16 fixed point) |
| PIPParam | 3 | 4 | PIP enable, window position |
| CoefParam | 4 | 4 | filter select, tap, phase, coefficient value |

The bit layouts are the `*_param_t` structs in `vfc_pkg`, most significant
byte first.

**Write.** A write transfer sends the select byte, then the group's bytes,
most significant first.

**Read.** A read returns the selected group's bytes from the top and
recirculates them, so a full read leaves the group unchanged.

**When values take effect.** All groups are copied to their outputs at the
I2C STOP, so the core never sees a half-written group. A CoefParam write
stores its coefficient at that STOP. Picture geometry should only be changed
while the inputs are in vertical blanking or stopped; a change inside a
picture corrupts that picture.

**Reset values.** 1920×1080 progressive in and out, 1:1 scaling, on a
2200 × 1125 raster, with PIP and de-noise off.

## Sizes and rates

| parameter (`vfc_top`) | default | meaning |
|---|---|---|
| `TAPS` | 4 | filter taps (the tap count is this design's choice) |
| `PHASES` | 64 | stored phases; 128 also works |
| `XB`, `YB` | 11 | pictures up to 2048 × 2048; memory address = XB+YB bits |
| `TB` | 3 | 8×8 memory tiles |
| `LINE_FIFO` | 2048 | line FIFO ahead of the horizontal filter |
| `MEM_FIFO` | 64 | frame-buffer FIFOs |

**Throughput.** 1080-line HDTV at 74.25 Msample/s per channel needs a core
clock of at least 74.25 MHz. Each memory chip carries one stream at one word
per `sdram_clk` cycle.

**Vertical filter.** It reads 1920 × 1080 samples in a 2200 × 1125 frame
time, so 1:1 and reductions keep up. Strong vertical enlargement of a full
HD source does not.

**Horizontal enlargement.** The horizontal filter also makes at most one
sample per core cycle, so an input line must last at least as many core
cycles as the output line has pixels. The inputs have no enable: they are
sampled one word per core cycle. A slower source such as SD therefore has to
be brought to the core clock by the front end, with its lines stretched by
longer horizontal blanking. When one output picture takes longer than an
input frame, frame buffer 0 simply drops input pictures.

## How far it follows the original design

**Follows it:**
- the block partition;
- the two channels with slave as PIP background;
- four-state TRS extraction;
- edge-adaptive de-noise;
- a scheduling unit that holds or discards fields;
- systolic multi-phase filters with a stored phase table and nearest-phase
  rounding;
- input/output hold and decimation made by counters;
- transposition through external memory with an interleaving address
  generator;
- ping-pong read/write chips with cross-clock FIFOs;
- SMPTE TRS insertion;
- I2C slave;
- a register file of function-grouped shift registers.

**This design's own choices.** All widths, the tap count, the kernel, the
tiling, the repeat/drop rules, the tag, the PIP lock rule, the parameter
layouts and the CoefParam group.

**Drawn differently in the original block diagrams:**
- Its memory controller has a single address generator giving both read and
  write addresses. Here the writer and the reader each have their own
  instance of `addr_gen`.
- Its three buffer controllers together form a "DMA unit".

**Not implemented:**
- the SDRAM command sequencer (the memory port is single-word);
- the parallel/folded area optimisation of the filter;
- a separate synchronisation controller;
- automatic film-cadence detection (the cadence is programmed).

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. Compile order: the packages first,
then the RTL, then `tb/mem_model.sv`, then the testbench.

```
verilator --binary --timing --top-module tb_vfc_top \
  rtl/vfc_pkg.sv rtl/fir_pkg.sv $(ls rtl/*.sv | grep -v _pkg.sv) \
  tb/mem_model.sv tb/tb_vfc_top.sv
./obj_dir/Vtb_vfc_top
```

**`tb_vfc_top`: end-to-end run at small sizes.** A 16×8 master, 24×12 slave
and output, and 64×64 memories. It programs everything over I2C, sends
flat-colour video with luma spikes, and checks every output pixel against the
expected composition. It also counts each mechanism and fails if any never
occurred:
- horizontal and vertical up- and down-scaling, pan and PIP;
- frame swap, repeat and drop;
- 3:2 field drop and weaving;
- underflow and resynchronisation;
- de-noise;
- a coefficient write;
- output sync.

**`tb_vfc_full`: the full-size run.** The top at its default parameters:
1920×1080 on a 2200 × 1125 raster, core and memory clocks in the 75:100 ratio.
It sends a coded test pattern and checks two complete output frames pixel by
pixel, which takes about a minute.

**`tb_vfc_hd2sd`: HD to SD at full size.** Also at default parameters. It
programs a 1920×1080 to 720×576 conversion on an 864 × 625 output raster over
I2C, with de-noise on. It checks the output geometry and the colour of every
pixel in at least two settled frames.

**`tb_vfc_sd2hd`: SD to HD at full size.** The reverse conversion, 720×480 to
1920×1080, with the SD lines presented as 2200 core cycles each.
