# Stacked-layer microvision for real-time edge detection

This is SystemVerilog for a small vision chip that finds edges in an image.
Every group of 8x8 pixels has its own processor, and the work inside that
processor is split over four stacked silicon layers: a photodiode layer, an
amplifier and ADC layer, a register layer and an ALU layer. The layers are
joined by dense vertical wiring. The whole image is exposed at once. Each
8x8 unit then digitises its pixels and runs them through a 4-neighbour
Laplacian filter:

    g(i,j) = f(i,j-1) + f(i-1,j) + f(i+1,j) + f(i,j+1) - 4 f(i,j)

All units run in parallel. Inside a unit, digitising and filtering overlap
as a two-stage pipeline. The default chip has 2x2 units, which gives a
16x16-pixel image.

The architecture comes from the paper "Design of Real-Time Microvision for
Edge Detection with Vertical Integration Structure of LSIs". The paper gives
the layer structure, the data widths, the register array with its two shift
operations, the parts the ALU is built from, the neighbour buses and the
row-level pipeline. It does not give cycle-level timing, the exchange protocol
between units or any gate-level detail. Those parts are this design's own, and
the sections below point them out. The analog layers (photodiodes, sense
amplifiers, flash ADC) are behavioural models. They are there so that the
digital part can be simulated from light intensity to result.

## The four layers of a unit

| Layer | Module | What it does |
|---|---|---|
| 1 | `photodetector_array` (model) | 8x8 photodiodes. They are precharged, then charge in proportion to the light, then the charge is copied to hold capacitors. The array is read out as two 4x8 halves. |
| 2 | 2 x `sense_amplifier` (model), `flash_adc` (model) | One amplifier per half. A 4-bit flash ADC with an input multiplexer picks one of the two amplifiers. |
| 3 | `register_array` | A demultiplexer and an array of 4-bit flip-flops with the *Shift H* and *Shift V* operations. It presents a cross-shaped window of five pixels. |
| 4 | `laplacian_alu` (uses `cla_adder`) | A multiplexer, a carry lookahead adder, an accumulator and a step counter compute g(i,j). The output register holds the result and its coordinates. |
| – | `pe_controller` | Hard-wired sequencer for exposure, readout, shifts and ALU starts. |

`unit_system` puts these together into one unit, and `microvision_top` tiles
the units. `mv_pkg` holds the shared sizes, the types and the frame constants.

## How the register array turns a row stream into 3x3 windows

This is the core of the design.

The register layer has four columns of 4-bit registers, and **each column
holds one image row** of the unit. Coordinates are i = image row and j =
pixel within the row.

```
            col1    col2    col3    col4
 entry 0     -      v(i+1)  v(i)    v(i-1)   <- verge pixel j=0 (from the unit on the left)
 entry 1    p1      p1      [p1]    p1        <- window centre row (after alignment)
 entry 2    p2      p2      p2      p2
  ...
 entry 8    p8      p8      p8      p8
 entry 9     -      v       v       v        <- verge pixel j=9 (from the unit on the right)
           row n   row i+1 row i   row i-1     (i = n-2)
```

- **Column 1** is filled by the demultiplexer, one ADC sample every five
  clocks (`wr_addr` = j-1).
- **Shift H** moves the columns to the right: col4 is dropped, col3<-col2,
  col2<-col1. The two verge pixels of the row are loaded into entries 0 and 9
  at the same time.
- **Shift V** rotates columns 2-4, the "right three columns", up by one
  entry. Column 1 does not rotate.
- The ALU sees the cross centred on col3 entry 1. Its arms are col3 entries
  0 and 2 (j-1 and j+1), col2 entry 1 (i+1) and col4 entry 1 (i-1). After k
  Shift V pulses the centre is pixel j = k+1. The ALU takes one pixel per
  Shift V, and two more pulses complete a full rotation of ten entries. That
  restores the alignment before the next Shift H.

So while row n is being digitised into column 1, row n-2 is filtered from
columns 2-4, which hold rows n-1, n-2 and n-3. This is the overlap the paper's
timing diagram shows.

## Frame schedule (`pe_controller`)

A `start` pulse runs one frame in four phases:

1. PRECHARGE: 1 clock.
2. INTEGRATE: `EXPOSURE` clocks, 16 by default.
3. SAMPLE: 1 clock.
4. Readout: 11 slots of 43 clocks each.

A slot is laid out like this:

| Cycle in slot | Stage 1 (conversion) | Stage 2 (processing) | Shifts |
|---|---|---|---|
| 5p + 0 (p = 0..7) | ADC converts pixel p | ALU step 0 of pixel p | |
| 5p + 1 | demux writes pixel p | ALU step 1 | |
| 5p + 2, 5p + 3 | | ALU steps 2, 3 | |
| 5p + 4 | | ALU step 4 (result) | Shift V |
| 40, 41 | | | Shift V |
| 42 | | | Shift H (slots 0..9) |

Each slot does the following:

| Slot | Converted into col1 | Row entering col2 at Shift H | Row in the ALU |
|---|---|---|---|
| 0 | the unit's row 8 (also latched as "last row") | row 8 of the unit above (4x16 bus) | – |
| 1 | row 1 (also latched as "first row") | col1 | – |
| 2 | row 2 | col1 | – |
| 3..7 | rows 3..7 | col1 | rows 1..5 |
| 8 | – | the unit's own latched row 8 | row 6 |
| 9 | – | row 1 of the unit below (4x16 bus) | row 7 |
| 10 | – | – | row 8 |

With `run` held high, frames follow each other without a gap. The next
frame is precharged and integrated during the last EXPOSURE+1 clocks of the
current readout. By then the hold capacitors have all been read. At the end
of the readout the controller goes straight to SAMPLE and the next readout,
so a new frame completes every 1 + 473 = 474 clocks. This is the paper's
two-stage pipeline (photo detection and conversion overlapping processing)
applied across frames.

A unit converts its last row first because the unit below needs that row as
its upper neighbour before anything else. When the frame ends, each unit has
produced 64 results, one every 5 clocks within a row. `busy` is high for
2 + EXPOSURE + 473 = 491 clocks, and `frame_done` pulses in the next clock.
The paper reports about 10 µs for its edge-detection run. At 492 clocks per
frame, that matches a clock of roughly 50 MHz. The paper gives no clock
frequency, so that figure is only a comparison.

## Connecting units (`microvision_top`)

The paper joins four units with 64-line (4x16) buses between units in one
direction and 8-line (4x2) buses in the other. In this design they are used
as follows:

- **4x16 bus (image-row direction, between unit (r,c) and (r+1,c))**: 8
  pixels down, which is column 1 of the upper unit read at the end of slot 0
  and holds its last row. Another 8 pixels go up, the lower unit's latched
  first row, read at the end of slot 9.
- **4x2 bus (along a row, between unit (r,c) and (r,c+1))**: one verge pixel
  each way at every Shift H. These are pixels 1 and 8 of the row that enters
  column 2 in each unit.

All units must be started in the same clock. Neighbour inputs at the image
border are tied to zero, so border pixels see zero-valued neighbours. Each
unit keeps its own output port (`res`, `res_y`, `res_x`, `res_valid`). The
four units deliver their results at the same time, and the chip does not
serialise them.

## The ALU

`laplacian_alu` uses one adder for five steps. The accumulator starts with
f(i-1,j), then adds f(i+1,j), f(i,j-1) and f(i,j+1). In the last step it adds
~(4·f(i,j)) with carry-in 1, which subtracts four times the centre. The result
is an 8-bit two's-complement number from -60 to +60. It appears 5 clocks after
`start`, together with the 6-bit (i,j) tag. `cla_adder` is a flat two-level
carry lookahead adder. An assertion checks that the controller never starts a
pixel while the previous one is still in progress. Another, in the register
array, checks that Shift H and Shift V never happen in the same clock.

## Analog models

These modules stand in for analog circuits so that the system can be
simulated. They are not circuits to synthesise. Levels are 12-bit codes.

- `photodetector_array`: while integrating, the charge grows by `light[r][c]`
  every clock and saturates at 4095.
- `sense_amplifier`: a static gain, `GAIN` = 16 by default, with saturation.
  The paper describes only the frequency response (unity gain at 335 MHz, about
  2.6 dB gain margin), not a DC gain.
- `flash_adc`: 15 comparators at k·256 with a ones-count encoder. The code is
  registered at the clock edge that ends the `convert` cycle, so it appears
  one clock later.

With the defaults, a light intensity x in 0..15 is digitised back to exactly
x. The testbenches use this to compare results against the input image.

## Where this design departs from, or adds to, the paper

- The paper gives 8x8 photodetectors per unit in one place and 4x8 in another.
  This design uses 8x8, split into two 4x8 halves, one per amplifier.
- The clock, the five-clock ALU sequence, the 43-clock slot, the exposure
  length, the 11-slot frame and the reset are all this design's own. Reset is
  asynchronous and active low.
- The paper does not say how rows are exchanged at unit boundaries. This
  design adds the first-row and last-row side registers, converts the last
  row first, and adds the row-source multiplexer.
- The image direction each bus serves and the zero border are choices of this
  design.
- The output circuit is only a result register with a valid strobe. The link
  to an external processor or video output is not described in the paper and
  is not built.
- Where the next frame's exposure sits in continuous mode (the tail of the
  current readout) is this design's choice.
- Not built: the vertical interconnect itself (buried poly-Si vias and
  micro-bumps, which are plain wires here) and the wafer-bonding equipment.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `microvision_top` | `PE_ROWS`, `PE_COLS` | 2, 2 | Grid of units. The image is 8·PE_ROWS x 8·PE_COLS. |
| `microvision_top`, `unit_system`, `pe_controller` | `EXPOSURE` | 16 | Integration clocks. |
| `microvision_top`, `unit_system`, `sense_amplifier` | `GAIN` | 16 | Amplifier gain. |
| `microvision_top`, `unit_system`, `photodetector_array` | `LIGHT_W` | 8 | Width of the light input. |
| `flash_adc` | `FULL_SCALE` | 4096 | ADC full scale in level codes. |
| `cla_adder` | `W` | 8 | Adder width. |

The unit size (8), the pixel width (4 bits) and the slot timing are constants
in `mv_pkg`. The grid can be made as large as needed. For example, the 640x480
sensor the paper names as future work would be `PE_ROWS`=60, `PE_COLS`=80.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, the whole
chip at its default size:

```
verilator --binary --timing --assert -Irtl rtl/mv_pkg.sv tb/tb_microvision_top.sv \
          -y rtl --top-module tb_microvision_top -Mdir obj
./obj/Vtb_microvision_top
```

What `tb_microvision_top` does:

- It runs three single 16x16 frames: a random image, a ring of bright squares
  with a bright top row and a grey bottom row, and a checkerboard. It then
  runs three random frames back to back with `run` held high and checks the
  474-clock frame period.
- It compares all 256 results of each frame with a zero-padded reference, and
  checks that each pixel is reported exactly once and that the frame time is
  right.
- It counts Shift V, Shift H, cycles where conversion and processing overlap,
  results that depend on data from another unit over each bus, border pixels,
  and positive and negative results. It fails if any of these never happens.

What the other testbenches cover:

- `tb_unit_system` plays the neighbours of a single unit.
- `tb_register_array` predicts the window after every shift with index
  arithmetic.
- `tb_pe_controller` checks the strobe counts, the orders and the overlap.
- `tb_laplacian_alu` checks results and the five-clock latency.
- `tb_cla_adder` checks all 8-bit operand pairs.
- Each analog model has a small testbench of its own.

Verilator is a two-state simulator. Every register that is read is reset or
initialised.
