# Camera edge-detection pipeline with a DRAM frame buffer and a digit classifier

This design is the FPGA logic between an OmniVision OV7670 camera and a VGA monitor. It
shows the camera picture as a clean black-and-white edge image, always at a steady 60
frames per second. It also reads a handwritten digit held in front of the camera.

- **Video path.** Every camera frame is reduced to 4-bit grey. A Sobel filter turns it
  into a one-bit edge map, and a neighbour-count filter removes isolated edge pixels. The
  result is written into one of two frame buffers in external DRAM.
- **Why two buffers.** The camera delivers 30 frames per second, but the monitor needs
  60. The display therefore reads the last *complete* frame from one buffer while the
  next frame is written into the other. Each frame is shown twice, and the picture
  never tears.
- **Digit path.** The centre of each grey frame is averaged down to a 28x28 image and
  inverted, so dark ink becomes bright as in MNIST. A small fully connected neural
  network (784-10-10-10, 16-bit integer parameters) classifies it. The three most
  likely digits go to a seven-segment display, and the 28x28 image can be overlaid on
  the video as a 4x-scaled preview.
- **Controls.** Three thresholds can be changed at run time with push buttons: the
  edge threshold, the denoise neighbour count and the compression black level.

Everything runs on one clock, the 25.2 MHz VGA pixel clock, except the camera's
input register. That register runs on the camera's own pixel clock (PCLK) and hands
pixels across through a small asynchronous FIFO.

```
 OV7670 ──► camera_capture ──► edge_detection ──► de_noise ──► pixel_to_stream
   ▲            │ 4-bit grey        (Sobel)        (3x3 count)      │ 64-bit beats
   │ SCCB       │                                                   ▼
 cam_config ◄─ cam_config_rom                        axis_fifo (512) ──► memory mover ──► DRAM
 sccb_master    │                                                        (write channel)
                ▼                                   datamover_controller ─ commands ─┘ │
        image_compression ──► neural_network ──► top-3 digits ──► seven_seg           │
                │ (28x28)                                                             │
                └──── preview ──► vga_driver ◄── axis_fifo (64) ◄── memory mover ◄────┘
                                      │                               (read channel)
                                      ▼
                                   monitor
 threshold_control (buttons) ──► edge / denoise / compression thresholds, LEDs, display
```

The memory mover and the DRAM controller are vendor blocks and are not part of this
RTL. The top module, `image_pipeline_top`, exposes the mover's two channels as ports:
- a command channel with valid/ready, using the 72-bit mover command format of `ipp_pkg::dm_cmd_t`;
- an AXI-Stream data channel;
- a status pulse.

Testbenches use a behavioural model of the mover and memory in its place.

## The frame buffer and how frames stay aligned

This is the part that needs the most care. Pixels travel as a plain stream, and no
addresses go with them. An error of even one beat between writing and reading would
shift the whole picture on the screen. Two mechanisms keep everything aligned.

**Packing and TLAST.** Every output pixel of the denoise stage comes with its frame
address y*W+x.
- `pixel_to_stream` places each 12-bit RGB pixel (edge = white, otherwise black) in
  16-bit slot `addr[1:0]` of a 64-bit beat. Pixel k is in bits [16k+11:16k].
- It raises TLAST on the beat that holds address W*H-1. A 640x480 frame is therefore
  76,800 beats, with TLAST on the last one.

**The controller, write side.**
- It issues one 8-beat write command whenever the input FIFO holds at least 8 beats.
  The FIFO's `low` flag means fewer than 8. This way the mover never stalls in the
  middle of a burst.
- Burst *n* of a frame goes to `base[region] + n*128`. The step is twice the burst
  length because the mover in the original system left a one-beat gap after every beat
  it wrote with 64-bit bursts of eight. Reads use the same step, so data comes back in
  order.
- A frame is finished when 9,600 bursts are done *and* TLAST has passed. The region is
  then marked complete and writing moves to the other region.
- **Too many beats.** If the burst count is reached before TLAST, the writer keeps
  rewriting the last burst address. This throws the extra data away until TLAST comes
  (`discarding`).
- **Too few beats.** If TLAST arrives early, for example because the camera restarted,
  the frame is dropped and rewritten from the start of the same region. This case is
  this design's own rule.

**The controller, read side.**
- It issues 8-beat read commands whenever the 64-beat output FIFO has room for 8. The
  FIFO's `high` flag means less room than that.
- The last read command of a frame has its EOF bit set, so the mover ends that burst
  with TLAST.
- At the end of a frame, the reader moves to the other region only if that region is
  complete. Otherwise it shows the same frame again. This repeat is how 30 frames per
  second become 60.
- The two halves share only the two `complete` flags.

**The VGA driver.** It never waits for data.
- It takes one beat just before each group of four visible pixels. If the FIFO is empty
  (`underflow`), it repeats the previous four pixels.
- If TLAST arrives on any beat other than the last one of the frame, the counters jump
  to the start of vertical blanking (`resync`). The next beat is then drawn at the top
  left of the next frame.
- A stall in memory therefore costs at most one bad frame.

## Edge detection and denoise

Both filters use the same line buffer, `line_window3x3`.
- It holds four rows. Row k is written into buffer k mod 4. Meanwhile the three
  previous complete rows are read, so output row k-2 is produced one pixel per input
  pixel.
- Anything outside the frame reads as zero. The output frame is therefore exactly the
  size of the input frame.
- After the last input row, the last two output rows are produced back to back, one
  pixel per clock. `in_ready` is low during this flush; the camera's vertical blanking
  covers it.
- This flush is the burst that the 512-beat input FIFO absorbs.

Filters:
- **Sobel** (`sobel_mac`): magnitude = |Gx| + |Gy|, range 0..120 for 4-bit pixels. A
  pixel is an edge when the magnitude is *greater than* the edge threshold (default 48).
- **Denoise** (`neighbour_count`): an edge pixel survives when *at least* the threshold
  number (default 2) of its eight neighbours are edges.

The latency of each stage is two clocks after the input pixel that completes the window.

## Compression and the classifier

**Compression.** `image_compression` takes the grey camera pixels, not the edge image.
- It crops the centred 448x448 square and averages each 16x16 block: the sum shifted
  right by 8.
- It inverts the result (15 - mean) and forces values below the compression threshold
  (default 4) to 0. This removes the dark vignetting at the frame edges.
- A band of 28 block sums is accumulated while the band's 16 rows arrive, then written
  to the 28x28 store. `image_done` pulses after the last band.
- The store has two combinational read ports: one for the classifier and one for the
  VGA preview.

**Classifier.** `neural_network` runs 784 → 10 → 10 → 10 fully connected layers.
- Parameters are 16-bit signed integers, loaded through the `wt_*` port:
  - `wt_sel` 0..2 selects weight matrix 1..3, indexed [input][neuron];
  - `wt_sel` 3..5 selects bias vector 1..3.
- Each layer runs three states:
  - *multiply*: one input per clock, times that input's ten weights, in ten parallel
    multiply-accumulators;
  - *bias*: one neuron per clock;
  - *ReLU*: one neuron per clock, hidden layers only; the output layer is linear.
- One ranking clock then picks the three largest outputs. Ties go to the lower digit.
- From `start` to `done` takes 784 + 7*10 + 2 = **856 clocks**, about 34 µs.
- Accumulators are 72 bits wide, so no layer can overflow, whatever the 16-bit
  parameters are.

The top starts a classification whenever a new 28x28 image is ready and the network is
idle. The seven-segment display shows, from left to right:
1. the edge threshold (two hex digits);
2. the denoise threshold;
3. the compression threshold;
4. one blank digit;
5. the top three digits, once the first result exists.

## Camera interface

**Configuration.** `cam_config` walks `cam_config_rom` after reset. Each ROM word is
{register, value}, and `sccb_master` sends it as a three-phase SCCB write:
- device ID 0x42, then register, then value;
- each byte is followed by a don't-care bit with the data line released;
- SIO_C runs at 100 kHz.

The configuration FSM hands the master one byte at a time. `ready` asks for the second
byte. Two ROM code words are not register writes:
- `16'hFFF0` waits 1 ms (used after the soft reset);
- `16'hFFFF` ends the table.

The table sets the camera to:
- 640x480 output;
- YUV 4:2:2 with the luma byte first;
- automatic gain, exposure and white balance.

**Capture.** `camera_capture` registers HREF, VSYNC and the data byte on the rising
edge of PCLK, in the camera's clock domain. It counts columns and rows there and keeps
the upper four bits of each luma byte as the grey pixel.
- Each pixel goes through `cdc_fifo` into the system clock, along with its coordinates
  and a start-of-frame bit. `cdc_fifo` is an 8-entry asynchronous FIFO with Gray-coded
  pointers.
- The camera sends one pixel every two PCLK cycles. Any system clock faster than PCLK/2
  therefore keeps up: 25.2 MHz against the OV7670's 24 MHz PCLK at 30 frames per
  second.
- An assertion flags a lost pixel in simulation.
- PCLK must run for a few cycles while reset is held.

## Where this design departs from the original system

- **Camera clock crossing.** The original does not describe how its camera clock
  meets the VGA clock; the asynchronous FIFO is this design's choice.
  Camera-to-screen latency is one camera frame plus at most one display frame: about
  33 ms + 17 ms = 50 ms with a 30 frames/s camera.
- **Parameter width.** Classifier parameters are 16-bit. One description of the
  multiplier mentions 32-bit weights, but the later, more detailed discussion settles on
  16-bit signed integers.
- **Denoise test.** The denoise rule is "at least N neighbours" (>=). A strict > would
  differ by one.
- **Offset workaround not reproduced.** The original controller offset its reads to work
  around a few beats left in the vendor mover's internal buffer. That offset is not
  reproduced: it depends on a quirk of one vendor block. With a mover that behaves as
  specified, reads and writes start at the region base.
- **This design's own choices.** The design description leaves these open:
  - the camera register values;
  - how the compression averages;
  - the start values, steps and limits of the thresholds;
  - debouncing;
  - the display layout;
  - the base addresses (0x8000_0000 and 0x8020_0000);
  - how an early TLAST on the write side is handled.
- **Sync polarity.** SCCB and VGA sync use the standard polarities: SCCB lines idle
  high, and the VGA sync pulses are active low. The original SCCB block had its signal
  polarity flipped to suit its board.

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `W`, `H` | 640, 480 | picture size (camera, processing and display) |
| `H_FP`, `H_SYNC`, `H_BP` | 16, 96, 48 | horizontal blanking (VGA 640x480@60) |
| `V_FP`, `V_SYNC`, `V_BP` | 10, 2, 33 | vertical blanking |
| `IN_FIFO`, `OUT_FIFO` | 512, 64 | FIFO depths before and after the memory |
| `BURST` | 8 | beats per memory command |
| `CMP_OUT`, `BLK_LOG2` | 28, 4 | compressed image side, log2 of the block side |
| `PIP_SCALE` | 4 | preview magnification |
| `SCCB_QUARTER` | 63 | quarter SIO_C period in clocks |
| `CFG_DELAY` | 25,200 | wait after the camera soft reset, in clocks |
| `DEBOUNCE` | 250,000 | button debounce time, in clocks |
| `REFRESH` | 25,000 | clocks each display digit is lit |

The `status` output (`ipp_pkg::pipe_status_t`) carries one-clock event flags:
- region switches, written, dropped and shown frames, and discard mode;
- VGA resync and underflow;
- stream overflow;
- the two window flushes.

These are meant for a logic analyser or LEDs.

## Files

`rtl/` holds one module or package per file:

| File | Contents |
|---|---|
| `ipp_pkg.sv` | shared constants, the mover command type and builder, the status struct |
| `image_pipeline_top.sv` | the whole design |
| `cam_config.sv`, `cam_config_rom.sv`, `sccb_master.sv` | camera configuration |
| `camera_capture.sv`, `cdc_fifo.sv` | camera bus to grey pixels, clock crossing |
| `line_window3x3.sv`, `sobel_mac.sv`, `edge_detection.sv` | edge detection |
| `neighbour_count.sv`, `de_noise.sv` | denoise |
| `pixel_to_stream.sv`, `axis_fifo.sv`, `datamover_controller.sv` | frame-buffer path |
| `vga_driver.sv` | VGA timing, stream slicing and the preview overlay |
| `image_compression.sv`, `neural_network.sv` | digit path |
| `threshold_control.sv`, `seven_seg.sv` | buttons and display |

`tb/` holds:
- one self-checking testbench per block, `tb_<module>.sv`;
- behavioural models of the camera's video output (`ov7670_model.sv`), an SCCB
  listener (`sccb_slave_model.sv`), and the memory mover with DRAM
  (`datamover_model.sv`);
- two end-to-end tests sharing `pipeline_harness.sv`:
  - `tb_image_pipeline_top` at a reduced size: 64x32 picture, 1x1 compression blocks,
    short blanking;
  - `tb_image_pipeline_full` with the top at its default parameters (640x480). It runs
    in well under a minute of wall-clock time.

The end-to-end tests check, against references computed in the testbench from the
camera model's picture:
- the camera register writes on the SCCB bus;
- every classification: all ten scores and the top three;
- every displayed VGA frame, pixel by pixel. A frame must equal the edge+denoise image
  of one whole camera frame, so a torn frame fails;
- the VGA frame period;
- the preview;
- a threshold change made with the buttons, seen on the VGA picture, the seven-segment
  display and the LEDs.

The tests also force the less common mechanisms: a memory stall (underflow and resync),
a camera frame cut short (discard mode), repeated frames and both window flushes. Each
mechanism is counted, and one that never happens counts as a failure. Every test prints
`TB_RESULT checks=N failures=M`.

Unit tests check the rates and latencies that the design fixes:
- the 856-clock classifier latency;
- the 800x525 VGA timing;
- the SCCB bit timing;
- the two-clock window latency.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_image_pipeline_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ipp_pkg.sv tb/tb_image_pipeline_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file name to run any other testbench. The simulator
is two-state, and every register that is read is reset. The classifier parameters have
no reset value: they must be loaded before the first result is used.
