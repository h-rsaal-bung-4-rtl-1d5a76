# A direct-mapped line cache and an HDMI frame-buffer controller

This repository holds two independent pieces of hardware that come from the same lecture
material:

1. **A direct-mapped, write-back cache of 512-bit lines.** It sits between a user that reads
   and writes whole lines and a slower memory above it. It has 128 slots and
   byte-granular writes. A separate line fetcher moves lines to and from the memory above.
2. **An HDMI video controller for a Zynq-class FPGA board with an ADV7511 HDMI transmitter.**
   Software selects a video mode and a frame-buffer address through two bus registers. The
   controller then does four things:
   - it reprograms the pixel-clock PLL;
   - it streams the frame from main memory over an AXI3 read port;
   - it converts RGB to YCbCr 4:2:2;
   - it drives the transmitter's 24-bit data bus, HSYNC, VSYNC and DE.

Both are written in synthesizable SystemVerilog. The top level, `rtl/lecture_top.sv`, places
them side by side. They share nothing, so each keeps its own clock, reset and ports (prefixes
`cache_` and `hdmi_`).

---

## Part 1: the cache

### Organisation

| quantity | default | parameter |
|---|---|---|
| address | 32-bit byte address | `ADDR_BITS` |
| line | 512 bits = 64 bytes | `LINE_BITS` |
| slots | 128 (8 KiB in total) | `SLOTS` |
| address split | tag 19 bits, slot index 7 bits, byte offset 6 bits | derived |

Each slot holds a valid bit, a dirty bit, a tag and a line. A request always names a whole
line. A read returns the line. A write carries a new line plus 64 byte enables, and only the
enabled bytes change:

    line := (line AND NOT en) OR (new AND en)      -- en = byte enables widened to 8 bits each

The cache is **write-back** and **write-allocate**:

- a write hit only marks the slot dirty;
- a write miss first brings the line in, then merges the new bytes into it;
- a dirty line goes back to memory only when another tag needs its slot.

### The two modules

`dm_cache` holds the slot array and decides hit or miss. It never talks to memory itself. On
a miss it sends one request to `line_fetcher`, which does one of three things:

| operation | when the cache uses it | memory traffic |
|---|---|---|
| `FETCH` | the slot is invalid or clean | read the new line |
| `FETCH_DIRTY` | the slot holds a dirty line of another tag | write the old line back (all byte enables set), then read the new line |
| `JUST_WRITE` | never used by the cache; for a future flush | write the line, read nothing |

The fetcher returns the read line. The cache then installs it, marks it valid, and finishes
the original request:
- a read answers with the new line;
- a write merges into it and sets the dirty bit.

While a miss is outstanding, `in_progress` is set and no other request is taken. The cache
blocks on a miss; there is no hit-under-miss.

`clear_req` invalidates all slots and clears their dirty bits in a single cycle. Nothing is
written back. It is meant for benchmarks and simulation, to start from a cold cache. A clear is
taken only while no request is in progress (`clear_ready`).

Requests that are already queued in the input FIFO are served after the clear. A user that
wants them served first must wait until they are done.

### Buffering and timing

- **Cache ports:** all four (user request, user response, memory request, memory response) pass
  through two-entry FIFOs (`pipe_fifo`). This cuts every combinational path between the cache
  and its neighbours.
- **Fetcher's memory side:** one-entry bypass FIFOs (`bypass_fifo`), which add no latency but
  leave a combinational path through them.
- **Read hit:** the response comes 2 cycles after the request is accepted.
- **Clean miss:** the memory's round trip plus a few cycles of hand-over.
- **Dirty miss:** a second round trip for the write-back.
- **Writes:** posted, with no response.
- **Counters:** `hit_count`, `miss_count` and `writeback_count` count finished events since reset.

### Measured behaviour

`tb/tb_cache_bench.sv` runs a benchmark with a memory that answers after 20 cycles. Each case
starts from a cleared cache. The settings are:

- three patterns: only writes, only reads, and writes followed by reads of the same words;
- 128, 256, 512, 1024 and 16384 accesses, each to one 32-bit word;
- a stride of 1, 8, 16 or 32 words.

The testbench checks every read value against a reference memory. It checks every miss count
against a separate tag model. It prints cycles per operation:

| accesses | stride | write | read | write+read |
|---:|---:|---:|---:|---:|
| 128 | 1 | 3.6 | 6.6 | 4.3 |
| 128 | 8 | 14.5 | 17.5 | 9.8 |
| 128 | 32 | 37.5 | 30.0 | 39.0 |
| 1024 | 1 | 3.6 | 6.6 | 4.3 |
| 16384 | 1 | 4.7 | 6.6 | 5.7 |
| 16384 | 16 | 47.8 | 30.0 | 39.0 |

**Why the numbers look like this:**
- At stride 1, sixteen consecutive words share a line, so only one access in sixteen misses.
- At a stride of 16 words or more, every access misses.
- The write+read pattern is cheap only while the lines it touched still sit in distinct slots:
  - cheap: 128 words at stride 1, 8 and 16; 256 words at stride 1 and 8; 512 and 1024 words at stride 1;
  - at 128 words with stride 32, the 128 lines land on every other slot, so they collide;
  - beyond that, the working set is larger than 128 lines.
- Writes to a dirty slot cost a write-back on top of the read.

---

## Part 2: the HDMI controller

### Data path

```
             bus clock (aclk)                              | pixel clock (pix_clk)
 AXI4-Lite ─► axi_reg_handler ──timing──────────► async FIFO ─► hdmi_signal_gen ─► data[23:0], DE,
 registers        │ │                                      |         ▲              HSYNC, VSYNC
                  │ └─► pll_drp_handler ─► PLL register port ──► (external PLL) ─► pix_clk, hdmi_clk
                  └─► res, fb_addr                         |         │
 AXI3 read ◄──► vdma_reader ─► rgb2ycbcr422 ──pairs + SOF──► async FIFO (32 pairs)
 (memory)
```

The controller has two clock domains:
- **aclk** (bus clock) runs the register block, the PLL sequencer, the DMA reader and the
  colour converter.
- **pix_clk** (pixel clock) runs the signal generator.

The pixel clock comes from an external PLL that this design programs but does not contain.
Two Gray-code asynchronous FIFOs (`async_fifo`) cross between the domains: one carries pixel
pairs, the other the timing of a new mode. The pixel-domain reset comes from `aresetn` through
a two-flop synchroniser (`reset_sync`). `hdmi_clk` to the transmitter is the pixel clock
itself. The SPDIF audio pin is tied low.

### Registers

There are two 32-bit registers on an AXI4-Lite slave. They sit at byte offsets **0x200** and
**0x204**, which are words 128 and 129 of the mapped region.

| offset | name | write | read |
|---|---|---|---|
| 0x200 | MODE | select video mode 0..3 (see below); a value ≥ 4 answers SLVERR and changes nothing | last mode |
| 0x204 | FBADDR | byte address of the frame buffer; the first write enables fetching | last address |

A MODE write does four things:
- it hands the mode's timing to the signal generator;
- it gives the visible width and height to the DMA reader;
- it loads the mode's ten PLL register values;
- it starts the PLL sequencer.

The write response is held back until both the timing FIFO and the sequencer have accepted the
change. Software that waits for BRESP therefore knows the change is under way.

### Video modes

| mode | picture | H: active / front / sync / back (total) | V: active / front / sync / back (total) | pixel clock |
|---|---|---|---|---|
| 0 | 1920×1440 @ 60 Hz | 1920 / 128 / 208 / 344 (2600) | 1440 / 1 / 3 / 56 (1500) | 234 MHz |
| 1 | 1920×1200 @ 60 Hz, reduced blanking | 1920 / 48 / 32 / 80 (2080) | 1200 / 3 / 6 / 26 (1235) | 154 MHz |
| 2 | 1920×1080 @ 60 Hz | 1920 / 88 / 44 / 148 (2200) | 1080 / 4 / 5 / 36 (1125) | 148.5 MHz |
| 3 | 1280×720 @ 60 Hz | 1280 / 110 / 40 / 220 (1650) | 720 / 5 / 5 / 20 (750) | 74.25 MHz |

- The tables live in `rtl/hdmi_pkg.sv` (`MODE_TIMINGS`, `MODE_PLL`). They are parameters of
  `hdmi_subsystem` and `lecture_top`, so a board can bring its own.
- Counters are 12 bits wide, so totals up to 4095 fit.
- The signal generator starts in mode 0 after reset.
- A new timing takes effect only at the end of the current frame.

**Pixel clock frequency.** The PLL for the pixel clock is programmed by writing ten 16-bit values
at clock-controller addresses 0x11 to 0x1A, one write per cycle (`pll_drp_handler`). Only one
set of PLL values is known: the one for mode 0's 234 MHz. The same set is used for every mode
(`PLL_SET_DOC`). Modes 1–3 therefore have correct timing but, on hardware, the wrong pixel
clock until their own PLL values are put into `MODE_PLL`.

### Frame fetch

`vdma_reader` reads the frame buffer as `width × height` 32-bit pixels, row by row from
FBADDR. Each pixel is xRGB: R in bits 23:16, G in 15:8, B in 7:0.

- **Bursts:** each 64-bit beat carries two neighbouring pixels, the left one in the low half.
  Reads are 16-beat INCR bursts, with at most two bursts in flight.
- **Back-pressure:** a new burst is issued only when the pixel path has room for it. RREADY is
  simply the downstream ready, so a full FIFO stalls the bus instead of losing data.
- **Frame wrap:** at the end of the frame the reader starts again at FBADDR.
- **When settings change:** address and size are sampled at each frame start, so a change never
  tears a frame.
- **Alignment:** FBADDR should be a multiple of 128 bytes, so that no burst crosses a 4 KiB
  boundary.

At 1920×1440×60 the stream needs 663.6 MB/s. The 64-bit port at 100 MHz offers 800 MB/s.

### Colour conversion

`rgb2ycbcr422` turns one beat (two pixels) into one 4:2:2 pair of 12-bit samples: Y1, Y2 and a
shared Cb and Cr. The coefficients are ITU-R BT.601 studio range (Y 256–3760, C 256–3840 at
12 bits), in fixed point with 8 fraction bits. Cb and Cr are taken from the sum of both pixels,
which averages them. The stage has one register.

### Signal generator and the 4:2:2 bus format

`hdmi_signal_gen` counts pixels and lines:
- HSYNC is high for exactly `sync` pixels after the front porch;
- VSYNC is high likewise, counted in lines;
- DE is high in the visible area.

All outputs come from registers, one cycle after the counters. Syncs are active high. Set the
transmitter's input sync polarity to match, or invert them at the pins, for monitors that expect
negative sync.

The transmitter runs in its 24-bit YCbCr 4:2:2 "evenly distributed" input mode. Each pixel clock
sends one luma sample and one chroma sample:

    data[23:0] = { C[11:4], Y[11:4], C[3:0], Y[3:0] }
    even column: C = Cb, Y = Y1        odd column: C = Cr, Y = Y2

A pair is consumed on the odd column.

### Keeping the picture in place: start-of-frame lock

A stream of pixel pairs carries no position. If the fetcher and the screen ever disagree about
where a frame starts, the picture shifts and stays shifted. This can happen after reset, after a
mode change, or after the memory falls behind. The design fixes this as follows:

1. The DMA reader marks the first beat of every frame.
2. The flag travels through the converter and the clock-crossing FIFO with the pair.
3. At the first pixel of each frame, the signal generator checks whether the waiting pair
   carries the flag:
   - **if it does:** the generator is *locked* (`video_locked`) and consumes pairs for the whole
     frame;
   - **if it does not:** it discards pairs until a flagged one arrives, and shows black in the
     meantime.
4. A visible pixel with no pair ready (an underflow, counted in `underflow_count`) drops the lock.

The display is then black until the next frame start with a flagged pair, and after that the
picture is correct again. In practice:
- a mode change costs one or two frames of black;
- a memory stall costs the rest of the frame it hits.

### Status outputs

| output | meaning |
|---|---|
| `frame_start` | pulse at the first pixel of each frame |
| `frames_fetched` | frames started by the DMA reader |
| `underflow_count` | visible pixels for which no pair was ready while locked |
| `video_locked` | the pixel stream is aligned with the screen |
| `pll_busy` | the PLL sequencer is writing |
| `pll_done` | the PLL register set has been written completely |
| `dma_errors` | read responses with an error code |

---

## Where this design departs from its source, and what is assumed

The source material describes both designs. It prints part of their code and leaves gaps. The
following points are choices made here.

**Cache**
- On a clean miss, the line is fetched from the address built from the *requested* tag and the
  slot. The source builds it from the slot's old tag, which would load the wrong line.
- `JUST_WRITE` is implemented in the fetcher and tested there, but the cache never issues it.

**Signal generator and pixel format**
- Chroma order: Cb goes out with the even (first) column and Cr with the odd one, as the
  transmitter's 4:2:2 table shows. The source's output routine picks the halves the other way
  round. Swap them in `hdmi_signal_gen` if a board shows red and blue exchanged.
- Syncs are active high, with the pulse exactly `sync` long. The source's comparison constants
  are read as `active+front-1` and `active+front+sync-1`.
- The start-of-frame lock is this design's addition.

**PLL**
- Only the first two PLL addresses, 0x11 and 0x12, are given. Addresses 0x13–0x1A continue the
  sequence by assumption.
- The clock controller's register format is not known. The ten values are passed through
  unchanged.

**Modes**
- Mode 0 is the source's 1920×1440 mode.
- Modes 1–3 are standard CVT/CEA-861 timings chosen here, to fill the four mode numbers the
  driver accepts. They use mode 0's PLL values.

**Interfaces**
- The register bus is AXI4-Lite with a 32-bit data path. The register offsets follow the driver's
  word indices 128 and 129.
- The frame-buffer format (32-bit xRGB, two pixels per 64-bit beat), the burst length and the
  number of outstanding bursts are chosen here.
- The colour converter's coefficients (BT.601, studio range, 12 bits) are chosen here.

**Not part of the RTL**
- The PLL/MMCM itself, the ADV7511 and its I²C setup (done by software on the processor), and
  the main memory are outside the design. Their connections are ports.

---

## Files

| file | content |
|---|---|
| `rtl/cache_pkg.sv` | request/operation enums of the cache |
| `rtl/dm_cache.sv`, `rtl/line_fetcher.sv` | cache and line fetcher |
| `rtl/pipe_fifo.sv`, `rtl/bypass_fifo.sv` | two-entry FIFO and one-entry bypass FIFO |
| `rtl/hdmi_pkg.sv` | timing/PLL/pixel types, mode tables, bus placement function |
| `rtl/hdmi_subsystem.sv` | HDMI controller top |
| `rtl/axi_reg_handler.sv` | registers |
| `rtl/pll_drp_handler.sv` | PLL sequencer |
| `rtl/vdma_reader.sv` | frame fetch |
| `rtl/rgb2ycbcr422.sv` | converter |
| `rtl/hdmi_signal_gen.sv` | timing and output |
| `rtl/async_fifo.sv`, `rtl/reset_sync.sv` | clock-domain crossing |
| `rtl/lecture_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench for each of the cache, fetcher, HDMI units, the HDMI controller, the top level and the clock-crossing FIFO |
| `tb/tb_cache_bench.sv` | the cache benchmark |
| `tb/tb_lecture_top_full.sv` | full-size run |
| `tb/line_ram_model.sv`, `tb/axi_frame_mem_model.sv` | behavioural memories |
| `tb/axi_lite_master_bfm.sv` | bus driver |
| `tb/hdmi_frame_checker.sv` | compares displayed pixels with the frame buffer |
| `tb/tb_video_pkg.sv` | test image and reference conversion |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end and stops itself. A watchdog
ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/cache_pkg.sv rtl/hdmi_pkg.sv tb/tb_video_pkg.sv tb/tb_lecture_top.sv \
    --top-module tb_lecture_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_lecture_top` with any other testbench name.

| testbench | what it runs | run time |
|---|---|---|
| `tb_lecture_top` | both designs end to end, with the HDMI controller on tiny modes (16×6 and 24×4) | a few seconds |
| `tb_lecture_top_full` | every parameter at its default: one complete 1920×1440 frame checked pixel by pixel | about 30 s |
| `tb_cache_bench` | the benchmark above | about 15 s |

**What `tb_lecture_top` covers.** The cache part checks every read against a reference model.
The HDMI part checks every locked frame pixel by pixel against the frame buffer. The run also
counts that each of these happened at least once:
- cache hits, misses and write-backs, and a clear;
- PLL programming and a mode switch;
- a lock, an underflow and a re-lock;
- bus back-pressure.

**What `tb_lecture_top_full` checks besides the pixels.** The line period (2600 clocks), the
frame period (3.9 M clocks), and 300 random cache accesses.

The testbenches initialise everything they read. They also pass with all state started at
random values (`+verilator+rand+reset+2`).

## Trust and limits

**What has been checked**
- Every module has a self-checking testbench.
- Each testbench has been shown to fail when its module is broken on purpose. Examples: byte
  enables ignored, a sync one pixel early, a wrong burst length, a PLL sequence one write short.

**What has not been checked**
- Nothing has run on hardware.
- The parts outside the design (PLL, transmitter, memory) are modelled only as far as their
  ports: fixed-latency memories, an always-ready PLL register port, and a pixel clock whose
  frequency is set by the testbench.

**What is known to be incomplete**
- The PLL values of modes 1–3 are placeholders.
- The sync polarity and the chroma order may need changing for a particular board and monitor.
