# Indicial-mapping video processor

This design transforms live video geometrically in real time: rotation, translation, zoom or
any other remapping of pixel positions. It does no arithmetic on coordinates in the video path.
Instead it keeps a second memory, the **pointer memory**. That memory holds, for each screen
position, the coordinates of the camera pixel to show there. The pointer memory is read in
ordinary raster order, and each word it returns is used as the read address of the frame store.
Whatever pattern the host loads is applied to every frame at the pixel clock. A rotation costs
the same as a pass-through, and the host bus only carries the pattern, never the video.

The rest of the system is what a frame grabber and display card need around that idea:

* two frame buffers, swapped every frame, so one captures while the other is displayed;
* a colormap lookup table that turns the 10-bit pixels into 24-bit RGB;
* a programmable sync generator, so any raster up to the board's pixel clock can be produced;
* a controller with normal, freeze-frame and blanking behaviour;
* a host port that reaches every memory and register.

The external parts (camera A/D converter, video DAC, PCI bridge) are not part of the RTL. Their
digital sides are ports of the top module, `video_system`.

```
 adc_data ─►┌──────────────┐  capture (write)   ┌────────────┐
            │ frame buffer │◄── {row,col} ──────┤  address   │◄── de, vblank ── sync_generator ──► blank/hsync/vsync/csync
            │   VRAM 1/2   │                    │  generator │                       ▲                (delayed 3 clocks)
            │  (swapped    │  display (read)    └─────┬──────┘                       │ timing
            │  each frame) │◄── {row',col'} ──┐       │ {row,col}              video_mode_regs ◄─┐
            └──────┬───────┘                  └── pointer_memory                                │
                   │ 10-bit pixel                                                               │
                   ▼                                                                            │
             lookup_table ──► video_r / video_g / video_b                                       │
                                                                                                │
 host_* ──► address_decoder ──► every memory above (blanking clocks only) and the registers ────┘
                 ▲   │
                 └── controller (buffer roles, freeze, host grant)
```

## How a pixel travels: the three-clock pipeline

Call "stage 0" the clock in which the sync generator's `de` (active video) is high for screen
position (r, c). The address generator holds `{r, c}` in that same clock.

| clock   | what happens |
|---------|--------------|
| stage 0 | `{r, c}` reads the pointer memory. The camera sample `adc_data` is written at `{r, c}` into the capture buffer, unless frozen. |
| stage 1 | The pointer word `{r', c'}` reads the displayed buffer. |
| stage 2 | The 10-bit pixel reads the three colour tables. |
| stage 3 | `video_r/g/b` carry the colour of (r, c). `blank`, `hsync`, `vsync` and `csync` are delayed by three flip-flops to match. |

The output runs one pixel per clock without stalls. It lags the raster by three clocks and the
camera by one frame, because the displayed buffer holds the previous frame.

Capture and display share one address generator. This means the camera has to run on the
raster this design generates: `adc_data` is taken to belong to the pixel whose `de` is high in
the same clock. Genlocking the camera to `hsync`/`vsync` is left to the board.

Addresses are ordered pairs, not linear counts. A frame-buffer or pointer-memory address is
`{row[ROW_W-1:0], col[COL_W-1:0]}`. A pointer word has the same layout. With the default
`ROW_W = COL_W = 10`, each memory has 2^20 words and the picture sits in the top-left corner.
Any mode up to 1024 × 1024 active pixels fits. That includes 656 × 480 at 12 MHz (the default)
and 1024 × 768 at 65 MHz.

## What to load into the pointer memory

Location `{r, c}` must hold the *source* pixel for screen position (r, c). So the host evaluates
the **inverse** of the transformation it wants and clips the result to the picture. For an R × C
picture:

* identity: `{r, c}`
* rotation by 180°: `{R-1-r, C-1-c}`
* vertical flip: `{R-1-r, c}`
* translation by (dy, dx): `{r-dy, c-dx}`, clipped
* zoom ×2 about the top-left corner: `{r/2, c/2}`
* rotation by θ about the centre (yc, xc) with zoom s and shift (dy, dx): apply the homogeneous
  3 × 3 matrix of the inverse transform to (c, r, 1). Round, and point screen positions that
  fall outside the picture at a pixel kept black.

Rotation, zoom and translation therefore combine into one matrix, evaluated once per pattern
in software. Only operations where each output pixel comes from exactly one input pixel can be
expressed this way. Filters and other neighbourhood operations cannot.

Loading a full 656 × 480 pattern takes 314,880 host writes. At the default timing that is about
eleven frames (see *Host access*). A pattern loaded while video runs takes effect pixel by pixel
as it is written.

## Frame buffers, swapping and freeze frame

Each frame buffer is a single-port RAM (`frame_buffer`). It cannot be written by the camera and
read for display at once, so two are used. `disp_sel` names the one on display (0 = VRAM 1);
the other captures. The controller swaps them in the first clock of vertical blanking, after the
last pixel of the frame has left the pipeline. The frame just captured then appears in the next
frame.

Setting bit 0 of the control register requests **freeze frame**. The request is taken at the
same frame boundary. If capture was running, that boundary still swaps, so the freeze shows the
most recent complete frame. After that, nothing is written and the displayed buffer is read
frame after frame. Clearing the bit resumes capture into the other buffer, and that frame is
displayed one frame later.

While frozen, the host can:

* read the frozen frame out of the displayed buffer, which makes the board a frame grabber;
* write a picture of its own into that buffer, which makes the board a display for host images.

The status register tells it which buffer is on display.

## Colormap

`lookup_table` holds three tables of 1024 × 8 bits: red, green and blue. All three are addressed
by the 10-bit pixel. One host write sets all three entries of an index from a 24-bit
`{R, G, B}` word. The colormap controls brightness, contrast windowing, level shifting,
inversion and false colour without touching the stored image. At start-up the tables hold a grey
scale: entry i = ⌊i/4⌋ in every colour.

## Raster timing and the video mode registers

`sync_generator` runs a pixel counter and a line counter. Each line is active video, front
porch, sync tip and back porch, in that order. Each frame has the same four phases counted in
lines. All eight lengths come from `video_mode_regs` and are used as they stand, so a new mode
takes effect within a frame. Outputs are active high:

* `blank` = not active video;
* `csync` = `hsync | vsync`, a plain composite sync with no serration or equalising pulses.

Frames are progressive, so an interlaced standard is produced as a 525-line progressive raster.

| reg | name     | reset value | meaning |
|-----|----------|-------------|---------|
| 0   | CTRL     | 0   | bit 0: freeze frame |
| 1   | H_ACTIVE | 656 | active pixels per line |
| 2   | H_FRONT  | 16  | front porch, clocks |
| 3   | H_SYNC   | 56  | sync tip, clocks |
| 4   | H_BACK   | 34  | back porch, clocks |
| 5   | V_ACTIVE | 480 | active lines |
| 6   | V_FRONT  | 10  | lines |
| 7   | V_SYNC   | 6   | lines |
| 8   | V_BACK   | 29  | lines |
| 9   | STATUS   | –   | read only: bit 0 displayed buffer, bit 1 freeze in force |

The reset values make an NTSC-rate raster at a 12 MHz pixel clock:

* 762 clocks per line (63.5 µs);
* 106 of those clocks (about 14 %) in blanking;
* 525 lines per frame, 480 of them active.

The split of the blanking into porches and sync is a choice, not a standard value. Timing fields
are 12 bits wide. The reset values are parameters of `video_system`.

## Host access

The `host_*` ports stand for the local-bus side of a PCI bridge.

**Protocol.** A request (`host_we`, `host_addr`, `host_wdata`) is taken in a clock where
`host_valid` and `host_ready` are both high. It must be held until then. `host_rvalid` pulses
for one clock when the access is finished, with read data on `host_rdata`. Writes get the pulse
too.

**Address map.** Addresses are word addresses. `host_addr[23:21]` selects the region:

| region | target | data |
|--------|--------|------|
| 0 | VRAM 1 | bits 9:0 |
| 1 | VRAM 2 | bits 9:0 |
| 2 | pointer memory | `{row, col}` |
| 3 | lookup table | `{R, G, B}` in bits 23:0 |
| 4 | video mode registers | bits 15:0 |

Bits 20:0 are the offset. For memories the offset is `{row, col}` or the LUT index. Regions 5–7
read as zero and ignore writes.

**Timing.** A register access takes three clocks from acceptance to `host_rvalid`. A memory
access has to wait until the controller grants it. The grant comes only in clocks where no
pipeline stage is active, that is, in blanking. So host traffic never disturbs the picture, and
the freeze, static-image and load operations above can run while video is shown. The cost is
latency: up to one active line (656 clocks) per memory access at the default timing.

At the default timing the host can make about 34 memory accesses in each line's blanking, plus
about 11,000 in vertical blanking: roughly 28,000 per frame.

## Departures and limits

* A/D converter, video DAC and PCI bridge are external parts and are not modelled. The RGB
  outputs are not zeroed in blanking; the DAC's blank input does that.
* Memory depths, the host bus protocol, the address map, the register layout, the pipeline, the
  swap instant, freeze taking effect at a frame boundary, host access only in blanking, and the
  porch lengths are this design's choices. The original description gives only the block
  structure, the 10-bit pixel, the 8-bit colours, the three modes and the NTSC numbers.
* The original 4 × 4 illustration of the mapping calls its pattern a 180° rotation, but the
  pattern it lists flips rows only. `tb_figure_examples` runs the listed pattern.
  `tb_video_system` and `tb_video_system_full` use a true 180° rotation (`{R-1-r, C-1-c}`).
  The hardware does not care which pattern is loaded.
* Memory contents are not initialised, except the colormap. The first displayed frame after
  reset and any screen position whose pointer word was never written show arbitrary data.
* The first clock after reset is treated as blanking, so pixel (0, 0) of the very first frame is
  not captured.
* Circuit warnings: none. Verilator reports `rst_n` as used both asynchronously (flip-flop
  resets) and synchronously. The synchronous use is only in the `disable iff` of assertions.

## Files

`rtl/` holds one unit per file:

* `video_pkg` – shared types: timing, RGB, modes, address regions, register numbers
* `video_system` – top level
* `sync_generator`
* `address_generator`
* `controller`
* `address_decoder`
* `video_mode_regs`
* `frame_buffer`
* `pointer_memory`
* `lookup_table`

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_video_system` – end to end, on a 10 × 6 raster. It uses a random colormap, a 180° rotation
  and then a 2× zoom. It then freezes, reads the frozen frame back, shows a static image,
  unfreezes and switches mode. Every active pixel of about 19 frames is compared with a model,
  and each of those mechanisms is counted.
* `tb_figure_examples` – the two classic 4 × 4 illustrations of the method, run through the
  whole system. One shows a "T" flipped top to bottom by the pointer pattern `(r, c) → (3-r, c)`.
  The other shows displayed brightness values 3 1 3 3 / 3 2 3 3 / 3 2 3 3 / 0 1 1 0 turned into
  four grey shades by the colormap.
* `tb_video_system_full` – the top at its default size, with no parameter overrides. It loads an
  inverted grey-scale colormap and a full-picture 180° rotation, then checks two complete
  656 × 480 frames and their sync. That is about 4.5 M clocks, a few seconds in Verilator.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_video_system \
    -Irtl -Itb -y rtl -y tb rtl/video_pkg.sv tb/tb_video_system.sv -o sim
./obj_dir/sim
```

Substitute any other `tb_*` name. `video_pkg.sv` must be read first; the other files are found
through `-y`. To lint the RTL:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/video_pkg.sv rtl/video_system.sv
```

Assertions check the rules of the host bus (a request is held until taken) and of the controller:

* the host never shares a clock with video traffic;
* the capture buffer is never the one being displayed.
