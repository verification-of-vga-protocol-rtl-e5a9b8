# 640x480 VGA picture scan-out controller

This controller shows a stored picture on a VGA monitor at 640x480. It
generates the 25 MHz pixel timing from a 50 MHz board clock. It counts out
the 800x525-pixel scan that a monitor expects, and works out the memory
address of every visible pixel. It reads that pixel's colour index from an
image memory and looks the index up in a 256-entry colour table. The result
is 8-bit red, green and blue, plus horizontal and vertical sync and blanking
signals lined up with the colour.

The main point of the design is that each of the 307,200 visible pixels gets
exactly one address, `row * 640 + column`, at the moment the beam is over it.
The scan is the one the monitor sees. The accompanying class-based
verification environment checks this for every pixel of a frame.

```
 clk 50 MHz ─► vga_clk_gen ──pix_en──┬───────────────┬───────────────┬──────────────┐
              (÷2, vga_clk)          ▼               ▼               ▼              ▼
                                 vga_sync ──h/v──► vga_addr_gen ──addr──► vga_image_data ──idx──► vga_image_index ──► R,G,B
                                 (counters,          (row*640+col)        (307200 x 8 bit)        (256 x 24 bit)
                                  sync, blank)
                                     │                                                                               ▲
                                     └──── h_sync, v_sync, h_blank, v_blank ── 3-pixel delay line ──────────────────┘ (blank forces RGB to 0)
```

## Scan timing

One line is 800 pixel clocks and one frame is 525 lines. At 25 MHz that is
32 µs per line and 16.8 ms per frame, about 59.5 frames per second. Both
counters start at 0 on the first visible pixel. While the beam is in the
visible window, `h_count` and `v_count` are therefore simply its column and
row.

| horizontal (pixels) | counts    | length | h_sync | h_blank |
|---------------------|-----------|--------|--------|---------|
| visible             | 0–639     | 640    | high   | low     |
| front porch         | 640–659   | 20     | high   | high    |
| sync                | 660–754   | 95     | low    | high    |
| back porch          | 755–799   | 45     | high   | high    |

| vertical (lines)    | counts    | length | v_sync | v_blank |
|---------------------|-----------|--------|--------|---------|
| visible             | 0–479     | 480    | high   | low     |
| front porch         | 480–490   | 11     | high   | high    |
| sync                | 491–492   | 2      | low    | high    |
| back porch          | 493–524   | 32     | high   | high    |

Both syncs are active low. The horizontal numbers come from a 640x480
timing description written for a 25.175 MHz pixel clock: 3.77 µs of sync,
1.79 µs of back porch, 25.17 µs of picture and 0.79 µs of front porch. This
design runs them at 25 MHz from the divided 50 MHz clock.

That description lists the vertical intervals as 2 + 32 + 480 + 14 lines
but gives the total as 525, and those four numbers add up to 528. The
controller keeps the 525-line frame. It keeps 2 sync lines and 32
back-porch lines, and makes the front porch 11 lines. All eight lengths
are parameters (`H_FP_P`, `V_FP_P`, …), so a different mode only needs new
values.

## The pixel pipeline and why its outputs lag the counters

This is the part that needs the most care when you connect the controller.
Every stage is registered and advances once per `pix_en`. A pixel's colour
therefore appears some pixels after its position appears on `h_count` and
`v_count`.

| signal                                   | lags `h_count`/`v_count` by |
|------------------------------------------|-----------------------------|
| `addr`, `addr_valid`                     | 1 pixel                     |
| `data_out` (colour index)                | 2 pixels                    |
| `red`/`green`/`blue`, `h_sync`, `v_sync`, `h_blank`, `v_blank`, `blank` | 3 pixels |

The sync and blank signals pass through a 3-stage delay line (`PIPE` in
`vga_top`). Sync and colour therefore leave the chip in step with each
other, which is the only alignment a monitor cares about. `red`, `green`
and `blue` are forced to 0 whenever `blank` is high. `h_count`, `v_count`,
`addr` and `data_out` are brought out undelayed, as debug and observation
ports. If you add a stage to the image path (for example an external
memory), increase `PIPE` by the same amount.

In blanking, `addr` is 0 and `addr_valid` is low. The memory still reads
word 0, but that value is blanked at the output.

## Picture memory and colour table

`vga_image_data` holds one colour index per pixel: 640 × 480 = 307,200
words of 8 bits, 2.4 Mbit, in row-major order. `vga_image_index` is a
256-word table of 24-bit colours. Each word is laid out as red in bits
[23:16], green in [15:8] and blue in [7:0]. Both memories are read
synchronously.

No picture comes with this design. Both memories therefore take an
optional `$readmemh` file through a parameter: `IMAGE_FILE` and
`PALETTE_FILE` on `vga_top`, which is `INIT_FILE` on the memories. With
these left empty (the default), the memories are filled by two functions
in `vga_pkg`:

- **Picture:** `image_index_at(x, y) = {y[6:4], x[8:4]} ^ {y[3:0], x[3:0]}`. This is a
  pattern of 16-pixel tiles with a finer texture inside them. Every visible
  pixel has a predictable colour, so a test can check what reached the
  screen.
- **Colour table:** `palette_rgb(i)` is the common 3-3-2 table. The
  index bits [7:5], [4:2] and [1:0] give red, green and blue. Each is
  widened to 8 bits by repeating its bits, so that full scale is 255.

To show a real bitmap, convert it into 307,200 hex indices, one per line,
row by row. Convert its palette into 256 lines of six hex digits, `RRGGBB`.
Pass the two file names as parameters.

## Clocking

`vga_clk_gen` divides the 50 MHz clock by `DIV` (2). It produces `vga_clk`,
a 25 MHz square wave for a video DAC, and `pix_en`, a one-cycle enable that
is high once every `DIV` cycles. The whole design runs on the 50 MHz `clk`
and uses `pix_en` as a clock enable. That keeps it in a single clock domain;
no logic is clocked by the divided clock. The pipeline advances on the clk
edge where `vga_clk` falls. The outputs are therefore stable around the
rising edge of `vga_clk`, where a DAC can latch them.

Reset (`rst`) is synchronous and active high. After reset the scan starts at
the top-left pixel. The sync outputs stay inactive and `blank` stays high
until the pipeline has filled.

## Ports of `vga_top`

| port | dir | width | |
|------|-----|-------|-|
| `clk` | in | 1 | 50 MHz board clock |
| `rst` | in | 1 | synchronous reset, active high |
| `vga_clk` | out | 1 | 25 MHz pixel clock |
| `red`, `green`, `blue` | out | 8 each | colour, 0 during blanking |
| `h_sync`, `v_sync` | out | 1 | active-low syncs |
| `h_blank`, `v_blank`, `blank` | out | 1 | outside the visible columns / rows / either |
| `h_count`, `v_count` | out | 10 | scan position (not delayed) |
| `addr`, `addr_valid` | out | 19, 1 | pixel address, one pixel behind the counters |
| `data_out` | out | 8 | colour index, two pixels behind the counters |

The analog side is left out: the three video DACs that produce 0.7 V
full-scale colour levels, and the DE-15 connector. Connect `red`, `green`,
`blue`, `h_sync`, `v_sync` and `vga_clk` to an external video DAC.

## Files

| file | contents |
|------|----------|
| `rtl/vga_pkg.sv` | timing constants, `rgb_t`, default picture and colour-table functions |
| `rtl/vga_clk_gen.sv` | 50 → 25 MHz divider and pixel enable |
| `rtl/vga_sync.sv` | scan counters, syncs, blanks |
| `rtl/vga_addr_gen.sv` | pixel address |
| `rtl/vga_image_data.sv` | picture memory |
| `rtl/vga_image_index.sv` | colour table |
| `rtl/vga_top.sv` | the controller |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/vga_if.sv`, `tb/vga_env_pkg.sv`, `tb/tb_vga_top.sv` | class-based environment for the whole controller |
| `tb/*.hex` | small load files for the memory testbenches (formula in each testbench) |

## Verification

Each block testbench compares the block against values it works out on
its own, and prints `TB_RESULT checks=N failures=M`.

- `tb_vga_clk_gen` checks the enable and clock phase at DIV 2 and 4, and after a reset in the middle of a period.
- `tb_vga_sync` drives a random `pix_en` over more than one whole frame. It checks
  every count, sync and blank. It also measures the sync widths (95 pixels and
  2 lines) and periods (800 pixels and 525 lines).
- `tb_vga_addr_gen`, `tb_vga_image_data` and `tb_vga_image_index` check
  random and corner addresses, and every colour index. They also check
  loading from a file and holding their value without an enable.

`tb_vga_top` runs the whole controller at its default 640x480 size. It is
built from the classes in `vga_env_pkg`:

- `base_packet` is a reset length plus a run length.
- `tx_gen` produces a short run ended by a reset in the middle of a frame,
  then a run of more than one whole frame.
- The `driver` applies each packet through the `vga_if` interface and sends
  the scoreboard the output it expects for every clock cycle, from its own
  timing model.
- The `monitor` samples the outputs. It also measures the sync and blanking
  intervals in clock cycles.
- The `scoreboard` compares the two streams and records which pixel
  addresses were produced.

The test fails if any of these is missing: a sync pulse, a blanking interval,
a frame wrap, a reset in the middle of a frame, a lit pixel, or any of the
307,200 addresses. One run takes about two seconds.

With Verilator 5, from the repository root (the testbenches load their
`.hex` files from `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/vga_pkg.sv \
    tb/vga_if.sv tb/vga_env_pkg.sv tb/tb_vga_top.sv --top-module tb_vga_top
./obj_dir/Vtb_vga_top
```

A block testbench is built the same way, for example
`verilator --binary --timing --assert -Irtl -Itb rtl/vga_pkg.sv tb/tb_vga_sync.sv --top-module tb_vga_sync`.
The testbenches run on a two-state simulator. They initialise or reset
everything they read.

## Size

After generic synthesis the controller has about 70 word-level cells and
42 flip-flop bits, plus 2,457,600 bits of picture memory and 6,144 bits of
colour table. The picture memory fits on-chip only in larger FPGAs. A
design with less memory would store fewer bits per pixel or a smaller
image; neither option is provided here.

## Departures and choices to be aware of

- **Vertical front porch:** 11 lines instead of the 14 that appear in the
  source description. This keeps the 525-line frame that the same
  description states; see *Scan timing*.
- **Pixel clock:** 25 MHz from a 50 MHz clock by division, not the 25.175 MHz of the VGA standard.
- **Own choices where the source says nothing:**
  - the counter origin and the row-major address layout;
  - the 8-bit colour index and 256-entry colour table;
  - synchronous memory reads and the 3-pixel output alignment;
  - forcing R, G and B to 0 in blanking;
  - the synchronous active-high reset;
  - a clock enable instead of a divided clock.
- **Picture and colour table:** the defaults are computed test patterns, not a real image.
- **Reference capture:** a published simulation capture shows an address of
  113811 at column 495 and row 211. No row-major 640-wide layout gives
  that address (`211*640+495 = 135535`), and the capture does not say what
  layout produced it. This design uses the plain row-major address.
