# Light saber generator

A camera films someone holding a plain stick. The stick carries a blue marker
at one end and a green marker at the other. This hardware takes the camera's
video and shows it live on a VGA monitor, with a glowing light saber painted
between the two markers. The saber has a white core and a green halo.

The work is split between an FPGA datapath, written here in SystemVerilog,
and a small processor, which is not part of this RTL:

- **Hardware, input side:** decodes the video stream and converts it to RGB.
  For every video line it reports how many marker pixels it saw and where.
- **Processor:** reads those per-line numbers and locates both markers. It
  then works out, for every one of the 480 output rows, which columns belong
  to the saber. It writes those spans into a lookup table in the hardware.
- **Hardware, output side:** displays the video and paints each row's span
  from the table. Painting happens on the fly, so no frame buffer is needed.

```
            27 MHz                                                      27 MHz
 BT.656 ─► itu656_decoder ─► yuv422_to_444 ─┬─► ycbcr2rgb ─► vga_controller ─► VGA DAC
 (8 bit)   (timing codes,    (chroma hold)  │                 ├ line_buffer (2 x 640)
            drop 1 in 9)                     └─► xy_detect ──► ├ saber_ram (1024 x 64)
                                                 (marker stats)├ saber_overlay
 TD_HS/TD_VS ─► edge_detect ─► td_lock_detect ─► reset_delay   └ avalon_communicator ◄─► processor
 I2C ◄── i2c_av_config (programs the video decoder chip)          (50 MHz Avalon-MM slave)
```

`lsg_top` wires all of this together. Every file in `rtl/` starts with a
comment on its interface and timing.

## Video input: BT.656 decoding and down-sampling

An external video decoder chip digitises the NTSC camera signal. It delivers
ITU-R BT.656: one byte per 27 MHz clock, with components in the order
Cb Y Cr Y. Each line is 1716 bytes:

| Bytes | Content |
|---|---|
| 4 | EAV (end of active video) |
| 268 | horizontal blanking |
| 4 | SAV (start of active video) |
| 1440 | active video: 720 luma samples and 360 chroma pairs |

The timing codes are `FF 00 00 XY`. In the status byte XY:
- bit 6 is F (the field),
- bit 5 is V (vertical blanking),
- bit 4 is H (0 for SAV, 1 for EAV).

`itu656_decoder` finds the codes with a 3-byte sliding window and then counts
through the 1440 active bytes. A luma sample is passed on only when all of
these hold:
- A field start has been seen since reset, i.e. F has gone from 1 to 0.
- The current line is not in vertical blanking.
- The byte is a Y byte.
- `pixel_skip` keeps it.

The monitor shows 640 columns, so one sample in nine is dropped: sample
indices 8, 17, …, 719. Only luma samples are dropped. Chroma is still captured
from the dropped samples.

`yuv422_to_444` gives every kept sample a full (Y, Cb, Cr) triple by
sample-and-hold:
- An even sample arrives with its own Cb and reuses the Cr of the previous pair.
- An odd sample arrives with its own Cr and reuses the Cb of its own pair.

Consequence: an even sample just after a coloured region carries that
region's Cr for one pixel. The end-to-end test relies on this: an image pixel
right of the blue marker classifies as green.

## Colour conversion and marker detection

`ycbcr2rgb` turns every pixel into 10-bit RGB (BT.601) with integer
arithmetic in two pipeline stages:

```
R = (596·Y + 817·Cr − 114131) >> 7
G = (596·Y − 416·Cr − 200·Cb + 69370) >> 7
B = (596·Y + 1033·Cb − 141787) >> 7
```

The integer scale is 512, and the ×4 for 10 bits is folded into the shift.
Each result is then clipped to 0…1023. Without the clipping, saturated input
colours overflow and come out as a different shade.

`xy_detect` works on the YCbCr pixel, before RGB conversion. It classifies
each pixel as follows:

| Colour | Y | Cb | Cr |
|---|---|---|---|
| blue | > 85 | > 140 | < 120 |
| green | > 100 | < 120 | < 110 |

It counts the blue and the green pixels on a line and remembers the column of
the last one of each. It publishes these four numbers with the line number,
which counts from 0 at each field start. The marker's extent on that line is
`last − count … last`.

## Output side: field extension

The input is interlaced: one field of 262 or 263 lines every 1/60 s. The
design does not weave the two fields through a frame buffer. Instead it shows
each field on its own and doubles every line:

- The output vertical sync has the input field rate.
- The output horizontal sync has twice the input line rate.
- One output line is half an input line: 858 clocks at 27 MHz.

An output line is laid out as follows:

| Part | Clocks |
|---|---|
| horizontal sync | 103 |
| back porch | 76 |
| active | 640 |
| front porch | 39 |

Vertically, in output lines:

| Part | Output lines |
|---|---|
| sync | 2 |
| back porch | 34 |
| active rows | 480 |
| rest of the field | 10 or 12 |

Output row *r* shows active input line *r/2* of the field.

The VGA timing is not free-running. `edge_detect` turns the rising edges of
the decoder chip's separate TD_HS and TD_VS outputs into pulses. The
horizontal counter restarts at every TD_HS pulse and the line counter at every
TD_VS pulse. The VGA sync pulses are then rebuilt from these counters with the
widths above. The input's own vertical sync is much wider than a VGA monitor
accepts, so it cannot be passed through. If TD_HS stops, the counter runs
freely with a period of 1716 clocks.

`line_buffer` holds two 640-pixel lines of 15 bits each (5 bits per colour).
One buffer fills with the incoming line while the other, holding the previous
line, is read twice. The read side switches buffers at every TD_HS rising
edge.

**Subtle point:** the last pixels of a line are still in the colour pipeline
when TD_HS rises. So the write side is restarted separately, at the next SAV
decoded from the stream. Until then, late pixels keep filling the buffer that
is now on display, ahead of its read position. The marker statistics are
closed at the same SAV, for the same reason. Both testbenches check this case.

The pixel path from counters to DAC pins is two clocks:
1. line buffer read and table read;
2. overlay register.

The syncs and the blanking signal are delayed to match.

## The saber: lookup table and overlay

`saber_ram` is a dual-clock RAM of 1024 entries, indexed by output row. The
processor writes it at 50 MHz and the VGA side reads it at 27 MHz. Each entry
holds four 16-bit columns: outer x1, outer x2, inner x1, inner x2.

`saber_overlay` uses the current row's entry to paint each pixel at column x:

| Condition | Result |
|---|---|
| outer x1 < x < outer x2, and also inner x1 < x < inner x2 | white core (R = G = B = 1023) |
| outer x1 < x < outer x2 only | halo: green + 512, clipped to 1023; red and blue unchanged |
| otherwise | camera pixel unchanged |

The bounds are strict, so an all-zero entry paints nothing.

## Processor interface (Avalon-MM slave, 50 MHz)

`avalon_communicator` exposes 16-bit registers. `address` carries a word
index; the processor's byte offset is twice that.

| Index | Dir | Meaning |
|---|---|---|
| 0 | W | outer x1 (staged) |
| 2 | W | outer x2 (staged) |
| 30 | W | inner x1 (staged) |
| 18 | W | inner x2 (staged) |
| 24 | W | write the staged span into table row `writedata` |
| 20 | W | clear the new-field flag |
| 4 | R | VGA horizontal sync (1 = in sync) |
| 16 | R | VGA vertical sync (1 = in sync) |
| 6 | R | current output row |
| 8 / 10 | R | blue count / column of last blue pixel |
| 12 / 14 | R | green count / column of last green pixel |
| 26 | R | number of the line these statistics belong to |
| 28 | R | new-field flag: set by hardware at each input field start |

- Reads have one clock of latency (`readdata` is registered) and no wait states.
- Values from the 27 MHz side cross clock domains with toggle synchronizers.
  The data is held stable for at least a line while the toggle travels.

The intended software loop:
1. Poll index 26. When it changes, read 8–14 for that line.
2. When the flag at 28 is set, clear it with a write to 20.
3. Work out the saber from the marker positions of the field just seen.
4. Write 480 spans: four staged writes, then the row write, per row.

All 480 rows take about 4800 bus clocks. That fits easily into the 36 output
lines of vertical sync and back porch.

## Start-up

- `i2c_av_config` writes 40 registers of the video decoder chip after reset:
  - Slave address 0x40, about 20 kHz, 3-byte writes.
  - A write that is not acknowledged is repeated.
  - The register values are in `rtl/adv7181_init.hex`: one `RRVV` word per
    line (register, value). They set the chip up for NTSC composite input
    with BT.656 output.
- `td_lock_detect` counts TD_HS pulses between TD_VS pulses. After two fields
  of 262–263 lines in a row it reports lock. Any field of another length
  drops lock.
- Once locked, `reset_delay` releases three resets in stages, after 0x1147AD,
  0x19EB84 and 0x228F5B clocks (about 42, 63 and 84 ms):
  1. the VGA side;
  2. the input pipeline;
  3. the `o_video_ready` status output.

## Where this RTL departs from the original design

- **Line-buffer write restart and statistics close at SAV**, not at TD_HS.
  See the subtle point above. The display side still switches on TD_HS.
- **Lock detection** is a field-length test of our own. The original counted
  lines during the vertical sync pulse. The sync width it expected does not
  match the width it reports measuring.
- **Table writes are committed per row.** The span is staged in four writes
  and written to RAM when the row index is written. This avoids half-updated
  entries. The original wrote the table continuously.
- **Chroma up-sampling** is sample-and-hold. The original only names the step.
- **Halo strength** (+512 on green), the 34-line vertical back porch, the
  table's row numbering (output row 0…479) and the pipeline depths are
  choices made here.
- **Colour depth:** the conversion is 10-bit, but the line buffers keep only
  5 bits per colour, as the original did. The monitor therefore sees 15-bit
  colour. The white core and the halo boost are applied after the buffer, at
  full 10-bit depth.
- **The processor software is not part of this RTL.** That covers marker
  centre-of-mass, the line between the markers, and the halo/core widths. The
  end-to-end testbench contains a simple stand-in (see below).

## Simulating

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the top of the
repository:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/lsg_pkg.sv tb/tb_video_pkg.sv \
    tb/tb_lsg_top.sv --top-module tb_lsg_top
./obj_dir/Vtb_lsg_top
```

Run the simulation from the repository root: the I2C table is loaded from
`rtl/adv7181_init.hex` by a relative path. Swap in any other `tb/tb_*.sv` and
its module name to run a block test.

`tb_lsg_top` runs the whole design at its default sizes, about 5.4 million
clocks of 27 MHz (roughly 15–40 s). It has these parts:

- **`bt656_source`:** models the camera and the decoder chip. It sends a
  525-line NTSC BT.656 stream with a blue and a green marker box, plus TD_HS
  and TD_VS.
- **`i2c_slave_model`:** refuses the first set-up write, so the retry happens.
- **A bus-master thread playing the processor:** it reads every line's
  statistics and checks them against values computed from the test image. At
  each new field it draws a saber from the blue to the green marker.

It then checks:
- the VGA timing;
- every active pixel of two complete fields, against a real-valued BT.601
  reference and the table that was written;
- that each mechanism happened at least once. The mechanisms are: retry,
  lock, staged release, line doubling, sample drop, blue and green detection,
  clipping, table writes, flag set and clear, core and halo.

Block tests:

| Testbench | What it checks |
|---|---|
| `tb_itu656_decoder` | random streams with timing codes; which samples pass and their chroma |
| `tb_pixel_skip` | the 1-in-9 drop |
| `tb_yuv422_to_444` | the chroma hold |
| `tb_ycbcr2rgb` | random pixels against a real-valued reference, within ±3 of 1023 |
| `tb_xy_detect` | counts and columns |
| `tb_i2c_av_config` | all 40 register writes and the retry |
| `tb_td_lock_detect` | lock, and loss of lock |
| `tb_reset_delay` | exact release clocks |
| `tb_edge_detect` | edge pulses |
| `tb_line_buffer` | doubling, including late pixels |
| `tb_saber_ram` | dual-clock reads and writes |
| `tb_avalon_communicator` | every register, the flag and committed writes |
| `tb_saber_overlay` | core, halo, clipping and bounds |
| `tb_vga_controller` | three full fields, pixel by pixel |

## Sizes

| Item | Needed | Built |
|---|---|---|
| input line | 1716 bytes at 1 byte/clock | pipeline accepts one byte every clock |
| active lines per field | 240 lines for 480 doubled rows | field has 243 active lines |
| saber table | 480 rows | 1024 entries |
| line buffers | | 2 × 640 × 15 bits |
| saber RAM | | 1024 × 64 bits |
| whole datapath (generic synthesis) | | about 800 flip-flops, 84,736 memory bits |

Besides these, the only storage is the 40-entry I2C table. The whole
datapath is small next to the Cyclone II EP2C35 the original system ran on:
33,216 logic elements and 483,840 memory bits. Most of that FPGA went to the
processor system.
