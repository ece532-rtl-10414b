# Wand tracker for a camera-based virtual instrument

A camera looks down at a desk on which the player has drawn shapes. Each
shape stands for a note. The player taps the shapes with a wand whose tip is
wrapped in red, green or blue tape. When a tap happens, software must know
where the wand tip is in the camera picture, so that it can look up which
shape (and so which note) was hit.

This RTL is the hardware half of that: a video peripheral for an FPGA
system built around a soft processor. It does two jobs on a live interlaced
camera stream:

1. It converts the stream from the video decoder chip into RGB pixels and
   writes every frame into the system memory as the *input frame*. Software
   uses that frame for its own image processing (finding the drawn shapes).
2. On request it scans one whole frame for pixels of the wand colour. It
   finds the bounding box of those pixels, ignoring small stray specks, and
   reports the box and its centre through five 32-bit registers.

The processor, its buses, the memory controller, the display controller and
the UART link to a PC are standard vendor parts. They are not in this RTL.
The top module instead has a simple register port and a simple memory-write
port where those parts would connect.

## Structure

```
 video decoder                           clk_llc (27 MHz)   |   clk_bus (100 MHz)
 8-bit YCbCr ──► lf_decode ──► vp422_444_dup ──► ycrcb2rgb ─┬──► line_buffer ──► frame writer ──► mem_req/addr/wdata
 (BT.656 codes)   │ F,V,SAV/EAV                             │    (2 lines,      (in video_to_ram)
                  ├──► svga_timing_gen ── x, y ─────────────┤     dual clock)
                  └──► neg_edge_detect ── frame_start ──────┤
                                                            ▼
                                                       locate_wand ◄── go_pix, cfg_pix ──┐
                                                            │                            │
                                                            └── done_pix, result ──► clock_synchronizer ◄──► control_registers ◄──► reg_* port
```

| Module | Role |
|---|---|
| `top_colour_detect` | Top. Wires the four parts below and brings out the register port, the memory port and the video input. |
| `video_to_ram` | Video front end: decoding, colour conversion, numbering, line buffering and writing frames to memory. |
| `lf_decode` | Finds the `FF 00 00 XY` timing codes. Gives F (field), V (vertical blanking), SAV/EAV pulses and the active bytes. |
| `vp422_444_dup` | Rebuilds full pixels from the Cb Y Cr Y byte order. Both pixels of a pair get the same chroma. |
| `ycrcb2rgb` | BT.601 YCbCr to 8-bit RGB conversion. Two pipeline stages. |
| `svga_timing_gen` | Numbers pixels: x within the line, y = 2·line + F within the interlaced frame. |
| `neg_edge_detect` | Pulses on the falling edge of F. This is the frame start (vertical sync) used by everything downstream. |
| `line_buffer` | Dual-clock block RAM holding two 1024-pixel lines. |
| `locate_wand` | Colour test, cluster filter, bounding box and centre. |
| `clock_synchronizer` | Carries Go plus configuration to the video clock, and Done plus results back to the bus clock. |
| `control_registers` | The five software registers. |
| `idio_pkg` | Shared types (`rgb_t`, `ycbcr_t`, `wand_cfg_t`, `wand_result_t`), field widths and register indices. |

## Finding the wand

`locate_wand` sees every RGB pixel together with its (x, y) coordinates and
the frame-start pulse.

**Colour test.** A pixel belongs to the wand when

    P² − Q² − R² − Colour_Norm > 0

Here P is the component of the chosen wand colour (red, green or blue) and
Q, R are the other two components. The test only passes for pixels where the
chosen component clearly dominates. Grey, white and black pixels all fail,
because P² − Q² − R² is about −P² for them. Raising the 16-bit Colour_Norm
demands a purer colour. The arithmetic is exact: 16-bit squares and a 19-bit
signed difference.

**Cluster filter.** Single pixels of the wand colour turn up in noisy video
and would stretch the box. A *cluster* here is a horizontal run of
consecutive wand-coloured pixels on one line. Runs shorter than
Ignore_Pixels are dropped. When a run reaches Ignore_Pixels pixels, it
counts from its first pixel onward: the block remembers where the run
started, and from then on each pixel of the run widens the box. Values 0 and
1 both accept every wand pixel. The filter only looks along lines. A
vertical sliver one pixel wide but many lines tall is dropped if
Ignore_Pixels > 1.

**Box and centre.** Over the frame, the block keeps the leftmost and
rightmost x and the uppermost and lowermost y of all accepted pixels. When
the frame ends it computes

    X = (left + right) / 2,   Y = (top + bottom) / 2

using a 17-bit sum, truncated. If no pixel was accepted, the registers read
left = top = 0xFFFF and right = bottom = 0. Software can detect that case as
left > right.

**Which frame is measured.** A Go arms the block and latches the
configuration. The *next* frame start begins the measurement. The frame
start after that ends it, loads the results and pulses Done. So a complete
frame is always measured, never the tail of the frame that was in progress
when Go arrived. From the software write to Done is between one and two
frame times, plus a few clocks for each synchronizer. At 30 frames/s that is
33 to 67 ms. A new Go while a search is running restarts the search.

Frame starts come from the falling edge of the field bit, which happens
once per interlaced frame (field 1 → field 0), during vertical blanking.
The y coordinate interleaves the two fields (y = 2·line + F), so the box is
in full-frame coordinates.

## Clock domains and the Go/Done handshake

There are two clocks:

* `clk_llc`: the 27 MHz line-locked clock from the video decoder. It carries
  one stream byte per clock, so one pixel every second clock (13.5 Mpixel/s).
  All video logic and `locate_wand` run on it.
* `clk_bus`: the 100 MHz processor/bus clock. The registers and the memory
  writer run on it.

`clock_synchronizer` uses the mux-enable scheme. The only signal that
really crosses clock domains is a one-bit enable. It is sent as a toggle
through two flip-flops. The data it qualifies (configuration one way,
results the other) is copied into a holding register in the sending domain
when the enable is raised. The receiving domain loads that data through a
mux only when it sees the synchronized toggle change. By then the data has
been stable for at least two receiving clocks. Go is the enable from the bus
side and Done is the enable from the video side. Latency is three to four
receiving clocks. Pulses on the same side must be at least about four
receiving clocks apart. Go and Done are a frame apart, so this always holds.

The frame writer inside `video_to_ram` crosses the same way. At the end of
each line it freezes the line number, the pixel count and the buffer slot,
and flips a toggle. The bus side loads them when the synchronized toggle
changes.

## Register map

All registers are 32 bits. Offsets are in bytes.

| Offset | Name | Bits |
|---|---|---|
| 0x00 | STATUS_NORM | [31] Go: write 1 to start a search, always reads 0. [30] Done: read only, set when results are loaded, cleared by writing Go = 1. [29:16] read 0. [15:0] Colour_Norm, read/write. |
| 0x04 | WAND_IGNORE | [31:18] read 0. [17:16] Wand_Colour: 0 red, 1 green, 2 blue (3 acts as red). [15:0] Ignore_Pixels, read/write. |
| 0x08 | LEFT_RIGHT | [31:16] leftmost x, [15:0] rightmost x. Read only. |
| 0x0C | TOP_BOTTOM | [31:16] uppermost y, [15:0] lowermost y. Read only. |
| 0x10 | CENTRE | [31:16] X, [15:0] Y. Read only. |

Writes to read-only registers or unknown offsets are ignored. Unknown
offsets read 0. The result registers hold their values until the next Done.

Typical use: write WAND_IGNORE, write STATUS_NORM = `0x8000_0000 | norm`,
poll STATUS_NORM until bit 30 is set, then read the three result registers.

## Video front end and the input frame

The decoder delivers an ITU-R BT.656 byte stream. Each line starts with an
EAV code, then horizontal blanking, then an SAV code, then active video in
the order Cb Y Cr Y. Bit 6 of the code's fourth byte is F, bit 5 is V and
bit 4 says EAV or SAV. `lf_decode` keeps the last three bytes so it can
recognise a code. It passes on the bytes between an SAV with V = 0 and the
next EAV. The values 00 and FF cannot occur as video data, so the preamble
bytes of the closing EAV are dropped by value. The protection bits of the
codes are not checked.

Colour conversion uses the BT.601 studio-range equations with coefficients
scaled by 1024 (1192, 1634, 833, 400, 2066), with rounding and clamping to
0–255.

Every converted pixel is written into the line buffer at `{slot, x}`. After
each active line the bus side reads the line out and issues one 32-bit write
per pixel:

    address = FRAME_BASE + 4 * (y * LINE_STRIDE + x),   data = 0x00RRGGBB

This assumes the defaults FRAME_BASE = 0 and LINE_STRIDE = 1024 words
(4 KiB per line). That layout suits a 32-bit-per-pixel display
controller. A line's y is taken from its first pixel, because the EAV that
closes the last line of a field already carries the next field's F bit.

**Memory port.** A write transfers on a `clk_bus` edge where both `mem_req`
and `mem_ack` are high. `mem_req`, `mem_addr` and `mem_wdata` hold until
then; an assertion checks this. Each pixel takes at least two bus clocks:
one to read the buffer, one to present the request. A 720-pixel line needs
about 14.4 µs if the memory always acknowledges, against a 63.6 µs line
time. Because there are two buffer slots, a line can wait up to one extra
line time. If the memory stalls longer than that, a newer line replaces the
waiting one, and `lines_dropped` counts it.

**Register port.** The access lasts one clock: `reg_cs` high, `reg_we`
selects write, `reg_addr` is the byte offset. `reg_ack` and (for reads)
`reg_rdata` come one clock later.

Both resets are synchronous and active high, one per clock domain. Assert
both together.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `LINE_ADDR_W` | 10 | Each buffer slot holds 2^LINE_ADDR_W pixels. Longer lines are cut to that length. |
| `LINE_STRIDE` | 1024 | 32-bit words between successive frame lines in memory. |
| `FRAME_BASE` | 0 | Byte address of the input frame. |

Coordinate, Colour_Norm and Ignore_Pixels widths (16 bits) are fixed by the
register layout and live in `idio_pkg`.

## How this relates to the original design

Taken from the original project description:

* The split into video front end, wand locator, control registers and
  clock synchronizer.
* The sub-blocks of the front end and what each one does.
* The colour equation, the bounding-box search, the centre formulas, and the
  Go → next vertical sync → next vertical sync → Done sequence.
* The register fields and access rules.
* The mux-enable crossing, with Go and Done as its enables.

Chosen here, because the description is silent or the original used vendor
parts:

* The BT.656 stream format and the decoding rules.
* The BT.601 coefficients.
* The line numbering rule.
* The cluster definition (horizontal runs).
* The empty-frame result.
* The register offsets.
* The simplified register and memory ports, which stand in for the
  processor bus slave and master.
* The pixel word format and frame layout.
* The second line-buffer slot.
* The reset style.

There are two more departures:

* **Clocking.** The original ran the locator and synchronizer from a 13 MHz
  clock derived inside the front end. Here they run on the 27 MHz
  line-locked clock with a pixel every second clock. The pixel rate is the
  same, and no derived clock is needed.
* **Reserved bits of WAND_IGNORE.** The original register description
  disagrees with itself about which bits are reserved. Bits 17:16 hold the
  colour, so bits 31:18 are treated as reserved.

Not included:

* The FPGA clock-buffer and DDR output primitives of the front end.
* The processor.
* The buses.
* The memory controller.
* The UART, I²C and display controllers.
* The software: the shape-teaching flood fill and the note lookup.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. They need Verilator 5 with `--timing`.
Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/idio_pkg.sv tb/tb_top_colour_detect.sv --top-module tb_top_colour_detect
./obj_dir/Vtb_top_colour_detect
```

| Testbench | What it shows |
|---|---|
| `tb_top_full` | Top at default parameters with full-size frames: 720 × 480 active, 1716 clocks per line, 262 lines per field. One search for a red wand. Checks the box and centre, and that every pixel of two frames reaches memory exactly once with the right colour. About 10 s. |
| `tb_top_colour_detect` | Small frames (32 × 16). Four searches: red with the speck filtered, red with the speck kept, green, blue. Random memory stalls, then forced line drops. Checks the Go-to-Done time. Counts each mechanism and fails if one never happened. |
| `tb_locate_wand` | Random pictures with a wand rectangle and specks, for all colours and several Colour_Norm and Ignore_Pixels values, compared against a run-scanning reference. Also checks Done timing and the empty frame. |
| `tb_video_to_ram` | Stream model → RGB stream and memory writes, each checked against floating-point BT.601 (±1 code). Also the frame start and line drops. |
| `tb_clock_synchronizer`, `tb_control_registers` | The crossing with unrelated clocks, and the register map. |
| `tb_lf_decode`, `tb_vp422_444_dup`, `tb_ycrcb2rgb`, `tb_svga_timing_gen`, `tb_neg_edge_detect`, `tb_line_buffer` | The front-end pieces on their own. |

`tb/bt656_source.sv` is the stream model the system-level tests use. It
builds frames from a background colour, a wand rectangle and a speck. Edit
its parameters to try other frame sizes or pictures.
