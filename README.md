# RGB 5:6:5 video compression and decompression cores

Computer-vision pipelines on an FPGA often run out of on-chip RAM before they
run out of logic. The RAM goes on line buffers, which hold a few full lines
of video for each convolution. This design shrinks that storage with the
simplest compression that keeps the stream fully pipelined. Every 24-bit
RGB 8:8:8 pixel is quantised to a fixed 16-bit RGB 5:6:5 word before it is
stored, and expanded back to 24 bits when it is read. The stored size is
then two thirds of the original. Each core costs one register stage, moves
one pixel per clock, and never changes the rate of the stream.

The compression ratio is fixed, so every encoded pixel has the same size.
That is what keeps the cores pipelineable: a buffer sized for one line of
compressed pixels always holds exactly one line. Variable-length coders such
as LZW can compress further, but their output size depends on the data. On
raw camera images they can even make the file larger.

## The pixel format

Pixels travel as 24-bit AXI4-Stream video words:

| bits  | 23:16 | 15:8  | 7:0  |
|-------|-------|-------|------|
| field | red   | green | blue |

**Compression** keeps the most significant 5 bits of red, 6 of green and 5 of
blue. It packs them red-green-blue from the top of a 16-bit word:

| encoded bits | 15:11 | 10:5  | 4:0  |
|--------------|-------|-------|------|
| taken from   | 23:19 | 15:10 | 7:3  |

Green keeps the extra bit because the eye is most sensitive to variations in
green.

**Decompression** puts the kept bits back on top of each channel. It fills
each channel's dropped bits with the middle of their range: `100` under red
and blue, `10` under green. So a red value `rrrrr` comes back as `rrrrr100`.
The most common value of the dropped bits in real images may be `000`, but
`100` sits halfway between `000` and `111`. It therefore bounds the error
symmetrically:

* red and blue are at most 4 away from the original (out of 255),
* green is at most 2 away.

For uniformly distributed data, the mean absolute error per channel is 2, 1
and 2 codes. The average error per pixel, mean(|dR|+|dG|+|dB|)/3/256, is
therefore 0.65 %. On synthetic 1920x1080 frames the testbench measures
0.651 % for noise, 0.651 % for smooth gradients and 0.716 % for flat colour
fields. Flat areas such as a clear sky are where the quantisation becomes
visible, as slight banding.

## Where the cores sit

The video path this design was built for is an HDMI pass-through on a
Zynq-7000 board:

```
HDMI in -> DVI to RGB -> video in to AXI-Stream -> VDMA (frame buffer)
        -> rgb_compress -> rgb_decompress
        -> AXI-Stream to video out -> RGB to DVI -> HDMI out
```

Everything except the two cores is vendor IP. That includes the VDMA, which
is configured, together with the video timing controllers, by the ARM
processing system. This repository contains only the two cores and the top
level that chains them. In the pass-through the encoded words go straight
from one core to the other, so the output shows exactly the loss that
buffering in 5:6:5 would cause. In a real vision pipeline, a line buffer of
16-bit words sits between the two cores. The top brings the encoded stream
out on the read-only `enc_*` ports so that it can be observed there.

## Handshake and timing

Both cores use the same AXI4-Stream video interface on both sides:

| signal   | meaning |
|----------|---------|
| `tdata`  | pixel (24 bits) or encoded word (16 bits at the default split) |
| `tvalid` | source offers a word |
| `tready` | sink takes it; a word moves on a clock edge where both are high |
| `tuser`  | start of frame, set on the first pixel of a frame |
| `tlast`  | end of line, set on the last pixel of each line |

The clock is the pixel clock, `aclk`. The reset, `aresetn`, is active low and
synchronous.

Each core is a single output register. A word accepted on a rising edge is
presented on the output from that edge on. `tuser` and `tlast` travel in the
same register as the data. The input ready is

```
s_axis_tready = !m_axis_tvalid || m_axis_tready
```

so a core takes a new word whenever its register is empty or being emptied.
This gives:

* one clock of latency per core, two for `video_codec_top`;
* one pixel per clock sustained, so 3 bytes per clock. At a 134 MHz pixel
  clock that is 402 MB/s into the compressor and 268 MB/s of encoded words;
* backpressure that passes combinationally from `m_axis_video_tready`
  through both cores to `s_axis_video_tready`. This path is short, two gates
  per core. If a longer chain needs it cut, replace the output register with
  a two-entry skid buffer.

Each core asserts the AXI4-Stream rule for its source: a word offered and
not taken stays offered, and unchanged, until it is taken.

## Files

| file | contents |
|------|----------|
| `rtl/vcodec_pkg.sv` | channel width, default kept bits (5/6/5), pixel structs, `fill_value()` |
| `rtl/rgb_compress.sv` | compression core, 24 -> 16 bits |
| `rtl/rgb_decompress.sv` | decompression core, 16 -> 24 bits |
| `rtl/video_codec_top.sv` | top: compressor chained into decompressor |
| `tb/tb_rgb_compress.sv` | sweeps every value of each channel, then random pixels |
| `tb/tb_rgb_decompress.sv` | all 65536 encoded words |
| `tb/tb_video_codec_top.sv` | three full 1920x1080 frames end to end, at the default parameters |
| `tb/tb_video_codec_widths.sv` | splits 6:6:4, 4:4:4 and 8:8:8 through the top |

### Parameters

`R_BITS`, `G_BITS` and `B_BITS` set how many bits of each channel are kept.
They default to 5, 6 and 5, and each may be 1 to 8. The encoded width is
their sum. The same values must be given to both cores; `video_codec_top`
passes its own values down. For n dropped bits, the fill value is a one
followed by n-1 zeros, which is the midpoint rule in general form. A channel
that keeps all 8 bits passes through unchanged. Use other splits to move the
loss between channels, for example 6:6:4 when blue matters least in the
imagery.

## What the tests check

Every testbench checks each output word against a value worked out
arithmetically rather than by bit slicing: `floor(v/8)*8 + 4` for red and
blue, and `floor(v/4)*4 + 2` for green. Each also checks:

* the sideband bits;
* that a stalled output is held;
* that the latency and the one-pixel-per-clock rate hold at full rate.

The end-to-end test, `tb_video_codec_top`, streams three 1920x1080 frames,
about 7.8 million clocks, in a few seconds. It checks every encoded word,
every reconstructed pixel and the per-channel error bounds. For each frame
it also checks that the average error per pixel is below 1 %. It counts
output stalls, source gaps, input backpressure, frame starts and line ends.
It fails if any of these never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/vcodec_pkg.sv rtl/rgb_compress.sv rtl/rgb_decompress.sv \
  rtl/video_codec_top.sv tb/tb_video_codec_top.sv \
  --top-module tb_video_codec_top
./obj_dir/Vtb_video_codec_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. For a unit
test, use the package, the one core and its testbench.

## Design decisions not fixed by the scheme

The quantisation, the 5:6:5 split, the bit positions, the mid-range fill
values and the one-clock compression come from the scheme itself. The
following are choices made in this RTL:

* the exact AXI4-Stream signal set, including `tuser`/`tlast` being carried
  through;
* the single output register, with its combinational ready path, in each
  core;
* a one-clock decompression stage to match the compressor;
* the synchronous active-low reset;
* the width parameters;
* the `enc_*` observation port.

The surrounding vendor IP (HDMI/DVI conversion, VDMA, video timing, the
processor) and the line buffer of the target application are not part of
this RTL. The RTL has been simulated but not run on an FPGA. Timing closure
at 134 MHz is therefore not demonstrated, though the logic per stage is only
wiring and one register.
