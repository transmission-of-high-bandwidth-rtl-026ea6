# SLMC: a scalable multi-lane image link with real-time lossless compression

A camera or detector often produces pixels faster than one serial link can carry them.
This design attacks the bottleneck in two ways at once:

* **more lanes** – the image is cut into `N_LANES` horizontal stripes, and each stripe
  travels over its own serial transceiver (8 lanes by default);
* **fewer bytes** – each stripe is compressed losslessly, in real time, before it is
  framed and sent, and decompressed on the far side.

Both ends are plain synchronous logic meant for an FPGA: there is no processor and no
TCP/IP stack. The design follows the *Scalable Link Model with Compression* (SLMC). That
model splits each side into three layers:

| layer        | transmit side (camera)               | receive side (vision system)          |
|--------------|--------------------------------------|---------------------------------------|
| application  | memory, reader + divider, compressor | decompressor, writer + combiner, memory |
| transport    | controller (buffer, flow control)    | controller (buffer)                   |
| physical     | frame generator, transmitter device  | receiver device, frame checker        |

The transmitter and receiver devices are the usual PCS + PMA pair. The PCS does the
8b/10b line code. The PMA does the serializer / deserializer.

## Data path

```
 camera ─► tx_frame_memory ─► mem_reader_divider ─┬─ lane 0 ─► rle_compressor ─► tx_controller ─► frame_generator ─► tx_device ─► tx_serial[0]
  (linear writes)   (bank k = stripe k)            ├─ lane 1 ─► ...
                                                   └─ lane 7 ─► ...

 rx_serial[k] ─► rx_device ─► frame_checker ─► rx_controller ─► rle_decompressor ─┐
                                                                                   ├─► writer_combiner ─► rx_frame_memory ─► host
                                                         (other lanes) ───────────┘   (bank k = stripe k)    (linear reads)
```

`slmc_top` holds both ends. The serial lines are its ports (`tx_serial`, `rx_serial`):
the cable, the line drivers and the pads lie outside the logic. Connect
`rx_serial = tx_serial` for a loop-back, as the testbenches do.

The lanes are fully independent. Each lane carries one complete stripe: its own frames,
its own sequence numbers and its own end-of-image marker. So there is no lane-to-lane
deskew. Each stripe lands in its own bank of the receive memory, and this placement is
how the "combiner" rebuilds the image.

The two ends share clocks, reset and the serial lines, and nothing else. So each end
has its own go signal. On the receive side, the host pulses `rx_arm` to prepare for the
next image. This clears the sequence numbers, the error counters, the pixel counts and
`image_done`. On the transmit side, `start` then sends the image held in the transmit
memory. `image_done` rises once every lane has delivered its whole stripe.

## Clocks

* `clk` – the system clock for all of the logic, 125 MHz in the reference configuration.
  Each lane moves one 8-bit character per `clk`, which is 1 Gb/s of payload per lane and
  8 Gb/s for eight lanes.
* `clk_ser` – the bit clock of the serializers and deserializers. An 8b/10b symbol has
  10 bits, so it must run **10× `clk`** (1.25 GHz). The source quotes a 1 GHz fast clock.
  That figure equals the 8-bit payload rate, not the 10-bit line rate.

The two clocks must be phase-locked, with `clk_ser` exactly 10× `clk`. The design relies
on this in two places:

* The serializer reloads its shift register once every 10 bit times from the encoder's
  register. That register is stable for a whole `clk` period, so each code is taken
  exactly once, whatever the phase.
* The deserializer copies each aligned code into a holding register that changes once
  per `clk` period. The receive logic samples it on every `clk` edge. With an
  independent recovered clock, a phase-compensation FIFO would be needed here; none is
  built.

Reset is a single active-low asynchronous `rst_n` for both domains.

## Compression: run-length tokens

The source asks for a lossless coder that keeps up with the pixel stream, but it does not
name an algorithm. This design uses **run-length coding**. Each run of equal pixels
becomes a token `{count, value}`, and a `count` of 1..255 goes out as two bytes: count,
then value.

* `rle_compressor` takes one pixel per clock. A token is emitted when a different pixel
  arrives, or when a run reaches 255. The final run is flushed after the last pixel and
  carries a `last` flag.
* The compression ratio runs from 0.5 (no two neighbouring pixels equal, 2 bytes per
  pixel) to 127.5 (255 pixels in 2 bytes). Both published ratio ranges, 0.9–15.9 and
  7.5–126.8, lie inside these bounds.
* When the data does not compress (ratio < 1), the link, at one byte per clock, is slower
  than the core. The transport buffer fills, and its `ready` signal **stalls** the
  compressor and the memory reader of that lane only.

`rle_decompressor` turns each token back into `count` pixels, one per clock.

### Why the receive buffer is large (512 bytes)

A run is coded only **after** its last pixel has been read, but it is expanded only
**after** its token has arrived. The receiver therefore trails the transmitter by up to
one full run. While it writes out a 255-pixel run, the bytes that follow it keep
arriving at up to one per clock. The link cannot be paused, so they must be buffered. The
buffer must hold about 255 bytes plus framing and the transmit buffer's backlog.
`RX_FIFO = 512` covers this.

With a 64-byte buffer, the full-size test overflows: a long run followed by incompressible
pixels does it. If a byte finds the buffer full, it is dropped and the lane's sticky
`overflow` flag is set.

## Frames on a lane

`frame_generator` sends one character per clock: `tx_k = 1` marks a control character.
`frame_checker` reads the same characters after decoding.

| character   | meaning                                                                 |
|-------------|-------------------------------------------------------------------------|
| K28.5       | idle. At least `MIN_GAP` = 4 between frames. Also the comma the deserializer aligns on |
| K27.7       | start of frame                                                          |
| D (byte)    | lane number                                                             |
| D (byte)    | sequence number, 0 at image start, +1 per frame                         |
| D ...       | payload: up to `MAX_PAYLOAD` = 256 bytes of the token stream            |
| K23.7       | fill: sent inside a frame when the transmit buffer is momentarily empty; dropped by the receiver |
| D (byte)    | checksum: 8-bit sum of the payload bytes                                |
| K29.7/K28.0 | end of frame; K28.0 marks the last frame of the stripe                  |

The checker cannot tell that a data byte is the checksum until the end delimiter arrives.
So it holds each data byte for one clock and forwards it only when the next data byte
comes. At the delimiter, the held byte is compared with the running sum.

The checker counts, per lane (`lane_status_t` in `slmc_pkg`):

* good frames;
* checksum errors;
* header errors: wrong lane number or sequence;
* frame errors: a control character inside a frame;
* code or disparity errors.

It also reports alignment and end-of-image. The data is not retransmitted: errors are
reported, not corrected.

## 8b/10b transceiver

* `enc_8b10b` uses the standard 5b/6b and 3b/4b tables with running disparity, including
  the alternate D.x.A7 code and the control characters K28.0–7, K23.7, K27.7, K29.7 and
  K30.7.
* Symbol bit 9 is bit `a`, the first bit on the line.
* `dec_8b10b` looks up both sub-blocks without regard to polarity. It re-reads the 4-bit
  block after K28 in the 6-bit block's polarity, which separates K28.1 from K28.6 and
  K28.2 from K28.5. It flags codes outside the table (`code_err`) and sub-blocks whose
  disparity has the wrong sign (`disp_err`).
* `deserializer` searches every bit position for a full K28.5 symbol of either disparity.
  It sets the word boundary there and raises `aligned`. The frame generator sends idles
  after reset and between frames, so the lanes align before any data.

## Time measurement

Three `perf_timer` instances count `clk` cycles between a start trigger and an end
trigger:

* **compression time** – from the first pixel taken by any core until the last token of
  every lane has entered its transport buffer;
* **transmission time** – from the first payload byte taken from any transport buffer
  until the last end delimiter of every lane has been encoded and loaded into its
  serializer, i.e. is going out on the line (two clocks after the frame generator
  issues it);
* **execution time** – from the first of these starts to the last of these ends.

The end triggers use a per-lane "seen" register, so a timer stops one clock after the
last lane finishes. At 125 MHz one cycle is 8 ns. The pixel rate is
`IMG_W*IMG_H / (exec_cycles * 8 ns)`.

A fourth counter, `comp_bytes`, adds up the compressed image size: 2 bytes for every
token that enters a transport buffer, over all lanes. The compression ratio is then
`IMG_W*IMG_H*PIX_W/8 / comp_bytes`.

## Files

| file | role |
|------|------|
| `rtl/slmc_pkg.sv` | control-character codes, token and lane-status types |
| `rtl/slmc_top.sv` | both ends of the link, timers |
| `rtl/tx_frame_memory.sv`, `rtl/rx_frame_memory.sv` | banked image memories (linear camera/host port, one port per lane) |
| `rtl/mem_reader_divider.sv` | reads bank k as the pixel stream of lane k |
| `rtl/rle_compressor.sv`, `rtl/rle_decompressor.sv` | run-length coder and expander |
| `rtl/tx_controller.sv`, `rtl/rx_controller.sv` | transport buffers (token FIFO and byte FIFO), byte packing |
| `rtl/sync_fifo.sv` | FIFO used by both controllers |
| `rtl/frame_generator.sv`, `rtl/frame_checker.sv` | framing, checking, header removal |
| `rtl/enc_8b10b.sv`, `rtl/dec_8b10b.sv` | PCS |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | PMA |
| `rtl/tx_device.sv`, `rtl/rx_device.sv` | PCS + PMA of one lane |
| `rtl/writer_combiner.sv` | receive-side memory writer; image-complete flag |
| `rtl/perf_timer.sv` | start/end-trigger cycle counter |

## Parameters of `slmc_top`

| parameter | default | origin |
|-----------|---------|--------|
| `N_LANES` | 8 | from the source (eight transceivers in parallel) |
| `IMG_W` × `IMG_H` | 256 × 256 | derived from the published mean pixel rate × execution time (≈ 65,800 pixels) |
| `PIX_W` | 8 | greyscale; bit depth chosen here |
| `MAX_PAYLOAD` | 256 bytes | chosen here |
| `TX_FIFO` | 16 tokens | chosen here |
| `RX_FIFO` | 512 bytes | chosen here, sized by the run-length lag above |

`IMG_W*IMG_H` must be a multiple of `N_LANES`. Each bank then holds `IMG_W*IMG_H/N_LANES`
pixels, which should be a power of two for the cheapest address decode. Any lane count
from 1 up works; 1, 2, 4 and 8 are simulated.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself; a watchdog
fails it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/slmc_pkg.sv tb/tb_slmc_top.sv \
          --top-module tb_slmc_top -Mdir obj_top
./obj_top/Vtb_slmc_top
```

Other modules are found through `-Irtl` / `-y rtl`. Replace the testbench name to run
another one. `--assert` turns on the handshake assertions in the RTL: a stalled token or
pixel must hold still, and no FIFO may be read while empty.

| testbench | covers |
|-----------|--------|
| `tb_slmc_top` | whole design at default size: 256×256 image over 8 lanes, pixel-exact comparison, frame counts, error counters, timing bounds; stall, fill, run-limit split and multi-frame split each must occur (≈1 s) |
| `tb_slmc_workloads` | whole design at default size, four greyscale images sent one after another (flat, CT-like phantom, ramp, noise): per-lane token counts against a reference coder, frames, errors, every pixel, timing bounds; prints the compression ratio, times and pixel rate of each (≈3 s) |
| `tb_slmc_scaling` | the same two full-size images over 1, 2, 4 and 8 lanes: every pixel, no lane errors, each doubling of lanes ≥ 1.9× faster, 8 lanes ≥ 7.5× faster than one (≈4 s) |
| `tb_slmc_top_errors` | 2 lanes, 32×32: clean run; one inverted line bit must be reported on its lane only; an 8-byte receive buffer must overflow; a later clean run must come out exact with cleared counters |
| `tb_enc_dec_8b10b` | known table symbols at both disparities, round trip of all characters, DC balance, run length ≤ 5, invalid-code flag |
| `tb_serdes` | MSB-first line order, comma alignment from an arbitrary phase, every code once and in order |
| `tb_tx_rx_device` | one lane, character in → character out; line bit error detected |
| `tb_frame_generator`, `tb_frame_checker` | frame layout, sizes, sequence, checksum, fills, every error counter |
| `tb_rle_compressor`, `tb_rle_decompressor` | tokens against a reference coder, 1 pixel/clock, run limit, last flags |
| `tb_tx_controller`, `tb_rx_controller` | byte order, back-pressure, overflow flag |
| `tb_mem_reader_divider`, `tb_writer_combiner`, `tb_tx_frame_memory`, `tb_rx_frame_memory`, `tb_perf_timer` | addressing, throughput, done flags, trigger arithmetic |

### What the link achieves

At the default size and 125 MHz, `tb_slmc_workloads` reports:

| image | compression ratio | compression time | transmission time | execution time | pixel rate |
|-------|------------------:|-----------------:|------------------:|---------------:|-----------:|
| flat | 124.1 | 65.6 µs | 63.5 µs | 65.6 µs | 1.00 Gpixel/s |
| phantom | 44.0 | 65.6 µs | 65.4 µs | 65.6 µs | 1.00 Gpixel/s |
| ramp | 1.00 | 68.1 µs | 68.4 µs | 68.5 µs | 0.96 Gpixel/s |
| noise | 0.50 | 135.6 µs | 135.8 µs | 135.9 µs | 0.48 Gpixel/s |

Two limits set these numbers. The first is the cores: 8 cores × 1 pixel/clock, so
8,192 clocks (65.5 µs) per image. The second is the lanes: each lane sends 1 byte/clock,
and a run costs 2 bytes. Compressible images are core-bound, and the link then idles on
fill characters. Images whose runs average 2 pixels or fewer are link-bound, and then
the cores stall.
Both limits grow with the lane count, so the execution time falls in proportion.
`tb_slmc_scaling` measures, for 1, 2, 4 and 8 lanes, 524 / 262 / 131 / 65.6 µs on the
phantom and 1090 / 545 / 272 / 136 µs on noise. That is 8.0× from one lane to eight.
In this design, compression and transmission overlap almost completely, so the
execution time is close to the larger of the two. The source reports ratios of 0.9 to
15.9 and 7.5 to 126.8 on its medical images, and 0.436 to 1.05 Gpixel/s. The test images
here are synthetic stand-ins, not those images. The source's top rate, 1.05 Gpixel/s, is
slightly above this design's ceiling of 1.0 Gpixel/s (8 cores at 125 MHz).

## How far to trust it, and where it departs from the source

Follows the source:

* the three-layer split and the block list of each side;
* eight parallel lanes;
* 8b/10b coding in the PCS;
* the serializer and deserializer with a slow parallel clock and a fast serial clock;
* the receive path's 8-bit data plus 1-bit control flag, read by the frame checker;
* header removal;
* splitting the image into sub-images that are compressed in parallel;
* start/end-trigger timers for compression and transmission time.

Chosen here, because the source leaves them open:

* run-length coding as the compression algorithm;
* the frame format and control-character assignment;
* checksum rather than CRC;
* banked memories and stripe geometry;
* buffer depths, image size and pixel width;
* valid/ready handshakes;
* comma alignment;
* the 10:1 locked clock ratio;
* the exact trigger points of the timers;
* the third (execution-time) timer;
* the separate go signals of the two ends (`start`, `rx_arm`).

Not built:

* Protocol-specific transceivers. The source mentions several (a low-voltage serial
  variant, Gigabit Ethernet, Serial RapidIO) at line rates up to 3.125 Gb/s. Here, one
  generic 8b/10b lane stands for all of them. The other rates need only different
  clocks.
* The PMD, pads, cables and PLLs.
* Serving several receiving applications in separate domains, which the source mentions
  only in passing.
* Retransmission or any recovery beyond counting errors.
* A phase-compensation buffer for truly independent receive clocks.

Verification is by simulation only. Nothing here has been run on an FPGA or timed by a
synthesis tool.
