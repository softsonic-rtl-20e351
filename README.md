# SoftSONIC thermal camouflage pipeline in SystemVerilog

SoftSONIC builds video hardware as a network of **Nodes** that pass
**packets** to each other through bounded FIFO buffers. Each Node has the
same outline: input buffers, an *engine wrapper* that decides when to start
and feeds the data, one or more *engines* that do the pixel arithmetic, and a
write port into the next Node's buffer. New functions only mean new engines.
The wrapper, buffers and links stay the same, and parallelism is a matter of
putting more engines in a Node.

This RTL implements that Node architecture in its HDTV configuration:
one-line packets of 1920 RGB pixels with 10 bits per channel, and two-packet
buffers built from eight 512x36 block RAMs. On top of it sits the six-Node
*thermal camouflage* video effect, which makes a semi-transparent object
visible as a refraction pattern. In simulation one full 1920x1080 frame
passes bit-exact against an independent model, with a line period of 1924
clocks. That is 64 frames/s at 133 MHz.

## The application

```
video in ─▶ Packet Source ──fg──▶ 3x3 Blur ──▶ 3x3 Sobel ──edge──────┐
              │   │   └──fg──▶ Image Differentiator ──diff───────────┼─▶ Lens Effect ─▶ Packet Sink ─▶ video out
              │   └──────bg──────────▲                                │
              └──────────fg──────────────────────────────────────────┘
```

* **Packet Source** (`packet_source`) takes a foreground and a background
  video stream, eight pixels per beat, and cuts them into line packets. It
  *forks* the foreground to three Nodes by writing each beat into three input
  buffers at once. It may start a beat only when all four destination
  buffers have room.
* **3x3 Blur** and **3x3 Sobel** are window Nodes. Together they give an edge
  strength image of the foreground.
* **Image Differentiator** gives |foreground − background| per channel.
* **Lens Effect** *joins* three streams. Where the difference is large
  (r+g+b above a threshold held in a configuration register), the output
  pixel is taken 0, 1 or 2 pixels to the left. The displacement grows with
  the edge strength. Elsewhere the foreground passes unchanged.
* **Packet Sink** (`packet_sink`) streams the finished lines out with line
  number, start-of-frame and end-of-line flags.

All links are point-to-point: a Node writes straight into its consumer's
input buffer, so one buffer is both the producer's output buffer and the
consumer's input buffer. The Node set, the one-line packets, the buffer
organisation and the point-to-point links follow the published SoftSONIC
application. Which Node feeds which, and the arithmetic of every kernel, are
this design's own reading of a one-sentence description. They are listed
below so you can change them.

## Packets and buffers

A buffer word is one 36-bit word from each of eight RAM banks. That makes
eight pixels per word, and eight pixels are read or written per clock. Each
pixel sits in bits 29:0 (`{r,g,b}`, 10 bits each), and bits 35:30 are written
as zero and ignored on read. A 1920-pixel line is 240 words. A
`packet_buffer` holds `SLOTS` = 2 packets. Slot *s* occupies bank addresses
`s*256 … s*256+255`, so the 512-word banks are exactly filled. While one
line is read the next can be written.

The packet header (`softsonic_pkg::pkt_hdr_t`, kept in a register per slot)
is this design's own layout:

| field | bits | meaning |
|---|---|---|
| `ptype` | 3 | `PKT_LINE`, `PKT_WINDOW`, `PKT_SCATTER`, `PKT_ADDR_DATA`, `PKT_META`; only `PKT_LINE` is produced |
| `sof` | 1 | first line of a frame |
| `line` | 11 | line number in the frame |
| `words` | 9 | payload length in buffer words |

Buffer protocol (`packet_buffer`, status kept by `s_box`):

* The **producer** waits for `wr_free`. It then writes words in any order
  (`wr_en`, `wr_addr` = word index) and pulses `wr_commit` with the header.
  The last write may share the commit clock.
* The **consumer** waits for `rd_avail`, reads `rd_hdr`, presents `rd_addr`
  and gets `rd_data` one clock later. It pulses `rd_release` when done.
* Writing to a full buffer and reading an empty one are *blocking*: they
  wait, and assertions flag a commit without `wr_free` or a release without
  `rd_avail`.

## Inside a Node: the engine wrapper

`softsonic_node` = N input `packet_buffer`s + `engine_wrapper` + `NUM_ENGINES`
× `node_engine`. The wrapper is the hardest part of the design.

**Firing rule.** The wrapper starts a packet only when every input buffer
holds a packet, the downstream buffer has a free slot and its engines are
idle (the previous packet has drained). All inputs are read at the same word
address. In the clock the last result word is written, the wrapper commits
the output packet, with the header of input 0, and releases every input
packet together.

**Serialisation.** With E engines (1, 2, 4 or 8), each 8-pixel word is served
in K = 8/E steps. A word address is issued at step 0 and held for K clocks.
Step *s* gives engine *j* the pixel at position *s·E + j*. The E results of
each step are collected, and the word is written after the last step. Every
step moves E pixels per clock.

**Pipeline**, counted from the clock a word address is issued:

| clock | what happens |
|---|---|
| +0 | address to the input buffers and line memories |
| +1 | data arrives and is latched (once per word); line memory written |
| +2 | engines take their E pixels and windows |
| +3 | engine results arrive and the word is written (last step) |

A packet of W words therefore takes W·K + 3 clocks from start to commit. The
wrapper then idles one clock before the next start, so a 1920-pixel line
takes 1920/E + 4 clocks.

**3x3 windows** (`WINDOW = 1`). The wrapper keeps the two previous lines of
input 0 in two line memories, each eight banks of 256x30. They form a
ping-pong pair: the line being read is also written into the memory that
holds line y−2, and the roles swap at each commit. The window rows y−2, y−1
and y are those two memories plus the incoming word. Across words, the last
two pixels of the previous word of each row are kept. An engine at pixel x
then sees pixels x−2, x−1 and x of the three rows, so parallel engines get
overlapping windows without extra reads. The window is **causal**: it is
centred on (x−1, y−1), so a 3x3 Node's output image is shifted one line down
and one pixel right. At the top and left edges the first line or pixel is
repeated (line numbers come from the header, and `line == 0` restarts the
window at every frame). The blur→Sobel path therefore delivers edges offset
by two lines and two pixels from the foreground that reaches the lens. The
lens rule tolerates this, but an application that needs aligned windows must
account for it. The current-row part of the window (x−2..x) is formed in
every mode, and the lens uses it for its displacement.

**Configuration registers (CRegs).** Each engine has one 16-bit register.
Writes arrive through the wrapper (`creg_we`, `creg_data`). The wrapper holds
a write and passes it on only while no packet is in flight, so every packet
is processed with one consistent value. The alpha blend resets to 512 (equal
mix) and the lens threshold to 64. The platform requires "CReg update rules"
but does not spell them out; this hold-until-idle rule is this design's
choice.

## Engine kernels (`node_engine`, parameter `KERNEL`)

One result per clock, one clock of latency. The arithmetic is this design's
own:

| kernel | output per channel |
|---|---|
| `K_INVERT` | 1023 − a |
| `K_DIFF` | \|a − b\| |
| `K_ALPHA` | (a·α + b·(1024−α)) >> 10, α = CReg clipped to 1024 |
| `K_BLUR` | weights 1 2 1 / 2 4 2 / 1 2 1, sum >> 4 (the "noise" or "blur" filter) |
| `K_SOBEL` | \|Gx\| + \|Gy\| with the usual 3x3 Sobel masks, saturated at 1023 |
| `K_LENS` | if r+g+b of b > CReg: a pixel d to the left, d = min((r+g+b of c) >> 9, 2); else a |

For the lens, a = foreground, b = difference and c = edge.

## Rates and sizes

| configuration | clocks per 1920-pixel line | at 133 MHz |
|---|---|---|
| `NUM_ENGINES = 1` (default) | 1924 | 64.0 frames/s |
| `NUM_ENGINES = 2` | 964 | 127.7 frames/s |
| 4 / 8 engines (per Node) | 484 / 244 | — |

Both top-level rows were measured in full-frame simulation. The engine-count
rows are exact cycle counts checked for all five kernels. The 4-clock gap
between packets costs 0.2 % at one engine and 1.6 % at eight. Removing it
would mean starting the next packet while the previous one drains. That
needs per-stage headers and a CReg pipeline, and is not done.

Memory: each input buffer uses eight 512x36 banks, and each 3x3 Node adds 16
line-memory banks. That gives 8 block RAMs for a one-input Node, 16 for a
two-input Node and 24 for a 3x3 Node.

**Deeper join inputs.** Every buffer holds two packets except the lens Node's
foreground and difference inputs, which hold four (`DEEP_MASK` on
`softsonic_node`, banks of 1024 words). Those two streams bypass the blur and
Sobel Nodes, whose edge line arrives two line times later. With two slots the
source stalls on them, and the line period grew by about half in simulation.
This departs from the uniform two-packet buffers of the original platform.

## What is not here

* **External memory (ZBT SRAM) interface.** On the original board the
  source and sink used external memory, and its 133 MHz limit set the clock.
  Here video enters and leaves as valid/ready streams of 8-pixel words.
* **Clock-domain crossing and arbitration in the status box.** The platform
  gives the S-box both jobs. Here every Node runs on one clock and each
  buffer side has a single user, so neither is built.
* **Channels, packet switch and bus links.** These are alternative ways to
  connect Nodes. This application uses point-to-point links only.
* **Engines that take several clocks per pixel.** The platform allows a
  pixel to take any number of clocks. Every engine here takes one pixel per
  clock with a fixed one-clock latency, and the wrapper's timing relies on
  that. A slower engine would need a ready/valid handshake in the wrapper.
* **A separate clock per Node.** All Nodes share one clock.
* **Non-line packets.** The header has type codes for windows, scattered
  pixels, address-data pairs and metadata (compressed data, audio), but only
  RGB 4:4:4 line packets are produced and understood. YUV formats are not
  handled.
* **Memory-server Nodes and random-access (address-data) packets.** The
  packet type code exists but nothing produces or consumes it.
* **Host side of the CReg interface.** The top exposes a plain write bus:
  `creg_we`, `creg_sel` (0 blur, 1 Sobel, 2 differentiator, 3 lens) and
  `creg_data`.

## Files

| `rtl/` | |
|---|---|
| `softsonic_pkg.sv` | pixel, header and kernel types; sizes |
| `bram_bank.sv` | one simple dual-port block RAM, 1-clock read |
| `s_box.sv` | buffer status: slot pointers, fill count, free/available |
| `packet_buffer.sv` | two-slot packet FIFO of eight banks |
| `node_engine.sv` | the kernels |
| `engine_wrapper.sv` | firing rule, sequencer, windows, CReg hold |
| `softsonic_node.sv` | input buffers + wrapper + engines |
| `packet_source.sv`, `packet_sink.sv` | video ↔ packets |
| `softsonic_top.sv` | the six-Node application |

Top parameters: `NUM_ENGINES` (1), `LINE_WORDS_P` (240, i.e. 1920 pixels) and
`FRAME_LINES_P` (1080). Smaller values give quick simulations, and
`LINE_WORDS_P` must stay ≤ 256. The top also brings out per-Node status:
busy, started a packet, blocked by a full downstream buffer, CReg applied.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. The
reference models are in `tb/softsonic_ref_pkg.sv`: integer versions of the
kernels and a whole-image Node model with explicit edge clamping. Example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/softsonic_pkg.sv tb/softsonic_ref_pkg.sv tb/tb_softsonic_top_full.sv \
    --top-module tb_softsonic_top_full
./obj_dir/Vtb_softsonic_top_full
```

| testbench | what it checks |
|---|---|
| `tb_s_box` | slot pointers, count and flags against a counter model |
| `tb_packet_buffer` | random-length packets written in random order, FIFO order, headers, full/empty blocking |
| `tb_packet_sink` | data and flags under random back-pressure; one word per clock when unblocked |
| `tb_packet_source` | fork to four buffers, foreground/background selection, headers, blocking |
| `tb_node_engine` | all six kernels against the model, CReg changes, latency |
| `tb_engine_wrapper` | blur×1, Sobel×2, lens×8, alpha×4 engines; latency W·K+3; CReg timing; stalls |
| `tb_softsonic_node` | complete Nodes fed through their buffers (diff, Sobel×4, invert×8) |
| `tb_kernel_nodes` | the five kernels × 1/2/4/8 engines on 1920-pixel lines, exact cycle counts |
| `tb_softsonic_top` | two small systems (1 and 2 engines), two frames each, input gaps, output back-pressure, a lens threshold change; counts every mechanism |
| `tb_softsonic_top_full` | one 1920x1080 frame at default parameters, bit-exact, line period ≤ 1924 clocks |
| `tb_softsonic_top_parallel` | the same with two engines per Node, line period ≤ 964 clocks |

The full-frame tests take a few seconds each with Verilator. Under
`verilator --lint-only -Wall` the design files give only warnings. These are
about unused package constants, unused bits (the spare RAM bits, header
fields a Node does not read) and status pins left open on purpose.
