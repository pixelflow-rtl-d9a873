# PixelFlow image-composition system in SystemVerilog

## The idea

PixelFlow renders a picture by splitting the *scene*, not the screen. Each of
many rendering boards draws its own share of the polygons over the whole
screen, each with its own z-buffer. The partial images are then merged by a
fast pipeline of compositors that runs through all the boards. Each
compositor keeps, pixel by pixel, whichever of two pixels is nearer. The
merged image falls off the end of the pipeline into a frame buffer. Shader
boards can sit in the same pipeline: they load the merged region, shade it,
and send it on.

The screen is handled one *region* at a time, 160 x 128 pixels. That is the
size of the SIMD array of 80 Enhanced Memory Chips (EMCs) on every board. A
board renders a region into EMC memory, copies it to a transfer buffer, and
takes part in one network *transfer*. During the transfer every board clocks
its region out bit-serially, in lock step with all the others. Because z is
sent first and MSB first, each compositor can decide which pixel is nearer
as the bits go by, with no buffering.

This repository holds synthesizable RTL for the composition network, the
rasterizer side of a renderer/shader board, and the frame-buffer input. It
also has a self-checking testbench for every block and for the whole
system.

## Parts and files

| part | file | role |
|---|---|---|
| shared types | `rtl/pf_pkg.sv` | sizes, command encodings, compositor modes, helper functions |
| compositor | `rtl/compositor_chip.sv` | per-chip bit-serial z-compare, load/forward and unload on 2 wires |
| ready/go | `rtl/ready_go_ctrl.sv` | the per-board token chain that starts all boards' transfers together |
| sequencer | `rtl/comp_sequencer.sv` | configuration register, transfer timer, bit phase for compositors and EMC port |
| EMC | `rtl/emc.sv` | a 16x16-pixel SIMD memory with linear-expression evaluator and transfer port |
| IGC | `rtl/igc.sv` | turns rendering/copy commands into EMC instruction sequences |
| command FIFO | `rtl/sync_fifo.sv` | the RFIFO and TFIFO of control words |
| stream parser | `rtl/stream_parser.sv` | DMA of command blocks from VRAM; the region semaphores |
| GP registers | `rtl/gp_regs.sv` | status/command registers and the 16-bit synchronization timer |
| board | `rtl/rs_board.sv` | one renderer/shader board: all of the above with 80 EMC/compositor pairs |
| demultiplexer | `rtl/fb_demux.sv` | frame-buffer first stage: 80 MHz wire pairs to 40 MHz 2-bit pairs |
| corner turner | `rtl/corner_turner.sv` | frame-buffer second stage: bit-serial pixels to parallel colour words |
| frame buffer | `rtl/fb_board.sv` | frame-buffer board input: ready/go, sequencer, 80 demuxes, 10 corner turners |
| system | `rtl/pixelflow_top.sv` | `NUM_BOARDS` boards in a line, with the frame buffer at the end |

## Composition network

The network is 160 wires wide (two per compositor chip) and runs at 80 MHz.
Every board has 80 compositor chips. Chip *e* carries the region's tile
number *e*: tile column e/8, tile row e%8 of a 10 x 8 grid of 16 x 16
tiles. Each wire carries half of the tile's 256 pixels, one bit per
cycle. A pixel is a 64-bit word (z in the upper 32 bits, colour in the
lower 32) or a 128-bit word. So a transfer lasts 128 x 64 = 8,192 cycles
(102.4 us), or 16,384 cycles for 128-bit pixels. Every hop is registered.
The stream therefore moves one board per cycle, and the go token keeps
pace with it.

## Compositor modes

`compositor_chip` has four modes, chosen per board and per transfer:

* **Composite.** Compare the upstream bit with the local bit from the EMC
  port. At the first bit that differs, the stream holding the 0 (the
  smaller z) becomes the winner for the rest of the pixel. Until then the
  bits are equal, so either one can be sent.
* **Load/Forward.** Pass the stream on unchanged, and optionally write it
  into the EMC transfer buffer. This is the configuration's port-write bit.
* **Unload.** Replace the stream with the local pixels.
* **Idle.** Send zeros. This is the reset state, and this design's own
  addition.

The EMC port delivers two bits of each of two pixels every 40 MHz cycle. The
compositor splits them into consecutive 80 MHz cycles (`phase`). When
loading, it collects the two incoming bits and writes them back as a pair.

## Ready/go and the sequencer

Every board has to start its transfer on the same pixel, delayed by its
position in the line. `ready_go_ctrl` implements the token chain:

* ReadyOut = ReadyIn AND the board's own XferReady. It runs upstream from
  the frame buffer.
* The master board raises GoOut when ReadyIn and its own XferReady are both
  true. Slaves pass Go downstream, one register per board.
* Go reaching a board becomes its XferGo.

`comp_sequencer` waits `START_DLY`+1 cycles after XferGo rises, then holds
XferEnab for exactly one transfer. The configuration register is
{master, port write, mode} and is loaded by `IGC_COMP_CONFIG`. The
length (64 or 128 bits) is loaded by `IGC_COMP_LEN`.

## Renderer/shader board (`rs_board`)

The graphics processor writes control words {VRAM address, length} to two
FIFOs:

* the **RFIFO**, for rendering;
* the **TFIFO**, for copy and transfer commands.

The stream parser fetches the command blocks from VRAM. The command class
(3 bits of the instruction word) tells it how many coefficient words follow.
It hands whole commands to the IGC. Three semaphores decouple rendering
from the network:

* **BuffCnt** counts rendered regions. It is raised by `IGC_REGION_DONE`
  and lowered by `IGC_REGION_XFER`.
* **BuffWait** stops rendering when all four region buffers are full.
* **XferWait** stops transfer commands from XferReady until XferGo falls.

The parser chooses between the streams again at every command boundary. A
long rendering block is therefore suspended as soon as a transfer can go,
and resumed afterwards.

The IGC issues one EMC instruction per rendering command. For a copy it
issues two per bit (read into the carry, write from the carry). The EMC
evaluates A*x + B*y + C for every pixel at once and supports these
instructions:

* set enables;
* enable where the tree value is >= 0;
* enable where the tree value is < a memory field (the depth test);
* load the tree into a field;
* add the tree to a field;
* bit-level carry read/write.

`gp_regs` provides the board's status register, the write-only command
register, and the synchronization timer. The timer is 16 bits, counts
every 50 ns (every 4 cycles) and interrupts on overflow.

## Frame buffer (`fb_board`)

The frame-buffer board sits at the end of the line and takes part in the
ready/go protocol like any board. First, 80 `fb_demux` units turn each
wire pair into 2-bit pairs at 40 MHz. They also forward the original stream
(registered), so more frame buffers could follow. Then 10 `corner_turner`s,
each serving 16 wires, collect bit-serial pixels into 32-bit colour words.
The z half is dropped. Each corner turner writes one word every 4 cycles
(20 MHz) to its DRAM bank. The bank address is

    {buffer, screen y (10 bits), region column (3 bits), x within tile (4 bits)}

That gives a double-buffered 1280 x 1024 screen of 8 x 8 regions. The
controller's decisions are inputs sampled when Go arrives: whether to store
the region, where it goes, and when to swap buffers.

## Parameters

All defaults are the full system:

* 40 boards (36 renderers + 4 shaders);
* 80 EMCs per board, 256 pixels of 512 bits each;
* 1,024-entry FIFOs;
* 4 region buffers;
* 8,192 / 16,384-cycle transfers;
* a timer divide of 4.

`START_DLY` (2) is this design's own choice. The source gives no number.

## What follows the source and what is this design's own

The source material describes:

* the network width and clocking;
* the bit-serial z-first comparison;
* the modes;
* the ready/go chain;
* the transfer lengths;
* the FIFO sizes and control-word range;
* the semaphore algorithm;
* the 4 region buffers;
* the timer;
* the frame buffer's demultiplex/corner-turn structure and 20 MHz port rate.

This design's own choices are:

* all bit-level encodings: commands, the configuration register, status
  bits, DRAM addresses;
* the tile placement and pixel order;
* the Idle mode;
* the extra BuffCnt > 0 condition before taking TFIFO commands;
* registering Go per board;
* EMC arithmetic done word-wide on 32-bit integer coefficients instead of
  bit-serially from floating point;
* a reduced EMC instruction set;
* a hard-wired IGC instead of a microcoded one.

These parts are not built: the i860 processors and their VRAM and memory
controllers, the message ring network, the host interface, the DRAM and
video output, the salphasic clock tree, and the backplane. Their
connections are module ports.

## Testbenches

Every `tb/tb_<module>.sv` is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run any of them with
Verilator. The package is named first and `-y rtl` finds the modules, for
example:

    verilator --binary --timing -Wno-fatal -y rtl --top-module tb_rs_board \
        rtl/pf_pkg.sv tb/tb_rs_board.sv
    obj_dir/Vtb_rs_board +verilator+rand+reset+2

The last option starts every uninitialised variable at a random value. The
testbenches are written to pass under that.

* `tb_pixelflow_top` is the end-to-end test. It uses 2 renderers and 1
  shader, 8 chips each, and the frame buffer. It runs six transfers:
  composite-and-load into the shader, then burps where the shader unloads
  the shaded region to the frame buffer while the renderers idle. It checks
  every stored pixel. It also counts each mechanism and fails if any never
  occurs: loads, burps, unloads, BuffWait stalls, pre-emption, mode
  changes, ready waits, XferWait holds, buffer swaps.
* `tb_pixelflow_full` uses the top with its default parameters: 40 boards
  of 80 chips each. Every board renders a plane over the whole region, and
  all 40 are composited in one transfer. Each of the 20,480 stored words
  must be the nearest plane's colour, written exactly once. It passes
  (41,002 checks). The simulation itself takes about 20 s, but Verilator
  generates about 250 MB of C++ for 3,200 EMCs. Building that takes about
  9 minutes with four parallel compile jobs, and more than 10 minutes with
  two. The largest size whose build and run both fit in 10 minutes on a
  small machine is the end-to-end test above: 3 boards of 8 chips, plus
  the frame buffer. Each block's testbench runs the block at full size,
  except the renderer/shader board (8 chips, 16-entry FIFOs) and the
  frame-buffer board (16 chips).
