# SONIC: plug-in processing elements for video — SystemVerilog model

SONIC is a reconfigurable accelerator board for video image processing. It is built around
the way image applications are extended with software plug-ins: the application hands a
plug-in an image and takes a processed image back. On SONIC, each plug-in's hardware runs in
a **PIPE** (Plug-In Processing Element), and several plug-ins, even from different
applications, run side by side in different PIPEs.

The central idea is to separate *computing* from *moving and formatting data*. Each PIPE has
three parts:

* the **PIPE Engine (PE)** holds the plug-in's logic. It sees only a plain pixel stream in
  (PIPEFlow In) and produces a pixel stream out (PIPEFlow Out);
* the **PIPE Router (PR)** is set up by the host. It decides where the stream comes from: its
  own memory, the previous PIPE, or a shared input bus. It decides where the results go. It
  chooses the order in which the image is scanned, and it can convert the pixel format the
  engine sees;
* the **PIPE Memory (PM)** is a 1M x 32 frame store.

So the same engine design can filter an image row by row, and then column by column, without
knowing the difference. It can work on its own from its memory, or sit inside a chain of
PIPEs. This repository models the SONIC-1 board in synthesizable SystemVerilog: the local bus
controller, eight PIPEs, and the buses between them. Every engine holds the SONIC paper's
example plug-in, a 1-D FIR filter.

The model follows the architecture and the numbers given in the SONIC paper by Haynes, Cheung,
Luk and Stone (SONIC-1). Where the paper gives only a block's function, the logic here is a
straightforward design of this implementation's own. The sections below say which is which.

## Board structure

```
             host port (PCI bridge local side)        video stream in/out
                          |                                  |
                  +-------+----------------------------------+------+
                  |                  lbc                            |
                  +--+-----------+-----------------+-----------+----+
   PIPE bus (AD[31:0], AS, WR, DS, RDY)      selects / irq   PIPEFlow Start ->  <- PIPEFlow End
                     |           |                 |           |                 ^
        +------------+--+  +-----+---------+       |     +-----+---------+       |
 chain->| Left  PIPE 0  |->| Left  PIPE 1  |-> ... |  -> | Left PIPE 7   |-> chain out
  in    |   PR  PE  PM  |  |   PR  PE  PM  |             |   PR  PE  PM  |
        +------+--------+  +------+--------+             +------+--------+
               +------------------+---- End (wired OR) ---------+
```

* `sonic_top` has `NPIPES` = 8 PIPEs (SONIC-1 has 8 slots).
* The **PIPE bus** is shared by all PIPEs. It carries image transfers into and out of the
  memories, plug-in parameters, and router set-up.
* Each PIPE has its own select lines (PR, PM, PE) and an interrupt line.
* **PIPEFlow** buses carry pixel streams. The Right output of PIPE *i* drives the Left input of
  PIPE *i+1*. The Start bus goes from the LBC to every PIPE. The End bus is the OR of all
  PIPEs' End outputs, and only the PIPE routed to End drives it (an assertion checks this).
* The two open ends of the chain are top-level ports.

## PIPEFlow: the pixel stream

A pixel is 32-bit RGBa: R in [31:24], G in [23:16], B in [15:8], alpha in [7:0]. A PIPEFlow
bus is 19 bits wide, 16 data bits and 3 control bits, so a pixel takes two clocks: RG first,
then Ba. The widths and the RG/Ba split follow the paper. The control-bit meanings are this
design's own:

| beat | data | ctrl[0] | ctrl[1] (phase) | ctrl[2] (mark) |
|------|------|---------|-----------------|----------------|
| first | {R,G} | 1 | 0 | first pixel of a scan line |
| second | {B,a} | 1 | 1 | last pixel of the image |
| idle | 0 | 0 | 0 | 0 |

`pipeflow_tx` sends pixels at up to one pixel per two clocks, with registered outputs.
`pipeflow_rx` rebuilds a pixel one clock after its second beat. It flags a second beat that
arrives without a first one.

**Rates.** The clock is 33 MHz. The PM moves one 32-bit word per clock (132 MB/s). The PIPE
bus moves one word per clock in a burst (132 MB/s). A PIPEFlow bus moves 16 bits per clock
(66 MB/s). So a router can read the source pixel *and* write the result pixel to the same
memory at the full stream rate. A memory-to-memory pass over N pixels takes 2N clocks, plus
about 20 clocks of pipeline.

## PIPE bus

The PIPE bus is a 32-bit multiplexed address/data bus with four control signals (`pb_m_t` in
`sonic_pkg`, and `pipe_bus_slave`):

* **AS**: AD carries a word address. WR gives the direction of the transaction it opens.
  The target is the PIPE and the part (PR registers, PM, PE parameters) whose select line is high.
* **DS**: the master offers one data beat. On a write, AD carries the data; on a read it is a request.
* **RDY**: the slave accepts the beat in this clock. Read data follows one clock later, and
  is zero from every slave that is not answering, so the answers are ORed. The address then
  moves to the next word, so a burst needs only one AS cycle.

The PR's register beats and the PE's parameter beats are always accepted. A PM beat waits
(RDY low) while the memory is busy with higher-priority work.

## The PIPE Router (`pipe_router`)

The router is the most involved block. It is programmed through word registers:

| offset | register | use |
|---|---|---|
| 0 | WIDTH | image width, 1..1024 |
| 1 | HEIGHT | image height |
| 2 | ROUTE | [1:0] source: 1 PM, 2 Left, 3 Start; [3:2] destination: 1 PM, 2 Right, 3 End |
| 3 | MODE | [1:0] scan: 0 horizontal, 1 vertical, 2 horizontal-stripped, 3 vertical-stripped; [4] RGB->HSV towards the PE |
| 4 | FLOW | write 1: PROCESS (start a run); write 2: clear done. Read: [0] done, [1] busy |
| 5 | STRIP | band size of the stripped scans (reset 8) |
| 6 | SRCBASE | PM word address of the source image |
| 7 | DSTBASE | PM word address of the result image (equal to SRCBASE for in-place work) |
| 8 | PMOWN | [0]: the PE's direct PM port owns the memory |
| 9 | COUNT | result pixels delivered in the current run |

**A run.** Writing PROCESS starts a run of WIDTH x HEIGHT pixels.

* With source PM, an address generator (`raster_agu`) walks the source image in the chosen
  order. PM reads go through a 4-entry FIFO into the PIPEFlow transmitter towards the engine.
* With source Left or Start, the incoming stream is passed on to the engine.
* When MODE[4] is set, the RGB->HSV converter (`rgb2hsv`) sits on that path.
* Result pixels from the engine go to the destination. For PM, a second address generator
  walks the destination in the same order. For Right or End, they are sent on that bus.
* When WIDTH x HEIGHT results have been delivered, done and `irq` rise.

**Scan orders** (`raster_agu`):

* horizontal: rows, left to right;
* vertical: columns, top to bottom;
* horizontal-stripped: bands of STRIP rows. Within a band, walk down one column of the band,
  then the next column to the right. Each short vertical run is marked as a line;
* vertical-stripped: bands of STRIP columns. Within a band, walk one row of the band, then
  the next row down.

The last band may be narrower. Because every run carries its own start-of-line mark, a
line-oriented engine filters the short runs of a stripped scan as separate lines.

**Memory arbitration**, one PM access per clock, in this order:

1. the result writer (its stream cannot wait);
2. the PE's direct port (only while PMOWN is set);
3. the PIPE bus;
4. the source reader, which simply waits and so slows the stream.

In-place filtering is safe: the writer always stays behind the reader in the same scan order.

**HSV format.** V = max(R,G,B). S = 255·(max−min)/max. H uses 256 steps per turn: sector
offsets 0, 85 and 171, plus 43·(difference)/(max−min), truncated, modulo 256. Alpha is unchanged.

## The example plug-in: 1-D FIR filter (`fir_plugin`)

The SONIC paper's demonstration is a separable 2-D FIR filter for a video editor. It uses one
1-D filter in the engine twice: first with the router in horizontal scan, then in vertical
scan. The filter here:

* has `TAPS` = 9 taps with 8-bit unsigned coefficients, written over the PIPE bus (PE offsets
  0..8), and a right shift (offset 9). Each of R, G and B is Σ coef[k]·p[centre+k−4],
  shifted and saturated to 255. Alpha comes from the centre pixel. After reset the filter is
  the identity;
* treats every scan line on its own. Each window entry carries a 4-bit tag of the line it
  came from. A tap that falls outside the centre pixel's line uses the nearest pixel of that
  line (edge replication). So the output has exactly as many pixels as the input, in the same
  order and with the same marks;
* keeps the full stream rate. The first four pixels of a line produce no output, and those
  slots carry the last four results of the line before. After the last pixel of an image, the
  engine drains itself with four empty slots, one per two clocks. An image must not start
  within 18 clocks of the end of the previous one.

The tap count is read from the plug-in's coefficient dialog, which shows nine fields per
direction. The coefficient format, scaling and edge handling are this design's choices.

## Host view (`lbc`)

The local bus controller turns host word requests into PIPE bus traffic. Host word address:

| bits | field |
|---|---|
| [25:23] | PIPE number |
| [22:21] | space: 0 PR registers, 1 PM, 2 PE parameters, 3 LBC |
| [19:0] | word offset |

A request that continues the open transaction (same target, same direction, next word) goes
out as a data beat with no new address cycle. So host bursts run at one word per clock. LBC
space, offset 0, reads all interrupt lines, and `host_irq` is their OR. The video stream
port (`vin`/`vout`) feeds the PIPEFlow Start bus and drains the End bus. It stands in for the
board's video input and output.

The separable filter, as the host runs it:

```
write PM   (pipe p, space 1, offset 0..N-1)  <- image
write PE   offsets 0..9                      <- coefficients, shift
write PR   WIDTH, HEIGHT, ROUTE = {PM,PM}
write PR   MODE = horizontal ; FLOW = 1 ; poll FLOW until bit 0 ; FLOW = 2
write PR   MODE = vertical   ; FLOW = 1 ; poll FLOW until bit 0 ; FLOW = 2
read  PM   offset 0..N-1                     -> result
```

## Performance at the default size

These figures are at 33 MHz, as measured in `tb_sonic_top_full`, for a 576 x 461 frame
(265,536 pixels, a quarter of one PIPE memory):

| step | clocks |
|---|---|
| write the frame | 265,538 |
| horizontal pass | 531,092 |
| vertical pass | 531,092 |
| read the frame back | 265,539 |

That is about 48 ms per frame of board time. The same testbench then filters a 512 x 512
frame without reloading the coefficients. Each pass takes 524,308 clocks (15.9 ms). A
single PIPE cannot take a 187.5 MB/s HDTV stream: a PIPEFlow bus carries 66 MB/s.

## Where this model departs from the SONIC paper, and what it leaves out

* **PIPEFlow Left/Right**: the paper does not say which way data moves between neighbouring
  PIPEs. Here it flows one way only, from Left to Right, which is enough for its multi-PIPE
  example.
* **The engine** is a reconfigurable FPGA on the real board. Here every engine is the FIR
  plug-in, fixed at build time. FPGA configuration, configuration caching, and the host API's
  PIPE allocation and locking are software or vendor matters, and are not modelled.
* **The PE's direct PM port** is in the router and tested there. The FIR plug-in does not
  use it, so `sonic_pipe` holds it idle.
* **Format conversion** covers RGB->HSV only. The 4:2:2 / 4:1:1 YCrCb and de-interlacing
  conversions that the paper mentions as possibilities are not built.
* **Not modelled at all:** the 22-bit links between neighbouring engines for multi-PIPE
  plug-ins, the PCI bridge chip, the SDI serial video interface and the test LCD.
* **The done flag** is bit 0 of FLOW, matching the polling loop in the paper's host code
  (whose comment mentions bit 1).
* **This design's own choices:** the register map, bus control-signal meanings, address map,
  control-bit encoding, reset values, FIFO depth and arbitration order. The paper does not
  specify them.

## Files

| file | content |
|---|---|
| `rtl/sonic_pkg.sv` | widths, `pf_beat_t`, `pix_t`, `pb_m_t`, route/scan enums, register offsets |
| `rtl/sonic_top.sv` | the board |
| `rtl/lbc.sv` | local bus controller |
| `rtl/sonic_pipe.sv` | one PIPE (router, engine, memory) |
| `rtl/pipe_router.sv` | the router |
| `rtl/raster_agu.sv` | scan-order address generator |
| `rtl/pipeflow_tx.sv`, `rtl/pipeflow_rx.sv` | PIPEFlow transmitter and receiver |
| `rtl/rgb2hsv.sv` | format converter |
| `rtl/fir_plugin.sv` | example plug-in in the engine |
| `rtl/pipe_memory.sv` | 1M x 32 frame store |
| `rtl/pipe_bus_slave.sv`, `rtl/sync_fifo.sv` | helpers |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/sonic_host.svh` | host-side tasks and the reference filter, shared by the board tests |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sonic_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sonic_pkg.sv tb/tb_sonic_top.sv -o sim
./obj_dir/sim
```

Replace `tb_sonic_top` with any other testbench:

* `tb_sonic_top` is the whole board with eight PIPEs and 4K-word memories. It runs at once:
  the 2-D filter in one PIPE, a stripped-scan filter in another, a three-PIPE chain, a
  Start-to-End stream, HSV formatting and a vertical-stripped scan. It checks every result
  and counts that each mechanism occurred;
* `tb_sonic_top_full` is the default-size board running the two-pass workload on a 576 x 461
  frame, then on a 512 x 512 frame (about 10 s);
* `tb_sonic_pipe`, `tb_pipe_router`, `tb_lbc`, `tb_fir_plugin`, `tb_raster_agu`,
  `tb_pipeflow_link`, `tb_pipeflow_rx`, `tb_rgb2hsv` and `tb_pipe_memory` test single blocks.

The simulator is two-state, so every testbench resets or initialises what it reads.

To change the board size, override `NPIPES`, `AW` (PM address bits) or `TAPS` on `sonic_top`.
To put a different plug-in in the engines, replace `fir_plugin` in `sonic_pipe`. A new
plug-in needs only the PIPEFlow In/Out beats and, if it has parameters, the `pe_sel` PIPE bus
port.
