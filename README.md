# Sidekick: a PCI-E image co-processor with a Sobel edge detector

A host PC treats an FPGA board on a PCI-E x1 link as memory-mapped hardware.
It writes a 320x240 greyscale image into on-chip block RAM and starts an edge
detector. It then polls a done flag and reads back an image of Sobel gradient
magnitudes. The PCI-E endpoint exposes two address windows (base address
registers, BARs):

* **BAR0**: the set-up registers of a DMA engine that moves bulk data between
  host memory and the board's DDR2 memory.
* **BAR2**: the *instruction register file*. This is a small memory-mapped
  space that holds the input image, the result image, two control words and
  the edge-detection logic.

The point of the design is the framework rather than the edge detector. Once
the packet engines turn PCI-E requests into a plain "write word / read word"
port, any accelerator can sit behind BAR2. The Sobel detector is the example
that uses it.

```
 PCI-E endpoint (outside)          sidekick_top
 ───────────────────────   ┌───────────────────────────────────────────────────┐
  rx TLP stream ──────────►│ rx_engine ─┬─► dma_reg_file (BAR0) ──► DMA engine │ ports
                           │            │                                      │
                           │            └─► instr_reg_file (BAR2)              │
                           │                  clk_div ─► ourClk                │
                           │                  main_mem (dp_ram 76800x8)        │
                           │                  sobel_ctrl ─► sobel_sed          │
                           │                  avg_mem  (dp_ram 76800x16)       │
  tx TLP stream ◄──────────│ tx_engine ◄── completion request                  │
                           └───────────────────────────────────────────────────┘
```

## Using BAR2 from the host

All BAR2 accesses are 32-bit words. Bits [19:17] of the word address (byte
address bits [21:19]) choose a region, and bits [16:0] index into it:

| region (bits 19:17) | contents | access |
|---|---|---|
| 0 `main_mem` | input image, pixel (r, c) at index r*240 + c, value in bits 7:0 | write |
| 1 `avg_mem`  | result image, same indexing, 16-bit value in bits 15:0 | read |
| 2 control, index 0 | `edgeReset`, 32 bits, 1 after reset | read/write |
| 2 control, index 1 | `isDone`, reads 0 while `edgeReset` is non-zero | read |

Reads of `main_mem` and of unmapped words return 0. One image is processed
like this:

1. While `edgeReset` is non-zero, write the 76800 pixels. Multi-word memory
   writes fill consecutive words.
2. Write 0 to `edgeReset`. The sequencer starts.
3. Poll `isDone` until it reads 1.
4. Read `avg_mem`. Only the interior (rows 1..318, columns 1..238) is written.
   The border words keep whatever the RAM held before.
5. Write a non-zero value to `edgeReset` to clear the sequencer for the next
   image.

Turning camera RGB into grey, and normalising the result for display, are
host software and not part of this RTL.

## The edge-detection engine

This is the part with the most timing detail. It is spread over four modules
inside `instr_reg_file`.

**Clocks.** Everything facing the host runs on `clk`, the endpoint's user
clock. The sequencer and detector run on `ourClk`, made by `clk_div` so that
the arithmetic has more time. A 2-bit counter advances on every `clk` edge.
The output is loaded with 0 when the counter is 0 and with 1 when it is 2. So
`ourClk` has a 50% duty cycle and runs at one quarter of the `clk` rate.
`ourClk` is a register output, so both clocks have related edges.

**Memories.** `main_mem` and `avg_mem` are both `dp_ram`: one write port and
one read port, each on its own clock, with a synchronous read of one-edge
latency. `main_mem` is written on `clk` and read on `ourClk`. `avg_mem` is
written on `ourClk` and read on `clk`. The `edgeReset` and `isDone` signals
cross between the two related clocks without synchronisers.

**Sequencer (`sobel_ctrl`).** It visits every 3x3 grid in row-major order.
`(row, col)` is the grid's top-left pixel, and `col` runs 0..237 and `row`
0..317. A 4-bit `registerCount` drives each grid:

| count | action |
|---|---|
| 0..8 | read pixel number `count` of the grid (row + count/3, col + count%3) |
| 1..9 | store the pixel returned by the previous read into `matrix[count-1]` |
| 10 (state A) | grid complete: count back to 0, raise `writePixel`, note the centre address, advance `col`, or wrap it and advance `row`, or raise `isDone` after the last grid |
| next cycle (state C) | `avg_mem[centre] <= sobel_out[15:0]` |

One grid takes 11 `ourClk` cycles, which is 44 `clk` cycles. A full image of
318 x 238 = 75684 grids takes 832,524 `ourClk` cycles, or 3,330,096 `clk`
cycles. Each pixel is read about nine times. This is simple, not efficient.

**Detector (`sobel_sed`).** This is combinational. It takes the eight
neighbours of the centre pixel and computes:

```
Gx = (p2 + 2 p5 + p8) - (p0 + 2 p3 + p6)      kernel [-1 0 1; -2 0 2; -1 0 1]
Gy = (p6 + 2 p7 + p8) - (p0 + 2 p1 + p2)      kernel [-1 -2 -1; 0 0 0; 1 2 1]
out = |Gx| + |Gy|
```

The pixels are numbered row by row, p0..p8, with p4 as the centre. The centre
pixel has weight 0 in both kernels. For 8-bit pixels the output is at most
1530, so the 16-bit `avg_mem` word holds it exactly. The ports are 32 bits
wide. Internal arithmetic is 36 bits, and the result saturates at 2^32-1.

## Packet handling

The endpoint interface is modelled as one 32-bit TLP (transaction-layer
packet) word per beat. It has `valid/ready` and `sof/eof` markers, plus a
6-bit `bar_hit` vector sampled with the first word.

**`rx_engine`** accepts 3-word-header memory writes (format/type 0x40) and
memory reads (0x00):

* **Writes.** Each data word goes to the BAR0 or BAR2 register-file port at
  consecutive word addresses, as a one-cycle `wren` pulse.
* **Reads.** The engine stops accepting the stream and presents the address.
  It waits `RD_WAIT` (2) cycles, then passes a completion request (requester
  ID, tag, TC, attributes, lower address, data) to the transmit engine. It
  takes no new packet until that completion has been sent. A write queued
  behind a read therefore lands after the read has returned the old value.
* **Dropped.** Other packet types, and requests that hit neither BAR0 nor
  BAR2, are consumed and discarded.
* **Limits.** Byte enables are ignored (whole words only), and reads must be
  one word long.

**`tx_engine`** sends a completion with data as four words, holding them under
back-pressure:

* DW0: `0x4A`, TC/attributes, length 1
* DW1: completer ID, successful status, byte count 4
* DW2: requester ID, tag, lower address
* DW3: data

`cpl_ack` pulses when the last word is taken.

## BAR0: DMA set-up registers

`dma_reg_file` decodes 32 words (128 bytes):

| word | register |
|---|---|
| 0 / 1 / 2 | host->board: host address, board-RAM offset, size in bytes |
| 3 / 4 / 5 | board->host: board-RAM offset, host address, size in bytes |
| 6 | control/status: bit0 host->board start (write 1) / busy, bit1 done, bit2 board->host start / busy, bit3 done |

Writing a start bit sends a one-cycle `*_start` pulse to the DMA engine, sets
busy and clears done. A start written while busy is ignored. The engine's
`*_done` pulse clears busy and sets done, which the driver polls. The two
directions are independent and can run at the same time. The DMA engine
itself is not part of this RTL.

## What is outside this RTL

These parts are not implemented:

* The PCI-E hard endpoint and its vendor wrapper. Their streams are the top's
  `rx_*` and `tx_*` ports.
* The DMA engine. Its register outputs and done inputs are the top's `dma_*`
  ports.
* The DDR2 controller and the 2 GB DDR2 module.

The image path does not use DDR2 at all. The host writes and reads BAR2
directly.

## Choices made here, and departures from the original description

* **Divider rate.** The original description says the divided clock has
  "twice the period" of the PCI-E clock. It also says the counter rule used
  here, which gives four times the period. The counter rule is implemented.
* **`edgeReset` polarity.** The original text both calls `edgeReset` the
  "data ready, start" signal and says that while it is high the sequencer is
  held cleared. The second reading is implemented: 1 means hold, 0 means run.
  It is 1 after reset so nothing starts before an image is loaded.
* **End of row.** The original end-of-row test reads as `col == MAX_WIDTH-2`.
  That would let the last grid of a row reach one pixel past the row. Here
  the last grid of a row starts at `MAX_WIDTH-3`, and the last row of grids at
  `MAX_HEIGHT-3`.
* **Image shape.** `MAX_HEIGHT` = 320 and `MAX_WIDTH` = 240 are the original
  values, and `MAX_WIDTH` is the row stride. An image that the host stores
  with 320 pixels per row must be sent transposed, or the parameters swapped.
  Either way it is 76800 pixels.
* **Own choices.** The following are not given in the original and were
  chosen for this design:
  * the magnitude |Gx|+|Gy|
  * the result written at the grid's centre
  * the BAR0 and BAR2 address maps
  * the 32-bit packet stream
  * one-word reads
  * ignoring byte enables
* **`main_mem` not readable.** The host cannot read `main_mem`, which would
  need a third RAM port.

## Modules

| file | role |
|---|---|
| `rtl/sk_pkg.sv` | TLP codes, completion-request struct, BAR0/BAR2 address maps |
| `rtl/sidekick_top.sv` | top: engines and both register files |
| `rtl/rx_engine.sv`, `rtl/tx_engine.sv` | packet decode and completion generation |
| `rtl/dma_reg_file.sv` | BAR0 DMA registers |
| `rtl/instr_reg_file.sv` | BAR2: memories, control words, read mux |
| `rtl/clk_div.sv` | `ourClk` generator |
| `rtl/dp_ram.sv` | two-clock block RAM (`main_mem`, `avg_mem`) |
| `rtl/sobel_ctrl.sv` | grid sequencer |
| `rtl/sobel_sed.sv` | Sobel detector |

Parameters: `MAX_HEIGHT` and `MAX_WIDTH` on `sidekick_top`, `instr_reg_file`
and `sobel_ctrl` set the image size. The memories follow automatically. The
`rx_engine` parameters `BAR0_AW`, `BAR2_AW` and `RD_WAIT` set the decoded BAR
sizes and the read wait. If a register file is given a longer read latency,
`RD_WAIT` must be at least that latency plus one.

## Simulation and verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The
reference Sobel model is `tb/tb_sobel_ref_pkg.sv`. With Verilator 5, run from
the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/sk_pkg.sv tb/tb_sobel_ref_pkg.sv tb/tb_sidekick_top.sv \
  --top-module tb_sidekick_top -o sim && ./obj_dir/sim
```

Substitute another `tb/tb_*.sv` for the others. The package files must come
first.

`tb_sidekick_top` is the end-to-end test at full size. Acting as the host
through the packet streams, it does the following:

* programs and reads back the BAR0 registers and runs a DMA start/done
  handshake in each direction;
* checks that a write queued behind a read waits;
* loads a random 320x240 image in 32-word writes and runs the detector;
* polls `isDone` and compares all 75684 results with the reference model;
* checks that dropped packets change nothing and that raising `edgeReset`
  clears `isDone`.

`tx_ready` is pulled low at random throughout. The test counts each mechanism
and fails if one never occurs. It checks about 2.7 million values and runs in
a few seconds.

The block testbenches use smaller images, for example 6x7 and 8x7, and also
check cycle counts (11 `ourClk` cycles per grid, a 4-cycle divided clock).
Each testbench was also run against a deliberately broken copy of its module,
and each one reported failures.

Not verified: behaviour against a real PCI-E endpoint or DMA engine, and
timing closure on an FPGA.
