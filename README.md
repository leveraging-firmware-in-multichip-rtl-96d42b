# Self-reconfiguring colour space conversion engine

A printer's colour space conversion (CSC) engine has two large interpolation
phases that are never used together: a **3D phase** for three-channel input
(e.g. RGB) and a **4D phase** for four-channel input (e.g. CMYK). Together they do
not fit the FPGA. This design gives both phases one *partially reconfigurable
region* (PRR) and swaps them at run time.

The main idea is in how the partial bitstream gets to the FPGA. No new
connection between chips is needed. The controlling processor writes a
**PR control register** through the engine's ordinary register interface. It
then sends the bitstream as ordinary **pixel words** on the pixel interface.
Inside the FPGA, a siphon diverts those words to the internal configuration
access port (ICAP). So a board that already drives the engine only needs a
firmware change to reconfigure it.

The architecture follows J. Galindo, E. Peskin, B. Larson and G. Roylance,
*Leveraging Firmware in Multichip Systems to Maximize FPGA Resources: An
Application of Self-Partial Reconfiguration*. That work describes the blocks
and what they do. It does not describe their internals. Every register layout,
packet format, interpolation method and handshake here is this design's own.
The section "What is own choice" lists them.

```
 32-bit link ─► csc_depacketizer ─► pr_ctrl ──pixel words──► pre_* ports ─► (phases ahead, not included)
                                    │  │  └─PR words──► ici ──► icap_* ports (ICAP)           │
                                    │  └ register writes ─► csc_control ─clut_wr─┐            ▼
                                    └ pr_start ─► pr_stall ─ stall/clear ──────► csc_prr (3D or 4D phase)
                                                                                      └─► post_* ports ─► (phases after, not included)
```

## A conversion change, step by step

The firmware sends this sequence. It changes nothing else in the engine.

1. A register write to `REG_PR_CTRL` (0x10) with the bitstream length in
   32-bit words in bits [23:0]. A length of zero does nothing.
2. That many pixel words, each holding four bytes of the partial bitstream.
3. The CLUT for the new phase, as register writes (see below).
4. Image pixels.

The hardware goes through four states, in `pr_stall`:

| state | entered when | region pipeline | ICAP | engine input |
|---|---|---|---|---|
| IDLE | reset / settle done | running | off | open |
| DRAIN | the PR_CTRL write is accepted | running, takes no new pixels | off | PR words fill the ICI's one-word buffer, then wait |
| RECONFIG | the stages ahead of the region (`pre_busy` low) and the region are empty | frozen (`stall`) | on, one byte per clock | PR words only |
| SETTLE | every PR word has been passed on and the ICI is empty | frozen, `prm_clear` empties it | off | closed |

SETTLE lasts `SETTLE_CYCLES` (4) clocks, then the state returns to IDLE. The
drain matters because pixels sent just before the PR request are still in the
pipeline. They finish on the old phase before the ICAP writes anything. While
PR is busy, `pr_ctrl` accepts nothing except PR words. So CLUT writes and
pixels sent straight after the bitstream wait until the new phase runs.

A `PR_CTRL` write takes effect from the next engine cycle. A pixel word in
the same packet as the write is still image data.

## Engine inputs and the link

Each engine clock has one register write and one pixel word (`csc_in_t` in
`csc_pkg`). In the prototype setting a 32-bit processor link drives the engine.
`csc_depacketizer` rebuilds each engine cycle from a three-word packet:

| word | contents |
|---|---|
| 0 | `[31:24]` tag `8'hC5`, `[16]` pixel valid, `[8]` register write, `[7:0]` register address |
| 1 | register write data |
| 2 | pixel word (image data or PR data; the packet does not change) |

A header word without the tag is dropped and reported by `link_sync_err`, so
the receiver re-aligns on the next header. The link has valid/ready. One packet
arrives per three link words.

Register map (write only):

| address | name | effect |
|---|---|---|
| 0x00 | `REG_CLUT_ADDR` | sets the next CLUT node: `[4:0]` axis 0, `[9:5]` axis 1, `[14:10]` axis 2, `[19:15]` axis 3 |
| 0x01 | `REG_CLUT_DATA` | writes a 32-bit entry (four 8-bit output channels) at that node, then steps to the next node, axis 0 fastest |
| 0x10 | `REG_PR_CTRL` | starts PR; `[23:0]` = bitstream length in words |

The auto-increment wraps each axis at the grid size of the phase the region
holds. A whole table loads with one address write plus one data write per node:
4,913 writes for the 3D table and 6,561 for the 4D table.

Pixel words are four 8-bit channels, with channel 0 in bits [7:0]. The 3D phase
reads channels 0 to 2.

## The interpolation phases (`clut_interp`)

Both phases are the same module. `DIMS=3, GRID=17` gives the 3D phase and
`DIMS=4, GRID=9` gives the 4D phase. Each has three pipeline stages and
takes one pixel per clock.

* **Stage 1** splits each channel into a cell index and a fraction.
  For GRID = 17 that is 4 + 4 bits; for GRID = 9 it is 3 + 5 bits. Node
  `GRID-1` stands for full scale.
* **Stage 2** reads all 2^DIMS corners of the cell in one clock. To allow
  this, the table is split into 2^DIMS banks. A node is stored in the bank given
  by the parities of its coordinates, at address `sum((n[d] >> 1) * HALF^d)`
  with `HALF = (GRID+1)/2`. Two neighbouring nodes on an axis always have
  different parities, so each bank holds exactly one corner of any cell. On
  an axis where the cell index is odd, the banks for even nodes read half-index
  `idx/2 + 1`.
* **Stage 3** does multilinear interpolation, with exact weights and one
  rounding step:
  `out = (sum_c corner_c * prod_d w_d + 2^(DIMS*FB-1)) >> (DIMS*FB)`, where
  `w_d` is `f_d` for the upper corner on axis d and `2^FB - f_d` for the lower
  one. The weights sum to `2^(DIMS*FB)`, so the result never overflows 8 bits.

All stages move together while `en` is high. `out_valid` is the stage-3 valid
ANDed with `en`, so a result held during a stall is reported once, when it
leaves.

Storage is 8 × 729 words (23.3 KB) for the 3D phase and 16 × 625 words
(40 KB) for the 4D phase.

## Simulating a region that changes (`csc_prr`)

A plain RTL model cannot rewrite itself. So `csc_prr` holds **both** phases.
The input `prm_sel` stands for what the FPGA's configuration memory holds:
0 is the 3D phase and 1 is the 4D phase. Only the selected phase receives pixels
and CLUT writes, and only its output is seen. For the FPGA build, keep one
instance per partial bitstream. The logic outside the region stays the same.
The links between the region and the rest of the design are plain wires.

In the testbenches, `tb/icap_model.sv` drives `prm_sel`. It is a behavioural
stand-in for the ICAP. It takes a byte on each clock where `ce_n` and
`write_n` are low and `busy` is low, and raises `busy` at random. It also
understands a toy bitstream: after the sync word `AA995566` comes a module
word (bit 0 = phase), and the end word `0000000D` switches `prm_sel`.

## The configuration interface (`ici`)

`ici` buffers one PR word and writes it to the 8-bit ICAP most significant byte
first. A byte counts as written on a clock where `icap_ce_n` and `icap_write_n`
are low and `icap_busy` is low. The next word is accepted in the same clock as
the last byte, so a steady source keeps the ICAP at one byte per clock. At the
ICAP's 50 MHz limit that is 50 MB/s. `en` from the stall logic holds back all
writes until the pipeline has drained.

## Sizes and rates

| item | figure | from |
|---|---|---|
| clock | 50 MHz, for both the engine and the ICAP | original prototype |
| partial bitstream 465 KB | 119,040 words, 476,160 ICAP clocks = 9.5 ms | prototype size; this design's rate |
| CLUT load | 4,914 (3D) / 6,562 (4D) engine cycles | own grid sizes; the prototype needed about 6.8 K cycles |
| 160 × 120 image | 19,200 engine cycles (one pixel per clock) | |
| letter page at 600 dpi | 33.66 M cycles = 0.67 s | |
| reconfigure + CLUT + page | 34.14 M cycles = 0.683 s, inside a one-second target | |
| PR logic (`pr_ctrl`, `ici`, `pr_stall`) | 64 flip-flops, roughly 32 two-flip-flop slices | own estimate |

These are engine cycles. Through the depacketizer each engine cycle takes three
link words.

## What is own choice

The engine's control logic is split in two. `csc_control` loads the CLUT.
`pr_ctrl` is the added PR register and siphon. Both watch the same register
writes.


The original description fixes the block structure and these points: the
3D/4D split by input channel count, three pipeline stages per phase, use of
the register interface to announce PR data, and use of the pixel interface to
carry it. It also fixes the CLUT load through the register interface, the
stall during reconfiguration, and the 32-bit board link with
depacketization. The following are this design's own choices:

* the interpolation method (multilinear), the grid sizes (17 and 9 nodes),
  8-bit channels and 32-bit CLUT entries;
* the banked CLUT layout;
* the register map, the coordinate auto-increment and the word-count end of PR;
* the packet layout and tag, and the link handshake;
* the drain and settle steps around reconfiguration;
* the ICAP byte order and busy handling;
* asynchronous active-low reset and valid/ready handshakes throughout.

The original engine's CLUTs are larger: more than 40 KB for each phase. The 3D
table here holds 19.7 KB of entries.

## What is not included

* The pipeline phases ahead of the interpolation region and after it. Their
  function is not specified. `csc_pr_top` brings out their connections:
  `pre_in_*`, `pre_out_*`, `pre_busy` and `post_in_*`.
* The registers for pixel data formats. Only CLUT loading and PR control are
  built.
* The ICAP itself, which is the FPGA's hard block. Its pins are ports of the
  top.
* Register read-back.

## Files

`rtl/`:
* `csc_pkg.sv`: widths, register map, `csc_in_t`, `clut_wr_t`, `prm_e`
* `csc_pr_top.sv`: the engine
* `csc_depacketizer.sv`
* `pr_ctrl.sv`
* `ici.sv`
* `pr_stall.sv`
* `csc_control.sv`
* `csc_prr.sv`
* `clut_interp.sv`

`tb/`: one self-checking testbench per module, plus:
* `csc_tb_pkg.sv`: the reference interpolation, computed from a flat table
  by visiting every corner
* `icap_model.sv`: the ICAP stand-in
* `tb_csc_pr_run.sv`: the end-to-end test

There are two end-to-end runs:
* `tb_csc_pr_top` is short: 300-pixel images and 64-word bitstreams.
* `tb_csc_pr_full` uses the evaluation sizes: three 160 × 120 images and two
  465 KB bitstreams, with the engine at its default parameters. It takes about
  a million clocks, a few seconds in Verilator.

Both end-to-end runs do the same things. They load a 3D table and convert an
image. They reconfigure to 4D with pixels still in flight, load a 4D table and
convert. Then they reconfigure back to 3D, reload and convert. They check
every pixel, the bytes and checksum at the ICAP, and the phase switches. They
also check that the ICAP is never written while pixels are in the pipeline and
that it is never starved during reconfiguration. Each run counts how often
every mechanism happens (drain, freeze, ICAP busy, link back-pressure, sync
error, clear) and fails if one never does.

`tb_csc_page` tests rate rather than control. It streams pixels straight into
the region, one on every clock: a 160 × 120 image, then a whole letter page at
600 dpi (33.66 M pixels). It checks that N pixels leave in N consecutive clocks.
All image pixels are compared with the reference, and every 251st page pixel.
The run takes about half a minute.

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

## Running

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_csc_pr_top \
  -y rtl -y tb rtl/csc_pkg.sv tb/csc_tb_pkg.sv tb/tb_csc_pr_top.sv
./obj_dir/Vtb_csc_pr_top
```

To run another testbench, replace `tb_csc_pr_top` with its name: for example
`tb_phase3d`, `tb_phase4d`, `tb_ici`, `tb_pr_ctrl`, `tb_pr_stall`,
`tb_csc_control`, `tb_csc_depacketizer`, `tb_csc_prr`, `tb_csc_page` or
`tb_csc_pr_full`.
To lint the engine:
`verilator --lint-only -Wall -y rtl rtl/csc_pkg.sv rtl/csc_pr_top.sv`.

Remaining lint warnings:
* unused package constants;
* `rst_n` used both as an asynchronous reset and in assertion disable
  conditions;
* `words_left`, a status output of `pr_ctrl` that the top leaves unconnected.

The grid sizes are parameters, `GRID3` and `GRID4` on the top. A grid size must
be 2^k + 1. Node coordinates are 5 bits, so the largest grid is 17 nodes per
axis.
