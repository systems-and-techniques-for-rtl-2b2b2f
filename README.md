# DMA-VA configuration memory for fast partial FPGA reconfiguration

An SRAM-based FPGA is reconfigured by rewriting its configuration memory.
In a Virtex-style device that memory is a set of *frames*, columns of bytes
written whole through a narrow configuration port. Time spent reconfiguring
is time spent pushing bytes through that port. A small change to the
circuit still costs whole frames, plus the address data that says where
they go.

This design is a configuration memory that loads only the bytes that change
and keeps the address overhead low. It combines two addressing schemes:

* **DMA addressing** at the coarse level. A run names a first *block* and
  how many consecutive blocks follow. A block is eight adjacent frames.
* **Vector addressing (VA)** at the fine level. For every row of a block, one
  8-bit vector says which of the block's eight frames get a new byte in that
  row. Only those bytes follow on the port.

A block that needs no change costs nothing, because it is left out of the
run. A row that needs no change costs one byte, its zero VA byte. The memory
accepts one port byte on every clock and never stalls the port. So the
reconfiguration time is exactly the length of the stream.

The default size is a Xilinx XCV100: 1610 frames of 56 bytes, 90,160 bytes
in total. This gives 202 blocks, and the last block holds only two frames.

## The configuration stream

The 8-bit port has a valid strobe and no ready signal. A run is:

| bytes | content |
|---|---|
| 2 | start block address, high byte first |
| 2 | number of consecutive blocks `N`, high byte first |
| per block, per row `r = 0 .. 55` | one VA byte, then one data byte for each set VA bit |

* VA bit `j` of row `r` in block `b` stands for byte `r` of frame `8*b + j`.
* Data bytes for a row come in **descending bit order**. The byte for the
  highest set VA bit comes first.
* A block always takes all 56 VA bytes, even when most of them are zero.
* `N = 0` ends the run at once, and `op_done` still pulses.
* Block addresses at or past the last block select no block. Their bytes are
  consumed and change nothing.
* For the short last block, VA bits 2..7 name frames that do not exist. If
  such a bit is set, its data byte is consumed and dropped.

`busy` is high from the clock after the header until the run ends.
`op_done` is high for one clock after the last byte of the run.

Rewriting the whole device takes 4 + 202·56 + 90,160 = 101,476 bytes. That
is about 12.5 % more than a plain frame dump. A partial update that touches
few bytes costs much less.

## How a row is rewritten: read, patch, write back while shifting

This is the part of the design that is easiest to misread.

The frames are **shift registers**, not addressable RAM (`frame_register`).
Each frame has its byte 0 at the top. Eight horizontal read buses carry the
top byte of each frame of the selected block. Eight write-back buses enter
at the bottom of the frames. When a block is written back, every frame in it
moves up one byte, and the write-back byte enters at the bottom.

All eight frames of the block are processed together, one row at a time.
The row in progress is always at the top:

1. **VA byte clock.** The VA byte goes into the vector address register
   (VAR). In the same clock, the top byte of each of the block's eight
   frames (row `r`) is copied into the 8-byte frame data register (FDR).
2. **Data byte clocks.** Each data byte is written into the FDR byte picked
   by the network controller. The picked VAR bit is then cleared.
3. **Write-back.** The FDR, with all its patches, is written into the bottom
   of the eight frames while they shift up by one. Row `r + 1` is now at the
   top.

The write-back does not take a clock of its own. It happens in the clock
that brings the row's last data byte, and the patched row goes from the FDR
input straight onto the write-back buses (`frame_data_register.wb_row`). If
the VA byte is zero, the row read in step 1 is written straight back in the
same clock. So a row with `k` set bits takes `1 + k` clocks, exactly one per
byte.

After 56 rows every frame of the block has shifted 56 times and is back in
its original order. The controller then moves on to the next block.

Bytes whose VA bit is clear go round unchanged. This read-modify-write
approach is what lets the frames stay plain shift registers. It also needs
only eight horizontal buses in each direction, not one bus per byte of a
frame.

## Byte steering: the vector address decoder

`va_decoder` holds the VAR, and `network_controller` turns it into a
one-hot select. The select is built from a mask register computed as a
chain from the top bit down:

```
MR[7] = OR(VAR[7:0])
MR[j] = ~VAR[j+1] & MR[j+1]        for j = 6 .. 0
sel[j] = MR[j] & VAR[j]            (highest set VAR bit)
done   = NOR(VAR[7:0])
```

`MR[j]` is set when no VAR bit above `j` is set. So `sel` marks the highest
set bit, and bytes are taken from bit 7 downwards.

The controller also uses `last`, which means only one bit is left. This
tells it that the current byte completes the row.

The chain is eight gates deep. It is meant to settle well within one
configuration clock; the original design reports about 8 ns for this
decoder and a 50 MHz clock for the whole memory.

## Blocks and modules

| module | role |
|---|---|
| `dmava_pkg` | shared sizes (`PORT_W = 8`, eight frames per block, XCV100 size), the `row_t` type (8 bytes), controller state enum |
| `dmava_config_memory` | top. Wires port, controller, VA decoder, FDR, block decoder and the frame blocks. Brings every frame out as `cfg_bits[frame][byte]` |
| `main_controller` | parses the stream (header, VA and data bytes). Issues `load_va`, `load_row`, `take_byte`, `wb_shift`. Keeps the block address, blocks left and row counters |
| `va_decoder` | VAR plus byte steering. Clears one bit per data byte |
| `network_controller` | combinational priority logic above |
| `frame_data_register` | the 8-byte read-modify-write buffer, with its bypassed write-back row |
| `block_address_decoder` | block address to one-hot block select |
| `frame_block` | eight (or, for the last block, fewer) frames with a shared select. Drives the read buses only when selected, and shifts only when selected |
| `frame_register` | one frame: a 56-byte shift register |

The read buses are shared by all blocks. They are modelled as an AND-OR:
an unselected block drives zero, and the top ORs all blocks together. There
are no tri-states.

Reset is synchronous and active low. It clears the controller, the VAR, the
FDR and the whole memory.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NUM_FRAMES` (top) | 1610 | frames in the device (XCV100) |
| `FRAME_BYTES` (top) | 56 | bytes per frame; also the rows per block |
| `FRAMES_PER_BLOCK`, `PORT_W` (package) | 8 | block width = port width = VA byte width |
| `FIELD_W` (package) | 16 | header field width |

The number of blocks is `ceil(NUM_FRAMES / 8)`. When `NUM_FRAMES` is not a
multiple of eight, the last block holds the remainder.

At the default size the memory is 721,280 flip-flops. A coarse synthesis
gives about 91k word-level cells, almost all of them the frame bytes'
enable flip-flops.

The storage is flip-flops because the frames are shift registers. A real
device would use a custom memory cell. Area and power figures from this RTL
are therefore upper-bound estimates.

## Where this RTL departs from, or adds to, the original architecture

What follows the original: the overall structure, the 8-bit port,
8-frame blocks, the 8-byte FDR, the VAR and network controller equations,
shift-register frames with top read and bottom write-back, DMA addressing by
start block and block count, and the XCV100 sizes.

This design's own choices:

* **Stream layout.** The header layout (two 16-bit fields, high byte first),
  the descending data-byte order within a row and the valid-only port
  handshake.
* **Address signal.** The select is `MR[j] & VAR[j]`. The published
  XOR-based formula for the per-bit address signal does not produce a
  one-hot select of a set bit as written, so the intended function was
  implemented instead: pick the highest set bit, then clear it.
* **Timing.** The write-back shares the clock of the last data byte (or of a
  zero VA byte), through a bypass around the FDR. With this, the memory
  keeps up with one byte per clock. The original only requires that a row
  be read and written in one clock each.
* **Edge cases.** The handling of the remainder block, of VA bits for
  absent frames, and of addresses past the end of the device.
* **Reset.** Reset clears the whole memory.

Not built:

* the FPGA logic fabric that the configuration bits drive (`cfg_bits` is its
  connection);
* the configuration-page scheme proposed for larger devices (several
  DMA-VA memories addressed RAM-style, with pipelined distribution);
* the evaluated VA compression scheme, which was not adopted because its
  decompressor was too slow;
* readback, which is not described.

## Verification

Each module has a self-checking testbench in `tb/`, which compares against
values computed in the testbench itself:

* `tb_network_controller`: all 256 VAR values.
* `tb_va_decoder`: every VA value and random ones; one take per set bit, in
  descending order.
* `tb_frame_data_register`, `tb_frame_register`, `tb_frame_block`: against
  byte-level models. The frame test also checks that a full 56-shift pass
  restores the frame.
* `tb_block_address_decoder`: every address up to past the last of the 202
  blocks.
* `tb_main_controller`: runs strobe by strobe with a modelled VA decoder, at
  4 rows per block.
* `tb_dmava_config_memory`: end to end at 26 frames × 6 bytes. It sends 27
  runs and compares the whole memory with a model after each. It checks the
  clock count (one clock per stream byte) and the `op_done` timing. It counts
  each mechanism: zero-VA rows, partial and full rows, multi-block runs, the
  short last block, bytes for absent frames, runs past the end, zero-length
  runs and idle port cycles. It fails if any of them never happened.
* `tb_dmava_full`: the same checks on the default XCV100-size memory with
  no parameter changed. It includes a rewrite of the whole device (about
  102k bytes) and runs that reach the two-frame last block.

* `tb_dmava_sequence`: a sequence of reconfigurations on the default-size
  memory. Each step sends only the difference from the current
  configuration. Every maximal range of changed blocks becomes one run, and
  every row's VA byte marks the changed bytes. After each step the whole
  memory must match the target, and the step must take one clock per
  stream byte. The configurations are generated, not real circuits.

  The testbench also prints each step's stream size next to the cost of
  loading every changed frame whole (56 bytes each, addresses not counted).
  With the seed used here:

  | step | stream bytes | whole changed frames |
  |---|---|---|
  | first circuit, 400 frames at 60 % density | 16,162 | 22,400 |
  | core swap, same area, 30 % | 9,451 | 22,400 |
  | core swap, 320 other frames, 45 % | 10,309 | 17,920 |
  | 12 scattered byte changes | 728 | 672 |
  | core swap at device end plus 3 bytes | 4,078 | 6,272 |

  For scattered single-byte updates, the 56 VA bytes per touched block cost
  more than they save. For such updates, whole frames would be cheaper.

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

The benchmark bitstreams behind the original data-reduction figures (for
example, about 62 % less configuration data than the plain frame model)
are not available. Those figures are not reproduced here. The testbenches
check function and timing on generated data.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dmava_pkg.sv \
    tb/tb_dmava_config_memory.sv --top-module tb_dmava_config_memory -o sim
./obj_dir/sim
```

Swap in any other `tb_*` name. Verilator finds the modules in `rtl/` and
`tb/` by file name. The package must be listed first.

The full-size `tb_dmava_full` and `tb_dmava_sequence` take one to three
minutes to build and a few seconds to run. The small testbenches build in seconds.

To change the device size, override `NUM_FRAMES` and `FRAME_BYTES` on
`dmava_config_memory`. The stream format does not change, except that rows
per block equals `FRAME_BYTES`.
