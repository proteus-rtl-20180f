# Proteus: per-layer reduced-precision storage for a DNN accelerator

Deep neural networks tolerate much shorter numbers than the 16-bit fixed
point that accelerators usually compute with. The shortest length that still
keeps accuracy differs from layer to layer. In the networks studied for this
design it ranges from 2 to 14 bits for data and 7 to 10 bits for weights. Proteus
exploits this without touching the compute engine. Data and weights are
*stored* with a per-layer length of P bits in every buffer and memory. A thin
translation layer converts them to the native 16-bit format as they enter the
pipeline, and converts results back as they leave. Memories keep their
physical width. Packed data simply occupies fewer rows, so fewer rows are
read and written, and that saves energy and capacity.

This repository holds synthesizable SystemVerilog for:

* the translation layer: `unpacker`, `packer` and the two per-buffer control
  blocks `unpack_ctrl` and `pack_ctrl`;
* a DaDianNao-style accelerator node built around it: `nfu` (one neural
  functional unit with NBin, SB, NBout and its unpackers and packers),
  `nfu_pipeline`, `buffer_mem` and the node `proteus_node` (16 NFUs plus a
  central eDRAM);
* the GPU form of the idea, `gpu_remap`, an address remapping in front of
  the L1 cache;
* `proteus_top`, which places the node and the GPU remapping side by side.

## The storage format

A stored value has two per-layer attributes, held in `proteus_pkg::repr_t`:

| field        | meaning                                                                 |
|--------------|-------------------------------------------------------------------------|
| `p`          | length in bits, 1..16                                                   |
| `lsb`        | the fixed exponent: the native bit that the stored LSB corresponds to   |
| `stream_len` | values per virtual column after which storage re-aligns (0 = never)     |

The native format is signed 16-bit Q8.8. A stored value `q` of `p` bits
stands for the native word `q << lsb`, so `lsb + p <= 16` must hold. On the
way in, the value is sign-extended above its MSB and zero-filled below its
LSB. On the way out, it is rounded to the nearest multiple of `2^lsb` (ties
round up) and saturated to the `p`-bit range.

### Virtual columns

A buffer row is a number of 16-bit words: 16 for NBin/NBout, 256 for SB. Word
`c` of every row forms *virtual column* `c`, and each column feeds one
pipeline lane. Proteus keeps a value in the same column it would occupy
uncompressed. Within a column, the values of a stream are packed back to back,
LSB first, continuing across rows. Here is the layout for `p = 3` in one
column:

```
row 0: [c0 a2 a1 a0 ... ]   bits 0-2 a, bits 3-5 c, ...
row 1: [ ... ]              a value may start in one row and end in the next
```

Because no value moves to another column, no lateral wiring is needed, and
every column of a buffer needs exactly the same control on every cycle.
That is why one controller per buffer can drive hundreds of
unpackers with shared signals.

### Streams and alignment

The pipeline must get a new value every cycle. In a convolution the input
is consumed in runs of `d` consecutive values (the input depth), and a run
must start at the beginning of a row. Spread over 16 columns, that is a run of
`d/16` values per column. `stream_len` is that per-column count for data, and
the per-lane filter length for weights. After every `stream_len` values the
rest of the row is skipped, or, on the write side, the partly filled word is
written out. The wasted bits are the "alignment overhead". For shallow
layers they can cancel most of the compression: with `d/16 = 1`, nothing is
saved unless two values fit in one word. A depth that is not a multiple of 16 is
padded to the next multiple, just as an uncompressed layout would be.

## Unpacker (read side)

`unpacker` handles one column. It has three parts.

1. **Unpacking register, 32 bits.** Buffer words are loaded alternately
   into the lower and upper half. Row `n` goes to half `n mod 2`. A value
   split across two rows is therefore whole in the register.
2. **Circular right shifter, 32 bits.** It brings the value's first bit to
   native bit `lsb`. Because the shift is circular, a value that runs from
   bit 31 (odd row) into bit 0 (the next, even row) is rejoined.
3. **Extend.** Three 16-bit masks select the value bits, the bits to fill
   with the sign, and the sign position. The controller decodes them once
   per buffer, so no unpacker needs a decoder of its own.

`value_o` is combinational from the register and the current controls.

## Packer (write side)

`packer` mirrors the unpacker.

1. **Round.** It adds half an LSB (mask `half_i`) in 17 bits. If the bits
   from the MSB up are not all equal, the value saturates to `011..1` or
   `100..0`. Bits outside the value are cleared.
2. **Circular right shifter, 32 bits.** It moves the value to the next free
   position of the packing register.
3. **Packing register.** It has one enable per bit. The 32-bit mask `en_i`
   writes only the `p` bits of the value.
4. **Output multiplexer.** It picks the completed lower or upper half.

Bits of a flushed word beyond the last value are padding. They hold stale
register contents and carry no meaning.

## Control and timing

`unpack_ctrl` (one per NBin and one per SB) tracks the current row and bit
position. It reads a row only when the next value needs a word that is not yet in
the register. Since `p <= 16`, a value needs at most one new row, so the
output rate is one value per cycle for any `p`. Timing, for the value handled in
cycle *t*:

| cycle | what happens                                                       |
|-------|--------------------------------------------------------------------|
| t     | buffer read issued (`rd_en_o`), if a new row is needed              |
| t+1   | read data arrives; `load_lo_o`/`load_hi_o` load it into the register |
| t+2   | rotate and masks select the value; `valid_o`, `last_o`              |

`pack_ctrl` (one per NFU, after NBout) reads one native value per cycle. It
computes the rotate amount, the 32-bit enable mask and the rounding masks, and
presents a word with `wvalid_o` two cycles after the read of the value that
completed it. A flush takes one extra cycle with no read. A pack of `n`
values with `f` flushes therefore ends `n + f + 2` cycles after the start
cycle (`done_o`).

`realign_o` and `flush_o` pulse when a stream boundary cost padding. They
are there for monitoring.

## NFU

```
 NBin (64 x 16 words) --> 16 unpackers  --+
                                          +--> pipeline --> NBout (64 x 16) --> 16 packers --> out rows
 SB (4096 x 256 words) -> 256 unpackers --+        ^             |
                                                   +-- partial --+
```

`nfu_pipeline` multiplies 16 inputs by 16 x 16 weights, reduces each
group of 16 in an adder tree, and accumulates per output in a wide register.
`init_i` loads the accumulators from an NBout entry (partial sums) or with
zero. The result is converted back to Q8.8 by truncation with saturation.
NBout holds native values. Results are packed only when they leave the NFU.

Two commands run one at a time:

* **compute** (`comp_*`): `count` values per lane from NBin row `in_base` and
  SB row `w_base`, accumulated into NBout entry `acc_addr`, optionally on top
  of its old contents. `comp_done_o` comes `count + 5` cycles after the start
  cycle.
* **pack** (`pack_*`): `count` NBout entries are rounded, packed and emitted
  as rows on `out_valid_o`/`out_data_o`.

Two assertions check that the NBin and SB controllers stay in lock step and
that a compute never has zero values.

## Node

`proteus_node` has 16 NFUs and a 4MB central eDRAM of 256-bit rows that
holds the current layer's packed inputs and outputs. All NFUs receive the same
inputs (broadcast into every NBin) and hold different weights in their
SBs, so each computes different outputs. Off-chip memory is outside the RTL.
It reaches the central eDRAM through the `ext_*` port, which may be used only
while the node is idle, and the SBs through the `sb_*` port.

A sequencer accepts one `cmd_t` at a time (`cmd_valid_i`/`cmd_ready_o`,
`done_o` when finished):

| op             | action                                                                |
|----------------|-----------------------------------------------------------------------|
| `OP_LOAD_NBIN` | copy `count` eDRAM rows from `edram_addr` into every NBin at `nbin_addr` |
| `OP_COMPUTE`   | all NFUs run one compute pass in parallel; `done_o` `count + 7` cycles after the command cycle |
| `OP_STORE`     | NFU by NFU, pack `count` NBout entries and write them to `edram_addr + n*edram_stride` |

A layer runs as LOAD, one COMPUTE per output entry (more than one with
`accumulate` when the inputs need several passes), and then STORE. The stored output is
already in the next layer's input format: set `data_in` of the next layer
to `data_out` of this one, and LOAD it straight from the eDRAM.

### Capacity

One node holds 32MB of weights (16 SBs of 2MB) and 4MB of feature maps.
With 7 to 10-bit weights, the convolutional networks LeNet, Convnet, NiN
and GoogLeNet fit entirely: GoogLeNet's roughly 7M weights at 9 bits
take about 8MB. AlexNet's convolution layers fit, but its fully connected
layers do not. The first of them alone needs about 47MB at 10 bits. Such a
layer must be split over several accumulation passes, with the SBs
reloaded from off-chip memory between passes, or spread over more than
one node. The input layer (depth 3, padded to 16 lanes, stored at 16 bits)
is the largest feature map in these networks, at about 1.6MB for a
224 x 224 image.

## GPU remapping

On a GPU, Proteus is an address remapping ahead of the L1 cache. Values
never straddle a 128-byte line. Each line holds `floor(1024 / P_eff)` slots,
and the rest of the line is padding. Because coalesced accesses limit the
benefit, precisions share slot widths: 11-16 bits use 16-bit slots, 9-10 bits
use 10-bit slots and 7-8 bits use 8-bit slots. `gpu_remap` is combinational.
It gives the line address and bit offset of an element, extracts the element
from a line as a native value, and produces the data and bit mask for
storing a rounded, saturated value into its slot.

## Where this RTL goes beyond the original description

The published design specifies the buffers and their sizes, the
virtual-column layout, the unpacker and packer datapaths, mask-based control
shared per buffer, the alignment rule, and the GPU slot grouping. The
following are this implementation's own choices:

* Q8.8 native format, truncating conversion after accumulation, no
  activation function, and a three-stage pipeline. The pipeline's insides are
  inherited from the base accelerator and not specified.
* Ties in rounding go upward. Stored-LSB position is used as the encoding
  of the fixed exponent.
* Controller latencies, row-parity assignment of register halves, and the
  extra flush cycle for partial words.
* A 256-bit central-eDRAM row, the command set, the sequencer, serial
  STORE through a single eDRAM write port, and asynchronous active-low reset
  of control state (arrays are not reset).
* GPU slot widths for P below 7 (their own width), a 128-byte line, and a
  write path with the same rounding as the packer.
* eDRAM and SRAM are plain arrays with a one-cycle read. eDRAM refresh and
  the off-chip DDR3 memory are not modelled.

## Simulating

Every module has a self-checking testbench in `tb/`. Reference models are in
`tb/tb_model_pkg.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/proteus_pkg.sv tb/tb_model_pkg.sv rtl/buffer_mem.sv rtl/unpacker.sv rtl/packer.sv \
  rtl/unpack_ctrl.sv rtl/pack_ctrl.sv rtl/nfu_pipeline.sv rtl/nfu.sv rtl/proteus_node.sv \
  rtl/gpu_remap.sv rtl/proteus_top.sv tb/tb_node_run.sv tb/tb_proteus_top.sv \
  --top-module tb_proteus_top -o sim && ./obj_dir/sim
```

| testbench              | what it shows                                                         |
|------------------------|-----------------------------------------------------------------------|
| `tb_unpacker`          | extraction and extension for all P, positions and wrap-around          |
| `tb_packer`            | rounding, saturation both ways, masked register writes                 |
| `tb_unpack_ctrl`       | packed streams read back at one value per cycle, re-alignment, row reads |
| `tb_pack_ctrl`         | packed output words, flushes, completion cycle                         |
| `tb_buffer_mem`        | read latency, hold, read-before-write                                  |
| `tb_nfu_pipeline`      | inner products, partial-sum start, saturation, latency                 |
| `tb_nfu`               | one NFU end to end with random precisions and accumulation passes      |
| `tb_gpu_remap`         | slot grouping, line addresses, reads and masked writes                 |
| `tb_proteus_top`       | two chained layers on a 3-NFU, 4 x 4-lane node, plus GPU remapping     |
| `tb_proteus_top_full`  | the same flow on the node at its full default size                     |
| `tb_workload_layers`   | the per-layer precision sequences of five networks on a small node      |

The end-to-end tests count each mechanism: re-alignment, flush,
accumulation, saturation, values straddling two rows, and a change of
precision between layers. A test fails if any mechanism never occurs.

The full-size node (16 NFUs, 2MB SB each, 4MB eDRAM) builds in about a
minute with Verilator and simulates its test in under a second. The small
configurations in the testbenches are obtained by overriding `N_NFU`,
`N_IN`, `N_OUT`, `SB_DEPTH` and `EDRAM_DEPTH`. All defaults are the full
design's sizes.
