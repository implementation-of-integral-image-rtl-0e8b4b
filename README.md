# Two-row integral image core

The integral image (summed-area table) of a picture `i(x, y)` is

    ii(x, y) = sum of i(x', y') over all x' <= x, y' <= y

Once it is known, the sum over any rectangle takes four look-ups. That is what
makes Haar-feature object detection (Viola-Jones) fast. Computing the table
itself is a large share of the detector's work.

This core computes the integral image of a small gray image: up to 10 x 10
pixels of 8 bits. It uses the **two-row** method. Two rows of the image are
processed side by side, so two integral values come out on every clock. The
core is written as plain synthesizable SystemVerilog, organised as five blocks:
an input block, a pixel array, a processor, an integral image memory and an
output block.

## The two-row recurrence

Here `x` is the row and `y` the column. Take a row pair `x = 2p` and `x + 1`.
At each column `y` the processor evaluates:

    S(x,   y) = i(x,   y) + S(x,   y-1)         running sum along row x
    S(x+1, y) = i(x+1, y) + S(x+1, y-1)         running sum along row x+1
    ii(x,   y) = ii(x-1, y) + S(x, y)
    ii(x+1, y) = ii(x-1, y) + S(x, y) + S(x+1, y)

The boundary values `S(., -1)` and `ii(-1, .)` are zero. Only one value comes
from outside the current row pair: `ii(x-1, y)`. It is the odd-row result of
the previous pair at the same column. The processor reads it back from the
integral image memory, which stores every result it produces.

Scan order: the processor steps one column to the right per clock along the
row pair. After the last column it moves down two rows (`x + 2`) and starts
again at column 0. An M x N image (M rows) therefore takes M*N/2 clocks to
process. Compared with one pixel per clock, this halves the number of steps.

## Data path and timing

```
 input1,input2 ──► input block ──► array ──► processor ──► output block ──► out1,out2,col,row,...
 height,width      (register,      (whole    (3 stages)        (register)
 in_valid/ready     handshake)      image)       ▲ │
                                                 │ ▼
                                         integral image memory ──► mem_rd_* (read port B)
```

A frame goes through two phases:

1. **Load.** The source offers one pixel pair per clock: `input1 = i(2p, y)`
   and `input2 = i(2p+1, y)`, in the scan order above. The input block
   registers each pair. The array stores it at its own coordinates.
2. **Transfer and compute.** Once the last pair is stored, the array reads the
   image back in the same order, one pair per clock. The processor turns each
   pair into `ii(2p, y)` and `ii(2p+1, y)`, writes both to the memory, and
   passes them to the output block.

Phase 2 starts only after the whole image is in the array, so the core needs
M*N/2 clocks to load and M*N/2 clocks to compute. The clock-by-clock schedule
for a frame whose pairs arrive on consecutive clocks is below. Clock 0 is when
the first pair is offered, and L = M*N/2.

| clock   | event                                                            |
|---------|------------------------------------------------------------------|
| 0..L-1  | pairs offered and taken (`in_valid && in_ready`)                 |
| L       | input block holds the last pair; the array writes it at the edge |
| L+1     | array switches to transfer and issues the first read             |
| L+2     | first pixel pair on the array's output register                  |
| L+3     | processor stage 0: operands latched                              |
| L+4     | processor stage 1: running sums S updated                        |
| L+5     | processor stage 2: `ii(x-1,y)` read, integral values added, written to memory |
| L+6     | first `out1/out2` on the output pins                             |
| 2L+5    | last `out1/out2` on the output pins                              |

From the first input to the last output, the core takes **M*N + 5 clocks**.
At the 100 ns clock (10 MHz) this design targets, that gives:

| image  | clocks | time     |
|--------|--------|----------|
| 2x2    | 9      | 900 ns   |
| 4x4    | 21     | 2100 ns  |
| 6x6    | 41     | 4100 ns  |
| 8x8    | 69     | 6900 ns  |
| 10x10  | 105    | 10500 ns |

The stage split was chosen to give exactly these counts. The end-to-end
testbench checks each of them.

The processor has no stall and no bypass. Its memory write happens on the
same edge as its stage-2 register. The next row pair reaches the same column
at least one clock later, so `ii(x-1, y)` is always in memory when it is read,
even for a one-column image.

## Interface (`ii_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `in_valid`, `in_ready` | in/out | 1 | a pair is taken on an edge where both are high |
| `input1`, `input2` | in | 8 | pixel of row 2p and of row 2p+1, same column |
| `height`, `width` | in | 4 | image size M x N, sampled with the frame's first pair |
| `out_valid` | out | 1 | a new result pair is on the outputs |
| `out1`, `out2` | out | 15 | `ii(x, y)` and `ii(x+1, y)` |
| `col`, `row` | out | 4 | column y and (even) row x of the results |
| `out_height`, `out_width` | out | 4 | size of the frame the results belong to |
| `frame_done` | out | 1 | high with the frame's last result pair |
| `mem_rd_row`, `mem_rd_col`, `mem_rd_data` | in/in/out | 4/4/15 | combinational read of any stored `ii` value |

Handshake rules:

- After the last pair of a frame (`height*width/2` pairs), `in_ready` goes low.
  It stays low until the array has sent the whole frame to the processor.
- While `in_ready` is low, pixels offered are not taken.
- The next frame can load while the processor and output block are still
  finishing the previous one.
- `height` must be even, from 2 to 10. `width` can be 1 to 10. Frames need not
  be square. An assertion in the input block flags an illegal size.
- `mem_rd_*` reads the memory as it stands. A frame's values stay valid until
  the next frame overwrites them. That happens from the next frame's transfer
  phase onwards.
- `row[0]` is always 0, because results come in row pairs starting at an even
  row.

## Sizes and parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MAX_DIM` | 10 | largest height and width; the array and the memory hold MAX_DIM x MAX_DIM words |
| `PIX_W` | 8 | pixel width (gray, 0..255) |
| `II_W` | 15 | integral value width |
| `DIM_W`, `IDX_W` | 4, 4 | derived: bits for a size and for an index |

The integral value needs `ceil(log2(M*N*255 + 1))` bits:

| image  | bits |
|--------|------|
| 2x2    | 10   |
| 4x4    | 12   |
| 6x6    | 14   |
| 8x8    | 14   |
| 10x10  | 15   |

The 15-bit default covers every size up to 10x10.

`ii_pkg::ii_bits()` computes the width. `ii_top` checks at elaboration that
`II_W` is wide enough for `MAX_DIM`. With the defaults, the core stores 100
pixels (800 bits) and 100 integral values (1500 bits).

A larger `MAX_DIM` works unchanged, but storage and load time grow with the
square of the size. Images larger than the array would have to be tiled. That
is outside this core: carrying the sums across tile borders is not designed
here.

## Files

| file | content |
|------|---------|
| `rtl/ii_pkg.sv` | default sizes and the `ii_bits()` width function |
| `rtl/ii_pair_if.sv` | interface for one column of a row pair (pixels or integral values) |
| `rtl/ii_input_block.sv` | intake register, frame counter, `in_ready` |
| `rtl/ii_array.sv` | pixel store and load/transfer sequencer |
| `rtl/ii_processor.sv` | the four equations, three pipeline stages |
| `rtl/ii_memory.sv` | integral image store, one write port, two read ports |
| `rtl/ii_output_block.sv` | output register, row number, frame end flag |
| `rtl/ii_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench checks its block against values computed independently. Each
one prints `TB_RESULT checks=N failures=M` and stops, and each has a watchdog.

`tb_ii_top` runs the core at its default parameters and checks:

- a 2x2 frame with pixel rows {0, 40} and {82, 210}: the first pair is (0, 82)
  and the last outputs are (40, 332) at 900 ns;
- the five square sizes, each against the timing table;
- a 10x10 frame of all-255 pixels (largest value, 25500);
- a series of non-square and one-column frames sent back to back, with random
  idle clocks and back-pressure.

Every result is compared with a reference integral image summed directly. The
memory is read back through `mem_rd_*`. The testbench also counts back-pressure,
input gaps, overlapping frames and size changes, and fails if any of them never
occurred.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/ii_pkg.sv rtl/ii_pair_if.sv \
    rtl/ii_input_block.sv rtl/ii_array.sv rtl/ii_memory.sv rtl/ii_processor.sv \
    rtl/ii_output_block.sv rtl/ii_top.sv tb/tb_ii_top.sv --top-module tb_ii_top
./obj_dir/Vtb_ii_top
```

For a block testbench, use the package, the interface, the block's file
(`tb_ii_processor` also needs `ii_memory.sv`) and `tb/tb_<module>.sv`. Every
run takes well under a second.

## Design choices beyond the two-row method

These are this implementation's own decisions:

- **Size at run time.** The frame size is set by the `height`/`width` inputs
  at run time, up to `MAX_DIM`. One core covers all sizes, instead of being
  built once per size.
- **Handshake and control outputs.** The valid/ready handshake, `out_valid`,
  `row`, `frame_done` and the second memory read port are additions. They let
  the core sit between a pixel source and a feature-extraction stage.
- **Reset.** Reset is asynchronous and active low. The pixel array and the
  integral memory are not reset: every word is written before it is read.
- **Pipeline.** The three-stage processor pipeline and the one-clock phase
  change in the array were chosen to meet the M*N + 5 clock schedule.
- **Storage.** The array and the memory are register arrays, not SRAM macros.
