# Zelig binary morphology engine

Zelig is a fine-grained parallel machine built from 32 FPGAs, each paired with a
64K x 8 static RAM. Together the FPGAs form one synchronous "logic surface" with a
64K x 256 node memory. Operations on large data sets run by time-multiplexing
many virtual nodes through this physical surface. This RTL holds the machine in its
binary image morphology configuration.

A 512 x 512 binary image flows through the surface one row at a time. Each FPGA
keeps the last three rows of its eight pixel columns in a small shift-register
store and computes eight output pixels per step. All 32 FPGAs together write
256 pixels per step. The operations are dilation, erosion, copy, complement,
pixel-wise maximum and minimum, and translation by one pixel. Each uses a 3x3
structuring element given as a nine-bit integer.

## Data in node memory

| item | value |
|---|---|
| node memory | 32 SRAMs x 64K x 8 = 64K words x 256 bits |
| one word | 256 horizontally adjacent pixels; FPGA `f` holds bits `8f .. 8f+7` |
| one image | 512 rows x 2 swaths = 1024 words; 64 images fit |
| word address | `image*1024 + swath*512 + row` |
| pixel column | `swath*256 + fpga*8 + bit` |

A swath is a 256-column vertical strip of the image, as wide as the logic
surface. Image 0 is free to serve as the working image of compound operations.

### Structuring element

Bit `k = 3*r + c` of the nine-bit integer weights the element in row `r`
(0 = top) and column `c` (0 = left). For example, the cross

    0 1 0
    1 1 1   ->  2 + 8 + 16 + 32 + 128 = 186
    0 1 0

Window pixels use the same numbering: `win[4]` is the centre pixel.

## The row sweep

The data address generator (`dag`) runs one primitive operation as follows:

1. **LOADG** (1 cycle): the operation set-up goes over a 16-bit broadcast bus
   into every FPGA's `globreg`. The set-up is the structuring element, the CORE
   section, the invert flag and the translate index.
2. For each swath:
   - **CLEAR**: the three-row store is filled with border pixels (0).
   - **READ, SHIFT**: row 0 enters the store.
   - For each row `y = 1 .. 511`, three memory cycles:
     - **READ**: address source row `y`.
     - **SHIFT**: row `y` enters the store. The address moves to row `y-1` of
       the second (aux) image.
     - **WRITE**: every FPGA drives its eight results for row `y-1`. They are
       written to row `y-1` of the destination image.
   - **SHBRD, WRITE**: a row of border pixels enters, and the last row is written.
3. **DONE**: a one-cycle pulse.

The node memory is single-ported and one access takes one cycle, so a step
costs three cycles. `busy` is high for `2 + SWATHS*(3*ROWS + 2)` cycles. For
512 x 512 that is 3078 cycles, or 307.8 us at the machine's 100 ns memory cycle.

The store holds its own copies of rows `y-1 .. y+1`. The destination image may
therefore be the source image itself.

### Pipeline store and neighbour exchange

Each FPGA has a 3 x 10 pixel store:

- `neighbours`: a 3 x 8 block holding the FPGA's own columns.
- Two `endneighbours`: 3 x 1 columns holding the pixel just outside on each
  side.

During a SHIFT, each FPGA passes the two edge bits of the row it is loading to
its left and right neighbours (`left_out` / `right_out`). The neighbours' end
columns take those bits in the same cycle. So the windows of the edge pixels
are complete without any extra memory access.

There are three configurations of `bitmorf`:

| configuration | used for | outer end column |
|---|---|---|
| BITMORFA (`LEFT_END=1`) | FPGA 0 | left column holds border pixels |
| BITMORFB | FPGAs 1-30 | both end columns fed by the adjacent FPGA |
| BITMORFC (`RIGHT_END=1`) | FPGA 31 | right column holds border pixels |

## The CORE: one circuit for seven operations

Each of the eight `morph_core` copies in an FPGA has four sections:

| section | result |
|---|---|
| dilation | OR over the SE elements `b` of `A(p - b)` |
| copy | centre pixel |
| maximum | centre pixel OR the same pixel of a second image |
| translate | the window pixel selected by `tdir` |

`endec` enables one section during WRITE. An OR gate merges the section
outputs, and a final XOR with the invert flag `inv` produces the other
operations:

- **Complement** = copy with the output inverted.
- **Minimum** = maximum with both inputs and the output inverted (De Morgan).
- **Erosion** uses the identity "complement of (A eroded by B) = (complement of
  A) dilated by (B rotated 180 degrees)". With `inv` set, the dilation section
  complements the pixels and rotates the structuring element. The final XOR then
  turns the complement of the erosion back into the erosion.

The dilation section is built from five-input, one-output blocks. Each of four
`minkowski` blocks takes a pair of window positions placed symmetrically about
the centre (`k` and `8-k`), their two SE bits and the erode flag:

    dilate: y = (s_k & n_(8-k)) | (s_(8-k) & n_k)
    erode:  y = (s_k & ~n_k)    | (s_(8-k) & ~n_(8-k))

Swapping the partners is the 180-degree rotation. A fifth block handles the
centre pixel, and `minkob` ORs the five terms together.

Primitive operations map onto section and invert as follows (`op_to_glob` in
`zelig_pkg`):

| op | section | inv |
|---|---|---|
| DILATE / ERODE | dilation | 0 / 1 |
| COPY / COMP | copy | 0 / 1 |
| MAX / MIN | maximum | 0 / 1 |
| TRANSLATE | translate | 0 |

Compound operations are sequences of primitive passes issued by the controlling
processor. For example, OPEN is ERODE into image 0 followed by DILATE from
image 0. The same applies to CLOSE and to the hit-or-miss, thinning and
thickening operations (built from erosions of an image and of its complement,
combined with MIN / MAX). Filling and reading parts of an image go through the
host memory port.

## Top level: `zelig_morph`

Parameters: `N_FPGA = 32`, `PIX = 8`, `ADDR_W = 16`, `IMG_ROWS = 512` and
`IMG_COLS = 512`. `IMG_COLS` must be a multiple of `N_FPGA*PIX`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | memory-cycle clock; synchronous active-high reset |
| `start` | in | 1 | start an operation; ignored while `busy` |
| `op` | in | 3 | `morph_op_e` |
| `se` | in | 9 | structuring element |
| `tdir` | in | 4 | TRANSLATE: index 0..8 of the window pixel copied |
| `src`, `aux`, `dst` | in | 6 | image numbers: source, second operand of MAX/MIN, destination |
| `busy` / `done` | out | 1 | operation running / one-cycle end pulse |
| `host_we` | in | 1 | write `host_wdata` to `host_addr` (only while idle) |
| `host_addr` | in | 16 | node-memory word address |
| `host_wdata` / `host_rdata` | in / out | 256 | word written / word at the previous cycle's `host_addr` |

The operands are latched at `start`. The host port stands for the controlling
processor's access to node memory. It works only while no operation runs.

## Files

| file | contents |
|---|---|
| `rtl/zelig_pkg.sv` | shared types: `section_e`, `morph_op_e`, `glob_t`, `cmd_e`, `op_to_glob` |
| `rtl/zelig_morph.sv` | top: DAG, 32 SRAMs, 32 `bitmorf` |
| `rtl/dag.sv` | data address generator (row sweep) |
| `rtl/node_sram.sv` | 64K x 8 node SRAM, synchronous single-port model |
| `rtl/bitmorf.sv` | one FPGA: `endec`, `globreg`, store, 8 x `morph_core` |
| `rtl/endec.sv`, `rtl/globreg.sv` | command decoder; set-up register |
| `rtl/neighbours.sv`, `rtl/endneighbours.sv` | pipeline store: 3 x 8 inner block, 3 x 1 end columns |
| `rtl/morph_core.sv`, `rtl/minkowski.sv`, `rtl/minkob.sv` | per-pixel logic |
| `tb/morph_ref_pkg.sv` | reference operations from the textbook definitions |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/zelig_pkg.sv tb/tb_zelig_morph.sv --top-module tb_zelig_morph
    ./obj_dir/Vtb_zelig_morph

`tb_zelig_morph` runs the whole machine at its full size, with no parameter
changed, and takes about half a minute. It:

- loads two random 512 x 512 images through the host port;
- runs all seven primitives, the cross element 186, an OPEN through image 0 and
  an in-place dilation;
- reads back every result and compares each pixel with the reference;
- checks the 3078-cycle busy time of every operation;
- counts that each mechanism occurred: store clears, border rows, pixels passed
  between FPGAs, aux reads, inverted operations, every section, in-place
  operation, and a start ignored while busy.

`tb_bitmorf` chains a BITMORFA, a BITMORFB and a BITMORFC on a 24-column image
and checks every pixel of every operation. The remaining testbenches check
their modules exhaustively or against a cycle-by-cycle model.

## Departures and limits

- **Swath seams.** A 512-column image is processed as two 256-column swaths,
  and pixels beyond a swath count as border pixels (0). Windows at columns
  255 and 256 therefore see 0 across the seam. For example, erosion clears
  those columns wherever the element reaches across. For seam-exact results,
  keep objects away from the seam, or process images at most 256 columns wide
  (`IMG_COLS = N_FPGA*PIX`).
- **Border value.** Pixels outside the image are 0. Dilation therefore never
  grows in from the edge, and erosion eats inward from it.
- **Neighbour links.** Each FPGA uses only the edge pixel of its immediate
  neighbours, which is all a 3x3 window needs. No wider links are modelled.
- **This design's own choices:**
  - the command codes that `endec` decodes;
  - the contents and width of `globreg`;
  - the pairing of window positions in `minkowski`;
  - the index encoding of the translate direction;
  - the use of a second image as the MAX/MIN operand;
  - the three-cycle step of the sweep and the memory layout;
  - the start/busy/done handshake and the host port.
- **Node SRAM model.** The SRAM is modelled as a synchronous single-port RAM
  with a one-cycle read. The real part is an asynchronous 100 ns SRAM.
- **Not included:**
  - enabling, disabling and reconfiguring individual FPGAs, which belongs to
    the FPGA configuration process rather than to the logic;
  - the processors that direct the machine;
  - the video display board;
  - the machine's other configurations (grayscale morphology, rank and median
    filters, local histogram equalisation, Monte Carlo yield modelling,
    cellular-automaton rules), for which no logic is specified here.
