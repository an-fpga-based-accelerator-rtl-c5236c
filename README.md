# HMAX S2/C2 accelerator in SystemVerilog

HMAX is a model of the visual cortex used for object classification. Its
expensive stages are S2 and C2. Each position and scale of a multi-orientation
C1 image pyramid is matched against thousands of stored patches (prototypes).
For every patch, C2 keeps the best match over the whole pyramid. The result is
one feature value per patch.

This RTL computes S2 and C2 with a grid of small systolic arrays. The grid can be
rearranged at run time to work on patches of 4x4, 8x8, 12x12 or 16x16. Patches
sit in on-chip memory, one memory per pipeline. One image stream is broadcast to
several such pipelines. A small instruction queue sequences everything, so after
configuration the host only writes images and reads results.

The design follows a published FPGA accelerator for HMAX (a Virtex-6 design with
four S2 pipelines at 100 MHz on 256x256 images). Where that description is
silent, the choices here are this design's own. They are listed below under
"Departures and limits".

## What is computed

For a patch P of edge M and the C1 window X at one position:

    S2 distance  d = sum over the M x M window of (X[theta] - P)^2
    C2 minimum   c = min of d over all positions and all scales
    feature      f = exp(-c / (2 * (M/4)^2))

The Gaussian is monotonic, so taking the minimum of the distance first and
applying the exponential once per patch gives the same feature as the textbook
maximum of Gaussians. This is far cheaper.

There are two kinds of patch:

- **Sparse** patches are M x M. Each coefficient carries its own preferred
  orientation `theta`, so one pass covers all orientations.
- **Dense** patches are M x M x N_theta. Each orientation plane is matched
  against the same plane of the image, and the per-orientation distances are
  added.

The same hardware also does a plain multiply-accumulate convolution, called
**Gabor** mode (the S1 filter bank). Its results leave on a stream port and do
not go through C2.

## The processing element and the 4x4 primitive

The processing element (`hmax_pe`) does one of three things:

| op | product |
|---|---|
| Gabor | `X[0] * Pc` |
| sparse | `(X[coef.theta] - Pc)^2` — an N_theta:1 multiplexer picks the orientation named in the coefficient |
| dense | `(X[dense_theta] - Pc)^2` — one orientation for the whole engine |

The product is added to the partial sum coming from the PE above. The PE has
three register stages:

1. operand select and subtract,
2. multiply,
3. accumulate.

A coefficient with `en = 0` contributes nothing. This is how smaller patches are
zero-padded up to the mode size. Setting `USE_MUX = 0` removes the orientation
multiplexer for dense-only builds.

The primitive (`hmax_primitive`) is a 4x4 grid of PEs:

- Each cycle, 4 pixels (one column of 4 image rows) enter on the left.
- Pixels move one PE to the right per cycle.
- Partial sums move down each PE column.
- A final adder sums the 4 column outputs.

Two details make the timing work:

- **Row skew.** Input row r is delayed by r cycles, so a partial sum leaving row
  r meets the next row's product of the same pixel column.
- **Column reversal.** Because pixels travel right, the PE in column c sees a
  pixel that entered c cycles ago. So PE column c holds patch column 3-c.

The result for a window appears `PRIM_LAT = 6` clock edges after the edge that
captures the window's last (rightmost) image column. After that, one window
result comes out per cycle.

## The RCengine: composing larger patches

The RCengine (`hmax_rcengine`) holds 16 primitives in a 4x4 arrangement of
blocks. Block (R, C) is primitive k = 4R + C. The image arrives as one column of
16 consecutive rows per cycle (rows i .. i+15).

| mode | composition | results (lanes) | adder tree |
|---|---|---|---|
| 4x4 | 16 separate 4x4 patches | 16 | pass-through |
| 8x8 | 4 patches from 2x2 blocks {0,1,4,5} {2,3,6,7} {8,9,12,13} {10,11,14,15} | 4 | sums of 4 |
| 12x12 | 1 patch from the 3x3 blocks with R, C < 3 | 1 | sum of 9 |
| 16x16 | 1 patch from all 16 blocks | 1 | sum of 16 |

Three pieces make composition work:

- **Configurable routing (`hmax_cr`).** With S = mode edge / 4, a primitive in
  block row R receives rows 4·(R mod S) .. +3 of the 16-row column. In 4x4 mode
  all primitives get rows 0..3. In 16x16 mode block row R gets rows 4R..4R+3.
  Every row of a window arrives in the same cycle, so rows need no alignment.
- **Delay elements (`hmax_delay_line`).** A primitive in block column C covers
  patch columns 4·(C mod S) .. +3 of the composed patch. It finishes a window
  earlier than the right-hand primitive of the same patch. Its output is
  delayed by 4·(S − 1 − C mod S) cycles, so all partial results of one window
  reach the adder tree together. The delay is 0 in 4x4 mode and up to 12 cycles
  in 16x16 mode.
- **Adder tree (`hmax_adder_tree`).** It sums per mode as in the table above,
  with one register stage.

From the capture of a window's last column to its lane result takes
`RC_LAT = 7` edges. A tag travels alongside every column. It carries the
"window complete" and "last column" flags to the output.

Patches whose edge is not 4, 8, 12 or 16 run in the next larger mode. The
coefficient layout puts the patch in the top-left corner and disables the rest.
The image stream is then extended by K − M zero columns (K = mode edge), so the
last windows of each row still complete.

## Coefficient layout and the FOCM

Each pipeline has its own coefficient memory (`hmax_focm`). It stores 256
coefficients (one per PE) for each of `ITERS` iterations. A coefficient word is
`{en, theta[3:0], value[23:0]}`.

The memory is built from 16 memories: 4 banks × 4 columns. Memory (r, c) holds
element r·4 + c of every primitive. A load reads all 16 memories in parallel, so
each cycle writes one element position into all 16 primitives. The RCengine is
fully reloaded in 16 cycles.

The host addresses a coefficient by (pipeline, iteration, primitive k, element
e = r·4 + c). For a patch K in lane l of a mode with S = mode edge / 4, the
primitive at block (R, C) holds:

    K[4*(R mod S) + r][4*(C mod S) + c]

Lane l uses block rows and block columns l / (4/S) and l mod (4/S), counted in
units of S blocks. In 12x12 mode, blocks with R = 3 or C = 3 must be written with
`en = 0`.

Inside a primitive, element (r, c) is patch row r, column c. The primitive itself
handles the column reversal.

## The FOIM and the window stream

The image memory (`hmax_foim`) holds one scale: up to 256 × 256 positions, each
a word of N_theta pixels. Row y is stored in bank y mod 16, so 16 consecutive
rows are read in a single cycle.

The address generator scans for a patch of edge M in a mode of edge K:

- For each window row i = 0 .. H − M, it emits columns x = 0 .. W − 1 + (K − M)
  of rows i .. i+15.
- Rows follow each other with no gaps.
- Positions outside the image read as zero.
- `out_win` marks columns x ≥ K − 1. These are the ones that complete a window.
  The window starts at x − K + 1.
- `out_last` marks the final column.

So one iteration streams (H − M + 1) · (W + K − M) columns. At 256 × 256 with
4x4 patches that is 253 · 256 = 64,768 cycles.

There are two FOIMs. The host fills one while the engines read the other.
Scale s is read from buffer s mod 2.

## The iteration loop (controller and instruction queue)

An instruction (`instr_t`) configures one iteration:

| field | meaning |
|---|---|
| `op` | Gabor, sparse or dense |
| `mode` | 4x4, 8x8, 12x12 or 16x16 |
| `n_valid` | lanes holding real patches |
| `psize` | patch edge before padding |
| `theta_base` | dense: orientation of pipeline 0 |
| `c2_row` | which C2 memory row receives the minima |

The instruction queue (`hmax_instr_queue`) is circular. Reads do not remove
entries, and it is rewound at the start of every scale. So one program of N
instructions is replayed for every pyramid level.

The controller (`hmax_controller`) runs:

    for scale s in 0 .. n_scales-1:
        wait until image buffer s mod 2 is loaded
        for it in 0 .. n_iter[s]-1:
            fetch instruction it                  4 cycles
            skip it if psize > width or height of scale s
            load coefficients of iteration it     16 cycles (+1)
            stream the image                      (H-M+1)(W+K-M) cycles
            wait for the pipeline to drain, then commit C2
        release buffer s mod 2

Configuration registers (`cfg_we`, `cfg_addr`, `cfg_wdata`):

| address | contents |
|---|---|
| 0 | number of scales (1 .. 11) |
| 1 | dense group: pipelines whose results are summed per patch |
| 16 + s | scale s: width [9:0], height [19:10], iterations [30:20] |

The iteration count per scale lets small upper scales skip patches that are not
used there.

## Several pipelines: sparse and dense

`N_PIPES` S2engines (`hmax_s2engine` = FOCM + RCengine) receive the same FOIM
stream. They all run the same instruction at the same time, each with its own
patches.

- **Sparse.** Every pipeline has its own C2 unit (`hmax_c2`), so N_PIPES × lanes
  patches are matched per iteration.
- **Dense.** Pipeline p applies orientation `theta_base + p`. The pipeline adder
  (`hmax_pipe_adder`) sums consecutive groups of `dense group` pipelines. Group
  g's sum feeds C2 unit g, so ceil(P / group) C2 units are active. The host
  loads orientation plane p of each patch into pipeline p.

A C2 unit keeps a running minimum per lane over the iteration's windows. Only
lanes below `n_valid` are used. At the end of the iteration it merges the
minimum into memory row `c2_row`. The first scale overwrites the row; later
scales take the minimum.

## Host protocol

1. Write the configuration registers.
2. Push the instructions, using `iq_clear` first.
3. Write the coefficients (`coef_we`, one word per cycle).
4. Write scale 0 into buffer 0 (`pix_we`, one position per cycle). Pulse
   `img_loaded` with `img_loaded_buf = 0`. Pulse `start`.
5. While scale s runs, write scale s+1 into the other buffer and mark it loaded.
   `img_ready[b]` stays high until the engines release buffer b.
6. After `done`, read C2:
   - Set `c2_rd_pipe`, `c2_rd_row` and `c2_rd_lane`. The minimum appears on
     `c2_rd_data` one cycle later.
   - Raising `c2_rd_en` with the patch edge `c2_rd_psize` also starts the
     exponential. `c2_feat` (Q1.16) arrives with `c2_feat_valid` two edges after
     the data.
7. In Gabor mode, read the results from `s_valid`, `s_win` and `s_lanes`.

## The exponential unit

`hmax_exp_unit` computes exp(−d / (2(M/4)²)) as 2^−t, where
t = d · log2(e) / (2(M/4)²).

- A 17-entry table of scaled reciprocals gives t in fixed point.
- The integer part of t is a right shift.
- A 64-entry table of 2^−f gives the fraction.

Both tables are computed at elaboration time from their formulas. The input
distance has `2·PIX_FRAC` fraction bits (pixels carry `PIX_FRAC`). The result is
within 1.2% of the exact value, plus one least significant bit.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `N_THETA` | 4 | orientations per pixel (the source design uses 4 or 12) |
| `N_PIPES` | 4 | S2 pipelines (4 in the sparse 4-orientation build) |
| `MAX_W`, `MAX_H` | 256 | largest scale |
| `ITERS` | 1024 | iterations held in the FOCM and instruction queue |
| `USE_MUX` | 1 | 0 removes the sparse orientation multiplexer |
| `PIX_FRAC` | 8 | fraction bits of pixels, used by the exponential |
| `PIX_W` (package) | 24 | pixel and coefficient width |
| `ACC_W` (package) | 58 | accumulator width; 256 full-scale squared 25-bit differences cannot overflow |

At the defaults the FOCMs hold 4 × 1024 × 256 × 29 bits ≈ 30 Mbit. That is
somewhat more than the block RAM the original sparse build reports (about
26 Mbit). Reduce `ITERS` for a smaller device.

The design holds 4075 sparse 4-orientation patches over 4 pipelines if they are
an even mix of the four sizes (590 iterations).

## Departures and limits

- **Full-width squares.** The full 25-bit difference is squared, so results are
  exact. The source design passes only 18 bits of the difference to the DSP
  multiplier.
- **Dense patches must fit in one pass.** The number of orientations must be at
  most the number of pipelines. Adding partial sums from two iterations, as
  needed for 12 orientations on 6 pipelines, is not implemented.
- **No DDR path.** All patches are on chip. There is no DDR fetch or cache for
  large dense patches.
- **No normalisation.** The C2 vector is not normalised after the exponential,
  because no normalisation is defined.
- **Instruction queue, not FOCM headers.** Per-iteration control comes from the
  instruction queue. The FOCM holds only coefficients.
- **Own encodings.** Instruction fields, register map, host ports, handshakes,
  pipeline register placement, zero padding with `en` bits and the `psize`
  field are this design's choices.
- **No S1 system path.** Gabor results are only streamed out. There is no
  system-level S1/C1 pipeline.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_hmax_rcengine \
        -y rtl -y tb +libext+.sv rtl/hmax_pkg.sv tb/tb_hmax_rcengine.sv -o sim
    ./obj_dir/sim

The two top-level tests:

- **`tb_hmax_s2c2_top`** runs the whole design at reduced size: 2 pipelines,
  24 × 24 images, 16 iterations. It covers 3 scales and 6 instructions. These
  include all four modes, Gabor/sparse/dense, a skipped iteration and
  zero-padded patches. It checks every C2 value and feature value against a
  reference model, checks the Gabor stream, and checks cycle counts: 4-cycle
  fetch, 16-cycle coefficient load, and columns per iteration.
- **`tb_hmax_full`** runs the top at its default parameters. One 40 × 36 scale
  runs three iterations on 4 pipelines: sixteen sparse 4x4 patches, one sparse
  11x11 patch, and four dense 8x8x4 patches summed over the pipelines. All C2
  minima are checked.
- **`tb_hmax_sparse12`** runs the sparse 12-orientation build (`N_THETA = 12`,
  `N_PIPES = 2`) through the same kind of operation.

Testbenches generate their data with `$urandom` and need no files.

## Files

`rtl/`:

| file | contents |
|---|---|
| `hmax_pkg.sv` | types and constants |
| `hmax_pe.sv` | processing element |
| `hmax_primitive.sv` | 4x4 primitive |
| `hmax_cr.sv` | configurable routing |
| `hmax_delay_line.sv` | delay elements |
| `hmax_adder_tree.sv` | adder tree |
| `hmax_rcengine.sv` | RCengine |
| `hmax_foim.sv` | image memory |
| `hmax_focm.sv` | coefficient memory |
| `hmax_s2engine.sv` | pipeline |
| `hmax_pipe_adder.sv` | pipeline adder |
| `hmax_c2.sv` | C2 unit |
| `hmax_instr_queue.sv` | instruction queue |
| `hmax_controller.sv` | sequencer |
| `hmax_exp_unit.sv` | exponential unit |
| `hmax_s2c2_top.sv` | top |

`tb/` has one `tb_<module>.sv` per module, plus `tb_hmax_full.sv` and
`tb_hmax_sparse12.sv`.
