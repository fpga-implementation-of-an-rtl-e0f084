# ATGP-OSP target detection for hyperspectral images, in SystemVerilog

A hyperspectral image stores, for every pixel, a spectrum of a few hundred
bands. The automatic target-generation process (ATGP) picks out the pixels
whose spectra are most unlike everything found so far:

1. the first target `x0` is the pixel of largest length `f·f`;
2. with the targets found so far as the columns of `U`, every pixel is
   projected onto the orthogonal complement of their span,
   `v = P_U f` with `P_U = I - U (U^T U)^-1 U^T`;
3. the pixel with the longest projection `v·v` is the next target; repeat
   until `t` targets have been found.

This RTL is an accelerator for that procedure (the "orthogonal subspace
projector" variant, ATGP-OSP). It sits beside a processor on a bus: the
processor streams the image into it through a FIFO and reads back the
indices of the targets through another FIFO. The accelerator builds `P_U`
itself, including the matrix inverse, and projects the whole image once
per target. Its default size is 256 bands and 32 targets. That covers AVIRIS
scenes with 224 bands and the 19 to 30 targets typically asked for.

## Data flow of one detection run

Everything is driven by the control unit (`atgp_ctrl`). It steps through
these phases (`phase_e` in `atgp_pkg`):

| phase | what happens | cycles (nb bands, k targets so far, R pixels) |
|---|---|---|
| `SCAN`  | raw pixels go from the write FIFO straight into the maximum-length unit, two components per cycle | R·nb/2 |
| `INDEX` | index of the longest pixel is pushed into the read FIFO; the run ends after `t` of them | 1 |
| `LOADU` | the host writes the selected pixel; it becomes column k of `U` and row k of `U^T` | nb |
| `GRAM`  | `U^T U` (k×k dot products of length nb) is written into the inverse unit | k² + ~12 |
| `INV`   | Gauss-Jordan inversion of `U^T U` | ≤ k² + 9k + 4 |
| `MMUL`  | `M = (U^T U)^-1 U^T` (k·nb dot products of length k) | k·nb + ~12 |
| `PMUL`  | `U M` (nb² dot products of length k); the subtractor turns each element into `P_U` | nb² + ~12 |
| `PROJ`  | each pixel is popped from the pixel FIFO, and pairs of `P_U` rows are multiplied with it. The two results per cycle go to the maximum-length unit | R·(nb/2 + 1) |

After `PROJ` the control unit returns to `INDEX`.

**Prefetching.** From the end of `LOADU`, the host streams the whole image
again. The control unit moves it from the write FIFO into the pixel FIFO in
the background, while `GRAM` … `PMUL` build the projector. When `PROJ`
starts, the first pixels are already waiting. If the pixel FIFO is full, the
write FIFO stops draining, and `wf_full` holds the host back.

For large images the projection dominates: R·(nb/2+1) cycles per target.
For the World Trade Center AVIRIS scene (614×512 pixels, 224 bands,
t = 30), that comes to about 1.07·10⁹ cycles. For Cuprite (350×350 pixels,
189 bands padded to 190, t = 19) it is about 2.3·10⁸ cycles. At the 72 MHz
reported for a Virtex-7 implementation of this architecture, these are about
15 s and 3.1 s, close to the 15.6 s and 3.3 s measured there. These figures
are estimates from the cycle formula above. Whole scenes were not
simulated.

## Host protocol

1. Set `num_bands` (even, 2 … `N_BANDS`), `num_pixels` and `num_targets`
   (1 … `T_MAX`), then pulse `start`. If a scene has an odd number of bands,
   append one zero band: it changes no length and no projection.
2. Write the image into the write FIFO, pixel after pixel. Each 64-bit word
   carries two components: band b in bits 31:0 and band b+1 in bits 63:32.
3. Read an index from the read FIFO. Unless it is the last one, write that
   pixel once, then the whole image again, and repeat step 3.
4. `done` rises after `num_targets` indices. If `U^T U` is singular, the run
   stops with `error` instead. This happens, for example, when the image is
   all zeros. Apply reset before the next run after an error: the FIFOs may
   still hold data of the aborted run.

The processor, its bus, the DMA engine, the DDR3 memory and the RS232 UART
of a complete system are not part of this RTL. The testbenches contain a
host model that plays their part.

## Number format

All data are signed fixed-point words: 32 bits, 16 of them fraction bits
(Q15.16, `atgp_pkg`). Reflectance-like pixel values in [0, 1) and Gram
entries up to 256 fit comfortably. The rounding is the same everywhere:

* dot products (`vec_mult`) keep every product and partial sum at full
  width (64 bits plus tree growth). They are shifted back and saturated
  once, at the output;
* lengths (`max_length`) are never rounded: 72-bit sums of squares;
* the Gauss-Jordan steps round after each multiplication (`fx_mul`: shift
  by 16, rounding toward minus infinity, saturating). Divisions truncate
  toward zero (`fx_div`);
* the subtractions of the elimination and of `I - U M` wrap on overflow.

This format is this design's choice; the architecture it implements does not
fix one. The resource figures published for that architecture (about 2.5
DSP blocks per multiplier lane) suggest single-precision floating point
there. Fixed point is exact and cheap, but its weak spot is the inverse, described
next.

## The Gauss-Jordan inverse (`gj_inverse`, `gj_datapath`)

The unit holds `A` and `A^-1` (the latter reset to `I`) as register arrays
of `T_MAX × T_MAX` words. Two identical row data paths work on them. Each
data path keeps the pivot row and its pivot `a_ii` in registers. For every
other row j it computes, in one cycle, `row_j - pivot_row · (a_ji / a_ii)`
across all `T_MAX` lanes. The first data path works on `A` and computes the
ratio with its divider. The second works on `A^-1` and takes that ratio
from the first, so both matrices receive the same row operation in the same
cycle.

Rows are never moved. A permutation table `row[]` maps logical rows to
physical ones, and a pivot exchange swaps two table entries. The sequence:

* forward: for i = 0 … k-1, if `A[row[i]][i] == 0`, swap with the first
  later row that is non-zero in column i. If there is none, the matrix is
  singular. Then eliminate column i from all later rows;
* backward: for i = k-1 … 1, eliminate column i from all earlier rows;
* normalise: multiply row i of `A^-1` by `1/a_ii`. The reciprocal is formed
  by the first data path's divider.

Rows are exchanged only when a pivot is exactly zero. There is no search for
the largest pivot. For `U^T U`, which is symmetric positive definite when
the targets are independent, this is the textbook case where elimination
without pivoting is stable. The fixed-point error then stays around 10⁻⁴
relative for well-conditioned matrices. Matrices with small pivots lose
accuracy quickly in Q15.16, which the unit test avoids on purpose. Near-
collinear targets are where this design is least trustworthy. Widening
`DATA_W` and `FRAC_W` in `atgp_pkg` is the remedy: every module takes its
widths from there.

The pseudocode this follows tests the exchange candidate's own diagonal
element. This RTL tests the candidate's element in column i, which is what
makes the exchange useful.

## Block reference

| module | role | parameters (default) |
|---|---|---|
| `atgp_osp_unit` | top: all blocks and the data routing between them | `N_BANDS` 256, `T_MAX` 32, `PIX_DEPTH` 512, `WF_DEPTH` 16, `RF_DEPTH` 32 |
| `atgp_ctrl` | control unit, phases as above | `N_BANDS`, `T_MAX` |
| `vec_mult` | dot product: N multipliers, a registered adder tree. One product per cycle, latency log2(N)+2 | `N` 256 |
| `gj_inverse`, `gj_datapath` | Gauss-Jordan inverse and its row data path | `T_MAX` 32 |
| `max_length` | squared length from two components per cycle; keeps the maximum and its index (ties keep the earlier pixel) | `N_BANDS` |
| `pu_subtractor` | `1 - a` on the diagonal, `0 - a` elsewhere | `POS_W` |
| `pixel_fifo` | one FIFO per band, written two bands at a time, read a whole pixel at a time | `N_BANDS`, `DEPTH` 512 |
| `matrix_mem` | matrix written one element per cycle, read two whole rows per cycle | `ROWS`, `COLS` |
| `sync_fifo` | write FIFO (pixel data in) and read FIFO (indices out) | `WIDTH`, `DEPTH` |
| `atgp_pkg` | number format, `fx_mul`/`fx_div`, `phase_e` | `DATA_W` 32, `FRAC_W` 16 |

The four matrix memories are instances of `matrix_mem`:

* `U` (nb × t) and `U^T` (t × nb) are written together. Row access of one
  is column access of the other;
* `M = (U^T U)^-1 U^T` is stored transposed (nb × t), so that its columns
  come out as rows;
* `P_U` (nb × nb) delivers rows 2m and 2m+1 together.

The two `vec_mult` instances divide the work as follows. Matrix products use
the first, one element per cycle. While projecting, both run in lock step,
on rows 2m and 2m+1 of `P_U`. This gives the two components per cycle that
the maximum-length unit consumes.

Memories are plain arrays with combinational reads. On an FPGA the wide
row reads of `P_U` and of the pixel FIFO map to many narrow block RAMs, one
per column or band. A block-RAM version needs one more cycle of read
latency in front of the multipliers.

## Where this departs from the architecture it implements

* Q15.16 fixed point instead of the unstated (probably floating-point)
  format. See above.
* Host interface: plain FIFO and configuration ports instead of bus
  registers. Also a defined protocol for re-sending pixels.
* Exchange test in the inverse uses column i (see above).
* Both multipliers work together only while projecting. How the original
  shares them in the matrix products is not known.
* `M = (U^T U)^-1 U^T` is held as an nb × t memory (its transpose), not
  t × nb, so that the `U M` product reads its columns as rows.
* The pixel FIFO is 512 pixels deep. This depth is inferred from the block
  RAM budget of the original design, not stated.

## Simulation

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_atgp_osp_unit \
    rtl/atgp_pkg.sv tb/atgp_ref_pkg.sv rtl/*.sv tb/tb_atgp_osp_unit.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

| testbench | what it shows |
|---|---|
| `tb_atgp_osp_unit` | whole accelerator at 16 bands, 8 targets and a 4-pixel FIFO. Three runs (14 and 16 bands in use, and an all-zero image that must end in `error`). Every index is compared with `atgp_ref_pkg`, a loop-level reference in the same arithmetic. The test also checks that the planted targets come out first, in order. It counts prefetch, pixel-FIFO and write-FIFO back-pressure, maxima, diagonal and off-diagonal subtractions, and the singular stop |
| `tb_atgp_full` | the accelerator at its default parameters: 224 bands, 48 pixels, 4 targets (about 175 000 cycles, about 10 s) |
| `tb_atgp_workloads` | default parameters, with the band and target counts of the two AVIRIS scenes and 64 pixels each: 224 bands with t = 30 (about 1.8 million cycles), and 190 bands with t = 19 (about 0.8 million cycles). All 49 indices are compared with the reference. About 2.5 minutes |
| `tb_atgp_ctrl` | control unit against a behavioural data path. It counts the issued products per phase and checks that every index pair is issued exactly once |
| `tb_gj_inverse` | inverses of all sizes 1 … 8 against a floating-point inverse (tolerance 2⁻⁹). Also row exchanges, singular matrices, and the cycle bound |
| `tb_vec_mult`, `tb_gj_datapath`, `tb_max_length`, `tb_pu_subtractor`, `tb_pixel_fifo`, `tb_matrix_mem`, `tb_sync_fifo` | each block against values computed independently in the testbench, including latencies, flags and corner cases (saturation, ties, full FIFOs) |

`atgp_ref_pkg` also generates the test images. The background is
pseudo-random, below 1/4. Up to four planted targets of amplitude 1.0, 0.9,
0.8 and 0.7 sit in disjoint quarters of the band range. Their detection
order is known without any arithmetic model.
