# Block-streaming PCA accelerator (SystemVerilog)

Principal Component Analysis (PCA) takes an R x B data matrix X and returns a
smaller R x L matrix Y. For example, R is the number of pixels of a
hyperspectral image and B its number of spectral bands. The steps are:

1. **Mean.** Compute the mean of every column (band).
2. **Covariance.** Compute the B x B covariance of the centred data,
   `COV = (X - M)' (X - M) / (R - 1)`.
3. **Eigendecomposition.** Decompose `COV = U S U'`.
4. **Sort and select.** Sort the eigenpairs by eigenvalue. Keep the first L
   eigenvectors whose eigenvalues hold at least T percent of the total energy.
5. **Projection.** Compute `Y = (X - M) * PC`.

When R is much larger than B, the covariance is the expensive step. It costs
about R·B²/2 multiply-accumulates, and in the simple approach every band of a
pixel must be on chip at the same time.

This design computes the covariance by **block streaming**. The bands are cut
into NB = B/BMAX blocks of BMAX bands. Blocks of each pixel are streamed into
the covariance unit in a fixed order. The unit holds only two blocks at a time,
in a "Diag RAM" and an "Off-diag RAM". So the hardware for the covariance
depends on BMAX, not on B, and the same unit can handle more bands by streaming
more blocks.

This RTL follows the architecture of the fixed-point version of the
accelerator described by M. A. Mansoori and M. R. Casu, *High Level Design of a
Flexible PCA Hardware Accelerator Using a New Block-Streaming Method*. That
design was written in C++ for high-level synthesis. This is a hand-written RTL
version of it. Where the article gives no detail (word lengths, handshakes,
FIFO depths, memory layout), the choices here are this implementation's own.
They are listed in "Departures and choices" below.

## Architecture

```
                 +-- Mean FIFOs ---> mean_unit --> mean_mem --+-------------+
 external        |                                            |             |
 memory  ---> dispatcher -- Diag FIFOs ----------------> cov_unit           |
 (read port)     |       -- Off-diag FIFOs ------------> cov_unit           |
                 |                                          |               |
                 |                                     evd_jacobi           |
                 |                                          |               |
                 |                                     sort_select          |
                 |                                          |               |
                 +-- PU FIFOs -----------------------> proj_unit <---------+
                                                            |
                                                      external memory (write port)
```

The top is `pca_accel`. It has two parts that run concurrently:

* **Dispatcher.** It reads the image three times and pushes blocks into four
  FIFO sets. Each set is BMAX FIFOs wide, one FIFO per band of a block, so one
  transfer carries one whole block. The three passes are:
  * pass 1 feeds the Mean FIFOs;
  * pass 2 feeds the Diag and Off-diag FIFOs in block-streaming order;
  * pass 3 feeds the PU FIFOs.

  When a FIFO set is full, the dispatcher stalls. That is how it waits for a
  core unit that has not started yet.
* **PCA core.** Its units run one after another. Each unit starts on the
  previous unit's `done`, in the order Mean → Cov → EVD → Sort & Select →
  Projection. The dispatcher has usually filled the next unit's FIFOs by then.

At the default sizes the dispatcher is the bottleneck, and run time is set by
how fast the data streams (see "Timing").

## Block streaming in the covariance unit

Number the blocks of a pixel P1..PNB. The covariance matrix then splits into
NB(NB+1)/2 block products:

* "diagonal" products Pk·Pk, which need one block;
* "off-diagonal" products Pa·Pb with a < b, which need two blocks.

For every pixel, `cov_unit` takes the blocks in this order:

| step | stream | block entering | Diag RAM | Off-diag RAM | product accumulated |
|---|---|---|---|---|---|
| diagonal | Diag | P1 .. PNB, one per cycle | the incoming block | – | upper triangle of Pk·Pk |
| round 1 | Off-diag | P1 .. P(NB-1) | PNB (kept from the diagonal step) | the incoming block | Pb·PNB |
| round 2 | Off-diag | P1 .. P(NB-2) | reloaded with P(NB-1) | the incoming block | Pb·P(NB-1) |
| … | | | | | |
| round NB-1 | Off-diag | P1 | reloaded with P2 | P1 | P1·P2 |

The key point is the **reload**. At the first beat of round ct ≥ 2, the block
still in the Off-diag RAM is the last block of round ct-1, which is P(NB-ct+1).
That is exactly the next partner, so it is copied into the Diag RAM and does
not need to be streamed again. In hardware the copy happens in the same cycle
as the first product of the round: the multiplier reads its Diag operand from
the Off-diag RAM for that beat. The reloads per pixel are:

* NB = 3 (the default): no reload in round 1, one reload in round 2.
* NB = 4: the Off-diag RAM holds P1, P2, P3 | P1, P2 | P1, and the Diag RAM is
  reloaded with P3 and then P2.

Over all R pixels the products add up in two banks of accumulators:

* `CovDiag`: NB × BMAX × BMAX entries, of which only the upper triangle is used.
* `CovOff`: NB(NB-1)/2 × BMAX × BMAX entries, indexed by the block pair in
  streaming order.

At the end, every element with i ≤ j is picked from the right bank, divided by
R-1, and written out.

Cost per pixel is NB + NB(NB-1)/2 cycles: 6 for B = 12, BMAX = 4 and 10 for
BMAX = 3. The unit has BMAX(BMAX+1)/2 + BMAX² multipliers (10 + 16 by default).
Each centred sample is `x·2^8 − mean`. Products are exact and sums are exact
(54-bit accumulators), so the covariance is bit-exact. It is truncated toward
zero only at the final division.

## Eigendecomposition: fixed-point two-sided Jacobi

`evd_jacobi` holds H (B x B) and V (B x B) in registers. It runs SWEEPS = B
cyclic sweeps over all pairs i < j. For a pair with a = H[i][i], b = H[j][j]
and c = H[i][j] ≠ 0, it applies the classical Jacobi rotation:

```
t  = sign(tau) / (|tau| + sqrt(1 + tau²)),   tau = (b − a) / 2c
cs = 1 / sqrt(1 + t²),  sn = cs·t
H[i][i] −= c·t,  H[j][j] += c·t,  H[i][j] = H[j][i] = 0
rows/columns i, j of H and columns i, j of V rotated by (cs, sn)
```

tau can be arbitrarily large, so t is evaluated as
`2|c|·sign(tau) / (|b−a| + sqrt((b−a)² + 4c²))`. The two forms are algebraically
equal, and this one is bounded by 1, so it fits a fixed-point word.

Each rotation uses:

* two sequential square roots (82-bit and 62-bit radicands);
* two sequential restoring divisions (71-bit and 62-bit numerators);
* B cycles to rotate the rows, columns and eigenvectors, one index k per cycle.

That comes to about 250 cycles per rotated pair. Pairs with c = 0 are skipped.
There is no convergence test: the unit always runs B sweeps, which is about
90–110 k cycles for B = 12.

The unit was deliberately left sequential. At these sizes its latency is
hidden behind the data streaming.

## Sort & select and projection

`sort_select` runs a selection sort on an index list, one comparison per
cycle. It then walks down the sorted eigenvalues until
`100·(σ1+…+σL) ≥ T·Σσ`. A negative eigenvalue, which can only come from
rounding, counts as zero energy. The output `pc` has the L chosen eigenvectors
as columns and zeros after them.

`proj_unit` makes L passes over each pixel's NB blocks, using BMAX multipliers
per cycle:

* In the first pass it takes the blocks from its FIFO set, centres them and
  stores them.
* Later passes reuse the stored centred pixel.

A pixel therefore costs L·NB cycles. Results leave one word per cycle on the
write port.

## Number formats

| quantity | format |
|---|---|
| input sample | 8-bit unsigned |
| mean | 16-bit unsigned, 8 fraction bits (floor of sum·2⁸/R) |
| centred sample | 17-bit signed, 8 fraction bits |
| covariance accumulator | 54-bit signed, 16 fraction bits (exact for R < 2²⁰) |
| covariance / H | 40-bit signed, 16 fraction bits |
| t, cs, sn, eigenvectors, PCs | 32-bit signed, 30 fraction bits |
| output Y | 32-bit signed, 16 fraction bits |

All of these are in `rtl/pca_pkg.sv`. Products are truncated toward minus
infinity (arithmetic shift), and divisions truncate toward zero.

## Interface of `pca_accel`

| parameter | default | meaning |
|---|---|---|
| `B` | 12 | bands (columns) |
| `BMAX` | 4 | block size; B must be a multiple of BMAX |
| `FIFO_DEPTH` | 4 | depth of every FIFO of the four sets |
| `SWEEPS` | B | Jacobi sweeps |

Ports:

* `start` is a one-cycle pulse. Hold these inputs stable until `done`:
  * `rows`: R, at least 2 and less than 2²⁰;
  * `threshold`: T in percent, 0..100;
  * `in_base`: word address of pixel 0;
  * `out_base`: word address of Y[0][0].
* **Read channel**:
  * `rd_req_valid/ready/addr` carries word addresses `in_base + r`;
  * `rd_rsp_valid/ready/data` returns one pixel per word, band k in bits
    `[8k+7:8k]`.

  Responses must come back in request order. The accelerator never has more
  than two requests in flight.
* **Write channel**: `wr_valid/ready/addr/data` carries one Y value per
  transfer, Y[r][l] at `out_base + r·L + l`.
* **Status outputs**:
  * `num_pc` (L) and `eigval` (sorted eigenvalues) are valid from the start of
    the projection;
  * `busy` is high for the whole run;
  * `done` pulses when the last result has been accepted.

All registers use an asynchronous active-low reset, `rst_n`.

## Timing

With a memory that accepts every request and answers after two cycles, a
949 x 220 pixel, 12-band image (R = 208 780) takes 3 855 024 cycles end to end
at the default parameters, with L = 3. The rates behind that figure:

* Mean: NB = 3 cycles per pixel.
* Covariance: 6 cycles per pixel, measured at exactly 6·R cycles.
* Projection: L·NB = 9 cycles per pixel.
* Mean and covariance divisions: a few thousand cycles.
* Jacobi: about 0.1 M cycles.

The passes overlap with the dispatcher, which mostly waits on full FIFOs.
Changing BMAX trades multipliers against cycles per pixel, as the table
below shows.

| | B = 12, BMAX = 3 | B = 12, BMAX = 4 |
|---|---|---|
| mean cycles per pixel | 4 | 3 |
| covariance cycles per pixel | 10 | 6 |
| covariance multipliers | 15 | 26 |

## Departures and choices

* **Fixed point only.** The floating-point variant of the original design uses
  a vendor library SVD and is not reproduced. The Jacobi EVD is the
  fixed-point variant's.
* **Word lengths are this implementation's own** (see the table above). They
  are chosen to be overflow-free for 8-bit data and up to 2²⁰ − 1 pixels. The
  original word lengths were tuned for one data set and are not published.
* **Memory interface.** AXI master ports are replaced by simple valid/ready
  read-address, read-data and write channels with no bursts. One memory word
  holds one whole pixel (B·8 = 96 bits), instead of being split over two 64-bit
  ports. Fitting a wider or narrower bus would need an adapter in front of
  `rd_rsp_data`.
* **The image is read three times**: once for the mean, once for the
  covariance and once for the projection.
* **Sequencing.** The core units run strictly one after another, and the
  dispatcher runs ahead by at most the FIFO depth plus two pixels.
* **Jacobi details.** The bounded form of t is used, c = 0 pairs are skipped,
  and there is no early exit.
* **Sort & select.** L ≥ 1, and negative eigenvalues count as zero energy.
* **No support for B not divisible by BMAX.** Elaboration stops with an error.
* **Input width is fixed at B·8 bits.** The original sizes the dispatcher
  input to the memory bandwidth, bw_max = B_DDR / F. When B·8 is wider than
  bw_max, one pixel would then take more than one read. Here one read is
  always one pixel, so a narrower memory needs an adapter.
* **Tested images are synthetic.** The 12-band hyperspectral scene used to
  evaluate the original is not included. The benches generate images with
  three strong underlying components plus noise instead.

## Files

| file | content |
|---|---|
| `rtl/pca_pkg.sv` | sizes, number formats, phase enum |
| `rtl/pca_accel.sv` | top level |
| `rtl/dispatcher.sv` | memory reader and block sequencer |
| `rtl/fifo_set.sv`, `rtl/stream_fifo.sv` | BMAX-lane FIFO set and its FIFO |
| `rtl/mean_unit.sv`, `rtl/mean_mem.sv` | column means and their storage |
| `rtl/cov_unit.sv` | block-streaming covariance |
| `rtl/evd_jacobi.sv` | fixed-point Jacobi EVD |
| `rtl/sort_select.sv` | sorting and energy-threshold selection |
| `rtl/proj_unit.sv` | projection and output writes |
| `rtl/seq_divider.sv`, `rtl/seq_sqrt.sv` | bit-serial divider and square root |
| `tb/tb_<unit>.sv` | self-checking test of each unit |
| `tb/pca_bench_body.svh` | end-to-end bench body: memory model, reference PCA, checks |
| `tb/pca_accel_bench.sv` | that body around `pca_accel` at its default parameters |
| `tb/pca_accel_wl_bench.sv` | the same body around `pca_accel` with B and BMAX set |
| `tb/tb_pca_accel.sv` | end-to-end run, 300 pixels, random stalls |
| `tb/tb_pca_accel_full.sv` | end-to-end run, 949 x 220 pixels, default parameters |
| `tb/tb_wl_*.sv` | end-to-end runs at other band counts and block sizes (below) |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`. They compare against
values computed in the testbench itself:

* the mean, the covariance (bit-exact), the sort order, L and the projection
  (bit-exact at unit level);
* the eigenvalues and outputs of the whole accelerator, against a
  double-precision PCA with tolerances;
* orthonormality of V and reconstruction of H in the EVD test.

They also check the per-pixel cycle counts given above.

The end-to-end benches also count these mechanisms, and fail if one never
happens:

* full-FIFO stalls of the dispatcher;
* Diag RAM reloads, which must number R·(NB − 2) (none with two blocks per
  pixel);
* selection of fewer than B components;
* in the stalled run, refused reads and write back-pressure.

The full-size run checks about 1.25 million values. Its largest output error is
below 1e-4.

The same bench also runs the accelerator at other sizes. Each run is at full
size, with the data rows streamed from the memory model:

| testbench | pixels x bands | BMAX | blocks per pixel | cycles | covariance cycles per pixel |
|---|---|---|---|---|---|
| `tb_pca_accel_full` | 949 x 220 x 12 | 4 | 3 | 3 855 024 | 6 |
| `tb_wl_vga12` | 640 x 480 x 12 | 3 | 4 | 8 090 512 | 10 |
| `tb_wl_table4` | 30 x 16 | 8 | 2 | 410 392 | 3 |
| `tb_wl_bands20` | 300 x 300 x 20 | 10 | 2 | 1 390 179 | 3 |
| `tb_wl_bands48` | 300 x 300 x 48 | 8 | 6 | 6 132 818 | 21 |
| `tb_wl_bands50` | 100 x 100 x 50 | 10 | 5 | 2 968 722 | 15 |

Only the 12-band images fit the default build (B = 12). The others set B and
BMAX on the instance. With few pixels, the Jacobi unit dominates. It
takes about 0.4 M cycles at 16 bands and about 2.8 M at 50. With many pixels,
the covariance pass dominates. Band counts far above 50 were not tried:
the Jacobi unit keeps the B x B matrix and eigenvectors in flip-flops (72·B²
bits), so its size grows with the square of B.

To run a test with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb +libext+.sv \
    rtl/pca_pkg.sv tb/tb_pca_accel.sv --top-module tb_pca_accel
./obj_dir/Vtb_pca_accel
```

Replace `tb_pca_accel` with any other testbench name. The full-size run takes
a few seconds.
