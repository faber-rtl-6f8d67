# Image-registration accelerator: streaming affine warp and similarity metrics

Image registration aligns a *floating* image with a *reference* image. An
optimiser proposes a transformation and warps the floating image. A similarity
metric then scores how well the warped image matches the reference, and the
loop repeats, often hundreds of times per image pair. Almost all of the time
goes into the warp and the metric. Both touch every pixel, and both are regular
enough to stream through hardware.

This RTL is the hardware side of such a system. The optimiser stays in software
on a host processor. For every candidate transformation, the host writes an
affine matrix into a core's registers and starts it. The core reads the two
images from off-chip memory. It warps the floating image on the fly, computes
one of four metrics, and writes the value back to memory. The four metrics are
mean squared error, cross-correlation, mutual information and normalised mutual
information.

The design is a *template*. How many cores there are, which metric each one
computes, how many pixels it handles per cycle, and whether it has a warp unit
and a reference-image cache are all parameters.

## Structure

```
faber_top (NUM_CORES copies of faber_core; every core has its own ports)
└─ faber_core
   ├─ axi_lite_ctrl     host registers: addresses, matrix, mode, start/done, result
   ├─ axi_rd_master ×2  port 0: floating image (also fills the cache)
   │                    port 1: reference image when there is no cache
   ├─ ref_cache         (USE_CACHE) the reference image held on chip
   ├─ pkt_unpack → affine_transform → pkt_pack      (USE_TRANSFORM)
   ├─ one metric, chosen by METRIC:
   │    mse_metric  (mse_pe × PE, seq_divider)
   │    cc_metric   (cc_pe × PE, seq_sqrt, seq_divider)
   │    mi_metric   (joint_histogram → entropy_unit)
   │    nmi_metric  (joint_histogram → parzen_conv → entropy_unit)
   │        joint_histogram = hist_pe × PE + adder tree
   │        entropy_unit    = log2_pipe × 2 + seq_divider
   ├─ axi_wr_result     writes the 64-bit metric value
   └─ axi_wr_stream     (USE_TRANSFORM) writes the warped image back, on its own port
```

Images are DIM × DIM pixels of B bits, stored row-major. One memory beat
carries one *packet* of PE neighbouring pixels, so the data bus is PE·B bits
wide and pixel k of a packet sits in bits `[k*B +: B]`. PE is also the number
of processing elements in the metric. The metrics consume one packet per
cycle. The warp unit handles one pixel per cycle: the floating stream is
unpacked in front of it and packed again behind it.

All shared types are in `faber_pkg`:

- `metric_t` is a signed 64-bit value with 32 fraction bits. Every metric
  reports its result in this format.
- `coef_t` is a signed Q16.16 matrix coefficient.
- `affine_t` holds the six coefficients.
- There are enums for the metric and for the interpolation mode.

## One run of a core

1. The host writes the three addresses (reference, floating, result), the
   matrix and the interpolation mode. It then writes START to CTRL. Setting
   bit 3 (FILL) as well forces the cache to reload.
2. If the core has a cache and the cache is empty, or FILL was set, read port
   0 first copies the reference image into the cache.
3. The floating image streams in on port 0 and goes through the warp unit. At
   the same pace, the reference streams out of the cache, or comes in on
   port 1 if there is no cache. The metric takes a reference packet and a
   floating packet together.
4. The metric reduces its partial results. The value is latched in the result
   register, written to memory with one 64-bit beat, and DONE is set.

Register map of `axi_lite_ctrl` (32-bit registers, byte offsets):

| offset | name | contents |
|---|---|---|
| 0x00 | CTRL | write: bit0 START, bit3 FILL, bit4 WARP_OUT. Read: bit0 busy, bit1 DONE (stays set until the next START), bit2 IDLE, bits 3 and 4 as given with the last START |
| 0x08 | INTERP | 0 nearest neighbour, 1 bilinear |
| 0x10 / 0x14 | REF_ADDR | reference image byte address, low / high word |
| 0x18 / 0x1C | FLT_ADDR | floating image address |
| 0x20 / 0x24 | RES_ADDR | address for the 8-byte result |
| 0x28 … 0x3C | M00 M01 M02 M10 M11 M12 | affine matrix, Q16.16 |
| 0x40 / 0x44 | RESULT | metric value, signed Q31.32 |
| 0x48 / 0x4C | OUT_ADDR | where a WARP_OUT run writes the warped image |

A run started with WARP_OUT (only in a core built with the warp unit) does
something else. It reads and warps the floating image and writes the result,
packet by packet, to OUT_ADDR. It uses bursts on a separate AXI write port. No
reference image is read and no metric is computed. DONE is set once the last
burst is answered. This lets the host fetch the registered image at the end.

START is ignored while the core is busy. The image addresses must be aligned
to one burst (MAX_BURST · PE · B / 8 bytes). The read masters keep up to four
bursts in flight and never cross a 4 KiB boundary.

## The warp unit (`affine_transform`)

For every output pixel (x, y), in raster order, the unit computes the source
position:

```
xs = m00·x + m01·y + m02,   ys = m10·x + m11·y + m12
```

The matrix maps output coordinates to input coordinates, so the host passes
the inverse of the transformation it is testing.

- **Nearest neighbour:** takes the closest input pixel.
- **Bilinear:** blends the four pixels around (xs, ys) with 8-bit weights.
- Positions outside the image read as 0.

The input arrives as a raster stream, so the unit cannot reach any pixel at
any time. It keeps a circular buffer of the last STORE_ROWS = 100 input rows.
It starts output row y only once rows up to y + START_ROWS − 1 have arrived.
START_ROWS defaults to 50. While row y is being produced, output row y may use
source rows

```
y + START_ROWS − STORE_ROWS + 1  …  y + START_ROWS − 1
```

Source pixels outside this window also read as 0. A rotation or vertical shift
that reaches more than about 50 rows away from the output row therefore loses
pixels. This is the basic trade-off of a streaming warp: buffer memory against
the largest motion that can be handled.

While row y is produced, input row y + START_ROWS is written into the buffer
slot that has just left the window. Once primed, the unit takes in and gives
out one pixel per cycle. A frame takes **(DIM + START_ROWS) · DIM** cycles,
whatever PE is. A core with a warp unit is therefore bound by this term rather
than by the metric.

The buffer is split into four banks by the parity of row and column. The four
bilinear taps always fall into different banks, so all four are read in the
same cycle. A bank is written and read in the same cycle; the read returns the
old contents, which the row-window timing relies on.

The pipeline has three stages: coordinates, then bank reads, then the blend.
The whole pipeline stalls when the output is not accepted. The matrix and the
mode are sampled with the first pixel of each frame.

## Metrics

Each metric accelerator is a map-reduce. The map sends pixel pair k of every
packet to processing element k. The reduce combines the PE results when the
image is done.

| metric | value reported | cycles (one packet per cycle in) |
|---|---|---|
| MSE | Σ(x−y)² / N | D²/PE + reduce and divide |
| CC | −Σxy / √(Σx² · Σy²); 0 when the denominator is 0 | D²/PE + square root and divide |
| MI | H(X) + H(Y) − H(X,Y), in bits | D²/PE + (2^B)² |
| NMI | (H(X) + H(Y)) / H(X,Y) on a Parzen-smoothed histogram | D²/PE + (2^B + K − 1)² |

In this table, D = DIM, N = D² and K = 3. CC is negated so that, as with MSE, a lower
value means a better match; MI and NMI grow as the match improves. The tails of MSE and CC are a few hundred cycles of bit-serial
division and square root, done once per image.

### Joint histogram (`joint_histogram`, `hist_pe`)

MI and NMI need the joint histogram of the two images: 2^B × 2^B counters, one
per pair of grey levels. Each PE owns a private copy in a dual-port memory and
counts one pair per cycle. It reads the counter in the cycle the pair arrives
and writes the incremented value in the next. When a pair hits the counter
written in the previous cycle, the count comes from a forwarding register,
which keeps runs of equal pixels correct.

After the last packet, the PE memories are read in step, bin by bin. An adder
tree sums the PE copies, and the merged histogram streams out in row-major
order, one bin per cycle. This readout is the (2^B)² term in the latency. Each
bin is written to zero in the same cycle it is read, so the histograms are
clear for the next image without extra cycles. After reset, one sweep clears
them before the first image is accepted.

### Parzen smoothing (`parzen_conv`, NMI only)

The histogram stream goes through a full 2-D convolution with a separable
B-spline kernel, [1 4 1] ⊗ [1 4 1], producing (2^B + 2)² outputs. A two-row
line buffer holds the rows that are still needed, so the convolution runs at
one bin per cycle as the histogram streams. The kernel is unnormalised; the
scale cancels in the entropies.

### Entropies (`entropy_unit`, `log2_pipe`)

The unit never forms a probability. With T the total count, it uses

```
H = −Σ (h/T) log2(h/T) = log2 T − (1/T) Σ h·log2 h
```

- Every bin goes through a pipelined log2, and h·log2 h is accumulated for
  H(X,Y).
- A running row sum gives the reference histogram (H(X)) at the end of each
  row.
- Column sums are kept in a 2^B-entry array and sent through a second log2
  pipe at the end (H(Y)). T follows them.
- Three bit-serial divisions produce the three entropies.

`log2_pipe` finds the leading one for the integer part. It then squares the
normalised mantissa once per fraction bit (20 bits by default), with one
pipeline stage each. Its latency is FRAC + 1 cycles and it accepts one value
per cycle. log2(0) is taken as 0, so empty bins add nothing.

## Reference cache (`ref_cache`)

The reference image does not change during a registration, but it is read once
per metric evaluation. With `USE_CACHE`, a core keeps it on chip as DIM²/PE
packets: 2 Mbit at the default size. The core then needs only one read stream
per run. The cache is loaded on the first run after reset, and again whenever
the host sets FILL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| NUM_CORES | 4 | independent cores in `faber_top` |
| CORE_METRIC | '{MI, NMI, CC, MSE} | metric of each core |
| DIM | 512 | image side in pixels; fixed at build time |
| PE | 16 | pixels per packet, processing elements per metric |
| B | 8 | bits per pixel (256 grey levels) |
| USE_TRANSFORM | 1 | build the warp unit in front of the metric |
| USE_CACHE | 1 | build the reference cache |
| STORE_ROWS | 100 | rows kept by the warp unit |
| START_ROWS | 50 | rows that must arrive before output row 0 starts |

The configurations usually quoted for this architecture map onto these
parameters:

- **MI16:** one core, MI, 16 PEs, warp done in software.
  `NUM_CORES=1, CORE_METRIC='{METRIC_MI}, USE_TRANSFORM=0`.
- **2WCC1:** two cores, CC, one PE, warp in hardware.
  `NUM_CORES=2, CORE_METRIC='{METRIC_CC, METRIC_CC}, PE=1`.

The default of four different cores exists so that every metric is built in
one design.

A 512 × 512 8-bit image fits the defaults. Larger images (1024², 2048²) need a
rebuild with a larger DIM. Several sizes grow with it:

- the cache: DIM² · B bits
- the warp buffer: STORE_ROWS · DIM · B bits
- the histogram counter width: log2(DIM²) + 1 bits

Memory per core at the defaults:

- cache: 2 Mbit
- warp buffer: 400 kbit
- MI or NMI: PE × 65,536 counters of 19 bits, which is 19.9 Mbit at PE = 16

## Where this departs from the published architecture

- **Arithmetic.** MI and NMI are computed in fixed point here: a 20-bit
  fraction in the logarithm and a 32-bit fraction in the result. The published
  evaluation uses 32-bit floating point for these two metrics, and a
  floating-point option is not built. In the testbenches the results agree with a
  double-precision model to within 1e-4 bits.
- **Formulas.** The published material names the metrics but does not print
  the exact formulas for CC and NMI. The CC normalisation and sign, and
  NMI = (H(X) + H(Y)) / H(X,Y), are the usual definitions and were chosen
  here.
- **NMI kernel.** The kernel size K = 3 and the coefficients [1 4 1] are
  chosen here. Only "a B-spline kernel of size K" is given.
- **Warp unit.** The published warp unit is a modified vendor library kernel
  that stores 100 rows. The row-window scheme, START_ROWS = 50, the Q16.16
  matrix, the 8-bit bilinear weights and the zero border are this design's
  own. The original can send its output either to memory or to the metric;
  here that is a per-run choice (WARP_OUT), not a build option.
- **Matrix delivery.** The original warp unit fetches the matrix from
  off-chip memory together with the image. Here the host writes it into
  registers before START.
- **Parallelism.** The entropy stage processes one bin per cycle and is not
  split across PEs. This matches the published latency model, which charges
  one cycle per bin.
- **Host side.** The register map, the run sequence, the burst sizes, the
  cache refill rule and the core count and metric mix of the default top are
  all this design's choices.
- **Not built:** the optimisers (Powell, 1+1 evolutionary), the software
  versions of warp and metrics, and the host APIs. These are software. The
  off-chip memory is an external part.

## Simulation

Every block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if the design hangs.
`tb/axi_wr_sink.sv` is a behavioural burst-write slave that stores what the
warp-out port writes. `tb/axi_mem_model.sv` is a behavioural AXI memory with two read ports and one
write port. It inserts random stalls, keeps several bursts in flight, and
records every result write.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
          --top-module tb_faber_top rtl/faber_pkg.sv tb/tb_faber_top.sv
./obj_dir/Vtb_faber_top
```

| testbench | what it covers |
|---|---|
| tb_faber_top | all four cores at DIM = 32, PE = 4, STORE_ROWS = 16, START_ROWS = 8, with metric runs and warp-out runs |
| tb_faber_top_full | the top at its default parameters (512 × 512, PE = 16, four cores); about half a minute in verilator |
| tb_faber_core | one core without cache and warp (MSE), both read ports |
| tb_affine_transform | identity, translation, rotation in both modes, the row-window limit, the (DIM + START_ROWS) · DIM latency |
| tb_mse_metric, tb_cc_metric, tb_mi_metric, tb_nmi_metric | random and corner-case image pairs against a floating-point model, with the latency checked |
| tb_joint_histogram, tb_parzen_conv, tb_entropy_unit, tb_log2_pipe | bin-exact and value checks of the histogram path |
| tb_ref_cache, tb_axi_lite_ctrl, tb_axi_rd_master, tb_axi_wr_result, tb_axi_wr_stream | fill/replay, register map, read and write bursts under back-pressure, single-beat writes |

Each core in tb_faber_top does four runs:

1. a first run that fills the cache (nearest neighbour)
2. a warp-out run; the written image is compared pixel by pixel
3. a run that reuses the cache, with bilinear interpolation
4. a run that forces a refill, with a rotation large enough that the row
   window drops pixels

Both the metric read over AXI-Lite and the value written to memory are
compared with a reference model inside the testbench. The testbench also
counts each mechanism: cache fills, cache reuse, both interpolation modes,
window losses, warp-out runs, memory stalls and overlapping bursts. Any mechanism that never
occurs is reported as a failure.
