# Shape classifier with Hu moment invariants and a Kohonen map

This design classifies a binary image by the shape of the object in it.

It does not compare pixels. Instead it reduces the image to seven numbers, **Hu's moment invariants**. These stay (nearly) the same when the object is moved or rotated; the first two also ignore its size (see *Stage 2*). The seven numbers are then matched against a small trained **Kohonen map**: eight neurons, each holding seven weights and a class tag. The tag of the neuron at the smallest Manhattan (L1) distance is the answer.

Everything after the pixel scan is IEEE 754 single-precision arithmetic. The classification step itself takes 32 clock cycles.

The input can be a binary image or a grey-level one. A grey image is first binarised on chip with a threshold chosen by Otsu's method.

The map is trained off line, so the chip only classifies. The training uses a self-organising Kohonen algorithm followed by k-means clustering to attach a class tag to every neuron. The trained map is loaded into the design through a word-wide port.

```
 g_we/x/y/grey ─► otsu_thresholder ─┐ (binary pixel writes)
                                    ▼
 pix_we/x/y/val ─► image_buffer ─► hu_extractor ─────────────────────────► kohonen_classifier ─► class_tag
  (20x20 bits)                     moment_accumulator  (integers, 1 px/clk)   8 x kohonen_neuron   winner
                                   central_moments     (int→float, centroid)  winner_select        min_dist
                                   eta_normalise       (÷ mu00²)                    ▲
                                   hu_invariants       (I1..I7)                     │ weights, tag
 w_we/addr/data ─────────────────────────────────────────────────────────► weight_memory (64 words)
```

The top module is `image_classifier` (`rtl/image_classifier.sv`).

## Using the top level

| Port | Dir | Meaning |
|---|---|---|
| `pix_we`, `pix_x[4:0]`, `pix_y[4:0]`, `pix_val` | in | Write one pixel of the 20x20 image (1 = object). |
| `w_we`, `w_addr[11:0]`, `w_data[31:0]` | in | Write one word of the Kohonen map. Address `8n+k` holds weight `k` of neuron `n`, as a float. Address `8n+7` holds neuron `n`'s tag. |
| `g_we`, `g_x`, `g_y`, `g_grey[7:0]` | in | Write one pixel of a grey image into the thresholder's frame store. |
| `binarise` | in | One-clock pulse: threshold the grey image into the image buffer, then classify it. Ignored while `busy`. |
| `bin_done`, `thr_found`, `threshold[7:0]` | out | Pulse at the end of binarisation, whether a threshold exists, and the chosen grey level. |
| `start` | in | One-clock pulse: classify the stored image. Ignored while `busy`. |
| `busy` | out | High from the accepted `start` or `binarise` until `class_valid`. |
| `raw` | out | The ten raw integer moments of the last image. |
| `hu_valid`, `hu[6:0]` | out | Pulse: `hu[k]` holds invariant I(k+1) as a float. |
| `class_valid`, `class_tag`, `winner[2:0]`, `min_dist` | out | Pulse: the winning neuron, its tag and its distance. |

Times are counted from the clock edge that samples `start`, at the default sizes:

- `hu_valid` rises after 407 clocks: 400 for the pixel scan, then 7 for the moment pipeline and the floating-point stages.
- `class_valid` rises after 440 clocks: 33 more for classification.
- At a 10 ns clock, one image takes 4.4 µs.
- A new `start` is accepted on the clock after `class_valid`.
- After `binarise`, `bin_done` pulses after 1056 clocks (2·400 + 256). The classification then starts by itself on the next clock and runs as after `start`.

The image buffer and the weight memory keep their contents between classifications. Reset clears both.

## Stage 0: Otsu binarisation

`otsu_thresholder` keeps a 20x20 frame of 8-bit grey pixels. A run makes three passes, one step per clock:

1. **Histogram** (400 clocks): count each grey level and sum all grey values.
2. **Search** (256 clocks): for each level `t`, update the count `w0` and grey sum `s0` of the pixels at or below `t`.
3. **Output** (400 clocks): write each pixel to the image buffer as object (1) if its grey level is at or below the threshold.

Otsu's method picks the threshold that best separates the two classes. It maximises the between-class variance `w0·w1·(mean0 − mean1)²`. With `N` pixels and grey sum `S`, that variance is proportional to

```
(N·s0 − w0·S)² / (w0·(N − w0))
```

The search evaluates this in exact integer arithmetic. It compares two candidates by cross-multiplying, so no divider is needed. At these sizes the products are 70 bits wide. Ties keep the lowest level.

A flat image has no valid split: `thr_found` stays 0 and the image becomes all background. `OBJECT_DARK` = 1 makes the dark class the object, matching black objects on a white background. Set it to 0 for bright objects.

## Stage 1: raw moments from the pixel scan

`moment_accumulator` reads the image row by row, x (the column) fastest, one pixel per clock, with coordinates counted from 0. For every object pixel it adds `x^p·y^q` into ten integer accumulators: M00, M10, M01, M11, M20, M02, M21, M12, M30 and M03.

The work is split into three pipelined phases, so that no product wider than a 3-input multiply sits in one clock:

1. Accumulate M00, M10, M01, M11, and form x² and y².
2. Accumulate M20, M02, M21, M12, and form x³ and y³.
3. Accumulate M30 and M03.

The accumulators are 32-bit (`MOM_W` in `ic_pkg`). For a 20x20 image the largest, M30, stays below 400·19³ ≈ 2.7·10⁶, so 32 bits leave ample room for larger images.

`done` pulses `IMG_W*IMG_H + 3` clocks after `start`. The buffer read takes one clock and the pipeline three.

## Stage 2: centroid, central moments and normalisation

`central_moments` converts the ten integers to floats (`int2fp`). The conversion truncates, which is exact below 2²⁴. It then computes the centroid `xm = M10/M00` and `ym = M01/M00`.

The central moments use expansions in the raw moments:

```
mu20 = M20 - xm*M10                 mu02 = M02 - ym*M01          mu11 = M11 - ym*M10
mu30 = M30 - 3*M20*xm + xm^2*2*M10  mu03 = M03 - 3*M02*ym + ym^2*2*M01
mu21 = M21 - 2*M11*xm - ym*M20 + xm^2*2*M01
mu12 = M12 - 2*M11*ym - xm*M02 + ym^2*2*M10
```

These are exact in real arithmetic. In floats, however, each central moment is a small difference of large terms. With a 20x20 image and an object away from the origin, M30 is about 10⁶, while mu30 of a near-symmetric object is close to zero. The difference therefore carries only a few significant bits. This is the least precise place in the design (see *Accuracy* below).

`eta_normalise` divides every central moment by `mu00²`. The textbook exponent is `(p+q)/2 + 1`: 2 for second-order moments, 2.5 for third-order moments. This design rounds it to the whole number 2 for all of them, so it needs no fractional power.

As a consequence, invariants I1 and I2 are scale invariant, but the others are not. The third-order η values grow with the square root of the object's area. I3, I4 and I6 therefore grow in proportion to the area, and I5 and I7 in proportion to its square. The classifier still works when the training images cover the sizes to be recognised. Replacing the divisor with `mu00^2.5` would need a square root, which this design does not have.

## Stage 3: the seven invariants

With `a = η30+η12`, `b = η21+η03`, `c = η30−3η12`, `d = 3η21−η03` and `e = η20−η02`:

```
I1 = η20 + η02                 I2 = e² + 4·η11²
I3 = c² + d²                   I4 = a² + b²
I5 = c·a·(a² − 3b²) + d·b·(3a² − b²)
I6 = e·(a² − b²) + 4·η11·a·b
I7 = d·a·(a² − 3b²) − c·b·(3a² − b²)
```

`hu_invariants` computes all of them in parallel and shares `a²`, `b²` and the two brackets.

I5 and I7 are again differences of nearly equal terms for many shapes. I7 also changes sign under mirroring. A mirror image therefore shows up only in I7, as with Hu's original set.

The whole extractor (`hu_extractor`) adds one register per floating-point stage: two in `central_moments`, one in `eta_normalise` and one in `hu_invariants`. Each of these stages is a deep block of combinational logic. The extractor is built for correctness first, and its clock rate is set by the divider (see *Floating point*).

## Stage 4: Kohonen classification

Each `kohonen_neuron` forms `Σ|hu[k] − w[k]|` in four floating-point levels:

1. Seven subtractions. The absolute value is taken by clearing the sign bit.
2. to 4. A fixed adder tree: `((e0+e1)+e6) + ((e2+e3)+(e4+e5))`.

Each level is followed by `FP_LAT` = 6 pipeline registers, standing in for a pipelined floating-point core. The eight neurons run in parallel from the same input, each with its own weights taken straight from `weight_memory`.

`winner_select` then searches the eight distances one per clock:

- It loads distance 0.
- It compares each later distance with the running minimum and keeps the strictly smaller one.
- Ties therefore go to the lower neuron index.
- Distances are never negative, so the floats are compared as unsigned integers.

The winner's index reads its tag from word `8·winner+7` of the weight memory. The tag appears on `class_tag` together with `class_valid`.

From the edge that samples the invariants to `class_valid`, the step takes 32 clocks:

| Part | Clocks |
|---|---|
| Neurons (4·`FP_LAT`) | 24 |
| Search | 7 |
| Tag read | 1 |

At a 10 ns clock that is 320 ns. The published implementation of this classifier reported 310–360 ns. `FP_LAT` and `NUM_NEURONS` are parameters, and the latency follows `4·FP_LAT + NUM_NEURONS`.

## Floating point

All floating-point arithmetic is in `fp_pkg` as synthesizable functions: `fadd`/`f_add`/`f_sub`, `fmul`/`f_mul` and `fdiv`/`f_div`. Thin modules (`fp_addsub`, `fp_mul`, `fp_div`) expose them with their status flags. The neurons, the normalisation and the centroid use these modules. The longer expressions of the central moments and the invariants call the functions inline.

The number format is IEEE 754 single precision. The handling of special cases is this design's own:

- Rounding is to nearest, ties to even.
- Zero and denormal inputs count as zero.
- Results below the normal range flush to +0, with the `underflow` flag set.
- Results above the normal range saturate to ±max finite, with the `overflow` flag set.
- Division by zero gives +0 with `div_by_zero` set. An empty image therefore yields a centroid of 0 and all-zero invariants instead of a NaN.
- NaN and infinity are never produced.

The divider is a 27-step restoring division unrolled in combinational logic. It is the longest path in the design. To reach a high clock rate, you could pipeline `fdiv` the way `kohonen_neuron` is pipelined, and add matching delays to `hu_extractor`'s valid signal.

## Accuracy

The invariants are checked against a double-precision reference computed directly about the centroid. The testbenches accept I1..I4 within a relative error of 10⁻⁴. Moved and rotated copies of a shape must give I1..I4 equal within 10⁻³.

The difference-of-large-terms effects described above can leave I5..I7, and sometimes I3, with only a few correct bits, or with the wrong sign when the true value is near zero. For these, the testbenches also accept an absolute error bounded by the size of the cancelling terms, not by the result.

For classification this matters little, because the distances are dominated by I1..I4. It matters if the invariants are used for anything else. Moving the scan origin to the image centre, or subtracting the centroid before accumulating, would reduce this error. This design keeps the formulation described above.

## What follows the original design and what does not

**Follows the original design:**

- The stages and their order, including Otsu binarisation ahead of the moment calculation.
- The three-phase moment accumulation.
- The central-moment expansions.
- The whole-number normalisation exponent.
- The invariant formulas.
- Eight parallel neurons using the L1 distance and the adder-tree shape.
- The sequential strict-less-than winner search.
- The address map of the weight memory, with seven weights and one tag per neuron.
- The 20x20 image size and the 310–360 ns target.

**This design's own choices:**

- The pixel scan runs one pixel per clock. The original took about 22 ms per 20x20 image, most of it in the input scan.
- Floats round to nearest even and handle special cases as listed above.
- `FP_LAT` = 6 pipeline stages per classifier operation.
- The register stages in the extractor.
- The handshake: `start`, `busy` and the valid pulses.
- The upload ports that replace the camera, the SRAM and the flash memory of a complete system.
- The thresholder's construction: only its purpose and the name of Otsu's method were given. The frame store, the 8-bit grey depth, the integer criterion, the pass structure and the automatic start of classification are this design's own.
- The 32-bit tag word. The tags 7 and 0x10 used in the tests are the output values printed for the two classes.

**Not included:**

- The camera and analogue capture.
- The board memories.
- Training: Kohonen self-organisation and k-means tagging. Training is done in software, and its result is loaded through `w_*`.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `IMG_W`, `IMG_H` | 20 | top, `image_buffer`, `moment_accumulator`, `hu_extractor` | Image size in pixels. |
| `NUM_NEURONS` | 8 | top, `kohonen_classifier`, `winner_select`, `weight_memory` | Neurons in the map. |
| `FP_LAT` | 6 | top, `kohonen_classifier`, `kohonen_neuron` | Registers after each classifier floating-point level. |
| `GREY_W` | 8 | top, `otsu_thresholder` | Grey-level depth. |
| `OBJECT_DARK` | 1 | `otsu_thresholder` | Whether the object is the dark class (1) or the bright class (0). |
| `MOM_W` | 32 | `ic_pkg` | Width of the raw-moment accumulators. |

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<module>`. Each prints `TB_RESULT checks=<n> failures=<m>` at the end. The shared references live in `tb/tb_pkg.sv`:

- a real-valued float model;
- the raw moments by direct summation;
- central moments about the exact centroid;
- the Hu formulas in double precision;
- image generators for the two test shapes, with shifts and 90° rotations.

To build and run one testbench with Verilator 5:

```
t=image_classifier
verilator --binary --timing --assert -Wno-fatal -Mdir obj_$t -Irtl -Itb \
  rtl/ic_pkg.sv rtl/fp_pkg.sv tb/tb_pkg.sv rtl/*.sv tb/tb_$t.sv --top-module tb_$t
./obj_$t/Vtb_$t
```

`tb_image_classifier` runs the top level at its default size and needs no parameter overrides. It does the following:

- Loads a map with four neurons around each of two shapes: a filled rectangle (tag 7) and an L shape (tag 0x10).
- Classifies twenty moved and rotated copies of the shapes, then one back-to-back repeat. All must be correct.
- Checks every invariant against the reference and both result times.
- Binarises and classifies two grey versions of the shapes through `binarise`. It checks the threshold, the raw moments of the binary result and the timing.
- Counts the behaviours that must occur at least once: a `start` ignored while busy, a winner found after the first neuron, the first neuron winning, back-to-back classification, an empty image and binarisation.

It runs in about a second.
