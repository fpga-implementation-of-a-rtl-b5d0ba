# Gabor-filter / nearest-neighbour face recognition datapath

This is synthesizable SystemVerilog for the recognition core of a face-based door
access controller. A door station controls the lighting, the distance and the pose.
So a face can be recognised by a fairly simple pipeline, and that pipeline fits easily
in an FPGA:

1. Cut a fixed facial window (eye, nose or mouth) out of a 112x92 grey-scale image.
2. Filter the window with a bank of 40 Gabor kernels (5 scales x 8 orientations).
   The filters are distributed-arithmetic FIR filters.
3. Reduce each of the 40 filtered images to one number, its maximum intensity.
   The 40 numbers are the feature vector.
4. Compare the feature vector with every enrolled training vector using the City
   Block (L1) distance, all in parallel. Report the nearest one (1-nearest neighbour).

The structure follows a published feasibility study of this pipeline. That study was
built from vendor FIR cores and MATLAB function blocks. It specified the algorithm,
the sizes and the block structure, but few hardware details. Word widths, handshakes,
the bit-serial filter arrangement and the control sequencing here are this design's
own. The section "Departures and own choices" lists them.

## Data flow

```
 img_pix ──► region_extractor ──► BANK 0 (bank0_buffer) ──► Register (pixel_register)
 (112x92,     (eye/nose/mouth       region pixels,               │ one pixel broadcast
  row-major)   window)              row-major                    ▼
                                         ┌──────────── gabor_fir_bank ────────────┐
                                         │ da_fir #0   da_fir #1   ...  da_fir #39 │
                                         └────┬───────────┬──────────────┬────────┘
                                              ▼           ▼              ▼
                                       max_comparator  max_comparator ... (x40)
                                              └──── feature vector V[0..39] ───┐
                                                                               ▼
 feature_database (100 x 40) ──► cityblock_array (100 cityblock_path) ──► min_comparator
                                                                   match_idx, match_dist
```

`feature_extractor` groups BANK 0, the register, the filter bank and the 40 maximum
comparators. `nn_classifier` groups the database, the distance array and the minimum
finder. `face_recognition_top` chains region extraction, feature extraction and
classification. Each stage starts when the previous stage signals done.

## Facial windows

The input image is 112 rows by 92 columns. The windows are fixed rectangles (1-based,
inclusive, row range then column range):

| region | rows   | columns | pixels        |
|--------|--------|---------|---------------|
| eye    | 40..60 | 5..90   | 21x86 = 1806  |
| nose   | 60..80 | 21..77  | 21x57 = 1197  |
| mouth  | 80..98 | 19..77  | 19x59 = 1121  |

`region_extractor` follows the row and column of the incoming row-major stream. It
writes the pixels that fall in the selected window to BANK 0 at addresses 0, 1, 2, ...
Neighbouring windows share a row (rows 60 and 80), and one pass over the image
extracts one region. BANK 0 has
2048 words, enough for the largest window.

## The Gabor filter bank (the hard part)

### What is filtered

Each Gabor kernel is a 32x32 window of real coefficients. The filter treats it as a
**1-D FIR filter of order 1023**, with the kernel flattened row-major into 1024 taps:

    f[n] = sum_{k=0}^{1023} h[k] * x[n-k]

Here x is the region flattened row-major, the same order in which BANK 0 holds it.
The delay line is cleared at the start of a region. So the first outputs see zeros as
their history, and the output has exactly as many samples as the region. This is the
filtering the original flow performs: flatten the image, run a 1024-tap FIR, reshape.
It is not a true 2-D convolution. A 2-D convolution would need line buffers and is not
implemented.

### Distributed arithmetic, bit-serial

A direct form would need 1024 multipliers per filter, or 40,960 for the bank.
`da_fir` uses distributed arithmetic instead:

* The 1024 taps are split into 256 groups of K = 4 consecutive taps.
* Each group has a 16-entry table. Entry `a` holds the sum of the group's
  coefficients whose bit is set in `a`. For example, entry 0b0101 holds
  h[4g] + h[4g+2].
* Pixels are unsigned 8-bit values, so the filter sum splits into bit planes:

      f = sum_{b=0}^{7} 2^b * sum_{g=0}^{255} T_g[ x[4g+3][b] x[4g+2][b] x[4g+1][b] x[4g][b] ]

* Each clock evaluates one bit plane, most significant first. The 4 bits of every
  group address that group's table. The 256 table outputs are summed. The sum is
  added to the accumulator, which is doubled first (`acc <= 2*acc + plane_sum`).

One output therefore takes 8 clocks, and the filter accepts a new pixel every
**9 clocks** (1 accept clock plus 8 bit-plane clocks). The filter has no multipliers.
The cost is the tables: 256 x 16 entries x 18 bits per filter.

The parameter `BPC` (`face_pkg::DA_BPC`, default 1) sets how many bit planes are
evaluated per clock: 1 (bit-serial), 2, 4 or 8 (full-parallel). Each step shifts the
accumulator by `BPC`. A pixel then takes `8/BPC + 1` clocks, but every table needs
`BPC` read ports. `gabor_fir_bank` passes `BPC` through. The rest of the design uses
the package default, and the cycle counts in this document assume `BPC = 1`.

### Filter handshake (`da_fir`, `gabor_fir_bank`)

The port names are those of a standard FIR core: `din`, `nd` (new data), `rfd` (ready
for data), `dout`, `rdy` (output valid).

* `nd` with `rfd` high: `din` is shifted into the delay line on that clock edge, and
  `rfd` drops.
* On the 8th edge after that, `dout` is registered. `rdy` is high for one clock, with
  `rfd` high again.
* `clr` zeroes the delay line.

All 40 filters receive the same pixels and run in lock step. An assertion in
`gabor_fir_bank` checks that they all raise `rdy` together.

### Coefficients

The tables are the only coefficient store. Coefficients are written one group of 4 taps
at a time through `coef_we / coef_filt / coef_grp / coef_data`:

* `coef_data[i]` is tap `4*coef_grp + i` of filter `coef_filt`.
* The 16 subset sums are formed in the same clock.

Loading all 40 filters takes 40 x 256 = 10,240 clocks. The top ignores these writes
while `busy` is high.

The coefficients are signed 16-bit Q1.15 values. The hardware does not compute them.
The end-to-end testbench computes them with the real part of the usual Gabor kernel:

    k_s   = kmax / f^s,  phi_o = pi*o/8,  s = 0..4,  o = 0..7,  filter index = 8*s + o
    g(x,y) = (k_s^2/sigma^2) * exp(-k_s^2 (x^2+y^2) / (2 sigma^2))
             * ( cos(k_s (x cos phi_o + y sin phi_o)) - exp(-sigma^2/2) )
    kmax = pi/2,  f = sqrt(2),  sigma = pi,  x, y = -16..15,  tap = 32*(y+16) + (x+16)

The result is multiplied by 32768, rounded and clipped to [-32768, 32767]. Any other
kernel set can be loaded the same way.

## Maximum intensity (`max_comparator`)

Each filter output is signed. Its intensity is computed in three steps:

1. Take the magnitude |f|.
2. Shift it right by 15 bits, which removes the Q1.15 coefficient scale. The result
   is in pixel units.
3. Saturate it to 16 bits.

A two-input maximum keeps the larger of this value and the value held so far. After
the last output of the region, comparator i holds feature v_i. The comparators clear
when a region starts.

## Nearest-neighbour classification

* `feature_database` holds N_TRAIN = 100 vectors of 40 features, 16 bits each (8 kB).
  It is built as one small memory per vector. One read then returns feature i of
  *every* vector, one clock after `rd_en`.
* `cityblock_path` is one distance lane. An AddSub stage forms |a - b| and an
  accumulator sums the terms. `cityblock_array` has one lane per training vector.
  All lanes receive test feature i in the same clock, so the 100 distances are done
  after 40 clocks.
* `min_comparator` scans the first `n_valid` distances, one per clock, through a
  two-input minimum. It reports the lowest distance and its index. On a tie the
  lower index wins.
* With `n_valid` below 100, a partly enrolled database works. Entries at and above
  `n_valid` are ignored.

Start-to-done is 40 + n_valid + 6 clocks, which is 146 clocks for a full database.

## Top-level interface (`face_recognition_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a recognition (accepted only while `busy` is low) |
| `region_sel` | in | 2 | `REG_EYE`, `REG_NOSE`, `REG_MOUTH` (`face_pkg::region_e`) |
| `img_valid`, `img_pix` | in | 1, 8 | image pixel stream, row-major, gaps allowed |
| `coef_we`, `coef_filt`, `coef_grp`, `coef_data` | in | 1, 6, 8, 4x16 | Gabor coefficient load |
| `db_we`, `db_vec`, `db_idx`, `db_data` | in | 1, 7, 6, 16 | training-vector load |
| `n_valid` | in | 8 | number of enrolled training vectors |
| `busy` | out | 1 | from `start` until the match is reported |
| `feat_valid`, `feat` | out | 1, 40x16 | pulse and feature vector V |
| `match_valid`, `match_idx`, `match_dist` | out | 1, 7, 22 | pulse, nearest vector, its distance |

A recognition runs as follows:

1. With `busy` low, load the coefficients and the training vectors.
2. Pulse `start` with `region_sel`.
3. Stream all 112x92 pixels.
4. The last pixel starts filtering. `feat_valid` pulses 9 x (region pixels) + 4 clocks
   later. That is 16,258 clocks for the eye window.
5. `match_valid` follows 40 + n_valid + 6 clocks after that, which is 146 clocks
   for a full database.

Throughput is set by the filters, not by the classifier. Splitting the region into
sub-images filtered by several banks, a speed-up the original study proposes, is not
implemented.

## Parameters

Most sizes are in `face_pkg`. The modules take them as typed parameter defaults.

| name | default | origin |
|------|---------|--------|
| `IMG_ROWS` x `IMG_COLS` | 112 x 92 | original design |
| `NUM_FILTERS` | 40 (5 scales x 8 orientations) | original design |
| `TAPS` | 1024 (32x32 kernel, order 1023) | original design |
| `N_TRAIN` | 100 | original design (example database size) |
| `FEAT_LEN` | 40 | original design |
| `PIX_W` | 8 | own choice |
| `COEF_W` | 16 (Q1.15) | own choice; the original used 64-bit doubles |
| `DA_K` | 4 taps per table | own choice |
| `DA_BPC` | 1 (bit-serial) | own choice |
| `ACC_W` | 36 | own choice; holds the full filter sum |
| `FEAT_W`, `OUT_SHIFT` | 16, 15 | own choice; the width is inferred from the original comparator's I/O count |
| `DIST_W` | 22 | holds 40 x 65535 |
| `BANK_DEPTH` | 2048 | own choice; holds the largest window |

`da_fir`, `gabor_fir_bank`, `feature_extractor`, `nn_classifier` and the top also take
module parameters (`NTAPS`, `NF`, `N`, ...). These give smaller instances for tests.

## Departures and own choices

* **Fixed point instead of floating point.** The original flow kept the coefficients
  and features as 64-bit doubles. Here they are 16-bit, so the database takes 8 kB
  instead of 32 kB.
* **Bit-serial distributed arithmetic by default, K = 4.** The original only states
  that the FIR filters use distributed arithmetic, and that it allows anything from
  serial to full-parallel. It does not say which arrangement it used. Here the
  default is the smallest, bit-serial, and `BPC` selects the others.
* **Magnitude as intensity.** The maximum comparator works on |f|, shifted and
  saturated.
* **|a - b| in the distance.** The City Block distance uses the absolute difference
  in each lane. One of the original sketches shows a plain subtraction.
* **Handshakes, sequencing, reset.** The start/done chaining, the BANK 0 read
  sequencing, the `n_valid` input, the index output of the minimum finder and the
  asynchronous reset are this design's own.
* **One region per recognition.** The classifier works on the 40-value vector of the
  selected region. To compare several regions, run them in turn. Each needs its own
  database.

Not included:

* The camera, and the grey-scale conversion and resizing. The input is assumed to be
  grey-scale already.
* Generating the Gabor kernels. This is done offline, and the hardware loads them.
* The door lock and the operator interface.
* The image-divider speed-up.

## Verification

Every module has a self-checking testbench in `tb/`, `tb_<module>.sv`. Each one drives
random or constructed stimulus, compares against values computed independently in the
testbench, and checks cycle counts where timing is specified. A watchdog ends a hung
run. Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_da_fir` | 64-tap filter at 1, 4 and 8 bits per clock (`tb/da_fir_check.sv` drives each); random coefficients including the extremes; two frames; every output against direct convolution; latency |
| `tb_gabor_fir_bank` | 6 filters with different coefficients; per-filter outputs; lock-step timing |
| `tb_max_comparator` | magnitude, shift, saturation, clear |
| `tb_feature_extractor` | 5 filters x 64 taps, regions of 200, 37 and 1 pixels; features and clock count |
| `tb_region_extractor` | all three windows: every write, length, done pulse, idle behaviour |
| `tb_bank0_buffer`, `tb_pixel_register`, `tb_feature_database` | memory contents, latency, handshake model |
| `tb_cityblock_path`, `tb_cityblock_array`, `tb_min_comparator`, `tb_nn_classifier` | distances, ties, partly filled database, scan time |
| `tb_face_recognition_top` | the full-size design end to end |

`tb_face_recognition_top` runs at the default parameters: 40 filters x 1024 taps and
100 training vectors. It builds the 40 Gabor kernels and a synthetic face, then runs
the eye, nose and mouth windows. It checks all 40 features against a direct
convolution in the testbench, plus the match index, the distance and both phase
durations. It also counts region kinds, filter back-pressure on the pixel register,
maximum updates and a partly filled database, and fails if any never occurred. It
simulates in a few seconds.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/face_pkg.sv tb/tb_face_recognition_top.sv \
          --top-module tb_face_recognition_top -Mdir obj_top
./obj_top/Vtb_face_recognition_top
```

Replace the testbench name to run another one. The other modules are found through
`-Irtl`. The testbench is two-state, so every register that is read is reset or
initialised.
