# Multiplier-free 2-D wavelet transform with nibble-split distributed arithmetic

This is a small image co-processor. It computes a multi-level two-dimensional discrete
wavelet transform (DWT) of an N x N 8-bit image, and its inverse (IDWT), without a single
multiplier. Every filter tap product comes from a small ROM, using *distributed arithmetic*
(DA). Each sample is cut into 4-bit nibbles that are processed side by side, so a result pair
(one low-band and one high-band coefficient) comes out every 4 clocks.

The design follows the modified DA-DWT architecture in *"Modified Distributive Arithmetic
Based DWT-IDWT Processor Design and FPGA Implementation for Image Compression"*. The source
describes the DA filter unit in some detail. It gives the rest of the processor (control,
memories, inverse transform) only as functions, so those parts are this design's own. Their
choices, and the places where this RTL departs from the paper, are listed in
[Departures and open points](#departures-and-open-points).

Defaults: a 32 x 32 image, two decomposition levels, the Daubechies-2 (D4) wavelet,
coefficients in 8 fractional bits, and 16-bit signed coefficient words.

## 1. The DA filter unit (`da_filter`)

This is the heart of the design, and the part that needs the most care to understand.

### What it computes

A four-tap filter output is a dot product `y = C0*t0 + C1*t1 + C2*t2 + C3*t3`, where the
coefficients `C` are constants. Write each tap in binary, `t_k = sum_b 2^b * t_k[b]`. Then

    y = sum_b 2^b * ( sum_k C_k * t_k[b] ) = sum_b 2^b * LUT[ t3[b] t2[b] t1[b] t0[b] ]

so one 16-word ROM (`da_lut`) replaces the four multipliers. Its word `a` holds the sum of
the coefficients whose bit is set in `a`. Bit slice `b` of the four taps is the ROM address,
and a shift-and-add over the bit slices rebuilds `y`.

### Nibble lanes

A plain DA filter needs one clock per sample bit. This unit cuts every DATA_W-bit sample into
DATA_W/4 nibble *lanes*. With 8-bit samples that is an MSB lane and an LSB lane. Every lane
has:

* four 4-bit shift registers, one nibble of each tap;
* a low-pass ROM and a high-pass ROM (or, in the inverse unit, the ROMs for the even and the
  odd output samples).

All lanes work in parallel, so a word takes 4 clocks whatever its width. At DATA_W = 8 that
makes four ROMs. In each of the 4 bit cycles:

1. The shift registers rotate by one bit. They circulate, so after four cycles they hold
   their samples again. Bit 0 of the four taps of a lane addresses that lane's ROMs.
2. The lane outputs are combined with a shift of 4 per lane:
   `S_b = LUT_lsb + (LUT_msb << 4) + ...`.
3. A scaling accumulator (`scaling_acc`) does `acc = (acc >>> 1) + (S_b << 3)`. On the first
   bit it starts from zero.

Bits enter least significant first. After four cycles `acc = sum_b 2^b * S_b`, which is the
exact dot product. The `<< 3` pre-shift makes sure the right shift never drops a set bit.
Samples are two's complement: in the last cycle the top lane's bit is the sign bit, so its
partial product is subtracted instead of added.

### Poly-phase window and handshake

The filter is fed in poly-phase form. One `load` brings an (even, odd) pair, and the window
moves by two samples:

    tap0 <= in_odd   tap1 <= in_even   tap2 <= old tap0   tap3 <= old tap1

For the DWT the taps then hold `x[2n+1], x[2n], x[2n-1], x[2n-2]`. The two ROM sets give the
low-pass output `L[n] = sum h[k] x[2n+1-k]` and the high-pass output
`H[n] = sum g[k] x[2n+1-k]`, already decimated by two.

Timing:

* `load` is taken when `ready` is high. `ready` is high while idle and in the last bit
  cycle, so back-to-back loads are 4 clocks apart.
* `valid` pulses 5 clocks after the load. `out_a` and `out_b` are valid in that clock only.
  They are full precision, scaled by 2^8.

### Coefficients

The wavelet is Daubechies 2. The coefficients are `round(256*c)`, held in `dwt_pkg`:

| set | tap 0 | tap 1 | tap 2 | tap 3 | use |
|---|---|---|---|---|---|
| `DWT_A`  = h | 124 | 214 | 57 | -33 | low band |
| `DWT_B`  = g | -33 | -57 | 214 | -124 | high band, g[k] = (-1)^k h[3-k] |
| `IDWT_A` | -124 | -33 | -57 | 214 | rebuilt x[2m] |
| `IDWT_B` | 214 | 57 | -33 | 124 | rebuilt x[2m+1] |

The inverse uses the same unit with a different tap order. Each load brings the pair
(L[m+1], H[m+1]), so the window holds `(H[m+1], L[m+1], H[m], L[m])`. With periodic
extension, the analysis is an orthogonal matrix, and its transpose gives

    x[2m]   = h1 L[m] + h3 L[m+1] + g1 H[m] + g3 H[m+1]
    x[2m+1] = h0 L[m] + h2 L[m+1] + g0 H[m] + g2 H[m+1]

which is where the two IDWT sets come from.

The quantised coefficients keep `sum h*g = 0` exactly, and `sum h^2 = 65510` against an ideal
65536. A forward and inverse run therefore rebuilds a 32 x 32 image to within 2 grey levels,
and an 8 x 8 image with three levels to within 1 grey level.

## 2. The 2-D processor (`dwt2d_top`, `dwt_ctrl`)

### Data flow

* **Memories.** The image lives in a frame memory of N*N 16-bit words (`ram_2r1w`). It is
  transformed there in place, in the usual Mallat layout. At level `l` the active square has
  side `S = N >> l`:
  * a row pass writes the low band of each row to columns `0..S/2-1` and the high band to
    `S/2..S-1`;
  * a column pass does the same down each column;
  * the LL quarter becomes the next level's square.
* **Filters.** Two `da_filter` units, both at DATA_W = 16 (four lanes, eight ROMs each):
  `u_dwt` with the analysis ROMs and `u_idwt` with the synthesis ROMs. The running operation
  selects which one the controller drives.
* **DWT.** The controller first reads the N*N pixels from an external memory, one per clock,
  and stores `pixel - 128`. Then, for levels 0 to LEVELS-1, it runs a row pass and then a
  column pass.
* **IDWT.** For levels LEVELS-1 down to 0 it runs a column pass and then a row pass, each
  inverting the matching forward pass. It uses what is in the frame memory and loads nothing.

### One line

Every pass handles its S lines one at a time:

1. **FILL** copies the line into an N-word line buffer (S clocks). The buffer's two read
   ports give the even and odd sample of a pair in one clock.
2. **FILT** issues S/2 + 1 pair loads as fast as the filter takes them (4 clocks apart). The
   first load primes the window with the pair that precedes position 0 under periodic
   extension, and its result is dropped:
   * DWT: the priming pair is (x[S-2], x[S-1]), then (x0,x1), (x2,x3), ...
   * IDWT: the priming pair is (L0,H0), then (L1,H1) ... and finally (L0,H0) again.
3. Each result is rounded to nearest, `(v + 128) >>> 8`, saturated to 16 bits, and written
   back in two clocks: band A, then band B.

A line takes `S + 4*(S/2+1) + 5` clocks. At N = 32 the first result of a line is ready 41
clocks after the line starts to be read. A whole run takes these clock counts (checked
exactly by the testbenches):

| N | LEVELS | DWT (incl. N*N+1 load) | IDWT |
|---|---|---|---|
| 32 | 2 | 9569 | 8544 |
| 8 | 3 | 821 | 756 |

### Sub-band selection

For compression, only the coarse sub-bands are kept. An IDWT started with `drop_levels = k`
reads the LH, HL and HH bands of levels 0..k-1 as zero. This happens while the line buffer
is filled in the first inverse pass of such a level. The image is then rebuilt from the
remaining bands only. With `k = 0` the inverse is complete.

## 3. Interface of `dwt2d_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset (the memories are not cleared) |
| `start` | in | 1 | starts an operation; sampled only while `ready` is high |
| `op` | in | `op_e` | `OP_DWT` or `OP_IDWT` |
| `drop_levels` | in | clog2(LEVELS+1) | IDWT only: discard the high bands of levels below this |
| `ready` | out | 1 | idle; drops during an operation and rises when it ends |
| `ext_rd`, `ext_addr` | out | 1, clog2(N*N) | external image memory read, address `row*N + col` |
| `ext_data` | in | 8 | pixel, one clock after its address (synchronous ROM) |
| `rd_addr` | in | clog2(N*N) | read-out address `row*N + col` |
| `rd_coef` | out | 16 signed | frame memory word: a coefficient after a DWT, a level-shifted sample after an IDWT |
| `rd_pixel` | out | 8 | `rd_coef + 128` clipped to 0..255 |
| `stat_pass`, `stat_level` | out | 1, clog2(LEVELS+1) | pass and level being processed |

The read-out port is combinational. Parameters: `N` (a power of two, at least
2^LEVELS), `LEVELS`, `WORD_W` and `PIX_W`.

16-bit words cannot overflow for up to five levels: the worst-case gain of a 1-D pass is
428/256. For more levels, raise WORD_W.

## 4. Files

| file | content |
|---|---|
| `rtl/dwt_pkg.sv` | coefficients, widths, `op_e`, `pass_e` |
| `rtl/da_lut.sv` | 16-word partial-product ROM, contents computed at elaboration |
| `rtl/scaling_acc.sv` | right-shifting scaling accumulator |
| `rtl/da_filter.sv` | nibble-lane DA poly-phase filter pair |
| `rtl/ram_2r1w.sv` | memory with one write and two read ports (frame memory, line buffer) |
| `rtl/dwt_ctrl.sv` | control logic |
| `rtl/dwt2d_top.sv` | the processor |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_dwt2d_top_n8.sv` | the whole processor at N = 8 with three levels |
| `tb/ext_image_rom.sv` | behavioural model of the external image memory (pseudo-random images) |

## 5. Simulation

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. Each one has a
watchdog. The expected values are computed independently of the RTL: direct dot products,
and an integer model of the whole transform with the same rounding. For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/dwt_pkg.sv tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top -Mdir obj
    ./obj/Vtb_dwt2d_top

What each testbench covers:

* **`tb_dwt2d_top`** runs the defaults, with no parameter overrides. On two 32 x 32 images
  (uniform random, and random black/white) it does:
  * a DWT, checked word by word against the model;
  * an IDWT, checked against the model and against the original image;
  * IDWTs with one and with all levels of high bands dropped.

  It also checks the exact run lengths and the 4-clock result rate inside every line. It
  counts row and column passes at each level, priming loads, pixel clipping and band
  dropping. It runs in well under a second.
* **`tb_dwt2d_top_n8`** runs the same test at N = 8 with three levels.
* **`tb_da_filter`** streams random and extreme sample pairs through an 8-bit unit (the
  paper's two lanes and four ROMs) and a 16-bit inverse unit. It checks every result, the
  5-clock latency and the 4-clock load spacing.
* **`tb_dwt_ctrl`** drives the controller alone at N = 8 with three levels. The filter is
  replaced by a model that passes samples through, so every read and write address, the
  priming pair, the pass order and the run length can be checked.
* **`tb_da_lut`**, **`tb_scaling_acc`** and **`tb_ram_2r1w`** test the leaf blocks
  exhaustively or with random data.

## Departures and open points

* **Wavelet.** The paper names both the 9/7 biorthogonal wavelet and Daubechies 2. It
  reports the hardware as Daubechies 2, which is what is built. A 9/7 filter would need
  longer windows (9 and 7 taps), so more shift registers and larger ROMs per lane.
* **Loading and latency.** The paper loads its shift registers serially over 40 clocks and
  quotes a 44-clock latency with a result every 4 clocks. Here a sample pair enters the
  window in one clock:
  * the 4-clock rate is kept;
  * a result follows its load after 5 clocks;
  * the first result of a 32-sample line comes 41 clocks after the line starts.

  The 44-clock figure is not reproduced.
* **Register count.** The paper's block diagram draws six 4-bit registers in front of the
  low-pass ROMs and four in front of the high-pass ROMs. Its text describes four MSB and
  four LSB registers. The text is followed: one four-tap window per lane, shared by both
  ROMs of the lane.
* **Word width.** The paper's unit takes 8-bit samples (two lanes, four ROMs). The processor
  needs 16-bit words for the later passes, so its filters have four lanes and eight ROMs.
  `da_filter` at its default DATA_W = 8 is the paper's unit.
* **Own choices.** The following are this design's choices, where the paper gives none:
  * the coefficient format;
  * the level shift by 128;
  * periodic border extension;
  * rounding and saturation;
  * the memory organisation (in-place frame memory and line buffer);
  * the inverse transform as a second DA unit;
  * the `drop_levels` encoding;
  * all port protocols.
* **Not built:**
  * the earlier two-bits-per-clock DA scheme the paper compares against;
  * the software model used to choose the wavelet;
  * the external memory, which exists only as a testbench model;
  * any entropy coding or transmission of the kept sub-bands.
* **Not checked against the paper:** resource and speed figures (FPGA slices, 134 MHz). No
  FPGA flow was run on this RTL.
