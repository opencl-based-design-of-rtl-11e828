# Phase-only-correlation stereo matcher

This is synthesizable SystemVerilog for a stereo correspondence accelerator.
It takes a rectified stereo pair: a reference image I and an input image J.
For every reference point p in I, it finds the horizontal position q in J
that shows the same scene point, to a fraction of a pixel.

Matching uses 1D phase-only correlation (POC). Take two image lines f and g
and their DFTs F and G. POC keeps only the phase of the cross-power spectrum:

    R(k) = F(k) conj(G(k)) / |F(k) conj(G(k))| = exp(j(theta_F(k) - theta_G(k)))

The inverse DFT of R, r(n), has a sharp peak where g is a shifted copy of f.
The peak's position is the shift. Its height says how similar the two lines are.

Large disparities are handled coarse-to-fine on an image pyramid. The search
starts on the coarsest layer, where a shift is small. Each finer layer refines
the previous estimate. A last pass on the full-resolution image adds the
sub-pixel fraction.

The hardware is a chain of processing stages ("kernels") joined by FIFO
channels. The split follows a published OpenCL design for an FPGA. That design
gives the algorithm, the list of kernels, the channel structure and the sizes.
It does not give the inside of any kernel. Everything inside the kernels here
is this design's own choice (see *Departures and choices*).

## The algorithm as built

Default configuration:
- search window of N = 32 pixels × L = 15 lines
- 4 pyramid layers (layer 0 is the full image)
- 1280 × 960 images
- up to 10 000 reference points per run

1. **Pyramid.** Layer l is the 2×2 mean of layer l-1:
   `I_l(x,y) = (I_{l-1}(2x,2y) + I_{l-1}(2x+1,2y) + I_{l-1}(2x,2y+1) + I_{l-1}(2x+1,2y+1)) / 4`,
   truncated. Layers 1..3 are built for both images.
2. **Reference point per layer.** `p_l = floor(p0 / 2^l)` for each coordinate.
3. **Coarsest guess.** `q_4 = p_4`: the search starts with zero disparity on
   the coarsest layer.
4. **Pixel passes, layers 3, 2, 1, 0.** The f window is centred on p_l in I_l.
   The g window is centred on (2·q_{l+1}, row of p_l) in J_l. POC gives an
   integer shift δ_l. The new estimate is `q_l = 2·q_{l+1} + δ_l`.
5. **Sub-pixel pass, layer 0.** The g window is centred on q_0 itself. POC
   with peak fitting gives a fractional δ. The result is `q = q_0 + δ`.

Each point therefore goes through five POC matchings. The search is
horizontal only, because a rectified pair has no vertical disparity. q keeps
the row of p, and only its x coordinate is returned.

One POC matching on a window works as follows:
- Each of the 15 line pairs is multiplied by a Hann window.
- Each line is transformed with a forward FFT.
- R(k) is formed for each line pair and multiplied by a spectral weight H(k).
- The 15 weighted spectra are summed.
- One inverse FFT of the sum gives the line-averaged POC function. Because
  the inverse DFT is linear, this equals averaging the 15 separate POC
  functions, at the cost of one inverse FFT instead of 15.
- The peak of the result is the match.

## Kernel chain

```
 host ──► image_mem I ─┐                 ┌─► fft1d_sdf (f) ─┐
 host ──► image_mem J ─┼─► clip_image ───┤                  ├─► eval_cps ─► reorder ─► fft1d (inverse) ─► find_peak ─► results
 host ──► points ──────┘      ▲   │      └─► fft1d_sdf (g) ─┘                                                 ▲   │
      make_high_layer ×2      │   └──────────────── descriptor channel {gc, final} ──────────────────────────┘   │
      (pyramid, before        └──────────────────── feedback channel q_l (NPTS deep) ◄─────────────────────────────┘
       matching)
```

| Module | Role |
|---|---|
| `poc_top` | Top level: host ports, control (load → pyramid → match → done), memories, channels |
| `make_high_layer` | Builds one pyramid layer. It reads 4 pixels and writes their mean, one output pixel per 4 clocks |
| `clip_image` | Steps through passes and points, computes p_l and the g centre, and reads both windows with border clamping and Hann weighting |
| `fft1d_sdf` | Streaming 32-point FFT of each window line, one sample per clock (the two forward transforms) |
| `fft1d` | Iterative 32-point radix-2 FFT. `INVERSE=1` gives the inverse transform, run once per match |
| `eval_cps` | Computes phases (CORDIC), looks up the unit vector e^{jΔθ}, multiplies by H(k), and sums over the 15 lines |
| `cordic_vec` | Pipelined CORDIC in vectoring mode. Gives the phase angle of a complex number |
| `reorder` | Bit-reversed → natural order before the inverse FFT |
| `find_peak` | Peak search, parabola fit, and update of q. Sends q to the feedback channel or the result stream |
| `channel_fifo` | FIFO channel with valid/ready and almost-full |
| `image_mem` | Simple dual-port RAM with one clock of read latency (pyramids and point list) |
| `poc_pkg` | Widths, types and the constant-table formulas |

### The feedback loop

The loop between find_peak and clip_image is the least obvious part.

clip_image handles one whole pass, all points of one layer, before it starts
the next layer. For each point it first sends a descriptor to find_peak. The
descriptor holds the g-window centre gc and a flag for the final pass. Then
clip_image sends the window data.

find_peak gets the same points in the same order. For each one it computes the
point's new estimate. In pixel passes the estimate goes to the feedback
channel. In the last pass it goes to the result stream.

In the next pass, clip_image pops one feedback entry per point. A whole pass
of estimates waits in the feedback channel, so it is NPTS (10 000) entries
deep. No other storage holds the intermediate correspondences.

### Data order through the chain

- `fft1d_sdf` is a decimation-in-frequency FFT. The m-th output of a line
  is frequency bitrev(m), and `out_idx` gives m.
- `eval_cps` does not care about order. It looks up H(k) by slot.
- `reorder` writes slot m to entry bitrev(m) and reads the entries out in
  natural order.
- The inverse `fft1d` again leaves bit-reversed order. `find_peak` stores
  each sample at bitrev(m) before the search.

### The streaming FFT and its flush

`fft1d_sdf` is a radix-2 single-path delay-feedback pipeline. Stage s has a
delay line of 16, 8, 4, 2 and 1 samples. In the first half of each group
the stage parks its input in the line. In the second half it adds the parked
sample to the new one and passes the sum on. It parks the difference, times
a twiddle, for the next group. A line therefore leaves 31 samples after it
enters, and lines follow each other with no gap.

The catch is the end of a burst. Samples move only when new ones push them,
so the last line of a pass would stay inside the FFT. Its result is needed
before the next pass can begin, so the chain would wait forever. To avoid
this, clip_image raises `starved` when it is idle or waiting for feedback.
On `starved`, an FFT that still holds real samples feeds itself one line of
tagged bubbles, which pushes the real line out. Bubbles never reach the
output. Between points of one pass, clip_image pauses only 3 clocks, so no
flush happens there.

A peak at index n is read as a signed shift n_s in [-16, 15]. g being f moved
right by d puts the peak at n_s = -d. So the estimate is q = gc - n_s.

## Normalisation without division

R(k) would need a division and a square root per frequency. Instead:
- `eval_cps` runs F and G through two 16-stage CORDIC vectoring pipelines.
  Each gives a phase angle as a 16-bit fraction of a full turn.
- The difference θ_F - θ_G is rounded to 10 bits.
- The 10-bit angle addresses a 1024-entry cos/sin table in Q1.14.

The magnitudes are dropped, which is exactly what phase-only correlation
asks for.

The table, the FFT twiddles, the Hann window and H(k) are all constants
computed at elaboration from their formulas in `poc_pkg`:

| Table | Formula | Size |
|---|---|---|
| twiddles | cos / ∓sin(2πk/N), Q1.14 | N/2 |
| Hann window | w(c) = 0.5 - 0.5·cos(2π(c+0.5)/N), Q0.8 (0..256) | N |
| spectral weight | H(k) = 0.5 + 0.5·cos(2πk/N), k in [-N/2, N/2), Q1.14 | N |
| unit vector | cos / sin(2πi/1024), Q1.14 | 1024 |
| CORDIC angles | atan(2^-i) / 2π · 2^16 | 16 |

## Number formats

| Signal | Format |
|---|---|
| pixels | 8-bit unsigned |
| windowed samples | pixel × w(c), up to 17 bits. The forward FFT runs at 24 bits with no scaling, enough for 5 bits of growth |
| averaged spectrum | sum of 15 Q1.14 unit vectors, 21-bit signed |
| inverse FFT | 27-bit signed, no 1/N |
| coordinates | 16-bit signed integers |
| result `res_q` | 24-bit signed, 8 fractional bits (1/256 pixel) |

**Sub-pixel fit.** find_peak fits a parabola through the peak r0 and its two
neighbours r- and r+. The offset is d = (r+ - r-) / (2(2r0 - r- - r+)).
Since r0 is the maximum, |d| ≤ 1/2. d is computed to 8 bits by a restoring
divider, one bit per clock. The final result is q = gc - n_s - d.

## Top-level interface (`poc_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `img_we`, `img_addr`, `img_i`, `img_j` | in | 1, ⌈log2(W0·H0)⌉, 8, 8 | write pixel (x, y) of layer 0 of both images, with addr = y·W0 + x. Accepted only while idle |
| `pt_we`, `pt_addr`, `pt_data` | in | 1, ⌈log2 NPTS⌉, 32 | write reference point `{x, y}` (`point_t`, two signed 16-bit values). Accepted only while idle |
| `start`, `n_points` | in | 1, ⌈log2(NPTS+1)⌉ | start a run over points 0..n_points-1 |
| `busy`, `done` | out | 1 | busy from start until the last result is taken; done pulses once at that moment |
| `res_valid`, `res_ready`, `res_q` | out/in/out | 1, 1, 24 | one sub-pixel x coordinate per point, in point order |

Sequence: load both images and the points, then pulse `start`.
- The pyramid takes about 4 clocks per pixel of layers 1..3: 1.61 M clocks
  at 1280 × 960.
- Matching takes about 2 670 clocks per point: five passes of about 530
  clocks each. A pass streams 15 lines of 32 samples, one per clock. Then
  eval_cps drains its CORDIC pipeline and sends out the 32-point sum, during
  which the forward FFTs wait.

Every handshake is valid/ready. A transfer happens on a clock edge where both
are high.

## Departures and choices

What the original design fixes, and this RTL follows:
- the seven kernels and their order
- the channels between kernels, including the find_peak → clip_image feedback
  that carries all intermediate correspondences
- window, layer and point-count sizes, and the 1280 × 960 image size
- the pyramid averaging
- the coarse-to-fine update equations
- the four accuracy techniques (windowing, spectral weighting, line
  averaging, peak fitting)
- coefficients and pre-computed results held in constant tables instead of
  computing divisions and square roots

What this RTL chooses where the original is silent:
- **Window functions.** The Hann window, the raised-cosine H(k) and the
  parabolic peak fit are common choices. The original names these techniques
  but does not give the functions.
- **Window length.** The POC theory is stated for odd lengths N = 2M + 1,
  while the evaluated window is 32 pixels. 32 is used, as the FFT needs a
  power of two. A window spans centre-16 … centre+15, and lines
  centre-7 … centre+7.
- **Borders.** Window coordinates outside a layer are clamped to the border.
- **Memory.** The images are held in on-chip RAM (two pyramids, 26.1 Mbit),
  not in board DRAM. The host interface is reduced to simple write ports and
  a result stream.
- **Reorder.** Its job here is undoing the FFT's bit-reversed order.
- **FFT structures.** The forward FFTs are streaming delay-feedback
  pipelines. The inverse FFT is iterative (one butterfly per clock), since it
  runs once per 15 lines. The FFT stages of `fft1d_sdf` have no registers
  between them, which keeps control simple but leaves a long combinational
  path. No clock frequency was targeted.
- **Throughput.** The window lines stream at one sample per clock, but one
  point is matched at a time. That gives about 26.7 M clocks for 10 000
  points, against the reported 23.11 ms (3.9 M clocks at 167 MHz). Reaching
  that rate would need several points in flight and a faster eval_cps. The
  original does not describe its pipelines.
- **Scope.** The host program, the PCIe link and the board DDR3 are not part
  of the RTL.

Measured accuracy, with J = I shifted by 37 and 37.5 pixels on random
texture: every one of 10 000 points away from the disparity step comes out
within 0.06 pixel of the true position.

## Simulating

Every testbench checks itself and ends with `TB_RESULT checks=<n> failures=<m>`.
The FIFO channel, the memory and each kernel have their own testbench.
`tb_poc_top` runs the whole design at its default size:
- 1280 × 960 images, with disparity 37 in the upper half and 37.5 in the
  lower half
- 16 points, one at a corner
- it checks every pyramid pixel and every result
- it counts pyramid layers built, feedback transfers, border clamping, clip
  stalls on full FFT channels, FFT flushes, and result back-pressure

`tb_poc_workload` runs the evaluated workload at the default size: 10 000
reference points on a 100 × 100 grid over 1280 × 960 images. It checks every
result and reports the clock count. Matching took 26.65 M clocks (2 665 per
point), and every result away from the disparity step was within 0.06 pixel.

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/poc_pkg.sv tb/tb_poc_top.sv --top-module tb_poc_top -o sim
./obj_dir/sim
```

Replace `tb_poc_top` by `tb_fft1d_sdf`, `tb_fft1d`, `tb_eval_cps`, `tb_reorder`,
`tb_find_peak`, `tb_clip_image`, `tb_make_high_layer`, `tb_channel_fifo` or
`tb_image_mem` for the unit tests. The full-size run takes about 15 seconds,
compile included. The workload run takes about a minute and a half.

## Changing the design

All sizes are parameters of `poc_top`: `W0`, `H0`, `N`, `L`, `NLAYERS`,
`NPTS`. The layer memory size and the datapath widths follow from them.
- `N` must be a power of two.
- `L` should be odd, so that the window is centred on the point.
- Widening the fixed-point paths only needs the width expressions at the top
  of `poc_top`.
- The window, weight and fitting functions are each in one place: `poc_pkg`
  for the tables, `find_peak` for the fit.
