// poc_pkg: constants, types and constant-table generators shared by the
// phase-only-correlation (POC) correspondence-matching accelerator.
//
// Defaults follow the evaluated configuration: search window of 32 pixels x
// 15 lines, 4 pyramid layers, 10 000 reference points, 1280x960 images.
// Fixed-point formats (this design's choice):
//   * twiddles, window-free cos/sin tables and spectral weights: Q1.14 in 16 bits
//   * phase angles: unsigned ANG_W-bit fraction of a full turn
//   * sub-pixel coordinates: signed, FRAC_W fractional bits
// The constant tables (FFT twiddles, window, weighting, cos/sin) are computed at
// elaboration from their formulas, playing the role of the constant memory that
// holds all filter and FFT coefficients.
package poc_pkg;

  localparam int PIX_W   = 8;    // pixel width (8-bit grey images, assumed)
  localparam int COORD_W = 16;   // signed integer pixel coordinate
  localparam int FRAC_W  = 8;    // fractional bits of the sub-pixel result
  localparam int ANG_W   = 16;   // CORDIC angle width (full turn = 2**ANG_W)
  localparam int TAB_W   = 10;   // cos/sin table address bits
  localparam int Q       = 14;   // fraction bits of Q1.14 constants
  localparam real PI     = 3.14159265358979323846;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic signed [COORD_W+FRAC_W-1:0] subpix_t;

  // Reference point as written by the host.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } point_t;

  // Descriptor travelling from clip_image to find_peak alongside one match.
  typedef struct packed {
    coord_t gc;      // horizontal centre of the input-image window g
    logic   final_;  // last (sub-pixel) pass: result leaves the accelerator
  } match_desc_t;

  // Bit reversal of the low `bits` bits of v.
  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // Q1.14 value of x, rounded.
  function automatic logic signed [15:0] to_q14(real x);
    return 16'($rtoi(x * (1 << Q) + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // Twiddle factor cos / sin of 2*pi*k/n (Q1.14).
  function automatic logic signed [15:0] tw_cos(int k, int n);
    return to_q14($cos(2.0 * PI * k / n));
  endfunction
  function automatic logic signed [15:0] tw_sin(int k, int n);
    return to_q14($sin(2.0 * PI * k / n));
  endfunction

  // Hann window, w(c) = 0.5 - 0.5 cos(2 pi (c + 0.5) / n), in Q0.8 (0..256).
  function automatic logic [8:0] hann_q8(int c, int n);
    return 9'($rtoi(256.0 * (0.5 - 0.5 * $cos(2.0 * PI * (c + 0.5) / n)) + 0.5));
  endfunction

  // Spectral weighting H(k) = 0.5 + 0.5 cos(2 pi k / n) for signed frequency
  // k in [-n/2, n/2), a raised-cosine low-pass (Q1.14).
  function automatic logic signed [15:0] weight_q14(int k, int n);
    return to_q14(0.5 + 0.5 * $cos(2.0 * PI * k / n));
  endfunction

  // CORDIC arctangent constants atan(2**-i) in units of 2**-ANG_W turn.
  function automatic logic [ANG_W-1:0] atan_ang(int i);
    return ANG_W'($rtoi($atan(1.0 / (2.0 ** i)) / (2.0 * PI) * (2.0 ** ANG_W) + 0.5));
  endfunction

  // Base address of pyramid layer l in an image memory holding layers
  // 0..l-1 back to back, layer j being (w0>>j) x (h0>>j) pixels.
  function automatic int unsigned layer_base(int l, int w0, int h0);
    int unsigned b = 0;
    for (int j = 0; j < l; j++) b += (w0 >> j) * (h0 >> j);
    return b;
  endfunction

endpackage
