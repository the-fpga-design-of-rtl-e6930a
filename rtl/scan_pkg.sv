// scan_pkg: types, fixed-point formats and shared arithmetic of the
// adaptive-cubic-convolution (ACC) scan converter.
//
// A pixel is 24-bit RGB, 8 bits per colour, filtered channel by channel.
// The sub-pixel phase s (0 <= s < 1) is carried in Q0.S_BITS. The cubic
// basis A(s), B(s), C(s) is carried in Q.COEF_FRAC, the adaptive
// parameters alpha1 and alpha2 in Q.ALPHA_FRAC. These word widths are this
// design's own choice; the formulas behind them are the ACC equations:
//   f^(x) = a1*(f[k-1]-f[k+1])*A(s) + a2*(f[k]-f[k+2])*B(s)
//         + (f[k]-f[k+1])*C(s) + f[k]
//   A(s) = s^3 - 2s^2 + s,  B(s) = s^3 - s^2,  C(s) = 2s^3 - 3s^2
package scan_pkg;

  localparam int unsigned PIX_BITS   = 8;   // per colour channel
  localparam int unsigned S_BITS     = 8;   // phase s in Q0.8
  localparam int unsigned COEF_FRAC  = 10;  // A(s), B(s), C(s) in Q.10
  localparam int unsigned ALPHA_FRAC = 8;   // alpha1, alpha2 in Q.8
  localparam int unsigned NUM_LINES  = 4;   // line banks = filter taps
  localparam int unsigned COEF_W     = 12;  // signed width of A/B/C
  localparam int unsigned ALPHA_W    = 11;  // signed width of alpha (+-383)

  typedef logic [PIX_BITS-1:0] pix_t;
  typedef logic [S_BITS-1:0]   phase_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [ALPHA_W-1:0] alpha_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  // Four neighbouring samples f(x_{k-1}), f(x_k), f(x_{k+1}), f(x_{k+2}).
  typedef struct packed {
    pix_t m1;
    pix_t p0;
    pix_t p1;
    pix_t p2;
  } taps_t;

  // The three cubic basis values for one phase.
  typedef struct packed {
    coef_t a;
    coef_t b;
    coef_t c;
  } basis_t;

  // Cubic basis of Eq. (3)-(5) for a phase s in Q0.8, evaluated exactly in
  // Q.24 and truncated (floor) to Q.10.
  function automatic basis_t cubic_basis(phase_t s);
    logic signed [31:0] s1, s2, s3;
    basis_t r;
    s1 = 32'(s) <<< 16;           // s   in Q.24
    s2 = (32'(s) * 32'(s)) <<< 8; // s^2 in Q.24
    s3 = 32'(s) * 32'(s) * 32'(s);// s^3 in Q.24
    r.a = coef_t'((s3 - 2 * s2 + s1) >>> (24 - COEF_FRAC));
    r.b = coef_t'((s3 - s2) >>> (24 - COEF_FRAC));
    r.c = coef_t'((2 * s3 - 3 * s2) >>> (24 - COEF_FRAC));
    return r;
  endfunction

  // Reciprocal used to turn a phase remainder rem (0 <= rem < den) into
  // s = floor(rem * 2^S_BITS / den) without a divider:
  //   s = (rem * phase_recip(den)) >> 24,  phase_recip(den) = ceil(2^32 / den).
  // The rounding-up error is below rem / 2^24, smaller than the 1/den gap
  // to the next integer for every den <= 2048, so the result is exact.
  function automatic logic [39:0] phase_recip(int unsigned den);
    logic [63:0] num;
    num = 64'd1 << (24 + S_BITS);
    return 40'((num + 64'(den) - 64'd1) / 64'(den));
  endfunction

endpackage
