// acc_kernel: one colour channel of the 4-tap adaptive cubic convolution.
//
// From four neighbouring 8-bit samples f[k-1], f[k], f[k+1], f[k+2] and the
// phase s of the wanted point between f[k] and f[k+1], it computes
//   y = a1*(f[k-1]-f[k+1])*A(s) + a2*(f[k]-f[k+2])*B(s) + (f[k]-f[k+1])*C(s) + f[k]
// with the three subtractors, three coefficient multipliers and the final
// summation with f[k] of the classic 4-tap FIR structure.
//
// Adaptation of a1/a2 (the ACC rule):
//   A = |f[k+1]-f[k-1]| - |f[k+2]-f[k]|   (slope on the left minus on the right)
//   A >  A_LEVEL : a1 = -1/2 - A', a2 =  1/2 + A'
//   A < -A_LEVEL : a1 =  1/2 + A', a2 = -1/2 - A'
//   otherwise    : a1 = a2 = -1/2 (plain cubic convolution)
// where A' = A / 2^(ALPHA_FRAC + ADAPT_SHIFT) is A brought to the scale of
// alpha. The rule and the equations follow the ACC method; the threshold
// A_LEVEL, the scaling of A, all word widths, the rounding (round half up
// of the Q.18 sum) and the clamp of y to 0..255 are this design's choices.
// The third coefficient is fixed to 1, the value that makes y equal f[k+1]
// at s = 1 and the basis an interpolator.
//
// Timing: fully pipelined, one sample per clock, latency 2 clocks from
// in_valid to out_valid. No back-pressure; reset clears the valid bits.
module acc_kernel
  import scan_pkg::*;
#(
  parameter int unsigned A_LEVEL     = 32, // adaptation threshold, pixel units
  parameter int unsigned ADAPT_SHIFT = 0   // extra right shift of A before use
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  taps_t  in_taps,
  input  phase_t in_s,
  output logic   out_valid,
  output pix_t   out_pix,
  output logic [1:0] out_mode  // 0: a1=a2=-1/2, 1: A>A_LEVEL, 2: A<-A_LEVEL
);

  typedef logic signed [9:0] diff_t;   // difference of two pixels

  // ---------------- stage 1: subtractors, adaptation, basis -------------
  diff_t  d1, d2, d3, slope_l, slope_r, acc_a;
  alpha_t a1, a2, a_off;
  logic [1:0] mode;
  basis_t basis;

  always_comb begin
    d1 = diff_t'({2'b0, in_taps.m1}) - diff_t'({2'b0, in_taps.p1});
    d2 = diff_t'({2'b0, in_taps.p0}) - diff_t'({2'b0, in_taps.p2});
    d3 = diff_t'({2'b0, in_taps.p0}) - diff_t'({2'b0, in_taps.p1});
    slope_l = (d1 < 0) ? -d1 : d1;   // |f[k+1]-f[k-1]|
    slope_r = (d2 < 0) ? -d2 : d2;   // |f[k+2]-f[k]|
    acc_a   = slope_l - slope_r;
    a_off   = alpha_t'(acc_a) >>> ADAPT_SHIFT;
    if (acc_a > $signed(10'(A_LEVEL))) begin
      a1 = -alpha_t'(1 << (ALPHA_FRAC - 1)) - a_off;
      a2 =  alpha_t'(1 << (ALPHA_FRAC - 1)) + a_off;
      mode = 2'd1;
    end else if (acc_a < -$signed(10'(A_LEVEL))) begin
      a1 =  alpha_t'(1 << (ALPHA_FRAC - 1)) + a_off;
      a2 = -alpha_t'(1 << (ALPHA_FRAC - 1)) - a_off;
      mode = 2'd2;
    end else begin
      a1 = -alpha_t'(1 << (ALPHA_FRAC - 1));
      a2 = -alpha_t'(1 << (ALPHA_FRAC - 1));
      mode = 2'd0;
    end
    basis = cubic_basis(in_s);
  end

  logic   v1;
  diff_t  d1_q, d2_q, d3_q;
  alpha_t a1_q, a2_q;
  basis_t basis_q;
  pix_t   p0_q;
  logic [1:0] mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      d1_q    <= d1;
      d2_q    <= d2;
      d3_q    <= d3;
      a1_q    <= a1;
      a2_q    <= a2;
      basis_q <= basis;
      p0_q    <= in_taps.p0;
      mode_q  <= mode;
    end
  end

  // ---------------- stage 2: coefficient multipliers and summation ------
  localparam int unsigned SUM_FRAC = ALPHA_FRAC + COEF_FRAC;
  typedef logic signed [31:0] acc_t;

  acc_t t1, t2, t3, sum, y;
  pix_t y_pix;

  always_comb begin
    t1  = acc_t'(a1_q) * acc_t'(d1_q) * acc_t'(basis_q.a);
    t2  = acc_t'(a2_q) * acc_t'(d2_q) * acc_t'(basis_q.b);
    t3  = (acc_t'(d3_q) * acc_t'(basis_q.c)) <<< ALPHA_FRAC;
    sum = t1 + t2 + t3 + (acc_t'(1) <<< (SUM_FRAC - 1));
    y   = acc_t'({24'b0, p0_q}) + (sum >>> SUM_FRAC);
    if (y < 0)        y_pix = '0;
    else if (y > 255) y_pix = '1;
    else              y_pix = pix_t'(y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      out_pix  <= y_pix;
      out_mode <= mode_q;
    end
  end

endmodule
