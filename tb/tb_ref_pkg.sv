// tb_ref_pkg: reference model of the adaptive cubic convolution, used by
// the testbenches to compute expected pixels independently of the RTL.
//
// Written from the equations, not from the RTL: the cubic basis is
// evaluated in double precision from s = sq/256 and floored to 1/1024
// (exact, as sq^3 < 2^53), the adaptive alphas are taken in units of 1/256,
// and the result is p0 + round(sum / 2^18) clamped to 0..255.
package tb_ref_pkg;

  typedef struct {
    int pix;
    int mode;
  } ref_t;

  function automatic int fl1024(real v);
    return int'($floor(v * 1024.0));
  endfunction

  function automatic ref_t acc_ref(int m1, int p0, int p1, int p2, int sq,
                                   int a_level, int a_shift);
    ref_t r;
    real  s;
    int   ca, cb, cc, adiff, off, al1, al2;
    longint sum;
    s  = real'(sq) / 256.0;
    ca = fl1024(s*s*s - 2.0*s*s + s);
    cb = fl1024(s*s*s - s*s);
    cc = fl1024(2.0*s*s*s - 3.0*s*s);
    adiff = ((p1 > m1) ? p1 - m1 : m1 - p1) - ((p2 > p0) ? p2 - p0 : p0 - p2);
    off   = adiff >>> a_shift;
    if (adiff > a_level)       begin al1 = -128 - off; al2 =  128 + off; r.mode = 1; end
    else if (adiff < -a_level) begin al1 =  128 + off; al2 = -128 - off; r.mode = 2; end
    else                       begin al1 = -128;       al2 = -128;       r.mode = 0; end
    sum = longint'(al1) * (m1 - p1) * ca + longint'(al2) * (p0 - p2) * cb
        + longint'(p0 - p1) * cc * 256 + (longint'(1) << 17);
    r.pix = p0 + int'(sum >>> 18);
    if (r.pix < 0)   r.pix = 0;
    if (r.pix > 255) r.pix = 255;
    return r;
  endfunction

  // Integer position of output sample i of a scale n_in -> n_out, and its
  // phase in 1/256 (floor).
  function automatic int pos_k(int i, int n_in, int n_out);
    return (i * n_in) / n_out;
  endfunction

  function automatic int pos_s(int i, int n_in, int n_out);
    return (((i * n_in) % n_out) * 256) / n_out;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

endpackage
