// Reference model of the backprojection arithmetic for the testbenches.
// It follows the number formats of the accelerator (distances with 12
// fraction bits, min_f Q8.27, interp_const Q16.16, phase in 16-bit turns,
// weight in 16-bit fraction) but computes the square root exactly, the
// interpolation in real arithmetic and the matched filter with $cos/$sin, so
// it is independent of the hardware's algorithms.
package bp_ref_pkg;

  typedef logic signed [127:0] s128_t;

  // floor(sqrt(v)) for v >= 0, exact
  function automatic longint isqrt_floor(s128_t v);
    longint r;
    r = longint'($floor($sqrt(real'(v))));
    while (s128_t'(r) * s128_t'(r) > v) r--;
    while (s128_t'(r + 1) * s128_t'(r + 1) <= v) r++;
    return r;
  endfunction

  // differential range dR = |ant - pix| - r0 (all in 2^-12 m)
  function automatic longint range_dr(longint ax, longint ay, longint az,
                                      longint px, longint py, bit pz, longint r0);
    s128_t dx, dy, dz;
    dx = s128_t'(ax - px);
    dy = s128_t'(ay - py);
    dz = s128_t'(az - (pz ? 4096 : 0));
    return isqrt_floor(dx * dx + dy * dy + dz * dz) - r0;
  endfunction

  // range bin index floor((dr - rvec0) * ic / 2^28)
  function automatic longint bin_k(longint dr, longint rvec0, longint ic);
    s128_t p;
    p = s128_t'(dr - rvec0) * s128_t'(ic);
    return longint'(p >>> 28);
  endfunction

  // interpolation weight (16-bit fraction), clamped
  function automatic longint weight_t(longint dr, longint rvk, longint ic);
    s128_t p;
    p = (s128_t'(dr - rvk) * s128_t'(ic)) >>> 12;
    if (p < 0) return 0;
    if (p > 65535) return 65535;
    return longint'(p);
  endfunction

  // phase in 16-bit turns: fraction bits of dr * min_f (2^-39 turns)
  function automatic int phase16(longint dr, longint minf);
    s128_t p;
    p = s128_t'(dr) * s128_t'(minf);
    return int'((p >>> 23) & 128'hFFFF);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // one pulse's contribution to one pixel, real valued
  function automatic void contrib(longint dr, longint minf, longint ic, int nfft,
                                  const ref longint rvec[], const ref longint rc_re[],
                                  const ref longint rc_im[], output real c_re,
                                  output real c_im, output real mag, output bit in_rng);
    longint k, t;
    real w, s_re, s_im, ang;
    k = bin_k(dr, rvec[0], ic);
    c_re = 0.0; c_im = 0.0; mag = 0.0; in_rng = 0;
    if (k < 0 || k > nfft - 2) return;
    in_rng = 1;
    t = weight_t(dr, rvec[k], ic);
    w = real'(t) / 65536.0;
    s_re = real'(rc_re[k]) + w * real'(rc_re[k+1] - rc_re[k]);
    s_im = real'(rc_im[k]) + w * real'(rc_im[k+1] - rc_im[k]);
    ang  = 2.0 * 3.141592653589793 * real'(phase16(dr, minf)) / 65536.0;
    c_re = s_re * $cos(ang) - s_im * $sin(ang);
    c_im = s_re * $sin(ang) + s_im * $cos(ang);
    mag  = (s_re < 0 ? -s_re : s_re) + (s_im < 0 ? -s_im : s_im);
  endfunction

endpackage
