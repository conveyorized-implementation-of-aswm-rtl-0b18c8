// aswm_ref_pkg: reference model of the fixed-point ASWM filter, used by
// the testbenches. It is written straight from the equations with 64-bit
// integer arithmetic (native division, a real-valued square root with
// integer correction), independently of the pipelined RTL, and gives the
// value every pipeline stage must produce for a window.
//   weight  w(d)  = floor(2^31 / (8d + 1)),  d = floor(|X - M_w|)
//   mean    M_w   = floor(256 * sum(w X) / sum(w))            (8.8)
//   initial M_w   = floor(256 * sum(X) / 9)
//   D             = |256 X - M_w|                             (8.8)
//   var           = floor(sum(w * floor(D^2 / 256)) / sum(w))  (16.8)
//   sigma         = floor(sqrt(var))                          (8.4)
//   noisy         = |X_c - M_w| > alpha * sigma
package aswm_ref_pkg;

  typedef longint unsigned u64;
  typedef byte unsigned    px_t;
  typedef px_t             win_t [9];
  typedef u64              wts_t [9];

  function automatic u64 absdiff_mw(px_t x, u64 mw);
    u64 xs = u64'(x) * 256;
    return (xs >= mw) ? xs - mw : mw - xs;
  endfunction

  function automatic u64 ref_weight(u64 d);
    return 64'h8000_0000 / (8 * d + 1);
  endfunction

  function automatic u64 ref_mean0(win_t win);
    u64 s = 0;
    foreach (win[k]) s += win[k];
    return (s * 256) / 9;
  endfunction

  // One estimation step: weights from mw_prev, then the new mean.
  function automatic void ref_iter(win_t win, u64 mw_prev, output wts_t w, output u64 mw_new);
    u64 num = 0, den = 0;
    foreach (win[k]) begin
      w[k] = ref_weight(absdiff_mw(win[k], mw_prev) / 256);
      num += w[k] * win[k];
      den += w[k];
    end
    mw_new = (num * 256) / den;
  endfunction

  // The whole unrolled loop of n_units units with early exit.
  function automatic void ref_chain(win_t win, int n_units, u64 eps,
                                    output wts_t w, output u64 mw,
                                    output bit done, output int iters);
    u64 mw_new, step;
    wts_t wn;
    mw = ref_mean0(win);
    foreach (w[k]) w[k] = 64'h1000_0000;
    done  = 0;
    iters = 0;
    for (int u = 0; u < n_units && !done; u++) begin
      ref_iter(win, mw, wn, mw_new);
      step  = (mw_new >= mw) ? mw_new - mw : mw - mw_new;
      done  = step < eps;
      w     = wn;
      mw    = mw_new;
      iters = u + 1;
    end
  endfunction

  function automatic u64 ref_isqrt(u64 x);
    u64 r = u64'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  function automatic u64 ref_sigma(win_t win, wts_t w, u64 mw);
    u64 num = 0, den = 0, d;
    foreach (win[k]) begin
      d = absdiff_mw(win[k], mw);
      num += w[k] * ((d * d) / 256);
      den += w[k];
    end
    return ref_isqrt(num / den);
  endfunction

  function automatic px_t ref_median(win_t win);
    px_t s [9];
    s = win;
    s.sort();
    return s[4];
  endfunction

  function automatic bit ref_noisy(px_t xc, u64 mw, u64 sigma, u64 alpha);
    return absdiff_mw(xc, mw) > alpha * sigma;
  endfunction

  // Full filter for one window.
  function automatic void ref_pixel(win_t win, int n_units, u64 eps, u64 alpha,
                                    output px_t y, output bit noisy,
                                    output bit done, output int iters);
    wts_t w;
    u64 mw, sg;
    ref_chain(win, n_units, eps, w, mw, done, iters);
    sg    = ref_sigma(win, w, mw);
    noisy = ref_noisy(win[4], mw, sg, alpha);
    y     = noisy ? ref_median(win) : win[4];
  endfunction

endpackage
