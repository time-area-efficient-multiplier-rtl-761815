// Reference model of the multiplier-free biquad filter, for the testbenches.
//
// Evaluates each section as its plain difference equation on 64-bit integers,
// sample by sample and without any pipelining:
//   v[n] = floor((S*x[n] - b1*v[n-1] - b2*v[n-2]) / b0)
//   y[n] = a0*v[n] + a1*v[n-1] + a2*v[n-2]
// where every product with a power-of-two term is an arithmetic right shift
// (floor) taken term by term, as the hardware's wired shifts do. Because the
// arithmetic is wide, an overflow of the W-bit hardware shows up here as a
// value outside [-2^(W-1), 2^(W-1)); such values are counted in `overflows`
// so that a testbench can reject an input that drives the filter out of range.
package iir_ref_pkg;
  import iir_pkg::*;

  function automatic longint spt_term(longint v, spt_t t);
    longint p;
    p = v >>> t.sh;
    return t.neg ? -p : p;
  endfunction

  function automatic longint spt2_prod(longint v, spt2_t c);
    if (!c.has_t0) return 0;
    return spt_term(v, c.t0) + (c.has_t1 ? spt_term(v, c.t1) : 64'sd0);
  endfunction

  class biquad_ref;
    biquad_cfg_t cfg;
    int          w;
    longint      v1, v2;
    int          overflows;

    function new(biquad_cfg_t c, int width);
      cfg       = c;
      w         = width;
      overflows = 0;
      clear();
    endfunction

    function void clear();
      v1 = 0;
      v2 = 0;
    endfunction

    function void range_check(longint a);
      longint lim;
      lim = longint'(1) <<< (w - 1);
      if (a >= lim || a < -lim) overflows++;
    endfunction

    // One sample in, one sample out (no latency).
    function longint step(longint x);
      longint xs, pre, v, y;
      xs  = x >>> cfg.s_sh;
      pre = xs - spt2_prod(v1, cfg.b1) - spt2_prod(v2, cfg.b2);
      range_check(pre);
      v   = spt2_prod(pre, cfg.b0inv);
      y   = spt2_prod(v, cfg.a0) + spt2_prod(v1, cfg.a1) + spt2_prod(v2, cfg.a2);
      range_check(y);
      v2  = v1;
      v1  = v;
      return y;
    endfunction
  endclass

  // A chain of sections.
  class cascade_ref;
    biquad_ref sec[$];

    function void add(biquad_cfg_t c, int width);
      biquad_ref b;
      b = new(c, width);
      sec.push_back(b);
    endfunction

    function void clear();
      foreach (sec[i]) sec[i].clear();
    endfunction

    function int overflows();
      int n;
      n = 0;
      foreach (sec[i]) n += sec[i].overflows;
      return n;
    endfunction

    function longint step(longint x);
      longint s;
      s = x;
      foreach (sec[i]) s = sec[i].step(s);
      return s;
    endfunction
  endclass

  // Ideal (unquantised-signal) magnitude response of one section at normalised
  // frequency f (1.0 = Nyquist), from its coefficients.
  function automatic real spt_val(spt_t t);
    real m;
    m = 1.0 / real'(longint'(1) <<< t.sh);
    return t.neg ? -m : m;
  endfunction

  function automatic real spt2_val(spt2_t c);
    if (!c.has_t0) return 0.0;
    return spt_val(c.t0) + (c.has_t1 ? spt_val(c.t1) : 0.0);
  endfunction

  function automatic real section_mag(biquad_cfg_t c, real f);
    real pi, wr, s, a0, a1, a2, b0, b1, b2, nr, ni, dr, di;
    pi = 3.14159265358979;
    wr = pi * f;
    s  = 1.0 / real'(longint'(1) <<< c.s_sh);
    a0 = spt2_val(c.a0);
    a1 = spt2_val(c.a1);
    a2 = spt2_val(c.a2);
    b0 = 1.0 / spt2_val(c.b0inv);
    b1 = spt2_val(c.b1);
    b2 = spt2_val(c.b2);
    nr = a0 + a1 * $cos(wr) + a2 * $cos(2.0 * wr);
    ni = -a1 * $sin(wr) - a2 * $sin(2.0 * wr);
    dr = b0 + b1 * $cos(wr) + b2 * $cos(2.0 * wr);
    di = -b1 * $sin(wr) - b2 * $sin(2.0 * wr);
    return s * $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

endpackage
