// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the design's package. Numbers are Q12.20 in a 32-bit int; products are
// truncated toward minus infinity; the step size has 24 fraction bits. The
// sigmoid reference rebuilds the 65-entry boundary table
// T[k] = round(1/(1+exp(-(-8 + k/4))) * 2^20) and interpolates linearly
// inside each 0.25-wide segment, with inputs clamped to [-8, 8).
package tb_ref_pkg;

  localparam int FRAC = 20;
  localparam int ONE  = 1 << FRAC;

  function automatic int rmul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> FRAC);
  endfunction

  function automatic int rscale(int x, int d);
    longint p;
    p = longint'(x) * longint'(d);
    return int'(p >>> 24);
  endfunction

  function automatic int rtab(int k);
    real xr;
    xr = -8.0 + real'(k) / 4.0;
    return $rtoi(1048576.0 / (1.0 + $exp(-xr)) + 0.5);
  endfunction

  function automatic int rsig(int x);
    int xc, s, idx, off, base, slope;
    longint p;
    xc = x;
    if (xc < -(8 << FRAC)) xc = -(8 << FRAC);
    if (xc > (8 << FRAC) - 1) xc = (8 << FRAC) - 1;
    s     = xc + (8 << FRAC);
    idx   = s >> 18;
    off   = s & ((1 << 18) - 1);
    base  = rtab(idx);
    slope = rtab(idx + 1) - base;
    p     = longint'(slope) * longint'(off);
    return base + int'(p >>> 18);
  endfunction

  function automatic int to_fx(real r);
    return $rtoi(r * 1048576.0);
  endfunction

  function automatic real from_fx(int v);
    return real'(v) / 1048576.0;
  endfunction

  // uniform random number in [-a, a)
  function automatic int rnd_fx(real a);
    real u;
    u = (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
    return to_fx(u * a);
  endfunction

endpackage
