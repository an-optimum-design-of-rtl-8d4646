// fftmul_tb_pkg: reference arithmetic for the testbenches.
//
// Conversions between SystemVerilog real (IEEE double) and the 35-bit
// floating-point format of the datapath, written independently of the RTL
// functions, and a helper to compare a datapath result with a real value.
package fftmul_tb_pkg;
  import fftmul_pkg::*;

  function automatic fp_t to_fp(input real r);
    fp_t    f;
    real    a, scaled;
    int     e;
    longint q;
    f = FP_ZERO;
    if (r == 0.0) return f;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    scaled = (a - 1.0) * real'(longint'(1) << FRAC_W);
    q = longint'($floor(scaled));
    if (scaled - real'(q) > 0.5 || (scaled - real'(q) == 0.5 && q[0])) q++;
    if (q == (longint'(1) << FRAC_W)) begin q = 0; e++; end
    if (e + int'(BIAS) <= 0) return f;
    f.sign = (r < 0.0);
    f.exp  = EXP_W'(e + int'(BIAS));
    f.frac = FRAC_W'(q);
    return f;
  endfunction

  function automatic real to_real(input fp_t f);
    real r;
    if (f.exp == 0) return 0.0;
    r = 1.0 + real'(f.frac) / real'(longint'(1) << FRAC_W);
    for (int i = int'(BIAS); i < int'(f.exp); i++) r = r * 2.0;
    for (int i = int'(f.exp); i < int'(BIAS); i++) r = r / 2.0;
    if (f.sign) r = -r;
    return r;
  endfunction

  // 2^e as a real
  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = e; i < 0; i++) r = r / 2.0;
    return r;
  endfunction

  // Relative closeness: |got - want| <= tol * max(|want|, floor).
  function automatic bit close(input real got, input real want, input real tol,
                               input real floor_v);
    real d, m;
    d = got - want;
    if (d < 0.0) d = -d;
    m = (want < 0.0) ? -want : want;
    if (m < floor_v) m = floor_v;
    return d <= tol * m;
  endfunction
endpackage
