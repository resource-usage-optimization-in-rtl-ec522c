// tb_ref_pkg: floating-point reference models shared by the testbenches.
//
// These recompute, in plain real arithmetic, what the receiver blocks are
// meant to produce: the sinc kernel, the early/late peak search over sinc-
// interpolated magnitudes, and the integer CIC response written as N cascaded
// moving sums (an FIR view, independent of the integrator/comb structure).
//
// These models are written from the definitions (moving sums, sinc
// interpolation, early/late search), not from the RTL.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real sinc(real t);
    if (t == 0.0) return 1.0;
    return $sin(PI * t) / (PI * t);
  endfunction

  // f(t) = sum_k m[k] sinc(t - k) over the 2*half lags nearest to t.
  function automatic real interp_val(real m[], real t, int half);
    real acc = 0.0;
    int  kb  = $floor(t);
    for (int k = kb - half + 1; k <= kb + half; k++)
      if (k >= 0 && k < m.size()) acc += m[k] * sinc(t - k);
    return acc;
  endfunction

  // Early/late search; returns the position in 1/256 sample units.
  function automatic int peak_search(real m[], int iters, int half);
    int  best = 0;
    int  pos;
    int  step = 128;
    for (int k = 1; k < m.size(); k++) if (m[k] > m[best]) best = k;
    pos = best * 256;
    for (int i = 0; i < iters; i++) begin
      real e = interp_val(m, real'(pos - step) / 256.0, half);
      real l = interp_val(m, real'(pos + step) / 256.0, half);
      if (l > e) pos += step; else pos -= step;
      step /= 2;
    end
    return pos;
  endfunction

  // CIC decimator output number `idx` (covering inputs up to idx*r + r - 1)
  // as n cascaded length-r moving sums of x, before truncation.
  function automatic longint cic_full(longint x[], int r, int n, int idx);
    longint cur[];
    longint nxt[];
    int     last = idx * r + r - 1;
    cur = new[last + 1];
    for (int i = 0; i <= last; i++) cur[i] = (i < x.size()) ? x[i] : 0;
    for (int s = 0; s < n; s++) begin
      nxt = new[last + 1];
      for (int i = 0; i <= last; i++) begin
        nxt[i] = 0;
        for (int k = 0; k < r; k++) if (i - k >= 0) nxt[i] += cur[i - k];
      end
      cur = nxt;
    end
    return cur[last];
  endfunction

endpackage
