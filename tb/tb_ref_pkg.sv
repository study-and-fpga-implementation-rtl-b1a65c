// tb_ref_pkg: bit-exact reference arithmetic for the adaptive filter
// testbenches, written directly from the filter equations with 64-bit
// integers and independent of the RTL.
//
//   e(n)  = sat16(d(n) - floor(y(n) / 2^14)),  y(n) = sum h_i x(n-i) (32-bit wrap)
//   g     = mu_code * 2^11                       (LMS)
//   g     = min(65535, floor(mu_code * 2^25 / (floor(P / 2^14) + C)))   (NLMS)
//   es    = sat16(floor(g * e / 2^14))
//   h_i  <= sat16(h_i + sat16(floor((es * x(n-i) + 2^13) / 2^14)))   when ce is high
//   P     = sum over the window of x(n-k)^2,  Px = min(32767, floor(P / 2^(14+log2 N)))
package tb_ref_pkg;

  function automatic longint sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // floor division by 2^s of a signed value
  function automatic longint fdiv(longint v, int s);
    longint q;
    q = v / (longint'(1) << s);
    if (v < 0 && q * (longint'(1) << s) != v) q = q - 1;
    return q;
  endfunction

  function automatic longint wrap32(longint v);
    int w;
    w = int'(v);
    return longint'(w);
  endfunction

  function automatic int clog2(int n);
    int r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // Step-by-step model of one adaptive filter.
  class filter_model;
    int     n_taps;
    bit     nlms;
    int     mu_code;
    int     c_reg;
    longint h   [];
    longint hist[];  // hist[k] = x(n-1-k)

    function new(int n, bit is_nlms, int mu, int c);
      n_taps = n; nlms = is_nlms; mu_code = mu; c_reg = c;
      h = new[n]; hist = new[n];
      foreach (h[i]) begin h[i] = 0; hist[i] = 0; end
    endfunction

    function automatic longint tap(int i, longint x);
      return (i == 0) ? x : hist[i-1];
    endfunction

    function automatic longint power(longint x);
      longint p = 0;
      for (int i = 0; i < n_taps; i++) p += tap(i, x) * tap(i, x);
      return p;
    endfunction

    function automatic longint gain(longint x);
      longint q;
      if (!nlms) return longint'(mu_code) << 11;
      q = (longint'(mu_code) << 25) / (fdiv(power(x), 14) + longint'(c_reg));
      return (q > 65535) ? 65535 : q;
    endfunction

    function automatic longint px(longint x);
      longint m = power(x) >> (14 + clog2(n_taps));
      return (m > 32767) ? 32767 : m;
    endfunction

    function automatic longint err(longint x, longint d);
      longint y = 0;
      for (int i = 0; i < n_taps; i++) y += h[i] * tap(i, x);
      y = wrap32(y);
      return sat16(d - fdiv(y, 14));
    endfunction

    // Apply one enabled clock edge.
    function automatic void update(longint x, longint d);
      longint e, es, g;
      longint xs[];
      e  = err(x, d);
      g  = gain(x);
      es = sat16(fdiv(g * e, 14));
      xs = new[n_taps];
      for (int i = 0; i < n_taps; i++) xs[i] = tap(i, x);
      for (int i = 0; i < n_taps; i++) h[i] = sat16(h[i] + sat16(fdiv(es * xs[i] + 8192, 14)));
      for (int k = n_taps - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
    endfunction
  endclass

endpackage
