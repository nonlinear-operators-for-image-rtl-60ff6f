// tb_ref_pkg: reference models used by the testbenches of the
// median-rational hybrid filter, written from the algorithm description
// rather than from the RTL.
package tb_ref_pkg;

  function automatic int med_n(int v [], int n);
    int s [$];
    for (int i = 0; i < n; i++) s.push_back(v[i]);
    s.sort();
    return s[n / 2];
  endfunction

  function automatic int med5(int a, int b, int c, int d, int e);
    int v [] = '{a, b, c, d, e};
    return med_n(v, 5);
  endfunction

  // centre-weighted median, centre repeated three times
  function automatic int cwmf(int n, int w, int c, int e, int s);
    int v [] = '{n, w, c, c, c, e, s};
    return med_n(v, 7);
  endfunction

  // scale by 16 with rounding on the highest dropped bit
  function automatic int sc16(int m);
    return (m >> 4) + ((m >> 3) & 1);
  endfunction

  // rational stage with scaling division (integer model of the algorithm)
  function automatic int rat(int p1, int p2, int p3, int k, output int en, output int ed);
    int n, d, s, den, nm, dm, inv, q, y;
    longint t;
    n  = p1 + p3 - 2 * p2;
    d  = (p1 > p3) ? p1 - p3 : p3 - p1;
    s  = (d >> 4) + (d >> 5);
    den = s * s + k;
    nm = (n < 0) ? -n : n;
    en = 0;
    while (nm > 16 && en < 2) begin nm = sc16(nm); en++; end
    dm = den;
    ed = 0;
    while (dm > 16 && ed < 2) begin dm = sc16(dm); ed++; end
    inv = (256 + dm / 2) / dm;
    t = longint'(nm) * inv;
    t = t * (longint'(1) << (4 * (en - ed + 2)));
    q = int'((t + (1 << 15)) >> 16);
    if (n < 0) q = -q;
    y = p2 + q;
    if (y < 0) y = 0;
    if (y > 255) y = 255;
    return y;
  endfunction

  // the operator in real arithmetic, h = 0.01, for accuracy bounds
  function automatic real rat_real(int p1, int p2, int p3, real k);
    real y;
    y = real'(p2) + real'(p1 + p3 - 2 * p2) / (k + 0.01 * real'((p1 - p3) * (p1 - p3)));
    if (y < 0.0) y = 0.0;
    if (y > 255.0) y = 255.0;
    return y;
  endfunction

endpackage
