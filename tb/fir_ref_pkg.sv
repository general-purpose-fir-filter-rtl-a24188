// fir_ref_pkg: reference arithmetic for the testbenches, written without
// the RTL's package functions: modulo-257 helpers, the enhanced digit
// rewrite in plain integer form, and a model of the whole filter that keeps
// the wrap of each modular product coefficient.
package fir_ref_pkg;

  function automatic int m257(int v);
    int r;
    r = v % 257;
    if (r < 0) r += 257;
    return r;
  endfunction

  function automatic int m257l(longint v);
    longint r;
    r = v % 257;
    if (r < 0) r += 257;
    return int'(r);
  endfunction

  function automatic int centre(int r);
    return (r > 128) ? r - 257 : r;
  endfunction

  function automatic int pow257(int b, int e);
    longint r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % 257;
    return int'(r);
  endfunction

  // s = top*512 + d[2]*64 + d[1]*8 + d[0], |d| <= 4, top in -1..1
  function automatic void emap(int s, output int d [3], output int top);
    int m, cy, t, sg;
    if (s < -511) s = -511;
    sg = (s < 0) ? -1 : 1;
    m  = (s < 0) ? -s : s;
    cy = 0;
    for (int i = 0; i < 3; i++) begin
      t = ((m >> (3 * i)) & 7) + cy;
      if (t >= 4) begin d[i] = sg * (t - 8); cy = 1; end
      else        begin d[i] = sg * t;       cy = 0; end
    end
    top = sg * cy;
  endfunction

  // Output of the filter for one set of taps, given the (already mapped)
  // products. Returns the 25-bit result; sets wrapped when any product
  // coefficient left -128..128.
  function automatic longint model(int h [], int xs [], output bit wrapped);
    longint c [5];
    longint corr [3];
    longint z6, y;
    int hd [3], xd [3];
    int ht, xt;
    foreach (c[i]) c[i] = 0;
    foreach (corr[i]) corr[i] = 0;
    z6 = 0;
    for (int k = 0; k < h.size(); k++) begin
      emap(h[k], hd, ht);
      emap(xs[k], xd, xt);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) c[i + j] += hd[j] * xd[i];
      for (int j = 0; j < 3; j++) corr[j] += xt * hd[j] + ht * xd[j];
      z6 += xt * ht;
    end
    wrapped = 0;
    y = 0;
    for (int i = 0; i < 5; i++) begin
      longint cc;
      cc = longint'(centre(m257l(c[i])));
      if (cc != c[i]) wrapped = 1;
      y += cc <<< (3 * i);
    end
    for (int j = 0; j < 3; j++) y += corr[j] <<< (9 + 3 * j);
    y += z6 <<< 18;
    y = y & ((64'd1 << 25) - 1);
    if (y[24]) y = y - (64'sd1 <<< 25);
    return y;
  endfunction

endpackage
