// addnet_ref_pkg: integer reference model of the AdderNet ResNet20 layers,
// written independently of the RTL for the self-checking testbenches.
//
// Feature maps are flat arrays laid out (h, w, c) with c fastest; weights are
// laid out (oc, kh, kw, ci). Arithmetic is done on longint/real values:
//   SAD layer:  acc = - sum |x - w|   (zero-padded positions give |w|)
//   MAC layer:  acc =   sum  x * w
//   BN:         optional pre-scaling (x/2^bs rounded half to even, clamped to
//               [-128,127], times 2^bs), then y = clamp(floor((x*A+B)/2^16 + 1/2))
//   add/ReLU:   clamp(max(0, bn + res)) to [-128,127]
package addnet_ref_pkg;

  typedef int iarr_t[];
  typedef longint larr_t[];

  function automatic int clamp8(input longint v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return int'(v);
  endfunction

  // round-half-to-even of v / 2^bs
  function automatic longint div_conv(input longint v, input int bs);
    real r, fl, fr;
    r  = real'(v) / (2.0 ** bs);
    fl = $floor(r);
    fr = r - fl;
    if (fr > 0.5) return longint'(fl) + 1;
    if (fr < 0.5) return longint'(fl);
    return (longint'(fl) % 2 == 0) ? longint'(fl) : longint'(fl) + 1;
  endfunction

  function automatic longint prescale(input longint acc, input int bs);
    if (bs == 0) return acc;
    return longint'(clamp8(div_conv(acc, bs))) * (longint'(1) << bs);
  endfunction

  function automatic int bn_ref(input longint acc, input int bs, input longint a, input longint b);
    longint xs;
    real y;
    xs = prescale(acc, bs);
    y  = real'(xs * a + b) / 65536.0;
    return clamp8(longint'($floor(y + 0.5)));
  endfunction

  function automatic int add_relu_ref(input int bn, input int res, input bit use_res, input bit relu);
    int s;
    s = bn + (use_res ? res : 0);
    if (relu && s < 0) s = 0;
    return clamp8(s);
  endfunction

  // Raw accumulators of one layer.
  function automatic larr_t layer_acc(input bit mac, input iarr_t x, input int h, input int w,
                                      input int cin, input iarr_t wt, input int cout,
                                      input int k, input int s, input int p);
    int ho, wo;
    larr_t acc;
    ho = (h + 2*p - k) / s + 1;
    wo = (w + 2*p - k) / s + 1;
    acc = new[ho*wo*cout];
    for (int oy = 0; oy < ho; oy++)
      for (int ox = 0; ox < wo; ox++)
        for (int oc = 0; oc < cout; oc++) begin
          longint sum = 0;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++)
              for (int ci = 0; ci < cin; ci++) begin
                int iy, ix, xv, wv;
                iy = oy*s + ky - p;
                ix = ox*s + kx - p;
                xv = (iy >= 0 && iy < h && ix >= 0 && ix < w) ? x[(iy*w + ix)*cin + ci] : 0;
                wv = wt[((oc*k + ky)*k + kx)*cin + ci];
                if (mac) sum += longint'(xv) * wv;
                else     sum += (xv > wv) ? (xv - wv) : (wv - xv);
              end
          acc[(oy*wo + ox)*cout + oc] = mac ? sum : -sum;
        end
    return acc;
  endfunction

  // Pick per-channel BN coefficients that spread the (pre-scaled)
  // accumulators of each channel over roughly [-spread, +spread].
  function automatic void calibrate(input larr_t acc, input int cout, input int bs,
                                    input int spread, output iarr_t a, output larr_t b);
    a = new[cout];
    b = new[cout];
    for (int c = 0; c < cout; c++) begin
      longint mn, mx, rng, mid, av;
      mn = 64'sh7fffffffffffffff;
      mx = -64'sh7fffffffffffffff;
      for (int i = c; i < acc.size(); i += cout) begin
        longint v = prescale(acc[i], bs);
        if (v < mn) mn = v;
        if (v > mx) mx = v;
      end
      mid = (mx + mn) / 2;
      rng = mx - mn + 1;
      if (rng < 256) rng = 256;
      if (rng < (mid < 0 ? -mid : mid) / 2) rng = (mid < 0 ? -mid : mid) / 2;
      av  = (longint'(2*spread) << 16) / rng;
      if (av > 131071) av = 131071;
      if (av < 1) av = 1;
      if (c % 3 == 1) av = -av;     // some channels with a negative scale
      a[c] = int'(av);
      b[c] = -av * mid + (longint'($urandom_range(0, 40)) - 20) * 65536;
      if (b[c] > 64'sd2147483647)  b[c] = 64'sd2147483647;
      if (b[c] < -64'sd2147483648) b[c] = -64'sd2147483648;
    end
  endfunction

  function automatic iarr_t layer_out(input larr_t acc, input int cout, input int bs,
                                      input iarr_t a, input larr_t b, input iarr_t res,
                                      input bit use_res, input bit relu);
    iarr_t y;
    y = new[acc.size()];
    for (int i = 0; i < acc.size(); i++)
      y[i] = add_relu_ref(bn_ref(acc[i], bs, a[i % cout], b[i % cout]),
                          use_res ? res[i] : 0, use_res, relu);
    return y;
  endfunction

  function automatic iarr_t avgpool_ref(input iarr_t x, input int c, input int hw);
    iarr_t y;
    y = new[c];
    for (int ch = 0; ch < c; ch++) begin
      longint s = 0;
      real m;
      for (int p = 0; p < hw; p++) s += x[p*c + ch];
      m = real'(s) / hw;
      y[ch] = clamp8((m >= 0) ? longint'($floor(m + 0.5)) : -longint'($floor(-m + 0.5)));
    end
    return y;
  endfunction

  function automatic iarr_t rand_arr(input int n, input int lo, input int hi);
    iarr_t v;
    v = new[n];
    foreach (v[i]) v[i] = int'($urandom_range(0, hi - lo)) + lo;
    return v;
  endfunction

endpackage
