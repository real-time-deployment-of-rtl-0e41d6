// vnle_ref_pkg: bit-exact reference model of the equalizer, for testbenches.
//
// Written from the arithmetic rules, not from the RTL: a tap is pruned when
// its weight is zero or below the threshold; a weight inside (-0.875, 0.875)
// is replaced by the nearest value with one or two set bits among the ten
// fraction bits (ties to the smaller), and the term is shifted right once per
// set bit (floor) and summed; other weights multiply the term and the product
// is floored to 10 fraction bits. Terms: x*32, x*x, floor(x*x*x / 32).
// Also gives a hash-based weight generator with a chosen mix of pruned,
// clustered and multiplied taps.
package vnle_ref_pkg;
  import vnle_pkg::*;

  function automatic int popcount10(input int c);
    int n;
    n = 0;
    for (int b = 0; b < 10; b++) n += (c >> b) & 1;
    return n;
  endfunction

  function automatic longint ref_wterm(input int d, input int w, input bit cl,
                                       input int thr);
    int mag, best, best_err, e;
    longint s;
    mag = (w < 0) ? -w : w;
    if (w == 0 || mag < thr) return 0;
    if (cl && mag < 896) begin
      best = 0;
      best_err = 1 << 30;
      for (int c = 1; c < 1024; c++) begin
        if (popcount10(c) == 1 || popcount10(c) == 2) begin
          e = (mag > c) ? mag - c : c - mag;
          if (e < best_err) begin
            best_err = e;
            best = c;
          end
        end
      end
      s = 0;
      for (int b = 0; b < 10; b++)
        if (((best >> b) & 1) != 0) s += longint'(d >>> (10 - b));
      return (w < 0) ? -s : s;
    end
    return (longint'(d) * longint'(w)) >>> 10;
  endfunction

  // Equalized output centred on samples x[c], where x is the window of
  // L1 samples starting at x[c - (L1-1)/2] (passed as win, win[0] oldest).
  function automatic longint ref_y(input int win[], input int l1, input int l2,
                                   input int l3, input wvec_t w1, input wvec_t w2,
                                   input wvec_t w3, input bit cl, input int thr);
    longint y;
    int k, o;
    y = 0;
    for (int t = 0; t < l1; t++)
      y += ref_wterm(win[t] * 32, int'(get_w(w1, t)), cl, thr);
    k = 0;
    o = (l1 - l2) / 2;
    for (int a = 0; a < l2; a++)
      for (int b = a; b < l2; b++) begin
        y += ref_wterm(win[o+a] * win[o+b], int'(get_w(w2, k)), cl, thr);
        k++;
      end
    k = 0;
    o = (l1 - l3) / 2;
    for (int a = 0; a < l3; a++)
      for (int b = a; b < l3; b++)
        for (int c = b; c < l3; c++) begin
          y += ref_wterm((win[o+a] * win[o+b] * win[o+c]) >>> 5,
                         int'(get_w(w3, k)), cl, thr);
          k++;
        end
    return y;
  endfunction

  // Test weights: about 30% zero, 50% clustered range, 20% multiplied.
  function automatic wvec_t test_weights(input int seed, input int n);
    wvec_t v;
    int unsigned h, r;
    int w;
    v = '0;
    for (int k = 0; k < n; k++) begin
      h = (k + 7) * 32'd2246822519 + seed * 32'd3266489917;
      h = h ^ (h >> 13);
      h = h * 32'd668265263;
      h = h ^ (h >> 16);
      r = h % 10;
      if (r < 3)      w = 0;
      else if (r < 8) w = 1 + int'((h >> 8) % 895);
      else            w = 896 + int'((h >> 8) % 1152);
      if (((h >> 30) & 1) != 0) w = -w;
      v[k*W_W +: W_W] = W_W'(w);
    end
    return v;
  endfunction

  function automatic int count_kind(input wvec_t v, input int n, input int kind,
                                    input int thr);
    int c, w, mag;
    c = 0;
    for (int k = 0; k < n; k++) begin
      w = int'(get_w(v, k));
      mag = (w < 0) ? -w : w;
      if (kind == 0 && (w == 0 || mag < thr)) c++;
      if (kind == 1 && w != 0 && mag >= thr && mag < 896) c++;
      if (kind == 2 && mag >= 896 && mag >= thr) c++;
    end
    return c;
  endfunction
endpackage
