// vnle_pkg: number formats, tap indexing and weight helpers shared by the
// parallel Volterra nonlinear equalizer (VNLE).
//
// Number formats. Equalizer input samples are signed 6-bit codes (the ADC
// resolution), read as fractions in [-1, 1) with 5 fraction bits. Every term
// that meets a weight (x, x*x and x*x*x) is brought to a signed 12-bit word
// with 10 fraction bits (Q1.10), and every weight is a signed 12-bit word in
// the same Q1.10 format (sign, one integer bit, ten fraction bits), so a
// weight of 0.7568359375 is the code 775. A weighted term keeps 10 fraction
// bits and is 14 bits wide; the per-lane accumulator is ACC_W bits wide.
// The 12-bit weight width and the clustering centres follow the published
// design; the sample and term formats are this design's choice.
//
// Tap order. Inside one lane the window of an order-k kernel is numbered
// t = 0 (oldest sample) .. L-1 (newest). Second-order taps are the pairs
// (a,b) with a <= b, numbered a-major; third-order taps are the triples
// (a,b,c) with a <= b <= c, numbered in the same nested order. Window
// position t multiplies x[i-j] with j = (L-1)/2 - t in the Volterra sum.
//
// Weights are elaboration-time constants held in flat vectors of MAX_TAPS
// 12-bit slots, slot k in bits [12k +: 12]. Zero weights are pruned taps and
// build no hardware; clustering rounds a weight inside (-0.875, 0.875) to
// the nearest value 2^-n + 2^-m or 2^-n (1 <= n, m <= 10, n != m).
package vnle_pkg;

  localparam int unsigned X_W      = 6;    // equalizer input sample width
  localparam int unsigned D_W      = 12;   // term width (Q1.10)
  localparam int unsigned W_W      = 12;   // weight width (Q1.10)
  localparam int unsigned FRAC     = 10;   // fraction bits of terms and weights
  localparam int unsigned T_W      = 14;   // weighted term width (Q3.10)
  localparam int unsigned ACC_W    = 23;   // lane accumulator width
  localparam int unsigned MAX_TAPS = 256;  // weight slots per order
  // |w| below this (0.875 in Q1.10) is clustered, at or above it multiplied
  localparam int unsigned CLUSTER_LIMIT = 896;

  typedef logic signed [X_W-1:0]   sample_t;
  typedef logic signed [D_W-1:0]   term_t;
  typedef logic signed [W_W-1:0]   weight_t;
  typedef logic signed [T_W-1:0]   wterm_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic [MAX_TAPS*W_W-1:0] wvec_t;

  // Cluster code: |w'| = 2^-n (+ 2^-m when pair is set).
  typedef struct packed {
    logic       pair;
    logic [3:0] n;
    logic [3:0] m;
  } cl_code_t;

  // Number of second- and third-order taps for memory length l.
  function automatic int unsigned n2(input int unsigned l);
    return l * (l + 1) / 2;
  endfunction

  function automatic int unsigned n3(input int unsigned l);
    return l * (l + 1) * (l + 2) / 6;
  endfunction

  // Position of pair (i, j), i <= j < l, in a-major order.
  function automatic int unsigned pair_idx(input int unsigned l,
                                           input int unsigned i,
                                           input int unsigned j);
    return i * l - (i * (i - 1)) / 2 + (j - i);
  endfunction

  // Position of triple (a, b, c), a <= b <= c < l, in nested order.
  function automatic int unsigned triple_idx(input int unsigned l,
                                             input int unsigned a,
                                             input int unsigned b,
                                             input int unsigned c);
    int unsigned idx;
    idx = 0;
    for (int unsigned r = 0; r < a; r++) idx += n2(l - r);
    idx += pair_idx(l - a, b - a, c - a);
    return idx;
  endfunction

  function automatic weight_t get_w(input wvec_t v, input int unsigned k);
    return weight_t'(v[k*W_W +: W_W]);
  endfunction

  // Threshold pruning, eq. a = 0 if |a| < thr.
  function automatic weight_t prune(input weight_t w, input int unsigned thr);
    int mag;
    mag = (w < 0) ? -int'(w) : int'(w);
    return (mag < int'(thr)) ? weight_t'(0) : w;
  endfunction

  // True when weight w is replaced by a shift-and-add cluster centre.
  function automatic bit is_clustered(input weight_t w);
    int mag;
    mag = (w < 0) ? -int'(w) : int'(w);
    return (w != 0) && (mag < int'(CLUSTER_LIMIT));
  endfunction

  // Nearest cluster centre to |w| (ties go to the smaller centre). Only
  // meaningful when is_clustered(w).
  function automatic cl_code_t cluster(input weight_t w);
    cl_code_t best;
    int mag, best_err, c, e;
    mag      = (w < 0) ? -int'(w) : int'(w);
    best     = '0;
    best_err = 1 << 20;
    for (int n = 1; n <= 10; n++) begin
      for (int m = n; m <= 10; m++) begin
        c = (m == n) ? (1 << (10 - n)) : ((1 << (10 - n)) + (1 << (10 - m)));
        e = (mag > c) ? mag - c : c - mag;
        if (e < best_err || (e == best_err && c < centre_value(best))) begin
          best_err = e;
          best.pair = (m != n);
          best.n    = 4'(n);
          best.m    = 4'(m);
        end
      end
    end
    return best;
  endfunction

  // Magnitude of a cluster centre in Q1.10 units (0 for the empty code).
  function automatic int centre_value(input cl_code_t k);
    if (k.n == 0) return 0;
    return (1 << (10 - int'(k.n))) + (k.pair ? (1 << (10 - int'(k.m))) : 0);
  endfunction

  // Example weight sets, to be replaced by trained weights. A
  // fixed integer hash keeps about one weight in four (the density of the
  // pruned equalizer); the first-order centre tap is 1.0 so the default
  // equalizer passes the signal through, and that tap also exercises the
  // full multiplier path.
  function automatic wvec_t default_weights(input int unsigned order,
                                            input int unsigned l);
    wvec_t v;
    int unsigned h, ntaps, span, mag;
    v     = '0;
    ntaps = (order == 1) ? l : (order == 2) ? n2(l) : n3(l);
    span  = (order == 1) ? 200 : (order == 2) ? 120 : 60;
    for (int unsigned k = 0; k < ntaps && k < MAX_TAPS; k++) begin
      h = (k + 1) * 32'd2654435761 + order * 32'd40503;
      h = h ^ (h >> 15);
      h = h * 32'd2246822519;
      h = h ^ (h >> 13);
      mag = 1 + (h >> 4) % span;
      if (order == 1 && k == (l - 1) / 2)
        v[k*W_W +: W_W] = W_W'(1024);
      else if (((h >> 24) & 3) == 0)
        v[k*W_W +: W_W] = (((h >> 28) & 1) != 0) ? W_W'(-int'(mag)) : W_W'(mag);
    end
    return v;
  endfunction

endpackage
