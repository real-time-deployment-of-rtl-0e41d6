// vnle_lane: one output channel of the parallel equalizer (one y per clock).
//
// Evaluates the third-order Volterra sum for one output sample:
//   y = sum_t a1[t] x[t] + sum_{a<=b} a2[a,b] x[a]x[b]
//     + sum_{a<=b<=c} a3[a,b,c] x[a]x[b]x[c]
// The lane is given its first-order window x (L1 samples, x[0] oldest,
// centre x[(L1-1)/2] is the sample being equalized) and the second- and
// third-order products it needs, already formed by the shared product banks
// and numbered as in vnle_pkg. Every tap is a tap_weight instance with a
// constant weight: pruned taps (zero weight, or |w| < THR) build nothing,
// clustered taps are shift-and-add, the rest are multipliers.
//
// Timing: two register stages. The per-order partial sums are registered,
// then their total; y follows its inputs by two clocks. The accumulator is
// ACC_W bits with 10 fraction bits and cannot overflow for any input
// (276 terms of at most 2^12 in magnitude in Q3.10 need 23 bits). The
// equation, pruning and clustering follow the published design; the
// two-stage adder split and the formats are this design's.
module vnle_lane
  import vnle_pkg::*;
#(
  parameter int unsigned L1      = 121,
  parameter int unsigned L2      = 15,
  parameter int unsigned L3      = 5,
  parameter wvec_t       W1      = default_weights(1, 121),
  parameter wvec_t       W2      = default_weights(2, 15),
  parameter wvec_t       W3      = default_weights(3, 5),
  parameter bit          CLUSTER = 1'b1,
  parameter int unsigned THR     = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  sample_t x  [L1],
  input  term_t   p2 [vnle_pkg::n2(L2)],
  input  term_t   p3 [vnle_pkg::n3(L3)],
  output acc_t    y
);

  localparam int unsigned N2 = n2(L2);
  localparam int unsigned N3 = n3(L3);

  wterm_t t1 [L1];
  wterm_t t2 [N2];
  wterm_t t3 [N3];

  for (genvar t = 0; t < L1; t++) begin : g_o1
    term_t d;
    assign d = term_t'(x[t]) <<< (FRAC - (X_W - 1));
    tap_weight #(.W(prune(get_w(W1, t), THR)), .CLUSTER(CLUSTER)) u_tap (.d(d), .t(t1[t]));
  end

  for (genvar k = 0; k < N2; k++) begin : g_o2
    tap_weight #(.W(prune(get_w(W2, k), THR)), .CLUSTER(CLUSTER)) u_tap (.d(p2[k]), .t(t2[k]));
  end

  for (genvar k = 0; k < N3; k++) begin : g_o3
    tap_weight #(.W(prune(get_w(W3, k), THR)), .CLUSTER(CLUSTER)) u_tap (.d(p3[k]), .t(t3[k]));
  end

  acc_t s1, s2, s3;
  acc_t s1_q, s2_q, s3_q;

  always_comb begin
    s1 = '0;
    s2 = '0;
    s3 = '0;
    for (int k = 0; k < int'(L1); k++) s1 += acc_t'(t1[k]);
    for (int k = 0; k < int'(N2); k++) s2 += acc_t'(t2[k]);
    for (int k = 0; k < int'(N3); k++) s3 += acc_t'(t3[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      y    <= '0;
    end else begin
      s1_q <= s1;
      s2_q <= s2;
      s3_q <= s3;
      y    <= s1_q + s2_q + s3_q;
    end
  end

endmodule
