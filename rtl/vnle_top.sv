// vnle_top: P-parallel third-order Volterra nonlinear equalizer (VNLE) for a
// PAM4 direct-detection receiver, with pruned and clustered weights.
//
// Each clock brings P consecutive signed 6-bit samples at one sample per
// symbol (P = 64 at 234.375 MHz is 15 GBd, a 30 Gb/s PAM4 line rate) and,
// four clocks later, yields the P equalized outputs
//   y[i] = sum_j1 a1 x[i-j1] + sum a2 x x + sum a3 x x x
// with memory lengths L1, L2, L3 (121, 15, 5 by default) centred on x[i].
//
// Structure:
//   sample_window  keeps L1-1 samples of history and presents a window of
//                  P+L1-1 samples (1 clock);
//   prod2_mux      forms each distinct second-order product of the central
//                  P+L2-1 samples once for all lanes (1 clock);
//   prod3_mux      likewise for third-order products of the central
//                  P+L3-1 samples (1 clock);
//   x1 register    delays the first-order window to line up with products;
//   vnle_lane x P  applies the weights and sums (2 clocks).
// Lane p of the window latched from input block n produces y for sample
// n*P + p - (L1-1)/2: the equalizer delays the stream by (L1-1)/2 samples
// plus the 4-clock pipeline.
//
// The weights W1, W2, W3 are constants (vnle_pkg numbering); zero weights
// are pruned and build nothing, CLUSTER turns weights inside (-0.875, 0.875)
// into shift-and-add, THR prunes every weight below it in magnitude. The
// defaults are an example set with the density of the pruned equalizer (see
// vnle_pkg::default_weights); trained weights replace them.
// in_valid may drop at any clock; out_valid marks the output blocks that
// come from valid input blocks. Sharing products across lanes, pruning,
// clustering and the sizes P, L1, L2, L3 and the 12-bit weights follow the
// published design; the pipeline, the formats and the interface are this
// design's.
module vnle_top
  import vnle_pkg::*;
#(
  parameter int unsigned P       = 64,
  parameter int unsigned L1      = 121,
  parameter int unsigned L2      = 15,
  parameter int unsigned L3      = 5,
  parameter wvec_t       W1      = default_weights(1, 121),
  parameter wvec_t       W2      = default_weights(2, 15),
  parameter wvec_t       W3      = default_weights(3, 5),
  parameter bit          CLUSTER = 1'b1,
  parameter int unsigned THR     = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_x      [P],
  output logic    out_valid,
  output acc_t    out_y     [P]
);

  localparam int unsigned NWIN = P + L1 - 1;
  localparam int unsigned N2   = n2(L2);
  localparam int unsigned N3   = n3(L3);
  localparam int unsigned O2   = (L1 - L2) / 2;  // window offset of 2nd order
  localparam int unsigned O3   = (L1 - L3) / 2;  // window offset of 3rd order

  if (L1 % 2 != 1 || L2 % 2 != 1 || L3 % 2 != 1 || L2 > L1 || L3 > L1 ||
      L1 > MAX_TAPS || N2 > MAX_TAPS || N3 > MAX_TAPS) begin : g_bad_size
    $error("vnle_top: memory lengths must be odd, L2, L3 <= L1, and fit MAX_TAPS");
  end

  // ---------------------------------------------------------------- window
  logic    win_valid;
  sample_t win [NWIN];

  sample_window #(.P(P), .HIST(L1 - 1)) u_window (
    .clk, .rst_n, .in_valid,
    .in_x,
    .out_valid (win_valid),
    .win
  );

  // ------------------------------------------------------ shared products
  sample_t x2 [P+L2-1];
  sample_t x3 [P+L3-1];
  always_comb begin
    for (int k = 0; k < int'(P + L2 - 1); k++) x2[k] = win[O2+k];
    for (int k = 0; k < int'(P + L3 - 1); k++) x3[k] = win[O3+k];
  end

  logic  prod_valid, prod3_valid;
  term_t prod2 [P+L2-1][L2];
  term_t prod3 [P+L3-1][L3*(L3+1)/2];

  prod2_mux #(.P(P), .L(L2)) u_prod2 (
    .clk, .rst_n,
    .in_valid  (win_valid),
    .x         (x2),
    .out_valid (prod_valid),
    .prod      (prod2)
  );

  prod3_mux #(.P(P), .L(L3)) u_prod3 (
    .clk, .rst_n,
    .in_valid  (win_valid),
    .x         (x3),
    .out_valid (prod3_valid),
    .prod      (prod3)
  );

  // first-order window, delayed to line up with the products
  sample_t x1 [NWIN];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < int'(NWIN); k++) x1[k] <= '0;
    else        x1 <= win;
  end

  // ----------------------------------------------------------------- lanes
  for (genvar p = 0; p < P; p++) begin : g_lane
    sample_t lx  [L1];
    term_t   lp2 [N2];
    term_t   lp3 [N3];

    for (genvar t = 0; t < L1; t++) begin : g_x
      assign lx[t] = x1[p+t];
    end
    for (genvar a = 0; a < L2; a++) begin : g_a2
      for (genvar b = a; b < L2; b++) begin : g_b2
        assign lp2[pair_idx(L2, a, b)] = prod2[p+a][b-a];
      end
    end
    for (genvar a = 0; a < L3; a++) begin : g_a3
      for (genvar b = a; b < L3; b++) begin : g_b3
        for (genvar c = b; c < L3; c++) begin : g_c3
          assign lp3[triple_idx(L3, a, b, c)] = prod3[p+a][pair_idx(L3, b-a, c-a)];
        end
      end
    end

    vnle_lane #(
      .L1(L1), .L2(L2), .L3(L3), .W1(W1), .W2(W2), .W3(W3),
      .CLUSTER(CLUSTER), .THR(THR)
    ) u_lane (
      .clk, .rst_n,
      .x  (lx),
      .p2 (lp2),
      .p3 (lp3),
      .y  (out_y[p])
    );
  end

  // ------------------------------------------------------------ valid pipe
  logic [1:0] lane_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lane_valid <= '0;
    else        lane_valid <= {lane_valid[0], prod_valid};
  end
  assign out_valid = lane_valid[1];

  // Both product banks run in lockstep.
  // Both are cleared by reset, so the rule also holds during reset.
  a_banks_in_step: assert property (@(posedge clk) prod_valid == prod3_valid)
    else $error("vnle_top: product banks out of step");

endmodule
