// prod3_mux: shared third-order products of a P-lane parallel equalizer.
//
// The third-order kernel of memory L uses the products x[a]*x[b]*x[c],
// a <= b <= c. As in the second-order bank, each distinct product is formed
// once for all lanes: column k (k = 0 .. P+L-2) holds x[k]*x[k+d1]*x[k+d2]
// for every 0 <= d1 <= d2 < L, slot pair_idx(L, d1, d2). Lane p takes triple
// (a, b, c) from column p+a, slot pair_idx(L, b-a, c-a). Slots that reach
// past the window are never used and are tied to zero.
//
// x is the window slice of P+L-1 signed 6-bit samples (x[0] oldest). The
// 18-bit cube has 15 fraction bits; an arithmetic right shift by 5 makes it
// a Q1.10 term (all cubes of 6-bit codes fit). Registered: prod and
// out_valid appear one clock after x and in_valid. Sharing the products
// across lanes follows the published design; the arrangement of columns
// and slots, the rounding and the register stage are this design's.
module prod3_mux
  import vnle_pkg::*;
#(
  parameter int unsigned P = 64,
  parameter int unsigned L = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x         [P+L-1],
  output logic    out_valid,
  output term_t   prod      [P+L-1][L*(L+1)/2]
);

  localparam int unsigned NCOL = P + L - 1;

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    for (genvar d1 = 0; d1 < L; d1++) begin : g_d1
      for (genvar d2 = d1; d2 < L; d2++) begin : g_d2
        localparam int unsigned S = pair_idx(L, d1, d2);
        if (k + d2 < NCOL) begin : g_live
          logic signed [3*X_W-1:0] cube;
          assign cube = x[k] * x[k+d1] * x[k+d2];
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n) prod[k][S] <= '0;
            else        prod[k][S] <= term_t'(cube >>> (3 * (X_W - 1) - FRAC));
          end
        end else begin : g_dead
          assign prod[k][S] = '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
