// prod2_mux: shared second-order products of a P-lane parallel equalizer.
//
// A serial second-order Volterra kernel of memory L needs L(L+1)/2 products
// x[a]*x[b] per output. Lanes p and p+1 of a parallel equalizer share most of
// them, so this bank forms each distinct product once: column k (k = 0 ..
// P+L-2) holds x[k]*x[k+dd] for dd = 0 .. L-1, and lane p takes its pair
// (a, b) from column p+a, offset b-a. Slots with k+dd past the window are
// never used and are tied to zero. That is (P+L-1)*L products per clock
// instead of P*L(L+1)/2 (1065 live products against 7680 for P = 64,
// L = 15).
//
// x is the window slice of P+L-1 signed 6-bit samples (x[0] oldest). A 6x6
// product is exactly a Q1.10 term. The products are registered: prod and
// out_valid appear one clock after x and in_valid. The sharing scheme follows
// the published design; the register stage is this design's.
module prod2_mux
  import vnle_pkg::*;
#(
  parameter int unsigned P = 64,
  parameter int unsigned L = 15
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x         [P+L-1],
  output logic    out_valid,
  output term_t   prod      [P+L-1][L]
);

  localparam int unsigned NCOL = P + L - 1;

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    for (genvar dd = 0; dd < L; dd++) begin : g_dd
      if (k + dd < NCOL) begin : g_live
        term_t sq;
        assign sq = x[k] * x[k+dd];
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) prod[k][dd] <= '0;
          else        prod[k][dd] <= sq;
        end
      end else begin : g_dead
        assign prod[k][dd] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
