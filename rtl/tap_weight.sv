// tap_weight: one Volterra tap, a fixed weight applied to one Q1.10 term.
//
// The weight W is an elaboration-time constant, so the tap is built in one
// of three forms:
//   * W == 0: a pruned tap. It contributes zero and builds no logic.
//   * CLUSTER set and |W| < 0.875: the weight is rounded to the nearest
//     cluster centre 2^-n + 2^-m (or 2^-n), and the product becomes two
//     arithmetic right shifts of the term and one add (a subtract for a
//     negative weight). No multiplier is built.
//   * otherwise: a 12x12 signed multiplier; the 24-bit product keeps 10
//     fraction bits (arithmetic right shift by 10).
// Output t is the weighted term, signed with 10 fraction bits, T_W bits.
// Purely combinational. Pruning, the clustering centres, the (-0.875, 0.875)
// clustering range and the shift-and-add form follow the published design;
// the truncating shifts and the tie rule of the rounding are this design's.
// A pruned tap leaves its input d unread on purpose; lint reports it as an
// unused signal.
module tap_weight
  import vnle_pkg::*;
#(
  parameter weight_t W       = weight_t'(775),
  parameter bit      CLUSTER = 1'b1
) (
  input  term_t  d,
  output wterm_t t
);

  localparam cl_code_t CODE = cluster(W);

  if (W == 0) begin : g_pruned
    assign t = '0;
  end else if (CLUSTER && is_clustered(W)) begin : g_cluster
    wterm_t de, sh_n, sh_m, sum;
    assign de   = wterm_t'(d);
    assign sh_n = de >>> CODE.n;
    assign sh_m = CODE.pair ? (de >>> CODE.m) : wterm_t'(0);
    assign sum  = sh_n + sh_m;
    assign t    = (W < 0) ? -sum : sum;
  end else begin : g_mult
    logic signed [D_W+W_W-1:0] prod;
    assign prod = d * W;
    assign t    = wterm_t'(prod >>> FRAC);
  end

endmodule
