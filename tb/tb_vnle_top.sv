// tb_vnle_top: end-to-end test of the equalizer at reduced size (P = 8
// lanes, memory lengths 9/5/3) with a weight set that holds pruned,
// clustered and multiplied taps and a pruning threshold; stimulus and
// checks are in vnle_top_checker.
module tb_vnle_top;
  import vnle_pkg::*;
  import vnle_ref_pkg::*;

  localparam int P = 8, L1 = 9, L2 = 5, L3 = 3, THR = 30;
  localparam wvec_t TW1 = test_weights(21, L1);
  localparam wvec_t TW2 = test_weights(22, L2 * (L2 + 1) / 2);
  localparam wvec_t TW3 = test_weights(23, L3 * (L3 + 1) * (L3 + 2) / 6);

  logic    clk = 1'b0;
  logic    rst_n, in_valid, out_valid;
  sample_t in_x  [P];
  acc_t    out_y [P];

  always #5ns clk = ~clk;

  vnle_top #(.P(P), .L1(L1), .L2(L2), .L3(L3), .W1(TW1), .W2(TW2), .W3(TW3),
             .CLUSTER(1'b1), .THR(THR)) dut (.*);

  vnle_top_checker #(.P(P), .L1(L1), .L2(L2), .L3(L3), .W1(TW1), .W2(TW2),
                     .W3(TW3), .CLUSTER(1'b1), .THR(THR), .NBLK(300)) chk (.*);
endmodule
