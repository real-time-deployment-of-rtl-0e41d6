// tb_vnle_top_fullprec: the full-precision configuration (clustering off,
// dense weights: about 70% nonzero, 20% of them beyond +-0.875) at the
// default memory lengths 121/15/5, with P = 8 lanes to keep the build short.
// Every tap is a multiplier; stimulus and checks are in vnle_top_checker.
module tb_vnle_top_fullprec;
  import vnle_pkg::*;
  import vnle_ref_pkg::*;

  localparam int P = 8, L1 = 121, L2 = 15, L3 = 5;
  localparam wvec_t TW1 = test_weights(31, L1);
  localparam wvec_t TW2 = test_weights(32, L2 * (L2 + 1) / 2);
  localparam wvec_t TW3 = test_weights(33, L3 * (L3 + 1) * (L3 + 2) / 6);

  logic    clk = 1'b0;
  logic    rst_n, in_valid, out_valid;
  sample_t in_x  [P];
  acc_t    out_y [P];

  always #5ns clk = ~clk;

  // backstop, well past the checker's own watchdog
  initial begin
    #1ms;
    $display("backstop watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  vnle_top #(.P(P), .L1(L1), .L2(L2), .L3(L3), .W1(TW1), .W2(TW2), .W3(TW3),
             .CLUSTER(1'b0), .THR(0)) dut (.*);

  vnle_top_checker #(.P(P), .L1(L1), .L2(L2), .L3(L3), .W1(TW1), .W2(TW2),
                     .W3(TW3), .CLUSTER(1'b0), .THR(0), .NBLK(120)) chk (.*);
endmodule
