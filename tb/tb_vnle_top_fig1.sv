// tb_vnle_top_fig1: the small example equalizer with memory lengths
// [L1, L2, L3] = [3, 3, 1] (a pure cube term for the third order), P = 4
// lanes, clustering on; stimulus and checks are in vnle_top_checker.
module tb_vnle_top_fig1;
  import vnle_pkg::*;
  import vnle_ref_pkg::*;

  localparam int P = 4, L1 = 3, L2 = 3, L3 = 1;
  localparam wvec_t TW1 = test_weights(41, L1);
  localparam wvec_t TW2 = test_weights(42, L2 * (L2 + 1) / 2);
  localparam wvec_t TW3 = test_weights(43, L3 * (L3 + 1) * (L3 + 2) / 6);

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
             .CLUSTER(1'b1), .THR(0)) dut (.*);

  vnle_top_checker #(.P(P), .L1(L1), .L2(L2), .L3(L3), .W1(TW1), .W2(TW2),
                     .W3(TW3), .CLUSTER(1'b1), .THR(0), .NBLK(300)) chk (.*);
endmodule
