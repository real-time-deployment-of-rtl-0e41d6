// tb_vnle_top_full: the equalizer at its default size (64 lanes, memory
// lengths 121/15/5, default weights, clustering on) run end to end over
// 40 input blocks (2560 symbols) with gaps; stimulus and checks are in
// vnle_top_checker.
module tb_vnle_top_full;
  import vnle_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n, in_valid, out_valid;
  sample_t in_x  [64];
  acc_t    out_y [64];

  always #5ns clk = ~clk;

  vnle_top dut (.*);

  vnle_top_checker #(.P(64), .L1(121), .L2(15), .L3(5),
                     .W1(default_weights(1, 121)), .W2(default_weights(2, 15)),
                     .W3(default_weights(3, 5)), .CLUSTER(1'b1), .THR(0),
                     .NBLK(40)) chk (.*);
endmodule
