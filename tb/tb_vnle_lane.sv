// tb_vnle_lane: one lane with small kernels (L1 = 7, L2 = 5, L3 = 3), a
// weight mix of pruned, clustered and multiplied taps and a pruning
// threshold. Random windows are applied every clock, with the products the
// shared banks would supply; y is checked against the reference Volterra
// sum exactly two clocks later.
module tb_vnle_lane;
  import vnle_pkg::*;
  import vnle_ref_pkg::*;

  localparam int L1 = 7, L2 = 5, L3 = 3;
  localparam int N2 = L2 * (L2 + 1) / 2, N3 = L3 * (L3 + 1) * (L3 + 2) / 6;
  localparam int THR = 40;
  localparam wvec_t TW1 = test_weights(11, L1);
  localparam wvec_t TW2 = test_weights(12, N2);
  localparam wvec_t TW3 = test_weights(13, N3);

  logic    clk = 0, rst_n = 0;
  sample_t x  [L1];
  term_t   p2 [N2];
  term_t   p3 [N3];
  acc_t    y;
  longint  expq [$];
  int checks = 0, failures = 0;

  vnle_lane #(.L1(L1), .L2(L2), .L3(L3), .W1(TW1), .W2(TW2), .W3(TW3),
              .CLUSTER(1'b1), .THR(THR)) dut (.*);

  always #5ns clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[];
    int k, o;
    xs = new[L1];
    foreach (x[i]) x[i] = '0;
    foreach (p2[i]) p2[i] = '0;
    foreach (p3[i]) p3[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      if (expq.size() == 2) begin
        checks++;
        if (longint'(y) != expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL it=%0d got %0d exp %0d", it, y, expq[0]);
        end
        void'(expq.pop_front());
      end
      for (int t = 0; t < L1; t++) begin
        xs[t] = (it % 100 < 3) ? -32 : int'($signed(6'($urandom)));
        x[t]  = sample_t'(xs[t]);
      end
      k = 0;
      o = (L1 - L2) / 2;
      for (int a = 0; a < L2; a++)
        for (int b = a; b < L2; b++) p2[k++] = term_t'(xs[o+a] * xs[o+b]);
      k = 0;
      o = (L1 - L3) / 2;
      for (int a = 0; a < L3; a++)
        for (int b = a; b < L3; b++)
          for (int c = b; c < L3; c++)
            p3[k++] = term_t'((xs[o+a] * xs[o+b] * xs[o+c]) >>> 5);
      expq.push_back(ref_y(xs, L1, L2, L3, TW1, TW2, TW3, 1'b1, THR));
    end
    $display("pruned=%0d clustered=%0d multiplied=%0d",
             count_kind(TW1, L1, 0, THR) + count_kind(TW2, N2, 0, THR) + count_kind(TW3, N3, 0, THR),
             count_kind(TW1, L1, 1, THR) + count_kind(TW2, N2, 1, THR) + count_kind(TW3, N3, 1, THR),
             count_kind(TW1, L1, 2, THR) + count_kind(TW2, N2, 2, THR) + count_kind(TW3, N3, 2, THR));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
