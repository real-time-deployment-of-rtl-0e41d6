// vnle_top_checker: stimulus and scoreboard for the whole equalizer.
//
// Drives NBLK blocks of P random 6-bit samples (some blocks at full-scale
// -32, some clocks with in_valid low) into a vnle_top wired to its ports,
// recomputes every output from the sample history with the reference
// Volterra model (samples before the first block are zero), and checks:
//   * every out_y value of every valid output block;
//   * that each output block is presented on the 4th rising edge after its
//     input block is presented (the edge that samples it counts as the 1st)
//     and that out_valid never rises without one;
//   * that each mechanism happened: input gaps (the window holds), pruned,
//     clustered and multiplied taps, full-scale inputs.
// Ends with the TB_RESULT line; has its own watchdog.
module vnle_top_checker
  import vnle_pkg::*;
  import vnle_ref_pkg::*;
#(
  parameter int    P       = 8,
  parameter int    L1      = 9,
  parameter int    L2      = 5,
  parameter int    L3      = 3,
  parameter wvec_t W1      = '0,
  parameter wvec_t W2      = '0,
  parameter wvec_t W3      = '0,
  parameter bit    CLUSTER = 1'b1,
  parameter int    THR     = 0,
  parameter int    NBLK    = 100
) (
  input  logic    clk,
  output logic    rst_n,
  output logic    in_valid,
  output sample_t in_x     [P],
  input  logic    out_valid,
  input  acc_t    out_y    [P]
);

  localparam int M1 = (L1 - 1) / 2;
  localparam int N2 = L2 * (L2 + 1) / 2, N3 = L3 * (L3 + 1) * (L3 + 2) / 6;
  localparam int LATENCY = 4;

  int samples [$];      // every valid input sample, in order
  int sent_cycle [$];   // clock index of each valid input block
  int cycle = 0, out_blocks = 0;
  int checks = 0, failures = 0;
  int gaps = 0, fullscale = 0;

  initial begin
    #(10 * (3 * NBLK + 100) * 1ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard: sampled on the falling edge, after the outputs settle
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int win[];
      int c;
      longint exp;
      win = new[L1];
      checks++;
      if (sent_cycle.size() == 0 || cycle - sent_cycle[0] != LATENCY) begin
        failures++;
        $display("FAIL output block %0d at wrong clock", out_blocks);
      end
      if (sent_cycle.size() != 0) void'(sent_cycle.pop_front());
      for (int p = 0; p < P; p++) begin
        c = out_blocks * P + p - M1;
        for (int t = 0; t < L1; t++)
          win[t] = (c - M1 + t < 0) ? 0 : samples[c - M1 + t];
        exp = ref_y(win, L1, L2, L3, W1, W2, W3, CLUSTER, THR);
        checks++;
        if (longint'(out_y[p]) != exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d lane %0d: got %0d expected %0d",
                     out_blocks, p, out_y[p], exp);
        end
      end
      out_blocks++;
    end
  end

  initial begin
    int sent;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    foreach (in_x[k]) in_x[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sent  = 0;
    while (sent < NBLK) begin
      @(negedge clk);
      in_valid = (sent < 2) || ($urandom % 5 != 0);
      if (!in_valid) begin
        gaps++;
        foreach (in_x[k]) in_x[k] = sample_t'($urandom);  // must be ignored
      end else begin
        if (sent % 17 == 5) fullscale++;
        for (int k = 0; k < P; k++) begin
          in_x[k] = (sent % 17 == 5) ? sample_t'(-32) : sample_t'($urandom);
          samples.push_back(int'(in_x[k]));
        end
        sent_cycle.push_back(cycle);  // sampled by the next rising edge
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 3) @(negedge clk);
    checks++;
    if (out_blocks != NBLK) begin
      failures++;
      $display("FAIL %0d output blocks for %0d input blocks", out_blocks, NBLK);
    end
    begin
      int np, nc, nm;
      np = count_kind(W1, L1, 0, THR) + count_kind(W2, N2, 0, THR) + count_kind(W3, N3, 0, THR);
      nc = count_kind(W1, L1, 1, THR) + count_kind(W2, N2, 1, THR) + count_kind(W3, N3, 1, THR);
      nm = count_kind(W1, L1, 2, THR) + count_kind(W2, N2, 2, THR) + count_kind(W3, N3, 2, THR);
      $display("blocks=%0d gaps=%0d fullscale_blocks=%0d pruned_taps=%0d clustered_taps=%0d multiplied_taps=%0d",
               out_blocks, gaps, fullscale, np, CLUSTER ? nc : 0, CLUSTER ? nm : nm + nc);
      checks += 4;
      if (gaps == 0) failures++;
      if (fullscale == 0) failures++;
      if (np == 0) failures++;
      if (nm == 0) failures++;
      if (CLUSTER) begin
        checks++;
        if (nc == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
