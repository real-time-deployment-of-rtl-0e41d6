// tb_sample_window: streams random blocks with random gaps into a small
// window (P = 4, HIST = 6) and checks, one clock after each valid block,
// that the window holds the last P+HIST samples in order; checks that
// out_valid follows in_valid by exactly one clock and that the window
// holds during gaps.
module tb_sample_window;
  import vnle_pkg::*;

  localparam int P = 4, HIST = 6;

  logic    clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_x [P];
  sample_t win  [P+HIST];
  int      stream[$];
  int checks = 0, failures = 0, gaps = 0;
  logic    prev_valid;

  sample_window #(.P(P), .HIST(HIST)) dut (.*);

  always #5ns clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < P + HIST; k++) stream.push_back(0);  // reset state
    prev_valid = 1'b0;
    foreach (in_x[k]) in_x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 300; blk++) begin
      @(negedge clk);
      // check the result of the previous clock
      checks++;
      if (out_valid !== prev_valid) failures++;
      for (int k = 0; k < P + HIST; k++) begin
        checks++;
        if (int'(win[k]) != stream[stream.size() - (P + HIST) + k]) failures++;
      end
      in_valid = ($urandom % 4) != 0;
      if (!in_valid) gaps++;
      for (int k = 0; k < P; k++) in_x[k] = sample_t'($urandom);
      if (in_valid) for (int k = 0; k < P; k++) stream.push_back(int'(in_x[k]));
      prev_valid = in_valid;
    end
    if (gaps == 0) failures++;
    $display("gaps=%0d", gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
