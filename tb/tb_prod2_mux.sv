// tb_prod2_mux: drives random windows (P = 4, L = 3) and checks, one clock
// later, every live product x[k]*x[k+dd] and every unused slot (zero), and
// that out_valid follows in_valid by one clock.
module tb_prod2_mux;
  import vnle_pkg::*;

  localparam int P = 4, L = 3, N = P + L - 1;

  logic    clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t x    [N];
  term_t   prod [N][L];
  int      xs [N];
  logic    v_prev;
  int checks = 0, failures = 0;

  prod2_mux #(.P(P), .L(L)) dut (.*);

  always #5ns clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (x[k]) x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        xs[k] = (it % 50 == 0) ? -32 : int'($signed(6'($urandom)));
        x[k]  = sample_t'(xs[k]);
      end
      in_valid = $urandom % 2;
      v_prev   = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid !== v_prev) failures++;
      for (int k = 0; k < N; k++)
        for (int dd = 0; dd < L; dd++) begin
          checks++;
          if (int'(prod[k][dd]) != ((k + dd < N) ? xs[k] * xs[k+dd] : 0)) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d dd=%0d got %0d", k, dd, prod[k][dd]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
