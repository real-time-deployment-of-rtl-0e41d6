// tb_tap_weight: checks every form of the tap (pruned, clustered with one
// and two shifts, rounding ties, both clustering-range edges, multiplied,
// clustering disabled) against the reference model for random and extreme
// 12-bit terms. Combinational block: each check samples after a settle delay.
module tb_tap_weight;
  import vnle_pkg::*;
  import vnle_ref_pkg::*;

  localparam int NW = 18;
  localparam int WL [NW] = '{0, 775, -775, 1, -1, 7, 14, 895, -895, 896, -896,
                             1024, 2047, -2048, 513, 100, 775, -300};
  localparam bit CL [NW] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1,
                             1, 1, 1, 1, 1, 0, 0};

  term_t  d;
  wterm_t t [NW];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NW; g++) begin : g_tap
    tap_weight #(.W(weight_t'(WL[g])), .CLUSTER(CL[g])) dut (.d(d), .t(t[g]));
  end

  task automatic check_all();
    longint exp;
    #1;
    for (int g = 0; g < NW; g++) begin
      exp = ref_wterm(int'(d), WL[g], CL[g], 0);
      checks++;
      if (longint'(t[g]) != exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL w=%0d cl=%0d d=%0d: got %0d expected %0d",
                   WL[g], CL[g], d, t[g], exp);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = term_t'(-2048); check_all();
    d = term_t'(2047);  check_all();
    d = term_t'(0);     check_all();
    d = term_t'(-1);    check_all();
    d = term_t'(1024);  check_all();
    for (int i = 0; i < 2000; i++) begin
      d = term_t'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
