// sample_window: the delay line of the parallel equalizer.
//
// Each valid clock brings a block of P new samples (in_x[0] oldest). The
// module keeps the HIST samples that came before the block and presents, one
// clock later, a window of P+HIST consecutive samples, win[0] oldest and
// win[P+HIST-1] newest; out_valid marks a clock with a fresh window. When
// in_valid is low the window holds and out_valid is low. HIST = L1-1 gives
// every one of the P lanes its full first-order span. This is the chain of
// unit delays T of the serial equalizer, unrolled for P samples per clock;
// the register arrangement is this design's. Reset clears the history to
// zero samples.
module sample_window
  import vnle_pkg::*;
#(
  parameter int unsigned P    = 64,
  parameter int unsigned HIST = 120
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_x      [P],
  output logic    out_valid,
  output sample_t win       [P+HIST]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < P + HIST; k++) win[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < HIST; k++) win[k] <= win[k+P];
        for (int k = 0; k < P; k++) win[HIST+k] <= in_x[k];
      end
    end
  end

endmodule
