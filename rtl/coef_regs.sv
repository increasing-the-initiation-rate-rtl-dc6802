// coef_regs: the coefficient registers a0..a3 of the FIR filter.
//
// The flowgraph feeds a constant coefficient into every multiplier; here each
// coefficient lives in a register of its own, loaded from coef_i on a clock edge
// where load is high, and held otherwise. The four registers are the "4" by which
// the register counts of the schedules exceed their working registers (for the
// initiation-rate-2 schedule: RA..RG plus a0..a3 gives 11).
// How the coefficients are loaded (all four at once, one strobe) and that reset
// clears them to zero are this design's own choices.
module coef_regs
  import fir4_pkg::*;
#(
  parameter int N = NTAPS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  coef_t coef_i [N],
  output coef_t coef_o [N]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) coef_o[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < N; k++) coef_o[k] <= coef_i[k];
    end
  end
endmodule
