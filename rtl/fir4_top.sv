// fir4_top: the four schedules of the 4-tap FIR filter side by side.
//
// Each instance computes Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3 with its own
// trade of time against area:
//   ir1    initiation rate 1, latency 4: 4 multipliers, 3 adders
//   ir2    initiation rate 2, latency 4: 2 multipliers, 2 adders, RA..RG
//   ir2pm  initiation rate 2, latency 6, 2-stage pipelined multipliers:
//          2 multipliers, 2 adders
//   ir6pm  initiation rate = latency = 6, 2-stage pipelined multipliers:
//          2 multipliers, 1 adder
// They share clock and reset only; each has its own coefficient load, sample
// input, accept strobe and output, indexed 0..3 in the order above. See the
// individual modules for the schedules and timing.
module fir4_top
  import fir4_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    coef_load [4],
  input  coef_t   coef_i    [4][NTAPS],
  input  sample_t x_in      [4],
  output logic    x_take    [4],
  output acc_t    y_out     [4],
  output logic    y_valid   [4]
);
  fir4_ir1 u_ir1 (
    .clk, .rst_n, .coef_load(coef_load[0]), .coef_i(coef_i[0]), .x_in(x_in[0]),
    .x_take(x_take[0]), .y_out(y_out[0]), .y_valid(y_valid[0])
  );
  fir4_ir2 u_ir2 (
    .clk, .rst_n, .coef_load(coef_load[1]), .coef_i(coef_i[1]), .x_in(x_in[1]),
    .x_take(x_take[1]), .y_out(y_out[1]), .y_valid(y_valid[1])
  );
  fir4_ir2_pm u_ir2pm (
    .clk, .rst_n, .coef_load(coef_load[2]), .coef_i(coef_i[2]), .x_in(x_in[2]),
    .x_take(x_take[2]), .y_out(y_out[2]), .y_valid(y_valid[2])
  );
  fir4_ir6_pm u_ir6pm (
    .clk, .rst_n, .coef_load(coef_load[3]), .coef_i(coef_i[3]), .x_in(x_in[3]),
    .x_take(x_take[3]), .y_out(y_out[3]), .y_valid(y_valid[3])
  );
endmodule
