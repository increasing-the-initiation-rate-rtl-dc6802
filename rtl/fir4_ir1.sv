// fir4_ir1: 4-tap FIR filter, initiation rate 1, latency 4.
//
// Same filter as fir4_ir2 (Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3), but a new sample
// is accepted every clock. Each sample follows the same four-clock schedule:
//
//   clock 1 : input X;  N4 = X@2*a2, N5 = X@3*a3
//   clock 2 : N2 = X*a0, N3 = X@1*a1, N7 = N4 + N5
//   clock 3 : N6 = N3 + N7
//   clock 4 : N8 = N2 + N6 = Y
//
// With four samples in flight, every clock holds one step of each sample, so the
// design needs four multipliers and three adders, all busy every clock.
// The schedule and these unit counts follow the initiation-rate-1 schedule of the
// filter; the registers between the steps are this design's own allocation, since
// the register count for this case is left open:
//   d1, d2, d3  sample history (X@1, X@2, X@3 of the sample entering next)
//   p4, p5      N4, N5 after clock 1
//   p2, p3, s7  N2, N3, N7 after clock 2
//   q2, s6      N2 carried on, N6 after clock 3
// The history shifts every clock, so in clock 2 of a sample d1 holds its X and
// d2 its X@1, which is what N2 and N3 read.
//
// Interface and timing: x_take is high every clock after reset; x_in is read at
// each clock edge. y_out is combinational (the N8 adder) and meaningful while
// y_valid is high, three clocks after the sample's x_take (4th clock). Reset
// (asynchronous, active low) clears the history and every stage register; the
// coefficient load port and widths are this design's own choices.
module fir4_ir1
  import fir4_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    coef_load,
  input  coef_t   coef_i [NTAPS],
  input  sample_t x_in,
  output logic    x_take,
  output acc_t    y_out,
  output logic    y_valid
);
  localparam int II  = 1;
  localparam int LAT = 4;

  coef_t coef [NTAPS];
  logic step;   // always 0: a one-step schedule

  coef_regs u_coef (
    .clk, .rst_n, .load(coef_load), .coef_i, .coef_o(coef)
  );

  sched_ctrl #(.II(II), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .step, .take(x_take), .out_valid(y_valid)
  );

  sample_t d1, d2, d3;
  prod_t   m2, m3, m4, m5;        // outputs of the four multipliers
  acc_t    p4, p5, p2, p3, s7, q2, s6;

  // Multipliers A..D, one per product.
  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(0)) u_multA (.clk, .a(d2), .b(coef[2]), .p(m4));
  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(0)) u_multB (.clk, .a(d3), .b(coef[3]), .p(m5));
  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(0)) u_multC (.clk, .a(d1), .b(coef[0]), .p(m2));
  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(0)) u_multD (.clk, .a(d2), .b(coef[1]), .p(m3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      p4 <= '0; p5 <= '0; p2 <= '0; p3 <= '0; s7 <= '0; q2 <= '0; s6 <= '0;
    end else begin
      // clock 1 of the entering sample
      d1 <= x_in; d2 <= d1; d3 <= d2;
      p4 <= ext(m4);
      p5 <= ext(m5);
      // clock 2 of the previous sample
      p2 <= ext(m2);
      p3 <= ext(m3);
      s7 <= p4 + p5;            // adder A: N7
      // clock 3
      s6 <= p3 + s7;            // adder B: N6
      q2 <= p2;
    end
  end

  // clock 4: adder C, N8
  assign y_out = q2 + s6;

  // A one-step schedule: every clock is step 0 and takes a sample.
  one_step_a : assert property (@(posedge clk) disable iff (!rst_n) step == 1'b0 && x_take);

endmodule
