// fir4_ir2: 4-tap FIR filter, initiation rate 2, latency 4.
//
// Computes Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3 with the products
// N2 = X*a0, N3 = X@1*a1, N4 = X@2*a2, N5 = X@3*a3 and the sums N7 = N4+N5,
// N6 = N3+N7, N8 = N2+N6 = Y. A new sample is accepted every 2 clocks while each
// sample takes 4 clocks, so two samples are in flight at any time. The schedule
// repeats every two clocks, steps I and I+1, on two multipliers (MultA, MultB),
// two adders (AddA, AddB) and seven working registers RA..RG.
//
// Register contents at the start of step I, while sample J enters and sample J-1
// is finishing: RA = J:X@3, RB = J:X@2, RC = J:X@1, RD = (J-1):N2,
// RE = (J-1):N3, RF = (J-1):N7.
//
//   step I   : RF <= RE + RF      N6 of J-1  (AddA)
//              RE <= X            input sample of J
//              RG <= RB * a2      N4 of J    (MultB)
//              RA <= RA * a3      N5 of J    (MultA)
//   step I+1 : Y   = RD + RF      N8 of J-1  (AddA, straight to the output)
//              RD <= RE * a0      N2 of J    (MultA)
//              RE <= RC * a1      N3 of J    (MultB)
//              RC <= RE           J+1:X@1 = J:X
//              RF <= RG + RA      N7 of J    (AddB)
//              RA <= RB           J+1:X@3 = J:X@2
//              RB <= RC           J+1:X@2 = J:X@1
//
// This register allocation and schedule are the design as worked out for this
// filter; the assignment of products to MultA/MultB is not fixed by it and is
// this design's choice. Also this design's own: word widths (fir4_pkg), the
// coefficient load port, an active-low asynchronous reset that clears the sample
// history (so the first outputs see zero past samples), and the output timing.
//
// Interface and timing: x_take is high in step I; x_in is read at that clock edge.
// y_out is combinational (AddA's output) and is meaningful when y_valid is high,
// in step I+1 three clocks after the sample's x_take: the result is out in the
// 4th clock of the computation. coef_load copies coef_i into a0..a3 at a clock
// edge; change coefficients only while no sample is in flight.
module fir4_ir2
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
  localparam int II  = 2;
  localparam int LAT = 4;
  localparam int MULT_STAGES = 0;   // unpipelined multipliers in this schedule

  coef_t coef [NTAPS];
  logic  step;           // 0: step I, 1: step I+1

  coef_regs u_coef (
    .clk, .rst_n, .load(coef_load), .coef_i, .coef_o(coef)
  );

  sched_ctrl #(.II(II), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .step, .take(x_take), .out_valid(y_valid)
  );

  // Working registers. RA holds a sample (X@3) in step I and N5 in step I+1, so it
  // is as wide as a sum; RB, RC hold only samples; RE holds X or N3.
  acc_t    ra, rd, re, rf, rg;
  sample_t rb, rc;

  // Operand selection for the two multipliers and two adders.
  sample_t mA_a, mB_a;
  coef_t   mA_b, mB_b;
  prod_t   mA_p, mB_p;
  acc_t    addA, addB;

  always_comb begin
    if (step == 1'b0) begin
      mA_a = sample_t'(ra); mA_b = coef[3];   // N5 = X@3 * a3
      mB_a = rb;          mB_b = coef[2];   // N4 = X@2 * a2
      addA = re + rf;                         // N6 = N3 + N7
    end else begin
      mA_a = sample_t'(re); mA_b = coef[0];   // N2 = X * a0
      mB_a = rc;          mB_b = coef[1];   // N3 = X@1 * a1
      addA = rd + rf;                         // N8 = N2 + N6
    end
    addB = rg + ra;                           // N7 = N4 + N5 (used in step I+1)
  end

  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(MULT_STAGES)) u_multA (
    .clk, .a(mA_a), .b(mA_b), .p(mA_p)
  );
  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(MULT_STAGES)) u_multB (
    .clk, .a(mB_a), .b(mB_b), .p(mB_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; rc <= '0; rd <= '0; re <= '0; rf <= '0; rg <= '0;
    end else if (step == 1'b0) begin
      rf <= addA;            // N6
      re <= acc_t'(x_in);    // X
      rg <= ext(mB_p);       // N4
      ra <= ext(mA_p);       // N5
    end else begin
      rd <= ext(mA_p);       // N2
      re <= ext(mB_p);       // N3
      rc <= sample_t'(re);   // next X@1
      rf <= addB;            // N7
      ra <= acc_t'(rb);      // next X@3
      rb <= rc;              // next X@2
    end
  end

  assign y_out = addA;

  // The result leaves only in the last step of the schedule.
  out_step_a : assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> step == 1'b1);

endmodule
