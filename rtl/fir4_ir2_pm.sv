// fir4_ir2_pm: 4-tap FIR filter on pipelined multipliers, initiation rate 2,
// latency 6, two multipliers and two adders.
//
// Same filter as fir4_ir2 (Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3) on multipliers
// with two pipeline ranks (mult_pipe, STAGES = 2; a multiply issued in one clock
// is saved at the end of the third). One sample still takes 6 clocks, but a new
// one enters every 2 clocks, so three samples overlap. The schedule repeats every
// two clocks, steps I and I+1; at step I sample J enters:
//
//   step I   : MultA N5(J) = X@3*a3, MultB N4(J) = X@2*a2, input X(J)
//              Adder A N6(J-2) = pa + r7 -> r6;  r2 <= pb (N2 of J-2)
//   step I+1 : MultA N3(J) = X@1*a1, MultB N2(J) = X*a0
//              Adder A N8(J-2) = r2 + r6 = Y;  Adder B N7(J-1) = pa + pb -> r7
//
// pa and pb save the two multiplier outputs every clock: after step I they hold
// N5, N4 of a sample, after step I+1 its N3, N2. Per sample J (entering at I):
// N7 at I+3, N6 at I+4, N8 at I+5. Because pb is overwritten with the next N4
// at the end of I+4, N2 is moved to r2 then, to be read at I+5.
// The schedule and unit counts (N6 and N8 on Adder A, N7 on Adder B) follow the
// initiation-rate-2 pipelined schedule of the filter; the register allocation
// (xr, h1..h3, pa, pb, r2, r6, r7) is this design's own.
//
// Interface and timing: x_take is high in step I; x_in is read at that edge.
// y_out is combinational (Adder A) and meaningful while y_valid is high, in step
// I+1 five clocks after the sample's x_take (its 6th clock). Reset (asynchronous,
// active low) clears the history so the first outputs see zero past samples;
// widths and the coefficient load port are this design's own choices.
module fir4_ir2_pm
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
  localparam int II          = 2;
  localparam int LAT         = 6;
  localparam int MULT_STAGES = 2;

  coef_t coef [NTAPS];
  logic                    step;   // 0: step I, 1: step I+1

  coef_regs u_coef (
    .clk, .rst_n, .load(coef_load), .coef_i, .coef_o(coef)
  );

  sched_ctrl #(.II(II), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .step, .take(x_take), .out_valid(y_valid)
  );

  sample_t xr, h1, h2, h3;
  acc_t    pa, pb, r2, r6, r7;
  sample_t mA_a, mB_a;
  coef_t   mA_b, mB_b;
  prod_t   mA_p, mB_p;
  acc_t    addA, addB;

  always_comb begin
    if (step == 1'b0) begin
      mA_a = h3; mA_b = coef[3];      // N5
      mB_a = h2; mB_b = coef[2];      // N4
      addA = pa + r7;                 // N6
    end else begin
      mA_a = h1; mA_b = coef[1];      // N3
      mB_a = xr; mB_b = coef[0];      // N2
      addA = r2 + r6;                 // N8
    end
    addB = pa + pb;                   // N7 (used in step I+1)
  end

  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(MULT_STAGES)) u_multA (
    .clk, .a(mA_a), .b(mA_b), .p(mA_p)
  );
  mult_pipe #(.A_W(DATA_W), .B_W(COEF_W), .STAGES(MULT_STAGES)) u_multB (
    .clk, .a(mB_a), .b(mB_b), .p(mB_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; h1 <= '0; h2 <= '0; h3 <= '0;
      pa <= '0; pb <= '0; r2 <= '0; r6 <= '0; r7 <= '0;
    end else begin
      pa <= ext(mA_p);
      pb <= ext(mB_p);
      if (step == 1'b0) begin
        xr <= x_in;
        r6 <= addA;
        r2 <= pb;
      end else begin
        r7 <= addB;
        h3 <= h2; h2 <= h1; h1 <= xr;
      end
    end
  end

  assign y_out = addA;

  // The result leaves only in the last step of the schedule.
  out_step_a : assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> step == 1'b1);

endmodule
