// fir4_ir6_pm: 4-tap FIR filter on pipelined multipliers, initiation rate =
// latency = 6, two multipliers and one adder.
//
// Same filter as fir4_ir2 (Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3), but each
// multiplier is pipelined with two flip-flop ranks (mult_pipe, STAGES = 2): a
// multiply issued in one clock is saved to a register at the end of the third
// clock. The longest path N5 -> N7 -> N6 -> N8 therefore takes 6 clocks, and this
// version finishes one sample before it accepts the next. Per sample:
//
//   clock 1 : input X;  MultA issues N5 = X@3*a3, MultB issues N4 = X@2*a2
//   clock 2 : MultA issues N3 = X@1*a1, MultB issues N2 = X*a0
//   clock 3 : N5, N4 ready, saved to r1, r2
//   clock 4 : adder N7 = r1 + r2 -> r3;  N3, N2 ready, saved to r1, r2
//   clock 5 : adder N6 = r1 + r3 -> r3
//   clock 6 : adder N8 = r2 + r3 = Y
//
// The schedule and unit counts follow the pipelined-multiplier schedule of the
// filter; the registers (xr for the input sample, h1..h3 for the history, r1..r3)
// are this design's own allocation. The history shifts at the end of clock 2,
// after the last multiply that reads it has been issued.
//
// Interface and timing: x_take is high in clock 1 of each six; x_in is read at
// that edge. y_out is combinational (the adder's output) and meaningful while
// y_valid is high, in clock 6, five clocks after x_take. Reset (asynchronous,
// active low) clears the history so the first outputs see zero past samples;
// widths and the coefficient load port are this design's own choices.
module fir4_ir6_pm
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
  localparam int II          = 6;
  localparam int LAT         = 6;
  localparam int MULT_STAGES = 2;

  coef_t coef [NTAPS];
  logic [2:0] step;   // 0..5 = clock 1..6 of the schedule

  coef_regs u_coef (
    .clk, .rst_n, .load(coef_load), .coef_i, .coef_o(coef)
  );

  sched_ctrl #(.II(II), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .step, .take(x_take), .out_valid(y_valid)
  );

  sample_t xr, h1, h2, h3;
  acc_t    r1, r2, r3;
  sample_t mA_a, mB_a;
  coef_t   mA_b, mB_b;
  prod_t   mA_p, mB_p;
  acc_t    add_a, add_b, add_s;

  always_comb begin
    if (step == 0) begin
      mA_a = h3; mA_b = coef[3];      // N5
      mB_a = h2; mB_b = coef[2];      // N4
    end else begin
      mA_a = h1; mA_b = coef[1];      // N3 (issued in clock 2)
      mB_a = xr; mB_b = coef[0];      // N2 (issued in clock 2)
    end
    case (step)
      3'd3:    begin add_a = r1; add_b = r2; end   // N7 = N5 + N4
      3'd4:    begin add_a = r1; add_b = r3; end   // N6 = N3 + N7
      default: begin add_a = r2; add_b = r3; end   // N8 = N2 + N6
    endcase
    add_s = add_a + add_b;
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
      r1 <= '0; r2 <= '0; r3 <= '0;
    end else begin
      case (step)
        3'd0: xr <= x_in;
        3'd1: begin h3 <= h2; h2 <= h1; h1 <= xr; end
        3'd2: begin r1 <= ext(mA_p); r2 <= ext(mB_p); end
        3'd3: begin r3 <= add_s; r1 <= ext(mA_p); r2 <= ext(mB_p); end
        3'd4: r3 <= add_s;
        default: ;
      endcase
    end
  end

  assign y_out = add_s;

  // The result leaves only in the last step of the schedule.
  out_step_a : assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> step == 3'd5);

endmodule
