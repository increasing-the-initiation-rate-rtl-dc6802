// mult_pipe: signed multiplier with STAGES ranks of pipeline flip-flops inside.
//
// STAGES = 0 is a plain combinational multiplier: the product is ready after the
// combinational delay. With STAGES = n the multiply logic is cut into n+1 segments
// with a flip-flop rank between neighbouring segments, so a new operand pair can
// be issued every clock and its product appears on p exactly n clocks later
// (combinationally after the last rank). The surrounding datapath saves it in a
// register at the end of that clock: with n = 2 an operation issued in clock 1 is
// saved at the end of clock 3, the "3 clks" per multiply of the pipelined schedules.
//
// The placement of the ranks inside the multiplier follows the pipelined-multiplier
// drawing (REG, then the multiplier split by DFF ranks, then REG). How the logic is
// split is this design's own choice: operand b is cut into n+1 slices of about
// equal width; segment s adds the shifted partial products of slice s to the
// running sum, and the operands travel along with the partial sum. The top bit of
// b carries negative weight (two's complement), so the product is exact for
// signed operands.
//
// The pipeline flip-flops hold only data and have no reset: a product is only
// used STAGES clocks after its operands were issued. With STAGES = 0 there are no
// flip-flops and clk is left unused.
module mult_pipe #(
  parameter int A_W    = fir4_pkg::DATA_W,
  parameter int B_W    = fir4_pkg::COEF_W,
  parameter int STAGES = 2
) (
  input  logic                      clk,
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);
  localparam int P_W   = A_W + B_W;
  localparam int NSEG  = STAGES + 1;
  localparam int SEG_W = (B_W + NSEG - 1) / NSEG;

  logic signed [A_W-1:0] a_seg   [NSEG];   // a at the input of each segment
  logic signed [B_W-1:0] b_seg   [NSEG];   // b at the input of each segment
  logic signed [P_W-1:0] acc_in  [NSEG];   // partial sum entering each segment
  logic signed [P_W-1:0] acc_out [NSEG];   // partial sum leaving each segment

  assign a_seg[0]  = a;
  assign b_seg[0]  = b;
  assign acc_in[0] = '0;

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    // Shift-and-add over the bits of slice s.
    always_comb begin
      logic signed [P_W-1:0] a_ext;
      a_ext      = P_W'(a_seg[s]);
      acc_out[s] = acc_in[s];
      for (int i = s * SEG_W; i < (s + 1) * SEG_W; i++) begin
        if (i < B_W && b_seg[s][i]) begin
          if (i == B_W - 1) acc_out[s] = acc_out[s] - (a_ext <<< i);
          else              acc_out[s] = acc_out[s] + (a_ext <<< i);
        end
      end
    end

    if (s < NSEG - 1) begin : g_rank
      always_ff @(posedge clk) begin
        a_seg[s+1]  <= a_seg[s];
        b_seg[s+1]  <= b_seg[s];
        acc_in[s+1] <= acc_out[s];
      end
    end
  end

  assign p = acc_out[NSEG-1];

endmodule
