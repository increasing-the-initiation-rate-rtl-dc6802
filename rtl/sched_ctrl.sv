// sched_ctrl: controller that steps a datapath through its repeating schedule.
//
// A schedule with initiation rate II repeats every II clocks (the generalized
// schedule of the initiation-rate-2 designs needs only two steps, I and I+1). The
// controller counts step = 0 .. II-1 from reset and raises take in step 0, the
// clock in which the datapath reads a new input sample. Each take enters a shift
// register LAT-1 clocks long; out_valid is its output, so it is high in the last
// clock of a sample's computation, LAT-1 clocks after that sample's take. This
// marks the first outputs after reset, which belong to no real sample, as invalid.
//
// step is $clog2(II) bits wide (one bit when II = 1).
//
// The datapath starts in step 0 in the first clock after reset. Starting at once
// and running freely (no stall input) is this design's own choice.
module sched_ctrl #(
  parameter int II  = 2,   // initiation rate: clocks between two input samples
  parameter int LAT = 4,   // latency: clocks from input to output, LAT >= 2
  localparam int SW = (II > 1) ? $clog2(II) : 1   // width of step
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic [SW-1:0]                  step,
  output logic                          take,
  output logic                          out_valid
);
  logic [LAT-2:0] inflight;   // inflight[k]: a sample was taken k+1 clocks ago

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step     <= '0;
      inflight <= '0;
    end else begin
      step     <= (int'(step) == II - 1) ? '0 : step + 1'b1;
      inflight <= (inflight << 1) | (LAT-1)'(take);
    end
  end

  assign take      = (step == '0);
  assign out_valid = inflight[LAT-2];

  step_range_a : assert property (@(posedge clk) disable iff (!rst_n) int'(step) < II);

endmodule
