// tb_sched_ctrl: self-checking testbench for sched_ctrl.
//
// Runs the controller in the four configurations the filter uses (initiation
// rate / latency 1/4, 2/4, 2/6, 6/6) from reset, and compares every clock with
// what the schedule requires, worked out from the clock count c since reset:
// step = c mod II, take high when c mod II = 0, and out_valid high when a take
// happened exactly LAT-1 clocks earlier. A second reset in mid-run checks that the
// schedule restarts in step 0 with no output marked valid.
module tb_sched_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  localparam int IIS  [NCFG] = '{1, 2, 2, 6};
  localparam int LATS [NCFG] = '{4, 4, 6, 6};

  logic [2:0] step [NCFG];
  logic       take [NCFG], vld [NCFG];

  sched_ctrl #(.II(1), .LAT(4)) u0 (.clk, .rst_n, .step(step[0][0:0]), .take(take[0]), .out_valid(vld[0]));
  sched_ctrl #(.II(2), .LAT(4)) u1 (.clk, .rst_n, .step(step[1][0:0]), .take(take[1]), .out_valid(vld[1]));
  sched_ctrl #(.II(2), .LAT(6)) u2 (.clk, .rst_n, .step(step[2][0:0]), .take(take[2]), .out_valid(vld[2]));
  sched_ctrl #(.II(6), .LAT(6)) u3 (.clk, .rst_n, .step(step[3][2:0]), .take(take[3]), .out_valid(vld[3]));
  assign step[0][2:1] = '0;
  assign step[1][2:1] = '0;
  assign step[2][2:1] = '0;

  int checks = 0, failures = 0;
  int c = 0;     // clocks since the end of reset

  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < NCFG; k++) begin
        automatic int  ii = IIS[k], lat = LATS[k];
        automatic bit  exp_take = (c % ii) == 0;
        automatic bit  exp_vld  = (c >= lat - 1) && ((c - (lat - 1)) % ii == 0);
        checks += 3;
        if (int'(step[k]) != c % ii) begin
          failures++; $display("FAIL: cfg %0d clock %0d step %0d", k, c, step[k]);
        end
        if (take[k] != exp_take) begin
          failures++; $display("FAIL: cfg %0d clock %0d take %0b", k, c, take[k]);
        end
        if (vld[k] != exp_vld) begin
          failures++; $display("FAIL: cfg %0d clock %0d out_valid %0b", k, c, vld[k]);
        end
      end
      c++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (41) @(posedge clk);
    #2 rst_n = 1'b0;
    c = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (30) @(posedge clk);
    @(negedge clk);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
