// tb_fir4_ir2: self-checking testbench for fir4_ir2, the 4-tap FIR filter at
// initiation rate 2, latency 4.
//
// Streams samples into the filter, one per x_take, and compares each valid output
// with y[n] = a0*x[n] + a1*x[n-1] + a2*x[n-2] + a3*x[n-3], computed here from the
// sample list (x before the first sample counts as zero). The stream has two
// parts with different coefficient sets: after the first part, zero samples flush
// the filter, the second set is loaded, and the second part follows. Samples
// include the most negative and most positive values to exercise sign handling.
// The testbench also checks the timing: x_take exactly every 2 clock(s), and
// y_valid exactly 3 clocks after the matching x_take (the result in the
// 4th clock of the computation).
module tb_fir4_ir2;
  import fir4_pkg::*;

  localparam int II     = 2;
  localparam int LAT    = 4;
  localparam int N1     = 60;            // samples with the first coefficients
  localparam int NFLUSH = 6;             // zero samples between the two parts
  localparam int NS     = 2 + N1 + NFLUSH + 60;
  localparam int SWITCH = 2 + N1 + NFLUSH - 2;  // load second set while taking this one

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    coef_load;
  coef_t   coef_i [NTAPS];
  sample_t x_in;
  logic    x_take, y_valid;
  acc_t    y_out;

  fir4_ir2 dut (.clk, .rst_n, .coef_load, .coef_i, .x_in, .x_take, .y_out, .y_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sample_t xs   [NS];
  coef_t   ca   [NTAPS], cb [NTAPS];
  acc_t    yexp [NS];
  int      take_cyc [NS];
  int      idx = 0, oidx = 0, cyc = 0, last_take = -1;

  function automatic sample_t rnd_sample(int n);
    case (n % 17)
      3:  return sample_t'(16'sh8000);
      7:  return sample_t'(16'sh7fff);
      default: return sample_t'($urandom);
    endcase
  endfunction

  initial begin
    for (int k = 0; k < NTAPS; k++) begin
      ca[k] = coef_t'($urandom);
      cb[k] = coef_t'($urandom);
    end
    ca[3] = coef_t'(16'sh8000);
    cb[0] = coef_t'(16'sh7fff);
    for (int n = 0; n < NS; n++) begin
      if (n < 2 || (n >= 2 + N1 && n < 2 + N1 + NFLUSH)) xs[n] = '0;
      else xs[n] = rnd_sample(n);
    end
    for (int n = 0; n < NS; n++) begin
      yexp[n] = '0;
      for (int k = 0; k < NTAPS; k++)
        if (n - k >= 0)
          yexp[n] += acc_t'(xs[n-k]) * acc_t'((n < SWITCH) ? ca[k] : cb[k]);
    end
  end

  assign x_in = (idx < NS) ? xs[idx] : '0;

  always_comb begin
    coef_load = 1'b0;
    for (int k = 0; k < NTAPS; k++) coef_i[k] = ca[k];
    if (cyc == 0) coef_load = 1'b1;
    if (x_take && idx == SWITCH) begin
      coef_load = 1'b1;
      for (int k = 0; k < NTAPS; k++) coef_i[k] = cb[k];
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (x_take) begin
        if (last_take >= 0) begin
          checks++;
          if (cyc - last_take != II) begin
            failures++;
            $display("FAIL: x_take spacing %0d, expected %0d", cyc - last_take, II);
          end
        end
        last_take = cyc;
        if (idx < NS) take_cyc[idx] = cyc;
        idx <= idx + 1;
      end
      if (y_valid && oidx < NS) begin
        checks += 2;
        if (y_out !== yexp[oidx]) begin
          failures++;
          $display("FAIL: sample %0d y=%0d expected %0d", oidx, y_out, yexp[oidx]);
        end
        if (cyc - take_cyc[oidx] != LAT - 1) begin
          failures++;
          $display("FAIL: sample %0d latency %0d clocks, expected %0d", oidx,
                   cyc - take_cyc[oidx] + 1, LAT);
        end
        oidx <= oidx + 1;
      end
      cyc <= cyc + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (oidx == NS);
    @(posedge clk);
    checks++;
    if (idx < NS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * II + LAT + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d outputs seen", oidx, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
