// tb_fir4_top: end-to-end testbench for fir4_top, with all parameters at their
// defaults.
//
// Feeds the same sample stream and the same two coefficient sets to all four
// schedules (index 0: rate 1 / latency 4, 1: rate 2 / latency 4, 2: rate 2 /
// latency 6 with pipelined multipliers, 3: rate 6 / latency 6 with pipelined
// multipliers). Each valid output is compared with the filter equation computed
// here; each schedule's accept spacing and latency are checked against its
// initiation rate and latency. The testbench also counts, per schedule, the
// mechanisms that distinguish them, and fails if one never happens:
//   - overlap: clocks with more than one sample in flight (pipelining), required
//     for the three schedules whose initiation rate is below their latency, and
//     required never to happen for the rate-6 schedule;
//   - peak samples in flight, which must equal latency / initiation rate;
//   - a coefficient reload between two parts of the stream.
module tb_fir4_top;
  import fir4_pkg::*;

  localparam int ND = 4;
  localparam int IIS  [ND] = '{1, 2, 2, 6};
  localparam int LATS [ND] = '{4, 4, 6, 6};
  localparam int N1     = 40;
  localparam int NFLUSH = 6;
  localparam int NS     = 2 + N1 + NFLUSH + 40;
  localparam int SWITCH = 2 + N1 + NFLUSH - 2;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    coef_load [ND];
  coef_t   coef_i    [ND][NTAPS];
  sample_t x_in      [ND];
  logic    x_take    [ND];
  acc_t    y_out     [ND];
  logic    y_valid   [ND];

  fir4_top dut (.clk, .rst_n, .coef_load, .coef_i, .x_in, .x_take, .y_out, .y_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sample_t xs [NS];
  coef_t   ca [NTAPS], cb [NTAPS];
  acc_t    yexp [NS];
  int      cyc = 0;
  int      idx [ND], oidx [ND], last_take [ND], take_cyc [ND][NS];
  int      n_overlap [ND], peak [ND], n_reload [ND];

  initial begin
    for (int k = 0; k < NTAPS; k++) begin
      ca[k] = coef_t'($urandom);
      cb[k] = coef_t'($urandom);
    end
    for (int n = 0; n < NS; n++)
      xs[n] = (n < 2 || (n >= 2 + N1 && n < 2 + N1 + NFLUSH)) ? sample_t'(0) : sample_t'($urandom);
    xs[10] = sample_t'(16'sh8000);
    xs[11] = sample_t'(16'sh7fff);
    for (int n = 0; n < NS; n++) begin
      yexp[n] = '0;
      for (int k = 0; k < NTAPS; k++)
        if (n - k >= 0) yexp[n] += acc_t'(xs[n-k]) * acc_t'((n < SWITCH) ? ca[k] : cb[k]);
    end
    for (int d = 0; d < ND; d++) begin
      idx[d] = 0; oidx[d] = 0; last_take[d] = -1;
      n_overlap[d] = 0; peak[d] = 0; n_reload[d] = 0;
    end
  end

  always_comb begin
    for (int d = 0; d < ND; d++) begin
      x_in[d]      = (idx[d] < NS) ? xs[idx[d]] : '0;
      coef_load[d] = (cyc == 0) || (x_take[d] && idx[d] == SWITCH);
      for (int k = 0; k < NTAPS; k++) coef_i[d][k] = (cyc == 0) ? ca[k] : cb[k];
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < ND; d++) begin
        automatic int inflight = ((idx[d] < NS) ? idx[d] + int'(x_take[d]) : NS) - oidx[d];
        if (inflight > 1) n_overlap[d]++;
        if (inflight > peak[d]) peak[d] = inflight;
        if (cyc > 0 && coef_load[d]) n_reload[d]++;
        if (x_take[d]) begin
          if (last_take[d] >= 0) begin
            checks++;
            if (cyc - last_take[d] != IIS[d]) begin
              failures++;
              $display("FAIL: design %0d accept spacing %0d", d, cyc - last_take[d]);
            end
          end
          last_take[d] = cyc;
          if (idx[d] < NS) take_cyc[d][idx[d]] = cyc;
          idx[d]++;
        end
        if (y_valid[d] && oidx[d] < NS) begin
          checks += 2;
          if (y_out[d] !== yexp[oidx[d]]) begin
            failures++;
            $display("FAIL: design %0d sample %0d y=%0d expected %0d", d, oidx[d],
                     y_out[d], yexp[oidx[d]]);
          end
          if (cyc - take_cyc[d][oidx[d]] != LATS[d] - 1) begin
            failures++;
            $display("FAIL: design %0d sample %0d latency %0d", d, oidx[d],
                     cyc - take_cyc[d][oidx[d]] + 1);
          end
          oidx[d]++;
        end
      end
      cyc <= cyc + 1;
    end
  end

  function automatic bit all_done();
    for (int d = 0; d < ND; d++) if (oidx[d] < NS) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    for (int d = 0; d < ND; d++) begin
      $display("design %0d: %0d outputs, overlap clocks %0d, peak in flight %0d, reloads %0d",
               d, oidx[d], n_overlap[d], peak[d], n_reload[d]);
      checks += 3;
      if (IIS[d] < LATS[d] ? n_overlap[d] == 0 : n_overlap[d] != 0) begin
        failures++; $display("FAIL: design %0d overlap count %0d", d, n_overlap[d]);
      end
      if (peak[d] != LATS[d] / IIS[d]) begin
        failures++; $display("FAIL: design %0d peak in flight %0d", d, peak[d]);
      end
      if (n_reload[d] != 1) begin
        failures++; $display("FAIL: design %0d coefficient reloads %0d", d, n_reload[d]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 6 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
