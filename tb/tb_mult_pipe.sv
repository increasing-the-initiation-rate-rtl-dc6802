// tb_mult_pipe: self-checking testbench for mult_pipe.
//
// Builds the multiplier with no pipelining and with one, two and three flip-flop
// ranks (the four variants of the pipelined-multiplier drawing) and issues a new
// operand pair to all of them every clock: random values and the corner cases
// (most negative, most positive, -1, 0). Each product is compared with a*b
// computed here, exactly STAGES clocks after its operands were issued, which
// checks both the result and that a new multiply can start every clock.
module tb_mult_pipe;
  localparam int A_W = 16, B_W = 16, P_W = 32, NOPS = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  logic signed [P_W-1:0] p0, p1, p2, p3;

  mult_pipe #(.A_W(A_W), .B_W(B_W), .STAGES(0)) u0 (.clk, .a, .b, .p(p0));
  mult_pipe #(.A_W(A_W), .B_W(B_W), .STAGES(1)) u1 (.clk, .a, .b, .p(p1));
  mult_pipe #(.A_W(A_W), .B_W(B_W), .STAGES(2)) u2 (.clk, .a, .b, .p(p2));
  mult_pipe #(.A_W(A_W), .B_W(B_W), .STAGES(3)) u3 (.clk, .a, .b, .p(p3));

  int checks = 0, failures = 0;
  logic signed [P_W-1:0] expv [NOPS];

  function automatic logic signed [A_W-1:0] pick(int n);
    case (n % 11)
      0: return 16'sh8000;
      1: return 16'sh7fff;
      2: return -16'sd1;
      3: return '0;
      default: return A_W'($urandom);
    endcase
  endfunction

  task automatic check(int stages, logic signed [P_W-1:0] got, int n);
    if (n < 0) return;
    checks++;
    if (got !== expv[n]) begin
      failures++;
      $display("FAIL: STAGES=%0d op %0d product %0d expected %0d", stages, n, got, expv[n]);
    end
  endtask

  initial begin
    for (int n = 0; n < NOPS + 3; n++) begin
      if (n < NOPS) begin
        a = pick(n);
        b = pick(n / 11 + 3 * n);
        expv[n] = P_W'(a) * P_W'(b);
      end
      #1;
      check(0, p0, (n < NOPS) ? n : -1);
      check(1, p1, (n >= 1 && n - 1 < NOPS) ? n - 1 : -1);
      check(2, p2, (n >= 2 && n - 2 < NOPS) ? n - 2 : -1);
      check(3, p3, (n >= 3 && n - 3 < NOPS) ? n - 3 : -1);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
