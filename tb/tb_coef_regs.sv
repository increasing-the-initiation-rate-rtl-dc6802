// tb_coef_regs: self-checking testbench for coef_regs.
//
// Checks that reset clears a0..a3, that a clock edge with load high copies all
// four inputs, and that without load the registers hold their values whatever
// the inputs do. Expected values are kept here in a shadow copy.
module tb_coef_regs;
  import fir4_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  load = 1'b0;
  coef_t coef_i [NTAPS];
  coef_t coef_o [NTAPS];
  coef_t shadow [NTAPS];
  always #5 clk = ~clk;

  coef_regs dut (.clk, .rst_n, .load, .coef_i, .coef_o);

  int checks = 0, failures = 0;

  task automatic compare(string what);
    for (int k = 0; k < NTAPS; k++) begin
      checks++;
      if (coef_o[k] !== shadow[k]) begin
        failures++;
        $display("FAIL: %s a%0d = %0d expected %0d", what, k, coef_o[k], shadow[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NTAPS; k++) begin coef_i[k] = coef_t'($urandom); shadow[k] = '0; end
    #1 rst_n = 1'b0;
    #1;
    compare("reset");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      for (int k = 0; k < NTAPS; k++) coef_i[k] = coef_t'($urandom);
      @(posedge clk);
      if (load) for (int k = 0; k < NTAPS; k++) shadow[k] = coef_i[k];
      #1;
      compare(load ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
