// tb_lpf: step response of the low-pass filter. With shift k the output
// after n inputs of a step of height A must be A*(1 - (1-2^-k)^n) within a
// few LSBs (real-number model), reach the step, and follow instantly with
// shift 0.
module tb_lpf;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [3:0] shift = 4'd3;
  sample_t x = '0, y;
  int checks = 0, failures = 0;
  real model;

  lpf dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    model = 0.0;
    for (int n = 1; n <= 60; n++) begin
      @(negedge clk) x = 16'sd10000; in_valid = 1;
      @(negedge clk) in_valid = 0;
      model = model + (10000.0 - model) / 8.0;
      check(out_valid == 1, "out_valid follows in_valid");
      check(y - $rtoi(model) <= 2 && $rtoi(model) - y <= 2, $sformatf("n=%0d y=%0d model=%f", n, y, model));
    end
    check(y >= 9990, "settles to the step");
    @(negedge clk) shift = 0; x = -16'sd1234; in_valid = 1;
    @(negedge clk) in_valid = 0;
    check(y == -16'sd1234, "shift 0 passes through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
