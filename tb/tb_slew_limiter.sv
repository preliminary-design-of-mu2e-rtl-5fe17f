// tb_slew_limiter: random targets; after every step the output must move
// towards the target by min(max_step, distance), as the testbench computes,
// and must never move without a step.
module tb_slew_limiter;
  logic clk = 0, rst_n = 0, step = 0;
  logic [15:0] target = 0, max_step = 16'd10, y;
  int checks = 0, failures = 0;
  int model = 0;

  slew_limiter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 300 == 0) target = (i % 600 == 0) ? 16'($urandom_range(60000, 65535)) : 16'($urandom_range(0, 3000));
      if (i == 1500) max_step = 16'd65535;
      if (i == 1600) max_step = 16'd7;
      @(negedge clk) step = (i % 2 == 0);
      @(negedge clk) step = 0;
      if (i % 2 == 0) begin
        int t, m;
        t = int'(target); m = int'(max_step);
        if (t > model) model = (model + m < t) ? model + m : t;
        else if (t < model) model = (model - m > t) ? model - m : t;
      end
      check(y == 16'(model), $sformatf("i=%0d y=%0d model %0d", i, y, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
