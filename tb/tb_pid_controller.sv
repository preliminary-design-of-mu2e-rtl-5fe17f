// tb_pid_controller: drives random errors and gains and compares the output
// with a PID model written in the testbench (integer arithmetic with the same
// Q8.8 gains, integrator clamp and output saturation). Also checks that
// clear empties the integrator and that the output holds between updates.
module tb_pid_controller;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, update = 0;
  sample_t err = '0, u;
  pid_gains_t gains;
  int checks = 0, failures = 0;
  longint integ = 0, eprev = 0, expu = 0;

  pid_controller #(.IW(24)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic longint sat(input longint v, input longint lim);
    return v > lim - 1 ? lim - 1 : v < -lim ? -lim : v;
  endfunction

  task automatic do_update(input int e);
    longint acc;
    @(negedge clk) err = 16'(e); update = 1;
    @(negedge clk) update = 0;
    integ = sat(integ + e, 64'd1 << 23);
    acc   = longint'(gains.kp) * e + longint'(gains.ki) * integ + longint'(gains.kd) * (e - eprev);
    eprev = e;
    expu  = sat(acc >>> 8, 32768);
    check(u == 16'(expu), $sformatf("u=%0d exp %0d (e=%0d)", u, expu, e));
  endtask

  initial begin
    gains = '{kp: 16'sd256, ki: 16'sd16, kd: 16'sd64};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) do_update($urandom_range(0, 400) - 200);
    // hold between updates
    repeat (5) @(negedge clk);
    check(u == 16'(expu), "output holds");
    // large errors: saturation of output and integrator
    gains = '{kp: 16'sd1024, ki: 16'sd512, kd: -16'sd300};
    for (int i = 0; i < 600; i++) do_update(i < 300 ? 32767 : -32768);
    for (int i = 0; i < 100; i++) begin
      gains = '{kp: 16'($urandom), ki: 16'($urandom_range(0, 64)), kd: 16'($urandom)};
      do_update($urandom_range(0, 65535) - 32768);
    end
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    integ = 0; eprev = 0;
    check(u == 0, "cleared output");
    gains = '{kp: 16'sd0, ki: 16'sd256, kd: 16'sd0};
    do_update(100);
    check(u == 16'sd100, "integrator restarts from zero");
    do_update(100);
    check(u == 16'sd200, "integrates");
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
