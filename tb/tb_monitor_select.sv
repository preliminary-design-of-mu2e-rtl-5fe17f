// tb_monitor_select: with the filter disabled (shift 0) every mode must give
// its source: WCM, EM, their mean, or the DCCT decrease from the previous
// turn. With shift 2 the WCM output must lag a step.
module tb_monitor_select;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t wcm, em, dcct, meas;
  mon_sel_t mode;
  logic [3:0] lpf_shift = 0;
  int checks = 0, failures = 0;
  int prev_dcct;

  monitor_select dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic turn(input int w, input int e, input int d);
    @(negedge clk) wcm = 16'(w); em = 16'(e); dcct = 16'(d); in_valid = 1;
    @(negedge clk) in_valid = 0;
    @(negedge clk);
    check(out_valid, "out_valid two clocks after in_valid");
    @(negedge clk);
    check(!out_valid, "out_valid is one clock");
  endtask

  initial begin
    wcm = 0; em = 0; dcct = 0; mode = MON_WCM;
    repeat (3) @(negedge clk); rst_n = 1;
    prev_dcct = 0;
    for (int i = 0; i < 40; i++) begin
      int w, e, d;
      w = $urandom_range(0, 20000); e = $urandom_range(0, 20000); d = 30000 - 7 * i;
      mode = mon_sel_t'(i % 4);
      turn(w, e, d);
      unique case (mode)
        MON_WCM:  check(meas == 16'(w), $sformatf("wcm %0d exp %0d", meas, w));
        MON_EM:   check(meas == 16'(e), "em");
        MON_BOTH: check(meas == 16'((w + e) / 2), $sformatf("mean %0d exp %0d", meas, (w + e) / 2));
        MON_DCCT: check(meas == 16'(prev_dcct - d), $sformatf("dcct rate %0d exp %0d", meas, prev_dcct - d));
      endcase
      prev_dcct = d;
    end
    mode = MON_WCM; lpf_shift = 2;
    turn(0, 0, 0); turn(0, 0, 0);
    lpf_shift = 0; turn(0, 0, 0);
    lpf_shift = 2;
    turn(8000, 0, 0);
    check(meas == 16'sd2000, $sformatf("filtered step %0d", meas));
    turn(8000, 0, 0);
    check(meas == 16'sd3500, $sformatf("filtered step 2 %0d", meas));
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
