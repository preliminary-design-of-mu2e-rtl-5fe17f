// tb_adaptive_filter: closed-loop cancellation test. A disturbance made of a
// 2nd-harmonic and a 3rd-harmonic sinusoid (random phase) is added to the
// error; the filter output is subtracted from it, as the loop does. After
// adaptation the residual must be far smaller than the disturbance, and the
// output must follow sum(w * ref) of the testbench's own LMS model for the
// first updates. clear must zero the output.
module tb_adaptive_filter;
  import srs_pkg::*;
  localparam int NH = 4;
  logic clk = 0, rst_n = 0, clear = 0, update = 0, adapt_en = 1;
  logic [4:0] mu_shift = 5'd14;
  sample_t err = '0, y;
  sample_t ref_sin [NH];
  sample_t ref_cos [NH];
  int checks = 0, failures = 0;
  real ph, r0, r1, d;
  real res_early, res_late;
  longint ws [NH], wc [NH];

  adaptive_filter #(.NH(NH), .WW(24), .WF(8)) dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    for (int k = 0; k < NH; k++) begin ref_sin[k] = '0; ref_cos[k] = '0; ws[k] = 0; wc[k] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    res_early = 0; res_late = 0;
    for (int n = 0; n < 4000; n++) begin
      longint acc;
      ph = 2.0 * 3.14159265358979 * n / 50.0;
      for (int k = 0; k < NH; k++) begin
        ref_sin[k] = 16'($rtoi(32767.0 * $sin((k + 1) * ph)));
        ref_cos[k] = 16'($rtoi(32767.0 * $cos((k + 1) * ph)));
      end
      @(negedge clk);   // y follows the new references
      @(negedge clk);
      acc = 0;
      for (int k = 0; k < NH; k++) acc += ws[k] * ref_sin[k] + wc[k] * ref_cos[k];
      if (n < 20) check(y == 16'(acc >>> 23), $sformatf("n=%0d y=%0d model %0d", n, y, acc >>> 23));
      d = 3000.0 * $sin(2 * ph + 0.7) + 1500.0 * $cos(3 * ph - 0.3);
      err = 16'($rtoi(d) - y);
      if (n < 50) res_early += rabs(real'(err));
      if (n >= 3950) res_late += rabs(real'(err));
      for (int k = 0; k < NH; k++) begin
        ws[k] += (longint'(err) * ref_sin[k]) >>> 14;
        wc[k] += (longint'(err) * ref_cos[k]) >>> 14;
      end
      update = 1;
      @(negedge clk) update = 0;
    end
    $display("mean |residual| first 50: %f, last 50: %f", res_early / 50, res_late / 50);
    check(res_late < res_early / 20, "disturbance cancelled");
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    @(negedge clk);
    check(y == 0, "clear zeroes the weights");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
