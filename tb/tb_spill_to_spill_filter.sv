// tb_spill_to_spill_filter: runs several 16-bin spills with random bin
// errors and compares the correction output for every bin with a model of
// the per-bin learning rule (gain, forgetting and phase advance) kept in the
// testbench. Also checks that learning can be frozen and that clear empties
// the profile.
module tb_spill_to_spill_filter;
  import srs_pkg::*;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0, clear = 0, spill_start = 0, bin_strobe = 0, learn = 1, busy;
  logic [3:0] bin_idx = 0;
  sample_t err = '0, corr;
  s2s_cfg_t cfg;
  int checks = 0, failures = 0;
  longint m [NB];

  spill_to_spill_filter #(.NBINS(NB), .MW(24)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic longint sat(input longint v, input longint lim);
    return v > lim - 1 ? lim - 1 : v < -lim ? -lim : v;
  endfunction

  function automatic int ahead(input int k);
    return (k + 1 + int'(cfg.phase_adv) > NB - 1) ? NB - 1 : k + 1 + int'(cfg.phase_adv);
  endfunction

  task automatic run_spill(input int emax);
    @(negedge clk) spill_start = 1;
    @(negedge clk) spill_start = 0;
    repeat (4) @(negedge clk);
    check(corr == 16'(sat(m[ahead(-1)] >>> 8, 32768)), $sformatf("bin 0 corr %0d", corr));
    for (int k = 0; k < NB; k++) begin
      int e;
      e = $urandom_range(0, 2 * emax) - emax;
      @(negedge clk) bin_strobe = 1; bin_idx = 4'(k); err = 16'(e);
      @(negedge clk) bin_strobe = 0;
      repeat (6) @(negedge clk);
      if (learn) begin
        longint u;
        u = m[k] + ((longint'(e) <<< 8) >>> cfg.gain_shift);
        if (cfg.leak_shift != 0) u -= m[k] >>> cfg.leak_shift;
        m[k] = sat(u, 64'd1 << 23);
      end
      check(corr == 16'(sat(m[ahead(k)] >>> 8, 32768)),
            $sformatf("k=%0d corr %0d exp %0d", k, corr, sat(m[ahead(k)] >>> 8, 32768)));
    end
  endtask

  initial begin
    cfg = '{gain_shift: 5'd1, leak_shift: 5'd0, phase_adv: '0};
    for (int k = 0; k < NB; k++) m[k] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    wait (!busy);
    for (int s = 0; s < 4; s++) run_spill(1000);
    cfg.phase_adv = 10'd3;
    for (int s = 0; s < 3; s++) run_spill(20000);
    cfg.leak_shift = 5'd2; cfg.gain_shift = 5'd0;
    for (int s = 0; s < 3; s++) run_spill(30000);
    learn = 0;
    run_spill(30000);
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    check(busy, "busy while clearing");
    wait (!busy);
    for (int k = 0; k < NB; k++) m[k] = 0;
    learn = 1; cfg = '{gain_shift: 5'd3, leak_shift: 5'd0, phase_adv: 10'd1};
    run_spill(500);
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
