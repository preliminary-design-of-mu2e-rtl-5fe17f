// tb_rfko_loop: exercises the RFKO amplitude loop with 16 bins. Checks that
// alpha is zero outside spills (every clock), that the PID sets alpha from the error and
// clamps it at zero, proportional action for random gains, that rf_out = (alpha * f) >>> 17 for a random excitation
// every clock, and that a correction learned in one spill sets alpha in the
// next.
module tb_rfko_loop;
  import srs_pkg::*;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0, spill_start = 0, bin_strobe = 0, learn = 0, s2s_clear = 0, s2s_busy;
  srs_state_t state = ST_NO_BEAM;
  logic [3:0] bin_idx = 0;
  sample_t meas = '0, err, f_in = '0;
  pid_gains_t gains = '0;
  s2s_cfg_t s2s_cfg = '0;
  logic tab_wr_en = 0;
  logic [3:0] tab_wr_addr = 0;
  logic [15:0] tab_wr_data = 0, alpha;
  logic signed [13:0] rf_out;
  int checks = 0, failures = 0, rf_checks = 0;
  logic [15:0] a_prev;
  sample_t f_prev;

  rfko_loop #(.NBINS(NB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) begin
    f_in   <= 16'($urandom);
    a_prev <= alpha;
    f_prev <= f_in;
  end

  always @(negedge clk) if (rst_n && !s2s_busy) begin
    longint p;
    p = (longint'(a_prev) * longint'(f_prev)) >>> 17;
    check(rf_out == 14'(p), $sformatf("rf_out %0d exp %0d", rf_out, p));
    rf_checks++;
  end

  // outside spills alpha must be zero every clock (after two clocks of settling)
  int off_clks = 0;
  always @(negedge clk) if (rst_n) begin
    off_clks = (state == ST_SPILL) ? 0 : off_clks + 1;
    if (off_clks > 2) check(alpha == 0 && rf_out == 0, $sformatf("alpha %0d outside spill", alpha));
  end

  task automatic strobe(input int k, input int m);
    @(negedge clk) bin_idx = 4'(k); meas = 16'(m);
    repeat (2) @(negedge clk);
    bin_strobe = 1;
    @(negedge clk) bin_strobe = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NB; k++) begin
      @(negedge clk) tab_wr_en = 1; tab_wr_addr = 4'(k); tab_wr_data = 16'd1000;
    end
    @(negedge clk) tab_wr_en = 0;
    wait (!s2s_busy);
    gains.kp = 16'sd256;
    strobe(0, 400);
    check(alpha == 0, "disabled outside spills");
    state = ST_SPILL;
    @(negedge clk) spill_start = 1; @(negedge clk) spill_start = 0;
    strobe(0, 400);
    check(err == 16'sd600, "error");
    check(alpha == 16'd600, $sformatf("alpha from PID %0d", alpha));
    strobe(1, 2500);
    check(alpha == 0, "alpha clamped at zero");
    for (int i = 0; i < 20; i++) begin
      int kp, m, e;
      kp = $urandom_range(0, 2048);
      m = $urandom_range(0, 2000);
      e = (kp * (1000 - m)) >>> 8;
      gains.kp = 16'(kp);
      strobe(2, m);
      check(int'(alpha) == ((e < 0) ? 0 : (e > 32767 ? 32767 : e)),
            $sformatf("P kp=%0d err=%0d: alpha %0d", kp, 1000 - m, alpha));
    end
    gains.kp = 16'sd256;
    state = ST_RESET;
    repeat (3) @(negedge clk);
    check(alpha == 0, "disabled in reset");
    // learning
    gains.kp = 0; learn = 1;
    state = ST_SPILL;
    @(negedge clk) spill_start = 1; @(negedge clk) spill_start = 0;
    for (int k = 0; k < NB; k++) strobe(k, 800);
    learn = 0; state = ST_RESET;
    repeat (3) @(negedge clk);
    state = ST_SPILL;
    @(negedge clk) spill_start = 1; @(negedge clk) spill_start = 0;
    repeat (6) @(negedge clk);
    check(alpha == 16'd200, $sformatf("learned alpha %0d", alpha));
    state = ST_NO_BEAM;   // the learned correction is still present, but the loop is off
    repeat (3) @(negedge clk);
    check(alpha == 0, "disabled in the no-beam period");
    repeat (200) @(negedge clk);
    check(rf_checks > 200, "rf_out checked every clock");
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
