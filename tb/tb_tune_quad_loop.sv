// tb_tune_quad_loop: exercises the tune quad loop with 16 bins. Checks the
// pedestal in the no-beam period, the turn-by-turn slew-limited ramp to the
// start current in the reset period, the ramp table as feed-forward during a
// spill, the PID correction of a measured error and the proportional action
// for random gains and errors, spill-to-spill learning (a correction learned in one spill
// is applied in the next), that the LMS filter changes the output once
// enabled, and that the reference never moves more than max_step per turn.
module tb_tune_quad_loop;
  import srs_pkg::*;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0, cycle_start = 0, turn_tick = 0, spill_start = 0, bin_strobe = 0;
  srs_state_t state = ST_NO_BEAM;
  logic [3:0] bin_idx = 0;
  sample_t meas = '0, err;
  pid_gains_t gains = '0;
  s2s_cfg_t s2s_cfg = '0;
  logic learn = 0, s2s_clear = 0, lms_en = 0, s2s_busy;
  logic [4:0] lms_mu_shift = 5'd12;
  logic [31:0] inc60 = 32'd436709;
  logic [15:0] quad_pedestal = 16'd5000, quad_start = 16'd15000, max_step = 16'd500, quad_ref;
  logic [1:0] tab_wr_en = 0;
  logic [3:0] tab_wr_addr = 0;
  logic [15:0] tab_wr_data = 0;
  int checks = 0, failures = 0, slew_violations = 0;
  logic [15:0] last_ref;

  tune_quad_loop #(.NBINS(NB), .NH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int ramp(input int k);
    return 20000 + 100 * k;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if ((quad_ref > last_ref && quad_ref - last_ref > max_step) ||
        (quad_ref < last_ref && last_ref - quad_ref > max_step)) slew_violations++;
    last_ref <= quad_ref;
  end

  task automatic ticks(input int n);
    repeat (n) begin
      @(negedge clk) turn_tick = 1;
      @(negedge clk) turn_tick = 0;
    end
  endtask

  task automatic strobe(input int k, input int m);
    @(negedge clk) bin_idx = 4'(k); meas = 16'(m);
    repeat (2) @(negedge clk);
    bin_strobe = 1;
    @(negedge clk) bin_strobe = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    last_ref = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NB; k++) begin
      @(negedge clk) tab_wr_en = 2'b01; tab_wr_addr = 4'(k); tab_wr_data = 16'd1000;
      @(negedge clk) tab_wr_en = 2'b10; tab_wr_data = 16'(ramp(k));
    end
    @(negedge clk) tab_wr_en = 0;
    wait (!s2s_busy);
    ticks(5);
    check(quad_ref == 16'd2500, $sformatf("slewing to pedestal %0d", quad_ref));
    ticks(10);
    check(quad_ref == quad_pedestal, "pedestal in no-beam period");
    state = ST_RESET;
    for (int n = 1; n <= 24; n++) begin
      ticks(1);
      check(quad_ref == 16'((5000 + 500 * n > 15000) ? 15000 : 5000 + 500 * n),
            $sformatf("reset ramp turn %0d: %0d", n, quad_ref));
    end
    ticks(6);
    check(quad_ref == quad_start, $sformatf("start current in reset %0d", quad_ref));
    // spill 1: feed-forward only
    max_step = 16'hffff;
    state = ST_SPILL;
    @(negedge clk) spill_start = 1; @(negedge clk) spill_start = 0;
    for (int k = 0; k < 4; k++) begin
      strobe(k, 1000);
      ticks(1);
      check(quad_ref == 16'(ramp(k)), $sformatf("ramp bin %0d: %0d", k, quad_ref));
    end
    // PID: kp = 1.0, measured spill 300 below the reference
    gains.kp = 16'sd256;
    strobe(4, 700);
    check(err == 16'sd300, "error = reference - measurement");
    ticks(1);
    check(quad_ref == 16'(ramp(4) + 300), $sformatf("PID correction %0d", quad_ref));
    // proportional action for random gains and errors (integral and derivative off)
    for (int i = 0; i < 20; i++) begin
      int kp, m;
      kp = $urandom_range(0, 1024);
      m = $urandom_range(0, 2000);
      gains.kp = 16'(kp);
      strobe(4, m);
      ticks(1);
      check(int'(quad_ref) == ramp(4) + ((kp * (1000 - m)) >>> 8),
            $sformatf("P kp=%0d err=%0d: %0d", kp, 1000 - m, quad_ref));
    end
    gains.kp = 0;
    // spill-to-spill: learn a +250 error in every bin of spill 2
    state = ST_RESET; ticks(2); state = ST_SPILL;
    learn = 1;
    @(negedge clk) spill_start = 1; @(negedge clk) spill_start = 0;
    for (int k = 0; k < NB; k++) strobe(k, 750);
    learn = 0;
    state = ST_RESET; ticks(2); state = ST_SPILL;
    @(negedge clk) spill_start = 1; @(negedge clk) spill_start = 0;
    repeat (6) @(negedge clk);
    @(negedge clk) bin_idx = 0;
    repeat (3) @(negedge clk);
    ticks(1);
    check(quad_ref == 16'(ramp(0) + 250), $sformatf("learned correction bin 0: %0d", quad_ref));
    strobe(0, 1000);
    @(negedge clk) bin_idx = 1;
    repeat (3) @(negedge clk);
    ticks(1);
    check(quad_ref == 16'(ramp(1) + 250), $sformatf("learned correction bin 1: %0d", quad_ref));
    // LMS: with a constant error the harmonic weights grow and move the output
    lms_en = 1;
    for (int k = 1; k < 9; k++) begin
      strobe(k, 0);
      ticks(40);
    end
    check(quad_ref != 16'(ramp(8) + 250), $sformatf("LMS output acts (%0d)", quad_ref));
    lms_en = 0;
    // no beam: back to the pedestal, slew-limited
    max_step = 16'd500;
    state = ST_NO_BEAM;
    ticks(100);
    check(quad_ref == quad_pedestal, "back to pedestal");
    check(slew_violations == 0, $sformatf("slew violations %0d", slew_violations));
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
