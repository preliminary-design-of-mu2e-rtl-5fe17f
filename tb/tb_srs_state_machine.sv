// tb_srs_state_machine: runs the sequencer through two short cycles
// (3 spills, 5-turn reset, 10-turn spill, 4 turns per bin) with a turn tick
// every 3 clocks. An independent model predicts the state, spill index and
// bin strobes turn by turn; the test also checks that a cycle_start during a
// cycle is ignored and that clearing enable stops the cycle.
module tb_srs_state_machine;
  import srs_pkg::*;
  localparam int SP = 3, RT = 5, ST = 10, TPB = 4, NB = 4;
  logic clk = 0, rst_n = 0, enable = 0, cycle_start = 0, turn_tick = 0;
  srs_state_t state;
  logic [1:0] spill_idx, bin_idx;
  logic [15:0] period_turn;
  logic bin_strobe, spill_start, spill_end, cycle_done;
  int checks = 0, failures = 0, strobes = 0, starts = 0, ends = 0, dones = 0;
  int exp_bin = 0;

  srs_state_machine #(.SPILLS(SP), .RESET_T(RT), .SPILL_T(ST), .TPB(TPB), .NBINS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (bin_strobe) begin
      strobes++;
      check(bin_idx == 2'(exp_bin), $sformatf("bin_idx %0d exp %0d", bin_idx, exp_bin));
      exp_bin++;
    end
    if (spill_start) begin starts++; exp_bin = 0; end
    if (spill_end) ends++;
    if (cycle_done) dones++;
  end

  task automatic tick(input srs_state_t exp_state, input int exp_spill);
    @(negedge clk) turn_tick = 1;
    @(negedge clk) turn_tick = 0;
    @(negedge clk);
    check(state == exp_state, $sformatf("state %0d exp %0d", state, exp_state));
    check(spill_idx == 2'(exp_spill), $sformatf("spill %0d exp %0d", spill_idx, exp_spill));
  endtask

  task automatic run_cycle();
    @(negedge clk) cycle_start = 1; @(negedge clk) cycle_start = 0;
    check(state == ST_RESET, "reset period after cycle start");
    for (int s = 0; s < SP; s++) begin
      for (int t = 0; t < RT; t++) tick(t == RT - 1 ? ST_SPILL : ST_RESET, s);
      for (int t = 0; t < ST; t++) begin
        if (t == 4) begin  // a second cycle event inside the cycle is ignored
          @(negedge clk) cycle_start = 1; @(negedge clk) cycle_start = 0;
        end
        tick(t == ST - 1 ? (s == SP - 1 ? ST_NO_BEAM : ST_RESET) : ST_SPILL,
             t == ST - 1 && s != SP - 1 ? s + 1 : s);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; enable = 1;
    tick(ST_NO_BEAM, 0);
    run_cycle();
    check(strobes == SP * 3, $sformatf("bin strobes %0d", strobes));
    check(starts == SP && ends == SP && dones == 1, "spill start/end/cycle done counts");
    for (int t = 0; t < 5; t++) tick(ST_NO_BEAM, SP - 1);  // spill index holds until the next cycle
    run_cycle();
    check(dones == 2 && starts == 2 * SP, "second cycle");
    // disable in the middle of a cycle
    @(negedge clk) cycle_start = 1; @(negedge clk) cycle_start = 0;
    tick(ST_RESET, 0);
    @(negedge clk) enable = 0; @(negedge clk);
    check(state == ST_NO_BEAM, "disable returns to no-beam");
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
