// tb_turn_marker_counter: checks the turn marker counter. Markers three clocks
// wide arrive every 20 clocks; each must give exactly one turn_tick, three
// clocks after its rising edge, and cycle_turns must count them from the last
// cycle_start. A gap longer than MAX_GAP must raise marker_lost, and the next
// marker must clear it.
module tb_turn_marker_counter;
  logic clk = 0, rst_n = 0, turn_marker = 0, cycle_start = 0;
  logic turn_tick, marker_lost;
  logic [23:0] cycle_turns;
  int checks = 0, failures = 0, ticks = 0, rise_cyc = 0, cyc = 0;

  turn_marker_counter #(.CNT_W(24), .MAX_GAP(64)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && turn_tick) begin
    ticks++;
    check(cyc - rise_cyc == 3, $sformatf("tick latency %0d", cyc - rise_cyc));
  end

  task automatic marker();
    @(negedge clk) turn_marker = 1; rise_cyc = cyc;
    repeat (3) @(negedge clk);
    turn_marker = 0;
    repeat (16) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk) cycle_start = 1; @(negedge clk) cycle_start = 0;
    for (int i = 0; i < 10; i++) marker();
    repeat (4) @(negedge clk);
    check(ticks == 10, $sformatf("ticks %0d", ticks));
    check(cycle_turns == 10, $sformatf("cycle_turns %0d", cycle_turns));
    check(!marker_lost, "marker_lost during markers");
    repeat (80) @(negedge clk);
    check(marker_lost, "marker_lost after a long gap");
    marker();
    check(!marker_lost, "marker_lost cleared by a marker");
    check(cycle_turns == 11, "count after gap");
    @(negedge clk) cycle_start = 1; @(negedge clk) cycle_start = 0;
    check(cycle_turns == 0, "cleared by cycle_start");
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
