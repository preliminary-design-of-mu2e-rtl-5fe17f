// tb_filter_integrate: feeds random samples (a valid sample on two clocks of
// three) and a turn tick every 40 clocks; the per-turn output must equal the
// sum of (sample - baseline) over the turn, shifted right by 3 and saturated,
// as computed by the testbench.
module tb_filter_integrate;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0, sample_valid = 0, turn_tick = 0, out_valid;
  sample_t sample = '0, baseline, turn_sum;
  int checks = 0, failures = 0, outs = 0;
  longint acc = 0, expq[$];

  filter_integrate #(.SHIFT(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic longint sat(input longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    outs++;
    check(expq.size() > 0 && turn_sum == 16'(expq.pop_front()), $sformatf("turn sum %0d", turn_sum));
  end

  initial begin
    baseline = 16'sd100;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        sample_valid = (i % 3 != 2);
        sample = (t < 10) ? sample_t'($urandom_range(0, 2000)) : (t < 20) ? sample_t'($urandom) : 16'sh7fff;
        turn_tick = (i == 39);
        if (turn_tick) begin
          expq.push_back(sat(acc >>> 3));
          acc = sample_valid ? longint'(sample) - 100 : 0;
        end else if (sample_valid) acc += longint'(sample) - 100;
      end
    end
    @(negedge clk) turn_tick = 0; sample_valid = 0;
    repeat (3) @(negedge clk);
    check(outs == 30, $sformatf("outputs %0d", outs));
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
