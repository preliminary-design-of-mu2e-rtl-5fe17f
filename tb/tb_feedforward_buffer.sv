// tb_feedforward_buffer: writes one cycle of 4 spills x 8 bins of random
// measurements through bin_strobe, reads every word back by {spill, bin}
// address, and checks the buffer-full flag (set by cycle_done, cleared by
// ack).
module tb_feedforward_buffer;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0, bin_strobe = 0, cycle_done = 0, ack = 0, full;
  logic [1:0] spill_idx = 0;
  logic [2:0] bin_idx = 0;
  logic [4:0] rd_addr = 0;
  sample_t meas = '0, rd_data;
  sample_t model [32];
  int checks = 0, failures = 0;

  feedforward_buffer #(.N_SPILLS(4), .NBINS(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 8; b++) begin
        @(negedge clk) bin_strobe = 1; spill_idx = 2'(s); bin_idx = 3'(b); meas = 16'($urandom);
        model[s * 8 + b] = meas;
        @(negedge clk) bin_strobe = 0; meas = 16'($urandom);  // not written
        check(!full, "not full during the cycle");
      end
    @(negedge clk) cycle_done = 1;
    @(negedge clk) cycle_done = 0;
    check(full, "full after the last spill");
    for (int a = 31; a >= 0; a--) begin
      @(negedge clk) rd_addr = 5'(a);
      @(negedge clk) check(rd_data == model[a], $sformatf("addr %0d", a));
    end
    check(full, "full until acknowledged");
    @(negedge clk) ack = 1; @(negedge clk) ack = 0;
    check(!full, "ack clears full");
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
