// tb_reference_table: writes random values to every word, reads them back
// (one clock of latency) and checks a write and a read in the same clock.
module tb_reference_table;
  localparam int D = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic [15:0] model [D];
  int checks = 0, failures = 0;

  reference_table #(.DEPTH(D), .W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk) wr_en = 1; wr_addr = 6'(i); wr_data = 16'($urandom); model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int i = D - 1; i >= 0; i--) begin
      @(negedge clk) rd_addr = 6'(i);
      @(negedge clk) check(rd_data == model[i], $sformatf("addr %0d", i));
    end
    @(negedge clk) wr_en = 1; wr_addr = 6'd5; wr_data = 16'hbeef; rd_addr = 6'd9;
    @(negedge clk) wr_en = 0; check(rd_data == model[9], "read while writing elsewhere");
    rd_addr = 6'd5;
    @(negedge clk) check(rd_data == 16'hbeef, "new value");
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
