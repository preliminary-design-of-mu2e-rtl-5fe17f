// tb_sine_lut: compares every table entry with 32767*sin(2*pi*i/1024)
// computed by the simulator (tolerance 1 LSB) and checks the quarter points.
module tb_sine_lut;
  logic [9:0] phase;
  logic signed [15:0] value;
  int checks = 0, failures = 0;
  sine_lut #(.AW(10), .W(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      int e;
      phase = 10'(i);
      #1;
      e = $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * i / 1024.0) + 0.5));
      check(value - e <= 1 && e - value <= 1, $sformatf("i=%0d %0d exp %0d", i, value, e));
    end
    phase = 10'd256; #1 check(value == 16'sd32767, "peak");
    phase = 10'd768; #1 check(value == -16'sd32767, "trough");
    phase = 10'd0;   #1 check(value == 16'sd0, "zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
