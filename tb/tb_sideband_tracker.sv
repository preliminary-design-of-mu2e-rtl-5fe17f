// tb_sideband_tracker: self-checking test of the carrier tracking.
//
// Drives random base increments, quad currents, reference currents and
// gains, including the extremes that saturate the correction, and compares
// the registered carrier increment, one clock later, with a model computed
// in 64-bit integers: base + clamp((quad - ref) * gain, -2^31, 2^31-1),
// modulo 2^32. A watchdog ends the run if it hangs.
module tb_sideband_tracker;
  logic clk = 0, rst_n = 0;
  logic [31:0] base_inc;
  logic [15:0] quad_ref, ref_current;
  logic signed [15:0] gain;
  logic [31:0] carrier_inc;

  sideband_tracker dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input logic [31:0] b, input logic [15:0] q,
                                        input logic [15:0] r, input logic signed [15:0] g);
    longint d, p;
    d = longint'(q) - longint'(r);
    p = d * longint'(g);
    if (p > 64'sd2147483647) p = 64'sd2147483647;
    if (p < -64'sd2147483648) p = -64'sd2147483648;
    return b + 32'(p);
  endfunction

  initial begin
    logic [31:0] exp;
    base_inc = 0; quad_ref = 0; ref_current = 0; gain = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (carrier_inc !== 32'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      base_inc = $urandom;
      unique case (i % 4)
        0: begin quad_ref = 16'($urandom); ref_current = 16'($urandom); gain = 16'($urandom); end
        1: begin quad_ref = 16'hffff; ref_current = 0; gain = (i % 8 == 1) ? 16'sh7fff : -16'sd32768; end
        2: begin quad_ref = 16'($urandom_range(30000, 34000)); ref_current = 16'd32000;
                 gain = 16'($urandom_range(0, 400)) - 16'sd200; end
        default: begin quad_ref = ref_current; gain = 16'($urandom); end
      endcase
      exp = model(base_inc, quad_ref, ref_current, gain);
      @(posedge clk); #1;
      checks++;
      if (carrier_inc !== exp) begin
        failures++;
        $display("FAIL base=%h q=%0d r=%0d g=%0d got %h exp %h", base_inc, quad_ref,
                 ref_current, gain, carrier_inc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
