// tb_hs_dac_tx: drives random samples on the 8 channels every clk and checks
// on the clk2x buses that each DAC gets channel 2n (dac_sel low, on the clk2x
// edge half-way through the clk period) then channel 2n+1 (dac_sel high, on
// the next clk edge) of the samples captured at the start of the period, in
// offset binary.
module tb_hs_dac_tx;
  logic clk = 0, clk2x = 0, rst_n = 0;
  logic signed [13:0] ch [8];
  logic [13:0] dac_data [4];
  logic dac_sel;
  int checks = 0, failures = 0;

  hs_dac_tx #(.N_DAC(4), .W(14)) dut (.*);
  always #5 clk2x = ~clk2x;
  always @(posedge clk2x) clk <= ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic logic [13:0] ob(input logic signed [13:0] v);
    return {~v[13], v[12:0]};
  endfunction

  initial begin
    logic signed [13:0] cur [8];
    foreach (ch[i]) ch[i] = '0;
    repeat (4) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      foreach (ch[i]) ch[i] = 14'($urandom);
      foreach (cur[i]) cur[i] = ch[i];
      @(posedge clk);          // samples captured
      @(posedge clk2x); #1;    // half-way through the clk period: A words
      check(dac_sel == 1'b0, "A phase");
      for (int d = 0; d < 4; d++) check(dac_data[d] == ob(cur[2*d]), $sformatf("n=%0d dac%0d A", n, d));
      @(posedge clk2x); #1;    // with the next clk edge: B words
      check(dac_sel == 1'b1, "B phase");
      for (int d = 0; d < 4; d++) check(dac_data[d] == ob(cur[2*d+1]), $sformatf("n=%0d dac%0d B", n, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk2x);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
