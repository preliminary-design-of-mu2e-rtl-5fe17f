// tb_adc_receiver: sends random 16-bit words on 4 serial lanes, MSB first
// with the frame pulse on the first bit, and checks that every word comes out
// in parallel with sample_valid one clock after its last bit. A frame pulse
// that arrives early must set frame_err, and clear_err must clear it.
module tb_adc_receiver;
  localparam int CH = 4, W = 16;
  logic clk = 0, rst_n = 0, frame = 0, clear_err = 0;
  logic [CH-1:0] sdata = '0;
  logic signed [W-1:0] sample [CH];
  logic sample_valid, frame_err;
  int checks = 0, failures = 0, words = 0, got = 0;
  logic [W-1:0] sent [CH];
  logic [CH-1:0][W-1:0] expq [$];

  adc_receiver #(.CH(CH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic send_word(input int nbits);
    for (int c = 0; c < CH; c++) sent[c] = W'($urandom);
    for (int b = 0; b < nbits; b++) begin
      @(negedge clk);
      frame = (b == 0);
      for (int c = 0; c < CH; c++) sdata[c] = sent[c][W-1-b];
    end
    if (nbits == W) begin
      logic [CH-1:0][W-1:0] p;
      for (int c = 0; c < CH; c++) p[c] = sent[c];
      expq.push_back(p);
    end
  endtask

  always @(posedge clk) if (rst_n && sample_valid) begin
    logic [CH-1:0][W-1:0] e;
    got++;
    check(expq.size() > 0, "word expected");
    e = expq.pop_front();
    for (int c = 0; c < CH; c++)
      check(sample[c] == e[c], $sformatf("ch%0d got %h sent %h", c, sample[c], e[c]));
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) send_word(W);
    @(negedge clk) frame = 0;
    @(negedge clk);
    check(got == 20, $sformatf("words received %0d", got));
    check(!frame_err, "no frame error on aligned words");
    send_word(W); send_word(5); send_word(W);  // early frame pulse
    @(negedge clk) frame = 0;
    check(frame_err, "frame error on a short word");
    @(negedge clk) clear_err = 1; @(negedge clk) clear_err = 0;
    check(!frame_err, "frame error cleared");
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
