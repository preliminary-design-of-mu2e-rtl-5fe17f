// tb_spi_dac_tx: decodes the SPI stream (bits sampled on rising sclk while
// cs_n is low) and checks each 24-bit frame: command, channel in round-robin
// order and the channel's value. Also checks the sclk period (2*CLK_DIV
// clocks), the frame length and that values changed by the driver appear in
// later frames.
module tb_spi_dac_tx;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [15:0] value [4];
  logic sclk, mosi, cs_n, frame_done;
  int checks = 0, failures = 0, frames = 0, nbits = 0, exp_ch = 0;
  int last_rise = 0, cyc = 0, fdone = 0;
  logic [23:0] word;

  spi_dac_tx #(.N_CH(4), .CLK_DIV(2), .GAP(4), .CMD(4'h3)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && frame_done) fdone++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge sclk) if (rst_n) begin
    check(!cs_n, "sclk only while selected");
    if (nbits > 0) check(cyc - last_rise == 4, $sformatf("sclk period %0d", cyc - last_rise));
    last_rise = cyc;
    word = {word[22:0], mosi};
    nbits++;
  end

  always @(posedge cs_n) if (rst_n && frames >= 0) begin
    if (nbits != 0) begin
      check(nbits == 24, $sformatf("frame of %0d bits", nbits));
      check(word[23:20] == 4'h3, "command");
      check(word[17:16] == 2'(exp_ch), $sformatf("channel %0d exp %0d", word[17:16], exp_ch));
      check(word[15:0] == value[exp_ch], $sformatf("value %h exp %h", word[15:0], value[exp_ch]));
      exp_ch = (exp_ch + 1) % 4;
      frames++;
    end
    nbits = 0;
  end

  initial begin
    foreach (value[i]) value[i] = 16'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk) enable = 1;
    wait (frames == 8);
    // change values between frames: a frame captures its value at its start
    @(posedge cs_n);
    #1;
    foreach (value[i]) value[i] = 16'($urandom);
    wait (frames == 20);
    @(negedge clk) enable = 0;
    repeat (200) @(negedge clk);
    check(frames == 21 || frames == 20, $sformatf("stops when disabled (%0d)", frames));
    check(fdone == frames, "frame_done per frame");
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
