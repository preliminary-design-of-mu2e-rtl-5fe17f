// tb_daq_sampler: self-checking test of the raw-data capture.
//
// A generator presents a new set of 16 channel samples every 4 clocks (each
// sample encodes its channel and a running index, so every word can be traced
// back). A sink drives st_ready, either always high or randomly. The test
// runs several captures: immediate start with no back-pressure, which must
// deliver exactly `length` words, in order and with st_last on the final one
// only; a capture armed to wait for a spill start, which must not begin before
// it; captures under random back-pressure, where every word that arrives must
// be a correct, increasing sample pair, words plus drops must equal the
// length and overflow must be set exactly when something was dropped; and an
// stop. done and count are checked at the end of each capture. A watchdog
// ends the run if it hangs.
module tb_daq_sampler;
  localparam int CH = 16;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] sample [CH];
  logic sample_valid = 0;
  logic [3:0] sel_a = 0, sel_b = 0;
  logic [31:0] length = 0;
  logic on_spill = 0, spill_start = 0, arm = 0, stop = 0;
  logic [31:0] st_data;
  logic st_valid, st_last, st_ready = 1;
  logic busy, waiting, done, overflow;
  logic [31:0] count;

  daq_sampler #(.CH(CH), .W(16)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample generator: index n, channel c -> {c[3:0], n[11:0]}
  int n = 0;
  int phase = 0;
  always @(posedge clk) begin
    sample_valid <= 1'b0;
    if (rst_n) begin
      phase <= (phase + 1) % 4;
      if (phase == 0) begin
        n <= n + 1;
        for (int c = 0; c < CH; c++) sample[c] <= 16'({c[3:0], 12'(n)});
        sample_valid <= 1'b1;
      end
    end
  end

  bit random_ready = 0;
  always @(negedge clk) st_ready = random_ready ? ($urandom_range(0, 3) == 0) : 1'b1;

  // sink
  int words = 0, lasts = 0, last_idx = -1;
  bit order_ok = 1, last_pos_ok = 1;
  always @(posedge clk) if (rst_n && st_valid && st_ready) begin
    int ia, ib;
    words <= words + 1;
    ia = int'(st_data[11:0]);
    ib = int'(st_data[27:16]);
    if (st_data[15:12] != sel_a || st_data[31:28] != sel_b || ia != ib) order_ok = 0;
    if (last_idx >= 0 && ((ia - last_idx) & 12'hfff) == 0) order_ok = 0;
    last_idx = ia;
    if (st_last) lasts <= lasts + 1;
    if (st_last && words + 1 > int'(length)) last_pos_ok = 0;
  end

  task automatic do_arm();
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
  endtask

  task automatic run(input int len, input bit rnd, input bit spill, output int got);
    int t0;
    length = len; random_ready = rnd; on_spill = spill;
    sel_a = 4'($urandom); sel_b = 4'($urandom);
    words = 0; lasts = 0; last_idx = -1; order_ok = 1; last_pos_ok = 1;
    do_arm();
    if (spill) begin
      repeat (50) @(posedge clk);
      check(waiting && !busy && words == 0, "waits for the spill start");
      @(negedge clk) spill_start = 1;
      @(negedge clk) spill_start = 0;
    end
    t0 = 0;
    while (!done && t0 < 100000) begin @(posedge clk); t0++; end
    repeat (8) @(posedge clk);
    check(done, "done");
    check(!busy && !waiting, "idle after capture");
    check(count == 32'(len), $sformatf("count %0d of %0d", count, len));
    check(order_ok, "sample pairs in order and from the selected channels");
    check(lasts == 1, "one last");
    check(last_pos_ok, "last on the final word");
    got = words;
  endtask

  initial begin
    int got;
    for (int c = 0; c < CH; c++) sample[c] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(!busy && !done && !st_valid, "idle after reset");

    // no back-pressure: every word delivered
    for (int k = 0; k < 6; k++) begin
      run(1 + $urandom_range(0, 300), 0, k % 2, got);
      check(got == int'(length), $sformatf("words %0d of %0d", got, length));
      check(!overflow, "no overflow without back-pressure");
      check(lasts == 1, "exactly one last");
    end

    // random back-pressure: drops are flagged
    for (int k = 0; k < 6; k++) begin
      run(200 + $urandom_range(0, 300), 1, 0, got);
      check(got <= int'(length), "no extra words");
      check(overflow == (got < int'(length)), "overflow flags dropped pairs");
    end

    // stop stops a capture
    length = 1000; on_spill = 0; random_ready = 0;
    do_arm();
    repeat (200) @(posedge clk);
    check(busy, "capturing");
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    repeat (20) @(posedge clk);
    check(!busy && !done, "aborted");
    begin
      int w0;
      w0 = words;
      repeat (100) @(posedge clk);
      check(words == w0, "no words after stop");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
