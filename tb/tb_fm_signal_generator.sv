// tb_fm_signal_generator: models the phase accumulator of each mode in the
// testbench (carrier, repeating linear chirp, LFSR noise coloured by a
// first-order low-pass) and compares the output every clock with
// 32767*sin(2*pi*phase/2^32) on a 1024-point grid (tolerance 1 LSB). With
// enable low the output must be zero. Also counts chirp wraps.
module tb_fm_signal_generator;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0;
  fm_mode_t mode;
  logic [31:0] carrier_inc, span_inc, sweep_step;
  logic [3:0] noise_shift;
  sample_t f_out;
  int checks = 0, failures = 0, wraps = 0;
  longint unsigned phase;
  longint sweep, nf;
  logic [31:0] lfsr;

  fm_signal_generator dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int expect_sin(input longint unsigned p);
    return $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * real'(p >> 22) / 1024.0) + 0.5));
  endfunction

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      longint off, span;
      span = longint'(span_inc);
      unique case (mode)
        FM_CHIRP: off = sweep;
        FM_NOISE: off = ((nf >>> 16) * span) >>> 15;
        default:  off = 0;
      endcase
      @(negedge clk);
      check(int'(f_out) == expect_sin(phase), $sformatf("mode %0d i=%0d f=%0d exp %0d", mode, i, f_out, expect_sin(phase)));
      phase = (phase + carrier_inc + longint'(off)) & 64'hffff_ffff;
      nf = nf + ((longint'($signed({lfsr[15:0], 16'h0})) - nf) >>> noise_shift);
      lfsr = {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      if (sweep + longint'(sweep_step) > span) begin sweep = -span; wraps++; end
      else sweep = sweep + longint'(sweep_step);
    end
  endtask

  initial begin
    mode = FM_CARRIER; carrier_inc = 32'd12_800_000; span_inc = 32'd2_000_000;
    sweep_step = 32'd20_000; noise_shift = 4'd3;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(f_out == 0, "disabled output is zero");
    @(negedge clk) enable = 1;
    phase = 0; sweep = -longint'(span_inc); nf = 0; lfsr = 32'h1;
    run(500);
    mode = FM_CHIRP;
    run(1000);
    check(wraps >= 4, $sformatf("chirp repeats (%0d)", wraps));
    mode = FM_NOISE;
    run(1000);
    @(negedge clk) enable = 0;
    @(negedge clk);
    check(f_out == 0, "disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
