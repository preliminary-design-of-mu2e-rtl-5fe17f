// tb_harmonic_references: steps the references with a random increment and
// compares every harmonic's sine and cosine with sin/cos(2*pi*k*n*inc/2^32)
// computed by the simulator (tolerance: one table step of phase). sync must
// return all references to phase zero.
module tb_harmonic_references;
  import srs_pkg::*;
  localparam int NH = 4;
  logic clk = 0, rst_n = 0, step = 0, sync = 0;
  logic [31:0] inc60;
  sample_t ref_sin [NH];
  sample_t ref_cos [NH];
  int checks = 0, failures = 0;
  longint unsigned ph;

  harmonic_references #(.NH(NH)) dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic compare(input longint unsigned p);
    for (int k = 0; k < NH; k++) begin
      longint unsigned pk;
      real a, es, ec;
      pk = (p * longint'(k + 1)) & 64'hffff_ffff;
      a  = 2.0 * 3.14159265358979 * real'(pk >> 22) / 1024.0;
      es = 32767.0 * $sin(a);
      ec = 32767.0 * $cos(a);
      check(rabs(real'(ref_sin[k]) - es) < 2.0, $sformatf("sin k=%0d %0d exp %f", k + 1, ref_sin[k], es));
      check(rabs(real'(ref_cos[k]) - ec) < 2.0, $sformatf("cos k=%0d %0d exp %f", k + 1, ref_cos[k], ec));
    end
  endtask

  initial begin
    inc60 = 32'd436709;
    repeat (3) @(negedge clk); rst_n = 1;
    ph = 0;
    compare(ph);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      ph = (ph + inc60) & 64'hffff_ffff;
      compare(ph);
    end
    inc60 = $urandom;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      ph = (ph + inc60) & 64'hffff_ffff;
      compare(ph);
    end
    @(negedge clk) sync = 1; @(negedge clk) sync = 0;
    compare(0);
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
