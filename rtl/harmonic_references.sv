// harmonic_references: sine and cosine references at n x 60 Hz for the
// adaptive filter that cancels mains harmonics in the spill.
//
// Harmonic k (k = 1..NH) has its own 32-bit phase accumulator that advances by
// k * inc60 on every step pulse; inc60 is 2^32 * 60 Hz / (step rate). sync
// (given at every cycle start, which is tied to the mains like the rest of
// the accelerator timeline) returns all phases to zero so that the
// references start every cycle with the same phase. The top 10 phase bits
// address sine tables; cosine uses the phase plus a quarter turn. Outputs
// change one clock after step. The number of harmonics is this design's
// choice.
module harmonic_references
  import srs_pkg::*;
#(
  parameter int unsigned NH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  input  logic        sync,
  input  logic [31:0] inc60,
  output sample_t     ref_sin [NH],
  output sample_t     ref_cos [NH]
);
  logic [31:0] phase [NH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) phase[k] <= '0;
    end else if (sync) begin
      for (int k = 0; k < NH; k++) phase[k] <= '0;
    end else if (step) begin
      for (int k = 0; k < NH; k++) phase[k] <= phase[k] + inc60 * 32'(k + 1);
    end
  end

  for (genvar k = 0; k < NH; k++) begin : g_h
    logic [9:0] ps, pc;
    always_comb begin
      ps = phase[k][31:22];
      pc = ps + 10'd256;
    end
    sine_lut #(.AW(10), .W(16)) u_sin (.phase(ps), .value(ref_sin[k]));
    sine_lut #(.AW(10), .W(16)) u_cos (.phase(pc), .value(ref_cos[k]));
  end
endmodule
