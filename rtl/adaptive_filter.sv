// adaptive_filter: LMS canceller of the 60 Hz harmonics in the spill.
//
// For each of NH harmonics the filter holds two weights, for the sine and the
// cosine reference. Its output is the weighted sum
//   y = sat16( sum_k (ws_k * sin_k + wc_k * cos_k) >>> (15 + WF) )
// recomputed every clock and registered. On every update pulse with
// adapt_en set the weights follow the least-mean-squares rule
//   w <- sat(w + (err * ref) >>> mu_shift)
// so each harmonic of the error is integrated into a sinusoid of matching
// amplitude and phase that the loop adds to its output. clear zeroes the
// weights. Weights are WW bits with WF fraction bits. The LMS algorithm, the
// formats and the step size control are this design's choices.
module adaptive_filter
  import srs_pkg::*;
#(
  parameter int unsigned NH = 4,
  parameter int unsigned WW = 24,
  parameter int unsigned WF = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       update,
  input  logic       adapt_en,
  input  logic [4:0] mu_shift,
  input  sample_t    err,
  input  sample_t    ref_sin [NH],
  input  sample_t    ref_cos [NH],
  output sample_t    y
);
  localparam logic signed [WW:0] WMAX = (WW+1)'((2 ** (WW - 1)) - 1);
  localparam logic signed [WW:0] WMIN = -(WW+1)'(2 ** (WW - 1));

  logic signed [WW-1:0] ws [NH];
  logic signed [WW-1:0] wc [NH];
  logic signed [47:0]   sum;

  function automatic logic signed [WW-1:0] step_w(input logic signed [WW-1:0] w,
                                                  input sample_t e, input sample_t r,
                                                  input logic [4:0] sh);
    logic signed [31:0] p;
    logic signed [WW:0] n;
    p = 32'(e) * 32'(r);
    n = (WW+1)'(w) + (WW+1)'(p >>> sh);
    if (n > WMAX)      return WMAX[WW-1:0];
    else if (n < WMIN) return WMIN[WW-1:0];
    else               return n[WW-1:0];
  endfunction

  always_comb begin
    sum = '0;
    for (int k = 0; k < NH; k++)
      sum = sum + 48'(ws[k]) * 48'(ref_sin[k]) + 48'(wc[k]) * 48'(ref_cos[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) begin
        ws[k] <= '0;
        wc[k] <= '0;
      end
      y <= '0;
    end else begin
      y <= sat16(sum >>> (15 + WF));
      if (clear) begin
        for (int k = 0; k < NH; k++) begin
          ws[k] <= '0;
          wc[k] <= '0;
        end
      end else if (update && adapt_en) begin
        for (int k = 0; k < NH; k++) begin
          ws[k] <= step_w(ws[k], err, ref_sin[k], mu_shift);
          wc[k] <= step_w(wc[k], err, ref_cos[k], mu_shift);
        end
      end
    end
  end
endmodule
