// rfko_loop: the RFKO Control Loop, which fine-tunes the extraction by
// regulating the amplitude of the RF knock-out excitation.
//
// Once per bin of the spill the error between the bin's spill-rate reference
// (a host-loaded table) and the measured spill updates a PID controller and a
// spill-to-spill filter with phase correction; their sum, clamped to
// 0..32767, is the amplitude alpha. The excitation f(x) from the FM signal
// generator is multiplied by alpha: rf_out = (alpha * f) >>> 17, a signed
// 14-bit word for the high-speed DACs that feed the two power amplifiers of
// the stripline plates. During reset and no-beam periods the loop is
// disabled: alpha is 0 and the PID is cleared. alpha and rf_out are
// registered (rf_out one clock after alpha). Structure follows the loop's
// block diagram; the formats are this design's choices.
module rfko_loop
  import srs_pkg::*;
#(
  parameter int unsigned NBINS = BINS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  srs_state_t               state,
  input  logic                     spill_start,
  input  logic                     bin_strobe,
  input  logic [$clog2(NBINS)-1:0] bin_idx,
  input  sample_t                  meas,
  input  pid_gains_t               gains,
  input  s2s_cfg_t                 s2s_cfg,
  input  logic                     learn,
  input  logic                     s2s_clear,
  input  logic                     tab_wr_en,
  input  logic [$clog2(NBINS)-1:0] tab_wr_addr,
  input  logic [15:0]              tab_wr_data,
  input  sample_t                  f_in,
  output logic [15:0]              alpha,
  output logic signed [13:0]       rf_out,
  output sample_t                  err,
  output logic                     s2s_busy
);
  logic [15:0]        ref_rate;
  sample_t            pid_u, s2s_c;
  logic               spilling, upd;
  logic signed [16:0] a_sum;
  logic signed [32:0] prod;

  always_comb begin
    spilling = (state == ST_SPILL);
    upd      = bin_strobe & spilling;
    err      = sat16(48'($signed(ref_rate)) - 48'(meas));
    a_sum    = 17'(pid_u) + 17'(s2s_c);
    prod     = 33'($signed({1'b0, alpha})) * 33'(f_in);
  end

  reference_table #(.DEPTH(NBINS), .W(16)) u_rate_ref (
    .clk, .wr_en(tab_wr_en), .wr_addr(tab_wr_addr), .wr_data(tab_wr_data),
    .rd_addr(bin_idx), .rd_data(ref_rate));

  pid_controller u_pid (
    .clk, .rst_n, .clear(!spilling), .update(upd), .err, .gains, .u(pid_u));

  spill_to_spill_filter #(.NBINS(NBINS)) u_s2s (
    .clk, .rst_n, .clear(s2s_clear), .spill_start, .bin_strobe(upd), .bin_idx, .err,
    .learn, .cfg(s2s_cfg), .corr(s2s_c), .busy(s2s_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha  <= '0;
      rf_out <= '0;
    end else begin
      if (!spilling)          alpha <= '0;
      else if (a_sum < 0)     alpha <= '0;
      else if (a_sum > 32767) alpha <= 16'd32767;
      else                    alpha <= a_sum[15:0];
      rf_out <= 14'(prod >>> 17);
    end
  end
endmodule
