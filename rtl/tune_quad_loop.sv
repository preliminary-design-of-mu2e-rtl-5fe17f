// tune_quad_loop: the Tune Quad Control Loop, the main regulation of the slow
// extraction through the reference of the three tune-ramp quadrupoles.
//
// Once per bin of the spill (bin_strobe) the error between the spill-rate
// reference of that bin and the measured spill drives three processing
// elements, whose outputs are added to the host-loaded quad ramp of the bin
// (the feed-forward that sets the average spill shape):
//   - a PID controller (pid_controller), cleared outside spills;
//   - an adaptive filter (adaptive_filter) fed with n x 60 Hz references
//     (harmonic_references, stepped every turn, phase-reset at cycle_start),
//     which cancels mains ripple;
//   - a spill-to-spill filter with phase correction (spill_to_spill_filter).
// The sum, clamped to 0..65535, is the target current during a spill. During
// the reset period the target is quad_start (near the extraction resonance),
// in the no-beam period quad_pedestal (the low-power pedestal). A slew
// limiter stepped every turn turns the target into quad_ref, so the current
// never changes faster than max_step per turn (the 16,000 A/s limit). The same
// reference drives the three daisy-chained supplies. Tables are written by the
// host: tab_wr_en[0] the spill-rate reference, tab_wr_en[1] the ramp.
// Structure follows the loop's block diagram; the fixed-point formats, the
// feed-forward ramp table and the per-turn slew limiting are this design's
// choices.
module tune_quad_loop
  import srs_pkg::*;
#(
  parameter int unsigned NBINS = BINS,
  parameter int unsigned NH    = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  srs_state_t               state,
  input  logic                     cycle_start,
  input  logic                     turn_tick,
  input  logic                     spill_start,
  input  logic                     bin_strobe,
  input  logic [$clog2(NBINS)-1:0] bin_idx,
  input  sample_t                  meas,
  input  pid_gains_t               gains,
  input  s2s_cfg_t                 s2s_cfg,
  input  logic                     learn,
  input  logic                     s2s_clear,
  input  logic                     lms_en,
  input  logic [4:0]               lms_mu_shift,
  input  logic [31:0]              inc60,
  input  logic [15:0]              quad_pedestal,
  input  logic [15:0]              quad_start,
  input  logic [15:0]              max_step,
  input  logic [1:0]               tab_wr_en,
  input  logic [$clog2(NBINS)-1:0] tab_wr_addr,
  input  logic [15:0]              tab_wr_data,
  output logic [15:0]              quad_ref,
  output sample_t                  err,
  output logic                     s2s_busy
);
  logic [15:0]  ref_rate, ramp, target;
  sample_t      pid_u, lms_y, s2s_c;
  sample_t      ref_sin [NH];
  sample_t      ref_cos [NH];
  logic         spilling, upd;
  logic signed [19:0] cmd;

  always_comb begin
    spilling = (state == ST_SPILL);
    upd      = bin_strobe & spilling;
    err      = sat16(48'($signed(ref_rate)) - 48'(meas));
    cmd      = 20'($signed({1'b0, ramp})) + 20'(pid_u) + 20'(lms_y) + 20'(s2s_c);
  end

  reference_table #(.DEPTH(NBINS), .W(16)) u_rate_ref (
    .clk, .wr_en(tab_wr_en[0]), .wr_addr(tab_wr_addr), .wr_data(tab_wr_data),
    .rd_addr(bin_idx), .rd_data(ref_rate));

  reference_table #(.DEPTH(NBINS), .W(16)) u_ramp (
    .clk, .wr_en(tab_wr_en[1]), .wr_addr(tab_wr_addr), .wr_data(tab_wr_data),
    .rd_addr(bin_idx), .rd_data(ramp));

  pid_controller u_pid (
    .clk, .rst_n, .clear(!spilling), .update(upd), .err, .gains, .u(pid_u));

  harmonic_references #(.NH(NH)) u_harm (
    .clk, .rst_n, .step(turn_tick), .sync(cycle_start), .inc60, .ref_sin, .ref_cos);

  adaptive_filter #(.NH(NH)) u_lms (
    .clk, .rst_n, .clear(1'b0), .update(upd), .adapt_en(lms_en), .mu_shift(lms_mu_shift),
    .err, .ref_sin, .ref_cos, .y(lms_y));

  spill_to_spill_filter #(.NBINS(NBINS)) u_s2s (
    .clk, .rst_n, .clear(s2s_clear), .spill_start, .bin_strobe(upd), .bin_idx, .err,
    .learn, .cfg(s2s_cfg), .corr(s2s_c), .busy(s2s_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) target <= '0;
    else unique case (state)
      ST_SPILL: target <= (cmd < 0) ? 16'h0000 : (cmd > 20'sd65535) ? 16'hffff : cmd[15:0];
      ST_RESET: target <= quad_start;
      default:  target <= quad_pedestal;
    endcase
  end

  slew_limiter u_slew (.clk, .rst_n, .step(turn_tick), .target, .max_step, .y(quad_ref));
endmodule
