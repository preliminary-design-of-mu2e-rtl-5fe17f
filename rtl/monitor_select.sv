// monitor_select: chooses the spill measurement the regulation loops use.
//
// Inputs are per-turn values of the Wall Current Monitor (WCM), the
// Extinction Monitor (EM) and the DC current transformer (DCCT), all updated
// together with in_valid. WCM and EM each pass a first-order low-pass filter
// (lpf). The DCCT measures the circulating beam, so its decrease from one
// turn to the next is the extracted rate. mode selects WCM, EM, the mean of
// both, or the DCCT decrease rate; the result is registered with out_valid two
// clocks after in_valid. The mean as the way of combining both monitors is
// this design's choice.
module monitor_select
  import srs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    wcm,
  input  sample_t    em,
  input  sample_t    dcct,
  input  logic       in_valid,
  input  mon_sel_t   mode,
  input  logic [3:0] lpf_shift,
  output sample_t    meas,
  output logic       out_valid
);
  sample_t wcm_f, em_f, dcct_prev, dcct_rate;
  logic    f_valid, wv, ev;

  lpf u_lpf_wcm (.clk, .rst_n, .x(wcm), .in_valid, .shift(lpf_shift), .y(wcm_f), .out_valid(wv));
  lpf u_lpf_em  (.clk, .rst_n, .x(em),  .in_valid, .shift(lpf_shift), .y(em_f),  .out_valid(ev));

  always_comb f_valid = wv & ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcct_prev <= '0;
      dcct_rate <= '0;
      meas      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        dcct_prev <= dcct;
        dcct_rate <= sat16(48'(dcct_prev) - 48'(dcct));
      end
      out_valid <= f_valid;
      if (f_valid) begin
        unique case (mode)
          MON_WCM:  meas <= wcm_f;
          MON_EM:   meas <= em_f;
          MON_BOTH: meas <= sample_t'((17'(wcm_f) + 17'(em_f)) >>> 1);
          MON_DCCT: meas <= dcct_rate;
          default:  meas <= wcm_f;
        endcase
      end
    end
  end
endmodule
