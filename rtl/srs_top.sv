// srs_top: FPGA-fabric firmware of the Mu2e Spill Regulation System (SRS).
//
// The SRS keeps the intensity of the slow-extracted spill from the Delivery
// Ring uniform. It acquires the spill monitors through the high-speed ADCs,
// integrates them per DR turn, selects one as the spill measurement and runs
// two synchronous regulation loops on it: the tune quad loop, which drives the
// current reference of the three tune-ramp quadrupoles through the slow SPI
// DACs, and the RFKO loop, which sets the amplitude of an FM excitation sent
// through the high-speed DACs to the power amplifiers of the RF knock-out
// stripline. A state machine, started by a decoded timing event and kept in
// step by counting turn markers, sequences the 8 reset/spill pairs of each
// cycle and the no-beam period. A capture buffer keeps the spill profiles of
// the cycle for the host, which computes feed-forward corrections; the host
// configures everything through an Avalon-MM register slave. The FM carrier
// follows the quad current (sideband_tracker), and a raw-data sampler streams
// two ADC channels at the full sample rate to an external DMA engine over an
// Avalon-ST port (daq_st_*).
//
// Channel assignment (this design's choice): ADC channel 0 WCM, 1 EM, 2 DCCT;
// slow DAC channels 0..2 the three quad supplies, 3 the RFKO amplitude alpha;
// high-speed DAC channels 0 and 1 the two stripline plates, 2..7 diagnostics
// (FM signal, per-turn WCM, EM, DCCT, measurement, quad-loop error).
// Digital outputs: [1:0] state, [2] spill, [4] power-supply fault (for the
// machine protection system), [5] turn marker lost, [6] buffer full,
// [7] turn tick, [10:8] spill index, [11] ADC frame error, [12] slow-DAC frame,
// [13] s2s clearing, [14] cycle done, [15] spill start, [3] bin strobe.
//
// The timing-event decoder (TCLK / Beam Sync), the clock generation, the
// processors, DMA and the converters themselves are outside this module:
// decoded events, the turn marker, the two clocks (clk2x phase-aligned at
// twice clk) and the serial ADC lanes come in as ports. All logic runs on
// clk except the high-speed DAC buses (clk2x).
module srs_top
  import srs_pkg::*;
(
  input  logic        clk,
  input  logic        clk2x,
  input  logic        rst_n,
  // high-speed ADCs
  input  logic        adc_frame,
  input  logic [15:0] adc_sdata,
  // timing
  input  logic        tclk_event_valid,
  input  logic [7:0]  tclk_event_code,
  input  logic        turn_marker,
  // power-supply status bits, per magnet 2 x 8 supply bits and 8 controller bits
  input  logic [23:0] ps_status [3],
  // host (Avalon-MM)
  input  logic [7:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  output logic        avs_readdatavalid,
  output logic        irq_buffer_full,
  // slow DACs (SPI)
  output logic        spi_sclk,
  output logic        spi_mosi,
  output logic        spi_cs_n,
  // high-speed DACs
  output logic [13:0] hs_dac_data [4],
  output logic        hs_dac_sel,
  // TTL digital outputs
  output logic [15:0] dig_out,
  // raw-data stream to the DMA engine (Avalon-ST)
  output logic [31:0] daq_st_data,
  output logic        daq_st_valid,
  output logic        daq_st_last,
  input  logic        daq_st_ready
);
  srs_cfg_t            cfg;
  logic                quad_s2s_clear, rfko_s2s_clear, irq_ack, adc_err_clear;
  logic [2:0]          tab_wr_en;
  logic [BIN_W-1:0]    tab_wr_addr;
  logic [15:0]         tab_wr_data;
  logic [SPILL_W+BIN_W-1:0] ff_rd_addr;
  sample_t             ff_rd_data;
  logic                ff_full, ps_fault;
  logic                daq_arm, daq_abort, daq_busy, daq_waiting, daq_done, daq_overflow;
  logic [31:0]         daq_count, fm_carrier;

  logic                cycle_start, turn_tick, marker_lost;
  logic [23:0]         cycle_turns;
  srs_state_t          state;
  logic [SPILL_W-1:0]  spill_idx;
  logic [15:0]         period_turn;
  logic [BIN_W-1:0]    bin_idx;
  logic                bin_strobe, spill_start, spill_end, cycle_done;

  sample_t             adc_sample [16];
  logic                adc_valid, adc_frame_err;
  sample_t             wcm_t, em_t, dcct_t, meas;
  logic                wcm_v, em_v, dcct_v, meas_v;

  logic [15:0]         quad_ref, alpha;
  sample_t             quad_err, rfko_err, f_x;
  logic signed [13:0]  rf_out;
  logic                quad_busy, rfko_busy, spi_frame_done;
  logic [15:0]         slow_dac [4];
  logic signed [13:0]  hs_ch [8];

  always_comb cycle_start = tclk_event_valid && (tclk_event_code == cfg.cycle_event);

  srs_registers u_regs (
    .clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
    .avs_readdatavalid, .cfg, .quad_s2s_clear, .rfko_s2s_clear, .irq_ack, .adc_err_clear,
    .tab_wr_en, .tab_wr_addr, .tab_wr_data, .ff_rd_addr, .ff_rd_data, .state,
    .spill_idx(3'(spill_idx)), .ff_full, .marker_lost, .adc_frame_err,
    .s2s_busy(quad_busy | rfko_busy), .cycle_turns, .ps_status, .ps_fault,
    .daq_arm, .daq_abort, .daq_status({daq_overflow, daq_done, daq_busy, daq_waiting}),
    .daq_count);

  turn_marker_counter u_turns (
    .clk, .rst_n, .turn_marker, .cycle_start, .turn_tick, .cycle_turns, .marker_lost);

  srs_state_machine u_fsm (
    .clk, .rst_n, .enable(cfg.enable & ~marker_lost), .cycle_start, .turn_tick, .state,
    .spill_idx, .period_turn, .bin_idx, .bin_strobe, .spill_start, .spill_end, .cycle_done);

  adc_receiver #(.CH(16), .W(16)) u_adc (
    .clk, .rst_n, .frame(adc_frame), .sdata(adc_sdata), .clear_err(adc_err_clear),
    .sample(adc_sample), .sample_valid(adc_valid), .frame_err(adc_frame_err));

  daq_sampler u_daq (
    .clk, .rst_n, .sample(adc_sample), .sample_valid(adc_valid), .sel_a(cfg.daq_sel_a),
    .sel_b(cfg.daq_sel_b), .length(cfg.daq_length), .on_spill(cfg.daq_on_spill), .spill_start,
    .arm(daq_arm), .stop(daq_abort), .st_data(daq_st_data), .st_valid(daq_st_valid),
    .st_last(daq_st_last), .st_ready(daq_st_ready), .busy(daq_busy), .waiting(daq_waiting),
    .done(daq_done), .overflow(daq_overflow), .count(daq_count));

  filter_integrate u_fi_wcm (.clk, .rst_n, .sample(adc_sample[0]), .sample_valid(adc_valid),
    .baseline(cfg.base_wcm), .turn_tick, .turn_sum(wcm_t), .out_valid(wcm_v));
  filter_integrate u_fi_em (.clk, .rst_n, .sample(adc_sample[1]), .sample_valid(adc_valid),
    .baseline(cfg.base_em), .turn_tick, .turn_sum(em_t), .out_valid(em_v));
  filter_integrate u_fi_dcct (.clk, .rst_n, .sample(adc_sample[2]), .sample_valid(adc_valid),
    .baseline(cfg.base_dcct), .turn_tick, .turn_sum(dcct_t), .out_valid(dcct_v));

  monitor_select u_sel (
    .clk, .rst_n, .wcm(wcm_t), .em(em_t), .dcct(dcct_t), .in_valid(wcm_v & em_v & dcct_v),
    .mode(cfg.mon_sel), .lpf_shift(cfg.lpf_shift), .meas, .out_valid(meas_v));

  tune_quad_loop u_quad (
    .clk, .rst_n, .state, .cycle_start, .turn_tick, .spill_start, .bin_strobe, .bin_idx,
    .meas, .gains(cfg.quad_pid), .s2s_cfg(cfg.quad_s2s), .learn(cfg.quad_learn),
    .s2s_clear(quad_s2s_clear), .lms_en(cfg.lms_en), .lms_mu_shift(cfg.lms_mu_shift),
    .inc60(cfg.inc60), .quad_pedestal(cfg.quad_pedestal), .quad_start(cfg.quad_start),
    .max_step(cfg.quad_max_step), .tab_wr_en(tab_wr_en[1:0]), .tab_wr_addr, .tab_wr_data,
    .quad_ref, .err(quad_err), .s2s_busy(quad_busy));

  sideband_tracker u_track (
    .clk, .rst_n, .base_inc(cfg.fm_carrier_inc), .quad_ref, .ref_current(cfg.fm_track_ref),
    .gain(cfg.fm_track_gain), .carrier_inc(fm_carrier));

  fm_signal_generator u_fm (
    .clk, .rst_n, .enable(cfg.enable), .mode(cfg.fm_mode), .carrier_inc(fm_carrier),
    .span_inc(cfg.fm_span_inc), .sweep_step(cfg.fm_sweep_step),
    .noise_shift(cfg.fm_noise_shift), .f_out(f_x));

  rfko_loop u_rfko (
    .clk, .rst_n, .state, .spill_start, .bin_strobe, .bin_idx, .meas, .gains(cfg.rfko_pid),
    .s2s_cfg(cfg.rfko_s2s), .learn(cfg.rfko_learn), .s2s_clear(rfko_s2s_clear),
    .tab_wr_en(tab_wr_en[2]), .tab_wr_addr, .tab_wr_data, .f_in(f_x), .alpha, .rf_out,
    .err(rfko_err), .s2s_busy(rfko_busy));

  feedforward_buffer u_ffbuf (
    .clk, .rst_n, .bin_strobe, .spill_idx, .bin_idx, .meas, .cycle_done, .ack(irq_ack),
    .rd_addr(ff_rd_addr), .rd_data(ff_rd_data), .full(ff_full));

  always_comb begin
    slow_dac[0] = quad_ref;
    slow_dac[1] = quad_ref;
    slow_dac[2] = quad_ref;
    slow_dac[3] = alpha;
    hs_ch[0] = rf_out;
    hs_ch[1] = rf_out;
    hs_ch[2] = f_x[15:2];
    hs_ch[3] = wcm_t[15:2];
    hs_ch[4] = em_t[15:2];
    hs_ch[5] = dcct_t[15:2];
    hs_ch[6] = meas[15:2];
    hs_ch[7] = quad_err[15:2];
  end

  spi_dac_tx #(.N_CH(4)) u_spi (
    .clk, .rst_n, .enable(1'b1), .value(slow_dac), .sclk(spi_sclk), .mosi(spi_mosi),
    .cs_n(spi_cs_n), .frame_done(spi_frame_done));

  hs_dac_tx #(.N_DAC(4), .W(14)) u_hsdac (
    .clk, .clk2x, .rst_n, .ch(hs_ch), .dac_data(hs_dac_data), .dac_sel(hs_dac_sel));

  always_comb begin
    irq_buffer_full = ff_full;
    dig_out = {spill_start, cycle_done, quad_busy | rfko_busy, spi_frame_done, adc_frame_err,
               3'(spill_idx), turn_tick, ff_full, marker_lost, ps_fault, bin_strobe,
               state == ST_SPILL, state};
  end
endmodule
