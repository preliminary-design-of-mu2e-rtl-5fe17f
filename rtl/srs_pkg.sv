// srs_pkg: types and constants shared by the Spill Regulation System (SRS) RTL.
//
// The timeline numbers follow the Mu2e delivery-ring cycle: slow extraction at
// the DR revolution frequency of 590.08 kHz, 43.1 ms spills, 5 ms reset between
// spills and 8 spills per cycle. Durations are converted to whole turns because
// the firmware stays synchronous to the accelerator by counting turn markers.
// Bin sizes, fixed-point formats and the register layout are this design's own
// choices.
package srs_pkg;

  // Timeline (turns of the 590.08 kHz revolution)
  localparam int unsigned REV_FREQ_HZ      = 590080;
  localparam int unsigned SPILLS_PER_CYCLE = 8;
  localparam int unsigned RESET_TURNS      = 2950;   // 5 ms   * 590.08 kHz
  localparam int unsigned SPILL_TURNS      = 25432;  // 43.1 ms * 590.08 kHz
  localparam int unsigned TURNS_PER_BIN    = 16;     // one regulation sample every 27.1 us (36.9 kHz)
  localparam int unsigned BINS             = 2048;   // >= ceil(25432 / 16) = 1590
  localparam int unsigned BIN_W            = $clog2(BINS);
  localparam int unsigned SPILL_W          = $clog2(SPILLS_PER_CYCLE);

  // Regulation sample format: signed 16 bit
  typedef logic signed [15:0] sample_t;

  // Period of the cycle the SRS is in
  typedef enum logic [1:0] {
    ST_NO_BEAM = 2'd0,  // between cycles: quads at the low-power pedestal
    ST_RESET   = 2'd1,  // 5 ms before each spill: quads ramp to near resonance
    ST_SPILL   = 2'd2   // slow extraction: both loops regulate
  } srs_state_t;

  // Spill monitor selection
  typedef enum logic [1:0] {
    MON_WCM   = 2'd0,
    MON_EM    = 2'd1,
    MON_BOTH  = 2'd2,  // mean of WCM and EM
    MON_DCCT  = 2'd3   // decrease rate of the circulating beam
  } mon_sel_t;

  // FM excitation mode
  typedef enum logic [1:0] {
    FM_CARRIER = 2'd0,
    FM_CHIRP   = 2'd1,
    FM_NOISE   = 2'd2
  } fm_mode_t;

  // Gains of a PID loop, signed Q8.8
  typedef struct packed {
    logic signed [15:0] kp;
    logic signed [15:0] ki;
    logic signed [15:0] kd;
  } pid_gains_t;

  // Settings of a spill-to-spill filter
  typedef struct packed {
    logic [4:0]       gain_shift;  // learning gain 2^-gain_shift
    logic [4:0]       leak_shift;  // forgetting 2^-leak_shift per spill, 0 = none
    logic [BIN_W-1:0] phase_adv;   // phase correction, in bins
  } s2s_cfg_t;

  // Configuration produced by the register block
  typedef struct packed {
    logic             enable;
    logic [7:0]       cycle_event;   // timing event code that starts a cycle
    mon_sel_t         mon_sel;
    logic [3:0]       lpf_shift;
    sample_t          base_wcm;
    sample_t          base_em;
    sample_t          base_dcct;
    pid_gains_t       quad_pid;
    s2s_cfg_t         quad_s2s;
    logic             quad_learn;
    logic [15:0]      quad_pedestal;
    logic [15:0]      quad_start;
    logic [15:0]      quad_max_step;
    logic             lms_en;
    logic [4:0]       lms_mu_shift;
    logic [31:0]      inc60;
    pid_gains_t       rfko_pid;
    s2s_cfg_t         rfko_s2s;
    logic             rfko_learn;
    fm_mode_t         fm_mode;
    logic [3:0]       fm_noise_shift;
    logic [31:0]      fm_carrier_inc;
    logic [31:0]      fm_span_inc;
    logic [31:0]      fm_sweep_step;
    logic [23:0]      ps_mask0;
    logic [23:0]      ps_mask1;
    logic [23:0]      ps_mask2;
    logic signed [15:0] fm_track_gain; // carrier increment per LSB of quad current
    logic [15:0]      fm_track_ref;  // quad current at which the carrier is fm_carrier_inc
    logic [3:0]       daq_sel_a;     // raw-data capture: first ADC channel
    logic [3:0]       daq_sel_b;     // raw-data capture: second ADC channel
    logic             daq_on_spill;  // capture starts at the next spill start
    logic [31:0]      daq_length;    // sample pairs per capture
  } srs_cfg_t;

  // Saturate a wide signed value to 16 bits
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return sample_t'(v);
  endfunction

endpackage
