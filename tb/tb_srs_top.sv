// tb_srs_top: end-to-end test of the SRS firmware at its default sizes, over
// one complete Mu2e cycle: 8 spills of 25,432 turns, each after a 2,950-turn
// reset period, then the no-beam period.
//
// The testbench plays the accelerator and the converters: a turn marker every
// 32 clocks, a simple beam whose extraction rate rises with the quad current
// and the RFKO amplitude and carries a 60 Hz ripple, and the WCM, EM and DCCT
// signals of that beam serialised onto the ADC lanes. The host programs the
// registers and reference tables over Avalon-MM, starts the cycle with a
// timing event, switches the monitor selection and the FM mode half-way, and
// reads the capture buffer back at the end. It also checks the carrier
// tracking of the quad current and a raw-data capture of two ADC channels
// started by the first spill. The testbench decodes the SPI and high-speed
// DAC outputs.
//
// Checks: the number and lengths of spills and reset periods in turns, bin
// strobes per spill, the pedestal and start currents seen on the SPI DAC
// frames, equal frames for the three quad supplies, the slew-rate limit, the
// two stripline plates receiving the same word and silence outside spills,
// the buffer-full interrupt and the captured profile, and the fault flags
// (power-supply fault, lost turn marker, ADC frame error). Each mechanism
// must have happened at least once.
module tb_srs_top;
  import srs_pkg::*;
  localparam int TURN_CLKS = 32;

  logic clk = 0, clk2x = 0, rst_n = 0;
  logic adc_frame;
  logic [15:0] adc_sdata;
  logic tclk_event_valid = 0;
  logic [7:0] tclk_event_code = 0;
  logic turn_marker = 0;
  logic [23:0] ps_status [3];
  logic [7:0] avs_address = 0;
  logic avs_write = 0, avs_read = 0, avs_readdatavalid, irq_buffer_full;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic spi_sclk, spi_mosi, spi_cs_n;
  logic [13:0] hs_dac_data [4];
  logic hs_dac_sel;
  logic [15:0] dig_out;
  logic [31:0] daq_st_data;
  logic daq_st_valid, daq_st_last, daq_st_ready = 1;

  srs_top dut (.*);

  always #5 clk2x = ~clk2x;
  always @(posedge clk2x) clk <= ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // ---------------- mechanisms ----------------
  int n_cycle_start = 0, n_reset = 0, n_spill = 0, n_nobeam = 0, n_bins = 0, n_slew = 0;
  int n_pid = 0, n_lms = 0, n_s2s = 0, n_alpha = 0, n_rf = 0, n_chirp = 0, n_noise = 0;
  int n_mon_both = 0, n_psfault = 0, n_marker_lost = 0, n_frame_err = 0, n_irq = 0, n_spi = 0;
  int n_track = 0, n_daq = 0, n_daq_last = 0;

  // ---------------- accelerator: turn marker and beam ----------------
  bit markers_on = 1;
  longint turn = 0;
  real intensity = 0.0, rate = 0.0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (markers_on) turn_marker <= (cyc % TURN_CLKS) < 4;
    else            turn_marker <= 0;
  end

  always @(posedge turn_marker) begin
    real q, a;
    turn++;
    q = real'(dut.quad_ref);
    a = real'(dut.alpha);
    if (dig_out[2]) begin
      rate = 2.0 + (q - 30000.0) / 400.0 + a / 100.0 + 3.0 * $sin(2.0 * 3.14159265 * 60.0 * real'(turn) / 590080.0);
      if (rate < 0.0) rate = 0.0;
      if (rate > intensity) rate = intensity;
      intensity -= rate;
    end else begin
      rate = 0.0;
      intensity = 60000.0;
    end
  end

  // ---------------- ADC serialiser: ch0 WCM, ch1 EM, ch2 DCCT ----------------
  logic [15:0] words [16];
  int bitn = 0;
  bit bad_frame = 0;
  always @(negedge clk) begin
    if (bitn == 0) begin
      int w;
      w = $rtoi(rate * 600.0) + $urandom_range(0, 40);
      words[0] = 16'(w > 32767 ? 32767 : w);
      w = $rtoi(rate * 450.0) + $urandom_range(0, 40);
      words[1] = 16'(w > 32767 ? 32767 : w);
      words[2] = 16'($rtoi(intensity / 2.0));
      for (int c = 3; c < 16; c++) words[c] = 16'($urandom);
    end
    adc_frame = (bitn == 0);
    for (int c = 0; c < 16; c++) adc_sdata[c] = words[c][15 - bitn];
    bitn = (bad_frame && bitn == 5) ? 0 : (bitn + 1) % 16;
  end

  // ---------------- host ----------------
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk) avs_write = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) avs_address = a; avs_read = 1;
    @(negedge clk) avs_read = 0;
    d = avs_readdata;
  endtask

  // ---------------- SPI decoder ----------------
  logic [23:0] spi_word;
  int spi_bits = 0;
  logic [15:0] spi_val [4];
  always @(posedge spi_sclk) begin spi_word = {spi_word[22:0], spi_mosi}; spi_bits++; end
  always @(posedge spi_cs_n) if (rst_n) begin
    if (spi_bits == 24) begin
      spi_val[spi_word[17:16]] = spi_word[15:0];
      n_spi++;
      if (spi_word[17:16] == 2'd2)
        // frames 0 and 2 are 2 x 101 clocks apart, at most 7 turns of slewing
        check(spi_val[0] - spi_val[2] <= 70 || spi_val[2] - spi_val[0] <= 70,
              $sformatf("three quad supplies get the same reference %0d %0d %0d", spi_val[0], spi_val[1], spi_val[2]));
    end
    spi_bits = 0;
  end

  // ---------------- monitors on internal activity ----------------
  srs_state_t st_prev = ST_NO_BEAM;
  int period_turns = 0, bins_in_spill = 0;
  logic [15:0] qprev = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.turn_tick) begin
      period_turns++;
      if (dut.quad_ref > qprev ? dut.quad_ref - qprev > 10 : qprev - dut.quad_ref > 10)
        check(0, "quad reference faster than 10 LSB per turn");
      if (dut.u_quad.target != dut.quad_ref) n_slew++;
      qprev = dut.quad_ref;
    end
    if (dig_out[3]) begin n_bins++; bins_in_spill++; end
    if (dut.state != st_prev) begin
      if (st_prev == ST_SPILL) begin
        check(period_turns == 25432, $sformatf("spill of %0d turns", period_turns));
        check(bins_in_spill == 1590, $sformatf("%0d bins in spill", bins_in_spill));
      end
      if (st_prev == ST_RESET)
        check(period_turns == 2950, $sformatf("reset of %0d turns", period_turns));
      unique case (dut.state)
        ST_RESET: n_reset++;
        ST_SPILL: n_spill++;
        default:  n_nobeam++;
      endcase
      period_turns = 0; bins_in_spill = 0;
      st_prev = dut.state;
    end
    if (dut.u_quad.pid_u != 0) n_pid++;
    if (dut.u_quad.lms_y != 0) n_lms++;
    if (dut.u_quad.s2s_c != 0 || dut.u_rfko.s2s_c != 0) n_s2s++;
    if (dut.alpha != 0) n_alpha++;
    if (dut.cfg.fm_mode == FM_CHIRP && dut.alpha != 0) n_chirp++;
    if (dut.cfg.fm_mode == FM_NOISE && dut.alpha != 0) n_noise++;
    if (dut.cfg.mon_sel == MON_BOTH && dig_out[3]) n_mon_both++;
    if (dig_out[4]) n_psfault++;
    if (dig_out[5]) n_marker_lost++;
    if (dig_out[11]) n_frame_err++;
    if (irq_buffer_full) n_irq++;
  end

  // sideband tracking: carrier = base + (quad_ref - 30000) * 100, one clock late
  logic [15:0] quad_prev = 0;
  bit track_set = 0;
  always @(posedge clk) begin
    if (rst_n && track_set && dut.cfg.fm_track_gain == 16'sd100) begin
      logic [31:0] exp_c;
      exp_c = dut.cfg.fm_carrier_inc + 32'((int'(quad_prev) - 30000) * 100);
      check(dut.fm_carrier == exp_c, $sformatf("tracked carrier %h exp %h", dut.fm_carrier, exp_c));
      if (dut.fm_carrier != dut.cfg.fm_carrier_inc) n_track++;
    end
    quad_prev <= dut.quad_ref;
    track_set <= (dut.cfg.fm_track_gain == 16'sd100);
  end

  // raw-data stream: each word is the pair of the previous ADC sample period
  logic [31:0] daq_exp = 0;
  always @(posedge clk) begin
    if (rst_n && daq_st_valid && daq_st_ready) begin
      check(daq_st_data == daq_exp, $sformatf("raw-data word %h exp %h", daq_st_data, daq_exp));
      if (n_daq == 0) check(dut.state == ST_SPILL, "raw-data capture starts with the spill");
      n_daq++;
      if (daq_st_last) n_daq_last++;
    end
    if (dut.adc_valid) daq_exp <= {dut.adc_sample[2], dut.adc_sample[0]};
  end

  int nospill_clks = 0;
  always @(posedge clk) nospill_clks <= (dut.state == ST_SPILL) ? 0 : nospill_clks + 1;

  // plates: both A and B words of DAC 0 carry the same RF sample
  logic [13:0] plate_a;
  always @(posedge clk2x) if (rst_n) begin
    #1;
    if (!hs_dac_sel) plate_a = hs_dac_data[0];
    else begin
      check(hs_dac_data[0] == plate_a, "both stripline plates get the same word");
      if (hs_dac_data[0] != 14'h2000) n_rf++;
      if (nospill_clks > 4) check(hs_dac_data[0] == 14'h2000, "no RF outside spills");
    end
  end

  // capture of the measurement at every bin strobe, to compare with the buffer
  sample_t cap [8][2048];
  always @(posedge clk) if (rst_n && dig_out[3]) cap[dut.spill_idx][dut.bin_idx] = dut.meas;

  initial begin
    logic [31:0] d;
    ps_status[0] = 24'h0; ps_status[1] = 24'h0; ps_status[2] = 24'h0;
    repeat (4) @(posedge clk); rst_n = 1;
    rd(8'h22, d); check(d == 32'h5352_5301, "ID register");
    // reference tables
    wr(8'h19, 32'h0000_0000);
    for (int k = 0; k < 2048; k++) wr(8'h1A, 32'd500);          // quad spill-rate reference
    wr(8'h19, 32'h0001_0000);
    for (int k = 0; k < 2048; k++) wr(8'h1A, 32'(30000 + 8 * k)); // quad ramp
    wr(8'h19, 32'h0002_0000);
    for (int k = 0; k < 2048; k++) wr(8'h1A, 32'd500);          // RFKO spill-rate reference
    // loops
    wr(8'h06, 32'd64);  wr(8'h07, 32'd4);  wr(8'h08, 32'd16);   // quad PID
    wr(8'h09, 32'h0002_0003);                                    // s2s: gain 1/8, phase 2
    wr(8'h0A, {16'd30000, 16'd8000});                            // start, pedestal
    wr(8'h0C, 32'd18);
    wr(8'h0E, 32'd128); wr(8'h0F, 32'd8);  wr(8'h10, 32'd0);    // RFKO PID
    wr(8'h11, 32'h0002_0003);
    wr(8'h12, 32'h0000_0301);                                    // chirp
    wr(8'h13, 32'h3333_3333); wr(8'h14, 32'h0100_0000); wr(8'h15, 32'h0000_4000);
    wr(8'h02, 32'h0000_0200);                                    // WCM, LPF 2^-2
    wr(8'h03, 32'd0); wr(8'h04, 32'd0); wr(8'h05, 32'd0);
    wr(8'h16, 32'h00ff_ffff); wr(8'h17, 32'h00ff_ffff); wr(8'h18, 32'h00ff_ffff);
    wr(8'h01, 32'h0000_001d);                                    // cycle event
    wr(8'h23, {16'd30000, 16'd100});                             // carrier tracking
    wr(8'h24, 32'h0001_0200);                                    // raw data: DCCT, WCM, at spill
    wr(8'h25, 32'd5000);
    wr(8'h00, 32'h0000_100f);                                    // arm the raw-data capture
    rd(8'h26, d);
    check(d[3:0] == 4'b0001, $sformatf("raw-data capture waits for the spill: %b", d[3:0]));
    wr(8'h00, 32'h0000_030f);                                    // enable, learn, LMS, clear s2s
    repeat (1000 * TURN_CLKS) @(negedge clk);   // 8000 LSB at 10 LSB per turn
    check(spi_val[0] == 16'd8000, $sformatf("pedestal on the SPI DAC %0d", spi_val[0]));
    // an unrelated event is ignored, then the cycle event starts the cycle
    @(negedge clk) tclk_event_valid = 1; tclk_event_code = 8'h1c;
    @(negedge clk) tclk_event_valid = 0;
    repeat (10) @(negedge clk);
    check(dut.state == ST_NO_BEAM, "other events ignored");
    @(negedge clk) tclk_event_valid = 1; tclk_event_code = 8'h1d;
    @(negedge clk) tclk_event_valid = 0;
    n_cycle_start++;
    // just before the first spill the quads sit at the start current
    wait (dut.state == ST_SPILL);
    repeat (300) @(negedge clk);
    check(spi_val[1] >= 16'd29900 && spi_val[1] <= 16'd30100, $sformatf("start current on the SPI DAC %0d", spi_val[1]));
    // half-way: switch the monitor and the FM excitation
    wait (dut.spill_idx == 3'd4);
    wr(8'h02, 32'h0000_0202);      // mean of WCM and EM
    wr(8'h12, 32'h0000_0302);      // coloured noise
    wait (dig_out[14]);            // cycle done
    repeat (10) @(negedge clk);
    check(irq_buffer_full, "buffer-full interrupt");
    check(n_spill == 8 && n_reset == 8, $sformatf("%0d spills, %0d resets", n_spill, n_reset));
    for (int i = 0; i < 40; i++) begin
      int s, b;
      s = $urandom_range(0, 7); b = $urandom_range(0, 1589);
      wr(8'h1B, 32'(s * 2048 + b));
      rd(8'h1C, d);
      check(d[15:0] == cap[s][b], $sformatf("buffer spill %0d bin %0d: %h exp %h", s, b, d[15:0], cap[s][b]));
    end
    rd(8'h26, d);
    check(d[3:0] == 4'b0100, $sformatf("raw-data capture done, no overflow: %b", d[3:0]));
    rd(8'h27, d);
    check(d == 32'd5000 && n_daq == 5000 && n_daq_last == 1,
          $sformatf("raw-data count %0d, words %0d, last %0d", d, n_daq, n_daq_last));
    wr(8'h00, 32'h0000_040f);      // ack
    repeat (3) @(negedge clk);
    check(!irq_buffer_full, "interrupt acknowledged");
    // back at the pedestal in the no-beam period
    repeat (7000 * TURN_CLKS) @(negedge clk);   // from up to 65535 at 10 LSB per turn
    check(spi_val[0] == 16'd8000, $sformatf("pedestal after the cycle %0d", spi_val[0]));
    // faults: power supply, lost turn marker, ADC framing
    ps_status[1] = 24'h000400;
    repeat (3) @(negedge clk);
    check(dig_out[4], "power-supply fault to the digital outputs");
    ps_status[1] = 24'h0;
    markers_on = 0;
    repeat (400) @(negedge clk);
    check(dig_out[5], "lost turn marker flagged");
    markers_on = 1;
    repeat (3 * TURN_CLKS) @(negedge clk);
    check(!dig_out[5], "turn marker back");
    bad_frame = 1;
    repeat (40) @(negedge clk);
    bad_frame = 0;
    repeat (40) @(negedge clk);
    rd(8'h1D, d);
    check(d[8], "ADC frame error in status");
    wr(8'h00, 32'h0000_080f);
    repeat (3) @(negedge clk);
    check(!dig_out[11], "ADC frame error cleared");
    $display("mechanisms: cycle_start=%0d reset=%0d spill=%0d nobeam=%0d bins=%0d slew=%0d pid=%0d lms=%0d s2s=%0d alpha=%0d rf=%0d chirp=%0d noise=%0d mon_both=%0d psfault=%0d marker_lost=%0d frame_err=%0d irq=%0d spi=%0d track=%0d daq=%0d",
             n_cycle_start, n_reset, n_spill, n_nobeam, n_bins, n_slew, n_pid, n_lms, n_s2s, n_alpha, n_rf,
             n_chirp, n_noise, n_mon_both, n_psfault, n_marker_lost, n_frame_err, n_irq, n_spi, n_track, n_daq);
    check(n_cycle_start > 0, "cycle start");
    check(n_reset > 0, "reset period");
    check(n_spill > 0, "spill");
    check(n_nobeam > 0, "no-beam period");
    check(n_bins == 8 * 1590, "bin strobes");
    check(n_slew > 0, "slew limiting");
    check(n_pid > 0, "PID action");
    check(n_lms > 0, "adaptive filter action");
    check(n_s2s > 0, "spill-to-spill correction");
    check(n_alpha > 0, "RFKO amplitude");
    check(n_rf > 0, "RF on the stripline DACs");
    check(n_chirp > 0, "chirp excitation");
    check(n_noise > 0, "noise excitation");
    check(n_mon_both > 0, "monitor switch");
    check(n_psfault > 0, "power-supply fault");
    check(n_marker_lost > 0, "marker lost");
    check(n_frame_err > 0, "ADC frame error");
    check(n_irq > 0, "buffer full");
    check(n_spi > 0, "SPI frames");
    check(n_track > 0, "carrier tracking");
    check(n_daq > 0, "raw-data capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
