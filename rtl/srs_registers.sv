// srs_registers: host-accessible control and status registers of the SRS.
//
// An Avalon memory-mapped slave with 32-bit words, word addresses, and read
// data returned one clock after read with readdatavalid. It holds the
// configuration of both regulation loops, the monitor selection, the FM
// generator and the timing event, gives the host a window to load the
// reference tables and to read the feed-forward capture buffer, and reports
// status. It also checks the power-supply status bits: ps_fault is high when
// any status bit enabled by the fault masks is set (3 magnets, each with
// 2 x 8 supply bits and 8 controller bits).
//
// Word map (RW unless marked):
//   0x00 CTRL     [0] enable [1] quad learn [2] rfko learn [3] LMS adapt;
//                 write-one pulses: [8] clear quad s2s [9] clear rfko s2s
//                 [10] buffer-full ack [11] clear ADC frame error
//                 [12] arm raw-data capture [13] abort raw-data capture
//   0x01 EVENT    [7:0] timing event code that starts a cycle
//   0x02 MONITOR  [1:0] monitor select [11:8] LPF shift
//   0x03..0x05    baselines of WCM, EM, DCCT [15:0]
//   0x06..0x08    quad PID kp, ki, kd (signed Q8.8) [15:0]
//   0x09 QUAD_S2S [4:0] gain shift [12:8] leak shift [26:16] phase advance
//   0x0A QUAD_LVL [15:0] pedestal [31:16] start current
//   0x0B QUAD_SLEW[15:0] max step per turn
//   0x0C LMS      [4:0] step size shift
//   0x0D INC60    60 Hz phase increment per turn
//   0x0E..0x10    RFKO PID kp, ki, kd
//   0x11 RFKO_S2S as QUAD_S2S
//   0x12 FM       [1:0] mode [11:8] noise colour shift
//   0x13..0x15    FM carrier increment, half span, sweep step
//   0x16..0x18    power-supply fault masks, magnets 0..2 [23:0]
//   0x19 TAB_ADDR [BIN_W-1:0] address [17:16] table (0 quad rate reference,
//                 1 quad ramp, 2 RFKO rate reference)
//   0x1A TAB_DATA write: stores [15:0] in the table, address increments
//   0x1B FF_ADDR  capture-buffer read address
//   0x1C FF_DATA  RO capture-buffer word at FF_ADDR
//   0x1D STATUS   RO [1:0] state [4:2] spill [5] buffer full [6] turn marker
//                 lost [7] ps fault [8] ADC frame error [9] s2s clearing
//   0x1E TURNS    RO turns since cycle start
//   0x1F..0x21    RO power-supply status bits, magnets 0..2
//   0x22 ID       RO 0x53525301
//   0x23 FM_TRACK [15:0] carrier increment per LSB of quad current (signed)
//                 [31:16] quad current at which the carrier is FM carrier
//   0x24 DAQ_CTRL [3:0] channel A [11:8] channel B [16] start at next spill
//   0x25 DAQ_LEN  sample pairs per capture
//   0x26 DAQ_STAT RO [0] waiting for spill [1] capturing [2] done [3] overflow
//   0x27 DAQ_CNT  RO sample periods captured
// The register map and its reset values are this design's choices.
module srs_registers
  import srs_pkg::*;
#(
  parameter int unsigned FF_AW = SPILL_W + BIN_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave
  input  logic [7:0]        avs_address,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  input  logic              avs_read,
  output logic [31:0]       avs_readdata,
  output logic              avs_readdatavalid,
  // configuration and commands
  output srs_cfg_t          cfg,
  output logic              quad_s2s_clear,
  output logic              rfko_s2s_clear,
  output logic              irq_ack,
  output logic              adc_err_clear,
  output logic              daq_arm,
  output logic              daq_abort,
  output logic [2:0]        tab_wr_en,
  output logic [BIN_W-1:0]  tab_wr_addr,
  output logic [15:0]       tab_wr_data,
  output logic [FF_AW-1:0]  ff_rd_addr,
  // status
  input  sample_t           ff_rd_data,
  input  srs_state_t        state,
  input  logic [2:0]        spill_idx,
  input  logic              ff_full,
  input  logic              marker_lost,
  input  logic              adc_frame_err,
  input  logic              s2s_busy,
  input  logic [23:0]       cycle_turns,
  input  logic [3:0]        daq_status,
  input  logic [31:0]       daq_count,
  input  logic [23:0]       ps_status [3],
  output logic              ps_fault
);
  localparam logic [31:0] ID = 32'h5352_5301;

  logic [1:0] tab_sel;

  function automatic s2s_cfg_t s2s_of(input logic [31:0] d);
    s2s_cfg_t c;
    c.gain_shift = d[4:0];
    c.leak_shift = d[12:8];
    c.phase_adv  = d[16 +: BIN_W];
    return c;
  endfunction

  function automatic logic [31:0] s2s_word(input s2s_cfg_t c);
    logic [31:0] d;
    d = '0;
    d[4:0]          = c.gain_shift;
    d[12:8]         = c.leak_shift;
    d[16 +: BIN_W]  = c.phase_adv;
    return d;
  endfunction

  always_comb ps_fault = |(ps_status[0] & cfg.ps_mask0) | |(ps_status[1] & cfg.ps_mask1)
                       | |(ps_status[2] & cfg.ps_mask2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg               <= '0;
      cfg.lpf_shift     <= 4'd4;
      cfg.quad_max_step <= 16'd10;
      cfg.lms_mu_shift  <= 5'd16;
      cfg.inc60         <= 32'd436709;   // 2^32 * 60 Hz / 590.08 kHz
      quad_s2s_clear    <= 1'b0;
      rfko_s2s_clear    <= 1'b0;
      irq_ack           <= 1'b0;
      adc_err_clear     <= 1'b0;
      daq_arm           <= 1'b0;
      daq_abort         <= 1'b0;
      tab_wr_en         <= '0;
      tab_wr_addr       <= '0;
      tab_wr_data       <= '0;
      tab_sel           <= '0;
      ff_rd_addr        <= '0;
    end else begin
      quad_s2s_clear <= 1'b0;
      rfko_s2s_clear <= 1'b0;
      irq_ack        <= 1'b0;
      adc_err_clear  <= 1'b0;
      daq_arm        <= 1'b0;
      daq_abort      <= 1'b0;
      if (tab_wr_en != '0) tab_wr_addr <= tab_wr_addr + 1'b1;
      tab_wr_en      <= '0;
      if (avs_write) begin
        unique case (avs_address)
          8'h00: begin
            cfg.enable     <= avs_writedata[0];
            cfg.quad_learn <= avs_writedata[1];
            cfg.rfko_learn <= avs_writedata[2];
            cfg.lms_en     <= avs_writedata[3];
            quad_s2s_clear <= avs_writedata[8];
            rfko_s2s_clear <= avs_writedata[9];
            irq_ack        <= avs_writedata[10];
            adc_err_clear  <= avs_writedata[11];
            daq_arm        <= avs_writedata[12];
            daq_abort      <= avs_writedata[13];
          end
          8'h01: cfg.cycle_event <= avs_writedata[7:0];
          8'h02: begin
            cfg.mon_sel   <= mon_sel_t'(avs_writedata[1:0]);
            cfg.lpf_shift <= avs_writedata[11:8];
          end
          8'h03: cfg.base_wcm      <= avs_writedata[15:0];
          8'h04: cfg.base_em       <= avs_writedata[15:0];
          8'h05: cfg.base_dcct     <= avs_writedata[15:0];
          8'h06: cfg.quad_pid.kp   <= avs_writedata[15:0];
          8'h07: cfg.quad_pid.ki   <= avs_writedata[15:0];
          8'h08: cfg.quad_pid.kd   <= avs_writedata[15:0];
          8'h09: cfg.quad_s2s      <= s2s_of(avs_writedata);
          8'h0A: begin
            cfg.quad_pedestal <= avs_writedata[15:0];
            cfg.quad_start    <= avs_writedata[31:16];
          end
          8'h0B: cfg.quad_max_step <= avs_writedata[15:0];
          8'h0C: cfg.lms_mu_shift  <= avs_writedata[4:0];
          8'h0D: cfg.inc60         <= avs_writedata;
          8'h0E: cfg.rfko_pid.kp   <= avs_writedata[15:0];
          8'h0F: cfg.rfko_pid.ki   <= avs_writedata[15:0];
          8'h10: cfg.rfko_pid.kd   <= avs_writedata[15:0];
          8'h11: cfg.rfko_s2s      <= s2s_of(avs_writedata);
          8'h12: begin
            cfg.fm_mode        <= fm_mode_t'(avs_writedata[1:0]);
            cfg.fm_noise_shift <= avs_writedata[11:8];
          end
          8'h13: cfg.fm_carrier_inc <= avs_writedata;
          8'h14: cfg.fm_span_inc    <= avs_writedata;
          8'h15: cfg.fm_sweep_step  <= avs_writedata;
          8'h16: cfg.ps_mask0       <= avs_writedata[23:0];
          8'h17: cfg.ps_mask1       <= avs_writedata[23:0];
          8'h18: cfg.ps_mask2       <= avs_writedata[23:0];
          8'h19: begin
            tab_wr_addr <= avs_writedata[BIN_W-1:0];
            tab_sel     <= avs_writedata[17:16];
          end
          8'h1A: begin
            tab_wr_data <= avs_writedata[15:0];
            tab_wr_en   <= 3'b001 << tab_sel;
          end
          8'h1B: ff_rd_addr <= avs_writedata[FF_AW-1:0];
          8'h23: begin
            cfg.fm_track_gain <= avs_writedata[15:0];
            cfg.fm_track_ref  <= avs_writedata[31:16];
          end
          8'h24: begin
            cfg.daq_sel_a    <= avs_writedata[3:0];
            cfg.daq_sel_b    <= avs_writedata[11:8];
            cfg.daq_on_spill <= avs_writedata[16];
          end
          8'h25: cfg.daq_length <= avs_writedata;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        unique case (avs_address)
          8'h00: avs_readdata <= {28'd0, cfg.lms_en, cfg.rfko_learn, cfg.quad_learn, cfg.enable};
          8'h01: avs_readdata <= {24'd0, cfg.cycle_event};
          8'h02: avs_readdata <= {20'd0, cfg.lpf_shift, 6'd0, cfg.mon_sel};
          8'h03: avs_readdata <= 32'(cfg.base_wcm);
          8'h04: avs_readdata <= 32'(cfg.base_em);
          8'h05: avs_readdata <= 32'(cfg.base_dcct);
          8'h06: avs_readdata <= 32'(cfg.quad_pid.kp);
          8'h07: avs_readdata <= 32'(cfg.quad_pid.ki);
          8'h08: avs_readdata <= 32'(cfg.quad_pid.kd);
          8'h09: avs_readdata <= s2s_word(cfg.quad_s2s);
          8'h0A: avs_readdata <= {cfg.quad_start, cfg.quad_pedestal};
          8'h0B: avs_readdata <= {16'd0, cfg.quad_max_step};
          8'h0C: avs_readdata <= {27'd0, cfg.lms_mu_shift};
          8'h0D: avs_readdata <= cfg.inc60;
          8'h0E: avs_readdata <= 32'(cfg.rfko_pid.kp);
          8'h0F: avs_readdata <= 32'(cfg.rfko_pid.ki);
          8'h10: avs_readdata <= 32'(cfg.rfko_pid.kd);
          8'h11: avs_readdata <= s2s_word(cfg.rfko_s2s);
          8'h12: avs_readdata <= {20'd0, cfg.fm_noise_shift, 6'd0, cfg.fm_mode};
          8'h13: avs_readdata <= cfg.fm_carrier_inc;
          8'h14: avs_readdata <= cfg.fm_span_inc;
          8'h15: avs_readdata <= cfg.fm_sweep_step;
          8'h16: avs_readdata <= {8'd0, cfg.ps_mask0};
          8'h17: avs_readdata <= {8'd0, cfg.ps_mask1};
          8'h18: avs_readdata <= {8'd0, cfg.ps_mask2};
          8'h19: avs_readdata <= {14'd0, tab_sel, 16'(tab_wr_addr)};
          8'h1B: avs_readdata <= 32'(ff_rd_addr);
          8'h1C: avs_readdata <= 32'(ff_rd_data);
          8'h1D: avs_readdata <= {22'd0, s2s_busy, adc_frame_err, ps_fault, marker_lost,
                                  ff_full, spill_idx, state};
          8'h1E: avs_readdata <= {8'd0, cycle_turns};
          8'h1F: avs_readdata <= {8'd0, ps_status[0]};
          8'h20: avs_readdata <= {8'd0, ps_status[1]};
          8'h21: avs_readdata <= {8'd0, ps_status[2]};
          8'h22: avs_readdata <= ID;
          8'h23: avs_readdata <= {cfg.fm_track_ref, cfg.fm_track_gain};
          8'h24: avs_readdata <= {15'd0, cfg.daq_on_spill, 4'd0, cfg.daq_sel_b, 4'd0, cfg.daq_sel_a};
          8'h25: avs_readdata <= cfg.daq_length;
          8'h26: avs_readdata <= {28'd0, daq_status};
          8'h27: avs_readdata <= daq_count;
          default: avs_readdata <= '0;
        endcase
      end
    end
  end
endmodule
