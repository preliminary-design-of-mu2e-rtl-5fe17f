// tb_srs_registers: Avalon-MM accesses to the register block. Writes random
// values to every configuration word and reads them back through the field
// masks of the map; checks that configuration fields reach cfg, that CTRL's
// command bits give one-clock pulses, that the table window produces write
// pulses for the selected table with an incrementing address, that status
// inputs are readable, that ps_fault follows the masks, and the tracking and
// raw-data capture registers.
module tb_srs_registers;
  import srs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] avs_address = 0;
  logic avs_write = 0, avs_read = 0, avs_readdatavalid;
  logic [31:0] avs_writedata = 0, avs_readdata;
  srs_cfg_t cfg;
  logic quad_s2s_clear, rfko_s2s_clear, irq_ack, adc_err_clear, ps_fault;
  logic [2:0] tab_wr_en;
  logic [BIN_W-1:0] tab_wr_addr;
  logic [15:0] tab_wr_data;
  logic [SPILL_W+BIN_W-1:0] ff_rd_addr;
  sample_t ff_rd_data = 16'sh1234;
  srs_state_t state = ST_SPILL;
  logic [2:0] spill_idx = 3'd5;
  logic ff_full = 1, marker_lost = 0, adc_frame_err = 1, s2s_busy = 0;
  logic [23:0] cycle_turns = 24'd123456;
  logic [23:0] ps_status [3];
  logic daq_arm, daq_abort;
  logic [3:0] daq_status = 4'b0110;
  logic [31:0] daq_count = 32'd4242;
  int daq_pulses = 0;
  int checks = 0, failures = 0, pulses = 0, tab_writes = 0;
  logic [31:0] rd;

  srs_registers dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) avs_address = a; avs_writedata = d; avs_write = 1;
    @(negedge clk) avs_write = 0;
  endtask

  task automatic rdreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) avs_address = a; avs_read = 1;
    @(negedge clk) avs_read = 0;
    check(avs_readdatavalid, "readdatavalid one clock after read");
    d = avs_readdata;
  endtask

  function automatic logic [31:0] mask_of(input logic [7:0] a);
    case (a)
      8'h00: return 32'h0000_000f;
      8'h01: return 32'h0000_00ff;
      8'h02: return 32'h0000_0f03;
      8'h09, 8'h11: return 32'h07ff_1f1f;
      8'h0A, 8'h0D, 8'h13, 8'h14, 8'h15: return 32'hffff_ffff;
      8'h0C: return 32'h0000_001f;
      8'h12: return 32'h0000_0f03;
      8'h16, 8'h17, 8'h18: return 32'h00ff_ffff;
      8'h23, 8'h25: return 32'hffff_ffff;
      8'h24: return 32'h0001_0f0f;
      default: return 32'h0000_ffff;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (quad_s2s_clear | rfko_s2s_clear | irq_ack | adc_err_clear) pulses++;
    if (tab_wr_en != 0) tab_writes++;
    if (daq_arm && daq_abort) daq_pulses++;
  end

  initial begin
    ps_status[0] = 24'h000100; ps_status[1] = 24'h0; ps_status[2] = 24'h800000;
    repeat (3) @(negedge clk); rst_n = 1;
    rdreg(8'h0D, rd); check(rd == 32'd436709, "INC60 reset value");
    rdreg(8'h0B, rd); check(rd == 32'd10, "slew reset value");
    for (int a = 0; a <= 8'h25; a++) begin
      logic [31:0] d, sx;
      if (a == 0 || a > 8'h18 && a < 8'h23) continue;
      d = $urandom;
      wr(8'(a), d);
      rdreg(8'(a), rd);
      sx = d & mask_of(8'(a));
      if (a >= 3 && a <= 8 || a >= 8'h0E && a <= 8'h10) sx = {{16{d[15]}}, d[15:0]};   // signed fields
      check(rd == sx, $sformatf("reg %h read %h exp %h", a, rd, sx));
    end
    wr(8'h06, 32'h0000_0123); check(cfg.quad_pid.kp == 16'sh0123, "kp to cfg");
    wr(8'h13, 32'hcafe_f00d); check(cfg.fm_carrier_inc == 32'hcafe_f00d, "carrier to cfg");
    wr(8'h09, 32'h0005_0203);
    check(cfg.quad_s2s.gain_shift == 5'd3 && cfg.quad_s2s.leak_shift == 5'd2 && cfg.quad_s2s.phase_adv == 11'd5, "s2s fields");
    wr(8'h00, 32'h0000_0f0b);
    check(cfg.enable && cfg.quad_learn && !cfg.rfko_learn && cfg.lms_en, "ctrl bits");
    repeat (3) @(negedge clk);
    check(pulses == 1, $sformatf("command pulses last one clock (%0d)", pulses));
    wr(8'h00, 32'h0000_3000);
    repeat (3) @(negedge clk);
    check(daq_pulses == 1 && pulses == 1, "raw-data arm and abort pulses");
    wr(8'h23, 32'h7530_ff9c);
    check(cfg.fm_track_ref == 16'd30000 && cfg.fm_track_gain == -16'sd100, "tracking fields");
    wr(8'h24, 32'h0001_0a03);
    check(cfg.daq_sel_a == 4'd3 && cfg.daq_sel_b == 4'd10 && cfg.daq_on_spill, "raw-data fields");
    rdreg(8'h26, rd); check(rd == 32'h6, "raw-data status");
    rdreg(8'h27, rd); check(rd == 32'd4242, "raw-data count");
    // table window
    wr(8'h19, 32'h0001_0005);
    wr(8'h1A, 32'h0000_aaaa);
    check(tab_wr_en == 3'b010 && tab_wr_addr == BIN_W'(5) && tab_wr_data == 16'haaaa, "ramp table write");
    @(negedge clk);
    check(tab_writes == 1, "table write pulse");
    wr(8'h1A, 32'h0000_bbbb);
    @(negedge clk);
    check(tab_writes == 2 && tab_wr_addr == BIN_W'(7), "address increments");
    for (int t = 0; t < 3; t++) begin
      for (int k = 0; k < 4; k++) begin
        wr(8'h19, (32'(t) << 16) | 32'(100 + k));
        wr(8'h1A, 32'(k));
        check(tab_wr_en == (3'b001 << t) && tab_wr_addr == BIN_W'(100 + k),
              $sformatf("table %0d select: en %b addr %0d", t, tab_wr_en, tab_wr_addr));
      end
    end
    // status and buffer window
    wr(8'h1B, 32'd77); check(ff_rd_addr == 77, "buffer address");
    rdreg(8'h1C, rd); check(rd == 32'h0000_1234, "buffer data");
    rdreg(8'h1D, rd); check(rd[1:0] == 2'd2 && rd[4:2] == 3'd5 && rd[5] && !rd[6] && rd[8], $sformatf("status %h", rd));
    rdreg(8'h1E, rd); check(rd == 32'd123456, "turns");
    rdreg(8'h22, rd); check(rd == 32'h5352_5301, "ID");
    // power-supply fault masks
    wr(8'h16, 32'h0); wr(8'h17, 32'h0); wr(8'h18, 32'h0);
    @(negedge clk) check(!ps_fault, "masked: no fault");
    wr(8'h18, 32'h0080_0000);
    @(negedge clk) check(ps_fault, "fault on magnet 2 bit 23");
    wr(8'h18, 32'h0); wr(8'h16, 32'h0000_0100);
    @(negedge clk) check(ps_fault, "fault on magnet 0 bit 8");
    ps_status[0] = 24'h0;
    @(negedge clk) check(!ps_fault, "fault clears with status");
    rdreg(8'h1F, rd); check(rd == 32'h0, "ps status 0");
    rdreg(8'h21, rd); check(rd == 32'h0080_0000, "ps status 2");
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
