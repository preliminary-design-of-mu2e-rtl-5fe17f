// adc_receiver: deserialises the serial outputs of the carrier board's
// high-speed ADCs (16 channels from two 8-channel converters) into parallel
// samples.
//
// Each channel has one serial data lane, sent MSB first, one bit per clock.
// The converters' frame signal is high during the first (most significant)
// bit of every word and is shared by all channels. After the W-th bit of a
// word all channels present a sample together with a one-clock
// sample_valid, one clock after that bit. A frame pulse that does not come
// exactly W bits after the previous one sets the sticky frame_err and
// realigns the word count; clear_err clears it. Without a new frame pulse the
// receiver waits after a word and outputs nothing. The serial format (single
// lane, SDR, MSB first, two's complement) is this design's choice. With one
// bit per clock a channel delivers clk/W samples per second (4.1 MSPS at
// 66 MHz with W = 16), well below the converters' full rate; a full-rate
// front end needs the device's LVDS deserialisers, which would hand this
// design parallel words instead.
module adc_receiver #(
  parameter int unsigned CH = 16,
  parameter int unsigned W  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame,
  input  logic [CH-1:0]       sdata,
  input  logic                clear_err,
  output logic signed [W-1:0] sample [CH],
  output logic                sample_valid,
  output logic                frame_err
);
  localparam int unsigned CW = $clog2(W);

  logic [W-2:0]  shreg [CH];
  logic [CW-1:0] bit_idx;      // index of the bit received last clock
  logic [CW-1:0] cur_idx;      // index of the bit on the lanes now
  logic          locked;

  always_comb cur_idx = frame ? '0 : (bit_idx == CW'(W - 1)) ? bit_idx : bit_idx + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_idx      <= CW'(W - 1);
      locked       <= 1'b0;
      sample_valid <= 1'b0;
      frame_err    <= 1'b0;
      for (int c = 0; c < CH; c++) begin
        shreg[c]  <= '0;
        sample[c] <= '0;
      end
    end else begin
      sample_valid <= 1'b0;
      bit_idx      <= cur_idx;
      if (frame) begin
        if (locked && bit_idx != CW'(W - 1)) frame_err <= 1'b1;
        locked <= 1'b1;
      end
      if (clear_err) frame_err <= 1'b0;
      for (int c = 0; c < CH; c++) shreg[c] <= {shreg[c][W-3:0], sdata[c]};
      if (locked && !frame && bit_idx == CW'(W - 2)) begin
        sample_valid <= 1'b1;
        for (int c = 0; c < CH; c++) sample[c] <= {shreg[c], sdata[c]};
      end
    end
  end
endmodule
