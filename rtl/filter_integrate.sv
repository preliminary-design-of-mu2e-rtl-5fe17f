// filter_integrate: turns the samples of a spill monitor into one value per
// DR turn, the number of particles extracted per pulse.
//
// Each valid sample has a programmable baseline subtracted (the filter: it
// removes the monitor's DC offset) and is added to an accumulator. At every
// turn tick the sum of the finished turn, arithmetically shifted right by
// SHIFT and saturated to 16 bits, is presented with a one-clock out_valid and
// the accumulator restarts (with the sample of that clock, if any). SHIFT = 7
// keeps the per-turn value in the sample's range for up to 128 samples per
// turn: about 112 at a full 66 MSPS, 7 with the bit-serial receiver of this
// design at 66 MHz (the host then sees 7/128 of the sum and can set SHIFT
// lower). Offset subtraction and the shift are this design's choices.
module filter_integrate
  import srs_pkg::*;
#(
  parameter int unsigned SHIFT = 7,
  parameter int unsigned ACC_W = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t sample,
  input  logic    sample_valid,
  input  sample_t baseline,
  input  logic    turn_tick,
  output sample_t turn_sum,
  output logic    out_valid
);
  logic signed [ACC_W-1:0] acc;
  logic signed [16:0]      x;

  always_comb x = sample_valid ? (17'(sample) - 17'(baseline)) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      turn_sum  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= turn_tick;
      if (turn_tick) begin
        turn_sum <= sat16(48'(acc >>> SHIFT));
        acc      <= ACC_W'(x);
      end else begin
        acc <= acc + ACC_W'(x);
      end
    end
  end
endmodule
