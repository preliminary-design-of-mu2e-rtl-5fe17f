// lpf: first-order low-pass filter for a spill monitor signal.
//
// On every valid input y <- y + (x - y) * 2^-shift, kept with FRAC extra
// fraction bits so that small steps are not lost. shift = 0 passes the input
// through. The output is registered and follows the input valid by one clock
// (out_valid). The filter type is this design's choice.
module lpf
  import srs_pkg::*;
#(
  parameter int unsigned FRAC = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    x,
  input  logic       in_valid,
  input  logic [3:0] shift,
  output sample_t    y,
  output logic       out_valid
);
  localparam int unsigned SW = 16 + FRAC + 1;
  logic signed [SW-1:0] st, diff;

  always_comb begin
    diff = (SW'(x) <<< FRAC) - st;
    y    = sample_t'(st >>> FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) st <= st + (diff >>> shift);
    end
  end
endmodule
