// pid_controller: discrete PID controller of an SRS regulation loop.
//
// On every update pulse, with e the error (reference minus measurement):
//   I <- sat(I + e)                          integral, clamped to +-2^(IW-1)
//   u <- sat16((kp*e + ki*I + kd*(e - e_prev)) >>> 8)
// The proportional term follows the size of the error, the integral removes
// the steady-state offset and the derivative reacts to the trend. Gains are
// signed Q8.8. u is registered and valid one clock after update. clear
// empties the integrator and the derivative's memory (the loop is
// disabled). Fixed point in the fabric, the Q8.8 gains and the integrator
// clamp are this design's choices.
module pid_controller
  import srs_pkg::*;
#(
  parameter int unsigned IW = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       update,
  input  sample_t    err,
  input  pid_gains_t gains,
  output sample_t    u
);
  localparam logic signed [IW:0] IMAX = (IW+1)'((2 ** (IW - 1)) - 1);
  localparam logic signed [IW:0] IMIN = -(IW+1)'(2 ** (IW - 1));

  logic signed [IW-1:0] integ, integ_n;
  logic signed [IW:0]   isum;
  sample_t              e_prev;
  logic signed [16:0]   de;
  logic signed [47:0]   acc;

  always_comb begin
    isum    = (IW+1)'(integ) + (IW+1)'(err);
    if (isum > IMAX)      integ_n = IMAX[IW-1:0];
    else if (isum < IMIN) integ_n = IMIN[IW-1:0];
    else                  integ_n = isum[IW-1:0];
    de  = 17'(err) - 17'(e_prev);
    acc = 48'(gains.kp) * 48'(err) + 48'(gains.ki) * 48'(integ_n) + 48'(gains.kd) * 48'(de);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ  <= '0;
      e_prev <= '0;
      u      <= '0;
    end else if (clear) begin
      integ  <= '0;
      e_prev <= '0;
      u      <= '0;
    end else if (update) begin
      integ  <= integ_n;
      e_prev <= err;
      u      <= sat16(acc >>> 8);
    end
  end
endmodule
