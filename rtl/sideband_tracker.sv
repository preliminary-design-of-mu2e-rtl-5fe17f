// sideband_tracker: keeps the RF knock-out carrier on the betatron sideband
// while the tune-ramp quadrupoles move the tune.
//
// The betatron tune, and with it the sideband frequency, shifts in proportion
// to the quad current over the small range of a spill. The tracker therefore
// sets the carrier phase increment of the FM generator to
//   carrier_inc = base_inc + sat32((quad_ref - ref_current) * gain)
// where base_inc is the carrier at the quad current ref_current and gain
// (signed) is the change of the phase increment per LSB of quad current.
// With gain 0 the carrier is simply base_inc. The result is registered: it
// follows quad_ref one clock later. The FM generator adds its modulation on
// top. That the carrier tracks the sideband and is derived from the quad loop
// follows the document; the linear model and its two host-set coefficients
// are this design's choice (the host, which analyses the spill profiles,
// keeps them up to date).
module sideband_tracker (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        base_inc,
  input  logic [15:0]        quad_ref,
  input  logic [15:0]        ref_current,
  input  logic signed [15:0] gain,
  output logic [31:0]        carrier_inc
);
  logic signed [16:0] dq;
  logic signed [32:0] prod;
  logic signed [31:0] delta;

  always_comb begin
    dq   = $signed({1'b0, quad_ref}) - $signed({1'b0, ref_current});
    prod = dq * gain;
    if (prod > 33'sh0_7fff_ffff)       delta = 32'sh7fff_ffff;
    else if (prod < -33'sh0_8000_0000) delta = 32'sh8000_0000;
    else                               delta = prod[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carrier_inc <= '0;
    else        carrier_inc <= base_inc + delta;
  end
endmodule
