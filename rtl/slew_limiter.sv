// slew_limiter: limits the rate of change of the tune-quad current reference.
//
// On every step pulse (one per turn) the output moves towards target by at
// most max_step LSBs. With the assumed current scale of 2.5 mA per LSB
// (0..163.8 A) and one step per 590.08 kHz turn, max_step = 10 gives
// 14,752 A/s, inside the quadrupole ramp's 16,000 A/s limit. The output resets
// to zero. Unsigned 16-bit values.
module slew_limiter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  input  logic [15:0] target,
  input  logic [15:0] max_step,
  output logic [15:0] y
);
  logic [16:0] up, dn;
  always_comb begin
    up = 17'(y) + 17'(max_step);
    dn = 17'(y) - 17'(max_step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else if (step) begin
      if (target > y) y <= (up < 17'(target)) ? up[15:0] : target;
      else if (target < y) y <= (dn[16] || dn[15:0] < target) ? target : dn[15:0];
    end
  end
endmodule
