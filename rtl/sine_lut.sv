// sine_lut: sine table used by the numerically controlled oscillators.
//
// A full period of 2^AW entries, sin(2*pi*i/2^AW) scaled to (2^(W-1) - 1)
// and rounded, computed at elaboration. The lookup is combinational (a ROM).
module sine_lut #(
  parameter int unsigned AW = 10,
  parameter int unsigned W  = 16
) (
  input  logic [AW-1:0]       phase,
  output logic signed [W-1:0] value
);
  localparam int unsigned N = 2 ** AW;
  typedef logic signed [W-1:0] table_t [N];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < N; i++)
      t[i] = W'($rtoi($floor((2.0 ** (W - 1) - 1.0) * $sin(2.0 * 3.14159265358979 * i / N) + 0.5)));
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_comb value = TABLE[phase];
endmodule
