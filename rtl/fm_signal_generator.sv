// fm_signal_generator: RF knock-out excitation f(x), a frequency-modulated
// sine whose carrier tracks the betatron sideband.
//
// A 32-bit phase accumulator advances every clock by carrier_inc + offset
// (carrier_inc = 2^32 * f_carrier / f_clk) and its top 10 bits address a sine
// table. The offset depends on mode:
//   FM_CARRIER  no modulation;
//   FM_CHIRP    a linear sweep: offset grows by sweep_step per clock from
//               -span_inc to +span_inc, then starts again (a repeating chirp);
//   FM_NOISE    coloured noise: a 32-bit LFSR gives white noise, a first-order
//               low-pass (2^-noise_shift) colours it, and the result, as a
//               fraction of full scale, is scaled by span_inc.
// The carrier increment comes from the sideband tracker (in the top). The sample is registered, one clock after
// the phase; with enable low the phase and the noise stop and the output is
// zero. The LFSR polynomial, the sweep shape and the noise colouring are this
// design's choices.
module fm_signal_generator
  import srs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  fm_mode_t    mode,
  input  logic [31:0] carrier_inc,
  input  logic [31:0] span_inc,      // half span of the modulation, < 2^31
  input  logic [31:0] sweep_step,
  input  logic [3:0]  noise_shift,
  output sample_t     f_out
);
  logic [31:0]        phase, lfsr;
  logic signed [32:0] sweep, noise_off, offset;
  logic signed [31:0] nf;           // coloured noise, 16 integer + 16 fraction bits
  logic signed [32:0] span_s, step_s;
  logic signed [32:0] nf_diff;
  logic signed [63:0] noise_prod;
  sample_t            s;

  always_comb begin
    span_s     = 33'(span_inc);
    step_s     = 33'(sweep_step);
    nf_diff    = 33'($signed({lfsr[15:0], 16'h0000})) - 33'(nf);
    noise_prod = 64'(nf >>> 16) * 64'(span_s);
    noise_off  = 33'(noise_prod >>> 15);
    unique case (mode)
      FM_CHIRP: offset = sweep;
      FM_NOISE: offset = noise_off;
      default:  offset = '0;
    endcase
  end

  sine_lut #(.AW(10), .W(16)) u_sin (.phase(phase[31:22]), .value(s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      lfsr  <= 32'h1;
      sweep <= '0;
      nf    <= '0;
      f_out <= '0;
    end else if (!enable) begin
      f_out <= '0;
      sweep <= -span_s;
    end else begin
      phase <= phase + carrier_inc + offset[31:0];
      // Galois LFSR, x^32 + x^22 + x^2 + x + 1
      lfsr  <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      nf    <= nf + 32'(nf_diff >>> noise_shift);
      if (sweep + step_s > span_s) sweep <= -span_s;
      else                         sweep <= sweep + step_s;
      f_out <= s;
    end
  end
endmodule
