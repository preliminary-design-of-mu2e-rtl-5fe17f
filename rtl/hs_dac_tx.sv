// hs_dac_tx: DAC transmitter that sends 8 channels of signed 14-bit data to
// four dual-channel high-speed DACs.
//
// Each DAC has one 14-bit data bus shared by its two channels, interleaved at
// twice the sample rate: a word for channel A, then one for channel B, with
// dac_sel low for A and high for B. Samples arrive in the clk domain (one per
// clock per channel) and are converted to offset binary; clk2x, at twice the
// frequency and phase-aligned with clk, drives the buses. The clk2x edge
// half-way through a clk period sends the A words of the samples captured at
// the clk edge that began the period; the next clk2x edge, which coincides
// with the following clk edge, sends their B words. Channel 2n goes to DAC n as A, channel 2n+1
// as B. Interleaving and offset binary are this design's choices.
module hs_dac_tx #(
  parameter int unsigned N_DAC = 4,
  parameter int unsigned W     = 14
) (
  input  logic                clk,
  input  logic                clk2x,
  input  logic                rst_n,
  input  logic signed [W-1:0] ch [2*N_DAC],
  output logic [W-1:0]        dac_data [N_DAC],
  output logic                dac_sel
);
  logic [W-1:0] a_q [N_DAC];
  logic [W-1:0] b_q [N_DAC];
  logic         tgl, tgl_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tgl <= 1'b0;
      for (int n = 0; n < N_DAC; n++) begin
        a_q[n] <= '0;
        b_q[n] <= '0;
      end
    end else begin
      tgl <= ~tgl;
      for (int n = 0; n < N_DAC; n++) begin
        a_q[n] <= {~ch[2*n][W-1],   ch[2*n][W-2:0]};
        b_q[n] <= {~ch[2*n+1][W-1], ch[2*n+1][W-2:0]};
      end
    end
  end

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      tgl_seen <= 1'b0;
      dac_sel  <= 1'b1;
      for (int n = 0; n < N_DAC; n++) dac_data[n] <= {1'b1, {(W-1){1'b0}}};
    end else if (tgl != tgl_seen) begin
      tgl_seen <= tgl;
      dac_sel  <= 1'b0;
      for (int n = 0; n < N_DAC; n++) dac_data[n] <= a_q[n];
    end else begin
      dac_sel  <= 1'b1;
      for (int n = 0; n < N_DAC; n++) dac_data[n] <= b_q[n];
    end
  end
endmodule
