// feedforward_buffer: capture buffer of the spill profiles of the last
// N_SPILLS spills, read by the host to compute the cycle-to-cycle
// feed-forward corrections during the 1.02 s without beam.
//
// At every bin_strobe the measurement of that bin is written at address
// {spill_idx, bin_idx}. When the last spill of the cycle ends (cycle_done)
// full is set, which is the "buffer full" interrupt to the host; ack clears
// it. The host reads any word with rd_addr and gets rd_data one clock later.
// The depth (one cycle of 8 spills) and the address layout are this design's
// choices.
module feedforward_buffer
  import srs_pkg::*;
#(
  parameter int unsigned N_SPILLS = SPILLS_PER_CYCLE,
  parameter int unsigned NBINS    = BINS
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          bin_strobe,
  input  logic [$clog2(N_SPILLS)-1:0]                   spill_idx,
  input  logic [$clog2(NBINS)-1:0]                      bin_idx,
  input  sample_t                                       meas,
  input  logic                                          cycle_done,
  input  logic                                          ack,
  input  logic [$clog2(N_SPILLS)+$clog2(NBINS)-1:0]     rd_addr,
  output sample_t                                       rd_data,
  output logic                                          full
);
  sample_t mem [N_SPILLS * NBINS];

  always_ff @(posedge clk) begin
    if (bin_strobe) mem[{spill_idx, bin_idx}] <= meas;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          full <= 1'b0;
    else if (cycle_done) full <= 1'b1;
    else if (ack)        full <= 1'b0;
  end
endmodule
