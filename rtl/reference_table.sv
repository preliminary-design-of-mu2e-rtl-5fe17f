// reference_table: one reference curve of the SRS, a value per regulation bin.
//
// The host writes the curve (ideal spill-rate profile, or the tune-quad ramp
// used as feed-forward) through wr_en/wr_addr/wr_data; the regulation loop
// reads it with rd_addr and gets rd_data one clock later. A simple dual-port
// RAM of DEPTH words of W bits, with no reset of its contents, so the host
// must load it before the first spill.
module reference_table #(
  parameter int unsigned DEPTH = srs_pkg::BINS,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
